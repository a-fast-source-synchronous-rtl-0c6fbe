// tb_ring_noc: end-to-end test of the ring network at its default size
// (16 PEs, 2 horizontal + 2 vertical rings, 144-bit flits, 8-entry FIFOs).
//
// Clocks: every ring has its own 56 ps clock (about 18 GHz) with its own
// phase; every PE has its own 504 ps clock (9x slower) with its own phase.
// Each PE model sends packets whose data word carries source, sequence
// number, destination and a check value, and reads whatever arrives. The
// scoreboard checks that every received word arrived at the PE it was
// addressed to, is intact, and arrives once; at the end every packet sent
// must have been received.
//
// Phases: (1) a single packet on an idle network, its latency measured;
// (2) a hot spot: PE 0 floods PE 1 while PE 1 stops reading, which fills
// PE 1's Infifo (packets must circulate), then the ring, then PE 0's
// Outfifo; (3) uniform random traffic between all PEs; (4) drain.
// Counted mechanisms, each of which must occur: drop, add, repeat,
// drop refused by a full Infifo, outgoing queue full, horizontal->vertical
// and vertical->horizontal switching, junction pass-through, a refused
// junction transfer, traffic through the repeaters.
`timescale 1ps/1ps
module tb_ring_noc;
  import noc_pkg::*;

  localparam int unsigned K = DEF_K, D = DEF_D;
  localparam int unsigned NUM_H = DEF_NUM_H, NUM_V = DEF_NUM_V, PES_PER_H = DEF_PES_PER_H;
  localparam int unsigned P = NUM_H * PES_PER_H;
  localparam int unsigned HLEN = h_ring_len(PES_PER_H, NUM_V);
  localparam int MAXSEQ = 2048;
  localparam int RPER = 56, PPER = 504;

  logic         rst;
  logic         rclk_h [NUM_H];
  logic         rclk_v [NUM_V];
  logic         pclk   [P];
  logic         tx_wr_en [P];
  logic [K-1:0] tx_addr  [P];
  logic [D-1:0] tx_data  [P];
  logic         tx_full  [P];
  logic         rx_rd_en [P];
  logic [D-1:0] rx_data  [P];
  logic         rx_valid [P];
  logic         rx_empty [P];

  ring_noc dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $time, msg);
    end
  endtask

  // ---------------- clocks ----------------
  for (genvar h = 0; h < int'(NUM_H); h++) begin : g_rch
    initial begin
      rclk_h[h] = 0;
      #(7 + 13 * h);
      forever #(RPER / 2) rclk_h[h] = ~rclk_h[h];
    end
  end
  for (genvar v = 0; v < int'(NUM_V); v++) begin : g_rcv
    initial begin
      rclk_v[v] = 0;
      #(3 + 17 * v);
      forever #(RPER / 2) rclk_v[v] = ~rclk_v[v];
    end
  end
  for (genvar p = 0; p < int'(P); p++) begin : g_pc
    initial begin
      pclk[p] = 0;
      #(1 + (p * 37) % PPER);
      forever #(PPER / 2) pclk[p] = ~pclk[p];
    end
  end

  // ---------------- packet format ----------------
  function automatic logic [31:0] chk(input int s, input int q, input int d);
    return 32'hA5C3_0000 ^ (s * 32'h0101_0001) ^ (q * 32'h0007_1033) ^ (d << 20);
  endfunction
  function automatic logic [D-1:0] mk(input int s, input int q, input int d);
    logic [D-1:0] w;
    w = '0;
    w[7:0]   = 8'(s);
    w[39:8]  = 32'(q);
    w[47:40] = 8'(d);
    w[79:48] = chk(s, q, d);
    w[D-1 -: 32] = ~chk(s, q, d);
    return w;
  endfunction

  bit   sent [P][MAXSEQ];
  bit   got  [P][MAXSEQ];
  int   nseq [P];
  int   n_sent = 0, n_recv = 0;

  // Traffic control.
  int   rate_pct  [P];     // send probability per pclk cycle
  int   dest_mode [P];     // -1: uniform random, else fixed destination
  int   read_pct  [P];     // read probability per pclk cycle
  int   quota     [P];     // packets still allowed (-1: no limit)
  int   want_full = 0;     // cycles in which a PE wanted to send but was full

  // ---------------- PE models ----------------
  for (genvar p = 0; p < int'(P); p++) begin : g_pe
    // Inputs change on the falling edge, so the flags seen are those the
    // station will itself use at the next rising edge.
    always @(negedge pclk[p]) begin
      int d;
      if (rst) begin
        tx_wr_en[p] <= 0;
        rx_rd_en[p] <= 0;
      end else begin
        tx_wr_en[p] <= 0;
        if (nseq[p] < MAXSEQ && quota[p] != 0 && ($urandom % 100) < rate_pct[p]) begin
          if (tx_full[p]) want_full++;
          else begin
            d = (dest_mode[p] >= 0) ? dest_mode[p] : int'($urandom % P);
            tx_wr_en[p] <= 1;
            tx_addr[p]  <= K'(d);
            tx_data[p]  <= mk(p, nseq[p], d);
            sent[p][nseq[p]] = 1;
            nseq[p]++;
            n_sent++;
            if (quota[p] > 0) quota[p]--;
          end
        end
        rx_rd_en[p] <= (($urandom % 100) < read_pct[p]);
        if (rx_valid[p]) begin
          int s, q, dd;
          s  = int'(rx_data[p][7:0]);
          q  = int'(rx_data[p][39:8]);
          dd = int'(rx_data[p][47:40]);
          check(dd == p, $sformatf("PE %0d got word for %0d", p, dd));
          check(s < int'(P) && q < MAXSEQ && rx_data[p][79:48] == chk(s, q, dd)
                && rx_data[p][D-1 -: 32] == ~chk(s, q, dd),
                $sformatf("PE %0d got corrupt word %h", p, rx_data[p]));
          if (s < int'(P) && q < MAXSEQ) begin
            check(sent[s][q] && !got[s][q], $sformatf("PE %0d: packet %0d/%0d unexpected or duplicated", p, s, q));
            got[s][q] = 1;
          end
          n_recv++;
        end
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int c_drop = 0, c_add = 0, c_repeat = 0, c_refuse = 0;
  int c_h2v = 0, c_v2h = 0, c_jpass = 0, c_jrefuse = 0, c_rep = 0;

  for (genvar h = 0; h < int'(NUM_H); h++) begin : g_ch
    for (genvar j = 0; j < int'(HLEN); j++) begin : g_cj
      if (!h_pos_is_js(j, NUM_V)) begin : g_cads
        always @(posedge rclk_h[h]) if (!rst) begin
          if (dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.take) c_drop++;
          if (dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.add_rd_en) c_add++;
          if (dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.fwd) c_repeat++;
          if (dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.in_valid
              && dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.match
              && dut.g_h[h].g_pos[j].g_ads.u_ads.u_port.blocked) c_refuse++;
        end
      end
    end
    for (genvar v = 0; v < int'(NUM_V); v++) begin : g_cv
      always @(posedge rclk_h[h]) if (!rst) begin
        if (dut.g_jh[h].g_jv[v].u_js.u_hport.take) c_h2v++;
        if (dut.g_jh[h].g_jv[v].u_js.u_hport.fwd) c_jpass++;
        if (dut.g_jh[h].g_jv[v].u_js.u_hport.in_valid
            && dut.g_jh[h].g_jv[v].u_js.u_hport.match
            && dut.g_jh[h].g_jv[v].u_js.u_hport.blocked) c_jrefuse++;
      end
      always @(posedge rclk_v[v]) if (!rst) begin
        if (dut.g_jh[h].g_jv[v].u_js.u_vport.take) c_v2h++;
        if (dut.g_jh[h].g_jv[v].u_js.u_vport.fwd) c_jpass++;
        if (dut.g_jh[h].g_jv[v].u_js.u_vport.in_valid
            && dut.g_jh[h].g_jv[v].u_js.u_vport.match
            && dut.g_jh[h].g_jv[v].u_js.u_vport.blocked) c_jrefuse++;
        if (dut.g_rv[v].g_rh[h].u_rep.out_valid) c_rep++;
      end
    end
  end

  // ---------------- watchdog ----------------
  initial begin
    #(PPER * 40000);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wait_pclk(input int n);
    repeat (n) @(posedge pclk[0]);
  endtask

  // Wait until everything sent has been received (or give up).
  task automatic drain(input int max_cycles);
    int n;
    n = 0;
    while (n_recv < n_sent && n < max_cycles) begin
      wait_pclk(1);
      n++;
    end
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int t0, t1, lat_ring;
    for (int p = 0; p < int'(P); p++) begin
      rate_pct[p] = 0; dest_mode[p] = -1; read_pct[p] = 100; nseq[p] = 0; quota[p] = -1;
      tx_wr_en[p] = 0; rx_rd_en[p] = 0; tx_addr[p] = '0; tx_data[p] = '0;
    end
    rst = 1;
    #(PPER * 5);
    rst = 0;
    wait_pclk(5);

    // (1) one packet, PE 2 -> PE 13 (other horizontal ring), idle network.
    @(posedge pclk[2]);
    dest_mode[2] = 13; quota[2] = 1; rate_pct[2] = 100;
    @(posedge pclk[2]);
    t0 = int'($time);
    wait (n_recv == 1);
    quota[2] = -1; rate_pct[2] = 0; dest_mode[2] = -1;
    t1 = int'($time);
    lat_ring = (t1 - t0) / RPER;
    $display("single packet PE2->PE13: %0d ps = %0d ring cycles = %0d PE cycles",
             t1 - t0, lat_ring, (t1 - t0) / PPER);
    // Bound from this implementation's pipeline: FIFO crossings dominate.
    check(t1 - t0 < 12 * PPER, "single-packet latency too long");

    // (2) hot spot: PE 0 floods PE 1, which stops reading.
    read_pct[1] = 0;
    dest_mode[0] = 1; rate_pct[0] = 100;
    for (int p = 8; p < 16; p++) rate_pct[p] = 10;
    wait_pclk(60);
    rate_pct[0] = 0;
    wait_pclk(100);
    read_pct[1] = 100;
    for (int p = 8; p < 16; p++) rate_pct[p] = 0;
    drain(4000);
    check(n_recv == n_sent, $sformatf("hot spot: %0d sent, %0d received", n_sent, n_recv));

    // (3) uniform random traffic, some slow readers.
    for (int p = 0; p < int'(P); p++) begin
      dest_mode[p] = -1; rate_pct[p] = 30; read_pct[p] = (p % 5 == 0) ? 20 : 90;
    end
    wait_pclk(1500);
    for (int p = 0; p < int'(P); p++) begin
      rate_pct[p] = 0; read_pct[p] = 100;
    end
    drain(8000);
    wait_pclk(20);

    // (4) everything sent must have arrived exactly once.
    check(n_recv == n_sent, $sformatf("%0d sent, %0d received", n_sent, n_recv));
    for (int s = 0; s < int'(P); s++)
      for (int q = 0; q < nseq[s]; q++)
        if (!got[s][q]) begin
          failures++;
          if (failures < 20) $display("FAIL: packet %0d/%0d never arrived", s, q);
        end
    checks++;

    $display("sent=%0d received=%0d", n_sent, n_recv);
    $display("mechanisms: drop=%0d add=%0d repeat=%0d infifo_full_refuse=%0d outfifo_full=%0d",
             c_drop, c_add, c_repeat, c_refuse, want_full);
    $display("            h2v=%0d v2h=%0d js_pass=%0d js_refuse=%0d repeater_slots=%0d",
             c_h2v, c_v2h, c_jpass, c_jrefuse, c_rep);
    check(c_drop > 0,    "no drop happened");
    check(c_add > 0,     "no add happened");
    check(c_repeat > 0,  "no repeat happened");
    check(c_refuse > 0,  "no drop refused by a full Infifo");
    check(want_full > 0, "Outfifo never full");
    check(c_h2v > 0,     "no horizontal->vertical switch");
    check(c_v2h > 0,     "no vertical->horizontal switch");
    check(c_jpass > 0,   "no junction pass-through");
    check(c_jrefuse > 0, "no junction transfer refused");
    check(c_rep > 0,     "no traffic through a repeater");
    check(c_drop == n_recv, $sformatf("drops %0d != received %0d", c_drop, n_recv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
