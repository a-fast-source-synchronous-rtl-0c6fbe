// tb_noc_harness: reusable traffic harness around one ring_noc instance, for
// the workload testbenches (flit widths, larger networks).
//
// Every ring gets a 56 ps clock and every PE a 504 ps clock, each with its
// own phase. Phase 1 sends SINGLES packets one at a time between random PE
// pairs on an otherwise idle network and measures each delivery time (from
// the PE clock edge that queues the packet to the edge after which the
// receiver holds it). Phase 2 runs uniform random traffic at RATE_PCT
// percent of PE cycles per PE for TRAFFIC_CYCLES PE cycles, then drains.
// Every received word must carry the receiver's address, an intact check
// pattern and a (source, sequence) pair sent once and received once.
// `done` rises at the end; `checks`/`failures` count the results.
`timescale 1ps/1ps
module tb_noc_harness #(
  parameter int unsigned K = 4,
  parameter int unsigned D = 144,
  parameter int unsigned NUM_H = 2,
  parameter int unsigned NUM_V = 2,
  parameter int unsigned PES_PER_H = 8,
  parameter int SINGLES = 20,
  parameter int TRAFFIC_CYCLES = 400,
  parameter int RATE_PCT = 20,
  parameter int MAXSEQ = 256
) (
  output bit done,
  output int checks,
  output int failures,
  output real avg_single_pe_cycles
);
  localparam int unsigned P = NUM_H * PES_PER_H;
  localparam int RPER = 56, PPER = 504;
  localparam int CW = 16;   // width of the check pattern

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

  ring_noc #(.K(K), .D(D), .NUM_H(NUM_H), .NUM_V(NUM_V), .PES_PER_H(PES_PER_H)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t (D=%0d P=%0d): %s", $time, D, P, msg);
    end
  endtask

  for (genvar h = 0; h < int'(NUM_H); h++) begin : g_rch
    initial begin rclk_h[h] = 0; #(1 + (7 * h) % RPER); forever #(RPER / 2) rclk_h[h] = ~rclk_h[h]; end
  end
  for (genvar v = 0; v < int'(NUM_V); v++) begin : g_rcv
    initial begin rclk_v[v] = 0; #(2 + (11 * v) % RPER); forever #(RPER / 2) rclk_v[v] = ~rclk_v[v]; end
  end
  for (genvar p = 0; p < int'(P); p++) begin : g_pc
    initial begin pclk[p] = 0; #(1 + (p * 37) % PPER); forever #(PPER / 2) pclk[p] = ~pclk[p]; end
  end

  // Word layout: [15:0] source, [31:16] sequence, [47:32] destination,
  // top CW bits a check pattern (D >= 64).
  function automatic logic [CW-1:0] chk(input int s, input int q, input int d);
    return CW'(16'h5A3C ^ (s * 16'h0107) ^ (q * 16'h2213) ^ (d * 16'h0931));
  endfunction
  function automatic logic [D-1:0] mk(input int s, input int q, input int d);
    logic [D-1:0] w;
    w = '0;
    w[15:0] = 16'(s); w[31:16] = 16'(q); w[47:32] = 16'(d);
    w[D-1 -: CW] = chk(s, q, d);
    return w;
  endfunction

  bit sent [P][MAXSEQ];
  bit got  [P][MAXSEQ];
  int nseq [P];
  int n_sent = 0, n_recv = 0;
  int rate [P];
  int fixed_dest [P];
  int last_rx_time;

  for (genvar p = 0; p < int'(P); p++) begin : g_pe
    always @(negedge pclk[p]) begin
      if (rst) begin
        tx_wr_en[p] <= 0; rx_rd_en[p] <= 0;
      end else begin
        tx_wr_en[p] <= 0;
        if (nseq[p] < MAXSEQ && ($urandom % 100) < rate[p] && !tx_full[p]) begin
          int d;
          d = (fixed_dest[p] >= 0) ? fixed_dest[p] : int'($urandom % P);
          tx_wr_en[p] <= 1; tx_addr[p] <= K'(d); tx_data[p] <= mk(p, nseq[p], d);
          sent[p][nseq[p]] = 1; nseq[p]++; n_sent++;
          if (fixed_dest[p] >= 0) begin rate[p] = 0; fixed_dest[p] = -1; end
        end
        rx_rd_en[p] <= 1;
        if (rx_valid[p]) begin
          int s, q, dd;
          s = int'(rx_data[p][15:0]); q = int'(rx_data[p][31:16]); dd = int'(rx_data[p][47:32]);
          check(dd == p && rx_data[p][D-1 -: CW] == chk(s, q, dd), $sformatf("PE %0d: wrong or corrupt word", p));
          if (s < int'(P) && q < MAXSEQ) begin
            check(sent[s][q] && !got[s][q], $sformatf("PE %0d: %0d/%0d unexpected or duplicate", p, s, q));
            got[s][q] = 1;
          end
          n_recv++;
          last_rx_time = int'($time);
        end
      end
    end
  end

  initial begin
    real total;
    checks = 0; failures = 0; done = 0; total = 0;
    for (int p = 0; p < int'(P); p++) begin
      nseq[p] = 0; rate[p] = 0; fixed_dest[p] = -1;
      tx_wr_en[p] = 0; rx_rd_en[p] = 0; tx_addr[p] = '0; tx_data[p] = '0;
    end
    rst = 1;
    #(PPER * 5);
    rst = 0;
    #(PPER * 5);
    // Phase 1: single packets on an idle network.
    for (int i = 0; i < SINGLES; i++) begin
      int s, d, t0, nr;
      s = int'($urandom % P); d = int'($urandom % P);
      nr = n_recv;
      @(posedge pclk[s]);
      fixed_dest[s] = d; rate[s] = 100;
      @(posedge pclk[s]);   // queued at this edge
      t0 = int'($time);
      fork
        wait (n_recv == nr + 1);
        #(PPER * 200);
      join_any
      disable fork;
      check(n_recv == nr + 1, $sformatf("single packet %0d->%0d not delivered", s, d));
      total += real'(last_rx_time - t0) / real'(PPER);
      #(PPER * 3);
    end
    avg_single_pe_cycles = (SINGLES > 0) ? total / SINGLES : 0.0;
    // Phase 2: random traffic, then drain.
    for (int p = 0; p < int'(P); p++) rate[p] = RATE_PCT;
    #(PPER * TRAFFIC_CYCLES);
    for (int p = 0; p < int'(P); p++) rate[p] = 0;
    for (int i = 0; i < 6000 && n_recv < n_sent; i++) #(PPER);
    #(PPER * 10);
    check(n_recv == n_sent, $sformatf("%0d sent, %0d received", n_sent, n_recv));
    for (int s = 0; s < int'(P); s++)
      for (int q = 0; q < nseq[s]; q++) check(got[s][q], $sformatf("%0d/%0d lost", s, q));
    $display("D=%0d P=%0d: %0d packets, single-packet delivery %.2f PE cycles on average",
             D, P, n_sent, avg_single_pe_cycles);
    done = 1;
  end
endmodule
