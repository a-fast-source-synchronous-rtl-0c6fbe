// tb_add_drop_station: one add-drop station (address 5) between a ring
// driver and a ring monitor, with a PE model on its own clock (56 ps ring
// clock, 504 ps PE clock).
//
// The driver offers a slot every ring cycle (valid/address in cycle c, data
// in cycle c+1) and logs it; the monitor logs what leaves. Afterwards every
// slot is accounted for from the logs:
//   - a valid slot for another address must leave exactly one cycle later
//     with the same address and, one cycle after that, the same data;
//   - a slot for address 5 either leaves unchanged one cycle later (refused,
//     Infifo full) or is dropped; the dropped words must reach the PE, in
//     order;
//   - any other slot that leaves is an add and must be the next word the PE
//     queued, and may only use a slot that was free or dropped.
// Directed phases: idle ring (add), random traffic, a ring busy with other
// traffic for 150 cycles (no add may happen; the PE's queue fills), and 12
// back-to-back slots for address 5 with the PE not reading (exactly 8 are
// dropped, 4 refused).
`timescale 1ps/1ps
module tb_add_drop_station;
  localparam int unsigned K = 4, D = 144, DEPTH = 8;
  localparam logic [K-1:0] ME = 4'd5;
  localparam int NC = 6000;
  localparam int RPER = 56, PPER = 504;

  logic rclk = 0, pclk = 0, rrst = 1, prst = 1;
  logic in_valid = 0, out_valid;
  logic [K-1:0] in_addr = '0, out_addr;
  logic [D-1:0] in_data = '0, out_data;
  logic tx_wr_en = 0, tx_full;
  logic [K-1:0] tx_addr = '0;
  logic [D-1:0] tx_data = '0;
  logic rx_rd_en = 0, rx_valid, rx_empty;
  logic [D-1:0] rx_data;

  add_drop_station #(.K(K), .D(D), .DEPTH(DEPTH), .MY_ADDR(ME)) dut (.*);

  initial begin #11; forever #(RPER / 2) rclk = ~rclk; end
  initial begin #5;  forever #(PPER / 2) pclk = ~pclk; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #(RPER * (NC + 2000));
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- logs ----
  bit           iv [NC];
  logic [K-1:0] ia [NC];
  logic [D-1:0] id [NC];
  bit           ov [NC];
  logic [K-1:0] oa [NC];
  logic [D-1:0] od [NC];
  logic [D-1:0] txq [$];       // words queued by the PE, in order
  logic [D-1:0] rxl [$];       // words received by the PE, in order
  int           tx_cyc [$];    // ring cycle in which each word was queued
  int cyc = 0;
  int mode = 0;                // 0 idle, 1 random, 2 busy, 3 all for me
  int pe_send_pct = 0, pe_read_pct = 100;
  int tx_full_seen = 0;
  int burst_first = -1;

  function automatic logic [D-1:0] rnd();
    logic [D-1:0] w;
    for (int b = 0; b < int'(D); b += 32) w[b +: 32] = $urandom;
    return w;
  endfunction

  // Ring driver: changes on the falling edge; data lags address by a cycle.
  logic [D-1:0] pend_data = '0;
  always @(negedge rclk) if (!rrst && cyc < NC - 2) begin
    logic v; logic [K-1:0] a;
    case (mode)
      1: begin v = 1'($urandom); a = ($urandom % 3 == 0) ? ME : K'($urandom); end
      2: begin v = 1; a = 4'd3; end
      3: begin v = 1; a = ME; end
      default: begin v = 0; a = K'($urandom); end
    endcase
    in_data   <= pend_data;
    in_valid  <= v;
    in_addr   <= a;
    iv[cyc] = v; ia[cyc] = a; id[cyc] = rnd();
    pend_data = id[cyc];
  end
  // Monitor: the ring cycle number advances at the rising edge.
  always @(posedge rclk) if (!rrst) begin
    ov[cyc] = out_valid; oa[cyc] = out_addr;
    if (cyc > 0) od[cyc - 1] = out_data;
    cyc++;
  end

  // PE model.
  always @(negedge pclk) if (!prst) begin
    tx_wr_en <= 0;
    if (($urandom % 100) < pe_send_pct) begin
      if (tx_full) tx_full_seen++;
      else begin
        logic [D-1:0] w;
        w = rnd();
        tx_wr_en <= 1; tx_addr <= K'($urandom % 4 + 8); tx_data <= w;
        txq.push_back({w[D-1:0]});
        tx_cyc.push_back(cyc);
      end
    end
    rx_rd_en <= ($urandom % 100) < pe_read_pct;
    if (rx_valid) rxl.push_back(rx_data);
  end

  // The address travels with the queued word: keep it beside the data.
  logic [K-1:0] txa [$];
  always @(posedge pclk) if (!prst && tx_wr_en && !tx_full) txa.push_back(tx_addr);

  initial begin
    int n_rep = 0, n_drop = 0, n_ref = 0, n_add = 0, ti = 0;
    int burst_drop = 0;
    logic [D-1:0] drops [$];
    repeat (4) @(negedge pclk);
    rrst = 0; prst = 0;
    // idle ring, PE sends a few words
    pe_send_pct = 50;
    repeat (10) @(negedge pclk);
    pe_send_pct = 0;
    repeat (20) @(negedge pclk);
    // random ring traffic, PE sends and reads
    mode = 1; pe_send_pct = 40;
    repeat (150) @(negedge pclk);
    // busy ring: no free slot, PE keeps sending until its queue is full
    pe_send_pct = 0;
    repeat (10) @(negedge pclk);
    @(negedge rclk); mode = 2;
    pe_send_pct = 100;
    repeat (150) @(negedge rclk);
    pe_send_pct = 0;
    @(negedge rclk); mode = 0;
    repeat (30) @(negedge pclk);
    // 12 slots for this station, PE not reading
    pe_read_pct = 0;
    repeat (10) @(negedge pclk);
    @(negedge rclk); mode = 3; burst_first = cyc;
    repeat (12) @(negedge rclk);
    mode = 0;
    repeat (20) @(negedge pclk);
    pe_read_pct = 100;
    repeat (40) @(negedge pclk);
    mode = 1; pe_read_pct = 50; pe_send_pct = 30;
    repeat (100) @(negedge pclk);
    mode = 0; pe_send_pct = 0; pe_read_pct = 100;
    repeat (40) @(negedge pclk);

    // ---- account for every slot ----
    for (int c = 1; c < cyc - 3; c++) begin
      bit explained;
      explained = 0;
      if (iv[c-1]) begin
        if (ia[c-1] != ME) begin
          check(ov[c] && oa[c] == ia[c-1] && od[c] == id[c-1],
                $sformatf("slot %0d not repeated one cycle later", c - 1));
          explained = 1; n_rep++;
        end else if (ov[c] && oa[c] == ME && od[c] == id[c-1]) begin
          explained = 1; n_ref++;
          if (c - 1 >= burst_first && c - 1 < burst_first + 12) burst_drop--;
        end else begin
          drops.push_back(id[c-1]); n_drop++;
        end
        if (c - 1 >= burst_first && c - 1 < burst_first + 12) burst_drop++;
      end
      if (ov[c] && !explained) begin
        check(ti < txq.size() && od[c] == txq[ti] && oa[c] == txa[ti],
              $sformatf("cycle %0d: added word is not the next queued one", c));
        check(!(iv[c-1] && ia[c-1] != ME), "add into a busy slot");
        if (ti < 3) $display("add %0d: queued in ring cycle %0d, on the ring in cycle %0d", ti, tx_cyc[ti], c);
        ti++; n_add++;
      end
    end
    check(ti == txq.size(), $sformatf("%0d words queued, %0d added", txq.size(), ti));
    check(drops.size() == rxl.size(), $sformatf("%0d dropped, %0d received", drops.size(), rxl.size()));
    for (int i = 0; i < drops.size() && i < rxl.size(); i++)
      check(drops[i] == rxl[i], $sformatf("received word %0d differs", i));
    check(burst_drop == int'(DEPTH), $sformatf("burst: %0d of 12 dropped, expected %0d", burst_drop, DEPTH));
    check(tx_full_seen > 0, "PE queue never full");
    check(n_rep > 100 && n_drop > 20 && n_ref >= 4 && n_add > 20, "every operation happened");
    $display("repeat=%0d drop=%0d refused=%0d add=%0d tx_full=%0d", n_rep, n_drop, n_ref, n_add, tx_full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
