// tb_async_fifo: the dual-clock FIFO in both directions it is used in an
// add-drop station: a 56 ps writer with a 504 ps reader (Infifo) and a
// 504 ps writer with a 56 ps reader (Outfifo), clocks at unrelated phases.
// For each: the flags after reset; exactly DEPTH writes accepted before
// `full` (and `afull` one write earlier) while the reader is stopped;
// writes offered while full are ignored; the read-side `empty` falls within
// SYNC_STAGES+2 read clocks of the first write (synchronizer plus flag
// register); then random writes and reads, every word read compared with
// a queue of the words accepted, in order; `empty` at the end.
`timescale 1ps/1ps
module tb_async_fifo;
  localparam int unsigned WIDTH = 144, DEPTH = 8;
  int checks = 0, failures = 0;
  int done = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #(504 * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
    localparam int WP = cfg ? 504 : 56;
    localparam int RP = cfg ? 56 : 504;
    logic wclk = 0, rclk = 0, wrst = 1, rrst = 1;
    logic wr_en = 0, rd_en = 0;
    logic [WIDTH-1:0] din = '0, dout, head;
    logic full, afull, empty, rd_valid;
    logic [3:0] wptr, rptr;
    logic [WIDTH-1:0] q [$];
    int n_wr = 0, n_rd = 0;
    bit random_phase = 0;
    int rd_mode = 0;   // 0: no reads, 1: random reads, 2: read whenever possible

    async_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

    initial begin #(3 + 11 * cfg); forever #(WP / 2) wclk = ~wclk; end
    initial begin #(17 + 5 * cfg); forever #(RP / 2) rclk = ~rclk; end

    function automatic logic [WIDTH-1:0] rnd();
      logic [WIDTH-1:0] w;
      for (int b = 0; b < int'(WIDTH); b += 32) w[b +: 32] = $urandom;
      return w;
    endfunction

    // Accepted writes and reads are recorded at the clock edges.
    always @(posedge wclk) if (!wrst && wr_en && !full) begin q.push_back(din); n_wr++; end
    always @(posedge rclk) if (!rrst && rd_valid) begin
      logic [WIDTH-1:0] e;
      e = q.pop_front();
      check(dout == e, $sformatf("cfg %0d: read %h expected %h", cfg, dout, e));
      n_rd++;
    end

    initial begin
      int lat;
      repeat (4) @(negedge rclk);
      repeat (4) @(negedge wclk);
      check(empty && !full && !afull, "flags after reset");
      wrst = 0; rrst = 0;
      // First write, then time the empty flag.
      @(negedge wclk); wr_en = 1; din = rnd();
      @(posedge wclk); #1 wr_en = 0;
      lat = 0;
      while (empty && lat < 10) begin @(posedge rclk); #1; lat++; end
      $display("cfg %0d: empty falls %0d read clocks after the write", cfg, lat);
      check(lat >= 2 && lat <= 4, $sformatf("empty latency %0d", lat));
      // Fill with the reader stopped.
      for (int i = 1; i < int'(DEPTH); i++) begin
        @(negedge wclk);
        check(!full, "full too early");
        check(afull == (i == int'(DEPTH) - 1), $sformatf("afull after %0d writes", i));
        wr_en = 1; din = rnd();
      end
      @(negedge wclk); wr_en = 1; din = rnd();   // offered while full
      #1 check(full, "full after DEPTH writes");
      @(negedge wclk); wr_en = 0;
      check(n_wr == int'(DEPTH), $sformatf("accepted %0d writes", n_wr));
      // Random traffic.
      random_phase = 1; rd_mode = 1;
      repeat (3000 * 56 / WP) @(negedge wclk);
      random_phase = 0; rd_mode = 2;
      repeat (40) @(negedge rclk);
      repeat (40) @(negedge wclk);
      check(empty && q.size() == 0 && n_rd == n_wr, $sformatf("cfg %0d drained: %0d written %0d read", cfg, n_wr, n_rd));
      done++;
    end

    always @(negedge wclk) if (random_phase) begin
      wr_en <= ($urandom % 3) == 0;
      din   <= rnd();
    end else if (rd_mode == 2) wr_en <= 0;
    always @(negedge rclk) rd_en <= (rd_mode == 1) ? (($urandom % 3) == 0) : (rd_mode == 2);
  end

  // End when both configurations are done.
  initial begin
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
