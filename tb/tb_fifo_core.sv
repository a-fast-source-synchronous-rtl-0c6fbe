// tb_fifo_core: writes random words to random entries and checks that only
// the addressed entry changes (one-hot write with recirculation), that the
// read mux shows the addressed entry, and that the registered output holds
// the entry read at the last edge, or zero when the FIFO is flagged empty.
`timescale 1ps/1ps
module tb_fifo_core;
  localparam int unsigned WIDTH = 16, DEPTH = 8, AW = 3;
  logic wclk = 0, rclk = 0, rrst = 1;
  logic we, empty;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] din, head, dout;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  fifo_core #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 wclk = ~wclk;
  always #8 rclk = ~rclk;   // edges never coincide with wclk edges

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write side: fill every entry, then random writes.
  initial begin
    we = 0; waddr = 0; din = 0;
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge wclk); we = 1; waddr = AW'(i); din = WIDTH'($urandom);
      @(posedge wclk); model[i] = din;
    end
    forever begin
      @(negedge wclk);
      we = 1'($urandom); waddr = AW'($urandom); din = WIDTH'($urandom);
      @(posedge wclk);
      if (we) model[waddr] = din;
    end
  end

  // Read side.
  initial begin
    logic [WIDTH-1:0] exp;
    raddr = 0; empty = 1;
    repeat (2) @(negedge rclk);
    check(dout == 0, "reset clears dout");
    rrst = 0;
    repeat (DEPTH + 2) @(negedge rclk);
    for (int i = 0; i < 400; i++) begin
      @(negedge rclk);
      raddr = AW'($urandom); empty = ($urandom % 4) == 0;
      #2;
      check(head == model[raddr], $sformatf("head of entry %0d", raddr));
      @(posedge rclk);
      exp = empty ? '0 : model[raddr];   // sampled at the edge
      #1;
      check(dout == exp, $sformatf("dout %h expected %h", dout, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
