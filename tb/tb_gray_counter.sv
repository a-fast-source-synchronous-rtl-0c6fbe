// tb_gray_counter: checks the Gray pointer counter against a binary
// reference count: the binary and Gray outputs, the look-ahead outputs, a
// single Gray bit changing per increment, and the wrap from 15 back to 0.
`timescale 1ps/1ps
module tb_gray_counter;
  localparam int unsigned W = 4;
  logic clk = 0, rst = 1, en = 0;
  logic [W-1:0] bin, gray, bin_next, gray_next;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_bin, prev_gray;
  int wraps = 0;

  gray_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_bin = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    check(bin == 0 && gray == 0, "reset value");
    prev_gray = gray;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      #1;
      check(bin_next == ref_bin + W'(en), "bin_next");
      check(gray_next == (bin_next ^ (bin_next >> 1)), "gray_next");
      @(posedge clk); #1;
      if (en) begin
        if (ref_bin == '1) wraps++;
        ref_bin = ref_bin + 1;
      end
      check(bin == ref_bin, $sformatf("bin %0d expected %0d", bin, ref_bin));
      check(gray == (ref_bin ^ (ref_bin >> 1)), "gray encoding");
      check($countones(gray ^ prev_gray) == (en ? 1 : 0), "one Gray bit per step");
      prev_gray = gray;
    end
    check(wraps > 5, "counter wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
