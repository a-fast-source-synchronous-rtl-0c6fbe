// tb_ring_repeater: every field of the link must come out exactly one clock
// later, so the one-cycle lead of valid/address over data is kept.
`timescale 1ps/1ps
module tb_ring_repeater;
  localparam int unsigned K = 4, D = 144;
  logic clk = 0, rst = 1;
  logic in_valid, out_valid;
  logic [K-1:0] in_addr, out_addr;
  logic [D-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  logic [K+D:0] prev;

  ring_repeater #(.K(K), .D(D)) dut (.*);

  always #28 clk = ~clk;

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

  initial begin
    in_valid = 1; in_addr = '1; in_data = '1;
    repeat (2) @(negedge clk);
    check(out_valid == 0 && out_addr == 0 && out_data == 0, "reset empties the stage");
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = 1'($urandom);
      in_addr  = K'($urandom);
      for (int b = 0; b < int'(D); b += 32) in_data[b +: 32] = $urandom;
      prev = {in_valid, in_addr, in_data};
      @(posedge clk); #1;
      check({out_valid, out_addr, out_data} == prev, "one-cycle delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
