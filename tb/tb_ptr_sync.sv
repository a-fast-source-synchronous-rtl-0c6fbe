// tb_ptr_sync: the synchronizer must present its input exactly STAGES
// receiving-clock cycles later; checked for the default 2 stages and for 3.
`timescale 1ps/1ps
module tb_ptr_sync;
  localparam int unsigned W = 4;
  logic clk = 0, rst = 1;
  logic [W-1:0] d, q2, q3;
  logic [W-1:0] hist [$];
  int checks = 0, failures = 0;

  ptr_sync #(.W(W))              dut2 (.clk(clk), .rst(rst), .d(d), .q(q2));
  ptr_sync #(.W(W), .STAGES(3))  dut3 (.clk(clk), .rst(rst), .d(d), .q(q3));

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
    d = '0;
    repeat (2) @(negedge clk);
    check(q2 == 0 && q3 == 0, "reset clears the chain");
    rst = 0;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      hist.push_front(d);
      @(posedge clk); #1;
      // hist[0] was sampled at this edge: q2 shows hist[1], q3 hist[2].
      if (hist.size() > 2) begin
        check(q2 == hist[1], $sformatf("2-stage: %0h expected %0h", q2, hist[1]));
        check(q3 == hist[2], $sformatf("3-stage: %0h expected %0h", q3, hist[2]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
