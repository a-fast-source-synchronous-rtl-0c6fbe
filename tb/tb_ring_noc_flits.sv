// tb_ring_noc_flits: the 4x4 section (16 PEs, 2+2 rings) with the two other
// flit widths of the original evaluation, 9 bytes (D = 72) and 36 bytes
// (D = 288), side by side. Each network routes single packets across ADSs
// and JSs, then uniform random traffic; see tb_noc_harness.
`timescale 1ps/1ps
module tb_ring_noc_flits;
  bit  done9, done36;
  int  c9, f9, c36, f36;
  real a9, a36;

  tb_noc_harness #(.D(72))  u_d9  (.done(done9),  .checks(c9),  .failures(f9),  .avg_single_pe_cycles(a9));
  tb_noc_harness #(.D(288)) u_d36 (.done(done36), .checks(c36), .failures(f36), .avg_single_pe_cycles(a36));

  initial begin
    #(504 * 30000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c9 + c36, f9 + f36 + 1);
    $finish;
  end

  initial begin
    wait (done9 && done36);
    $display("TB_RESULT checks=%0d failures=%0d", c9 + c36, f9 + f36);
    $finish;
  end
endmodule
