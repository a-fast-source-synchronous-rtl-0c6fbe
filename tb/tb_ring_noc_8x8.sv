// tb_ring_noc_8x8: a larger network than the 4x4 default, as a scaled-down
// stand-in for the 16x16 projection of the original evaluation: 64 PEs on 8
// horizontal rings of 8 PEs, 8 vertical rings, 6-bit addresses, 144-bit
// flits. Single packets between random PE pairs on an idle network
// (delivery time averaged), then uniform random traffic; see tb_noc_harness.
`timescale 1ps/1ps
module tb_ring_noc_8x8;
  bit  done;
  int  checks, failures;
  real avg;

  tb_noc_harness #(.K(6), .D(144), .NUM_H(8), .NUM_V(8), .PES_PER_H(8),
                   .SINGLES(30), .TRAFFIC_CYCLES(300), .RATE_PCT(10), .MAXSEQ(64))
    u_net (.done(done), .checks(checks), .failures(failures), .avg_single_pe_cycles(avg));

  initial begin
    #(504 * 30000);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
