// ptr_sync: flip-flop chain that brings a Gray-coded pointer into another
// clock domain.
//
// The pointer is launched from a register in its own domain (the pointer
// counter) and sampled here by STAGES flip-flops clocked by the receiving
// clock. Two stages is the original design's choice; more stages buy a longer mean
// time between failures at the cost of one cycle of latency each.
//
// Interface: `d` is the source-domain pointer, `q` the synchronized copy,
// STAGES cycles of `clk` later. `rst` is asynchronous, active high, and
// clears the chain.
module ptr_sync #(
  parameter int unsigned W      = 4,
  parameter int unsigned STAGES = 2
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] chain [STAGES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int i = 0; i < int'(STAGES); i++) chain[i] <= '0;
    end else begin
      chain[0] <= d;
      for (int i = 1; i < int'(STAGES); i++) chain[i] <= chain[i-1];
    end
  end

  assign q = chain[STAGES-1];

  initial assert (STAGES >= 1) else $error("ptr_sync: STAGES must be at least 1");

endmodule
