// ring_repeater: one ring-clock pipeline stage on a ring link.
//
// Used on the vertical rings, where neighbouring junction stations are two
// link lengths apart: the stage splits the long link so that every segment
// still fits in one ring-clock cycle. Valid, address and data are each
// delayed by exactly one cycle, so the one-cycle lead of valid/address over
// data is kept.
//
// Interface: `in_*` from upstream, `out_*` downstream, clock `clk`,
// asynchronous active-high `rst` clearing the stage (an empty slot).
// That the repeater costs one ring cycle follows the original latency
// figures; building it as a register stage is this implementation's reading.
module ring_repeater #(
  parameter int unsigned K = 4,
  parameter int unsigned D = 144
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  input  logic [K-1:0] in_addr,
  input  logic [D-1:0] in_data,
  output logic         out_valid,
  output logic [K-1:0] out_addr,
  output logic [D-1:0] out_data
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_addr  <= in_addr;
      out_data  <= in_data;
    end
  end

endmodule
