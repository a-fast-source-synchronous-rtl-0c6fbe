// gray_counter: FIFO pointer kept in reflected Gray code.
//
// A pointer of W = log2(n)+1 bits for an n-entry FIFO: the low log2(n) bits
// address an entry and the extra top bit counts wrap-arounds, so equal
// pointers mean "empty" and pointers differing only in the wrap bit mean
// "full". The count is held in binary (to address the storage) and in Gray
// code (to cross into the other clock domain): one Gray bit changes per
// increment, so a synchronizer sampling it mid-change sees either the old or
// the new value, never a mix.
//
// Interface: `en` advances the pointer at the rising edge of `clk`; the
// caller gates it with the full or empty flag. `bin`/`gray` are the
// registered pointer; `bin_next`/`gray_next` are the values after this edge,
// used by the registered full/empty logic. `rst` is asynchronous, active
// high, and clears the pointer.
//
// The Gray counter and its purpose follow the original design; holding a binary copy
// beside the Gray register is this implementation's choice.
module gray_counter #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  output logic [W-1:0] bin,
  output logic [W-1:0] gray,
  output logic [W-1:0] bin_next,
  output logic [W-1:0] gray_next
);

  always_comb begin
    bin_next  = bin + W'(en);
    gray_next = (bin_next >> 1) ^ bin_next;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      bin  <= '0;
      gray <= '0;
    end else begin
      bin  <= bin_next;
      gray <= gray_next;
    end
  end

endmodule
