// fifo_core: storage of an asynchronous FIFO.
//
// Write side: the write address is decoded to one-hot and each bit is ANDed
// with the write enable; the selected entry loads `din`, every other entry
// reloads its own value through a 2:1 mux. Read side: the read address
// selects one entry through a read mux; the result, forced to zero while
// the FIFO is empty, is registered on the read clock into `dout`. This is
// the structure of the original design's FIFO core.
//
// Interface: `we`, `waddr`, `din` on `wclk`. `raddr`, `empty` on `rclk`.
// `head` is the entry at `raddr`, combinational. `dout` is registered: after
// a rising edge of `rclk` it holds the entry `raddr` pointed at before that
// edge (or zero if the FIFO was empty). `rrst` (asynchronous, active high)
// clears `dout`; the entries themselves are not reset, since an entry is only
// read after it has been written.
module fifo_core #(
  parameter int unsigned WIDTH = 144,
  parameter int unsigned DEPTH = 8,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] din,
  input  logic             rclk,
  input  logic             rrst,
  input  logic [AW-1:0]    raddr,
  input  logic             empty,
  output logic [WIDTH-1:0] head,
  output logic [WIDTH-1:0] dout
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [DEPTH-1:0] wsel;

  // One-hot write select, ANDed with the write enable.
  always_comb begin
    for (int i = 0; i < int'(DEPTH); i++) wsel[i] = we && (waddr == AW'(i));
  end

  // Each entry either loads the new word or recirculates its own.
  always_ff @(posedge wclk) begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] <= wsel[i] ? din : mem[i];
  end

  assign head = mem[raddr];

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) dout <= '0;
    else      dout <= empty ? '0 : head;
  end

endmodule
