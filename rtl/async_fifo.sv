// async_fifo: dual-clock FIFO that passes words between two unrelated clocks
// (the ring clock and a PE clock in an add-drop station, two ring clocks in a
// junction station).
//
// Both pointers are log2(DEPTH)+1-bit Gray counters (gray_counter). The write
// pointer always names the next entry to write, the read pointer the entry
// to read next. Each pointer is carried into the other domain by a
// SYNC_STAGES flip-flop synchronizer (ptr_sync). Empty is computed in the
// read domain as "read pointer equals synchronized write pointer"; full is
// computed in the write domain as "write pointer equals synchronized read
// pointer with its two top Gray bits inverted", which is the Gray form of
// "same entry, wrap bits different". Both flags are registered and use the
// pointer value after the current edge, so a write (read) that fills
// (empties) the FIFO is reflected at once. Because the far pointer arrives
// late, full and empty are pessimistic: they may stay set a few cycles after
// space or data appeared, never the other way round.
//
// Interface (write side, `wclk`): `wr_en` with `din`, ignored while `full`;
// `afull` says exactly one entry is left.
// Read side (`rclk`): `rd_en` pops the head word, ignored while `empty`.
// After the edge that pops a word, `dout` holds that word and `rd_valid` is
// high for one cycle; `head` shows the word at the read pointer
// combinationally. `wptr` and `rptr` are the Gray pointers. `wrst` and `rrst`
// are asynchronous, active high, one per domain; assert both together.
//
// The Gray pointers, the 2-flip-flop synchronizers, the XOR/XNOR style
// full/empty comparison and the empty-gated output register follow the
// original design. Registering the flags with look-ahead, `afull`, `head`
// and `rd_valid` are this implementation's choices.
module async_fifo #(
  parameter int unsigned WIDTH       = 144,
  parameter int unsigned DEPTH       = 8,
  parameter int unsigned SYNC_STAGES = 2,
  parameter int unsigned AW          = $clog2(DEPTH),
  parameter int unsigned PW          = AW + 1
) (
  // write domain
  input  logic             wclk,
  input  logic             wrst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  output logic             afull,
  output logic [PW-1:0]    wptr,
  // read domain
  input  logic             rclk,
  input  logic             rrst,
  input  logic             rd_en,
  output logic [WIDTH-1:0] dout,
  output logic [WIDTH-1:0] head,
  output logic             rd_valid,
  output logic             empty,
  output logic [PW-1:0]    rptr
);

  logic [PW-1:0] wbin, wbin_next, wgray_next;
  logic [PW-1:0] rbin, rbin_next, rgray_next;
  logic [PW-1:0] rptr_wclk, wptr_rclk;
  logic          do_write, do_read;

  // Gray code with the two top bits inverted: the pointer one lap ahead.
  localparam logic [PW-1:0] FULL_MASK = PW'(3) << (PW - 2);

  assign do_write = wr_en && !full;
  assign do_read  = rd_en && !empty;

  gray_counter #(.W(PW)) u_wcnt (
    .clk(wclk), .rst(wrst), .en(do_write),
    .bin(wbin), .gray(wptr), .bin_next(wbin_next), .gray_next(wgray_next)
  );

  gray_counter #(.W(PW)) u_rcnt (
    .clk(rclk), .rst(rrst), .en(do_read),
    .bin(rbin), .gray(rptr), .bin_next(rbin_next), .gray_next(rgray_next)
  );

  ptr_sync #(.W(PW), .STAGES(SYNC_STAGES)) u_sync_r2w (
    .clk(wclk), .rst(wrst), .d(rptr), .q(rptr_wclk)
  );

  ptr_sync #(.W(PW), .STAGES(SYNC_STAGES)) u_sync_w2r (
    .clk(rclk), .rst(rrst), .d(wptr), .q(wptr_rclk)
  );

  fifo_core #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AW(AW)) u_core (
    .wclk(wclk), .we(do_write), .waddr(wbin[AW-1:0]), .din(din),
    .rclk(rclk), .rrst(rrst), .raddr(rbin[AW-1:0]), .empty(empty),
    .head(head), .dout(dout)
  );

  // Full logic, write domain. `afull`: exactly one entry left.
  logic [PW-1:0] wbin_next2, wgray_next2;
  always_comb begin
    wbin_next2  = wbin_next + PW'(1);
    wgray_next2 = (wbin_next2 >> 1) ^ wbin_next2;
  end

  always_ff @(posedge wclk or posedge wrst) begin
    if (wrst) begin
      full  <= 1'b0;
      afull <= 1'b0;
    end else begin
      full  <= (wgray_next  == (rptr_wclk ^ FULL_MASK));
      afull <= (wgray_next2 == (rptr_wclk ^ FULL_MASK));
    end
  end

  // Empty logic, read domain.
  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) empty <= 1'b1;
    else      empty <= (rgray_next == wptr_rclk);
  end

  always_ff @(posedge rclk or posedge rrst) begin
    if (rrst) rd_valid <= 1'b0;
    else      rd_valid <= do_read;
  end

  initial assert (DEPTH >= 2 && (1 << AW) == DEPTH)
    else $error("async_fifo: DEPTH must be a power of two, at least 2");

endmodule
