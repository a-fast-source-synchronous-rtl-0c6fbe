// ring_port: the ring-side logic of a station, shared by the add-drop
// station (ADS) and both ring sides of the junction station (JS).
//
// Every ring-clock cycle the station does one of three things with the slot
// passing through it:
//   drop   - the slot is valid, its address matches and the drop FIFO is not
//            full: the data word is written into the drop FIFO;
//   repeat - the slot is valid and either does not match or the drop FIFO is
//            full: valid, address and data are passed on;
//   add    - otherwise the slot is free; if the add FIFO holds a word, its
//            address and data are put into the slot.
// On the link the address and valid bit run one cycle ahead of the data
// word, so the decision is made in the cycle the address arrives and is
// applied to the data one cycle later (the "prev" signals of the original design).
//
// Timing, with the address of a slot at the input in cycle t:
//   t    : match/full sampled; address/valid out register loaded;
//          the add FIFO is popped if the slot is free;
//   t+1  : address/valid leave the station; the data word arrives, is
//          written into the drop FIFO (drop) and captured in `snoop`;
//          the popped add word moves into `fifodata_out`;
//   t+2  : the data word leaves, from `snoop` (sel2 = 1) or from
//          `fifodata_out` (sel2 = 0).
// So a repeated slot takes one cycle per station and keeps its one-cycle
// address/data skew.
//
// Interface: `in_*`/`out_*` are the ring links. `match` is the parent's
// address decode of `in_addr` (combinational). The drop FIFO is seen through
// `drop_full`, `drop_wr_en`, `drop_wdata`; the add FIFO (read on this clock)
// through `add_empty`, `add_head_addr` (address of the word at its head),
// `add_dout_data` (registered data of the word popped at the last edge) and
// `add_rd_en`. `rst` is asynchronous, active high, and empties the ring.
//
// Because the drop decision is taken a cycle before the word is written, it
// also counts the write still pending from the previous slot (`drop_afull`);
// the original equations use the full flag alone.
//
// The drop/repeat/add equations, the snoop and fifodata_out registers and the
// sel2 mux follow the original design. Writing the drop FIFO on the same edge that
// loads `snoop`, and the second register stage that lines the popped word up
// with the link's data cycle, are this implementation's choices.
module ring_port #(
  parameter int unsigned K = 4,
  parameter int unsigned D = 144
) (
  input  logic         clk,
  input  logic         rst,
  // incoming ring link
  input  logic         in_valid,
  input  logic [K-1:0] in_addr,
  input  logic [D-1:0] in_data,
  // outgoing ring link
  output logic         out_valid,
  output logic [K-1:0] out_addr,
  output logic [D-1:0] out_data,
  // address decode from the parent
  input  logic         match,
  // drop FIFO (written on clk)
  input  logic         drop_full,
  input  logic         drop_afull,
  output logic         drop_wr_en,
  output logic [K-1:0] drop_waddr,
  output logic [D-1:0] drop_wdata,
  // add FIFO (read on clk)
  input  logic         add_empty,
  input  logic [K-1:0] add_head_addr,
  input  logic [D-1:0] add_dout_data,
  output logic         add_rd_en
);

  logic         take, fwd;        // decisions for the slot at the input
  logic         blocked;          // drop FIFO cannot take this slot
  logic         wen_prev;         // drop decision, applied to next data word
  logic         sel2_prev;        // repeat decision, one cycle old
  logic         sel2;             // repeat decision, aligned with snoop
  logic [K-1:0] addr_prev;        // address of the slot whose data is at the input
  logic [D-1:0] snoop;
  logic [D-1:0] fifodata_out;

  always_comb begin
    // The previous slot's word is still to be written at the next edge:
    // with one entry left, that write fills the FIFO.
    blocked   = drop_full || (wen_prev && drop_afull);
    take      = in_valid && match && !blocked;
    fwd       = in_valid && !(match && !blocked);
    add_rd_en = !fwd && !add_empty;
  end

  // Address/valid path: one cycle.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      addr_prev <= '0;
      wen_prev  <= 1'b0;
      sel2_prev <= 1'b0;
    end else begin
      out_valid <= fwd || !add_empty;
      out_addr  <= fwd ? in_addr : add_head_addr;
      addr_prev <= in_addr;
      wen_prev  <= take;
      sel2_prev <= fwd;
    end
  end

  // Data path: one cycle, one cycle behind the address.
  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      snoop        <= '0;
      fifodata_out <= '0;
      sel2         <= 1'b0;
    end else begin
      snoop        <= in_data;
      fifodata_out <= add_dout_data;
      sel2         <= sel2_prev;
    end
  end

  assign drop_wr_en = wen_prev;
  assign drop_waddr = addr_prev;
  assign drop_wdata = in_data;
  assign out_data   = sel2 ? snoop : fifodata_out;

  // A slot is never both dropped and repeated, and a dropped word always
  // finds room in the drop FIFO.
  a_one_action: assert property (@(posedge clk) disable iff (rst) !(take && fwd));
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) !(drop_wr_en && drop_full))
    else $error("ring_port: drop FIFO overflow");

endmodule
