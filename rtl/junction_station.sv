// junction_station (JS): joins a horizontal ring and a vertical ring where
// they cross.
//
// It works like an add-drop station with a second ring in place of the PE.
// Two asynchronous FIFOs connect the rings, which run on mesochronous clocks
// (same frequency, unknown phase): the H->V FIFO is written from the
// horizontal ring and read by the vertical one, the V->H FIFO the other way
// round. Each ring side is a ring_port: it drops a slot into its outgoing
// FIFO, repeats it, or fills a free slot from its incoming FIFO.
//
// Routing (this implementation's choice; the original design leaves it open): a PE's address
// is ring * PES_PER_H + index, all PEs sit on horizontal rings. On the
// horizontal side the JS takes every packet addressed to another horizontal
// ring, so a packet leaves its ring at the first junction with room. On the
// vertical side the JS takes every packet addressed to its own horizontal
// ring MY_H. A packet refused because a FIFO is full goes round again.
//
// Interface: `h_*` ports are the horizontal ring (clock `hclk`, reset
// `hrst`), `v_*` ports the vertical ring (`vclk`, `vrst`); on both,
// valid/address lead data by one cycle. Resets are asynchronous, active
// high, asserted together.
//
// Timing: a packet that stays on its ring spends one cycle in the JS. A
// packet that changes rings pays the FIFO crossing: the write, the
// two-stage pointer synchronizer, the registered empty flag and the add
// stage, about 5 cycles of the receiving ring clock in this implementation.
module junction_station #(
  parameter int unsigned K         = 4,
  parameter int unsigned D         = 144,
  parameter int unsigned DEPTH     = 8,
  parameter int unsigned PES_PER_H = 8,
  parameter int unsigned MY_H      = 0
) (
  input  logic         hclk,
  input  logic         hrst,
  input  logic         vclk,
  input  logic         vrst,
  // horizontal ring
  input  logic         h_in_valid,
  input  logic [K-1:0] h_in_addr,
  input  logic [D-1:0] h_in_data,
  output logic         h_out_valid,
  output logic [K-1:0] h_out_addr,
  output logic [D-1:0] h_out_data,
  // vertical ring
  input  logic         v_in_valid,
  input  logic [K-1:0] v_in_addr,
  input  logic [D-1:0] v_in_data,
  output logic         v_out_valid,
  output logic [K-1:0] v_out_addr,
  output logic [D-1:0] v_out_data
);

  localparam int unsigned PW = $clog2(DEPTH) + 1;

  logic           h_match, v_match;
  // H->V FIFO
  logic           hv_full, hv_afull, hv_wr_en, hv_empty, hv_rd_en;
  logic [K-1:0]   hv_waddr;
  logic [D-1:0]   hv_wdata;
  logic [K+D-1:0] hv_head, hv_dout;
  // V->H FIFO
  logic           vh_full, vh_afull, vh_wr_en, vh_empty, vh_rd_en;
  logic [K-1:0]   vh_waddr;
  logic [D-1:0]   vh_wdata;
  logic [K+D-1:0] vh_head, vh_dout;

  logic [PW-1:0]  hv_wptr_unused, hv_rptr_unused, vh_wptr_unused, vh_rptr_unused;
  logic           hv_rd_valid_unused, vh_rd_valid_unused;

  always_comb begin
    h_match = (32'(h_in_addr) / PES_PER_H) != MY_H;
    v_match = (32'(v_in_addr) / PES_PER_H) == MY_H;
  end

  ring_port #(.K(K), .D(D)) u_hport (
    .clk(hclk), .rst(hrst),
    .in_valid(h_in_valid), .in_addr(h_in_addr), .in_data(h_in_data),
    .out_valid(h_out_valid), .out_addr(h_out_addr), .out_data(h_out_data),
    .match(h_match),
    .drop_full(hv_full), .drop_afull(hv_afull),
    .drop_wr_en(hv_wr_en), .drop_waddr(hv_waddr), .drop_wdata(hv_wdata),
    .add_empty(vh_empty), .add_head_addr(vh_head[K+D-1:D]),
    .add_dout_data(vh_dout[D-1:0]), .add_rd_en(vh_rd_en)
  );

  ring_port #(.K(K), .D(D)) u_vport (
    .clk(vclk), .rst(vrst),
    .in_valid(v_in_valid), .in_addr(v_in_addr), .in_data(v_in_data),
    .out_valid(v_out_valid), .out_addr(v_out_addr), .out_data(v_out_data),
    .match(v_match),
    .drop_full(vh_full), .drop_afull(vh_afull),
    .drop_wr_en(vh_wr_en), .drop_waddr(vh_waddr), .drop_wdata(vh_wdata),
    .add_empty(hv_empty), .add_head_addr(hv_head[K+D-1:D]),
    .add_dout_data(hv_dout[D-1:0]), .add_rd_en(hv_rd_en)
  );

  // The word keeps its address: it is needed again on the other ring.
  async_fifo #(.WIDTH(K + D), .DEPTH(DEPTH)) u_hv_fifo (
    .wclk(hclk), .wrst(hrst), .wr_en(hv_wr_en), .din({hv_waddr, hv_wdata}),
    .full(hv_full), .afull(hv_afull), .wptr(hv_wptr_unused),
    .rclk(vclk), .rrst(vrst), .rd_en(hv_rd_en),
    .dout(hv_dout), .head(hv_head), .rd_valid(hv_rd_valid_unused),
    .empty(hv_empty), .rptr(hv_rptr_unused)
  );

  async_fifo #(.WIDTH(K + D), .DEPTH(DEPTH)) u_vh_fifo (
    .wclk(vclk), .wrst(vrst), .wr_en(vh_wr_en), .din({vh_waddr, vh_wdata}),
    .full(vh_full), .afull(vh_afull), .wptr(vh_wptr_unused),
    .rclk(hclk), .rrst(hrst), .rd_en(vh_rd_en),
    .dout(vh_dout), .head(vh_head), .rd_valid(vh_rd_valid_unused),
    .empty(vh_empty), .rptr(vh_rptr_unused)
  );

endmodule
