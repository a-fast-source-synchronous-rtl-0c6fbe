// add_drop_station (ADS): attaches one processing element (PE) to a ring.
//
// The ring runs on its own fast clock `rclk`, the PE on its slower clock
// `pclk`; the two are unrelated. The station holds two asynchronous FIFOs:
// the Infifo, written from the ring and read by the PE, and the Outfifo,
// written by the PE and read by the ring. Each ring cycle the station drops
// the passing slot into the Infifo if it is valid, addressed to MY_ADDR and
// the Infifo has room; repeats it if it is valid but not taken; and
// otherwise fills the free slot from the Outfifo (ring_port has the cycle
// detail). A slot addressed here that finds the Infifo full is repeated and
// comes round again.
//
// Interface. Ring: `in_*` from the upstream neighbour, `out_*` to the
// downstream one; `*_valid`/`*_addr` lead `*_data` by one `rclk` cycle.
// PE transmit (`pclk`): `tx_wr_en` queues {`tx_addr`, `tx_data`} unless
// `tx_full`. PE receive (`pclk`): `rx_rd_en` pops a word unless `rx_empty`;
// after that edge `rx_data` holds it and `rx_valid` is high for one cycle
// (`rx_data` is zero while the Infifo is empty). `rrst`/`prst` are the
// asynchronous, active-high resets of the two domains, asserted together.
//
// Timing: a repeated slot spends one `rclk` cycle in the station. A dropped
// word reaches the PE after the Infifo's synchronizer delay (about 2-3
// `pclk` cycles); a queued word reaches the ring a few `rclk` cycles after
// the Outfifo's write pointer has crossed over, at the first free slot.
//
// Structure and equations follow the original design. The Infifo holds data only (the
// address is not needed once the word has arrived); the Outfifo holds
// address and data, since the added slot's address comes from it.
module add_drop_station #(
  parameter int unsigned  K       = 4,
  parameter int unsigned  D       = 144,
  parameter int unsigned  DEPTH   = 8,
  parameter logic [K-1:0] MY_ADDR = '0
) (
  input  logic         rclk,
  input  logic         rrst,
  input  logic         pclk,
  input  logic         prst,
  // ring
  input  logic         in_valid,
  input  logic [K-1:0] in_addr,
  input  logic [D-1:0] in_data,
  output logic         out_valid,
  output logic [K-1:0] out_addr,
  output logic [D-1:0] out_data,
  // PE transmit side
  input  logic         tx_wr_en,
  input  logic [K-1:0] tx_addr,
  input  logic [D-1:0] tx_data,
  output logic         tx_full,
  // PE receive side
  input  logic         rx_rd_en,
  output logic [D-1:0] rx_data,
  output logic         rx_valid,
  output logic         rx_empty
);

  localparam int unsigned PW = $clog2(DEPTH) + 1;

  logic           match;
  logic           in_full, in_afull, in_wr_en;
  logic [D-1:0]   in_wdata;
  logic           out_empty, out_rd_en;
  logic [K+D-1:0] out_head, out_dout;

  // FIFO outputs this station does not use.
  logic [D-1:0]   rx_head_unused;
  logic           tx_afull_unused;
  logic [PW-1:0]  in_wptr_unused, in_rptr_unused, out_wptr_unused, out_rptr_unused;
  logic           out_rd_valid_unused;
  logic [K-1:0]   in_waddr_unused;

  assign match = (in_addr == MY_ADDR);

  ring_port #(.K(K), .D(D)) u_port (
    .clk(rclk), .rst(rrst),
    .in_valid(in_valid), .in_addr(in_addr), .in_data(in_data),
    .out_valid(out_valid), .out_addr(out_addr), .out_data(out_data),
    .match(match),
    .drop_full(in_full), .drop_afull(in_afull),
    .drop_wr_en(in_wr_en), .drop_waddr(in_waddr_unused), .drop_wdata(in_wdata),
    .add_empty(out_empty), .add_head_addr(out_head[K+D-1:D]),
    .add_dout_data(out_dout[D-1:0]), .add_rd_en(out_rd_en)
  );

  // Infifo: ring -> PE.
  async_fifo #(.WIDTH(D), .DEPTH(DEPTH)) u_infifo (
    .wclk(rclk), .wrst(rrst), .wr_en(in_wr_en), .din(in_wdata),
    .full(in_full), .afull(in_afull), .wptr(in_wptr_unused),
    .rclk(pclk), .rrst(prst), .rd_en(rx_rd_en),
    .dout(rx_data), .head(rx_head_unused), .rd_valid(rx_valid),
    .empty(rx_empty), .rptr(in_rptr_unused)
  );

  // Outfifo: PE -> ring, word = {address, data}.
  async_fifo #(.WIDTH(K + D), .DEPTH(DEPTH)) u_outfifo (
    .wclk(pclk), .wrst(prst), .wr_en(tx_wr_en), .din({tx_addr, tx_data}),
    .full(tx_full), .afull(tx_afull_unused), .wptr(out_wptr_unused),
    .rclk(rclk), .rrst(rrst), .rd_en(out_rd_en),
    .dout(out_dout), .head(out_head), .rd_valid(out_rd_valid_unused),
    .empty(out_empty), .rptr(out_rptr_unused)
  );

endmodule
