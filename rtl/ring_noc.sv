// ring_noc: network-on-chip built from fast, source-synchronous,
// unidirectional rings.
//
// NUM_H horizontal and NUM_V vertical rings. Each ring has its own fast ring
// clock (`rclk_h[h]`, `rclk_v[v]`); the ring clocks share a frequency but not
// a phase, and every processing element (PE) has its own slower clock
// `pclk[p]`. Every ring link carries a valid bit, a K-bit destination
// address and a D-bit data word, the word one ring cycle behind its address.
// Every PE is served by an add-drop station (ADS) on a horizontal ring; a
// junction station (JS) joins each horizontal ring to each vertical ring,
// and on the vertical rings a repeater follows each JS. Everything that
// crosses a clock boundary goes through an asynchronous FIFO, so no two
// clocks need to be related.
//
// Placement (noc_pkg): a horizontal ring holds PES_PER_H ADSs and NUM_V JSs,
// the JSs at positions 1, 3, ...; a vertical ring holds NUM_H JSs, each
// followed by a repeater. Data moves from position j to j+1 and from the
// last position back to 0. PE p = h * PES_PER_H + i is the i-th ADS of
// horizontal ring h; its address is p.
//
// Routing: a packet for a PE on the same horizontal ring goes round that
// ring to its ADS. A packet for another horizontal ring leaves at the first
// JS with room in its H->V FIFO, travels the vertical ring to the JS of the
// destination ring and enters it there. A packet that cannot be taken
// (FIFO full) circulates and tries again; nothing is ever discarded.
//
// Interface, per PE p (all on `pclk[p]`): `tx_wr_en[p]` queues a packet
// {`tx_addr[p]`, `tx_data[p]`} unless `tx_full[p]`; `rx_rd_en[p]` pops a
// received word unless `rx_empty[p]`, which then appears on `rx_data[p]`
// with `rx_valid[p]` for one cycle. `rst` is asynchronous and active high;
// it resets every domain and must be held for a few cycles of the slowest
// clock.
//
// The defaults are the 4x4 section used to validate the original design: 16 PEs
// (4-bit address), 2 horizontal and 2 vertical rings, 144-bit flits. The
// 8-entry FIFOs follow the original 4-bit pointer equations. Placing all PEs
// on the horizontal rings and the routing rule are this implementation's
// reading.
module ring_noc
  import noc_pkg::*;
#(
  parameter int unsigned K         = DEF_K,
  parameter int unsigned D         = DEF_D,
  parameter int unsigned DEPTH     = DEF_DEPTH,
  parameter int unsigned NUM_H     = DEF_NUM_H,
  parameter int unsigned NUM_V     = DEF_NUM_V,
  parameter int unsigned PES_PER_H = DEF_PES_PER_H,
  parameter int unsigned P         = NUM_H * PES_PER_H
) (
  input  logic         rst,
  input  logic         rclk_h [NUM_H],
  input  logic         rclk_v [NUM_V],
  input  logic         pclk   [P],
  // PE transmit
  input  logic         tx_wr_en [P],
  input  logic [K-1:0] tx_addr  [P],
  input  logic [D-1:0] tx_data  [P],
  output logic         tx_full  [P],
  // PE receive
  input  logic         rx_rd_en [P],
  output logic [D-1:0] rx_data  [P],
  output logic         rx_valid [P],
  output logic         rx_empty [P]
);

  localparam int unsigned HLEN = h_ring_len(PES_PER_H, NUM_V);
  localparam int unsigned VLEN = v_ring_len(NUM_H);

  // Link arrays: index j is the input of the station at position j.
  logic         h_valid [NUM_H][HLEN];
  logic [K-1:0] h_addr  [NUM_H][HLEN];
  logic [D-1:0] h_data  [NUM_H][HLEN];
  logic         v_valid [NUM_V][VLEN];
  logic [K-1:0] v_addr  [NUM_V][VLEN];
  logic [D-1:0] v_data  [NUM_V][VLEN];

  // Add-drop stations on the horizontal rings.
  for (genvar h = 0; h < int'(NUM_H); h++) begin : g_h
    for (genvar j = 0; j < int'(HLEN); j++) begin : g_pos
      if (!h_pos_is_js(j, NUM_V)) begin : g_ads
        localparam int unsigned PE = h * PES_PER_H + h_pos_ads_idx(j, NUM_V);
        localparam int unsigned JN = (j + 1) % HLEN;
        add_drop_station #(.K(K), .D(D), .DEPTH(DEPTH), .MY_ADDR(K'(PE))) u_ads (
          .rclk(rclk_h[h]), .rrst(rst), .pclk(pclk[PE]), .prst(rst),
          .in_valid(h_valid[h][j]), .in_addr(h_addr[h][j]), .in_data(h_data[h][j]),
          .out_valid(h_valid[h][JN]), .out_addr(h_addr[h][JN]), .out_data(h_data[h][JN]),
          .tx_wr_en(tx_wr_en[PE]), .tx_addr(tx_addr[PE]), .tx_data(tx_data[PE]),
          .tx_full(tx_full[PE]),
          .rx_rd_en(rx_rd_en[PE]), .rx_data(rx_data[PE]), .rx_valid(rx_valid[PE]),
          .rx_empty(rx_empty[PE])
        );
      end
    end
  end

  // Junction stations at every horizontal/vertical crossing.
  for (genvar h = 0; h < int'(NUM_H); h++) begin : g_jh
    for (genvar v = 0; v < int'(NUM_V); v++) begin : g_jv
      localparam int unsigned HJ  = h_js_pos(v);
      localparam int unsigned HJN = (HJ + 1) % HLEN;
      localparam int unsigned VJ  = v_js_pos(h);
      localparam int unsigned VJN = (VJ + 1) % VLEN;
      junction_station #(.K(K), .D(D), .DEPTH(DEPTH), .PES_PER_H(PES_PER_H), .MY_H(h)) u_js (
        .hclk(rclk_h[h]), .hrst(rst), .vclk(rclk_v[v]), .vrst(rst),
        .h_in_valid(h_valid[h][HJ]), .h_in_addr(h_addr[h][HJ]), .h_in_data(h_data[h][HJ]),
        .h_out_valid(h_valid[h][HJN]), .h_out_addr(h_addr[h][HJN]), .h_out_data(h_data[h][HJN]),
        .v_in_valid(v_valid[v][VJ]), .v_in_addr(v_addr[v][VJ]), .v_in_data(v_data[v][VJ]),
        .v_out_valid(v_valid[v][VJN]), .v_out_addr(v_addr[v][VJN]), .v_out_data(v_data[v][VJN])
      );
    end
  end

  // Repeaters on the vertical rings, one after each JS.
  for (genvar v = 0; v < int'(NUM_V); v++) begin : g_rv
    for (genvar h = 0; h < int'(NUM_H); h++) begin : g_rh
      localparam int unsigned RJ  = v_js_pos(h) + 1;
      localparam int unsigned RJN = (RJ + 1) % VLEN;
      ring_repeater #(.K(K), .D(D)) u_rep (
        .clk(rclk_v[v]), .rst(rst),
        .in_valid(v_valid[v][RJ]), .in_addr(v_addr[v][RJ]), .in_data(v_data[v][RJ]),
        .out_valid(v_valid[v][RJN]), .out_addr(v_addr[v][RJN]), .out_data(v_data[v][RJN])
      );
    end
  end

  initial begin
    assert (P <= (1 << K)) else $error("ring_noc: K too small to address every PE");
    assert (NUM_V <= PES_PER_H) else $error("ring_noc: need an ADS between neighbouring JSs");
  end

endmodule
