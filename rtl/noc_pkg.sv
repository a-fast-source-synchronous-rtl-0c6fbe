// noc_pkg: constants and topology helpers shared by the ring network.
//
// The network is a set of unidirectional rings. Every ring link carries a
// valid bit, a K-bit destination address and a D-bit data word; the data word
// travels one ring-clock cycle behind its valid/address. The defaults below
// follow the 4x4 section of the original design: 16 processing elements (PEs), so a
// 4-bit address, and a 144-bit (18-byte) flit.
//
// Placement (this design's reading of the floor plan): all PEs sit on the
// horizontal rings, PES_PER_H on each. On a horizontal ring the junction
// stations (JS) are interleaved with the add-drop stations (ADS): positions
// 1, 3, 5, ... hold the JS of vertical ring 0, 1, 2, ... and all other
// positions hold ADSs. A vertical ring holds one JS per horizontal ring, each
// followed by a repeater. A PE's address is ring * PES_PER_H + index.
package noc_pkg;

  localparam int unsigned DEF_K         = 4;    // address bits, log2(P)
  localparam int unsigned DEF_D         = 144;  // data bits per flit
  localparam int unsigned DEF_DEPTH     = 8;    // FIFO entries (4-bit pointers)
  localparam int unsigned DEF_NUM_H     = 2;    // horizontal rings
  localparam int unsigned DEF_NUM_V     = 2;    // vertical rings
  localparam int unsigned DEF_PES_PER_H = 8;    // PEs on each horizontal ring

  // Number of stations on a horizontal ring.
  function automatic int unsigned h_ring_len(input int unsigned pes_per_h,
                                             input int unsigned num_v);
    return pes_per_h + num_v;
  endfunction

  // Number of stations (JS and repeaters) on a vertical ring.
  function automatic int unsigned v_ring_len(input int unsigned num_h);
    return 2 * num_h;
  endfunction

  // Is position j of a horizontal ring a junction station?
  function automatic bit h_pos_is_js(input int unsigned j, input int unsigned num_v);
    return (j % 2 == 1) && (j / 2 < num_v);
  endfunction

  // Vertical ring served by the JS at position j of a horizontal ring.
  function automatic int unsigned h_pos_js_idx(input int unsigned j);
    return j / 2;
  endfunction

  // Position of the JS of vertical ring v on a horizontal ring.
  function automatic int unsigned h_js_pos(input int unsigned v);
    return 2 * v + 1;
  endfunction

  // Index along the ring of the ADS at position j (JSs before it skipped).
  function automatic int unsigned h_pos_ads_idx(input int unsigned j, input int unsigned num_v);
    int unsigned n;
    n = 0;
    for (int unsigned i = 0; i < j; i++)
      if (h_pos_is_js(i, num_v)) n++;
    return j - n;
  endfunction

  // Position of the JS of horizontal ring h on a vertical ring (a repeater
  // follows at the next position).
  function automatic int unsigned v_js_pos(input int unsigned h);
    return 2 * h;
  endfunction

endpackage
