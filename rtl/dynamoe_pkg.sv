// dynamoe_pkg: types and constants shared by the DyNAMoE blocks.
//
// A NoC link carries one flit of LANES 16-bit "neurons" (256 x 16 = 4096 bits),
// plus a sideband bit that marks the flit as a header (router reconfiguration)
// or as data. Links use a valid/ready handshake; a flit moves when both are high.
//
// Header lane format (one 16-bit lane per router, lane index = router id):
//   bit 15      MC/UC flag (1 = multicast, 0 = unicast)
//   bits 14:0   five 3-bit fields, one per output port, in the order
//               N [14:12], S [11:9], E [8:6], W [5:3], Loc [2:0].
//               A field names the input port that drives that output:
//               0 = none, 1 = N, 2 = S, 3 = E, 4 = W, 5 = Loc.
// The 1 + 15 bit split and "3 bits per output port" follow the packet
// encoding of the design; the meaning of a field (input select per output)
// and the port numbering are this design's choice.
package dynamoe_pkg;

  localparam int unsigned LANES  = 256;  // neurons per flit
  localparam int unsigned DW     = 16;   // bits per neuron
  localparam int unsigned NPORTS = 5;    // N, S, E, W, Loc
  localparam int unsigned SELW   = 3;    // bits per port field

  // Port indices used for arrays and masks.
  typedef enum logic [2:0] {
    P_N = 3'd0,
    P_S = 3'd1,
    P_E = 3'd2,
    P_W = 3'd3,
    P_L = 3'd4
  } port_e;

  typedef logic [LANES-1:0][DW-1:0] vec_t;

  typedef struct packed {
    logic hdr;   // 1 = header mode, 0 = data mode
    vec_t data;
  } flit_t;

  // Per-router crossbar configuration: for each output port, the input port
  // feeding it (field encoding above, 0 = output unused).
  typedef logic [NPORTS-1:0][SELW-1:0] xcfg_t;

  typedef struct packed {
    logic  mc;
    xcfg_t sel;  // sel[P_N] is bits 14:12 ... sel[P_L] is bits 2:0
  } hdr_lane_t;

  // Decode one header lane into a crossbar configuration. Fields holding
  // 6 or 7 are treated as unused. In unicast mode only the first output
  // (highest field) that names a given input keeps it, so one input reaches
  // at most one output.
  function automatic xcfg_t decode_lane(input logic [DW-1:0] lane);
    hdr_lane_t h;
    xcfg_t     c;
    logic [NPORTS:0] used;
    h    = hdr_lane_t'(lane);
    c    = '0;
    used = '0;
    for (int o = 0; o < NPORTS; o++) begin
      // field order in the lane is N first (MSB) ... Loc last (LSB)
      logic [SELW-1:0] f;
      f = h.sel[NPORTS-1-o];
      if (f != 0 && f <= SELW'(NPORTS)) begin
        if (h.mc || !used[f]) begin
          c[o]    = f;
          used[f] = 1'b1;
        end
      end
    end
    return c;
  endfunction

  // Build a header lane from a configuration (used by test benches and
  // controllers): inverse of decode_lane for well-formed configurations.
  function automatic logic [DW-1:0] encode_lane(input logic mc, input xcfg_t c);
    hdr_lane_t h;
    h.mc = mc;
    for (int o = 0; o < NPORTS; o++) h.sel[NPORTS-1-o] = c[o];
    return DW'(h);
  endfunction

  // Mask of outputs driven by input port i under configuration c.
  function automatic logic [NPORTS-1:0] outs_of(input xcfg_t c, input int unsigned i);
    logic [NPORTS-1:0] m;
    for (int o = 0; o < NPORTS; o++) m[o] = (c[o] == SELW'(i + 1));
    return m;
  endfunction

endpackage
