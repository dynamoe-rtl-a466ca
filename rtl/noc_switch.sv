// noc_switch: reconfigurable crossbar shared by the Distro and Weight Distro
// routers.
//
// NUM_IN inputs (N, S, E, W and, when NUM_IN = 5, Loc) feed a crossbar with
// five registered outputs (N, S, E, W, Loc). The crossbar setting is held in a
// configuration register, one 3-bit input select per output (see
// dynamoe_pkg). The router works in two modes, chosen per flit by the
// header sideband bit:
//   header mode: the router takes lane ROUTER_ID of the flit, decodes it into
//     a new crossbar setting, stores it, and forwards the header flit along
//     the new setting, so every router on the path receives its own lane.
//   data mode: the flit follows the stored setting. An input that feeds
//     several outputs sends the same flit to all of them at once (in-network
//     multicast); it moves only when every one of those outputs can take it.
// A flit whose input feeds no output is consumed and reported on drop.
//
// Arbitration: inputs are served in fixed priority N > S > E > W > Loc; a
// cycle that applies a header moves nothing else. Each output is a
// two-flit queue, so a flit written in one cycle is offered to the next
// router in the next: a hop costs one cycle at full throughput. cfg_we pulses with cfg_wdata
// whenever a header changes the setting (the Distro router passes this to
// the Redux configuration memory).
module noc_switch
  import dynamoe_pkg::*;
#(
  parameter int unsigned NUM_IN    = 5,
  parameter int unsigned ROUTER_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [NUM_IN-1:0] in_valid,
  output logic  [NUM_IN-1:0] in_ready,
  input  flit_t [NUM_IN-1:0] in_flit,
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output flit_t [NPORTS-1:0] out_flit,
  output xcfg_t              cfg,
  output logic               cfg_we,
  output xcfg_t              cfg_wdata,
  output logic               drop
);
  xcfg_t                   cfg_q;
  logic [NPORTS-1:0]       out_free;
  logic [NUM_IN-1:0]       fire;
  logic [NPORTS-1:0]       load;
  localparam int unsigned SW = $clog2(NUM_IN);
  logic [NPORTS-1:0][SW-1:0] load_src;
  logic                    hdr_sel;
  logic [SW-1:0]           hdr_src;
  xcfg_t                   hdr_cfg;

  assign cfg = cfg_q;

  logic  [NPORTS-1:0] ob_ready;
  flit_t [NPORTS-1:0] ob_flit;

  assign out_free = ob_ready;

  // Pick the header to apply this cycle, if any (lowest input index).
  always_comb begin
    hdr_sel = 1'b0;
    hdr_src = '0;
    hdr_cfg = cfg_q;
    for (int i = NUM_IN-1; i >= 0; i--) begin
      if (in_valid[i] && in_flit[i].hdr) begin
        hdr_sel = 1'b1;
        hdr_src = SW'(i);
      end
    end
    if (hdr_sel) hdr_cfg = decode_lane(in_flit[hdr_src].data[ROUTER_ID]);
  end

  // Crossbar allocation.
  always_comb begin
    logic [NPORTS-1:0] claimed;
    logic [NPORTS-1:0] m;
    claimed  = '0;
    fire     = '0;
    load     = '0;
    load_src = '0;
    drop     = 1'b0;
    for (int i = 0; i < NUM_IN; i++) begin
      m = '0;
      if (hdr_sel) begin
        if (SW'(i) == hdr_src) begin
          m = outs_of(hdr_cfg, i);
          if ((m & ~out_free) == '0) begin
            fire[i] = 1'b1;
            drop    = (m == '0);
            load    = m;
            for (int o = 0; o < NPORTS; o++) if (m[o]) load_src[o] = SW'(i);
          end
        end
      end else if (in_valid[i]) begin
        m = outs_of(cfg_q, i);
        if (m == '0) begin
          fire[i] = 1'b1;          // no route: consume and report
          drop    = 1'b1;
        end else if ((m & (~out_free | claimed)) == '0) begin
          fire[i] = 1'b1;
          claimed = claimed | m;
          for (int o = 0; o < NPORTS; o++) if (m[o]) load_src[o] = SW'(i);
        end
      end
    end
    if (!hdr_sel) load = claimed;
  end

  assign in_ready  = fire;
  assign cfg_we    = hdr_sel && fire[hdr_src];
  assign cfg_wdata = hdr_cfg;

  always_ff @(posedge clk) begin
    if (!rst_n) cfg_q <= '0;
    else if (cfg_we) cfg_q <= hdr_cfg;
  end

  // Output stage: a two-flit queue per output port. Its ready depends only
  // on its own fill level, so no combinational path runs from an output's
  // ready back to an input's ready and the mesh has no ready loops.
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    assign ob_flit[o] = in_flit[load_src[o]];
    nic_buffer #(.DEPTH(2)) u_obuf (
      .clk, .rst_n,
      .in_valid (load[o]),
      .in_ready (ob_ready[o]),
      .in_flit  (ob_flit[o]),
      .out_valid(out_valid[o]),
      .out_ready(out_ready[o]),
      .out_flit (out_flit[o])
    );
  end

  a_load_free: assert property (@(posedge clk) disable iff (!rst_n) (load & ~out_free) == '0);
endmodule
