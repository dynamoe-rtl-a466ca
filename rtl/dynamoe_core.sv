// dynamoe_core: one DyNAMoE core (one node of the mesh).
//
// A core holds a GEMM core and one router of each of the three NoCs:
//   Distro        scatters tokens; its Loc output feeds the GEMM core.
//   Weight Distro carries weights; its Loc output fills the GEMM weight banks.
//   Redux         gathers and sums expert outputs; its Loc input takes this
//                 core's result, its Loc output delivers a reduced vector to
//                 the core.
// The Distro router's reconfiguration logic also writes the Redux
// configuration memory, so the Redux router of a core always mirrors its
// Distro router.
//
// Local paths (this design's reading of the block diagram):
//   GEMM result --(topk_en=0)--------------------> Redux NIC buffer -> Redux Loc in
//   GEMM result --(topk_en=1)--> Top-K generator --> Redux NIC buffer -> Redux Loc in
//   Redux Loc out --> Distro NIC buffer --> Distro Loc in
// With topk_en set, the core acts as a gating core: the GEMM result is the
// vector of gating scores and what leaves the core is the list of the K
// selected experts. A vector reduced into this core can be sent out again
// through the Distro NoC.
//
// Neighbour links are arrays indexed 0..3 = N, S, E, W, with valid/ready.
// Event outputs pulse once per event and feed counters in test benches.
module dynamoe_core
  import dynamoe_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0,
  parameter int unsigned COLS      = 256,
  parameter int unsigned N_EXP     = 16,
  parameter int unsigned K         = 2,
  parameter int unsigned NIC_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        topk_en,
  // Distro NoC links
  input  logic  [3:0] d_in_valid,
  output logic  [3:0] d_in_ready,
  input  flit_t [3:0] d_in_flit,
  output logic  [3:0] d_out_valid,
  input  logic  [3:0] d_out_ready,
  output flit_t [3:0] d_out_flit,
  // Weight Distro NoC links
  input  logic  [3:0] w_in_valid,
  output logic  [3:0] w_in_ready,
  input  flit_t [3:0] w_in_flit,
  output logic  [3:0] w_out_valid,
  input  logic  [3:0] w_out_ready,
  output flit_t [3:0] w_out_flit,
  // Redux NoC links
  input  logic  [3:0] r_in_valid,
  output logic  [3:0] r_in_ready,
  input  flit_t [3:0] r_in_flit,
  output logic  [3:0] r_out_valid,
  input  logic  [3:0] r_out_ready,
  output flit_t [3:0] r_out_flit,
  // events
  output logic        ev_d_cfg,     // Distro (and Redux) reconfigured by a header
  output logic        ev_w_cfg,     // Weight Distro reconfigured by a header
  output logic        ev_drop,      // a flit with no route was discarded
  output logic        ev_add,       // Redux adder used
  output logic        ev_bypass,    // Redux bypass path used
  output logic        ev_preload,   // weight column loaded while computing
  output logic        ev_result,    // GEMM result left the core
  output logic        ev_topk       // Top-K result left the generator
);
  // Distro router
  logic  [NPORTS-1:0] dr_in_valid, dr_in_ready, dr_out_valid, dr_out_ready;
  flit_t [NPORTS-1:0] dr_in_flit, dr_out_flit;
  xcfg_t              d_cfg, rdx_cfg;
  logic               rdx_cfg_we, d_drop;
  // Weight Distro router
  logic  [NPORTS-1:0] wr_out_valid, wr_out_ready;
  flit_t [NPORTS-1:0] wr_out_flit;
  xcfg_t              w_cfg;
  logic               w_drop;
  logic  [3:0]        w_cfg_seen;
  // Redux router
  logic  [NPORTS-1:0] rr_in_valid, rr_in_ready, rr_out_valid, rr_out_ready;
  flit_t [NPORTS-1:0] rr_in_flit, rr_out_flit;
  xcfg_t              r_cfg;
  logic               r_add, r_byp, r_drop;
  // local paths
  logic  tok_valid, tok_ready;  flit_t tok_flit;
  logic  res_valid, res_ready;  flit_t res_flit;
  logic  tk_in_valid, tk_in_ready, tk_out_valid, tk_out_ready; flit_t tk_out_flit;
  logic  rn_in_valid, rn_in_ready; flit_t rn_in_flit;
  logic  dn_out_valid, dn_out_ready; flit_t dn_out_flit;
  logic [1:0] bank_full;
  logic  cmp_bank, busy, preload;

  // ---------------- Distro ----------------
  assign dr_in_valid  = {dn_out_valid, d_in_valid};
  assign dr_in_flit   = {dn_out_flit,  d_in_flit};
  assign d_in_ready   = dr_in_ready[3:0];
  assign dn_out_ready = dr_in_ready[P_L];
  assign d_out_valid  = dr_out_valid[3:0];
  assign d_out_flit   = dr_out_flit[3:0];
  assign dr_out_ready = {tok_ready, d_out_ready};
  assign tok_valid    = dr_out_valid[P_L];
  assign tok_flit     = dr_out_flit[P_L];

  distro_router #(.ROUTER_ID(ROUTER_ID)) u_distro (
    .clk, .rst_n,
    .in_valid(dr_in_valid), .in_ready(dr_in_ready), .in_flit(dr_in_flit),
    .out_valid(dr_out_valid), .out_ready(dr_out_ready), .out_flit(dr_out_flit),
    .cfg(d_cfg), .rdx_cfg_we, .rdx_cfg, .drop(d_drop)
  );

  // ---------------- Weight Distro ----------------
  assign w_out_valid  = wr_out_valid[3:0];
  assign w_out_flit   = wr_out_flit[3:0];

  weight_distro_router #(.ROUTER_ID(ROUTER_ID)) u_wdistro (
    .clk, .rst_n,
    .in_valid(w_in_valid), .in_ready(w_in_ready), .in_flit(w_in_flit),
    .out_valid(wr_out_valid), .out_ready(wr_out_ready), .out_flit(wr_out_flit),
    .cfg(w_cfg), .drop(w_drop)
  );
  // a header is applied when it leaves an input with the header bit set
  for (genvar i = 0; i < 4; i++) begin : g_wseen
    assign w_cfg_seen[i] = w_in_valid[i] && w_in_ready[i] && w_in_flit[i].hdr;
  end

  // ---------------- GEMM core ----------------
  gemm_core #(.COLS(COLS)) u_gemm (
    .clk, .rst_n,
    .tok_valid, .tok_ready, .tok_flit,
    .wt_valid(wr_out_valid[P_L]), .wt_ready(wr_out_ready[P_L]), .wt_flit(wr_out_flit[P_L]),
    .res_valid, .res_ready, .res_flit,
    .bank_full, .cmp_bank, .busy, .preload
  );
  assign wr_out_ready[3:0] = w_out_ready;

  // ---------------- Top-K and Redux NIC buffer ----------------
  assign tk_in_valid  = topk_en && res_valid;
  assign res_ready    = topk_en ? tk_in_ready : rn_in_ready;
  assign rn_in_valid  = topk_en ? tk_out_valid : res_valid;
  assign rn_in_flit   = topk_en ? tk_out_flit  : res_flit;
  assign tk_out_ready = topk_en && rn_in_ready;

  topk_generator #(.N_EXP(N_EXP), .K(K)) u_topk (
    .clk, .rst_n,
    .in_valid(tk_in_valid), .in_ready(tk_in_ready), .in_flit(res_flit),
    .out_valid(tk_out_valid), .out_ready(tk_out_ready), .out_flit(tk_out_flit)
  );

  nic_buffer #(.DEPTH(NIC_DEPTH)) u_rnic (
    .clk, .rst_n,
    .in_valid(rn_in_valid), .in_ready(rn_in_ready), .in_flit(rn_in_flit),
    .out_valid(rr_in_valid[P_L]), .out_ready(rr_in_ready[P_L]), .out_flit(rr_in_flit[P_L])
  );

  // ---------------- Redux ----------------
  assign rr_in_valid[3:0] = r_in_valid;
  assign rr_in_flit[3:0]  = r_in_flit;
  assign r_in_ready       = rr_in_ready[3:0];
  assign r_out_valid      = rr_out_valid[3:0];
  assign r_out_flit       = rr_out_flit[3:0];
  assign rr_out_ready[3:0] = r_out_ready;

  redux_router u_redux (
    .clk, .rst_n,
    .cfg_we(rdx_cfg_we), .cfg_wdata(rdx_cfg),
    .in_valid(rr_in_valid), .in_ready(rr_in_ready), .in_flit(rr_in_flit),
    .out_valid(rr_out_valid), .out_ready(rr_out_ready), .out_flit(rr_out_flit),
    .cfg(r_cfg), .add_fire(r_add), .byp_fire(r_byp), .drop(r_drop)
  );

  // Distro NIC buffer: vectors reduced into this core re-enter the Distro NoC
  nic_buffer #(.DEPTH(NIC_DEPTH)) u_dnic (
    .clk, .rst_n,
    .in_valid(rr_out_valid[P_L]), .in_ready(rr_out_ready[P_L]), .in_flit(rr_out_flit[P_L]),
    .out_valid(dn_out_valid), .out_ready(dn_out_ready), .out_flit(dn_out_flit)
  );

  // ---------------- events ----------------
  assign ev_d_cfg   = rdx_cfg_we;
  assign ev_w_cfg   = |w_cfg_seen;
  assign ev_drop    = d_drop | w_drop | r_drop;
  assign ev_add     = r_add;
  assign ev_bypass  = r_byp;
  assign ev_preload = preload;
  assign ev_result  = res_valid && res_ready;
  assign ev_topk    = tk_out_valid && tk_out_ready;
endmodule
