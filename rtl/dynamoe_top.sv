// dynamoe_top: DyNAMoE accelerator, a MESH_X x MESH_Y mesh of cores with a
// global buffer.
//
// Every core (dynamoe_core) holds a 256-MAC GEMM core and one router of each
// of the three NoCs (Distro, Weight Distro, Redux). Routers of neighbouring
// cores are joined N-S and E-W; y grows southwards and core (x, y) has
// router id y * MESH_X + x, which is also the header lane it reads.
//
// The mesh is reached through the west port of core (0, 0):
//   * The global buffer (4 x 4 MB) is written by the host on port A
//     (gb_we/gb_addr/gb_wdata). A controller issues injection requests
//     (inj_*): each reads one flit from port B and sends it into the west
//     input of router (0, 0) of the Distro NoC (inj_noc = 0) or of the Weight
//     Distro NoC (inj_noc = 1). Header flits stored in the buffer program the
//     routers on their way; data flits follow.
//   * Reduced expert outputs leave through the west output of Redux router
//     (0, 0) on res_*; flits that the Distro NoC routes out of its west
//     output of router (0, 0) leave on dout_*.
// Links at the other mesh edges carry nothing in and discard what goes out.
// topk_en selects, per core, whether the GEMM result passes through the
// Top-K generator (gating core) before entering the Redux NoC.
//
// The mesh size, the MAC count, the weight banks and the buffer size follow
// the design; the single injection/exit point and the injection request
// interface are this design's choices, standing in for the host-side
// controller, which the design does not detail.
//
// Timing: an injection request is taken when inj_ready is high; the flit
// reaches router (0, 0) two cycles later. inj_ready stays low until that
// flit has entered the NoC.
module dynamoe_top
  import dynamoe_pkg::*;
#(
  parameter int unsigned MESH_X     = 4,
  parameter int unsigned MESH_Y     = 4,
  parameter int unsigned COLS       = 256,
  parameter int unsigned N_EXP      = 16,
  parameter int unsigned K          = 2,
  parameter int unsigned NIC_DEPTH  = 4,
  parameter int unsigned GB_BANKS   = 4,
  parameter int unsigned GB_WORDS   = 8192,
  localparam int unsigned NCORES    = MESH_X * MESH_Y,
  localparam int unsigned GAW       = $clog2(GB_WORDS) + ((GB_BANKS > 1) ? $clog2(GB_BANKS) : 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // host writes into the global buffer
  input  logic              gb_we,
  input  logic [GAW-1:0]    gb_addr,
  input  flit_t             gb_wdata,
  // injection requests: global buffer word -> NoC
  input  logic              inj_valid,
  output logic              inj_ready,
  input  logic [GAW-1:0]    inj_addr,
  input  logic              inj_noc,      // 0 = Distro, 1 = Weight Distro
  // reduced results (Redux router (0,0), west output)
  output logic              res_valid,
  input  logic              res_ready,
  output flit_t             res_flit,
  // Distro router (0,0) west output
  output logic              dout_valid,
  input  logic              dout_ready,
  output flit_t             dout_flit,
  // per-core control and events
  input  logic [NCORES-1:0] topk_en,
  output logic [NCORES-1:0] ev_d_cfg,
  output logic [NCORES-1:0] ev_w_cfg,
  output logic [NCORES-1:0] ev_drop,
  output logic [NCORES-1:0] ev_add,
  output logic [NCORES-1:0] ev_bypass,
  output logic [NCORES-1:0] ev_preload,
  output logic [NCORES-1:0] ev_result,
  output logic [NCORES-1:0] ev_topk
);
  localparam int PN = 0, PS = 1, PE = 2, PW = 3;

  // Link arrays per core, per direction (0..3 = N, S, E, W).
  logic  [NCORES-1:0][3:0] d_iv, d_ir, d_ov, d_or;
  flit_t [NCORES-1:0][3:0] d_if, d_of;
  logic  [NCORES-1:0][3:0] w_iv, w_ir, w_ov, w_or;
  flit_t [NCORES-1:0][3:0] w_if, w_of;
  logic  [NCORES-1:0][3:0] r_iv, r_ir, r_ov, r_or;
  flit_t [NCORES-1:0][3:0] r_if, r_of;

  // ---------------- global buffer and injection ----------------
  logic  rd_pend, stg_valid, stg_noc, rd_noc, stg_take;
  flit_t stg_flit, gb_rdata;
  logic  gb_rvalid;

  global_buffer #(.NBANKS(GB_BANKS), .BANK_WORDS(GB_WORDS)) u_gb (
    .clk, .rst_n,
    .a_we(gb_we), .a_addr(gb_addr), .a_wdata(gb_wdata),
    .b_re(inj_valid && inj_ready), .b_addr(inj_addr),
    .b_rvalid(gb_rvalid), .b_rdata(gb_rdata)
  );

  assign inj_ready = !rd_pend && !stg_valid;
  assign stg_take  = stg_valid && (stg_noc ? w_ir[0][PW] : d_ir[0][PW]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_pend   <= 1'b0;
      stg_valid <= 1'b0;
      stg_noc   <= 1'b0;
      rd_noc    <= 1'b0;
    end else begin
      if (inj_valid && inj_ready) begin
        rd_pend <= 1'b1;
        rd_noc  <= inj_noc;
      end else if (gb_rvalid) begin
        rd_pend <= 1'b0;
      end
      if (gb_rvalid) begin
        stg_valid <= 1'b1;
        stg_noc   <= rd_noc;
      end else if (stg_take) begin
        stg_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (gb_rvalid) stg_flit <= gb_rdata;
  end

  // ---------------- mesh ----------------
  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned ID = y * MESH_X + x;

      // North input from (x, y-1) south output, and so on.
      if (y > 0) begin : g_n
        assign d_iv[ID][PN] = d_ov[ID-MESH_X][PS];  assign d_if[ID][PN] = d_of[ID-MESH_X][PS];
        assign d_or[ID-MESH_X][PS] = d_ir[ID][PN];
        assign w_iv[ID][PN] = w_ov[ID-MESH_X][PS];  assign w_if[ID][PN] = w_of[ID-MESH_X][PS];
        assign w_or[ID-MESH_X][PS] = w_ir[ID][PN];
        assign r_iv[ID][PN] = r_ov[ID-MESH_X][PS];  assign r_if[ID][PN] = r_of[ID-MESH_X][PS];
        assign r_or[ID-MESH_X][PS] = r_ir[ID][PN];
      end else begin : g_n_edge
        assign d_iv[ID][PN] = 1'b0;  assign d_if[ID][PN] = '0;  assign d_or[ID][PN] = 1'b1;
        assign w_iv[ID][PN] = 1'b0;  assign w_if[ID][PN] = '0;  assign w_or[ID][PN] = 1'b1;
        assign r_iv[ID][PN] = 1'b0;  assign r_if[ID][PN] = '0;  assign r_or[ID][PN] = 1'b1;
      end
      if (y < MESH_Y-1) begin : g_s
        assign d_iv[ID][PS] = d_ov[ID+MESH_X][PN];  assign d_if[ID][PS] = d_of[ID+MESH_X][PN];
        assign d_or[ID+MESH_X][PN] = d_ir[ID][PS];
        assign w_iv[ID][PS] = w_ov[ID+MESH_X][PN];  assign w_if[ID][PS] = w_of[ID+MESH_X][PN];
        assign w_or[ID+MESH_X][PN] = w_ir[ID][PS];
        assign r_iv[ID][PS] = r_ov[ID+MESH_X][PN];  assign r_if[ID][PS] = r_of[ID+MESH_X][PN];
        assign r_or[ID+MESH_X][PN] = r_ir[ID][PS];
      end else begin : g_s_edge
        assign d_iv[ID][PS] = 1'b0;  assign d_if[ID][PS] = '0;  assign d_or[ID][PS] = 1'b1;
        assign w_iv[ID][PS] = 1'b0;  assign w_if[ID][PS] = '0;  assign w_or[ID][PS] = 1'b1;
        assign r_iv[ID][PS] = 1'b0;  assign r_if[ID][PS] = '0;  assign r_or[ID][PS] = 1'b1;
      end
      if (x < MESH_X-1) begin : g_e
        assign d_iv[ID][PE] = d_ov[ID+1][PW];  assign d_if[ID][PE] = d_of[ID+1][PW];
        assign d_or[ID+1][PW] = d_ir[ID][PE];
        assign w_iv[ID][PE] = w_ov[ID+1][PW];  assign w_if[ID][PE] = w_of[ID+1][PW];
        assign w_or[ID+1][PW] = w_ir[ID][PE];
        assign r_iv[ID][PE] = r_ov[ID+1][PW];  assign r_if[ID][PE] = r_of[ID+1][PW];
        assign r_or[ID+1][PW] = r_ir[ID][PE];
      end else begin : g_e_edge
        assign d_iv[ID][PE] = 1'b0;  assign d_if[ID][PE] = '0;  assign d_or[ID][PE] = 1'b1;
        assign w_iv[ID][PE] = 1'b0;  assign w_if[ID][PE] = '0;  assign w_or[ID][PE] = 1'b1;
        assign r_iv[ID][PE] = 1'b0;  assign r_if[ID][PE] = '0;  assign r_or[ID][PE] = 1'b1;
      end
      if (x == 0 && y == 0) begin : g_w_host
        // west port of core (0,0): injection and exit
        assign d_iv[ID][PW] = stg_valid && !stg_noc;  assign d_if[ID][PW] = stg_flit;
        assign w_iv[ID][PW] = stg_valid &&  stg_noc;  assign w_if[ID][PW] = stg_flit;
        assign r_iv[ID][PW] = 1'b0;                   assign r_if[ID][PW] = '0;
        assign d_or[ID][PW] = dout_ready;
        assign w_or[ID][PW] = 1'b1;
        assign r_or[ID][PW] = res_ready;
      end else if (x == 0) begin : g_w_edge
        assign d_iv[ID][PW] = 1'b0;  assign d_if[ID][PW] = '0;  assign d_or[ID][PW] = 1'b1;
        assign w_iv[ID][PW] = 1'b0;  assign w_if[ID][PW] = '0;  assign w_or[ID][PW] = 1'b1;
        assign r_iv[ID][PW] = 1'b0;  assign r_if[ID][PW] = '0;  assign r_or[ID][PW] = 1'b1;
      end else begin : g_w
        assign d_iv[ID][PW] = d_ov[ID-1][PE];  assign d_if[ID][PW] = d_of[ID-1][PE];
        assign d_or[ID-1][PE] = d_ir[ID][PW];
        assign w_iv[ID][PW] = w_ov[ID-1][PE];  assign w_if[ID][PW] = w_of[ID-1][PE];
        assign w_or[ID-1][PE] = w_ir[ID][PW];
        assign r_iv[ID][PW] = r_ov[ID-1][PE];  assign r_if[ID][PW] = r_of[ID-1][PE];
        assign r_or[ID-1][PE] = r_ir[ID][PW];
      end

      dynamoe_core #(
        .ROUTER_ID(ID), .COLS(COLS), .N_EXP(N_EXP), .K(K), .NIC_DEPTH(NIC_DEPTH)
      ) u_core (
        .clk, .rst_n,
        .topk_en(topk_en[ID]),
        .d_in_valid(d_iv[ID]), .d_in_ready(d_ir[ID]), .d_in_flit(d_if[ID]),
        .d_out_valid(d_ov[ID]), .d_out_ready(d_or[ID]), .d_out_flit(d_of[ID]),
        .w_in_valid(w_iv[ID]), .w_in_ready(w_ir[ID]), .w_in_flit(w_if[ID]),
        .w_out_valid(w_ov[ID]), .w_out_ready(w_or[ID]), .w_out_flit(w_of[ID]),
        .r_in_valid(r_iv[ID]), .r_in_ready(r_ir[ID]), .r_in_flit(r_if[ID]),
        .r_out_valid(r_ov[ID]), .r_out_ready(r_or[ID]), .r_out_flit(r_of[ID]),
        .ev_d_cfg(ev_d_cfg[ID]), .ev_w_cfg(ev_w_cfg[ID]), .ev_drop(ev_drop[ID]),
        .ev_add(ev_add[ID]), .ev_bypass(ev_bypass[ID]), .ev_preload(ev_preload[ID]),
        .ev_result(ev_result[ID]), .ev_topk(ev_topk[ID])
      );
    end
  end

  assign res_valid  = r_ov[0][PW];
  assign res_flit   = r_of[0][PW];
  assign dout_valid = d_ov[0][PW];
  assign dout_flit  = d_of[0][PW];
endmodule
