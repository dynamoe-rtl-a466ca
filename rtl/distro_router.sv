// distro_router: Distro NoC router, scatters MoE inputs (tokens) to the
// GEMM cores of the selected experts.
//
// A 5x5 reconfigurable crossbar (inputs and outputs N, S, E, W, Loc) with a
// register on every output, built on noc_switch. Header flits reconfigure
// it (the dynamic reconfiguration logic); data flits then follow the stored
// setting, with multicast when one input feeds several outputs. Every new
// setting is also sent out on rdx_cfg_we / rdx_cfg: the Redux router of the
// same core stores the identical bits in its configuration memory and uses
// them in the reverse direction.
//
// Ports index 0..4 = N, S, E, W, Loc. Handshake valid/ready on every link.
module distro_router
  import dynamoe_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [NPORTS-1:0] in_valid,
  output logic  [NPORTS-1:0] in_ready,
  input  flit_t [NPORTS-1:0] in_flit,
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output flit_t [NPORTS-1:0] out_flit,
  output xcfg_t              cfg,
  output logic               rdx_cfg_we,
  output xcfg_t              rdx_cfg,
  output logic               drop
);
  noc_switch #(.NUM_IN(NPORTS), .ROUTER_ID(ROUTER_ID)) u_sw (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_flit,
    .out_valid, .out_ready, .out_flit,
    .cfg,
    .cfg_we   (rdx_cfg_we),
    .cfg_wdata(rdx_cfg),
    .drop
  );
endmodule
