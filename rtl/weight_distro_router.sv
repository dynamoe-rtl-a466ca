// weight_distro_router: Weight Distro NoC router, carries expert weights to
// the GEMM cores' weight banks.
//
// Same design as the Distro router but with a 4x5 crossbar: inputs N, S, E, W
// only (no local input, as weights are never produced inside a core) and
// registered outputs N, S, E, W, Loc; the Loc output feeds the GEMM core's
// weight banks. It decodes its own header flits with the same lane format
// as the Distro router (lane ROUTER_ID), so both NoCs are programmed by the
// same kind of header packet.
//
// Ports index 0..3 = N, S, E, W on the input side, 0..4 = N, S, E, W, Loc on
// the output side. Handshake valid/ready on every link.
module weight_distro_router
  import dynamoe_pkg::*;
#(
  parameter int unsigned ROUTER_ID = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic  [3:0]        in_valid,
  output logic  [3:0]        in_ready,
  input  flit_t [3:0]        in_flit,
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output flit_t [NPORTS-1:0] out_flit,
  output xcfg_t              cfg,
  output logic               drop
);
  logic  cfg_we_unused;
  xcfg_t cfg_wdata_unused;

  noc_switch #(.NUM_IN(4), .ROUTER_ID(ROUTER_ID)) u_sw (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_flit,
    .out_valid, .out_ready, .out_flit,
    .cfg,
    .cfg_we   (cfg_we_unused),
    .cfg_wdata(cfg_wdata_unused),
    .drop
  );
endmodule
