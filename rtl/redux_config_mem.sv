// redux_config_mem: configuration memory of the Redux router.
//
// The Redux NoC carries expert outputs back along the same paths the Distro
// NoC used to scatter the inputs, in the reverse direction, so it reuses the
// Distro router's configuration bits unchanged. This block stores the bits
// sent by the Distro router of the same core (wr_en / wr_cfg, one 3-bit input
// select per Distro output) and presents them reversed: for every Redux
// output i, src_mask[i] marks the Redux inputs o whose Distro output o was
// fed by Distro input i. An output with two marked inputs sums them; one
// marked input is a bypass.
//
// Timing: a write takes effect on the next clock edge; src_mask is a
// combinational function of the stored bits. Synchronous active-low reset
// clears the setting (no routes).
module redux_config_mem
  import dynamoe_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  xcfg_t                         wr_cfg,
  output xcfg_t                         cfg,
  output logic [NPORTS-1:0][NPORTS-1:0] src_mask
);
  always_ff @(posedge clk) begin
    if (!rst_n)     cfg <= '0;
    else if (wr_en) cfg <= wr_cfg;
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) src_mask[i] = outs_of(cfg, i);
  end
endmodule
