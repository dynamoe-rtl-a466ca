// redux_router: Redux NoC router, accumulates expert outputs on their way
// back from the GEMM cores.
//
// Inputs and outputs are N, S, E, W and Loc (index 0..4); Loc input carries
// the local GEMM core result, Loc output delivers a reduced vector to this
// core. The datapath follows the design's structure: a 5x3 input crossbar
// selects two adder operands (A, B) and one bypass flit; a lane-wise adder
// (256 x 16-bit, wrapping) sums A and B; a 2x5 output crossbar sends the sum
// and the bypass flit to their output registers. The crossbar setting comes
// from redux_config_mem, i.e. the Distro setting reversed: an output with
// two source inputs is an add route, with one a bypass route.
//
// Per cycle one add and one bypass can take place. An add route waits until
// both of its inputs hold a flit (join) and its output register has room;
// a bypass route needs its input and output. Among routes of the same type
// the lowest output index wins. Routes with more than two sources are not
// supported (the adder has two operands) and are flagged by an assertion.
// A flit on an input that feeds no output is consumed and reported on drop.
// Each output register is a two-flit queue, so a hop costs one cycle.
module redux_router
  import dynamoe_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cfg_we,
  input  xcfg_t              cfg_wdata,
  input  logic  [NPORTS-1:0] in_valid,
  output logic  [NPORTS-1:0] in_ready,
  input  flit_t [NPORTS-1:0] in_flit,
  output logic  [NPORTS-1:0] out_valid,
  input  logic  [NPORTS-1:0] out_ready,
  output flit_t [NPORTS-1:0] out_flit,
  output xcfg_t              cfg,
  output logic               add_fire,
  output logic               byp_fire,
  output logic               drop
);
  logic [NPORTS-1:0][NPORTS-1:0] src_mask;
  logic [NPORTS-1:0]             ob_ready;
  logic [NPORTS-1:0]             ob_load;
  flit_t [NPORTS-1:0]            ob_flit;

  // input crossbar selections and output crossbar selections
  logic [2:0]        sel_a, sel_b, sel_byp;
  logic [2:0]        add_out, byp_out;
  flit_t             op_a, op_b, byp_flit, sum_flit;

  redux_config_mem u_cfg (
    .clk, .rst_n,
    .wr_en (cfg_we),
    .wr_cfg(cfg_wdata),
    .cfg,
    .src_mask
  );

  // Route selection.
  always_comb begin
    logic [NPORTS-1:0] used_in;
    add_fire = 1'b0;
    byp_fire = 1'b0;
    sel_a    = '0;
    sel_b    = '0;
    sel_byp  = '0;
    add_out  = '0;
    byp_out  = '0;
    in_ready = '0;
    drop     = 1'b0;
    used_in  = '0;
    for (int o = 0; o < NPORTS; o++) begin
      used_in = used_in | src_mask[o];
      if ($countones(src_mask[o]) == 2 && !add_fire && ob_ready[o] &&
          (src_mask[o] & ~in_valid) == '0) begin
        add_fire = 1'b1;
        add_out  = 3'(o);
        in_ready = in_ready | src_mask[o];
        // operand A = lower-index source, operand B = higher-index source
        for (int i = NPORTS-1; i >= 0; i--) if (src_mask[o][i]) sel_a = 3'(i);
        for (int i = 0; i < NPORTS; i++)    if (src_mask[o][i]) sel_b = 3'(i);
      end
      if ($countones(src_mask[o]) == 1 && !byp_fire && ob_ready[o] &&
          (src_mask[o] & in_valid) != '0) begin
        byp_fire = 1'b1;
        byp_out  = 3'(o);
        in_ready = in_ready | src_mask[o];
        for (int i = 0; i < NPORTS; i++) if (src_mask[o][i]) sel_byp = 3'(i);
      end
    end
    // inputs that feed no output: consume and report
    for (int i = 0; i < NPORTS; i++) begin
      if (in_valid[i] && !used_in[i]) begin
        in_ready[i] = 1'b1;
        drop        = 1'b1;
      end
    end
  end

  // Input crossbar (5x3) and adder.
  assign op_a     = in_flit[sel_a];
  assign op_b     = in_flit[sel_b];
  assign byp_flit = in_flit[sel_byp];

  always_comb begin
    sum_flit.hdr = op_a.hdr & op_b.hdr;
    for (int l = 0; l < LANES; l++) sum_flit.data[l] = op_a.data[l] + op_b.data[l];
  end

  // Output crossbar (2x5).
  always_comb begin
    for (int o = 0; o < NPORTS; o++) begin
      ob_load[o] = (add_fire && add_out == 3'(o)) || (byp_fire && byp_out == 3'(o));
      ob_flit[o] = (add_fire && add_out == 3'(o)) ? sum_flit : byp_flit;
    end
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    nic_buffer #(.DEPTH(2)) u_obuf (
      .clk, .rst_n,
      .in_valid (ob_load[o]),
      .in_ready (ob_ready[o]),
      .in_flit  (ob_flit[o]),
      .out_valid(out_valid[o]),
      .out_ready(out_ready[o]),
      .out_flit (out_flit[o])
    );
  end

  a_fanin_le2: assert property (@(posedge clk) disable iff (!rst_n)
    ($countones(src_mask[0]) <= 2) && ($countones(src_mask[1]) <= 2) &&
    ($countones(src_mask[2]) <= 2) && ($countones(src_mask[3]) <= 2) &&
    ($countones(src_mask[4]) <= 2));
endmodule
