// tb_distro_router: self-checking test of the Distro router.
// Random header and data flits on all five inputs, random back-pressure on
// all outputs. A reference model keeps the crossbar setting, applies each
// accepted header (lane ROUTER_ID), and predicts for every accepted flit the
// outputs it must appear on; per-output queues check data and order. Also
// checked: the setting passed on to the Redux router, drop reports, the
// one-cycle hop latency, multicast, unicast filtering and stalls.
module tb_distro_router;
  import dynamoe_pkg::*;
  localparam int NIN = 5;
  localparam int RID = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_mc = 0, n_uc = 0, n_stall = 0, n_drop = 0, n_hdr = 0, n_data = 0;

  logic  [NIN-1:0]    in_valid, in_ready;
  flit_t [NIN-1:0]    in_flit;
  logic  [NPORTS-1:0] out_valid, out_ready;
  flit_t [NPORTS-1:0] out_flit;
  xcfg_t cfg, rdx_cfg;
  logic  rdx_cfg_we, drop;

  distro_router #(.ROUTER_ID(RID)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .cfg, .rdx_cfg_we, .rdx_cfg, .drop);

  xcfg_t model_cfg;
  logic [NIN-1:0] taken = '0;
  flit_t q [NPORTS][$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t rnd_flit(input int i, input bit hdr);
    flit_t f;
    f = '0;
    f.hdr = hdr;
    for (int l = 0; l < 8; l++) f.data[l] = 16'($urandom);
    f.data[LANES-1] = 16'($urandom);
    if (hdr) begin
      xcfg_t c;
      for (int o = 0; o < NPORTS; o++) c[o] = 3'($urandom_range(0, 6));
      // bias towards routes from this input
      for (int o = 0; o < NPORTS; o++) if ($urandom_range(0, 2) == 0) c[o] = 3'(i + 1);
      f.data[RID] = encode_lane(1'($urandom), c);
    end
    return f;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- directed latency check, then random traffic ----
  initial begin
    xcfg_t c;
    in_valid = '0; in_flit = '0; out_ready = '1; model_cfg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // multicast W -> {E, Loc}
    c = '0; c[P_E] = 3'(P_W + 1); c[P_L] = 3'(P_W + 1);
    @(negedge clk);
    in_flit[P_W] = '0; in_flit[P_W].hdr = 1; in_flit[P_W].data[RID] = encode_lane(1'b1, c);
    in_valid[P_W] = 1;
    #1 check(rdx_cfg_we && rdx_cfg == c, "header passes setting to Redux");
    @(posedge clk); #1;
    check(cfg == c, "setting stored");
    check(out_valid == ((1 << P_E) | (1 << P_L)), "header forwarded on the new route after one cycle");
    check(out_flit[P_E] == in_flit[P_W] && out_flit[P_L] == in_flit[P_W], "forwarded header intact");
    @(negedge clk);
    in_flit[P_W] = rnd_flit(P_W, 0);
    @(posedge clk); #1;
    check(out_valid[P_E] && out_valid[P_L] && out_flit[P_E] == in_flit[P_W], "data multicast, one-cycle hop");
    @(negedge clk);
    // unicast header that names W for N and S: only N is kept
    c = '0; c[P_N] = 3'(P_W + 1); c[P_S] = 3'(P_W + 1);
    in_flit[P_W] = '0; in_flit[P_W].hdr = 1; in_flit[P_W].data[RID] = encode_lane(1'b0, c);
    @(posedge clk); #1;
    check(cfg[P_N] == 3'(P_W + 1) && cfg[P_S] == '0, "unicast keeps the first output only");
    @(negedge clk); in_valid = '0;
    repeat (4) @(posedge clk);
    model_cfg = cfg;
    for (int o = 0; o < NPORTS; o++) q[o].delete();
    // random phase: stimuli set after the falling edge, handshakes sampled
    // just before the rising edge, model updated after it
    for (int cyc = 0; cyc < 6000; cyc++) begin
      logic  [NIN-1:0]    ifire;
      logic  [NPORTS-1:0] ofire;
      flit_t [NPORTS-1:0] oflit;
      flit_t [NIN-1:0]    iflit;
      logic  s_drop, s_we;
      xcfg_t s_rcfg;
      @(negedge clk);
      for (int i = 0; i < NIN; i++) begin
        if (!in_valid[i] || taken[i]) begin
          in_valid[i] = (cyc < 5800) && ($urandom_range(0, 2) != 0);
          in_flit[i]  = rnd_flit(i, $urandom_range(0, 9) == 0);
        end
      end
      out_ready = (cyc % 500 < 100) ? NPORTS'($urandom) & NPORTS'($urandom) : NPORTS'($urandom) | NPORTS'($urandom);
      if (cyc >= 5800) out_ready = '1;
      #1;
      ifire = in_valid & in_ready;  ofire = out_valid & out_ready;
      oflit = out_flit;  iflit = in_flit;
      s_drop = drop;  s_we = rdx_cfg_we;  s_rcfg = rdx_cfg;
      if ((in_valid & ~in_ready) != '0) n_stall++;
      taken = ifire;
      @(posedge clk);
      for (int o = 0; o < NPORTS; o++) if (ofire[o]) begin
        if (q[o].size() == 0) check(0, "unexpected output flit");
        else check(oflit[o] == q[o].pop_front(), "output flit data and order");
      end
      begin
        bit hdr_done;
        hdr_done = 0;
        for (int i = 0; i < NIN; i++) if (ifire[i] && iflit[i].hdr) begin
          check(!hdr_done, "one header per cycle");
          hdr_done = 1;
          model_cfg = decode_lane(iflit[i].data[RID]);
          n_hdr++;
          if (iflit[i].data[RID][15]) n_mc++; else n_uc++;
          check(s_we && s_rcfg == model_cfg, "Redux setting on header");
        end
        for (int i = 0; i < NIN; i++) if (ifire[i]) begin
          logic [NPORTS-1:0] m;
          m = outs_of(model_cfg, i);
          if (hdr_done) check(iflit[i].hdr, "nothing else moves with a header");
          if (m == '0) begin check(s_drop, "drop reported"); n_drop++; end
          for (int o = 0; o < NPORTS; o++) if (m[o]) q[o].push_back(iflit[i]);
          if (!iflit[i].hdr) n_data++;
        end
      end
      #1;
      check(cfg == model_cfg, "stored setting matches model");
    end
    in_valid = '0;
    repeat (10) @(posedge clk);
    for (int o = 0; o < NPORTS; o++) check(q[o].size() == 0, "every expected flit delivered");
    check(n_mc > 0 && n_uc > 0 && n_stall > 0 && n_drop > 0 && n_data > 100, "all mechanisms exercised");
    $display("headers=%0d (mc=%0d uc=%0d) data=%0d drops=%0d stall-cycles=%0d", n_hdr, n_mc, n_uc, n_data, n_drop, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
