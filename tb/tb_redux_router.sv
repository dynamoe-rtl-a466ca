// tb_redux_router: self-checking test of the Redux router.
// The configuration memory is written with random Distro settings (each
// Distro input feeding one or two outputs, giving bypass and add routes in
// reverse). Random data flits arrive on all inputs under random output
// back-pressure. For every cycle the test checks that the inputs taken form
// exactly the add route and the bypass route the router reports, computes
// the expected sum or copy itself, and checks each output's flits in order.
// Also checked: the one-cycle latency of a sum and the drop of flits on an
// input that feeds no output.
module tb_redux_router;
  import dynamoe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_add = 0, n_byp = 0, n_both = 0, n_drop = 0, n_stall = 0;

  logic  cfg_we;
  xcfg_t cfg_wdata, cfg;
  logic  [NPORTS-1:0] in_valid, in_ready, out_valid, out_ready;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  logic  add_fire, byp_fire, drop;

  redux_router dut (.*);

  xcfg_t model_cfg;
  flit_t q [NPORTS][$];
  logic [NPORTS-1:0] taken = '0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t rnd_flit();
    flit_t f;
    f = '0;
    for (int l = 0; l < LANES; l += 17) f.data[l] = 16'($urandom);
    f.data[LANES-1] = 16'($urandom);
    return f;
  endfunction

  function automatic flit_t add_flits(input flit_t a, input flit_t b);
    flit_t f;
    f.hdr = 1'b0;
    for (int l = 0; l < LANES; l++) f.data[l] = a.data[l] + b.data[l];
    return f;
  endfunction

  // random Distro setting: every Distro output picks an input; an input
  // ends up feeding zero, one or two outputs
  function automatic xcfg_t rnd_cfg();
    xcfg_t c;
    int cnt [NPORTS];
    for (int i = 0; i < NPORTS; i++) cnt[i] = 0;
    c = '0;
    for (int o = 0; o < NPORTS; o++) begin
      int i;
      i = $urandom_range(0, NPORTS);        // NPORTS = unused
      if (i < NPORTS && cnt[i] < 2) begin c[o] = 3'(i + 1); cnt[i]++; end
    end
    return c;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xcfg_t c;
    flit_t a, b;
    in_valid = '0; in_flit = '0; out_ready = '1; cfg_we = 0; cfg_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: Distro W -> {E, Loc}  ==>  Redux E + Loc -> W
    c = '0; c[P_E] = 3'(P_W + 1); c[P_L] = 3'(P_W + 1);
    @(negedge clk); cfg_we = 1; cfg_wdata = c;
    @(negedge clk); cfg_we = 0;
    a = rnd_flit(); b = rnd_flit();
    in_flit[P_E] = a; in_flit[P_L] = b; in_valid[P_E] = 1;
    #1 check(!add_fire && in_ready[P_E] == 0, "add waits for both operands");
    @(negedge clk); in_valid[P_L] = 1;
    #1 check(add_fire && in_ready[P_E] && in_ready[P_L], "add fires when both operands are present");
    @(posedge clk); #1;
    check(out_valid == (1 << P_W) && out_flit[P_W] == add_flits(a, b), "sum on W one cycle later");
    @(negedge clk); in_valid = '0;
    // drop: flit on N, which feeds no output
    in_valid[P_N] = 1; in_flit[P_N] = rnd_flit();
    #1 check(drop && in_ready[P_N], "flit without route dropped");
    @(negedge clk); in_valid = '0;
    repeat (3) @(posedge clk);
    model_cfg = c;
    for (int o = 0; o < NPORTS; o++) q[o].delete();

    for (int cyc = 0; cyc < 8000; cyc++) begin
      logic  [NPORTS-1:0] ifire, ofire;
      flit_t [NPORTS-1:0] oflit, iflit;
      logic  s_add, s_byp, s_drop, s_we;
      xcfg_t s_wcfg;
      @(negedge clk);
      cfg_we = 0;
      if (cyc % 400 == 399 && cyc < 7600) begin cfg_we = 1; cfg_wdata = rnd_cfg(); end
      for (int i = 0; i < NPORTS; i++) begin
        if (!in_valid[i] || taken[i]) begin
          in_valid[i] = (cyc < 7600) && ($urandom_range(0, 2) != 0);
          in_flit[i]  = rnd_flit();
        end
      end
      out_ready = (cyc % 300 < 60) ? NPORTS'($urandom) & NPORTS'($urandom) : ~(NPORTS'($urandom) & NPORTS'($urandom));
      if (cyc >= 7600) out_ready = '1;
      #1;
      ifire = in_valid & in_ready;  ofire = out_valid & out_ready;
      oflit = out_flit;  iflit = in_flit;
      s_add = add_fire;  s_byp = byp_fire;  s_drop = drop;  s_we = cfg_we;  s_wcfg = cfg_wdata;
      if ((in_valid & ~in_ready) != '0) n_stall++;
      taken = ifire;
      @(posedge clk);
      for (int o = 0; o < NPORTS; o++) if (ofire[o]) begin
        if (q[o].size() == 0) check(0, "unexpected output flit");
        else check(oflit[o] == q[o].pop_front(), "output flit data and order");
      end
      // account for the inputs taken this cycle under the model setting
      begin
        logic [NPORTS-1:0] rest;
        bit add_seen, byp_seen;
        rest = ifire; add_seen = 0; byp_seen = 0;
        for (int o = 0; o < NPORTS; o++) begin
          logic [NPORTS-1:0] m;
          m = outs_of(model_cfg, o);
          if ($countones(m) == 2 && (ifire & m) == m) begin
            int i0, i1;
            i0 = -1; i1 = -1;
            for (int i = 0; i < NPORTS; i++) if (m[i]) begin if (i0 < 0) i0 = i; else i1 = i; end
            q[o].push_back(add_flits(iflit[i0], iflit[i1]));
            rest &= ~m; add_seen = 1; n_add++;
          end else if ($countones(m) == 2) begin
            check((ifire & m) == '0, "add operands taken together");
          end
          if ($countones(m) == 1 && (ifire & m) == m) begin
            for (int i = 0; i < NPORTS; i++) if (m[i]) q[o].push_back(iflit[i]);
            rest &= ~m; byp_seen = 1; n_byp++;
          end
        end
        check(add_seen == s_add && byp_seen == s_byp, "reported add / bypass match taken inputs");
        if (add_seen && byp_seen) n_both++;
        if (rest != '0) begin check(s_drop, "inputs without route are dropped"); n_drop++; end
      end
      if (s_we) model_cfg = s_wcfg;
      #1 check(cfg == model_cfg, "configuration memory content");
    end
    in_valid = '0;
    repeat (10) @(posedge clk);
    for (int o = 0; o < NPORTS; o++) check(q[o].size() == 0, "every expected flit delivered");
    check(n_add > 50 && n_byp > 50 && n_both > 0 && n_drop > 0 && n_stall > 0, "all mechanisms exercised");
    $display("adds=%0d bypasses=%0d both=%0d drops=%0d stall-cycles=%0d", n_add, n_byp, n_both, n_drop, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
