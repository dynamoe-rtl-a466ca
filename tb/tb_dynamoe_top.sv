// tb_dynamoe_top: end-to-end test of the DyNAMoE accelerator with every
// parameter at its default (4 x 4 mesh, 256 MACs per core, 256 x 256 weight
// banks, 4 x 4 MB global buffer).
//
// The host writes a whole program into the global buffer and then injects it
// word by word into the mesh, as a controller would:
//   * gating layer on core (0,0): Weight Distro header W -> Loc, 256 weight
//     columns, Distro header W -> Loc, one token. With topk_en set on core 0
//     the gating scores pass the Top-K generator and the two selected
//     experts come out on the result port;
//   * experts on cores (1,0) and (2,0): Weight Distro headers and two weight
//     matrices per expert (the second pair streams in while the first token
//     is being computed), a multicast Distro header
//     (0,0): W -> E, (1,0): W -> {Loc, E}, (2,0): W -> Loc, and two tokens.
//     The Redux NoC, programmed by the same header in reverse, adds the two
//     expert outputs in core (1,0) and bypasses them through core (0,0).
// Results are checked against a reference computed here. The test counts
// header reconfigurations, multicasts, adds, bypasses, weight preloads,
// Top-K runs, injection stalls and result back-pressure, and fails if any
// of them never happened.
module tb_dynamoe_top;
  import dynamoe_pkg::*;
  localparam int GAW = 15;
  localparam int COLS = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic gb_we, inj_valid, inj_ready, inj_noc, res_valid, res_ready, dout_valid, dout_ready;
  logic [GAW-1:0] gb_addr, inj_addr;
  flit_t gb_wdata, res_flit, dout_flit;
  logic [15:0] topk_en, ev_d_cfg, ev_w_cfg, ev_drop, ev_add, ev_bypass, ev_preload, ev_result, ev_topk;

  dynamoe_top dut (.*);

  // event counters
  int n_dcfg = 0, n_wcfg = 0, n_add = 0, n_byp = 0, n_pre = 0, n_res = 0, n_topk = 0;
  int n_mcast = 0, n_inj_stall = 0, n_res_stall = 0, n_drop = 0, n_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    n_dcfg += $countones(ev_d_cfg);  n_wcfg += $countones(ev_w_cfg);
    n_add  += $countones(ev_add);    n_byp  += $countones(ev_bypass);
    n_pre  += $countones(ev_preload); n_res += $countones(ev_result);
    n_topk += $countones(ev_topk);   n_drop += $countones(ev_drop);  n_cyc++;
    if (inj_valid && !inj_ready) n_inj_stall++;
    if (res_valid && !res_ready) n_res_stall++;
    if ($countones(dut.g_y[0].g_x[1].u_core.u_distro.u_sw.load) > 1) n_mcast++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---- data of the test ----
  function automatic logic signed [15:0] wv(input int m, input int i, input int j);
    return 16'(((m * 37 + i * 11 + j * 5 + (i * j) % 7) % 15) - 7);
  endfunction
  function automatic logic signed [15:0] xv(input int t, input int j);
    return 16'(((t * 19 + j * 13) % 11) - 5);
  endfunction
  function automatic flit_t wcol(input int m, input int j);
    flit_t f;
    f.hdr = 1'b0;
    for (int i = 0; i < LANES; i++) f.data[i] = wv(m, i, j);
    return f;
  endfunction
  function automatic flit_t tok(input int t);
    flit_t f;
    f.hdr = 1'b0;
    for (int j = 0; j < LANES; j++) f.data[j] = xv(t, j);
    return f;
  endfunction
  function automatic vec_t gemv(input int m, input int t);
    vec_t v;
    for (int i = 0; i < LANES; i++) begin
      int acc;
      acc = 0;
      for (int j = 0; j < COLS; j++) acc += int'(wv(m, i, j)) * int'(xv(t, j));
      v[i] = 16'(acc);
    end
    return v;
  endfunction

  // program: list of (flit, noc)
  flit_t prog_f[$];
  bit    prog_n[$];

  function automatic void put(input flit_t f, input bit noc);
    prog_f.push_back(f);
    prog_n.push_back(noc);
  endfunction
  // header flit with lanes for router ids; cfgs given per router (0 = none)
  function automatic flit_t hdr3(input logic mc, input xcfg_t c0, input xcfg_t c1, input xcfg_t c2);
    flit_t f;
    f = '0; f.hdr = 1'b1;
    f.data[0] = encode_lane(mc, c0);
    f.data[1] = encode_lane(mc, c1);
    f.data[2] = encode_lane(mc, c2);
    return f;
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  vec_t exp_q[$];
  bit   exp_is_topk[$];
  int   n_checked = 0;
  initial begin
    res_ready = 1'b0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      res_ready = ($urandom_range(0, 3) != 0);
      #1;
      if (res_valid && res_ready) begin
        if (exp_q.size() == 0) check(0, "unexpected result");
        else begin
          vec_t e;
          bit   tk;
          e = exp_q.pop_front();
          tk = exp_is_topk.pop_front();
          if (tk) check(res_flit.data[3:0] == e[3:0] && res_flit.data[LANES-1:4] == '0, "top-k result");
          else    check(res_flit.data == e, "sum of the two expert outputs");
          if (res_flit.data[3:0] != e[3:0]) $display("got %h %h exp %h %h", res_flit.data[0], res_flit.data[1], e[0], e[1]);
          n_checked++;
        end
      end
    end
  end

  initial begin
    xcfg_t a, b, c, z;
    vec_t  s;
    int    best0, best1;
    gb_we = 0; gb_addr = '0; gb_wdata = '0; inj_valid = 0; inj_addr = '0; inj_noc = 0;
    dout_ready = 1'b1; topk_en = '0;
    topk_en[0] = 1'b1;
    z = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- gating layer on core 0 ----
    a = '0; a[P_L] = 3'(P_W + 1);
    put(hdr3(1'b0, a, z, z), 1);
    for (int j = 0; j < COLS; j++) put(wcol(9, j), 1);
    put(hdr3(1'b0, a, z, z), 0);
    put(tok(7), 0);
    s = gemv(9, 7);
    best0 = 0;
    for (int e = 1; e < 16; e++) if ($signed(s[e]) > $signed(s[best0])) best0 = e;
    best1 = (best0 == 0) ? 1 : 0;
    for (int e = 0; e < 16; e++) if (e != best0 && $signed(s[e]) > $signed(s[best1])) best1 = e;
    begin
      vec_t e;
      e = '0; e[0] = 16'(best0); e[1] = 16'(best1); e[2] = s[best0]; e[3] = s[best1];
      exp_q.push_back(e); exp_is_topk.push_back(1);
    end

    // ---- expert weights: expert matrices 0,1 on core 1; 2,3 on core 2 ----
    a = '0; a[P_E] = 3'(P_W + 1);
    b = '0; b[P_L] = 3'(P_W + 1);
    put(hdr3(1'b0, a, b, z), 1);
    for (int j = 0; j < COLS; j++) put(wcol(0, j), 1);
    b = '0; b[P_E] = 3'(P_W + 1);
    c = '0; c[P_L] = 3'(P_W + 1);
    put(hdr3(1'b0, a, b, c), 1);
    for (int j = 0; j < COLS; j++) put(wcol(2, j), 1);
    // multicast token path and first token
    b = '0; b[P_E] = 3'(P_W + 1); b[P_L] = 3'(P_W + 1);
    put(hdr3(1'b1, a, b, c), 0);
    put(tok(0), 0);
    // second weight pair, streamed while token 0 is computed
    b = '0; b[P_L] = 3'(P_W + 1);
    put(hdr3(1'b0, a, b, z), 1);
    for (int j = 0; j < COLS; j++) put(wcol(1, j), 1);
    b = '0; b[P_E] = 3'(P_W + 1);
    put(hdr3(1'b0, a, b, c), 1);
    for (int j = 0; j < COLS; j++) put(wcol(3, j), 1);
    put(tok(1), 0);
    begin
      vec_t e0, e1;
      vec_t g;
      e0 = gemv(0, 0); e1 = gemv(2, 0);
      for (int i = 0; i < LANES; i++) g[i] = e0[i] + e1[i];
      exp_q.push_back(g); exp_is_topk.push_back(0);
      e0 = gemv(1, 1); e1 = gemv(3, 1);
      for (int i = 0; i < LANES; i++) g[i] = e0[i] + e1[i];
      exp_q.push_back(g); exp_is_topk.push_back(0);
    end

    // ---- host fills the global buffer (port A) ----
    for (int k = 0; k < prog_f.size(); k++) begin
      @(negedge clk);
      gb_we = 1; gb_addr = GAW'(k); gb_wdata = prog_f[k];
    end
    @(negedge clk); gb_we = 0;

    // ---- controller injects the program (port B -> NoC) ----
    for (int k = 0; k < prog_f.size(); k++) begin
      @(negedge clk);
      inj_valid = 1; inj_addr = GAW'(k); inj_noc = prog_n[k];
      #1;
      while (!inj_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk); inj_valid = 0;

    // ---- wait for all results ----
    while (exp_q.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_checked == 3, "all results received");
    check(n_dcfg > 0, "Distro/Redux reconfigured by headers");
    check(n_wcfg > 0, "Weight Distro reconfigured by headers");
    check(n_mcast > 0, "in-network multicast");
    check(n_add > 0, "Redux add");
    check(n_byp > 0, "Redux bypass");
    check(n_pre > 0, "weight preload during compute");
    check(n_topk > 0, "Top-K generator run");
    check(n_inj_stall > 0, "injection stall");
    check(n_res_stall > 0, "result back-pressure");
    check(n_drop == 0, "no flit dropped");
    $display("dcfg=%0d wcfg=%0d mcast=%0d add=%0d bypass=%0d preload=%0d topk=%0d results=%0d inj_stall=%0d res_stall=%0d drop=%0d cycles=%0d",
             n_dcfg, n_wcfg, n_mcast, n_add, n_byp, n_pre, n_topk, n_res, n_inj_stall, n_res_stall, n_drop, n_cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
