// tb_dynamoe_core: self-checking test of one DyNAMoE core (router id 0) at a
// reduced matrix size (COLS = 16). Drives the core's neighbour links:
//  1. a Weight Distro header routes W -> Loc; weights fill a bank;
//  2. a multicast Distro header routes W -> {E, Loc}; the token reaches the
//     GEMM core and is passed on eastwards;
//  3. the Redux router, programmed by the same header in reverse, adds the
//     local result to a partial sum arriving from E and sends it out on W;
//  4. with topk_en set the result passes the Top-K generator (bypass route);
//  5. a vector reduced into the core (Redux -> Loc) re-enters the Distro
//     NoC through the NIC buffer and leaves on E.
module tb_dynamoe_core;
  import dynamoe_pkg::*;
  localparam int COLS = 16, N_EXP = 16, K = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_dcfg = 0, n_wcfg = 0, n_add = 0, n_byp = 0, n_topk = 0, n_res = 0, n_pre = 0;

  logic topk_en;
  logic [3:0] d_in_valid, d_in_ready, d_out_valid, d_out_ready;
  logic [3:0] w_in_valid, w_in_ready, w_out_valid, w_out_ready;
  logic [3:0] r_in_valid, r_in_ready, r_out_valid, r_out_ready;
  flit_t [3:0] d_in_flit, d_out_flit, w_in_flit, w_out_flit, r_in_flit, r_out_flit;
  logic ev_d_cfg, ev_w_cfg, ev_drop, ev_add, ev_bypass, ev_preload, ev_result, ev_topk;

  dynamoe_core #(.ROUTER_ID(0), .COLS(COLS), .N_EXP(N_EXP), .K(K)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    n_dcfg += int'(ev_d_cfg); n_wcfg += int'(ev_w_cfg); n_add += int'(ev_add);
    n_byp += int'(ev_bypass); n_topk += int'(ev_topk); n_res += int'(ev_result);
    n_pre += int'(ev_preload);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic signed [15:0] wv(input int n, input int i, input int j);
    return 16'(((n * 13 + i * 7 + j * 3) % 19) - 9);
  endfunction
  function automatic logic signed [15:0] xv(input int n, input int j);
    return 16'(((n * 5 + j * 11) % 13) - 6);
  endfunction
  function automatic flit_t ref_res(input int n, input int t);
    flit_t f;
    f = '0;
    for (int i = 0; i < LANES; i++) begin
      int acc;
      acc = 0;
      for (int j = 0; j < COLS; j++) acc += int'(wv(n, i, j)) * int'(xv(t, j));
      f.data[i] = 16'(acc);
    end
    return f;
  endfunction
  function automatic flit_t hdr(input logic mc, input xcfg_t c);
    flit_t f;
    f = '0; f.hdr = 1'b1; f.data[0] = encode_lane(mc, c);
    return f;
  endfunction
  function automatic flit_t tok(input int t);
    flit_t f;
    f = '0;
    for (int j = 0; j < LANES; j++) f.data[j] = xv(t, j);
    return f;
  endfunction

  // send one flit on input W of the Distro (noc 0) or Weight Distro (noc 1)
  task automatic send(input int noc, input flit_t f);
    @(negedge clk);
    if (noc == 0) begin d_in_flit[P_W] = f; d_in_valid[P_W] = 1; end
    else          begin w_in_flit[P_W] = f; w_in_valid[P_W] = 1; end
    #1;
    while (!((noc == 0) ? d_in_ready[P_W] : w_in_ready[P_W])) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    d_in_valid[P_W] = 0; w_in_valid[P_W] = 0;
  endtask

  task automatic load_weights(input int n);
    for (int j = 0; j < COLS; j++) begin
      flit_t f;
      f = '0;
      for (int i = 0; i < LANES; i++) f.data[i] = wv(n, i, j);
      send(1, f);
    end
  endtask

  // wait for a flit on an output, with a limit
  task automatic get_out(input int noc, input int port, output flit_t f, output bit ok);
    int n;
    n = 0; ok = 0;
    #1;
    while (n < 2000) begin
      if (noc == 0 && d_out_valid[port]) begin f = d_out_flit[port]; ok = 1; break; end
      if (noc == 2 && r_out_valid[port]) begin f = r_out_flit[port]; ok = 1; break; end
      @(posedge clk); #1;
      n++;
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xcfg_t c;
    flit_t f, part, exp_f;
    bit ok;
    topk_en = 0;
    d_in_valid = '0; w_in_valid = '0; r_in_valid = '0;
    d_in_flit = '0; w_in_flit = '0; r_in_flit = '0;
    d_out_ready = '1; w_out_ready = '1; r_out_ready = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. weights: W -> Loc on the Weight Distro NoC (unicast)
    c = '0; c[P_L] = 3'(P_W + 1);
    send(1, hdr(1'b0, c));
    load_weights(0);
    load_weights(1);

    // 2. Distro: W -> {E, Loc} multicast
    c = '0; c[P_E] = 3'(P_W + 1); c[P_L] = 3'(P_W + 1);
    d_out_ready[P_E] = 1'b1;
    send(0, hdr(1'b1, c));
    get_out(0, P_E, f, ok);
    check(ok && f.hdr && f.data[0] == encode_lane(1'b1, c), "header forwarded east");
    send(0, tok(0));
    get_out(0, P_E, f, ok);
    check(ok && f == tok(0), "token multicast east");

    // 3. Redux: E + Loc -> W, partial sum from the east neighbour
    part = '0;
    for (int i = 0; i < LANES; i++) part.data[i] = 16'(i * 3 + 1);
    @(negedge clk); r_in_flit[P_E] = part; r_in_valid[P_E] = 1;
    get_out(2, P_W, f, ok);
    exp_f = ref_res(0, 0);
    for (int i = 0; i < LANES; i++) exp_f.data[i] = exp_f.data[i] + part.data[i];
    check(ok && f == exp_f, "local result plus partial sum on W");
    @(negedge clk); r_in_valid[P_E] = 0;

    // 4. gating: unicast W -> Loc, reverse Loc -> W (bypass); topk on
    c = '0; c[P_L] = 3'(P_W + 1);
    send(0, hdr(1'b0, c));
    topk_en = 1;
    send(0, tok(1));
    get_out(2, P_W, f, ok);
    begin
      flit_t r;
      int b0, b1;
      r = ref_res(1, 1);
      b0 = 0;
      for (int e = 1; e < N_EXP; e++) if ($signed(r.data[e]) > $signed(r.data[b0])) b0 = e;
      b1 = (b0 == 0) ? 1 : 0;
      for (int e = 0; e < N_EXP; e++) if (e != b0 && $signed(r.data[e]) > $signed(r.data[b1])) b1 = e;
      check(ok && int'(f.data[0]) == b0 && int'(f.data[1]) == b1, "top-2 expert ids on W");
      check(ok && f.data[2] == r.data[b0] && f.data[3] == r.data[b1], "top-2 scores on W");
    end
    topk_en = 0;

    // 5. Redux E -> Loc -> NIC buffer -> Distro Loc -> E
    c = '0; c[P_E] = 3'(P_L + 1);
    send(0, hdr(1'b0, c));
    @(negedge clk); r_in_flit[P_E] = part; r_in_valid[P_E] = 1;
    #1 while (!r_in_ready[P_E]) begin @(negedge clk); #1; end
    @(posedge clk); @(negedge clk); r_in_valid[P_E] = 0;
    get_out(0, P_E, f, ok);
    check(ok && f == part, "reduced vector re-sent through the Distro NoC");

    check(n_dcfg == 3 && n_wcfg == 1, "header counts");
    check(n_add == 1 && n_byp >= 2 && n_topk == 1 && n_res == 2, "event counts");
    $display("dcfg=%0d wcfg=%0d add=%0d bypass=%0d topk=%0d results=%0d preload=%0d",
             n_dcfg, n_wcfg, n_add, n_byp, n_topk, n_res, n_pre);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
