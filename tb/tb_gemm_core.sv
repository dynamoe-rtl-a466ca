// tb_gemm_core: self-checking test of the GEMM core at full size
// (256 MACs, two 256 x 256 weight banks).
// Loads four weight matrices and computes four tokens. The weights of
// matrix n+1 stream in while token n is computed (ping-pong preload). Checks
// every result lane against a reference matrix-vector product, the
// COLS + 1 cycle compute time, that a full bank refuses further weights,
// that header flits are ignored, and that a result is held under
// back-pressure.
module tb_gemm_core;
  import dynamoe_pkg::*;
  localparam int COLS = 256;
  localparam int NMAT = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_preload = 0, n_wstall = 0;

  logic tok_valid, tok_ready, wt_valid, wt_ready, res_valid, res_ready;
  flit_t tok_flit, wt_flit, res_flit;
  logic [1:0] bank_full;
  logic cmp_bank, busy, preload;

  gemm_core #(.COLS(COLS)) dut (.*);

  // W[n][i][j] = small pseudo-random values, x[n][j] likewise
  function automatic logic signed [15:0] wval(input int n, input int i, input int j);
    return 16'(((n * 7919 + i * 104729 + j * 1299709) % 61) - 30);
  endfunction
  function automatic logic signed [15:0] xval(input int n, input int j);
    return 16'(((n * 31 + j * 17) % 23) - 11);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (preload) n_preload++;

  // weight feeder: matrices 0..NMAT-1, one column per flit, a header flit
  // in between that must be ignored
  initial begin
    wt_valid = 0; wt_flit = '0;
    wait (rst_n);
    for (int n = 0; n < NMAT; n++) begin
      @(negedge clk);
      wt_flit = '0; wt_flit.hdr = 1; wt_flit.data[0] = 16'hFFFF; wt_valid = 1;
      @(posedge clk); #1 check(wt_ready, "header flit on weight port taken and ignored");
      for (int j = 0; j < COLS; j++) begin
        @(negedge clk);
        wt_flit.hdr = 0;
        for (int i = 0; i < LANES; i++) wt_flit.data[i] = wval(n, i, j);
        wt_valid = 1;
        #1;
        while (!wt_ready) begin n_wstall++; @(negedge clk); #1; end
        @(posedge clk);
      end
      @(negedge clk); wt_valid = 0;
    end
  end

  initial begin
    int lat;
    tok_valid = 0; tok_flit = '0; res_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NMAT; n++) begin
      @(negedge clk);
      // a header flit first: consumed without computing
      tok_flit = '0; tok_flit.hdr = 1; tok_valid = 1;
      @(posedge clk); #1 check(!busy, "header token does not start a computation");
      @(negedge clk);
      tok_flit.hdr = 0;
      for (int j = 0; j < LANES; j++) tok_flit.data[j] = xval(n, j);
      #1;
      while (!tok_ready) begin @(negedge clk); #1; end
      check(bank_full[cmp_bank], "compute starts on a full bank");
      @(posedge clk); #1;
      tok_valid = 0;
      lat = 0;
      while (!res_valid) begin @(posedge clk); #1; lat++; end
      check(lat == COLS + 1, "compute time COLS + 1 cycles");
      if (lat != COLS + 1) $display("latency %0d", lat);
      repeat (5) begin @(posedge clk); #1; end
      check(res_valid, "result held under back-pressure");
      for (int i = 0; i < LANES; i++) begin
        int acc;
        acc = 0;
        for (int j = 0; j < COLS; j++) acc += int'(wval(n, i, j)) * int'(xval(n, j));
        check(res_flit.data[i] == 16'(acc), "result lane");
      end
      @(negedge clk); res_ready = 1;
      @(negedge clk); res_ready = 0;
    end
    check(n_preload > 0, "weights preloaded during a computation");
    check(n_wstall > 0, "weight port stalled while both banks were full");
    $display("preload cycles=%0d weight stall cycles=%0d", n_preload, n_wstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
