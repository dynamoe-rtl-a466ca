// tb_topk_generator: self-checking test of the Top-K generator.
// Random score vectors (with forced ties) are compared with a reference
// selection; checks winners, scores, zeroed lanes and the N_EXP+1 cycle
// latency from acceptance to result.
module tb_topk_generator;
  import dynamoe_pkg::*;
  localparam int N_EXP = 16, K = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;

  topk_generator #(.N_EXP(N_EXP), .K(K)) dut (.*);

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

  initial begin
    in_valid = 0; out_ready = 0; in_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s [N_EXP];
      int wi [K];
      int ws [K];
      bit taken [N_EXP];
      int lat;
      in_flit = '0;
      for (int e = 0; e < N_EXP; e++) begin
        s[e] = (t % 4 == 0) ? $urandom_range(0, 3) - 2 : int'($signed(16'($urandom)));
        in_flit.data[e] = 16'(s[e]);
        taken[e] = 0;
      end
      for (int e = N_EXP; e < LANES; e++) in_flit.data[e] = 16'($urandom); // ignored lanes
      // reference: repeated arg-max, lower index wins ties
      for (int k = 0; k < K; k++) begin
        wi[k] = -1;
        for (int e = 0; e < N_EXP; e++)
          if (!taken[e] && (wi[k] < 0 || s[e] > ws[k])) begin wi[k] = e; ws[k] = s[e]; end
        taken[wi[k]] = 1;
      end
      @(negedge clk);
      in_valid = 1;
      #1 check(in_ready, "idle generator ready");
      @(posedge clk); #1;
      in_valid = 0;
      lat = 0;
      while (!out_valid) begin @(posedge clk); #1; lat++; end
      if (lat != N_EXP) $display("lat=%0d", lat);
      check(lat == N_EXP, "latency N_EXP cycles");
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      check(out_valid, "result held until accepted");
      for (int k = 0; k < K; k++) begin
        check(int'(out_flit.data[k]) == wi[k], "winner index");
        check($signed(out_flit.data[K+k]) == 16'(ws[k]), "winner score");
      end
      check(out_flit.data[2*K] == '0 && out_flit.data[LANES-1] == '0, "other lanes zero");
      @(negedge clk); out_ready = 1;
      @(posedge clk); #1 out_ready = 0;
      check(!out_valid, "result cleared after acceptance");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
