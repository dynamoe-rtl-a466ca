// tb_redux_config_mem: self-checking test of the Redux configuration memory.
// Writes random Distro settings and checks the stored bits, that nothing
// changes without wr_en, and the reversed source masks (worked out here
// field by field, without the package helper).
module tb_redux_config_mem;
  import dynamoe_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic  wr_en;
  xcfg_t wr_cfg, cfg, model;
  logic [NPORTS-1:0][NPORTS-1:0] src_mask;

  redux_config_mem dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(cfg == '0 && src_mask == '0, "reset clears the setting");
    model = '0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      wr_en  = ($urandom_range(0, 1) == 1);
      wr_cfg = xcfg_t'($urandom);
      @(posedge clk);
      if (wr_en) model = wr_cfg;
      #1;
      check(cfg == model, "stored bits");
      for (int i = 0; i < NPORTS; i++)
        for (int o = 0; o < NPORTS; o++) begin
          int f;
          f = int'(model[o]);                    // input select of Distro output o
          check(src_mask[i][o] == (f == i + 1), "reversed source mask");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
