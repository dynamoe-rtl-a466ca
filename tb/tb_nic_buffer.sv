// tb_nic_buffer: self-checking test of the NIC buffer FIFO.
// Random pushes and pops against a reference queue; checks order, data,
// the full/empty flags and that ready drops exactly at DEPTH entries.
module tb_nic_buffer;
  import dynamoe_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit;
  flit_t model[$];
  int    n_full = 0;

  nic_buffer #(.DEPTH(DEPTH)) dut (.*);

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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 3) != 0);
      out_ready = (cyc < 300) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 1) == 0);
      in_flit.hdr = 1'($urandom);
      for (int l = 0; l < 8; l++) in_flit.data[l] = 16'($urandom);
      in_flit.data[255] = 16'(cyc);
      #1;
      check(in_ready == (model.size() < DEPTH), "in_ready matches fill level");
      check(out_valid == (model.size() > 0), "out_valid matches fill level");
      if (out_valid && model.size() > 0) check(out_flit == model[0], "head flit data");
      if (model.size() == DEPTH) n_full++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_flit);
    end
    check(n_full > 0, "buffer reached full at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
