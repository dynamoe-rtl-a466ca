// tb_global_buffer: self-checking test of the banked global buffer at a
// reduced bank size. Fills every bank through port A, reads back through
// port B while port A keeps writing (dual-port use), and checks data, bank
// selection and the one-cycle read latency (b_rvalid).
module tb_global_buffer;
  import dynamoe_pkg::*;
  localparam int NB = 4, WORDS = 32, GAW = 7;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a_we, b_re, b_rvalid;
  logic [GAW-1:0] a_addr, b_addr;
  flit_t a_wdata, b_rdata, model [NB*WORDS], exp_f;

  global_buffer #(.NBANKS(NB), .BANK_WORDS(WORDS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(input int a, input int salt);
    flit_t f;
    f = '0;
    f.hdr = 1'(a);
    for (int l = 0; l < LANES; l += 37) f.data[l] = 16'(a * 131 + l + salt);
    f.data[LANES-1] = 16'(a);
    return f;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_we = 0; b_re = 0; a_addr = 0; b_addr = 0; a_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < NB*WORDS; a++) begin
      @(negedge clk);
      a_we = 1; a_addr = GAW'(a); a_wdata = mk(a, 0); model[a] = a_wdata;
    end
    @(negedge clk); a_we = 0;
    for (int n = 0; n <= 600; n++) begin
      int ra;
      @(negedge clk);
      // the previous read is checked while the address already points elsewhere
      ra = $urandom_range(0, NB*WORDS-1);
      b_re = (n < 600); b_addr = GAW'(ra);
      #1;
      if (n > 0) begin
        check(b_rvalid, "b_rvalid one cycle after b_re");
        check(b_rdata == exp_f, "port B read data");
      end
      exp_f = model[ra];
      a_we = 1; a_addr = GAW'((ra + 1 + $urandom_range(0, 20)) % (NB*WORDS));
      a_wdata = mk(int'(a_addr), n + 1);
      @(posedge clk);
      model[a_addr] = a_wdata;
    end
    @(negedge clk); b_re = 0; a_we = 0;
    @(posedge clk); #1 check(!b_rvalid, "b_rvalid low without a read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
