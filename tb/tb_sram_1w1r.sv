// tb_sram_1w1r: self-checking test of the 1-write 1-read SRAM.
// Writes random words, reads them back with random simultaneous writes, and
// checks the one-cycle read latency, read-before-write on the same address
// and that rdata holds while no read is issued.
module tb_sram_1w1r;
  localparam int DEPTH = 64, WIDTH = 72;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [5:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata, model [DEPTH], expect_q;

  sram_1w1r #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

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
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = {8'(a), 32'($urandom), 32'($urandom)};
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      re = 1; raddr = 6'($urandom_range(0, DEPTH-1));
      we = ($urandom_range(0, 1) == 1);
      waddr = (n % 5 == 0) ? raddr : 6'($urandom_range(0, DEPTH-1));
      wdata = {32'($urandom), 32'($urandom), 8'(n)};
      expect_q = model[raddr];                 // old word on a collision
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      check(rdata == expect_q, "read data one cycle after re");
    end
    // hold while re is low
    @(negedge clk); re = 0; we = 1; waddr = raddr; wdata = '1;
    expect_q = rdata;
    repeat (3) @(posedge clk);
    #1 check(rdata == expect_q, "rdata holds with re low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
