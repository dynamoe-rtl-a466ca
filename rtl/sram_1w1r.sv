// sram_1w1r: synchronous SRAM with one write port and one read port.
//
// DEPTH words of WIDTH bits, written as an array so a synthesis flow can map
// it onto an SRAM macro. Used for the GEMM core weight banks (256 words of
// 256 x 16 bits, one word per column of the weight matrix) and for the four
// banks of the global buffer (8192 words of 4096 bits = 4 MB each).
//
// Timing: a write (we, waddr, wdata) is stored at the clock edge. A read
// (re, raddr) returns rdata one cycle later; rdata holds its value while re
// is low. Reading and writing the same address in one cycle returns the old
// word. The contents are not reset.
module sram_1w1r #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
