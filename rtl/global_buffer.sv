// global_buffer: the on-chip global buffer holding expert parameters and
// MoE inputs.
//
// NBANKS banks of BANK_WORDS words, each word one NoC flit (256 x 16 bits =
// 512 bytes); the defaults give 4 banks of 4 MB, 16 MB in all, as in the
// design. Each bank is dual ported: port A is a write port filled from the
// host link (PCIe side), port B a read port that feeds the NoCs, so loading
// the parameters of later experts overlaps with distributing the current
// ones. The word width and the split into a write and a read port are this
// design's choices. A flat address selects the bank with its upper bits and
// the word with the lower bits.
//
// Timing: a write is stored at the clock edge; a read returns its word on
// b_rdata one cycle after b_re, with b_rvalid high in that cycle.
module global_buffer
  import dynamoe_pkg::*;
#(
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_WORDS = 8192,
  localparam int unsigned WAW = $clog2(BANK_WORDS),
  localparam int unsigned BAW = (NBANKS > 1) ? $clog2(NBANKS) : 1,
  localparam int unsigned GAW = WAW + BAW
) (
  input  logic           clk,
  input  logic           rst_n,
  // port A: write
  input  logic           a_we,
  input  logic [GAW-1:0] a_addr,
  input  flit_t          a_wdata,
  // port B: read
  input  logic           b_re,
  input  logic [GAW-1:0] b_addr,
  output logic           b_rvalid,
  output flit_t          b_rdata
);
  logic [NBANKS-1:0]                       bank_we, bank_re;
  logic [NBANKS-1:0][$bits(flit_t)-1:0]    bank_rdata;
  logic [BAW-1:0]                          rd_bank_q;

  for (genvar b = 0; b < NBANKS; b++) begin : g_bank
    assign bank_we[b] = a_we && (a_addr[GAW-1:WAW] == BAW'(b));
    assign bank_re[b] = b_re && (b_addr[GAW-1:WAW] == BAW'(b));
    sram_1w1r #(.DEPTH(BANK_WORDS), .WIDTH($bits(flit_t))) u_bank (
      .clk,
      .we   (bank_we[b]),
      .waddr(a_addr[WAW-1:0]),
      .wdata(a_wdata),
      .re   (bank_re[b]),
      .raddr(b_addr[WAW-1:0]),
      .rdata(bank_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_rvalid  <= 1'b0;
      rd_bank_q <= '0;
    end else begin
      b_rvalid <= b_re;
      if (b_re) rd_bank_q <= b_addr[GAW-1:WAW];
    end
  end

  assign b_rdata = flit_t'(bank_rdata[rd_bank_q]);
endmodule
