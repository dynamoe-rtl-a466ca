// gemm_core: matrix-vector engine of a DyNAMoE core.
//
// 256 multiply-accumulate units compute y = W x for one token x (a flit of
// 256 16-bit values) and a 256 x 256 matrix W of 16-bit weights. The
// weights sit in two SRAM banks used as a ping-pong pair: while a token is
// computed with the matrix in one bank (cmp_bank, the bank_num select), the
// other bank is loaded with the matrix for the next token from the Weight
// Distro NoC. These sizes and the two-bank scheme follow the design; the
// data layout and timing below are this design's choices.
//
// Weight loading: each data flit on the wt_* port is one column of W
// (lane i = W[i][j]); 256 flits fill a bank, columns in order j = 0..255.
// A full bank accepts no more flits until it has been used once.
// Compute: when a data token is waiting on tok_*, the compute bank is full
// and the result register is free, the token is taken and column j of the
// bank is read in cycle j (j = 0..255); MAC i adds W[i][j] * x[j] to a
// 32-bit accumulator one cycle later. The result flit (lane i = low 16 bits
// of accumulator i, two's complement, wrapping) is offered on res_* in the
// cycle after the last accumulate: a token occupies the MAC array for
// COLS + 1 cycles. The bank is then released and the other bank becomes the
// compute bank. Header flits reaching either input are consumed and
// ignored. Synchronous active-low reset.
module gemm_core
  import dynamoe_pkg::*;
#(
  parameter int unsigned COLS = 256   // matrix columns = weight words per bank
) (
  input  logic        clk,
  input  logic        rst_n,
  // token input (from the Distro router Loc output)
  input  logic        tok_valid,
  output logic        tok_ready,
  input  flit_t       tok_flit,
  // weight input (from the Weight Distro router Loc output)
  input  logic        wt_valid,
  output logic        wt_ready,
  input  flit_t       wt_flit,
  // result output (to the Redux router Loc input)
  output logic        res_valid,
  input  logic        res_ready,
  output flit_t       res_flit,
  // status
  output logic [1:0]  bank_full,
  output logic        cmp_bank,
  output logic        busy,
  output logic        preload     // a weight column written while computing
);
  localparam int unsigned CW = (COLS > 1) ? $clog2(COLS) : 1;
  localparam int unsigned AW = 32;

  logic                 ld_bank;
  logic [CW-1:0]        wr_col;
  logic [CW:0]          rd_cnt;     // 0..COLS
  logic                 acc_en;
  vec_t                 x_sh;       // token, shifted one lane per cycle
  logic [DW-1:0]        x_cur;      // x[j] aligned with the read data
  logic [LANES-1:0][AW-1:0] acc;
  logic [1:0]           bank_we, bank_re;
  logic [1:0][LANES*DW-1:0] bank_rdata;
  vec_t                 w_col;
  logic                 wt_write, start, done;

  // ---- weight loading ----
  assign wt_ready = wt_flit.hdr || !bank_full[ld_bank];
  assign wt_write = wt_valid && !wt_flit.hdr && !bank_full[ld_bank];
  assign preload  = wt_write && busy;

  // ---- compute control ----
  assign start     = !busy && tok_valid && !tok_flit.hdr && bank_full[cmp_bank] && !res_valid;
  assign tok_ready = start || (tok_valid && tok_flit.hdr);
  assign done      = acc_en && (rd_cnt == (CW+1)'(COLS));

  for (genvar b = 0; b < 2; b++) begin : g_bank
    assign bank_we[b] = wt_write && (ld_bank == 1'(b));
    assign bank_re[b] = busy && (cmp_bank == 1'(b)) && (rd_cnt < (CW+1)'(COLS));
    sram_1w1r #(.DEPTH(COLS), .WIDTH(LANES*DW)) u_sram (
      .clk,
      .we   (bank_we[b]),
      .waddr(wr_col),
      .wdata(wt_flit.data),
      .re   (bank_re[b]),
      .raddr(rd_cnt[CW-1:0]),
      .rdata(bank_rdata[b])
    );
  end

  assign w_col = vec_t'(bank_rdata[cmp_bank]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_bank   <= 1'b0;
      cmp_bank  <= 1'b0;
      wr_col    <= '0;
      bank_full <= '0;
      busy      <= 1'b0;
      rd_cnt    <= '0;
      acc_en    <= 1'b0;
      res_valid <= 1'b0;
    end else begin
      // loading
      if (wt_write) begin
        if (wr_col == CW'(COLS-1)) begin
          wr_col             <= '0;
          bank_full[ld_bank] <= 1'b1;
          ld_bank            <= ~ld_bank;
        end else begin
          wr_col <= wr_col + 1'b1;
        end
      end
      // computing
      if (start) begin
        busy   <= 1'b1;
        rd_cnt <= '0;
        acc_en <= 1'b0;
      end else if (busy) begin
        acc_en <= (rd_cnt < (CW+1)'(COLS));
        if (rd_cnt < (CW+1)'(COLS)) rd_cnt <= rd_cnt + 1'b1;
        if (done) begin
          busy                <= 1'b0;
          acc_en              <= 1'b0;
          bank_full[cmp_bank] <= 1'b0;
          cmp_bank            <= ~cmp_bank;
          res_valid           <= 1'b1;
        end
      end
      if (res_valid && res_ready) res_valid <= 1'b0;
    end
  end

  // Token shift register and MAC array.
  always_ff @(posedge clk) begin
    if (start) begin
      x_sh <= tok_flit.data;
      for (int i = 0; i < LANES; i++) acc[i] <= '0;
    end else if (busy) begin
      x_cur <= x_sh[0];
      x_sh  <= {DW'(0), x_sh[LANES-1:1]};
      if (acc_en) begin
        for (int i = 0; i < LANES; i++)
          acc[i] <= acc[i] + AW'($signed(w_col[i]) * $signed(x_cur));
      end
    end
  end

  always_comb begin
    res_flit.hdr = 1'b0;
    for (int i = 0; i < LANES; i++) res_flit.data[i] = acc[i][DW-1:0];
  end

  a_res_hold: assert property (@(posedge clk) disable iff (!rst_n)
    res_valid && !res_ready |=> res_valid && $stable(res_flit));
endmodule
