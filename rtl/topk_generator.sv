// topk_generator: picks the K experts with the highest gating scores.
//
// The input flit carries the gating scores of N_EXP experts in lanes
// 0..N_EXP-1 (signed 16-bit, as produced by a GEMM core computing the
// gating layer). The generator scans them one per cycle and keeps a sorted
// list of the K best so far (insertion into a K-entry register list; on a
// tie the lower expert index ranks first). The output flit carries the
// expert indices of the K winners in lanes 0..K-1 (best first) and their
// scores in lanes K..2K-1; the other lanes are zero.
//
// The design states only what this block does and that it is slow (it runs
// at a tenth of the core clock because of its critical path); the serial
// one-score-per-cycle structure, which keeps the critical path short, and
// the output lane layout are this design's choices. Timing: the input flit
// is taken when the block is idle; the result is offered N_EXP cycles
// later and held until accepted. Synchronous active-low reset.
module topk_generator
  import dynamoe_pkg::*;
#(
  parameter int unsigned N_EXP = 16,
  parameter int unsigned K     = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  flit_t in_flit,
  output logic  out_valid,
  input  logic  out_ready,
  output flit_t out_flit
);
  localparam int unsigned IW = (N_EXP > 1) ? $clog2(N_EXP) : 1;

  logic                         busy;
  logic [IW:0]                  idx;       // next score to examine
  logic [N_EXP-1:0][DW-1:0]     scores;
  logic [K-1:0][DW-1:0]         best_s;
  logic [K-1:0][IW-1:0]         best_i;
  logic [K-1:0]                 best_v;

  assign in_ready = !busy && !out_valid;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      idx       <= '0;
      best_v    <= '0;
    end else begin
      if (in_valid && in_ready) begin
        busy   <= 1'b1;
        idx    <= '0;
        best_v <= '0;
        for (int e = 0; e < N_EXP; e++) scores[e] <= in_flit.data[e];
      end else if (busy) begin
        // insert scores[idx] into the sorted list
        logic [DW-1:0] s;
        logic [K-1:0]  beats;
        s = scores[idx[IW-1:0]];
        for (int k = 0; k < K; k++)
          beats[k] = !best_v[k] || ($signed(s) > $signed(best_s[k]));
        for (int k = K-1; k >= 0; k--) begin
          if (beats[k]) begin
            if (k == 0 || !beats[k == 0 ? 0 : k-1]) begin
              best_s[k] <= s;
              best_i[k] <= idx[IW-1:0];
              best_v[k] <= 1'b1;
            end else begin
              best_s[k] <= best_s[k-1];
              best_i[k] <= best_i[k-1];
              best_v[k] <= best_v[k-1];
            end
          end
        end
        if (idx == (IW+1)'(N_EXP-1)) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
        idx <= idx + 1'b1;
      end
      if (out_valid && out_ready) out_valid <= 1'b0;
    end
  end

  always_comb begin
    out_flit = '0;
    for (int k = 0; k < K; k++) begin
      out_flit.data[k]     = DW'(best_i[k]);
      out_flit.data[K + k] = best_s[k];
    end
  end
endmodule
