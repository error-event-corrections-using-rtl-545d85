// list_bmu: branch metric unit of the List-NPML detector.
//
// For every predecessor state s_k, every list rank t of that state and both
// values of the new bit b_n it computes the document's list branch metric
//   c_n^(t)(s_k, s_j) = [ z_n + sum_{i=K+1..L+2} a^(t)_{n-i}(s_k) g_i
//                             + sum_{i=1..K} a_{n-i}(s_k) g_i - a_n ]^2,
// where s_j is the state s_k moves to with b_n. The first K past symbols come
// from the state itself; the older L+2-K come from the decision history of
// the t-th path of s_k (the per-path decision feedback that makes paths
// reaching the same state have different branch metrics). Symbols are
// a = +1 for bit 1 and -1 for bit 0.
//
// State s_k holds the last K bits, k[K-1] = b_{n-1} ... k[0] = b_{n-K};
// hist[k][t][i-1] is bit b_{n-i} of path (k,t). The squared error is formed
// at full precision (COEF_FRAC fractional bits), scaled to 2^-BM_FRAC units
// by truncation and saturated to BM_W bits: this design's choice.
// Purely combinational; bm[k][t][b] is the metric for new bit b.
module list_bmu
  import lnpml_pkg::*;
#(
  parameter int unsigned K = 2,
  parameter int unsigned L = 3,
  parameter int unsigned N = 3,
  localparam int unsigned S = 1 << K,
  localparam int unsigned H = L + 2
) (
  input  logic signed [SAMPLE_W-1:0]           z,
  input  logic signed [H-1:0][G_W-1:0]         g,      // g[i-1] = g_i
  input  logic [S-1:0][N-1:0][H-1:0]           hist,
  output logic [S-1:0][N-1:0][1:0][BM_W-1:0]   bm
);

  localparam int E_W  = G_W + SAMPLE_W;
  localparam int SQ_W = 2 * E_W;
  localparam int SH   = 2 * COEF_FRAC - BM_FRAC;

  always_comb begin
    for (int k = 0; k < S; k++) begin
      for (int t = 0; t < N; t++) begin
        for (int b = 0; b < 2; b++) begin
          logic signed [E_W-1:0] e;
          logic signed [SQ_W-1:0] ew;
          logic        [SQ_W-1:0] sq;
          logic                   past;
          e = E_W'($signed(z)) <<< (COEF_FRAC - SAMPLE_FRAC);
          for (int i = 1; i <= H; i++) begin
            past = (i <= K) ? k[K-i] : hist[k][t][i-1];
            if (past) e = e + E_W'($signed(g[i-1]));
            else      e = e - E_W'($signed(g[i-1]));
          end
          if (b != 0) e = e - (E_W'(1) <<< COEF_FRAC);
          else        e = e + (E_W'(1) <<< COEF_FRAC);
          ew = SQ_W'(e);
          sq = ew * ew;
          sq = sq >> SH;
          bm[k][t][b] = (sq > SQ_W'({BM_W{1'b1}})) ? '1 : sq[BM_W-1:0];
        end
      end
    end
  end

endmodule
