// list_acs: list add-compare-select unit of one trellis state.
//
// A state s_j of the K-bit trellis has two predecessor states, each carrying
// a rank-ordered list of N paths. The unit adds to each of the 2N path
// metrics phi_{n-1}(k,t) the branch metric c_n^(t)(s_k,s_j) of that very
// path (the metrics differ from path to path because of decision feedback),
// and keeps the N smallest sums in rank order: phi_n(j,l) and the pair
// (beta_n(j,l), r_n(j,l)) = (predecessor, rank there) of the l-th best one,
// as in the recursion of the document's Algorithm 1. Half of the 2N
// candidates are dropped at every step.
//
// Candidate c = x*N + t comes from predecessor x (0 or 1; the caller maps it
// to a state) and rank t. Additions saturate, so a path with an infinite
// metric stays infinite. Ties go to the lower candidate index. Purely
// combinational.
module list_acs
  import lnpml_pkg::*;
#(
  parameter int unsigned N = 3,
  localparam int unsigned TW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned CW = $clog2(2 * N)
) (
  input  logic [1:0][N-1:0][PM_W-1:0] pm_in,   // [x][t]
  input  logic [1:0][N-1:0][BM_W-1:0] bm_in,   // [x][t]
  output logic [N-1:0][PM_W-1:0]      pm_out,  // [l], ascending
  output logic [N-1:0]                sel_x,   // predecessor of the l-th path
  output logic [N-1:0][TW-1:0]        sel_t    // its rank at the predecessor
);

  logic [2*N-1:0][PM_W-1:0] cand;
  logic [N-1:0][CW-1:0]     idx;

  always_comb begin
    for (int x = 0; x < 2; x++)
      for (int t = 0; t < N; t++)
        cand[x*N + t] = pm_add(pm_in[x][t], bm_in[x][t]);
  end

  kbest_select #(.NIN(2 * N), .OUT(N)) u_sel (
    .vin(cand),
    .idx(idx),
    .val(pm_out)
  );

  always_comb begin
    for (int l = 0; l < N; l++) begin
      sel_x[l] = (int'(idx[l]) >= N);
      sel_t[l] = TW'((int'(idx[l]) >= N) ? int'(idx[l]) - N : int'(idx[l]));
    end
  end

endmodule
