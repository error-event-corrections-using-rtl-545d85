// kbest_select: rank-ordered selection of the OUT smallest of NIN metrics.
//
// Each input's rank is the number of inputs that beat it, where a smaller
// value wins and equal values are ordered by input index (lower first), so
// the ranks are a permutation of 0..NIN-1. Output l is the input of rank l:
// idx[l] is its index and val[l] its value, idx[0] being the smallest. The
// comparison matrix is NIN*(NIN-1)/2 comparators deep one level, followed by
// one-hot selection; purely combinational. Used by the add-compare-select
// units (N best of 2N) and by the update step (q best of all paths).
module kbest_select
  import lnpml_pkg::*;
#(
  parameter int unsigned NIN = 6,
  parameter int unsigned OUT = 3,
  localparam int unsigned IW = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [NIN-1:0][PM_W-1:0] vin,
  output logic [OUT-1:0][IW-1:0]   idx,
  output logic [OUT-1:0][PM_W-1:0] val
);

  logic [NIN-1:0][IW:0] rank;

  always_comb begin
    for (int c = 0; c < NIN; c++) begin
      rank[c] = '0;
      for (int d = 0; d < NIN; d++) begin
        if (d != c) begin
          if (vin[d] < vin[c] || (vin[d] == vin[c] && d < c))
            rank[c] = rank[c] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < OUT; l++) begin
      idx[l] = '0;
      val[l] = '0;
      for (int c = 0; c < NIN; c++) begin
        if (rank[c] == (IW + 1)'(l)) begin
          idx[l] = idx[l] | IW'(c);
          val[l] = val[l] | vin[c];
        end
      end
    end
  end

endmodule
