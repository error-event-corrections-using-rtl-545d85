// npml_gcoef: combined target and predictor coefficients of the detector.
//
// The detector's branch metric uses G(D) = (1 - D^2)[1 - P(D)]
// = 1 - g_1 D - ... - g_{L+2} D^{L+2}, with P(D) = p_1 D + ... + p_L D^L the
// noise predictor. Expanding gives g_i = p_i - p_{i-2}, with p_0 = -1 and
// p_i = 0 outside 1..L, so g_1 = p_1, g_2 = 1 + p_2, g_{L+1} = -p_{L-1} and
// g_{L+2} = -p_L. Purely combinational: p_i are signed COEF_W-bit with
// COEF_FRAC fractional bits, g_i signed G_W = COEF_W+1 bits in the same
// scale, which holds every value without overflow.
module npml_gcoef
  import lnpml_pkg::*;
#(
  parameter int unsigned L = 3
) (
  input  logic signed [L-1:0][COEF_W-1:0] p,    // p[i-1] = p_i
  output logic signed [L+1:0][G_W-1:0]    g     // g[i-1] = g_i
);

  function automatic logic signed [G_W-1:0] pc(input int i,
                                               input logic signed [L-1:0][COEF_W-1:0] pv);
    if (i == 0)           return -(G_W'(1) <<< COEF_FRAC);
    if (i < 0 || i > L)   return '0;
    return G_W'($signed(pv[i-1]));
  endfunction

  always_comb begin
    for (int i = 1; i <= L + 2; i++)
      g[i-1] = pc(i, p) - pc(i - 2, p);
  end

endmodule
