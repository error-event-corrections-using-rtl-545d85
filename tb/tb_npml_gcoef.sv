// tb_npml_gcoef: self-checking test of the combined coefficient unit.
//
// For random predictor taps p_1..p_3 the expected g_i are obtained by
// multiplying the polynomials (1 - D^2) and (1 - p_1 D - p_2 D^2 - p_3 D^3)
// coefficient by coefficient here, and g_i = -(coefficient of D^i).
module tb_npml_gcoef;
  import lnpml_pkg::*;

  localparam int L = 3;

  int checks = 0, failures = 0;

  logic signed [L-1:0][COEF_W-1:0] p;
  logic signed [L+1:0][G_W-1:0]    g;

  npml_gcoef #(.L(L)) dut (.p(p), .g(g));

  initial begin
    int a[3], b[L + 1], prod[L + 3];
    a = '{1, 0, -1};                              // 1 - D^2
    for (int trial = 0; trial < 2000; trial++) begin
      b[0] = 1 << COEF_FRAC;                      // 1 - P(D), scaled
      for (int i = 1; i <= L; i++) begin
        int v;
        v = $urandom_range(0, (1 << COEF_W) - 1) - (1 << (COEF_W - 1));
        p[i-1] = COEF_W'(v);
        b[i] = -v;
      end
      for (int i = 0; i < L + 3; i++) prod[i] = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j <= L; j++)
          prod[i + j] += a[i] * b[j];
      #1;
      checks++;
      if (prod[0] != (1 << COEF_FRAC)) failures++;
      for (int i = 1; i <= L + 2; i++) begin
        checks++;
        if (int'($signed(g[i-1])) != -prod[i]) begin
          failures++;
          $display("FAIL: g_%0d = %0d, expected %0d", i, int'($signed(g[i-1])), -prod[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
