// tb_workload_n50: the largest list size studied, N = 50 paths per state
// with P = 198, against N = 1 and N = 3 on identical data and noise.
//
// The number of checked paths for N = 50 is not fixed by the study; Q = 12
// is used here, the value given for N = 10. Each lane must decode its
// noise-free codewords exactly, keep the error rate below 5 %, and the
// larger lists must not make more bit errors than the smaller ones.
module tb_workload_n50;
  import lnpml_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NL = 3;
  int  be[NL], bt[NL], nle[NL], nlo[NL], nno[NL];
  bit  dn[NL];
  string names[NL] = '{"N=1", "N=3 q=6", "N=50 q=12"};

  tb_wl_lane #(.N(1),  .Q(1),  .P(198), .NCW(60), .SIGMA(0.6), .SEED(21)) l0 (clk, rst_n, be[0], bt[0], nle[0], nlo[0], nno[0], dn[0]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(198), .NCW(60), .SIGMA(0.6), .SEED(21)) l1 (clk, rst_n, be[1], bt[1], nle[1], nlo[1], nno[1], dn[1]);
  tb_wl_lane #(.N(50), .Q(12), .P(198), .NCW(60), .SIGMA(0.6), .SEED(21)) l2 (clk, rst_n, be[2], bt[2], nle[2], nlo[2], nno[2], dn[2]);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (dn.and() == 1'b1);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NL; i++) begin
      $display("%-10s BER %0d/%0d, lower-ranked decisions %0d, none passed %0d",
               names[i], be[i], bt[i], nlo[i], nno[i]);
      checks++;
      if (nle[i] != 0) begin failures++; $display("FAIL: %s noise-free errors %0d", names[i], nle[i]); end
      checks++;
      if (bt[i] == 0 || be[i] * 20 > bt[i]) begin failures++; $display("FAIL: %s BER above 5%%", names[i]); end
    end
    checks += 2;
    if (be[1] > be[0]) begin failures++; $display("FAIL: N=3 worse than N=1"); end
    if (be[2] > be[1]) begin failures++; $display("FAIL: N=50 worse than N=3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
