// tb_workloads: the detector configurations the List-NPML study evaluates,
// run side by side on the same kind of channel.
//
// Lanes (all with 3-bit parity unless noted, moderate noise):
//   base : N = 1, Q = 1, P = 198  - single-survivor NPML detection, the
//          reference the list detector is compared with;
//   n3   : N = 3, Q = 6, P = 198  - the main configuration (same data and
//          noise as base);
//   crc  : N = 3, Q = 6, P = 198 with the x^4 + 1 CRC;
//   p66  : N = 3, Q = 6, P = 66;
//   p594 : N = 3, Q = 6, P = 594;
//   n10  : N = 10, Q = 12, P = 1188;
//   p3960: N = 3, Q = 6, P = 3960 (fewer codewords).
// Each lane must decode its noise-free codewords exactly, and the list
// detector must make fewer bit errors than the single-survivor detector on
// identical data and noise. The channel is a PR4 target with coloured
// noise, not the Lorentzian or tape channels of the study, so the numbers
// printed are this channel's.
module tb_workloads;
  import lnpml_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int NL = 7;
  int  be[NL], bt[NL], nle[NL], nlo[NL], nno[NL];
  bit  dn[NL];
  string names[NL] = '{"base N=1 P=198", "N=3 P=198", "N=3 P=198 CRC", "N=3 P=66", "N=3 P=594", "N=10 q=12 P=1188", "N=3 P=3960"};

  tb_wl_lane #(.N(1),  .Q(1),  .P(198),  .NCW(80), .SEED(11)) l0 (clk, rst_n, be[0], bt[0], nle[0], nlo[0], nno[0], dn[0]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(198),  .NCW(80), .SEED(11)) l1 (clk, rst_n, be[1], bt[1], nle[1], nlo[1], nno[1], dn[1]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(198),  .KIND(EDC_CRC), .M(4), .NCW(80), .SEED(12)) l2 (clk, rst_n, be[2], bt[2], nle[2], nlo[2], nno[2], dn[2]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(66),   .NCW(220), .SEED(13)) l3 (clk, rst_n, be[3], bt[3], nle[3], nlo[3], nno[3], dn[3]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(594),  .NCW(30),  .SEED(14)) l4 (clk, rst_n, be[4], bt[4], nle[4], nlo[4], nno[4], dn[4]);
  tb_wl_lane #(.N(10), .Q(12), .P(1188), .NCW(12),  .SEED(15)) l5 (clk, rst_n, be[5], bt[5], nle[5], nlo[5], nno[5], dn[5]);
  tb_wl_lane #(.N(3),  .Q(6),  .P(3960), .NCW(5),   .SEED(16)) l6 (clk, rst_n, be[6], bt[6], nle[6], nlo[6], nno[6], dn[6]);

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (dn.and() == 1'b1);
    repeat (2) @(posedge clk);
    for (int i = 0; i < NL; i++) begin
      $display("%-18s BER %0d/%0d, lower-ranked decisions %0d, none passed %0d",
               names[i], be[i], bt[i], nlo[i], nno[i]);
      checks++;
      if (nle[i] != 0) begin failures++; $display("FAIL: %s noise-free errors %0d", names[i], nle[i]); end
      checks++;
      if (bt[i] == 0 || be[i] * 20 > bt[i]) begin failures++; $display("FAIL: %s BER above 5%%", names[i]); end
    end
    checks++;
    if (be[1] >= be[0]) begin
      failures++; $display("FAIL: list detector (%0d errors) not better than N=1 (%0d)", be[1], be[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
