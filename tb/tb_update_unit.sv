// tb_update_unit: self-checking test of the periodic update and decision.
//
// Random path metrics (some infinite, some tied) and candidate codewords
// (about a third of them valid interleaved-parity codewords, built here from
// the code definition) are applied. The reference sorts the metrics
// stably, takes the Q smallest, checks each with its own parity
// computation, decides the smallest passing one or the smallest overall,
// and works out the new metrics: passing paths keep their metric minus the
// decided one, all others become infinite; with no passing path all finite
// metrics are reduced by the smallest. Every output is compared, and the
// test counts how often each case (best path passes, a lower-ranked path
// passes, none passes) occurred.
module tb_update_unit;
  import lnpml_pkg::*;

  localparam int K = 2, N = 3, Q = 6, P = 198, M = 3;
  localparam int NP = 12, CW = P + M, PW = 4, QW = 3;

  int checks = 0, failures = 0;

  logic [NP-1:0][PM_W-1:0] pm, pm_new;
  logic [NP-1:0][CW-1:0]   cw;
  logic [P-1:0]            dec_data;
  logic [PW-1:0]           dec_path;
  logic [QW-1:0]           dec_rank;
  logic                    any_pass;
  logic [QW:0]             n_pass;

  update_unit #(.K(K), .N(N), .Q(Q), .P(P)) dut (
    .pm(pm), .cw(cw), .pm_new(pm_new), .dec_data(dec_data), .dec_path(dec_path),
    .dec_rank(dec_rank), .any_pass(any_pass), .n_pass(n_pass));

  function automatic bit valid_cw(input logic [CW-1:0] c);
    bit s[M];
    for (int i = 0; i < M; i++) s[i] = 0;
    for (int i = 0; i < CW; i++) s[i % M] ^= c[i];
    return (s[0] == 0) && (s[1] == 0) && (s[2] == 0);
  endfunction

  int n_best = 0, n_lower = 0, n_none = 0;

  initial begin
    for (int trial = 0; trial < 3000; trial++) begin
      longint v[NP];
      int     id[NP];
      bit     ok[Q];
      int     dr, np_exp;
      bit     any;
      for (int p = 0; p < NP; p++) begin
        case ($urandom_range(0, 5))
          0:       pm[p] = PM_INF;
          1:       pm[p] = PM_W'(500);
          default: pm[p] = PM_W'($urandom_range(0, 3000));
        endcase
        for (int i = 0; i < CW; i++) cw[p][i] = 1'($urandom_range(0, 1));
        if ($urandom_range(0, 2) == 0) begin
          for (int c = 0; c < M; c++) cw[p][P + c] = 1'b0;
          for (int i = 0; i < P; i++) cw[p][P + (i % M)] ^= cw[p][i];
        end
      end
      for (int p = 0; p < NP; p++) begin v[p] = longint'(pm[p]); id[p] = p; end
      for (int i = 1; i < NP; i++)
        for (int j = i; j > 0 && v[j] < v[j-1]; j--) begin
          longint tv; int ti;
          tv = v[j]; v[j] = v[j-1]; v[j-1] = tv;
          ti = id[j]; id[j] = id[j-1]; id[j-1] = ti;
        end
      dr = -1; np_exp = 0;
      for (int q = 0; q < Q; q++) begin
        ok[q] = valid_cw(cw[id[q]]) && (v[q] != longint'(PM_INF));
        if (ok[q]) begin np_exp++; if (dr < 0) dr = q; end
      end
      any = (dr >= 0);
      if (!any) dr = 0;
      if (!any) n_none++; else if (dr == 0) n_best++; else n_lower++;
      #1;
      checks++;
      if (any_pass != any || int'(dec_rank) != dr || int'(dec_path) != id[dr] ||
          int'(n_pass) != np_exp || dec_data != cw[id[dr]][P-1:0]) begin
        failures++;
        $display("FAIL: trial %0d decision got pass=%0d rank=%0d path=%0d n=%0d exp %0d %0d %0d %0d",
                 trial, any_pass, dec_rank, dec_path, n_pass, any, dr, id[dr], np_exp);
      end
      for (int p = 0; p < NP; p++) begin
        longint e;
        bit keep;
        keep = !any;
        for (int q = 0; q < Q; q++) if (ok[q] && id[q] == p) keep = 1;
        if (!keep || pm[p] == PM_INF) e = longint'(PM_INF);
        else e = longint'(pm[p]) - v[dr];
        checks++;
        if (longint'(pm_new[p]) != e) begin
          failures++;
          $display("FAIL: trial %0d pm_new[%0d]=%0d expected %0d", trial, p, pm_new[p], e);
        end
      end
    end
    $display("decisions: best passes %0d, lower-ranked passes %0d, none passes %0d", n_best, n_lower, n_none);
    checks += 3;
    if (n_best == 0 || n_lower == 0 || n_none == 0) begin failures++; $display("FAIL: a case never occurred"); end
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
