// update_unit: periodic decision and metric update of the List-NPML detector.
//
// At the end of every EDC codeword the detector holds S*N candidate paths
// with their accumulated metrics. Following the document's update step:
//   1. the Q paths with the smallest metrics form the ordered set
//      C_q = {C_m1, ..., C_mq} (Q <= S*N limits which paths the EDC may
//      vouch for);
//   2. the EDC is recomputed on each of them; a path passes (flag 1) when no
//      error is detected and its metric is finite;
//   3. the decision is the passing path with the smallest metric, or C_m1
//      when none passes;
//   4. if any path passed, the metrics of all paths other than the passing
//      ones are discarded (set to infinity); if none passed the metrics are
//      left as they are.
// Additionally (this design's choice) the surviving finite metrics are
// reduced by the metric of the decided path, or of C_m1 when none passed, so
// that the fixed-width accumulators never grow without bound; this does not
// change any comparison. Purely combinational; the detector applies it in
// one clock cycle between codewords.
//
// Paths are numbered p = j*N + l (state j, rank l). dec_data is the P data
// bits of the decided path, bit 0 first on the channel.
module update_unit
  import lnpml_pkg::*;
#(
  parameter int unsigned      K    = 2,
  parameter int unsigned      N    = 3,
  parameter int unsigned      Q    = 6,
  parameter int unsigned      P    = 198,
  parameter edc_e             KIND = EDC_PARITY,
  parameter int unsigned      M    = 3,
  parameter logic [MAX_M-1:0] POLY = MAX_M'(1),
  localparam int unsigned S  = 1 << K,
  localparam int unsigned NP = S * N,
  localparam int unsigned PW = $clog2(NP),
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = P + M
) (
  input  logic [NP-1:0][PM_W-1:0] pm,
  input  logic [NP-1:0][CW-1:0]   cw,
  output logic [NP-1:0][PM_W-1:0] pm_new,
  output logic [P-1:0]            dec_data,
  output logic [PW-1:0]           dec_path,    // index of the decided path
  output logic [QW-1:0]           dec_rank,    // its position in C_q (0 = C_m1)
  output logic                    any_pass,    // some path of C_q passed the EDC
  output logic [QW:0]             n_pass       // how many of C_q passed
);

  logic [Q-1:0][PW-1:0]   cidx;
  logic [Q-1:0][PM_W-1:0] cval;
  logic [Q-1:0]           edc_ok;
  logic [Q-1:0]           pass;
  logic [NP-1:0]          keep;
  logic [PM_W-1:0]        base;

  kbest_select #(.NIN(NP), .OUT(Q)) u_sort (
    .vin(pm),
    .idx(cidx),
    .val(cval)
  );

  for (genvar q = 0; q < Q; q++) begin : g_chk
    edc_check #(.P(P), .KIND(KIND), .M(M), .POLY(POLY)) u_chk (
      .cw      (cw[cidx[q]]),
      .ok      (edc_ok[q]),
      .syndrome()
    );
    assign pass[q] = edc_ok[q] && (cval[q] != PM_INF);
  end

  always_comb begin
    any_pass = |pass;
    dec_rank = '0;
    n_pass   = '0;
    for (int q = Q - 1; q >= 0; q--)
      if (pass[q]) dec_rank = QW'(q);
    for (int q = 0; q < Q; q++)
      n_pass = n_pass + (QW + 1)'(pass[q]);
    dec_path = cidx[dec_rank];
    dec_data = cw[dec_path][P-1:0];
    base     = cval[dec_rank];

    keep = '0;
    for (int q = 0; q < Q; q++)
      if (pass[q]) keep[cidx[q]] = 1'b1;
    if (!any_pass) keep = '1;

    for (int p = 0; p < NP; p++) begin
      if (!keep[p] || pm[p] == PM_INF) pm_new[p] = PM_INF;
      else                             pm_new[p] = pm[p] - base;
    end
  end

endmodule
