// list_npml_detector: List noise-predictive maximum-likelihood detector with
// periodic EDC-based decisions.
//
// The detector runs a 2^K-state trellis over the whitened samples z_n and
// keeps, for every state, a rank-ordered list of the N best paths instead of
// a single survivor. Branch metrics use the decision history of each listed
// path for the noise-prediction taps beyond the state (list_bmu); each
// state's list add-compare-select keeps the N best of its 2N extensions
// (list_acs); the paths themselves live in a register-exchange survivor
// memory (path_memory). After every EDC codeword of CW = P+M samples the
// update step (update_unit) checks the Q best paths with the error detection
// code, outputs the P data bits of the best path the code accepts (or of the
// overall best path when it accepts none) and discards the metrics of the
// paths it rejected. The next codeword is decoded from the surviving paths.
//
// Start-up follows the document: the trellis starts in state 0 with the
// history all "-1" (bit 0); the first path (state 0, rank 0) has metric 0 and
// every other path infinite metric, so a list fills as distinct paths reach
// it. Lists of a state may hold infinite entries until then.
//
// Interface and timing (this design's choice): one sample per cycle on a
// valid/ready input. After the last sample of a codeword in_ready drops for
// exactly one cycle while the update step runs; in the next cycle out_valid
// is high for one cycle with the decided data. The throughput is thus CW
// samples per CW+1 cycles. out_pass reports whether any checked path passed
// the EDC, out_rank which element of C_q was decided (0 = best metric) and
// out_npass how many passed.
module list_npml_detector
  import lnpml_pkg::*;
#(
  parameter int unsigned      K    = 2,
  parameter int unsigned      L    = 3,
  parameter int unsigned      N    = 3,
  parameter int unsigned      Q    = 6,
  parameter int unsigned      P    = 198,
  parameter edc_e             KIND = EDC_PARITY,
  parameter int unsigned      M    = 3,
  parameter logic [MAX_M-1:0] POLY = MAX_M'(1),
  localparam int unsigned S  = 1 << K,
  localparam int unsigned H  = L + 2,
  localparam int unsigned NP = S * N,
  localparam int unsigned TW = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1,
  localparam int unsigned CW = P + M
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic signed [SAMPLE_W-1:0]  z,
  input  logic signed [H-1:0][G_W-1:0] g,
  output logic                        out_valid,
  output logic [P-1:0]                out_data,
  output logic                        out_pass,
  output logic [QW-1:0]               out_rank,
  output logic [QW:0]                 out_npass
);

  typedef enum logic [0:0] {ST_RUN, ST_UPDATE} phase_e;

  localparam int unsigned PSW = $clog2(CW);

  phase_e                        phase;
  logic [PSW-1:0]                pos;
  logic [S-1:0][N-1:0][PM_W-1:0] pm;
  logic [S-1:0][N-1:0][PM_W-1:0] pm_acs;
  logic [NP-1:0][PM_W-1:0]       pm_upd;
  logic [S-1:0][N-1:0][1:0][BM_W-1:0] bm;
  logic [S-1:0][N-1:0][H-1:0]    hist;
  logic [S-1:0][N-1:0][CW-1:0]   cw;
  logic [S-1:0][N-1:0]           sel_x;
  logic [S-1:0][N-1:0][TW-1:0]   sel_t;
  logic                          step;

  logic [P-1:0]                  upd_data;
  logic [$clog2(NP)-1:0]         upd_path;
  logic [QW-1:0]                 upd_rank;
  logic                          upd_pass;
  logic [QW:0]                   upd_npass;

  assign in_ready = (phase == ST_RUN);
  assign step     = in_valid && in_ready;

  list_bmu #(.K(K), .L(L), .N(N)) u_bmu (
    .z   (z),
    .g   (g),
    .hist(hist),
    .bm  (bm)
  );

  for (genvar j = 0; j < S; j++) begin : g_acs
    localparam int unsigned K0 = (j << 1) % S;      // predecessor with x = 0
    localparam int unsigned B  = j >> (K - 1);      // new bit into state j
    logic [1:0][N-1:0][PM_W-1:0] pm_in;
    logic [1:0][N-1:0][BM_W-1:0] bm_in;
    always_comb begin
      for (int x = 0; x < 2; x++) begin
        for (int t = 0; t < N; t++) begin
          pm_in[x][t] = pm[K0 + x][t];
          bm_in[x][t] = bm[K0 + x][t][B];
        end
      end
    end
    list_acs #(.N(N)) u_acs (
      .pm_in (pm_in),
      .bm_in (bm_in),
      .pm_out(pm_acs[j]),
      .sel_x (sel_x[j]),
      .sel_t (sel_t[j])
    );
  end

  path_memory #(.K(K), .N(N), .H(H), .CW(CW)) u_pmem (
    .clk  (clk),
    .rst_n(rst_n),
    .step (step),
    .sel_x(sel_x),
    .sel_t(sel_t),
    .hist (hist),
    .cw   (cw)
  );

  update_unit #(.K(K), .N(N), .Q(Q), .P(P), .KIND(KIND), .M(M), .POLY(POLY)) u_upd (
    .pm      (pm),
    .cw      (cw),
    .pm_new  (pm_upd),
    .dec_data(upd_data),
    .dec_path(upd_path),
    .dec_rank(upd_rank),
    .any_pass(upd_pass),
    .n_pass  (upd_npass)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= ST_RUN;
      pos       <= '0;
      pm        <= {NP{PM_INF}};
      pm[0][0]  <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_pass  <= 1'b0;
      out_rank  <= '0;
      out_npass <= '0;
    end else begin
      out_valid <= 1'b0;
      if (phase == ST_RUN) begin
        if (step) begin
          pm <= pm_acs;
          if (pos == PSW'(CW - 1)) begin
            pos   <= '0;
            phase <= ST_UPDATE;
          end else begin
            pos <= pos + 1'b1;
          end
        end
      end else begin
        pm        <= pm_upd;
        phase     <= ST_RUN;
        out_valid <= 1'b1;
        out_data  <= upd_data;
        out_pass  <= upd_pass;
        out_rank  <= upd_rank;
        out_npass <= upd_npass;
      end
    end
  end

  // The update step takes exactly one cycle between codewords.
  a_one_update: assert property (@(posedge clk) disable iff (!rst_n)
                                 phase == ST_UPDATE |=> phase == ST_RUN);

endmodule
