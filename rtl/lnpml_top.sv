// lnpml_top: read-channel detection with a List-NPML detector and periodic
// error-detection-code decisions, plus the matching write-side EDC insertion.
//
// Write side: the modulation-coded bit stream enters wr_*; edc_encoder cuts
// it into P-bit chunks and appends M check bits to each, stalling the input
// while it does. The stream it sends out (wr_out_*) is what is mapped to
// +-1 symbols and recorded.
//
// Read side: PR4-equalized samples y_n enter rd_*; whitening_filter forms
// z_n = y_n - sum p_i y_{n-i}; npml_gcoef turns the predictor taps p_i into
// the combined taps g_i of (1 - D^2)[1 - P(D)]; list_npml_detector runs the
// list trellis over each codeword of P+M samples and emits the P decided
// data bits per codeword on dec_*. rd_ready drops for one cycle after every
// codeword while the detector's update step runs.
//
// The recording channel itself (symbol mapping, heads, medium, low-pass
// filter, converter, PR4 equalizer) and the Reed-Solomon and run-length codes
// around this datapath are outside this design; the two sides therefore have
// separate ports. Defaults are the document's main configuration: a 4-state
// trellis (K = 2), three predictor taps (L = 3), N = 3 paths per state,
// Q = 6 paths checked, P = 198 bits per chunk and the three-bit interleaved
// parity code; KIND = EDC_CRC with M = 4, POLY = 1 selects the x^4 + 1 CRC.
module lnpml_top
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
  localparam int unsigned QW = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // write side
  input  logic                           wr_in_valid,
  output logic                           wr_in_ready,
  input  logic                           wr_in_bit,
  output logic                           wr_out_valid,
  input  logic                           wr_out_ready,
  output logic                           wr_out_bit,
  output logic                           wr_out_first,
  output logic                           wr_out_check,
  // read side
  input  logic                           rd_valid,
  output logic                           rd_ready,
  input  logic signed [SAMPLE_W-1:0]     rd_y,
  input  logic signed [L-1:0][COEF_W-1:0] rd_p,
  output logic                           dec_valid,
  output logic [P-1:0]                   dec_data,
  output logic                           dec_pass,
  output logic [QW-1:0]                  dec_rank,
  output logic [QW:0]                    dec_npass
);

  logic                          z_valid;
  logic                          z_ready;
  logic signed [SAMPLE_W-1:0]    z;
  logic signed [L+1:0][G_W-1:0]  g;

  edc_encoder #(.P(P), .KIND(KIND), .M(M), .POLY(POLY)) u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (wr_in_valid),
    .in_ready (wr_in_ready),
    .in_bit   (wr_in_bit),
    .out_valid(wr_out_valid),
    .out_ready(wr_out_ready),
    .out_bit  (wr_out_bit),
    .out_first(wr_out_first),
    .out_check(wr_out_check)
  );

  whitening_filter #(.L(L)) u_wf (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rd_valid),
    .in_ready (rd_ready),
    .y        (rd_y),
    .p        (rd_p),
    .out_valid(z_valid),
    .out_ready(z_ready),
    .z        (z)
  );

  npml_gcoef #(.L(L)) u_gc (
    .p(rd_p),
    .g(g)
  );

  list_npml_detector #(.K(K), .L(L), .N(N), .Q(Q), .P(P), .KIND(KIND), .M(M), .POLY(POLY)) u_det (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (z_valid),
    .in_ready (z_ready),
    .z        (z),
    .g        (g),
    .out_valid(dec_valid),
    .out_data (dec_data),
    .out_pass (dec_pass),
    .out_rank (dec_rank),
    .out_npass(dec_npass)
  );

endmodule
