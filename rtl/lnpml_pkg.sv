// lnpml_pkg: shared types, fixed-point formats and error-detection-code
// functions of the List-NPML detector.
//
// Fixed-point formats (this design's choice; the algorithm is described in
// real numbers):
//   * equalized and whitened samples y_n, z_n: signed SAMPLE_W bits with
//     SAMPLE_FRAC fractional bits (default 10 bits, 1/32 LSB, range +-16);
//   * predictor coefficients p_i and target coefficients g_i: signed, with
//     COEF_FRAC fractional bits (p_i: COEF_W bits, g_i: COEF_W+1 bits);
//   * branch metrics: unsigned BM_W bits, squared error in units of
//     2^-BM_FRAC, saturating;
//   * path metrics: unsigned PM_W bits, saturating; the all-ones value is the
//     "infinite" metric of a path that does not exist.
// A detected bit b maps to the channel symbol a = +1 for b = 1 and a = -1 for
// b = 0, so an all-zero history is the "-1" history the detector starts from.
//
// Error detection codes: a codeword is the P-bit chunk followed by M check
// bits; bit 0 of a vector is the first bit on the channel.
//   * EDC_PARITY: M interleaved parities. Bit position i of the codeword
//     belongs to class i mod M, and the check bits make every class sum to 0
//     modulo 2, so any error event of at most M consecutive bits is seen.
//   * EDC_CRC: cyclic code with generator x^M + CRC_POLY (CRC_POLY holds the
//     lower M coefficients; x^4 + 1 is M = 4, CRC_POLY = 4'b0001). The first
//     bit on the channel is the highest-degree coefficient.
package lnpml_pkg;

  typedef enum logic [0:0] {
    EDC_PARITY = 1'b0,
    EDC_CRC    = 1'b1
  } edc_e;

  localparam int SAMPLE_W    = 10;
  localparam int SAMPLE_FRAC = 5;
  localparam int COEF_W      = 10;
  localparam int COEF_FRAC   = 8;
  localparam int G_W         = COEF_W + 1;
  localparam int BM_W        = 16;
  localparam int BM_FRAC     = 6;
  localparam int PM_W        = 24;
  localparam int MAX_M       = 16;          // widest EDC the functions handle

  localparam logic [PM_W-1:0] PM_INF = '1;

  // Saturating path-metric addition; an infinite operand stays infinite.
  function automatic logic [PM_W-1:0] pm_add(input logic [PM_W-1:0] a,
                                             input logic [BM_W-1:0] b);
    logic [PM_W:0] s;
    s = {1'b0, a} + {{(PM_W + 1 - BM_W){1'b0}}, b};
    if (a == PM_INF || s[PM_W] || s[PM_W-1:0] == PM_INF) return PM_INF;
    return s[PM_W-1:0];
  endfunction

  // One step of the EDC register: absorb one bit at codeword position pos
  // (cls = pos mod M for the parity code). Used by the encoder on data bits
  // and, over the whole codeword, by the checker.
  function automatic logic [MAX_M-1:0] edc_step(input edc_e kind,
                                                 input int unsigned m,
                                                 input logic [MAX_M-1:0] poly,
                                                 input logic [MAX_M-1:0] reg_in,
                                                 input logic bit_in,
                                                 input int unsigned cls);
    logic [MAX_M-1:0] r;
    logic fb;
    r = reg_in;
    if (kind == EDC_PARITY) begin
      r[cls] = r[cls] ^ bit_in;
    end else begin
      fb = bit_in ^ r[m-1];
      r = r << 1;
      if (fb) r = r ^ poly;
      r = r & ((MAX_M'(1) << m) - MAX_M'(1));
    end
    return r;
  endfunction

endpackage
