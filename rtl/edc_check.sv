// edc_check: error-detection-code check of one candidate codeword.
//
// The detector's update step asks, for each of its q best candidate paths,
// whether the EDC finds an error in the path's decisions over the last
// codeword. This block recomputes the code over the whole (P+M)-bit codeword
// (P data bits then M check bits, bit 0 first on the channel) with the same
// step function as the encoder: the interleaved parities must all be zero,
// or the CRC register must end at zero. ok = 1 means "no error detected"
// (the document's flag 1). Purely combinational.
module edc_check
  import lnpml_pkg::*;
#(
  parameter int unsigned      P    = 198,
  parameter edc_e             KIND = EDC_PARITY,
  parameter int unsigned      M    = 3,
  parameter logic [MAX_M-1:0] POLY = MAX_M'(1)
) (
  input  logic [P+M-1:0] cw,
  output logic           ok,
  output logic [M-1:0]   syndrome
);

  always_comb begin
    logic [MAX_M-1:0] r;
    r = '0;
    for (int unsigned i = 0; i < P + M; i++)
      r = edc_step(KIND, M, POLY, r, cw[i], i % M);
    syndrome = r[M-1:0];
    ok       = (r[M-1:0] == '0);
  end

endmodule
