// edc_encoder: error-detection-code insertion on the write side.
//
// The modulation-coded bit stream is cut into chunks of P bits and M check
// bits are appended after every chunk, giving (P+M)-bit EDC codewords. With
// KIND = EDC_PARITY the check bits are M interleaved parities (bit i of the
// chunk belongs to class i mod M; default M = 3, so a single error event of
// up to three consecutive bits always leaves at least one class with an odd
// number of errors). With KIND = EDC_CRC they are the remainder of a cyclic
// code, by default generator x^4 + 1. Both codes and P = 198 follow the
// document; the interleaved assignment of bits to parity classes and placing
// the check bits at the end of the chunk (rather than at unconstrained
// positions of a modulation code that is not specified) are this design's
// choices.
//
// Interface: a valid/ready bit stream in and out, one bit per cycle. During
// the P data bits the input passes straight through (out_valid = in_valid,
// in_ready = out_ready) while the EDC register absorbs each accepted bit;
// then for M cycles the encoder emits the check bits with in_ready low (the
// input is stalled). out_first marks the first bit of a codeword.
module edc_encoder
  import lnpml_pkg::*;
#(
  parameter int unsigned            P    = 198,
  parameter edc_e                   KIND = EDC_PARITY,
  parameter int unsigned            M    = 3,
  parameter logic [MAX_M-1:0]       POLY = MAX_M'(1)   // lower coefficients of the CRC generator
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  logic in_bit,
  output logic out_valid,
  input  logic out_ready,
  output logic out_bit,
  output logic out_first,
  output logic out_check                 // current output bit is a check bit
);

  localparam int unsigned CW = P + M;
  localparam int unsigned PW = $clog2(CW);
  localparam int unsigned CLW = (M > 1) ? $clog2(M) : 1;

  logic [PW-1:0]    pos;                 // position inside the codeword
  logic [CLW-1:0]   cls;                 // pos mod M
  logic [MAX_M-1:0] edc_q;
  logic             in_data;
  logic             fire;
  logic [CLW-1:0]   chk_cls;

  assign in_data   = (pos < PW'(P));
  assign out_valid = in_data ? in_valid : 1'b1;
  assign in_ready  = in_data & out_ready;
  assign fire      = out_valid & out_ready;
  assign out_first = (pos == '0);
  assign out_check = !in_data;

  // For the parity code the check bit at position pos belongs to class pos
  // mod M; for the CRC the remainder is sent highest degree first.
  assign chk_cls = cls;
  always_comb begin
    if (in_data)               out_bit = in_bit;
    else if (KIND == EDC_PARITY) out_bit = edc_q[int'(chk_cls)];
    else                       out_bit = edc_q[M-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= '0;
      cls   <= '0;
      edc_q <= '0;
    end else if (fire) begin
      if (pos == PW'(CW - 1)) begin
        pos   <= '0;
        cls   <= '0;
        edc_q <= '0;
      end else begin
        pos <= pos + 1'b1;
        cls <= (cls == CLW'(M - 1)) ? '0 : cls + 1'b1;
        if (in_data)
          edc_q <= edc_step(KIND, M, POLY, edc_q, in_bit, int'(cls));
        else if (KIND == EDC_CRC)
          edc_q <= edc_step(KIND, M, POLY, edc_q, out_bit, int'(cls));
      end
    end
  end

  // A codeword in flight holds its bit until the sink takes it.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready && !in_data) |=> out_valid;
  endproperty
  a_hold: assert property (p_hold);

endmodule
