// whitening_filter: noise-whitening prediction filter in front of the detector.
//
// Computes z_n = y_n - sum_{i=1..L} p_i * y_{n-i} from the PR4-equalized
// samples y_n (the document's equation, with L = 3 predictor taps in its
// main configuration). The taps p_i are inputs: the document obtains them
// by linear prediction of the noise, outside this datapath.
//
// Formats: y and z are signed SAMPLE_W-bit with SAMPLE_FRAC fractional bits;
// p_i are signed COEF_W-bit with COEF_FRAC fractional bits. The sum is formed
// at full precision, rounded to the sample format and saturated (this
// design's choice). Timing: a valid/ready stream with no added latency. z is
// a combinational function of the current y and the delay line, so the
// sample and its whitened value travel in the same cycle (out_valid =
// in_valid, in_ready = out_ready); the delay line advances only when the
// consumer accepts the sample, so a stalled detector stalls the filter too.
// The delay line starts at zero after reset.
module whitening_filter
  import lnpml_pkg::*;
#(
  parameter int unsigned L = 3
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic signed [SAMPLE_W-1:0]        y,
  input  logic signed [L-1:0][COEF_W-1:0]   p,
  output logic                              out_valid,
  input  logic                              out_ready,
  output logic signed [SAMPLE_W-1:0]        z
);

  localparam int ACC_W = SAMPLE_W + COEF_W + $clog2(L + 1) + 2;

  logic signed [L-1:0][SAMPLE_W-1:0] dly;   // dly[i-1] = y_{n-i}
  logic signed [ACC_W-1:0]           acc;
  logic signed [ACC_W-1:0]           rnd;

  always_comb begin
    acc = ACC_W'(y) <<< COEF_FRAC;
    for (int i = 0; i < L; i++)
      acc = acc - ACC_W'($signed(dly[i])) * ACC_W'($signed(p[i]));
    rnd = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (rnd > ACC_W'(2 ** (SAMPLE_W - 1) - 1))
      z = {1'b0, {(SAMPLE_W - 1){1'b1}}};
    else if (rnd < -ACC_W'(2 ** (SAMPLE_W - 1)))
      z = {1'b1, {(SAMPLE_W - 1){1'b0}}};
    else
      z = rnd[SAMPLE_W-1:0];
  end

  assign out_valid = in_valid;
  assign in_ready  = out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      dly <= '0;
    else if (in_valid && out_ready)  dly <= {dly[L-2:0], y};
  end

endmodule
