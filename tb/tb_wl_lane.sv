// tb_wl_lane: one configuration of the workload sweep (tb_workloads).
//
// Runs a complete lnpml_top with the given list size N, checked-path count
// Q, chunk length P and EDC, on NCW codewords of data produced by its own
// linear congruential generator (so two lanes with the same SEED see the
// same data and the same noise). Channel: +-1 symbols, PR4 response
// a_n - a_{n-2}, first-order autoregressive noise w_n = 0.5 w_{n-1} + e_n
// with Gaussian e_n of standard deviation SIGMA (sum of twelve uniforms),
// samples quantized to 1/32, predictor tap p_1 = 0.5. The first two
// codewords are noise-free. Reports bit errors, decisions taken on a
// lower-ranked path and codewords where no path passed.
module tb_wl_lane
  import lnpml_pkg::*;
#(
  parameter int   N     = 3,
  parameter int   Q     = 6,
  parameter int   P     = 198,
  parameter edc_e KIND  = EDC_PARITY,
  parameter int   M     = 3,
  parameter int   NCW   = 40,
  parameter real  SIGMA = 0.55,
  parameter int unsigned SEED = 1
) (
  input  logic clk,
  input  logic rst_n,
  output int   bit_errors,
  output int   bits,
  output int   noiseless_errors,
  output int   n_lower,
  output int   n_none,
  output bit   done
);

  localparam int CW = P + M;
  localparam int QW = (Q > 1) ? $clog2(Q) : 1;

  logic wr_in_ready, wr_out_valid, wr_out_bit, wr_out_first, wr_out_check;
  logic rd_valid, rd_ready, dec_valid, dec_pass;
  logic signed [SAMPLE_W-1:0] rd_y;
  logic signed [2:0][COEF_W-1:0] rd_p;
  logic [P-1:0] dec_data;
  logic [QW-1:0] dec_rank;
  logic [QW:0] dec_npass;
  logic wr_in_bit;
  int   n_in = 0;

  lnpml_top #(.N(N), .Q(Q), .P(P), .KIND(KIND), .M(M), .POLY(16'h0001)) dut (
    .clk(clk), .rst_n(rst_n),
    .wr_in_valid(n_in < NCW * P), .wr_in_ready(wr_in_ready), .wr_in_bit(wr_in_bit),
    .wr_out_valid(wr_out_valid), .wr_out_ready(1'b1), .wr_out_bit(wr_out_bit),
    .wr_out_first(wr_out_first), .wr_out_check(wr_out_check),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_y(rd_y), .rd_p(rd_p),
    .dec_valid(dec_valid), .dec_data(dec_data), .dec_pass(dec_pass),
    .dec_rank(dec_rank), .dec_npass(dec_npass));

  assign rd_p[0] = COEF_W'(128);
  assign rd_p[1] = '0;
  assign rd_p[2] = '0;

  int unsigned lcg_d = SEED, lcg_n = SEED * 7919 + 13;
  function automatic int unsigned lcg(input int unsigned s);
    return s * 1664525 + 1013904223;
  endfunction

  bit  user[$];
  int  ys[$];
  real w = 0.0;
  int  a1 = -1, a2 = -1, n_chan = 0, ncw = 0;

  initial begin
    bit_errors = 0; bits = 0; noiseless_errors = 0; n_lower = 0; n_none = 0; done = 0;
    lcg_d = lcg(lcg_d);
    wr_in_bit = 1'(lcg_d >> 31);
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (n_in < NCW * P && wr_in_ready) begin
        user.push_back(wr_in_bit);
        n_in <= n_in + 1;
        lcg_d = lcg(lcg_d);
        wr_in_bit <= 1'(lcg_d >> 31);
      end
      if (wr_out_valid) begin
        real e, y;
        int  a, yi;
        e = 0.0;
        for (int i = 0; i < 12; i++) begin
          lcg_n = lcg(lcg_n);
          e += real'(lcg_n >> 8) / 16777216.0;
        end
        e -= 6.0;
        a = wr_out_bit ? 1 : -1;
        w = 0.5 * w + ((n_chan < 2 * CW) ? 0.0 : SIGMA) * e;
        y = real'(a - a2) + w;
        yi = $rtoi($floor(y * 32.0 + 0.5));
        if (yi > 511) yi = 511;
        if (yi < -512) yi = -512;
        ys.push_back(yi);
        a2 = a1; a1 = a;
        n_chan++;
      end
      if (rd_valid && rd_ready) void'(ys.pop_front());
      if (!rd_valid || rd_ready) begin
        if (ys.size() > 0) begin
          rd_valid <= 1'b1;
          rd_y     <= SAMPLE_W'(ys[0]);
        end else rd_valid <= 1'b0;
      end
      if (dec_valid) begin
        int e;
        e = 0;
        for (int i = 0; i < P; i++) if (dec_data[i] != user[ncw * P + i]) e++;
        if (ncw < 2) noiseless_errors += e;
        else begin bit_errors += e; bits += P; end
        if (!dec_pass) n_none++;
        else if (dec_rank != 0) n_lower++;
        ncw++;
        if (ncw == NCW) done <= 1'b1;
      end
    end else begin
      rd_valid <= 1'b0;
      rd_y <= '0;
    end
  end

endmodule
