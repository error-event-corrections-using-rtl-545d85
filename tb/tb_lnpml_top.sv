// tb_lnpml_top: end-to-end test of the write-side EDC insertion and the
// read-side List-NPML detection, with every parameter at its default.
//
// Random user data enters the write side with random gaps; the encoded
// stream (198 data bits + 3 parity bits per codeword) goes through a
// channel model written here: symbols a = +-1, PR4 response a_n - a_{n-2},
// first-order autoregressive noise w_n = 0.5 w_{n-1} + e_n, quantization to
// 1/32. The read side gets the samples with random gaps and the predictor
// tap p_1 = 0.5 (p_2 = p_3 = 0), and its decisions are compared with the
// user data.
//
// Noise schedule per codeword: noise-free at first (must decode exactly),
// then moderate noise, then a few codewords of very strong noise (so that
// no candidate passes the EDC), then moderate noise again. The test counts
// how often each mechanism happened and fails if one never did: write-side
// input stall for check bits, read-side stall for the update step, decision
// on the best path, decision on a lower-ranked path (an EDC-guided
// correction that recovered the data exactly), no path passing (fallback),
// and more than one path passing. It also bounds the bit error rate of the
// moderate-noise codewords.
module tb_lnpml_top;
  import lnpml_pkg::*;

  localparam int P = 198, M = 3, CW = P + M;
  localparam int NCW = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic wr_in_valid, wr_in_ready, wr_in_bit, wr_out_valid, wr_out_ready, wr_out_bit, wr_out_first, wr_out_check;
  logic rd_valid, rd_ready, dec_valid, dec_pass;
  logic signed [SAMPLE_W-1:0] rd_y;
  logic signed [2:0][COEF_W-1:0] rd_p;
  logic [P-1:0] dec_data;
  logic [2:0] dec_rank;
  logic [3:0] dec_npass;

  lnpml_top dut (
    .clk(clk), .rst_n(rst_n),
    .wr_in_valid(wr_in_valid), .wr_in_ready(wr_in_ready), .wr_in_bit(wr_in_bit),
    .wr_out_valid(wr_out_valid), .wr_out_ready(wr_out_ready), .wr_out_bit(wr_out_bit),
    .wr_out_first(wr_out_first), .wr_out_check(wr_out_check),
    .rd_valid(rd_valid), .rd_ready(rd_ready), .rd_y(rd_y), .rd_p(rd_p),
    .dec_valid(dec_valid), .dec_data(dec_data), .dec_pass(dec_pass),
    .dec_rank(dec_rank), .dec_npass(dec_npass));

  function automatic real sigma_of(input int c);
    if (c < 4) return 0.0;
    if (c >= 40 && c < 46) return 3.0;
    return 0.55;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  bit user[$];           // all user bits sent, in order
  int n_user = 0;
  int ysamp[$];          // channel output samples waiting for the reader
  int n_chan = 0;        // channel bits produced
  real w = 0.0;
  int  a1 = -1, a2 = -1;

  int enc_stall = 0, det_stall = 0;
  int n_best = 0, n_lower = 0, n_none = 0, n_multi = 0, n_fixed = 0;
  int ncw = 0;
  int err_mod = 0, bits_mod = 0;

  // write side: user data source
  always @(posedge clk) begin
    if (rst_n) begin
      if (wr_in_valid && wr_in_ready) begin
        user.push_back(wr_in_bit);
        n_user++;
      end
      if (wr_in_valid && !wr_in_ready && wr_out_check) enc_stall++;
      if (!wr_in_valid || wr_in_ready) begin
        wr_in_valid <= (n_user + 1 < P * NCW) && ($urandom_range(0, 7) != 0);
        wr_in_bit   <= 1'($urandom_range(0, 1));
      end
      wr_out_ready <= ($urandom_range(0, 9) != 0);
    end
  end

  // channel model
  always @(posedge clk) begin
    if (rst_n && wr_out_valid && wr_out_ready) begin
      int a, yi;
      real y;
      a  = wr_out_bit ? 1 : -1;
      w  = 0.5 * w + sigma_of(n_chan / CW) * gauss();
      y  = real'(a - a2) + w;
      yi = $rtoi($floor(y * 32.0 + 0.5));
      if (yi > 511) yi = 511;
      if (yi < -512) yi = -512;
      ysamp.push_back(yi);
      a2 = a1; a1 = a;
      n_chan++;
    end
  end

  // read side: sample source with gaps
  always @(posedge clk) begin
    if (rst_n) begin
      if (rd_valid && !rd_ready) det_stall++;
      if (rd_valid && rd_ready) void'(ysamp.pop_front());
      if (!rd_valid || rd_ready) begin
        int avail;
        avail = ysamp.size() - ((rd_valid && rd_ready) ? 0 : 0);
        if (ysamp.size() > 0 && $urandom_range(0, 7) != 0) begin
          rd_valid <= 1'b1;
          rd_y     <= SAMPLE_W'(ysamp[0]);
        end else begin
          rd_valid <= 1'b0;
        end
      end
    end
  end

  // decision checker
  always @(posedge clk) begin
    if (rst_n && dec_valid) begin
      int e;
      real sg;
      e = 0;
      for (int i = 0; i < P; i++)
        if (dec_data[i] != user[ncw * P + i]) e++;
      sg = sigma_of(ncw);
      if (sg == 0.0) begin
        checks++;
        if (e != 0 || !dec_pass || dec_rank != 0) begin
          failures++; $display("FAIL: noise-free codeword %0d: %0d bit errors", ncw, e);
        end
      end else if (sg < 1.0) begin
        err_mod += e; bits_mod += P;
      end
      checks++;
      if (dec_pass != (dec_npass != 0) || dec_rank >= 6 || dec_npass > 6 || (!dec_pass && dec_rank != 0)) begin
        failures++; $display("FAIL: codeword %0d inconsistent flags pass=%0d rank=%0d npass=%0d", ncw, dec_pass, dec_rank, dec_npass);
      end
      if (!dec_pass) n_none++;
      else if (dec_rank == 0) n_best++;
      else begin
        n_lower++;
        if (e == 0) n_fixed++;
      end
      if (dec_npass > 1) n_multi++;
      ncw++;
    end
  end

  initial begin
    wr_in_valid = 0; wr_in_bit = 0; wr_out_ready = 0; rd_valid = 0; rd_y = '0;
    rd_p[0] = COEF_W'(128);   // p_1 = 0.5
    rd_p[1] = '0;
    rd_p[2] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (ncw == NCW - 1);
    repeat (5) @(posedge clk);
    $display("codewords %0d; stalls: encoder %0d, detector %0d", ncw, enc_stall, det_stall);
    $display("decisions: best %0d, lower-ranked %0d (exact %0d), none passed %0d, several passed %0d",
             n_best, n_lower, n_fixed, n_none, n_multi);
    $display("moderate-noise BER %0d / %0d", err_mod, bits_mod);
    checks += 7;
    if (enc_stall == 0) begin failures++; $display("FAIL: encoder never stalled"); end
    if (det_stall == 0) begin failures++; $display("FAIL: detector never stalled"); end
    if (n_best == 0)    begin failures++; $display("FAIL: best path never decided"); end
    if (n_fixed == 0)   begin failures++; $display("FAIL: no EDC-guided correction"); end
    if (n_none == 0)    begin failures++; $display("FAIL: fallback never used"); end
    if (n_multi == 0)   begin failures++; $display("FAIL: never several passing paths"); end
    if (bits_mod == 0 || err_mod * 100 > bits_mod) begin
      failures++; $display("FAIL: moderate-noise BER too high");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCW * CW * 3) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
