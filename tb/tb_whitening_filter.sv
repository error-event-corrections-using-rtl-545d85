// tb_whitening_filter: self-checking test of the noise-whitening filter.
//
// Random samples y and taps p are applied with random consumer stalls. The
// expected z = y_n - sum p_i y_{n-i} is computed here in real arithmetic
// from the accepted samples only, rounded half up to 1/32 and saturated to
// the sample range, and compared bit-exactly whenever a sample is accepted.
// The taps change every 50 samples.
module tb_whitening_filter;
  import lnpml_pkg::*;

  localparam int L = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [SAMPLE_W-1:0] y, z;
  logic signed [L-1:0][COEF_W-1:0] p;

  whitening_filter #(.L(L)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .y(y), .p(p),
    .out_valid(out_valid), .out_ready(out_ready), .z(z));

  real hist[L];
  int  stalls = 0;

  function automatic int expected(input int yv);
    real acc;
    int  r;
    acc = real'(yv) / 32.0;
    for (int i = 0; i < L; i++) acc -= (real'($signed(p[i])) / 256.0) * hist[i];
    r = $floor(acc * 32.0 + 0.5);
    if (r > 511) r = 511;
    if (r < -512) r = -512;
    return r;
  endfunction

  initial begin
    for (int i = 0; i < L; i++) hist[i] = 0.0;
    in_valid = 0; out_ready = 0; y = '0; p = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (n % 50 == 0)
        for (int i = 0; i < L; i++) p[i] = COEF_W'($urandom_range(0, 1023));
      in_valid  = ($urandom_range(0, 5) != 0);
      out_ready = ($urandom_range(0, 4) != 0);
      y = SAMPLE_W'($urandom_range(0, 1023) - 512);
      #1;
      checks++;
      if (out_valid !== in_valid || in_ready !== out_ready) begin
        failures++; $display("FAIL: handshake pass-through");
      end
      if (in_valid && out_ready) begin
        int e;
        e = expected(int'(y));
        checks++;
        if (int'(z) != e) begin
          failures++;
          $display("FAIL: n=%0d z=%0d expected %0d", n, int'(z), e);
        end
        for (int i = L - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = real'(int'(y)) / 32.0;
      end else if (in_valid) stalls++;
    end
    $display("stalled samples %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
