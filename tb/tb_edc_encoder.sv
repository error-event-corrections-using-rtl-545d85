// tb_edc_encoder: self-checking test of the EDC insertion.
//
// Two encoders run on random bit streams with random source and sink
// stalls: the default 3-bit interleaved parity code and the x^4 + 1 CRC.
// tb_edc_enc_lane checks every codeword against the chunk and against check
// bits computed from the code definitions, and that the input is stalled
// exactly while check bits are sent (M cycles per codeword with a ready
// sink).
module tb_edc_encoder;
  import lnpml_pkg::*;

  localparam int P   = 198;
  localparam int NCW = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int c0, f0, s0, c1, f1, s1;
  bit d0, d1;
  int checks = 0, failures = 0;

  tb_edc_enc_lane #(.P(P), .KIND(EDC_PARITY), .M(3), .NCW(NCW)) lane_par (
    .clk(clk), .rst_n(rst_n), .checks(c0), .failures(f0), .stall_cycles(s0), .done(d0));
  tb_edc_enc_lane #(.P(P), .KIND(EDC_CRC), .M(4), .NCW(NCW)) lane_crc (
    .clk(clk), .rst_n(rst_n), .checks(c1), .failures(f1), .stall_cycles(s1), .done(d1));

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (d0 && d1);
    repeat (2) @(posedge clk);
    checks   = c0 + c1 + 2;
    failures = f0 + f1;
    // every check bit is presented for at least one cycle: M per codeword
    if (s0 < 3 * NCW) begin failures++; $display("FAIL: parity stall cycles %0d", s0); end
    if (s1 < 4 * NCW) begin failures++; $display("FAIL: crc stall cycles %0d", s1); end
    $display("codewords %0d, stall cycles parity %0d crc %0d", NCW, s0, s1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end

endmodule
