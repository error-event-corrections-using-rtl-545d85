// tb_edc_check: self-checking test of the EDC checker.
//
// Codewords are built here from the code definitions (interleaved parity:
// check bit c = XOR of chunk bits i with i mod 3 == c; x^4 + 1: remainder
// coefficient r = XOR of message bits of degree r mod 4). Each clean
// codeword must pass; the same codeword with a single error event of 1 to 3
// bits (parity) or 1 to 4 bits (CRC) at a random place must fail, and for
// random multi-bit corruptions the syndrome must equal the class sums
// worked out here.
module tb_edc_check;
  import lnpml_pkg::*;

  localparam int P  = 198;
  localparam int CP = P + 3;
  localparam int CC = P + 4;

  int checks = 0, failures = 0;

  logic [CP-1:0] cw_p;
  logic [CC-1:0] cw_c;
  logic ok_p, ok_c;
  logic [2:0] syn_p;
  logic [3:0] syn_c;

  edc_check #(.P(P)) dut_p (.cw(cw_p), .ok(ok_p), .syndrome(syn_p));
  edc_check #(.P(P), .KIND(EDC_CRC), .M(4), .POLY(16'h0001)) dut_c (.cw(cw_c), .ok(ok_c), .syndrome(syn_c));

  task automatic expect1(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %0d exp %0d", what, got, exp);
    end
  endtask

  function automatic logic [CP-1:0] make_par(input logic [P-1:0] d);
    logic [CP-1:0] c;
    c = '0;
    c[P-1:0] = d;
    for (int i = 0; i < P; i++) c[P + (i % 3)] ^= d[i];
    return c;
  endfunction

  function automatic logic [CC-1:0] make_crc(input logic [P-1:0] d);
    logic [CC-1:0] c;
    c = '0;
    c[P-1:0] = d;
    // bit P+k carries the remainder coefficient of degree 3-k
    for (int i = 0; i < P; i++) c[P + 3 - ((P - 1 - i + 4) % 4)] ^= d[i];
    return c;
  endfunction

  initial begin
    logic [P-1:0] d;
    logic [CP-1:0] ep;
    logic [CC-1:0] ec;
    for (int trial = 0; trial < 300; trial++) begin
      for (int i = 0; i < P; i++) d[i] = 1'($urandom_range(0, 1));
      cw_p = make_par(d);
      cw_c = make_crc(d);
      #1;
      expect1(ok_p, 1'b1, "parity clean");
      expect1(ok_c, 1'b1, "crc clean");
      // single error event
      begin
        int len, at;
        len = $urandom_range(1, 3);
        at  = $urandom_range(0, CP - len);
        ep = '0;
        for (int i = 0; i < len; i++) ep[at + i] = 1'b1;
        cw_p = make_par(d) ^ ep;
        len = $urandom_range(1, 4);
        at  = $urandom_range(0, CC - len);
        ec = '0;
        for (int i = 0; i < len; i++) ec[at + i] = 1'b1;
        cw_c = make_crc(d) ^ ec;
        #1;
        expect1(ok_p, 1'b0, "parity error event");
        expect1(ok_c, 1'b0, "crc error event");
      end
      // random corruption: syndrome = class sums of the error pattern
      begin
        logic [2:0] sp;
        logic [3:0] sc;
        for (int i = 0; i < CP; i++) ep[i] = ($urandom_range(0, 15) == 0);
        for (int i = 0; i < CC; i++) ec[i] = ($urandom_range(0, 15) == 0);
        cw_p = make_par(d) ^ ep;
        cw_c = make_crc(d) ^ ec;
        sp = '0;
        for (int i = 0; i < CP; i++) sp[i % 3] ^= ep[i];
        // CRC register after the whole word: coefficient of degree r of the
        // error polynomial reduced mod x^4+1, register bit r = degree r
        sc = '0;
        for (int i = 0; i < CC; i++) sc[(CC - 1 - i) % 4] ^= ec[i];
        #1;
        checks++;
        if (syn_p !== sp) begin failures++; $display("FAIL: parity syndrome %b exp %b", syn_p, sp); end
        checks++;
        if (syn_c !== sc) begin failures++; $display("FAIL: crc syndrome %b exp %b", syn_c, sc); end
        expect1(ok_p, sp == 0, "parity ok vs syndrome");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
