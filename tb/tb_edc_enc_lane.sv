// tb_edc_enc_lane: driver and checker for one edc_encoder, used by
// tb_edc_encoder. It feeds random bits with random source gaps and sink
// stalls, rebuilds each output codeword and compares it with the sent chunk
// and with check bits computed here from the code's definition:
//   parity: check bit c is the XOR of the chunk bits i with i mod M == c
//           (valid for P divisible by M);
//   x^4+1:  the chunk bit i has degree P-1-i+4 in D(x)x^4; remainder
//           coefficient r is the XOR of the bits whose degree is r mod 4,
//           sent highest degree first.
// It also checks that in_ready is low exactly while check bits go out and
// that out_first marks codeword starts. Results add to checks/failures.
module tb_edc_enc_lane
  import lnpml_pkg::*;
#(
  parameter int   P    = 198,
  parameter edc_e KIND = EDC_PARITY,
  parameter int   M    = 3,
  parameter int   NCW  = 30
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stall_cycles,
  output bit   done
);

  logic in_valid, in_ready, in_bit, out_valid, out_ready, out_bit, out_first, out_check;

  edc_encoder #(.P(P), .KIND(KIND), .M(M), .POLY(16'h0001)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_bit(in_bit),
    .out_valid(out_valid), .out_ready(out_ready), .out_bit(out_bit),
    .out_first(out_first), .out_check(out_check));

  bit sent[$];
  bit cw[$];
  int ncw = 0;
  int nsent = 0;

  initial begin
    checks = 0; failures = 0; stall_cycles = 0; done = 0;
    in_valid = 0; in_bit = 0; out_ready = 0;
  end

  // source: random gaps, holds a bit until accepted
  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready) begin
        sent.push_back(in_bit);
        nsent++;
      end
      if (!in_valid || in_ready) begin
        in_valid <= (nsent < P * NCW) && ($urandom_range(0, 3) != 0);
        in_bit   <= 1'($urandom_range(0, 1));
      end
      out_ready <= ($urandom_range(0, 4) != 0);
    end
  end

  // monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_check) begin
        stall_cycles++;
        checks++;
        if (in_ready) begin failures++; $display("FAIL %m: input not stalled during check bit"); end
      end
      if (out_valid && out_ready) begin
        if ((cw.size() == 0) != out_first) begin
          failures++; $display("FAIL %m: out_first wrong at bit %0d", cw.size());
        end
        checks++;
        cw.push_back(out_bit);
        if (cw.size() == P + M) begin
          bit exp_chk[];
          exp_chk = new[M];
          foreach (exp_chk[c]) exp_chk[c] = 0;
          for (int i = 0; i < P; i++) begin
            bit d;
            d = sent.pop_front();
            checks++;
            if (cw[i] != d) begin failures++; $display("FAIL %m: cw %0d data bit %0d", ncw, i); end
            if (KIND == EDC_PARITY) exp_chk[i % M] ^= d;
            else exp_chk[(M - 1) - ((P - 1 - i + M) % M)] ^= d;   // index 0 = highest degree
          end
          for (int c = 0; c < M; c++) begin
            checks++;
            if (cw[P + c] != exp_chk[c]) begin
              failures++; $display("FAIL %m: cw %0d check bit %0d got %0d exp %0d", ncw, c, cw[P + c], exp_chk[c]);
            end
          end
          cw.delete();
          ncw++;
          if (ncw == NCW) done = 1;
        end
      end
    end
  end

endmodule
