// tb_path_memory: self-checking test of the register-exchange survivor memory.
//
// Random selections (predecessor bit, rank) are applied, with random idle
// cycles. A reference keeps every path as a list of bits and extends path
// (j,l) with the path it selects plus the new bit j[K-1]; after each step
// the feedback history (last H bits) and codeword register (last CW bits,
// first bit at index 0) of every path must match.
module tb_path_memory;
  import lnpml_pkg::*;

  localparam int K = 2, N = 3, H = 5, CW = 21, S = 4, TW = 2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic step;
  logic [S-1:0][N-1:0]          sel_x;
  logic [S-1:0][N-1:0][TW-1:0]  sel_t;
  logic [S-1:0][N-1:0][H-1:0]   hist;
  logic [S-1:0][N-1:0][CW-1:0]  cw;

  path_memory #(.K(K), .N(N), .H(H), .CW(CW)) dut (
    .clk(clk), .rst_n(rst_n), .step(step), .sel_x(sel_x), .sel_t(sel_t), .hist(hist), .cw(cw));

  // reference paths: newest bit at the back; start with 64 zero bits
  bit ref_path[S][N][$];

  initial begin
    for (int j = 0; j < S; j++)
      for (int l = 0; l < N; l++)
        for (int i = 0; i < 64; i++) ref_path[j][l].push_back(0);
    step = 0; sel_x = '0; sel_t = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      step = ($urandom_range(0, 4) != 0);
      for (int j = 0; j < S; j++)
        for (int l = 0; l < N; l++) begin
          sel_x[j][l] = 1'($urandom_range(0, 1));
          sel_t[j][l] = TW'($urandom_range(0, N - 1));
        end
      @(posedge clk);
      if (step) begin
        bit nxt[S][N][$];
        for (int j = 0; j < S; j++)
          for (int l = 0; l < N; l++) begin
            int k;
            k = ((j << 1) % S) + int'(sel_x[j][l]);
            nxt[j][l] = ref_path[k][sel_t[j][l]];
            nxt[j][l].push_back(j >> (K - 1));
            void'(nxt[j][l].pop_front());
          end
        for (int j = 0; j < S; j++)
          for (int l = 0; l < N; l++) ref_path[j][l] = nxt[j][l];
      end
      #1;
      for (int j = 0; j < S; j++)
        for (int l = 0; l < N; l++) begin
          int len;
          len = ref_path[j][l].size();
          checks++;
          for (int i = 1; i <= H; i++)
            if (hist[j][l][i-1] != ref_path[j][l][len - i]) begin
              failures++; $display("FAIL: n=%0d hist (%0d,%0d) bit %0d", n, j, l, i); break;
            end
          checks++;
          for (int i = 0; i < CW; i++)
            if (cw[j][l][i] != ref_path[j][l][len - CW + i]) begin
              failures++; $display("FAIL: n=%0d cw (%0d,%0d) bit %0d", n, j, l, i); break;
            end
        end
    end
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
