// tb_list_bmu: self-checking test of the list branch metric unit.
//
// Random whitened samples, target coefficients and per-path histories are
// applied; for every (state, rank, new bit) the expected metric is computed
// here in real arithmetic from the document's formula
//   [ z + sum_i g_i a_{n-i} - a_n ]^2
// with a_{n-i} taken from the state for i <= K and from the path history
// beyond, then scaled to 1/64 units, truncated and saturated.
module tb_list_bmu;
  import lnpml_pkg::*;

  localparam int K = 2, L = 3, N = 3, S = 4, H = L + 2;

  int checks = 0, failures = 0;

  logic signed [SAMPLE_W-1:0]         z;
  logic signed [H-1:0][G_W-1:0]       g;
  logic [S-1:0][N-1:0][H-1:0]         hist;
  logic [S-1:0][N-1:0][1:0][BM_W-1:0] bm;

  list_bmu #(.K(K), .L(L), .N(N)) dut (.z(z), .g(g), .hist(hist), .bm(bm));

  initial begin
    int sat = 0;
    for (int trial = 0; trial < 1000; trial++) begin
      z = SAMPLE_W'($urandom_range(0, 1023) - 512);
      for (int i = 0; i < H; i++) g[i] = G_W'($urandom_range(0, 2047) - 1024);
      if (trial % 4 == 0) begin      // realistic small taps most of the time
        z = SAMPLE_W'($urandom_range(0, 200) - 100);
        for (int i = 0; i < H; i++) g[i] = G_W'($urandom_range(0, 300) - 150);
      end
      for (int k = 0; k < S; k++)
        for (int t = 0; t < N; t++)
          hist[k][t] = H'($urandom_range(0, (1 << H) - 1));
      #1;
      for (int k = 0; k < S; k++) begin
        for (int t = 0; t < N; t++) begin
          for (int b = 0; b < 2; b++) begin
            real e, m;
            longint exp_bm;
            e = real'(int'(z)) / 32.0;
            for (int i = 1; i <= H; i++) begin
              bit past;
              real a;
              past = (i <= K) ? k[K-i] : hist[k][t][i-1];
              a = past ? 1.0 : -1.0;
              e += (real'(int'($signed(g[i-1]))) / 256.0) * a;
            end
            e -= (b != 0) ? 1.0 : -1.0;
            m = $floor(e * e * 64.0);
            exp_bm = longint'(m);
            if (exp_bm > 65535) begin exp_bm = 65535; sat++; end
            checks++;
            if (longint'(bm[k][t][b]) != exp_bm) begin
              failures++;
              $display("FAIL: k=%0d t=%0d b=%0d bm=%0d expected %0d", k, t, b, bm[k][t][b], exp_bm);
            end
          end
        end
      end
    end
    $display("saturated metrics %0d", sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
