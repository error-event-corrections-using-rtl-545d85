// tb_list_npml_detector: self-checking test of the List-NPML detector.
//
// Random data is encoded here with the 3-bit interleaved parity code,
// mapped to +-1, passed through a PR4 channel a_n - a_{n-2} with first-order
// autoregressive noise (correlation 0.5) and whitened with p_1 = 0.5, so
// the detector's target has a tap (g_3 = -0.5) beyond its 4-state trellis
// and relies on per-path decision feedback. The taps g_i are worked out by
// hand for this predictor.
//
// A behavioural model of the algorithm written here (lists of paths with
// explicit sorting, same fixed-point scaling) predicts every decision; each
// codeword's data, pass flag, decided rank and pass count must match. The
// first codewords are noise-free and must decode exactly with the best
// path. The test also checks the timing (one stall cycle per codeword,
// output one cycle after it) and counts the update cases: best path
// accepted, a lower-ranked path accepted, and no path accepted (forced by a
// few codewords of very strong noise). A case that never occurs is a failure.
module tb_list_npml_detector;
  import lnpml_pkg::*;

  localparam int K = 2, L = 3, N = 3, Q = 6, P = 198, M = 3;
  localparam int S = 4, H = 5, CW = P + M, NP = S * N;
  localparam int NCW = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic                       in_valid, in_ready, out_valid, out_pass;
  logic signed [SAMPLE_W-1:0] z;
  logic signed [H-1:0][G_W-1:0] g;
  logic [P-1:0]               out_data;
  logic [2:0]                 out_rank;
  logic [3:0]                 out_npass;

  list_npml_detector #(.K(K), .L(L), .N(N), .Q(Q), .P(P)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .z(z), .g(g),
    .out_valid(out_valid), .out_data(out_data), .out_pass(out_pass), .out_rank(out_rank),
    .out_npass(out_npass));

  // ---------------- stimulus ----------------
  bit  data_bits[NCW][P];
  int  zs[NCW * CW];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  task automatic make_stimulus();
    real w = 0.0, y, yprev = 0.0;
    int  a1 = -1, a2 = -1;
    for (int c = 0; c < NCW; c++) begin
      bit cwb[CW];
      real sigma;
      sigma = (c < 4) ? 0.0 : (c >= 30 && c < 36) ? 3.0 : (c % 3 == 0) ? 0.30 : 0.45;
      for (int i = 0; i < P; i++) begin
        data_bits[c][i] = 1'($urandom_range(0, 1));
        cwb[i] = data_bits[c][i];
      end
      for (int i = 0; i < M; i++) cwb[P + i] = 0;
      for (int i = 0; i < P; i++) cwb[P + (i % M)] ^= cwb[i];
      for (int i = 0; i < CW; i++) begin
        int a, zi;
        real zr;
        a = cwb[i] ? 1 : -1;
        w = 0.5 * w + sigma * gauss();
        y = real'(a - a2) + w;
        zr = y - 0.5 * yprev;
        yprev = y;
        zi = $rtoi($floor(zr * 32.0 + 0.5));
        if (zi > 511) zi = 511;
        if (zi < -512) zi = -512;
        zs[c * CW + i] = zi;
        a2 = a1; a1 = a;
      end
    end
  endtask

  // ---------------- reference model ----------------
  longint   mpm[S][N];
  longint   mh[S][N];            // bit i-1 = b_{n-i}
  bit       mcw[S][N][$];
  int       gi[H];
  localparam longint INF = longint'(PM_INF);

  function automatic longint sat(input longint a, input longint b);
    if (a == INF || a + b >= INF) return INF;
    return a + b;
  endfunction

  task automatic model_reset();
    for (int j = 0; j < S; j++)
      for (int l = 0; l < N; l++) begin
        mpm[j][l] = INF; mh[j][l] = 0; mcw[j][l].delete();
      end
    mpm[0][0] = 0;
  endtask

  task automatic model_step(input int zv);
    longint npm[S][N];
    longint nh[S][N];
    bit     ncw[S][N][$];
    for (int j = 0; j < S; j++) begin
      longint v[2*N];
      int     ck[2*N], ct[2*N];
      int     b;
      b = j >> (K - 1);
      for (int x = 0; x < 2; x++)
        for (int t = 0; t < N; t++) begin
          int k, c;
          longint e, bm;
          k = ((j << 1) % S) + x;
          c = x * N + t;
          e = longint'(zv) * 8;
          for (int i = 1; i <= H; i++) begin
            int bit_i;
            bit_i = (i <= K) ? ((k >> (K - i)) & 1) : int'((mh[k][t] >> (i - 1)) & 1);
            e += bit_i ? gi[i-1] : -gi[i-1];
          end
          e += b ? -256 : 256;
          bm = (e * e) / 1024;
          if (bm > 65535) bm = 65535;
          v[c] = sat(mpm[k][t], bm); ck[c] = k; ct[c] = t;
        end
      for (int i = 1; i < 2 * N; i++)
        for (int q = i; q > 0 && v[q] < v[q-1]; q--) begin
          longint tv; int ti;
          tv = v[q]; v[q] = v[q-1]; v[q-1] = tv;
          ti = ck[q]; ck[q] = ck[q-1]; ck[q-1] = ti;
          ti = ct[q]; ct[q] = ct[q-1]; ct[q-1] = ti;
        end
      for (int l = 0; l < N; l++) begin
        npm[j][l] = v[l];
        nh[j][l]  = (mh[ck[l]][ct[l]] << 1) | longint'(b);
        ncw[j][l] = mcw[ck[l]][ct[l]];
        ncw[j][l].push_back(1'(b));
      end
    end
    for (int j = 0; j < S; j++)
      for (int l = 0; l < N; l++) begin
        mpm[j][l] = npm[j][l]; mh[j][l] = nh[j][l]; mcw[j][l] = ncw[j][l];
      end
  endtask

  // decision of the model at a codeword end
  bit     exp_data[P];
  bit     exp_pass;
  int     exp_rank, exp_npass;
  bit     best_data[P];

  task automatic model_update();
    longint v[NP];
    int     id[NP];
    bit     ok[Q];
    bit     keep[NP];
    longint base;
    for (int p = 0; p < NP; p++) begin v[p] = mpm[p / N][p % N]; id[p] = p; end
    for (int i = 1; i < NP; i++)
      for (int q = i; q > 0 && v[q] < v[q-1]; q--) begin
        longint tv; int ti;
        tv = v[q]; v[q] = v[q-1]; v[q-1] = tv;
        ti = id[q]; id[q] = id[q-1]; id[q-1] = ti;
      end
    exp_rank = -1; exp_npass = 0;
    for (int q = 0; q < Q; q++) begin
      bit s[M];
      for (int i = 0; i < M; i++) s[i] = 0;
      for (int i = 0; i < CW; i++) s[i % M] ^= mcw[id[q] / N][id[q] % N][i];
      ok[q] = (s[0] == 0 && s[1] == 0 && s[2] == 0) && v[q] != INF;
      if (ok[q]) begin exp_npass++; if (exp_rank < 0) exp_rank = q; end
    end
    exp_pass = (exp_rank >= 0);
    if (!exp_pass) exp_rank = 0;
    for (int i = 0; i < P; i++) begin
      exp_data[i]  = mcw[id[exp_rank] / N][id[exp_rank] % N][i];
      best_data[i] = mcw[id[0] / N][id[0] % N][i];
    end
    base = v[exp_rank];
    for (int p = 0; p < NP; p++) keep[p] = !exp_pass;
    for (int q = 0; q < Q; q++) if (ok[q]) keep[id[q]] = 1;
    for (int p = 0; p < NP; p++) begin
      if (!keep[p] || mpm[p / N][p % N] == INF) mpm[p / N][p % N] = INF;
      else mpm[p / N][p % N] = mpm[p / N][p % N] - base;
    end
    for (int j = 0; j < S; j++)
      for (int l = 0; l < N; l++) mcw[j][l].delete();
  endtask

  // ---------------- driver and checker ----------------
  int sidx = 0;
  int ncw_done = 0;
  int n_best = 0, n_lower = 0, n_none = 0;
  int err_decided = 0, err_best = 0;
  int stall_cycles = 0;
  longint cyc = 0, last_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (!in_ready) stall_cycles++;
      if (in_valid && in_ready) begin
        model_step(zs[sidx]);
        if ((sidx + 1) % CW == 0) model_update();
        sidx <= sidx + 1;
        in_valid <= (sidx + 1 < NCW * CW);
        z <= SAMPLE_W'(zs[(sidx + 1 < NCW * CW) ? sidx + 1 : sidx]);
      end
      if (out_valid) begin
        int e1, e2;
        e1 = 0;
        e2 = 0;
        checks++;
        if (out_pass != exp_pass || int'(out_rank) != exp_rank || int'(out_npass) != exp_npass) begin
          failures++;
          $display("FAIL: cw %0d pass/rank/npass %0d %0d %0d expected %0d %0d %0d", ncw_done,
                   out_pass, out_rank, out_npass, exp_pass, exp_rank, exp_npass);
        end
        checks++;
        for (int i = 0; i < P; i++) if (out_data[i] != exp_data[i]) e1++;
        if (e1 != 0) begin failures++; $display("FAIL: cw %0d data differs from model in %0d bits", ncw_done, e1); end
        e1 = 0;
        for (int i = 0; i < P; i++) begin
          if (out_data[i] != data_bits[ncw_done][i]) e1++;
          if (best_data[i] != data_bits[ncw_done][i]) e2++;
        end
        err_decided += e1; err_best += e2;
        if (ncw_done < 4) begin
          checks++;
          if (e1 != 0 || !out_pass || out_rank != 0) begin
            failures++; $display("FAIL: noise-free codeword %0d not decoded exactly", ncw_done);
          end
        end
        if (!out_pass) n_none++; else if (out_rank == 0) n_best++; else n_lower++;
        // throughput: CW samples and one update cycle per codeword
        if (last_out >= 0) begin
          checks++;
          if (cyc - last_out != CW + 1) begin
            failures++; $display("FAIL: output spacing %0d cycles", cyc - last_out);
          end
        end
        last_out = cyc;
        ncw_done++;
      end
    end
  end

  initial begin
    // p = (0.5, 0, 0): g_1 = 0.5, g_2 = 1, g_3 = -0.5, g_4 = g_5 = 0 (1/256 units)
    gi = '{128, 256, -128, 0, 0};
    for (int i = 0; i < H; i++) g[i] = G_W'(gi[i]);
    make_stimulus();
    model_reset();
    in_valid = 0;
    z = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    in_valid <= 1;
    z <= SAMPLE_W'(zs[0]);
    wait (ncw_done == NCW);
    repeat (2) @(posedge clk);
    $display("decisions: best path %0d, lower-ranked path %0d, none passed %0d", n_best, n_lower, n_none);
    $display("bit errors: decided %0d, best-metric path %0d", err_decided, err_best);
    checks += 4;
    if (n_best == 0)  begin failures++; $display("FAIL: best path never accepted"); end
    if (n_lower == 0) begin failures++; $display("FAIL: lower-ranked path never accepted"); end
    if (n_none == 0)  begin failures++; $display("FAIL: no-pass fallback never used"); end
    if (stall_cycles != NCW) begin failures++; $display("FAIL: %0d stall cycles for %0d codewords", stall_cycles, NCW); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCW * (CW + 1) + 1000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
