// tb_list_acs: self-checking test of the list add-compare-select unit.
//
// Random path metrics (including infinite ones and deliberate ties) and
// branch metrics are applied. The reference forms the 2N sums with
// saturation, sorts them here with a stable insertion sort (ties keep the
// lower candidate index first) and expects the first N, in order, with
// their predecessor and rank.
module tb_list_acs;
  import lnpml_pkg::*;

  localparam int N = 3;
  localparam int TW = 2;

  int checks = 0, failures = 0;

  logic [1:0][N-1:0][PM_W-1:0] pm_in;
  logic [1:0][N-1:0][BM_W-1:0] bm_in;
  logic [N-1:0][PM_W-1:0]      pm_out;
  logic [N-1:0]                sel_x;
  logic [N-1:0][TW-1:0]        sel_t;

  list_acs #(.N(N)) dut (.pm_in(pm_in), .bm_in(bm_in), .pm_out(pm_out), .sel_x(sel_x), .sel_t(sel_t));

  initial begin
    for (int trial = 0; trial < 5000; trial++) begin
      longint v[2*N];
      int     id[2*N];
      for (int x = 0; x < 2; x++)
        for (int t = 0; t < N; t++) begin
          case ($urandom_range(0, 7))
            0:       pm_in[x][t] = PM_INF;
            1:       pm_in[x][t] = PM_W'(100);                       // ties
            2:       pm_in[x][t] = PM_INF - PM_W'($urandom_range(0, 100)); // near saturation
            default: pm_in[x][t] = PM_W'($urandom_range(0, 5000));
          endcase
          bm_in[x][t] = ($urandom_range(0, 3) == 0) ? BM_W'(0) : BM_W'($urandom_range(0, 3000));
        end
      for (int c = 0; c < 2 * N; c++) begin
        longint s;
        longint a;
        a = longint'(pm_in[c / N][c % N]);
        s = a + longint'(bm_in[c / N][c % N]);
        if (a == longint'(PM_INF) || s >= longint'(PM_INF)) s = longint'(PM_INF);
        v[c] = s; id[c] = c;
      end
      for (int i = 1; i < 2 * N; i++)
        for (int j = i; j > 0 && v[j] < v[j-1]; j--) begin
          longint tv; int ti;
          tv = v[j]; v[j] = v[j-1]; v[j-1] = tv;
          ti = id[j]; id[j] = id[j-1]; id[j-1] = ti;
        end
      #1;
      for (int l = 0; l < N; l++) begin
        checks++;
        if (longint'(pm_out[l]) != v[l] || int'(sel_x[l]) != id[l] / N || int'(sel_t[l]) != id[l] % N) begin
          failures++;
          $display("FAIL: trial %0d l=%0d got %0d (%0d,%0d) expected %0d (%0d,%0d)",
                   trial, l, pm_out[l], sel_x[l], sel_t[l], v[l], id[l] / N, id[l] % N);
        end
      end
    end
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
