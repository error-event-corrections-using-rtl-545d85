// path_memory: survivor memory of the List-NPML detector (register exchange).
//
// Every path (state j, rank l) owns two shift registers: hist, its last
// H = L+2 decisions (hist[i-1] = b_{n-i}), which feed the branch metrics,
// and cw, its decisions over the current EDC codeword, which the update step
// checks and outputs. On each trellis step (step = 1) path (j,l) takes a copy
// of the registers of the path it extends, predecessor
// beta = {j[K-2:0], sel_x[j][l]} at rank r = sel_t[j][l], and shifts in the
// new bit b_n = j[K-1]. After a full codeword cw[0] is the first bit.
//
// The document describes the survivors through the pointers beta_n(j,l) and
// r_n(j,l) and a trace-back at the decision time; copying whole paths at
// each step holds the same sequences and has them all ready at the chunk
// end, which is this design's choice. Reset clears every history to bit 0
// (symbol -1), the document's value for decisions before time 0.
module path_memory
  import lnpml_pkg::*;
#(
  parameter int unsigned K  = 2,
  parameter int unsigned N  = 3,
  parameter int unsigned H  = 5,      // L + 2 feedback bits
  parameter int unsigned CW = 201,    // EDC codeword length P + M
  localparam int unsigned S  = 1 << K,
  localparam int unsigned TW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       step,
  input  logic [S-1:0][N-1:0]        sel_x,
  input  logic [S-1:0][N-1:0][TW-1:0] sel_t,
  output logic [S-1:0][N-1:0][H-1:0]  hist,
  output logic [S-1:0][N-1:0][CW-1:0] cw
);

  logic [S-1:0][N-1:0][H-1:0]  hist_d;
  logic [S-1:0][N-1:0][CW-1:0] cw_d;

  always_comb begin
    for (int j = 0; j < S; j++) begin
      for (int l = 0; l < N; l++) begin
        logic [K-1:0] k;
        logic         b;
        k = {j[K-2:0], sel_x[j][l]};
        b = j[K-1];
        hist_d[j][l] = {hist[k][sel_t[j][l]][H-2:0], b};
        cw_d[j][l]   = {b, cw[k][sel_t[j][l]][CW-1:1]};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
      cw   <= '0;
    end else if (step) begin
      hist <= hist_d;
      cw   <= cw_d;
    end
  end

endmodule
