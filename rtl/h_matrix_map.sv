// h_matrix_map: structure of the quasi-cyclic GF(4) parity-check matrix.
//
// The N code symbols are split into NB = ceil(N/M) blocks of M columns
// (the last block may be partial). Column j = p*M + u has DV non-zero
// entries, one per edge t = 0..DV-1, in row (u + SH(t,p)) mod M with
// SH(t,p) = (SHIFT_A*t*(p+1) + SHIFT_B*t*t) mod M, i.e. every block column
// is a sum of DV circulant permutation matrices of size M. The coefficient
// of that entry is ((t + p + u) mod 3) + 1. With the defaults (N = 4544,
// M = 454, DV = 5, SHIFT_A = 2, SHIFT_B = 11) this gives 22720 edges, rows
// of weight 50 and 51, and no 4-cycles.
//
// Row view: (row_cn, row_p, row_t) names the slot of block p and edge t of
// a row; row_valid is low when that slot falls beyond column N-1.
// Column view: the DV rows and coefficients of column col_vn.
// Purely combinational. Code length, rate, column weight and row weights
// are the evaluated code's; the shift and coefficient rules are this
// design's own construction, since the matrix itself is not published.
module h_matrix_map
  import nbats_pkg::*;
#(
  parameter int N       = 4544,
  parameter int M       = 454,
  parameter int DV      = 5,
  parameter int SHIFT_A = 2,
  parameter int SHIFT_B = 11,
  localparam int NB  = (N + M - 1) / M,
  localparam int VIW = $clog2(N),
  localparam int CIW = (M > 1) ? $clog2(M) : 1,
  localparam int PW  = (NB > 1) ? $clog2(NB) : 1,
  localparam int TW  = (DV > 1) ? $clog2(DV) : 1
) (
  input  logic [CIW-1:0]          row_cn,
  input  logic [PW-1:0]           row_p,
  input  logic [TW-1:0]           row_t,
  output logic                    row_valid,
  output logic [VIW-1:0]          row_col,
  output gf4_t                    row_coef,
  input  logic [VIW-1:0]          col_vn,
  output logic [DV-1:0][CIW-1:0]  col_cn,
  output gf4_t [DV-1:0]           col_coef
);

  // constant shift table SH[p][t]
  logic [CIW-1:0] SH [NB][DV];

  for (genvar gp = 0; gp < NB; gp++) begin : g_blk
    for (genvar gt = 0; gt < DV; gt++) begin : g_edge
      assign SH[gp][gt] = CIW'((SHIFT_A * gt * (gp + 1) + SHIFT_B * gt * gt) % M);
    end
  end

  function automatic gf4_t coef_of(int t, int p, int u);
    return gf4_t'(((t + p + u) % 3) + 1);
  endfunction

  // row view
  always_comb begin
    int p, t, u, sh, col;
    p  = int'(row_p);
    t  = int'(row_t);
    sh = 0;
    u  = 0;
    col = 0;
    row_valid = 1'b0;
    row_col   = '0;
    row_coef  = 2'd1;
    if (p < NB && t < DV) begin
      sh  = int'(SH[p][t]);
      u   = (int'(row_cn) >= sh) ? int'(row_cn) - sh : int'(row_cn) + M - sh;
      col = p * M + u;
      row_valid = (col < N) && (int'(row_cn) < M);
      row_col   = VIW'(col);
      row_coef  = coef_of(t, p, u);
    end
  end

  // column view
  always_comb begin
    int p, u, c;
    p = int'(col_vn) / M;
    u = int'(col_vn) % M;
    for (int t = 0; t < DV; t++) begin
      c = (p < NB) ? u + int'(SH[p][t]) : u;
      if (c >= M) c = c - M;
      col_cn[t]   = CIW'(c);
      col_coef[t] = coef_of(t, p, u);
    end
  end

endmodule
