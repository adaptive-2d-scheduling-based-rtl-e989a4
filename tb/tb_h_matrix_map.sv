// tb_h_matrix_map: checks the default parity-check matrix (N = 4544,
// M = 454, column weight 5). Every row slot is enumerated: each valid slot
// must point to a column whose column view lists that row with the same
// coefficient; row weights must be 50 or 51 and the edge count 22720;
// every column must have 5 distinct rows; coefficients must be non-zero.
module tb_h_matrix_map;
  import nbats_pkg::*;

  localparam int N = 4544, M = 454, DV = 5;
  localparam int NB = (N + M - 1) / M;
  logic [8:0] row_cn;
  logic [3:0] row_p;
  logic [2:0] row_t;
  logic row_valid;
  logic [12:0] row_col, col_vn;
  gf4_t row_coef;
  logic [DV-1:0][8:0] col_cn;
  gf4_t [DV-1:0] col_coef;
  int checks = 0, failures = 0;

  h_matrix_map dut (.row_cn, .row_p, .row_t, .row_valid, .row_col, .row_coef,
                    .col_vn, .col_cn, .col_coef);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int edges = 0, wmin = 1000, wmax = 0;
    for (int i = 0; i < M; i++) begin
      int w;
      w = 0;
      for (int p = 0; p < NB; p++)
        for (int t = 0; t < DV; t++) begin
          row_cn = 9'(i);
          row_p = 4'(p);
          row_t = 3'(t);
          #1;
          if (row_valid) begin
            w++;
            col_vn = row_col;
            #1;
            check(int'(row_col) / M == p, "column in block p");
            check(int'(col_cn[t]) == i && col_coef[t] == row_coef && row_coef != 0,
                  $sformatf("row %0d slot %0d/%0d col %0d mismatch", i, p, t, row_col));
          end
        end
      edges += w;
      if (w < wmin) wmin = w;
      if (w > wmax) wmax = w;
    end
    check(edges == 22720, $sformatf("edges %0d", edges));
    check(wmin == 50 && wmax == 51, $sformatf("row weights %0d..%0d", wmin, wmax));
    for (int j = 0; j < N; j++) begin
      bit uniq;
      uniq = 1;
      col_vn = 13'(j);
      #1;
      for (int a = 0; a < DV; a++)
        for (int b = a + 1; b < DV; b++) if (col_cn[a] == col_cn[b]) uniq = 0;
      check(uniq, $sformatf("column %0d rows distinct", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
