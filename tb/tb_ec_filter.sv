// tb_ec_filter: exhaustive check of the early-correcting criterion against
// the adjacency sets 0 -> {1}, 1 -> {0,2}, 2 -> {1,3}, 3 -> {2}; with the
// criterion active the initial decision itself is also accepted.
module tb_ec_filter;
  import nbats_pkg::*;

  logic ec_active, in_adj, accept;
  gf4_t z_ini, z_hat;
  int checks = 0, failures = 0;

  ec_filter dut (.ec_active, .z_ini, .z_hat, .in_adj, .accept);

  // adjacency as a 4x4 table, row = initial state, column = prediction
  bit adj[4][4] = '{'{0, 1, 0, 0}, '{1, 0, 1, 0}, '{0, 1, 0, 1}, '{0, 0, 1, 0}};

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 4; i++)
        for (int h = 0; h < 4; h++) begin
          bit exp_acc;
          ec_active = e[0];
          z_ini = gf4_t'(i);
          z_hat = gf4_t'(h);
          #1;
          exp_acc = !e[0] || adj[i][h] || (i == h);
          checks++;
          if (accept != exp_acc || in_adj != adj[i][h]) begin
            failures++;
            $display("FAIL ec=%0d ini=%0d hat=%0d accept=%0d adj=%0d", e, i, h, accept, in_adj);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
