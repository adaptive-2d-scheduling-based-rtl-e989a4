// tb_vn_update: random check of one variable-node update.
// The predicted symbol is computed with GF(4) log/antilog tables, the EC
// filter with the adjacency rule |z_hat - z_ini| <= 1, and the saturating
// reliability update, arg max and stability with plain integers.
module tb_vn_update;
  import nbats_pkg::*;

  rvec_t r_in, r_out;
  gf4_t  z_in, z_ini, s_row, h, z_hat, z_out;
  stab_t phi, sv_out;
  logic  ec_active, accept, saturated;
  int checks = 0, failures = 0;

  vn_update dut (.r_in, .z_in, .z_ini, .s_row, .h, .phi, .ec_active,
                 .z_hat, .accept, .saturated, .r_out, .z_out, .sv_out);

  int lg[4]  = '{-1, 0, 1, 2};
  int alg[3] = '{1, 2, 3};

  function automatic int gm(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alg[(lg[a] + lg[b]) % 3];
  endfunction

  function automatic int ginv(int a);
    return alg[(3 - lg[a]) % 3];
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int r[4], ezh, ez, best, second, bi, d;
      bit eacc, esat;
      for (int l = 0; l < 4; l++) begin
        r[l] = (n % 10 == 0) ? 32767 - int'($urandom % 40) : int'($urandom % 2001) - 1000;
        r_in[l] = rel_t'(r[l]);
      end
      bi = 0;
      for (int l = 1; l < 4; l++) if (r[l] > r[bi]) bi = l;
      z_in = gf4_t'(bi);
      z_ini = gf4_t'($urandom % 4);
      s_row = gf4_t'($urandom % 4);
      h = gf4_t'(1 + $urandom % 3);
      phi = stab_t'((n % 10 == 0) ? 50 + $urandom % 100 : $urandom % 300);
      ec_active = $urandom % 2;
      #1;
      ezh = bi ^ gm(ginv(int'(h)), int'(s_row));
      d = ezh - int'(z_ini);
      eacc = !ec_active || (d >= -1 && d <= 1);
      esat = 0;
      if (eacc) begin
        r[ezh] = r[ezh] + int'(phi);
        if (r[ezh] > 32767) begin r[ezh] = 32767; esat = 1; end
      end
      best = r[0]; ez = 0;
      for (int l = 1; l < 4; l++) if (r[l] > best) begin best = r[l]; ez = l; end
      second = -100000;
      for (int l = 0; l < 4; l++) if (l != ez && r[l] > second) second = r[l];
      check(int'(z_hat) == ezh, $sformatf("z_hat %0d exp %0d", z_hat, ezh));
      check(accept == eacc, "accept");
      check(saturated == esat, "saturated");
      for (int l = 0; l < 4; l++) check(int'(r_out[l]) == r[l], $sformatf("R[%0d] %0d exp %0d", l, r_out[l], r[l]));
      check(int'(z_out) == ez, $sformatf("z_out %0d exp %0d", z_out, ez));
      check(int'(sv_out) == best - second, $sformatf("sv %0d exp %0d", sv_out, best - second));
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
