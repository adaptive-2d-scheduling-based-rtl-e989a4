// tb_reliability_init: exhaustive check of the initial reliabilities.
// Every pair of 5-bit soft reads is applied; the expected R0, hard decision
// and stability are computed here from the state labelling table
// (state 0..3 stores 11, 10, 00, 01) and LAMBDA = 5.
module tb_reliability_init;
  import nbats_pkg::*;

  llr_t  q1, q2;
  rvec_t r0;
  gf4_t  z0;
  stab_t sv0;
  int checks = 0, failures = 0;

  reliability_init #(.LAMBDA(5)) dut (.q1, .q2, .r0, .z0, .sv0);

  initial begin
    int bit1[4] = '{1, 1, 0, 0};
    int bit2[4] = '{1, 0, 0, 1};
    for (int a = -16; a < 16; a++) begin
      for (int b = -16; b < 16; b++) begin
        int exp_r[4];
        int best, second, bi;
        q1 = llr_t'(a);
        q2 = llr_t'(b);
        #1;
        for (int l = 0; l < 4; l++)
          exp_r[l] = 5 * ((2 * bit1[l] - 1) * a + (2 * bit2[l] - 1) * b);
        best = exp_r[0];
        bi = 0;
        for (int l = 1; l < 4; l++) if (exp_r[l] > best) begin best = exp_r[l]; bi = l; end
        second = -100000;
        for (int l = 0; l < 4; l++) if (l != bi && exp_r[l] > second) second = exp_r[l];
        for (int l = 0; l < 4; l++) begin
          checks++;
          if (int'(r0[l]) != exp_r[l]) begin
            failures++;
            $display("FAIL q=(%0d,%0d) R[%0d]=%0d exp %0d", a, b, l, r0[l], exp_r[l]);
          end
        end
        checks++;
        if (int'(z0) != bi || int'(sv0) != best - second) begin
          failures++;
          $display("FAIL q=(%0d,%0d) z0=%0d sv0=%0d exp %0d %0d", a, b, z0, sv0, bi, best - second);
        end
      end
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
