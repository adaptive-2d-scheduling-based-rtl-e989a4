// tb_cn_selector: random check of the adaptive check-node selection.
// For random pending / satisfied / stability vectors the chosen check must
// be the pending unsatisfied check of largest stability (lowest index on a
// tie), else the pending satisfied one of largest stability, and found
// must be low when nothing is pending. The result must arrive M + 1
// cycles after start.
module tb_cn_selector;
  import nbats_pkg::*;

  localparam int M = 23;
  localparam int IW = $clog2(M);

  logic clk = 0, rst_n = 0, start = 0;
  logic [IW-1:0] rd_idx, sel_idx;
  logic done, found, sel_unsat;
  logic  pend  [M];
  logic  unsat [M];
  stab_t stab  [M];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cn_selector #(.M(M)) dut (
    .clk, .rst_n, .start, .rd_idx, .rd_pend(pend[rd_idx]), .rd_unsat(unsat[rd_idx]),
    .rd_stab(stab[rd_idx]), .done, .found, .sel_idx, .sel_unsat);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int exp_i, lat;
      bit exp_u;
      for (int i = 0; i < M; i++) begin
        pend[i]  = (n % 7 == 6) ? 1'b0 : ($urandom % 3 != 0);
        unsat[i] = (n % 5 == 4) ? 1'b0 : ($urandom % 4 == 0);
        stab[i]  = stab_t'($urandom % 8);
      end
      exp_i = -1;
      exp_u = 0;
      for (int i = 0; i < M; i++) if (pend[i] && unsat[i]) begin
        if (exp_i < 0 || stab[i] > stab[exp_i]) exp_i = i;
        exp_u = 1;
      end
      if (exp_i < 0)
        for (int i = 0; i < M; i++) if (pend[i])
          if (exp_i < 0 || stab[i] > stab[exp_i]) exp_i = i;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (found != (exp_i >= 0) || (exp_i >= 0 && (int'(sel_idx) != exp_i || sel_unsat != exp_u))) begin
        failures++;
        $display("FAIL n=%0d found=%0d sel=%0d unsat=%0d exp %0d %0d", n, found, sel_idx, sel_unsat, exp_i, exp_u);
      end
      checks++;
      if (lat != M + 1) begin
        failures++;
        $display("FAIL latency %0d", lat);
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
