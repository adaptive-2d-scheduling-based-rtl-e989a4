// tb_cn_row_acc: random rows are streamed through the accumulator (with
// some idle slots). Expected syndrome (GF(4) log tables), check stability
// (minimum VN stability, 10 when that minimum is 0) and the two smallest
// floor(max R / 5) with the slot of the smallest are computed here.
module tb_cn_row_acc;
  import nbats_pkg::*;

  localparam int SLW = 6;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic [SLW-1:0] in_slot = '0, min1_slot;
  gf4_t in_h = 2'd1, in_z = '0, syn;
  stab_t in_sv = '0, sc, min1, min2;
  rel_t in_rmax = '0;
  int checks = 0, failures = 0;

  int lg[4]  = '{-1, 0, 1, 2};
  int alg[3] = '{1, 2, 3};
  function automatic int gm(int a, int b);
    if (a == 0 || b == 0) return 0;
    return alg[(lg[a] + lg[b]) % 3];
  endfunction

  always #5 clk = ~clk;

  cn_row_acc #(.LAMBDA(5), .THETA(10), .SLW(SLW)) dut (
    .clk, .rst_n, .start, .in_valid, .in_slot, .in_h, .in_z, .in_sv, .in_rmax,
    .syn, .sc, .min1, .min2, .min1_slot);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int d, es, esv, em1, em2, eslot, mq;
      d = 2 + $urandom % 40;
      es = 0; esv = 65535; em1 = 65535; em2 = 65535; eslot = 0;
      for (int i = 0; i < d; i++) begin
        bit v;
        int h, z, sv, rm;
        v  = (i == 0) || ($urandom % 6 != 0);
        h  = 1 + $urandom % 3;
        z  = $urandom % 4;
        sv = (n % 4 == 0 && i == 3) ? 0 : 1 + $urandom % 500;
        rm = int'($urandom % 3000) - 100;
        @(negedge clk);
        start = (i == 0);
        in_valid = v;
        in_slot = SLW'(i);
        in_h = gf4_t'(h);
        in_z = gf4_t'(z);
        in_sv = stab_t'(sv);
        in_rmax = rel_t'(rm);
        if (v) begin
          es ^= gm(h, z);
          if (sv < esv) esv = sv;
          mq = (rm < 0) ? 0 : rm / 5;
          if (mq < em1) begin em2 = em1; em1 = mq; eslot = i; end
          else if (mq < em2) em2 = mq;
        end
      end
      @(negedge clk);
      start = 0;
      in_valid = 0;
      checks++;
      if (int'(syn) != es || int'(sc) != ((esv == 0) ? 10 : esv) || int'(min1) != em1 ||
          int'(min2) != em2 || int'(min1_slot) != eslot) begin
        failures++;
        $display("FAIL n=%0d syn=%0d/%0d sc=%0d/%0d m1=%0d/%0d m2=%0d/%0d slot=%0d/%0d",
                 n, syn, es, sc, esv, min1, em1, min2, em2, min1_slot, eslot);
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
