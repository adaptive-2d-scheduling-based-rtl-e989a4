// tb_vn_order_sort: random rows of VN descriptors with keys 0..KMAX are
// written, sorted and read back. The result must list the entries by
// descending key and, within a key, in input order; sorted must pulse
// count + 1 cycles after sort_start.
module tb_vn_order_sort;
  localparam int DMAX = 15, KMAX = 3, DW = 8;
  localparam int KW = $clog2(KMAX + 1), CW = $clog2(DMAX + 1);

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, sort_start = 0, sorted;
  logic [KW-1:0] in_key = '0;
  logic [DW-1:0] in_data = '0, rd_data;
  logic [CW-1:0] count, rd_idx = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vn_order_sort #(.DMAX(DMAX), .KMAX(KMAX), .DW(DW)) dut (
    .clk, .rst_n, .clear, .in_valid, .in_key, .in_data, .sort_start, .sorted,
    .count, .rd_idx, .rd_data);

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int d, lat, k[DMAX], v[DMAX], exp_v[$];
      d = 1 + $urandom % DMAX;
      @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      for (int i = 0; i < d; i++) begin
        k[i] = $urandom % (KMAX + 1);
        v[i] = $urandom % 256;
        in_valid = 1;
        in_key = KW'(k[i]);
        in_data = DW'(v[i]);
        @(negedge clk);
      end
      in_valid = 0;
      exp_v.delete();
      for (int key = KMAX; key >= 0; key--)
        for (int i = 0; i < d; i++) if (k[i] == key) exp_v.push_back(v[i]);
      sort_start = 1;
      @(negedge clk);
      sort_start = 0;
      lat = 1;
      while (!sorted) begin
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != d + 1 || int'(count) != d) begin
        failures++;
        $display("FAIL latency %0d count %0d for d=%0d", lat, count, d);
      end
      for (int i = 0; i < d; i++) begin
        rd_idx = CW'(i);
        #1;
        checks++;
        if (int'(rd_data) != exp_v[i]) begin
          failures++;
          $display("FAIL n=%0d pos %0d got %0d exp %0d", n, i, rd_data, exp_v[i]);
        end
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
