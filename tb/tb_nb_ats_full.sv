// tb_nb_ats_full: the decoder at its default size (N = 4544 GF(4) symbols,
// M = 454 checks, column weight 5, IMAX = 50) decodes an error-free frame
// and four frames with 40 adjacent-state and 3 non-adjacent errors on the
// all-zero codeword: full schedule, simplified schedule, and the full
// schedule with 2 and with 4 groups, all with the early-correcting criterion. Checked:
// success flag against an independently computed syndrome of the output,
// decoded symbols against the sent codeword, the start-up latency of the
// error-free frame, and that the scheduling mechanisms occurred.
module tb_nb_ats_full;
  import nbats_pkg::*;

  localparam int N = 4544, M = 454, DV = 5, SA = 2, SB = 11;
  localparam int IMAX = 50;
  localparam int NB = (N + M - 1) / M;
  localparam int SLOTS = NB * DV;
  localparam int LAT_CLEAN_I = M * (SLOTS + 1) + 1;
  localparam longint LAT_CLEAN = longint'(LAT_CLEAN_I);

  logic clk = 0, rst_n = 0;
  logic cfg_ec_en, cfg_simplified;
  logic [1:0] cfg_group_log2;
  logic llr_valid, llr_ready, out_valid, out_ready, out_last;
  llr_t q1, q2;
  logic dec_done, dec_success;
  logic [$clog2(IMAX+1)-1:0] dec_iters;
  gf4_t out_sym;
  logic ev_sel_unsat, ev_sel_sat, ev_ec_reject, ev_sym_change, ev_nbr_refresh, ev_saturate, ev_iter, ev_group_merge;

  int checks = 0, failures = 0;
  int n_unsat = 0, n_sat = 0, n_ecrej = 0, n_chg = 0, n_nbr = 0, n_iter = 0, n_fail_frames = 0;
  int n_simpl_frames = 0, n_full_frames = 0, n_merge = 0, n_group_frames = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  nb_ats_decoder dut (
    .clk, .rst_n, .cfg_ec_en, .cfg_simplified, .cfg_group_log2, .llr_valid, .llr_ready,
    .llr_q1(q1), .llr_q2(q2), .dec_done, .dec_success, .dec_iters,
    .out_valid, .out_ready, .out_sym, .out_last,
    .ev_sel_unsat, .ev_sel_sat, .ev_ec_reject, .ev_sym_change, .ev_nbr_refresh,
    .ev_saturate, .ev_iter, .ev_group_merge);

  always @(posedge clk) if (rst_n) begin
    n_unsat += int'(ev_sel_unsat);
    n_sat   += int'(ev_sel_sat);
    n_ecrej += int'(ev_ec_reject);
    n_chg   += int'(ev_sym_change);
    n_nbr   += int'(ev_nbr_refresh);
    n_iter  += int'(ev_iter);
    n_merge += int'(ev_group_merge);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // independent GF(4) multiply by table (poly x^2+x+1)
  function automatic int gmul(int a, int b);
    int lg[4] = '{0, 0, 1, 2};
    if (a == 0 || b == 0) return 0;
    case ((lg[a] + lg[b]) % 3)
      0: return 1;
      1: return 2;
      default: return 3;
    endcase
  endfunction

  // syndrome weight of a word under the matrix construction
  function automatic int syn_weight(int w[N]);
    int s[M];
    int cnt = 0;
    foreach (s[i]) s[i] = 0;
    for (int j = 0; j < N; j++) begin
      int p = j / M, u = j % M;
      for (int t = 0; t < DV; t++) begin
        int r = (u + (SA * t * (p + 1) + SB * t * t) % M) % M;
        s[r] = s[r] ^ gmul(((t + p + u) % 3) + 1, w[j]);
      end
    end
    foreach (s[i]) if (s[i] != 0) cnt++;
    return cnt;
  endfunction

  int rx_state[N];
  llr_t lq1[N], lq2[N];
  int dec[N];

  // soft reads for a cell read as state st with confidence mag
  task automatic make_llr(int j, int st, int mag);
    logic [1:0] b;
    b = cell_bits(gf4_t'(st));
    lq1[j] = llr_t'(b[1] ? mag : -mag);
    lq2[j] = llr_t'(b[0] ? mag : -mag);
  endtask

  // nadj adjacent errors and nfar non-adjacent errors on the zero codeword
  task automatic build_frame(int nadj, int nfar, int seed_off);
    for (int j = 0; j < N; j++) begin
      make_llr(j, 0, 6 + ($urandom % 8));
      rx_state[j] = 0;
    end
    for (int e = 0; e < nadj; e++) begin
      int j = $urandom % N;
      make_llr(j, 1, 1 + ($urandom % 3));
      rx_state[j] = 1;
    end
    for (int e = 0; e < nfar; e++) begin
      int j = $urandom % N;
      make_llr(j, 2, 1 + ($urandom % 2));
      rx_state[j] = 2;
    end
    if (seed_off < 0) begin
      for (int j = 0; j < N; j++) begin
        lq1[j] = llr_t'($urandom % 31 - 15);
        lq2[j] = llr_t'($urandom % 31 - 15);
      end
    end
  endtask

  task automatic run_frame(bit ec, bit simpl, int glog2, output bit succ, output int iters,
                           output longint lat);
    longint t_last;
    cfg_ec_en = ec;
    cfg_simplified = simpl;
    cfg_group_log2 = 2'(glog2);
    @(negedge clk);
    for (int j = 0; j < N; j++) begin
      llr_valid = 1;
      q1 = lq1[j];
      q2 = lq2[j];
      @(posedge clk);
      while (!llr_ready) @(posedge clk);
      #1;
    end
    llr_valid = 0;
    t_last = cyc;
    while (!dec_done) @(posedge clk);
    lat = cyc - t_last;
    #1;
    succ = dec_success;
    iters = int'(dec_iters);
    out_ready = 1;
    for (int j = 0; j < N; j++) begin
      @(posedge clk);
      while (!out_valid) @(posedge clk);
      dec[j] = int'(out_sym);
      if (j == N - 1) check(out_last, "out_last on final symbol");
    end
    @(negedge clk);
    out_ready = 0;
    if (glog2 > 0) n_group_frames++;
    if (simpl) n_simpl_frames++;
    else       n_full_frames++;
  endtask

  initial begin
    bit succ;
    int iters, errs;
    longint lat;
    llr_valid = 0;
    out_ready = 0;
    cfg_ec_en = 0;
    cfg_simplified = 0;
    cfg_group_log2 = 0;
    q1 = '0;
    q2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // error-free frame: decided after the first pass
    build_frame(0, 0, 0);
    run_frame(1'b1, 1'b0, 0, succ, iters, lat);
    check(succ && iters == 0, "clean frame decoded with 0 iterations");
    check(lat == LAT_CLEAN, $sformatf("clean frame latency %0d", lat));

    // NB-EC-ATS (full schedule, early correcting) and NB-EC-S-ATS frames
    for (int f = 0; f < 4; f++) begin
      build_frame(40, 3, 0);
      run_frame(1'b1, f == 1, (f >= 2) ? f - 1 : 0, succ, iters, lat);
      $display("frame %0d simpl=%0d groups_log2=%0d succ=%0d iters=%0d", f, f == 1, (f >= 2) ? f - 1 : 0, succ, iters);
      check(succ == (syn_weight(dec) == 0), "success flag vs syndrome");
      check(succ, "frame decoded");
      errs = 0;
      foreach (dec[j]) if (dec[j] != 0) errs++;
      check(errs == 0, $sformatf("decoded to sent codeword (%0d symbol errors)", errs));
    end

    $display("events: sel_unsat=%0d sel_sat=%0d ec_reject=%0d sym_change=%0d nbr_refresh=%0d iter=%0d merge=%0d fail_frames=%0d",
             n_unsat, n_sat, n_ecrej, n_chg, n_nbr, n_iter, n_merge, n_fail_frames);
    check(n_unsat > 0, "unsatisfied check selected");
    check(n_sat > 0, "satisfied check selected");
    check(n_ecrej > 0, "EC criterion rejected a prediction");
    check(n_chg > 0, "symbol corrected");
    check(n_nbr > 0, "full-ATS immediate neighbour refresh");
    check(n_iter > 0, "iterations ran");
    check(n_simpl_frames > 0 && n_full_frames > 0, "both schedule variants ran");
    check(n_group_frames > 0 && n_merge > 0, "group-parallel frames merged group reliabilities");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
