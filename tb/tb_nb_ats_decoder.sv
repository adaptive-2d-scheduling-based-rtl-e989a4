// tb_nb_ats_decoder: end-to-end test of the ATS decoder on a small code.
//
// Code: N = 214 symbols, M = 53 checks, column weight 3 (same matrix
// construction as the default code, smaller circulants). The all-zero
// codeword (every cell in state 0) is sent; soft reads are generated from
// the state labelling and corrupted with adjacent-state and non-adjacent
// errors. Frames run in all four modes (full / simplified ATS, EC on/off).
// Checked: success flag against an independently computed syndrome of the
// output, decoded symbols against the sent codeword for correctable
// frames, iteration count limits, the start-up latency of an error-free
// frame, and that every scheduling mechanism occurred.
module tb_nb_ats_decoder;
  import nbats_pkg::*;

  localparam int N = 214, M = 53, DV = 3, SA = 2, SB = 11;
  localparam int IMAX = 12;
  localparam int NB = (N + M - 1) / M;
  localparam int SLOTS = NB * DV;

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

  nb_ats_decoder #(.N(N), .M(M), .DV(DV), .SHIFT_A(SA), .SHIFT_B(SB), .IMAX(IMAX)) dut (
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

  // ------------------------------------------------------------------
  // Reference model of the decoding schedule, written from the algorithm:
  // same matrix, same tie rules (lowest symbol / lowest check index,
  // stable VN order), plain integer arithmetic.
  int mR[N][4], mz[N], mzini[N], msv[N];
  int ms[M], msc[M], mm1[M], mm2[M], mm1s[M];
  int ginv_t[4] = '{0, 1, 3, 2};

  function automatic int cn_of(int j, int t);
    int p = j / M, u = j % M;
    return (u + (SA * t * (p + 1) + SB * t * t) % M) % M;
  endfunction

  function automatic int coef_of(int j, int t);
    int p = j / M, u = j % M;
    return ((t + p + u) % 3) + 1;
  endfunction

  // argmax (lowest index on tie) and max minus second max
  function automatic void top2(int r[4], output int idx, output int st);
    int b = 0, sec = -1000000;
    for (int l = 1; l < 4; l++) if (r[l] > r[b]) b = l;
    for (int l = 0; l < 4; l++) if (l != b && r[l] > sec) sec = r[l];
    idx = b;
    st = r[b] - sec;
  endfunction

  function automatic int clamp(int v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : v;
  endfunction

  // row i in slot order: columns, coefficients, slot numbers
  function automatic void row_of(int i, output int cols[$], output int cfs[$], output int sls[$]);
    cols.delete(); cfs.delete(); sls.delete();
    for (int p = 0; p < NB; p++)
      for (int t = 0; t < DV; t++) begin
        int sh = (SA * t * (p + 1) + SB * t * t) % M;
        int u = (i - sh + M) % M;
        if (p * M + u < N) begin
          cols.push_back(p * M + u);
          cfs.push_back(coef_of(p * M + u, t));
          sls.push_back(p * DV + t);
        end
      end
  endfunction

  function automatic void refresh_cn(int i, bit with_phi);
    int cols[$], cfs[$], sls[$];
    int syn = 0, mn = 65535, a = 65535, b = 65535, as = 0;
    row_of(i, cols, cfs, sls);
    foreach (cols[x]) begin
      int c = cols[x], mq, mx, dummy;
      syn ^= gmul(cfs[x], mz[c]);
      if (msv[c] < mn) mn = msv[c];
      top2(mR[c], dummy, mx);
      mx = mR[c][dummy];
      mq = (mx < 0) ? 0 : mx / 5;
      if (mq < a) begin b = a; a = mq; as = sls[x]; end
      else if (mq < b) b = mq;
    end
    ms[i] = syn;
    msc[i] = (mn == 0) ? 10 : mn;
    if (with_phi) begin
      mm1[i] = a; mm2[i] = b; mm1s[i] = as;
    end
  endfunction

  task automatic ref_decode(bit ec, bit simpl, int glog2, output bit succ, output int iters);
    int G = 1 << glog2;
    bit grouped = (glog2 > 0);
    int Rw[N][4], zw[N], acc[N][4];
    bit wv[N], av[N];
    int k = 0;
    for (int j = 0; j < N; j++) begin
      logic [1:0] b;
      for (int l = 0; l < 4; l++) begin
        b = cell_bits(gf4_t'(l));
        mR[j][l] = 5 * ((b[1] ? int'(lq1[j]) : -int'(lq1[j])) + (b[0] ? int'(lq2[j]) : -int'(lq2[j])));
      end
      top2(mR[j], mz[j], msv[j]);
      mzini[j] = mz[j];
    end
    for (int i = 0; i < M; i++) refresh_cn(i, 1);
    forever begin
      bit any = 0;
      foreach (ms[i]) if (ms[i] != 0) any = 1;
      if (!any || k >= IMAX) begin
        succ = !any;
        iters = k;
        return;
      end
      foreach (av[j]) av[j] = 0;
      for (int g = 0; g < G; g++) begin
        bit pend[M];
        int lo = (g * M) >> glog2, hi = ((g + 1) * M) >> glog2;
        foreach (wv[j]) wv[j] = 0;
        foreach (pend[i]) pend[i] = grouped ? (i >= lo && i < hi) : 1;
        forever begin
          int sel = -1, su = 0;
          int cols[$], cfs[$], sls[$], ord[$];
          int sloc = 0;
          for (int i = 0; i < M; i++) if (pend[i]) begin
            int u = (ms[i] != 0);
            if (sel < 0 || u > su || (u == su && msc[i] > msc[sel])) begin sel = i; su = u; end
          end
          if (sel < 0) break;
          pend[sel] = 0;
          row_of(sel, cols, cfs, sls);
          ord.delete();
          for (int key = DV; key >= 0; key--)
            foreach (cols[x]) begin
              int o = 0;
              for (int t = 0; t < DV; t++) if (ms[cn_of(cols[x], t)] != 0) o++;
              if (o == key) ord.push_back(x);
            end
          foreach (cols[x]) sloc ^= gmul(cfs[x], (grouped && wv[cols[x]]) ? zw[cols[x]] : mz[cols[x]]);
          foreach (ord[y]) begin
            int x = ord[y], c = cols[x], h = cfs[x];
            int rv[4], rn[4], zv, zh, zn, svn, phi, d;
            bit acc_ok;
            for (int l = 0; l < 4; l++) rv[l] = (grouped && wv[c]) ? Rw[c][l] : mR[c][l];
            zv = (grouped && wv[c]) ? zw[c] : mz[c];
            phi = (sls[x] == mm1s[sel]) ? mm2[sel] : mm1[sel];
            zh = zv ^ gmul(ginv_t[h], sloc);
            d = zh - mzini[c];
            acc_ok = !(ec && k <= 1) || (d >= -1 && d <= 1);
            if (!acc_ok) continue;
            rn = rv;
            rn[zh] = clamp(rv[zh] + phi);
            top2(rn, zn, svn);
            sloc ^= gmul(h, zv ^ zn);
            if (grouped) begin
              for (int l = 0; l < 4; l++) acc[c][l] = clamp((av[c] ? acc[c][l] : 0) + rn[l] - rv[l]);
              Rw[c] = rn; zw[c] = zn; wv[c] = 1; av[c] = 1;
            end else begin
              bit chg = (zn != mz[c]) || (svn != msv[c]);
              mR[c] = rn; mz[c] = zn; msv[c] = svn;
              if (!simpl && chg)
                for (int t = 0; t < DV; t++) refresh_cn(cn_of(c, t), 0);
            end
          end
        end
      end
      if (grouped)
        for (int j = 0; j < N; j++) if (av[j]) begin
          for (int l = 0; l < 4; l++) mR[j][l] = clamp(mR[j][l] + acc[j][l]);
          top2(mR[j], mz[j], msv[j]);
        end
      for (int i = 0; i < M; i++) refresh_cn(i, 1);
      k++;
    end
  endtask

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
    check(lat == longint'(M * (SLOTS + 1) + 1), $sformatf("clean frame latency %0d", lat));

    for (int f = 0; f < 26; f++) begin
      bit ec, simpl;
      int gl;
      ec = f[0];
      simpl = f[1];
      gl = (f < 12) ? 0 : (f < 18) ? 1 + (f % 2) : f % 3;
      if (f < 18) build_frame(2 + f % 4, (f % 3 == 0) ? 1 : 0, 0);
      else        build_frame(8 + 3 * (f % 6), 2, 0);
      run_frame(ec, simpl, gl, succ, iters, lat);
      $display("frame %0d ec=%0d simpl=%0d groups=%0d succ=%0d iters=%0d", f, ec, simpl, 1 << gl, succ, iters);
      check(succ == (syn_weight(dec) == 0), $sformatf("frame %0d success flag vs syndrome", f));
      check(iters <= IMAX, "iteration bound");
      begin
        bit rs;
        int ri, md;
        ref_decode(ec, simpl, gl, rs, ri);
        md = 0;
        foreach (dec[j]) if (dec[j] != mz[j]) md++;
        check(rs == succ && ri == iters && md == 0,
              $sformatf("frame %0d vs reference model: succ %0d/%0d iters %0d/%0d symbol mismatches %0d",
                        f, succ, rs, iters, ri, md));
      end
      if (succ) begin
        errs = 0;
        foreach (dec[j]) if (dec[j] != 0) errs++;
        check(errs == 0, $sformatf("frame %0d decoded to sent codeword (%0d symbol errors)", f, errs));
      end else begin
        n_fail_frames++;
        check(iters == IMAX, "failed frame ran IMAX iterations");
      end
    end

    // noise frame: random soft reads, must not be declared a codeword falsely
    build_frame(0, 0, -1);
    run_frame(1'b0, 1'b1, 0, succ, iters, lat);
    check(succ == (syn_weight(dec) == 0), "noise frame success flag vs syndrome");
    if (!succ) begin
      n_fail_frames++;
      check(iters == IMAX, "noise frame ran IMAX iterations");
    end

    $display("events: sel_unsat=%0d sel_sat=%0d ec_reject=%0d sym_change=%0d nbr_refresh=%0d iter=%0d merge=%0d fail_frames=%0d",
             n_unsat, n_sat, n_ecrej, n_chg, n_nbr, n_iter, n_merge, n_fail_frames);
    check(n_unsat > 0, "unsatisfied check selected");
    check(n_sat > 0, "satisfied check selected");
    check(n_ecrej > 0, "EC criterion rejected a prediction");
    check(n_chg > 0, "symbol corrected");
    check(n_nbr > 0, "full-ATS immediate neighbour refresh");
    check(n_iter > 0, "iterations ran");
    check(n_fail_frames > 0, "decoding failure / iteration limit reached");
    check(n_simpl_frames > 0 && n_full_frames > 0, "both schedule variants ran");
    check(n_group_frames > 0 && n_merge > 0, "group-parallel frames merged group reliabilities");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
