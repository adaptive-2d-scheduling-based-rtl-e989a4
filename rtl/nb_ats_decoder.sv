// nb_ats_decoder: nonbinary majority-logic decoder with adaptive 2D
// scheduling (ATS) for a GF(4) LDPC code stored one symbol per MLC cell.
//
// Decoding works on soft reliabilities R_{j,l} of every symbol j and value
// l. Instead of updating all checks at once, each iteration visits every
// check node exactly once in an adaptive order (the first dimension of the
// schedule): the next check is the unsatisfied one of largest check
// stability S_c (the smallest VN stability in it), and only when no
// unsatisfied check is left the satisfied one of largest S_c. Inside the
// check the VNs are updated in descending order of their cumulative
// syndrome O_v, the number of unsatisfied checks they belong to (second
// dimension). Each VN update predicts the symbol implied by the rest of the
// check, adds the check's extrinsic weight phi to its reliability and
// re-takes the hard decision. The extrinsic weights
// phi_{i,j} = min_{j' != j} floor(max_l R_{j',l} / LAMBDA) are refreshed at
// the end of every iteration. Decoding stops when every syndrome is zero
// (success) or after IMAX iterations.
//
// Variants selected at run time (sampled with the first input symbol):
//   cfg_simplified = 0  full ATS: after every VN update the syndromes and
//                       check stabilities of all DV checks of that VN are
//                       recomputed at once, so the schedule always sees
//                       up-to-date information;
//   cfg_simplified = 1  S-ATS: syndromes and stabilities are refreshed only
//                       in the end-of-iteration pass (the predicted symbol
//                       still uses an exact running syndrome of the check).
//   cfg_ec_en      = 1  early-correcting criterion during iterations
//                       k <= I_MLC (see ec_filter).
//
// Interface and timing:
//   load   llr_valid/llr_ready, one symbol per cycle in order j = 0..N-1,
//          two signed 5-bit soft reads (page bit 1, page bit 2);
//   result dec_done pulses when decoding ends, with dec_success and
//          dec_iters (completed iterations) held until the next load; the
//          decoded symbols then stream out on out_valid/out_ready (out_last
//          on j = N-1);
//   ev_*   one-cycle event strobes for monitoring (check chosen while
//          unsatisfied / satisfied, EC rejection, symbol changed,
//          immediate neighbour refresh, reliability saturation, iteration
//          start).
// Cycle cost: one pass over all checks (M * NB*DV cycles) at start and at
// the end of each iteration; per check M + 1 cycles for selection, NB*DV
// to read the row, count + 2 to sort, one per VN update, and in full ATS
// DV * (NB*DV + 1) per VN update for the neighbour refresh.
//
// The scheduling rules, formulas and default constants (N = 4544 symbols,
// rate 0.9, column weight 5, LAMBDA = 5, THETA = 10, IMAX = 50,
// I_MLC = 1, 5-bit soft reads) follow the algorithm. The storage
// organisation, the sequential (one check at a time) datapath, the
// parity-check matrix construction (h_matrix_map), the 16-bit saturating
// reliabilities and the streaming interface are this design's choices.
module nb_ats_decoder
  import nbats_pkg::*;
#(
  parameter int N       = 4544,  // code length in GF(4) symbols
  parameter int M       = 454,   // number of checks
  parameter int DV      = 5,     // column weight
  parameter int SHIFT_A = 2,     // parity-check matrix construction
  parameter int SHIFT_B = 11,
  parameter int LAMBDA  = 5,     // reliability scaling factor
  parameter int THETA   = 10,    // check stability when a VN is tied
  parameter int IMAX    = 50,    // maximum number of iterations
  parameter int I_MLC   = 1,     // last iteration with the EC criterion
  parameter int GMAX_LOG2 = 2,   // up to 2**GMAX_LOG2 check-node groups
  localparam int NB   = (N + M - 1) / M,
  localparam int SLOTS = NB * DV,
  localparam int VIW  = $clog2(N),
  localparam int CIW  = (M > 1) ? $clog2(M) : 1,
  localparam int PW   = (NB > 1) ? $clog2(NB) : 1,
  localparam int TW   = (DV > 1) ? $clog2(DV) : 1,
  localparam int SLW  = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int KW   = $clog2(DV + 1),
  localparam int CW   = $clog2(SLOTS + 1),
  localparam int ITW  = $clog2(IMAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_ec_en,
  input  logic           cfg_simplified,
  input  logic [1:0]     cfg_group_log2,
  input  logic           llr_valid,
  output logic           llr_ready,
  input  llr_t           llr_q1,
  input  llr_t           llr_q2,
  output logic           dec_done,
  output logic           dec_success,
  output logic [ITW-1:0] dec_iters,
  output logic           out_valid,
  input  logic           out_ready,
  output gf4_t           out_sym,
  output logic           out_last,
  output logic           ev_sel_unsat,
  output logic           ev_sel_sat,
  output logic           ev_ec_reject,
  output logic           ev_sym_change,
  output logic           ev_nbr_refresh,
  output logic           ev_saturate,
  output logic           ev_iter,
  output logic           ev_group_merge
);

  typedef enum logic [3:0] {
    ST_IDLE, ST_LOAD, ST_PASS, ST_PASS_WR, ST_CHECK, ST_SEL, ST_SEL_WAIT,
    ST_ROW, ST_SORT_GO, ST_SORT_WAIT, ST_VN, ST_NBR, ST_NBR_WR, ST_MERGE,
    ST_OUT
  } state_t;

  // descriptor of one VN of the selected check
  typedef struct packed {
    logic [VIW-1:0] col;
    gf4_t           coef;
    logic [SLW-1:0] slot;
  } vn_desc_t;
  localparam int DW = $bits(vn_desc_t);

  // ---------------------------------------------------------------- storage
  // per variable node
  rvec_t          rel_mem  [N];
  gf4_t           z_mem    [N];
  gf4_t           zini_mem [N];
  stab_t          sv_mem   [N];
  // per check node
  gf4_t           s_mem    [M];
  stab_t          sc_mem   [M];
  stab_t          m1_mem   [M];
  stab_t          m2_mem   [M];
  logic [SLW-1:0] m1s_mem  [M];
  logic [M-1:0]   pend;
  // group-parallel mode: reliabilities of the group being processed and
  // the sum of the increments of all groups of this iteration
  rvec_t          rw_mem   [N];
  gf4_t           zw_mem   [N];
  rvec_t          acc_mem  [N];
  logic [N-1:0]   rw_valid;
  logic [N-1:0]   acc_valid;

  // ---------------------------------------------------------------- control
  state_t          state;
  logic            mode_ec, mode_simpl;
  logic [1:0]      mode_glog2;  // log2 of the number of check-node groups
  logic [GMAX_LOG2:0] grp;      // group being processed
  logic [M-1:0]    grp_mask;    // checks of group grp_nxt
  logic [GMAX_LOG2:0] grp_nxt;
  wire             grouped = (mode_glog2 != 2'd0);
  logic [VIW-1:0]  vidx;       // load / output index
  logic [CIW-1:0]  pcn;        // check of the end-of-iteration pass
  logic [PW-1:0]   rp;         // row slot: block
  logic [TW-1:0]   rt;         // row slot: edge
  logic [SLW-1:0]  rslot;      // row slot: linear index
  logic [ITW-1:0]  iter;       // completed iterations
  logic [CIW-1:0]  sel_cn;
  gf4_t            s_loc;      // running syndrome of the selected check
  logic [CW-1:0]   nu;         // position in the VN order
  logic [DV-1:0][CIW-1:0] nbr_cn;
  logic [TW-1:0]   nbr_t;

  wire last_slot = (rslot == SLW'(SLOTS - 1));

  // ---------------------------------------------------------------- H map
  logic [CIW-1:0]         hm_row_cn;
  logic                   hm_row_valid;
  logic [VIW-1:0]         hm_row_col;
  gf4_t                   hm_row_coef;
  logic [VIW-1:0]         hm_col_vn;
  logic [DV-1:0][CIW-1:0] hm_col_cn;
  gf4_t [DV-1:0]          hm_col_coef;

  h_matrix_map #(
    .N(N), .M(M), .DV(DV), .SHIFT_A(SHIFT_A), .SHIFT_B(SHIFT_B)
  ) u_hmap (
    .row_cn    (hm_row_cn),
    .row_p     (rp),
    .row_t     (rt),
    .row_valid (hm_row_valid),
    .row_col   (hm_row_col),
    .row_coef  (hm_row_coef),
    .col_vn    (hm_col_vn),
    .col_cn    (hm_col_cn),
    .col_coef  (hm_col_coef)
  );

  always_comb begin
    case (state)
      ST_ROW:  hm_row_cn = sel_cn;
      ST_NBR:  hm_row_cn = nbr_cn[nbr_t];
      default: hm_row_cn = pcn;
    endcase
  end

  assign grp_nxt = (state == ST_CHECK) ? '0 : grp + 1'b1;

  // checks of group g: [floor(g*M/G), floor((g+1)*M/G)), in index order
  always_comb begin
    int lo, hi;
    lo = (int'(grp_nxt) * M) >> mode_glog2;
    hi = ((int'(grp_nxt) + 1) * M) >> mode_glog2;
    for (int i = 0; i < M; i++) grp_mask[i] = (i >= lo) && (i < hi);
  end

  // ---------------------------------------------------------------- init
  rvec_t init_r;
  gf4_t  init_z;
  stab_t init_sv;

  reliability_init #(.LAMBDA(LAMBDA)) u_init (
    .q1 (llr_q1), .q2 (llr_q2), .r0 (init_r), .z0 (init_z), .sv0 (init_sv)
  );

  // ---------------------------------------------------------------- row accumulator
  gf4_t           acc_syn;
  stab_t          acc_sc, acc_m1, acc_m2;
  logic [SLW-1:0] acc_m1s;
  top2_t          row_top;
  wire            acc_feed = (state == ST_PASS) || (state == ST_NBR);

  assign row_top = rel_top2(rel_mem[hm_row_col]);

  cn_row_acc #(.LAMBDA(LAMBDA), .THETA(THETA), .SLW(SLW)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (acc_feed && rslot == '0),
    .in_valid  (acc_feed && hm_row_valid),
    .in_slot   (rslot),
    .in_h      (hm_row_coef),
    .in_z      (z_mem[hm_row_col]),  // pass: base decisions
    .in_sv     (sv_mem[hm_row_col]),
    .in_rmax   (row_top.max1),
    .syn       (acc_syn),
    .sc        (acc_sc),
    .min1      (acc_m1),
    .min2      (acc_m2),
    .min1_slot (acc_m1s)
  );

  // ---------------------------------------------------------------- selector
  logic [CIW-1:0] cs_idx, cs_sel;
  logic           cs_done, cs_found, cs_unsat;

  cn_selector #(.M(M)) u_sel (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (state == ST_SEL),
    .rd_idx    (cs_idx),
    .rd_pend   (pend[cs_idx]),
    .rd_unsat  (s_mem[cs_idx] != '0),
    .rd_stab   (sc_mem[cs_idx]),
    .done      (cs_done),
    .found     (cs_found),
    .sel_idx   (cs_sel),
    .sel_unsat (cs_unsat)
  );

  // ---------------------------------------------------------------- VN order
  logic [KW-1:0] osum;       // cumulative syndrome of the row VN
  logic          so_sorted;
  logic [CW-1:0] so_count;
  logic [DW-1:0] so_rd;
  vn_desc_t      cur;

  assign hm_col_vn = (state == ST_VN) ? cur.col : hm_row_col;

  always_comb begin
    osum = '0;
    for (int t = 0; t < DV; t++)
      if (s_mem[hm_col_cn[t]] != '0) osum = osum + 1'b1;
  end

  vn_order_sort #(.DMAX(SLOTS), .KMAX(DV), .DW(DW)) u_sort (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (state == ST_SEL),
    .in_valid   (state == ST_ROW && hm_row_valid),
    .in_key     (osum),
    .in_data    ({hm_row_col, hm_row_coef, rslot}),
    .sort_start (state == ST_SORT_GO),
    .sorted     (so_sorted),
    .count      (so_count),
    .rd_idx     (nu),
    .rd_data    (so_rd)
  );

  assign cur = vn_desc_t'(so_rd);

  // ---------------------------------------------------------------- VN update
  gf4_t  vu_zhat, vu_z;
  logic  vu_accept, vu_sat;
  rvec_t vu_r;
  stab_t vu_sv, vu_phi;
  logic  ec_active;

  assign ec_active = mode_ec && (int'(iter) <= I_MLC);
  assign vu_phi    = (cur.slot == m1s_mem[sel_cn]) ? m2_mem[sel_cn] : m1_mem[sel_cn];

  // reliability / decision of a VN as seen by the current group
  rvec_t r_view;
  gf4_t  z_view, zrow_view;
  assign r_view    = (grouped && rw_valid[cur.col]) ? rw_mem[cur.col] : rel_mem[cur.col];
  assign z_view    = (grouped && rw_valid[cur.col]) ? zw_mem[cur.col] : z_mem[cur.col];
  assign zrow_view = (grouped && rw_valid[hm_row_col]) ? zw_mem[hm_row_col] : z_mem[hm_row_col];

  vn_update u_vn (
    .r_in      (r_view),
    .z_in      (z_view),
    .z_ini     (zini_mem[cur.col]),
    .s_row     (s_loc),
    .h         (cur.coef),
    .phi       (vu_phi),
    .ec_active (ec_active),
    .z_hat     (vu_zhat),
    .accept    (vu_accept),
    .saturated (vu_sat),
    .r_out     (vu_r),
    .z_out     (vu_z),
    .sv_out    (vu_sv)
  );

  wire vn_last  = (nu == so_count - 1'b1);
  wire vn_chg   = vu_accept && ((vu_z != z_view) || (vu_sv != sv_mem[cur.col]));

  // increment of this update added to the group sum (saturating)
  rvec_t acc_new;
  always_comb begin
    for (int l = 0; l < Q; l++) begin
      logic signed [R_W+1:0] a;
      a = (acc_valid[cur.col] ? {{2{acc_mem[cur.col][l][R_W-1]}}, acc_mem[cur.col][l]} : '0)
        + {{2{vu_r[l][R_W-1]}}, vu_r[l]} - {{2{r_view[l][R_W-1]}}, r_view[l]};
      acc_new[l] = (a > $signed({2'b00, REL_MAX})) ? REL_MAX :
                   (a < $signed({2'b11, REL_MIN})) ? REL_MIN : rel_t'(a);
    end
  end

  // merge: R = R_base + sum of group increments (saturating)
  rvec_t mg_r;
  top2_t mg_top;
  always_comb begin
    for (int l = 0; l < Q; l++) begin
      logic signed [R_W+1:0] a;
      a = {{2{rel_mem[vidx][l][R_W-1]}}, rel_mem[vidx][l]}
        + {{2{acc_mem[vidx][l][R_W-1]}}, acc_mem[vidx][l]};
      mg_r[l] = (a > $signed({2'b00, REL_MAX})) ? REL_MAX :
                (a < $signed({2'b11, REL_MIN})) ? REL_MIN : rel_t'(a);
    end
    mg_top = rel_top2(mg_r);
  end

  logic s_any;
  always_comb begin
    s_any = 1'b0;
    for (int i = 0; i < M; i++) s_any = s_any | (s_mem[i] != '0);
  end

  // ---------------------------------------------------------------- outputs
  assign llr_ready = (state == ST_IDLE) || (state == ST_LOAD);
  assign out_valid = (state == ST_OUT);
  assign out_sym   = z_mem[vidx];
  assign out_last  = (state == ST_OUT) && (vidx == VIW'(N - 1));

  assign ev_sel_unsat   = (state == ST_SEL_WAIT) && cs_done && cs_found && cs_unsat;
  assign ev_sel_sat     = (state == ST_SEL_WAIT) && cs_done && cs_found && !cs_unsat;
  assign ev_ec_reject   = (state == ST_VN) && !vu_accept;
  assign ev_sym_change  = (state == ST_VN) && vu_accept && (vu_z != z_view);
  assign ev_nbr_refresh = (state == ST_VN) && !mode_simpl && !grouped && vn_chg;
  assign ev_group_merge = (state == ST_MERGE) && (vidx == '0);
  assign ev_saturate    = (state == ST_VN) && vu_sat;
  assign ev_iter        = (state == ST_CHECK) && s_any && (int'(iter) < IMAX);

  // ---------------------------------------------------------------- datapath / FSM
  // row slot counters run in the scanning states and rest at 0 elsewhere
  wire row_scan = (state == ST_PASS) || (state == ST_ROW) || (state == ST_NBR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rslot <= '0;
      rt    <= '0;
      rp    <= '0;
    end else if (!row_scan) begin
      rslot <= '0;
      rt    <= '0;
      rp    <= '0;
    end else begin
      rslot <= rslot + 1'b1;
      if (rt == TW'(DV - 1)) begin
        rt <= '0;
        rp <= rp + 1'b1;
      end else begin
        rt <= rt + 1'b1;
      end
    end
  end

  // storage: no reset, every entry is written before it is read
  always_ff @(posedge clk) begin
    if (llr_valid && llr_ready) begin
      rel_mem[vidx]  <= init_r;
      z_mem[vidx]    <= init_z;
      zini_mem[vidx] <= init_z;
      sv_mem[vidx]   <= init_sv;
    end
    if (state == ST_VN && vu_accept && !grouped) begin
      rel_mem[cur.col] <= vu_r;
      z_mem[cur.col]   <= vu_z;
      sv_mem[cur.col]  <= vu_sv;
    end
    if (state == ST_VN && vu_accept && grouped) begin
      rw_mem[cur.col]  <= vu_r;
      zw_mem[cur.col]  <= vu_z;
      acc_mem[cur.col] <= acc_new;
    end
    if (state == ST_MERGE && acc_valid[vidx]) begin
      rel_mem[vidx] <= mg_r;
      z_mem[vidx]   <= mg_top.idx;
      sv_mem[vidx]  <= stab_of(mg_top);
    end
    if (state == ST_PASS_WR) begin
      s_mem[pcn]   <= acc_syn;
      sc_mem[pcn]  <= acc_sc;
      m1_mem[pcn]  <= acc_m1;
      m2_mem[pcn]  <= acc_m2;
      m1s_mem[pcn] <= acc_m1s;
    end
    if (state == ST_NBR_WR) begin
      s_mem[nbr_cn[nbr_t]]  <= acc_syn;
      sc_mem[nbr_cn[nbr_t]] <= acc_sc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      mode_ec     <= 1'b0;
      mode_simpl  <= 1'b0;
      mode_glog2  <= '0;
      grp         <= '0;
      rw_valid    <= '0;
      acc_valid   <= '0;
      vidx        <= '0;
      pcn         <= '0;
      iter        <= '0;
      sel_cn      <= '0;
      s_loc       <= '0;
      nu          <= '0;
      nbr_cn      <= '0;
      nbr_t       <= '0;
      pend        <= '0;
      dec_done    <= 1'b0;
      dec_success <= 1'b0;
      dec_iters   <= '0;
    end else begin
      dec_done <= 1'b0;
      case (state)
        ST_IDLE: begin
          vidx <= '0;
          if (llr_valid) begin
            mode_ec    <= cfg_ec_en;
            mode_simpl <= cfg_simplified;
            mode_glog2 <= (int'(cfg_group_log2) > GMAX_LOG2) ? 2'(GMAX_LOG2) : cfg_group_log2;
            vidx       <= VIW'(1);
            state      <= (N == 1) ? ST_PASS : ST_LOAD;
            pcn        <= '0;
            iter       <= '0;
            end
        end

        ST_LOAD: if (llr_valid) begin
          if (vidx == VIW'(N - 1)) begin
            state <= ST_PASS;
            pcn   <= '0;
            iter  <= '0;
            end
          vidx <= vidx + 1'b1;
        end

        // refresh syndrome, check stability and extrinsic weight of all checks
        ST_PASS: begin
          if (last_slot) state <= ST_PASS_WR;
        end

        ST_PASS_WR: begin
          if (pcn == CIW'(M - 1)) begin
            state <= ST_CHECK;
          end else begin
            pcn   <= pcn + 1'b1;
            state <= ST_PASS;
          end
        end

        ST_CHECK: begin
          if (!s_any || int'(iter) >= IMAX) begin
            dec_done    <= 1'b1;
            dec_success <= !s_any;
            dec_iters   <= iter;
            vidx        <= '0;
            state       <= ST_OUT;
          end else begin
            pend      <= grouped ? grp_mask : '1;
            grp       <= '0;
            rw_valid  <= '0;
            acc_valid <= '0;
            state     <= ST_SEL;
          end
        end

        ST_SEL: state <= ST_SEL_WAIT;

        ST_SEL_WAIT: if (cs_done) begin
          if (cs_found) begin
            sel_cn       <= cs_sel;
            pend[cs_sel] <= 1'b0;
            s_loc        <= '0;
            state        <= ST_ROW;
          end else if (grouped && (int'(grp) + 1 < (1 << mode_glog2))) begin
            // next group starts from the reliabilities of the iteration start
            grp      <= grp + 1'b1;
            pend     <= grp_mask;
            rw_valid <= '0;
            state    <= ST_SEL;
          end else if (grouped) begin
            vidx  <= '0;
            state <= ST_MERGE;
          end else begin
            iter  <= iter + 1'b1;
            pcn   <= '0;
            state <= ST_PASS;
          end
        end

        // read the row: running syndrome and VN keys into the sorter
        ST_ROW: begin
          if (hm_row_valid)
            s_loc <= gf4_add(s_loc, gf4_mul(hm_row_coef, zrow_view));
          if (last_slot) state <= ST_SORT_GO;
        end

        ST_SORT_GO: state <= ST_SORT_WAIT;

        ST_SORT_WAIT: if (so_sorted) begin
          nu    <= '0;
          state <= (so_count == '0) ? ST_SEL : ST_VN;
        end

        ST_VN: begin
          if (vu_accept)
            s_loc <= gf4_add(s_loc, gf4_mul(cur.coef, gf4_add(z_view, vu_z)));
          if (vu_accept && grouped) begin
            rw_valid[cur.col]  <= 1'b1;
            acc_valid[cur.col] <= 1'b1;
          end
          if (!mode_simpl && !grouped && vn_chg) begin
            nbr_cn <= hm_col_cn;
            nbr_t  <= '0;
              state  <= ST_NBR;
          end else if (vn_last) begin
            state <= ST_SEL;
          end else begin
            nu <= nu + 1'b1;
          end
        end

        // full ATS: recompute syndrome and stability of each check of the VN
        ST_NBR: begin
          if (last_slot) state <= ST_NBR_WR;
        end

        ST_NBR_WR: begin
          if (nbr_t == TW'(DV - 1)) begin
            if (vn_last) begin
              state <= ST_SEL;
            end else begin
              nu    <= nu + 1'b1;
              state <= ST_VN;
            end
          end else begin
            nbr_t <= nbr_t + 1'b1;
            state <= ST_NBR;
          end
        end

        // group sums folded into the reliabilities of the next iteration
        ST_MERGE: begin
          if (vidx == VIW'(N - 1)) begin
            vidx  <= '0;
            iter  <= iter + 1'b1;
            pcn   <= '0;
            state <= ST_PASS;
          end else begin
            vidx <= vidx + 1'b1;
          end
        end

        ST_OUT: if (out_ready) begin
          vidx <= vidx + 1'b1;
          if (vidx == VIW'(N - 1)) state <= ST_IDLE;
        end

        default: state <= ST_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- rules
  // an offered output symbol stays until it is taken
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_sym) && $stable(vidx));
  // the result is offered right after dec_done
  a_done_out: assert property (@(posedge clk) disable iff (!rst_n)
    dec_done |-> out_valid);
  // never more than IMAX iterations
  a_iter_bound: assert property (@(posedge clk) disable iff (!rst_n)
    int'(iter) <= IMAX);

endmodule
