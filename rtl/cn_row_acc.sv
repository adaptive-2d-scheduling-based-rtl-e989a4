// cn_row_acc: per-check accumulator over the VNs of one row of H.
//
// Fed one VN of the check per cycle, it accumulates
//   - the syndrome s_i = sum_j h_{i,j} z_j over GF(4);
//   - the check stability S_c = min_j S_v(j), replaced by THETA when that
//     minimum is 0;
//   - the two smallest values of floor(max_l R_{j,l} / LAMBDA) and the slot
//     of the smallest, from which the extrinsic weight
//     phi_{i,j} = min over j' != j is read out as min2 for the slot of the
//     smallest and min1 for every other slot.
// A cycle with start high begins a new check (it discards the previous
// totals before adding its own input, if in_valid). Results are registered
// and valid the cycle after the last input. The three formulas follow the
// decoding algorithm (S_c with THETA = 10, the weight with LAMBDA = 5);
// storing the weight per check as min1/min2/slot is this design's choice.
module cn_row_acc
  import nbats_pkg::*;
#(
  parameter int LAMBDA = 5,
  parameter int THETA  = 10,
  parameter int SLW    = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           in_valid,
  input  logic [SLW-1:0] in_slot,
  input  gf4_t           in_h,
  input  gf4_t           in_z,
  input  stab_t          in_sv,
  input  rel_t           in_rmax,
  output gf4_t           syn,
  output stab_t          sc,
  output stab_t          min1,
  output stab_t          min2,
  output logic [SLW-1:0] min1_slot
);

  stab_t min_sv;
  stab_t mq;

  always_comb begin
    mq = in_rmax[R_W-1] ? '0 : stab_t'(in_rmax / rel_t'(LAMBDA));
    sc = (min_sv == '0) ? stab_t'(THETA) : min_sv;
  end

  gf4_t           n_syn;
  stab_t          n_sv, n_m1, n_m2;
  logic [SLW-1:0] n_slot;

  always_comb begin
    n_syn  = start ? '0 : syn;
    n_sv   = start ? STAB_MAX : min_sv;
    n_m1   = start ? STAB_MAX : min1;
    n_m2   = start ? STAB_MAX : min2;
    n_slot = start ? '0 : min1_slot;
    if (in_valid) begin
      n_syn = gf4_add(n_syn, gf4_mul(in_h, in_z));
      if (in_sv < n_sv) n_sv = in_sv;
      if (mq < n_m1) begin
        n_m2   = n_m1;
        n_m1   = mq;
        n_slot = in_slot;
      end else if (mq < n_m2) begin
        n_m2 = mq;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      syn       <= '0;
      min_sv    <= STAB_MAX;
      min1      <= STAB_MAX;
      min2      <= STAB_MAX;
      min1_slot <= '0;
    end else begin
      syn       <= n_syn;
      min_sv    <= n_sv;
      min1      <= n_m1;
      min2      <= n_m2;
      min1_slot <= n_slot;
    end
  end

endmodule
