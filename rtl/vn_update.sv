// vn_update: one majority-logic variable-node update.
//
// Given the current syndrome s_row of the selected check c_i and the
// coefficient h = h_{i,j}, the symbol predicted for v_j by the other
// symbols of the check is
//   z_hat = h^-1 * sum_{j' != j} h_{i,j'} z_{j'} = z_j + h^-1 * s_row
// (characteristic 2). If the EC filter accepts it, the extrinsic weight
// phi of the check is added to the reliability of z_hat (saturating), and
// the new hard decision (arg max) and VN stability (max minus second max)
// are produced. A rejected prediction leaves the VN untouched.
//
// Purely combinational. The predicted-symbol formula, the arg-max decision
// and the stability follow the decoding algorithm; adding phi to the one
// predicted symbol is the standard soft-reliability majority vote, and the
// saturation is this design's choice.
module vn_update
  import nbats_pkg::*;
(
  input  rvec_t r_in,       // reliabilities R_{j,l}
  input  gf4_t  z_in,       // current hard decision z_j
  input  gf4_t  z_ini,      // initial hard decision (for EC)
  input  gf4_t  s_row,      // current syndrome of the selected check
  input  gf4_t  h,          // non-zero coefficient h_{i,j}
  input  stab_t phi,        // extrinsic weight of (i, j)
  input  logic  ec_active,
  output gf4_t  z_hat,      // predicted symbol
  output logic  accept,     // prediction passed the EC filter
  output logic  saturated,  // reliability clipped at REL_MAX
  output rvec_t r_out,
  output gf4_t  z_out,
  output stab_t sv_out
);

  logic  in_adj_unused;
  top2_t top;

  ec_filter u_ec (
    .ec_active (ec_active),
    .z_ini     (z_ini),
    .z_hat     (z_hat),
    .in_adj    (in_adj_unused),
    .accept    (accept)
  );

  assign z_hat = gf4_add(z_in, gf4_mul(gf4_inv(h), s_row));

  always_comb begin
    logic signed [R_W+1:0] sum;
    r_out     = r_in;
    saturated = 1'b0;
    sum       = {{2{r_in[z_hat][R_W-1]}}, r_in[z_hat]} + $signed({2'b00, phi});
    if (accept) begin
      if (sum > $signed({{2{1'b0}}, REL_MAX})) begin
        r_out[z_hat] = REL_MAX;
        saturated    = 1'b1;
      end else begin
        r_out[z_hat] = rel_t'(sum);
      end
    end
    top    = rel_top2(r_out);
    z_out  = accept ? top.idx : z_in;
    sv_out = stab_of(top);
  end

endmodule
