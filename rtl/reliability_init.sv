// reliability_init: initial symbol reliabilities of one MLC cell.
//
// For every GF(4) symbol l the initial reliability measure is
//   phi_l = sum_t (2*a_{l,t} - 1) * q_t
// where a_{l,t} are the two page bits stored in state l and q_t the signed
// soft reads of the two pages; R0_l = LAMBDA * phi_l. The tentative
// decision z0 is the symbol of largest R0 (lowest index on a tie) and sv0
// the VN stability, largest minus second largest R0.
//
// Purely combinational. The formula, LAMBDA = 5 and the state labelling
// (11, 10, 00, 01 from the lowest state up) follow the decoder's
// definition; the sign convention of q (positive favours a stored 1) and
// the tie rule are this design's choices.
module reliability_init
  import nbats_pkg::*;
#(
  parameter int LAMBDA = 5
) (
  input  llr_t  q1,     // soft read of page bit t=1
  input  llr_t  q2,     // soft read of page bit t=2
  output rvec_t r0,     // LAMBDA * phi_l for l = 0..3
  output gf4_t  z0,     // initial hard decision
  output stab_t sv0     // initial VN stability
);

  top2_t top;

  always_comb begin
    for (int l = 0; l < Q; l++) begin
      logic [1:0] b;
      int         phi;
      b     = cell_bits(gf4_t'(l));
      phi   = (b[1] ? int'(q1) : -int'(q1)) + (b[0] ? int'(q2) : -int'(q2));
      r0[l] = rel_t'(LAMBDA * phi);
    end
    top = rel_top2(r0);
    z0  = top.idx;
    sv0 = stab_of(top);
  end

endmodule
