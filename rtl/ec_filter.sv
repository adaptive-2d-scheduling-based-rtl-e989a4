// ec_filter: early-correcting (EC) criterion for MLC flash.
//
// In the first iterations (ec_active) a predicted symbol is only accepted
// when it is the initial hard decision of the cell or one of the
// neighbouring threshold-voltage states (0 -> {1}, 1 -> {0,2}, 2 -> {1,3},
// 3 -> {2}); any other prediction points to a large non-adjacent error that
// the criterion treats as unreliable, so the reliability update is skipped.
// When ec_active is low every prediction is accepted.
//
// Purely combinational. The adjacency sets follow the EC definition;
// in_adj reports membership of the adjacent set alone.
module ec_filter
  import nbats_pkg::*;
(
  input  logic ec_active,  // iteration index k <= I_MLC and EC enabled
  input  gf4_t z_ini,      // initial hard decision of the cell
  input  gf4_t z_hat,      // predicted symbol from the selected check
  output logic in_adj,     // z_hat is a state adjacent to z_ini
  output logic accept      // update the reliabilities with z_hat
);

  always_comb begin
    in_adj = ec_allowed(z_hat, z_ini) && (z_hat != z_ini);
    accept = !ec_active || ec_allowed(z_hat, z_ini);
  end

endmodule
