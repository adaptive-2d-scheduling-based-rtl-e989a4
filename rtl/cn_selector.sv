// cn_selector: adaptive check-node selection of the 2D schedule.
//
// Among the check nodes not yet processed in this iteration (pending bit
// P_i = 1) it returns the unsatisfied check (non-zero syndrome) of largest
// check stability S_c; when no pending check is unsatisfied it returns the
// pending satisfied check of largest S_c. found is low when no check is
// pending, which ends the iteration.
//
// The scan is sequential: after a start pulse it presents rd_idx = 0..M-1
// for one cycle each and samples the caller's rd_pend / rd_unsat / rd_stab
// for that index in the same cycle (combinational read). done pulses one
// cycle after the last index, with sel_idx / sel_unsat / found held until
// the next start. Latency M + 1 cycles. The priority rule follows the
// schedule definition; the sequential scan (one comparator) and the tie
// rule (lowest index wins) are this design's choices.
module cn_selector
  import nbats_pkg::*;
#(
  parameter int M  = 454,
  localparam int IW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic [IW-1:0] rd_idx,
  input  logic          rd_pend,
  input  logic          rd_unsat,
  input  stab_t         rd_stab,
  output logic          done,
  output logic          found,
  output logic [IW-1:0] sel_idx,
  output logic          sel_unsat
);

  logic  busy;
  logic  have;
  stab_t best_stab;
  logic  take;

  logic [IW-1:0] sel_scan_idx;

  assign rd_idx = sel_scan_idx;

  always_comb begin
    take = busy && rd_pend &&
           (!have || ({rd_unsat, rd_stab} > {sel_unsat, best_stab}));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= 1'b0;
      have         <= 1'b0;
      done         <= 1'b0;
      found        <= 1'b0;
      sel_scan_idx <= '0;
      sel_idx      <= '0;
      sel_unsat    <= 1'b0;
      best_stab    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy         <= 1'b1;
        have         <= 1'b0;
        found        <= 1'b0;
        sel_unsat    <= 1'b0;
        best_stab    <= '0;
        sel_scan_idx <= '0;
      end else if (busy) begin
        if (take) begin
          have      <= 1'b1;
          sel_idx   <= sel_scan_idx;
          sel_unsat <= rd_unsat;
          best_stab <= rd_stab;
        end
        if (sel_scan_idx == IW'(M - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          found <= have || take;
        end else begin
          sel_scan_idx <= sel_scan_idx + 1'b1;
        end
      end
    end
  end

endmodule
