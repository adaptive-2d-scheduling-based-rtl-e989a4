// vn_order_sort: decoding order of the variable nodes of one check.
//
// The VNs of the selected check are processed in descending order of their
// cumulative syndrome O_v (number of unsatisfied checks the VN is in), so
// the VN most likely in error is corrected first. This block is a stable
// counting sort: entries (key = O_v, data = VN descriptor) are written one
// per cycle after a clear; a sort_start pulse computes the start offset of
// every key (largest key first) in one cycle and then places one entry per
// cycle. sorted pulses when the order is ready; rd_data is the entry at
// position rd_idx (combinational read). Latency count + 1 cycles after
// sort_start. Entries with equal key keep their input order. The ordering
// rule follows the schedule definition; counting sort is this design's
// choice (keys are small, 0..KMAX = column weight).
module vn_order_sort #(
  parameter int DMAX = 55,                       // largest check degree
  parameter int KMAX = 5,                        // largest key
  parameter int DW   = 21,                       // descriptor width
  localparam int KW  = $clog2(KMAX + 1),
  localparam int CW  = $clog2(DMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic [KW-1:0] in_key,
  input  logic [DW-1:0] in_data,
  input  logic          sort_start,
  output logic          sorted,
  output logic [CW-1:0] count,
  input  logic [CW-1:0] rd_idx,
  output logic [DW-1:0] rd_data
);

  logic [KW-1:0] key_buf [DMAX];
  logic [DW-1:0] dat_buf [DMAX];
  logic [DW-1:0] out_buf [DMAX];
  logic [CW-1:0] hist    [KMAX+1];
  logic [CW-1:0] base    [KMAX+1];
  logic [CW-1:0] start_off [KMAX+1];
  logic          placing;
  logic [CW-1:0] pidx;
  logic [KW-1:0] cur_key;

  // offsets with the largest key first
  always_comb begin
    start_off[KMAX] = '0;
    for (int k = KMAX - 1; k >= 0; k--) start_off[k] = start_off[k+1] + hist[k+1];
  end

  assign cur_key = key_buf[pidx];
  assign rd_data = out_buf[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count   <= '0;
      placing <= 1'b0;
      sorted  <= 1'b0;
      pidx    <= '0;
      for (int k = 0; k <= KMAX; k++) begin
        hist[k] <= '0;
        base[k] <= '0;
      end
    end else begin
      sorted <= 1'b0;
      if (clear) begin
        count   <= '0;
        placing <= 1'b0;
        for (int k = 0; k <= KMAX; k++) hist[k] <= '0;
      end else if (in_valid && count < CW'(DMAX)) begin
        key_buf[count] <= (in_key > KW'(KMAX)) ? KW'(KMAX) : in_key;
        dat_buf[count] <= in_data;
        hist[(in_key > KW'(KMAX)) ? KW'(KMAX) : in_key] <=
          hist[(in_key > KW'(KMAX)) ? KW'(KMAX) : in_key] + 1'b1;
        count <= count + 1'b1;
      end else if (sort_start) begin
        for (int k = 0; k <= KMAX; k++) base[k] <= start_off[k];
        pidx <= '0;
        if (count == '0) sorted  <= 1'b1;
        else             placing <= 1'b1;
      end else if (placing) begin
        out_buf[base[cur_key]] <= dat_buf[pidx];
        base[cur_key]          <= base[cur_key] + 1'b1;
        pidx                   <= pidx + 1'b1;
        if (pidx == count - 1'b1) begin
          placing <= 1'b0;
          sorted  <= 1'b1;
        end
      end
    end
  end

endmodule
