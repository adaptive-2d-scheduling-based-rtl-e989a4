// nbats_pkg: types, constants and GF(4) arithmetic shared by the nonbinary
// majority-logic (ATS-MLGD) decoder blocks.
//
// GF(4) elements are 2-bit words in polynomial basis over x^2 + x + 1
// (0, 1, a = 2'b10, a^2 = a + 1 = 2'b11); addition is XOR. The decoded
// symbol value 0..3 is also the MLC cell state index (state 0 = lowest
// threshold voltage). The two page bits stored in state 0..3 follow the
// Gray labelling 11, 10, 00, 01 (first digit = bit t=1, second = bit t=2).
//
// Reliabilities are signed R_W-bit integers and saturate at REL_MAX; the
// soft input is one signed LLR_W-bit value per page bit, positive values
// favouring a stored 1. Widths are this design's choice except LLR_W = 5,
// which is the soft-read resolution of the MLC flash channel.
package nbats_pkg;

  localparam int Q     = 4;   // field size, one symbol per MLC cell
  localparam int LLR_W = 5;   // quantized LLR per page bit
  localparam int R_W   = 16;  // reliability / stability width

  typedef logic [1:0]                   gf4_t;
  typedef logic signed [LLR_W-1:0]      llr_t;
  typedef logic signed [R_W-1:0]        rel_t;
  typedef logic [R_W-1:0]               stab_t;
  typedef rel_t [Q-1:0]                 rvec_t;

  localparam rel_t  REL_MAX  = {1'b0, {(R_W-1){1'b1}}};
  localparam rel_t  REL_MIN  = {1'b1, {(R_W-1){1'b0}}};
  localparam stab_t STAB_MAX = '1;

  // largest, second largest and index of the largest reliability
  typedef struct packed {
    gf4_t idx;
    rel_t max1;
    rel_t max2;
  } top2_t;

  function automatic gf4_t gf4_add(gf4_t a, gf4_t b);
    return a ^ b;
  endfunction

  function automatic gf4_t gf4_mul(gf4_t a, gf4_t b);
    logic c2, c1, c0;
    c2 = a[1] & b[1];
    c1 = (a[1] & b[0]) ^ (a[0] & b[1]);
    c0 = a[0] & b[0];
    return {c1 ^ c2, c0 ^ c2};   // x^2 = x + 1
  endfunction

  function automatic gf4_t gf4_inv(gf4_t a);
    case (a)
      2'd1:    return 2'd1;
      2'd2:    return 2'd3;
      2'd3:    return 2'd2;
      default: return 2'd0;     // zero has no inverse; never a coefficient
    endcase
  endfunction

  // page bits {t=1, t=2} stored in MLC state s
  function automatic logic [1:0] cell_bits(gf4_t s);
    case (s)
      2'd0:    return 2'b11;
      2'd1:    return 2'b10;
      2'd2:    return 2'b00;
      default: return 2'b01;
    endcase
  endfunction

  // ties resolve to the lowest symbol index; a tie leaves max2 == max1
  function automatic top2_t rel_top2(rvec_t r);
    top2_t o;
    o.idx  = 2'd0;
    o.max1 = r[0];
    o.max2 = REL_MIN;
    for (int l = 1; l < Q; l++) begin
      if (r[l] > o.max1) begin
        o.max2 = o.max1;
        o.max1 = r[l];
        o.idx  = gf4_t'(l);
      end else if (r[l] > o.max2) begin
        o.max2 = r[l];
      end
    end
    return o;
  endfunction

  // VN stability: largest minus second largest reliability
  function automatic stab_t stab_of(top2_t t);
    return stab_t'(t.max1 - t.max2);   // max1 >= max2, fits unsigned R_W
  endfunction

  // symbol lies in the initial state or a state adjacent to it
  function automatic logic ec_allowed(gf4_t z_hat, gf4_t z_ini);
    logic [2:0] a, b;
    a = {1'b0, z_hat};
    b = {1'b0, z_ini};
    return (a >= b) ? (a - b <= 3'd1) : (b - a <= 3'd1);
  endfunction

endpackage
