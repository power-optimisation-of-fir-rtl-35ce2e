// dbnr_index_calc -- multiplies or divides two double-base digits by index calculus.
//
// With a = s_a * 2^b_a * 3^t_a and b = s_b * 2^b_b * 3^t_b:
//   a * b = (s_a*s_b, b_a + b_b, t_a + t_b)
//   a / b = (s_a*s_b, b_a - b_b, t_a - t_b)
// so both are two small adders (or subtractors) and an xor of the signs; the
// result stays in DBNR form. A zero operand gives a zero product; a zero
// divisor raises div0. If an exponent of the result does not fit dbnr_t's
// fields, ovf is raised and the result is not valid.
//
// Interface and timing: combinational. div selects division.
// The two formulas are the published index calculus; the zero handling, the
// flags and the widths (dbns_pkg) are this design's own.
module dbnr_index_calc
  import dbns_pkg::*;
(
  input  dbnr_t a,
  input  dbnr_t b,
  input  logic  div,
  output dbnr_t r,
  output logic  ovf,
  output logic  div0
);

  logic signed [BSUM_W-1:0] bres;
  logic signed [TSUM_W-1:0] tres;

  always_comb begin
    if (div) begin
      bres = BSUM_W'(a.b) - BSUM_W'(b.b);
      tres = TSUM_W'(a.t) - TSUM_W'(b.t);
    end else begin
      bres = BSUM_W'(a.b) + BSUM_W'(b.b);
      tres = TSUM_W'(a.t) + TSUM_W'(b.t);
    end
    div0   = div && b.zero;
    r      = '0;
    r.zero = a.zero || (!div && b.zero);
    ovf    = 1'b0;
    if (!r.zero && !div0) begin
      r.neg = a.neg ^ b.neg;
      r.b   = bres[BEXP_W-1:0];
      r.t   = tres[TEXP_W-1:0];
      ovf   = (bres != BSUM_W'(r.b)) || (tres != TSUM_W'(r.t));
    end
  end

endmodule
