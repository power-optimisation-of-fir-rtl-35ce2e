// ipsp -- Inner Product Step Processor: a_out <= a_in + d * c by index calculus.
//
// One tap of the double-base FIR. Both operands arrive as double-base digits
// (dbnr_t, value s * 2^b * 3^t). The product is formed without a multiplier:
//   1. binary adder     bsum = d.b + c.b
//   2. ternary adder    tsum = d.t + c.t
//   3. ternary ROM      3^tsum = m * 2^(n - FRAC_W)           (ter_rom)
//   4. exponent sum     esum = bsum + n
//   5. barrel shifter   |d*c| ~ floor(m * 2^esum) / 2^FRAC_W   (barrel_shifter)
//   6. the product's sign is d.neg xor c.neg, and it is 0 if either is zero
//   7. accumulate adder a_in + product, registered into a_out.
// Steps 1-5 and 7 are the structure of the published processor; the sign and
// zero handling, the widths and the output register are this design's own.
//
// Number format: a_in, a_out and the product are two's-complement fixed point
// with FRAC_W (15) fraction bits. ovf is high in a cycle whose exponent sum
// lies beyond the shifter's +16 places (the product then saturates); with
// 8-bit operands it cannot happen.
//
// Timing: one clock. a_out takes a_in + d*c at each rising edge of clk and
// clears to 0 on a synchronous, active-high rst.
module ipsp
  import dbns_pkg::*;
#(
  parameter int ACC_W = 36
) (
  input  logic                    clk,
  input  logic                    rst,
  input  dbnr_t                   d,
  input  dbnr_t                   c,
  input  logic signed [ACC_W-1:0] a_in,
  output logic signed [ACC_W-1:0] a_out,
  output logic                    ovf
);

  localparam int P_W = MANT_W + SHIFT_MAX;

  logic signed [BSUM_W-1:0] bsum;
  logic signed [TSUM_W-1:0] tsum;
  logic        [MANT_W-1:0] m;
  logic signed [NEXP_W-1:0] n;
  logic signed [ESUM_W-1:0] esum;
  logic        [P_W-1:0]    mag;
  logic signed [ACC_W-1:0]  prod;
  logic                     shift_ovf;

  // Binary and ternary exponent adders.
  assign bsum = BSUM_W'(d.b) + BSUM_W'(c.b);
  assign tsum = TSUM_W'(d.t) + TSUM_W'(c.t);

  ter_rom u_ter_rom (
    .t (tsum),
    .m (m),
    .n (n)
  );

  // Exponent sum: binary exponents of the operands plus that of 3^tsum.
  assign esum = ESUM_W'(bsum) + ESUM_W'(n);

  barrel_shifter #(
    .IN_W      (MANT_W),
    .SHIFT_MAX (SHIFT_MAX),
    .SH_W      (ESUM_W)
  ) u_shifter (
    .m   (m),
    .sh  (esum),
    .p   (mag),
    .ovf (shift_ovf)
  );

  always_comb begin
    if (d.zero || c.zero)
      prod = '0;
    else if (d.neg ^ c.neg)
      prod = -$signed(ACC_W'(mag));
    else
      prod = $signed(ACC_W'(mag));
  end

  assign ovf = shift_ovf && !(d.zero || c.zero);

  // Accumulate adder and the tap register.
  always_ff @(posedge clk) begin
    if (rst)
      a_out <= '0;
    else
      a_out <= a_in + prod;
  end

endmodule
