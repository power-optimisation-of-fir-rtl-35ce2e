// ter_rom -- ternary-exponent ROM: 3^t as a floating-point value m * 2^n.
//
// After the ternary exponents of the two operands are added, the sum t is not
// mapped back to a double-base digit. This ROM instead returns 3^t in a
// floating-point form m * 2^(n - FRAC_W): m is an unsigned MANT_W-bit
// mantissa with its top bit set (value in [1, 2)) and n a signed binary
// exponent. The binary exponent is later added to the operands' binary
// exponents and the sum drives the barrel shifter.
//
// Interface: t is a signed TSUM_W-bit ternary exponent sum; the table has an
// entry for every value of t (2^TSUM_W entries), filled at elaboration by
// dbns_pkg::ter_fp, m rounded to nearest. Combinational.
//
// The ROM and its role follow the published design; its width, its depth and
// the rounding are this design's choices.
module ter_rom
  import dbns_pkg::*;
(
  input  logic signed [TSUM_W-1:0] t,
  output logic        [MANT_W-1:0] m,
  output logic signed [NEXP_W-1:0] n
);

  localparam int DEPTH = 2 ** TSUM_W;

  typedef logic [$bits(ter_fp_t)-1:0] table_t [DEPTH];

  function automatic table_t fill();
    table_t tab;
    for (int i = 0; i < DEPTH; i++)
      tab[i] = ter_fp((i >= DEPTH / 2) ? i - DEPTH : i);
    return tab;
  endfunction

  localparam table_t TABLE = fill();

  ter_fp_t entry;

  assign entry = ter_fp_t'(TABLE[$unsigned(t)]);
  assign m     = entry.m;
  assign n     = entry.n;

endmodule
