// dbns_pkg -- shared definitions of the double-base (DBNS) index-calculus FIR.
//
// A non-zero integer x is held as a single double-base digit
//     x ~ s * 2^b * 3^t,
// with a sign s and two signed exponents: b (binary) and t (ternary). With
// both exponents allowed to be negative, one digit approximates any value;
// the ternary range fixes how closely. A product is then formed by index
// calculus: the signs multiply and the exponents add, b1+b2 and t1+t2.
// That much, and the idea of converting 3^t back to a floating-point value
// m * 2^n through a ROM before a barrel shifter, follows the published
// design. The widths below, the ternary range [-32, 31], the 1.15 mantissa
// and the "closest digit" rule used to build the conversion table are this
// design's own choices.
//
// The package holds:
//   * the widths shared by all modules,
//   * dbnr_t, the DBNR operand (zero flag, sign, b, t),
//   * to_dbnr(), which finds the digit closest to an integer (in log2), used
//     at elaboration to fill the data-conversion ROM and to convert the fixed
//     coefficients,
//   * ter_fp(), which gives 3^t as m * 2^n, used to fill the ternary ROM.
// The functions use real arithmetic only at elaboration; no real value
// reaches the hardware.
package dbns_pkg;

  // Binary exponent of one operand (two's complement).
  localparam int BEXP_W    = 8;
  // Ternary exponent of one operand (two's complement), range [-32, 31].
  localparam int TEXP_W    = 6;
  localparam int TEXP_MIN  = -(2 ** (TEXP_W - 1));
  localparam int TEXP_MAX  = 2 ** (TEXP_W - 1) - 1;
  // Sums of two exponents need one bit more.
  localparam int BSUM_W    = BEXP_W + 1;
  localparam int TSUM_W    = TEXP_W + 1;
  // Mantissa of 3^t in 1.(MANT_W-1) format: value = m / 2^(MANT_W-1), in [1, 2).
  localparam int MANT_W    = 16;
  localparam int FRAC_W    = MANT_W - 1;
  // Binary exponent n of 3^t for t in the sum range [-64, 63]: |n| <= 102.
  localparam int NEXP_W    = 8;
  // Shift range of the barrel shifter, +-16 places.
  localparam int SHIFT_MAX = 16;
  // Width of the exponent sum b1 + b2 + n fed to the shifter.
  localparam int ESUM_W    = 10;

  localparam real LOG2_3 = 1.5849625007211562;

  // One double-base digit. When zero is set the other fields are 0.
  typedef struct packed {
    logic                     zero;
    logic                     neg;
    logic signed [BEXP_W-1:0] b;
    logic signed [TEXP_W-1:0] t;
  } dbnr_t;

  // 3^t as a floating-point value m * 2^(n - FRAC_W).
  typedef struct packed {
    logic        [MANT_W-1:0] m;
    logic signed [NEXP_W-1:0] n;
  } ter_fp_t;

  // Closest single digit to v: the pair (b, t) that minimises
  // |log2|v| - b - t*log2(3)|, t in [TEXP_MIN, TEXP_MAX]. Candidates are
  // tried in order of increasing |t| (0, 1, -1, 2, -2, ...) and only a
  // strictly better one replaces the current choice, so exact 2-integers
  // such as 12 = 2^2 * 3 get the smallest ternary exponent.
  function automatic dbnr_t to_dbnr(int v);
    dbnr_t r;
    real   lv, e, err, best;
    int    t, bb;
    r    = '0;
    best = 2.0;
    r.zero = (v == 0);
    r.neg  = (v < 0);
    lv = $ln(real'((v < 0) ? -v : (v == 0) ? 1 : v)) / $ln(2.0);
    for (int k = 0; k <= 2 * (TEXP_MAX + 1) && v != 0; k++) begin
      t = (k % 2 == 1) ? (k + 1) / 2 : -(k / 2);
      if (t >= TEXP_MIN && t <= TEXP_MAX) begin
        e   = lv - real'(t) * LOG2_3;
        bb  = $rtoi($floor(e + 0.5));
        err = e - real'(bb);
        if (err < 0.0) err = -err;
        if (err < best - 1.0e-12 && bb >= -(2 ** (BEXP_W - 1)) && bb < 2 ** (BEXP_W - 1)) begin
          best = err;
          r.b  = BEXP_W'(bb);
          r.t  = TEXP_W'(t);
        end
      end
    end
    return r;
  endfunction

  // 3^t = m * 2^(n - FRAC_W), m rounded to MANT_W bits with its top bit set.
  function automatic ter_fp_t ter_fp(int t);
    ter_fp_t r;
    real     p, f;
    int      n, m;
    p = real'(t) * LOG2_3;
    n = $rtoi($floor(p));
    f = p - real'(n);
    m = $rtoi($floor($pow(2.0, f) * real'(2 ** FRAC_W) + 0.5));
    if (m >= 2 ** MANT_W) begin
      m = 2 ** FRAC_W;
      n = n + 1;
    end
    r.m = MANT_W'(m);
    r.n = NEXP_W'(n);
    return r;
  endfunction

endpackage
