// dbns_ref_pkg -- reference arithmetic for the double-base FIR testbenches.
//
// Works in real numbers, apart from the hardware: best_digit() searches all
// ternary exponents in [-32, 31] for the single digit 2^b * 3^t nearest (in
// log2) to |v| and returns its value; digit_value() evaluates a digit given by
// its exponents. The testbenches compare the hardware against these values
// with tolerances derived from the 16-bit mantissa and the 15 fraction bits.
package dbns_ref_pkg;

  localparam real L2_3   = 1.5849625007211562;
  localparam int  T_MIN  = -32;
  localparam int  T_MAX  = 31;

  function automatic real digit_value(int b, int t);
    return $pow(2.0, real'(b)) * $pow(3.0, real'(t));
  endfunction

  // Smallest |log2|v| - b - t*log2 3| over all t in range and integer b.
  function automatic real best_log_err(int v);
    real lv, e, err, best;
    best = 2.0;
    lv = $ln(real'(v < 0 ? -v : v)) / $ln(2.0);
    for (int t = T_MIN; t <= T_MAX; t++) begin
      e   = lv - real'(t) * L2_3;
      err = e - $floor(e + 0.5);
      if (err < 0.0) err = -err;
      if (err < best) best = err;
    end
    return best;
  endfunction

  // Signed value of the digit nearest to v (0 for v = 0).
  function automatic real best_digit(int v);
    real lv, e, err, best, val;
    best = 2.0;
    val  = 0.0;
    if (v == 0) return 0.0;
    lv = $ln(real'(v < 0 ? -v : v)) / $ln(2.0);
    for (int t = T_MIN; t <= T_MAX; t++) begin
      e   = lv - real'(t) * L2_3;
      err = e - $floor(e + 0.5);
      if (err < 0.0) err = -err;
      if (err < best) begin
        best = err;
        val  = digit_value(int'($floor(e + 0.5)), t);
      end
    end
    return (v < 0) ? -val : val;
  endfunction

endpackage
