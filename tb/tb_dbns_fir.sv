// tb_dbns_fir -- end-to-end test of the 8-tap double-base FIR at its default size.
//
// The filter is used exactly as delivered (8 taps, 8-bit data, coefficients
// 1 2 3 4 4 3 2 1). A cycle model tracks which sample each tap has seen:
// the output after edge i+1 belongs to the sample applied before edge i.
// After every edge the output is checked three ways:
//   * against the sum of the nearest-digit products, computed here in real
//     numbers, to within the 16-bit mantissa and 15-fraction-bit truncation;
//   * against the exact convolution, to within 2 % of sum |c_k x_k| plus 1;
//   * bit for bit against the exact convolution whenever every sample in the
//     window is a 2-integer (then every product is exact).
// Stimulus: reset, an impulse (output must be the coefficients), the ramp
// 1..10, then random samples with extreme values and zeros, and resets in the
// middle of the stream. Counted and required to occur at least once: exact
// windows, approximated samples, negative products, zero samples and
// mid-stream resets. ovf must stay low throughout.
module tb_dbns_fir;
  import dbns_ref_pkg::*;

  localparam int TAPS  = 8;
  localparam int C [TAPS] = '{1, 2, 3, 4, 4, 3, 2, 1};
  localparam int ACC_W = 36;
  localparam int OUT_W = 21;

  logic                    clk = 0, rst;
  logic signed [7:0]       x;
  logic signed [ACC_W-1:0] y;
  logic signed [OUT_W-1:0] y_int;
  logic                    ovf;
  int                      checks = 0, failures = 0;
  int                      n_exact = 0, n_approx = 0, n_neg = 0, n_zero = 0, n_reset = 0;

  // Model state: sample held by the data register, and the samples every tap
  // has combined (dh[k] is the one tap k took k edges ago).
  int d_model;
  int dh [TAPS];

  dbns_fir dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic bit is_2int(int v);
    int r;
    r = (v < 0) ? -v : v;
    if (r == 0) return 1;
    while (r % 2 == 0) r /= 2;
    while (r % 3 == 0) r /= 3;
    return r == 1;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one sample (and reset value) before a rising edge, update the
  // model at the edge and check the output after it.
  task automatic step(int xv, bit r);
    longint exact, absum;
    real    ap, tol, term;
    bit     all_exact;
    @(negedge clk);
    x   = 8'(xv);
    rst = r;
    @(posedge clk);
    if (r) begin
      foreach (dh[k]) dh[k] = 0;
      d_model = 0;
    end else begin
      for (int k = TAPS - 1; k > 0; k--) dh[k] = dh[k-1];
      dh[0]   = d_model;
      d_model = xv;
    end
    #1;
    exact = 0; absum = 0; ap = 0.0; tol = 1.0e-6; all_exact = 1;
    for (int k = 0; k < TAPS; k++) begin
      exact += longint'(C[k]) * dh[k];
      absum += longint'(C[k]) * ((dh[k] < 0) ? -dh[k] : dh[k]);
      term   = best_digit(C[k]) * best_digit(dh[k]) * 32768.0;
      ap    += term;
      tol   += ((term < 0.0) ? -term : term) * $pow(2.0, -16.0) + 1.0;
      if (!is_2int(dh[k])) all_exact = 0;
      if (dh[k] < 0) n_neg++;
      if (dh[k] == 0 && !r) n_zero++;
    end
    check(!ovf, "ovf raised");
    check(real'(y) - ap <= tol && ap - real'(y) <= tol,
          $sformatf("y=%0d vs digit model %f (tol %f)", y, ap, tol));
    check(longint'(y_int) - exact <= absum / 50 + 1 && exact - longint'(y_int) <= absum / 50 + 1,
          $sformatf("y_int=%0d vs exact %0d", y_int, exact));
    check(longint'(y_int) == ((longint'(y) + 16384) >>> 15), "y_int is not y rounded");
    if (all_exact) begin
      n_exact++;
      check(longint'(y) == exact * 32768, $sformatf("exact window: y=%0d want %0d", y, exact * 32768));
    end else begin
      n_approx++;
    end
  endtask

  initial begin
    int v;
    x = 0;
    d_model = 0;
    foreach (dh[k]) dh[k] = 0;
    repeat (3) step(0, 1);
    // Impulse: the output must reproduce the coefficients, 2 cycles late.
    step(1, 0);
    check(y == 0, "output before latency elapsed");
    for (int k = 0; k < TAPS + 4; k++) begin
      step(0, 0);
      check(y_int == ((k < TAPS) ? OUT_W'(C[k]) : '0), $sformatf("impulse tap %0d: %0d", k, y_int));
    end
    // Ramp 1..10.
    for (int i = 1; i <= 10; i++) step(i, 0);
    $write("ramp outputs:");
    for (int i = 0; i < TAPS; i++) begin
      step(0, 0);
      $write(" %0d", y_int);
    end
    $display("");
    // Random samples, extremes and zeros, with resets in the stream.
    for (int i = 0; i < 4000; i++) begin
      case ($urandom_range(9))
        0:       v = -128;
        1:       v = 127;
        2:       v = 0;
        default: v = int'($urandom_range(255)) - 128;
      endcase
      if (i % 701 == 700) begin
        step(v, 1);
        n_reset++;
        check(y == 0, "reset did not clear the taps");
      end else begin
        step(v, 0);
      end
    end
    check(n_exact > 0 && n_approx > 0 && n_neg > 0 && n_zero > 0 && n_reset > 0,
          "a mechanism never occurred");
    $display("exact windows=%0d approximate windows=%0d negative products=%0d zero samples=%0d resets=%0d",
             n_exact, n_approx, n_neg, n_zero, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
