// tb_dbns_top -- end-to-end test of the whole design at its default size.
//
// Filter part: impulse, the ramp 1..10 and 1500 random samples with
// mid-stream resets through fir_x; after every clock fir_y is checked against
// the sum of nearest-digit products (real arithmetic, tolerance from the
// mantissa and truncation), fir_y_int against the exact convolution (2 %),
// and bit for bit when the whole window is exact. Latency 2 is built into
// the cycle model.
// Map part: pairs of random 8-bit integers are converted by the greedy
// converter, the two maps are added and multiplied by the map units, and the
// results must have the values x+y and x*y (unless the unit reports
// overflow). Random dense maps are also added and multiplied to drive the
// units into overflow.
// Index-calculus part: digits of random integers are multiplied and divided
// and the result's value compared with real arithmetic; large exponents
// force overflow, a zero divisor div0.
// Counted, and each required at least once: exact and approximate filter
// windows, negative products, zero samples, resets; carries and rules I, II
// and III in both map units; overflow in both map units; correct map sums
// and products from converted integers; index-calculus products, quotients
// and overflows.
module tb_dbns_top;
  import dbns_ref_pkg::*;
  import dbns_map_pkg::*;
  import dbns_map_ref_pkg::*;

  localparam int TAPS = 8;
  localparam int C [TAPS] = '{1, 2, 3, 4, 4, 3, 2, 1};

  logic                   clk = 0, rst;
  logic signed [7:0]      fir_x;
  logic signed [35:0]     fir_y;
  logic signed [20:0]     fir_y_int;
  logic                   fir_ovf;
  logic                   conv_start, conv_busy, conv_done, conv_err;
  logic [7:0]             conv_x;
  logic [3:0][3:0]        conv_map;
  logic [4:0]             conv_digits;
  logic                   add_start, add_busy, add_done, add_ovf;
  logic [3:0][3:0]        add_a, add_b;
  logic [4:0][4:0]        add_sum;
  logic                   mul_start, mul_busy, mul_done, mul_ovf;
  logic [3:0][3:0]        mul_a, mul_b;
  logic [7:0][7:0]        mul_prod;
  dbns_pkg::dbnr_t        calc_a, calc_b, calc_r;
  logic                   calc_div, calc_ovf, calc_div0;
  int n_calc_mul = 0, n_calc_div = 0, n_calc_ovf = 0;

  int checks = 0, failures = 0;
  int n_exact = 0, n_approx = 0, n_neg = 0, n_zero = 0, n_reset = 0;
  int n_add_ok = 0, n_mul_ok = 0, n_add_ovf = 0, n_mul_ovf = 0;
  int add_rule [6], mul_rule [6];
  int d_model;
  int dh [TAPS];

  dbns_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (add_busy) add_rule[dut.u_add.fired]++;
    if (dut.u_mul.state == dut.u_mul.S_REDUCE) mul_rule[dut.u_mul.fired]++;
  end

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
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One filter sample before a rising edge; model update and checks after it.
  task automatic fir_step(int xv, bit r);
    longint exact, absum;
    real    ap, tol, term;
    bit     all_exact;
    @(negedge clk);
    fir_x = 8'(xv);
    rst   = r;
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
      absum += longint'(C[k]) * ((dh[k] < 0) ? -longint'(dh[k]) : longint'(dh[k]));
      term   = best_digit(C[k]) * best_digit(dh[k]) * 32768.0;
      ap    += term;
      tol   += ((term < 0.0) ? -term : term) * $pow(2.0, -16.0) + 1.0;
      if (!is_2int(dh[k])) all_exact = 0;
      if (dh[k] < 0) n_neg++;
      if (dh[k] == 0 && !r) n_zero++;
    end
    check(!fir_ovf, "fir_ovf raised");
    check(real'(fir_y) - ap <= tol && ap - real'(fir_y) <= tol,
          $sformatf("fir_y=%0d vs digit model %f", fir_y, ap));
    check(longint'(fir_y_int) - exact <= absum / 50 + 1 && exact - longint'(fir_y_int) <= absum / 50 + 1,
          $sformatf("fir_y_int=%0d vs exact %0d", fir_y_int, exact));
    if (all_exact) begin
      n_exact++;
      check(longint'(fir_y) == exact * 32768, "exact window");
    end else begin
      n_approx++;
    end
  endtask

  task automatic convert(int xv, output logic [3:0][3:0] m);
    @(negedge clk);
    conv_x = 8'(xv); conv_start = 1;
    @(negedge clk);
    conv_start = 0;
    while (!conv_done) @(negedge clk);
    check(!conv_err && map_val(64'(conv_map), 4, 4) == longint'(xv), $sformatf("conversion of %0d", xv));
    m = conv_map;
  endtask

  task automatic map_add(logic [3:0][3:0] aa, logic [3:0][3:0] bb);
    @(negedge clk);
    add_a = aa; add_b = bb; add_start = 1;
    @(negedge clk);
    add_start = 0;
    while (!add_done) @(negedge clk);
    if (add_ovf) n_add_ovf++;
    else begin
      check(map_val(64'(add_sum), 5, 5) == map_val(64'(aa), 4, 4) + map_val(64'(bb), 4, 4), "map sum");
      check(reduced(64'(add_sum), 5, 5), "sum not reduced");
    end
  endtask

  task automatic map_mul(logic [3:0][3:0] aa, logic [3:0][3:0] bb);
    @(negedge clk);
    mul_a = aa; mul_b = bb; mul_start = 1;
    @(negedge clk);
    mul_start = 0;
    while (!mul_done) @(negedge clk);
    if (mul_ovf) n_mul_ovf++;
    else begin
      check(map_val(64'(mul_prod), 8, 8) == map_val(64'(aa), 4, 4) * map_val(64'(bb), 4, 4), "map product");
      check(reduced(64'(mul_prod), 8, 8), "product not reduced");
    end
  endtask

  initial begin
    int v, xv, yv;
    logic [3:0][3:0] mx, my, ra, rb;
    foreach (add_rule[k]) begin add_rule[k] = 0; mul_rule[k] = 0; end
    calc_a = '0; calc_b = '0; calc_div = 0;
    fir_x = 0; conv_start = 0; conv_x = 0; add_start = 0; mul_start = 0;
    add_a = '0; add_b = '0; mul_a = '0; mul_b = '0;
    d_model = 0;
    foreach (dh[k]) dh[k] = 0;
    // ---- filter ----
    repeat (3) fir_step(0, 1);
    fir_step(1, 0);
    for (int k = 0; k < TAPS + 2; k++) begin
      fir_step(0, 0);
      check(fir_y_int == ((k < TAPS) ? 21'(C[k]) : '0), "impulse response");
    end
    for (int i = 1; i <= 10; i++) fir_step(i, 0);
    for (int i = 0; i < 1500; i++) begin
      case ($urandom_range(9))
        0:       v = -128;
        1:       v = 127;
        2:       v = 0;
        default: v = int'($urandom_range(255)) - 128;
      endcase
      if (i % 499 == 498) begin
        fir_step(v, 1);
        n_reset++;
        check(fir_y == 0, "reset");
      end else begin
        fir_step(v, 0);
      end
    end
    // ---- map arithmetic ----
    for (int n = 0; n < 300; n++) begin
      xv = $urandom_range(255);
      yv = $urandom_range(255);
      convert(xv, mx);
      convert(yv, my);
      map_add(mx, my);
      if (!add_ovf) n_add_ok++;
      map_mul(mx, my);
      if (!mul_ovf) n_mul_ok++;
    end
    for (int n = 0; n < 60; n++) begin
      ra = 16'($urandom_range(16'hFFFF)) | 16'h8888;
      rb = 16'($urandom_range(16'hFFFF)) | 16'h8888;
      map_add(ra, rb);
      map_mul(ra, rb);
    end
    // ---- index calculus: digits of random integers, multiplied and divided ----
    for (int n = 0; n < 500; n++) begin
      calc_a = dbns_pkg::to_dbnr(int'($urandom_range(255)) - 128);
      calc_b = dbns_pkg::to_dbnr(int'($urandom_range(255)) - 128);
      if (n % 50 == 0) begin calc_a.b = 8'sd120; calc_b.b = 8'sd100; end
      if (n % 50 == 1) calc_b = '{zero: 1'b1, default: '0};
      calc_div = 1'(n % 2);
      #1;
      if (calc_ovf) n_calc_ovf++;
      else if (calc_div && calc_b.zero) check(calc_div0, "calc div0");
      else if (calc_a.zero || calc_b.zero) check(calc_r.zero, "calc zero");
      else begin
        real va, vb, vr, want;
        va = (calc_a.neg ? -1.0 : 1.0) * digit_value(int'(calc_a.b), int'(calc_a.t));
        vb = (calc_b.neg ? -1.0 : 1.0) * digit_value(int'(calc_b.b), int'(calc_b.t));
        vr = (calc_r.neg ? -1.0 : 1.0) * digit_value(int'(calc_r.b), int'(calc_r.t));
        want = calc_div ? va / vb : va * vb;
        check((vr - want) / want < 1.0e-9 && (want - vr) / want < 1.0e-9, "calc value");
        if (calc_div) n_calc_div++; else n_calc_mul++;
      end
    end
    check(n_calc_mul > 0 && n_calc_div > 0 && n_calc_ovf > 0, "an index-calculus case never occurred");
    check(n_exact > 0 && n_approx > 0 && n_neg > 0 && n_zero > 0 && n_reset > 0,
          "a filter case never occurred");
    check(add_rule[RULE_CARRY] > 0 && add_rule[RULE_I] > 0 && add_rule[RULE_II] > 0 &&
          add_rule[RULE_III] > 0 && n_add_ovf > 0 && n_add_ok > 0, "an adder case never occurred");
    check(mul_rule[RULE_CARRY] > 0 && mul_rule[RULE_I] > 0 && mul_rule[RULE_II] > 0 &&
          mul_rule[RULE_III] > 0 && n_mul_ovf > 0 && n_mul_ok > 0, "a multiplier case never occurred");
    $display("filter: exact=%0d approximate=%0d negative=%0d zero=%0d resets=%0d",
             n_exact, n_approx, n_neg, n_zero, n_reset);
    $display("adder: carry=%0d I=%0d II=%0d III=%0d overflow=%0d valid from converted=%0d",
             add_rule[RULE_CARRY], add_rule[RULE_I], add_rule[RULE_II], add_rule[RULE_III], n_add_ovf, n_add_ok);
    $display("multiplier: carry=%0d I=%0d II=%0d III=%0d overflow=%0d valid from converted=%0d",
             mul_rule[RULE_CARRY], mul_rule[RULE_I], mul_rule[RULE_II], mul_rule[RULE_III], n_mul_ovf, n_mul_ok);
    $display("index calculus: products=%0d quotients=%0d overflow=%0d", n_calc_mul, n_calc_div, n_calc_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
