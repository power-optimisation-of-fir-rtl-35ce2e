// tb_ter_rom -- exhaustive check of the ternary-exponent ROM.
//
// For every exponent sum t in [-64, 63]: the mantissa has its top bit set and
// m * 2^(n - 15) equals 3^t to within half a unit of the 16-bit mantissa.
// t = 0 must give exactly 1.0 (m = 2^15, n = 0).
module tb_ter_rom;
  import dbns_pkg::*;

  logic signed [6:0]  t;
  logic        [15:0] m;
  logic signed [7:0]  n;
  int                 checks = 0, failures = 0;

  ter_rom dut (.t(t), .m(m), .n(n));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d: %s (m=%0d n=%0d)", t, what, m, n);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real exact, got, rel;
    for (int i = -64; i <= 63; i++) begin
      t = 7'(i);
      #1;
      check(m[15] == 1'b1, "mantissa not normalised");
      exact = $pow(3.0, real'(i));
      got   = real'(m) * $pow(2.0, real'(int'(n) - 15));
      rel   = (got - exact) / exact;
      if (rel < 0.0) rel = -rel;
      check(rel <= $pow(2.0, -16.0) + 1.0e-12, $sformatf("value off by %e", rel));
      if (i == 0) check(m == 16'h8000 && n == 0, "3^0 not exact");
      if (i == 1) check(m == 16'hC000 && n == 1, "3^1 not exact");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
