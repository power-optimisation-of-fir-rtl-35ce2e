// tb_dbnr_index_calc -- checks index-calculus multiplication and division.
//
// Worked examples 32 * 27 = 864 and 54 / 27 = 2; then random digits whose
// exponents are drawn so that results sometimes leave the field ranges. The
// value of the result must equal the real product or quotient of the
// operands' values whenever ovf is low, and ovf must be high exactly when an
// exponent does not fit. Zero operands and zero divisors are covered.
module tb_dbnr_index_calc;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  dbnr_t a, b, r;
  logic  div, ovf, div0;
  int    checks = 0, failures = 0;
  int    n_ovf = 0, n_div = 0, n_mul = 0;

  dbnr_index_calc dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL a=%p b=%p div=%0b r=%p: %s", a, b, div, r, what);
    end
  endtask

  function automatic real dval(dbnr_t x);
    if (x.zero) return 0.0;
    return (x.neg ? -1.0 : 1.0) * digit_value(int'(x.b), int'(x.t));
  endfunction

  initial begin
    int  bb, tt;
    real want, got;
    a = '{zero: 0, neg: 0, b: 8'sd5, t: 6'sd0};
    b = '{zero: 0, neg: 0, b: 8'sd0, t: 6'sd3};
    div = 0;
    #1 check(!ovf && dval(r) == 864.0, "32*27");
    a = '{zero: 0, neg: 0, b: 8'sd1, t: 6'sd3};
    div = 1;
    #1 check(!ovf && !div0 && dval(r) == 2.0 && r.b == 1 && r.t == 0, "54/27");
    b = '0; b.zero = 1;
    #1 check(div0, "divide by zero");
    div = 0;
    #1 check(r.zero && !ovf, "times zero");
    for (int n = 0; n < 5000; n++) begin
      a = '{zero: ($urandom_range(19) == 0), neg: 1'($urandom_range(1)),
            b: 8'($urandom_range(255)), t: 6'($urandom_range(63))};
      b = '{zero: ($urandom_range(19) == 0), neg: 1'($urandom_range(1)),
            b: 8'($urandom_range(255)), t: 6'($urandom_range(63))};
      if (a.zero) begin a.neg = 0; a.b = 0; a.t = 0; end
      if (b.zero) begin b.neg = 0; b.b = 0; b.t = 0; end
      div = 1'($urandom_range(1));
      #1;
      if (div) n_div++; else n_mul++;
      if (div && b.zero) begin
        check(div0, "div0 missing");
      end else if (a.zero || b.zero) begin
        check(r.zero && !ovf && !div0, "zero result");
      end else begin
        bb = div ? int'(a.b) - int'(b.b) : int'(a.b) + int'(b.b);
        tt = div ? int'(a.t) - int'(b.t) : int'(a.t) + int'(b.t);
        check(ovf == (bb < -128 || bb > 127 || tt < -32 || tt > 31), "ovf flag");
        if (ovf) n_ovf++;
        else begin
          want = div ? dval(a) / dval(b) : dval(a) * dval(b);
          got  = dval(r);
          check(got == want || (got - want) / want < 1.0e-9 && (want - got) / want < 1.0e-9,
                $sformatf("value %e, expected %e", got, want));
        end
      end
    end
    check(n_ovf > 0 && n_div > 0 && n_mul > 0, "a case never occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
