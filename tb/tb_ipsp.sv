// tb_ipsp -- checks one Inner Product Step Processor against real arithmetic.
//
// Operands are random double-base digits whose product lies in [2^-1, 2^15]
// (the range 8-bit samples and coefficients produce), with random signs,
// some zero operands and a random incoming partial sum. After each rising
// edge a_out - a_in must equal +-2^(b1+b2) * 3^(t1+t2), in units of 2^-15,
// to within the mantissa's relative error 2^-16 plus one unit of truncation.
// Products with t1+t2 = 0 are exact and are compared bit for bit. A product
// beyond the shifter's +16 places must raise ovf. Reset must clear a_out,
// and a_out may change only at a clock edge. The worked example
// 32 * 27 = 2^5 * 3^3 = 864 is checked exactly.
module tb_ipsp;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int ACC_W = 36;

  logic                    clk = 0, rst;
  dbnr_t                   d, c;
  logic signed [ACC_W-1:0] a_in, a_out;
  logic                    ovf;
  int                      checks = 0, failures = 0;
  int                      n_exact = 0, n_zero = 0, n_neg = 0, n_ovf = 0;

  ipsp #(.ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  td, tc, bd, bc, s;
    real lt, expv, diff, tol;
    logic signed [ACC_W-1:0] a_prev;
    rst = 1;
    d = '0; c = '0; a_in = 36'sd12345;
    @(posedge clk); #1;
    check(a_out == 0, "reset");
    @(negedge clk);
    rst = 0;
    // Worked example: 32 * 27 = (1, 5+0, 0+3) = 2^5 * 3^3 = 864.
    d = '{zero: 1'b0, neg: 1'b0, b: 8'sd5, t: 6'sd0};
    c = '{zero: 1'b0, neg: 1'b0, b: 8'sd0, t: 6'sd3};
    a_in = '0;
    @(posedge clk); #1;
    check(a_out == 36'sd864 * 36'sd32768, $sformatf("32*27: got %0d", a_out >>> 15));
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      td = $urandom_range(63) - 32;
      tc = (i % 7 == 0 && td > -32) ? -td : $urandom_range(63) - 32;
      if (i % 5 == 0) tc = 0;
      if (i % 5 == 0) td = 0;
      lt = real'($urandom_range(1600)) / 100.0 - 1.0;   // target log2 in [-1, 15]
      if (i % 97 == 3) lt = 18.0;                       // beyond the shifter
      bd = $urandom_range(80) - 40;
      bc = int'($floor(lt - real'(bd) - real'(td + tc) * L2_3 + 0.5));
      if (bc < -128 || bc > 127) begin
        bc = 0;
        bd = int'($floor(lt - real'(td + tc) * L2_3 + 0.5));
      end
      d = '{zero: 1'b0, neg: 1'($urandom_range(1)), b: 8'(bd), t: 6'(td)};
      c = '{zero: 1'b0, neg: 1'($urandom_range(1)), b: 8'(bc), t: 6'(tc)};
      if (i % 11 == 0) begin d = '0; d.zero = 1'b1; end
      a_in = ACC_W'(signed'($urandom_range(32'h7FFF_FFFF))) - 36'sh4000_0000;
      a_prev = a_out;
      #1;
      check(a_out == a_prev, "a_out changed without a clock edge");
      @(posedge clk); #1;
      s    = (d.neg ^ c.neg) ? -1 : 1;
      expv = (d.zero || c.zero) ? 0.0 : digit_value(bd + bc + 15, td + tc);
      diff = real'(a_out - a_in);
      if (d.zero || c.zero) begin
        n_zero++;
        check(a_out == a_in && !ovf, "zero operand");
      end else if (lt > 17.0) begin
        n_ovf++;
        check(ovf, "overflow not flagged");
      end else begin
        if (s < 0) n_neg++;
        tol = expv * $pow(2.0, -16.0) + 1.0 + 1.0e-6;
        check(!ovf, "false overflow");
        if (td + tc == 0) begin
          n_exact++;
          check(diff == real'(s) * expv, $sformatf("exact product: got %f want %f d=%p c=%p a_in=%0d", diff, real'(s) * expv, d, c, a_in));
        end else begin
          check(diff - real'(s) * expv <= tol && real'(s) * expv - diff <= tol,
                $sformatf("product b=%0d t=%0d: got %f want %f", bd + bc, td + tc, diff, real'(s) * expv));
        end
      end
      @(negedge clk);
    end
    check(n_exact > 0 && n_zero > 0 && n_neg > 0 && n_ovf > 0, "a case never occurred");
    $display("exact=%0d zero=%0d negative=%0d overflow=%0d", n_exact, n_zero, n_neg, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
