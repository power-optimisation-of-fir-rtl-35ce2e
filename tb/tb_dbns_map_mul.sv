// tb_dbns_map_mul -- checks the DBNS map multiplier.
//
// Directed products of single cells (3 * 4 = 12, 2 * 27 = 54) must give the
// single cell at the summed indices, and 1 * 1 + carry cases are covered by
// (1+2) * (1+2) = 9. Random pairs of 4 x 4 maps: the 8 x 8 product must have
// the value of the product and be fully reduced, unless ovf is raised, and
// done must come within the bound set by one pass per cell of a plus one
// clock per unit of count. Carries, each rule and an overflow must occur.
module tb_dbns_map_mul;
  import dbns_map_pkg::*;
  import dbns_map_ref_pkg::*;

  logic            clk = 0, rst, start;
  logic [3:0][3:0] a, b;
  logic            busy, done, ovf;
  logic [7:0][7:0] prod;
  int              checks = 0, failures = 0;
  int              n_rule [6];
  int              n_ok = 0;

  dbns_map_mul #(.ROWS(4), .COLS(4)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.state == dut.S_REDUCE) n_rule[dut.fired]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL a=%h b=%h prod=%h: %s", a, b, prod, what);
    end
  endtask

  task automatic mul(logic [3:0][3:0] aa, logic [3:0][3:0] bb, output int cyc);
    @(negedge clk);
    a = aa; b = bb; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 400) begin @(negedge clk); cyc++; end
    check(done, "no done");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc, dens;
    longint va, vb;
    foreach (n_rule[k]) n_rule[k] = 0;
    rst = 1; start = 0; a = '0; b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    mul(16'h0010, 16'h0004, cyc);             // 3 * 4 = 12 -> row 1, column 2
    check(prod == 64'(1) << (1 * 8 + 2) && !ovf, "3*4");
    mul(16'h0002, 16'h1000, cyc);             // 2 * 27 = 54 -> row 3, column 1
    check(prod == 64'(1) << (3 * 8 + 1) && !ovf, "2*27");
    mul(16'h0003, 16'h0003, cyc);             // 3 * 3 = 9 -> row 2, column 0
    check(prod == 64'(1) << (2 * 8) && !ovf, "(1+2)*(1+2)");
    mul(16'h0000, 16'h0003, cyc);
    check(prod == 0 && !ovf, "0*3");
    for (int n = 0; n < 1500; n++) begin
      dens = $urandom_range(1, 8);
      for (int k = 0; k < 16; k++) begin
        a[k/4][k%4] = ($urandom_range(15) < dens);
        b[k/4][k%4] = ($urandom_range(15) < dens);
      end
      mul(a, b, cyc);
      va = map_val(64'(a), 4, 4);
      vb = map_val(64'(b), 4, 4);
      check(cyc <= 16 * 2 + 256 + 2, $sformatf("took %0d clocks", cyc));
      if (!ovf) begin
        n_ok++;
        check(map_val(64'(prod), 8, 8) == va * vb,
              $sformatf("value %0d, expected %0d", map_val(64'(prod), 8, 8), va * vb));
        check(reduced(64'(prod), 8, 8), "not reduced");
      end
    end
    check(n_rule[RULE_CARRY] > 0 && n_rule[RULE_I] > 0 && n_rule[RULE_II] > 0 &&
          n_rule[RULE_III] > 0 && n_rule[RULE_OVF] > 0 && n_ok > 0, "a case never occurred");
    $display("valid products=%0d carry=%0d I=%0d II=%0d III=%0d overflow=%0d", n_ok,
             n_rule[RULE_CARRY], n_rule[RULE_I], n_rule[RULE_II], n_rule[RULE_III], n_rule[RULE_OVF]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
