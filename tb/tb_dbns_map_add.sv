// tb_dbns_map_add -- checks the DBNS map adder.
//
// Directed sums that need exactly one rewrite each (1+1 carry, 1+2 rule I,
// 1+3 rule II, 1+2+3 rule III) must give the single expected cell. Then
// random pairs of 4 x 4 maps of every density: the 5 x 5 result must have the
// value of the sum and be fully reduced, unless ovf is raised, and done must
// come within 2*16+2 clocks. Each rewrite kind, and an overflow, must occur.
module tb_dbns_map_add;
  import dbns_map_pkg::*;
  import dbns_map_ref_pkg::*;

  logic            clk = 0, rst, start;
  logic [3:0][3:0] a, b;
  logic            busy, done, ovf;
  logic [4:0][4:0] sum;
  int              checks = 0, failures = 0;
  int              n_rule [6];

  dbns_map_add #(.ROWS(4), .COLS(4)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (busy) n_rule[dut.fired]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL a=%h b=%h sum=%h: %s", a, b, sum, what);
    end
  endtask

  task automatic add(logic [3:0][3:0] aa, logic [3:0][3:0] bb, output int cyc);
    @(negedge clk);
    a = aa; b = bb; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    check(done, "no done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
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
    // 1 + 1 = 2: carry to (0,1).
    add(16'h0001, 16'h0001, cyc);
    check(sum == 25'(1) << 1 && !ovf, "1+1");
    // 1 + 2 = 3: rule I to (1,0).
    add(16'h0001, 16'h0002, cyc);
    check(sum == 25'(1) << 5 && !ovf, "1+2");
    // 1 + 3 = 4: rule II to (0,2).
    add(16'h0001, 16'h0010, cyc);
    check(sum == 25'(1) << 2 && !ovf, "1+3");
    // 1 + 2 + 3 = 6: rule III to (1,1).
    add(16'h0003, 16'h0010, cyc);
    check(sum == 25'(1) << 6 && !ovf, "1+2+3");
    for (int n = 0; n < 3000; n++) begin
      dens = $urandom_range(4);
      for (int k = 0; k < 16; k++) begin
        a[k/4][k%4] = ($urandom_range(3) < dens);
        b[k/4][k%4] = ($urandom_range(3) < dens);
      end
      add(a, b, cyc);
      va = map_val(64'(a), 4, 4);
      vb = map_val(64'(b), 4, 4);
      check(cyc <= 34, $sformatf("took %0d clocks", cyc));
      if (!ovf) begin
        check(map_val(64'(sum), 5, 5) == va + vb,
              $sformatf("value %0d, expected %0d", map_val(64'(sum), 5, 5), va + vb));
        check(reduced(64'(sum), 5, 5), "not reduced");
      end
    end
    check(n_rule[RULE_CARRY] > 0 && n_rule[RULE_I] > 0 && n_rule[RULE_II] > 0 &&
          n_rule[RULE_III] > 0 && n_rule[RULE_OVF] > 0, "a rewrite kind never occurred");
    $display("carry=%0d I=%0d II=%0d III=%0d overflow=%0d", n_rule[RULE_CARRY], n_rule[RULE_I],
             n_rule[RULE_II], n_rule[RULE_III], n_rule[RULE_OVF]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
