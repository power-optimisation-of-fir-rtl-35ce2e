// tb_dbns_reduce_step -- checks single rewrites of the DBNS reduction step.
//
// Random 4 x 5 count grids (counts 0..2). After one step the value
// sum(count * 2^i * 3^j) must be unchanged unless RULE_OVF is reported (then
// the grid must be unchanged), the total count must fall, and the kind must
// obey the priority: a carry (or overflow) whenever some count is 2, never a
// rule otherwise; RULE_NONE only when no rule's pattern fits. Directed grids
// check the cell each rule writes.
module tb_dbns_reduce_step;
  import dbns_map_pkg::*;

  localparam int GR = 4, GC = 5;

  logic [GR-1:0][GC-1:0][1:0] cur, nxt;
  rule_t                      fired;
  int                         checks = 0, failures = 0;
  int                         n_kind [6];

  dbns_reduce_step #(.GR(GR), .GC(GC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cur=%h nxt=%h fired=%s: %s", cur, nxt, fired.name(), what);
    end
  endtask

  function automatic longint val(logic [GR-1:0][GC-1:0][1:0] g);
    longint v = 0, p3 = 1;
    for (int j = 0; j < GR; j++) begin
      for (int i = 0; i < GC; i++) v += longint'(g[j][i]) * (longint'(1) << i) * p3;
      p3 *= 3;
    end
    return v;
  endfunction

  function automatic int total(logic [GR-1:0][GC-1:0][1:0] g);
    int s = 0;
    for (int j = 0; j < GR; j++) for (int i = 0; i < GC; i++) s += g[j][i];
    return s;
  endfunction

  function automatic bit any_rule(logic [GR-1:0][GC-1:0][1:0] g);
    for (int j = 0; j + 1 < GR; j++)
      for (int i = 0; i < GC; i++) begin
        if (i + 1 < GC && g[j][i] != 0 && g[j][i+1] != 0) return 1;
        if (i + 2 < GC && g[j][i] != 0 && g[j+1][i] != 0) return 1;
      end
    return 0;
  endfunction

  task automatic single(int j0, int i0, int j1, int i1, int j2, int i2, rule_t k, int jt, int it);
    cur = '0;
    cur[j0][i0] = 2'd1;
    cur[j1][i1] = cur[j1][i1] + 2'd1;
    if (j2 >= 0) cur[j2][i2] = 2'd1;
    #1;
    check(fired == k, $sformatf("expected %s", k.name()));
    check(total(nxt) == 1 && nxt[jt][it] == 2'd1, "result cell");
  endtask

  initial begin
    bit has2;
    foreach (n_kind[k]) n_kind[k] = 0;
    single(0, 0, 0, 0, -1, 0, RULE_CARRY, 0, 1);   // 1 + 1 = 2
    single(1, 1, 1, 2, -1, 0, RULE_I, 2, 1);       // 6 + 12 = 18
    single(0, 1, 1, 1, -1, 0, RULE_II, 0, 3);      // 2 + 6 = 8
    single(0, 0, 0, 1, 1, 0, RULE_III, 1, 1);      // 1 + 2 + 3 = 6
    for (int n = 0; n < 20000; n++) begin
      has2 = 0;
      for (int j = 0; j < GR; j++)
        for (int i = 0; i < GC; i++) begin
          cur[j][i] = ($urandom_range(9) < 3) ? 2'($urandom_range(1, 2)) : 2'd0;
          if (n % 2 == 0 && cur[j][i] == 2) cur[j][i] = 2'd1;
          if (cur[j][i] == 2) has2 = 1;
        end
      #1;
      n_kind[fired]++;
      if (fired == RULE_OVF) begin
        check(nxt == cur, "grid changed on overflow");
        check(has2, "overflow without a carry");
      end else if (fired == RULE_NONE) begin
        check(!has2 && !any_rule(cur) && nxt == cur, "stopped early");
      end else begin
        check(val(nxt) == val(cur), "value changed");
        check(total(nxt) < total(cur), "count did not fall");
        check(has2 == (fired == RULE_CARRY), "priority");
      end
    end
    check(n_kind[RULE_NONE] > 0 && n_kind[RULE_CARRY] > 0 && n_kind[RULE_I] > 0 &&
          n_kind[RULE_II] > 0 && n_kind[RULE_III] > 0 && n_kind[RULE_OVF] > 0, "a kind never occurred");
    $display("none=%0d carry=%0d I=%0d II=%0d III=%0d overflow=%0d", n_kind[RULE_NONE],
             n_kind[RULE_CARRY], n_kind[RULE_I], n_kind[RULE_II], n_kind[RULE_III], n_kind[RULE_OVF]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
