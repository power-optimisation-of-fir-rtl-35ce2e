// tb_dbns_greedy_conv -- checks the greedy DBNS converter on every 8-bit value.
//
// For x = 0..255 on the default 4 x 4 map: the map is bit for bit the one a
// software greedy search builds, its value is x, digits is its number of
// cells, err stays low and done rises at the (digits+1)-th clock edge after the one
// that sampled start.
// A second converter with a 10-bit input must raise err at x = 432, the
// first value a 4 x 4 map cannot hold greedily, and succeed at 431.
// 88 must become 72 + 12 + 4.
module tb_dbns_greedy_conv;
  logic             clk = 0, rst, start, start10;
  logic [7:0]       x;
  logic [9:0]       x10;
  logic             busy, done, err, busy10, done10, err10;
  logic [3:0][3:0]  map, map10;
  logic [4:0]       digits, digits10;
  int               checks = 0, failures = 0;

  dbns_greedy_conv #(.X_W(8), .ROWS(4), .COLS(4)) dut (
    .clk, .rst, .start, .x, .busy, .done, .map, .digits, .err);
  dbns_greedy_conv #(.X_W(10), .ROWS(4), .COLS(4)) dut10 (
    .clk, .rst, .start(start10), .x(x10), .busy(busy10), .done(done10), .map(map10),
    .digits(digits10), .err(err10));

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL x=%0d: %s", x, what);
    end
  endtask

  function automatic int map_value(logic [3:0][3:0] m);
    int v = 0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++)
        if (m[j][i]) v += (1 << i) * (j == 0 ? 1 : j == 1 ? 3 : j == 2 ? 9 : 27);
    return v;
  endfunction

  function automatic logic [3:0][3:0] ref_greedy(int xv);
    logic [3:0][3:0] m = '0;
    int r = xv, bv, bj, bi, w;
    while (r > 0) begin
      bv = 0; bj = 0; bi = 0;
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++) begin
          w = (1 << i) * (j == 0 ? 1 : j == 1 ? 3 : j == 2 ? 9 : 27);
          if (w <= r && w > bv) begin bv = w; bj = j; bi = i; end
        end
      m[bj][bi] = 1'b1;
      r -= bv;
    end
    return m;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    rst = 1; start = 0; start10 = 0; x = 0; x10 = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      x = 8'(v); start = 1;
      @(negedge clk);
      start = 0;
      check(busy, "not busy after start");
      cyc = 1;
      while (!done && cyc < 40) begin @(negedge clk); cyc++; end
      check(done, "no done");
      check(!err, "err raised");
      check(map == ref_greedy(v), $sformatf("map %h, expected %h", map, ref_greedy(v)));
      check(map_value(map) == v, "value");
      check(int'(digits) == $countones(map), "digit count");
      check(cyc == int'(digits) + 2, $sformatf("took %0d clocks for %0d digits", cyc, digits));
    end
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      x10 = (k == 0) ? 10'd431 : 10'd432; start10 = 1;
      @(negedge clk);
      start10 = 0;
      while (!done10) @(negedge clk);
      check(err10 == (k == 1), $sformatf("err at %0d", x10));
      if (k == 0) check(map_value(map10) == 431, "431 value");
    end
    // 88 = 72 + 12 + 4 on a 4 x 4 map: cells (2,3), (1,2), (0,2).
    @(negedge clk);
    x = 8'd88; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    check(map == ((16'h0100 << 3) | (16'h0010 << 2) | (16'h0001 << 2)), $sformatf("88 -> %h", map));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
