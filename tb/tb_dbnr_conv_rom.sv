// tb_dbnr_conv_rom -- exhaustive check of the data-conversion ROM.
//
// For every 8-bit two's-complement sample: zero and sign flags; the ternary
// exponent lies in [-32, 31]; the digit 2^b * 3^t is the nearest one to |x|
// in log2 (its error equals that of a brute-force search); exact 2-integers
// (1, 2, 3, 4, 6, 8, 9, 12, ...) are reproduced exactly.
module tb_dbnr_conv_rom;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  logic [7:0] x;
  dbnr_t      d;
  int         checks = 0, failures = 0;

  dbnr_conv_rom #(.DATA_W(8)) dut (.x(x), .d(d));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL x=%0d: %s", $signed(x), what);
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
    int  v, av;
    real lv, err, best;
    for (int i = 0; i < 256; i++) begin
      x = 8'(i);
      #1;
      v = int'($signed(x));
      av = (v < 0) ? -v : v;
      check(d.zero == (v == 0), "zero flag");
      if (v != 0) begin
        check(d.neg == (v < 0), "sign");
        check(int'(d.t) >= T_MIN && int'(d.t) <= T_MAX, "ternary range");
        lv   = $ln(real'(av)) / $ln(2.0);
        err  = lv - real'(int'(d.b)) - real'(int'(d.t)) * L2_3;
        if (err < 0.0) err = -err;
        best = best_log_err(v);
        check(err <= best + 1.0e-9, $sformatf("not nearest digit: b=%0d t=%0d err=%f best=%f",
                                              d.b, d.t, err, best));
        check(err < 0.01, "error bound");
      end
    end
    // Exact 2-integers.
    for (int j = 1; j <= 128; j++) begin
      int r; int p2, p3;
      r = j; p2 = 0; p3 = 0;
      while (r % 2 == 0) begin r /= 2; p2++; end
      while (r % 3 == 0) begin r /= 3; p3++; end
      if (r == 1) begin
        if (j < 128) begin
          x = 8'(j);
          #1;
          check(int'(d.b) == p2 && int'(d.t) == p3 && !d.neg && !d.zero, "exact 2-integer");
        end
        x = 8'(-j);
        #1;
        check(int'(d.b) == p2 && int'(d.t) == p3 && d.neg && !d.zero, "exact negative 2-integer");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
