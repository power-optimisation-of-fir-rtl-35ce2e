// tb_barrel_shifter -- checks p = floor(m * 2^sh) for every shift in [-20, 20].
//
// Random 16-bit mantissas at each amount, plus all-ones and 1. Shifts above
// +16 must saturate and raise ovf; shifts below -16 must give 0.
module tb_barrel_shifter;
  logic        [15:0] m;
  logic signed [9:0]  sh;
  logic        [31:0] p;
  logic               ovf;
  int                 checks = 0, failures = 0;

  barrel_shifter #(.IN_W(16), .SHIFT_MAX(16), .SH_W(10)) dut (.m(m), .sh(sh), .p(p), .ovf(ovf));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL m=%h sh=%0d p=%h: %s", m, sh, p, what);
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
    longint unsigned exp_p;
    for (int s = -20; s <= 20; s++) begin
      for (int r = 0; r < 60; r++) begin
        m  = (r == 0) ? 16'hFFFF : (r == 1) ? 16'h0001 : 16'($urandom);
        sh = 10'(s);
        #1;
        if (s > 16) begin
          check(ovf && p == 32'hFFFF_FFFF, "saturation");
        end else begin
          exp_p = (s >= 0) ? (longint'(m) << s) : (longint'(m) >> (-s));
          check(!ovf, "false overflow");
          check(p == 32'(exp_p), $sformatf("expected %h", exp_p));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
