// tb_ann_pkg: checks the helpers and default tables of the shared package.
//
// Saturation of accumulator values at and around both ends of the 16-bit
// range, real/fixed conversions against hand-worked numbers, and every entry
// of the default weight and bias tables against the published formulas
// ((5l + 3n + 7i + 1) mod 16 - 8)/16 and ((3l + 5n + 2) mod 8 - 4)/16.
module tb_ann_pkg;
  import ann_pkg::*;

  int checks = 0, failures = 0;
  localparam wtab_t WT = default_wtab();
  localparam btab_t BT = default_btab();

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%0d expected=%0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // format
    check("DATA_W", int'(DATA_W), 16);
    check("FRAC_W", int'(FRAC_W), 8);
    // saturation
    check("sat 0", int'(sat_fix(0)), 0);
    check("sat 32767", int'(sat_fix(32767)), 32767);
    check("sat 32768", int'(sat_fix(32768)), 32767);
    check("sat big", int'(sat_fix(2000000000)), 32767);
    check("sat -32768", int'(sat_fix(-32768)), -32768);
    check("sat -32769", int'(sat_fix(-32769)), -32768);
    check("sat -big", int'(sat_fix(-2000000000)), -32768);
    check("sat -5", int'(sat_fix(-5)), -5);
    for (int k = 0; k < 2000; k++) begin
      automatic int a = int'($urandom) >>> ($urandom_range(31));
      automatic int e = (a > 32767) ? 32767 : (a < -32768) ? -32768 : a;
      check("sat random", int'(sat_fix(a)), int'(e));
    end
    // conversions
    check("to_fix 1.0", int'(to_fix(1.0)), 256);
    check("to_fix -0.5", int'(to_fix(-0.5)), -128);
    check("to_fix 3.14159", int'(to_fix(3.14159)), 804);
    check("to_fix -2.7", int'(to_fix(-2.7)), -691);
    check("to_fix 1000", int'(to_fix(1000.0)), 32767);
    check("to_fix -1000", int'(to_fix(-1000.0)), -32768);
    check("to_real", int'(longint'(to_real(fix_t'(-384)) * 1000.0)), -1500);
    // default tables
    for (int l = 0; l < MAX_LAYERS; l++)
      for (int n = 0; n < MAX_N; n++) begin
        check("bias", int'(BT[l][n]), int'((((3*l + 5*n + 2) % 8) - 4) * 16));
        for (int i = 0; i < MAX_N; i++)
          check("weight", int'(WT[l][n][i]), int'((((5*l + 3*n + 7*i + 1) % 16) - 8) * 16));
      end
    check("w[0][0][0] = -7/16", int'(WT[0][0][0]), -112);
    check("b[0][0] = -2/16", int'(BT[0][0]), -32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
