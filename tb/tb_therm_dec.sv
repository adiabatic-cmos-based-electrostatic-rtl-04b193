// tb_therm_dec: exhaustive check of the 4-to-8 thermometer decoder.
// Every 4-bit code is applied; the expected pattern is built independently
// as 2^min(code,8) - 1 (CTRL1..CTRLn high, following the array control table).
module tb_therm_dec;
  logic [3:0] code;
  logic [7:0] therm;
  int checks = 0, failures = 0;

  therm_dec dut (.code, .therm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      int n;
      logic [8:0] exp9;
      code = 4'(c);
      #1;
      n = (c > 8) ? 8 : c;
      exp9 = (9'd1 << n) - 9'd1;
      checks++;
      if (therm !== exp9[7:0]) begin
        failures++;
        $display("FAIL code=%0d therm=%b exp=%b", c, therm, exp9[7:0]);
      end
      // number of active stages gives (n+1) x Vin at the pump
      checks++;
      if ($countones(therm) != n) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
