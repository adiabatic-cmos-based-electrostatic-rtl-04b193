// tb_dec3to8: exhaustive check of the 3:8 decoder, both enable values.
module tb_dec3to8;
  logic       en;
  logic [2:0] sel;
  logic [7:0] y;
  int checks = 0, failures = 0;

  dec3to8 dut (.en, .sel, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int s = 0; s < 8; s++) begin
        logic [7:0] exp_y;
        en = 1'(e); sel = 3'(s);
        #1;
        exp_y = 8'(0);
        for (int i = 0; i < 8; i++) if (e == 1 && i == s) exp_y[i] = 1'b1;
        checks++;
        if (y !== exp_y) begin
          failures++;
          $display("FAIL en=%0d sel=%0d y=%b exp=%b", e, s, y, exp_y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
