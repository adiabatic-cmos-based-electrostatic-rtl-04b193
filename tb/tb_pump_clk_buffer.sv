// tb_pump_clk_buffer: random stage enables and clock phases; checks that
// each stage clock equals CLKx AND CTRLi one clock later.
module tb_pump_clk_buffer;
  logic clk = 0, rst_n, clk1, clk2;
  logic [7:0] ctrl, phi1, phi2;
  logic [7:0] e1, e2;
  int checks = 0, failures = 0;

  pump_clk_buffer dut (.clk, .rst_n, .clk1, .clk2, .ctrl, .phi1, .phi2);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clk1 = 0; clk2 = 0; ctrl = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int ph;
      ph = $urandom_range(2);
      clk1 = (ph == 1); clk2 = (ph == 2);
      ctrl = 8'($urandom);
      for (int s = 0; s < 8; s++) begin
        e1[s] = clk1 & ctrl[s];
        e2[s] = clk2 & ctrl[s];
      end
      @(posedge clk); #1;
      checks += 2;
      if (phi1 !== e1) begin failures++; $display("FAIL phi1=%b exp=%b", phi1, e1); end
      if (phi2 !== e2) begin failures++; $display("FAIL phi2=%b exp=%b", phi2, e2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
