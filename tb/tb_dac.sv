// tb_dac: checks the non-binary weighted DAC level for all 16 inputs
// (weights 1.25, 2.5, 3.75, 5 V, in 0.25 V units 5, 10, 15, 20; e.g. 0110 ->
// 6.25 V = 25), its two-clock latency, and that the delta-sigma output has
// exactly anout ones in every 50 clocks once settled.
module tb_dac;
  logic       clk = 0, clr;
  logic [3:0] din;
  logic [7:0] anout;
  logic       dac_bit;
  int checks = 0, failures = 0;

  dac dut (.clk, .clr, .din, .anout, .dac_bit);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr = 1; din = 0;
    repeat (3) @(posedge clk);
    #1 clr = 0;
    for (int d = 0; d < 16; d++) begin
      int exp_lvl, ones;
      exp_lvl = 0;
      for (int k = 0; k < 4; k++) if (d & (1 << k)) exp_lvl += 5 * (k + 1);
      din = 4'(d);
      @(posedge clk); #1;
      // latency: not yet visible after one edge unless unchanged
      @(posedge clk); #1;
      checks++;
      if (int'(anout) != exp_lvl) begin
        failures++; $display("FAIL din=%b anout=%0d exp=%0d", din, anout, exp_lvl);
      end
      repeat (60) @(posedge clk);
      ones = 0;
      for (int c = 0; c < 200; c++) begin
        @(posedge clk); #1;
        ones += int'(dac_bit);
      end
      checks++;
      if (ones != exp_lvl * 4) begin
        failures++; $display("FAIL din=%b ones=%0d exp=%0d", din, ones, exp_lvl * 4);
      end
    end
    // the design's example: 0110 gives 6.25 V (25 units)
    din = 4'b0110;
    repeat (2) @(posedge clk); #1;
    checks++;
    if (anout != 8'd25) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
