// tb_nonoverlap_clk: checks that CLK1 and CLK2 never overlap, that each is
// high for one phase with dead time between them, and that the pump period is
// 4 clocks normally and 4 x SLOW_DIV clocks when slowed.
module tb_nonoverlap_clk;
  logic clk = 0, rst_n, slow;
  logic clk1, clk2;
  int checks = 0, failures = 0;

  nonoverlap_clk #(.SLOW_DIV(4)) dut (.clk, .rst_n, .slow, .clk1, .clk2);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (clk1 && clk2) begin failures++; $display("FAIL overlap"); end
  end

  // measure rising-edge spacing of clk1 and clk2 and their high times
  task automatic measure(input int exp_period, input int exp_high);
    int t1 [3];
    int t2, h1;
    int cyc;
    cyc = 0;
    // align to a clk1 rising edge
    while (!(clk1)) begin @(posedge clk); #1; end
    while (clk1) begin @(posedge clk); #1; end
    while (!clk1) begin @(posedge clk); #1; cyc++; end
    for (int k = 0; k < 3; k++) begin
      t1[k] = cyc;
      h1 = 0;
      while (clk1) begin @(posedge clk); #1; cyc++; h1++; end
      checks++;
      if (h1 != exp_high) begin failures++; $display("FAIL high=%0d exp=%0d", h1, exp_high); end
      // gap before clk2 must be at least one clock
      t2 = cyc;
      while (!clk2) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc - t2 < 1) begin failures++; $display("FAIL no dead time"); end
      while (!clk1) begin @(posedge clk); #1; cyc++; end
    end
    checks += 2;
    if (t1[1] - t1[0] != exp_period) begin failures++; $display("FAIL period=%0d exp=%0d", t1[1]-t1[0], exp_period); end
    if (t1[2] - t1[1] != exp_period) failures++;
  endtask

  initial begin
    rst_n = 0; slow = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    measure(4, 1);
    slow = 1;
    measure(16, 4);
    slow = 0;
    measure(4, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
