// tb_mems_actuator: sweeps the applied voltage up and down and checks the
// pull-in / release hysteresis and the charged-load flag against thresholds.
module tb_mems_actuator;
  import mems_pkg::*;
  logic clk = 0, rst_n, actuated, capacitive_load;
  mv_t vin_mv;
  int checks = 0, failures = 0;

  mems_actuator dut (.clk, .rst_n, .vin_mv, .actuated, .capacitive_load);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_act;
    rst_n = 0; vin_mv = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    exp_act = 0;
    for (int v = 0; v <= 10800; v += 100) begin
      vin_mv = mv_t'(v);
      @(posedge clk); #1;
      if (v >= 6000) exp_act = 1;
      checks += 2;
      if (actuated !== exp_act) begin failures++; $display("FAIL up v=%0d act=%b", v, actuated); end
      if (capacitive_load !== (v > 1200)) failures++;
    end
    for (int v = 10800; v >= 0; v -= 100) begin
      vin_mv = mv_t'(v);
      @(posedge clk); #1;
      if (v < 3000) exp_act = 0;
      checks++;
      if (actuated !== exp_act) begin failures++; $display("FAIL down v=%0d act=%b", v, actuated); end
      // inside the hysteresis band the plate stays pulled in
      if (v >= 3000 && v < 6000) begin checks++; if (!actuated) failures++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
