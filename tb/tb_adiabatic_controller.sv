// tb_adiabatic_controller: ramps the stage count 0 -> 8 -> 3 -> 0 and checks
//   * the level moves by at most one stage per clock and ends at the goal;
//   * the rise takes 1 + 8 x RISE_STEP_CYCLES clocks and a full fall
//     8 x FALL_STEP_CYCLES clocks of discharging (256 clocks = 6.4 us at
//     40 MHz), the level reaching 0 after 1 + 7 x FALL_STEP_CYCLES clocks;
//   * recyc_count counts one per downward step only while the load is charged;
//   * rclk1 rises only while charging, rclk2 only while discharging;
//   * start_mux rises once charge is recycled, start_clk only while discharging.
module tb_adiabatic_controller;
  import mems_pkg::*;
  localparam int RISE = 1, FALL = 32;
  logic       clk = 0, rst_n, discharge, capacitive_load;
  level_t     target, level;
  ac_state_t  state;
  logic       charging, discharging, steady, rclk1, rclk2, start_mux, start_clk;
  logic [7:0] recyc_count;
  int checks = 0, failures = 0;
  int r1_toggles, r2_toggles;
  logic r1_q, r2_q;

  adiabatic_controller dut (.clk, .rst_n, .target, .discharge, .capacitive_load,
    .level, .state, .charging, .discharging, .steady, .recyc_count, .rclk1,
    .rclk2, .start_mux, .start_clk);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor: step size and recycled-clock activity
  level_t lq;
  always @(posedge clk) begin
    if (rst_n) check_cycle();
    lq <= level; r1_q <= rclk1; r2_q <= rclk2;
  end

  task automatic check_cycle();
    checks++;
    if (!(level == lq || level == lq + 1 || level + 1 == lq)) begin
      failures++; $display("FAIL jump %0d -> %0d", lq, level);
    end
    if (rclk1 != r1_q) begin
      r1_toggles++;
      checks++;
      if (!charging && rclk1) begin failures++; $display("FAIL rclk1 rises outside charge"); end
    end
    if (rclk2 != r2_q) begin
      r2_toggles++;
      checks++;
      if (!discharging && rclk2) begin failures++; $display("FAIL rclk2 rises outside discharge"); end
    end
    if (start_clk) begin
      checks++;
      if (!discharging || recyc_count == 0) begin failures++; $display("FAIL start_clk"); end
    end
  endtask

  task automatic ramp_to(input int goal, input bit dis, input int exp_cycles);
    int n;
    n = 0;
    target = level_t'(goal); discharge = dis;
    do begin @(posedge clk); #1; n++; end while (int'(level) != (dis ? 0 : goal) && n < 5000);
    checks++;
    if (n != exp_cycles) begin
      failures++; $display("FAIL ramp to %0d took %0d exp %0d", goal, n, exp_cycles);
    end
    n = 0;
    while ((charging || discharging) && n < 5000) begin @(posedge clk); #1; n++; end
    checks++;
    if (int'(level) != (dis ? 0 : goal) || n != (exp_cycles > 1 + 8 * RISE ? FALL : 1)) begin
      failures++; $display("FAIL settle took %0d", n);
    end
  endtask

  initial begin
    rst_n = 0; target = 0; discharge = 0; capacitive_load = 0;
    r1_toggles = 0; r2_toggles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (start_mux) failures++;
    ramp_to(8, 0, 1 + 8 * RISE);
    checks++; if (!steady) begin failures++; $display("FAIL not steady"); end
    checks++; if (r1_toggles < 8) begin failures++; $display("FAIL rclk1 idle"); end
    // fall with the load uncharged: nothing recycled
    ramp_to(3, 0, 1 + 4 * FALL);
    checks++; if (recyc_count != 0 || start_mux) begin failures++; $display("FAIL recycled while empty"); end
    // back up, then release with the load charged: 8 steps recycled
    ramp_to(8, 0, 1 + 5 * RISE);
    capacitive_load = 1;
    ramp_to(8, 1, 1 + 7 * FALL);
    checks++; if (recyc_count != 8) begin failures++; $display("FAIL recyc_count=%0d exp 8", recyc_count); end
    checks++; if (!start_mux) begin failures++; $display("FAIL start_mux"); end
    checks++; if (r2_toggles < 8) begin failures++; $display("FAIL rclk2 idle"); end
    // target above 8 saturates
    ramp_to(8, 0, 1 + 8 * RISE);
    target = 4'd15;
    repeat (5) @(posedge clk); #1;
    checks++; if (level != 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
