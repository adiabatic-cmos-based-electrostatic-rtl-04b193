// tb_stage_sweep: runs the array control table through the whole system.
// For every 4-bit voltage request involt = 0..15 at full clock drive, it
// waits for the stage ramp and the pump to settle, then checks
//   * the stage count equals round(((involt x 17) / 8) x 8 / 31), worked out
//     here with real arithmetic;
//   * CTRL1..CTRLn are high and the rest low (thermometer table);
//   * the settled output is (n+1) x 1.2 V within 2 % (n = 0 excluded: the
//     model leaves the discharged output where the discharge stage left it);
//   * the actuator is pulled in exactly when the output is at or above 6 V
//     on the way up.
// The requests go up 0..15 and then down 15..0, so every level is reached
// both by a charge ramp and by a discharge ramp.
module tb_stage_sweep;
  import mems_pkg::*;
  logic       clk = 0, rst_n;
  logic [8:0] prog_word;
  logic [7:0] adc_in, lp_data;
  logic       src_sel;
  logic [2:0] lp_sel;
  logic [7:0] ctrl, phi1, phi2, anout, recyc_count, lp_en;
  level_t     target, level;
  ac_state_t  ac_state;
  mv_t        vout_mv;
  logic       actuated, dac_bit, start_mux, start_clk, lp_out, lp_and;
  int checks = 0, failures = 0;

  mems_actuation_top dut (.clk, .rst_n, .prog_word, .adc_in, .src_sel, .lp_sel,
    .lp_data, .ctrl, .phi1, .phi2, .target, .level, .ac_state, .vout_mv,
    .actuated, .anout, .dac_bit, .recyc_count, .start_mux, .start_clk, .lp_out,
    .lp_en, .lp_and);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stages_for(input int v);
    int idx;
    idx = (v * 17) / 8;
    return $rtoi(idx * 8.0 / 31.0 + 0.5);
  endfunction

  task automatic visit(input int v, input bit up);
    int n, err;
    logic [8:0] th;
    n = stages_for(v);
    prog_word = {1'b0, 4'hF, 4'(v)};
    repeat (3 + 9 * 32 + 1200) @(posedge clk); #1;
    th = (9'd1 << n) - 9'd1;
    checks += 2;
    if (int'(level) != n) begin
      failures++; $display("FAIL involt=%0d level=%0d exp=%0d", v, level, n);
    end
    if (ctrl !== th[7:0]) begin
      failures++; $display("FAIL involt=%0d ctrl=%b exp=%b", v, ctrl, th[7:0]);
    end
    if (n > 0) begin
      err = int'(vout_mv) - (n + 1) * 1200;
      if (err < 0) err = -err;
      checks++;
      if (err * 50 > (n + 1) * 1200) begin
        failures++; $display("FAIL involt=%0d n=%0d vout=%0d", v, n, vout_mv);
      end
    end
    if (up) begin
      checks++;
      if (actuated != ((n + 1) * 1200 >= 6000)) begin
        failures++; $display("FAIL involt=%0d actuated=%b", v, actuated);
      end
    end
  endtask

  initial begin
    rst_n = 0; adc_in = 0; src_sel = 0; lp_sel = 0; lp_data = 0;
    prog_word = '0;
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    for (int v = 0; v < 16; v++) visit(v, 1'b1);
    for (int v = 15; v >= 0; v--) visit(v, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
