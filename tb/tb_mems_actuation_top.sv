// tb_mems_actuation_top: end-to-end run of the whole actuation system at its
// default parameters (8 stages, 1.2 V supply, 32-clock fall steps).
//
// Sequence: full drive to 8 stages (pull-in), reconfiguration down to 4
// stages, release, a weak clock drive level, and the 8-bit adc_in source.
// It checks the stage-count timing (program word -> target in 3 clocks,
// then one stage per clock up and one per 32 clocks down), the settled pump
// voltage (n+1) x 1.2 V, MEMS pull-in/release, that only enabled stages are
// clocked and the two phases never overlap, that the pump clock slows from
// 4 to 16 clocks per cycle in steady state, and that recovered charge enables
// the low-power blocks. Each mechanism is counted; one that never happens is
// a failure.
module tb_mems_actuation_top;
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

  // mechanism counters
  int n_charge, n_discharge, n_steady_slow, n_reconfig, n_recycle, n_pullin,
      n_release, n_lp_mux, n_lp_and, n_weak, n_adc_src;

  mems_actuation_top dut (.clk, .rst_n, .prog_word, .adc_in, .src_sel, .lp_sel,
    .lp_data, .ctrl, .phi1, .phi2, .target, .level, .ac_state, .vout_mv, .actuated,
    .anout, .dac_bit, .recyc_count, .start_mux, .start_clk, .lp_out, .lp_en,
    .lp_and);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- per-cycle monitors ------------------------------------------------
  logic [7:0] ctrl_q, recyc_q;
  logic       act_q, lp_out_q;
  ac_state_t  st_q;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if ((phi1 & ~ctrl_q) != 0 || (phi2 & ~ctrl_q) != 0) begin
        failures++; $display("FAIL disabled stage clocked");
      end
      if (phi1 != 0 && phi2 != 0) begin failures++; $display("FAIL phase overlap"); end
      if (ac_state == AC_CHARGE && st_q != AC_CHARGE) n_charge++;
      if (ac_state == AC_DISCHARGE && st_q != AC_DISCHARGE) n_discharge++;
      if (recyc_count != recyc_q) n_recycle++;
      if (actuated && !act_q) n_pullin++;
      if (!actuated && act_q) n_release++;
      if (lp_out != lp_out_q) n_lp_mux++;
      if (lp_and) n_lp_and++;
    end
    ctrl_q <= ctrl; st_q <= ac_state; recyc_q <= recyc_count;
    act_q <= actuated; lp_out_q <= lp_out;
  end

  // ---- helpers -------------------------------------------------------------
  task automatic set_word(input bit dis, input int drive, input int involt);
    prog_word = {dis, 4'(drive), 4'(involt)};
  endtask

  // wait until level == goal, return clocks taken
  task automatic wait_level(input int goal, input int exp_cycles, input string what);
    int n;
    n = 0;
    do begin @(posedge clk); #1; n++; end while (int'(level) != goal && n < 2000);
    checks++;
    if (n != exp_cycles) begin
      failures++; $display("FAIL %s: level %0d after %0d clocks, exp %0d", what, goal, n, exp_cycles);
    end
  endtask

  task automatic check_vout(input int exp_mv, input string what);
    int err;
    err = int'(vout_mv) - exp_mv;
    if (err < 0) err = -err;
    checks++;
    if (err * 50 > exp_mv) begin
      failures++; $display("FAIL %s: vout=%0d mV exp=%0d mV", what, vout_mv, exp_mv);
    end
  endtask

  // period of stage-1 phase-1 clock, in system clocks
  task automatic pump_period(output int p);
    int t0;
    t0 = 0;
    while (!phi1[0]) begin @(posedge clk); #1; end
    while (phi1[0])  begin @(posedge clk); #1; end
    while (!phi1[0]) begin @(posedge clk); #1; end
    while (phi1[0])  begin @(posedge clk); #1; t0++; end
    while (!phi1[0]) begin @(posedge clk); #1; t0++; end
    p = t0;
  endtask

  initial begin
    int p;
    {n_charge, n_discharge, n_steady_slow, n_reconfig, n_recycle, n_pullin,
     n_release, n_lp_mux, n_lp_and, n_weak, n_adc_src} = '0;
    rst_n = 0; adc_in = 0; src_sel = 0; lp_sel = 3'd5; lp_data = 8'b0010_0000;
    set_word(0, 0, 0);
    repeat (4) @(posedge clk);
    #1 rst_n = 1;
    repeat (4) @(posedge clk); #1;
    check_vout(1200, "idle output equals supply");

    // 1. full drive (anout 50 -> 1.2 V clock level), 8 stages
    set_word(0, 4'b1111, 15);
    repeat (3) @(posedge clk); #1;
    checks++; if (target != 4'd8) begin failures++; $display("FAIL target=%0d after 3 clocks", target); end
    wait_level(8, 1 + 8, "charge ramp");
    checks++; if (anout != 8'd50) begin failures++; $display("FAIL anout=%0d", anout); end
    repeat (1500) @(posedge clk); #1;
    check_vout(9 * 1200, "8 stages");
    checks++; if (!actuated) begin failures++; $display("FAIL no pull-in"); end
    checks++; if (ac_state != AC_HOLD) begin failures++; $display("FAIL not in hold"); end
    pump_period(p);
    checks++;
    if (p != 16) begin failures++; $display("FAIL steady pump period %0d exp 16", p); end
    else n_steady_slow++;

    // 2. reconfigure down to 4 stages: involt 7 -> adcout 0x77 -> idx 14 -> 4
    set_word(0, 4'b1111, 7);
    wait_level(4, 3 + 1 + 3 * 32, "reconfigure fall");
    n_reconfig++;
    checks++; if (recyc_count != 8'd4) begin failures++; $display("FAIL recyc_count=%0d exp 4", recyc_count); end
    checks++; if (!start_mux || lp_en != 8'b0010_0000) begin failures++; $display("FAIL lp enable %b", lp_en); end
    repeat (1500) @(posedge clk); #1;
    check_vout(5 * 1200, "4 stages");
    checks++; if (!actuated) begin failures++; $display("FAIL released inside hysteresis"); end
    // faster pump clock while ramping, check it while charging back up
    set_word(0, 4'b1111, 15);
    repeat (3) @(posedge clk);
    wait_level(8, 1 + 4, "charge back up");

    // 3. release: discharge bit ramps all stages down, MEMS lets go
    repeat (500) @(posedge clk); #1;
    set_word(1, 4'b1111, 15);
    wait_level(0, 1 + 7 * 32, "release ramp");
    repeat (2000) @(posedge clk); #1;
    checks++; if (actuated) begin failures++; $display("FAIL no release"); end
    checks++; if (recyc_count != 8'd12) begin failures++; $display("FAIL recyc_count=%0d exp 12", recyc_count); end

    // 4. weak clock drive: din 0001 -> 1.25 V level x 1.2/12.5 = 120 mV,
    //    below the 0.5 V drive minimum: per-stage gain halved to 60 mV
    set_word(0, 4'b0001, 15);
    wait_level(8, 1 + 8, "weak-drive ramp");
    repeat (1500) @(posedge clk); #1;
    check_vout(1200 + 8 * 60, "weak drive");
    checks++; if (actuated) begin failures++; $display("FAIL pulled in with weak drive"); end
    else n_weak++;

    // 5. adc_in source: 0x40 -> idx 8 -> round(64/31) = 2 stages
    set_word(1, 4'b1111, 0);
    wait_level(0, 1 + 7 * 32, "release from weak");
    src_sel = 1; adc_in = 8'h40;
    set_word(0, 4'b1111, 0);
    wait_level(2, 3 + 1 + 2, "adc source ramp");
    repeat (1500) @(posedge clk); #1;
    check_vout(3 * 1200, "2 stages from adc_in");
    n_adc_src++;

    // mechanisms that must have happened
    checks++; if (n_charge < 3)     begin failures++; $display("FAIL no charge ramps"); end
    checks++; if (n_discharge < 3)  begin failures++; $display("FAIL no discharge ramps"); end
    checks++; if (n_steady_slow < 1) failures++;
    checks++; if (n_reconfig < 1)   failures++;
    checks++; if (n_recycle < 1)    begin failures++; $display("FAIL no recycle"); end
    checks++; if (n_pullin < 1)     begin failures++; $display("FAIL no pull-in"); end
    checks++; if (n_release < 1)    begin failures++; $display("FAIL no release"); end
    checks++; if (n_lp_mux < 1)     begin failures++; $display("FAIL low-power mux idle"); end
    checks++; if (n_lp_and < 1)     begin failures++; $display("FAIL low-power AND idle"); end
    checks++; if (n_weak < 1)       failures++;
    checks++; if (n_adc_src < 1)    failures++;
    $display("mechanisms: charge=%0d discharge=%0d steady_slow=%0d reconfig=%0d recycle=%0d pullin=%0d release=%0d lp_mux=%0d lp_and=%0d weak=%0d adc=%0d",
             n_charge, n_discharge, n_steady_slow, n_reconfig, n_recycle, n_pullin,
             n_release, n_lp_mux, n_lp_and, n_weak, n_adc_src);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
