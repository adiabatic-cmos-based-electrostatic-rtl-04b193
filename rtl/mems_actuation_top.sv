// mems_actuation_top: digitally reconfigurable, adiabatically ramped charge
// pump driving an electrostatic MEMS actuator, with recovered charge powering
// small low-power blocks.
//
// Data flow (one clock domain, clk):
//   prog_word = {discharge, drive_code[3:0], involt[3:0]}  (9-bit program word)
//   involt/adc_in -> mux_memout -> memout (stage code)
//   memout -> control_signal (threshold assigners + converter) -> target
//   target -> adiabatic_controller -> level, ramped one stage at a time
//   level -> therm_dec -> CTRL1..CTRL8
//   nonoverlap_clk (slowed in steady state) + CTRL -> pump_clk_buffer
//       -> phi1/phi2 = CLK1.CTRLi / CLK2.CTRLi
//   drive_code -> dac -> anout -> clock drive level vclk = anout/50 x VIN
//   phi1/phi2, vclk -> charge_pump (behavioural) -> vout
//   vout -> mems_actuator (behavioural) -> actuated, capacitive_load
//   recycled clocks rclk1/rclk2, start_mux/start_clk -> lp_block
// The block set and their order follow the design; the exact bit layout of
// the program word, the use of the DAC level as the pump clock drive level,
// and the ramp/step timings are this design's choices.
//
// Timing: a new involt reaches `target` three clocks later (two mux
// registers, one converter register); the level then climbs one stage per
// RISE_STEP_CYCLES clocks and falls one stage per FALL_STEP_CYCLES clocks.
// rst_n is an active-low synchronous reset shared by every block.
module mems_actuation_top
  import mems_pkg::*;
#(
  parameter int unsigned NSTAGES          = NSTAGES_DEF,
  parameter int unsigned VIN_MV           = VIN_MV_DEF,
  parameter int unsigned RISE_STEP_CYCLES = 1,
  parameter int unsigned FALL_STEP_CYCLES = 32,
  parameter int unsigned SLOW_DIV         = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [8:0]         prog_word,
  input  logic [7:0]         adc_in,
  input  logic               src_sel,
  input  logic [2:0]         lp_sel,
  input  logic [7:0]         lp_data,
  output logic [NSTAGES-1:0] ctrl,
  output logic [NSTAGES-1:0] phi1,
  output logic [NSTAGES-1:0] phi2,
  output level_t             target,
  output level_t             level,
  output ac_state_t          ac_state,
  output mv_t                vout_mv,
  output logic               actuated,
  output logic [7:0]         anout,
  output logic               dac_bit,
  output logic [7:0]         recyc_count,
  output logic               start_mux,
  output logic               start_clk,
  output logic               lp_out,
  output logic [7:0]         lp_en,
  output logic               lp_and
);
  localparam int unsigned DAC_FS = 50;

  logic               clr;
  logic [3:0]         involt, drive_code;
  logic               discharge;
  logic [3:0]         memout;
  logic               discharging, steady;
  logic               rclk1, rclk2;
  logic               clk1, clk2;
  logic               capacitive_load;
  mv_t                vclk_mv;

  assign clr        = !rst_n;
  assign involt     = prog_word[3:0];
  assign drive_code = prog_word[7:4];
  assign discharge  = prog_word[8];

  mux_memout #(.NSTAGES(NSTAGES)) u_mux (
    .clk, .clr, .involt, .adc_in, .src_sel, .adcout(), .memout);

  control_signal #(.NSTAGES(NSTAGES)) u_ctl (
    .clk, .clr, .memout, .target, .target_therm(), .changed());

  adiabatic_controller #(
    .NSTAGES(NSTAGES), .RISE_STEP_CYCLES(RISE_STEP_CYCLES),
    .FALL_STEP_CYCLES(FALL_STEP_CYCLES)
  ) u_ac (
    .clk, .rst_n, .target, .discharge, .capacitive_load, .level,
    .state(ac_state), .charging(), .discharging, .steady, .recyc_count,
    .rclk1, .rclk2, .start_mux, .start_clk);

  therm_dec #(.NSTAGES(NSTAGES)) u_therm (.code(level), .therm(ctrl));

  nonoverlap_clk #(.SLOW_DIV(SLOW_DIV)) u_clk (
    .clk, .rst_n, .slow(steady), .clk1, .clk2);

  pump_clk_buffer #(.NSTAGES(NSTAGES)) u_buf (
    .clk, .rst_n, .clk1, .clk2, .ctrl, .phi1, .phi2);

  dac #(.FULL_SCALE(DAC_FS)) u_dac (
    .clk, .clr, .din(drive_code), .anout, .dac_bit);

  assign vclk_mv = mv_t'(int'(anout) * int'(VIN_MV) / int'(DAC_FS));

  charge_pump #(.NSTAGES(NSTAGES), .VIN_MV(VIN_MV)) u_cp (
    .clk, .rst_n, .phi1, .phi2, .vclk_mv, .discharge(discharging), .vout_mv);

  mems_actuator u_mems (
    .clk, .rst_n, .vin_mv(vout_mv), .actuated, .capacitive_load);

  lp_block u_lp (
    .clk, .rst_n, .rclk1, .rclk2, .start_mux, .start_clk, .sel(lp_sel),
    .data(lp_data), .mux_out(lp_out), .en_onehot(lp_en), .and_out(lp_and));
endmodule
