// adiabatic_controller: ramps the pump's active stage count in steps and
// accounts for the charge recovered from the MEMS capacitive load.
//
// Adiabatic switching needs every transition to be a controlled ramp rather
// than a jump. The controller therefore never moves the active stage count
// (`level`) by more than one stage at a time:
//   * CHARGE: level < goal, one stage up every RISE_STEP_CYCLES clocks;
//   * DISCHARGE: level > goal; one stage down at once, then one more every
//     FALL_STEP_CYCLES clocks, each step (the last included) held for
//     FALL_STEP_CYCLES clocks so the discharge stage can settle the output;
//   * HOLD: level == goal != 0 (steady state, the pump clock may be slowed);
//   * IDLE: level == goal == 0.
// goal is 0 while `discharge` (release request) is high, else `target`.
// Every downward step taken while the load still holds charge
// (capacitive_load high) returns one stage's worth of charge to the recycle
// store; recyc_count (the design's "y", saturating at 255) counts these steps.
// While charging, rclk1 toggles every clock; while discharging, rclk2 does:
// these are the two recycled clocks CLK1/CLK2 produced during charging and
// discharging. start_mux is high once any charge has been recycled; start_clk
// is high while recycled charge is flowing (discharging with start_mux set).
// The step sizes, the slow fall (8 x 32 clocks = 256 clocks = 6.4 us at
// 40 MHz, the design's fall time) and the start_* rules are this design's
// reading of a controller the source describes only by its waveforms.
//
// Timing: all outputs registered; rst_n active-low synchronous.
module adiabatic_controller
  import mems_pkg::*;
#(
  parameter int unsigned NSTAGES          = NSTAGES_DEF,
  parameter int unsigned RISE_STEP_CYCLES = 1,
  parameter int unsigned FALL_STEP_CYCLES = 32
) (
  input  logic       clk,
  input  logic       rst_n,
  input  level_t     target,
  input  logic       discharge,
  input  logic       capacitive_load,
  output level_t     level,
  output ac_state_t  state,
  output logic       charging,
  output logic       discharging,
  output logic       steady,
  output logic [7:0] recyc_count,
  output logic       rclk1,
  output logic       rclk2,
  output logic       start_mux,
  output logic       start_clk
);
  level_t      goal;
  logic [15:0] cnt;
  ac_state_t   nstate;

  assign goal = discharge ? '0 : sat_level(target, NSTAGES);

  always_comb begin
    if (level < goal)       nstate = AC_CHARGE;
    else if (level > goal)  nstate = AC_DISCHARGE;
    else if (state == AC_DISCHARGE && cnt != 16'(FALL_STEP_CYCLES - 1))
                            nstate = AC_DISCHARGE;  // dwell on the last step
    else if (level != '0)   nstate = AC_HOLD;
    else                    nstate = AC_IDLE;
  end

  assign charging    = (state == AC_CHARGE);
  assign discharging = (state == AC_DISCHARGE);
  assign steady      = (state == AC_HOLD);
  assign start_mux   = (recyc_count != '0);
  assign start_clk   = start_mux && discharging;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level       <= '0;
      state       <= AC_IDLE;
      cnt         <= '0;
      recyc_count <= '0;
      rclk1       <= 1'b0;
      rclk2       <= 1'b0;
    end else begin
      state <= nstate;
      rclk1 <= (nstate == AC_CHARGE)    ? !rclk1 : 1'b0;
      rclk2 <= (nstate == AC_DISCHARGE) ? !rclk2 : 1'b0;
      if (nstate != state) begin
        cnt <= '0;                         // a new ramp starts its step timer
        if (nstate == AC_DISCHARGE) begin  // a fall takes its first step at once
          level <= level - level_t'(1);
          if (capacitive_load && recyc_count != 8'hFF)
            recyc_count <= recyc_count + 8'd1;
        end
      end else if (nstate == AC_CHARGE) begin
        if (cnt == 16'(RISE_STEP_CYCLES - 1)) begin
          cnt   <= '0;
          level <= level + level_t'(1);
        end else cnt <= cnt + 16'd1;
      end else if (nstate == AC_DISCHARGE) begin
        if (cnt == 16'(FALL_STEP_CYCLES - 1)) begin
          cnt <= '0;
          if (level > goal) begin
            level <= level - level_t'(1);
            if (capacitive_load && recyc_count != 8'hFF)
              recyc_count <= recyc_count + 8'd1;
          end
        end else cnt <= cnt + 16'd1;
      end
    end
  end

  // A ramp never moves the level by more than one stage per clock.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (level == $past(level)) || (level == $past(level) + 1'b1) ||
                   (level + 1'b1 == $past(level)));
  assert property (@(posedge clk) disable iff (!rst_n) level <= level_t'(NSTAGES));
endmodule
