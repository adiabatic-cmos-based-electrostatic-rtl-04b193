// mems_actuator: behavioural model of the electrostatic MEMS actuator, a
// purely capacitive load (about 1 pF) on the charge pump output. Not a
// circuit: it lets the control logic see the load's state in simulation.
//
// The plate pulls in when the applied voltage reaches VPI_MV and releases
// only when it falls below VREL_MV (electrostatic pull-in hysteresis).
// capacitive_load is high while the load holds charge above the supply
// (applied voltage above CHG_MV), i.e. while there is charge to recycle.
// The voltage thresholds are this model's assumptions.
//
// Timing: both outputs registered; rst_n active-low, synchronous.
module mems_actuator
  import mems_pkg::*;
#(
  parameter int unsigned VPI_MV  = 6000,
  parameter int unsigned VREL_MV = 3000,
  parameter int unsigned CHG_MV  = 1200
) (
  input  logic clk,
  input  logic rst_n,
  input  mv_t  vin_mv,
  output logic actuated,
  output logic capacitive_load
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      actuated        <= 1'b0;
      capacitive_load <= 1'b0;
    end else begin
      if (int'(vin_mv) >= VPI_MV)      actuated <= 1'b1;
      else if (int'(vin_mv) < VREL_MV) actuated <= 1'b0;
      capacitive_load <= (int'(vin_mv) > CHG_MV);
    end
  end
endmodule
