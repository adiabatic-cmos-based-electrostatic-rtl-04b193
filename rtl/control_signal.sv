// control_signal: the control-signal stage ("threshold assigner" plus
// "converter") between the memout path and the adiabatic controller.
//
// The 4-bit memout code is compared against the NSTAGES stage thresholds by a
// bank of threshold assigners (a therm_dec instance), each producing one bit.
// The converter registers that thermometer pattern and the matching target
// stage count, saturated to 0..NSTAGES, and pulses `changed` for one cycle
// whenever the registered target takes a new value, so the controller can
// start a new ramp. Clock and clear are shared with the other converters of
// the design, as it describes; clear is synchronous.
//
// Timing: target/target_therm follow memout after one clock edge; changed
// is high in the cycle the new target first appears.
module control_signal
  import mems_pkg::*;
#(
  parameter int unsigned NSTAGES = mems_pkg::NSTAGES_DEF
) (
  input  logic               clk,
  input  logic               clr,
  input  logic [3:0]         memout,
  output level_t             target,
  output logic [NSTAGES-1:0] target_therm,
  output logic               changed
);
  logic [NSTAGES-1:0] thr;
  level_t             lvl_next;

  therm_dec #(.NSTAGES(NSTAGES)) u_thr (.code(memout), .therm(thr));

  assign lvl_next = sat_level(memout, NSTAGES);

  always_ff @(posedge clk) begin
    if (clr) begin
      target       <= '0;
      target_therm <= '0;
      changed      <= 1'b0;
    end else begin
      target       <= lvl_next;
      target_therm <= thr;
      changed      <= (lvl_next != target);
    end
  end
endmodule
