// mems_pkg: types and constants shared by the adiabatic MEMS actuation design.
//
// The charge pump has eight identical stages (CTRL1..CTRL8) fed from a 1.2 V
// supply, so a stage count needs four bits (0..8). Voltages inside the
// behavioural models are carried as unsigned integers in millivolts.
// The controller states are this design's own encoding.
package mems_pkg;
  localparam int unsigned NSTAGES_DEF = 8;     // pump stages
  localparam int unsigned VIN_MV_DEF  = 1200;  // supply, mV
  localparam int unsigned LEVEL_W     = 4;     // width of a stage count
  localparam int unsigned MV_W        = 16;    // width of a voltage in mV

  typedef logic [LEVEL_W-1:0] level_t;
  typedef logic [MV_W-1:0]    mv_t;

  // Adiabatic controller states.
  typedef enum logic [1:0] {
    AC_IDLE      = 2'd0,  // level at zero, nothing stored
    AC_CHARGE    = 2'd1,  // stepping the stage count up
    AC_HOLD      = 2'd2,  // level equals target (steady state)
    AC_DISCHARGE = 2'd3   // stepping the stage count down, recovering charge
  } ac_state_t;

  // Saturate a 4-bit code to the number of stages.
  function automatic level_t sat_level(input logic [3:0] code, input int unsigned n);
    return (int'(code) > int'(n)) ? level_t'(n) : level_t'(code);
  endfunction
endpackage
