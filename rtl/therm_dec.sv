// therm_dec: 4-to-8 thermometer decoder for the charge pump stage enables.
//
// Each output bit is one threshold comparison: CTRL(i+1) is high when the
// input stage count exceeds i. A count of n therefore switches on stages
// CTRL1..CTRLn and, following the array control table of the design, gives
// an unloaded pump output of (n+1) x Vin (count 0: Vin, count 8: 9 x Vin).
// Counts above NSTAGES saturate to all stages on (this design's choice).
// Purely combinational; bit 0 of therm is CTRL1.
module therm_dec #(
  parameter int unsigned NSTAGES = mems_pkg::NSTAGES_DEF
) (
  input  logic [3:0]         code,
  output logic [NSTAGES-1:0] therm
);
  always_comb begin
    for (int i = 0; i < int'(NSTAGES); i++)
      therm[i] = (int'(code) > i);
  end
endmodule
