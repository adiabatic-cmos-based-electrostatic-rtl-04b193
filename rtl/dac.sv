// dac: 4-bit digital-to-analog converter built only from logic, used to set
// the pump clock drive level (VddClk).
//
// Threshold assigner: each input bit b(k-1), k = 1..4, makes a partial level
// st_k = k x 1.25 V when set and 0 V when clear. Converter: anout is the sum
// of the four partial levels (0 .. 12.5 V). The weights 1.25, 2.5, 3.75, 5 V
// follow the design's DAC waveforms (input 0110 gives st2 = 2.5 V,
// st3 = 3.75 V, anout = 6.25 V); the DAC is deliberately not binary-weighted.
// anout is carried as an unsigned count of 0.25 V units (6.25 V -> 25).
//
// Analog output without external parts: a first-order delta-sigma modulator
// emits dac_bit whose density of ones equals anout / FULL_SCALE. This
// modulator, and reading the full scale (50 units) as the supply level, are
// this design's own choices.
//
// Timing: st registers follow din after one clock edge, anout after two;
// dac_bit is a registered stream. clr is a synchronous clear.
module dac #(
  parameter int unsigned FULL_SCALE = 50   // anout units at full scale
) (
  input  logic       clk,
  input  logic       clr,
  input  logic [3:0] din,
  output logic [7:0] anout,
  output logic       dac_bit
);
  localparam int unsigned UNIT = 5;        // 1.25 V in 0.25 V units

  logic [7:0] st [4];                      // partial levels st1..st4
  logic [7:0] acc;                         // modulator accumulator

  always_ff @(posedge clk) begin
    if (clr) begin
      for (int k = 0; k < 4; k++) st[k] <= '0;
      anout   <= '0;
      acc     <= '0;
      dac_bit <= 1'b0;
    end else begin
      for (int k = 0; k < 4; k++)
        st[k] <= din[k] ? 8'((k + 1) * UNIT) : 8'd0;
      anout <= st[0] + st[1] + st[2] + st[3];
      if (9'(acc) + 9'(anout) >= 9'(FULL_SCALE)) begin
        acc     <= 8'(9'(acc) + 9'(anout) - 9'(FULL_SCALE));
        dac_bit <= 1'b1;
      end else begin
        acc     <= acc + anout;
        dac_bit <= 1'b0;
      end
    end
  end
endmodule
