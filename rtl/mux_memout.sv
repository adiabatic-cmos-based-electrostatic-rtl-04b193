// mux_memout: the two-multiplexer "memout" path that turns a voltage request
// into a pump stage code.
//
// mux0 selects the 8-bit word adcout: either the 4-bit involt request widened
// to full scale ({involt, involt}, i.e. involt x 17, so 4'hF maps to 8'hFF) or,
// when src_sel is high, an 8-bit sample adc_in. mux1 takes the top five bits of
// adcout (32 combinations) and maps them onto a stage code
//   memout = round(idx x NSTAGES / 31),  idx = adcout[7:3],
// so the full 8-bit range spans stage counts 0..NSTAGES evenly.
// The two-mux structure, the 4-bit involt, the 8-bit adcout and the 32
// memout combinations follow the design; the widening rule, the mapping
// formula and the adc_in source are this design's own choices.
//
// Timing: both muxes are registered, so memout follows involt/adc_in after
// two clock edges. clr is a synchronous clear to zero.
module mux_memout #(
  parameter int unsigned NSTAGES = mems_pkg::NSTAGES_DEF
) (
  input  logic       clk,
  input  logic       clr,
  input  logic [3:0] involt,
  input  logic [7:0] adc_in,
  input  logic       src_sel,
  output logic [7:0] adcout,
  output logic [3:0] memout
);
  // mux1 mapping, one of 32 entries.
  function automatic logic [3:0] stage_of(input logic [4:0] idx);
    logic [31:0] v;
    v = (32'(idx) * NSTAGES + 32'd15) / 32'd31;
    return v[3:0];
  endfunction

  always_ff @(posedge clk) begin
    if (clr) begin
      adcout <= '0;
      memout <= '0;
    end else begin
      adcout <= src_sel ? adc_in : {involt, involt};
      memout <= stage_of(adcout[7:3]);
    end
  end
endmodule
