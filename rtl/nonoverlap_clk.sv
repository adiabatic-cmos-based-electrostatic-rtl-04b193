// nonoverlap_clk: two-phase nonoverlapping clock generator for the charge pump.
//
// A two-bit phase counter walks through four phases: CLK1 high, dead time,
// CLK2 high, dead time. CLK1 and CLK2 are therefore never high together and
// are separated by one phase of dead time on both edges. The counter advances
// on every system clock (pump clock = clk/4) or, when `slow` is high, on every
// SLOW_DIV-th clock: the pump clock is lowered in steady state to save power,
// as the design describes. The phase order follows the design's need for
// nonoverlapping clocks; the four-phase counter and SLOW_DIV are this
// design's own choices.
//
// Timing: clk1/clk2 are registered. rst_n is an active-low synchronous reset
// that leaves both phases low.
module nonoverlap_clk #(
  parameter int unsigned SLOW_DIV = 4      // steady-state slow-down factor
) (
  input  logic clk,
  input  logic rst_n,
  input  logic slow,
  output logic clk1,
  output logic clk2
);
  logic [1:0]  phase;
  logic [15:0] div;
  logic        tick;

  assign tick = !slow || (div == 16'(SLOW_DIV - 1));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= 2'd3;
      div   <= '0;
      clk1  <= 1'b0;
      clk2  <= 1'b0;
    end else begin
      div <= tick ? '0 : div + 16'd1;
      if (tick) begin
        phase <= phase + 2'd1;
        clk1  <= (phase + 2'd1) == 2'd0;
        clk2  <= (phase + 2'd1) == 2'd2;
      end
    end
  end

  // The two phases must never overlap.
  assert property (@(posedge clk) disable iff (!rst_n) !(clk1 && clk2));
endmodule
