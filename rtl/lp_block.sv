// lp_block: the low-power blocks run from recycled energy.
//
// The recycled clocks rclk1/rclk2 (produced while the MEMS load charges and
// discharges) clock a small 8:1 multiplexer and an AND gate, the two example
// loads the design drives from recovered charge. A 3:8 decoder turns the same
// select into one-hot enables for eight such loads. Nothing works while
// start_mux is low; it all works once it is high.
//   * mux_out: on each rising edge of rclk1 or rclk2, and only if start_mux
//     is high, takes data[sel]; otherwise it holds.
//   * and_out: registered data[sel] AND start_clk.
//   * en_onehot: one-hot of sel, all zero while start_mux is low.
// The recycled clocks are sampled by the system clock (edge detect) rather
// than used as clocks, so the block stays in one clock domain; that, and the
// exact gating rules, are this design's own choices.
//
// Timing: mux_out and and_out are registered; en_onehot is combinational.
// rst_n is active-low, synchronous.
module lp_block (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rclk1,
  input  logic       rclk2,
  input  logic       start_mux,
  input  logic       start_clk,
  input  logic [2:0] sel,
  input  logic [7:0] data,
  output logic       mux_out,
  output logic [7:0] en_onehot,
  output logic       and_out
);
  logic r1_q, r2_q, redge;

  assign redge = (rclk1 && !r1_q) || (rclk2 && !r2_q);

  dec3to8 u_dec (.en(start_mux), .sel(sel), .y(en_onehot));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r1_q    <= 1'b0;
      r2_q    <= 1'b0;
      mux_out <= 1'b0;
      and_out <= 1'b0;
    end else begin
      r1_q    <= rclk1;
      r2_q    <= rclk2;
      if (redge && start_mux) mux_out <= data[sel];
      and_out <= data[sel] && start_clk;
    end
  end
endmodule
