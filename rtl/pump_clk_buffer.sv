// pump_clk_buffer: gated, buffered stage clocks for the reconfigurable pump.
//
// The bottom plates of stage i's pumping capacitors C1 and C2 are driven by
// CLK1.CTRLi and CLK2.CTRLi, so a stage whose CTRLi is low receives no clock
// and is bypassed. This block forms those 2 x NSTAGES products and registers
// them (the buffer that gives the drive strength to the next level).
//
// Timing: phi1/phi2 follow clk1/clk2/ctrl after one clock edge, so both
// phases keep their nonoverlap. rst_n is active-low, synchronous.
module pump_clk_buffer #(
  parameter int unsigned NSTAGES = mems_pkg::NSTAGES_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clk1,
  input  logic               clk2,
  input  logic [NSTAGES-1:0] ctrl,
  output logic [NSTAGES-1:0] phi1,
  output logic [NSTAGES-1:0] phi2
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phi1 <= '0;
      phi2 <= '0;
    end else begin
      phi1 <= {NSTAGES{clk1}} & ctrl;
      phi2 <= {NSTAGES{clk2}} & ctrl;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(|phi1 && |phi2));
endmodule
