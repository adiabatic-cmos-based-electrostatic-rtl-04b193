// charge_pump: behavioural model of the 8-stage reconfigurable
// switched-capacitor charge pump and its discharge stage. Not synthesizable
// as a real circuit: it stands in for analog hardware so the digital control
// can be simulated end to end.
//
// Stage i is active when its gated clocks phi1[i]/phi2[i] toggle. With n
// active stages and a clock drive level Vclk the unloaded output settles to
//   Vtarget = VIN + n x Veff,   Veff = Vclk (Vclk >= 500 mV) else Vclk / 2,
// which gives 2 x Vin .. 9 x Vin for n = 1..8 at Vclk = Vin, as in the
// design's array control table, and models the weak clock drive below the
// 0.5 V minimum drive level. Each pump cycle (a rising edge on any phi2 bit)
// moves the output a quarter of the way up toward Vtarget: the pump can only
// add charge to the purely capacitive load. The set of active stages is
// sampled at each phi1 rising edge and cleared after 16 clocks without one.
// While `discharge` is high the discharge stage bleeds the output one eighth
// of the way toward Vtarget each clock (or toward 0 with no stage active
// and the discharge held). The quarter/eighth rates are this model's own.
//
// Interface: voltages in mV. Timing: vout_mv is registered; rst_n active-low,
// synchronous, sets the output to VIN.
module charge_pump
  import mems_pkg::*;
#(
  parameter int unsigned NSTAGES = NSTAGES_DEF,
  parameter int unsigned VIN_MV  = VIN_MV_DEF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NSTAGES-1:0] phi1,
  input  logic [NSTAGES-1:0] phi2,
  input  mv_t                vclk_mv,
  input  logic               discharge,
  output mv_t                vout_mv
);
  logic [NSTAGES-1:0] active;
  logic [NSTAGES-1:0] phi1_q, phi2_q;
  logic [4:0]         idle_cnt;
  int unsigned        n, veff, vtgt, vfloor;

  always_comb begin
    n = 0;
    for (int i = 0; i < int'(NSTAGES); i++) n += int'(active[i]);
    veff   = (int'(vclk_mv) >= 500) ? int'(vclk_mv) : int'(vclk_mv) / 2;
    vtgt   = VIN_MV + n * veff;
    vfloor = (n == 0) ? 0 : vtgt;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active   <= '0;
      phi1_q   <= '0;
      phi2_q   <= '0;
      idle_cnt <= '0;
      vout_mv  <= mv_t'(VIN_MV);
    end else begin
      phi1_q <= phi1;
      phi2_q <= phi2;
      if (|(phi1 & ~phi1_q)) begin
        active   <= phi1;
        idle_cnt <= '0;
      end else if (idle_cnt == 5'd16) begin
        active   <= '0;
      end else begin
        idle_cnt <= idle_cnt + 5'd1;
      end
      if (discharge && int'(vout_mv) > vfloor)
        vout_mv <= mv_t'(int'(vout_mv) - (int'(vout_mv) - vfloor + 7) / 8);
      else if (|(phi2 & ~phi2_q) && vtgt > int'(vout_mv))
        vout_mv <= mv_t'(int'(vout_mv) + (vtgt - int'(vout_mv) + 3) / 4);
    end
  end
endmodule
