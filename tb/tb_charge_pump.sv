// tb_charge_pump: drives the pump model with gated nonoverlapping clocks for
// n = 0..8 active stages at a 1.2 V drive and checks the settled output is
// (n+1) x 1.2 V within 1%; then checks a weak 0.3 V drive gives only half the
// per-stage gain, and that the discharge stage brings the output down to the
// new lower target when stages are removed.
module tb_charge_pump;
  import mems_pkg::*;
  logic clk = 0, rst_n, discharge;
  logic [7:0] phi1, phi2, ctrl;
  mv_t vclk_mv, vout_mv;
  int checks = 0, failures = 0;
  int ph;

  charge_pump dut (.clk, .rst_n, .phi1, .phi2, .vclk_mv, .discharge, .vout_mv);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // four-phase nonoverlapping clock, gated by ctrl
  always @(posedge clk) begin
    if (!rst_n) begin ph <= 0; phi1 <= 0; phi2 <= 0; end
    else begin
      ph   <= (ph + 1) % 4;
      phi1 <= (ph == 0) ? ctrl : 8'd0;
      phi2 <= (ph == 2) ? ctrl : 8'd0;
    end
  end

  task automatic settle_check(input int exp_mv);
    int err;
    repeat (400) @(posedge clk); #1;
    err = int'(vout_mv) - exp_mv;
    if (err < 0) err = -err;
    checks++;
    if (err * 100 > exp_mv) begin
      failures++; $display("FAIL ctrl=%b vout=%0d exp=%0d", ctrl, vout_mv, exp_mv);
    end
  endtask

  initial begin
    rst_n = 0; ctrl = 0; discharge = 0; vclk_mv = 16'd1200;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    settle_check(1200);
    for (int n = 1; n <= 8; n++) begin
      ctrl = 8'((9'd1 << n) - 9'd1);
      settle_check((n + 1) * 1200);
    end
    // remove four stages: output holds (capacitive load) until discharged
    ctrl = 8'h0F;
    repeat (400) @(posedge clk); #1;
    checks++;
    if (vout_mv < 16'd10000) begin failures++; $display("FAIL pump lost charge without discharge"); end
    discharge = 1;
    settle_check(5 * 1200);
    discharge = 0;
    // weak clock drive below 0.5 V halves the stage gain
    vclk_mv = 16'd300;
    ctrl = 8'hFF;
    discharge = 1;
    settle_check(1200 + 8 * 150);
    discharge = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
