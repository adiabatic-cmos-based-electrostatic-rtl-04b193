// tb_control_signal: drives stage codes into the converter and checks the
// registered target (saturated to 8), its thermometer pattern and the
// one-cycle change strobe, against values computed here.
module tb_control_signal;
  import mems_pkg::*;
  logic       clk = 0, clr;
  logic [3:0] memout;
  level_t     target;
  logic [7:0] target_therm;
  logic       changed;
  int checks = 0, failures = 0;
  int prev_t;

  control_signal dut (.clk, .clr, .memout, .target, .target_therm, .changed);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int m);
    int t;
    logic [8:0] th;
    memout = 4'(m);
    @(posedge clk); #1;
    t  = (m > 8) ? 8 : m;
    th = (9'd1 << t) - 9'd1;
    checks += 3;
    if (int'(target) != t) begin
      failures++; $display("FAIL memout=%0d target=%0d exp=%0d", m, target, t);
    end
    if (target_therm !== th[7:0]) begin
      failures++; $display("FAIL therm=%b exp=%b", target_therm, th[7:0]);
    end
    if (changed !== (t != prev_t)) begin
      failures++; $display("FAIL changed=%b prev=%0d t=%0d", changed, prev_t, t);
    end
    prev_t = t;
  endtask

  initial begin
    clr = 1; memout = 0;
    repeat (3) @(posedge clk);
    #1 clr = 0; prev_t = 0;
    for (int m = 0; m < 16; m++) step(m);
    step(3); step(3); step(12); step(8); step(0);
    for (int i = 0; i < 200; i++) step($urandom_range(15));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
