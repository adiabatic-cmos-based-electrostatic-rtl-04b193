// tb_mux_memout: random requests through the two-mux memout path.
// The reference widens involt by multiplying by 17 and maps the top five bits
// of the 8-bit word to round(idx x 8 / 31) with real arithmetic, then checks
// the two-clock latency of the registered muxes. Also checks the end points
// (involt 0 -> 0 stages, involt 15 -> 8 stages) and all 32 memout combinations
// through the adc_in source.
module tb_mux_memout;
  logic       clk = 0, clr;
  logic [3:0] involt;
  logic [7:0] adc_in;
  logic       src_sel;
  logic [7:0] adcout;
  logic [3:0] memout;
  int checks = 0, failures = 0;

  mux_memout dut (.clk, .clr, .involt, .adc_in, .src_sel, .adcout, .memout);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_word(input int v, input int a, input int s);
    return s ? a : v * 17;
  endfunction
  function automatic int ref_mem(input int word);
    int idx;
    idx = word / 8;
    return $rtoi(idx * 8.0 / 31.0 + 0.5);
  endfunction

  task automatic apply_and_check(input int v, input int a, input int s);
    involt = 4'(v); adc_in = 8'(a); src_sel = 1'(s);
    @(posedge clk); #1;
    checks++;
    if (int'(adcout) != ref_word(v, a, s)) begin
      failures++;
      $display("FAIL adcout=%0d exp=%0d", adcout, ref_word(v, a, s));
    end
    @(posedge clk); #1;
    checks++;
    if (int'(memout) != ref_mem(ref_word(v, a, s))) begin
      failures++;
      $display("FAIL v=%0d a=%0d s=%0d memout=%0d exp=%0d", v, a, s, memout,
               ref_mem(ref_word(v, a, s)));
    end
  endtask

  initial begin
    clr = 1; involt = 0; adc_in = 0; src_sel = 0;
    repeat (3) @(posedge clk);
    #1 clr = 0;
    apply_and_check(0, 0, 0);
    checks++; if (memout != 0) failures++;
    apply_and_check(15, 0, 0);
    checks++; if (memout != 8) failures++;
    for (int i = 0; i < 32; i++) apply_and_check(0, i * 8 + 3, 1);
    for (int i = 0; i < 200; i++)
      apply_and_check($urandom_range(15), $urandom_range(255), $urandom_range(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
