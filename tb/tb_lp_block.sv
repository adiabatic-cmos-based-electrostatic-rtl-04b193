// tb_lp_block: the low-power 8:1 mux, AND gate and one-hot enables.
// Checks that nothing works with start_mux low, that mux_out takes data[sel]
// on recycled-clock edges once start_mux is high, and that and_out follows
// data[sel] AND start_clk one clock later.
module tb_lp_block;
  logic clk = 0, rst_n, rclk1, rclk2, start_mux, start_clk;
  logic [2:0] sel;
  logic [7:0] data, en_onehot;
  logic mux_out, and_out;
  int checks = 0, failures = 0;

  lp_block dut (.clk, .rst_n, .rclk1, .rclk2, .start_mux, .start_clk, .sel,
                .data, .mux_out, .en_onehot, .and_out);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_mux;
    rst_n = 0; rclk1 = 0; rclk2 = 0; start_mux = 0; start_clk = 0; sel = 0; data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    exp_mux = 0;
    for (int i = 0; i < 400; i++) begin
      logic [7:0] oh;
      logic p1, p2;
      sel = 3'($urandom); data = 8'($urandom);
      start_mux = (i >= 50) ? 1'($urandom_range(3) != 0) : 1'b0;
      start_clk = start_mux & 1'($urandom);
      p1 = rclk1; p2 = rclk2;
      rclk1 = 1'($urandom); rclk2 = 1'($urandom);
      #1;
      oh = start_mux ? (8'd1 << sel) : 8'd0;
      checks++;
      if (en_onehot !== oh) begin failures++; $display("FAIL onehot"); end
      // edge detect compares with the value sampled at the previous clock
      if (((rclk1 && !p1) || (rclk2 && !p2)) && start_mux) exp_mux = data[sel];
      @(posedge clk); #1;
      checks += 2;
      if (mux_out !== exp_mux) begin failures++; $display("FAIL mux_out=%b exp=%b", mux_out, exp_mux); end
      if (and_out !== (data[sel] & start_clk)) begin failures++; $display("FAIL and_out"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
