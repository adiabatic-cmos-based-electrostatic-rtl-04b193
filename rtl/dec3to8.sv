// dec3to8: 3:8 one-hot decoder with enable.
//
// Selects one of the eight low-power outputs fed from recycled energy. When
// en is low every output is low ("the circuit does not work while giving
// 0's"). Combinational; y[sel] is the selected line.
module dec3to8 (
  input  logic       en,
  input  logic [2:0] sel,
  output logic [7:0] y
);
  always_comb begin
    y = '0;
    if (en) y[sel] = 1'b1;
  end
endmodule
