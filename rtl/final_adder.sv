// final_adder: carry-propagate addition of the two rows left by compression,
// s = x + y modulo 2^W. Ripple carry: a 2:2 compressor at bit 0, where no
// carry comes in, and a 3:2 compressor at every higher bit. The adder type is
// this design's own choice. Purely combinational.
module final_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);
  logic [W-1:0] c;

  compressor_22 u_lsb (.x(x[0]), .y(y[0]), .s(s[0]), .c(c[0]));

  for (genvar j = 1; j < W; j++) begin : g_bit
    compressor_32 u_fa (.x(x[j]), .y(y[j]), .z(c[j-1]), .s(s[j]), .c(c[j]));
  end
endmodule
