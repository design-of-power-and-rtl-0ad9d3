// compressor_42: 4:2 compressor. Four bits of one column plus a carry-in from
// the column below are reduced to a sum bit s and two bits of twice the weight,
// c and cout:  x[0] + x[1] + x[2] + x[3] + cin = s + 2(c + cout).
// It is built from two 3:2 compressors. cout depends only on x, never on cin,
// so a row of these cells has no carry ripple. Purely combinational.
module compressor_42 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       s,
  output logic       c,
  output logic       cout
);
  logic s1;

  compressor_32 u_first  (.x(x[0]), .y(x[1]), .z(x[2]), .s(s1), .c(cout));
  compressor_32 u_second (.x(s1),   .y(x[3]), .z(cin),  .s(s),  .c(c));
endmodule
