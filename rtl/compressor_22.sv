// compressor_22: 2:2 compressor (half adder). Two bits of one column become a
// sum bit of the same weight and a carry bit of twice the weight:
// x + y = s + 2c. Purely combinational.
module compressor_22 (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
