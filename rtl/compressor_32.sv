// compressor_32: 3:2 compressor (full adder). Three bits of one column become
// a sum bit and a carry bit of twice the weight: x + y + z = s + 2c.
// Purely combinational.
module compressor_32 (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic s,
  output logic c
);
  assign s = x ^ y ^ z;
  assign c = (x & y) | (x & z) | (y & z);
endmodule
