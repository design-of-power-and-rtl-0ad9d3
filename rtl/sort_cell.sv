// sort_cell: compare-exchange cell of the bit sorting network. For single
// bits the smaller value is the AND and the larger the OR of the two inputs.
// Purely combinational.
module sort_cell (
  input  logic x,
  input  logic y,
  output logic min_o,
  output logic max_o
);
  assign min_o = x & y;
  assign max_o = x | y;
endmodule
