// sorting_network: sorts the W bits of x so that all ones come first.
//
// Output bit k is 1 exactly when x holds more than k ones, i.e. y is the
// thermometer code of the population count of x. The network is made of
// compare-exchange cells (min/max, see sort_cell) arranged as an odd-even
// transposition sorter: W stages, even stages compare pairs (0,1), (2,3), ...
// and odd stages pairs (1,2), (3,4), ...; the larger bit moves to the lower
// index. The min/max cells follow the published design; the transposition arrangement
// is this design's own. Purely combinational.
module sorting_network #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  logic [W-1:0] st [W+1];

  assign st[0] = x;

  for (genvar s = 0; s < W; s++) begin : g_stage
    for (genvar j = 0; j < W; j++) begin : g_pos
      if ((j % 2) == (s % 2) && j + 1 < W) begin : g_cell
        sort_cell u_cell (
          .x    (st[s][j]),
          .y    (st[s][j+1]),
          .min_o(st[s+1][j+1]),
          .max_o(st[s+1][j])
        );
      end else if (!((j % 2) != (s % 2) && j > 0)) begin : g_wire
        // j is not the upper member of a cell in this stage
        assign st[s+1][j] = st[s][j];
      end
    end
  end

  assign y = st[W];
endmodule
