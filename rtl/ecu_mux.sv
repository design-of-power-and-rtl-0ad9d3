// ecu_mux: K-to-1 multiplexer of the error compensation unit. comp[k] is the
// compensation of input group k; sel names the group of the present input and
// y returns its compensation. A select of K or more returns 0 (this design's
// choice). Purely combinational.
module ecu_mux #(
  parameter int unsigned K  = 5,
  parameter int unsigned W  = 2,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  logic [W-1:0]  comp [K],
  input  logic [SW-1:0] sel,
  output logic [W-1:0]  y
);
  always_comb begin
    y = '0;
    for (int k = 0; k < K; k++)
      if (sel == SW'(k)) y = comp[k];
  end
endmodule
