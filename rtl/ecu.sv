// ecu: error compensation unit of the fixed-width Booth multiplier.
//
// The fixed-width multiplier drops the partial-product bits of columns
// 0..N-2 (TP_L). The ECU replaces their contribution by a small integer theta,
// added at the weight of the output LSB (column N). It consists of a
// signature generator, a classifier that puts the input into one of five
// groups, and a K-to-1 mux that picks the group's compensation from
// amul_pkg::comp_value (cases 1..5 add 1, 2, 2, 1, 0).
//
// Classifier (D = N/2 digits, ca = zero digits, cb = negative-sign digits):
//   case 5 (group 4): ca >= 3D/4      case 4 (group 3): ca >= D/2
//   case 1 (group 0): ca >= D/4
//   otherwise case 2 (group 1) if cb >= D/2 or A has at least N/2 ones,
//             else case 3 (group 2).
// Fewer zero digits leave more ones in the truncated columns, so the groups
// are ordered mainly by ca. The structure (signatures, mux, the five
// compensation values) follows the published design; the classification rule is this
// design's own, since no rule is published. Purely combinational.
module ecu
  import amul_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned K = NUM_GROUPS
) (
  input  logic [N-1:0]         a,
  input  logic [N-1:0]         b,
  output logic [COMP_W-1:0]    theta,
  output logic [GROUP_W-1:0]   group
);
  localparam int unsigned D  = N / 2;
  localparam int unsigned CW = $clog2(N/2 + 1);
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1;

  logic [CW-1:0]     ca, cb;
  logic [N-1:0]      fa;
  logic [COMP_W-1:0] comp [K];
  logic [SW-1:0]     sel;

  signature_generator #(.N(N)) u_sig (.a(a), .b(b), .ca(ca), .cb(cb), .fa(fa));

  always_comb begin
    if      (ca >= CW'(3 * D / 4)) group = 3'd4;
    else if (ca >= CW'(D / 2))     group = 3'd3;
    else if (ca >= CW'(D / 4))     group = 3'd0;
    else if (cb >= CW'(D / 2) || fa[N/2-1]) group = 3'd1;
    else                           group = 3'd2;
  end

  assign sel = SW'(group);

  for (genvar k = 0; k < K; k++) begin : g_comp
    assign comp[k] = comp_value(k);
  end

  ecu_mux #(.K(K), .W(COMP_W)) u_mux (.comp(comp), .sel(sel), .y(theta));
endmodule
