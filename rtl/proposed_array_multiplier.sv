// proposed_array_multiplier: fixed-width N x N radix-4 Booth multiplier with
// error compensation.
//
// p approximates the upper half of the signed 2N-bit product A*B. Instead of
// forming all partial-product bits, the multiplier keeps the columns N and up
// (AP) and the single column N-1 (TP_H) and drops columns 0..N-2 (TP_L). The
// error compensation unit (ecu) estimates what the dropped columns would have
// carried into the result from a few signatures of the inputs and adds that
// integer, theta, at the weight of the output LSB:
//
//   p = ( AP + TP_H + theta * 2^N ) / 2^N      (all sums modulo 2^(2N))
//
// Datapath: booth_encoder -> booth_selector (kept rows + sign-extension row)
// -> compression_tree (3:2 and 4:2 compressors) -> final_adder (2:2 and 3:2
// compressors); the ecu runs beside the encoder and selector and its theta
// enters the compression tree as one more row. The block structure, the
// AP/TP_H/TP_L split and the compensation values follow the published design; the
// sign-extension scheme, tree shape and group rule are this design's own.
//
// Interface: a, b signed N-bit operands; p the N-bit approximate product;
// group the compensation case chosen (0..4 = cases 1..5). Purely
// combinational, no clock: the result is valid one propagation delay after
// the inputs settle.
module proposed_array_multiplier
  import amul_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]       a,
  input  logic [N-1:0]       b,
  output logic [N-1:0]       p,
  output logic [GROUP_W-1:0] group
);
  localparam int unsigned W = N + 1;      // columns N-1 .. 2N-1
  localparam int unsigned R = N / 2 + 2;  // PP rows, sign row, compensation row

  booth_digit_t      dig  [N/2];
  logic [W-1:0]      pp   [N/2+1];
  logic [W-1:0]      rows [R];
  logic [COMP_W-1:0] theta;
  logic [W-1:0]      sum_w, carry_w, total;

  booth_encoder  #(.N(N)) u_enc (.b(b), .dig(dig));
  booth_selector #(.N(N)) u_sel (.a(a), .dig(dig), .rows(pp));
  ecu            #(.N(N)) u_ecu (.a(a), .b(b), .theta(theta), .group(group));

  always_comb begin
    for (int r = 0; r < N/2 + 1; r++) rows[r] = pp[r];
    rows[R-1] = W'({theta, 1'b0});        // bit 1 = column N
  end

  compression_tree #(.W(W), .R(R)) u_tree (.rows(rows), .sum_o(sum_w), .carry_o(carry_w));
  final_adder      #(.W(W))        u_add  (.x(sum_w), .y(carry_w), .s(total));

  assign p = total[W-1:1];

  initial begin
    assert (N >= 4 && N % 2 == 0)
      else $error("N must be even and at least 4");
  end
endmodule
