// booth_encoder: radix-4 Booth recoding of the multiplier B.
//
// B (N bits, two's complement, N even) is split into N/2 overlapping triplets
// (b[2i+1], b[2i], b[2i-1]) with b[-1] = 0. Triplet i gives digit
// d_i = -2*b[2i+1] + b[2i] + b[2i-1], so that B = sum d_i * 4^i. Each digit
// leaves as flags: neg = b[2i+1], one = |d_i| == 1, two = |d_i| == 2 and
// zero = d_i == 0 (triplets 000 and 111; 111 still has neg set, which the
// partial-product selector turns into an all-ones row plus one, i.e. zero).
// Radix-4 recoding follows the published design; the flag set is this
// design's own choice. Purely combinational.
module booth_encoder
  import amul_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   b,
  output booth_digit_t   dig [N/2]
);
  logic [N:0] bx;  // b with the implicit b[-1] = 0 appended at bit 0

  assign bx = {b, 1'b0};

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      logic lo, mid, hi;
      lo  = bx[2*i];
      mid = bx[2*i+1];
      hi  = bx[2*i+2];
      dig[i].neg  = hi;
      dig[i].one  = mid ^ lo;
      dig[i].two  = (hi & ~mid & ~lo) | (~hi & mid & lo);
      dig[i].zero = (hi == mid) && (mid == lo);
    end
  end
endmodule
