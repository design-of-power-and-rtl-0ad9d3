// booth_selector: partial-product selection for the fixed-width Booth
// multiplier, keeping only the columns that reach the result.
//
// For Booth digit d_i the row is the (N+1)-bit magnitude |d_i|*A (A, sign
// extended A, or A shifted left by one), inverted when d_i is negative. The
// +1 that completes the negation would sit at column 2i; for an even N all of
// them lie in columns 0..N-2 and are truncated with the rest of that region.
// Sign extension: the row MSB is inverted and one constant row,
// -sum_i 2^(N+2i) mod 2^(2N), restores the signed sum.
//
// Only columns N-1 .. 2N-1 are produced: column N-1 is the most significant
// truncated column (TP_H), columns N and up the kept part (AP). Bit k of every
// output word is column N-1+k. rows[0..N/2-1] are the partial products,
// rows[N/2] is the sign-extension constant. Keeping AP and TP_H and dropping
// the lower columns follows the published design; the sign-extension scheme is this
// design's own. Purely combinational.
module booth_selector
  import amul_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]  a,
  input  booth_digit_t  dig  [N/2],
  output logic [N:0]    rows [N/2+1]
);
  // Constant row: the sign-extension correction, seen from column N-1 upwards.
  function automatic logic [N:0] sign_const();
    logic [2*N-1:0] k;
    k = '0;
    for (int i = 0; i < N/2; i++) k -= (2*N)'(1) << (N + 2*i);
    return k[2*N-1 -: N+1];
  endfunction

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      logic [N:0] mag, r, u;
      mag = dig[i].one ? {a[N-1], a} :
            dig[i].two ? {a, 1'b0}   : '0;
      r   = dig[i].neg ? ~mag : mag;
      u   = {~r[N], r[N-1:0]};          // row i occupies columns 2i .. 2i+N
      rows[i] = '0;
      for (int k = 0; k <= N; k++) begin
        int col;
        col = N - 1 + k - 2*i;           // bit of u that falls in column N-1+k
        if (col >= 0 && col <= N) rows[i][k] = u[col];
      end
    end
    rows[N/2] = sign_const();
  end
endmodule
