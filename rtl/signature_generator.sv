// signature_generator: signatures of one input pattern (A, B) for the error
// compensation unit.
//
// For each radix-4 digit i of B (triplet b[2i+1], b[2i], b[2i-1], b[-1] = 0):
//   n_i = b[2i+1]                       (digit sign bit)
//   z_i = 1 when b[2i+1] = b[2i] = b[2i-1] (digit is zero)
// ca counts the z_i and cb counts the n_i, each with an adder over the N/2
// flags. fa is A with its bits sorted (sorting_network): fa[k] = 1 exactly
// when A has more than k ones. The three signatures and their sources follow
// the design; the adder form of the counters is this design's own.
// Purely combinational.
module signature_generator #(
  parameter int unsigned N  = 16,
  localparam int unsigned CW = $clog2(N/2 + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [CW-1:0] ca,
  output logic [CW-1:0] cb,
  output logic [N-1:0]  fa
);
  logic [N:0]     bx;
  logic [N/2-1:0] z, n;

  assign bx = {b, 1'b0};

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      n[i] = bx[2*i+2];
      z[i] = ~((bx[2*i] ^ bx[2*i+2]) | (bx[2*i+1] ^ bx[2*i+2]));
    end
  end

  always_comb begin
    ca = '0;
    cb = '0;
    for (int i = 0; i < N/2; i++) begin
      ca += CW'(z[i]);
      cb += CW'(n[i]);
    end
  end

  sorting_network #(.W(N)) u_sort (.x(a), .y(fa));
endmodule
