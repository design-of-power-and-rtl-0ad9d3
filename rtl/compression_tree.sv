// compression_tree: carry-save reduction of R rows of W bits to two rows.
//
// Each level takes the rows left by the level before, compresses every group
// of four with a row of 4:2 compressors (the cout of bit j feeds the cin of
// bit j+1, so there is no ripple through a level), compresses a remaining
// group of three with a row of 3:2 compressors, and passes one or two
// leftover rows through. Levels repeat until two rows remain; for R = 10 that
// is 10 -> 6 -> 4 -> 2. All arithmetic is modulo 2^W: carries out of bit W-1
// are dropped. The use of 3:2 and 4:2 compressors follows the published design; the
// row-wise tree shape is this design's own. Purely combinational.
module compression_tree #(
  parameter int unsigned W = 17,
  parameter int unsigned R = 10
) (
  input  logic [W-1:0] rows [R],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  function automatic int unsigned next_count(input int unsigned c);
    return 2 * (c / 4) + ((c % 4 == 3) ? 2 : (c % 4));
  endfunction

  function automatic int unsigned count_at(input int unsigned level);
    int unsigned c;
    c = R;
    for (int unsigned l = 0; l < level; l++) c = next_count(c);
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c, n;
    c = R;
    n = 0;
    while (c > 2) begin
      c = next_count(c);
      n++;
    end
    return n;
  endfunction

  localparam int unsigned NL = num_levels();

  for (genvar l = 0; l < NL; l++) begin : g_level
    localparam int unsigned C   = count_at(l);
    localparam int unsigned CN  = next_count(C);
    localparam int unsigned G4  = C / 4;
    localparam int unsigned REM = C % 4;

    logic [W-1:0] in_r  [R];
    logic [W-1:0] out_r [R];

    if (l == 0) begin : g_first
      assign in_r = rows;
    end else begin : g_next
      assign in_r = g_level[l-1].out_r;
    end

    for (genvar g = 0; g < G4; g++) begin : g_42
      logic [W-1:0] s_w, c_w;
      for (genvar j = 0; j < W; j++) begin : g_bit
        logic co;
        logic ci;
        if (j == 0) begin : g_cin0
          assign ci = 1'b0;
        end else begin : g_cin
          assign ci = g_bit[j-1].co;
        end
        compressor_42 u_c42 (
          .x   ({in_r[4*g+3][j], in_r[4*g+2][j], in_r[4*g+1][j], in_r[4*g][j]}),
          .cin (ci),
          .s   (s_w[j]),
          .c   (c_w[j]),
          .cout(co)
        );
      end
      assign out_r[2*g]   = s_w;
      assign out_r[2*g+1] = {c_w[W-2:0], 1'b0};
    end

    if (REM == 3) begin : g_32
      logic [W-1:0] s_w, c_w;
      for (genvar j = 0; j < W; j++) begin : g_bit
        compressor_32 u_c32 (
          .x(in_r[4*G4][j]), .y(in_r[4*G4+1][j]), .z(in_r[4*G4+2][j]),
          .s(s_w[j]), .c(c_w[j])
        );
      end
      assign out_r[2*G4]   = s_w;
      assign out_r[2*G4+1] = {c_w[W-2:0], 1'b0};
    end else begin : g_pass
      for (genvar r = 0; r < REM; r++) begin : g_row
        assign out_r[2*G4+r] = in_r[4*G4+r];
      end
    end

    for (genvar r = CN; r < R; r++) begin : g_unused
      assign out_r[r] = '0;
    end
  end

  if (NL == 0 && R == 1) begin : g_one
    assign sum_o   = rows[0];
    assign carry_o = '0;
  end else if (NL == 0) begin : g_two
    assign sum_o   = rows[0];
    assign carry_o = rows[R-1];
  end else begin : g_out
    assign sum_o   = g_level[NL-1].out_r[0];
    assign carry_o = g_level[NL-1].out_r[1];
  end
endmodule
