// amul_pkg: types and constants shared by the approximate fixed-width Booth
// multiplier.
//
// booth_digit_t carries one radix-4 Booth digit of the multiplier B as flags:
// neg (digit is negative, equal to b[2i+1]), one (|digit| = 1), two
// (|digit| = 2) and zero (digit is 0). The error compensation unit sorts each
// input pattern into one of NUM_GROUPS groups; comp_value() gives the integer
// compensation added for a group, in units of the output LSB. The five values
// (1, 2, 2, 1, 0 for cases 1..5) follow the published compensation table of the
// 16x16 multiplier.
package amul_pkg;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
    logic zero;
  } booth_digit_t;

  localparam int unsigned NUM_GROUPS = 5;
  localparam int unsigned COMP_W     = 2;
  localparam int unsigned GROUP_W    = 3;

  // Compensation of group g (0-based: g = case - 1).
  function automatic logic [COMP_W-1:0] comp_value(input int unsigned g);
    case (g)
      0:       return 2'd1;
      1:       return 2'd2;
      2:       return 2'd2;
      3:       return 2'd1;
      default: return 2'd0;
    endcase
  endfunction

endpackage
