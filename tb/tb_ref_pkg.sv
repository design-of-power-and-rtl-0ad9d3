// tb_ref_pkg: reference arithmetic for the approximate Booth multiplier
// testbenches, written with integers rather than with the RTL's structure.
//
// booth_digit: radix-4 digit i of an N-bit two's-complement B.
// row_bits:    unsigned (N+1)-bit pattern of partial-product row i as the
//              multiplier forms it: |d|*A, bitwise inverted for a negative
//              digit (the +1 of the negation is counted separately).
// tp_low:      value of all partial-product bits in columns 0..N-2,
//              negation +1s included (the part the fixed-width design drops).
// group_ref:   compensation case (0-based) of an input pattern.
// approx_ref:  expected fixed-width output.
package tb_ref_pkg;

  function automatic int booth_digit(input longint unsigned b, input int n, input int i);
    int hi, mid, lo;
    hi  = int'((b >> (2*i+1)) & 1);
    mid = int'((b >> (2*i)) & 1);
    lo  = (i == 0) ? 0 : int'((b >> (2*i-1)) & 1);
    return -2*hi + mid + lo;
  endfunction

  function automatic longint signed to_signed(input longint unsigned x, input int n);
    longint signed v;
    v = longint'(x & ((64'd1 << n) - 1));
    if (v >= (64'sd1 <<< (n-1))) v -= (64'sd1 <<< n);
    return v;
  endfunction

  function automatic longint unsigned row_bits(input longint unsigned a, input longint unsigned b,
                                               input int n, input int i);
    int d, ad;
    longint signed m;
    longint unsigned mask, u;
    d    = booth_digit(b, n, i);
    mask = (64'd1 << (n+1)) - 1;
    ad   = (d < 0) ? -d : d;
    m    = to_signed(a, n) * longint'(ad);
    u    = longint'(m) & mask;
    if (d < 0 || (d == 0 && ((b >> (2*i+1)) & 1) == 1)) u = ~u & mask;
    return u;
  endfunction

  function automatic longint unsigned tp_low(input longint unsigned a, input longint unsigned b, input int n);
    longint unsigned s, u, lowmask;
    s = 0;
    for (int i = 0; i < n/2; i++) begin
      u = row_bits(a, b, n, i);
      if (n - 1 - 2*i > 0) begin
        lowmask = (64'd1 << (n - 1 - 2*i)) - 1;
        s += (u & lowmask) << (2*i);
      end
      if (((b >> (2*i+1)) & 1) == 1) s += 64'd1 << (2*i);
    end
    return s;
  endfunction

  function automatic int popcount(input longint unsigned x, input int n);
    int c;
    c = 0;
    for (int k = 0; k < n; k++) c += int'((x >> k) & 1);
    return c;
  endfunction

  function automatic int zero_digits(input longint unsigned b, input int n);
    int c;
    c = 0;
    for (int i = 0; i < n/2; i++) if (booth_digit(b, n, i) == 0) c++;
    return c;
  endfunction

  function automatic int sign_digits(input longint unsigned b, input int n);
    int c;
    c = 0;
    for (int i = 0; i < n/2; i++) c += int'((b >> (2*i+1)) & 1);
    return c;
  endfunction

  function automatic int group_ref(input longint unsigned a, input longint unsigned b, input int n);
    int d, ca, cb;
    d  = n / 2;
    ca = zero_digits(b, n);
    cb = sign_digits(b, n);
    if (ca >= 3*d/4) return 4;
    if (ca >= d/2)   return 3;
    if (ca >= d/4)   return 0;
    if (cb >= d/2 || popcount(a, n) >= n/2) return 1;
    return 2;
  endfunction

  function automatic int theta_ref(input int g);
    case (g)
      0: return 1;
      1: return 2;
      2: return 2;
      3: return 1;
      default: return 0;
    endcase
  endfunction

  // Expected output: upper N bits of (A*B - TP_L + theta*2^N) mod 2^(2N).
  function automatic longint unsigned approx_ref(input longint unsigned a, input longint unsigned b,
                                                 input int n, input int theta);
    longint unsigned full, mask2;
    mask2 = (n == 32) ? 64'hFFFF_FFFF_FFFF_FFFF >> 0 : ((64'd1 << (2*n)) - 1);
    full  = longint'(to_signed(a, n) * to_signed(b, n));
    full  = (full - tp_low(a, b, n) + (longint'(theta) << n)) & mask2;
    return (full >> n) & ((64'd1 << n) - 1);
  endfunction

endpackage
