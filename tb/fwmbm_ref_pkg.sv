// fwmbm_ref_pkg: reference model used by the multiplier testbenches.
//
// Written from the arithmetic definition, not from the RTL structure:
// each radix-4 Booth digit of x is looked up in the Booth table, the row it
// selects is d*y (or d*y - 1 for a negative digit, whose +1 is a separate
// bit in the row's lowest column), its top bit is inverted, and the sign
// extension is replaced by the constant -(2^N + 2^(N+2) + ...). window_ref
// adds up only the matrix bits in columns >= lo, plus comp units of weight
// 2^(N-1), and returns the columns 2N-1 .. lo. Supports N <= 16.
package fwmbm_ref_pkg;

  function automatic int sx(input longint v, input int n);
    v = v & ((64'sd1 <<< n) - 1);
    return int'((v >= (64'sd1 <<< (n - 1))) ? v - (64'sd1 <<< n) : v);
  endfunction

  // Booth digit i of x (N bits), from the recoding table
  function automatic int digit(input longint x, input int n, input int i);
    int b2, b1, b0;
    b2 = int'((x >> (2 * i + 1)) & 1);
    b1 = int'((x >> (2 * i)) & 1);
    b0 = (i == 0) ? 0 : int'((x >> (2 * i - 1)) & 1);
    case ({b2[0], b1[0], b0[0]})
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;
    endcase
  endfunction

  // (N+1)-bit row selected by digit d
  function automatic longint row(input int d, input longint y, input int n);
    longint v;
    v = longint'(d) * longint'(sx(y, n));
    if (d < 0) v = v - 1;
    return v & ((64'sd1 <<< (n + 1)) - 1);
  endfunction

  // number of nonzero Booth digits of x
  function automatic int nonzero_digits(input longint x, input int n);
    int r;
    r = 0;
    for (int i = 0; i < n / 2; i++) if (digit(x, n, i) != 0) r++;
    return r;
  endfunction

  // sum of the matrix columns >= lo, plus comp * 2^(n-1); returns cols >= lo
  function automatic longint window_ref(input longint x, input longint y,
                                        input int n, input int lo,
                                        input int comp);
    longint acc, c, bits;
    int d;
    acc = 0;
    for (int i = 0; i < n / 2; i++) begin
      d    = digit(x, n, i);
      bits = row(d, y, n) ^ (64'sd1 <<< n);   // inverted sign bit
      for (int j = 0; j <= n; j++)
        if (2 * i + j >= lo) acc += ((bits >> j) & 1) <<< (2 * i + j);
      if (d < 0 && 2 * i >= lo) acc += 64'sd1 <<< (2 * i);
    end
    c = 0;
    for (int i = 0; i < n / 2; i++) c += 64'sd1 <<< (n + 2 * i);
    c = (-c) & ((64'sd1 <<< (2 * n)) - 1);
    acc += (c >> lo) <<< lo;
    acc += longint'(comp) <<< (n - 1);
    acc = acc & ((64'sd1 <<< (2 * n)) - 1);
    return acc >> lo;
  endfunction

  // expected fixed-width output of fwmbm (N bits)
  function automatic longint fixed_ref(input longint x, input longint y,
                                       input int n, input int lambda_bar);
    int r, alpha;
    r     = nonzero_digits(x, n);
    alpha = (r >= 1) ? (r - 1) / 2 : 0;
    return window_ref(x, y, n, n - 1, alpha + lambda_bar) >> 1;
  endfunction

endpackage
