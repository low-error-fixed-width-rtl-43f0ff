// fwmbm_pkg: types and helper functions shared by the fixed-width modified
// Booth multiplier.
//
// booth_digit_t carries the control signals that one radix-4 Booth encoder
// produces for one 3-bit group of the recoded operand:
//   neg  - the selected multiple is negative (taken straight from the top bit
//          of the group),
//   one  - the multiple has magnitude 1,
//   two  - the multiple has magnitude 2,
//   zero - the multiple is 0 (groups 000 and 111),
//   cor  - the "+1" that completes the two's complement of a negative,
//          nonzero multiple; it is 0 for group 111, where the row is 0.
// sign_ext_const() gives the constant that replaces the sign extension of
// all rows when the top bit of each (N+1)-bit row is inverted.
package fwmbm_pkg;

  typedef struct packed {
    logic neg;
    logic one;
    logic two;
    logic zero;
    logic cor;
  } booth_digit_t;

  // -(2^N + 2^(N+2) + ... + 2^(N+2(R-1))) modulo 2^(2N), R = N/2 rows.
  // For N = 8 this is 16'hAB00.
  function automatic logic [63:0] sign_ext_const(input int unsigned n);
    logic [63:0] acc;
    acc = '0;
    for (int unsigned i = 0; i < n / 2; i++) acc = acc + (64'd1 << (n + 2 * i));
    acc = (~acc) + 64'd1;
    if (2 * n < 64) acc = acc & ((64'd1 << (2 * n)) - 64'd1);
    return acc;
  endfunction

  // Smallest power of two that is >= v (v >= 1).
  function automatic int unsigned pow2_ceil(input int unsigned v);
    int unsigned r;
    r = 1;
    while (r < v) r = r * 2;
    return r;
  endfunction

  // Base-2 logarithm of a power of two.
  function automatic int unsigned log2_exact(input int unsigned v);
    int unsigned r;
    r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

endpackage
