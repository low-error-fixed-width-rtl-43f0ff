// pp_generator: one partial-product row of the radix-4 Booth multiplier.
//
// For the Booth digit d (from booth_encoder) and the N-bit two's-complement
// operand a, the row is the (N+1)-bit word
//   0            when d.zero,
//   a ^ neg      when d.one   (sign-extended to N+1 bits),
//   (a << 1)^neg when d.two,
// i.e. each bit first forms na_j = a_j xor neg and then a 3-way selector
// picks 0, na_j or na_(j-1). For j = 0 the "a_(-1)" input is 0, so
// na_(-1) = neg; for j = N the operand is sign-extended (a_N = a_(N-1)).
// A negative row is therefore the ones' complement of the multiple; the
// missing +1 is the digit's cor bit, which the compression tree adds in the
// row's least significant column. This per-bit cell follows the partial
// product generator schematic of the design.
//
// Purely combinational; no clock.
module pp_generator
  import fwmbm_pkg::*;
#(
  parameter int unsigned N = 8   // operand width
) (
  input  logic [N-1:0] a,        // operand that is multiplied (Y)
  input  booth_digit_t d,        // Booth digit controls
  output logic [N:0]   p         // row bits p_(i,0..N)
);

  logic [N:0] na;      // a, sign-extended, xor neg
  logic [N:0] na_dn;   // na shifted up by one place (na_(j-1))

  always_comb begin
    na    = {a[N-1], a} ^ {(N + 1){d.neg}};
    na_dn = {na[N-1:0], d.neg};
    for (int j = 0; j <= int'(N); j++) begin
      if (d.zero)     p[j] = 1'b0;
      else if (d.one) p[j] = na[j];
      else if (d.two) p[j] = na_dn[j];
      else            p[j] = 1'b0;
    end
  end

endmodule
