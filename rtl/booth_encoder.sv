// booth_encoder: radix-4 (modified) Booth recoder for one digit.
//
// The 3-bit group b = {b[2i+1], b[2i], b[2i-1]} of the recoded operand is
// turned into the digit d in {-2,-1,0,+1,+2}, given as one-hot magnitude
// controls and a sign:
//   group 000, 111 -> 0 ; 001, 010 -> +1 ; 011 -> +2 ;
//   100 -> -2 ; 101, 110 -> -1.
// neg is the top bit of the group. one is b[2i] xor b[2i-1]. two is set when
// the two upper bits differ and the two lower bits are equal. zero is set
// when all three bits are equal. cor, the carry-in that completes the two's
// complement of a negative row, is b[2i+1] and not (b[2i] and b[2i-1]), so
// that group 111 (a "negative zero") adds nothing. These equations follow
// the encoder schematic of the design; the digit table is the standard
// radix-4 Booth table.
//
// Purely combinational; no clock.
module booth_encoder
  import fwmbm_pkg::*;
(
  input  logic [2:0]   grp,   // {b[2i+1], b[2i], b[2i-1]}
  output booth_digit_t d
);

  logic hi_diff;  // b[2i+1] != b[2i]
  logic lo_diff;  // b[2i]   != b[2i-1]
  logic out_diff; // b[2i+1] != b[2i-1]

  always_comb begin
    hi_diff  = grp[2] ^ grp[1];
    lo_diff  = grp[1] ^ grp[0];
    out_diff = grp[2] ^ grp[0];
    d.neg    = grp[2];
    d.one    = lo_diff;
    d.two    = hi_diff & ~lo_diff;
    d.zero   = ~(hi_diff | out_diff);
    d.cor    = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
