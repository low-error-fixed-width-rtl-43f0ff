// cla_adder: W-bit carry look-ahead adder.
//
// sum = a + b + cin (mod 2^W), cout = carry out of bit W-1.
// Every bit forms generate g_i = a_i & b_i and propagate p_i = a_i ^ b_i.
// The carry into bit i is produced directly from the generate/propagate
// signals of all lower bits and cin, as the two-level look-ahead expression
//   c_i = cin & p_0..p_(i-1)  |  OR_k ( g_k & p_(k+1)..p_(i-1) ),
// rather than being rippled bit by bit. The design names carry look-ahead
// adders as the adders of its compression tree without giving their
// insides; this full look-ahead form is this implementation's choice.
//
// Purely combinational; no clock.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] g, p;
  logic [W:0]   c;

  always_comb begin
    logic term;
    g = a & b;
    p = a ^ b;
    for (int unsigned i = 0; i <= W; i++) begin
      // carry chain term from cin
      term = cin;
      for (int unsigned m = 0; m < i; m++) term = term & p[m];
      c[i] = term;
      // terms from each generate below bit i
      for (int unsigned k = 0; k < i; k++) begin
        term = g[k];
        for (int unsigned m = k + 1; m < i; m++) term = term & p[m];
        c[i] = c[i] | term;
      end
    end
    sum  = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
