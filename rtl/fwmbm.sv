// fwmbm: N x N fixed-width modified Booth multiplier with SC-generator
// error compensation.
//
// Computes an N-bit approximation of the upper half of the 2N-bit signed
// product x * y, i.e. p ~= (x * y) / 2^N, at a fraction of the cost of the
// full multiplier. x is radix-4 Booth recoded into R = N/2 digits
// (booth_encoder), each digit selects 0, +-y or +-2y as a partial-product
// row (pp_generator), and the rows are summed (compression_tree).
//
// Only the partial-product bits in columns N-1 .. 2N-1 are generated. Column
// N-1, the most significant truncated column, is kept and summed; all bits
// below it, including every row's two's-complement +1 (cor_i, column 2i),
// are dropped. The carries they would have sent into column N-1 are
// replaced by a compensation that depends only on R_nz, the number of
// nonzero Booth digits: sc_generator sorts the ~zero_i flags and its M =
// floor((N/2-1)/2) outputs add floor((R_nz-1)/2) (0 for R_nz = 0) units of
// weight 2^(N-1). One more bit, lambda_bar (parameter LAMBDA_BAR), is added
// in column N-1; set to 1 it acts as the rounding half of an output LSB.
// The column N-1 result is then discarded and columns N .. 2N-1 form p.
//
// For N = 8, over all 65536 input pairs the output error p*2^N - x*y has a
// mean of -0.133 and a mean square of 0.166 output LSB^2 with
// LAMBDA_BAR = 1 (-0.631 and 0.548 with LAMBDA_BAR = 0).
//
// Interface and timing: x and y are sampled with the product on the rising
// clock edge; p holds the product of the operands present before that edge,
// one cycle of latency, and a new pair can be applied every cycle.
// rst_n (active low, synchronous) clears p. Booth recoding of x, the matrix,
// the CLA tree, the sign-extension constant and the SC-generator follow the
// design described; the output register, the reset and the meaning given to
// lambda_bar are this implementation's choices. N must be even and >= 6.
module fwmbm
  import fwmbm_pkg::*;
#(
  parameter int unsigned N          = 8,     // operand and product width
  parameter bit          LAMBDA_BAR = 1'b1   // compensation bit in column N-1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] x,   // multiplicand, Booth recoded
  input  logic [N-1:0] y,   // multiplier, selected as +-1/+-2 multiples
  output logic [N-1:0] p    // fixed-width product, registered
);

  localparam int unsigned R  = N / 2;
  localparam int unsigned M  = (R - 1) / 2;
  localparam int unsigned LO = N - 1;
  localparam int unsigned W  = 2 * N - LO;

  booth_digit_t [R-1:0]    dig;
  logic [R-1:0][N:0]       pp;
  logic [R-1:0]            cor;
  logic [R-1:0]            nz;
  logic [M-1:0]            alpha;
  logic [W-1:0]            col_sum;
  logic [N:0]              xg;      // x with the implicit 0 below bit 0

  assign xg = {x, 1'b0};

  for (genvar i = 0; i < R; i++) begin : g_row
    booth_encoder u_enc (
      .grp (xg[2 * i + 2 -: 3]),
      .d   (dig[i])
    );
    pp_generator #(.N(N)) u_ppg (
      .a (y),
      .d (dig[i]),
      .p (pp[i])
    );
    assign cor[i] = dig[i].cor;
    assign nz[i]  = ~dig[i].zero;
  end

  sc_generator #(.K(R), .M(M)) u_sc (
    .nz    (nz),
    .alpha (alpha)
  );

  compression_tree #(.N(N), .LO(LO), .M(M)) u_tree (
    .pp         (pp),
    .cor        (cor),
    .alpha      (alpha),
    .lambda_bar (LAMBDA_BAR),
    .sum        (col_sum)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) p <= '0;
    else        p <= col_sum[W-1:1];
  end

endmodule
