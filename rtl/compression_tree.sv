// compression_tree: sums the partial-product matrix of the Booth multiplier
// over the columns LO .. 2N-1 with a tree of carry look-ahead adders.
//
// Matrix (R = N/2 rows, row i shifted left by 2i):
//   row i   : p_(i,0..N-1) in columns 2i .. 2i+N-1, and the inverted sign
//             bit ~p_(i,N) in column 2i+N (sign-extension removal);
//   const   : the constant -(2^N + 2^(N+2) + ... + 2^(N+2R-2)) that
//             completes the sign-extension removal (16'hAB00 for N = 8),
//             with the cor_i bits in columns 2i and lambda_bar in column
//             N-1 placed in its zero bits;
//   alpha_k : the SC-generator outputs, each with weight 2^(N-1).
// Only the columns LO and above are built; bits of lower columns are simply
// not generated. With LO = N-1 this is the fixed-width multiplier: column
// N-1 (the kept "major" truncated column) is summed together with the
// compensation, and the caller drops it after the carry it sends into
// column N has been formed. With LO = 0 and no compensation it is an exact
// 2N-bit Booth product.
//
// Structure: the R rows (plus alpha_2..alpha_M, if any) are padded to a
// power of two and added pairwise, level by level, in W = 2N-LO bit CLAs.
// A final CLA adds the constant row, with alpha_1 as its carry-in when
// LO = N-1 (alpha_1 has the weight of the window's least significant bit).
// For N = 8 that is exactly four adders: PP0+PP1, PP2+PP3, their sum, and
// the constant adder. All adders are W bits wide and carries out of the
// window are dropped (arithmetic modulo 2^(2N)).
//
// Purely combinational; no clock.
module compression_tree
  import fwmbm_pkg::*;
#(
  parameter int unsigned N  = 8,               // operand width
  parameter int unsigned LO = N - 1,           // lowest column built
  parameter int unsigned M  = (N / 2 - 1) / 2, // number of alpha inputs
  parameter int unsigned W  = 2 * N - LO       // window width
) (
  input  logic [N/2-1:0][N:0] pp,          // pp[i] = p_(i,N..0)
  input  logic [N/2-1:0]      cor,         // two's-complement +1 per row
  input  logic [M-1:0]        alpha,       // alpha[k-1] = alpha_k
  input  logic                lambda_bar,  // extra compensation bit, column N-1
  output logic [W-1:0]        sum          // product columns 2N-1 .. LO
);

  localparam int unsigned R       = N / 2;
  localparam bit          CIN_A1  = (LO == N - 1);
  // alpha bits that enter as rows (alpha_1 goes to the carry-in if CIN_A1)
  localparam int unsigned NA_ROWS = CIN_A1 ? M - 1 : M;
  localparam int unsigned NROWS   = R + NA_ROWS;
  localparam int unsigned NP      = pow2_ceil(NROWS);
  localparam int unsigned LEVELS  = log2_exact(NP);
  localparam logic [63:0] SEXT    = sign_ext_const(N);

  // node[l][k]: k-th partial sum at tree level l (level 0 = input rows)
  logic [LEVELS:0][NP-1:0][W-1:0] node;
  logic [NP-1:0][W-1:0]           rows;
  logic [W-1:0] const_row;
  logic         final_cin;

  // Place each row's bits into the window.
  always_comb begin
    rows = '0;
    for (int unsigned i = 0; i < R; i++) begin
      for (int unsigned w = 0; w < W; w++) begin
        int col, j;
        col = int'(w + LO);
        j   = col - 2 * int'(i);
        if (j >= 0 && j < int'(N)) rows[i][w] = pp[i][j];
        else if (j == int'(N))     rows[i][w] = ~pp[i][N];
      end
    end
    for (int k = 0; k < int'(NA_ROWS); k++) begin
      // weight 2^(N-1): window bit N-1-LO
      rows[R + k][N - 1 - LO] = alpha[k + (CIN_A1 ? 1 : 0)];
    end
  end

  always_comb begin
    for (int unsigned w = 0; w < W; w++) const_row[w] = SEXT[w + LO];
    for (int unsigned i = 0; i < R; i++)
      if (2 * i >= LO) const_row[2 * i - LO] = cor[i];
    const_row[N - 1 - LO] = lambda_bar;
    final_cin = CIN_A1 ? alpha[0] : 1'b0;
  end

  // Pairwise CLA tree.
  assign node[0] = rows;
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar k = 0; k < (NP >> (l + 1)); k++) begin : g_add
      cla_adder #(.W(W)) u_cla (
        .a   (node[l][2 * k]),
        .b   (node[l][2 * k + 1]),
        .cin (1'b0),
        .sum (node[l + 1][k]),
        .cout()
      );
    end
    // unused upper slots of this level
    for (genvar k = (NP >> (l + 1)); k < NP; k++) begin : g_pad
      assign node[l + 1][k] = '0;
    end
  end

  // Final adder: constant, cor bits, lambda_bar and alpha_1.
  cla_adder #(.W(W)) u_cla_final (
    .a   (node[LEVELS][0]),
    .b   (const_row),
    .cin (final_cin),
    .sum (sum),
    .cout()
  );

endmodule
