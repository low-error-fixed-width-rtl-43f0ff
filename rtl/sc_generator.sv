// sc_generator: compensation ("SC") generator of the fixed-width multiplier.
//
// Input: the K = N/2 flags nz[i] = not zero_i, one per Booth digit, saying
// which partial-product rows are nonzero. Output: M = floor((K-1)/2) bits
// alpha[k-1] = alpha_k, k = 1..M, whose sum is floor((R-1)/2) where R is
// the number of nonzero rows (0 when R = 0). Each alpha_k is added with the
// weight of the most significant truncated column, standing in for the
// carries that the dropped low columns would have produced.
//
// The bits are not counted with adders. The flags are sorted by an odd-even
// merge (Batcher) sorting network built from bit comparators whose outputs
// are max(a,b) = a|b and min(a,b) = a&b, with the ones gathered towards
// index 0. The sorted vector s is then a thermometer code of R, and
// alpha_k = s[2k]. Comparators whose outputs do not reach an alpha bit are
// left for synthesis to remove (the published network is pruned by hand
// and merged into AOI/OAI gates, a gate-level
// optimisation of the same function). When K is not a power of two the
// network is built for the next power of two with the extra inputs tied to
// 0, which sort to the high end and do not change the result.
//
// Purely combinational; no clock.
module sc_generator
  import fwmbm_pkg::*;
#(
  parameter int unsigned K = 4,             // number of Booth digits (N/2)
  parameter int unsigned M = (K - 1) / 2    // number of alpha outputs
) (
  input  logic [K-1:0] nz,      // nz[i] = ~zero_i
  output logic [M-1:0] alpha    // alpha[k-1] = alpha_k
);

  localparam int unsigned KP = pow2_ceil(K);

  logic [KP-1:0] s;   // sorted flags, ones first

  always_comb begin
    logic lo, hi;
    s = '0;
    s[K-1:0] = nz;
    // Batcher odd-even merge sort, iterative form.
    for (int unsigned p = 1; p < KP; p = p * 2) begin
      for (int unsigned k = p; k >= 1; k = k / 2) begin
        for (int unsigned j = k % p; j + k < KP; j = j + 2 * k) begin
          for (int unsigned i = 0; i < k; i++) begin
            if (i + j + k < KP && ((i + j) / (2 * p)) == ((i + j + k) / (2 * p))) begin
              lo = s[i + j];
              hi = s[i + j + k];
              s[i + j]     = lo | hi;   // max to the lower index
              s[i + j + k] = lo & hi;   // min to the upper index
            end
          end
        end
      end
    end
    for (int unsigned k = 1; k <= M; k++) alpha[k - 1] = s[2 * k];
  end

endmodule
