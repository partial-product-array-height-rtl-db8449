// Assimilation of the extra partial product row (height reduction).
//
// For an unsigned N-bit multiplier the radix-16 recoding leaves one transfer
// digit t = y[N-1] of weight 2^N, i.e. an extra row t*X at columns N..2N-1,
// and the last digit row K-1 brings its negation bit at column N-4. With those
// two the array would be K+1 = N/4+1 bits high at columns N-4 and N..N+7.
// This block folds both into the last row: in the 15-column window N-4..N+10
// it adds the row's low bits, the negation bit (as carry in) and t*X[10:0]
// shifted by 4 columns. The 15 sum bits replace the row's low bits, and the
// carry out lands at column N+11, the first column with room below K. The
// rest of t*X (bits 11 and up, from column N+11) stays a sparse row that fits
// above the end of row 0. The inputs are the low-order bits of the multiples
// (which settle first in their carry-propagate adders), X and y[N-1], so the
// merge adds no delay after the slow top bits of 3X/5X/7X.
// The goal (maximum height N/4) is the published one; the choice of window
// and of the last row as partner is this design's own.
//
// Purely combinational.
module booth16_row_merge
  import booth16_pkg::*;
(
  input  logic [MERGE_W-1:0]  row_low,  // bits 0..14 of the last row
  input  logic                neg,      // negation bit of the last row
  input  logic                extra,    // transfer digit out of the top group
  input  logic [MERGE_XW-1:0] x_low,    // X[10:0]
  output logic [MERGE_W-1:0]  sum,      // new bits for columns N-4..N+10
  output logic                carry     // carry into column N+11
);

  logic [MERGE_W:0] total;

  always_comb begin
    total = {1'b0, row_low}
          + {1'b0, {MERGE_XW{extra}} & x_low, 4'b0000}
          + {{MERGE_W{1'b0}}, neg};
    sum   = total[MERGE_W-1:0];
    carry = total[MERGE_W];
  end

endmodule
