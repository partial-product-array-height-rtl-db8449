// Extension/correction word (ECW) of the partial product array.
//
// Row i of the array is the N+4-bit two's complement number (|d_i| X) XOR s_i
// plus s_i, whose sign bit s_i has weight -2^(N+3+4i). Instead of sign
// extending every row to 2N bits, each sign bit is replaced by ~s_i and the
// constant correction word -sum_i 2^(N+3+4i) (mod 2^2N) is added. That constant
// is not added as a row of its own, which would raise the column height: its
// ones are folded with the sign bits into short prefixes that sit just above
// each row's N+3 magnitude bits:
//   row 0          : ~s0 s0 s0 s0 s0   (bits N+7..N+3)
//   rows 1 .. K-1  :  0  1  1  1 ~si   (bits above 2N-1 are dropped by the array)
// The block labelled ECW follows the published block diagram; the folding of
// the constant into the prefixes is this design's own (standard) choice.
//
// Purely combinational. ext[i][j] is the bit of row i at column 4i+N+3+j.
module booth16_ecw
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N/4-1:0]              neg,
  output logic [N/4-1:0][EXT_W-1:0]   ext
);

  localparam int unsigned K = N / 4;

  always_comb begin
    ext[0] = {~neg[0], {4{neg[0]}}};
    for (int unsigned i = 1; i < K; i++)
      ext[i] = {2'b01, 2'b11, ~neg[i]};
  end

endmodule
