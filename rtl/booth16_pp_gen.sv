// Partial product generator: the whole radix-16 Booth bit array, N/4 rows high.
//
// From the multiplicand X and the recoded digits it forms K = N/4 rows
// (|d_i| X) XOR s_i at column 4i, the sign-extension prefixes of the ECW
// block, the negation bits s_i at column 4i, and the extra row t*X of weight
// 2^N. Without care this array is K+1 bits high in columns N-4 and N..N+7.
// The row-merge block adds the extra row's low bits and the last negation
// bit into the low bits of row K-1, so that every column holds at most K
// bits; the array is then packed into exactly K vectors of 2N bits:
//   vector i      : row i with its prefix, from column 4i
//   vector 0      : also t*X[N-1:11] at columns N+11..2N-1 (above row 0's end)
//   vector 1      : also the merge carry at column N+11 (above row 1's end)
//   vector K-1    : row K-1 (merged low bits) plus the negation bits of
//                   rows 0..K-2 at columns 0, 4, .., N-8 (below its start)
// The sum of the K vectors modulo 2^2N equals X*Y. The layout is this
// design's; the maximum height N/4 is the published goal. Needs N a multiple
// of 4 and N >= 16.
//
// Purely combinational.
module booth16_pp_gen
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]            x,
  input  digit_t [N/4-1:0]        digit,
  input  logic                    extra,
  output logic [N/4-1:0][2*N-1:0] rows
);

  localparam int unsigned K  = N / 4;
  localparam int unsigned PW = 2 * N;

  if (N % 4 != 0 || N < 16) begin : g_bad_n
    $error("booth16_pp_gen: N must be a multiple of 4 and at least 16");
  end

  logic [8:0][N+2:0]           mult;
  logic [K-1:0][N+2:0]         pp;
  logic [K-1:0]                neg;
  logic [K-1:0][EXT_W-1:0]     ext;
  logic [MERGE_W-1:0]          merged;
  logic                        merge_carry;

  booth16_multiples #(.N(N)) u_mult (.x(x), .mult(mult));

  for (genvar i = 0; i < K; i++) begin : g_row
    booth16_pp_row #(.N(N)) u_row (.mult(mult), .digit(digit[i]), .row(pp[i]));
    assign neg[i] = digit[i].neg;
  end

  booth16_ecw #(.N(N)) u_ecw (.neg(neg), .ext(ext));

  booth16_row_merge u_merge (
    .row_low (pp[K-1][MERGE_W-1:0]),
    .neg     (neg[K-1]),
    .extra   (extra),
    .x_low   (x[MERGE_XW-1:0]),
    .sum     (merged),
    .carry   (merge_carry)
  );

  always_comb begin
    for (int unsigned i = 0; i < K; i++) begin
      logic [PW-1:0] r;
      r = '0;
      r[N+2:0]          = pp[i];
      r[N+3 +: EXT_W]   = ext[i];
      if (i == K - 1) r[MERGE_W-1:0] = merged;
      rows[i] = r << (4 * i);
    end
    // rest of the extra row, from column N + MERGE_XW
    rows[0][PW-1 -: (N - MERGE_XW)] = {(N - MERGE_XW){extra}} & x[N-1:MERGE_XW];
    // carry out of the merge window
    rows[1][N + MERGE_XW] = merge_carry;
    // negation bits of rows 0 .. K-2
    for (int unsigned i = 0; i + 1 < K; i++)
      rows[K-1][4*i] = neg[i];
  end

endmodule
