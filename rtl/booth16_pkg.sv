// Shared types and constants of the radix-16 Booth multiplier.
//
// A radix-16 Booth digit lies in {-8..8}. It is carried as a sign bit and a
// magnitude 0..8 (sign-magnitude, so "negative zero" is allowed and handled by
// the partial product generator). The array layout constants below are derived
// from the operand width N: K = N/4 digit rows, each |d|*X needs N+3 bits, and
// the extra transfer digit is merged into a window of MERGE_W columns that
// starts at column N-4.
package booth16_pkg;

  typedef struct packed {
    logic       neg;  // digit is negative (or negative zero)
    logic [3:0] mag;  // |digit|, 0..8
  } digit_t;

  // Width of the window in which the extra row and the last negation bit are
  // added to the low bits of the last partial product row.
  localparam int unsigned MERGE_W = 15;
  // Number of low bits of the multiplicand that fall inside that window
  // (the extra row starts 4 columns above the window's first column).
  localparam int unsigned MERGE_XW = MERGE_W - 4;
  // Prefix bits the sign-extension logic adds above a row's magnitude bits.
  localparam int unsigned EXT_W = 5;

endpackage
