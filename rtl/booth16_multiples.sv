// Multiples of the multiplicand needed by radix-16 Booth digits {-8..8}.
//
// The even multiples are shifts (2X, 4X, 8X; 6X is 3X shifted). The three odd
// multiples each take one carry-propagate addition or subtraction:
// 3X = X + 2X, 5X = X + 4X and 7X = 8X - X, as in the published design. All
// multiples are N+3 bits wide, enough for 8X.
//
// Purely combinational. mult[k] = k * x for k = 1..8 (mult[0] is unused and 0).
module booth16_multiples #(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]           x,
  output logic [8:0][N+2:0]      mult
);

  logic [N+2:0] x1;

  assign x1 = {3'b000, x};

  always_comb begin
    mult[0] = '0;
    mult[1] = x1;
    mult[2] = x1 << 1;
    mult[4] = x1 << 2;
    mult[8] = x1 << 3;
    mult[3] = x1 + (x1 << 1);   // carry-propagate addition 1
    mult[5] = x1 + (x1 << 2);   // carry-propagate addition 2
    mult[7] = (x1 << 3) - x1;   // carry-propagate subtraction 3
    mult[6] = mult[3] << 1;
  end

endmodule
