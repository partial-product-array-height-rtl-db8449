// Final carry-propagate adder.
//
// Adds the two rows left by the reduction tree into the product. Written as a
// plain addition so that synthesis can choose an adder that fits the uneven
// arrival times of the tree outputs (the design only asks for a fast
// carry-propagate adder).
//
// Purely combinational. s = a + b (mod 2^W).
module booth16_cpa #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);

  assign s = a + b;

endmodule
