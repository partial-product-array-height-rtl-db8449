// 4:2 carry-save adder over W-bit vectors.
//
// Each column is two chained full adders: the first adds a, b and c and sends
// its carry one column left as the horizontal carry into the second, which
// adds that carry, the first sum and d. The second full adder's carry, shifted
// one column left, is the carry output. So a + b + c + d = sum + carry
// (mod 2^W): four rows in, two rows out, and the horizontal carry does not
// ripple beyond one column. The 4:2 carry-save adder is the reduction element
// the design is built around; its two-full-adder insides are the usual ones.
//
// Purely combinational. Bits carried past column W-1 are dropped.
module booth16_csa42 #(
  parameter int unsigned W = 128
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  logic [W-1:0] s1, c1, cin, c2;

  always_comb begin
    s1    = a ^ b ^ c;
    c1    = (a & b) | (a & c) | (b & c);
    cin   = {c1[W-2:0], 1'b0};
    sum   = s1 ^ d ^ cin;
    c2    = (s1 & d) | (s1 & cin) | (d & cin);
    carry = {c2[W-2:0], 1'b0};
  end

endmodule
