// One radix-16 Booth partial-product row before sign extension.
//
// Selects |d| * X among the precomputed multiples and complements it when the
// digit is negative, giving (|d| X) XOR neg. The two's complement "+1" is not
// added here: it is a separate bit (the row's negation bit) placed at the
// row's lowest column of the array. Selection and one's complement are the
// usual Booth structure; the document does not detail this step.
//
// Purely combinational. mag must be 0..8; mag = 0 selects zero.
module booth16_pp_row
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [8:0][N+2:0] mult,
  input  digit_t            digit,
  output logic [N+2:0]      row
);

  logic [N+2:0] sel;

  always_comb begin
    if (digit.mag == 4'd0 || digit.mag > 4'd8) sel = '0;
    else                                      sel = mult[digit.mag];
    row = sel ^ {(N+3){digit.neg}};
  end

endmodule
