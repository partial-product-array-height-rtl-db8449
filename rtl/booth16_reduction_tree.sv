// Partial product reduction tree built only from 4:2 carry-save adders.
//
// ROWS input vectors (a power of two, at least 4) are reduced to two by
// log2(ROWS)-1 levels; at each level consecutive groups of four rows go
// through one 4:2 adder. With the array held to 16 rows, three levels suffice
// (16 -> 8 -> 4 -> 2), which is the regular structure the height reduction
// aims at. The grouping order is this design's choice.
//
// Purely combinational. sum + carry = sum of all rows (mod 2^W).
module booth16_reduction_tree #(
  parameter int unsigned ROWS = 16,
  parameter int unsigned W    = 128
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  localparam int unsigned LEVELS = $clog2(ROWS) - 1;

  if (ROWS < 4 || (1 << $clog2(ROWS)) != ROWS) begin : g_bad_rows
    $error("booth16_reduction_tree: ROWS must be a power of two, at least 4");
  end

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [(ROWS >> l)-1:0][W-1:0] v;
    if (l == 0) begin : g_in
      assign v = rows;
    end else begin : g_csa
      for (genvar g = 0; g < (ROWS >> (l + 1)); g++) begin : g_grp
        booth16_csa42 #(.W(W)) u_csa (
          .a     (g_lvl[l-1].v[4*g+0]),
          .b     (g_lvl[l-1].v[4*g+1]),
          .c     (g_lvl[l-1].v[4*g+2]),
          .d     (g_lvl[l-1].v[4*g+3]),
          .sum   (v[2*g]),
          .carry (v[2*g+1])
        );
      end
    end
  end

  assign sum   = g_lvl[LEVELS].v[0];
  assign carry = g_lvl[LEVELS].v[1];

endmodule
