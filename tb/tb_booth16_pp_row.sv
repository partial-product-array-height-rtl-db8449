// Self-checking testbench of one partial-product row: with real multiples
// of a random x, every digit -8..8 (and negative zero) must give
// (|d| * x) XOR {neg}.
module tb_booth16_pp_row;
  import booth16_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0]      x;
  logic [8:0][66:0] mult;
  digit_t           digit;
  logic [66:0]      row;

  booth16_pp_row #(.N(64)) dut (.mult(mult), .digit(digit), .row(row));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      x = (i == 0) ? '1 : {$urandom, $urandom};
      for (int k = 0; k <= 8; k++) mult[k] = 67'(x) * 67'(k);
      for (int m = 0; m <= 8; m++) begin
        for (int s = 0; s < 2; s++) begin
          logic [66:0] r;
          digit.mag = 4'(m);
          digit.neg = 1'(s);
          #1;
          r = (67'(x) * 67'(m)) ^ {67{1'(s)}};
          checks++;
          if (row !== r) begin
            failures++;
            if (failures < 10) $display("FAIL x=%h d=%0d neg=%0d got %h ref %h", x, m, s, row, r);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
