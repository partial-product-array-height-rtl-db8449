// Self-checking testbench of the 4:2 reduction tree at 16 rows (three
// levels) and at 4 rows (one level): sum + carry must equal the sum of all
// rows modulo 2^W.
module tb_booth16_reduction_tree;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0][127:0] rows;
  logic [127:0]       sum, carry;
  booth16_reduction_tree #(.ROWS(16), .W(128)) dut (.rows(rows), .sum(sum), .carry(carry));

  logic [3:0][31:0]   rows4;
  logic [31:0]        sum4, carry4;
  booth16_reduction_tree #(.ROWS(4), .W(32)) dut4 (.rows(rows4), .sum(sum4), .carry(carry4));

  initial begin
    for (int k = 0; k < 10000; k++) begin
      logic [127:0] want;
      logic [31:0]  want4;
      want = '0; want4 = '0;
      for (int r = 0; r < 16; r++) begin
        rows[r] = (k == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        want += rows[r];
      end
      for (int r = 0; r < 4; r++) begin
        rows4[r] = (k == 0) ? '1 : $urandom;
        want4 += rows4[r];
      end
      #1;
      checks += 2;
      if (sum + carry !== want) begin
        failures++;
        if (failures < 10) $display("FAIL 16 rows: got %h want %h", sum + carry, want);
      end
      if (sum4 + carry4 !== want4) begin
        failures++;
        if (failures < 10) $display("FAIL 4 rows: got %h want %h", sum4 + carry4, want4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
