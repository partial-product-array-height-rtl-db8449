// Self-checking testbench of the extra-row merge: {carry, sum} must equal
// row_low + neg + extra * (x_low << 4) for random inputs and the corner that
// makes the carry ripple through the whole window.
module tb_booth16_row_merge;
  import booth16_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, carries = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [MERGE_W-1:0]  row_low, sum;
  logic [MERGE_XW-1:0] x_low;
  logic                neg, extra, carry;

  booth16_row_merge dut (.row_low(row_low), .neg(neg), .extra(extra), .x_low(x_low),
                         .sum(sum), .carry(carry));

  initial begin
    for (int k = 0; k < 50000; k++) begin
      int want;
      row_low = (k == 0) ? '1 : MERGE_W'($urandom);
      x_low   = (k == 0) ? '0 : MERGE_XW'($urandom);
      neg     = (k == 0) ? 1'b1 : 1'($urandom);
      extra   = (k == 0) ? 1'b0 : 1'($urandom);
      #1;
      want = int'(row_low) + int'(neg) + (extra ? int'(x_low) * 16 : 0);
      checks++;
      if (int'({carry, sum}) != want) begin
        failures++;
        if (failures < 10) $display("FAIL got %0d want %0d", {carry, sum}, want);
      end
      carries += int'(carry);
    end
    checks++;
    if (carries == 0) begin
      failures++;
      $display("FAIL carry out never produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
