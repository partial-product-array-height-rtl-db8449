// Self-checking testbench of the 4:2 carry-save adder: sum + carry must equal
// a + b + c + d modulo 2^W, and carry bit 0 must be 0, for random and
// all-ones inputs.
module tb_booth16_csa42;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] a, b, c, d, sum, carry;
  booth16_csa42 #(.W(128)) dut (.a(a), .b(b), .c(c), .d(d), .sum(sum), .carry(carry));

  function automatic logic [127:0] rnd();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      if (k == 0) begin a = '1; b = '1; c = '1; d = '1; end
      else begin a = rnd(); b = rnd(); c = rnd(); d = rnd(); end
      #1;
      checks++;
      if (sum + carry !== a + b + c + d || carry[0] !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h c=%h d=%h", a, b, c, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
