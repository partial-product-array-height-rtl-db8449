// Self-checking testbench of the final adder: s must equal a + b modulo
// 2^128, compared against a sum built from 32-bit pieces with explicit
// carries.
module tb_booth16_cpa;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] a, b, s;
  booth16_cpa #(.W(128)) dut (.a(a), .b(b), .s(s));

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic [127:0] want;
      logic [32:0]  part;
      logic         cy;
      a = (k == 0) ? '1 : {$urandom, $urandom, $urandom, $urandom};
      b = (k == 0) ? 128'd1 : {$urandom, $urandom, $urandom, $urandom};
      #1;
      cy = 1'b0;
      for (int w = 0; w < 4; w++) begin
        part = 33'(a[32*w +: 32]) + 33'(b[32*w +: 32]) + 33'(cy);
        want[32*w +: 32] = part[31:0];
        cy = part[32];
      end
      checks++;
      if (s !== want) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h got %h want %h", a, b, s, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
