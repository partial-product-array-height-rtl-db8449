// Self-checking testbench of the multiple generator: for random and corner
// multiplicands every output mult[k] must equal k * x for k = 1..8.
module tb_booth16_multiples;
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
  booth16_multiples #(.N(64)) dut (.x(x), .mult(mult));

  task automatic check();
    for (int k = 1; k <= 8; k++) begin
      logic [66:0] r;
      r = 67'(x) * 67'(k);
      checks++;
      if (mult[k] !== r) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h k=%0d got %h ref %h", x, k, mult[k], r);
      end
    end
  endtask

  initial begin
    x = '0;                     #1 check();
    x = '1;                     #1 check();
    x = 64'h5555_5555_5555_5555; #1 check();
    x = 64'h8000_0000_0000_0001; #1 check();
    for (int i = 0; i < 20000; i++) begin
      x = {$urandom, $urandom};
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
