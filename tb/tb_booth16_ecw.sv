// Self-checking testbench of the sign-extension (ECW) prefixes. For every
// row sign pattern the prefixes, placed at column 4i+N+3 of each row i and
// summed modulo 2^2N, must equal -sum_i s_i 2^(N+3+4i) modulo 2^2N: the value
// the rows' sign bits carry. Exhaustive at N = 16, random at N = 64.
module tb_booth16_ecw;
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

  logic [15:0]            neg64;
  logic [15:0][EXT_W-1:0] ext64;
  booth16_ecw #(.N(64)) dut64 (.neg(neg64), .ext(ext64));

  logic [3:0]             neg16;
  logic [3:0][EXT_W-1:0]  ext16;
  booth16_ecw #(.N(16)) dut16 (.neg(neg16), .ext(ext16));

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [31:0] got, want;
      neg16 = 4'(v);
      #1;
      got = '0; want = '0;
      for (int i = 0; i < 4; i++) begin
        got  += 32'(ext16[i]) << (19 + 4 * i);
        want -= 32'(neg16[i]) << (19 + 4 * i);
      end
      checks++;
      if (got !== want) begin
        failures++;
        $display("FAIL N=16 neg=%b got %h want %h", neg16, got, want);
      end
    end
    for (int k = 0; k < 20000; k++) begin
      logic [127:0] got, want;
      neg64 = (k == 0) ? '0 : (k == 1) ? '1 : 16'($urandom);
      #1;
      got = '0; want = '0;
      for (int i = 0; i < 16; i++) begin
        got  += 128'(ext64[i]) << (67 + 4 * i);
        want -= 128'(neg64[i]) << (67 + 4 * i);
      end
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 10) $display("FAIL N=64 neg=%b got %h want %h", neg64, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
