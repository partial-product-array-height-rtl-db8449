// Self-checking testbench of the partial product generator. The digits are
// worked out here from the multiplier with the Booth digit formula, fed to
// the generator with the multiplicand, and the K output vectors, summed
// modulo 2^2N, must equal x * y. Run at N = 64 (16 vectors) and N = 16
// (4 vectors). Counts how often the extra row and the merge carry occur.
module tb_booth16_pp_gen;
  import booth16_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_extra = 0, n_carry = 0;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0]          x, y;
  digit_t [15:0]        digit;
  logic                 extra;
  logic [15:0][127:0]   rows;
  booth16_pp_gen #(.N(64)) dut (.x(x), .digit(digit), .extra(extra), .rows(rows));

  logic [15:0]          x16, y16;
  digit_t [3:0]         digit16;
  logic                 extra16;
  logic [3:0][31:0]     rows16;
  booth16_pp_gen #(.N(16)) dut16 (.x(x16), .digit(digit16), .extra(extra16), .rows(rows16));

  function automatic digit_t mk_digit(input logic [4:0] g);  // {y[4i+3:4i], y[4i-1]}
    int d;
    digit_t r;
    d = -8 * int'(g[4]) + 4 * int'(g[3]) + 2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
    r.neg = g[4];
    r.mag = 4'((d < 0) ? -d : d);
    return r;
  endfunction

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic [127:0] want, got;
      case (k)
        0: begin x = '1; y = '1; end
        1: begin x = '1; y = 64'h8000_0000_0000_0000; end
        2: begin x = '1; y = 64'h8888_8888_8888_8888; end
        default: begin x = {$urandom, $urandom}; y = {$urandom, $urandom}; end
      endcase
      for (int i = 0; i < 16; i++)
        digit[i] = mk_digit({y[4*i +: 4], (i == 0) ? 1'b0 : y[4*i-1]});
      extra = y[63];
      #1;
      want = 128'(x) * 128'(y);
      got = '0;
      for (int r = 0; r < 16; r++) got += rows[r];
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h got %h want %h", x, y, got, want);
      end
      n_extra += int'(extra);
      n_carry += int'(dut.merge_carry);
    end
    for (int k = 0; k < 20000; k++) begin
      logic [31:0] want, got;
      x16 = 16'($urandom); y16 = 16'($urandom);
      if (k == 0) begin x16 = '1; y16 = '1; end
      for (int i = 0; i < 4; i++)
        digit16[i] = mk_digit({y16[4*i +: 4], (i == 0) ? 1'b0 : y16[4*i-1]});
      extra16 = y16[15];
      #1;
      want = 32'(x16) * 32'(y16);
      got = '0;
      for (int r = 0; r < 4; r++) got += rows16[r];
      checks++;
      if (got !== want) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 x=%h y=%h got %h want %h", x16, y16, got, want);
      end
    end
    $display("extra row used %0d times, merge carry %0d times", n_extra, n_carry);
    checks += 2;
    if (n_extra == 0) failures++;
    if (n_carry == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
