// Self-checking testbench of the radix-16 Booth recoder (N = 64 and N = 16).
// For random and corner multipliers it checks every digit against the digit
// formula d_i = -8 y[4i+3] + 4 y[4i+2] + 2 y[4i+1] + y[4i] + y[4i-1], the
// sign against y[4i+3], the range |d_i| <= 8, and that the digits and the
// extra transfer digit add back up to the multiplier.
module tb_booth16_recoder;
  import booth16_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0]    y;
  digit_t [15:0]  digit;
  logic           extra;
  booth16_recoder #(.N(64)) dut (.y(y), .digit(digit), .extra(extra));

  logic [15:0]    y16;
  digit_t [3:0]   digit16;
  logic           extra16;
  booth16_recoder #(.N(16)) dut16 (.y(y16), .digit(digit16), .extra(extra16));

  function automatic int ref_digit(input logic [127:0] v, input int i);
    int lo;
    lo = (i == 0) ? 0 : int'(v[4*i-1]);
    return -8 * int'(v[4*i+3]) + 4 * int'(v[4*i+2]) + 2 * int'(v[4*i+1]) + int'(v[4*i]) + lo;
  endfunction

  task automatic check64();
    logic signed [131:0] acc;
    acc = '0;
    for (int i = 0; i < 16; i++) begin
      int d, dr;
      d  = digit[i].neg ? -int'(digit[i].mag) : int'(digit[i].mag);
      dr = ref_digit({64'b0, y}, i);
      checks++;
      if (d != dr || digit[i].mag > 8 || digit[i].neg != y[4*i+3]) begin
        failures++;
        if (failures < 10) $display("FAIL y=%h digit %0d got %0d ref %0d", y, i, d, dr);
      end
      acc += $signed(132'(d)) <<< (4 * i);
    end
    acc += extra ? (132'sd1 <<< 64) : 132'sd0;
    checks++;
    if (acc != $signed({68'b0, y}) || extra != y[63]) begin
      failures++;
      if (failures < 10) $display("FAIL y=%h digits sum %h", y, acc);
    end
  endtask

  initial begin
    logic [63:0] corner [6];
    corner = '{64'h0, 64'hFFFF_FFFF_FFFF_FFFF, 64'h8888_8888_8888_8888,
               64'h7777_7777_7777_7777, 64'h8000_0000_0000_0000, 64'hF0F0_F0F0_0F0F_0F0F};
    foreach (corner[k]) begin
      y = corner[k];
      #1 check64();
    end
    for (int k = 0; k < 20000; k++) begin
      y = {$urandom, $urandom};
      #1 check64();
    end
    // exhaustive at N = 16
    for (int v = 0; v < 65536; v++) begin
      int acc;
      y16 = 16'(v);
      #1;
      acc = extra16 ? 65536 : 0;
      for (int i = 0; i < 4; i++)
        acc += (digit16[i].neg ? -int'(digit16[i].mag) : int'(digit16[i].mag)) * (1 << (4 * i));
      checks++;
      if (acc != v) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 y=%h sum %0d", y16, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
