// Testbench of the multiplier at other operand widths (N = 16, 32 and 128),
// where the same array layout must still give N/4 rows and the exact
// product. Operands are applied every cycle; each product is checked two
// cycles later against a reference multiplication. N = 16 walks all
// multipliers for a set of multiplicands; N = 32 and N = 128 are random.
module tb_booth16_mult_sizes;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        rst_n, in_valid;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic        ov16, ov32;
  logic [31:0] p16;
  logic [63:0] p32;
  logic [127:0] a128, b128;
  logic         ov128, in_valid128;
  logic [255:0] p128;

  booth16_mult64 #(.N(16)) dut16 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a16), .b(b16),
                                  .out_valid(ov16), .product(p16));
  booth16_mult64 #(.N(32)) dut32 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a32), .b(b32),
                                  .out_valid(ov32), .product(p32));

  booth16_mult64 #(.N(128)) dut128 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid128), .a(a128), .b(b128),
                                    .out_valid(ov128), .product(p128));

  logic [31:0] e16 [$];
  logic [255:0] e128 [$];
  logic [63:0] e32 [$];

  always @(negedge clk) begin
    if (rst_n && ov16) begin
      logic [31:0] e;
      e = e16.pop_front();
      checks++;
      if (p16 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=16 got %h want %h", p16, e);
      end
    end
    if (rst_n && ov32) begin
      logic [63:0] e;
      e = e32.pop_front();
      checks++;
      if (p32 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=32 got %h want %h", p32, e);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && ov128) begin
      logic [255:0] e;
      e = e128.pop_front();
      checks++;
      if (p128 !== e) begin
        failures++;
        if (failures < 10) $display("FAIL N=128 got %h want %h", p128, e);
      end
    end
  end

  initial begin
    a128 = '0; b128 = '0; in_valid128 = 1'b0;
    rst_n = 1'b0; in_valid = 1'b0; a16 = '0; b16 = '0; a32 = '0; b32 = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < 16 * 65536; k++) begin
      @(negedge clk);
      in_valid = 1'b1;
      case (k / 65536)
        0: a16 = 16'hFFFF;
        1: a16 = 16'h0001;
        2: a16 = 16'h8000;
        default: a16 = 16'($urandom);
      endcase
      b16 = 16'(k);
      a32 = $urandom;
      b32 = (k < 4) ? 32'hFFFF_FFFF : $urandom;
      e16.push_back(32'(a16) * 32'(b16));
      e32.push_back(64'(a32) * 64'(b32));
      in_valid128 = (k < 100000);
      if (k < 100000) begin
        a128 = (k < 4) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        b128 = (k < 2) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        e128.push_back(256'(a128) * 256'(b128));
      end
    end
    @(negedge clk) begin
      in_valid = 1'b0;
      in_valid128 = 1'b0;
    end
    repeat (4) @(posedge clk);
    checks++;
    if (e16.size() != 0 || e32.size() != 0 || e128.size() != 0) begin
      failures++;
      $display("FAIL products missing: %0d / %0d", e16.size(), e32.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
