// End-to-end testbench of the 64 x 64 multiplier at its default size.
// Streams operand pairs with random gaps, checks every product against a
// 128-bit reference multiplication, checks that each product appears exactly
// two cycles after its operands and that nothing appears otherwise, and
// applies a reset in the middle of the stream. It counts the design's
// mechanisms and fails if one never happened: the extra (17th) row being
// merged, the merge carry, each digit value -8..8, negative zero, each odd
// multiple, back-to-back operands and idle cycles.
module tb_booth16_mult64;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic         rst_n, in_valid, out_valid;
  logic [63:0]  a, b;
  logic [127:0] product;

  booth16_mult64 dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
                      .out_valid(out_valid), .product(product));

  // expected products, tagged with the cycle they must appear in
  logic [127:0] exp_q [$];
  int           exp_t [$];

  int n_extra = 0, n_carry = 0, n_negzero = 0, n_b2b = 0, n_idle = 0, n_resets = 0;
  int n_digit [17];  // index d + 8
  logic prev_valid = 1'b0;

  task automatic count_digits(input logic [63:0] y);
    for (int i = 0; i < 16; i++) begin
      int d;
      d = -8 * int'(y[4*i+3]) + 4 * int'(y[4*i+2]) + 2 * int'(y[4*i+1]) + int'(y[4*i])
          + ((i == 0) ? 0 : int'(y[4*i-1]));
      n_digit[d + 8]++;
      if (d == 0 && y[4*i+3]) n_negzero++;
    end
  endtask

  // output monitor, sampled half a cycle after each rising edge
  always @(negedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected product at cycle %0d", cycle);
        end else begin
          logic [127:0] e;
          int t;
          e = exp_q.pop_front();
          t = exp_t.pop_front();
          if (product !== e || t != cycle) begin
            failures++;
            if (failures < 10)
              $display("FAIL cycle %0d (expected at %0d): got %h want %h", cycle, t, product, e);
          end
        end
      end else if (exp_t.size() != 0 && exp_t[0] == cycle) begin
        checks++;
        failures++;
        $display("FAIL product missing at cycle %0d", cycle);
      end
      if (dut.v_q) n_carry += int'(dut.u_ppg.merge_carry);
    end
  end

  task automatic drive(input logic v, input logic [63:0] x, input logic [63:0] y);
    @(negedge clk);
    in_valid = v;
    a = x;
    b = y;
    if (v) begin
      // registered at the next edge (cycle+1), product registered one edge later
      exp_q.push_back(128'(x) * 128'(y));
      exp_t.push_back(cycle + 2);
      count_digits(y);
      n_extra += int'(y[63]);
      if (prev_valid) n_b2b++;
    end else begin
      n_idle++;
    end
    prev_valid = v;
  endtask

  initial begin
    foreach (n_digit[i]) n_digit[i] = 0;
    rst_n = 1'b0; in_valid = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    drive(1, '1, '1);
    drive(1, '1, 64'h8000_0000_0000_0000);
    drive(1, 64'h1234_5678_9abc_def0, 64'h8888_8888_8888_8888);
    drive(1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7777_7777_7777_7777);
    drive(1, 64'h0, 64'hFFFF_0000_FFFF_0000);
    drive(0, '0, '0);
    for (int k = 0; k < 30000; k++) begin
      logic v;
      v = ($urandom % 4) != 0;
      drive(v, {$urandom, $urandom}, {$urandom, $urandom});
      if (k == 15000) begin
        // reset in the middle of the stream: pending products are dropped
        @(negedge clk);
        rst_n = 1'b0;
        in_valid = 1'b0;
        exp_q.delete();
        exp_t.delete();
        prev_valid = 1'b0;
        n_resets++;
        @(negedge clk);
        checks++;
        if (out_valid !== 1'b0) begin
          failures++;
          $display("FAIL out_valid not cleared by reset");
        end
        rst_n = 1'b1;
      end
    end
    drive(0, '0, '0);
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d products never appeared", exp_q.size());
    end
    $display("mechanisms: extra row %0d, merge carry %0d, negative zero %0d, back-to-back %0d, idle %0d, reset %0d",
             n_extra, n_carry, n_negzero, n_b2b, n_idle, n_resets);
    checks += 6;
    if (n_extra == 0 || n_carry == 0 || n_negzero == 0 || n_b2b == 0 || n_idle == 0 || n_resets == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    for (int d = -8; d <= 8; d++) begin
      checks++;
      if (n_digit[d + 8] == 0) begin
        failures++;
        $display("FAIL digit %0d never used", d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
