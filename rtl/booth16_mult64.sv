// 64 x 64-bit unsigned radix-16 Booth multiplier with a 16-row partial
// product array.
//
// Radix-16 Booth recoding turns the multiplier B into 16 digits in {-8..8}.
// For an unsigned B the recoding also leaves a transfer digit out of the top
// group (B[63]), which would add a 17th row (A * 2^64) and make the array 17
// bits high. Here that row, and the negation bit of the last digit, are
// merged into the low bits of the last partial product row in a short
// 15-bit window, so the array is never more than 16 bits high and reduces to
// two rows with exactly three levels of 4:2 carry-save adders, followed by
// one carry-propagate adder. Data flow (after the block diagram):
//   B -> Booth encoding -> partial product generator (with A, the odd
//   multiples 3A/5A/7A and the ECW sign-extension prefixes) -> 4:2 tree ->
//   final adder -> product.
// The height reduction is the published goal; pipeline registers and the
// exact array layout are this design's own.
//
// Timing: operands are registered when in_valid is high, the product is
// registered one cycle later, so out_valid/product follow in_valid by two
// clock cycles; a new pair can be accepted every cycle. Reset (rst_n low,
// synchronous) clears the valid bits and the data registers.
module booth16_mult64
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [N-1:0]   a,          // multiplicand
  input  logic [N-1:0]   b,          // multiplier
  output logic           out_valid,
  output logic [2*N-1:0] product
);

  localparam int unsigned K  = N / 4;
  localparam int unsigned PW = 2 * N;

  logic [N-1:0]            a_q, b_q;
  logic                    v_q;
  digit_t [K-1:0]          digit;
  logic                    extra;
  logic [K-1:0][PW-1:0]    rows;
  logic [PW-1:0]           red_sum, red_carry, prod_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      a_q <= '0;
      b_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        a_q <= a;
        b_q <= b;
      end
    end
  end

  booth16_recoder #(.N(N)) u_enc (.y(b_q), .digit(digit), .extra(extra));

  booth16_pp_gen #(.N(N)) u_ppg (.x(a_q), .digit(digit), .extra(extra), .rows(rows));

  booth16_reduction_tree #(.ROWS(K), .W(PW)) u_tree (
    .rows  (rows),
    .sum   (red_sum),
    .carry (red_carry)
  );

  booth16_cpa #(.W(PW)) u_cpa (.a(red_sum), .b(red_carry), .s(prod_d));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      product   <= '0;
    end else begin
      out_valid <= v_q;
      if (v_q) product <= prod_d;
    end
  end

endmodule
