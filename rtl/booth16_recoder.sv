// Radix-16 Booth recoder for an N-bit unsigned multiplier.
//
// The multiplier Y is cut into K = N/4 groups of four bits, v_i in {0..15}.
// Each group is split into a transfer digit t_i = 1 when v_i >= 8 and an
// interim digit w_i = v_i - 16*t_i in {-8..7}; the digit is d_i = w_i + t_{i-1}
// (t_{-1} = 0), which lies in the minimally redundant set {-8..8}. Because Y is
// unsigned, the transfer out of the top group, t_{K-1} = y[N-1], is one more
// digit of weight 2^N: it is brought out on `extra` (it selects an extra row
// equal to X). The recoding with transfer and interim digits follows the
// published method; the sign/magnitude output encoding is this design's own.
//
// Purely combinational. Ports:
//   y      multiplier (N bits, unsigned)
//   digit  K digits, digit[i] has weight 16^i
//   extra  transfer digit out of the top group, weight 2^N
module booth16_recoder
  import booth16_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  logic [N-1:0]   y,
  output digit_t [N/4-1:0] digit,
  output logic           extra
);

  localparam int unsigned K = N / 4;

  logic [K:0] t;  // t[i+1] is the transfer out of group i; t[0] = 0

  always_comb begin
    t[0] = 1'b0;
    for (int unsigned i = 0; i < K; i++) begin
      logic [3:0]        v;
      logic signed [5:0] w;
      logic signed [5:0] d;
      v        = y[4*i +: 4];
      t[i+1]   = v[3];                           // v >= 8
      w        = $signed({2'b00, v}) - (t[i+1] ? 6'sd16 : 6'sd0);
      d        = w + $signed({5'b0, t[i]});
      // The sign is the transfer digit itself: for v >= 8 the digit is in
      // {-8..0}, and 0 (v = 15 with an incoming transfer) is kept as -0.
      digit[i].neg = t[i+1];
      digit[i].mag = d[5] ? 4'(-d) : 4'(d);
    end
    extra = t[K];
  end

endmodule
