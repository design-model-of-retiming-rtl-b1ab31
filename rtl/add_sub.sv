// add_sub: W-bit adder/subtracter made of a ripple chain of latch adders,
// one of the two stages that combine the shifted SPT terms.
//
// y = a + (sub ? ~b : b) + (sub ^ corr), modulo 2^W. With corr low this is
// a + b or a - b in two's complement. corr moves the result one LSB against
// the truncation bias of the shifted terms: +1 on an addition (truncated
// terms sum too low) and -1 on a subtraction (a truncated subtrahend leaves
// the difference too high). No magnitude comparison is needed because the
// a operand always carries the larger power-of-two weight.
// Timing: the result appears on y one clk cycle after ea is high and is held
// while ea is low. The ripple of latch adders and the per-bit conditional
// inversion follow the described structure; the carry-in equation for the
// correction is this design's reading of it.
module add_sub #(
  parameter int unsigned W = 15
) (
  input  logic         clk,
  input  logic         ea,
  input  logic         sub,
  input  logic         corr,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);

  logic [W-1:0] b_eff;
  logic [W:0]   carry;

  assign b_eff    = b ^ {W{sub}};
  assign carry[0] = sub ^ corr;

  for (genvar i = 0; i < W; i++) begin : g_bit
    latch_adder u_la (
      .clk  (clk),
      .a    (a[i]),
      .b    (b_eff[i]),
      .cin  (carry[i]),
      .ea   (ea),
      .s    (y[i]),
      .cout (carry[i+1])
    );
  end

  // carry[W] is the overflow of the W-bit magnitude; the coefficient
  // encoding keeps results in range, so it is not used.
  logic unused_carry;
  assign unused_carry = carry[W];

endmodule
