// rb_multiplier: N x N signed/unsigned multiplier with a redundant binary product.
//
// rb_ppg maps the N 2's-complement partial products onto N/2 RB partial products
// plus one RB correction word; an RB adder tree adds the N/2 + 1 words. For
// N = 8 this is 5 words and three RBA levels. SIGN = 1 multiplies 2's-complement
// operands, SIGN = 0 unsigned operands (the unified signed/unsigned multiplier).
//
// BOOTH = 1 uses the modified-Booth generator (booth_rbppg) instead: N/4 RB
// partial products plus the correction word, N/4 + 1 words (3 words, two RBA
// levels, for N = 8). The result is the same; the default is the plain inline
// generator.
//
// Interface: p is the product A*B as a W-digit RB number (value modulo 2**W).
// Combinational.
//
// Origin: inline RB partial products summed by an RB adder tree follow the
// original design; the extra correction operand and the W-digit output width are
// this design's choices.
module rb_multiplier
  import rb_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 24,
  parameter bit          BOOTH = 1'b0
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic              sign,
  output rb_digit_t [W-1:0] p
);

  if (BOOTH) begin : g_booth
    rb_digit_t [N/4-1:0][W-1:0] pp;
    rb_digit_t [W-1:0]          corr;
    rb_digit_t [N/4:0][W-1:0]   ops;

    booth_rbppg #(.N(N), .W(W)) u_ppg (
      .a    (a),
      .b    (b),
      .sign (sign),
      .pp   (pp),
      .corr (corr)
    );

    assign ops = {corr, pp};

    rb_adder_tree #(.K(N/4 + 1), .W(W)) u_tree (
      .ops (ops),
      .sum (p)
    );
  end else begin : g_inline
    rb_digit_t [N/2-1:0][W-1:0] pp;
    rb_digit_t [W-1:0]          corr;
    rb_digit_t [N/2:0][W-1:0]   ops;

    rb_ppg #(.N(N), .W(W)) u_ppg (
      .a    (a),
      .b    (b),
      .sign (sign),
      .pp   (pp),
      .corr (corr)
    );

    assign ops = {corr, pp};   // the correction word is the last operand

    rb_adder_tree #(.K(N/2 + 1), .W(W)) u_tree (
      .ops (ops),
      .sum (p)
    );
  end

endmodule
