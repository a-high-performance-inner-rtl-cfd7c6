// rb_two_minus: 2 - A for a redundant binary fixed-point number.
//
// A has W digits, of which the lowest FRAC are fractional. Every digit is
// negated (both wires inverted: the NOT gates), which gives -A with no carry.
// The integer digits of -A then pass through an RB adder together with the
// constant 2 (digit +1 at integer position 1); the fractional digits of -A are
// the fractional digits of the result as they are. The adder has W - FRAC digits
// and its carry out is dropped, so the result is 2 - A modulo 2**(W-FRAC).
// Combinational.
//
// Origin: the RB complement 2 - A follows the original design; using two
// integer digits (the original shows four) is this design's choice, sufficient
// for the divider's range.
module rb_two_minus
  import rb_pkg::*;
#(
  parameter int unsigned W    = 12,
  parameter int unsigned FRAC = 10
) (
  input  rb_digit_t [W-1:0] a,
  output rb_digit_t [W-1:0] y
);

  localparam int unsigned IW = W - FRAC;   // integer digits

  rb_digit_t [W-1:0]  na;
  rb_digit_t [IW-1:0] two;

  always_comb begin
    for (int i = 0; i < W; i++) na[i] = rb_neg(a[i]);
    two    = '{default: RB_ZERO};
    two[1] = RB_POS;
  end

  rb_adder #(.W(IW)) u_rba (
    .x   (na[W-1:FRAC]),
    .y   (two),
    .cin (RB_ZERO),
    .z   (y[W-1:FRAC]),
    .cout()
  );

  assign y[FRAC-1:0] = na[FRAC-1:0];

  initial assert (IW >= 2) else $error("rb_two_minus: need at least two integer digits");

endmodule
