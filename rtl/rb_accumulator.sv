// rb_accumulator: one redundant binary accumulator segment.
//
// A register of W RB digits whose next value is acc + x through one RBA when
// `accumulate` is 1, or x itself when it is 0 (the first term of a new inner
// product, or a bypassed accumulator that only registers a product). Because the
// RBA is carry-propagation free, the accumulate loop is one RBA delay whatever W
// is. Overflow beyond W digits wraps modulo 2**W.
//
// Timing: updates on the rising clock edge when en = 1; asynchronous active-low
// reset to zero (all digits 01).
//
// Origin: an RB accumulator register closing an RB adder follows the original
// design; the load/accumulate control, reset value and wrap-around (no overflow
// or saturation logic) are this design's choices.
module rb_accumulator
  import rb_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              accumulate,
  input  rb_digit_t [W-1:0] x,
  output rb_digit_t [W-1:0] acc
);

  rb_digit_t [W-1:0] sum;

  rb_adder #(.W(W)) u_rba (
    .x   (acc),
    .y   (x),
    .cin (RB_ZERO),
    .z   (sum),
    .cout()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '{default: RB_ZERO};
    else if (en) acc <= accumulate ? sum : x;
  end

endmodule
