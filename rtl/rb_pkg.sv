// rb_pkg: shared types for the redundant binary (RB) inner-product processor.
//
// A redundant binary digit takes the values -1, 0 and +1 and is carried on two
// wires, (m, p), following the coding table of the design: 00 = -1, 01 = 0,
// 10 = 0, 11 = +1. Its value is therefore m + p - 1, and the negation of a digit
// is obtained by inverting both wires. An RB number of W digits is a packed
// array rb_digit_t [W-1:0] whose value is sum(value(d[i]) * 2**i).
//
// The package also holds the operating-mode encodings of the inner-product core:
// the number format (real 2's-complement, complex, redundant binary) and how far
// the RB adder tree is split into accumulator segments. These encodings are this
// design's own choice.
package rb_pkg;

  typedef struct packed {
    logic m;  // "minus" wire of the digit
    logic p;  // "plus" wire of the digit
  } rb_digit_t;

  localparam rb_digit_t RB_ZERO = '{m: 1'b0, p: 1'b1};
  localparam rb_digit_t RB_POS  = '{m: 1'b1, p: 1'b1};
  localparam rb_digit_t RB_NEG  = '{m: 1'b0, p: 1'b0};

  // Number format of the operands of the inner-product core.
  typedef enum logic [1:0] {
    FMT_REAL    = 2'd0,  // eight real 2's-complement (or unsigned) element pairs
    FMT_COMPLEX = 2'd1,  // two complex element pairs, re/im on adjacent lanes
    FMT_RB      = 2'd2   // two RB element pairs, plus/minus wires on adjacent lanes
  } fmt_e;

  // How much of the RB adder tree is used before the accumulator segments.
  typedef enum logic [1:0] {
    SPLIT_ONE   = 2'd0,  // whole tree, one segment
    SPLIT_TWO   = 2'd1,  // first tree level only, two segments
    SPLIT_FOUR  = 2'd2,  // pair-unit outputs, four segments
    SPLIT_EIGHT = 2'd3   // single products, eight segments
  } split_e;

  // Negate one RB digit (the RB complement): -1 <-> +1, 0 stays 0.
  function automatic rb_digit_t rb_neg(input rb_digit_t d);
    rb_neg = '{m: ~d.p, p: ~d.m};
  endfunction

  // Integer value of one digit, for use in testbenches and assertions.
  function automatic int rb_val(input rb_digit_t d);
    rb_val = int'(d.m) + int'(d.p) - 1;
  endfunction

endpackage
