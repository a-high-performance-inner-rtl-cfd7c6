// rb_adder: carry-propagation-free redundant binary adder (RBA).
//
// Each digit position is one RB full adder (RBFA) with the logic of the
// design's RBFA table, for the digit coding of rb_pkg:
//   g  = (x.m ^ x.p) ^ (y.m ^ y.p)        h  = x.m & x.p | y.m & y.p
//   z.m = g ^ c.m(i-1)                      z.p = c.p(i-1)
//   c.m(i) = (x.m | x.p) & (y.m | y.p)      c.p(i) = g & c.m(i-1) | ~g & h
// The intermediate carry c(i) is itself an RB digit (value c.m + c.p - 1), and
// c.m(i) depends only on position i, so no signal passes through more than two
// digit positions: the delay does not depend on W.
//
// Interface: x + y + cin = z + 2**W * cout. cin is an RB digit added at the least
// significant position; it is how correction terms of -1 or +1 enter an adder.
// Purely combinational.
//
// Origin: the digit code and the full-adder cell equations are those of the
// original design; the separate carry-in/carry-out digits and the modulo-2**W
// word are this design's choices.
module rb_adder
  import rb_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  rb_digit_t [W-1:0] x,
  input  rb_digit_t [W-1:0] y,
  input  rb_digit_t         cin,
  output rb_digit_t [W-1:0] z,
  output rb_digit_t         cout
);

  logic [W:0] cm;    // minus wire of the carry into each position
  logic [W:0] cp;    // plus wire of the carry into each position
  logic [W-1:0] g;
  logic [W-1:0] h;

  assign cm[0] = cin.m;
  assign cp[0] = cin.p;

  for (genvar i = 0; i < W; i++) begin : g_rbfa
    assign g[i]      = (x[i].m ^ x[i].p) ^ (y[i].m ^ y[i].p);
    assign h[i]      = (x[i].m & x[i].p) | (y[i].m & y[i].p);
    assign z[i].m    = g[i] ^ cm[i];
    assign z[i].p    = cp[i];
    assign cm[i+1]   = (x[i].m | x[i].p) & (y[i].m | y[i].p);
    assign cp[i+1]   = (g[i] & cm[i]) | (~g[i] & h[i]);
  end

  assign cout = '{m: cm[W], p: cp[W]};

endmodule
