// rbnb_ling4: 4-digit slice of the RB to 2's-complement converter.
//
// Conversion rule: a carry c(i) = 1 means that below digit i there is a -1 with
// no +1 between it and digit i. Per digit, generate g = ~(x.m | x.p) (the digit
// is -1) and transfer t = ~(x.m & x.p) (the digit is not +1), so
// c(i+1) = g(i) | c(i) & t(i), and the output bit is s(i) = ~(c(i) ^ x.m ^ x.p).
// Following Ling's adder, the slice propagates h(i) = c(i) | c(i-1) instead of
// c(i), which shortens the lookahead terms:
//   h1 = g0 | h0 t-1
//   h2 = g1 | g0 | h0 t-1 t0
//   h3 = g2 | g1 | g0 t1 | h0 t-1 t0 t1
//   h4 = g3 | g2 | g1 t2 | g0 t1 t2 | h0 t-1 t0 t1 t2
// and recovers the carry as c(i) = h(i) & t(i-1).
//
// Interface: x = four RB digits, t_m1 = transfer t of the digit just below the
// slice (any value when h_in = 0), h_in = Ling carry into the slice. Outputs: s =
// four binary bits, h_out = h4, and the block generate/transfer for a lookahead
// generator, g_blk = g3|g2|g1 t2|g0 t1 t2 and t_blk = t-1 t0 t1 t2, with which
// h4 = g_blk | t_blk & h_in. t3 is passed on as the next slice's t_m1.
// Combinational.
//
// Origin: the per-digit NAND/NOR/XNOR logic and the Ling carry h(i) = c(i) +
// c(i-1) follow the original design; the block generate/transfer outputs for a
// lookahead level are this design's way of joining slices.
module rbnb_ling4
  import rb_pkg::*;
(
  input  rb_digit_t [3:0] x,
  input  logic            t_m1,
  input  logic            h_in,
  output logic [3:0]      s,
  output logic            h_out,
  output logic            g_blk,
  output logic            t_blk,
  output logic            t3
);

  logic [3:0] g;
  logic [3:0] t;
  logic [3:0] h;   // h[i] = Ling carry into digit i of the slice
  logic [3:0] c;   // ordinary carry into digit i

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      g[i] = ~(x[i].m | x[i].p);
      t[i] = ~(x[i].m & x[i].p);
    end
    h[0]  = h_in;
    h[1]  = g[0] | (h_in & t_m1);
    h[2]  = g[1] | g[0] | (h_in & t_m1 & t[0]);
    h[3]  = g[2] | g[1] | (g[0] & t[1]) | (h_in & t_m1 & t[0] & t[1]);
    g_blk = g[3] | g[2] | (g[1] & t[2]) | (g[0] & t[1] & t[2]);
    t_blk = t_m1 & t[0] & t[1] & t[2];
    h_out = g_blk | (t_blk & h_in);
    c[0]  = h[0] & t_m1;
    for (int i = 1; i < 4; i++) c[i] = h[i] & t[i-1];
    for (int i = 0; i < 4; i++) s[i] = ~(c[i] ^ x[i].m ^ x[i].p);
  end

  assign t3 = t[3];

endmodule
