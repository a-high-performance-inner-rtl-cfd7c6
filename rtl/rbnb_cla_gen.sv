// rbnb_cla_gen: 4-block carry-lookahead generator for the RB to 2's-complement
// converter.
//
// Takes the block generate g[k] and block transfer t[k] of four 4-digit
// converter slices and the carry h_in into the lowest one, and forms the Ling
// carry into each following slice in parallel, h(k+1) = g[k] | t[k] & h(k),
// unrolled into two-level AND-OR form. It also gives the group generate and
// transfer of all four blocks, so generators can themselves be cascaded into a
// further level. Combinational.
//
// Origin: a 4-slice Ling lookahead generator forming a two-level 16-digit
// converter follows the original design; the group outputs for chaining beyond
// 16 digits are this design's addition.
module rbnb_cla_gen (
  input  logic [3:0] g,
  input  logic [3:0] t,
  input  logic       h_in,
  output logic [4:1] h,
  output logic       g_grp,
  output logic       t_grp
);

  always_comb begin
    h[1]  = g[0] | (t[0] & h_in);
    h[2]  = g[1] | (t[1] & g[0]) | (t[1] & t[0] & h_in);
    h[3]  = g[2] | (t[2] & g[1]) | (t[2] & t[1] & g[0]) | (t[2] & t[1] & t[0] & h_in);
    g_grp = g[3] | (t[3] & g[2]) | (t[3] & t[2] & g[1]) | (t[3] & t[2] & t[1] & g[0]);
    t_grp = &t;
    h[4]  = g_grp | (t_grp & h_in);
  end

endmodule
