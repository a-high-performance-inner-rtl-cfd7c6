// rbnb_converter: W-digit redundant binary to W-bit 2's-complement converter.
//
// The digits are cut into W/4 slices (rbnb_ling4). Each slice forms its own
// block generate/transfer from its digits alone; groups of four slices share a
// carry-lookahead generator (rbnb_cla_gen) that delivers the Ling carry into
// every slice of the group at once, so 16 digits form a two-level lookahead
// converter. Wider words chain the groups, each group passing its Ling carry
// g_grp | t_grp & h to the next. The conversion is exact modulo 2**W: an RB value
// in [-2**(W-1), 2**(W-1)) gives its 2's-complement code.
//
// Requires W to be a multiple of 4. Combinational.
//
// Origin: 4-digit slices under a 4-way lookahead generator follow the original
// design; chaining 16-digit groups for wider words is this design's choice.
module rbnb_converter
  import rb_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  rb_digit_t [W-1:0] x,
  output logic [W-1:0]      s
);

  localparam int unsigned NB = W / 4;            // slices
  localparam int unsigned NG = (NB + 3) / 4;     // lookahead groups

  logic [4*NG-1:0] g_blk;
  logic [4*NG-1:0] t_blk;
  logic [4*NG:0]   h_blk;      // Ling carry into each slice
  logic [NB:0]     t_top;      // t of the top digit of each slice (t_top[0]: below digit 0)
  logic [NG:0]     h_grp;      // Ling carry into each group
  logic [NG-1:0]   g_grp;
  logic [NG-1:0]   t_grp;

  assign t_top[0] = 1'b1;
  assign h_grp[0] = 1'b0;

  for (genvar k = 0; k < NB; k++) begin : g_slice
    rbnb_ling4 u_slice (
      .x     (x[4*k +: 4]),
      .t_m1  (t_top[k]),
      .h_in  (h_blk[k]),
      .s     (s[4*k +: 4]),
      .h_out (),
      .g_blk (g_blk[k]),
      .t_blk (t_blk[k]),
      .t3    (t_top[k+1])
    );
  end

  // Unused slice positions of the last group neither generate nor transfer.
  for (genvar k = NB; k < 4 * NG; k++) begin : g_pad
    assign g_blk[k] = 1'b0;
    assign t_blk[k] = 1'b0;
  end

  for (genvar q = 0; q < NG; q++) begin : g_group
    logic [4:1] h_int;
    rbnb_cla_gen u_gen (
      .g     (g_blk[4*q +: 4]),
      .t     (t_blk[4*q +: 4]),
      .h_in  (h_grp[q]),
      .h     (h_int),
      .g_grp (g_grp[q]),
      .t_grp (t_grp[q])
    );
    assign h_blk[4*q]       = h_grp[q];
    assign h_blk[4*q+1]     = h_int[1];
    assign h_blk[4*q+2]     = h_int[2];
    assign h_blk[4*q+3]     = h_int[3];
    assign h_grp[q+1]       = h_int[4];
  end
  assign h_blk[4*NG] = h_grp[NG];

  initial assert (W % 4 == 0) else $error("rbnb_converter: W must be a multiple of 4");

endmodule
