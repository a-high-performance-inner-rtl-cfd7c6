// rb_adder_tree: balanced tree of redundant binary adders.
//
// Adds K W-digit RB operands. Level by level, operands are added in adjacent
// pairs (0+1, 2+3, ...); an odd operand left over at the end of a level passes to
// the next level unchanged. The tree depth is ceil(log2(K)), each level one RBA
// delay. The result is the sum modulo 2**W. Combinational.
//
// Origin: the original design sums partial products in an RB adder tree; the
// pairwise shape and operand-count bookkeeping here are this design's own.
module rb_adder_tree
  import rb_pkg::*;
#(
  parameter int unsigned K = 5,
  parameter int unsigned W = 24
) (
  input  rb_digit_t [K-1:0][W-1:0] ops,
  output rb_digit_t [W-1:0]        sum
);

  localparam int unsigned L = (K <= 1) ? 1 : $clog2(K);

  // Number of operands at tree level l (level 0 = inputs).
  function automatic int unsigned cnt(input int unsigned l);
    int unsigned n_op;
    n_op = K;
    for (int unsigned i = 0; i < l; i++) n_op = (n_op + 1) / 2;
    return n_op;
  endfunction

  rb_digit_t [L:0][K-1:0][W-1:0] lv;

  assign lv[0] = ops;

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    for (genvar k = 0; k < K; k++) begin : g_node
      if (k < cnt(l) && 2 * k + 1 < cnt(l - 1)) begin : g_add
        rb_adder #(.W(W)) u_rba (
          .x   (lv[l-1][2*k]),
          .y   (lv[l-1][2*k+1]),
          .cin (RB_ZERO),
          .z   (lv[l][k]),
          .cout()
        );
      end else if (k < cnt(l)) begin : g_pass
        assign lv[l][k] = lv[l-1][2*k];
      end else begin : g_unused
        assign lv[l][k] = '{default: RB_ZERO};
      end
    end
  end

  assign sum = lv[L][0];

endmodule
