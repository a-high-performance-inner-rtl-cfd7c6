// tb_rbnb_cla_gen: exhaustive self-checking test of the lookahead generator.
// For all block generate/transfer patterns and carry-in, compares the parallel
// carries with the ripple recurrence h(k+1) = g(k) | t(k) h(k), and the group
// signals with h(4) = g_grp | t_grp h_in.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rbnb_cla_gen;
  logic [3:0] g, t;
  logic h_in, g_grp, t_grp;
  logic [4:1] h;
  int checks = 0, failures = 0;

  rbnb_cla_gen dut (.g(g), .t(t), .h_in(h_in), .h(h), .g_grp(g_grp), .t_grp(t_grp));

  initial begin
    logic [4:0] r;
    for (int v = 0; v < 512; v++) begin
      g = v[3:0]; t = v[7:4]; h_in = v[8];
      #1;
      r[0] = h_in;
      for (int k = 0; k < 4; k++) r[k+1] = g[k] | (t[k] & r[k]);
      checks += 2;
      if (h != r[4:1]) failures++;
      if (r[4] != (g_grp | (t_grp & h_in))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
