// tb_rbnb_ling4: exhaustive self-checking test of the 4-digit converter slice.
// For all 256 digit patterns and all t_m1/h_in values, compares the sum bits
// with the ripple conversion rule (carry c(i+1) = g(i) | c(i) t(i), c(0) =
// h_in t_m1, s(i) = ~(c(i) ^ x.m ^ x.p)), the Ling carry out with c(4) | c(3),
// and the block signals with h_out = g_blk | t_blk h_in. With h_in = 0 the bits
// must also be the 2's-complement value of the digits modulo 16.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rbnb_ling4;
  import rb_pkg::*;
  import tb_rb_util::*;
  rb_digit_t [3:0] x;
  logic t_m1, h_in, h_out, g_blk, t_blk, t3;
  logic [3:0] s;
  int checks = 0, failures = 0;

  rbnb_ling4 dut (.x(x), .t_m1(t_m1), .h_in(h_in), .s(s), .h_out(h_out), .g_blk(g_blk), .t_blk(t_blk), .t3(t3));

  initial begin
    logic [4:0] c;
    logic [3:0] es;
    for (int v = 0; v < 1024; v++) begin
      x = 8'(v); t_m1 = v[8]; h_in = v[9];
      #1;
      c[0] = h_in & t_m1;
      for (int i = 0; i < 4; i++) begin
        c[i+1] = ~(x[i].m | x[i].p) | (c[i] & ~(x[i].m & x[i].p));
        es[i]  = ~(c[i] ^ x[i].m ^ x[i].p);
      end
      checks += 4;
      if (s != es) failures++;
      if (h_out != (c[4] | c[3])) failures++;
      if (h_out != (g_blk | (t_blk & h_in))) failures++;
      if (!h_in && s != 4'(rbv(x, 4))) begin
        failures++;
        if (failures < 10) $display("FAIL value %0d -> %b", rbv(x, 4), s);
      end
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
