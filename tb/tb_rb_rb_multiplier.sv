// tb_rb_rb_multiplier: self-checking test of the RB x RB multiplier.
// Checks the small example [1 -1 0 1] x [-1 1 0 -1] = 5 x -5 = -25 (upper
// digits 0) and random 8-digit RB operands, whose product must be exact.
//
// Origin: the 5 x -5 example follows the original design's worked RB
// multiplication; the random checks are this testbench's own.
module tb_rb_rb_multiplier;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int N = 8, W = 24;
  rb_digit_t [N-1:0] x, y;
  rb_digit_t [W-1:0] p;
  rbw_t r;
  int checks = 0, failures = 0;

  rb_rb_multiplier #(.N(N), .W(W)) dut (.x(x), .y(y), .p(p));

  initial begin
    x = '{default: RB_ZERO}; y = '{default: RB_ZERO};
    x[3:0] = {RB_POS, RB_NEG, RB_ZERO, RB_POS};
    y[3:0] = {RB_NEG, RB_POS, RB_ZERO, RB_NEG};
    #1;
    checks++;
    if (rbv(p, W) != -25) begin failures++; $display("FAIL example: %0d", rbv(p, W)); end
    for (int t = 0; t < 5000; t++) begin
      r = rb_rand(); x = r[N-1:0];
      r = rb_rand(); y = r[N-1:0];
      #1;
      checks++;
      if (rbv(p, W) != rbv(x, N) * rbv(y, N)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d", rbv(x, N), rbv(y, N), rbv(p, W));
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
