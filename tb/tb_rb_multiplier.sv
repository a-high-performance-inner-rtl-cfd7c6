// tb_rb_multiplier: self-checking test of the signed/unsigned RB multiplier.
// Exhaustive over all 8-bit operand pairs in both modes: the RB product must
// equal A*B (2's-complement operands for sign = 1, unsigned for sign = 0).
// Both partial product generators are checked: the plain inline one and the
// modified-Booth one (BOOTH = 1).
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_multiplier;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int N = 8, W = 24;
  logic [N-1:0] a, b;
  logic sign;
  rb_digit_t [W-1:0] p, pb;
  int checks = 0, failures = 0;

  rb_multiplier #(.N(N), .W(W)) dut (.a(a), .b(b), .sign(sign), .p(p));
  rb_multiplier #(.N(N), .W(W), .BOOTH(1'b1)) dut_booth (.a(a), .b(b), .sign(sign), .p(pb));

  initial begin
    longint exp;
    for (int s = 0; s < 2; s++) begin
      for (int i = 0; i < 256; i++) begin
        for (int k = 0; k < 256; k++) begin
          sign = s[0]; a = N'(i); b = N'(k);
          #1;
          exp = sign ? longint'($signed(a)) * longint'($signed(b)) : longint'(a) * longint'(b);
          checks++;
          if (rbv(p, W) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h sign=%b got %0d exp %0d", a, b, sign, rbv(p, W), exp);
          end
          checks++;
          if (rbv(pb, W) != exp) begin
            failures++;
            if (failures < 10) $display("FAIL booth a=%h b=%h sign=%b got %0d exp %0d", a, b, sign, rbv(pb, W), exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
