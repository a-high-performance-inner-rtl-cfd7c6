// tb_rb_two_minus: self-checking test of the 2 - A unit.
// With 2 integer and 10 fractional digits, random RB operands must give an RB
// result whose value is 2 - A modulo 4 (the integer part is two digits wide),
// and operands in [0.5, 1] must give exactly 2 - A or 2 - A - 4 (wrapped).
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_two_minus;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int W = 12, FRAC = 10;
  rb_digit_t [W-1:0] a, y;
  rbw_t r;
  int checks = 0, failures = 0;

  rb_two_minus #(.W(W), .FRAC(FRAC)) dut (.a(a), .y(y));

  initial begin
    longint two, ev;
    two = longint'(2) <<< FRAC;
    for (int t = 0; t < 5000; t++) begin
      if (t % 2 == 0) begin r = rb_rand(); a = r[W-1:0]; end
      else begin r = rb_of(longint'($urandom_range(512, 1024))); a = r[W-1:0]; end
      #1;
      ev = two - rbv(a, W);
      checks++;
      if (wrap(rbv(y, W), W) != wrap(ev, W)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d y=%0d", rbv(a, W), rbv(y, W));
      end
      if (t % 2 == 1) begin
        checks++;
        if (rbv(y, W) != ev && rbv(y, W) != ev - (longint'(4) <<< FRAC)) failures++;
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
