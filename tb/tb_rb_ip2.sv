// tb_rb_ip2: self-checking test of the unified AB +- CD unit.
// Random operands in all four combinations of sign and real_img; checks the
// two RB products and the RB sum/difference against integer arithmetic.
// The 16-bit A0B0 +- A1B1 size of the FPGA comparisons is checked too, with the
// plain inline and with the Booth partial product generator.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_ip2;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int N = 8, W = 24;
  logic [N-1:0] a, b, c, d;
  logic sign, real_img;
  rb_digit_t [W-1:0] ab, cd, sum;
  localparam int N16 = 16, W16 = 36;
  logic [N16-1:0] a16, b16, c16, d16;
  rb_digit_t [W16-1:0] sum16, sum16b;
  int checks = 0, failures = 0;

  rb_ip2 #(.N(N), .W(W)) dut (.a(a), .b(b), .c(c), .d(d), .sign(sign), .real_img(real_img),
                              .ab(ab), .cd(cd), .sum(sum));

  rb_ip2 #(.N(N16), .W(W16)) dut16 (.a(a16), .b(b16), .c(c16), .d(d16), .sign(sign),
    .real_img(real_img), .ab(), .cd(), .sum(sum16));
  rb_ip2 #(.N(N16), .W(W16), .BOOTH(1'b1)) dut16b (.a(a16), .b(b16), .c(c16), .d(d16), .sign(sign),
    .real_img(real_img), .ab(), .cd(), .sum(sum16b));

  function automatic longint v16(input logic [N16-1:0] x);
    return sign ? longint'($signed(x)) : longint'(x);
  endfunction

  function automatic longint v(input logic [N-1:0] x);
    return sign ? longint'($signed(x)) : longint'(x);
  endfunction

  initial begin
    longint eab, ecd, es;
    for (int t = 0; t < 4000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom); d = N'($urandom);
      sign = t[0]; real_img = t[1];
      if (t < 4) begin a = 8'h80; b = 8'h80; c = 8'h80; d = 8'h7F; end
      #1;
      eab = v(a) * v(b); ecd = v(c) * v(d);
      es  = real_img ? eab - ecd : eab + ecd;
      checks += 3;
      if (rbv(ab, W) != eab || rbv(cd, W) != ecd || rbv(sum, W) != es) begin
        failures++;
        if (failures < 10) $display("FAIL %h %h %h %h sign=%b sub=%b: %0d %0d %0d", a, b, c, d, sign, real_img,
                                    rbv(ab, W), rbv(cd, W), rbv(sum, W));
      end
    end
    for (int t = 0; t < 4000; t++) begin
      a16 = N16'($urandom); b16 = N16'($urandom); c16 = N16'($urandom); d16 = N16'($urandom);
      sign = t[0]; real_img = t[1];
      if (t < 4) begin a16 = 16'h8000; b16 = 16'h8000; c16 = 16'h8000; d16 = 16'h7FFF; end
      #1;
      es = real_img ? v16(a16) * v16(b16) - v16(c16) * v16(d16) : v16(a16) * v16(b16) + v16(c16) * v16(d16);
      checks += 2;
      if (rbv(sum16, W16) != es || rbv(sum16b, W16) != es) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit %h %h %h %h sign=%b sub=%b: %0d %0d exp %0d", a16, b16, c16, d16,
                                    sign, real_img, rbv(sum16, W16), rbv(sum16b, W16), es);
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
