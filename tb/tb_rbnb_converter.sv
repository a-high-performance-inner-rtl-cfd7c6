// tb_rbnb_converter: self-checking test of the RB to 2's-complement converter.
// A 12-digit instance converts the worked example
//   [-1 1 0 -1 0 -1 1 0 -1 0 0 0] = -1320 -> 1010 1101 1000
// and a 24-digit instance (three-level chain of a full and a partial
// lookahead group) converts random RB words, checked modulo 2**24.
//
// Origin: the -1320 example is the original design's worked conversion
// example; the random checks are this testbench's own.
module tb_rbnb_converter;
  import rb_pkg::*;
  import tb_rb_util::*;
  rb_digit_t [11:0] x12;
  logic [11:0] s12;
  rb_digit_t [23:0] x24;
  logic [23:0] s24;
  rbw_t r;
  int checks = 0, failures = 0;

  rbnb_converter #(.W(12)) dut12 (.x(x12), .s(s12));
  rbnb_converter            dut24 (.x(x24), .s(s24));

  initial begin
    int ex[12] = '{-1, 1, 0, -1, 0, -1, 1, 0, -1, 0, 0, 0};   // most significant first
    for (int i = 0; i < 12; i++)
      x12[11-i] = (ex[i] == 1) ? RB_POS : (ex[i] == -1) ? RB_NEG : RB_ZERO;
    #1;
    checks++;
    if (rbv(x12, 12) != -1320 || s12 != 12'hAD8) begin
      failures++;
      $display("FAIL example: %b", s12);
    end
    for (int t = 0; t < 5000; t++) begin
      r = rb_rand(); x24 = r[23:0];
      r = rb_rand(); x12 = r[11:0];
      #1;
      checks += 2;
      if (s24 != 24'(rbv(x24, 24))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %h", rbv(x24, 24), s24);
      end
      if (s12 != 12'(rbv(x12, 12))) failures++;
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
