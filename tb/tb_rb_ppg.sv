// tb_rb_ppg: self-checking test of the inline RB partial product generator.
// For random and corner operands, signed and unsigned, checks that the N/2 RB
// partial products plus the correction word add up to A*B, and that each pair
// j equals PP(2j) + 2 PP(2j+1) (or its difference for the signed last pair)
// shifted by 2j, with the correction -2**(2j) for sum-mapped pairs.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_ppg;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int N = 8, W = 24;
  logic [N-1:0] a, b;
  logic sign;
  rb_digit_t [N/2-1:0][W-1:0] pp;
  rb_digit_t [W-1:0] corr;
  int checks = 0, failures = 0;

  rb_ppg #(.N(N), .W(W)) dut (.a(a), .b(b), .sign(sign), .pp(pp), .corr(corr));

  task automatic check();
    longint av, bv, tot, exp_pair, got_pair;
    #1;
    av = sign ? longint'($signed(a)) : longint'(a);
    tot = rbv(corr, W);
    for (int j = 0; j < N/2; j++) begin
      got_pair = rbv(pp[j], W);
      tot += got_pair;
      exp_pair = av * b[2*j] * (longint'(1) <<< (2*j));
      if (sign && j == N/2 - 1) exp_pair -= av * b[2*j+1] * (longint'(1) <<< (2*j+1));
      else begin
        exp_pair += av * b[2*j+1] * (longint'(1) <<< (2*j+1));
        exp_pair += (longint'(1) <<< (2*j));      // the +1 of the sum mapping
      end
      checks++;
      if (got_pair != exp_pair) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d a=%h b=%h sign=%b got %0d exp %0d", j, a, b, sign, got_pair, exp_pair);
      end
    end
    bv = sign ? longint'($signed(b)) : longint'(b);
    checks++;
    if (tot != av * bv) begin
      failures++;
      if (failures < 10) $display("FAIL total a=%h b=%h sign=%b got %0d exp %0d", a, b, sign, tot, av * bv);
    end
  endtask

  initial begin
    for (int s = 0; s < 2; s++) begin
      sign = s[0];
      a = 8'h80; b = 8'h80; check();
      a = 8'hFF; b = 8'hFF; check();
      a = 8'h7F; b = 8'h80; check();
      a = 8'h00; b = 8'hFF; check();
    end
    for (int t = 0; t < 3000; t++) begin
      a = N'($urandom); b = N'($urandom); sign = 1'($urandom);
      check();
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
