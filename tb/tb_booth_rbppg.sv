// tb_booth_rbppg: self-checking test of the modified-Booth RB partial product
// generator. Exhaustive over all 8-bit operand pairs, signed and unsigned:
// each pair p must equal (C(2p) + 4 C(2p+1) + 1) * 16**p, where C(k) = Q(k)*A -
// g(k) is worked out here from the Booth table, and the partial products plus
// the correction word must add up to A*B. A 16-bit instance is checked on
// random operands (total only).
//
// Origin: the Booth table and the pair/correction structure follow the original
// design; stimulus and checks are this testbench's own, with expected values
// from integer arithmetic.
module tb_booth_rbppg;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int N = 8, W = 24, N2 = 16, W2 = 32;
  logic [N-1:0] a, b;
  logic [N2-1:0] a2, b2;
  logic sign;
  rb_digit_t [N/4-1:0][W-1:0] pp;
  rb_digit_t [W-1:0] corr;
  rb_digit_t [N2/4-1:0][W2-1:0] pp2;
  rb_digit_t [W2-1:0] corr2;
  int checks = 0, failures = 0;

  booth_rbppg #(.N(N), .W(W)) dut (.a(a), .b(b), .sign(sign), .pp(pp), .corr(corr));
  booth_rbppg #(.N(N2), .W(W2)) dut16 (.a(a2), .b(b2), .sign(sign), .pp(pp2), .corr(corr2));

  // Booth digit k of the N-bit word b read as signed, and its "inverted" flag.
  function automatic int qdig(input logic [N-1:0] bw, input int k);
    int bm1, b0, b1;
    bm1 = (k == 0) ? 0 : int'(bw[2*k-1]);
    b0  = int'(bw[2*k]);
    b1  = int'(bw[2*k+1]);
    return -2 * b1 + b0 + bm1;
  endfunction

  task automatic check();
    longint av, bv, tot, exp_pair, ck[N/2];
    int q;
    #1;
    av = sign ? longint'($signed(a)) : longint'(a);
    bv = sign ? longint'($signed(b)) : longint'(b);
    for (int k = 0; k < N/2; k++) begin
      q = qdig(b, k);
      // negative digits (and the 1-1-1 zero is not one) select ~(|Q| A) = Q A - 1
      ck[k] = (q < 0) ? longint'(q) * av - 1 : longint'(q) * av;
    end
    tot = rbv(corr, W);
    for (int p = 0; p < N/4; p++) begin
      exp_pair = (ck[2*p] + 4 * ck[2*p+1] + 1) * (longint'(1) <<< (4*p));
      tot += rbv(pp[p], W);
      checks++;
      if (rbv(pp[p], W) != exp_pair) begin
        failures++;
        if (failures < 10) $display("FAIL pair %0d a=%h b=%h sign=%b got %0d exp %0d", p, a, b, sign, rbv(pp[p], W), exp_pair);
      end
    end
    checks++;
    if (tot != av * bv) begin
      failures++;
      if (failures < 10) $display("FAIL total a=%h b=%h sign=%b got %0d exp %0d", a, b, sign, tot, av * bv);
    end
  endtask

  initial begin
    longint av, bv, tot;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 256; i++)
        for (int k = 0; k < 256; k++) begin
          sign = s[0]; a = N'(i); b = N'(k);
          check();
        end
    for (int t = 0; t < 4000; t++) begin
      a2 = N2'($urandom); b2 = N2'($urandom); sign = 1'($urandom);
      if (t < 4) begin a2 = (t % 2 == 0) ? 16'h8000 : 16'hFFFF; b2 = a2; sign = t[1]; end
      #1;
      av = sign ? longint'($signed(a2)) : longint'(a2);
      bv = sign ? longint'($signed(b2)) : longint'(b2);
      tot = rbv(corr2, W2);
      for (int p = 0; p < N2/4; p++) tot += rbv(pp2[p], W2);
      checks++;
      if (tot != av * bv) begin
        failures++;
        if (failures < 10) $display("FAIL 16-bit a=%h b=%h sign=%b got %0d exp %0d", a2, b2, sign, tot, av * bv);
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
