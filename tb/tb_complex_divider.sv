// tb_complex_divider: self-checking test of the complex divider.
// Random signed 8-bit A, B, C, D plus corner cases. For each division the model
// forms AC + BD, BC - AD and C^2 + D^2 exactly, normalizes their magnitudes to
// 8-bit fractions itself, and checks the sign and exponent outputs exactly and
// each quotient mantissa to within one unit (2**-8) of the truncated value of
// (numerator fraction) / (denominator fraction). It also checks div_zero for C = D = 0 and that done
// comes 5 clocks after the start edge.
//
// Origin: the 4 Goldschmidt iterations for 8-bit operands follow the original
// design; stimulus and checks are this testbench's own.
module tb_complex_divider;
  localparam int N = 8, WR = 2 * N + 4, LAT = 5;
  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] a, b, c, d;
  logic busy, done, neg_re, neg_im, div_zero;
  logic [N+1:0] q_re, q_im;
  logic signed [$clog2(WR):0] exp_re, exp_im;
  int checks = 0, failures = 0;

  complex_divider #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b), .c(c), .d(d),
    .busy(busy), .done(done), .q_re(q_re), .q_im(q_im), .neg_re(neg_re), .neg_im(neg_im),
    .exp_re(exp_re), .exp_im(exp_im), .div_zero(div_zero));

  always #5 clk = ~clk;

  task automatic norm(input longint v, output int sh, output longint fr);
    sh = 0;
    if (v != 0) while (((v <<< sh) & (longint'(1) <<< (WR - 1))) == 0) sh++;
    fr = ((v <<< sh) & ((longint'(1) <<< WR) - 1)) >>> (WR - N);
  endtask

  task automatic check_part(input string nm, input longint num, input longint den,
                            input logic neg, input int ex, input longint q);
    int shn, shd;
    longint fn, fd, mag, err;
    mag = (num < 0) ? -num : num;
    norm(mag, shn, fn);
    norm(den, shd, fd);
    checks++;
    if (neg != (num < 0) || ex != ((num == 0) ? 0 : shd - shn)) begin
      failures++;
      if (failures < 10) $display("FAIL %s sign/exp: num=%0d den=%0d got neg=%b exp=%0d", nm, num, den, neg, ex);
    end
    // q may differ from the truncated exact quotient floor(fn * 2**N / fd) by one
    err = q - (fn <<< N) / fd;
    if (err < 0) err = -err;
    checks++;
    if (err > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %s mantissa: num=%0d den=%0d q=%0d fn=%0d fd=%0d", nm, num, den, q, fn, fd);
    end
  endtask

  task automatic run(input logic [N-1:0] ta, tb, tc, td);
    longint av, bv, cv, dv, re, im, den;
    int cyc;
    @(negedge clk);
    a = ta; b = tb; c = tc; d = td; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
    // cyc counts falling edges from the one after the start edge, so done seen
    // after rising edge start+LAT gives cyc = LAT + 1
    checks++;
    if (cyc - 1 != LAT) begin failures++; $display("FAIL latency %0d", cyc - 1); end
    av = longint'($signed(ta)); bv = longint'($signed(tb));
    cv = longint'($signed(tc)); dv = longint'($signed(td));
    re = av * cv + bv * dv;  im = bv * cv - av * dv;  den = cv * cv + dv * dv;
    checks++;
    if (div_zero != (den == 0)) begin failures++; $display("FAIL div_zero"); end
    if (den != 0) begin
      check_part("re", re, den, neg_re, int'(exp_re), longint'(q_re));
      check_part("im", im, den, neg_im, int'(exp_im), longint'(q_im));
    end
    @(negedge clk);
  endtask

  initial begin
    a = '0; b = '0; c = '0; d = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8'd3, 8'd4, 8'd1, 8'd2);        // (3+4j)/(1+2j) = 2.2 - 0.4j
    run(8'h80, 8'h80, 8'h80, 8'h80);    // extreme values
    run(8'h7F, 8'h80, 8'h01, 8'h00);
    run(8'd5, 8'd0, 8'd0, 8'd0);        // division by zero
    run(8'd0, 8'd0, 8'd7, 8'hF9);      // zero dividend
    for (int t = 0; t < 3000; t++) run(N'($urandom), N'($urandom), N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
