// tb_rb_ip_processor: end-to-end test of the whole processor at its default
// size (8 elements, 8-bit operands, 24-digit accumulators, 8-bit divider).
//
// The inner-product side runs long streams of operand sets with idle cycles in
// every documented mode: an 8-element real inner product, dual 4-element and
// quad 2-element inner products, eight parallel multipliers, a complex
// 2-element inner product with real/imaginary segments, two parallel complex
// multipliers, a 2-element RB inner product and two parallel RB multipliers;
// signed and unsigned; accumulation runs started by a load. Every segment is
// compared after every update with an integer model, and each result must
// appear two clocks after its operands. Meanwhile the divider divides random
// normalised pairs and must finish in log2(8) + 1 = 4 clocks within one unit in
// the last place, and the complex divider divides random complex pairs (some by
// zero), checked in sign, exponent and mantissa, with done 5 clocks after start.
// The test counts how often each mechanism happened and fails
// for any that never did.
//
// Origin: the modes exercised are those of the original design; the random
// mix and the event counters are this testbench's own.
module tb_rb_ip_processor;
  import rb_pkg::*;
  import tb_rb_util::*;
  import tb_ip_model::*;
  localparam int ACC_W = 24;
  logic clk = 0, rst_n = 0;
  logic ip_in_valid = 0, ip_sign = 0, ip_accumulate = 0, ip_out_valid;
  fmt_e ip_fmt = FMT_REAL;
  split_e ip_split = SPLIT_ONE;
  lanes_t ip_a = '0, ip_b = '0;
  rb_digit_t [7:0][ACC_W-1:0] ip_acc_rb;
  logic [7:0][ACC_W-1:0] ip_result;
  logic div_start = 0, div_busy, div_done;
  logic [7:0] div_z = 8'h80, div_d = 8'h80;
  logic [9:0] div_q;
  logic cdiv_start = 0, cdiv_busy, cdiv_done, cdiv_neg_re, cdiv_neg_im, cdiv_div_zero;
  logic [7:0] cdiv_a = '0, cdiv_b = '0, cdiv_c = '0, cdiv_d = '0;
  logic [9:0] cdiv_q_re, cdiv_q_im;
  logic signed [4:0] cdiv_exp_re, cdiv_exp_im;
  logic cdiv_finished = 0;
  int checks = 0, failures = 0, cycle = 0;

  // mechanism counters
  int n_mode[3][4];
  int n_load = 0, n_accum = 0, n_signed = 0, n_unsigned = 0, n_idle = 0, n_div = 0, n_wrap = 0,
      n_cdiv = 0, n_cdiv_zero = 0, n_cdiv_neg = 0;

  typedef struct { seg_t seg; logic [7:0] en; logic acc; int t; } op_t;
  op_t q[$];
  longint model[8];

  rb_ip_processor dut (
    .clk(clk), .rst_n(rst_n),
    .ip_in_valid(ip_in_valid), .ip_fmt(ip_fmt), .ip_split(ip_split), .ip_sign(ip_sign),
    .ip_accumulate(ip_accumulate), .ip_a(ip_a), .ip_b(ip_b), .ip_out_valid(ip_out_valid),
    .ip_acc_rb(ip_acc_rb), .ip_result(ip_result),
    .div_start(div_start), .div_z(div_z), .div_d(div_d), .div_busy(div_busy), .div_done(div_done), .div_q(div_q),
    .cdiv_start(cdiv_start), .cdiv_a(cdiv_a), .cdiv_b(cdiv_b), .cdiv_c(cdiv_c), .cdiv_d(cdiv_d),
    .cdiv_busy(cdiv_busy), .cdiv_done(cdiv_done), .cdiv_q_re(cdiv_q_re), .cdiv_q_im(cdiv_q_im),
    .cdiv_neg_re(cdiv_neg_re), .cdiv_neg_im(cdiv_neg_im), .cdiv_exp_re(cdiv_exp_re),
    .cdiv_exp_im(cdiv_exp_im), .cdiv_div_zero(cdiv_div_zero)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    #2;
    if (rst_n && ip_out_valid) begin
      op_t o;
      longint raw;
      if (q.size() == 0) begin failures++; $display("FAIL out_valid with no operation"); end
      else begin
        o = q.pop_front();
        checks++;
        if (cycle - o.t != 2) begin failures++; $display("FAIL latency %0d", cycle - o.t); end
        for (int k = 0; k < 8; k++)
          if (o.en[k]) begin
            raw = o.acc ? model[k] + o.seg[k] : o.seg[k];
            if (raw != wrap(raw, ACC_W)) n_wrap++;
            model[k] = wrap(raw, ACC_W);
          end
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (longint'($signed(ip_result[k])) != model[k]) begin
            failures++;
            if (failures < 10) $display("FAIL seg %0d got %0d exp %0d", k, $signed(ip_result[k]), model[k]);
          end
        end
      end
    end
  end

  // inner-product stream
  initial begin
    op_t o;
    int run;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run = 0;
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      ip_in_valid = ($urandom_range(0, 5) != 0);
      if (!ip_in_valid) n_idle++;
      else begin
        if (run == 0) begin
          pick_mode(ip_fmt, ip_split);
          ip_sign = 1'($urandom);
          // long runs now and then, so the 24-digit accumulators wrap around
          run = ($urandom_range(0, 9) == 0) ? 600 : $urandom_range(1, 8);
          ip_accumulate = 0;
          n_load++;
        end else begin
          ip_accumulate = 1;
          n_accum++;
        end
        run--;
        n_mode[int'(ip_fmt)][int'(ip_split)]++;
        if (ip_sign) n_signed++; else n_unsigned++;
        for (int k = 0; k < 8; k++) begin
          ip_a[k] = 8'($urandom); ip_b[k] = 8'($urandom);
          if (run > 100) begin ip_a[k] = 8'h80; ip_b[k] = 8'h80; end   // large same-sign products
        end
        seg_inputs(ip_fmt, ip_split, ip_sign, ip_a, ip_b, o.seg, o.en);
        o.acc = ip_accumulate;
        o.t = cycle;
        q.push_back(o);
      end
    end
    @(negedge clk) ip_in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d operations never completed", q.size()); end
    wait (!div_busy && cdiv_finished);
    report();
  end

  // divider stream, concurrent with the inner products
  initial begin
    int zi, di, cyc, err;
    real qr;
    @(posedge rst_n);
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      zi = $urandom_range(128, 255); di = $urandom_range(128, 255);
      div_z = 8'(zi); div_d = 8'(di); div_start = 1;
      @(negedge clk) div_start = 0;
      cyc = 1;
      while (!div_done && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      // cyc counts falling edges from the one before the start edge: done must
      // follow the 4th rising edge after the start edge
      if (cyc - 1 != 4) begin failures++; $display("FAIL divider latency %0d", cyc - 1); end
      qr = real'(zi) / real'(di) * 256.0;
      err = int'(div_q) - int'($floor(qr));
      checks++;
      if (err > 1 || err < -1) begin
        failures++;
        if (failures < 10) $display("FAIL %0d/%0d q=%0d", zi, di, div_q);
      end
      n_div++;
    end
  end

  // complex division stream: normalize the exact numerators and denominator
  // here and check sign, exponent and mantissa (within one unit of the
  // truncated quotient of the normalized fractions), and the latency of 5 clocks
  task automatic cnorm(input longint v, output int sh, output longint fr);
    sh = 0;
    if (v != 0) while (((v <<< sh) & (longint'(1) <<< 19)) == 0) sh++;
    fr = ((v <<< sh) & ((longint'(1) <<< 20) - 1)) >>> 12;
  endtask

  task automatic cpart(input longint num, input longint den, input logic neg, input int ex, input longint qm);
    int shn, shd;
    longint fn, fd, err;
    cnorm((num < 0) ? -num : num, shn, fn);
    cnorm(den, shd, fd);
    err = qm - (fn <<< 8) / fd;
    checks += 2;
    if (neg != (num < 0) || ex != ((num == 0) ? 0 : shd - shn)) begin
      failures++;
      if (failures < 10) $display("FAIL complex sign/exp num=%0d den=%0d", num, den);
    end
    if (err > 1 || err < -1) begin
      failures++;
      if (failures < 10) $display("FAIL complex mantissa num=%0d den=%0d q=%0d", num, den, qm);
    end
  endtask

  initial begin
    longint av, bv, cv, dv, re, im, den;
    int cyc;
    @(posedge rst_n);
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      cdiv_a = 8'($urandom); cdiv_b = 8'($urandom); cdiv_c = 8'($urandom); cdiv_d = 8'($urandom);
      if (t % 100 == 7) begin cdiv_c = '0; cdiv_d = '0; end     // division by zero
      cdiv_start = 1;
      @(negedge clk) cdiv_start = 0;
      cyc = 1;
      while (!cdiv_done && cyc < 20) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc - 1 != 5) begin failures++; $display("FAIL complex divider latency %0d", cyc - 1); end
      av = longint'($signed(cdiv_a)); bv = longint'($signed(cdiv_b));
      cv = longint'($signed(cdiv_c)); dv = longint'($signed(cdiv_d));
      re = av * cv + bv * dv;  im = bv * cv - av * dv;  den = cv * cv + dv * dv;
      checks++;
      if (cdiv_div_zero != (den == 0)) begin failures++; $display("FAIL complex div_zero"); end
      if (den == 0) n_cdiv_zero++;
      else begin
        cpart(re, den, cdiv_neg_re, int'(cdiv_exp_re), longint'(cdiv_q_re));
        cpart(im, den, cdiv_neg_im, int'(cdiv_exp_im), longint'(cdiv_q_im));
        if (re < 0 || im < 0) n_cdiv_neg++;
      end
      n_cdiv++;
    end
    cdiv_finished = 1;
  end

  task automatic report();
    string names[3] = '{"real", "complex", "rb"};
    for (int f = 0; f < 3; f++)
      for (int s = 0; s < 4; s++) begin
        if (f == 1 && (s == 0 || s == 3)) continue;
        if (f == 2 && s >= 2) continue;
        $display("mode %s split %0d: %0d operand sets", names[f], s, n_mode[f][s]);
        checks++;
        if (n_mode[f][s] == 0) failures++;
      end
    $display("loads %0d accumulates %0d signed %0d unsigned %0d idle %0d divisions %0d wraps %0d",
             n_load, n_accum, n_signed, n_unsigned, n_idle, n_div, n_wrap);
    $display("complex divisions %0d (by zero %0d, with a negative part %0d)", n_cdiv, n_cdiv_zero, n_cdiv_neg);
    checks += 10;
    if (n_cdiv == 0) failures++;
    if (n_cdiv_zero == 0) failures++;
    if (n_cdiv_neg == 0) failures++;
    if (n_load == 0) failures++;
    if (n_accum == 0) failures++;
    if (n_signed == 0) failures++;
    if (n_unsigned == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_div == 0) failures++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
