// tb_rb_ip_core: self-checking test of the reconfigurable inner-product core.
// Ends with two 100-element signed inner products run as 13 accumulating
// passes, one of them all (-128) x (-128), which must come out exact.
// Issues random operand sets (with idle cycles) in every documented mode
// combination, with runs of accumulation started by a load, and checks after
// every update all eight converted segments against an integer model kept
// modulo 2**ACC_W. Also checks the pipeline: each operand set must show up in
// the segments exactly two clock edges after it was presented.
//
// Origin: the modes exercised are those of the original design; the random
// mix is this testbench's own.
module tb_rb_ip_core;
  import rb_pkg::*;
  import tb_rb_util::*;
  import tb_ip_model::*;
  localparam int ACC_W = 24;
  logic clk = 0, rst_n = 0, in_valid = 0, sign = 0, accumulate = 0, out_valid;
  fmt_e fmt = FMT_REAL;
  split_e split = SPLIT_ONE;
  lanes_t a = '0, b = '0;
  rb_digit_t [7:0][ACC_W-1:0] acc_rb;
  logic [7:0][ACC_W-1:0] result;
  int checks = 0, failures = 0, cycle = 0;

  typedef struct { seg_t seg; logic [7:0] en; logic acc; int t; } op_t;
  op_t q[$];
  longint model[8];

  rb_ip_core dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .fmt(fmt), .split(split), .sign(sign),
                  .accumulate(accumulate), .a(a), .b(b), .out_valid(out_valid), .acc_rb(acc_rb), .result(result));

  always #5 clk = ~clk;

  always @(posedge clk) cycle <= cycle + 1;

  // compare after each edge
  always @(posedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      op_t o;
      if (q.size() == 0) begin failures++; $display("FAIL out_valid with no operation"); end
      else begin
        o = q.pop_front();
        checks++;
        if (cycle - o.t != 2) begin failures++; $display("FAIL latency %0d", cycle - o.t); end
        for (int k = 0; k < 8; k++)
          if (o.en[k]) model[k] = o.acc ? wrap(model[k] + o.seg[k], ACC_W) : wrap(o.seg[k], ACC_W);
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (longint'($signed(result[k])) != model[k]) begin
            failures++;
            if (failures < 10) $display("FAIL seg %0d got %0d exp %0d", k, $signed(result[k]), model[k]);
          end
        end
      end
    end
  end

  initial begin
    op_t o;
    int run;
    foreach (model[k]) model[k] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        if (run == 0) begin
          pick_mode(fmt, split);
          sign = 1'($urandom);
          run = $urandom_range(1, 6);
          accumulate = 0;
        end else accumulate = 1;
        run--;
        for (int k = 0; k < 8; k++) begin a[k] = 8'($urandom); b[k] = 8'($urandom); end
        seg_inputs(fmt, split, sign, a, b, o.seg, o.en);
        o.acc = accumulate;
        o.t = cycle;
        q.push_back(o);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (4) @(posedge clk);
    // 100-element inner products (13 passes of 8 lanes, the last padded with
    // zeros), one random and one of the largest products, signed: the segment
    // must hold the exact, unwrapped sum
    for (int v = 0; v < 2; v++) begin
      longint exact;
      exact = 0;
      for (int p = 0; p < 13; p++) begin
        @(negedge clk);
        in_valid = 1; fmt = FMT_REAL; split = SPLIT_ONE; sign = 1; accumulate = (p != 0);
        for (int k = 0; k < 8; k++) begin
          if (8 * p + k < 100) begin
            a[k] = (v == 0) ? 8'($urandom) : 8'h80;
            b[k] = (v == 0) ? 8'($urandom) : 8'h80;
          end else begin a[k] = '0; b[k] = '0; end
          exact += longint'($signed(a[k])) * longint'($signed(b[k]));
        end
        seg_inputs(fmt, split, sign, a, b, o.seg, o.en);
        o.acc = accumulate;
        o.t = cycle;
        q.push_back(o);
      end
      @(negedge clk) in_valid = 0;
      repeat (3) @(posedge clk);
      #3;
      checks++;
      if (longint'($signed(result[0])) != exact) begin
        failures++;
        $display("FAIL 100-element inner product: got %0d exp %0d", $signed(result[0]), exact);
      end
    end
    repeat (2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d operations never completed", q.size()); end
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
