// tb_rb_accumulator: self-checking test of one RB accumulator segment.
// Runs random sequences of load, accumulate and hold cycles against an integer
// model kept modulo 2**W, checking the segment value after every clock edge.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_accumulator;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int W = 24;
  logic clk = 0, rst_n = 0, en = 0, accumulate = 0;
  rb_digit_t [W-1:0] x, acc;
  rbw_t r;
  longint model = 0;
  int checks = 0, failures = 0;

  rb_accumulator #(.W(W)) dut (.clk(clk), .rst_n(rst_n), .en(en), .accumulate(accumulate), .x(x), .acc(acc));

  always #5 clk = ~clk;

  initial begin
    x = '{default: RB_ZERO};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (rbv(acc, W) != 0) failures++;
    for (int t = 0; t < 3000; t++) begin
      r = rb_of(longint'($signed(18'($urandom))));
      x = r[W-1:0];
      en = ($urandom_range(0, 3) != 0);
      accumulate = (t % 50 != 0);
      @(posedge clk);
      if (en) model = accumulate ? wrap(model + rbv(x, W), W) : rbv(x, W);
      #1;
      checks++;
      if (wrap(rbv(acc, W), W) != model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %0d exp %0d", t, wrap(rbv(acc, W), W), model);
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
