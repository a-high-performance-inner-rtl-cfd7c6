// tb_rb_adder: self-checking test of the RB adder.
// Random W-digit operands and carry-in; checks x + y + cin = z + 2**W * cout
// exactly, plus directed cases (all -1 plus all -1, all +1 plus all +1).
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_rb_adder;
  import rb_pkg::*;
  import tb_rb_util::*;
  localparam int W = 24;
  rb_digit_t [W-1:0] x, y, z;
  rb_digit_t cin, cout;
  int checks = 0, failures = 0;
  rbw_t r;

  rb_adder #(.W(W)) dut (.x(x), .y(y), .cin(cin), .z(z), .cout(cout));

  task automatic check();
    longint exp, got;
    #1;
    exp = rbv(x, W) + rbv(y, W) + rb_val(cin);
    got = rbv(z, W) + (longint'(rb_val(cout)) <<< W);
    checks++;
    if (exp != got) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d cin=%0d: got %0d", rbv(x, W), rbv(y, W), rb_val(cin), got);
    end
  endtask

  initial begin
    x = '{default: RB_NEG}; y = '{default: RB_NEG}; cin = RB_NEG; check();
    x = '{default: RB_POS}; y = '{default: RB_POS}; cin = RB_POS; check();
    for (int t = 0; t < 5000; t++) begin
      r = rb_rand(); x = r[W-1:0]; r = rb_rand(); y = r[W-1:0];
      cin = rb_digit_t'($urandom_range(0, 3));
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
