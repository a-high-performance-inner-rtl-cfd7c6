// tb_normalizer: self-checking test of the leading-zero normalizer.
// Exhaustive for a 12-bit input and random for the 20-bit default: the shift
// count must put the leading one on the top bit, the fraction must be the top
// bits after the shift, and zero must flag x = 0.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
module tb_normalizer;
  localparam int WI = 20, WO = 8, WS = 12;
  logic [WI-1:0] x;
  logic [WO-1:0] f;
  logic [$clog2(WI)-1:0] lz;
  logic zero;
  logic [WS-1:0] xs;
  logic [WO-1:0] fs;
  logic [$clog2(WS)-1:0] lzs;
  logic zeros;
  int checks = 0, failures = 0;

  normalizer #(.WI(WI), .WO(WO)) dut (.x(x), .f(f), .lz(lz), .zero(zero));
  normalizer #(.WI(WS), .WO(WO)) dut12 (.x(xs), .f(fs), .lz(lzs), .zero(zeros));

  // expected shift and fraction of v in a w-bit field
  task automatic expect_norm(input longint v, input int w, output int sh, output longint fr);
    sh = 0;
    if (v != 0) while (((v <<< sh) & (longint'(1) <<< (w - 1))) == 0) sh++;
    fr = ((v <<< sh) & ((longint'(1) <<< w) - 1)) >>> (w - WO);
  endtask

  initial begin
    int sh;
    longint fr;
    for (int i = 0; i < (1 << WS); i++) begin
      xs = WS'(i);
      #1;
      expect_norm(i, WS, sh, fr);
      checks++;
      if (int'(lzs) != sh || longint'(fs) != fr || zeros != (i == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h lz=%0d f=%h zero=%b exp %0d %h", xs, lzs, fs, zeros, sh, fr);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      x = WI'($urandom) >> ($urandom % WI);
      #1;
      expect_norm(longint'(x), WI, sh, fr);
      checks++;
      if (int'(lz) != sh || longint'(f) != fr || zero != (x == 0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h lz=%0d f=%h zero=%b exp %0d %h", x, lz, f, zero, sh, fr);
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
