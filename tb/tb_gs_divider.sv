// tb_gs_divider: self-checking test of the Goldschmidt divider.
// Divides all normalised 8-bit pairs z, d in [0.5, 1) on a sparse grid plus
// random pairs. The quotient q (2 integer, 8 fractional bits) must be within
// one unit in the last place of z/d, and `done` must rise exactly ITER = 4
// clocks after the start edge, with busy high in between.
//
// Origin: the 4-clock latency for 8-bit operands and the 2**-N accuracy are
// the original design's figures; the operand sweep is this testbench's own.
module tb_gs_divider;
  localparam int N = 8, ITER = 4;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [N-1:0] z, d;
  logic [N+1:0] q;
  int checks = 0, failures = 0, worst = 0;

  gs_divider #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .start(start), .z(z), .d(d), .busy(busy), .done(done), .q(q));

  always #5 clk = ~clk;

  task automatic divide(input int zi, input int di);
    int cyc, exact_q, err;
    real qr;
    z = N'(zi); d = N'(di);
    start = 1;
    @(posedge clk); #1;
    start = 0;
    cyc = 0;
    while (!done && cyc < 20) begin
      checks++;
      if (!busy) failures++;
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != ITER) begin
      failures++;
      $display("FAIL latency %0d cycles", cyc);
    end
    qr = (real'(zi) / real'(di)) * 256.0;
    exact_q = int'($floor(qr));
    err = int'(q) - exact_q;
    if (err < 0) err = -err;
    if (err > worst) worst = err;
    checks++;
    if (err > 1) begin
      failures++;
      if (failures < 10) $display("FAIL %0d/%0d: q=%0d exact=%f", zi, di, q, qr);
    end
  endtask

  initial begin
    z = '0; d = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int zi = 128; zi < 256; zi += 9)
      for (int di = 128; di < 256; di += 7) divide(zi, di);
    divide(128, 255); divide(255, 128); divide(255, 255); divide(128, 128);
    for (int t = 0; t < 300; t++) divide($urandom_range(128, 255), $urandom_range(128, 255));
    $display("largest error: %0d ulp", worst);
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
