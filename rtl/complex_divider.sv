// complex_divider: complex division (A + jB) / (C + jD) by Goldschmidt iteration.
//
// The quotient is split as
//   Q = (AC + BD) / (C^2 + D^2) + j (BC - AD) / (C^2 + D^2).
// Three AB +- CD units (rb_ip2, signed) form the two numerators and the common
// denominator in redundant binary form; rbnb_converter takes each back to 2's
// complement, and a normalizer brings the magnitude of each into [0.5, 1) with
// its shift count. Two Goldschmidt dividers (gs_divider) then divide the
// normalized numerator magnitudes by the normalized denominator at once.
//
// Result format: component X (re or im) is
//   X = (-1)**neg_x * (q_x / 2**N) * 2**exp_x,   exp_x = lz(denominator) - lz(numerator)
// with q_x the divider's N+2 bit quotient (2 integer, N fraction bits). The
// normalized operands are truncated to N bits, so the result carries about N
// significant bits. A zero numerator gives q_x = 0. C = D = 0 sets div_zero (the
// quotient is then meaningless).
//
// Timing: `start` (while not busy) captures a, b, c, d on a rising edge; the
// products, conversion and normalization settle during the next cycle, and the
// dividers start on the edge after it. `done` pulses ITER + 1 cycles after the
// start edge (5 for N = 8), and all outputs hold until the next start.
// Asynchronous active-low reset.
//
// Origin: the decomposition, the use of AB +- CD units for AC + BD, BC - AD and
// C^2 + D^2, conversion, normalization into [0.5, 1) and the Goldschmidt
// divisions follow the original design. The sign/magnitude handling, the
// exponent outputs, the divide-by-zero flag, the one-cycle front end and giving
// each division its own divisor path (the original shares the C^2 + D^2
// iteration between the two divisions) are this design's choices.
module complex_divider
  import rb_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [N-1:0]                a,      // dividend real part (signed)
  input  logic [N-1:0]                b,      // dividend imaginary part (signed)
  input  logic [N-1:0]                c,      // divisor real part (signed)
  input  logic [N-1:0]                d,      // divisor imaginary part (signed)
  output logic                        busy,
  output logic                        done,
  output logic [N+1:0]                q_re,
  output logic [N+1:0]                q_im,
  output logic                        neg_re,
  output logic                        neg_im,
  output logic signed [$clog2(2*N+4):0] exp_re,
  output logic signed [$clog2(2*N+4):0] exp_im,
  output logic                        div_zero
);

  localparam int unsigned WR = 2 * N + 4;       // RB/binary width of the products
  localparam int unsigned LW = $clog2(WR);      // shift count width
  localparam int unsigned EW = LW + 1;          // exponent width (signed)

  logic [N-1:0] a_r, b_r, c_r, d_r;
  logic         kick;                            // start the dividers next edge
  logic         wait_div;

  // ---- products in RB form ----
  rb_digit_t [WR-1:0] re_rb, im_rb, den_rb;
  rb_ip2 #(.N(N), .W(WR)) u_re (.a(a_r), .b(c_r), .c(b_r), .d(d_r), .sign(1'b1), .real_img(1'b0),
                               .ab(), .cd(), .sum(re_rb));
  rb_ip2 #(.N(N), .W(WR)) u_im (.a(b_r), .b(c_r), .c(a_r), .d(d_r), .sign(1'b1), .real_img(1'b1),
                               .ab(), .cd(), .sum(im_rb));
  rb_ip2 #(.N(N), .W(WR)) u_den (.a(c_r), .b(c_r), .c(d_r), .d(d_r), .sign(1'b1), .real_img(1'b0),
                                .ab(), .cd(), .sum(den_rb));

  // ---- back to 2's complement, magnitudes ----
  logic [WR-1:0] re_bin, im_bin, den_bin, re_mag, im_mag;
  rbnb_converter #(.W(WR)) u_cv_re  (.x(re_rb),  .s(re_bin));
  rbnb_converter #(.W(WR)) u_cv_im  (.x(im_rb),  .s(im_bin));
  rbnb_converter #(.W(WR)) u_cv_den (.x(den_rb), .s(den_bin));
  assign re_mag = re_bin[WR-1] ? -re_bin : re_bin;
  assign im_mag = im_bin[WR-1] ? -im_bin : im_bin;

  // ---- normalization into [0.5, 1) ----
  logic [N-1:0]  f_re, f_im, f_den;
  logic [LW-1:0] lz_re, lz_im, lz_den;
  logic          z_re, z_im, z_den;
  normalizer #(.WI(WR), .WO(N)) u_nm_re  (.x(re_mag),  .f(f_re),  .lz(lz_re),  .zero(z_re));
  normalizer #(.WI(WR), .WO(N)) u_nm_im  (.x(im_mag),  .f(f_im),  .lz(lz_im),  .zero(z_im));
  normalizer #(.WI(WR), .WO(N)) u_nm_den (.x(den_bin), .f(f_den), .lz(lz_den), .zero(z_den));

  // ---- the two real divisions ----
  logic busy_re, busy_im, done_re, done_im;
  gs_divider #(.N(N)) u_div_re (.clk(clk), .rst_n(rst_n), .start(kick), .z(f_re), .d(f_den),
                                .busy(busy_re), .done(done_re), .q(q_re));
  gs_divider #(.N(N)) u_div_im (.clk(clk), .rst_n(rst_n), .start(kick), .z(f_im), .d(f_den),
                                .busy(busy_im), .done(done_im), .q(q_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; c_r <= '0; d_r <= '0;
      kick     <= 1'b0;
      wait_div <= 1'b0;
      neg_re   <= 1'b0;
      neg_im   <= 1'b0;
      exp_re   <= '0;
      exp_im   <= '0;
      div_zero <= 1'b0;
    end else begin
      kick <= 1'b0;
      if (start && !busy) begin
        a_r <= a; b_r <= b; c_r <= c; d_r <= d;
        kick <= 1'b1;
      end
      if (kick) begin
        wait_div <= 1'b1;
        neg_re   <= re_bin[WR-1];
        neg_im   <= im_bin[WR-1];
        exp_re   <= z_re ? '0 : EW'(signed'({1'b0, lz_den}) - signed'({1'b0, lz_re}));
        exp_im   <= z_im ? '0 : EW'(signed'({1'b0, lz_den}) - signed'({1'b0, lz_im}));
        div_zero <= z_den;
      end
      if (wait_div && done_re) wait_div <= 1'b0;
    end
  end

  assign done = wait_div & done_re & done_im;
  assign busy = kick | wait_div | busy_re | busy_im;

endmodule
