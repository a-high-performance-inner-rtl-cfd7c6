// rb_rb_multiplier: multiplier for two redundant binary operands.
//
// An N-digit RB number X splits into its two wire planes, X+ (the p wires) and
// X- (the m wires), both unsigned N-bit numbers, with X = X+ - ~X-. Hence
//   X*Y = (X+ Y+  -  ~X- Y+)  +  (~X- ~Y-  -  X+ ~Y-)
// which is two unsigned AB - CD operations of the inner-product unit (rb_ip2
// with sign = 0, real_img = 1) and one RB adder. A 2's-complement operand can be
// given in RB form without logic (digit i = (1, a_i), top digit = (0, ~a_(N-1))).
//
// Interface: p = X*Y as a W-digit RB number; W >= 2N + 2. Combinational.
//
// Origin: building the RB x RB product from inline inner-product units follows
// the original design; the specific pairing of digit planes was derived here
// from X = X+ - ~X- and is this design's.
module rb_rb_multiplier
  import rb_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 24
) (
  input  rb_digit_t [N-1:0] x,
  input  rb_digit_t [N-1:0] y,
  output rb_digit_t [W-1:0] p
);

  logic [N-1:0] xp, xm_n, yp, ym_n;
  rb_digit_t [W-1:0] s0, s1;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      xp[i]   = x[i].p;
      xm_n[i] = ~x[i].m;
      yp[i]   = y[i].p;
      ym_n[i] = ~y[i].m;
    end
  end

  rb_ip2 #(.N(N), .W(W)) u_ip_a (
    .a(xp), .b(yp), .c(xm_n), .d(yp), .sign(1'b0), .real_img(1'b1),
    .ab(), .cd(), .sum(s0)
  );

  rb_ip2 #(.N(N), .W(W)) u_ip_b (
    .a(xm_n), .b(ym_n), .c(xp), .d(ym_n), .sign(1'b0), .real_img(1'b1),
    .ab(), .cd(), .sum(s1)
  );

  rb_adder #(.W(W)) u_rba (
    .x   (s0),
    .y   (s1),
    .cin (RB_ZERO),
    .z   (p),
    .cout()
  );

  initial assert (W >= 2 * N + 2) else $error("rb_rb_multiplier: W must be at least 2N+2");

endmodule
