// rb_ip2: unified signed/unsigned inner-product unit for AB + CD and AB - CD.
//
// Two inline RB multipliers form AB and CD in redundant binary form; a final RB
// adder adds AB to CD, or to the RB complement of CD (every digit negated) when
// real_img = 1, which makes it an adder/subtractor. AB - CD gives the real part
// and AB + CD the imaginary part of a complex product, and with sign = 0 the
// unit works on unsigned operands. The separate products are brought out too, so
// the final adder can be bypassed to use the unit as two multipliers.
//
// For N = 8 the path from the operands to `sum` is the partial product mapping
// and four RBA levels (three with BOOTH = 1, which selects the modified-Booth
// partial product generator in both multipliers). Combinational.
//
// Origin: the AB +- CD unit with SIGN and Real_Img controls follows the original
// design; forming AB - CD by negating the CD product digit by digit (instead of
// remapping its partial products) is this design's choice with the same result.
module rb_ip2
  import rb_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 24,
  parameter bit          BOOTH = 1'b0   // partial product generator of the multipliers
) (
  input  logic [N-1:0]      a,
  input  logic [N-1:0]      b,
  input  logic [N-1:0]      c,
  input  logic [N-1:0]      d,
  input  logic              sign,
  input  logic              real_img,   // 1: AB - CD, 0: AB + CD
  output rb_digit_t [W-1:0] ab,
  output rb_digit_t [W-1:0] cd,
  output rb_digit_t [W-1:0] sum
);

  rb_digit_t [W-1:0] cd_sel;

  rb_multiplier #(.N(N), .W(W), .BOOTH(BOOTH)) u_mul_ab (.a(a), .b(b), .sign(sign), .p(ab));
  rb_multiplier #(.N(N), .W(W), .BOOTH(BOOTH)) u_mul_cd (.a(c), .b(d), .sign(sign), .p(cd));

  always_comb begin
    for (int i = 0; i < W; i++) cd_sel[i] = real_img ? rb_neg(cd[i]) : cd[i];
  end

  rb_adder #(.W(W)) u_rba (
    .x   (ab),
    .y   (cd_sel),
    .cin (RB_ZERO),
    .z   (sum),
    .cout()
  );

endmodule
