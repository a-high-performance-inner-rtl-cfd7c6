// gs_divider: Goldschmidt divider on the redundant binary inner-product units.
//
// Computes Q = Z / D for dividend and divisor normalised to [0.5, 1) by the
// iteration
//   F = 2 - D_i,   D_(i+1) = D_i * F,   Z_(i+1) = Z_i * F
// which drives D_i towards 1 and Z_i towards Q. Z and D stay in redundant binary
// form between iterations, so no carry-propagating conversion is in the loop:
// each iteration is one 2 - A unit (rb_two_minus) and two RB x RB multipliers in
// parallel (rb_rb_multiplier, together four AB +- CD units). log2(N) + 1
// iterations give an N-bit quotient; the working precision carries GUARD extra
// fractional digits. Only the final Z is converted to 2's complement.
//
// Number format (this design's choice): 2 integer and N + GUARD fractional
// digits. Each product is cut back to that format by dropping its lowest
// fractional digits and its digits above the integer part. Since every value in
// the loop lies in [0, 2), a top integer digit of -1 after the cut can only mean
// that a dropped digit of weight 4 was +1, so that digit is rewritten to +1
// (adding 4 back); no carry is needed.
//
// Interface and timing: start (while not busy) loads z and d on a rising edge;
// one iteration is done per clock; `done` is high for the one cycle after the
// last of ITER iterations, ITER cycles after the start edge, and q (2 integer
// and N fractional bits, unsigned) holds the quotient from then until the next
// start. Asynchronous active-low reset.
//
// Origin: the Goldschmidt iteration, log2(N) + 1 iterations and two guard
// digits follow the original design; the number format, truncation, the
// recoding of the top digit, the start/done handshake and the divider having
// its own multipliers are this design's choices.
module gs_divider
  import rb_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter int unsigned GUARD = 2,
  parameter int unsigned ITER  = $clog2(N) + 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] z,
  input  logic [N-1:0] d,
  output logic         busy,
  output logic         done,
  output logic [N+1:0] q
);

  localparam int unsigned FRAC = N + GUARD;
  localparam int unsigned ND   = FRAC + 2;      // digits of Z, D and F
  localparam int unsigned PW   = 2 * ND + 4;    // product digits (multiple of 4)

  rb_digit_t [ND-1:0] z_r, d_r, f_raw, f;
  rb_digit_t [PW-1:0] zp, dp;
  rb_digit_t [ND-1:0] z_nx, d_nx;
  logic [$clog2(ITER+1)-1:0] cnt;
  logic [ND-1:0] z_bin;

  // Put the top integer digit back into range: -1 there means +1 (see header).
  function automatic rb_digit_t [ND-1:0] fold(input rb_digit_t [ND-1:0] v);
    fold = v;
    if (v[ND-1] == RB_NEG) fold[ND-1] = RB_POS;
  endfunction

  // An unsigned fraction of N bits as RB digits at the fractional positions.
  function automatic rb_digit_t [ND-1:0] to_rb(input logic [N-1:0] v);
    to_rb = '{default: RB_ZERO};
    for (int i = 0; i < N; i++) to_rb[GUARD+i] = '{m: 1'b1, p: v[i]};
  endfunction

  rb_two_minus #(.W(ND), .FRAC(FRAC)) u_two_minus (.a(d_r), .y(f_raw));
  assign f = fold(f_raw);

  rb_rb_multiplier #(.N(ND), .W(PW)) u_mul_d (.x(d_r), .y(f), .p(dp));
  rb_rb_multiplier #(.N(ND), .W(PW)) u_mul_z (.x(z_r), .y(f), .p(zp));

  assign d_nx = fold(dp[FRAC +: ND]);
  assign z_nx = fold(zp[FRAC +: ND]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z_r  <= '{default: RB_ZERO};
      d_r  <= '{default: RB_ZERO};
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        z_r <= z_nx;
        d_r <= d_nx;
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(ITER - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        z_r  <= to_rb(z);
        d_r  <= to_rb(d);
        cnt  <= '0;
        busy <= 1'b1;
      end
    end
  end

  rbnb_converter #(.W(ND)) u_conv (.x(z_r), .s(z_bin));

  assign q = z_bin[ND-1:GUARD];

endmodule
