// rb_ip_processor: top level of the redundant binary arithmetic processor.
//
// Two units stand side by side, each with its own ports:
//  * rb_ip_core (ports ip_*): the reconfigurable 8-element, 8-bit RB
//    inner-product core with segmented RB accumulators and RB to
//    2's-complement conversion; real, complex and RB operand formats; a
//    two-stage pipeline accepting one operand set per clock.
//  * gs_divider (ports div_*): the Goldschmidt divider built from the same
//    AB +- CD inner-product units, log2(N) + 1 clocks per division.
//  * complex_divider (ports cdiv_*): (A + jB) / (C + jD) from three AB +- CD
//    units, conversion, normalization and two Goldschmidt divisions; the
//    quotient parts come as sign, mantissa and exponent, log2(N) + 2 clocks.
// Both share the clock and the asynchronous active-low reset. BOOTH selects the
// partial product generator of the core's multipliers (0: plain inline pairs,
// 1: modified Booth).
//
// Origin: the 8-word, 8-bit inner-product core and 8-bit Goldschmidt division
// follow the original design; placing the divider beside the core with its own
// multipliers, rather than time-sharing the core's units, is this design's
// choice.
module rb_ip_processor
  import rb_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 24,
  parameter int unsigned DIV_N = 8,
  parameter bit          BOOTH = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // inner-product core
  input  logic                         ip_in_valid,
  input  fmt_e                         ip_fmt,
  input  split_e                       ip_split,
  input  logic                         ip_sign,
  input  logic                         ip_accumulate,
  input  logic [M-1:0][N-1:0]          ip_a,
  input  logic [M-1:0][N-1:0]          ip_b,
  output logic                         ip_out_valid,
  output rb_digit_t [M-1:0][ACC_W-1:0] ip_acc_rb,
  output logic [M-1:0][ACC_W-1:0]      ip_result,
  // divider
  input  logic                         div_start,
  input  logic [DIV_N-1:0]             div_z,
  input  logic [DIV_N-1:0]             div_d,
  output logic                         div_busy,
  output logic                         div_done,
  output logic [DIV_N+1:0]             div_q,
  // complex divider
  input  logic                         cdiv_start,
  input  logic [DIV_N-1:0]             cdiv_a,
  input  logic [DIV_N-1:0]             cdiv_b,
  input  logic [DIV_N-1:0]             cdiv_c,
  input  logic [DIV_N-1:0]             cdiv_d,
  output logic                         cdiv_busy,
  output logic                         cdiv_done,
  output logic [DIV_N+1:0]             cdiv_q_re,
  output logic [DIV_N+1:0]             cdiv_q_im,
  output logic                         cdiv_neg_re,
  output logic                         cdiv_neg_im,
  output logic signed [$clog2(2*DIV_N+4):0] cdiv_exp_re,
  output logic signed [$clog2(2*DIV_N+4):0] cdiv_exp_im,
  output logic                         cdiv_div_zero
);

  rb_ip_core #(.M(M), .N(N), .ACC_W(ACC_W), .BOOTH(BOOTH)) u_core (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (ip_in_valid),
    .fmt        (ip_fmt),
    .split      (ip_split),
    .sign       (ip_sign),
    .accumulate (ip_accumulate),
    .a          (ip_a),
    .b          (ip_b),
    .out_valid  (ip_out_valid),
    .acc_rb     (ip_acc_rb),
    .result     (ip_result)
  );

  gs_divider #(.N(DIV_N)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .z     (div_z),
    .d     (div_d),
    .busy  (div_busy),
    .done  (div_done),
    .q     (div_q)
  );

  complex_divider #(.N(DIV_N)) u_cdiv (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (cdiv_start),
    .a        (cdiv_a),
    .b        (cdiv_b),
    .c        (cdiv_c),
    .d        (cdiv_d),
    .busy     (cdiv_busy),
    .done     (cdiv_done),
    .q_re     (cdiv_q_re),
    .q_im     (cdiv_q_im),
    .neg_re   (cdiv_neg_re),
    .neg_im   (cdiv_neg_im),
    .exp_re   (cdiv_exp_re),
    .exp_im   (cdiv_exp_im),
    .div_zero (cdiv_div_zero)
  );

endmodule
