// rb_ppg: inline redundant binary partial product generator (RBPPG).
//
// The N 2's-complement partial products of A*B are taken in even/odd pairs
// PP(2j) + 2*PP(2j+1), and each pair is mapped straight onto one RB number with
// no logic beyond AND gates and inverters, so an N x N product gives N/2 RB
// partial products. With X and Y the two (N+2)-bit partial products of a pair:
//   X + Y : digit i = (x_i, y_i), top digit = (~x, ~y), value = (X + Y) + 1
//   X - Y : digit i = (x_i, ~y_i), top digit = (~x, y), value =  X - Y
// (the sum and difference mappings of two 2's-complement numbers).
//
// SIGN = 1 (signed operands): partial product N-1 has negative weight, so the
// last pair uses the difference mapping; the partial products are A*b_i sign
// extended. SIGN = 0 (unsigned operands): every partial product is padded with a
// 0 sign bit and every pair uses the sum mapping. Each sum-mapped pair leaves a
// -1 correction at its weight 2**(2j); these are collected into the RB word
// `corr` (digit -1 at position 2j, 0 elsewhere), which the adder tree adds like
// one more partial product.
//
// Interface: pp[j] is pair j already shifted left by 2j digits into a W-digit
// word (digits outside the pair are 0). Value: sum(pp) + corr = A*B.
// Combinational. Requires N even and W >= 2N.
//
// Origin: pairing of partial products, the sum/difference mappings and the SIGN
// control follow the original design; collecting all -1 corrections into one
// separate correction word is this design's choice (the original folds some of
// them into a partial product or a carry-in).
module rb_ppg
  import rb_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 24
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  input  logic                         sign,
  output rb_digit_t [N/2-1:0][W-1:0]   pp,
  output rb_digit_t [W-1:0]            corr
);

  localparam int unsigned NP = N / 2;   // number of RB partial products
  localparam int unsigned PW = N + 2;   // digits of one pair before shifting

  // Operand A extended by two bits: sign extension or zero padding (SIGN mux).
  logic [PW-1:0] a_ext;
  assign a_ext = {{2{sign & a[N-1]}}, a};

  always_comb begin
    logic [PW-1:0] xv;
    logic [PW-1:0] yv;
    logic          use_sub;
    corr = '{default: RB_ZERO};
    for (int j = 0; j < NP; j++) begin
      xv      = b[2*j]   ? a_ext : '0;
      yv      = b[2*j+1] ? {a_ext[PW-2:0], 1'b0} : '0;
      use_sub = sign && (j == NP - 1);
      pp[j]   = '{default: RB_ZERO};
      for (int i = 0; i < PW - 1; i++) begin
        pp[j][2*j+i] = use_sub ? '{m: xv[i], p: ~yv[i]} : '{m: xv[i], p: yv[i]};
      end
      pp[j][2*j+PW-1] = use_sub ? '{m: ~xv[PW-1], p: yv[PW-1]}
                                : '{m: ~xv[PW-1], p: ~yv[PW-1]};
      if (!use_sub) corr[2*j] = RB_NEG;
    end
  end

  initial begin
    assert (N % 2 == 0) else $error("rb_ppg: N must be even");
    assert (W >= 2 * N) else $error("rb_ppg: W must be at least 2N");
  end

endmodule
