// booth_rbppg: modified-Booth inline redundant binary partial product generator.
//
// The multiplier B is recoded into N/2 radix-4 Booth digits
//   Q_k = -2 b(2k+1) + b(2k) + b(2k-1)  in {-2, -1, 0, +1, +2},  b(-1) = 0,
// and each digit selects C_k = 0, A', 2A' or their bitwise inverse, an (N+2)-bit
// 2's-complement word; A' is A with one extra sign bit (SIGN mux). A negative
// digit leaves g_k = 1 to be added, since ~X = -X - 1. Booth digits are then
// taken in pairs exactly like the plain inline generator: X = C(2p),
// Y = 4 C(2p+1) are mapped onto one RB number with the sum mapping
//   digit i = (x_i, y_i), top digit = (~x, ~y), value = X + Y + 1,
// so an N x N product has N/4 RB partial products. What is left over,
// g(2p) + 4 g(2p+1) - 1 per pair, is carried by two correction digits:
//   position 4p     : g(2p) - 1     (-1 or 0)
//   position 4p + 2 : g(2p+1)       ( 0 or +1)
// Unsigned operands (SIGN = 0): B is recoded as if it were signed, B = B' +
// b(N-1) 2**N, and the missing A * b(N-1) * 2**N is added by the correction
// digits at positions N..2N-1 (digit value a(i) & b(N-1)). All correction digits
// sit at distinct positions, so they form one RB word `corr`.
//
// Interface: pp[p] is pair p shifted left by 4p digits into a W-digit word.
// Value: sum(pp) + corr = A*B. Combinational. Requires N a multiple of 4 and
// W >= 2N.
//
// Origin: the Booth table, the pairing of Booth partial products, the
// correction digits and the unsigned extension term follow the original design;
// packing all correction digits into one word that the adder tree adds as an
// extra operand is this design's choice.
module booth_rbppg
  import rb_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = 24
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  input  logic                         sign,
  output rb_digit_t [N/4-1:0][W-1:0]   pp,
  output rb_digit_t [W-1:0]            corr
);

  localparam int unsigned NQ = N / 2;   // Booth digits
  localparam int unsigned NP = N / 4;   // RB partial products
  localparam int unsigned CW = N + 2;   // bits of one Booth partial product
  localparam int unsigned PW = N + 4;   // digits of one pair before shifting

  // A' = A as an (N+1)-bit 2's-complement number, sign extended to CW bits.
  logic [CW-1:0] a_ext;
  assign a_ext = {{2{sign & a[N-1]}}, a};

  // Booth recoding of B, with b(-1) = 0.
  logic [NQ-1:0]   neg;
  logic [NQ-1:0][CW-1:0] c;
  always_comb begin
    logic [N:0] bb;
    logic       one, two;
    bb = {b, 1'b0};
    for (int k = 0; k < NQ; k++) begin
      // bits b(2k+1), b(2k), b(2k-1) are bb[2k+2], bb[2k+1], bb[2k]
      neg[k] = bb[2*k+2] & ~(bb[2*k+1] & bb[2*k]);
      one    = bb[2*k+1] ^ bb[2*k];
      two    = (bb[2*k+2] & ~bb[2*k+1] & ~bb[2*k]) | (~bb[2*k+2] & bb[2*k+1] & bb[2*k]);
      c[k]   = one ? a_ext : (two ? {a_ext[CW-2:0], 1'b0} : '0);
      if (neg[k]) c[k] = ~c[k];
    end
  end

  always_comb begin
    logic [PW-1:0] xv;
    logic [PW-1:0] yv;
    corr = '{default: RB_ZERO};
    for (int p = 0; p < NP; p++) begin
      xv    = {{(PW-CW){c[2*p][CW-1]}}, c[2*p]};
      yv    = {c[2*p+1], 2'b00};
      pp[p] = '{default: RB_ZERO};
      for (int i = 0; i < PW - 1; i++) pp[p][4*p+i] = '{m: xv[i], p: yv[i]};
      pp[p][4*p+PW-1] = '{m: ~xv[PW-1], p: ~yv[PW-1]};
      corr[4*p]   = neg[2*p]   ? RB_ZERO : RB_NEG;
      corr[4*p+2] = neg[2*p+1] ? RB_POS  : RB_ZERO;
    end
    // Unsigned B: add A * b(N-1) * 2**N digit by digit (digit value = p wire).
    for (int i = 0; i < N; i++) corr[N+i] = '{m: 1'b1, p: ~sign & b[N-1] & a[i]};
  end

  initial begin
    assert (N % 4 == 0) else $error("booth_rbppg: N must be a multiple of 4");
    assert (W >= 2 * N) else $error("booth_rbppg: W must be at least 2N");
  end

endmodule
