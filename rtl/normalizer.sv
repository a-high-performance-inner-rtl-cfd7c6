// normalizer: brings an unsigned binary value into [0.5, 1) for division.
//
// Counts the leading zeros of x and shifts x left by that amount, so its most
// significant one lands on the top bit; the top WO bits are the normalized
// fraction f (read as 0.f, so 0.5 <= f < 1), the lower bits are dropped
// (truncation). Then x = 0.f' * 2**(WI - lz) with f' the untruncated fraction.
// x = 0 gives zero = 1, f = 0 and lz = 0.
//
// Interface: x[WI], outputs f[WO], lz (shift amount, 0 .. WI-1) and zero.
// Combinational: a priority leading-one search and a barrel shift.
//
// Origin: the original design requires dividend and divisor to be normalized
// into [0.5, 1) and refers to other work for the circuit; this leading-zero
// count and shift is the simplest circuit with that function and is this
// design's own.
module normalizer #(
  parameter int unsigned WI = 20,
  parameter int unsigned WO = 8
) (
  input  logic [WI-1:0]         x,
  output logic [WO-1:0]         f,
  output logic [$clog2(WI)-1:0] lz,
  output logic                  zero
);

  logic [WI-1:0] xs;

  always_comb begin
    lz = '0;
    for (int i = 0; i < WI; i++) begin
      if (x[i]) lz = $clog2(WI)'(WI - 1 - i);   // the highest set bit wins
    end
  end

  assign zero = (x == '0);
  assign xs   = x << lz;
  assign f    = xs[WI-1 -: WO];

  initial assert (WO <= WI) else $error("normalizer: WO must not exceed WI");

endmodule
