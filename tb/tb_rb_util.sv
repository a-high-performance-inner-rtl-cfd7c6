// tb_rb_util: helpers shared by the testbenches of the redundant binary blocks.
//
// rbv() returns the integer value of the lowest w digits of an RB word
// (digit value = m + p - 1), rb_rand() a random RB word, rb_of() the RB word of
// an integer (digits +1/0 from its magnitude, negated for a negative value), and
// wrap() reduces an integer modulo 2**w into the signed range, which is how the
// W-digit datapath keeps its values.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
package tb_rb_util;
  import rb_pkg::*;

  typedef rb_digit_t [63:0] rbw_t;

  function automatic longint rbv(input rb_digit_t [63:0] v, input int w);
    longint r;
    r = 0;
    for (int i = 0; i < w; i++) r += longint'(rb_val(v[i])) <<< i;
    return r;
  endfunction

  function automatic rbw_t rb_rand();
    rbw_t r;
    r = rbw_t'({$urandom, $urandom, $urandom, $urandom});
    return r;
  endfunction

  function automatic rb_digit_t [63:0] rb_of(input longint x);
    rb_digit_t [63:0] r;
    longint mag;
    mag = (x < 0) ? -x : x;
    for (int i = 0; i < 64; i++) begin
      r[i] = mag[i] ? RB_POS : RB_ZERO;
      if (x < 0) r[i] = rb_neg(r[i]);
    end
    return r;
  endfunction

  function automatic longint wrap(input longint x, input int w);
    longint m;
    m = x & ((longint'(1) <<< w) - 1);
    if (m[w-1]) m -= (longint'(1) <<< w);
    return m;
  endfunction
endpackage
