// tb_ip_model: integer reference model of the inner-product core's datapath.
//
// seg_inputs() gives, for one operand set, the value each accumulator segment
// receives and which segments are written, computed directly from the meaning
// of each mode (products, complex products, RB products) and independent of
// how the hardware routes operands. Only the mode combinations the core
// documents are modelled: real with any split, complex with SPLIT_TWO or
// SPLIT_FOUR, RB with SPLIT_ONE or SPLIT_TWO.
//
// Origin: stimulus and checks are this testbench's own; expected values come
// from integer arithmetic, independent of the RTL.
package tb_ip_model;
  import rb_pkg::*;

  typedef logic [7:0][7:0] lanes_t;
  typedef longint seg_t[8];

  function automatic longint sv8(input logic [7:0] x, input logic sgn);
    return sgn ? longint'($signed(x)) : longint'(x);
  endfunction

  function automatic void seg_inputs(input fmt_e fmt, input split_e split, input logic sgn,
                                     input lanes_t a, input lanes_t b,
                                     output seg_t seg, output logic [7:0] en);
    longint p[8];
    longint re[2], im[2], x[2], y[2];
    foreach (seg[k]) seg[k] = 0;
    en = '0;
    case (fmt)
      FMT_REAL: begin
        for (int k = 0; k < 8; k++) p[k] = sv8(a[k], sgn) * sv8(b[k], sgn);
        case (split)
          SPLIT_ONE:  begin seg[0] = p[0]+p[1]+p[2]+p[3]+p[4]+p[5]+p[6]+p[7]; en = 8'h01; end
          SPLIT_TWO:  begin seg[0] = p[0]+p[1]+p[2]+p[3]; seg[1] = p[4]+p[5]+p[6]+p[7]; en = 8'h03; end
          SPLIT_FOUR: begin for (int u = 0; u < 4; u++) seg[u] = p[2*u] + p[2*u+1]; en = 8'h0F; end
          default:    begin for (int k = 0; k < 8; k++) seg[k] = p[k]; en = 8'hFF; end
        endcase
      end
      FMT_COMPLEX: begin
        for (int m = 0; m < 2; m++) begin
          re[m] = sv8(a[2*m], sgn) * sv8(b[2*m], sgn) - sv8(a[2*m+1], sgn) * sv8(b[2*m+1], sgn);
          im[m] = sv8(a[2*m], sgn) * sv8(b[2*m+1], sgn) + sv8(a[2*m+1], sgn) * sv8(b[2*m], sgn);
        end
        if (split == SPLIT_TWO) begin seg[0] = re[0] + re[1]; seg[1] = im[0] + im[1]; en = 8'h03; end
        else begin seg[0] = re[0]; seg[1] = re[1]; seg[2] = im[0]; seg[3] = im[1]; en = 8'h0F; end
      end
      default: begin  // FMT_RB: value = plus plane - ~minus plane
        for (int m = 0; m < 2; m++) begin
          x[m] = longint'(a[2*m]) - longint'(8'(~a[2*m+1]));
          y[m] = longint'(b[2*m]) - longint'(8'(~b[2*m+1]));
        end
        if (split == SPLIT_ONE) begin seg[0] = x[0]*y[0] + x[1]*y[1]; en = 8'h01; end
        else begin seg[0] = x[0]*y[0]; seg[1] = x[1]*y[1]; en = 8'h03; end
      end
    endcase
  endfunction

  // A random mode combination among the documented ones.
  function automatic void pick_mode(output fmt_e fmt, output split_e split);
    int r;
    r = $urandom_range(0, 7);
    case (r)
      0: begin fmt = FMT_REAL;    split = SPLIT_ONE;   end
      1: begin fmt = FMT_REAL;    split = SPLIT_TWO;   end
      2: begin fmt = FMT_REAL;    split = SPLIT_FOUR;  end
      3: begin fmt = FMT_REAL;    split = SPLIT_EIGHT; end
      4: begin fmt = FMT_COMPLEX; split = SPLIT_TWO;   end
      5: begin fmt = FMT_COMPLEX; split = SPLIT_FOUR;  end
      6: begin fmt = FMT_RB;      split = SPLIT_ONE;   end
      default: begin fmt = FMT_RB; split = SPLIT_TWO;  end
    endcase
  endfunction
endpackage
