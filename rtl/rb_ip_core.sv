// rb_ip_core: reconfigurable 8-element redundant binary inner-product core.
//
// Datapath: four rb_ip2 pair units (eight multipliers) produce P0 +- P1, ...,
// P6 +- P7 in redundant binary form; a two-level RB adder tree adds the pair
// results (level 1: units 0+1 and 2+3, level 2: the two level-1 sums); eight RB
// accumulator segments follow, each driven by a different point of the tree
// (`split`), so the tree can be bypassed at any level:
//   SPLIT_ONE   segment 0 += root                       (one M-element IP)
//   SPLIT_TWO   segments 0,1 += level-1 sums             (two M/2-element IPs)
//   SPLIT_FOUR  segments 0..3 += pair-unit results       (four 2-element IPs)
//   SPLIT_EIGHT segments 0..7 += single products         (eight multipliers)
// `accumulate` = 0 loads the segments instead of adding (start of a new inner
// product, or plain parallel multiplication). Every segment is converted to
// 2's complement by an rbnb_converter.
//
// Operand formats (`fmt`), with lanes a[k], b[k], k = 0..7:
//   FMT_REAL    element k is (a[k], b[k]); `sign` selects signed/unsigned.
//   FMT_COMPLEX complex element m (m = 0,1) is X = a[2m] + j a[2m+1],
//               Y = b[2m] + j b[2m+1]. Units 0,1 form Re(X0Y0), Re(X1Y1)
//               (AB - CD), units 2,3 form Im(X0Y0), Im(X1Y1) (AB + CD). So
//               SPLIT_TWO gives Re/Im of X0Y0 + X1Y1 in segments 0/1, and
//               SPLIT_FOUR gives Re X0Y0, Re X1Y1, Im X0Y0, Im X1Y1 in 0..3.
//   FMT_RB      RB element m is X with plus wires a[2m], minus wires a[2m+1],
//               and Y likewise on b. Units 2m and 2m+1 form
//               X+Y+ - ~X-Y+ and ~X-~Y- - X+~Y-, so each level-1 sum is one
//               RB product XmYm: SPLIT_ONE gives X0Y0 + X1Y1, SPLIT_TWO the
//               two products. Operands are unsigned digit planes (sign ignored).
//
// Pipeline (two stages): stage 1 is the partial product mapping and the pair
// units, registered; stage 2 is the rest of the tree and the accumulator RBA,
// ending in the segment registers. Operands presented with in_valid before
// rising edge e are in the segments after edge e+1, when out_valid is high;
// a new operand set can be given every cycle. `result` is the combinational
// conversion of the segments. Asynchronous active-low reset clears everything.
// BOOTH = 1 builds the eight multipliers with modified-Booth partial products
// (one RBA level less in stage 1); results and timing are unchanged.
//
// Origin: the four pair units, the tree tapped at every level, eight
// accumulator segments, the real/complex/RB formats and the two-stage pipeline
// follow the original design; lane assignment, segment placement, the 24-digit
// width, and two RB products per pass (the original shows four) are this
// design's choices.
module rb_ip_core
  import rb_pkg::*;
#(
  parameter int unsigned M     = 8,
  parameter int unsigned N     = 8,
  parameter int unsigned ACC_W = 24,
  parameter bit          BOOTH = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  fmt_e                         fmt,
  input  split_e                       split,
  input  logic                         sign,
  input  logic                         accumulate,
  input  logic [M-1:0][N-1:0]          a,
  input  logic [M-1:0][N-1:0]          b,
  output logic                         out_valid,
  output rb_digit_t [M-1:0][ACC_W-1:0] acc_rb,
  output logic [M-1:0][ACC_W-1:0]      result
);

  localparam int unsigned U = M / 2;   // pair units
  localparam rb_digit_t [ACC_W-1:0] ZERO_W = {ACC_W{RB_ZERO}};   // all-zero RB word

  // ---------------- stage 1: operand routing and pair units ----------------
  logic [U-1:0][N-1:0] ua, ub, uc, ud;
  logic [U-1:0]        u_sub;
  logic                u_sign;

  always_comb begin
    u_sign = (fmt == FMT_RB) ? 1'b0 : sign;
    for (int u = 0; u < U; u++) begin
      ua[u] = a[2*u];  ub[u] = b[2*u];  uc[u] = a[2*u+1];  ud[u] = b[2*u+1];
      u_sub[u] = 1'b0;
    end
    if (fmt == FMT_COMPLEX) begin
      for (int m = 0; m < 2; m++) begin
        // real part: Xre*Yre - Xim*Yim
        ua[m]   = a[2*m];   ub[m]   = b[2*m];   uc[m]   = a[2*m+1]; ud[m]   = b[2*m+1];
        u_sub[m] = 1'b1;
        // imaginary part: Xre*Yim + Xim*Yre
        ua[m+2] = a[2*m];   ub[m+2] = b[2*m+1]; uc[m+2] = a[2*m+1]; ud[m+2] = b[2*m];
        u_sub[m+2] = 1'b0;
      end
    end else if (fmt == FMT_RB) begin
      for (int m = 0; m < 2; m++) begin
        // X+Y+ - ~X- Y+
        ua[2*m]   = a[2*m];    ub[2*m]   = b[2*m];
        uc[2*m]   = ~a[2*m+1]; ud[2*m]   = b[2*m];
        // ~X- ~Y- - X+ ~Y-
        ua[2*m+1] = ~a[2*m+1]; ub[2*m+1] = ~b[2*m+1];
        uc[2*m+1] = a[2*m];    ud[2*m+1] = ~b[2*m+1];
        u_sub[2*m]   = 1'b1;
        u_sub[2*m+1] = 1'b1;
      end
    end
  end

  rb_digit_t [U-1:0][ACC_W-1:0] u_sum;
  rb_digit_t [M-1:0][ACC_W-1:0] u_prod;

  for (genvar u = 0; u < U; u++) begin : g_unit
    rb_ip2 #(.N(N), .W(ACC_W), .BOOTH(BOOTH)) u_ip2 (
      .a        (ua[u]),
      .b        (ub[u]),
      .c        (uc[u]),
      .d        (ud[u]),
      .sign     (u_sign),
      .real_img (u_sub[u]),
      .ab       (u_prod[2*u]),
      .cd       (u_prod[2*u+1]),
      .sum      (u_sum[u])
    );
  end

  // stage-1 pipeline registers
  rb_digit_t [U-1:0][ACC_W-1:0] s1_sum;
  rb_digit_t [M-1:0][ACC_W-1:0] s1_prod;
  logic                         s1_valid;
  split_e                       s1_split;
  logic                         s1_acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_sum   <= '{default: ZERO_W};
      s1_prod  <= '{default: ZERO_W};
      s1_valid <= 1'b0;
      s1_split <= SPLIT_ONE;
      s1_acc   <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_sum   <= u_sum;
        s1_prod  <= u_prod;
        s1_split <= split;
        s1_acc   <= accumulate;
      end
    end
  end

  // ---------------- stage 2: adder tree, segment select, accumulators ------
  localparam int unsigned L1 = U / 2;   // level-1 sums
  rb_digit_t [L1-1:0][ACC_W-1:0] l1;
  rb_digit_t [ACC_W-1:0]         root;

  for (genvar k = 0; k < L1; k++) begin : g_l1
    rb_adder #(.W(ACC_W)) u_rba (
      .x(s1_sum[2*k]), .y(s1_sum[2*k+1]), .cin(RB_ZERO), .z(l1[k]), .cout()
    );
  end

  rb_adder_tree #(.K(L1), .W(ACC_W)) u_root (.ops(l1), .sum(root));

  rb_digit_t [M-1:0][ACC_W-1:0] seg_in;
  logic [M-1:0]                 seg_en;

  always_comb begin
    seg_in = '{default: ZERO_W};
    seg_en = '0;
    unique case (s1_split)
      SPLIT_ONE: begin
        seg_in[0] = root;
        seg_en[0] = s1_valid;
      end
      SPLIT_TWO: begin
        for (int k = 0; k < L1; k++) begin
          seg_in[k] = l1[k];
          seg_en[k] = s1_valid;
        end
      end
      SPLIT_FOUR: begin
        for (int k = 0; k < U; k++) begin
          seg_in[k] = s1_sum[k];
          seg_en[k] = s1_valid;
        end
      end
      SPLIT_EIGHT: begin
        seg_in = s1_prod;
        seg_en = {M{s1_valid}};
      end
      default: ;
    endcase
  end

  for (genvar k = 0; k < M; k++) begin : g_seg
    rb_accumulator #(.W(ACC_W)) u_acc (
      .clk        (clk),
      .rst_n      (rst_n),
      .en         (seg_en[k]),
      .accumulate (s1_acc),
      .x          (seg_in[k]),
      .acc        (acc_rb[k])
    );
    rbnb_converter #(.W(ACC_W)) u_conv (.x(acc_rb[k]), .s(result[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s1_valid;
  end

  initial begin
    assert (M == 8) else $error("rb_ip_core: the tree and operand routing are built for M = 8");
  end

endmodule
