// normalizer: turns the raw significand product into a single-precision
// result and resolves the special cases.
//
// e is the biased exponent sum ea' + eb' - 127 (a denormal operand enters
// with exponent 1 and no hidden one), prod the 48-bit significand product.
// The leading one of prod is found (lz leading zeros) and the result
// exponent is E = e + 1 - lz; for two normal operands lz is 0 or 1. If
// E >= 1 the product is shifted left by lz so that the leading one is the
// hidden bit. If E <= 0 the result is denormal: it is shifted 1 - E places
// further right, the bits that fall out joining the sticky bit, and the
// exponent field becomes 0. The 23 mantissa bits are rounded to nearest, ties
// to even (guard bit and sticky OR of the rest). A carry out of a normal
// significand raises the exponent by one; a denormal that rounds up to
// 2^-126 becomes the smallest normal. A final exponent >= 255 gives signed
// infinity (ovf). unf is raised when the result is denormal or rounds to
// zero. Special operands take precedence: NaN, or infinity times zero, gives
// the quiet NaN 7FC00000; otherwise infinity gives signed infinity and zero
// gives signed zero. The set of cases checked is the document's; rounding
// mode, gradual underflow and the NaN code are this design's choices.
// Combinational.
module normalizer
  import fp_csd_pkg::*;
(
  input  logic                     s,      // product sign
  input  logic signed [EXPS_W-1:0] e,      // ea' + eb' - bias
  input  logic        [PROD_W-1:0] prod,   // significand product
  input  fp_class_e                cls_a,
  input  fp_class_e                cls_b,
  output float32_t                 y,
  output fp_flags_t                flags
);
  localparam int unsigned WIN = PROD_W + SIG_W;   // 72-bit alignment window

  logic [$clog2(PROD_W)-1:0] lz;                  // leading zeros of prod
  logic signed [EXPS_W:0]    e_n;                 // exponent after normalizing
  logic [5:0]                rs;                  // extra right shift, denormal
  logic [WIN-1:0]            win;
  logic [SIG_W-1:0]          sig_t;               // hidden bit and mantissa
  logic                      guard, sticky, inc;
  logic [SIG_W:0]            sig_r;               // rounded, with carry
  logic signed [EXPS_W:0]    e_r;                 // final exponent field
  logic                      a_zero, b_zero, any_nan, any_inf, any_zero;

  always_comb begin
    lz = '0;
    for (int i = 0; i < int'(PROD_W); i++)
      if (prod[i]) lz = ($clog2(PROD_W))'(int'(PROD_W) - 1 - i);
    e_n = (EXPS_W+1)'(e) + (EXPS_W+1)'(1) - (EXPS_W+1)'(lz);
    if (e_n >= 1)        rs = '0;
    else if (e_n < -24)  rs = 6'd26;              // below half the smallest denormal
    else                 rs = 6'(1 - e_n);

    win    = ({prod, (SIG_W)'(0)} << lz) >> rs;
    sig_t  = win[WIN-1 -: SIG_W];
    guard  = win[WIN-SIG_W-1];
    sticky = |win[WIN-SIG_W-2:0];
    inc    = guard & (sticky | sig_t[0]);
    sig_r  = {1'b0, sig_t} + (SIG_W+1)'(inc);
    if (e_n >= 1) e_r = e_n + (EXPS_W+1)'(sig_r[SIG_W]);
    else          e_r = (EXPS_W+1)'(sig_r[SIG_W-1]);   // 1 if rounded up to the smallest normal

    a_zero   = (cls_a == CLS_ZERO);
    b_zero   = (cls_b == CLS_ZERO);
    any_nan  = (cls_a == CLS_NAN) || (cls_b == CLS_NAN);
    any_inf  = (cls_a == CLS_INF) || (cls_b == CLS_INF);
    any_zero = a_zero || b_zero;

    flags = '0;
    y     = '{sign: s, exp: '0, man: '0};
    if (any_nan || (any_inf && any_zero)) begin
      flags.nan = 1'b1;
      y         = float32_t'(QNAN);
    end else if (any_inf) begin
      flags.inf = 1'b1;
      y.exp     = '1;
    end else if (any_zero) begin
      flags.zero = 1'b1;
    end else if (e_r >= (EXPS_W+1)'(255)) begin
      flags.ovf = 1'b1;
      flags.inf = 1'b1;
      y.exp     = '1;
    end else begin
      y.exp = e_r[EXP_W-1:0];
      // on a carry out of a normal significand it is 1.000..0 again
      y.man = (e_n >= 1 && sig_r[SIG_W]) ? '0 : sig_r[MAN_W-1:0];
      if (e_r == 0) begin
        flags.unf  = 1'b1;
        flags.zero = (sig_r[MAN_W-1:0] == '0);
      end
    end
  end
endmodule
