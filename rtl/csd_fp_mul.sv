// csd_fp_mul: pipelined IEEE-754 single-precision multiplier whose
// significand product is formed from a canonic-signed-digit (CSD) recoding
// of the multiplier's mantissa.
//
// Stage 1 unpacks both operands, classifies them, forms the product sign
// (sign_unit) and the unnormalized exponent ea + eb - 127 (exp_unit), and
// recodes b's mantissa into the 50-bit CSD word (mant_csd_conv); a denormal
// operand enters without its hidden one and with exponent 1. Stage 2
// multiplies a's 24-bit significand by the CSD word with adds and subtracts
// of shifted copies (csd_mult). Stage 3 normalizes, rounds to nearest even and
// handles NaN, infinity, zero, denormal (gradual underflow), overflow and
// underflow (normalizer). Infinity and NaN operands give a meaningless
// significand product, which the normalizer ignores.
// Each stage ends in a register, so a result leaves LATENCY = 3 clock cycles
// after its operands enter, and a new operation is accepted every cycle
// (there is no stall). in_valid travels with the data; only the valid bits
// are reset (active-low, synchronous). The split into sign, exponent, CSD
// conversion, multiplication and normalization follows the document; the
// stage boundaries, reset and valid handshake are this design's choices.
module csd_fp_mul
  import fp_csd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  float32_t  a,          // multiplicand
  input  float32_t  b,          // multiplier, recoded to CSD
  output logic      out_valid,
  output float32_t  y,
  output fp_flags_t flags
);
  // ---------------- stage 1: unpack, sign, exponent, CSD conversion -------
  fp_class_e                cls_a, cls_b;
  logic                     s0;
  logic signed [EXPS_W-1:0] e0;
  logic        [SIG_W-1:0]  x0;
  logic        [CSD_W-1:0]  csd0;
  logic                     b_norm;

  logic [EXP_W-1:0]         ea_eff, eb_eff;

  assign cls_a  = classify(a);
  assign cls_b  = classify(b);
  assign b_norm = (cls_b == CLS_NORMAL);
  // a denormal has no hidden one and the exponent of the smallest normal
  assign x0     = {cls_a == CLS_NORMAL, a.man};
  assign ea_eff = (a.exp == '0) ? EXP_W'(1) : a.exp;
  assign eb_eff = (b.exp == '0) ? EXP_W'(1) : b.exp;

  sign_unit u_sign (.sa(a.sign), .sb(b.sign), .s(s0));
  exp_unit  u_exp  (.ea(ea_eff), .eb(eb_eff), .e(e0));
  mant_csd_conv u_conv (
    .man    (b.man),
    .hidden (b_norm),
    .csd    (csd0)
  );

  logic                     v1, s1;
  logic signed [EXPS_W-1:0] e1;
  logic        [SIG_W-1:0]  x1;
  logic        [CSD_W-1:0]  csd1;
  fp_class_e                ca1, cb1;

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    s1   <= s0;
    e1   <= e0;
    x1   <= x0;
    csd1 <= csd0;
    ca1  <= cls_a;
    cb1  <= cls_b;
  end

  // ---------------- stage 2: CSD multiplication ---------------------------
  logic [PROD_W-1:0] p1;
  csd_mult u_mult (.x(x1), .csd(csd1), .prod(p1));

  logic                     v2, s2;
  logic signed [EXPS_W-1:0] e2;
  logic        [PROD_W-1:0] p2;
  fp_class_e                ca2, cb2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    s2  <= s1;
    e2  <= e1;
    p2  <= p1;
    ca2 <= ca1;
    cb2 <= cb1;
  end

  // ---------------- stage 3: normalization and rounding -------------------
  float32_t  y2;
  fp_flags_t f2;
  normalizer u_norm (
    .s(s2), .e(e2), .prod(p2), .cls_a(ca2), .cls_b(cb2), .y(y2), .flags(f2)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v2;
    y     <= y2;
    flags <= f2;
  end
endmodule
