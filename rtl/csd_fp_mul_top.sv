// csd_fp_mul_top: fixed-point and floating-point multiplier built around the
// pipelined CSD single-precision multiplier.
//
// Operands arrive either as IEEE-754 single-precision words (a, b) or as
// two's complement fixed-point numbers with INT_W integer and FRAC_W fraction
// bits (fa, fb; Q10.9 by default); in_fixed picks which pair is used for the
// operation entering in this cycle. Fixed-point operands are first converted
// to floating point (fix2float, exact). The pair is multiplied by csd_fp_mul,
// whose multiplier operand is recoded into canonic signed digits, and the
// floating-point product is given on y with its flags, and also converted
// back to fixed point (float2fix, rounded and saturated) on fy.
// Timing: a result appears with out_valid 3 clock cycles after in_valid; one
// operation is accepted every cycle. The converter-multiplier-converter chain
// follows the document; the operand select and the fixed-point output format
// (the same as the input format) are this design's choices.
module csd_fp_mul_top
  import fp_csd_pkg::*;
#(
  parameter int unsigned INT_W  = 10,
  parameter int unsigned FRAC_W = 9,
  localparam int unsigned W     = 1 + INT_W + FRAC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         in_fixed,   // 1: multiply fa * fb, 0: multiply a * b
  input  logic [W-1:0] fa,
  input  logic [W-1:0] fb,
  input  float32_t     a,
  input  float32_t     b,
  output logic         out_valid,
  output float32_t     y,          // floating-point product
  output fp_flags_t    flags,
  output logic [W-1:0] fy,         // product in the fixed-point format
  output logic         fy_ovf,     // fy saturated
  output logic         fy_inv      // product was NaN, fy is 0
);
  float32_t fa_f, fb_f, op_a, op_b;

  fix2float #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_cvt_a (.fx(fa), .f(fa_f));
  fix2float #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_cvt_b (.fx(fb), .f(fb_f));

  assign op_a = in_fixed ? fa_f : a;
  assign op_b = in_fixed ? fb_f : b;

  csd_fp_mul u_mul (
    .clk, .rst_n, .in_valid,
    .a(op_a), .b(op_b),
    .out_valid, .y, .flags
  );

  float2fix #(.INT_W(INT_W), .FRAC_W(FRAC_W)) u_cvt_y (
    .f(y), .fx(fy), .ovf(fy_ovf), .inv(fy_inv)
  );
endmodule
