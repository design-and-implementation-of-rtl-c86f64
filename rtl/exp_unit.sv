// exp_unit: exponent of the floating-point product before normalization.
//
// Adds the two biased exponents and removes one bias, e = ea + eb - BIAS, so
// the result is again biased. It is kept as a signed EXPS_W-bit value
// (-127..383 for 8-bit inputs) so that the normalizer can still see an
// exponent that has left the 1..254 range and report overflow or underflow.
// The add-and-unbias rule is the document's; the 10-bit signed width is this
// design's choice. Purely combinational.
module exp_unit
  import fp_csd_pkg::*;
#(
  parameter int signed BIAS_P = BIAS
) (
  input  logic        [EXP_W-1:0]  ea,  // biased exponent of a
  input  logic        [EXP_W-1:0]  eb,  // biased exponent of b
  output logic signed [EXPS_W-1:0] e    // ea + eb - bias
);
  assign e = signed'({2'b00, ea}) + signed'({2'b00, eb}) - EXPS_W'(BIAS_P);
endmodule
