// mant_csd_conv: converts a single-precision mantissa into the 50-bit CSD
// word used as the multiplier.
//
// The 23-bit mantissa is zero-extended to a 24-bit non-negative two's
// complement number and recoded into 24 canonic signed digits (48 bits) by a
// chain of 4-bit CSD slices; bits below the LSB and the gamma start are 0 and
// the bit above the MSB is the sign extension (0). The digit "01" (+1) is then
// placed above the 48 bits for the hidden one of a normal operand, giving
//   value = hidden * 2^MAN_W + sum_i c_i * 2^i ,
// the 24-bit significand. The hidden digit therefore weighs 2^23, the same as
// the top CSD digit. Mantissa width, the 48 + 2 bit layout and the chain of
// 4-bit slices follow the document; treating the extra digit as the hidden
// one is this design's reading. Some output bits are trivial by
// construction: the hidden digit is never -1 (bit 49 is 0, bit 48 is the
// hidden input), the non-negative mantissa never gives c_23 = -1 (bit 47 is
// 0), and c_0 is nonzero exactly when man[0] is 1 (bit 0 is man[0]).
// Combinational.
module mant_csd_conv
  import fp_csd_pkg::*;
(
  input  logic [MAN_W-1:0] man,    // mantissa field
  input  logic             hidden, // 1 for a normal operand
  output logic [CSD_W-1:0] csd     // {hidden digit, c_23 .. c_0}
);
  localparam int unsigned SLICES = CSD_DIGITS / 4;   // 6

  logic [CSD_DIGITS-1:0] a;       // zero-extended mantissa
  logic [CSD_DIGITS+1:0] ax;      // {sign ext, a, 0 below LSB}
  logic [SLICES:0]       g;

  assign a    = {1'b0, man};
  assign ax   = {a[CSD_DIGITS-1], a, 1'b0};
  assign g[0] = 1'b0;

  for (genvar s = 0; s < SLICES; s++) begin : g_slice
    csd4 u_slice (
      .a       (ax[4*s+1 +: 4]),
      .a_below (ax[4*s]),
      .a_above (ax[4*s+5]),
      .g_in    (g[s]),
      .g_out   (g[s+1]),
      .c       (csd[8*s +: 8])
    );
  end

  assign csd[CSD_W-1 -: 2] = hidden ? CSD_POS : CSD_ZERO;
endmodule
