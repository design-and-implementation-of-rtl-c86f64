// obcsd: One Bit CSD cell, one step of the binary-to-canonic-signed-digit
// recurrence.
//
// For bit i of a two's complement number a:
//   theta_i = a_i xor a_{i-1}
//   gamma_i = (not gamma_{i-1}) and theta_i
//   c_i     = (1 - 2*a_{i+1}) * gamma_i
// gamma marks a nonzero digit; a nonzero digit is never followed by another
// one, which is what makes the output canonic (no two adjacent nonzero
// digits). The digit is +1 when the bit above is 0 and -1 when it is 1.
// Cells are chained through gamma (g_in from the bit below, g_out to the bit
// above). The recurrence is the document's; the 2-bit digit code
// (00 = 0, 01 = +1, 11 = -1) is this design's reading of it. Combinational.
module obcsd
  import fp_csd_pkg::*;
(
  input  logic       a_prev, // a_{i-1} (0 below the LSB)
  input  logic       a_cur,  // a_i
  input  logic       a_next, // a_{i+1} (sign extension above the MSB)
  input  logic       g_in,   // gamma_{i-1} (0 below the LSB)
  output logic       g_out,  // gamma_i
  output csd_digit_t c       // digit c_i
);
  assign g_out = ~g_in & (a_cur ^ a_prev);
  assign c     = {g_out & a_next, g_out};
endmodule
