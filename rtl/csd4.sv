// csd4: 4-bit binary-to-CSD conversion slice built from four One Bit CSD
// cells.
//
// The cells are chained through their gamma signal. The slice needs the bit
// just below it (a_below) and the bit just above it (a_above) so that several
// slices can be joined into a wider converter with their g_out -> g_in chain.
// Digit k of the output sits in c[2k+1:2k]. The four-cell structure is the
// document's 4-bit module; the port names are this design's. Combinational.
module csd4
  import fp_csd_pkg::*;
(
  input  logic [3:0] a,       // binary bits a_{i+3} .. a_i
  input  logic       a_below, // a_{i-1}
  input  logic       a_above, // a_{i+4}
  input  logic       g_in,    // gamma from the slice below
  output logic       g_out,   // gamma to the slice above
  output logic [7:0] c        // four CSD digits, 2 bits each
);
  logic [4:0] g;     // gamma chain, g[0] = g_in
  logic [5:0] ax;    // a extended by one bit on each side
  assign ax   = {a_above, a, a_below};
  assign g[0] = g_in;

  for (genvar k = 0; k < 4; k++) begin : g_cell
    obcsd u_cell (
      .a_prev (ax[k]),
      .a_cur  (ax[k+1]),
      .a_next (ax[k+2]),
      .g_in   (g[k]),
      .g_out  (g[k+1]),
      .c      (c[2*k +: 2])
    );
  end

  assign g_out = g[4];
endmodule
