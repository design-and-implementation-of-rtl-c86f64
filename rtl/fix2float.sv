// fix2float: fixed-point to IEEE-754 single-precision converter.
//
// The input is a two's complement number of 1 + INT_W + FRAC_W bits with
// FRAC_W fraction bits (Q10.9, 20 bits, by default). Its magnitude is taken,
// the leading one located, and the magnitude shifted so that the leading one
// becomes the hidden bit; the exponent is position - FRAC_W + 127. Every
// 20-bit value fits in the 24-bit significand, so the conversion is exact and
// needs no rounding (an assertion holds the width to 24 bits). Zero gives +0.
// The fixed-point widths are the document's; in the document this conversion
// is done by a vendor converter core, and this module is a plain-logic
// equivalent. Combinational.
module fix2float
  import fp_csd_pkg::*;
#(
  parameter int unsigned INT_W  = 10,
  parameter int unsigned FRAC_W = 9,
  localparam int unsigned W     = 1 + INT_W + FRAC_W
) (
  input  logic [W-1:0] fx,
  output float32_t     f
);
  logic [W-1:0]     mag;
  logic [$clog2(W)-1:0] lead;
  logic             nz;
  logic [MAN_W:0]   sig;      // magnitude with its leading one at bit MAN_W

  always_comb begin
    mag  = fx[W-1] ? (~fx + 1'b1) : fx;   // -2^(W-1) gives 2^(W-1), still W bits
    lead = '0;
    nz   = 1'b0;
    for (int i = 0; i < int'(W); i++) begin
      if (mag[i]) begin
        lead = ($clog2(W))'(i);
        nz   = 1'b1;
      end
    end
    sig = (MAN_W+1)'(mag) << (int'(MAN_W) - int'(lead));
    f   = '0;
    if (nz) begin
      f.sign = fx[W-1];
      f.exp  = EXP_W'(int'(lead) - int'(FRAC_W) + BIAS);
      f.man  = sig[MAN_W-1:0];
    end
  end

  initial assert (W <= SIG_W) else $error("fix2float: %0d-bit input does not fit the significand", W);
endmodule
