// float2fix: IEEE-754 single-precision to fixed-point converter.
//
// The output is a two's complement number of 1 + INT_W + FRAC_W bits with
// FRAC_W fraction bits (Q10.9 by default). The 24-bit significand is placed
// in a wide window and shifted right by 150 - FRAC_W - exp places
// (value * 2^FRAC_W = sig * 2^(exp - 150 + FRAC_W)); the bits shifted out
// round the result to nearest, ties to even. A magnitude beyond the format
// saturates to the largest positive or most negative code and raises ovf;
// infinity saturates the same way; NaN gives 0 and raises inv; zero and
// denormal inputs give 0. The widths are the document's; in the document this
// conversion is done by a vendor converter core, and the rounding and
// saturation here are this design's choices. Combinational.
module float2fix
  import fp_csd_pkg::*;
#(
  parameter int unsigned INT_W  = 10,
  parameter int unsigned FRAC_W = 9,
  localparam int unsigned W     = 1 + INT_W + FRAC_W
) (
  input  float32_t     f,
  output logic [W-1:0] fx,
  output logic         ovf,  // out of range, saturated
  output logic         inv   // NaN input
);
  // window: significand in the upper SIG_W bits, SIG_W+2 bits below it
  localparam int unsigned WIN = 2 * SIG_W + 2;
  localparam int signed   RSH0 = 150 - int'(FRAC_W);   // right shift that gives the integer

  logic [WIN-1:0]   win;
  logic [SIG_W:0]   mag;       // rounded magnitude
  logic [SIG_W-1:0] ipart;
  logic             guard, sticky, rnd;
  int               rsh;
  logic [SIG_W:0]   max_pos, max_neg;

  always_comb begin
    max_pos = (SIG_W+1)'((1 << (W-1)) - 1);
    max_neg = (SIG_W+1)'(1 << (W-1));
    rsh     = RSH0 - int'(f.exp);
    win     = '0;
    ipart   = '0;
    guard   = 1'b0;
    sticky  = 1'b0;
    rnd     = 1'b0;
    mag     = '0;
    fx      = '0;
    ovf     = 1'b0;
    inv     = 1'b0;
    if (f.exp == '1) begin
      if (f.man != '0) inv = 1'b1;
      else begin
        ovf = 1'b1;
        fx  = f.sign ? W'(max_neg) : W'(max_pos);
      end
    end else if (f.exp != '0) begin
      if (rsh <= 0) begin
        // magnitude >= 2^23 > any W <= 24 bit code
        ovf = 1'b1;
      end else if (rsh <= int'(SIG_W) + 1) begin
        win    = {1'b1, f.man, (WIN-SIG_W)'(0)} >> rsh;
        ipart  = win[WIN-1 -: SIG_W];
        guard  = win[WIN-SIG_W-1];
        sticky = |win[WIN-SIG_W-2:0];
        rnd    = guard & (sticky | ipart[0]);
        mag    = {1'b0, ipart} + (SIG_W+1)'(rnd);
        ovf    = f.sign ? (mag > max_neg) : (mag > max_pos);
      end
      // rsh > SIG_W+1: magnitude below 1/2 LSB, rounds to 0
      if (ovf) fx = f.sign ? W'(max_neg) : W'(max_pos);
      else     fx = f.sign ? W'(~mag + 1'b1) : W'(mag);
    end
  end
endmodule
