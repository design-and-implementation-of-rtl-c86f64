// csd_mult: significand multiplier with a CSD-coded multiplier.
//
// x is the 24-bit significand of the multiplicand. csd holds 24 signed
// digits c_0..c_23 (2 bits each) and, above them, the hidden-one digit of
// weight 2^23. Every digit produces one term: +x<<i for a +1 digit, -x<<i for
// a -1 digit and 0 otherwise, so the product is obtained with additions and
// subtractions only, one per nonzero digit (at most 13 nonzero terms out of
// 25 for a canonic word). The 25 terms, padded to 32, are summed in a
// balanced binary adder tree of depth 5 (tree-height reduction rather than
// the linear chain of the document's reference CSD multiplier). All sums are
// taken modulo 2^48; the true product x * value(csd) lies in [0, 2^48), so
// the wrapped sum is exact. Add/subtract of shifted multiplicands per digit is
// the document's CSD multiplication; the tree shape is this design's choice.
// Combinational; the caller registers the product.
module csd_mult
  import fp_csd_pkg::*;
(
  input  logic [SIG_W-1:0]  x,     // multiplicand significand
  input  logic [CSD_W-1:0]  csd,   // CSD-coded multiplier
  output logic [PROD_W-1:0] prod   // x * value(csd)
);
  localparam int unsigned NTERM = CSD_DIGITS + 1;  // 25
  localparam int unsigned LEVELS = $clog2(NTERM);  // 5
  localparam int unsigned NPAD  = 1 << LEVELS;     // 32

  // Level 0: one signed term per digit.
  logic [PROD_W-1:0] term [NPAD];

  always_comb begin
    for (int i = 0; i < int'(NPAD); i++) begin
      logic [PROD_W-1:0] sh;
      csd_digit_t        d;
      int                pos;
      pos = (i == int'(CSD_DIGITS)) ? int'(MAN_W) : i;  // hidden digit weighs 2^23
      d   = (i < int'(NTERM)) ? csd[2*i +: 2] : CSD_ZERO;
      sh  = PROD_W'(x) << pos;
      unique case (d)
        CSD_POS: term[i] = sh;
        CSD_NEG: term[i] = ~sh + 1'b1;
        default: term[i] = '0;
      endcase
    end
  end

  // Adder tree: level l has NPAD >> l partial sums.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [PROD_W-1:0] s [NPAD >> l];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < NPAD; i++) begin : g_i
        assign s[i] = term[i];
      end
    end else begin : g_node
      for (genvar i = 0; i < (NPAD >> l); i++) begin : g_i
        assign s[i] = g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
      end
    end
  end

  assign prod = g_lvl[LEVELS].s[0];
endmodule
