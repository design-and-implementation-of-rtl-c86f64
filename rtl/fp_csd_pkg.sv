// fp_csd_pkg: types and constants shared by the CSD floating-point multiplier.
//
// IEEE-754 single precision word layout, the operand classes the normalizer
// distinguishes, the result flag bundle, and the 2-bit signed-digit code used
// for canonic signed digit (CSD) words. A CSD digit is held as a 2-bit two's
// complement number: 00 = 0, 01 = +1, 11 = -1 (10 is never produced). The
// single-precision field widths and the bias follow IEEE-754; the digit code
// is this design's reading of "01 ... equivalent to 1".
package fp_csd_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned MAN_W  = 23;
  localparam int unsigned SIG_W  = MAN_W + 1;         // significand with hidden one
  localparam int unsigned PROD_W = 2 * SIG_W;         // 48-bit significand product
  localparam int unsigned CSD_DIGITS = SIG_W;         // 24 digits for the zero-extended mantissa
  localparam int unsigned CSD_W  = 2 * CSD_DIGITS + 2; // 48 digit bits + hidden "01" = 50
  localparam int unsigned EXPS_W = 10;                // signed exponent sum
  localparam int signed   BIAS   = 127;

  typedef struct packed {
    logic             sign;
    logic [EXP_W-1:0] exp;
    logic [MAN_W-1:0] man;
  } float32_t;

  typedef logic [1:0] csd_digit_t;
  localparam csd_digit_t CSD_ZERO = 2'b00;
  localparam csd_digit_t CSD_POS  = 2'b01;
  localparam csd_digit_t CSD_NEG  = 2'b11;

  typedef enum logic [2:0] {
    CLS_ZERO   = 3'd0,
    CLS_DENORM = 3'd1,
    CLS_NORMAL = 3'd2,
    CLS_INF    = 3'd3,
    CLS_NAN    = 3'd4
  } fp_class_e;

  typedef struct packed {
    logic nan;
    logic inf;
    logic zero;
    logic ovf;   // exponent overflow, result forced to infinity
    logic unf;   // result below the normal range: denormal or rounded to zero
  } fp_flags_t;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic fp_class_e classify(input float32_t f);
    if (f.exp == '1)      return (f.man != '0) ? CLS_NAN : CLS_INF;
    else if (f.exp == '0) return (f.man != '0) ? CLS_DENORM : CLS_ZERO;
    else                  return CLS_NORMAL;
  endfunction

endpackage
