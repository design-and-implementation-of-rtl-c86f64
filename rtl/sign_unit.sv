// sign_unit: sign of the floating-point product.
//
// The product is negative exactly when one operand is negative, so the sign
// is the XOR of the two operand signs, as the document's sign block does.
// Purely combinational.
module sign_unit (
  input  logic sa,   // sign of the multiplicand
  input  logic sb,   // sign of the multiplier
  output logic s     // sign of the product
);
  assign s = sa ^ sb;
endmodule
