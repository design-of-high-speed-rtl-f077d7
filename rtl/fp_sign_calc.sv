// Sign calculation of the floating-point multiplier.
//
// The product is positive when both operands have the same sign and
// negative otherwise, so the product sign is the exclusive OR of the two
// sign bits, as the multiplier's sign stage is described. Combinational.
module fp_sign_calc (
  input  logic s1,
  input  logic s2,
  output logic s
);
  assign s = s1 ^ s2;
endmodule
