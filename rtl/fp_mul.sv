// IEEE-754 single-precision floating-point multiplier.
//
// The product of s1*2^e1 and s2*2^e2 is (s1*s2)*2^(e1+e2). The datapath has
// the four stages of the multiplier block diagram:
//   * sign calculation: XOR of the two sign bits (fp_sign_calc);
//   * exponent: add the biased exponents and subtract the bias 127 with a
//     ripple-borrow subtractor (fp_exponent_adder);
//   * significand: the 24-bit significands 1.f (hidden one restored) are
//     multiplied by the Karatsuba / Urdhva-Tiryagbhyam multiplier. They are
//     zero-extended to 32 bits so that the Karatsuba split halves cleanly
//     32 -> 16 -> 8 and every leaf is an 8 x 8 Urdhva-Tiryagbhyam block;
//     the zero-extension is this design's choice;
//   * normalization and packing (fp_normalizer), with truncation.
//
// Operands with a zero exponent field are taken as zero (subnormals are
// flushed). Infinity and NaN operands are not treated specially.
//
// Interface: a, b, p are binary32 words; p = a * b rounded toward zero.
// Purely combinational.
module fp_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] p
);

  logic              sign;
  logic signed [9:0] exp_sum;
  logic [31:0]       ma, mb;
  logic [63:0]       mprod;
  logic              zero_in;
  logic              shifted, overflow, underflow;

  fp_sign_calc u_sign (
    .s1 (a[31]),
    .s2 (b[31]),
    .s  (sign)
  );

  fp_exponent_adder u_exp (
    .e1 (a[30:23]),
    .e2 (b[30:23]),
    .e  (exp_sum)
  );

  assign ma = {8'b0, 1'b1, a[22:0]};
  assign mb = {8'b0, 1'b1, b[22:0]};

  karatsuba_mul #(.W(32), .LEAF(8)) u_mant (
    .a (ma),
    .b (mb),
    .p (mprod)
  );

  assign zero_in = (a[30:23] == 8'd0) || (b[30:23] == 8'd0);

  fp_normalizer u_norm (
    .sign      (sign),
    .exp       (exp_sum),
    .prod      (mprod[47:0]),
    .zero_in   (zero_in),
    .result    (p),
    .shifted   (shifted),
    .overflow  (overflow),
    .underflow (underflow)
  );

endmodule
