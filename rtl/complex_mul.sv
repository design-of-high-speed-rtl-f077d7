// Complex multiplier on single-precision operands.
//
// p = a * b = (ar*br - ai*bi) + j(ar*bi + ai*br), computed with four
// floating-point multipliers (Karatsuba / Urdhva-Tiryagbhyam significand
// multiply) and one subtractor and one adder. The direct four-multiply
// form is this design's choice; it keeps every complex product on the
// proposed multiplier. All results are rounded toward zero.
//
// Interface: a, b, p are complex samples (fft_pkg::cplx_t).
// Purely combinational.
module complex_mul
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t p
);

  fp32_t rr, ii, ri, ir;

  fp_mul u_mul_rr (.a(a.re), .b(b.re), .p(rr));
  fp_mul u_mul_ii (.a(a.im), .b(b.im), .p(ii));
  fp_mul u_mul_ri (.a(a.re), .b(b.im), .p(ri));
  fp_mul u_mul_ir (.a(a.im), .b(b.re), .p(ir));

  fp_add u_add_re (.a(rr), .b(ii), .sub(1'b1), .r(p.re));
  fp_add u_add_im (.a(ri), .b(ir), .sub(1'b0), .r(p.im));

endmodule
