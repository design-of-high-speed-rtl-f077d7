// Radix-2 decimation-in-time butterfly on single-precision complex samples.
//
// The lower input is multiplied by the twiddle factor, t = w * b, in a
// complex multiplier built on the floating-point multiplier; the outputs
// are x = a + t and y = a - t, formed by four floating-point adders. This
// is the unit the FFT is assembled from; its internal form (DIT, the full
// complex multiply even for trivial twiddles) is this design's choice.
//
// Interface: a, b are the upper and lower input samples, w the twiddle
// factor, x and y the upper and lower outputs (fft_pkg::cplx_t).
// Purely combinational.
module butterfly
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  input  cplx_t w,
  output cplx_t x,
  output cplx_t y
);

  cplx_t t;

  complex_mul u_cmul (.a(b), .b(w), .p(t));

  fp_add u_add_re (.a(a.re), .b(t.re), .sub(1'b0), .r(x.re));
  fp_add u_add_im (.a(a.im), .b(t.im), .sub(1'b0), .r(x.im));
  fp_add u_sub_re (.a(a.re), .b(t.re), .sub(1'b1), .r(y.re));
  fp_add u_sub_im (.a(a.im), .b(t.im), .sub(1'b1), .r(y.im));

endmodule
