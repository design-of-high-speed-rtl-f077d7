// Shared types and constants for the single-precision FFT datapath.
//
// fp32_t is an IEEE-754 binary32 word (sign, 8-bit biased exponent, 23-bit
// fraction). cplx_t pairs two of them as a complex sample. The twiddle
// factors W8^k = exp(-j*2*pi*k/8) for k = 0..3 are given as binary32
// constants; 0x3F3504F3 is sqrt(2)/2 rounded to nearest.
package fft_pkg;

  typedef logic [31:0] fp32_t;

  typedef struct packed {
    fp32_t re;
    fp32_t im;
  } cplx_t;

  localparam int unsigned EXP_BIAS = 127;

  localparam fp32_t FP_ZERO     = 32'h0000_0000;
  localparam fp32_t FP_ONE      = 32'h3F80_0000;
  localparam fp32_t FP_NEG_ONE  = 32'hBF80_0000;
  localparam fp32_t FP_RSQRT2   = 32'h3F35_04F3;  // +0.70710677
  localparam fp32_t FP_NRSQRT2  = 32'hBF35_04F3;  // -0.70710677

  // W8^k for k = 0..3 (only these are needed by a radix-2 8-point FFT).
  function automatic cplx_t twiddle8(input int unsigned k);
    cplx_t w;
    unique case (k)
      0:       begin w.re = FP_ONE;     w.im = FP_ZERO;    end
      1:       begin w.re = FP_RSQRT2;  w.im = FP_NRSQRT2; end
      2:       begin w.re = FP_ZERO;    w.im = FP_NEG_ONE; end
      default: begin w.re = FP_NRSQRT2; w.im = FP_NRSQRT2; end
    endcase
    return w;
  endfunction

endpackage
