// Normalizer of the floating-point multiplier.
//
// The product of two 24-bit significands 1.f1 and 1.f2 lies in [1, 4), so
// its leading one is either bit 47 or bit 46 of the 48-bit product. When it
// is bit 47 the binary point moves one place left and the exponent is
// incremented by one; otherwise the product is already normalized. The
// leading one is the hidden bit and is dropped; the 23 bits below it form
// the fraction. Bits below those are discarded (truncation, i.e. rounding
// toward zero), since no rounding step is part of the described datapath.
//
// Range handling is this design's own choice: a zero operand (zero_in)
// gives a signed zero, an exponent of 255 or more after normalization gives
// a signed infinity (overflow), and an exponent of 0 or less gives a signed
// zero (underflow; subnormal results are flushed to zero).
//
// Interface: sign, exp (biased, 10-bit signed, from the exponent stage),
// prod (48-bit significand product), zero_in; result is the packed binary32
// word. shifted, overflow and underflow report what happened.
// Combinational.
module fp_normalizer (
  input  logic               sign,
  input  logic signed [9:0]  exp,
  input  logic [47:0]        prod,
  input  logic               zero_in,
  output logic [31:0]        result,
  output logic               shifted,
  output logic               overflow,
  output logic               underflow
);

  logic signed [9:0] exp_n;
  logic [22:0]       frac;

  always_comb begin
    shifted = prod[47];
    if (prod[47]) begin
      frac  = prod[46:24];
      exp_n = exp + 10'sd1;
    end else begin
      frac  = prod[45:23];
      exp_n = exp;
    end

    overflow  = !zero_in && (exp_n >= 10'sd255);
    underflow = !zero_in && (exp_n <= 10'sd0);

    if (zero_in || underflow)
      result = {sign, 31'b0};
    else if (overflow)
      result = {sign, 8'hFF, 23'b0};
    else
      result = {sign, exp_n[7:0], frac};
  end

endmodule
