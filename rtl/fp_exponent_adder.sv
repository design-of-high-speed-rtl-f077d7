// Exponent stage of the floating-point multiplier.
//
// The two 8-bit biased exponents are added (first adder of the multiplier
// block diagram) and the single-precision bias 127 is then removed by a
// ripple-borrow subtractor (second adder, with the bias on its minus
// input), giving the biased exponent of the product before normalization.
// The ripple-borrow subtractor follows the described choice: the exponent
// path is far shorter than the mantissa multiplier, so a slow, small
// subtractor costs nothing.
//
// Interface: e1, e2 are biased exponents; e is e1 + e2 - 127 as a 10-bit
// two's complement number (range -127 .. 383), so that later stages can
// see overflow (e >= 255) and underflow (e <= 0). Combinational.
module fp_exponent_adder (
  input  logic [7:0]        e1,
  input  logic [7:0]        e2,
  output logic signed [9:0] e
);
  import fft_pkg::*;

  localparam logic [9:0] BIAS = 10'(EXP_BIAS);

  logic [9:0] sum;
  logic [9:0] diff;
  logic [10:0] borrow;

  assign sum = {2'b00, e1} + {2'b00, e2};

  // Ripple-borrow subtractor: sum - BIAS, one full subtractor per bit.
  assign borrow[0] = 1'b0;
  for (genvar i = 0; i < 10; i++) begin : g_rbs
    assign diff[i]     = sum[i] ^ BIAS[i] ^ borrow[i];
    assign borrow[i+1] = (~sum[i] & BIAS[i]) | (~(sum[i] ^ BIAS[i]) & borrow[i]);
  end

  assign e = signed'(diff);

endmodule
