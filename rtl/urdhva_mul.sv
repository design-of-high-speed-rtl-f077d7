// Urdhva-Tiryagbhyam ("vertically and crosswise") unsigned multiplier.
//
// For an N x N multiply the product is formed column by column. Column k
// (k = 0 .. 2N-2) adds every crosswise bit product a[i] & b[k-i] together
// with the carry word handed on by column k-1. The low bit of that sum is
// product bit k; the remaining bits are the carry into column k+1. The final
// carry supplies the top product bits. With N = 8 this is 15 column adders of
// which 14 pass a carry on, chained in a ripple as the vertical-and-crosswise
// method describes; this ripple is the reason the method is only used for
// small operands and Karatsuba splitting is used above it.
//
// Interface: a, b are N-bit unsigned; p = a * b, 2N bits. Purely
// combinational, no clock. N = 8 is the leaf width of the mantissa
// multiplier; other widths are allowed.
module urdhva_mul #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // A column sum is at most N bit products plus a carry below 2N.
  localparam int unsigned CW = $clog2(2 * N + 1) + 1;

  always_comb begin
    logic [CW-1:0] carry;
    logic [CW-1:0] col;
    carry = '0;
    p     = '0;
    for (int k = 0; k <= 2 * N - 2; k++) begin
      col = carry;
      for (int i = 0; i < N; i++) begin
        if ((k - i) >= 0 && (k - i) < N)
          col = col + CW'(a[i] & b[k-i]);
      end
      p[k]  = col[0];
      carry = col >> 1;
    end
    p[2*N-1] = carry[0];
  end

endmodule
