// IEEE-754 single-precision floating-point adder / subtractor.
//
// r = a + b when sub = 0 and r = a - b when sub = 1. The operand of larger
// magnitude is selected, the other significand is shifted right by the
// exponent difference into a 27-bit field (24 significand bits plus guard,
// round and sticky bits; every bit shifted past the field is ORed into the
// sticky bit), and the two are added or subtracted according to the
// effective signs. The result is renormalized: a carry out shifts it one
// place right (exponent + 1); after a cancellation a leading-zero count
// shifts it left (exponent - count). The bits below the 24-bit significand
// are then dropped, so the result is rounded toward zero, matching the
// truncating multiplier.
//
// The butterflies need such an adder, but its structure is not specified;
// everything here is this design's choice: round toward zero, zero
// operands for a zero exponent field (subnormals flushed), results that
// underflow flushed to zero, results that overflow set to infinity, exact
// cancellation giving +0, infinity/NaN operands not treated specially.
//
// Interface: a, b, r are binary32 words, sub selects subtraction.
// Purely combinational.
module fp_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] r
);

  logic        sa, sb;
  logic        swap;
  logic        sx, sy;
  logic [7:0]  ex, ey, d;
  logic [23:0] mx, my;
  logic [26:0] xf, yf;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic [26:0] norm;
  logic signed [9:0] er;
  logic        carry_out, cancel, overflow, underflow;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;

    // Larger magnitude first; exponent and fraction compare as one number.
    swap = (b[30:0] > a[30:0]);
    sx = swap ? sb : sa;
    sy = swap ? sa : sb;
    ex = swap ? b[30:23] : a[30:23];
    ey = swap ? a[30:23] : b[30:23];
    mx = (ex == 8'd0) ? 24'd0 : {1'b1, (swap ? b[22:0] : a[22:0])};
    my = (ey == 8'd0) ? 24'd0 : {1'b1, (swap ? a[22:0] : b[22:0])};
    // A zero operand has no exponent weight; keep d from shifting a zero.
    d  = ex - ey;

    xf = {mx, 3'b000};
    if (d >= 8'd27) begin
      yf = {26'd0, |my};
    end else begin
      yf = {my, 3'b000} >> d;
      yf[0] = yf[0] | (|({my, 3'b000} & ((27'd1 << d) - 27'd1)));
    end

    if (sx == sy) sum = {1'b0, xf} + {1'b0, yf};
    else          sum = {1'b0, xf} - {1'b0, yf};

    lz = 5'd0;
    for (int i = 0; i <= 26; i++) begin
      if (sum[i]) lz = 5'(26 - i);
    end

    carry_out = sum[27];
    cancel    = 1'b0;
    if (sum[27]) begin
      norm = sum[27:1];
      er   = signed'({2'b00, ex}) + 10'sd1;
    end else begin
      norm   = sum[26:0] << lz;
      er     = signed'({2'b00, ex}) - signed'({5'b0, lz});
      cancel = (lz != 5'd0);
    end

    overflow  = 1'b0;
    underflow = 1'b0;
    if (ex == 8'd0) begin
      // Both operands are zero.
      r = {sx & sy, 31'd0};
    end else if (sum == 28'd0) begin
      r = 32'd0;
    end else if (er >= 10'sd255) begin
      overflow = 1'b1;
      r = {sx, 8'hFF, 23'd0};
    end else if (er <= 10'sd0) begin
      underflow = 1'b1;
      r = {sx, 31'd0};
    end else begin
      r = {sx, er[7:0], norm[25:3]};
    end
  end

endmodule
