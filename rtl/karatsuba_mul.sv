// Karatsuba unsigned multiplier with Urdhva-Tiryagbhyam leaves.
//
// An operand wider than LEAF bits is split into a high half a1 and a low
// half a0 (H = ceil(W/2) bits each). Three half-size products are formed:
//   z2 = a1*b1,  z0 = a0*b0,  m = (a1+a0)*(b1+b0)
// and the result is z2*2^(2H) + (m - z2 - z0)*2^H + z0 (the "shifting and
// adding" stage). The sums a1+a0 are H+1 bits wide; their top (carry) bits
// are handled with shifted additions so that m also uses an H x H
// multiplier: with sa = ca*2^H + ra, m = ra*rb + ((ca*rb + cb*ra) << H)
// + (ca&cb) << 2H. Each half-size product is this module again, so the
// splitting recurses until the operand is LEAF bits wide, where an
// Urdhva-Tiryagbhyam multiplier takes over.
//
// The recursive split down to 8-bit Urdhva-Tiryagbhyam leaves is the
// documented structure; the carry handling of the middle product is this
// design's own choice. With W = 32 the tree has 9 leaves of 8 x 8 bits.
//
// Interface: p = a * b for W-bit unsigned a, b; p is 2W bits.
// Purely combinational.
//
// Lint note: Verilator reports z0, z2 and zm as undriven. They are driven
// by the recursive instances; Verilator's lint looks at the template copy
// it keeps of a self-instantiating module, and simulation of the same code
// (with all sizes elaborated) shows every product bit driven and correct.
module karatsuba_mul #(
  parameter int unsigned W    = 32,
  parameter int unsigned LEAF = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  if (W <= LEAF) begin : g_leaf
    logic [2*LEAF-1:0] p_leaf;
    urdhva_mul #(.N(LEAF)) u_ut (
      .a (LEAF'(a)),
      .b (LEAF'(b)),
      .p (p_leaf)
    );
    assign p = p_leaf[2*W-1:0];
  end else begin : g_split
    localparam int unsigned H  = (W + 1) / 2;   // half width
    localparam int unsigned PW = 4 * H + 2;     // working width for the sums

    logic [H-1:0]   a0, a1, b0, b1;
    logic [H:0]     sa, sb;
    logic [2*H-1:0] z0, z2, zm;
    logic [PW-1:0]  m, mid, total;

    assign a0 = a[H-1:0];
    assign b0 = b[H-1:0];
    assign a1 = H'(a >> H);
    assign b1 = H'(b >> H);
    assign sa = {1'b0, a0} + {1'b0, a1};
    assign sb = {1'b0, b0} + {1'b0, b1};

    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_hi  (.a(a1),        .b(b1),        .p(z2));
    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_lo  (.a(a0),        .b(b0),        .p(z0));
    karatsuba_mul #(.W(H), .LEAF(LEAF)) u_mid (.a(sa[H-1:0]), .b(sb[H-1:0]), .p(zm));

    always_comb begin
      m = PW'(zm);
      if (sa[H]) m = m + (PW'(sb[H-1:0]) << H);
      if (sb[H]) m = m + (PW'(sa[H-1:0]) << H);
      if (sa[H] && sb[H]) m = m + (PW'(1) << (2 * H));
      mid   = m - PW'(z2) - PW'(z0);
      total = (PW'(z2) << (2 * H)) + (mid << H) + PW'(z0);
    end

    assign p = total[2*W-1:0];
  end

endmodule
