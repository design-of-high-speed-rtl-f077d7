// Reference arithmetic for the testbenches, computed with the simulator's
// double-precision reals instead of the RTL's integer datapath.
//
// to_real converts a binary32 word to a real exactly (zero exponent field
// taken as zero). rz converts a real to binary32 rounding toward zero, with
// results below the normal range flushed to a signed zero and results above
// it set to infinity. A product of two binary32 values is exact in double
// precision (48 significant bits), so ref_mul is the exact truncated
// product. A sum is exact in double precision when the exponents differ by
// at most 28; beyond that ref_add uses the fact that the small operand only
// moves a truncated result toward zero by one unit (opposite signs) or not
// at all (same signs).
package fp_ref_pkg;

  function automatic real to_real(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] rz(input real r);
    logic [63:0] d;
    int e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  function automatic logic [31:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    return rz(to_real(a) * to_real(b));
  endfunction

  function automatic logic [31:0] ref_add(input logic [31:0] a, input logic [31:0] b,
                                          input logic sub);
    logic [31:0] bb, big;
    int ea, eb;
    bb = {b[31] ^ sub, b[30:0]};
    ea = int'(a[30:23]);
    eb = int'(bb[30:23]);
    if (ea == 0 || eb == 0 || (ea - eb) <= 28 && (eb - ea) <= 28)
      return rz(to_real(a) + to_real(bb));
    big = (ea > eb) ? a : bb;
    if (a[31] == bb[31]) return big;
    return big - 32'd1;
  endfunction

  function automatic bit same(input logic [31:0] x, input logic [31:0] y);
    return x == y;
  endfunction

endpackage
