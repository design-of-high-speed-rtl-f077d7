// End-to-end test of the 8-point FFT at its default size.
//
// Three references are used:
//  * directed transforms with known exact results: an impulse at n = 0
//    (all X(k) = 1), a constant 1 (X(0) = 8, others 0) and a single tone;
//  * a bit-exact model of the radix-2 DIT network written here from the
//    fp_ref_pkg operations (bit-reversed input, three stages, twiddles
//    W8^(j*4/2^s)), compared bit for bit;
//  * the direct DFT X(k) = sum x(n) W8^(nk) in double precision, compared
//    with a tolerance of 2^-18 of the sum of input magnitudes.
// The test also counts, across all 12 butterflies, how often each
// data-dependent mechanism of the arithmetic occurred: multiplier
// normalization shift, multiplier overflow and underflow, adder carry-out,
// adder cancellation (left renormalization) and adder overflow. A mechanism
// that never occurred counts as a failure.
module fft8_tb;
  import fft_pkg::*;
  import fp_ref_pkg::*;

  localparam int NPT = 8;

  cplx_t x [NPT];
  cplx_t X [NPT];
  int checks = 0, failures = 0;
  int n_mshift = 0, n_movf = 0, n_munf = 0, n_acarry = 0, n_acancel = 0, n_aovf = 0;

  fft8 dut (.x(x), .X(X));

  // Mechanism flags of every butterfly (real-part multiplier and adder).
  logic [11:0] f_mshift, f_movf, f_munf, f_acarry, f_acancel, f_aovf;
  for (genvar s = 0; s < 3; s++) begin : g_s
    for (genvar q = 0; q < 4; q++) begin : g_q
      assign f_mshift[s*4+q]  = dut.g_stage[s].g_bf[q].u_bf.u_cmul.u_mul_rr.shifted;
      assign f_movf[s*4+q]    = dut.g_stage[s].g_bf[q].u_bf.u_cmul.u_mul_rr.overflow;
      assign f_munf[s*4+q]    = dut.g_stage[s].g_bf[q].u_bf.u_cmul.u_mul_rr.underflow;
      assign f_acarry[s*4+q]  = dut.g_stage[s].g_bf[q].u_bf.u_add_re.carry_out;
      assign f_acancel[s*4+q] = dut.g_stage[s].g_bf[q].u_bf.u_sub_re.cancel;
      assign f_aovf[s*4+q]    = dut.g_stage[s].g_bf[q].u_bf.u_add_re.overflow;
    end
  end

  function automatic cplx_t ref_cmul(input cplx_t p, input cplx_t q);
    cplx_t r;
    r.re = ref_add(ref_mul(p.re, q.re), ref_mul(p.im, q.im), 1'b1);
    r.im = ref_add(ref_mul(p.re, q.im), ref_mul(p.im, q.re), 1'b0);
    return r;
  endfunction

  function automatic cplx_t cadd(input cplx_t p, input cplx_t q, input logic sub);
    cplx_t r;
    r.re = ref_add(p.re, q.re, sub);
    r.im = ref_add(p.im, q.im, sub);
    return r;
  endfunction

  // Bit-exact model of the DIT network.
  task automatic model(output cplx_t y [NPT]);
    cplx_t v [NPT];
    int rev [NPT] = '{0, 4, 2, 6, 1, 5, 3, 7};
    for (int n = 0; n < NPT; n++) v[n] = x[rev[n]];
    for (int span = 1; span < NPT; span *= 2) begin
      for (int g = 0; g < NPT; g += 2 * span) begin
        for (int j = 0; j < span; j++) begin
          cplx_t t, u;
          t = ref_cmul(v[g+j+span], twiddle8(j * (NPT / (2 * span))));
          u = v[g+j];
          v[g+j]      = cadd(u, t, 1'b0);
          v[g+j+span] = cadd(u, t, 1'b1);
        end
      end
    end
    y = v;
  endtask

  task automatic apply_and_check(input bit dft_check);
    cplx_t y [NPT];
    #1;
    n_mshift  += $countones(f_mshift);
    n_movf    += $countones(f_movf);
    n_munf    += $countones(f_munf);
    n_acarry  += $countones(f_acarry);
    n_acancel += $countones(f_acancel);
    n_aovf    += $countones(f_aovf);
    model(y);
    for (int k = 0; k < NPT; k++) begin
      checks++;
      if (X[k] !== y[k]) begin
        failures++;
        if (failures < 10) $display("FAIL X[%0d] = (%h,%h), model (%h,%h)",
                                    k, X[k].re, X[k].im, y[k].re, y[k].im);
      end
    end
    if (dft_check) begin
      real mag, tol;
      mag = 0.0;
      for (int n = 0; n < NPT; n++) mag += (to_real(x[n].re) < 0 ? -to_real(x[n].re) : to_real(x[n].re))
                                          + (to_real(x[n].im) < 0 ? -to_real(x[n].im) : to_real(x[n].im));
      tol = mag * (2.0 ** -18) + 1.0e-30;
      for (int k = 0; k < NPT; k++) begin
        real sr, si, c, s, er, ei;
        sr = 0.0; si = 0.0;
        for (int n = 0; n < NPT; n++) begin
          c = $cos(2.0 * 3.14159265358979323846 * n * k / NPT);
          s = -$sin(2.0 * 3.14159265358979323846 * n * k / NPT);
          sr += to_real(x[n].re) * c - to_real(x[n].im) * s;
          si += to_real(x[n].re) * s + to_real(x[n].im) * c;
        end
        er = to_real(X[k].re) - sr;
        ei = to_real(X[k].im) - si;
        checks++;
        if (er > tol || -er > tol || ei > tol || -ei > tol) begin
          failures++;
          if (failures < 10) $display("FAIL DFT X[%0d] = (%g,%g), expected (%g,%g)",
                                      k, to_real(X[k].re), to_real(X[k].im), sr, si);
        end
      end
    end
  endtask

  function automatic fp32_t rnd(input int elo, input int ehi);
    return {1'($urandom), 8'($urandom_range(elo, ehi)), 23'($urandom)};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Impulse: every X(k) is exactly 1.
    foreach (x[n]) x[n] = '{re: (n == 0) ? FP_ONE : FP_ZERO, im: FP_ZERO};
    apply_and_check(1);
    foreach (X[k]) begin
      checks++;
      if (X[k].re !== FP_ONE || X[k].im[30:0] !== 31'd0) begin
        failures++;
        $display("FAIL impulse X[%0d] = (%h,%h)", k, X[k].re, X[k].im);
      end
    end
    // Constant 1: X(0) = 8, the rest zero.
    foreach (x[n]) x[n] = '{re: FP_ONE, im: FP_ZERO};
    apply_and_check(1);
    checks++;
    if (X[0].re !== 32'h4100_0000) begin
      failures++;
      $display("FAIL constant X[0] = %h", X[0].re);
    end
    // Tone x(n) = W8^(-n): energy only in X(1), close to 8.
    for (int n = 0; n < NPT; n++) begin
      cplx_t w;
      w = twiddle8(n % 4);
      if (n >= 4) begin w.re[31] = ~w.re[31]; w.im[31] = ~w.im[31]; end
      w.im[31] = ~w.im[31];                 // conjugate: W8^(-n)
      x[n] = w;
    end
    apply_and_check(1);
    checks++;
    if (to_real(X[1].re) < 7.9999 || to_real(X[1].re) > 8.0001) begin
      failures++;
      $display("FAIL tone X[1] = %g", to_real(X[1].re));
    end
    // Random spectra.
    for (int i = 0; i < 3000; i++) begin
      foreach (x[n]) x[n] = '{re: rnd(100, 150), im: rnd(100, 150)};
      apply_and_check(1);
    end
    // Values near the top of the range: sums and products overflow.
    for (int i = 0; i < 50; i++) begin
      foreach (x[n]) x[n] = '{re: rnd(250, 254), im: rnd(250, 254)};
      apply_and_check(0);
    end
    // Values near the bottom of the range: products underflow.
    for (int i = 0; i < 50; i++) begin
      foreach (x[n]) x[n] = '{re: rnd(1, 3), im: rnd(1, 3)};
      apply_and_check(0);
    end
    $display("mechanisms: mul_shift=%0d mul_overflow=%0d mul_underflow=%0d add_carry=%0d add_cancel=%0d add_overflow=%0d",
             n_mshift, n_movf, n_munf, n_acarry, n_acancel, n_aovf);
    checks++;
    if (n_mshift == 0 || n_movf == 0 || n_munf == 0 || n_acarry == 0 || n_acancel == 0 || n_aovf == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
