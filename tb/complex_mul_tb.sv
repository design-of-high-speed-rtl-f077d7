// Test of the complex multiplier. The expected result is composed from the
// reference operations of fp_ref_pkg in the documented order
// (re = ar*br - ai*bi, im = ar*bi + ai*br, each step truncated to binary32)
// and compared bit for bit. Directed cases multiply by the FFT twiddles
// 1, -j and (1-j)/sqrt(2); random cases use random complex operands.
module complex_mul_tb;
  import fft_pkg::*;
  import fp_ref_pkg::*;

  cplx_t a, b, p;
  int checks = 0, failures = 0;

  complex_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input cplx_t x, input cplx_t y);
    cplx_t e;
    a = x; b = y;
    #1;
    e.re = ref_add(ref_mul(x.re, y.re), ref_mul(x.im, y.im), 1'b1);
    e.im = ref_add(ref_mul(x.re, y.im), ref_mul(x.im, y.re), 1'b0);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL (%h,%h)*(%h,%h) = (%h,%h), expected (%h,%h)",
                                  x.re, x.im, y.re, y.im, p.re, p.im, e.re, e.im);
    end
  endtask

  function automatic fp32_t rnd();
    return {1'($urandom), 8'($urandom_range(110, 140)), 23'($urandom)};
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) check('{re: rnd(), im: rnd()}, twiddle8(k));
    check('{re: FP_ONE, im: FP_ZERO}, '{re: FP_ONE, im: FP_ZERO});
    check('{re: FP_ZERO, im: FP_ONE}, '{re: FP_ZERO, im: FP_ONE});   // j*j = -1
    for (int i = 0; i < 10000; i++) check('{re: rnd(), im: rnd()}, '{re: rnd(), im: rnd()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
