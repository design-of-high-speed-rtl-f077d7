// Test of the radix-2 butterfly: x = a + w*b, y = a - w*b. The expected
// outputs are composed from the fp_ref_pkg reference operations and
// compared bit for bit, for each of the four twiddles W8^0..W8^3 and for
// random twiddles.
module butterfly_tb;
  import fft_pkg::*;
  import fp_ref_pkg::*;

  cplx_t a, b, w, x, y;
  int checks = 0, failures = 0;

  butterfly dut (.a(a), .b(b), .w(w), .x(x), .y(y));

  task automatic check(input cplx_t ia, input cplx_t ib, input cplx_t iw);
    cplx_t t, ex, ey;
    a = ia; b = ib; w = iw;
    #1;
    t.re = ref_add(ref_mul(ib.re, iw.re), ref_mul(ib.im, iw.im), 1'b1);
    t.im = ref_add(ref_mul(ib.re, iw.im), ref_mul(ib.im, iw.re), 1'b0);
    ex.re = ref_add(ia.re, t.re, 1'b0);
    ex.im = ref_add(ia.im, t.im, 1'b0);
    ey.re = ref_add(ia.re, t.re, 1'b1);
    ey.im = ref_add(ia.im, t.im, 1'b1);
    checks++;
    if (x !== ex || y !== ey) begin
      failures++;
      if (failures < 10) $display("FAIL x=(%h,%h) y=(%h,%h), expected (%h,%h) (%h,%h)",
                                  x.re, x.im, y.re, y.im, ex.re, ex.im, ey.re, ey.im);
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
    // 1 and 2 through W = 1: x = 3, y = -1.
    check('{re: FP_ONE, im: FP_ZERO}, '{re: 32'h4000_0000, im: FP_ZERO}, twiddle8(0));
    checks++;
    if (x.re !== 32'h4040_0000 || y.re !== 32'hBF80_0000) begin
      failures++;
      $display("FAIL 1 +/- 2: x=%h y=%h", x.re, y.re);
    end
    for (int i = 0; i < 2000; i++)
      for (int k = 0; k < 4; k++)
        check('{re: rnd(), im: rnd()}, '{re: rnd(), im: rnd()}, twiddle8(k));
    for (int i = 0; i < 2000; i++)
      check('{re: rnd(), im: rnd()}, '{re: rnd(), im: rnd()}, '{re: rnd(), im: rnd()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
