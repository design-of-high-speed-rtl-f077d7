// Test of the single-precision multiplier against the exact double-precision
// product truncated to binary32 (fp_ref_pkg). Covers directed values
// (1 * 1, 1.5 * 1.5, zero operands, overflow, underflow, sqrt(2)/2 squared),
// random operands of moderate range, and random operands whose exponents
// reach overflow and underflow.
module fp_mul_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [31:0] e;
    a = x; b = y;
    #1;
    e = ref_mul(x, y);
    checks++;
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, e);
    end
  endtask

  function automatic logic [31:0] rnd(input int elo, input int ehi);
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
    check(32'h3F80_0000, 32'h3F80_0000);          // 1 * 1 = 1
    check(32'h3FC0_0000, 32'hBFC0_0000);          // 1.5 * -1.5 = -2.25
    check(32'h0000_0000, 32'h4049_0FDB);          // 0 * pi
    check(32'h8000_0000, 32'h4049_0FDB);          // -0 * pi
    check(32'h7F00_0000, 32'h4000_0000);          // 2^127 * 2 overflows
    check(32'h0080_0000, 32'h3F00_0000);          // 2^-126 * 0.5 underflows
    check(32'h3F35_04F3, 32'h3F35_04F3);          // (sqrt(2)/2)^2
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);          // largest significands
    for (int i = 0; i < 20000; i++) check(rnd(64, 190), rnd(64, 190));
    for (int i = 0; i < 5000; i++)  check(rnd(1, 254), rnd(1, 254));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
