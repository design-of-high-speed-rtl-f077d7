// Test of the single-precision adder/subtractor against a double-precision
// reference truncated to binary32 (fp_ref_pkg). Directed cases cover exact
// cancellation, cancellation of many leading bits, operands far apart in
// exponent (the small one only reaching the sticky bit), zeros, and
// overflow; random cases cover both operations and both sign relations.
module fp_add_tb;
  import fp_ref_pkg::*;

  logic [31:0] a, b, r;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .r(r));

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic s);
    logic [31:0] e;
    a = x; b = y; sub = s;
    #1;
    e = ref_add(x, y, s);
    checks++;
    if (r !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", y, r, e);
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
    check(32'h3F80_0000, 32'h3F80_0000, 0);       // 1 + 1
    check(32'h3F80_0000, 32'h3F80_0000, 1);       // 1 - 1 = +0
    check(32'h3F80_0001, 32'h3F80_0000, 1);       // massive cancellation
    check(32'h4B00_0000, 32'h3F80_0000, 1);       // 2^23 - 1
    check(32'h3F80_0000, 32'h2F80_0000, 1);       // 1 - 2^-32: sticky only
    check(32'h3F80_0000, 32'h2F80_0000, 0);       // 1 + 2^-32
    check(32'h0000_0000, 32'h4049_0FDB, 0);       // 0 + pi
    check(32'h4049_0FDB, 32'h0000_0000, 1);       // pi - 0
    check(32'h8000_0000, 32'h0000_0000, 1);       // -0 - 0 = -0
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 0);       // overflow
    for (int i = 0; i < 20000; i++) check(rnd(100, 150), rnd(100, 150), 1'($urandom));
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = rnd(100, 150);
      check(x, {x[31:23], 23'($urandom)}, 1'($urandom));   // equal exponents
    end
    for (int i = 0; i < 5000; i++) check(rnd(60, 190), rnd(60, 190), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
