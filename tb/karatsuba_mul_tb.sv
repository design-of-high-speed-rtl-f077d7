// Self-checking test of the Karatsuba / Urdhva-Tiryagbhyam multiplier at
// its default 32-bit width. Products are compared with the simulator's own
// 64-bit multiplication for corner operands (0, 1, all ones, single bits,
// halves that make the middle-term sums carry) and random operands.
module karatsuba_mul_tb;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;

  karatsuba_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp_p;
    a = x; b = y;
    #1;
    exp_p = 64'(x) * 64'(y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(1, 1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hFFFF_0000, 32'hFFFF_FFFF);
    check(32'h00FF_FFFF, 32'h00FF_FFFF);
    check(32'h0080_0000, 32'h00FF_FFFF);
    check(32'h8000_8000, 32'h8000_8000);
    for (int i = 0; i < 32; i++) check(32'd1 << i, 32'hDEAD_BEEF);
    for (int i = 0; i < 20000; i++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (i % 4 == 1) x = x | 32'hF0F0_F0F0;
      if (i % 4 == 2) begin x = x & 32'h00FF_FFFF; y = y & 32'h00FF_FFFF; end
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
