// Test of the multiplier's normalizer. Random 48-bit significand products
// in [1, 4) (bits 47..46 not both zero) and random exponents are applied;
// the expected word is the real value prod * 2^(exp - 127 - 46) converted
// to binary32 with truncation, overflow to infinity and underflow to zero.
// Also checks the zero input and the shift/overflow/underflow flags, and
// that each of the three cases occurred.
module fp_normalizer_tb;
  import fp_ref_pkg::*;

  logic              sign, zero_in;
  logic signed [9:0] exp;
  logic [47:0]       prod;
  logic [31:0]       result;
  logic              shifted, overflow, underflow;
  int checks = 0, failures = 0;
  int n_shift = 0, n_ovf = 0, n_unf = 0;

  fp_normalizer dut (.*);

  task automatic check_one(input logic s, input int e, input logic [47:0] pr, input logic z);
    real v;
    logic [31:0] expv;
    sign = s; exp = 10'(e); prod = pr; zero_in = z;
    #1;
    v = real'(pr) * (2.0 ** (e - 127 - 46));
    if (s) v = -v;
    expv = z ? {s, 31'd0} : rz(v);
    checks++;
    if (result !== expv || shifted !== (real'(pr) >= 2.0 ** 47)) begin
      failures++;
      if (failures < 10) $display("FAIL s=%b e=%0d prod=%h z=%b -> %h expected %h", s, e, pr, z, result, expv);
    end
    if (!z) begin
      checks++;
      if (overflow !== (expv[30:23] == 8'hFF) || underflow !== (expv[30:0] == 31'd0)) begin
        failures++;
        $display("FAIL flags ovf=%b unf=%b for %h", overflow, underflow, expv);
      end
    end
    n_shift += int'(shifted && !z);
    n_ovf   += int'(overflow);
    n_unf   += int'(underflow);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(0, 127, 48'h4000_0000_0000, 0);   // 1.0
    check_one(1, 127, 48'h8000_0000_0000, 0);   // -2.0
    check_one(0, 254, 48'h8000_0000_0000, 0);   // overflows after the shift
    check_one(0, 0,   48'h7FFF_FFFF_FFFF, 0);   // underflow
    check_one(1, 100, 48'h5555_5555_5555, 1);   // zero operand
    for (int i = 0; i < 20000; i++) begin
      logic [47:0] pr;
      pr = {$urandom, $urandom};
      if (pr[47:46] == 2'b00) pr[46] = 1'b1;
      check_one(1'($urandom), int'($urandom_range(0, 384)) - 127, pr, 1'($urandom_range(0, 15) == 0));
    end
    checks++;
    if (n_shift == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL case not reached: shift=%0d ovf=%0d unf=%0d", n_shift, n_ovf, n_unf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
