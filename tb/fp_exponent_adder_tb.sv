// Exhaustive test of the exponent stage: for every pair of 8-bit biased
// exponents the output must equal e1 + e2 - 127 as a signed integer.
module fp_exponent_adder_tb;
  logic [7:0]        e1, e2;
  logic signed [9:0] e;
  int checks = 0, failures = 0;

  fp_exponent_adder dut (.e1(e1), .e2(e2), .e(e));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        e1 = 8'(i); e2 = 8'(j);
        #1;
        checks++;
        if (int'(e) != i + j - 127) begin
          failures++;
          if (failures < 10) $display("FAIL %0d + %0d - 127 = %0d", i, j, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
