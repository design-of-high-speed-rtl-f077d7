// Test of the multiplier's sign stage: all four sign combinations, with
// the expected sign taken from the rule "like signs give a positive
// product".
module fp_sign_calc_tb;
  logic s1, s2, s;
  int checks = 0, failures = 0;

  fp_sign_calc dut (.s1(s1), .s2(s2), .s(s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      s1 = i[1]; s2 = i[0];
      #1;
      checks++;
      if (s !== ((s1 == s2) ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL sign(%b,%b) = %b", s1, s2, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
