// Exhaustive test of the 8 x 8 Urdhva-Tiryagbhyam multiplier: all 65536
// operand pairs are compared with the simulator's own multiplication.
module urdhva_mul_tb;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  urdhva_mul dut (.a(a), .b(b), .p(p));

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
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d = %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
