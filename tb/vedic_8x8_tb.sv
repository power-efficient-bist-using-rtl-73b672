// vedic_8x8_tb: exhaustive check of the 8x8 Vedic multiplier.
//
// Applies all 65,536 operand pairs and compares the product with the
// behavioural a * b. Combinational block: each pair is checked 1 ns after it
// is applied.
module vedic_8x8_tb;

  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures <= 10) $display("FAIL: %0d * %0d gave %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
