// operand_mux_tb: checks that check = 0 selects the data memory operands and
// check = 1 the manual operands, for random words in both modes.
module operand_mux_tb;
  import bist_pkg::*;

  logic          check;
  operand_pair_t mem_ops, manual_ops, cut_ops;
  int checks = 0, failures = 0;

  operand_mux dut (.check(check), .mem_ops(mem_ops), .manual_ops(manual_ops), .cut_ops(cut_ops));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int t = 0; t < 2000; t++) begin
      check      = t[0];
      mem_ops    = operand_pair_t'($urandom);
      manual_ops = operand_pair_t'($urandom);
      #1;
      checks++;
      if (cut_ops != (check ? manual_ops : mem_ops)) begin
        failures++;
        $display("FAIL: check=%0d mem=%04h manual=%04h out=%04h", check, mem_ops, manual_ops, cut_ops);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
