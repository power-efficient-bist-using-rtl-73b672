// response_analyzer_tb: checks valid / mismatch for equal words, words that
// differ in a single bit (every bit position), random words, and with the
// compare slot disabled.
module response_analyzer_tb;
  import bist_pkg::*;

  logic     enable, valid, mismatch;
  product_t product, signature;
  int checks = 0, failures = 0;

  response_analyzer dut (
    .enable(enable), .product(product), .signature(signature),
    .valid(valid), .mismatch(mismatch)
  );

  task automatic apply(input logic en, input product_t p, input product_t s);
    logic exp_valid, exp_mis;
    enable = en; product = p; signature = s;
    #1;
    exp_valid = en && (p == s);
    exp_mis   = en && (p != s);
    checks++;
    if (valid !== exp_valid || mismatch !== exp_mis) begin
      failures++;
      $display("FAIL: en=%0d p=%04h s=%04h valid=%0d mismatch=%0d", en, p, s, valid, mismatch);
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    product_t w;
    for (int t = 0; t < 500; t++) begin
      w = product_t'($urandom);
      apply(1'b1, w, w);
      for (int b = 0; b < PROD_W; b++) apply(1'b1, w, w ^ (product_t'(1) << b));
      apply(1'b1, w, product_t'($urandom));
      apply(1'b0, w, w);
      apply(1'b0, w, ~w);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
