// signature_memory_tb: checks the power-up signature table, the one-clock read
// latency and the write port.
//
// The expected power-up word at address i is the product a * b of the
// default operand pair, written out here from its definition:
// a = (29*i + 7) mod 256, b = (167*i + 13) mod 256.
module signature_memory_tb;
  import bist_pkg::*;

  logic          clk = 1'b0;
  logic [7:0]    raddr, waddr;
  product_t      rdata, wdata;
  logic          we;
  int checks = 0, failures = 0;
  product_t      shadow [256];

  always #5 clk = ~clk;

  signature_memory dut (.clk(clk), .raddr(raddr), .rdata(rdata), .we(we), .waddr(waddr), .wdata(wdata));

  task automatic expect_word(input product_t exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL: %s: read %04h, expected %04h", what, rdata, exp);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] ea;
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int i = 0; i < 256; i++) begin
      shadow[i] = 16'(((29 * i + 7) & 255) * ((167 * i + 13) & 255));
    end
    // Power-up contents, read in address order; data one clock after address.
    @(negedge clk);
    for (int i = 0; i < 256; i++) begin
      raddr = 8'(i);
      @(posedge clk); #1;
      expect_word(shadow[i], $sformatf("power-up word %0d", i));
      @(negedge clk);
    end
    // Latency: output does not follow a new address before the clock edge.
    raddr = 8'd10;
    @(posedge clk); #1;
    raddr = 8'd11;
    #2;
    expect_word(shadow[10], "output held until next edge");
    // Random writes mirrored in the shadow table, then a full read-back.
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1'b1;
      waddr = 8'($urandom);
      wdata = product_t'($urandom);
      shadow[waddr] = wdata;
    end
    @(negedge clk);
    we = 1'b0;
    for (int i = 0; i < 256; i++) begin
      ea = 8'(255 - i);
      raddr = ea;
      @(posedge clk); #1;
      expect_word(shadow[ea], $sformatf("after writes word %0d", ea));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
