// bs_lfsr_tb: self-checking test of the bit-swapping LFSR.
//
// Runs the default 8-bit generator and a 5-bit one (odd width) through a full
// period each and compares every step with a reference written out by hand:
// the recurrence s[t+1] = {s[t][6:0], s7^s5^s4^s3} for N = 8, and the swap
// pairs listed explicitly ((1,2),(3,4),(5,6) for N = 8, (1,2),(3,4) for N = 5,
// active while the last bit is 0). Also checks that the swapped sequence
// visits every non-zero word once, that the generator returns to its seed
// after 2^N - 1 steps, that `load` and reset restore the seed, and the
// transition counts over one period: every raw bit toggles 2^(N-1) times,
// every swapped bit 2^(N-1) - 2^(N-3) times, so each swapped pair saves
// 2^(N-2) transitions (64 for N = 8).
module bs_lfsr_tb;

  logic clk = 1'b0;
  logic rst_n;
  logic load8, en8, load5, en5;
  logic [7:0] state8, pattern8;
  logic [4:0] state5, pattern5;
  logic swap8, swap5;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_lfsr dut8 (
    .clk(clk), .rst_n(rst_n), .load(load8), .en(en8),
    .state(state8), .swap(swap8), .pattern(pattern8)
  );

  bs_lfsr #(.N(5), .TAPS(5'b10100), .SEED(5'h1B)) dut5 (
    .clk(clk), .rst_n(rst_n), .load(load5), .en(en5),
    .state(state5), .swap(swap5), .pattern(pattern5)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [7:0] ref_next8(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic logic [7:0] ref_swap8(input logic [7:0] s);
    if (s[7]) return s;
    return {s[7], s[6], s[4], s[5], s[2], s[3], s[0], s[1]};
  endfunction

  function automatic logic [4:0] ref_next5(input logic [4:0] s);
    return {s[3:0], s[4] ^ s[2]};
  endfunction

  function automatic logic [4:0] ref_swap5(input logic [4:0] s);
    if (s[4]) return s;
    return {s[4], s[2], s[3], s[0], s[1]};
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [7:0] s8, prev8, prevraw8;
    logic [4:0] s5;
    bit seen8 [256];
    bit seen5 [32];
    int raw_tr [8];
    int bs_tr [8];
    int swaps, noswaps;

    rst_n = 1'b0; load8 = 1'b0; en8 = 1'b0; load5 = 1'b0; en5 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(negedge clk);
    check(state8 == 8'h01, "N=8 reset value is the seed");
    check(state5 == 5'h1B, "N=5 reset value is the seed");

    // Hold: no enable, no change.
    repeat (3) @(negedge clk);
    check(state8 == 8'h01, "N=8 holds without enable");

    // Full period of the 8-bit generator.
    s8 = 8'h01; swaps = 0; noswaps = 0;
    foreach (raw_tr[i]) begin raw_tr[i] = 0; bs_tr[i] = 0; end
    en8 = 1'b1;
    for (int t = 0; t < 255; t++) begin
      check(state8 == s8, $sformatf("N=8 state step %0d: %02h vs %02h", t, state8, s8));
      check(pattern8 == ref_swap8(s8), $sformatf("N=8 pattern step %0d: %02h vs %02h", t, pattern8, ref_swap8(s8)));
      check(swap8 == ~s8[7], "N=8 selection line");
      check(!seen8[pattern8], $sformatf("N=8 pattern %02h repeated", pattern8));
      seen8[pattern8] = 1'b1;
      if (swap8) swaps++; else noswaps++;
      if (t > 0) begin
        for (int b = 0; b < 8; b++) begin
          if (prevraw8[b] != state8[b]) raw_tr[b]++;
          if (prev8[b] != pattern8[b]) bs_tr[b]++;
        end
      end
      prevraw8 = state8; prev8 = pattern8;
      s8 = ref_next8(s8);
      @(negedge clk);
    end
    en8 = 1'b0;
    // Wrap-around transition, last pattern back to the first.
    for (int b = 0; b < 8; b++) begin
      if (prevraw8[b] != state8[b]) raw_tr[b]++;
      if (prev8[b] != pattern8[b]) bs_tr[b]++;
    end
    check(state8 == 8'h01, "N=8 back to seed after 255 steps");
    check(!seen8[0], "N=8 never produces zero");
    check(swaps == 127 && noswaps == 128, $sformatf("N=8 swap count %0d/%0d", swaps, noswaps));
    for (int b = 0; b < 8; b++) begin
      check(raw_tr[b] == 128, $sformatf("raw bit %0d toggles %0d, expected 2^7", b + 1, raw_tr[b]));
      check(bs_tr[b] == (b < 6 ? 96 : 128), $sformatf("swapped bit %0d toggles %0d", b + 1, bs_tr[b]));
    end
    for (int k = 0; k < 3; k++)
      check((raw_tr[2*k] + raw_tr[2*k+1]) - (bs_tr[2*k] + bs_tr[2*k+1]) == 64,
            $sformatf("pair %0d saves 2^6 transitions", k));
    $display("N=8 transitions per period: conventional %0d, bit-swapped %0d",
             raw_tr.sum(), bs_tr.sum());

    // load mid-sequence.
    en8 = 1'b1;
    repeat (17) @(negedge clk);
    check(state8 != 8'h01, "N=8 moved away from seed");
    load8 = 1'b1;
    @(negedge clk);
    load8 = 1'b0; en8 = 1'b0;
    check(state8 == 8'h01, "N=8 load restores seed");

    // Full period of the odd-width generator.
    s5 = 5'h1B;
    en5 = 1'b1;
    for (int t = 0; t < 31; t++) begin
      check(state5 == s5, $sformatf("N=5 state step %0d", t));
      check(pattern5 == ref_swap5(s5), $sformatf("N=5 pattern step %0d: %02h vs %02h", t, pattern5, ref_swap5(s5)));
      check(!seen5[pattern5], "N=5 pattern repeated");
      seen5[pattern5] = 1'b1;
      s5 = ref_next5(s5);
      @(negedge clk);
    end
    en5 = 1'b0;
    check(state5 == 5'h1B, "N=5 back to seed after 31 steps");

    // Asynchronous reset mid-run.
    en8 = 1'b1;
    repeat (5) @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(state8 == 8'h01, "asynchronous reset restores seed");
    rst_n = 1'b1; en8 = 1'b0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
