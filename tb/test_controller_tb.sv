// test_controller_tb: checks the BIST sequencing against a cycle-by-cycle
// reference.
//
// Runs with the default RUN_LEN = 255 and checks, each clock: the generator
// is held at its seed in normal mode, exactly 255 advance pulses are issued
// in a run, compare slots trail them by one clock, `done` rises 257 clocks
// after check falls (256 after RUN is entered), the mismatch counter matches the mismatches injected
// in compare slots (none, a few at random, or one in every slot) and `pass`
// reflects it. Also aborts a run by raising check and restarts a fresh one.
module test_controller_tb;
  import bist_pkg::*;

  localparam int PERIOD = DEPTH - 1;   // patterns in one LFSR period

  logic        clk = 1'b0;
  logic        rst_n, check, mismatch;
  logic        lfsr_load, lfsr_en, cmp_en, done, pass;
  ctrl_state_t state;
  logic [7:0]  compared, failures_seen;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_controller dut (
    .clk(clk), .rst_n(rst_n), .check(check), .mismatch(mismatch),
    .lfsr_load(lfsr_load), .lfsr_en(lfsr_en), .cmp_en(cmp_en), .state(state),
    .done(done), .pass(pass), .compared(compared), .failures(failures_seen)
  );

  task automatic check_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // One run: mode = 0 no mismatches, 1 random mismatches, 2 all mismatches.
  // Returns after done has been seen (or the run has timed out).
  task automatic run_test(input int mode);
    int en_pulses, slots, injected, cycles;
    bit prev_en;
    en_pulses = 0; slots = 0; injected = 0; cycles = 0; prev_en = 0;
    @(negedge clk);
    check_that(lfsr_load && !lfsr_en && !done, "normal mode holds the generator");
    check = 1'b0;
    while (!done && cycles < 400) begin
      @(negedge clk);
      cycles++;
      // Drive this clock's analyzer answer.
      mismatch = 1'b0;
      if (cmp_en) begin
        if (mode == 2 || (mode == 1 && ($urandom % 7) == 0)) mismatch = 1'b1;
        slots++;
        if (mismatch) injected++;
      end
      check_that(cmp_en == prev_en, "compare slot trails the advance pulse by one clock");
      check_that(!lfsr_load, "no seed load during a run");
      if (lfsr_en) en_pulses++;
      prev_en = lfsr_en;
    end
    mismatch = 1'b0;
    // 1 clock to enter RUN, PERIOD patterns, 1 clock for the last compare.
    check_that(cycles == PERIOD + 2, $sformatf("done %0d clocks after check fell, expected %0d", cycles, PERIOD + 2));
    check_that(en_pulses == PERIOD, $sformatf("%0d advance pulses, expected %0d", en_pulses, PERIOD));
    check_that(slots == PERIOD, $sformatf("%0d compare slots, expected %0d", slots, PERIOD));
    check_that(compared == 8'(PERIOD), "compared counter");
    check_that(failures_seen == 8'(injected), $sformatf("failure counter %0d, injected %0d", failures_seen, injected));
    check_that(pass == (injected == 0), "pass verdict");
    check_that(state == ST_DONE, "rests in DONE");
    repeat (5) @(negedge clk);
    check_that(done && state == ST_DONE && !lfsr_en, "DONE is held while check = 0");
    check = 1'b1;
    @(negedge clk);
    check_that(state == ST_IDLE && lfsr_load && !done, "check = 1 returns to normal mode");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    rst_n = 1'b0; check = 1'b1; mismatch = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_test(0);
    run_test(1);
    run_test(2);
    // Abort: raise check in the middle of a run.
    check = 1'b0;
    repeat (40) @(negedge clk);
    check_that(state == ST_RUN && lfsr_en, "running");
    check = 1'b1;
    @(negedge clk);
    check_that(state == ST_IDLE && lfsr_load && !lfsr_en, "abort returns to normal mode");
    @(negedge clk);
    check_that(!cmp_en, "no compare slot after abort");
    run_test(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
