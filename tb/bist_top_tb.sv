// bist_top_tb: end-to-end test of the bit-swapping LFSR BIST at its default
// size (8-bit generator, 256-entry memories, 8x8 multiplier).
//
// A reference model kept in the testbench (LFSR recurrence and swap rule
// written out, shadow copies of both tables filled from their formulas and
// updated on every write) predicts, each clock, the generator state, the
// swapped address, the product and the valid bit. The sequence is:
//   1. normal mode (check = 1): random manual operands, product = a * b;
//   2. a full self-test of the fault-free design: 255 patterns, all valid,
//      test_pass after the expected number of clocks;
//   3. table writes in normal mode: one operand pair replaced together with
//      its correct signature, one signature corrupted;
//   4. a second self-test that must flag exactly the corrupted pattern;
//   5. a run abandoned half-way by raising check, then a clean run.
// It counts each mechanism (normal-mode product, swap active, swap idle,
// match, mismatch, mode switch, abort, table write, completed run) and
// counts a failure for any that never happened. It also reports the bit
// transitions of the address bus against those of the plain LFSR register.
module bist_top_tb;
  import bist_pkg::*;

  localparam int PERIOD = DEPTH - 1;   // patterns in one LFSR period

  logic          clk = 1'b0;
  logic          rst_n, check;
  operand_t      manual_a, manual_b;
  product_t      product;
  logic          valid, mismatch, swap, test_done, test_pass;
  addr_t         addr, lfsr_state;
  ctrl_state_t   test_state;
  logic [8:0]    patterns_checked, patterns_failed;
  logic          data_we, sig_we;
  addr_t         wr_addr;
  operand_pair_t wr_operands;
  product_t      wr_signature;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_normal = 0, n_swap = 0, n_noswap = 0, n_match = 0, n_mismatch = 0;
  int n_mode_switch = 0, n_abort = 0, n_write = 0, n_runs = 0;
  int addr_transitions = 0, lfsr_transitions = 0;

  operand_pair_t sh_ops [256];
  product_t      sh_sig [256];

  always #5 clk = ~clk;

  bist_top dut (
    .clk(clk), .rst_n(rst_n), .check(check),
    .manual_a(manual_a), .manual_b(manual_b), .product(product),
    .valid(valid), .mismatch(mismatch), .addr(addr), .swap(swap),
    .lfsr_state(lfsr_state), .test_state(test_state),
    .test_done(test_done), .test_pass(test_pass),
    .patterns_checked(patterns_checked), .patterns_failed(patterns_failed),
    .data_we(data_we), .sig_we(sig_we), .wr_addr(wr_addr),
    .wr_operands(wr_operands), .wr_signature(wr_signature)
  );

  task automatic check_that(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic addr_t ref_next(input addr_t s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  function automatic addr_t ref_swap(input addr_t s);
    if (s[7]) return s;
    return {s[7], s[6], s[4], s[5], s[2], s[3], s[0], s[1]};
  endfunction

  // One self-test from normal mode. stop_after >= 0 abandons it after that
  // many clocks. Returns the addresses whose compare failed.
  task automatic run_bist(input int stop_after, output int n_fail, output addr_t first_bad);
    addr_t q, pend_addr, prev_addr, prev_state;
    bit    pend, first, have_prev;
    int    cycles, compares;
    product_t exp_p;
    q = 8'h01; pend = 0; have_prev = 0; cycles = 0; compares = 0; n_fail = 0; first_bad = '0; first = 1;
    @(negedge clk);
    check_that(test_state == ST_IDLE && lfsr_state == 8'h01, "idle at seed before the run");
    check = 1'b0;
    n_mode_switch++;
    while (!test_done && cycles < 600) begin
      @(negedge clk);
      cycles++;
      if (stop_after >= 0 && cycles == stop_after) begin
        check_that(test_state == ST_RUN, "run in progress when abandoned");
        check = 1'b1;
        n_abort++;
        n_mode_switch++;
        @(negedge clk);
        check_that(test_state == ST_IDLE && !valid && !mismatch, "abort returns to normal mode");
        return;
      end
      // Compare slot for the address issued one clock earlier.
      if (pend) begin
        exp_p = product_t'(sh_ops[pend_addr].a) * product_t'(sh_ops[pend_addr].b);
        check_that(product == exp_p, $sformatf("product for address %02h: %04h vs %04h", pend_addr, product, exp_p));
        check_that(valid == (exp_p == sh_sig[pend_addr]), $sformatf("valid for address %02h", pend_addr));
        check_that(mismatch == !valid, "mismatch is the complement of valid in a slot");
        compares++;
        if (valid) n_match++;
        if (mismatch) begin
          n_mismatch++;
          n_fail++;
          if (first) first_bad = pend_addr;
          first = 0;
        end
      end else begin
        check_that(!valid && !mismatch, "no verdict outside a compare slot");
      end
      pend = 0;
      if (test_state == ST_RUN) begin
        check_that(lfsr_state == q, $sformatf("LFSR state %02h vs %02h", lfsr_state, q));
        check_that(addr == ref_swap(q), $sformatf("address %02h vs %02h", addr, ref_swap(q)));
        check_that(swap == !q[7], "selection line");
        if (swap) n_swap++; else n_noswap++;
        if (have_prev) begin
          for (int b = 0; b < 8; b++) begin
            if (addr[b] != prev_addr[b]) addr_transitions++;
            if (lfsr_state[b] != prev_state[b]) lfsr_transitions++;
          end
        end
        prev_addr = addr; prev_state = lfsr_state; have_prev = 1;
        pend_addr = addr;
        pend = 1;
        q = ref_next(q);
      end
    end
    // 1 clock into RUN, 255 patterns, 1 clock for the last compare.
    check_that(cycles == PERIOD + 2, $sformatf("test_done %0d clocks after check fell, expected %0d", cycles, PERIOD + 2));
    check_that(compares == PERIOD, $sformatf("%0d compares, expected %0d", compares, PERIOD));
    check_that(patterns_checked == 9'(PERIOD), "patterns_checked");
    check_that(patterns_failed == 9'(n_fail), "patterns_failed");
    check_that(test_pass == (n_fail == 0), "test_pass");
    n_runs++;
    repeat (3) @(negedge clk);
    check_that(test_done && test_state == ST_DONE, "verdict held in test mode");
    check = 1'b1;
    n_mode_switch++;
    @(negedge clk);
    check_that(test_state == ST_IDLE && !test_done, "back to normal mode");
  endtask

  task automatic normal_mode_products(input int count);
    for (int t = 0; t < count; t++) begin
      @(negedge clk);
      manual_a = operand_t'($urandom);
      manual_b = operand_t'($urandom);
      #1;
      check_that(product == product_t'(manual_a) * product_t'(manual_b),
                 $sformatf("normal mode %0d * %0d = %0d", manual_a, manual_b, product));
      check_that(!valid && !mismatch, "no verdict in normal mode");
      n_normal++;
    end
  endtask

  task automatic write_tables(input addr_t a, input operand_pair_t ops, input bit w_ops,
                              input product_t sig, input bit w_sig);
    @(negedge clk);
    wr_addr = a; wr_operands = ops; wr_signature = sig;
    data_we = w_ops; sig_we = w_sig;
    if (w_ops) sh_ops[a] = ops;
    if (w_sig) sh_sig[a] = sig;
    n_write++;
    @(negedge clk);
    data_we = 1'b0; sig_we = 1'b0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int    nf;
    addr_t bad;
    operand_pair_t newops;
    for (int i = 0; i < 256; i++) begin
      sh_ops[i].a = 8'((29 * i + 7) & 255);
      sh_ops[i].b = 8'((167 * i + 13) & 255);
      sh_sig[i]   = product_t'(sh_ops[i].a) * product_t'(sh_ops[i].b);
    end
    rst_n = 1'b0; check = 1'b1; manual_a = '0; manual_b = '0;
    data_we = 1'b0; sig_we = 1'b0; wr_addr = '0; wr_operands = '0; wr_signature = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. normal mode
    normal_mode_products(200);

    // 2. fault-free self-test
    run_bist(-1, nf, bad);
    check_that(nf == 0, "fault-free run has no failures");
    $display("address bus transitions in one run: bit-swapped %0d, plain LFSR register %0d",
             addr_transitions, lfsr_transitions);
    check_that(addr_transitions < lfsr_transitions, "bit swapping lowers address transitions");

    // 3. table writes: new operands with their product at 0x5C, a wrong
    //    signature at 0x42
    newops = '{a: 8'hFF, b: 8'hFF};
    write_tables(8'h5C, newops, 1'b1, 16'hFE01, 1'b1);
    write_tables(8'h42, '0, 1'b0, sh_sig[8'h42] ^ 16'h0100, 1'b1);
    normal_mode_products(20);

    // 4. self-test that must catch exactly the corrupted signature
    run_bist(-1, nf, bad);
    check_that(nf == 1 && bad == 8'h42, $sformatf("corrupted run: %0d failures, first at %02h", nf, bad));

    // 5. abandoned run, then a clean run after repairing the table
    write_tables(8'h42, '0, 1'b0, product_t'(sh_ops[8'h42].a) * product_t'(sh_ops[8'h42].b), 1'b1);
    run_bist(100, nf, bad);
    run_bist(-1, nf, bad);
    check_that(nf == 0, "repaired run passes");

    check_that(n_normal > 0, "mechanism: normal-mode product");
    check_that(n_swap > 0, "mechanism: bit swap active");
    check_that(n_noswap > 0, "mechanism: bit swap idle");
    check_that(n_match > 0, "mechanism: signature match");
    check_that(n_mismatch > 0, "mechanism: signature mismatch");
    check_that(n_mode_switch > 0, "mechanism: mode switch");
    check_that(n_abort > 0, "mechanism: abandoned run");
    check_that(n_write > 0, "mechanism: table write");
    check_that(n_runs > 0, "mechanism: completed run");
    $display("mechanisms: normal=%0d swap=%0d noswap=%0d match=%0d mismatch=%0d switch=%0d abort=%0d write=%0d runs=%0d",
             n_normal, n_swap, n_noswap, n_match, n_mismatch, n_mode_switch, n_abort, n_write, n_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
