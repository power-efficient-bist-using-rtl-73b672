// bist_top: built-in self-test of an 8x8 Vedic multiplier driven by a
// bit-swapping LFSR.
//
// Data path (test mode, check = 0): the bit-swapping LFSR produces an 8-bit
// pattern each clock; that pattern is the common address of the data memory
// (operand pairs) and the signature memory (expected products). One clock
// later the operand pair passes the operand multiplexer into the multiplier
// under test, and the response analyzer compares the product with the
// signature read from the same address: `valid` = 1 for a match. The test
// controller steps the LFSR through one full period (255 patterns, one per
// clock), counts mismatches and reports `test_done` / `test_pass`.
//
// Normal mode (check = 1): the multiplier takes `manual_a` and `manual_b`
// and `product` is their product, combinationally; the LFSR is held at its
// seed and `valid` stays 0.
//
// The block structure, the CHECK rule, the 8-bit generator, the 256-entry
// memories and the 8x8 Vedic multiplier follow the design description; the
// memory contents, the registered memory reads, the run length, the
// counters and the memory write ports are this design's choices (see the
// blocks' own headers). The write ports load or alter the tables; writes
// during a run take effect for later reads.
module bist_top
  import bist_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            check,          // 0: test mode, 1: normal mode
  input  operand_t        manual_a,       // normal-mode operands
  input  operand_t        manual_b,
  output product_t        product,        // multiplier output
  output logic            valid,          // compare slot with product == signature
  output logic            mismatch,       // compare slot with product != signature
  output addr_t           addr,           // current bit-swapped LFSR pattern
  output logic            swap,           // LFSR selection line active
  output addr_t           lfsr_state,     // LFSR register before the swap stage
  output ctrl_state_t     test_state,     // test controller state
  output logic            test_done,
  output logic            test_pass,
  output logic [ADDR_W:0] patterns_checked,
  output logic [ADDR_W:0] patterns_failed,
  // table load ports
  input  logic            data_we,
  input  logic            sig_we,
  input  addr_t           wr_addr,
  input  operand_pair_t   wr_operands,
  input  product_t        wr_signature
);

  logic          lfsr_load, lfsr_en, cmp_en;
  operand_pair_t mem_ops, manual_ops, cut_ops;
  product_t      signature;

  assign manual_ops = '{a: manual_a, b: manual_b};

  bs_lfsr #(.N(LFSR_W)) u_tpg (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (lfsr_load),
    .en      (lfsr_en),
    .state   (lfsr_state),
    .swap    (swap),
    .pattern (addr)
  );

  data_memory #(.AW(ADDR_W)) u_data_mem (
    .clk   (clk),
    .raddr (addr),
    .rdata (mem_ops),
    .we    (data_we),
    .waddr (wr_addr),
    .wdata (wr_operands)
  );

  signature_memory #(.AW(ADDR_W)) u_sig_mem (
    .clk   (clk),
    .raddr (addr),
    .rdata (signature),
    .we    (sig_we),
    .waddr (wr_addr),
    .wdata (wr_signature)
  );

  operand_mux u_mux (
    .check      (check),
    .mem_ops    (mem_ops),
    .manual_ops (manual_ops),
    .cut_ops    (cut_ops)
  );

  vedic_8x8 u_cut (
    .a (cut_ops.a),
    .b (cut_ops.b),
    .p (product)
  );

  response_analyzer u_ora (
    .enable    (cmp_en),
    .product   (product),
    .signature (signature),
    .valid     (valid),
    .mismatch  (mismatch)
  );

  test_controller #(.RUN_LEN(DEPTH - 1), .CNT_W(ADDR_W + 1)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .check     (check),
    .mismatch  (mismatch),
    .lfsr_load (lfsr_load),
    .lfsr_en   (lfsr_en),
    .cmp_en    (cmp_en),
    .state     (test_state),
    .done      (test_done),
    .pass      (test_pass),
    .compared  (patterns_checked),
    .failures  (patterns_failed)
  );

endmodule
