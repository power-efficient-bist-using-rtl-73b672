// operand_mux: picks the operands of the circuit under test.
//
// With check = 0 (test mode) the multiplier takes the operand pair read from
// the data memory; with check = 1 (normal mode) it takes the manual inputs.
// A 16-bit 2:1 multiplexer, combinational. The selection rule follows the
// design description.
module operand_mux
  import bist_pkg::*;
(
  input  logic          check,      // 0: test mode, 1: normal mode
  input  operand_pair_t mem_ops,    // from the data memory
  input  operand_pair_t manual_ops, // from the chip inputs
  output operand_pair_t cut_ops     // to the circuit under test
);

  always_comb cut_ops = check ? manual_ops : mem_ops;

endmodule
