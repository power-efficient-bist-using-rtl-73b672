// data_memory: 256-entry store of operand pairs for the circuit under test.
//
// The bit-swapping LFSR pattern is the read address; the word read holds the
// two 8-bit multiplier operands {a, b}. Read is synchronous (the word appears
// one clock after the address, like an FPGA block RAM) and happens every
// clock. A write port lets the operand table be replaced; at power-up the
// array holds bist_pkg::default_operands(i) at address i, so no load step is
// needed before the first test.
//
// The 256 entries and the LFSR addressing follow the design description; the
// word contents, the registered read and the write port are this design's
// choices. Entry 0 is never read by the LFSR, whose period skips the
// all-zero word.
module data_memory
  import bist_pkg::*;
#(
  parameter int unsigned AW    = bist_pkg::ADDR_W,
  parameter int unsigned WORDS = 1 << AW
) (
  input  logic                clk,
  input  logic [AW-1:0]       raddr,
  output operand_pair_t       rdata,     // valid one clock after raddr
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  operand_pair_t       wdata
);

  operand_pair_t mem [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) mem[i] = default_operands(i);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
