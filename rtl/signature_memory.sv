// signature_memory: 256-entry store of the expected (fault-free) products.
//
// Addressed by the same bit-swapping LFSR pattern as the data memory, so
// the word read at address i is the product the circuit under test must
// give for data memory entry i. Read is synchronous (one clock after the
// address), matching the data memory so that operands and signature arrive
// together. A write port lets the table be replaced, for a different
// operand table or to plant a wrong signature; at power-up address i holds
// bist_pkg::default_signature(i) = a * b of the default operand pair i.
//
// The 256 entries and the shared LFSR address follow the design description;
// the contents, the registered read and the write port are this design's
// choices.
module signature_memory
  import bist_pkg::*;
#(
  parameter int unsigned AW    = bist_pkg::ADDR_W,
  parameter int unsigned WORDS = 1 << AW
) (
  input  logic                clk,
  input  logic [AW-1:0]       raddr,
  output product_t            rdata,     // valid one clock after raddr
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  product_t            wdata
);

  product_t mem [WORDS];

  initial begin
    for (int unsigned i = 0; i < WORDS; i++) mem[i] = default_signature(i);
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
