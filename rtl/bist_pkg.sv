// bist_pkg: sizes, types and table formulas shared by the bit-swapping LFSR BIST.
//
// The BIST tests an 8x8 multiplier with operand pairs read from a 256-entry
// data memory and compares each product with a 256-entry signature memory;
// both memories are addressed by an 8-bit bit-swapping LFSR. Those three
// sizes follow the design description. The contents of the two memories are
// not given there, so this design fills them from the formulas below:
//   entry i of the data memory      : a = (i * 29 + 7) mod 256, b = (i * 167 + 13) mod 256
//   entry i of the signature memory : a * b of data memory entry i
// Both multipliers are odd, so a and b each run through all 256 values and
// every entry holds a different operand pair.
package bist_pkg;

  localparam int unsigned LFSR_W   = 8;               // n of the bit-swapping LFSR
  localparam int unsigned OP_W     = 8;               // each multiplier operand
  localparam int unsigned PROD_W   = 2 * OP_W;        // product / signature width
  localparam int unsigned ADDR_W   = LFSR_W;          // memory address = LFSR pattern
  localparam int unsigned DEPTH    = 1 << ADDR_W;     // 256 entries per memory

  typedef logic [OP_W-1:0]   operand_t;
  typedef logic [PROD_W-1:0] product_t;
  typedef logic [ADDR_W-1:0] addr_t;

  // One data memory word: the two multiplier operands.
  typedef struct packed {
    operand_t a;
    operand_t b;
  } operand_pair_t;

  // Test controller states.
  typedef enum logic [1:0] {
    ST_IDLE = 2'd0,   // normal mode (CHECK = 1): generator held at its seed
    ST_RUN  = 2'd1,   // test mode: one pattern applied per clock
    ST_DONE = 2'd2    // full period applied, verdict held until CHECK = 1
  } ctrl_state_t;

  // Default data memory word at address i.
  function automatic operand_pair_t default_operands(input int unsigned i);
    operand_pair_t w;
    w.a = operand_t'((i * 29 + 7) % 256);
    w.b = operand_t'((i * 167 + 13) % 256);
    return w;
  endfunction

  // Default signature memory word at address i: the fault-free product.
  function automatic product_t default_signature(input int unsigned i);
    operand_pair_t w;
    w = default_operands(i);
    return product_t'(w.a) * product_t'(w.b);
  endfunction

endpackage
