// response_analyzer: compares the product of the circuit under test with the
// signature read from the signature memory.
//
// valid = 1 when the two 16-bit words are equal (fault-free for this
// pattern), 0 otherwise; combinational. The comparison and the meaning of the
// valid bit follow the design description. `enable` is this design's
// addition: outside a test compare slot (normal mode, or the cycle before the
// first memory read arrives) valid is held at 0 and `mismatch` at 0, so only
// real comparisons are reported.
module response_analyzer
  import bist_pkg::*;
(
  input  logic     enable,     // a compare slot: product and signature belong together
  input  product_t product,    // from the circuit under test
  input  product_t signature,  // from the signature memory
  output logic     valid,      // enable and equal
  output logic     mismatch    // enable and different
);

  logic equal;

  assign equal    = (product == signature);
  assign valid    = enable &  equal;
  assign mismatch = enable & ~equal;

endmodule
