// vedic_2x2: 2-bit by 2-bit Vedic (Urdhva Tiryagbhyam, "vertically and
// crosswise") multiplier, the leaf of the 8x8 circuit under test.
//
// The vertical products a0b0 and a1b1 and the crosswise sum a1b0 + a0b1 are
// combined with two half adders. Purely combinational. The decomposition is
// the standard Vedic multiplier structure; the design description names the
// multiplier but does not draw its insides.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic cross0, cross1, c1;

  assign cross0 = a[1] & b[0];
  assign cross1 = a[0] & b[1];

  assign p[0] = a[0] & b[0];
  assign p[1] = cross0 ^ cross1;                  // half adder 1: sum
  assign c1   = cross0 & cross1;                  // half adder 1: carry
  assign p[2] = (a[1] & b[1]) ^ c1;               // half adder 2: sum
  assign p[3] = (a[1] & b[1]) & c1;               // half adder 2: carry

endmodule
