// vedic_8x8: 8-bit by 8-bit Vedic multiplier, the circuit under test.
//
// Same construction one level up from vedic_4x4: four 4x4 blocks give
// q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH (4-bit halves); the
// crosswise products and the upper half of q0 are summed into t, whose low
// nibble is p[7:4] and whose upper part is added to q3 for p[15:8]:
//   p = q0[3:0] + 16*t + 256*q3 = q0 + 16*(q1 + q2) + 256*q3.
// Unsigned, purely combinational, no clock. The design description takes an
// 8x8 Vedic multiplier as its circuit under test; this block-and-adder form is
// the usual way to build one.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);

  logic [7:0] q0, q1, q2, q3;
  logic [8:0] cross_sum;   // q1 + q2 + q0[7:4], at most 225 + 225 + 15 = 465

  vedic_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  assign cross_sum = {1'b0, q1} + {1'b0, q2} + {5'b00000, q0[7:4]};

  assign p[3:0]  = q0[3:0];
  assign p[7:4]  = cross_sum[3:0];
  assign p[15:8] = q3 + {3'b000, cross_sum[8:4]};

endmodule
