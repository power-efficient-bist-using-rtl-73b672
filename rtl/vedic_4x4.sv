// vedic_4x4: 4-bit by 4-bit Vedic multiplier built from four 2x2 blocks.
//
// With a = {aH,aL} and b = {bH,bL} (2-bit halves) the four 2x2 blocks give
// q0 = aL*bL, q1 = aH*bL, q2 = aL*bH, q3 = aH*bH. The crosswise terms are
// added together with the upper half of q0 (t = q1 + q2 + q0[3:2]); the low
// half of t forms p[3:2] and its carry part is added to q3 for p[7:4]:
//   p = q0[1:0] + 4*t + 16*q3 = q0 + 4*(q1 + q2) + 16*q3.
// Purely combinational; standard Vedic structure, not drawn in the
// design description.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q0, q1, q2, q3;
  logic [4:0] cross_sum;   // q1 + q2 + q0[3:2], at most 9 + 9 + 3 = 21

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  assign cross_sum = {1'b0, q1} + {1'b0, q2} + {3'b000, q0[3:2]};

  assign p[1:0] = q0[1:0];
  assign p[3:2] = cross_sum[1:0];
  assign p[7:4] = q3 + {1'b0, cross_sum[4:2]};

endmodule
