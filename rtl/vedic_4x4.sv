// 4x4 Vedic multiplier built from four 2x2 Vedic multipliers and three 4-bit
// ripple carry adders.
//
// With a = {aH, aL} and b = {bH, bL} (2-bit halves) the blocks form
// q0 = aL*bL, q1 = aL*bH, q2 = aH*bL, q3 = aH*bH. Bits 1:0 of q0 are the product's
// bits 1:0. The first adder sums the cross products q1 + q2 (carry ca1); the
// second adds that sum to {00, q0[3:2]} (carry ca2) and gives product bits 3:2;
// the third adds q3 to {0, ca1|ca2, sum2[3:2]} and gives bits 7:4. This follows
// the architecture's block diagram; feeding ca2 in beside ca1 is this design's
// reading of it (the two carries can never both be 1, since q1+q2+q0[3:2] < 32).
// The third adder's carry out is always 0 and is not used. Combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] sum1, sum2, sum3;
  logic       ca1, ca2, ca3;

  vedic_2x2 u_q0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_q1 (.a(a[1:0]), .b(b[3:2]), .p(q1));
  vedic_2x2 u_q2 (.a(a[3:2]), .b(b[1:0]), .p(q2));
  vedic_2x2 u_q3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rca #(.W(4)) u_add1 (.a(q1),   .b(q2),                         .cin(1'b0), .s(sum1), .cout(ca1));
  rca #(.W(4)) u_add2 (.a(sum1), .b({2'b00, q0[3:2]}),           .cin(1'b0), .s(sum2), .cout(ca2));
  rca #(.W(4)) u_add3 (.a(q3),   .b({1'b0, ca1 | ca2, sum2[3:2]}), .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[1:0], q0[1:0]};
endmodule
