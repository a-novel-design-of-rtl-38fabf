// 8x8 Vedic multiplier built from four 4x4 Vedic multipliers and three 8-bit
// ripple carry adders, the same arrangement as one level down.
//
// With a = {aH, aL} and b = {bH, bL} (4-bit halves): q0 = aL*bL, q1 = aL*bH,
// q2 = aH*bL, q3 = aH*bH. Product bits 3:0 are q0[3:0]. Adder 1 sums q1 + q2
// (carry ca1); adder 2 adds {0000, q0[7:4]} (carry ca2) and yields bits 7:4;
// adder 3 adds q3 to {000, ca1|ca2, sum2[7:4]} and yields bits 15:8. ca1 and ca2
// are never both 1. The third adder's carry out is always 0. Combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [7:0] sum1, sum2, sum3;
  logic       ca1, ca2, ca3;

  vedic_4x4 u_q0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_q1 (.a(a[3:0]), .b(b[7:4]), .p(q1));
  vedic_4x4 u_q2 (.a(a[7:4]), .b(b[3:0]), .p(q2));
  vedic_4x4 u_q3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  rca #(.W(8)) u_add1 (.a(q1),   .b(q2),                            .cin(1'b0), .s(sum1), .cout(ca1));
  rca #(.W(8)) u_add2 (.a(sum1), .b({4'b0000, q0[7:4]}),            .cin(1'b0), .s(sum2), .cout(ca2));
  rca #(.W(8)) u_add3 (.a(q3),   .b({3'b000, ca1 | ca2, sum2[7:4]}), .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[3:0], q0[3:0]};
endmodule
