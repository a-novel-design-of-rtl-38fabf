// 16x16 Vedic multiplier built from four 8x8 Vedic multipliers and three 16-bit
// ripple carry adders.
//
// With a = {aH, aL} and b = {bH, bL} (8-bit halves): q0 = aL*bL, q1 = aL*bH,
// q2 = aH*bL, q3 = aH*bH. Product bits 7:0 are q0[7:0]. Adder 1 sums q1 + q2
// (carry ca1); adder 2 adds {8'b0, q0[15:8]} (carry ca2) and yields bits 15:8;
// adder 3 adds q3 to {7'b0, ca1|ca2, sum2[15:8]} and yields bits 31:16. The
// architecture draws ripple carry adders here and routes ca1 into bit 8 of the
// third adder; adding ca2 at the same place is this design's completion of it
// (q1+q2+q0[15:8] < 2^17, so at most one of the carries is set). The third
// adder's carry out is always 0. Combinational, unsigned.
module vedic_16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  logic [15:0] q0, q1, q2, q3;
  logic [15:0] sum1, sum2, sum3;
  logic        ca1, ca2, ca3;

  vedic_8x8 u_q0 (.a(a[7:0]),  .b(b[7:0]),  .p(q0));
  vedic_8x8 u_q1 (.a(a[7:0]),  .b(b[15:8]), .p(q1));
  vedic_8x8 u_q2 (.a(a[15:8]), .b(b[7:0]),  .p(q2));
  vedic_8x8 u_q3 (.a(a[15:8]), .b(b[15:8]), .p(q3));

  rca #(.W(16)) u_add1 (.a(q1),   .b(q2),                              .cin(1'b0), .s(sum1), .cout(ca1));
  rca #(.W(16)) u_add2 (.a(sum1), .b({8'h00, q0[15:8]}),               .cin(1'b0), .s(sum2), .cout(ca2));
  rca #(.W(16)) u_add3 (.a(q3),   .b({7'h00, ca1 | ca2, sum2[15:8]}),  .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[7:0], q0[7:0]};
endmodule
