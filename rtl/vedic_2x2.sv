// 2x2 Vedic multiplier (Urdhva-Tiryakbhyam, "vertically and crosswise").
//
// Four AND gates form the bit products; the vertical product a0b0 is bit 0, the
// crosswise pair a1b0 + a0b1 goes through one half adder (sum s1, carry c1), and
// the second vertical product a1b1 plus c1 goes through a second half adder
// (sum s2, carry c2). Product = {c2, s2, s1, s0}. This is the structure of the
// architecture exactly. Purely combinational.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic s1, c1, s2, c2;

  assign a0b0 = a[0] & b[0];
  assign a1b0 = a[1] & b[0];
  assign a0b1 = a[0] & b[1];
  assign a1b1 = a[1] & b[1];

  half_adder u_ha1 (.a(a0b1), .b(a1b0), .s(s1), .c(c1));
  half_adder u_ha2 (.a(c1),   .b(a1b1), .s(s2), .c(c2));

  assign p = {c2, s2, s1, a0b0};
endmodule
