// Half adder: sum = a xor b, carry = a and b. Combinational, no timing.
// Used by the 2x2 Vedic multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
