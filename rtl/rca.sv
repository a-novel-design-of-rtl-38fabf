// W-bit ripple carry adder: a chain of full adders, the carry of bit i feeding
// bit i+1. Used as the adder of the Vedic multipliers and as the RCA block inside
// every carry skip adder stage. Combinational: {cout, s} = a + b + cin.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end
  assign cout = c[W];
endmodule
