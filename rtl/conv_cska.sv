// Conventional carry skip adder (Conv-CSKA), N bits in N/M stages of M bits.
//
// Each stage is an M-bit ripple carry adder whose carry in is the previous
// stage's carry out. A 2:1 multiplexer at the stage output picks the incoming
// carry instead of the RCA's own carry when every bit of the stage propagates
// (P = AND of a_i xor b_i), so a carry can jump over a stage whose RCA would just
// pass it on. The structure follows the architecture; the fixed 4-bit stage size
// is this design's choice. Combinational: {cout, s} = a + b + cin. In the MAC it
// is the reference adder, kept as a selectable alternative.
module conv_cska #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  localparam int unsigned Q = N / M;

  logic [Q:0] c;   // c[k] carry into stage k, c[Q] carry out

  assign c[0] = cin;
  for (genvar k = 0; k < Q; k++) begin : g_stage
    logic rca_c, p;
    rca #(.W(M)) u_rca (
      .a(a[k*M +: M]), .b(b[k*M +: M]), .cin(c[k]),
      .s(s[k*M +: M]), .cout(rca_c)
    );
    assign p      = &(a[k*M +: M] ^ b[k*M +: M]);
    assign c[k+1] = p ? c[k] : rca_c;    // skip multiplexer
  end
  assign cout = c[Q];

  initial begin
    assert (N % M == 0) else $error("conv_cska: N must be a multiple of M");
  end
endmodule
