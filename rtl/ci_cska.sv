// Concatenation-incrementation carry skip adder (CI-CSKA) with fixed stage size:
// N bits in N/M stages of M bits.
//
// Stage 1 is a plain RCA fed by cin. Every later stage is a ci_cska_stage: its RCA
// runs from carry 0 in parallel with all others, an AOI (even stage) or OAI (odd
// stage) gate passes the carry along the skip chain, and an incrementation block
// adds the arriving carry to the stage's intermediate sum. The critical path is
// stage 1's RCA, the chain of skip gates and the last incrementation block. The
// structure follows the architecture; 4-bit stages are this design's choice. If
// the last stage is an AOI stage its complemented carry is inverted once to give
// cout. Combinational: {cout, s} = a + b + cin.
module ci_cska #(
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

  // co[k]: skip chain output of stage k+1 (0-based k), in that stage's polarity
  logic [Q-1:0] co;

  rca #(.W(M)) u_stage1 (.a(a[M-1:0]), .b(b[M-1:0]), .cin(cin), .s(s[M-1:0]), .cout(co[0]));

  for (genvar k = 1; k < Q; k++) begin : g_stage
    // stage number k+1 is even when k is odd: AOI
    ci_cska_stage #(.M(M), .AOI(k % 2 == 1)) u_stage (
      .a(a[k*M +: M]), .b(b[k*M +: M]), .c_in(co[k-1]),
      .s(s[k*M +: M]), .c_out(co[k])
    );
  end

  // last stage (k = Q-1) is AOI when Q-1 is odd
  assign cout = ((Q - 1) % 2 == 1) ? ~co[Q-1] : co[Q-1];

  initial begin
    assert (N % M == 0 && Q >= 2) else $error("ci_cska: N must be a multiple of M, two stages at least");
  end
endmodule
