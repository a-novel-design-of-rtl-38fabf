// Hybrid variable-latency carry skip adder: a CI-CSKA with variable stage sizes
// whose middle (nucleus) stage is the 8-bit Brent-Kung prefix adder bk_nucleus.
//
// Stage 1 is a plain RCA fed by cin. The other stages are CI-CSKA stages (RCA
// from carry 0, AOI/OAI skip gate, incrementation block), except stage NUC,
// which is the prefix nucleus with its own AOI skip gate. The nucleus is the
// largest stage and lies on both of the longest paths (from stage 1 into the
// skip chain, and from the skip chain into the last incrementation block), so
// making it a fast prefix adder shortens both. Its group propagate P_8:1 comes
// out as two_cycle: when it is 0 the carry out of the nucleus is its own
// generate term, and no path through the whole chain is active.
//
// The structure follows the architecture. The stage sizes 3,4,5,8,5,4,3 are this
// design's choice; NUC must be an even stage (AOI skip gate) and its size 8. Skip
// polarity alternates as in the CI-CSKA: even stages output the complemented
// carry. Combinational: {cout, s} = a + b + cin.
module hybrid_cska #(
  parameter int unsigned N   = 32,
  parameter int unsigned Q   = 7,
  parameter int unsigned NUC = 4,
  parameter int unsigned SIZES [Q] = '{3, 4, 5, 8, 5, 4, 3}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic         two_cycle
);
  // lowest bit of stage k (0-based)
  function automatic int unsigned lsb_of(input int unsigned k);
    int unsigned sum = 0;
    for (int unsigned i = 0; i < k; i++) sum += SIZES[i];
    return sum;
  endfunction

  logic [Q-1:0] co;   // skip chain, polarity of the producing stage

  for (genvar k = 0; k < Q; k++) begin : g_stage
    localparam int unsigned L = lsb_of(k);
    localparam int unsigned W = SIZES[k];
    if (k == 0) begin : g_first
      rca #(.W(W)) u_rca (.a(a[L +: W]), .b(b[L +: W]), .cin(cin), .s(s[L +: W]), .cout(co[k]));
    end else if (k == NUC - 1) begin : g_nucleus
      bk_nucleus u_nuc (
        .a(a[L +: W]), .b(b[L +: W]), .c_in(co[k-1]),
        .s(s[L +: W]), .c_out_n(co[k]), .p_all(two_cycle)
      );
    end else begin : g_ci
      ci_cska_stage #(.M(W), .AOI(k % 2 == 1)) u_stage (
        .a(a[L +: W]), .b(b[L +: W]), .c_in(co[k-1]),
        .s(s[L +: W]), .c_out(co[k])
      );
    end
  end

  assign cout = ((Q - 1) % 2 == 1) ? ~co[Q-1] : co[Q-1];

  initial begin
    assert (lsb_of(Q) == N) else $error("hybrid_cska: stage sizes must sum to N");
    assert (NUC >= 2 && NUC <= Q && NUC % 2 == 0 && SIZES[NUC-1] == 8)
      else $error("hybrid_cska: nucleus must be an even stage of 8 bits");
  end
endmodule
