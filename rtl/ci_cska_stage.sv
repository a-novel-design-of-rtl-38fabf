// One stage of the concatenation-incrementation carry skip adder (CI-CSKA).
//
// The M-bit RCA of the stage starts from a carry in of 0, so it computes the
// intermediate sum Z and its own carry C_j without waiting for earlier stages
// (concatenation). The skip logic then forms the stage carry out
// C_o,j = C_j + P_j.C_o,j-1 with a single compound gate, and the incrementation
// block adds the incoming carry to Z to give the stage's sum bits.
//
// The skip gates alternate: with AOI = 1 (even stages) the gate is an AND-OR-
// Invert taking the true carry and producing its complement; with AOI = 0 (odd
// stages) it is an OR-AND-Invert taking the complemented carry and producing the
// true one, so no inverter sits on the carry chain. c_in and c_out therefore have
// the polarity the parameter says. This follows the architecture; the stage size
// is set by the enclosing adder. Combinational.
module ci_cska_stage #(
  parameter int unsigned M   = 4,
  parameter bit          AOI = 1'b1
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         c_in,   // AOI: C_o,j-1 ; OAI: ~C_o,j-1
  output logic [M-1:0] s,
  output logic         c_out   // AOI: ~C_o,j  ; OAI: C_o,j
);
  logic [M-1:0] z;
  logic         cj, p, c_true;
  logic         unused_inc_carry;

  rca #(.W(M)) u_rca (.a(a), .b(b), .cin(1'b0), .s(z), .cout(cj));

  assign p = &(a ^ b);

  if (AOI) begin : g_aoi
    assign c_out  = ~(cj | (p & c_in));
    assign c_true = c_in;
  end else begin : g_oai
    // ~C_o,j = ~C_j . (~P + ~C_o,j-1): OAI over (~P, c_in) and ~C_j
    assign c_out  = ~((~p | c_in) & ~cj);
    assign c_true = ~c_in;
  end

  // incrementation block: Z + carry; its carry out equals the skip output and
  // is not needed
  assign {unused_inc_carry, s} = {1'b0, z} + (M+1)'(c_true);
endmodule
