// 16-bit multiply-accumulate unit: y <= y + a*b every clock.
//
// A 16x16 Vedic multiplier forms the 32-bit product combinationally; a 32-bit
// carry skip adder adds it to the low 32 bits of the accumulator; the 33-bit
// accumulator register stores {carry out, sum}. While rst is high the register is
// cleared at the clock edge instead. So after a clock edge with operands a, b
// and rst low, y = {cout, (y_old[31:0] + a*b) mod 2^32}: bit 32 flags that the
// last addition overflowed 32 bits, and only bits 31:0 are fed back.
//
// ADDER picks the adder: the hybrid CI-CSKA with a Brent-Kung nucleus (default),
// the fixed-stage CI-CSKA, or the conventional multiplexer CSKA. two_cycle is the
// hybrid adder's one-/two-cycle indicator for the current addition (0 for the
// other adders); nothing in the MAC acts on it, since the unit accumulates every
// clock. Datapath, register and ports follow the architecture; the carry-in of
// the adder tied to 0, bit 32 as carry flag and the two_cycle port are this
// design's choices.
module mac16
  import mac_pkg::*;
#(
  parameter adder_kind_e ADDER = ADD_HYBRID
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [OP_W-1:0]  a,
  input  logic [OP_W-1:0]  b,
  output logic [ACC_W-1:0] y,
  output logic             two_cycle
);
  logic [SUM_W-1:0] prod, sum;
  logic             cout;

  vedic_16x16 u_mult (.a(a), .b(b), .p(prod));

  if (ADDER == ADD_HYBRID) begin : g_hybrid
    hybrid_cska #(.N(SUM_W), .Q(HYB_Q), .NUC(HYB_NUC), .SIZES(HYB_SIZES)) u_add (
      .a(prod), .b(y[SUM_W-1:0]), .cin(1'b0), .s(sum), .cout(cout), .two_cycle(two_cycle)
    );
  end else if (ADDER == ADD_CI) begin : g_ci
    ci_cska #(.N(SUM_W), .M(4)) u_add (
      .a(prod), .b(y[SUM_W-1:0]), .cin(1'b0), .s(sum), .cout(cout)
    );
    assign two_cycle = 1'b0;
  end else begin : g_conv
    conv_cska #(.N(SUM_W), .M(4)) u_add (
      .a(prod), .b(y[SUM_W-1:0]), .cin(1'b0), .s(sum), .cout(cout)
    );
    assign two_cycle = 1'b0;
  end

  accumulator #(.W(ACC_W)) u_acc (.clk(clk), .rst(rst), .d({cout, sum}), .q(y));
endmodule
