// Accumulator register of the MAC. On every rising clock edge it loads d, or 0
// while rst is high: the next-state value is d AND NOT rst in front of plain D
// flip-flops, so the clear is synchronous. Reset polarity and the clear follow
// the architecture; making it synchronous follows its gate-level schematic.
// Output q is the register, valid one clock after d.
module accumulator #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk) begin
    q <= d & {W{~rst}};
  end
endmodule
