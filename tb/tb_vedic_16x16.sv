// Self-checking testbench for vedic_16x16: corner operands, the products of the
// MAC example sequence (325*512 = 166400, 24*22 = 528, 14*12 = 168) and 50000
// random pairs, against a*b computed in 32 bits.
module tb_vedic_16x16;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_16x16 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    @(posedge clk);
    checks++;
    if (p !== 32'(x) * 32'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL %0d*%0d gave %0d", x, y, p);
    end
  endtask

  initial begin
    logic [15:0] corner [6] = '{16'h0000, 16'h0001, 16'h00ff, 16'hff00, 16'h8000, 16'hffff};
    foreach (corner[i]) foreach (corner[j]) check(corner[i], corner[j]);
    check(16'd325, 16'd512);
    if (p !== 32'd166400) begin failures++; $display("FAIL 325*512"); end
    checks++;
    check(16'd24, 16'd22);
    check(16'd14, 16'd12);
    for (int n = 0; n < 50000; n++) check(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
