// Testbench running the three adder choices of mac16 side by side: conventional
// CSKA, fixed-stage CI-CSKA and hybrid CSKA get the same operands and resets, and
// each accumulator must match the reference model
// y = {carry, (y[31:0] + a*b) mod 2^32} after every clock. Starts with the
// example sequence 325*512 -> 166400, 24*22 -> 166928, then random operands with
// wrap-around and resets.
module tb_mac16_adders;
  import mac_pkg::*;
  logic        clk = 1'b0, rst;
  logic [15:0] a, b;
  logic [32:0] y [3];
  logic [32:0] model;
  logic        tc [3];
  int checks = 0, failures = 0, n_overflow = 0;

  mac16 #(.ADDER(ADD_CONV))   dut_conv   (.clk(clk), .rst(rst), .a(a), .b(b), .y(y[0]), .two_cycle(tc[0]));
  mac16 #(.ADDER(ADD_CI))     dut_ci     (.clk(clk), .rst(rst), .a(a), .b(b), .y(y[1]), .two_cycle(tc[1]));
  mac16 #(.ADDER(ADD_HYBRID)) dut_hybrid (.clk(clk), .rst(rst), .a(a), .b(b), .y(y[2]), .two_cycle(tc[2]));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic r, input logic [15:0] x, input logic [15:0] z);
    rst = r; a = x; b = z;
    model = r ? 33'h0 : 33'(model[31:0]) + 33'(32'(x) * 32'(z));
    if (model[32]) n_overflow++;
    @(negedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (y[k] !== model) begin
        failures++;
        if (failures < 10) $display("FAIL adder %0d: y=%0d expected %0d", k, y[k], model);
      end
    end
    checks++;
    if (tc[0] !== 1'b0 || tc[1] !== 1'b0) begin failures++; $display("FAIL two_cycle on non-hybrid adder"); end
  endtask

  initial begin
    model = 33'h0;
    rst = 1'b1; a = '0; b = '0;
    @(negedge clk);
    step(1'b1, 16'd0, 16'd0);
    step(1'b0, 16'd325, 16'd512);
    checks++; if (y[0] !== 33'd166400) failures++;
    step(1'b0, 16'd24, 16'd22);
    checks++; if (y[0] !== 33'd166928) failures++;
    for (int n = 0; n < 10000; n++)
      step($urandom % 300 == 0, 16'($urandom), 16'($urandom));
    checks++;
    if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
