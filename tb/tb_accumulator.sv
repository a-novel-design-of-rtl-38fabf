// Self-checking testbench for accumulator (33 bits): random data with reset
// asserted now and then. After every clock edge q must be 0 if rst was high at
// the edge, else the d that was applied.
module tb_accumulator;
  logic        clk = 1'b0, rst;
  logic [32:0] d, q, exp;
  int checks = 0, failures = 0, clears = 0;

  accumulator dut (.clk(clk), .rst(rst), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 33'h1_ffff_ffff;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      rst = ($urandom % 8 == 0);
      d   = {1'($urandom), 32'($urandom)};
      exp = rst ? 33'h0 : d;
      if (rst) clears++;
      @(negedge clk);
      checks++;
      if (q !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL rst=%0d d=%h q=%h", rst, d, q);
      end
    end
    checks++;
    if (clears == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
