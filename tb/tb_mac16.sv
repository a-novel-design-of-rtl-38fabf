// End-to-end testbench for mac16 at its default parameters (hybrid adder).
//
// It first replays the example sequence of the design's reference waveform:
// reset, then a=325, b=512 giving y=166400, then a=24, b=22 giving 166928, then
// a=14, b=12 giving 167096 and 167264. Then it runs random operands with
// occasional resets, with long runs of large operands so the 32-bit sum wraps,
// and compares y after every clock with a reference model
// y = {carry, (y[31:0] + a*b) mod 2^32}. It also checks two_cycle against the
// group propagate of the adder's nucleus bits (19:12) and counts each mechanism:
// clear by reset, accumulation, overflow into y[32], a carry skipped over the
// nucleus (two_cycle = 1). A mechanism that never happened counts as a failure.
module tb_mac16;
  logic        clk = 1'b0, rst;
  logic [15:0] a, b;
  logic [32:0] y, model;
  logic        two_cycle;
  int checks = 0, failures = 0;
  int n_clear = 0, n_accum = 0, n_overflow = 0, n_skip = 0;

  mac16 dut (.clk(clk), .rst(rst), .a(a), .b(b), .y(y), .two_cycle(two_cycle));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // apply one operation before the rising edge and check y after it
  task automatic step(input logic r, input logic [15:0] x, input logic [15:0] z);
    logic [31:0] prod;
    rst = r; a = x; b = z;
    #1;
    prod = 32'(x) * 32'(z);
    checks++;
    if (two_cycle !== &(prod[19:12] ^ y[19:12])) begin
      failures++;
      if (failures < 10) $display("FAIL two_cycle y=%h prod=%h", y, prod);
    end
    if (two_cycle) n_skip++;
    if (r) begin
      model = 33'h0;
      n_clear++;
    end else begin
      model = 33'(model[31:0]) + 33'(prod);
      n_accum++;
      if (model[32]) n_overflow++;
    end
    @(negedge clk);
    checks++;
    if (y !== model) begin
      failures++;
      if (failures < 10) $display("FAIL rst=%0d a=%0d b=%0d y=%0d expected %0d", r, x, z, y, model);
    end
  endtask

  task automatic expect_y(input logic [32:0 ] v);
    checks++;
    if (y !== v) begin
      failures++;
      $display("FAIL example sequence: y=%0d expected %0d", y, v);
    end
  endtask

  initial begin
    model = 33'h0;
    rst = 1'b1; a = '0; b = '0;
    @(negedge clk);
    step(1'b1, 16'd0, 16'd0);     expect_y(33'd0);
    step(1'b0, 16'd325, 16'd512); expect_y(33'd166400);
    step(1'b0, 16'd24, 16'd22);   expect_y(33'd166928);
    step(1'b0, 16'd14, 16'd12);   expect_y(33'd167096);
    step(1'b0, 16'd14, 16'd12);   expect_y(33'd167264);

    for (int n = 0; n < 20000; n++) begin
      logic r;
      logic [15:0] x, z;
      r = ($urandom % 200 == 0);
      if ((n / 500) % 2 == 1) begin
        x = 16'hff00 | 16'($urandom); z = 16'hf000 | 16'($urandom);
      end else begin
        x = 16'($urandom); z = 16'($urandom % 64);
      end
      step(r, x, z);
    end

    $display("clears=%0d accumulations=%0d overflows=%0d nucleus_skips=%0d",
             n_clear, n_accum, n_overflow, n_skip);
    checks += 4;
    if (n_clear < 2)    begin failures++; $display("FAIL no reset exercised"); end
    if (n_accum == 0)   begin failures++; $display("FAIL no accumulation"); end
    if (n_overflow == 0) begin failures++; $display("FAIL no overflow"); end
    if (n_skip == 0)    begin failures++; $display("FAIL no nucleus skip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
