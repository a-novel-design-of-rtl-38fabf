// Self-checking testbench for hybrid_cska (32 bits). It applies the example sums of the
// hybrid CSKA: 325 + 438 = 763, and 764 with carry in, and 2159 + 9542; the one-/two-cycle indicator is checked against the nucleus bits, then operands built to make the carry skip many stages (a xor b all ones
// over runs of bits, with generates below), corner values and 50000 random
// pairs, and compares {cout, s} with a + b + cin computed in 33 bits.
module tb_hybrid_cska;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic        two_cycle;
  int          skips = 0;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  hybrid_cska dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .two_cycle(two_cycle));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y, input logic ci);
    a = x; b = y; cin = ci;
    @(posedge clk);
    checks++;
    if ({cout, s} !== 33'(x) + 33'(y) + 33'(ci)) begin
      failures++;
      if (failures < 10) $display("FAIL %h+%h+%0d gave %0d %h", x, y, ci, cout, s);
    end
    // indicator: group propagate of the nucleus, bits 12..19
    checks++;
    if (two_cycle !== (&(x[19:12] ^ y[19:12]))) begin
      failures++;
      if (failures < 10) $display("FAIL indicator for %h+%h", x, y);
    end
    if (two_cycle) skips++;
  endtask

  initial begin
    check(32'd2159, 32'd9542, 1'b0);
    checks++; if (s !== 32'd11701) failures++;
    check(32'd2159, 32'd9542, 1'b1);
    checks++; if (s !== 32'd11702) failures++;
    check(32'd325, 32'd438, 1'b0);
    checks++; if (s !== 32'd763) failures++;
    check(32'd325, 32'd438, 1'b1);
    checks++; if (s !== 32'd764) failures++;
    // full propagate: the carry in must travel the whole skip chain
    check(32'hffff_ffff, 32'h0000_0000, 1'b1);
    check(32'hffff_ffff, 32'h0000_0000, 1'b0);
    check(32'haaaa_aaaa, 32'h5555_5555, 1'b1);
    check(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    // a generate at bit g followed by propagates up to bit h
    for (int g = 0; g < 32; g++) begin
      for (int h = g + 1; h <= 32; h++) begin
        logic [31:0] pm, x, y;
        pm = 32'((64'(1) << h) - (64'(1) << (g + 1)));   // propagate bits g+1..h-1
        x  = pm | (32'(1) << g);
        y  = 32'(1) << g;
        x  = x | (32'($urandom) & ~pm & ~(32'(1) << g) & ~(32'((64'(1) << h) - 1)));
        check(x, y, 1'($urandom));
        check(pm, 32'h0, 1'b1);
      end
    end
    for (int n = 0; n < 50000; n++) check(32'($urandom), 32'($urandom), 1'($urandom));
    checks++;
    if (skips == 0) begin failures++; $display("FAIL nucleus skip never exercised"); end
    $display("nucleus skip (two-cycle) cases: %0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
