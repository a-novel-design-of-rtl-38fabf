// Self-checking testbench for rca: the default 4-bit adder exhaustively (all a,
// b, cin) and a 16-bit instance on random operands, against a + b + cin.
module tb_rca;
  logic [3:0]  a4, b4, s4;
  logic [15:0] a16, b16, s16;
  logic        cin, c4, c16;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  rca         dut4  (.a(a4),  .b(b4),  .cin(cin), .s(s4),  .cout(c4));
  rca #(.W(16)) dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(c16));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      a16 = 16'($urandom); b16 = 16'($urandom);
      if (i % 64 == 0) begin a16 = 16'hffff; b16 = 16'(i / 64); end
      @(posedge clk);
      checks++;
      if ({c4, s4} !== 5'(a4 + b4 + cin)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d gave %0d", a4, b4, cin, {c4, s4});
      end
      checks++;
      if ({c16, s16} !== 17'(a16 + b16 + cin)) begin
        failures++;
        $display("FAIL W=16 %0d+%0d+%0d gave %0d", a16, b16, cin, {c16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
