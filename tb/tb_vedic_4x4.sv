// Self-checking testbench for vedic_4x4: all 256 operand pairs against a*b.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        @(posedge clk);
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
