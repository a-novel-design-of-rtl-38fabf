// Self-checking testbench for vedic_2x2: all 16 operand pairs against a*b.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        @(posedge clk);
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d gave %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
