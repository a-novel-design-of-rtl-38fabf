// Self-checking testbench for ci_cska_stage: a 4-bit AOI stage and a 4-bit OAI
// stage, all operand and carry combinations. Each must give the sum slice
// a + b + carry and the stage carry out in its own polarity: AOI stages take the
// true carry and return its complement, OAI stages the reverse.
module tb_ci_cska_stage;
  logic [3:0] a, b, s_aoi, s_oai;
  logic       c, co_aoi, co_oai;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  ci_cska_stage #(.M(4), .AOI(1'b1)) dut_aoi (.a(a), .b(b), .c_in(c),  .s(s_aoi), .c_out(co_aoi));
  ci_cska_stage #(.M(4), .AOI(1'b0)) dut_oai (.a(a), .b(b), .c_in(~c), .s(s_oai), .c_out(co_oai));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] exp;
      {c, a, b} = 9'(i);
      exp = 5'(a) + 5'(b) + 5'(c);
      @(posedge clk);
      checks += 4;
      if (s_aoi !== exp[3:0]) begin failures++; $display("FAIL AOI sum %0d+%0d+%0d", a, b, c); end
      if (co_aoi !== ~exp[4]) begin failures++; $display("FAIL AOI carry %0d+%0d+%0d", a, b, c); end
      if (s_oai !== exp[3:0]) begin failures++; $display("FAIL OAI sum %0d+%0d+%0d", a, b, c); end
      if (co_oai !== exp[4])  begin failures++; $display("FAIL OAI carry %0d+%0d+%0d", a, b, c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
