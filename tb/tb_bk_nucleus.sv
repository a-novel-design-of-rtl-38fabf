// Self-checking testbench for bk_nucleus: all 2^17 combinations of the two 8-bit
// slices and the incoming carry. Checks the sum slice against a + b + c_in, the
// AOI output against the complement of the carry out, and P_8:1 against the AND
// of a xor b.
module tb_bk_nucleus;
  logic [7:0] a, b, s;
  logic       c_in, c_out_n, p_all;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bk_nucleus dut (.a(a), .b(b), .c_in(c_in), .s(s), .c_out_n(c_out_n), .p_all(p_all));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      logic [8:0] exp;
      {c_in, a, b} = 17'(i);
      exp = 9'(a) + 9'(b) + 9'(c_in);
      @(posedge clk);
      checks += 3;
      if (s !== exp[7:0]) begin failures++; if (failures < 10) $display("FAIL sum %0d+%0d+%0d", a, b, c_in); end
      if (c_out_n !== ~exp[8]) begin failures++; if (failures < 10) $display("FAIL carry %0d+%0d+%0d", a, b, c_in); end
      if (p_all !== &(a ^ b)) begin failures++; if (failures < 10) $display("FAIL P8:1 %0d %0d", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
