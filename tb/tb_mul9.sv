// tb_mul9: self-checking test of the 9-bit multiplier with sign extension, for
// all four signed/unsigned operand combinations.
//
// Combinational; covers every second-operand value against every third
// first-operand value (one third of all 65536 pairs) for each sign combination,
// against 32-bit integer products computed in the testbench.
module tb_mul9;
  logic [7:0] a, b;
  logic a_sgn, b_sgn;
  logic [31:0] p;
  int checks = 0, failures = 0;
  pneuro_mul9 dut (.*);
  initial begin
    for (int s = 0; s < 4; s++)
      for (int i = 0; i < 256; i += 3)
        for (int j = 0; j < 256; j += 1) begin
          int ea, eb, e;
          a = 8'(i); b = 8'(j); a_sgn = s[0]; b_sgn = s[1];
          ea = (a_sgn && i > 127) ? i - 256 : i;
          eb = (b_sgn && j > 127) ? j - 256 : j;
          e = ea * eb;
          #1; checks++;
          if ($signed(p) !== e) begin
            failures++;
            if (failures < 10) $display("%0d*%0d sg %0d%0d got %0d exp %0d", i, j, a_sgn, b_sgn, $signed(p), e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
