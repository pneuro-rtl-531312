// tb_msb_detect: self-checking test of the MSB detector on single bits, runs
// of sign bits and random values.
//
// Combinational; reference computed by a bit loop in the testbench.
module tb_msb_detect;
  logic [31:0] v;
  logic [4:0] pos;
  logic none;
  int checks = 0, failures = 0;
  pneuro_msb_detect dut (.*);

  task automatic chk(input logic [31:0] x);
    int ep; logic en;
    ep = 0; en = 1;
    for (int i = 30; i >= 0; i--) if (x[i] != x[31]) begin ep = i; en = 0; break; end
    v = x; #1; checks++;
    if (pos !== 5'(ep) || none !== en) begin failures++; $display("v=%h pos %0d exp %0d none %0d", x, pos, ep, none); end
  endtask

  initial begin
    chk(0); chk('1); chk(1); chk(32'hffff_fffe); chk(32'h7fff_ffff); chk(32'h8000_0000);
    for (int i = 0; i < 31; i++) begin chk(32'd1 << i); chk(~(32'd1 << i)); end
    for (int t = 0; t < 2000; t++) chk($urandom >> $urandom_range(0, 31));
    for (int t = 0; t < 2000; t++) chk(-($urandom >> $urandom_range(0, 31)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
