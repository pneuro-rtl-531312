// tb_prog_mem: self-checking test of the program memory: host writes with byte
// strobes, host read-back, and the fetch port's one-cycle read latency.
//
// Reduced size; read data appear one cycle after the address.
module tb_prog_mem;
  logic clk = 0;
  logic [5:0] f_addr = 0, h_addr = 0;
  logic [31:0] f_data, h_wdata = 0, h_rdata;
  logic h_en = 0, h_we = 0;
  logic [3:0] h_wstrb = 0;
  logic [31:0] m [64];
  int checks = 0, failures = 0;
  pneuro_prog_mem #(.WORDS(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); h_en = 1; h_we = 1; h_addr = 6'(a); h_wdata = $urandom; h_wstrb = 4'hf; m[a] = h_wdata;
    end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk); h_en = 1; h_we = 1; h_addr = 6'($urandom); h_wdata = $urandom; h_wstrb = 4'($urandom);
      for (int b = 0; b < 4; b++) if (h_wstrb[b]) m[h_addr][8*b +: 8] = h_wdata[8*b +: 8];
      @(negedge clk); h_we = 0; h_addr = 6'($urandom); f_addr = 6'($urandom);
      @(posedge clk); #1; checks += 2;
      if (h_rdata !== m[h_addr]) begin failures++; $display("host read %0d", h_addr); end
      if (f_data !== m[f_addr]) begin failures++; $display("fetch %0d", f_addr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
