// tb_sram_bank: self-checking test of one memory bank: random lane-masked
// writes against a byte-array model, one-cycle read latency, and old data on a
// read and write to the same word in one cycle.
//
// Synchronous read (data one cycle after the address) with old data
// on a read of a word written in the same cycle; reduced size.
module tb_sram_bank;
  logic clk = 0;
  logic re = 0;
  logic [5:0] raddr = 0, waddr = 0;
  logic [7:0][7:0] rdata, wdata = 0;
  logic [7:0] we = 0;
  int checks = 0, failures = 0;
  logic [7:0] model [64][8];

  pneuro_sram_bank #(.LANES(8), .WORDS(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // fill everything
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = '1; waddr = 6'(a);
      for (int l = 0; l < 8; l++) begin wdata[l] = 8'($urandom); model[a][l] = wdata[l]; end
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      we = 8'($urandom); waddr = 6'($urandom);
      if (t % 7 == 0) waddr = raddr;  // collide with the read of this cycle
      re = 1; raddr = 6'($urandom);
      if (t % 7 == 0) waddr = raddr;
      for (int l = 0; l < 8; l++) wdata[l] = 8'($urandom);
      begin
        logic [7:0] exp [8];
        for (int l = 0; l < 8; l++) exp[l] = model[raddr][l];
        for (int l = 0; l < 8; l++) if (we[l]) model[waddr][l] = wdata[l];
        @(posedge clk); #1;
        for (int l = 0; l < 8; l++) begin
          checks++;
          if (rdata[l] !== exp[l]) begin failures++; $display("t%0d lane %0d got %h exp %h", t, l, rdata[l], exp[l]); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
