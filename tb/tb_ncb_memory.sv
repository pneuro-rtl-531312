// tb_ncb_memory: self-checking random test of the multi-banked NCB memory.
// Each cycle makes random PE reads (A and B), a random lane-masked PE store and
// a random host read or write; data are checked against a byte model one cycle
// later, and the host grant against the arbitration rule (PEs first). Counts
// host requests that had to wait.
//
// Reduced to 32 words per bank so that addresses collide often. The
// priority of the PEs over the host is the design's own arbitration.
module tb_ncb_memory;
  import pneuro_pkg::*;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  logic re_a = 0, re_b = 0, h_req = 0, h_we = 0, h_half = 0, h_gnt, h_rvalid;
  logic [1:0] bank_a = 0, bank_b = 0, wbank = 0, h_bank = 0;
  logic [4:0] addr_a = 0, addr_b = 0, waddr = 0, h_addr = 0;
  logic [7:0][7:0] rd_a, rd_b, wdata = 0;
  logic [7:0] we = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [3:0] h_wstrb = 0;
  logic [7:0] m [4][W][8];
  int checks = 0, failures = 0, waits = 0, hreads = 0;

  pneuro_ncb_memory #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    // host fills the memory
    for (int bk = 0; bk < 4; bk++) for (int a = 0; a < W; a++) for (int h = 0; h < 2; h++) begin
      @(negedge clk); h_req = 1; h_we = 1; h_bank = 2'(bk); h_addr = 5'(a); h_half = h[0];
      h_wdata = $urandom; h_wstrb = 4'hf;
      for (int i = 0; i < 4; i++) m[bk][a][4*h+i] = h_wdata[8*i +: 8];
      #1; checks++; if (!h_gnt) failures++;
    end
    @(negedge clk); h_req = 0;
    for (int t = 0; t < 3000; t++) begin
      logic [7:0] ea [8], eb [8]; logic [31:0] eh; logic hr, busy;
      @(negedge clk);
      re_a = 1'($urandom); bank_a = 2'($urandom); addr_a = 5'($urandom);
      re_b = 1'($urandom); bank_b = 2'($urandom); addr_b = 5'($urandom);
      we = ($urandom_range(0, 2) == 0) ? 8'($urandom) : 8'd0; wbank = 2'($urandom); waddr = 5'($urandom);
      for (int l = 0; l < 8; l++) wdata[l] = 8'($urandom);
      h_req = 1'($urandom); h_we = 1'($urandom); h_bank = 2'($urandom); h_addr = 5'($urandom);
      h_half = 1'($urandom); h_wdata = $urandom; h_wstrb = 4'($urandom);
      // expected read data (reads see the contents before this cycle's writes)
      for (int l = 0; l < 8; l++) begin
        ea[l] = m[bank_a][addr_a][l];
        eb[l] = (re_a && bank_a == bank_b) ? m[bank_a][addr_a][l] : m[bank_b][addr_b][l];
      end
      for (int i = 0; i < 4; i++) eh[8*i +: 8] = m[h_bank][h_addr][4*h_half+i];
      busy = h_we ? (we != 0 && wbank == h_bank) : ((re_a && bank_a == h_bank) || (re_b && bank_b == h_bank));
      #1; checks++;
      if (h_gnt !== (h_req && !busy)) begin failures++; $display("t%0d gnt %0d", t, h_gnt); end
      if (h_req && busy) waits++;
      hr = h_gnt && !h_we;
      for (int l = 0; l < 8; l++) if (we[l]) m[wbank][waddr][l] = wdata[l];
      if (h_gnt && h_we) for (int i = 0; i < 4; i++) if (h_wstrb[i]) m[h_bank][h_addr][4*h_half+i] = h_wdata[8*i +: 8];
      @(posedge clk); #1;
      if (re_a) for (int l = 0; l < 8; l++) begin checks++; if (rd_a[l] !== ea[l]) begin failures++; $display("t%0d A lane %0d", t, l); end end
      if (re_b) for (int l = 0; l < 8; l++) begin checks++; if (rd_b[l] !== eb[l]) begin failures++; $display("t%0d B lane %0d", t, l); end end
      checks++;
      if (h_rvalid !== hr || (hr && h_rdata !== eh)) begin failures++; $display("t%0d host read %h exp %h", t, h_rdata, eh); end
      hreads += hr;
    end
    checks++; if (waits == 0 || hreads == 0) failures++;
    $display("host waits %0d reads %0d", waits, hreads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
