// tb_axi_slave: self-checking test of the AXI4 slave bridge. A model memory on
// the internal port grants requests at random and answers reads after a random
// delay. The test writes INCR bursts of random length with random strobes, reads
// them back with bursts, checks FIXED bursts, IDs, RLAST and responses, with
// random back-pressure on R and B, and counts beats the internal port stalled.
//
// Follows the AXI4 handshake rules (valid held until ready). Single-beat
// 32-bit transfers only, as the bridge supports.
module tb_axi_slave;
  logic clk = 0, rst_n = 0;
  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata, addr, req_wdata, req_rdata = 0;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 2, arsize = 2;
  logic [1:0] awburst = 1, arburst = 1, bresp, rresp;
  logic awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 0;
  logic arvalid = 0, arready, rlast, rvalid, rready = 0;
  logic [3:0] wstrb = 0, req_wstrb;
  logic req, we, gnt, req_rvalid = 0;
  int checks = 0, failures = 0, stalls = 0;
  logic [31:0] mem [256];
  logic [31:0] model [256];

  pneuro_axi_slave dut (.*);
  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // internal port model
  logic g;
  always @(negedge clk) g = ($urandom_range(0, 3) != 0);
  assign gnt = req && g;
  always @(posedge clk) begin
    if (req && !gnt) stalls++;
    if (gnt && we) for (int b = 0; b < 4; b++) if (req_wstrb[b]) mem[addr[9:2]][8*b +: 8] <= req_wdata[8*b +: 8];
  end
  initial begin
    forever begin
      @(posedge clk);
      if (gnt && !we) begin
        logic [31:0] d; d = mem[addr[9:2]];
        repeat ($urandom_range(0, 2)) @(posedge clk);
        #1 req_rvalid = 1; req_rdata = d;
        @(posedge clk); #1 req_rvalid = 0;
      end
    end
  end

  task automatic wburst(input int a, input int len, input int id, input logic [1:0] burst);
    @(negedge clk); awvalid = 1; awaddr = 32'(a); awlen = 8'(len); awid = 4'(id); awburst = burst;
    @(posedge clk); while (!awready) @(posedge clk);
    @(negedge clk); awvalid = 0;
    for (int k = 0; k <= len; k++) begin
      int wa; wa = (burst == 0) ? a : a + 4 * k;
      wvalid = 1; wdata = $urandom; wstrb = 4'($urandom); wlast = (k == len);
      for (int b = 0; b < 4; b++) if (wstrb[b]) model[wa[9:2]][8*b +: 8] = wdata[8*b +: 8];
      @(posedge clk); while (!wready) @(posedge clk);
      @(negedge clk);
    end
    wvalid = 0; wlast = 0;
    bready = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
    bready = 1;
    @(posedge clk); while (!bvalid) @(posedge clk);
    checks++; if (bid !== 4'(id) || bresp !== 0) failures++;
    @(negedge clk); bready = 0;
  endtask

  task automatic rburst(input int a, input int len, input int id, input logic [1:0] burst);
    @(negedge clk); arvalid = 1; araddr = 32'(a); arlen = 8'(len); arid = 4'(id); arburst = burst;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0;
    for (int k = 0; k <= len; k++) begin
      int ra; ra = (burst == 0) ? a : a + 4 * k;
      rready = ($urandom_range(0, 1) == 1);
      while (1) begin
        @(posedge clk);
        if (rvalid && rready) break;
        @(negedge clk); rready = ($urandom_range(0, 1) == 1);
      end
      checks++;
      if (rdata !== model[ra[9:2]] || rid !== 4'(id) || rlast !== (k == len) || rresp !== 0) begin
        failures++; $display("read %h beat %0d got %h exp %h last %0d", a, k, rdata, model[ra[9:2]], rlast);
      end
      @(negedge clk); rready = 0;
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin mem[i] = 0; model[i] = 0; end
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      int a, len;
      len = $urandom_range(0, 15); a = 4 * $urandom_range(0, 255 - len);
      wburst(a, len, t % 16, 2'b01);
      rburst(a, len, (t + 3) % 16, 2'b01);
    end
    wburst(64, 3, 5, 2'b00);   // FIXED: four writes to one word
    rburst(64, 2, 6, 2'b00);
    rburst(0, 255, 7, 2'b01);  // the whole memory
    // write and read requested together: both complete
    fork
      wburst(200, 1, 1, 2'b01);
      rburst(40, 1, 2, 2'b01);
    join
    rburst(200, 1, 3, 2'b01);
    checks++; if (stalls == 0) failures++;
    $display("internal stalls %0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
