// tb_pneuro_top: end-to-end test of the accelerator at its default size
// (2 clusters x 4 NCBs x 8 PEs), driven only through the AXI4 port.
//
// Workload: the 3x3 convolution layer of a small CNN on a 48x48 8-bit image
// (random pixels and signed coefficients), spread over all 64 PEs, one image
// column per PE, so that both clusters work on one picture as a single wide
// SIMD machine. The host loads the same program into both clusters with
// bursts, selects synchronized mode and starts both clusters at once. Each
// cluster waits for its own host sync flag (the host releases them at
// different times), enables its daisy-chain links and meets the other at a
// barrier, so that they then run in lockstep and exchange edge columns. While
// they run, the host polls a bank the PEs are using (its accesses must wait).
// The end is signalled by interrupt. All 46 x 48 output pixels are compared
// with a reference model; the valid 46 x 46 region is the conv1 output size.
// The rate is checked too: every MAC instruction must execute in all 64 PEs in
// the same cycle (64 MACs per cycle, the architecture's figure), 9 x 46 such
// cycles in all.
//
// Mechanisms counted (each must occur): host-sync stall, barrier wait,
// inter-cluster exchange at the cluster boundary, host access held off by the
// PEs, interrupt, address-generator set switch, rectified (negative) outputs,
// automatic saturation shift, and a second run in independent mode, where
// cluster 1 alone runs another layer from a different start address while
// cluster 0 stays halted.
module tb_pneuro_top;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  localparam int ROWS = 48, IMG_W = 48, COLS = 64, OUT = 200;
  logic clk = 0, rst_n = 0;
  logic [3:0] awid = 0, arid = 0, bid, rid;
  logic [31:0] awaddr = 0, araddr = 0, wdata = 0, rdata;
  logic [7:0] awlen = 0, arlen = 0;
  logic [2:0] awsize = 3'd2, arsize = 3'd2;
  logic [1:0] awburst = 2'b01, arburst = 2'b01, bresp, rresp;
  logic awvalid = 0, awready, wlast = 0, wvalid = 0, wready, bvalid, bready = 1;
  logic arvalid = 0, arready, rlast, rvalid, rready = 1;
  logic [3:0] wstrb = 4'hf;
  logic irq;
  int checks = 0, failures = 0;

  pneuro_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // mechanism counters
  int cyc = 0;
  int n_mode = 0;
  int n_host_wait = 0, n_barrier = 0, n_agsel = 0, n_irq = 0, n_cross = 0;
  // MAC rate: cycles in which all 64 PEs execute a MAC (the architecture's
  // 64 MACs per cycle), counted in the execute stage of every NCB
  int n_mac64 = 0, n_mac_partial = 0;
  logic [1:0] cl_mac;
  for (genvar c = 0; c < 2; c++) begin : g_mac
    wire is_mac = dut.g_cl[c].u_cluster.g_ncb[0].u_ncb.ex_valid &&
                  dut.g_cl[c].u_cluster.g_ncb[0].u_ncb.ex_ins.op inside {X_MAC, X_MACZ};
    assign cl_mac[c] = is_mac && (&dut.g_cl[c].u_cluster.exec_o);
  end
  always @(posedge clk) begin
    cyc++;
    if (&cl_mac) n_mac64++;
    else if (|cl_mac) n_mac_partial++;
    if (dut.req && !dut.gnt) n_host_wait++;
    if (|dut.cl_bar_wait && !dut.bar_release) n_barrier++;
    if (|dut.g_cl[0].u_cluster.ag_sel_we) n_agsel++;
    if (irq) n_irq++;
  end

  task automatic axi_write(input logic [31:0] a, input logic [31:0] d [$]);
    @(negedge clk); awvalid = 1; awaddr = a; awlen = 8'(d.size() - 1); awburst = 2'b01;
    @(posedge clk); while (!awready) @(posedge clk);
    @(negedge clk); awvalid = 0;
    foreach (d[k]) begin
      wvalid = 1; wdata = d[k]; wlast = (k == d.size() - 1);
      @(posedge clk); while (!wready) @(posedge clk);
      @(negedge clk);
    end
    wvalid = 0; wlast = 0;
    while (!bvalid) @(negedge clk);
    checks++; if (bresp !== 2'b00) failures++;
    @(negedge clk);
  endtask
  task automatic axi_read(input logic [31:0] a, input int n, ref logic [31:0] d [$]);
    d.delete();
    @(negedge clk); arvalid = 1; araddr = a; arlen = 8'(n - 1); arburst = 2'b01;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0;
    for (int k = 0; k < n; k++) begin
      @(posedge clk); while (!rvalid) @(posedge clk);
      d.push_back(rdata);
      checks++; if (rlast !== (k == n - 1)) begin failures++; $display("rlast"); end
    end
    @(negedge clk);
  endtask
  function automatic logic [31:0] cl_base(int c); return 32'(c) << 18; endfunction
  function automatic logic [31:0] maddr(int c, int ncb, int bank, int word, int half);
    return cl_base(c) | 32'h20000 | 32'(ncb << 15) | 32'(bank << 13) | 32'(word << 3) | 32'(half << 2);
  endfunction
  function automatic logic [31:0] reg_addr(int c, int r); return cl_base(c) | 32'h10000 | 32'(4 * r); endfunction

  logic [7:0] img [ROWS][COLS];
  logic signed [7:0] k [9];
  logic [31:0] prog [$];

  initial begin
    logic [31:0] d [$], w [$];
    int n_relu = 0, n_auto = 0, t_start, t_end;
    repeat (3) @(negedge clk); rst_n = 1;
    conv3x3_program(prog, ROWS, OUT, 1, 0, 1);
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) img[r][c] = (c < IMG_W) ? 8'($urandom) : 8'd0;
    for (int i = 0; i < 9; i++) k[i] = 8'(int'($urandom_range(0, 24)) - 12);
    // program: bursts of up to 16 words
    for (int c = 0; c < 2; c++)
      for (int base = 0; base < prog.size(); base += 16) begin
        w.delete();
        for (int i = base; i < prog.size() && i < base + 16; i++) w.push_back(prog[i]);
        axi_write(cl_base(c) + 32'(4 * base), w);
      end
    axi_read(cl_base(1), 8, d);
    for (int i = 0; i < 8; i++) begin checks++; if (d[i] !== prog[i]) failures++; end
    // coefficients
    for (int c = 0; c < 2; c++) for (int n = 0; n < 4; n++) begin
      w.delete(); w.push_back({k[3], k[2], k[1], k[0]}); w.push_back({k[7], k[6], k[5], k[4]}); w.push_back({24'd0, k[8]});
      axi_write(maddr(c, n, 1, 0, 0), w);
    end
    // synchronized mode, interrupt on signal flag 0, start both clusters
    axi_write(32'h80000, '{32'd1});
    for (int c = 0; c < 2; c++) axi_write(reg_addr(c, 5), '{32'h1});
    axi_write(32'h80004, '{32'd1});
    t_start = cyc;
    // image rows arrive while the clusters wait for their sync flags
    for (int c = 0; c < 2; c++) begin
      for (int r = 0; r < ROWS; r++) for (int n = 0; n < 4; n++) begin
        w.delete();
        for (int h = 0; h < 2; h++) begin
          int col; col = 32 * c + 8 * n + 4 * h;
          w.push_back({img[r][col+3], img[r][col+2], img[r][col+1], img[r][col]});
        end
        axi_write(maddr(c, n, 0, r, 0), w);
      end
      axi_write(reg_addr(c, 3), '{32'h1});   // release this cluster
    end
    // poll a bank in use until the interrupt
    while (!irq) axi_read(maddr(0, 0, 1, 0, 0), 1, d);
    t_end = cyc;
    repeat (40) @(negedge clk);
    for (int c = 0; c < 2; c++) begin
      axi_read(reg_addr(c, 2), 1, d); checks++; if (d[0][1:0] !== 2'b10) begin failures++; $display("cluster %0d not done", c); end
      axi_read(reg_addr(c, 8), 1, d); $display("cluster %0d stalled %0d cycles", c, d[0]);
      checks++; if (d[0] == 0) begin failures++; $display("no stall"); end
      axi_read(reg_addr(c, 4), 1, d); checks++; if (d[0] !== 1) failures++;
    end
    axi_read(32'h80008, 1, d); checks++; if (d[0] !== 3) begin failures++; $display("irqs %h", d[0]); end
    // results
    for (int c = 0; c < 2; c++)
      for (int r = 0; r < ROWS - 2; r++) for (int n = 0; n < 4; n++) begin
        axi_read(maddr(c, n, 2, OUT + r, 0), 2, d);
        for (int h = 0; h < 2; h++) for (int b = 0; b < 4; b++) begin
          int col, acc; logic [7:0] e;
          col = 32 * c + 8 * n + 4 * h + b; acc = 0;
          for (int dr = 0; dr < 3; dr++) for (int dc = 0; dc < 3; dc++) begin
            int cc; cc = col + dc - 1;
            if (cc >= 0 && cc < COLS) acc += int'(k[3 * dr + dc]) * int'(img[r + dr][cc]);
          end
          e = conv3x3_ref(acc, 1, 0);
          if (col < IMG_W) begin
            if (acc < 0) n_relu++;
            if (acc > 255) n_auto++;
          end
          if (col == 31 || col == 32) n_cross++;
          checks++;
          if (d[h][8*b +: 8] !== e) begin
            failures++;
            if (failures < 10) $display("r%0d col%0d got %0d exp %0d (acc %0d)", r, col, d[h][8*b +: 8], e, acc);
          end
        end
      end
    // 9 MACs per output row, 46 rows, both clusters in lockstep
    checks++;
    if (n_mac64 != 9 * (ROWS - 2) || n_mac_partial != 0) begin
      failures++; $display("64-MAC cycles %0d (expected %0d), partial %0d", n_mac64, 9 * (ROWS - 2), n_mac_partial);
    end else $display("%0d cycles with 64 MACs each", n_mac64);
    $display("start to interrupt %0d cycles (includes image loading); host waits %0d, barrier %0d, agsel %0d, irq %0d, cross %0d, relu %0d, auto %0d",
             t_end - t_start, n_host_wait, n_barrier, n_agsel, n_irq, n_cross, n_relu, n_auto);
    // ---- independent mode: cluster 1 alone runs a different layer (8 rows,
    // manual shift) from START_PC, which first closes its daisy-chain links;
    // cluster 0 must stay halted
    begin
      logic [31:0] c0_cycles; int n_indep;
      n_indep = 0;
      axi_write(32'h80000, '{32'd0});
      axi_read(reg_addr(0, 6), 1, d); c0_cycles = d[0];
      conv3x3_program(prog, 8, 300, 0, 2, 0);
      prog.push_back(C(C_NEIGH, 25'h0));       // entry at START_PC
      prog.push_back(JMP(0));
      for (int base = 0; base < prog.size(); base += 16) begin
        w.delete();
        for (int i = base; i < prog.size() && i < base + 16; i++) w.push_back(prog[i]);
        axi_write(cl_base(1) + 32'(4 * base), w);
      end
      axi_write(reg_addr(1, 1), '{32'(prog.size() - 2)});
      axi_write(reg_addr(1, 0), '{32'd1});
      do axi_read(reg_addr(1, 2), 1, d); while (!d[0][1]);
      axi_read(reg_addr(0, 6), 1, d); checks++; if (d[0] !== c0_cycles) begin failures++; $display("cluster 0 ran"); end
      axi_read(reg_addr(0, 2), 1, d); checks++; if (d[0][0] !== 1'b0) failures++;
      for (int r = 0; r < 6; r++) for (int n = 0; n < 4; n++) begin
        axi_read(maddr(1, n, 2, 300 + r, 0), 2, d);
        for (int h = 0; h < 2; h++) for (int b = 0; b < 4; b++) begin
          int col, acc; logic [7:0] e;
          col = 32 + 8 * n + 4 * h + b; acc = 0;
          for (int dr = 0; dr < 3; dr++) for (int dc = 0; dc < 3; dc++) begin
            int cc; cc = col + dc - 1;
            if (cc >= 32 && cc < COLS) acc += int'(k[3 * dr + dc]) * int'(img[r + dr][cc]);
          end
          e = conv3x3_ref(acc, 0, 2);
          checks++;
          if (d[h][8*b +: 8] !== e) begin failures++; if (failures < 10) $display("indep r%0d col%0d got %0d exp %0d", r, col, d[h][8*b +: 8], e); end
          else n_indep++;
        end
      end
      $display("independent mode: %0d outputs of cluster 1 checked", n_indep);
      n_mode = n_indep;
    end
    begin
      int m [8];
      m = '{n_host_wait, n_barrier, n_agsel, n_irq, n_cross, n_relu, n_auto, n_mode};
      for (int i = 0; i < 8; i++) begin checks++; if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
