// tb_cluster_ctrl: self-checking test of the cluster controller with a model
// program memory. The program sets address generator, routing, saturation,
// PE enable and link registers, runs a counted loop, stalls on a host sync
// flag and on a barrier, signals the host (interrupt) and halts. Checks the
// issued computation instructions and the cycle they issue in, the
// configuration outputs, the stalls and the host registers.
//
// Instruction timing checked: first issue two cycles after start, then
// one per cycle, held while stalled. Encodings from pneuro_pkg (the design's own).
module tb_cluster_ctrl;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic h_req = 0, h_we = 0, h_rvalid;
  logic [3:0] h_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic gstart = 0, sync_mode = 1, bar_wait, bar_release = 0, irq;
  logic [9:0] f_addr;
  logic [31:0] f_data;
  logic [2:0] ag_cfg_we, ag_sel_we, ag_step;
  logic ag_cfg_set, ag_sel_set, iss_valid, running;
  ag_reg_e ag_cfg_reg;
  logic [15:0] ag_cfg_data;
  comp_instr_t iss_ins;
  route_cfg_t route_a, route_b;
  sat_cfg_t sat_cfg;
  logic [31:0] pe_en;
  logic [1:0] link_en;
  int checks = 0, failures = 0, cyc = 0;
  logic [31:0] pm [1024];
  int iss_cyc [$];
  logic [31:0] iss_word [$];
  int ag_writes = 0, ag_steps = 0, bar_cycles = 0;

  pneuro_cluster_ctrl dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) f_data <= pm[f_addr];
  always @(posedge clk) begin
    cyc++;
    if (iss_valid) begin iss_cyc.push_back(cyc); iss_word.push_back(32'(iss_ins)); end
    ag_writes += $countones(ag_cfg_we);
    ag_steps  += $countones(ag_step);
    if (bar_wait) bar_cycles++;
  end
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic hw(input int a, input logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = 4'(a); h_wdata = d; @(negedge clk); h_req = 0; h_we = 0;
  endtask
  task automatic hr(input int a, output logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = 4'(a); @(negedge clk); h_req = 0; d = h_rdata;
  endtask
  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  localparam logic [31:0] XA = 32'h0;
  logic [31:0] x1, x2;

  initial begin
    logic [31:0] d; int c0;
    x1 = X(X_MAC, M(0), M(1, 1), DNONE);
    x2 = X(X_SAT, SNONE, SNONE, DM(2));
    foreach (pm[i]) pm[i] = '0;
    pm[10] = AGSET(1, 1, AG_MOD, 7);
    pm[11] = AGSEL(2, 1);
    pm[12] = ROUTE(0, R_SHR, 2, E_ONE);
    pm[13] = ROUTE(1, R_MCAST, 5, E_ZERO);
    pm[14] = SATCFG(1, 1, 0, 3);
    pm[15] = PEEN(2, 8'h5a);
    pm[16] = LOOP(1, 3);
    pm[17] = x1;
    pm[18] = DJNZ(1, 17);
    pm[19] = C(C_WAITH, 25'h2);
    pm[20] = C(C_SIGNAL, 25'h4);
    pm[21] = C(C_BARRIER);
    pm[22] = x2;
    pm[23] = C(C_NEIGH, 25'h3);
    pm[24] = JMP(30);
    pm[25] = x1;              // skipped
    pm[30] = C(C_HALT);
    repeat (2) @(negedge clk); rst_n = 1;
    hw(1, 10);                // START_PC
    hw(5, 32'h104);           // interrupt on signal flag 2 and on done
    hw(0, 1);                 // start
    c0 = cyc;
    // wait for the WAITH stall
    repeat (20) @(negedge clk);
    hr(2, d); chk("status waiting host", d[2:0], 3'b101);
    chk("issued during loop", iss_word.size(), 3);
    for (int k = 0; k < 3; k++) begin
      chk("loop body", iss_word[k], x1);
      // the first loop body is the 8th instruction: it issues 8 cycles after the start edge
      chk("issue cycle", iss_cyc[k] - c0, 8 + 2 * k);
    end
    chk("ag mod write", ag_writes, 1);
    chk("route a", route_a, {R_SHR, 3'd2, E_ONE});
    chk("route b", route_b, {R_MCAST, 3'd5, E_ZERO});
    chk("sat cfg", sat_cfg, {1'b1, 1'b1, 1'b0, 5'd3});
    chk("pe en", pe_en, 32'hff5a_ffff);
    chk("irq before signal", irq, 0);
    hw(3, 2);                 // release WAITH
    repeat (3) @(negedge clk);
    chk("irq after signal", irq, 1);
    chk("at barrier", bar_wait, 1);
    repeat (5) @(negedge clk);
    chk("held at barrier", iss_word.size(), 3);
    @(negedge clk); bar_release = 1; @(negedge clk); bar_release = 0;
    repeat (6) @(negedge clk);
    chk("after barrier", iss_word.size(), 4);
    chk("second instruction", iss_word[3], x2);
    chk("links", link_en, 2'b11);
    hr(2, d); chk("status done", d[1:0], 2'b10);
    hr(4, d); chk("signal flags", d, 4);
    hw(4, 4); hr(4, d); chk("signal cleared", d, 0);
    chk("irq on done", irq, 1);
    hr(7, d); chk("issued count", d, 4);
    hr(8, d); checks++; if (d < 10) begin failures++; $display("stall count %0d", d); end
    hr(3, d); chk("host sync consumed", d, 0);
    checks++; if (ag_steps != 7) begin failures++; $display("ag steps %0d", ag_steps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
