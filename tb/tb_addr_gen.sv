// tb_addr_gen: self-checking test of the data address generator. Programs both
// register sets, steps with positive and negative modifiers, checks wrapping at
// both bounds against a reference model, and switches sets mid-sequence.
//
// Drives the generator one cycle at a time from negedge and samples addr
// before each step. The expected wrap rule (circular between the bounds) is
// the design's own reading of the bound registers.
module tb_addr_gen;
  import pneuro_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_set = 0, sel_we = 0, sel_set = 0, step = 0;
  ag_reg_e cfg_reg = AG_INDEX;
  logic [15:0] cfg_data = 0, addr;
  logic wrapped;
  int checks = 0, failures = 0, wraps = 0;
  int m_idx[2], m_mod[2], m_lo[2], m_hi[2], m_act;

  pneuro_addr_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic setr(input int s, input ag_reg_e r, input int v);
    @(negedge clk); cfg_we = 1; cfg_set = s[0]; cfg_reg = r; cfg_data = 16'(v);
    @(negedge clk); cfg_we = 0;
    case (r) AG_INDEX: m_idx[s] = v; AG_MOD: m_mod[s] = v; AG_LO: m_lo[s] = v; default: m_hi[s] = v; endcase
  endtask

  task automatic do_step();
    int n, w;
    @(negedge clk);
    checks++;
    if (addr !== 16'(m_idx[m_act])) begin failures++; $display("addr %0d exp %0d", addr, m_idx[m_act]); end
    step = 1;
    n = m_idx[m_act] + m_mod[m_act]; w = 0;
    if (n > m_hi[m_act]) begin n -= (m_hi[m_act] - m_lo[m_act] + 1); w = 1; end
    else if (n < m_lo[m_act]) begin n += (m_hi[m_act] - m_lo[m_act] + 1); w = 1; end
    #1; checks++;
    if (wrapped !== w[0]) begin failures++; $display("wrap flag %0d exp %0d", wrapped, w); end
    wraps += w;
    @(negedge clk); step = 0;
    m_idx[m_act] = n;
  endtask

  initial begin
    m_act = 0;
    for (int s = 0; s < 2; s++) begin m_idx[s] = 0; m_mod[s] = 1; m_lo[s] = 0; m_hi[s] = 65535; end
    repeat (2) @(negedge clk); rst_n = 1;
    // reset values
    checks++; if (addr !== 0) failures++;
    setr(0, AG_INDEX, 2); setr(0, AG_MOD, 3); setr(0, AG_LO, 0); setr(0, AG_HI, 9);
    setr(1, AG_INDEX, 40); setr(1, AG_MOD, 16'hfffb); m_mod[1] = -5; setr(1, AG_LO, 30); setr(1, AG_HI, 45);
    repeat (10) do_step();
    @(negedge clk); sel_we = 1; sel_set = 1; @(negedge clk); sel_we = 0; m_act = 1;
    repeat (10) do_step();
    @(negedge clk); sel_we = 1; sel_set = 0; @(negedge clk); sel_we = 0; m_act = 0;
    repeat (5) do_step();
    // random patterns
    for (int t = 0; t < 20; t++) begin
      int lo, hi, md, ix;
      lo = $urandom_range(0, 500); hi = lo + $urandom_range(0, 300); ix = $urandom_range(lo, hi);
      md = int'($urandom_range(0, 20)) - 10;
      if (md < -(hi - lo + 1)) md = 0;
      if (md > (hi - lo + 1)) md = 0;
      setr(m_act, AG_LO, lo); setr(m_act, AG_HI, hi); setr(m_act, AG_INDEX, ix);
      setr(m_act, AG_MOD, md); m_mod[m_act] = md;
      repeat (8) do_step();
    end
    checks++; if (wraps < 5) begin failures++; $display("too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
