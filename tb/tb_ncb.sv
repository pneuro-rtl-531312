// tb_ncb: self-checking test of a Neural Computing Block. The host port loads
// pixels and signed coefficients; the test then issues instructions as the
// cluster controller would (one per cycle, routing configuration one cycle
// later, in the execute stage) to compute a 3-tap convolution across the NCB
// edges (neighbour lanes from both sides, coefficient multicast), rectify and
// saturate it into a bank, read it back through the host port, and exercise
// guards, the PE enable mask, 32-bit PE-to-PE exchange and padding.
//
// Uses reduced banks (64 words). The two-stage timing (read in the issue
// cycle, compute and write-back in the next) is the design's own.
module tb_ncb;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  localparam int W = 64;
  logic clk = 0, rst_n = 0;
  logic iss_valid = 0;
  comp_instr_t iss_ins = '0;
  logic [5:0] addr_a = 0, addr_b = 0, addr_w = 0;
  route_cfg_t route_a = '0, route_b = '0;
  sat_cfg_t sat_cfg = '0;
  logic [7:0] pe_en = '1;
  logic [7:0][7:0] src_a8_o, src_b8_o, left_a8, left_b8 = '0, right_a8, right_b8 = '0;
  logic [7:0][31:0] src_a32_o, src_b32_o, left_a32 = '0, left_b32 = '0, right_a32 = '0, right_b32 = '0;
  logic h_req = 0, h_we = 0, h_half = 0, h_gnt, h_rvalid;
  logic [1:0] h_bank = 0;
  logic [5:0] h_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [3:0] h_wstrb = 4'hf;
  logic [7:0] exec_o, sat_hit_o;
  int checks = 0, failures = 0, n_exec = 0, n_sat = 0;

  pneuro_ncb #(.WORDS(W)) dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) begin n_exec += $countones(exec_o); n_sat += $countones(sat_hit_o); end

  route_cfg_t next_ra = '0, next_rb = '0;
  // issue one instruction; its routing configuration applies in the next cycle
  task automatic issue(input logic [31:0] ins, input route_cfg_t ra = '0, input route_cfg_t rb = '0,
                       input int aa = 0, input int ab = 0, input int aw = 0);
    @(negedge clk);
    route_a = next_ra; route_b = next_rb;
    iss_valid = 1; iss_ins = comp_instr_t'(ins); addr_a = 6'(aa); addr_b = 6'(ab); addr_w = 6'(aw);
    next_ra = ra; next_rb = rb;
  endtask
  task automatic drain();
    @(negedge clk); route_a = next_ra; route_b = next_rb; iss_valid = 0; iss_ins = '0;
    @(negedge clk);
  endtask
  task automatic hwrite(input int bank, input int a, input int half, input logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_bank = 2'(bank); h_addr = 6'(a); h_half = half[0]; h_wdata = d;
    @(posedge clk); while (!h_gnt) @(posedge clk);
    @(negedge clk); h_req = 0;
  endtask
  task automatic hread(input int bank, input int a, input int half, output logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_bank = 2'(bank); h_addr = 6'(a); h_half = half[0];
    @(posedge clk); while (!h_gnt) @(posedge clk);
    @(negedge clk); h_req = 0; d = h_rdata;
  endtask
  function automatic route_cfg_t rc(route_mode_e m, int amt, edge_fill_e e = E_NEIGH);
    return '{mode: m, amount: 3'(amt), edge_fill: e};
  endfunction

  // register files of the PEs, for checking
  logic [7:0][31:0] rfs [8];
  for (genvar g = 0; g < 8; g++) begin : g_peek
    assign rfs[g] = dut.g_pe[g].u_pe.u_rf.rf_q;
  end

  logic [7:0] x [8], lft [8], rgt [8];
  logic signed [7:0] c [3];
  int conv [8];

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      x[i] = 8'($urandom); lft[i] = 8'($urandom); rgt[i] = 8'($urandom);
      left_a8[i] = lft[i]; right_a8[i] = rgt[i];
    end
    c[0] = 8'sd3; c[1] = -8'sd2; c[2] = 8'sd1;
    hwrite(0, 5, 0, {x[3], x[2], x[1], x[0]});
    hwrite(0, 5, 1, {x[7], x[6], x[5], x[4]});
    hwrite(1, 9, 0, {8'd0, c[2], c[1], c[0]});
    // read back
    hread(0, 5, 1, d); checks++; if (d !== {x[7], x[6], x[5], x[4]}) failures++;

    // y[i] = c0*x[i-1] + c1*x[i] + c2*x[i+1], neighbours across the edges
    sat_cfg = '{auto_shift: 1'b0, relu: 1'b1, signed_out: 1'b0, shift: 5'd1};
    issue(X(X_MACZ, M(0), M(1, 1), DNONE), rc(R_SHR, 1), rc(R_MCAST, 0), 5, 9);
    issue(X(X_MAC,  M(0), M(1, 1), DNONE), rc(R_DIRECT, 0), rc(R_MCAST, 1), 5, 9);
    issue(X(X_MAC,  M(0), M(1, 1), DNONE), rc(R_SHL, 1), rc(R_MCAST, 2), 5, 9);
    issue(X(X_SAT,  SNONE, SNONE, DM(2)), '0, '0, 0, 0, 17);
    issue(X(X_ACCST, SNONE, SNONE, DR(2, 2)));
    // the store is visible to the second instruction after it
    issue(X(X_MOV, M(2), SNONE, DR(0, 0)), '0, '0, 17);
    drain();
    for (int i = 0; i < 8; i++) begin
      int xm, xp, s; logic [7:0] e;
      xm = (i == 0) ? lft[7] : x[i-1];
      xp = (i == 7) ? rgt[0] : x[i+1];
      conv[i] = c[0] * xm + c[1] * int'(x[i]) + c[2] * xp;
      s = conv[i] < 0 ? 0 : conv[i] >>> 1;
      e = (s > 255) ? 8'd255 : 8'(s);
      checks += 2;
      if (rfs[i][2] !== 32'(conv[i])) begin failures++; $display("pe%0d acc %0d exp %0d", i, $signed(rfs[i][2]), conv[i]); end
      if (rfs[i][0][7:0] !== e) begin failures++; $display("pe%0d sat %0d exp %0d", i, rfs[i][0][7:0], e); end
    end
    hread(2, 17, 0, d);
    for (int i = 0; i < 4; i++) begin checks++; if (d[8*i +: 8] !== rfs[i][0][7:0]) failures++; end

    // guards and PE enable: byte 1 = -1 where conv < 0, except in disabled PE 3
    issue(X(X_CMP, R(2, 2), I(0), DNONE));
    @(negedge clk); pe_en = 8'b1111_0111;
    issue(X(X_MOV, I(-1), SNONE, DR(0, 1), G_N));
    // 32-bit exchange: word 3 = conv[i+1] + conv[i], zero past the right edge
    issue(X(X_ADD, N(2, 2), R(2, 2), DR(2, 3)), rc(R_SHL, 1, E_ZERO));
    // padding: byte 4 = 1 from the ONE mode on path B
    issue(X(X_ADD, I(0), M(3), DR(0, 4)), '0, rc(R_ONE, 0));
    drain();
    pe_en = '1;
    for (int i = 0; i < 8; i++) begin
      logic [7:0] e1; logic [31:0] e3;
      e1 = (conv[i] < 0 && i != 3) ? 8'hff : 8'h00;
      e3 = (i == 7 || i == 3) ? ((i == 3) ? 32'd0 : 32'(conv[i])) : 32'(conv[i] + conv[i+1]);
      checks += 3;
      if (rfs[i][0][15:8] !== e1) begin failures++; $display("pe%0d guard byte %h exp %h", i, rfs[i][0][15:8], e1); end
      if (rfs[i][3] !== e3) begin failures++; $display("pe%0d word3 %0d exp %0d", i, $signed(rfs[i][3]), $signed(e3)); end
      if (rfs[i][1][7:0] !== ((i == 3) ? 8'd0 : 8'd1)) begin failures++; $display("pe%0d pad", i); end
    end
    checks++; if (n_exec == 0) failures++;
    $display("exec %0d sat %0d", n_exec, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
