// tb_pe: self-checking random test of one processing element. Random
// computation instructions with random operand sources, destinations, guards
// (PE enable) and saturation settings run against a reference model of the
// register file, accumulator and flags; register file, accumulator, flags and
// the store port are compared after every instruction.
//
// One instruction per cycle; the PE's state is compared at the following
// negedge. Instruction set and operand encodings are the design's own.
module tb_pe;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  logic clk = 0, rst_n = 0, valid = 0, en = 0;
  comp_instr_t ins;
  sat_cfg_t sat_cfg;
  logic [7:0] route_a8, route_b8, store_data;
  logic [31:0] route_a32, route_b32, exp_a, exp_b;
  flags_t flags;
  logic store_we, sat_hit;
  int checks = 0, failures = 0;
  int n_op [32];

  logic [7:0] m_rf [32];
  logic [31:0] m_acc;
  logic m_z, m_n;

  pneuro_pe dut (.*);
  always #5 clk = ~clk;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] rd(logic [4:0] f);
    int w, i; w = f[4:3]; i = f[2:0];
    if (w == 0) return {24'd0, m_rf[i]};
    if (w == 1) return {16'd0, m_rf[2*i+1], m_rf[2*i]};
    return {m_rf[4*i+3], m_rf[4*i+2], m_rf[4*i+1], m_rf[4*i]};
  endfunction
  function automatic logic [31:0] ext(logic [31:0] v, int w, bit s);
    if (w == 0) return s ? 32'(signed'(v[7:0])) : {24'd0, v[7:0]};
    if (w == 1) return s ? 32'(signed'(v[15:0])) : {16'd0, v[15:0]};
    return v;
  endfunction
  function automatic logic [31:0] opnd(src_t s, logic [7:0] r8, logic [31:0] r32);
    case (s.kind)
      SRC_REG: return ext(rd(s.field), s.field[4:3], s.sgn);
      SRC_MEM: return ext({24'd0, r8}, 0, s.sgn);
      SRC_NEIGH: return (s.field[4:3] == 0) ? ext({24'd0, r8}, 0, s.sgn) : ext(r32, s.field[4:3], s.sgn);
      default: return s.sgn ? 32'(signed'(s.field)) : {27'd0, s.field};
    endcase
  endfunction
  function automatic logic [7:0] sat(logic [31:0] a, sat_cfg_t c);
    longint v, s; int sh, p;
    v = longint'($signed(a));
    if (c.relu && v < 0) v = 0;
    sh = c.shift;
    if (c.auto_shift) begin
      p = -1;
      for (int i = 30; i >= 0; i--) if (v[i] != v[31]) begin p = i; break; end
      sh = p + 1 - (c.signed_out ? 7 : 8); if (sh < 0) sh = 0;
    end
    s = v >>> sh;
    if (c.signed_out) begin if (s > 127) s = 127; if (s < -128) s = -128; end
    else begin if (s > 255) s = 255; if (s < 0) s = 0; end
    return 8'(s);
  endfunction

  initial begin
    comp_op_e ops [20] = '{X_NOP, X_MOV, X_ADD, X_SUB, X_AND, X_OR, X_XOR, X_MIN, X_MAX, X_SHL, X_SHR,
                          X_CMP, X_MUL, X_MAC, X_MACZ, X_ACCLD, X_ACCADD, X_ACCST, X_SAT, X_MSB};
    for (int i = 0; i < 32; i++) m_rf[i] = 0;
    m_acc = 0; m_z = 0; m_n = 0;
    ins = '0; sat_cfg = '0; route_a8 = 0; route_b8 = 0; route_a32 = 0; route_b32 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] a, b, y, prod; bit wr, fl; logic [7:0] sy;
      int ea, eb;
      @(negedge clk);
      ins.is_comp = 1; ins.op = ops[$urandom_range(0, 19)];
      ins.guard = G_ALWAYS;
      ins.a = src_t'(8'($urandom)); ins.b = src_t'(8'($urandom));
      if (ins.a.field[4:3] == 3) ins.a.field[4:3] = 2;
      if (ins.b.field[4:3] == 3) ins.b.field[4:3] = 2;
      ins.dst = dst_t'(6'($urandom));
      if (ins.dst.field[4:3] == 3) ins.dst.field[4:3] = 2;
      sat_cfg = sat_cfg_t'(8'($urandom));
      route_a8 = 8'($urandom); route_b8 = 8'($urandom); route_a32 = $urandom; route_b32 = $urandom;
      valid = ($urandom_range(0, 9) != 0); en = ($urandom_range(0, 7) != 0);
      // model
      a = opnd(ins.a, route_a8, route_a32);
      b = opnd(ins.b, route_b8, route_b32);
      ea = (ins.a.sgn && a[7]) ? int'(a[7:0]) - 256 : int'(a[7:0]);
      eb = (ins.b.sgn && b[7]) ? int'(b[7:0]) - 256 : int'(b[7:0]);
      prod = 32'(ea * eb);
      sy = sat(m_acc, sat_cfg);
      wr = 1; fl = 1; y = 0;
      case (ins.op)
        X_MOV: y = a;  X_ADD: y = a + b;  X_SUB: y = a - b;  X_AND: y = a & b;
        X_OR: y = a | b;  X_XOR: y = a ^ b;
        X_MIN: y = ($signed(a) < $signed(b)) ? a : b;
        X_MAX: y = ($signed(a) > $signed(b)) ? a : b;
        X_SHL: y = a << b[4:0];  X_SHR: y = 32'($signed(a) >>> b[4:0]);
        X_MSB: begin y = 0; for (int i = 30; i >= 0; i--) if (a[i] != a[31]) begin y = 32'(i); break; end end
        X_CMP: begin y = a - b; wr = 0; end
        X_MUL: begin y = prod; fl = 0; end
        X_ACCST: begin y = m_acc; fl = 0; end
        X_SAT: begin y = sat_cfg.signed_out ? 32'(signed'(sy)) : {24'd0, sy}; fl = 0; end
        default: begin wr = 0; fl = 0; end
      endcase
      #1;
      checks++;
      if (store_we !== (valid && en && wr && ins.dst.to_mem) || (store_we && store_data !== y[7:0])) begin
        failures++; $display("t%0d store %0d/%h", t, store_we, store_data);
      end
      @(posedge clk);
      if (valid && en) begin
        n_op[ins.op]++;
        if (wr && !ins.dst.to_mem) begin
          int w, i; w = ins.dst.field[4:3]; i = ins.dst.field[2:0];
          if (w == 0) m_rf[i] = y[7:0];
          else if (w == 1) begin m_rf[2*i] = y[7:0]; m_rf[2*i+1] = y[15:8]; end
          else for (int k = 0; k < 4; k++) m_rf[4*i+k] = y[8*k +: 8];
        end
        if (fl) begin m_z = (y == 0); m_n = y[31]; end
        case (ins.op)
          X_MAC: m_acc = m_acc + prod;  X_MACZ: m_acc = prod;
          X_ACCLD: m_acc = a;  X_ACCADD: m_acc = m_acc + a;
          default: ;
        endcase
      end
      #1;
      checks++;
      if (dut.acc_q !== m_acc || flags.z !== m_z || flags.n !== m_n) begin
        failures++; if (failures < 10) $display("t%0d %s acc %h exp %h flags %b exp %b%b", t, ins.op.name(), dut.acc_q, m_acc, flags, m_z, m_n);
      end
      for (int w = 0; w < 8; w++) begin
        checks++;
        if (dut.u_rf.rf_q[w] !== {m_rf[4*w+3], m_rf[4*w+2], m_rf[4*w+1], m_rf[4*w]}) begin
          failures++; if (failures < 10) $display("t%0d %s rf[%0d] %h", t, ins.op.name(), w, dut.u_rf.rf_q[w]);
        end
      end
    end
    for (int o = 1; o < 20; o++) begin checks++; if (n_op[o] == 0) begin failures++; $display("op %0d never ran", o); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
