// pneuro_pe: processing element of an NCB.
//
// A PE executes the full processing chain on its own: ALU, 9-bit multiplier,
// 32-bit accumulator, saturation / linear rectifier unit and a multi-precision
// register file, with zero and negative flags for the NCB's guards. All PEs of
// a cluster receive the same decoded computation instruction (SIMD).
//
// Operands come from the register file, from the routing module (a memory lane
// or another PE's register, on the 8- or 32-bit path) or from the 5-bit
// immediate of the instruction, and are sign- or zero-extended to 32 bits as
// the instruction says. The multiplier uses the low byte of each operand.
// Results go to the register file or, as one byte, to this PE's lane of a
// memory bank (store_* outputs, written by the NCB memory at the same clock
// edge). Operations of a PE whose `en` is low (PE disabled or guard false)
// change nothing.
//
// Timing: one instruction per cycle; operands are read, the operation is done
// and the register file, accumulator and flags are written in the same cycle.
// exp_a / exp_b give this PE's register named by the A / B operand fields for
// neighbour exchange; they depend only on registers, not on the routed values.
module pneuro_pe
  import pneuro_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,     // an instruction is in the execute stage
  input  comp_instr_t ins,
  input  logic        en,        // PE enabled and guard true
  input  sat_cfg_t    sat_cfg,
  input  logic [7:0]  route_a8,
  input  logic [31:0] route_a32,
  input  logic [7:0]  route_b8,
  input  logic [31:0] route_b32,
  output logic [31:0] exp_a,
  output logic [31:0] exp_b,
  output flags_t      flags,
  output logic        store_we,
  output logic [7:0]  store_data,
  output logic        sat_hit     // the saturation unit clamped this cycle
);

  logic [31:0] opa, opb, alu_y, prod, acc_q, result;
  logic [7:0]  sat_y;
  flags_t      alu_f;
  logic        writes_dst, sets_flags, act;

  function automatic logic [31:0] operand(input src_t s, input logic [31:0] rf,
                                          input logic [7:0] r8, input logic [31:0] r32);
    logic [31:0] r;
    unique case (s.kind)
      SRC_REG:   r = extend(rf, s.field[4:3], s.sgn);
      SRC_MEM:   r = extend({24'd0, r8}, W8, s.sgn);
      SRC_NEIGH: r = (s.field[4:3] == W8) ? extend({24'd0, r8}, W8, s.sgn)
                                          : extend(r32, s.field[4:3], s.sgn);
      default:   r = {{27{s.sgn & s.field[4]}}, s.field};
    endcase
    return r;
  endfunction

  pneuro_regfile u_rf (
    .clk, .rst_n,
    .ra(rspec_t'(ins.a.field)), .rdata_a(exp_a),
    .rb(rspec_t'(ins.b.field)), .rdata_b(exp_b),
    .we(act && writes_dst && !ins.dst.to_mem), .wa(rspec_t'(ins.dst.field)), .wdata(result)
  );

  assign opa = operand(ins.a, exp_a, route_a8, route_a32);
  assign opb = operand(ins.b, exp_b, route_b8, route_b32);

  pneuro_alu      u_alu (.op(ins.op), .a(opa), .b(opb), .y(alu_y), .flags(alu_f));
  pneuro_mul9     u_mul (.a(opa[7:0]), .a_sgn(ins.a.sgn), .b(opb[7:0]), .b_sgn(ins.b.sgn), .p(prod));
  pneuro_sat_unit u_sat (.acc(acc_q), .cfg(sat_cfg), .y(sat_y), .saturated(sat_hit));

  assign act = valid && en;

  always_comb begin
    writes_dst = 1'b0;
    sets_flags = 1'b0;
    result     = alu_y;
    unique case (ins.op)
      X_MOV, X_ADD, X_SUB, X_AND, X_OR, X_XOR, X_MIN, X_MAX, X_SHL, X_SHR, X_MSB: begin
        writes_dst = 1'b1; sets_flags = 1'b1;
      end
      X_CMP:   sets_flags = 1'b1;
      X_MUL:   begin writes_dst = 1'b1; result = prod; end
      X_ACCST: begin writes_dst = 1'b1; result = acc_q; end
      X_SAT:   begin writes_dst = 1'b1;
                     result = sat_cfg.signed_out ? {{24{sat_y[7]}}, sat_y} : {24'd0, sat_y}; end
      default: ;
    endcase
  end

  assign store_we   = act && writes_dst && ins.dst.to_mem;
  assign store_data = result[7:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      flags <= '0;
    end else if (act) begin
      unique case (ins.op)
        X_MAC:    acc_q <= acc_q + prod;
        X_MACZ:   acc_q <= prod;
        X_ACCLD:  acc_q <= opa;
        X_ACCADD: acc_q <= acc_q + opa;
        default: ;
      endcase
      if (sets_flags) flags <= alu_f;
    end
  end

endmodule
