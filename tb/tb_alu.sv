// tb_alu: self-checking test of the PE ALU: every operation on random and
// corner-case operands against a reference model, flags included.
//
// Purely combinational: operands are applied and y / flags compared after a
// short delay. The operation set checked is the design's own.
module tb_alu;
  import pneuro_pkg::*;
  comp_op_e op;
  logic [31:0] a, b, y;
  flags_t flags;
  int checks = 0, failures = 0;
  pneuro_alu dut (.*);

  function automatic logic [31:0] model(comp_op_e o, logic [31:0] x, logic [31:0] z);
    int sx, sz; sx = x; sz = z;
    case (o)
      X_MOV: return x;
      X_ADD: return x + z;
      X_SUB, X_CMP: return x - z;
      X_AND: return x & z;
      X_OR:  return x | z;
      X_XOR: return x ^ z;
      X_MIN: return (sx < sz) ? x : z;
      X_MAX: return (sx > sz) ? x : z;
      X_SHL: return x << z[4:0];
      X_SHR: return 32'(sx >>> z[4:0]);
      X_MSB: begin
        for (int i = 30; i >= 0; i--) if (x[i] != x[31]) return 32'(i);
        return 0;
      end
      default: return x;
    endcase
  endfunction

  initial begin
    comp_op_e ops [12] = '{X_MOV, X_ADD, X_SUB, X_AND, X_OR, X_XOR, X_MIN, X_MAX, X_SHL, X_SHR, X_CMP, X_MSB};
    for (int t = 0; t < 6000; t++) begin
      logic [31:0] e;
      op = ops[t % 12];
      a = (t % 5 == 0) ? 32'(int'($urandom_range(0, 255)) - 128) : $urandom;
      b = (t % 7 == 0) ? a : $urandom;
      #1; e = model(op, a, b); checks++;
      if (y !== e || flags.z !== (e == 0) || flags.n !== e[31]) begin
        failures++;
        if (failures < 10) $display("op %s a %h b %h y %h exp %h", op.name(), a, b, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
