// pneuro_alu: arithmetic and logic unit of a PE.
//
// Works on 32-bit operands that the PE has already sign- or zero-extended from
// their source width. Operations: move, add, subtract, and, or, xor, signed
// minimum and maximum (max pooling), shift left, arithmetic shift right, compare
// (subtract for the flags only) and MSB position (for the instruction sequences
// that approximate tanh, sigmoid and similar functions). The set is this
// design's choice among the 40 computation instructions of the architecture.
// The zero and negative flags describe the result. Combinational.
module pneuro_alu
  import pneuro_pkg::*;
(
  input  comp_op_e    op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y,
  output flags_t      flags
);

  logic [4:0] msb_pos;
  logic       msb_none;

  pneuro_msb_detect u_msb (.v(a), .pos(msb_pos), .none(msb_none));

  always_comb begin
    unique case (op)
      X_MOV:   y = a;
      X_ADD:   y = a + b;
      X_SUB,
      X_CMP:   y = a - b;
      X_AND:   y = a & b;
      X_OR:    y = a | b;
      X_XOR:   y = a ^ b;
      X_MIN:   y = ($signed(a) < $signed(b)) ? a : b;
      X_MAX:   y = ($signed(a) > $signed(b)) ? a : b;
      X_SHL:   y = a << b[4:0];
      X_SHR:   y = 32'($signed(a) >>> b[4:0]);
      X_MSB:   y = {27'd0, msb_pos};
      default: y = a;
    endcase
    flags.z = (y == 32'd0);
    flags.n = y[31];
  end

endmodule
