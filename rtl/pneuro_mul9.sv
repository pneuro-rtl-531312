// pneuro_mul9: the 9-bit multiplier of a PE.
//
// Each 8-bit operand passes an automatic sign extension unit that widens it to
// 9 bits, with its top bit copied (signed operand) or zero (unsigned operand),
// so that an unsigned pixel times a signed weight keeps full 8-bit precision.
// The 9 x 9 signed product (18 bits) is sign-extended to 32 bits for the
// accumulator. Combinational.
//
// The 9-bit multiplier with sign extension follows the architecture; the
// 32-bit sign extension of the product is the obvious choice for the accumulator.
module pneuro_mul9 (
  input  logic [7:0]  a,
  input  logic        a_sgn,
  input  logic [7:0]  b,
  input  logic        b_sgn,
  output logic [31:0] p
);

  logic signed [8:0]  a9, b9;
  logic signed [17:0] p18;

  assign a9  = {a_sgn & a[7], a};
  assign b9  = {b_sgn & b[7], b};
  assign p18 = a9 * b9;
  assign p   = {{14{p18[17]}}, p18};

endmodule
