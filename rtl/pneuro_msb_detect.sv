// pneuro_msb_detect: automatic MSB detector.
//
// Returns the position of the most significant bit of a 32-bit two's complement
// value that differs from its sign bit, i.e. the number of bits the magnitude
// needs, minus one. `none` is set when every bit equals the sign bit (0 or -1),
// and pos is then 0. The saturation unit uses it to pick its shift
// automatically; the MSB instruction exposes it for the instruction sequences
// that approximate non-linear functions. Combinational priority encoder.
//
// The detector is named in the architecture; the exact rule for negative
// values is this design's choice.
module pneuro_msb_detect (
  input  logic [31:0] v,
  output logic [4:0]  pos,
  output logic        none
);

  always_comb begin
    pos  = 5'd0;
    none = 1'b1;
    for (int i = 0; i < 31; i++) begin
      if (v[i] != v[31]) begin
        pos  = 5'(i);
        none = 1'b0;
      end
    end
  end

endmodule
