// pneuro_regfile: multi-precision access register file of one PE.
//
// WORDS 32-bit registers, read and written as bytes (operands, final results),
// half-words (multiplication results) or words (accumulations, groups of four
// bytes). A register specifier is {width, index}: byte index n is byte n of the
// file (the first two words), half-word index n is half-word n (the first four
// words), word index n is word n. The size (8 words) and this numbering are
// this design's choices.
//
// Two combinational read ports return the addressed value zero-extended to 32
// bits (the PE applies the sign extension chosen by the instruction). One write
// port stores the low bytes of wdata that fit the specifier's width at the clock
// edge; the other bytes of the word keep their value.
module pneuro_regfile
  import pneuro_pkg::*;
#(
  parameter int unsigned WORDS = RF_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  input  rspec_t      ra,
  output logic [31:0] rdata_a,
  input  rspec_t      rb,
  output logic [31:0] rdata_b,
  input  logic        we,
  input  rspec_t      wa,
  input  logic [31:0] wdata
);

  logic [WORDS-1:0][31:0] rf_q;

  function automatic logic [31:0] rd(input logic [WORDS-1:0][31:0] rf, input rspec_t s);
    logic [31:0] r;
    unique case (s.width)
      W8:      r = {24'd0, rf[{2'b0, s.idx[2]}][8*s.idx[1:0] +: 8]};
      W16:     r = {16'd0, rf[{1'b0, s.idx[2:1]}][16*s.idx[0] +: 16]};
      default: r = rf[s.idx];
    endcase
    return r;
  endfunction

  assign rdata_a = rd(rf_q, ra);
  assign rdata_b = rd(rf_q, rb);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rf_q <= '0;
    end else if (we) begin
      unique case (wa.width)
        W8:      rf_q[{2'b0, wa.idx[2]}][8*wa.idx[1:0] +: 8]    <= wdata[7:0];
        W16:     rf_q[{1'b0, wa.idx[2:1]}][16*wa.idx[0] +: 16]  <= wdata[15:0];
        default: rf_q[wa.idx]                             <= wdata;
      endcase
    end
  end

endmodule
