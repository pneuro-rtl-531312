// tb_regfile: self-checking test of the multi-precision register file. Random
// 8-, 16- and 32-bit writes update a byte-array model; both read ports are
// checked at every width after every write.
//
// Write at a clock edge, reads combinational. The byte / half-word
// aliasing onto the 32-bit words is the design's own layout.
module tb_regfile;
  import pneuro_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  rspec_t ra, rb, wa;
  logic [31:0] rdata_a, rdata_b, wdata;
  int checks = 0, failures = 0;
  logic [7:0] m [32];
  pneuro_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic [31:0] mrd(rspec_t s);
    case (s.width)
      W8:  return {24'd0, m[s.idx]};
      W16: return {16'd0, m[2*s.idx+1], m[2*s.idx]};
      default: return {m[4*s.idx+3], m[4*s.idx+2], m[4*s.idx+1], m[4*s.idx]};
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) m[i] = 0;
    ra = '0; rb = '0; wa = '0; wdata = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we = 1; wa.width = 2'($urandom_range(0, 2)); wa.idx = 3'($urandom); wdata = $urandom;
      case (wa.width)
        W8: m[wa.idx] = wdata[7:0];
        W16: begin m[2*wa.idx] = wdata[7:0]; m[2*wa.idx+1] = wdata[15:8]; end
        default: for (int b = 0; b < 4; b++) m[4*wa.idx+b] = wdata[8*b +: 8];
      endcase
      @(negedge clk); we = 0;
      for (int k = 0; k < 4; k++) begin
        ra.width = 2'($urandom_range(0, 2)); ra.idx = 3'($urandom);
        rb.width = 2'($urandom_range(0, 2)); rb.idx = 3'($urandom);
        #1; checks += 2;
        if (rdata_a !== mrd(ra)) begin failures++; $display("A %p got %h exp %h", ra, rdata_a, mrd(ra)); end
        if (rdata_b !== mrd(rb)) begin failures++; $display("B %p got %h exp %h", rb, rdata_b, mrd(rb)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
