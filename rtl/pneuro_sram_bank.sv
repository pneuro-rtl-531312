// pneuro_sram_bank: one bank of the multi-banked NCB memory.
//
// A bank word holds one byte lane per PE of the NCB. The bank has one read port
// and one write port (a pseudo-dual-port SRAM); the port count is this design's
// choice. The write port has one enable per byte lane so that disabled or
// guarded-off PEs leave their lane unchanged.
//
// Timing: a read issued with re in cycle t returns rdata in cycle t+1 and holds
// it until the next read. A read and a write to the same word in the same cycle
// return the old contents.
module pneuro_sram_bank #(
  parameter int unsigned LANES = 8,
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  re,
  input  logic [AW-1:0]         raddr,
  output logic [LANES-1:0][7:0] rdata,
  input  logic [LANES-1:0]      we,
  input  logic [AW-1:0]         waddr,
  input  logic [LANES-1:0][7:0] wdata
);

  logic [LANES-1:0][7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    for (int l = 0; l < LANES; l++)
      if (we[l]) mem[waddr][l] <= wdata[l];
  end

endmodule
