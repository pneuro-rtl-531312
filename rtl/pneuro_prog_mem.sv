// pneuro_prog_mem: program memory of a cluster.
//
// WORDS 32-bit instructions. One read port feeds the cluster controller's fetch;
// a second port, read/write, exposes the memory to the host through the cluster
// interconnect so that programs can be loaded (and read back) at any time. Two
// ports are this design's choice. Both reads are synchronous: data appear the
// cycle after the address.
module pneuro_prog_mem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [AW-1:0] f_addr,
  output logic [31:0]   f_data,
  input  logic          h_en,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,
  input  logic [31:0]   h_wdata,
  input  logic [3:0]    h_wstrb,
  output logic [31:0]   h_rdata
);

  logic [3:0][7:0] mem [WORDS];

  always_ff @(posedge clk) begin
    f_data <= mem[f_addr];
  end

  always_ff @(posedge clk) begin
    if (h_en) begin
      if (h_we) begin
        for (int i = 0; i < 4; i++) if (h_wstrb[i]) mem[h_addr][i] <= h_wdata[8*i +: 8];
      end else begin
        h_rdata <= mem[h_addr];
      end
    end
  end

endmodule
