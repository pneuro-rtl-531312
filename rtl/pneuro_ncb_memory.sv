// pneuro_ncb_memory: the multi-banked SRAM of one Neural Computing Block.
//
// BANKS independent banks (typically two for operands, one for temporary and one
// for final results) each hold one byte lane per PE. There is no separate
// coefficient memory: every bank can serve any operand. The PE side has two read
// requests (operands A and B, each naming a bank and a word address from the
// cluster's address generators) and one lane-masked write (the store path).
// The host side is a 32-bit port reaching half a bank word (4 lanes) at a time.
//
// Arbitration is this design's choice: the PEs always win, the host waits
// (h_gnt low) while the PEs use the read port (host read) or the write port
// (host write) of the bank it addresses. When A and B name the same bank in one
// cycle, that bank is read at A's address and both operands see that word.
//
// Timing: PE reads issued in cycle t give rd_a/rd_b in cycle t+1. A granted host
// read in cycle t gives h_rvalid and h_rdata in cycle t+1; a granted host write
// completes in the cycle it is granted.
module pneuro_ncb_memory
  import pneuro_pkg::*;
#(
  parameter int unsigned LANES = PE_PER_NCB,
  parameter int unsigned NB    = BANKS,
  parameter int unsigned WORDS = BANK_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // PE side
  input  logic                  re_a,
  input  logic [1:0]            bank_a,
  input  logic [AW-1:0]         addr_a,
  input  logic                  re_b,
  input  logic [1:0]            bank_b,
  input  logic [AW-1:0]         addr_b,
  output logic [LANES-1:0][7:0] rd_a,
  output logic [LANES-1:0][7:0] rd_b,
  input  logic [LANES-1:0]      we,
  input  logic [1:0]            wbank,
  input  logic [AW-1:0]         waddr,
  input  logic [LANES-1:0][7:0] wdata,
  // host side
  input  logic                  h_req,
  input  logic                  h_we,
  input  logic [1:0]            h_bank,
  input  logic [AW-1:0]         h_addr,
  input  logic                  h_half,
  input  logic [31:0]           h_wdata,
  input  logic [3:0]            h_wstrb,
  output logic                  h_gnt,
  output logic                  h_rvalid,
  output logic [31:0]           h_rdata
);

  logic [NB-1:0]                 b_re;
  logic [NB-1:0][AW-1:0]         b_raddr;
  logic [NB-1:0][LANES-1:0][7:0] b_rdata;
  logic [NB-1:0][LANES-1:0]      b_we;
  logic [NB-1:0][AW-1:0]         b_waddr;
  logic [NB-1:0][LANES-1:0][7:0] b_wdata;

  logic [1:0] bank_a_q, bank_b_q, h_bank_q;
  logic       h_half_q;
  logic       pe_rd_busy, pe_wr_busy;
  logic [LANES-1:0][7:0] h_lanes;
  logic [LANES-1:0]      h_lane_we;

  always_comb begin
    pe_rd_busy = (re_a && bank_a == h_bank) || (re_b && bank_b == h_bank);
    pe_wr_busy = (|we) && wbank == h_bank;
    h_gnt      = h_req && (h_we ? !pe_wr_busy : !pe_rd_busy);
    for (int l = 0; l < LANES; l++) begin
      h_lanes[l]   = h_wdata[8*(l%4) +: 8];
      h_lane_we[l] = (l / 4 == int'(h_half)) && h_wstrb[l%4];
    end
    for (int k = 0; k < NB; k++) begin
      b_re[k]    = 1'b0;
      b_raddr[k] = h_addr;
      if (re_a && bank_a == 2'(k)) begin
        b_re[k] = 1'b1; b_raddr[k] = addr_a;
      end else if (re_b && bank_b == 2'(k)) begin
        b_re[k] = 1'b1; b_raddr[k] = addr_b;
      end else if (h_gnt && !h_we && h_bank == 2'(k)) begin
        b_re[k] = 1'b1;
      end
      b_we[k]    = '0;
      b_waddr[k] = h_addr;
      b_wdata[k] = h_lanes;
      if (|we && wbank == 2'(k)) begin
        b_we[k] = we; b_waddr[k] = waddr; b_wdata[k] = wdata;
      end else if (h_gnt && h_we && h_bank == 2'(k)) begin
        b_we[k] = h_lane_we;
      end
    end
  end

  for (genvar k = 0; k < NB; k++) begin : g_bank
    pneuro_sram_bank #(.LANES(LANES), .WORDS(WORDS), .AW(AW)) u_bank (
      .clk, .re(b_re[k]), .raddr(b_raddr[k]), .rdata(b_rdata[k]),
      .we(b_we[k]), .waddr(b_waddr[k]), .wdata(b_wdata[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_a_q <= '0; bank_b_q <= '0; h_bank_q <= '0; h_half_q <= 1'b0; h_rvalid <= 1'b0;
    end else begin
      // when both operands name one bank, B follows A's word
      bank_a_q <= bank_a;
      bank_b_q <= bank_b;
      h_bank_q <= h_bank;
      h_half_q <= h_half;
      h_rvalid <= h_gnt && !h_we;
    end
  end

  assign rd_a = b_rdata[bank_a_q];
  assign rd_b = b_rdata[bank_b_q];

  always_comb begin
    for (int i = 0; i < 4; i++) h_rdata[8*i +: 8] = b_rdata[h_bank_q][4*int'(h_half_q) + i];
  end

endmodule
