// pneuro_axi_slave: AXI4 slave port of the accelerator.
//
// Exposes every program memory, data memory and register of the accelerator to
// the host system bus. It turns AXI4 write and read bursts into single 32-bit
// accesses on an internal request / grant port (req, we, addr, wdata, wstrb;
// gnt accepts the access; a read's data return with rvalid one or more cycles
// later). The internal side may hold gnt low, e.g. while the PEs use a bank,
// and the AXI side then waits.
//
// This design's choices: 32-bit data, one transaction at a time (reads and
// writes alternate when both are pending), INCR and WRAP bursts both walk
// upward (WRAP is treated as INCR), FIXED bursts repeat the address, every
// response is OKAY, and awsize / arsize are not looked at: every beat is a
// 32-bit word (verilator reports them unused).
//
// Timing: a write beat takes at least one cycle; a read beat at least three
// (request, data, handshake on R).
//
// Concurrent assertions check the AXI rule that R and B responses stay valid
// and unchanged until accepted.
module pneuro_axi_slave #(
  parameter int unsigned IDW = 4,
  parameter int unsigned AW  = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  // write address
  input  logic [IDW-1:0] awid,
  input  logic [AW-1:0]  awaddr,
  input  logic [7:0]     awlen,
  input  logic [2:0]     awsize,
  input  logic [1:0]     awburst,
  input  logic           awvalid,
  output logic           awready,
  // write data
  input  logic [31:0]    wdata,
  input  logic [3:0]     wstrb,
  input  logic           wlast,
  input  logic           wvalid,
  output logic           wready,
  // write response
  output logic [IDW-1:0] bid,
  output logic [1:0]     bresp,
  output logic           bvalid,
  input  logic           bready,
  // read address
  input  logic [IDW-1:0] arid,
  input  logic [AW-1:0]  araddr,
  input  logic [7:0]     arlen,
  input  logic [2:0]     arsize,
  input  logic [1:0]     arburst,
  input  logic           arvalid,
  output logic           arready,
  // read data
  output logic [IDW-1:0] rid,
  output logic [31:0]    rdata,
  output logic [1:0]     rresp,
  output logic           rlast,
  output logic           rvalid,
  input  logic           rready,
  // internal port
  output logic           req,
  output logic           we,
  output logic [AW-1:0]  addr,
  output logic [31:0]    req_wdata,
  output logic [3:0]     req_wstrb,
  input  logic           gnt,
  input  logic           req_rvalid,
  input  logic [31:0]    req_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_WDATA, S_BRESP, S_RREQ, S_RWAIT, S_RDATA} state_e;
  state_e         state_q;
  logic [AW-1:0]  addr_q;
  logic [7:0]     cnt_q, len_q;
  logic [1:0]     burst_q;
  logic [IDW-1:0] id_q;
  logic [31:0]    rdata_q;
  logic           last_was_read_q;

  logic pick_write, pick_read;

  always_comb begin
    pick_write = awvalid && (!arvalid || last_was_read_q);
    pick_read  = arvalid && !pick_write;
  end

  assign awready = state_q == S_IDLE && pick_write;
  assign arready = state_q == S_IDLE && pick_read;

  assign req       = (state_q == S_WDATA && wvalid) || state_q == S_RREQ;
  assign we        = state_q == S_WDATA;
  assign addr      = addr_q;
  assign req_wdata = wdata;
  assign req_wstrb = wstrb;
  assign wready    = state_q == S_WDATA && wvalid && gnt;

  assign bvalid = state_q == S_BRESP;
  assign bid    = id_q;
  assign bresp  = 2'b00;
  assign rvalid = state_q == S_RDATA;
  assign rid    = id_q;
  assign rdata  = rdata_q;
  assign rresp  = 2'b00;
  assign rlast  = cnt_q == len_q;

  function automatic logic [AW-1:0] next_addr(input logic [AW-1:0] a, input logic [1:0] burst);
    return (burst == 2'b00) ? a : a + AW'(4);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      addr_q  <= '0;
      cnt_q   <= '0;
      len_q   <= '0;
      burst_q <= '0;
      id_q    <= '0;
      rdata_q <= '0;
      last_was_read_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          if (pick_write) begin
            state_q <= S_WDATA; addr_q <= awaddr; len_q <= awlen; cnt_q <= '0;
            burst_q <= awburst; id_q <= awid; last_was_read_q <= 1'b0;
          end else if (pick_read) begin
            state_q <= S_RREQ; addr_q <= araddr; len_q <= arlen; cnt_q <= '0;
            burst_q <= arburst; id_q <= arid; last_was_read_q <= 1'b1;
          end
        end
        S_WDATA: if (wvalid && gnt) begin
          addr_q <= next_addr(addr_q, burst_q);
          cnt_q  <= cnt_q + 8'd1;
          if (wlast || cnt_q == len_q) state_q <= S_BRESP;
        end
        S_BRESP: if (bready) state_q <= S_IDLE;
        S_RREQ:  if (gnt) state_q <= S_RWAIT;
        S_RWAIT: if (req_rvalid) begin
          rdata_q <= req_rdata;
          state_q <= S_RDATA;
        end
        S_RDATA: if (rready) begin
          if (cnt_q == len_q) state_q <= S_IDLE;
          else begin
            state_q <= S_RREQ;
            cnt_q   <= cnt_q + 8'd1;
            addr_q  <= next_addr(addr_q, burst_q);
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // AXI4 rules for the channels this slave drives: a response, once valid,
  // stays valid and unchanged until the master accepts it.
  a_r_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata) && $stable(rlast) && $stable(rid));
  a_b_stable: assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid && $stable(bid) && $stable(bresp));

endmodule
