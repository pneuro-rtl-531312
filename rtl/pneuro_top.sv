// pneuro_top: the PNeuro accelerator IP.
//
// N_CL clusters (two in the evaluated configuration, 64 PEs and 264 KB of
// memory in all) sit behind one AXI4 slave port through which the host loads
// programs and data, reads results and controls the clusters. The clusters run
// either independently (each its own program, e.g. different layers) or, in
// synchronized mode, started together and kept in step by BARRIER
// instructions, with the same program for more data parallelism. The daisy
// chain joins the outer NCBs of neighbouring clusters so that the routing
// modules can reach across the cluster boundary. `irq` is the OR of the
// clusters' interrupt requests.
//
// Host address map (byte addresses, this design's choice):
//   cluster c at c * 0x40000 (window layout in pneuro_cluster)
//   0x80000  MODE    bit 0: synchronized mode
//   0x80004  GSTART  write bit 0: start all clusters in the same cycle
//   0x80008  IRQS    read: interrupt request of each cluster
module pneuro_top
  import pneuro_pkg::*;
#(
  parameter int unsigned N_CL = N_CLUSTERS,
  parameter int unsigned IDW  = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [IDW-1:0] awid,
  input  logic [31:0]    awaddr,
  input  logic [7:0]     awlen,
  input  logic [2:0]     awsize,
  input  logic [1:0]     awburst,
  input  logic           awvalid,
  output logic           awready,
  input  logic [31:0]    wdata,
  input  logic [3:0]     wstrb,
  input  logic           wlast,
  input  logic           wvalid,
  output logic           wready,
  output logic [IDW-1:0] bid,
  output logic [1:0]     bresp,
  output logic           bvalid,
  input  logic           bready,
  input  logic [IDW-1:0] arid,
  input  logic [31:0]    araddr,
  input  logic [7:0]     arlen,
  input  logic [2:0]     arsize,
  input  logic [1:0]     arburst,
  input  logic           arvalid,
  output logic           arready,
  output logic [IDW-1:0] rid,
  output logic [31:0]    rdata,
  output logic [1:0]     rresp,
  output logic           rlast,
  output logic           rvalid,
  input  logic           rready,
  output logic           irq
);

  logic        req, we, gnt, req_rvalid;
  logic [31:0] addr, req_wdata, req_rdata;
  logic [3:0]  req_wstrb;

  pneuro_axi_slave #(.IDW(IDW), .AW(32)) u_axi (
    .clk, .rst_n,
    .awid, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bid, .bresp, .bvalid, .bready,
    .arid, .araddr, .arlen, .arsize, .arburst, .arvalid, .arready,
    .rid, .rdata, .rresp, .rlast, .rvalid, .rready,
    .req, .we, .addr, .req_wdata, .req_wstrb, .gnt, .req_rvalid, .req_rdata
  );

  // global registers
  logic            sync_mode_q, gstart, g_sel, g_rvalid_q;
  logic [31:0]     g_rdata_q;
  logic [N_CL-1:0] cl_sel, cl_gnt, cl_rvalid, cl_irq, cl_bar_wait, cl_running;
  logic [31:0]     cl_rdata [N_CL];
  logic            bar_release;

  assign g_sel  = req && addr[19];
  assign gstart = g_sel && we && addr[3:2] == 2'd1 && req_wdata[0];

  always_comb begin
    for (int c = 0; c < N_CL; c++) cl_sel[c] = req && !addr[19] && addr[19:18] == 2'(c);
    gnt        = g_sel || |(cl_sel & cl_gnt);
    req_rvalid = g_rvalid_q || |cl_rvalid;
    req_rdata  = g_rdata_q;
    for (int c = 0; c < N_CL; c++) if (cl_rvalid[c]) req_rdata = cl_rdata[c];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_mode_q <= 1'b0;
      g_rvalid_q  <= 1'b0;
      g_rdata_q   <= '0;
    end else begin
      if (g_sel && we && addr[3:2] == 2'd0) sync_mode_q <= req_wdata[0];
      g_rvalid_q <= g_sel && !we;
      unique case (addr[3:2])
        2'd0:    g_rdata_q <= {31'd0, sync_mode_q};
        2'd2:    g_rdata_q <= 32'(cl_irq);
        default: g_rdata_q <= '0;
      endcase
    end
  end

  // barrier: released when every cluster waits at one
  assign bar_release = &cl_bar_wait;

  nb_lanes_t to_left [N_CL];   // lanes cluster c offers its left neighbour
  nb_lanes_t to_right [N_CL];  // lanes cluster c offers its right neighbour

  for (genvar c = 0; c < N_CL; c++) begin : g_cl
    nb_lanes_t from_left, from_right;
    if (c == 0) begin : g_first
      assign from_left = '0;
    end else begin : g_mid_l
      assign from_left = to_right[c-1];
    end
    if (c == N_CL - 1) begin : g_last
      assign from_right = '0;
    end else begin : g_mid_r
      assign from_right = to_left[c+1];
    end

    pneuro_cluster u_cluster (
      .clk, .rst_n,
      .h_req(cl_sel[c]), .h_we(we), .h_addr(addr[17:0]), .h_wdata(req_wdata), .h_wstrb(req_wstrb),
      .h_gnt(cl_gnt[c]), .h_rvalid(cl_rvalid[c]), .h_rdata(cl_rdata[c]),
      .gstart, .sync_mode(sync_mode_q), .bar_wait(cl_bar_wait[c]), .bar_release, .irq(cl_irq[c]),
      .running(cl_running[c]),
      .nb_left_i(from_left), .nb_left_o(to_left[c]), .nb_right_i(from_right), .nb_right_o(to_right[c]),
      .exec_o(), .sat_hit_o(), .ag_wrap_o()
    );
  end

  assign irq = |cl_irq;

endmodule
