// pneuro_cluster: one PNeuro cluster.
//
// A cluster is a SIMD machine: a cluster controller with its program memory
// drives NCB_PER_CLUSTER Neural Computing Blocks with one instruction stream,
// and three data address generators broadcast bank addresses to all NCBs
// (generator 0 for operand A, 1 for operand B, 2 for stores). Adjacent NCBs are
// joined by the inter-NCB interconnect (their routing modules see each other's
// lanes); the outer NCBs reach the neighbouring clusters through the nb_* ports,
// which form the inter-cluster daisy chain and are gated by the controller's
// link enables.
//
// The cluster interconnect gives the host access to every memory and register
// of the cluster through a simple request / grant port (byte address inside
// the cluster window, 32-bit data). A request is accepted when h_gnt is high;
// read data return with h_rvalid one cycle later. Window layout (this design's
// choice):
//   0x00000 - 0x00FFF  program memory (1024 instructions)
//   0x10000 - 0x1003F  controller registers
//   0x20000 - 0x3FFFF  data memory: bits 16:15 NCB, 14:13 bank, 12:3 word,
//                      bit 2 selects lanes 0-3 or 4-7, each byte one PE lane
module pneuro_cluster
  import pneuro_pkg::*;
#(
  parameter int unsigned N_NCB = NCB_PER_CLUSTER,
  parameter int unsigned WORDS = BANK_WORDS,
  parameter int unsigned PWORDS = PROG_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  // host access
  input  logic        h_req,
  input  logic        h_we,
  input  logic [17:0] h_addr,
  input  logic [31:0] h_wdata,
  input  logic [3:0]  h_wstrb,
  output logic        h_gnt,
  output logic        h_rvalid,
  output logic [31:0] h_rdata,
  // global control
  input  logic        gstart,
  input  logic        sync_mode,
  output logic        bar_wait,
  input  logic        bar_release,
  output logic        irq,
  output logic        running,
  // daisy chain
  input  nb_lanes_t   nb_left_i,
  output nb_lanes_t   nb_left_o,
  input  nb_lanes_t   nb_right_i,
  output nb_lanes_t   nb_right_o,
  // activity, for monitoring
  output logic [N_NCB*PE_PER_NCB-1:0] exec_o,
  output logic [N_NCB*PE_PER_NCB-1:0] sat_hit_o,
  output logic [N_AG-1:0]             ag_wrap_o
);

  localparam int unsigned AW  = $clog2(WORDS);
  localparam int unsigned PAW = $clog2(PWORDS);
  localparam int unsigned L   = PE_PER_NCB;

  logic [PAW-1:0]      f_addr;
  logic [31:0]         f_data;
  logic [N_AG-1:0]     ag_cfg_we, ag_sel_we, ag_step;
  logic                ag_cfg_set, ag_sel_set;
  ag_reg_e             ag_cfg_reg;
  logic [AG_W-1:0]     ag_cfg_data;
  logic [AG_W-1:0]     ag_addr [N_AG];
  logic                iss_valid;
  comp_instr_t         iss_ins;
  route_cfg_t          route_a, route_b;
  sat_cfg_t            sat_cfg;
  logic [N_NCB*L-1:0]  pe_en;
  logic [1:0]          link_en;

  // host decode
  logic sel_prog, sel_reg, sel_mem;
  logic [N_NCB-1:0] ncb_sel, ncb_gnt, ncb_rvalid;
  logic [31:0] ncb_rdata [N_NCB];
  logic [31:0] prog_rdata, reg_rdata;
  logic reg_rvalid, prog_rvalid;

  assign sel_mem  = h_addr[17];
  assign sel_reg  = !h_addr[17] && h_addr[16];
  assign sel_prog = !h_addr[17] && !h_addr[16];

  always_comb begin
    for (int n = 0; n < N_NCB; n++) ncb_sel[n] = h_req && sel_mem && h_addr[16:15] == 2'(n);
    h_gnt = h_req && (sel_mem ? |(ncb_gnt & ncb_sel) : 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prog_rvalid <= 1'b0;
    else        prog_rvalid <= h_req && sel_prog && !h_we;
  end

  always_comb begin
    h_rvalid = prog_rvalid || reg_rvalid || |ncb_rvalid;
    h_rdata  = prog_rvalid ? prog_rdata : reg_rdata;
    for (int n = 0; n < N_NCB; n++) if (ncb_rvalid[n]) h_rdata = ncb_rdata[n];
  end

  pneuro_cluster_ctrl #(.PAW(PAW), .N_PE(N_NCB*L)) u_ctrl (
    .clk, .rst_n,
    .h_req(h_req && sel_reg), .h_we, .h_addr(h_addr[5:2]), .h_wdata, .h_rvalid(reg_rvalid), .h_rdata(reg_rdata),
    .gstart, .sync_mode, .bar_wait, .bar_release, .irq,
    .f_addr, .f_data,
    .ag_cfg_we, .ag_cfg_set, .ag_cfg_reg, .ag_cfg_data, .ag_sel_we, .ag_sel_set, .ag_step,
    .iss_valid, .iss_ins, .route_a, .route_b, .sat_cfg, .pe_en, .link_en, .running
  );

  pneuro_prog_mem #(.WORDS(PWORDS), .AW(PAW)) u_prog (
    .clk, .f_addr, .f_data,
    .h_en(h_req && sel_prog), .h_we, .h_addr(h_addr[PAW+1:2]), .h_wdata, .h_wstrb, .h_rdata(prog_rdata)
  );

  for (genvar g = 0; g < N_AG; g++) begin : g_ag
    pneuro_addr_gen #(.W(AG_W)) u_ag (
      .clk, .rst_n, .cfg_we(ag_cfg_we[g]), .cfg_set(ag_cfg_set), .cfg_reg(ag_cfg_reg), .cfg_data(ag_cfg_data),
      .sel_we(ag_sel_we[g]), .sel_set(ag_sel_set), .step(ag_step[g]), .addr(ag_addr[g]), .wrapped(ag_wrap_o[g])
    );
  end

  // neighbour lanes along the chain of NCBs: each NCB offers its source lanes to
  // both neighbours; the outer NCBs meet the cluster ports
  nb_lanes_t ncb_src [N_NCB];
  nb_lanes_t edge_l, edge_r;

  assign edge_l     = link_en[0] ? nb_left_i  : '0;
  assign edge_r     = link_en[1] ? nb_right_i : '0;
  assign nb_left_o  = ncb_src[0];
  assign nb_right_o = ncb_src[N_NCB-1];

  for (genvar n = 0; n < N_NCB; n++) begin : g_ncb
    nb_lanes_t from_l, from_r;
    if (n == 0) begin : g_l_edge
      assign from_l = edge_l;
    end else begin : g_l_ncb
      assign from_l = ncb_src[n-1];
    end
    if (n == N_NCB - 1) begin : g_r_edge
      assign from_r = edge_r;
    end else begin : g_r_ncb
      assign from_r = ncb_src[n+1];
    end
    pneuro_ncb #(.LANES(L), .WORDS(WORDS), .AW(AW)) u_ncb (
      .clk, .rst_n,
      .iss_valid, .iss_ins,
      .addr_a(ag_addr[0][AW-1:0]), .addr_b(ag_addr[1][AW-1:0]), .addr_w(ag_addr[2][AW-1:0]),
      .route_a, .route_b, .sat_cfg, .pe_en(pe_en[n*L +: L]),
      .src_a8_o(ncb_src[n].a8), .src_a32_o(ncb_src[n].a32), .src_b8_o(ncb_src[n].b8), .src_b32_o(ncb_src[n].b32),
      .left_a8(from_l.a8), .left_a32(from_l.a32), .left_b8(from_l.b8), .left_b32(from_l.b32),
      .right_a8(from_r.a8), .right_a32(from_r.a32), .right_b8(from_r.b8), .right_b32(from_r.b32),
      .h_req(ncb_sel[n]), .h_we, .h_bank(h_addr[14:13]), .h_addr(h_addr[AW+2:3]), .h_half(h_addr[2]),
      .h_wdata, .h_wstrb, .h_gnt(ncb_gnt[n]), .h_rvalid(ncb_rvalid[n]), .h_rdata(ncb_rdata[n]),
      .exec_o(exec_o[n*L +: L]), .sat_hit_o(sat_hit_o[n*L +: L])
    );
  end

endmodule
