// pneuro_ncb: Neural Computing Block.
//
// An NCB couples a multi-banked SRAM to PE_PER_NCB processing elements working
// in SIMD through a routing / data transformation module (one per operand path,
// A and B). The guards / flags management unit decides per PE whether the
// current instruction executes. The cluster controller broadcasts the
// instruction, and the cluster's address generators the bank addresses, to
// all NCBs of the cluster.
//
// Pipeline (the split is this design's choice): in the issue cycle the
// controller presents the instruction (iss_*) and the NCB starts the bank reads
// of its memory operands at the A and B addresses. The instruction and the store
// address are registered; in the next cycle (execute) the read data pass the
// routing modules, the PEs compute, and registers, accumulators, flags and the
// stored bytes are written at the end of that cycle. A store reaches the bank
// one cycle after a read issued together with the next instruction, so a value
// stored by one instruction can be read back from the second instruction after
// it, not the first.
//
// Neighbour exchange: the source lanes of each operand path are brought out
// (src_*_o) and the neighbours' lanes come in (left_* / right_*), so the shift
// modes of the routing module reach the PEs of the adjacent NCB, and through the
// cluster ports the adjacent cluster.
module pneuro_ncb
  import pneuro_pkg::*;
#(
  parameter int unsigned LANES = PE_PER_NCB,
  parameter int unsigned WORDS = BANK_WORDS,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // instruction and addresses, issue cycle
  input  logic                   iss_valid,
  input  comp_instr_t            iss_ins,
  input  logic [AW-1:0]          addr_a,
  input  logic [AW-1:0]          addr_b,
  input  logic [AW-1:0]          addr_w,
  // configuration
  input  route_cfg_t             route_a,
  input  route_cfg_t             route_b,
  input  sat_cfg_t               sat_cfg,
  input  logic [LANES-1:0]       pe_en,
  // neighbour links
  output logic [LANES-1:0][7:0]  src_a8_o,
  output logic [LANES-1:0][31:0] src_a32_o,
  output logic [LANES-1:0][7:0]  src_b8_o,
  output logic [LANES-1:0][31:0] src_b32_o,
  input  logic [LANES-1:0][7:0]  left_a8,
  input  logic [LANES-1:0][31:0] left_a32,
  input  logic [LANES-1:0][7:0]  left_b8,
  input  logic [LANES-1:0][31:0] left_b32,
  input  logic [LANES-1:0][7:0]  right_a8,
  input  logic [LANES-1:0][31:0] right_a32,
  input  logic [LANES-1:0][7:0]  right_b8,
  input  logic [LANES-1:0][31:0] right_b32,
  // host access to the banks
  input  logic                   h_req,
  input  logic                   h_we,
  input  logic [1:0]             h_bank,
  input  logic [AW-1:0]          h_addr,
  input  logic                   h_half,
  input  logic [31:0]            h_wdata,
  input  logic [3:0]             h_wstrb,
  output logic                   h_gnt,
  output logic                   h_rvalid,
  output logic [31:0]            h_rdata,
  // status
  output logic [LANES-1:0]       exec_o,     // PEs that executed the instruction in execute
  output logic [LANES-1:0]       sat_hit_o
);

  logic          ex_valid;
  comp_instr_t   ex_ins;
  logic [AW-1:0] ex_addr_w;

  logic [LANES-1:0][7:0]  rd_a, rd_b, dst_a8, dst_b8, st_data;
  logic [LANES-1:0][31:0] exp_a, exp_b, dst_a32, dst_b32;
  logic [LANES-1:0]       st_we, exec;
  flags_t [LANES-1:0]     flags;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_ins    <= '0;
      ex_addr_w <= '0;
    end else begin
      ex_valid  <= iss_valid;
      ex_ins    <= iss_ins;
      ex_addr_w <= addr_w;
    end
  end

  pneuro_ncb_memory #(.LANES(LANES), .WORDS(WORDS), .AW(AW)) u_mem (
    .clk, .rst_n,
    .re_a(iss_valid && iss_ins.a.kind == SRC_MEM), .bank_a(iss_ins.a.field[1:0]), .addr_a,
    .re_b(iss_valid && iss_ins.b.kind == SRC_MEM), .bank_b(iss_ins.b.field[1:0]), .addr_b,
    .rd_a, .rd_b,
    .we(st_we), .wbank(ex_ins.dst.field[1:0]), .waddr(ex_addr_w), .wdata(st_data),
    .h_req, .h_we, .h_bank, .h_addr, .h_half, .h_wdata, .h_wstrb, .h_gnt, .h_rvalid, .h_rdata
  );

  // source lanes of each path: the bank word for memory operands, else the PEs' registers
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      src_a8_o[i]  = (ex_ins.a.kind == SRC_MEM) ? rd_a[i] : exp_a[i][7:0];
      src_a32_o[i] = (ex_ins.a.kind == SRC_MEM) ? {24'd0, rd_a[i]} : exp_a[i];
      src_b8_o[i]  = (ex_ins.b.kind == SRC_MEM) ? rd_b[i] : exp_b[i][7:0];
      src_b32_o[i] = (ex_ins.b.kind == SRC_MEM) ? {24'd0, rd_b[i]} : exp_b[i];
    end
  end

  pneuro_routing #(.LANES(LANES)) u_route_a (
    .cfg(route_a), .src8(src_a8_o), .src32(src_a32_o), .left8(left_a8), .left32(left_a32),
    .right8(right_a8), .right32(right_a32), .dst8(dst_a8), .dst32(dst_a32)
  );
  pneuro_routing #(.LANES(LANES)) u_route_b (
    .cfg(route_b), .src8(src_b8_o), .src32(src_b32_o), .left8(left_b8), .left32(left_b32),
    .right8(right_b8), .right32(right_b32), .dst8(dst_b8), .dst32(dst_b32)
  );

  pneuro_guard #(.LANES(LANES)) u_guard (.guard(ex_ins.guard), .flags, .pe_en, .exec);

  for (genvar i = 0; i < LANES; i++) begin : g_pe
    pneuro_pe u_pe (
      .clk, .rst_n, .valid(ex_valid), .ins(ex_ins), .en(exec[i]), .sat_cfg,
      .route_a8(dst_a8[i]), .route_a32(dst_a32[i]), .route_b8(dst_b8[i]), .route_b32(dst_b32[i]),
      .exp_a(exp_a[i]), .exp_b(exp_b[i]), .flags(flags[i]),
      .store_we(st_we[i]), .store_data(st_data[i]), .sat_hit(sat_hit_o[i])
    );
  end

  assign exec_o = ex_valid ? exec : '0;

endmodule
