// pneuro_cluster_ctrl: cluster controller.
//
// Fetches 32-bit instructions from the cluster's program memory, decodes them,
// executes control instructions itself and broadcasts computation instructions
// to all NCBs of the cluster, together with the step commands of the three data
// address generators (A operand, B operand, store). It holds the cluster's
// configuration registers (routing modes, saturation parameters, PE enable
// mask, inter-cluster link enables), the loop counters, and the configuration
// and status registers the host reads and writes.
//
// Control instructions implemented (a subset of the architecture's 28; the
// encoding is in pneuro_pkg): NOP, HALT, JMP, LOOP / DJNZ (counted loops),
// AGSET / AGSEL (address generator registers and set switch), ROUTE, SATCFG,
// PEEN, SIGNAL (flag to the host, may raise the interrupt), WAITH (stall until
// the host sets sync flags, e.g. until new parameters are loaded), BARRIER
// (in synchronized mode, stall until every cluster reaches its barrier) and
// NEIGH (enable the inter-cluster links).
//
// Timing: the program memory is read synchronously at the next-PC address, so
// one instruction issues per cycle, branches included (no bubble). A stalled
// instruction is held and issues in the cycle its condition is met. After a
// start (host CTRL write or global start) the first instruction issues two
// cycles later. HALT stops fetching; the cluster is then idle until the next
// start.
//
// Host registers (word offsets; read data one cycle after the request):
//   0 CTRL      write bit 0: start at START_PC
//   1 START_PC
//   2 STATUS    bit 0 running, 1 done, 2 waiting for host, 3 waiting at barrier
//   3 HOST_SYNC write: set flags; read: current flags
//   4 SIGNAL    read: flags set by SIGNAL; write 1 to clear
//   5 IRQ_EN    bits 7:0 signal flags, bit 8 done
//   6 CYCLES    cycles spent running since the last start
//   7 ISSUED    computation instructions issued since the last start
//   8 STALLS    cycles stalled by WAITH or BARRIER since the last start
//
// An assertion checks that no instruction is issued while idle or stalled.
module pneuro_cluster_ctrl
  import pneuro_pkg::*;
#(
  parameter int unsigned PAW    = PROG_AW,
  parameter int unsigned N_PE   = NCB_PER_CLUSTER * PE_PER_NCB
) (
  input  logic               clk,
  input  logic               rst_n,
  // host registers
  input  logic               h_req,
  input  logic               h_we,
  input  logic [3:0]         h_addr,
  input  logic [31:0]        h_wdata,
  output logic               h_rvalid,
  output logic [31:0]        h_rdata,
  // global control
  input  logic               gstart,
  input  logic               sync_mode,
  output logic               bar_wait,
  input  logic               bar_release,
  output logic               irq,
  // program memory fetch
  output logic [PAW-1:0]     f_addr,
  input  logic [31:0]        f_data,
  // address generators
  output logic [N_AG-1:0]    ag_cfg_we,
  output logic               ag_cfg_set,
  output ag_reg_e            ag_cfg_reg,
  output logic [AG_W-1:0]    ag_cfg_data,
  output logic [N_AG-1:0]    ag_sel_we,
  output logic               ag_sel_set,
  output logic [N_AG-1:0]    ag_step,
  // computation issue
  output logic               iss_valid,
  output comp_instr_t        iss_ins,
  // configuration
  output route_cfg_t         route_a,
  output route_cfg_t         route_b,
  output sat_cfg_t           sat_cfg,
  output logic [N_PE-1:0]    pe_en,
  output logic [1:0]         link_en,
  output logic               running
);

  typedef enum logic [1:0] {S_IDLE, S_RUN} state_e;
  state_e          state_q;
  logic [PAW-1:0]  pc_q, pc_d;
  logic            fv_q;
  logic            done_q;
  logic [PAW-1:0]  start_pc_q;
  logic [7:0]      host_sync_q, signal_q;
  logic [8:0]      irq_en_q;
  logic [31:0]     cycles_q, issued_q, stalls_q;
  logic [15:0]     loop_q [N_LOOP];

  logic        start, have, is_comp, stall, taken, halt;
  ctrl_op_e    cop;
  logic [31:0] ins;
  logic [1:0]  ctr;
  logic [15:0] ctr_dec;

  assign ins     = f_data;
  assign have    = state_q == S_RUN && fv_q;
  assign is_comp = ins[31];
  assign cop     = ctrl_op_e'(ins[30:25]);
  assign ctr     = ins[24:23];
  assign ctr_dec = loop_q[ctr] - 16'd1;
  assign start   = gstart || (h_req && h_we && h_addr == 4'd0 && h_wdata[0]);
  assign running = state_q == S_RUN;

  assign bar_wait = have && !is_comp && cop == C_BARRIER;

  always_comb begin
    stall = 1'b0;
    if (have && !is_comp) begin
      if (cop == C_WAITH)   stall = (host_sync_q & ins[7:0]) != ins[7:0];
      if (cop == C_BARRIER) stall = sync_mode && !bar_release;
    end
    taken = have && !is_comp && ((cop == C_JMP) || (cop == C_DJNZ && ctr_dec != 16'd0));
    halt  = have && !is_comp && cop == C_HALT;
    if (state_q == S_IDLE)  pc_d = start ? start_pc_q : pc_q;
    else if (!have || stall) pc_d = pc_q;
    else if (taken)          pc_d = ins[PAW-1:0];
    else                     pc_d = pc_q + PAW'(1);
  end

  assign f_addr = pc_d;

  // computation issue and address generator commands
  always_comb begin
    iss_valid   = have && is_comp;
    iss_ins     = comp_instr_t'(ins);
    ag_step[0]  = iss_valid && iss_ins.a.kind == SRC_MEM;
    ag_step[1]  = iss_valid && iss_ins.b.kind == SRC_MEM;
    ag_step[2]  = iss_valid && iss_ins.dst.to_mem;
    ag_cfg_we   = '0;
    ag_sel_we   = '0;
    ag_cfg_set  = ins[22];
    ag_cfg_reg  = ag_reg_e'(ins[21:20]);
    ag_cfg_data = ins[15:0];
    ag_sel_set  = ins[22];
    if (have && !is_comp && cop == C_AGSET && ins[24:23] < 2'(N_AG)) ag_cfg_we[ins[24:23]] = 1'b1;
    if (have && !is_comp && cop == C_AGSEL && ins[24:23] < 2'(N_AG)) ag_sel_we[ins[24:23]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      pc_q        <= '0;
      fv_q        <= 1'b0;
      done_q      <= 1'b0;
      start_pc_q  <= '0;
      host_sync_q <= '0;
      signal_q    <= '0;
      irq_en_q    <= '0;
      cycles_q    <= '0;
      issued_q    <= '0;
      stalls_q    <= '0;
      for (int k = 0; k < N_LOOP; k++) loop_q[k] <= '0;
      route_a     <= '{mode: R_DIRECT, amount: 3'd0, edge_fill: E_ZERO};
      route_b     <= '{mode: R_DIRECT, amount: 3'd0, edge_fill: E_ZERO};
      sat_cfg     <= '{auto_shift: 1'b0, relu: 1'b0, signed_out: 1'b1, shift: 5'd0};
      pe_en       <= '1;
      link_en     <= '0;
    end else begin
      pc_q <= pc_d;
      // host register writes
      if (h_req && h_we) begin
        unique case (h_addr)
          4'd1: start_pc_q <= h_wdata[PAW-1:0];
          4'd5: irq_en_q   <= h_wdata[8:0];
          default: ;
        endcase
      end
      if (state_q == S_IDLE) begin
        if (start) begin
          state_q  <= S_RUN;
          fv_q     <= 1'b1;
          done_q   <= 1'b0;
          cycles_q <= '0;
          issued_q <= '0;
          stalls_q <= '0;
        end
      end else begin
        cycles_q <= cycles_q + 32'd1;
        if (iss_valid) issued_q <= issued_q + 32'd1;
        if (stall)     stalls_q <= stalls_q + 32'd1;
        if (halt) begin
          state_q <= S_IDLE;
          fv_q    <= 1'b0;
          done_q  <= 1'b1;
        end
        if (have && !is_comp && !stall) begin
          unique case (cop)
            C_LOOP:   loop_q[ctr] <= ins[15:0];
            C_DJNZ:   loop_q[ctr] <= ctr_dec;
            C_ROUTE:  if (ins[24]) route_b <= route_cfg_t'(ins[23:16]);
                      else         route_a <= route_cfg_t'(ins[23:16]);
            C_SATCFG: sat_cfg <= '{auto_shift: ins[24], relu: ins[23], signed_out: ins[22], shift: ins[20:16]};
            C_PEEN:   for (int n = 0; n < N_PE / 8; n++)
                        if (ins[24:22] == 3'(n)) pe_en[8*n +: 8] <= ins[7:0];
            C_NEIGH:  link_en <= ins[1:0];
            default: ;
          endcase
        end
      end
      // host sync flags: set by the host, consumed by WAITH
      begin
        logic [7:0] hs;
        hs = host_sync_q;
        if (have && !is_comp && !stall && cop == C_WAITH) hs = hs & ~ins[7:0];
        if (h_req && h_we && h_addr == 4'd3) hs = hs | h_wdata[7:0];
        host_sync_q <= hs;
      end
      // signal flags: set by SIGNAL, cleared by the host
      begin
        logic [7:0] sg;
        sg = signal_q;
        if (h_req && h_we && h_addr == 4'd4) sg = sg & ~h_wdata[7:0];
        if (have && !is_comp && cop == C_SIGNAL) sg = sg | ins[7:0];
        signal_q <= sg;
      end
    end
  end

  // host register reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_rvalid <= 1'b0;
      h_rdata  <= '0;
    end else begin
      h_rvalid <= h_req && !h_we;
      unique case (h_addr)
        4'd1:    h_rdata <= 32'(start_pc_q);
        4'd2:    h_rdata <= {28'd0, bar_wait, have && !is_comp && cop == C_WAITH, done_q, running};
        4'd3:    h_rdata <= {24'd0, host_sync_q};
        4'd4:    h_rdata <= {24'd0, signal_q};
        4'd5:    h_rdata <= {23'd0, irq_en_q};
        4'd6:    h_rdata <= cycles_q;
        4'd7:    h_rdata <= issued_q;
        4'd8:    h_rdata <= stalls_q;
        default: h_rdata <= '0;
      endcase
    end
  end

  assign irq = |(signal_q & irq_en_q[7:0]) || (done_q && irq_en_q[8]);

  // nothing is issued to the NCBs unless the cluster runs and is not stalled
  a_issue_running: assert property (@(posedge clk) disable iff (!rst_n) iss_valid |-> running && !stall);

endmodule
