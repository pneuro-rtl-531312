// pneuro_addr_gen: one data address generator of a cluster.
//
// The generator holds two register sets so that the program can switch between
// two address patterns in one instruction. Each set has an index register (the
// address presented on `addr`), a modifier register added to the index after each
// use, and a lower and an upper bound. These four registers and the two sets
// follow the architecture description. How the bounds act is this design's
// choice: the index runs as a circular buffer, so a step past the upper bound
// (or below the lower bound, for a negative modifier) wraps by the length of the
// window, hi - lo + 1.
//
// Interface and timing:
//   cfg_we/cfg_set/cfg_reg/cfg_data write one register of either set (1 cycle).
//   sel_we/sel_set choose the active set.
//   addr is the index of the active set, combinational from registers.
//   step advances the active index at the next clock edge; it is ignored in a
//   cycle where the same index register is written by cfg_we (the write wins).
//   wrapped pulses with step when the step wrapped around a bound.
module pneuro_addr_gen
  import pneuro_pkg::*;
#(
  parameter int unsigned W = AG_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_we,
  input  logic         cfg_set,
  input  ag_reg_e      cfg_reg,
  input  logic [W-1:0] cfg_data,
  input  logic         sel_we,
  input  logic         sel_set,
  input  logic         step,
  output logic [W-1:0] addr,
  output logic         wrapped
);

  logic [W-1:0] index_q [2];
  logic [W-1:0] mod_q   [2];
  logic [W-1:0] lo_q    [2];
  logic [W-1:0] hi_q    [2];
  logic         act_q;

  logic signed [W+1:0] sum, len, nxt;

  always_comb begin
    sum     = $signed({2'b00, index_q[act_q]}) + $signed({{2{mod_q[act_q][W-1]}}, mod_q[act_q]});
    len     = $signed({2'b00, hi_q[act_q]}) - $signed({2'b00, lo_q[act_q]}) + 1;
    nxt     = sum;
    wrapped = 1'b0;
    if (sum > $signed({2'b00, hi_q[act_q]})) begin
      nxt     = sum - len;
      wrapped = step;
    end else if (sum < $signed({2'b00, lo_q[act_q]})) begin
      nxt     = sum + len;
      wrapped = step;
    end
  end

  assign addr = index_q[act_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < 2; s++) begin
        index_q[s] <= '0;
        mod_q[s]   <= W'(1);
        lo_q[s]    <= '0;
        hi_q[s]    <= '1;
      end
      act_q <= 1'b0;
    end else begin
      if (step) index_q[act_q] <= nxt[W-1:0];
      if (cfg_we) begin
        unique case (cfg_reg)
          AG_INDEX: index_q[cfg_set] <= cfg_data;
          AG_MOD:   mod_q[cfg_set]   <= cfg_data;
          AG_LO:    lo_q[cfg_set]    <= cfg_data;
          default:  hi_q[cfg_set]    <= cfg_data;
        endcase
      end
      if (sel_we) act_q <= sel_set;
    end
  end

endmodule
