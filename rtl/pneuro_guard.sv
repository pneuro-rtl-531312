// pneuro_guard: guards / flags management of an NCB.
//
// SIMD control flow: every computation instruction carries a guard condition,
// and each PE executes it only if the condition holds on that PE's own flags
// (if-then-else becomes two guarded sequences) and the PE is enabled in the
// cluster's PE enable mask (set by a control instruction, for control flows too
// irregular for guards). The list of conditions is this design's choice.
// Combinational.
module pneuro_guard
  import pneuro_pkg::*;
#(
  parameter int unsigned LANES = PE_PER_NCB
) (
  input  guard_e             guard,
  input  flags_t [LANES-1:0] flags,
  input  logic   [LANES-1:0] pe_en,
  output logic   [LANES-1:0] exec
);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      logic ok;
      unique case (guard)
        G_ALWAYS: ok = 1'b1;
        G_Z:      ok = flags[i].z;
        G_NZ:     ok = !flags[i].z;
        G_N:      ok = flags[i].n;
        G_NN:     ok = !flags[i].n;
        G_GT:     ok = !flags[i].n && !flags[i].z;
        G_LE:     ok = flags[i].n || flags[i].z;
        default:  ok = 1'b0;
      endcase
      exec[i] = ok && pe_en[i];
    end
  end

endmodule
