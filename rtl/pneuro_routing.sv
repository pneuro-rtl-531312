// pneuro_routing: routing / data transformation module of one NCB, for one
// operand path.
//
// Every PE of the NCB receives one value per cycle, on an 8-bit path (native
// pixels, coefficients and weights) and on a 32-bit path (accumulations or
// groups of bytes). The source lanes are either the bank word read for this
// operand or one register of every PE (PE-to-PE exchange without the memory).
// The transformation is set by a configuration word written by a control
// instruction:
//   DIRECT  PE i takes lane i
//   MCAST   every PE takes lane `amount` (coefficient / weight broadcast)
//   SHL     PE i takes lane i+amount; past the right edge the lanes of the
//           right neighbour NCB enter (or zeros / ones, by `edge_fill`)
//   SHR     PE i takes lane i-amount; past the left edge the left neighbour's
//   ZERO    all PEs take 0, ONE all PEs take 1 (padding)
// The modes and their encoding are this design's reading of "padding with
// zeros or ones, copy or multicast, shifting for alignment between PEs and
// neighbour access". The padding "one" is taken as the value 1.
//
// Purely combinational: the whole path fits in the cycle in which the operand
// is used, so a PE sees any lane within one cycle.
module pneuro_routing
  import pneuro_pkg::*;
#(
  parameter int unsigned LANES = PE_PER_NCB
) (
  input  route_cfg_t             cfg,
  input  logic [LANES-1:0][7:0]  src8,
  input  logic [LANES-1:0][31:0] src32,
  input  logic [LANES-1:0][7:0]  left8,    // source lanes of the left neighbour NCB
  input  logic [LANES-1:0][31:0] left32,
  input  logic [LANES-1:0][7:0]  right8,   // source lanes of the right neighbour NCB
  input  logic [LANES-1:0][31:0] right32,
  output logic [LANES-1:0][7:0]  dst8,
  output logic [LANES-1:0][31:0] dst32
);

  logic [7:0]  fill8;
  logic [31:0] fill32;

  always_comb begin
    fill8  = (cfg.edge_fill == E_ONE) ? 8'd1  : 8'd0;
    fill32 = (cfg.edge_fill == E_ONE) ? 32'd1 : 32'd0;
    for (int i = 0; i < LANES; i++) begin
      int j;
      j = i;
      dst8[i]  = src8[i];
      dst32[i] = src32[i];
      unique case (cfg.mode)
        R_DIRECT: ;
        R_MCAST: begin
          dst8[i]  = src8[int'(cfg.amount) % LANES];
          dst32[i] = src32[int'(cfg.amount) % LANES];
        end
        R_SHL: begin
          j = i + int'(cfg.amount);
          if (j < LANES) begin
            dst8[i] = src8[j]; dst32[i] = src32[j];
          end else if (cfg.edge_fill == E_NEIGH) begin
            dst8[i] = right8[j - LANES]; dst32[i] = right32[j - LANES];
          end else begin
            dst8[i] = fill8; dst32[i] = fill32;
          end
        end
        R_SHR: begin
          j = i - int'(cfg.amount);
          if (j >= 0) begin
            dst8[i] = src8[j]; dst32[i] = src32[j];
          end else if (cfg.edge_fill == E_NEIGH) begin
            dst8[i] = left8[j + LANES]; dst32[i] = left32[j + LANES];
          end else begin
            dst8[i] = fill8; dst32[i] = fill32;
          end
        end
        R_ZERO: begin
          dst8[i] = 8'd0; dst32[i] = 32'd0;
        end
        R_ONE: begin
          dst8[i] = 8'd1; dst32[i] = 32'd1;
        end
        default: ;
      endcase
    end
  end

endmodule
