// tb_routing: self-checking test of the routing / data transformation module.
// Random lanes and random configurations of every mode and edge fill are
// compared with a reference model on both the 8-bit and 32-bit paths.
//
// Combinational; the mode set and the edge behaviour are the design's
// reading of the routing module's functions.
module tb_routing;
  import pneuro_pkg::*;
  route_cfg_t cfg;
  logic [7:0][7:0]  src8, left8, right8, dst8;
  logic [7:0][31:0] src32, left32, right32, dst32;
  int checks = 0, failures = 0;
  int seen [8];
  pneuro_routing dut (.*);

  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int l = 0; l < 8; l++) begin
        src8[l] = 8'($urandom); left8[l] = 8'($urandom); right8[l] = 8'($urandom);
        src32[l] = $urandom; left32[l] = $urandom; right32[l] = $urandom;
      end
      cfg.mode = route_mode_e'($urandom_range(0, 5));
      cfg.amount = 3'($urandom);
      cfg.edge_fill = edge_fill_e'($urandom_range(0, 2));
      seen[cfg.mode]++;
      #1;
      for (int i = 0; i < 8; i++) begin
        logic [7:0] e8; logic [31:0] e32; int j;
        case (cfg.mode)
          R_DIRECT: begin e8 = src8[i]; e32 = src32[i]; end
          R_MCAST:  begin e8 = src8[cfg.amount]; e32 = src32[cfg.amount]; end
          R_SHL: begin
            j = i + cfg.amount;
            if (j < 8) begin e8 = src8[j]; e32 = src32[j]; end
            else if (cfg.edge_fill == E_NEIGH) begin e8 = right8[j-8]; e32 = right32[j-8]; end
            else begin e8 = (cfg.edge_fill == E_ONE) ? 1 : 0; e32 = 32'(e8); end
          end
          R_SHR: begin
            j = i - cfg.amount;
            if (j >= 0) begin e8 = src8[j]; e32 = src32[j]; end
            else if (cfg.edge_fill == E_NEIGH) begin e8 = left8[j+8]; e32 = left32[j+8]; end
            else begin e8 = (cfg.edge_fill == E_ONE) ? 1 : 0; e32 = 32'(e8); end
          end
          R_ZERO: begin e8 = 0; e32 = 0; end
          default: begin e8 = 1; e32 = 1; end
        endcase
        checks++;
        if (dst8[i] !== e8 || dst32[i] !== e32) begin
          failures++;
          if (failures < 10) $display("mode %0d amt %0d fill %0d pe %0d: %h/%h exp %h/%h", cfg.mode, cfg.amount, cfg.edge_fill, i, dst8[i], dst32[i], e8, e32);
        end
      end
    end
    for (int m = 0; m < 6; m++) begin checks++; if (seen[m] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
