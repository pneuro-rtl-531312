// pneuro_sat_unit: saturation and linear rectifier unit behind the accumulator.
//
// Turns the 32-bit accumulator into an 8-bit result ready to be stored. The
// linear rectifier (ReLU) first clamps negative values to 0 when enabled. The
// value is then shifted right arithmetically, by the programmed amount or, in
// automatic mode, by the amount the MSB detector finds necessary for the value
// to fit 7 magnitude bits (signed result) or 8 bits (unsigned result). Finally
// it is clamped to [-128, 127] or [0, 255]. All parameters come from the
// saturation configuration written by a control instruction. Right shift by
// truncation (no rounding) is this design's choice. Combinational.
module pneuro_sat_unit
  import pneuro_pkg::*;
(
  input  logic [31:0] acc,
  input  sat_cfg_t    cfg,
  output logic [7:0]  y,
  output logic        saturated
);

  logic [31:0] v, s;
  logic [4:0]  pos;
  logic        none;
  logic [4:0]  sh;

  assign v = (cfg.relu && acc[31]) ? 32'd0 : acc;

  pneuro_msb_detect u_msb (.v(v), .pos(pos), .none(none));

  always_comb begin
    if (!cfg.auto_shift) sh = cfg.shift;
    else if (none)       sh = 5'd0;
    else if (cfg.signed_out) sh = (pos > 5'd6) ? pos - 5'd6 : 5'd0;
    else                 sh = (pos > 5'd7) ? pos - 5'd7 : 5'd0;
    s = 32'($signed(v) >>> sh);
    saturated = 1'b0;
    if (cfg.signed_out) begin
      if ($signed(s) > 32'sd127)       begin y = 8'h7f; saturated = 1'b1; end
      else if ($signed(s) < -32'sd128) begin y = 8'h80; saturated = 1'b1; end
      else                                   y = s[7:0];
    end else begin
      if ($signed(s) < 0)              begin y = 8'h00; saturated = 1'b1; end
      else if ($signed(s) > 32'sd255)  begin y = 8'hff; saturated = 1'b1; end
      else                                   y = s[7:0];
    end
  end

endmodule
