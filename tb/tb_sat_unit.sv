// tb_sat_unit: self-checking test of the saturation / linear rectifier unit:
// manual and automatic shifts, signed and unsigned results, with and without
// rectification, on random accumulator values of all magnitudes.
//
// Combinational; the automatic-shift rule (smallest shift that fits
// the output range) is the design's own.
module tb_sat_unit;
  import pneuro_pkg::*;
  logic [31:0] acc;
  sat_cfg_t cfg;
  logic [7:0] y;
  logic saturated;
  int checks = 0, failures = 0, nsat = 0;
  pneuro_sat_unit dut (.*);

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint v, s, lo, hi, e; int sh, p; logic es;
      acc = $urandom >> $urandom_range(0, 31);
      if ($urandom_range(0, 1)) acc = -acc;
      cfg.auto_shift = 1'($urandom); cfg.relu = 1'($urandom); cfg.signed_out = 1'($urandom);
      cfg.shift = 5'($urandom_range(0, 12));
      v = longint'($signed(acc));
      if (cfg.relu && v < 0) v = 0;
      if (cfg.auto_shift) begin
        // bits needed by the magnitude
        p = -1;
        for (int i = 30; i >= 0; i--) if (v[i] != v[31]) begin p = i; break; end
        sh = (p + 1) - (cfg.signed_out ? 7 : 8);
        if (sh < 0) sh = 0;
      end else sh = cfg.shift;
      s = v >>> sh;
      lo = cfg.signed_out ? -128 : 0; hi = cfg.signed_out ? 127 : 255;
      e = s; es = 0;
      if (s < lo) begin e = lo; es = 1; end
      if (s > hi) begin e = hi; es = 1; end
      #1; checks++;
      nsat += es;
      if (y !== 8'(e) || saturated !== es) begin
        failures++;
        if (failures < 10) $display("acc %0d cfg %p y %0d exp %0d sat %0d/%0d", $signed(acc), cfg, y, e, saturated, es);
      end
    end
    checks++; if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
