// tb_guard: self-checking test of the guard / PE enable logic for every guard
// condition, flag combination and enable.
//
// Combinational; every guard code against 200 random flag / enable sets.
module tb_guard;
  import pneuro_pkg::*;
  guard_e guard;
  flags_t [7:0] flags;
  logic [7:0] pe_en, exec;
  int checks = 0, failures = 0;
  pneuro_guard dut (.*);
  initial begin
    for (int g = 0; g < 8; g++)
      for (int t = 0; t < 200; t++) begin
        guard = guard_e'(g);
        flags = 16'($urandom); pe_en = 8'($urandom);
        #1;
        for (int i = 0; i < 8; i++) begin
          logic z, n, ok;
          z = flags[i].z; n = flags[i].n;
          case (g) 0: ok = 1; 1: ok = z; 2: ok = !z; 3: ok = n; 4: ok = !n; 5: ok = !n && !z; 6: ok = n || z; default: ok = 0; endcase
          checks++;
          if (exec[i] !== (ok && pe_en[i])) begin failures++; $display("g %0d pe %0d", g, i); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
