// tb_cluster: self-checking test of one cluster through its host port. The
// host loads a 3x3 convolution program, a random image (one row per bank word,
// one column per PE, 32 columns) and signed coefficients, starts the cluster,
// waits for HALT, and compares every output pixel with a reference model
// (zero padding at the cluster edges, as its links stay disabled). Checks the
// cycle count of the run against the program's instruction count.
//
// The cluster runs one instruction per cycle with no stalls, so the
// CYCLES register must equal the number of instructions executed. The program
// and data layout are the design's own; sizes reduced (12 rows).
module tb_cluster;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  localparam int ROWS = 12, COLS = 32, OUT = 100, SHIFT = 3;
  logic clk = 0, rst_n = 0;
  logic h_req = 0, h_we = 0, h_gnt, h_rvalid;
  logic [17:0] h_addr = 0;
  logic [31:0] h_wdata = 0, h_rdata;
  logic [3:0] h_wstrb = 4'hf;
  logic gstart = 0, sync_mode = 0, bar_wait, irq, running;
  nb_lanes_t nb_left_i = '0, nb_left_o, nb_right_i = '0, nb_right_o;
  logic [31:0] exec_o, sat_hit_o;
  logic [2:0] ag_wrap_o;
  int checks = 0, failures = 0;

  pneuro_cluster dut (.*, .bar_release(bar_wait));
  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic hw(input logic [17:0] a, input logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 1; h_addr = a; h_wdata = d;
    @(posedge clk); while (!h_gnt) @(posedge clk);
    @(negedge clk); h_req = 0;
  endtask
  task automatic hr(input logic [17:0] a, output logic [31:0] d);
    @(negedge clk); h_req = 1; h_we = 0; h_addr = a;
    @(posedge clk); while (!h_gnt) @(posedge clk);
    @(negedge clk); h_req = 0;
    while (!h_rvalid) @(negedge clk);
    d = h_rdata;
  endtask
  function automatic logic [17:0] maddr(int ncb, int bank, int word, int half);
    return 18'h20000 | 18'(ncb << 15) | 18'(bank << 13) | 18'(word << 3) | 18'(half << 2);
  endfunction

  logic [7:0] img [ROWS][COLS];
  logic signed [7:0] k [9];
  logic [31:0] prog [$];

  initial begin
    logic [31:0] d; int t0, t1;
    repeat (2) @(negedge clk); rst_n = 1;
    conv3x3_program(prog, ROWS, OUT, 0, SHIFT, 0);
    foreach (prog[i]) hw(18'(4 * i), prog[i]);
    for (int i = 0; i < prog.size(); i++) begin
      hr(18'(4 * i), d); checks++; if (d !== prog[i]) failures++;
    end
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) img[r][c] = 8'($urandom_range(0, 63));
    for (int i = 0; i < 9; i++) k[i] = 8'(int'($urandom_range(0, 14)) - 6);
    for (int r = 0; r < ROWS; r++)
      for (int n = 0; n < 4; n++) for (int h = 0; h < 2; h++)
        hw(maddr(n, 0, r, h), {img[r][8*n+4*h+3], img[r][8*n+4*h+2], img[r][8*n+4*h+1], img[r][8*n+4*h]});
    for (int n = 0; n < 4; n++) begin
      hw(maddr(n, 1, 0, 0), {k[3], k[2], k[1], k[0]});
      hw(maddr(n, 1, 0, 1), {k[7], k[6], k[5], k[4]});
      hw(maddr(n, 1, 1, 0), {24'd0, k[8]});
    end
    hw(18'h10000, 1);          // start
    t0 = $time;
    do hr(18'h10008, d); while (!d[1]);
    hr(18'h10018, d);          // cycles
    // run: setup + (rows-2) iterations of the body, one instruction per cycle
    begin
      int body, setup; body = 3 + 3 + 9 + 9 + 2 + 1 + 1; setup = 10;
      checks++;
      if (d !== 32'(setup + (ROWS - 2) * body + 1)) begin failures++; $display("cycles %0d exp %0d", d, setup + (ROWS - 2) * body + 1); end
    end
    for (int r = 0; r < ROWS - 2; r++)
      for (int n = 0; n < 4; n++) for (int h = 0; h < 2; h++) begin
        hr(maddr(n, 2, OUT + r, h), d);
        for (int b = 0; b < 4; b++) begin
          int c, acc; logic [7:0] e;
          c = 8 * n + 4 * h + b; acc = 0;
          for (int dr = 0; dr < 3; dr++) for (int dc = 0; dc < 3; dc++) begin
            int cc; cc = c + dc - 1;
            if (cc >= 0 && cc < COLS) acc += int'(k[3 * dr + dc]) * int'(img[r + dr][cc]);
          end
          e = conv3x3_ref(acc, 0, SHIFT);
          checks++;
          if (d[8*b +: 8] !== e) begin failures++; if (failures < 10) $display("r%0d c%0d got %0d exp %0d (acc %0d)", r, c, d[8*b +: 8], e, acc); end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
