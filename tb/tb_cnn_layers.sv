// tb_cnn_layers: the other layer types of the small classification CNN run on
// one cluster at its default size (4 NCBs x 8 PEs, one image column per PE):
//   1. a 5x5 convolution (signed coefficients, rectified and shifted to
//      8 bits) over a 20-row, 32-column slice, rows streamed through five PE
//      byte registers, columns -2..+2 reached by shifting through the routing
//      module across NCB edges;
//   2. 3x3 max pooling with stride 3 on that feature map, where the stride in
//      the column direction is made by disabling the PEs whose column is not a
//      multiple of 3 for the store (PE enable instruction);
//   3. a fully connected layer of 32 neurons over 64 inputs, one neuron per
//      PE: the input vector is loaded 8 bytes at a time into a register and
//      each byte is multicast to all PEs while each PE reads its own weight;
//   4. the host gathers the 32 outputs and runs a 4-neuron output layer with
//      the same program.
// Each result is compared with a model in the testbench, and each run's
// CYCLES register with the number of instructions the program executes (one
// instruction per cycle, no stalls).
module tb_cnn_layers;
  import pneuro_pkg::*;
  import pneuro_asm_pkg::*;
  localparam int ROWS = 20, COLS = 32, K = 5, CONV_OUT = 64, CONV_SHIFT = 6;
  localparam int PROWS = (ROWS - K + 1) / 3, POOL_OUT = 128;
  localparam int NIN1 = 64, NIN2 = 32, FC_SHIFT = 7;
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
  initial begin #20000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

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
  // write one byte per PE column (32 columns) into a bank word of every NCB
  task automatic put_row(input int bank, input int word, input logic [7:0] v [COLS]);
    for (int n = 0; n < 4; n++) for (int h = 0; h < 2; h++)
      hw(maddr(n, bank, word, h), {v[8*n+4*h+3], v[8*n+4*h+2], v[8*n+4*h+1], v[8*n+4*h]});
  endtask
  task automatic get_row(input int bank, input int word, output logic [7:0] v [COLS]);
    logic [31:0] d;
    for (int n = 0; n < 4; n++) for (int h = 0; h < 2; h++) begin
      hr(maddr(n, bank, word, h), d);
      for (int b = 0; b < 4; b++) v[8*n+4*h+b] = d[8*b +: 8];
    end
  endtask
  // load a program, run it, check the cycle count
  task automatic run(input logic [31:0] p [$], input int expect_cycles, input string name);
    logic [31:0] d;
    foreach (p[i]) hw(18'(4 * i), p[i]);
    hw(18'h10000, 1);
    do hr(18'h10008, d); while (!d[1]);
    hr(18'h10018, d);
    checks++;
    if (d !== 32'(expect_cycles)) begin failures++; $display("%s: %0d cycles, expected %0d", name, d, expect_cycles); end
    else $display("%s: %0d cycles", name, d);
  endtask

  // 8-bit result of the saturation unit: ReLU, shift, clamp to [0, 255]
  function automatic logic [7:0] relu_sat(input int acc, input int sh);
    int v; v = (acc < 0) ? 0 : (acc >>> sh);
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction

  // ---------------------------------------------------------------- programs
  // KxK convolution: image rows in bank 0 from word 0, coefficients k[0..K*K-1]
  // in bank 1 (8 per word), output rows in bank 2 from word out_base.
  function automatic void conv_program(ref logic [31:0] prog [$], output int n_exec,
                                       input int rows, input int out_base, input int shift);
    int body, cur, pre;
    prog.delete();
    prog.push_back(ROUTE(0, R_DIRECT, 0, E_NEIGH));
    prog.push_back(AGSET(0, 0, AG_INDEX, 0));
    prog.push_back(AGSET(1, 0, AG_MOD, 0));
    prog.push_back(AGSET(1, 0, AG_INDEX, 0));
    prog.push_back(AGSET(2, 0, AG_INDEX, out_base));
    prog.push_back(SATCFG(0, 1, 0, shift));
    for (int r = 1; r < K; r++) prog.push_back(X(X_MOV, M(0), SNONE, DR(0, r)));
    prog.push_back(LOOP(0, rows - K + 1));
    pre = prog.size();
    body = prog.size();
    cur = 0;
    for (int r = 0; r < K - 1; r++) prog.push_back(X(X_MOV, R(0, r + 1, 0), SNONE, DR(0, r)));
    prog.push_back(X(X_MOV, M(0), SNONE, DR(0, K - 1)));
    // column offsets -2, -1, +1, +2, 0: path A ends in DIRECT for the next row load
    for (int o = 0; o < K; o++) begin
      int dc; dc = (o < 2) ? o : (o < 4 ? o + 1 : 2);
      prog.push_back(ROUTE(0, dc < 2 ? R_SHR : (dc > 2 ? R_SHL : R_DIRECT), dc < 2 ? 2 - dc : dc - 2, E_NEIGH));
      for (int dr = 0; dr < K; dr++) begin
        int k; k = K * dr + dc;
        if (k / 8 != cur) begin prog.push_back(AGSET(1, 0, AG_INDEX, k / 8)); cur = k / 8; end
        prog.push_back(ROUTE(1, R_MCAST, k % 8, E_ZERO));
        prog.push_back(X((o == 0 && dr == 0) ? X_MACZ : X_MAC, N(0, dr, 0), M(1, 1), DNONE));
      end
    end
    // the coefficient word is 0 again at the top of the body
    if (cur != 0) prog.push_back(AGSET(1, 0, AG_INDEX, 0));
    prog.push_back(X(X_SAT, SNONE, SNONE, DM(2)));
    prog.push_back(DJNZ(0, body));
    prog.push_back(C(C_HALT));
    n_exec = pre + (rows - K + 1) * (prog.size() - 1 - pre) + 1;
  endfunction

  // 3x3 max pooling, stride 3: rows from bank 2 word in_base, results in bank 3
  // word out_base, only in the PEs whose column is a multiple of 3.
  function automatic void pool_program(ref logic [31:0] prog [$], output int n_exec,
                                       input int prows, input int in_base, input int out_base);
    int body, pre;
    prog.delete();
    prog.push_back(AGSET(0, 0, AG_MOD, 1));
    prog.push_back(AGSET(0, 0, AG_INDEX, in_base));
    prog.push_back(AGSET(2, 0, AG_INDEX, out_base));
    prog.push_back(LOOP(1, prows));
    pre = prog.size();
    body = prog.size();
    prog.push_back(ROUTE(0, R_DIRECT, 0, E_NEIGH));
    prog.push_back(X(X_MOV, M(2), SNONE, DR(0, 0)));
    prog.push_back(X(X_MAX, M(2), R(0, 0, 0), DR(0, 0)));
    prog.push_back(X(X_MAX, M(2), R(0, 0, 0), DR(0, 0)));
    prog.push_back(ROUTE(0, R_SHL, 1, E_NEIGH));
    prog.push_back(X(X_MAX, N(0, 0, 0), R(0, 0, 0), DR(0, 1)));
    prog.push_back(ROUTE(0, R_SHL, 2, E_NEIGH));
    prog.push_back(X(X_MAX, N(0, 0, 0), R(0, 1, 0), DR(0, 1)));
    for (int n = 0; n < 4; n++) begin
      logic [7:0] m;
      for (int i = 0; i < 8; i++) m[i] = ((8 * n + i) % 3 == 0);
      prog.push_back(PEEN(n, m));
    end
    prog.push_back(X(X_MOV, R(0, 1, 0), SNONE, DM(3)));
    for (int n = 0; n < 4; n++) prog.push_back(PEEN(n, 8'hff));
    prog.push_back(DJNZ(1, body));
    prog.push_back(C(C_HALT));
    n_exec = pre + prows * (prog.size() - 1 - pre) + 1;
  endfunction

  // fully connected layer: inputs (unsigned bytes) in bank 0 words 0.. of
  // every NCB, weight j of the PE's neuron in its lane of bank 1 word j,
  // results in bank 2 word out_base
  function automatic void fc_program(ref logic [31:0] prog [$], output int n_exec,
                                     input int nin, input int out_base, input int shift);
    int body, pre;
    prog.delete();
    prog.push_back(ROUTE(1, R_DIRECT, 0, E_ZERO));
    prog.push_back(AGSET(0, 0, AG_INDEX, 0));
    prog.push_back(AGSET(1, 0, AG_INDEX, 0));
    prog.push_back(AGSET(1, 0, AG_MOD, 1));
    prog.push_back(AGSET(2, 0, AG_INDEX, out_base));
    prog.push_back(SATCFG(0, 1, 0, shift));
    prog.push_back(X(X_ACCLD, I(0), SNONE, DNONE));
    prog.push_back(LOOP(2, nin / 8));
    pre = prog.size();
    body = prog.size();
    prog.push_back(ROUTE(0, R_DIRECT, 0, E_ZERO));
    prog.push_back(X(X_MOV, M(0), SNONE, DR(0, 0)));
    for (int k = 0; k < 8; k++) begin
      prog.push_back(ROUTE(0, R_MCAST, k, E_ZERO));
      prog.push_back(X(X_MAC, N(0, 0, 0), M(1, 1), DNONE));
    end
    prog.push_back(DJNZ(2, body));
    prog.push_back(X(X_SAT, SNONE, SNONE, DM(2)));
    prog.push_back(C(C_HALT));
    n_exec = pre + (nin / 8) * 19 + 2;  // body: ROUTE, MOV, 8 x (ROUTE, MAC), DJNZ
  endfunction

  logic [7:0] img [ROWS][COLS];
  logic signed [7:0] kc [K*K];
  logic [7:0] conv_exp [ROWS][COLS];
  logic [7:0] pool_exp [PROWS][COLS];
  logic [7:0] x1 [NIN1];
  logic signed [7:0] w1 [COLS][NIN1];
  logic [7:0] y1 [COLS];
  logic signed [7:0] w2 [4][NIN2];
  logic [31:0] prog [$];

  initial begin
    logic [7:0] row [COLS];
    int n_exec, n_pool_stores;
    repeat (2) @(negedge clk); rst_n = 1;

    // ---- 5x5 convolution
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) img[r][c] = 8'($urandom_range(0, 63));
    for (int i = 0; i < K * K; i++) kc[i] = 8'(int'($urandom_range(0, 12)) - 5);
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) row[c] = img[r][c];
      put_row(0, r, row);
    end
    for (int w = 0; w < (K * K + 7) / 8; w++) begin
      for (int c = 0; c < COLS; c++) row[c] = (8 * w + c % 8 < K * K) ? kc[8 * w + c % 8] : 8'd0;
      put_row(1, w, row);
    end
    conv_program(prog, n_exec, ROWS, CONV_OUT, CONV_SHIFT);
    run(prog, n_exec, "conv 5x5");
    for (int r = 0; r <= ROWS - K; r++) begin
      get_row(2, CONV_OUT + r, row);
      for (int c = 0; c < COLS; c++) begin
        int acc; acc = 0;
        for (int dr = 0; dr < K; dr++) for (int dc = 0; dc < K; dc++) begin
          int cc; cc = c + dc - K / 2;
          if (cc >= 0 && cc < COLS) acc += int'(kc[K * dr + dc]) * int'(img[r + dr][cc]);
        end
        conv_exp[r][c] = relu_sat(acc, CONV_SHIFT);
        checks++;
        if (row[c] !== conv_exp[r][c]) begin
          failures++; if (failures < 10) $display("conv r%0d c%0d got %0d exp %0d", r, c, row[c], conv_exp[r][c]);
        end
      end
    end

    // ---- 3x3 / stride 3 max pooling of the convolution output
    pool_program(prog, n_exec, PROWS, CONV_OUT, POOL_OUT);
    run(prog, n_exec, "max pool 3x3/3");
    n_pool_stores = 0;
    for (int r = 0; r < PROWS; r++) begin
      get_row(3, POOL_OUT + r, row);
      for (int c = 0; c < COLS; c += 3) begin
        logic [7:0] m; m = 0;
        for (int dr = 0; dr < 3; dr++) for (int dc = 0; dc < 3; dc++)
          if (c + dc < COLS && conv_exp[3 * r + dr][c + dc] > m) m = conv_exp[3 * r + dr][c + dc];
        pool_exp[r][c] = m;
        checks++; n_pool_stores++;
        if (row[c] !== m) begin failures++; if (failures < 10) $display("pool r%0d c%0d got %0d exp %0d", r, c, row[c], m); end
      end
    end

    // ---- fully connected, 64 inputs -> 32 neurons
    for (int j = 0; j < NIN1; j++) x1[j] = 8'($urandom_range(0, 255));
    for (int i = 0; i < COLS; i++) for (int j = 0; j < NIN1; j++) w1[i][j] = 8'($urandom_range(0, 255));
    for (int w = 0; w < NIN1 / 8; w++) begin
      for (int c = 0; c < COLS; c++) row[c] = x1[8 * w + c % 8];
      put_row(0, w, row);
    end
    for (int j = 0; j < NIN1; j++) begin
      for (int c = 0; c < COLS; c++) row[c] = w1[c][j];
      put_row(1, j, row);
    end
    fc_program(prog, n_exec, NIN1, 200, FC_SHIFT);
    run(prog, n_exec, "fc 64->32");
    get_row(2, 200, row);
    for (int i = 0; i < COLS; i++) begin
      int acc; acc = 0;
      for (int j = 0; j < NIN1; j++) acc += int'(w1[i][j]) * int'(x1[j]);
      y1[i] = relu_sat(acc, FC_SHIFT);
      checks++;
      if (row[i] !== y1[i]) begin failures++; $display("fc1 n%0d got %0d exp %0d (acc %0d)", i, row[i], y1[i], acc); end
    end

    // ---- output layer, 32 -> 4 neurons (PEs 0..3 of NCB 0 hold the neurons)
    for (int w = 0; w < NIN2 / 8; w++) begin
      for (int c = 0; c < COLS; c++) row[c] = y1[8 * w + c % 8];
      put_row(0, w, row);
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < NIN2; j++) w2[i][j] = 8'($urandom_range(0, 255));
    for (int j = 0; j < NIN2; j++) begin
      for (int c = 0; c < COLS; c++) row[c] = (c < 4) ? w2[c][j] : 8'd0;
      put_row(1, j, row);
    end
    fc_program(prog, n_exec, NIN2, 201, FC_SHIFT);
    run(prog, n_exec, "fc 32->4");
    get_row(2, 201, row);
    for (int i = 0; i < 4; i++) begin
      int acc; acc = 0;
      for (int j = 0; j < NIN2; j++) acc += int'(w2[i][j]) * int'(y1[j]);
      checks++;
      if (row[i] !== relu_sat(acc, FC_SHIFT)) begin failures++; $display("fc2 n%0d got %0d exp %0d", i, row[i], relu_sat(acc, FC_SHIFT)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
