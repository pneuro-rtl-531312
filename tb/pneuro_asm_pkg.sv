// pneuro_asm_pkg: instruction encoders for the testbenches. Each function
// returns one 32-bit instruction in the format of pneuro_pkg, so test programs
// read like assembly.
//
// The functions only pack fields; the field layout follows pneuro_pkg.
// conv3x3_program builds a complete layer program used by the cluster and
// top-level tests.
package pneuro_asm_pkg;
  import pneuro_pkg::*;

  // operand sources
  function automatic src_t R(input int w, input int idx, input bit sgn = 1);
    return '{kind: SRC_REG, sgn: sgn, field: {2'(w), 3'(idx)}};
  endfunction
  function automatic src_t M(input int bank, input bit sgn = 0);
    return '{kind: SRC_MEM, sgn: sgn, field: 5'(bank)};
  endfunction
  function automatic src_t N(input int w, input int idx, input bit sgn = 1);
    return '{kind: SRC_NEIGH, sgn: sgn, field: {2'(w), 3'(idx)}};
  endfunction
  function automatic src_t I(input int v);
    return '{kind: SRC_IMM, sgn: v < 0, field: 5'(v)};
  endfunction
  // destinations
  function automatic dst_t DR(input int w, input int idx);
    return '{to_mem: 1'b0, field: {2'(w), 3'(idx)}};
  endfunction
  function automatic dst_t DM(input int bank);
    return '{to_mem: 1'b1, field: 5'(bank)};
  endfunction
  localparam dst_t DNONE = '{to_mem: 1'b0, field: 5'd0};
  localparam src_t SNONE = '{kind: SRC_IMM, sgn: 1'b0, field: 5'd0};

  function automatic logic [31:0] X(input comp_op_e op, input src_t a, input src_t b, input dst_t d,
                                    input guard_e g = G_ALWAYS);
    comp_instr_t c;
    c.is_comp = 1'b1; c.op = op; c.guard = g; c.a = a; c.b = b; c.dst = d;
    return 32'(c);
  endfunction

  function automatic logic [31:0] C(input ctrl_op_e op, input logic [24:0] f = '0);
    return {1'b0, op, f};
  endfunction
  function automatic logic [31:0] AGSET(input int ag, input int set, input ag_reg_e r, input int v);
    return C(C_AGSET, {2'(ag), 1'(set), 2'(r), 4'd0, 16'(v)});
  endfunction
  function automatic logic [31:0] AGSEL(input int ag, input int set);
    return C(C_AGSEL, {2'(ag), 1'(set), 22'd0});
  endfunction
  function automatic logic [31:0] ROUTE(input int path, input route_mode_e m, input int amt, input edge_fill_e e);
    return C(C_ROUTE, {1'(path), m, 3'(amt), e, 16'd0});
  endfunction
  function automatic logic [31:0] SATCFG(input bit auto_sh, input bit relu, input bit sgn_out, input int shift);
    return C(C_SATCFG, {auto_sh, relu, sgn_out, 1'b0, 5'(shift), 16'd0});
  endfunction
  function automatic logic [31:0] PEEN(input int ncb, input logic [7:0] mask);
    return C(C_PEEN, {3'(ncb), 14'd0, mask});
  endfunction
  function automatic logic [31:0] LOOP(input int ctr, input int n);
    return C(C_LOOP, {2'(ctr), 7'd0, 16'(n)});
  endfunction
  function automatic logic [31:0] DJNZ(input int ctr, input int target);
    return C(C_DJNZ, {2'(ctr), 13'd0, 10'(target)});
  endfunction
  function automatic logic [31:0] JMP(input int target);
    return C(C_JMP, {15'd0, 10'(target)});
  endfunction

  // 3x3 convolution over an image stored one row per bank word (bank 0, from
  // word 0), one column per PE, coefficients k[0..7] in lanes of bank 1 word 0
  // and k[8] in lane 0 of word 1, results (rectified, saturated to 8 bits) in
  // bank 2 from word out_base: output row r uses input rows r, r+1, r+2, and
  // column c uses columns c-1, c, c+1 (from the neighbouring NCB or cluster at
  // the edges, zero past the outer edge of the chain).
  // Rows stream through PE byte registers 0..2; routing shifts them across the
  // PEs and multicasts the coefficients. With sync set, the program first
  // waits for host sync flag 0, enables both inter-cluster links, meets the
  // other clusters at a barrier, and signals flag 0 to the host at the end.
  function automatic void conv3x3_program(ref logic [31:0] prog [$], input int rows, input int out_base,
                                          input bit auto_sh, input int shift, input bit sync);
    int body;
    prog.delete();
    if (sync) begin
      prog.push_back(C(C_WAITH, 25'h1));
      prog.push_back(C(C_NEIGH, 25'h3));
      prog.push_back(C(C_BARRIER));
    end
    prog.push_back(AGSET(0, 0, AG_INDEX, 0));
    prog.push_back(AGSET(1, 0, AG_INDEX, 0));
    prog.push_back(AGSET(1, 0, AG_MOD, 0));
    prog.push_back(AGSET(1, 1, AG_INDEX, 1));
    prog.push_back(AGSET(1, 1, AG_MOD, 0));
    prog.push_back(AGSET(2, 0, AG_INDEX, out_base));
    prog.push_back(SATCFG(auto_sh, 1, 0, shift));
    prog.push_back(X(X_MOV, M(0), SNONE, DR(0, 1)));
    prog.push_back(X(X_MOV, M(0), SNONE, DR(0, 2)));
    prog.push_back(LOOP(0, rows - 2));
    body = prog.size();
    prog.push_back(X(X_MOV, R(0, 1, 0), SNONE, DR(0, 0)));
    prog.push_back(X(X_MOV, R(0, 2, 0), SNONE, DR(0, 1)));
    prog.push_back(X(X_MOV, M(0), SNONE, DR(0, 2)));
    // column offsets in the order -1, +1, 0, so that path A is left in DIRECT
    // mode for the row load at the top of the next iteration
    for (int o = 0; o < 3; o++) begin
      int dc; dc = (o == 0) ? 0 : (o == 1 ? 2 : 1);
      prog.push_back(ROUTE(0, dc == 0 ? R_SHR : (dc == 1 ? R_DIRECT : R_SHL), 1, E_NEIGH));
      for (int dr = 0; dr < 3; dr++) begin
        int k; k = 3 * dr + dc;
        if (k == 8) prog.push_back(AGSEL(1, 1));  // k[8] sits in word 1: switch pattern
        prog.push_back(ROUTE(1, R_MCAST, k % 8, E_ZERO));
        prog.push_back(X((o == 0 && dr == 0) ? X_MACZ : X_MAC, N(0, dr, 0), M(1, 1), DNONE));
        if (k == 8) prog.push_back(AGSEL(1, 0));
      end
    end
    prog.push_back(X(X_SAT, SNONE, SNONE, DM(2)));
    prog.push_back(DJNZ(0, body));
    if (sync) prog.push_back(C(C_SIGNAL, 25'h1));
    prog.push_back(C(C_HALT));
  endfunction

  // reference result of one output pixel of conv3x3_program
  function automatic logic [7:0] conv3x3_ref(input int acc, input bit auto_sh, input int shift);
    longint v; int sh, p;
    v = (acc < 0) ? 0 : acc;
    sh = shift;
    if (auto_sh) begin
      p = -1;
      for (int i = 30; i >= 0; i--) if (v[i]) begin p = i; break; end
      sh = (p + 1 > 8) ? p + 1 - 8 : 0;
    end
    v = v >>> sh;
    return (v > 255) ? 8'd255 : 8'(v);
  endfunction
endpackage
