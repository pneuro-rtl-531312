// pneuro_pkg: constants, instruction formats and configuration types shared by
// the PNeuro accelerator.
//
// Sizes follow the evaluated configuration: 2 clusters of 4 Neural Computing
// Blocks (NCBs) with 8 processing elements (PEs) each, 128 KB of data memory and
// 4 KB of program memory per cluster. Each NCB holds 4 banks, one byte lane per
// PE, so a bank word is 8 bytes and a bank has 1024 words.
//
// Instructions are 32 bits. Bit 31 tells control (0) from compute (1), bits
// 30:25 hold the opcode. Compute instructions then carry a 3-bit guard and two
// operand sources, each a 2-bit kind (register, memory, neighbour, immediate), a
// signed/unsigned bit and a 5-bit field, and a 6-bit destination. The split of
// the lower bits, the opcode numbers and the instruction subset are this
// design's own choice; only the bit-31 / 6-bit-opcode / guard / operand-source
// order is prescribed.
package pneuro_pkg;

  localparam int unsigned PE_PER_NCB      = 8;
  localparam int unsigned NCB_PER_CLUSTER = 4;
  localparam int unsigned N_CLUSTERS      = 2;
  localparam int unsigned BANKS           = 4;
  localparam int unsigned BANK_WORDS      = 1024;
  localparam int unsigned PROG_WORDS      = 1024;
  localparam int unsigned PROG_AW         = 10;
  localparam int unsigned RF_WORDS        = 8;
  localparam int unsigned AG_W            = 16;   // address generator register width
  localparam int unsigned N_AG            = 3;
  localparam int unsigned N_LOOP          = 4;

  // ---------------------------------------------------------------- control
  typedef enum logic [5:0] {
    C_NOP     = 6'd0,
    C_HALT    = 6'd1,
    C_JMP     = 6'd2,   // [9:0] target
    C_LOOP    = 6'd3,   // [24:23] counter, [15:0] count
    C_DJNZ    = 6'd4,   // [24:23] counter, [9:0] target: ctr--, jump if ctr != 0
    C_AGSET   = 6'd5,   // [24:23] ag, [22] set, [21:20] reg, [15:0] value
    C_AGSEL   = 6'd6,   // [24:23] ag, [22] set
    C_ROUTE   = 6'd7,   // [24] path, [23:21] mode, [20:18] amount, [17:16] edge fill
    C_SATCFG  = 6'd8,   // [24] auto, [23] relu, [22] signed out, [20:16] shift
    C_PEEN    = 6'd9,   // [24:22] NCB index, [7:0] PE enable mask
    C_SIGNAL  = 6'd10,  // [7:0] host signal flags to set
    C_WAITH   = 6'd11,  // [7:0] host sync flags to wait for (then cleared)
    C_BARRIER = 6'd12,  // wait for all clusters (synchronized mode)
    C_NEIGH   = 6'd13   // [1:0] enable left / right inter-cluster link
  } ctrl_op_e;

  // address generator register select
  typedef enum logic [1:0] {AG_INDEX = 2'd0, AG_MOD = 2'd1, AG_LO = 2'd2, AG_HI = 2'd3} ag_reg_e;

  // ---------------------------------------------------------------- compute
  typedef enum logic [5:0] {
    X_NOP    = 6'd0,
    X_MOV    = 6'd1,
    X_ADD    = 6'd2,
    X_SUB    = 6'd3,
    X_AND    = 6'd4,
    X_OR     = 6'd5,
    X_XOR    = 6'd6,
    X_MIN    = 6'd7,
    X_MAX    = 6'd8,
    X_SHL    = 6'd9,
    X_SHR    = 6'd10,  // arithmetic
    X_CMP    = 6'd11,  // flags only
    X_MUL    = 6'd12,  // dst = A9 * B9
    X_MAC    = 6'd13,  // acc += A9 * B9
    X_MACZ   = 6'd14,  // acc  = A9 * B9
    X_ACCLD  = 6'd15,  // acc  = A
    X_ACCADD = 6'd16,  // acc += A
    X_ACCST  = 6'd17,  // dst = acc
    X_SAT    = 6'd18,  // dst = saturate(acc)
    X_MSB    = 6'd19   // dst = MSB position of A
  } comp_op_e;

  typedef enum logic [1:0] {SRC_REG = 2'd0, SRC_MEM = 2'd1, SRC_NEIGH = 2'd2, SRC_IMM = 2'd3} src_kind_e;

  // guard conditions, evaluated on the flags left by the previous flag-setting
  // instruction of the same PE
  typedef enum logic [2:0] {
    G_ALWAYS = 3'd0, G_Z = 3'd1, G_NZ = 3'd2, G_N = 3'd3,
    G_NN = 3'd4, G_GT = 3'd5, G_LE = 3'd6, G_NEVER = 3'd7
  } guard_e;

  // register specifier: [4:3] width (0: 8, 1: 16, 2: 32 bit), [2:0] index.
  // 8-bit index n is byte n, 16-bit index n is half-word n, 32-bit index n is word n.
  typedef enum logic [1:0] {W8 = 2'd0, W16 = 2'd1, W32 = 2'd2} rwidth_e;

  typedef struct packed {
    logic [1:0] width;
    logic [2:0] idx;
  } rspec_t;

  typedef struct packed {
    src_kind_e  kind;
    logic       sgn;
    logic [4:0] field;   // rspec_t for REG / NEIGH, bank in [1:0] for MEM, immediate for IMM
  } src_t;

  typedef struct packed {
    logic       to_mem;  // 1: store low byte to bank field[1:0] at the store address
    logic [4:0] field;   // rspec_t when to_mem = 0
  } dst_t;

  typedef struct packed {
    logic       is_comp;  // 1
    comp_op_e   op;
    guard_e     guard;
    src_t       a;
    src_t       b;
    dst_t       dst;
  } comp_instr_t;

  // routing modes (per operand path)
  typedef enum logic [2:0] {
    R_DIRECT = 3'd0,  // PE i takes lane i
    R_MCAST  = 3'd1,  // every PE takes lane 'amount'
    R_SHL    = 3'd2,  // PE i takes lane i + amount (from the right neighbour past the edge)
    R_SHR    = 3'd3,  // PE i takes lane i - amount (from the left neighbour past the edge)
    R_ZERO   = 3'd4,  // every PE takes 0
    R_ONE    = 3'd5   // every PE takes 1
  } route_mode_e;

  // what enters past the NCB edge in the shift modes
  typedef enum logic [1:0] {E_NEIGH = 2'd0, E_ZERO = 2'd1, E_ONE = 2'd2} edge_fill_e;

  typedef struct packed {
    route_mode_e mode;
    logic [2:0]  amount;
    edge_fill_e  edge_fill;
  } route_cfg_t;

  typedef struct packed {
    logic       auto_shift;  // shift chosen by the MSB detector
    logic       relu;        // linear rectifier before saturation
    logic       signed_out;  // saturate to [-128,127] instead of [0,255]
    logic [4:0] shift;       // manual right shift
  } sat_cfg_t;

  // flags of a PE
  typedef struct packed {
    logic z;
    logic n;
  } flags_t;

  // sign / zero extension of a value of the given width to 32 bits
  function automatic logic [31:0] extend(input logic [31:0] v, input logic [1:0] width, input logic sgn);
    logic [31:0] r;
    unique case (width)
      W8:      r = {{24{sgn & v[7]}},  v[7:0]};
      W16:     r = {{16{sgn & v[15]}}, v[15:0]};
      default: r = v;
    endcase
    return r;
  endfunction

  // source lanes of one NCB edge, both operand paths, as carried by the
  // inter-NCB / inter-cluster neighbour links
  typedef struct packed {
    logic [PE_PER_NCB-1:0][7:0]  a8;
    logic [PE_PER_NCB-1:0][31:0] a32;
    logic [PE_PER_NCB-1:0][7:0]  b8;
    logic [PE_PER_NCB-1:0][31:0] b32;
  } nb_lanes_t;

endpackage
