// carbon_pkg: types and constants shared by the CARBON coarse-grain overlay.
//
// A CARBON CG executes one 81-bit instruction per system clock from its
// instruction memory.  The architecture fixes the instruction length, the
// 32-bit datapath, the per-operation result width, the five operand
// memories (N, S, E, W from the neighbours and the local R memory) and a
// 256-entry schedule; the field layout, the opcode set and the 16-word
// operand memories below are this design's own choices, sized so that the
// instruction is exactly 81 bits.
// Some constants (the memory indices, INSTR_W) only name things for the
// reader and the testbenches, so Verilator reports them as unused.
package carbon_pkg;
  localparam int unsigned DATA_W  = 32;
  localparam int unsigned ADDR_W  = 4;     // operand memory depth 16
  localparam int unsigned PC_W    = 8;     // schedule length up to 256
  localparam int unsigned IMM_W   = 16;
  localparam int unsigned NMEM    = 5;

  // memory / direction indices
  localparam int unsigned M_N = 0;
  localparam int unsigned M_S = 1;
  localparam int unsigned M_E = 2;
  localparam int unsigned M_W = 3;
  localparam int unsigned M_R = 4;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,   // result 0, normally used with no writes
    OP_ADD  = 5'd1,
    OP_SUB  = 5'd2,
    OP_MUL  = 5'd3,
    OP_AND  = 5'd4,
    OP_OR   = 5'd5,
    OP_XOR  = 5'd6,
    OP_NOT  = 5'd7,
    OP_SHL  = 5'd8,   // a << b[4:0], computed in the multiplier
    OP_SHR  = 5'd9,   // logical a >> b[4:0]
    OP_SRA  = 5'd10,  // arithmetic a >>> b[4:0]
    OP_EQ   = 5'd11,
    OP_NE   = 5'd12,
    OP_LTU  = 5'd13,
    OP_LTS  = 5'd14,
    OP_PASS = 5'd15,  // result = a
    OP_LDI  = 5'd16,  // result = zero-extended immediate
    OP_LDHI = 5'd17,  // result = {imm, a[15:0]}: builds a 32-bit constant
    OP_ADDI = 5'd18,  // result = a + zero-extended immediate
    OP_STORE = 5'd19, // R[a[ADDR_W-1:0]] = b: store with the address from an operand
    OP_LOAD  = 5'd20  // result = a; the next instruction's operand A is read at address a
  } op_e;

  typedef enum logic [2:0] {
    SRC_N = 3'd0, SRC_S = 3'd1, SRC_E = 3'd2, SRC_W = 3'd3, SRC_R = 3'd4
  } src_e;

  typedef struct packed {
    logic  use_x;   // 1: crossbar value, 0: ALU result
    logic  we;
    addr_t addr;    // address in the neighbour's memory
  } route_t;

  typedef struct packed {
    op_e        op;        // [80:76]
    logic [4:0] width_m1;  // [75:71] result width minus one
    src_e       a_sel;     // [70:68]
    addr_t      a_addr;    // [67:64]
    src_e       b_sel;     // [63:61]
    addr_t      b_addr;    // [60:57]
    logic       r_we;      // [56]
    addr_t      r_addr;    // [55:52]
    src_e       x_sel;     // [51:49] crossbar source memory
    addr_t      x_addr;    // [48:45]
    route_t [3:0] out;     // [44:21] index N, S, E, W
    logic [IMM_W-1:0] imm; // [20:5]
    logic       last;      // [4] last instruction of the schedule
    logic [3:0] rsvd;      // [3:0]
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);
endpackage
