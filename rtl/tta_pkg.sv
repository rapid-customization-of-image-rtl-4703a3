// tta_pkg: types and constants shared by the transport-triggered image
// processor and its function units (FUs).
//
// The processor is statically scheduled: an instruction holds NBUS data
// moves, each copying one source (a register, an FU result port or an
// immediate) to one destination (a register or an FU input port). Writing an
// FU's trigger port starts an operation; the opcode is part of the
// destination address, so each opcode of an FU has its own trigger address.
// The instruction encoding, bus count and socket numbering below are this
// design's own choices.
package tta_pkg;

  localparam int unsigned DW     = 32;  // machine word
  localparam int unsigned NBUS   = 3;   // moves per instruction
  localparam int unsigned IMM_W  = 22;  // signed immediate per move
  localparam int unsigned SOCK_W = 7;   // source / destination address

  // guard of a move, evaluated on the boolean register file
  typedef enum logic [1:0] {
    G_ALWAYS = 2'd0,
    G_B0     = 2'd1,   // execute if B0 is true
    G_NB0    = 2'd2,   // execute if B0 is false
    G_NEVER  = 2'd3    // empty slot
  } guard_e;

  typedef struct packed {
    guard_e              guard;
    logic [SOCK_W-1:0]   src;
    logic [SOCK_W-1:0]   dst;
    logic [IMM_W-1:0]    imm;
  } move_t;

  typedef move_t [NBUS-1:0] instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // ---- source sockets (readable) ----
  localparam int unsigned S_RF     = 0;    // 0..15: scalar registers
  localparam int unsigned S_B0     = 16;   // boolean registers, zero-extended
  localparam int unsigned S_B1     = 17;
  localparam int unsigned S_ALU    = 18;   // FU result ports
  localparam int unsigned S_LSU    = 19;
  localparam int unsigned S_RTC    = 20;
  localparam int unsigned S_WAVG3  = 21;
  localparam int unsigned S_FPU    = 22;
  localparam int unsigned S_SWAVG5 = 23;
  localparam int unsigned S_LERP   = 24;
  localparam int unsigned S_IMM    = 127;  // sign-extended immediate field

  // ---- destination sockets (writable) ----
  // FU input port 1 is the trigger port; ports 2..n are operand registers.
  localparam int unsigned D_RF       = 0;   // 0..15
  localparam int unsigned D_B0       = 16;
  localparam int unsigned D_B1       = 17;
  localparam int unsigned D_ALU_O2   = 18;
  localparam int unsigned D_ALU_T    = 19;  // 19..29: trigger + ALU opcode
  localparam int unsigned D_LSU_O2   = 30;  // store data
  localparam int unsigned D_LSU_T    = 31;  // 31..34: address + LSU opcode
  localparam int unsigned D_RTC_T    = 35;  // set the cycle counter
  localparam int unsigned D_WAVG3_O2 = 36;
  localparam int unsigned D_WAVG3_O3 = 37;
  localparam int unsigned D_WAVG3_T  = 38;
  localparam int unsigned D_FPU_O2   = 39;
  localparam int unsigned D_FPU_T    = 40;  // 40..45: trigger + FPU opcode
  localparam int unsigned D_SWAVG5_O = 46;  // 46..49: operands 2..5
  localparam int unsigned D_SWAVG5_T = 50;
  localparam int unsigned D_LERP_O   = 51;  // 51..60: operands 2..11
  localparam int unsigned D_LERP_T   = 61;
  localparam int unsigned D_JUMP     = 62;  // program counter <= value
  localparam int unsigned D_HALT     = 63;  // stop, value goes to exit_code
  localparam int unsigned D_NONE     = 127;

  // ---- opcodes ----
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_IOR, ALU_XOR,
    ALU_SHL, ALU_SHR, ALU_SHRU, ALU_EQ, ALU_GT, ALU_GTU
  } alu_op_e;
  localparam int unsigned N_ALU_OPS = 11;

  typedef enum logic [1:0] { LSU_LDW, LSU_LDQU, LSU_STW, LSU_STQ } lsu_op_e;

  typedef enum logic [2:0] { FPU_ADDF, FPU_SUBF, FPU_MULF, FPU_CIF, FPU_CFI, FPU_DIVF } fpu_op_e;
  localparam int unsigned N_FPU_OPS = 6;

endpackage
