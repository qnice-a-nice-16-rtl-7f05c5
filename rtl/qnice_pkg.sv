// qnice_pkg -- types and constants shared by the QNICE processor modules.
//
// QNICE is a 16-bit machine in which every instruction is one 16-bit word.
// The ordinary format is
//   [15:12] opcode  [11:8] src register  [7:6] src mode  [5:2] dst register  [1:0] dst mode
// and opcode 0xF (jumps and calls) reuses the low six bits as
//   [5:4] branch mode  [3] negate condition  [2:0] condition select.
// The lower byte of R14 (the status register) holds, from bit 0 upwards,
// 1, X, C, Z, N, V, I, M; the upper byte (rbank) selects the page of the
// banked registers R0..R7. Field layout, opcode numbers, mode encodings and
// status-bit order follow the architecture definition. Opcode 0xD has no
// instruction in the architecture and is treated here as a reserved no-op.
package qnice_pkg;

  // Special registers.
  localparam logic [3:0] REG_SP = 4'd13;  // stack pointer used by ASUB/RSUB
  localparam logic [3:0] REG_SR = 4'd14;  // status register
  localparam logic [3:0] REG_PC = 4'd15;  // program counter

  // Memory-mapped I/O occupies the upper 1k words of the address space.
  localparam logic [15:0] IO_BASE = 16'hFC00;

  // Status-register bit positions (R14[7:0]).
  localparam int unsigned SR_ONE = 0;
  localparam int unsigned SR_X   = 1;
  localparam int unsigned SR_C   = 2;
  localparam int unsigned SR_Z   = 3;
  localparam int unsigned SR_N   = 4;
  localparam int unsigned SR_V   = 5;
  localparam int unsigned SR_I   = 6;
  localparam int unsigned SR_M   = 7;

  typedef enum logic [3:0] {
    OP_MOVE = 4'h0,
    OP_ADD  = 4'h1,
    OP_ADDC = 4'h2,
    OP_SUB  = 4'h3,
    OP_SUBC = 4'h4,
    OP_SHL  = 4'h5,
    OP_SHR  = 4'h6,
    OP_SWAP = 4'h7,
    OP_NOT  = 4'h8,
    OP_AND  = 4'h9,
    OP_OR   = 4'hA,
    OP_XOR  = 4'hB,
    OP_CMP  = 4'hC,
    OP_RSVD = 4'hD,
    OP_HALT = 4'hE,
    OP_BRA  = 4'hF
  } opcode_e;

  typedef enum logic [1:0] {
    AM_REG     = 2'b00,  // Rxx
    AM_IND     = 2'b01,  // @Rxx
    AM_POSTINC = 2'b10,  // @Rxx++
    AM_PREDEC  = 2'b11   // @--Rxx
  } amode_e;

  typedef enum logic [1:0] {
    BR_ABRA = 2'b00,
    BR_ASUB = 2'b01,
    BR_RBRA = 2'b10,
    BR_RSUB = 2'b11
  } brmode_e;

  // Lower half of the status register, MSB first as printed in the
  // architecture's register diagram.
  typedef struct packed {
    logic m;
    logic i;
    logic v;
    logic n;
    logic z;
    logic c;
    logic x;
    logic one;
  } flags_t;

  // Instruction word, ordinary format.
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  src_reg;
    amode_e      src_mode;
    logic [3:0]  dst_reg;
    amode_e      dst_mode;
  } instr_t;

  // Instruction word, jump/call format (opcode 0xF).
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  src_reg;
    amode_e      src_mode;
    brmode_e     br_mode;
    logic        negate;
    logic [2:0]  cond;
  } br_instr_t;

  // Decoded instruction as used by the sequencer.
  typedef struct packed {
    opcode_e     op;
    logic [3:0]  src_reg;
    amode_e      src_mode;
    logic [3:0]  dst_reg;
    amode_e      dst_mode;
    logic        is_branch;   // ABRA/ASUB/RBRA/RSUB
    logic        is_halt;
    logic        dst_read;    // destination value is an ALU input
    logic        dst_write;   // result is written back to the destination
    brmode_e     br_mode;
    logic        negate;
    logic [2:0]  cond;
  } decoded_t;

endpackage
