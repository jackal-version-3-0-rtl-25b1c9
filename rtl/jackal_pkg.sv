// Jackal shared types and constants.
//
// The Jackal is a 16-bit RISC with a 4-bit opcode, sixteen 4-bit register
// operands (R0-R11 defined, U0-U3 left open) and a word-addressed 64K x 16
// memory. This package holds the opcode and mode encodings taken from the
// instruction set tables, plus the decoded-instruction struct and ALU
// operation enum that are this implementation's own choices.
package jackal_pkg;

  localparam int unsigned DATA_W  = 16;  // data, address and instruction width
  localparam int unsigned NUM_GPR = 12;  // R0..R11

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [3:0]        reg_idx_t;

  // Opcodes, bits 15:12
  typedef enum logic [3:0] {
    OP_ADD  = 4'b0000,
    OP_SUB  = 4'b0001,
    OP_AND  = 4'b0010,
    OP_OR   = 4'b0011,
    OP_NAND = 4'b0100,
    OP_SLA  = 4'b0101,
    OP_SRA  = 4'b0110,
    OP_LDST = 4'b0111,
    OP_LIL  = 4'b1000,
    OP_LIH  = 4'b1001,
    OP_CMP  = 4'b1010,
    OP_BR   = 4'b1011
  } opcode_e;

  // LD/ST mode, bits 3:0
  localparam logic [3:0] MODE_LD = 4'b0110;
  localparam logic [3:0] MODE_ST = 4'b1001;

  // Branch mode, bits 11:8
  localparam logic [3:0] MODE_BRN = 4'b0110;
  localparam logic [3:0] MODE_BRZ = 4'b0111;
  localparam logic [3:0] MODE_BRP = 4'b1000;
  localparam logic [3:0] MODE_JMP = 4'b1001;

  // ALU operations (encoding is internal)
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_NAND,
    ALU_SLA, ALU_SRA, ALU_LIL, ALU_LIH
  } alu_op_e;

  // Decoded instruction
  typedef struct packed {
    alu_op_e   alu_op;
    logic      reg_we;     // ALU result is written to rd
    logic      is_load;    // LD, mode 0110
    logic      is_store;   // ST, mode 1001
    logic      is_cmp;     // CMP
    logic      is_branch;  // opcode 1011 (mode decided by the branch unit)
    reg_idx_t  rd;         // destination / written register
    reg_idx_t  ra1;        // read port 1: source one, source, or memory address
    reg_idx_t  ra2;        // read port 2: source two, old destination, or store data
    logic [3:0] mode;      // bits 11:8 (branch mode)
    logic [7:0] imm;       // bits 7:0 (immediate, offset; 3:0 = shift amount)
  } dec_t;

endpackage
