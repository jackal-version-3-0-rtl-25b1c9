// Jackal instruction decoder (combinational).
//
// Splits a 16-bit instruction word into its fields and classifies it. Field
// positions and the opcode/mode values follow the instruction set tables:
// opcode 15:12, destination (or ST source / branch mode) 11:8, source one
// (or LD/ST address register) 7:4, source two / shift offset / LD-ST mode 3:0,
// 8-bit immediate or branch offset 7:0.
//
// Read-port steering is this design's choice: port 1 always reads bits 7:4;
// port 2 reads bits 3:0 for the register-register operations and bits 11:8
// for LIL/LIH (old destination, so the other byte is kept) and for ST (the
// value to store). LD/ST with a mode other than 0110/1001, and opcodes
// 1100-1111, decode as no-ops.
module jackal_decode
  import jackal_pkg::*;
(
  input  word_t instr,
  output dec_t  dec
);

  logic [3:0] opc;
  assign opc = instr[15:12];

  always_comb begin
    dec           = '0;
    dec.alu_op    = ALU_ADD;
    dec.rd        = instr[11:8];
    dec.ra1       = instr[7:4];
    dec.ra2       = instr[3:0];
    dec.mode      = instr[11:8];
    dec.imm       = instr[7:0];
    unique case (opc)
      OP_ADD:  begin dec.alu_op = ALU_ADD;  dec.reg_we = 1'b1; end
      OP_SUB:  begin dec.alu_op = ALU_SUB;  dec.reg_we = 1'b1; end
      OP_AND:  begin dec.alu_op = ALU_AND;  dec.reg_we = 1'b1; end
      OP_OR:   begin dec.alu_op = ALU_OR;   dec.reg_we = 1'b1; end
      OP_NAND: begin dec.alu_op = ALU_NAND; dec.reg_we = 1'b1; end
      OP_SLA:  begin dec.alu_op = ALU_SLA;  dec.reg_we = 1'b1; end
      OP_SRA:  begin dec.alu_op = ALU_SRA;  dec.reg_we = 1'b1; end
      OP_LIL:  begin dec.alu_op = ALU_LIL;  dec.reg_we = 1'b1; dec.ra2 = instr[11:8]; end
      OP_LIH:  begin dec.alu_op = ALU_LIH;  dec.reg_we = 1'b1; dec.ra2 = instr[11:8]; end
      OP_LDST: begin
        dec.ra2      = instr[11:8];
        dec.is_load  = (instr[3:0] == MODE_LD);
        dec.is_store = (instr[3:0] == MODE_ST);
      end
      OP_CMP:  dec.is_cmp    = 1'b1;
      OP_BR:   dec.is_branch = 1'b1;
      default: ;  // undefined opcodes 1100-1111: no-op
    endcase
  end

endmodule
