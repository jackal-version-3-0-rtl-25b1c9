// Jackal ALU (combinational).
//
// Produces the value written back by every register-writing instruction:
//   ADD  a + b          SUB  a - b          (16-bit two's complement, wraps)
//   AND  a & b          OR   a | b          NAND ~(a & b)
//   SLA  a << imm[3:0]  (zeros shifted in)
//   SRA  a >>> imm[3:0] (sign bit shifted in)
//   LIL  {b[15:8], imm} LIH  {imm, b[7:0]}  (b is the old destination)
// The operations are those of the instruction set; no carry or overflow
// flag is produced because the instruction set has none.
module jackal_alu
  import jackal_pkg::*;
(
  input  alu_op_e    op,
  input  word_t      a,
  input  word_t      b,
  input  logic [7:0] imm,
  output word_t      y
);

  logic [3:0] shamt;
  assign shamt = imm[3:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_NAND: y = ~(a & b);
      ALU_SLA:  y = a << shamt;
      ALU_SRA:  y = word_t'($signed(a) >>> shamt);
      ALU_LIL:  y = {b[15:8], imm};
      ALU_LIH:  y = {imm, b[7:0]};
      default:  y = '0;
    endcase
  end

endmodule
