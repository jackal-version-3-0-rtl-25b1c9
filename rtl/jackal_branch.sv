// Jackal next-PC logic (combinational).
//
// For a branch instruction (opcode 1011) the target is PC + 1 + offset,
// where the 8-bit offset is sign-extended (two's complement, so branches
// reach -128..+127 words around the incremented PC). The target is taken
// for JMP (mode 1001), BRN (0110) with CRN set, BRZ (0111) with CRZ set
// and BRP (1000) with CRP set. Every other case, including other branch
// modes, gives PC + 1.
module jackal_branch
  import jackal_pkg::*;
(
  input  word_t      pc,
  input  logic       is_branch,
  input  logic [3:0] mode,
  input  logic [7:0] offset,
  input  logic       crn,
  input  logic       crz,
  input  logic       crp,
  output word_t      next_pc
);

  logic  taken;

  word_t pc_inc;
  assign pc_inc = pc + word_t'(1);

  always_comb begin
    taken = 1'b0;
    if (is_branch) begin
      unique case (mode)
        MODE_JMP: taken = 1'b1;
        MODE_BRN: taken = crn;
        MODE_BRZ: taken = crz;
        MODE_BRP: taken = crp;
        default:  taken = 1'b0;
      endcase
    end
    next_pc = taken ? pc_inc + word_t'({{(DATA_W-8){offset[7]}}, offset}) : pc_inc;
  end

endmodule
