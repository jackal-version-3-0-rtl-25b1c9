// Jackal general-purpose register file.
//
// NUM_GPR 16-bit registers (R0-R11 by default) with two asynchronous read
// ports and one synchronous write port. Operand codes 1100-1111 (U0-U3) are
// left undefined by the instruction set; here they read as 0x0000 and writes
// to them are ignored. All registers clear to 0x0000 on the active-low reset,
// as the instruction set requires. A write and a read of the same register in
// one cycle return the old value (the core never needs bypassing because
// it executes one instruction at a time).
module jackal_regfile
  import jackal_pkg::*;
#(
  parameter int unsigned NUM_GPR_P = NUM_GPR
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra1,
  output word_t    rd1,
  input  reg_idx_t ra2,
  output word_t    rd2,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);

  word_t regs [NUM_GPR_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_GPR_P; i++) regs[i] <= '0;
    end else if (we && (32'(wa) < NUM_GPR_P)) begin
      regs[wa] <= wd;
    end
  end

  assign rd1 = (32'(ra1) < NUM_GPR_P) ? regs[ra1] : '0;
  assign rd2 = (32'(ra2) < NUM_GPR_P) ? regs[ra2] : '0;

endmodule
