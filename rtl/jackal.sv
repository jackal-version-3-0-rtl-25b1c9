// Jackal 16-bit RISC core.
//
// Executes the twelve defined Jackal instructions (ADD, SUB, AND, OR, NAND,
// SLA, SRA, LD, ST, LIL, LIH, CMP and the BRN/BRZ/BRP/JMP branch group) out
// of a word-addressed 64K x 16 memory reached through the host side of the
// board's SDRAM controller (rd, wr, done, hAddr, hDIn, hDOut). Instructions
// run one at a time: fetch, execute, and for LD/ST a second memory access.
//
// Datapath: PC and instruction register (here), decoder, 12-entry register
// file, ALU, condition registers and next-PC logic. The instruction set
// fixes the encodings, the operations, the active-low reset that clears
// the PC and registers, and the branch rule PC = PC + 1 + offset. The
// multi-cycle organisation, the sign-extended branch offset, U0-U3 reading
// as zero and opcodes 1100-1111 acting as no-ops are this design's choices.
//
// Ports: clock, reset (active low, asynchronous assert), the controller's
// host-side signals, retire (one-cycle pulse per completed instruction)
// and the current pc. The board-level pins of the original core (SDRAM
// pins and seven-segment outputs) belong to the SDRAM controller and to
// display logic that is not part of the instruction set.
module jackal
  import jackal_pkg::*;
(
  input  logic  clock,
  input  logic  reset,
  output logic  rd,
  output logic  wr,
  input  logic  done,
  output word_t hAddr,
  output word_t hDIn,
  input  word_t hDOut,
  output logic  retire,
  output word_t pc
);

  logic rst_n;
  assign rst_n = reset;

  word_t ir;
  dec_t  dec;
  word_t rd1, rd2, alu_y, next_pc;
  logic  crn, crz, crp;

  logic  mem_start, mem_write, mem_ready, mem_ack, addr_sel_data;
  logic  ir_load, exec, load_wb;
  word_t mem_rdata;

  logic  rf_we;
  word_t rf_wd;

  jackal_ctrl u_ctrl (
    .clk(clock), .rst_n,
    .is_load(dec.is_load), .is_store(dec.is_store),
    .mem_ready, .mem_ack,
    .mem_start, .mem_write, .addr_sel_data,
    .ir_load, .exec, .load_wb, .retire
  );

  jackal_memif u_mem (
    .clk(clock), .rst_n,
    .start(mem_start), .write(mem_write),
    .addr(addr_sel_data ? rd1 : pc), .wdata(rd2),
    .ready(mem_ready), .ack(mem_ack), .rdata(mem_rdata),
    .rd, .wr, .hAddr, .hDIn, .done, .hDOut
  );

  jackal_decode u_dec (.instr(ir), .dec);

  jackal_regfile u_rf (
    .clk(clock), .rst_n,
    .ra1(dec.ra1), .rd1,
    .ra2(dec.ra2), .rd2,
    .we(rf_we), .wa(dec.rd), .wd(rf_wd)
  );

  jackal_alu u_alu (.op(dec.alu_op), .a(rd1), .b(rd2), .imm(dec.imm), .y(alu_y));

  jackal_cond u_cond (
    .clk(clock), .rst_n, .we(exec && dec.is_cmp),
    .a(rd1), .b(rd2), .crn, .crz, .crp
  );

  jackal_branch u_br (
    .pc, .is_branch(dec.is_branch), .mode(dec.mode), .offset(dec.imm),
    .crn, .crz, .crp, .next_pc
  );

  assign rf_we = (exec && dec.reg_we) || load_wb;
  assign rf_wd = load_wb ? mem_rdata : alu_y;

  always_ff @(posedge clock or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0;
      ir <= '0;
    end else begin
      if (ir_load) ir <= mem_rdata;
      if (retire)  pc <= next_pc;
    end
  end

endmodule
