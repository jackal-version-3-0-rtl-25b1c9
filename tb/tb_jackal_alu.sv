// Self-checking testbench for jackal_alu: every operation on directed corner
// values and random operands, against a reference written bit by bit
// (shifts by repeated single-bit shifts, subtraction as a + ~b + 1).
module tb_jackal_alu;
  import jackal_pkg::*;

  alu_op_e    op;
  word_t      a, b, y;
  logic [7:0] imm;
  int checks = 0, failures = 0;

  jackal_alu dut (.op, .a, .b, .imm, .y);

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z, logic [7:0] im);
    word_t r;
    case (o)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x + ~z + 16'd1;
      ALU_AND:  for (int i = 0; i < 16; i++) r[i] = x[i] & z[i];
      ALU_OR:   for (int i = 0; i < 16; i++) r[i] = x[i] | z[i];
      ALU_NAND: for (int i = 0; i < 16; i++) r[i] = !(x[i] && z[i]);
      ALU_SLA: begin r = x; for (int i = 0; i < int'(im[3:0]); i++) r = {r[14:0], 1'b0}; end
      ALU_SRA: begin r = x; for (int i = 0; i < int'(im[3:0]); i++) r = {r[15], r[15:1]}; end
      ALU_LIL:  r = {z[15:8], im};
      ALU_LIH:  r = {im, z[7:0]};
      default:  r = '0;
    endcase
    return r;
  endfunction

  task automatic check(alu_op_e o, word_t x, word_t z, logic [7:0] im);
    word_t exp;
    op = o; a = x; b = z; imm = im;
    #1;
    exp = ref_alu(o, x, z, im);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h imm=%h y=%h exp=%h", o.name(), x, z, im, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed values from the instruction descriptions
    check(ALU_ADD, 16'h7FFF, 16'h0001, 8'h00);          // wraps to 8000
    check(ALU_SUB, 16'h0000, 16'h0001, 8'h00);          // FFFF
    check(ALU_AND, 16'h1234, 16'hFFFF, 8'h00);          // move via AND
    check(ALU_OR,  16'h1234, 16'h0000, 8'h00);          // move via OR
    check(ALU_NAND,16'h1234, 16'hFFFF, 8'h00);          // NOT via NAND
    check(ALU_SRA, 16'h8000, 16'h0000, 8'h0F);          // FFFF
    check(ALU_SRA, 16'h4000, 16'h0000, 8'h0E);          // 0001
    check(ALU_SLA, 16'h0001, 16'h0000, 8'h0F);          // 8000
    check(ALU_LIL, 16'h0000, 16'hABCD, 8'h56);          // AB56
    check(ALU_LIH, 16'h0000, 16'hABCD, 8'h56);          // 56CD
    for (int n = 0; n < 4000; n++) begin
      alu_op_e o;
      o = alu_op_e'($urandom_range(8, 0));
      check(o, word_t'($urandom), word_t'($urandom), 8'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
