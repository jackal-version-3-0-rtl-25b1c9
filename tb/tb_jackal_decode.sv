// Self-checking testbench for jackal_decode: every opcode with random fields,
// checked against the instruction word formats (which bits go where, which
// LD/ST and opcode values are no-ops).
module tb_jackal_decode;
  import jackal_pkg::*;

  word_t instr;
  dec_t  dec;
  int checks = 0, failures = 0;

  jackal_decode dut (.instr, .dec);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL instr=%h %s got=%0h exp=%0h", instr, what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] opc, f11, f7, f3;
      bit we, ld, st;
      opc = 4'(n % 16);
      f11 = 4'($urandom); f7 = 4'($urandom);
      f3  = (n % 5 == 0) ? 4'b0110 : (n % 5 == 1) ? 4'b1001 : 4'($urandom);
      instr = {opc, f11, f7, f3};
      #1;
      we = (opc <= 4'd6) || opc == 4'd8 || opc == 4'd9;
      ld = (opc == 4'd7) && f3 == 4'b0110;
      st = (opc == 4'd7) && f3 == 4'b1001;
      expect_eq("reg_we",    int'(dec.reg_we),    int'(we));
      expect_eq("is_load",   int'(dec.is_load),   int'(ld));
      expect_eq("is_store",  int'(dec.is_store),  int'(st));
      expect_eq("is_cmp",    int'(dec.is_cmp),    int'(opc == 4'd10));
      expect_eq("is_branch", int'(dec.is_branch), int'(opc == 4'd11));
      expect_eq("rd",   int'(dec.rd),   int'(f11));
      expect_eq("ra1",  int'(dec.ra1),  int'(f7));
      expect_eq("ra2",  int'(dec.ra2),  int'((opc == 4'd7 || opc == 4'd8 || opc == 4'd9) ? f11 : f3));
      expect_eq("mode", int'(dec.mode), int'(f11));
      expect_eq("imm",  int'(dec.imm),  int'({f7, f3}));
      if (we) begin
        alu_op_e e;
        case (opc)
          0: e = ALU_ADD; 1: e = ALU_SUB; 2: e = ALU_AND; 3: e = ALU_OR;
          4: e = ALU_NAND; 5: e = ALU_SLA; 6: e = ALU_SRA; 8: e = ALU_LIL;
          default: e = ALU_LIH;
        endcase
        expect_eq("alu_op", int'(dec.alu_op), int'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
