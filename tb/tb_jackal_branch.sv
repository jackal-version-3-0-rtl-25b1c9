// Self-checking testbench for jackal_branch: every mode value with every
// flag combination and random PC/offset, against PC+1+offset (offset sign
// extended) for JMP and for BRN/BRZ/BRP with their flag set, PC+1 otherwise.
module tb_jackal_branch;
  import jackal_pkg::*;

  word_t pc, next_pc;
  logic is_branch, crn, crz, crp;
  logic [3:0] mode;
  logic [7:0] offset;
  int checks = 0, failures = 0;

  jackal_branch dut (.pc, .is_branch, .mode, .offset, .crn, .crz, .crp, .next_pc);

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed: JMP -1 is a self loop; wrap at the top of memory
    pc = 16'h0010; is_branch = 1; mode = 4'b1001; offset = 8'hFF; {crn, crz, crp} = 0; #1;
    checks++; if (next_pc !== 16'h0010) begin failures++; $display("FAIL self loop %h", next_pc); end
    pc = 16'hFFFF; offset = 8'h05; #1;
    checks++; if (next_pc !== 16'h0005) begin failures++; $display("FAIL wrap %h", next_pc); end
    for (int n = 0; n < 5000; n++) begin
      int target, expv;
      bit tk;
      pc = word_t'($urandom); is_branch = 1'($urandom_range(7, 0) != 0);
      mode = 4'($urandom); offset = 8'($urandom);
      {crn, crz, crp} = 3'($urandom);
      #1;
      tk = is_branch && ((mode == 9) || (mode == 6 && crn) || (mode == 7 && crz) || (mode == 8 && crp));
      target = int'(pc) + 1 + int'($signed(offset));
      expv = tk ? (target & 16'hFFFF) : ((int'(pc) + 1) & 16'hFFFF);
      checks++;
      if (int'(next_pc) != expv) begin
        failures++;
        $display("FAIL pc=%h br=%b mode=%b off=%h flags=%b%b%b got %h exp %h",
                 pc, is_branch, mode, offset, crn, crz, crp, next_pc, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
