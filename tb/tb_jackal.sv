// End-to-end testbench for the Jackal core at its default configuration,
// running against the SDRAM-controller model (random 1..3 cycle latency).
//
// Phase 1 runs a directed program: it stores the numbers 10..1 to memory in
// a counted loop (ST, ADD, SUB, CMP, BRP), sums them back (LD, BRZ, JMP),
// then exercises SLA, SRA, NAND, AND, OR, LIL/LIH and ends in a JMP to
// itself. Results are checked against values worked out by hand.
//
// Phase 2 runs random instruction streams in lock step with an instruction
// set model written here from the instruction definitions: after every
// retired instruction the PC, all registers and the three condition flags
// must agree, and at the end of each stream the whole 64K-word memory must.
//
// Mechanisms counted (each must occur): every opcode, LD, ST, LD/ST no-op
// modes, undefined opcodes, taken and not-taken BRN/BRZ/BRP, JMP, branch
// no-op modes, U-operand accesses and memory wait cycles.
module tb_jackal;
  import jackal_pkg::*;

  logic  clock = 0, reset = 1;
  logic  rd, wr, done, retire;
  word_t hAddr, hDIn, hDOut, pc;
  int checks = 0, failures = 0;

  jackal dut (.clock, .reset, .rd, .wr, .done, .hAddr, .hDIn, .hDOut, .retire, .pc);

  sdramcntl_model #(.LATENCY(3), .RAND_LAT(1'b1)) u_mem (
    .clkin(clock), .rst(!reset), .rd, .wr, .done, .hAddr, .hDIn, .hDOut);

  always #5 clock = ~clock;

  // ---------------- assembler helpers ----------------
  function automatic word_t rrr(logic [3:0] op, int d, int a, int b);
    return {op, 4'(d), 4'(a), 4'(b)};
  endfunction
  function automatic word_t lil(int d, logic [7:0] imm); return {4'b1000, 4'(d), 8'(imm)}; endfunction
  function automatic word_t lih(int d, logic [7:0] imm); return {4'b1001, 4'(d), 8'(imm)}; endfunction
  function automatic word_t ld (int d, int a);   return {4'b0111, 4'(d), 4'(a), 4'b0110}; endfunction
  function automatic word_t st (int s, int a);   return {4'b0111, 4'(s), 4'(a), 4'b1001}; endfunction
  function automatic word_t cmp(int a, int b);   return {4'b1010, 4'b0000, 4'(a), 4'(b)}; endfunction
  function automatic word_t br (int mode, int off); return {4'b1011, 4'(mode), 8'(off)}; endfunction

  // ---------------- instruction set model ----------------
  word_t m_r [12];
  word_t m_pc;
  logic  m_n, m_z, m_p;
  word_t m_mem [65536];

  function automatic word_t m_get(logic [3:0] i); return (i < 12) ? m_r[i] : 16'h0000; endfunction
  function automatic void m_set(logic [3:0] i, word_t v); if (i < 12) m_r[i] = v; endfunction

  // mechanism counters
  int n_op [16];
  int n_ld, n_st, n_ldst_nop, n_br_taken [4], n_br_not [4], n_br_nop, n_uop, n_wait;

  function automatic void m_step();
    word_t ins, a, b, r;
    logic [3:0] op, c, s1, s2;
    int sa, sb, off;
    ins = m_mem[m_pc];
    op = ins[15:12]; c = ins[11:8]; s1 = ins[7:4]; s2 = ins[3:0];
    a = m_get(s1); b = m_get(s2);
    n_op[op]++;
    if (op <= 4'd10 && (s1 >= 12 || (op <= 4 || op == 10) && s2 >= 12)) n_uop++;
    m_pc = m_pc + 16'd1;
    case (op)
      4'd0: m_set(c, a + b);
      4'd1: m_set(c, a - b);
      4'd2: m_set(c, a & b);
      4'd3: m_set(c, a | b);
      4'd4: m_set(c, ~(a & b));
      4'd5: begin r = a; repeat (int'(s2)) r = r * 16'd2; m_set(c, r); end
      4'd6: begin sa = int'($signed(a)); m_set(c, 16'(sa >>> s2)); end
      4'd7: begin
        if (s2 == 4'b0110) begin m_set(c, m_mem[a]); n_ld++; end
        else if (s2 == 4'b1001) begin m_mem[a] = m_get(c); n_st++; end
        else n_ldst_nop++;
      end
      4'd8: begin r = m_get(c); m_set(c, {r[15:8], ins[7:0]}); end
      4'd9: begin r = m_get(c); m_set(c, {ins[7:0], r[7:0]}); end
      4'd10: begin
        sa = int'($signed(a)); sb = int'($signed(b));
        m_n = sa < sb; m_z = sa == sb; m_p = sa > sb;
      end
      4'd11: begin
        bit t;
        off = int'($signed(ins[7:0]));
        case (c)
          4'd6: t = m_n; 4'd7: t = m_z; 4'd8: t = m_p; 4'd9: t = 1;
          default: t = 0;
        endcase
        if (c >= 6 && c <= 9) begin
          if (t) n_br_taken[c-6]++; else n_br_not[c-6]++;
        end else n_br_nop++;
        if (t) m_pc = 16'(int'(m_pc) + off);
      end
      default: ;
    endcase
  endfunction

  always @(posedge clock) if (reset && (rd || wr) && !done) n_wait++;

  // ---------------- helpers ----------------
  task automatic do_reset();
    @(negedge clock); reset = 0;
    repeat (3) @(negedge clock);
    reset = 1;
  endtask

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  task automatic compare_state(int step);
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (dut.u_rf.regs[i] !== m_r[i]) begin
        failures++;
        $display("FAIL step %0d R%0d got %h exp %h", step, i, dut.u_rf.regs[i], m_r[i]);
      end
    end
    checks++;
    if (pc !== m_pc || {dut.u_cond.crn, dut.u_cond.crz, dut.u_cond.crp} !== {m_n, m_z, m_p}) begin
      failures++;
      $display("FAIL step %0d pc %h/%h flags %b%b%b/%b%b%b", step, pc, m_pc,
               dut.u_cond.crn, dut.u_cond.crz, dut.u_cond.crp, m_n, m_z, m_p);
    end
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test ----------------
  word_t prog [$];
  int    cyc;

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    foreach (n_br_taken[i]) begin n_br_taken[i] = 0; n_br_not[i] = 0; end
    n_ld = 0; n_st = 0; n_ldst_nop = 0; n_br_nop = 0; n_uop = 0; n_wait = 0;

    // ===== phase 1: directed program =====
    prog = '{
      lil(1, 1),                 // 0  R1 = 1
      lil(2, 8'h00),             // 1
      lih(2, 8'h01),             // 2  R2 = 0x0100
      lil(3, 10),                // 3  R3 = 10
      st(3, 2),                  // 4  loop1: MEM[R2] = R3
      rrr(4'b0000, 2, 2, 1),     // 5  R2++
      rrr(4'b0001, 3, 3, 1),     // 6  R3--
      cmp(3, 0),                 // 7
      br(8, -5),                 // 8  BRP loop1 (to 4)
      lil(2, 8'h00),             // 9  R2 = 0x0100 (high byte still 01)
      lil(3, 10),                // 10
      ld(5, 2),                  // 11 loop2: R5 = MEM[R2]
      rrr(4'b0000, 4, 4, 5),     // 12 R4 += R5
      rrr(4'b0000, 2, 2, 1),     // 13
      rrr(4'b0001, 3, 3, 1),     // 14
      cmp(3, 0),                 // 15
      br(7, 1),                  // 16 BRZ to 18
      br(9, -7),                 // 17 JMP loop2 (to 11)
      rrr(4'b0101, 6, 4, 2),     // 18 R6 = R4 SLA 2 = 220
      lih(8, 8'h80),             // 19 R8 = 0x8000
      rrr(4'b0110, 9, 8, 3),     // 20 R9 = R8 SRA 3 = 0xF000
      rrr(4'b0100, 10, 4, 4),    // 21 R10 = NAND(R4,R4) = ~55
      lil(11, 8'hFF),            // 22
      lih(11, 8'hFF),            // 23 R11 = 0xFFFF
      rrr(4'b0010, 7, 6, 11),    // 24 R7 = R6 AND FFFF (move)
      rrr(4'b0011, 7, 7, 9),     // 25 R7 = R7 OR R9 = 0xF0DC
      lil(0, 8'h00),             // 26
      lih(0, 8'h02),             // 27 R0 = 0x0200
      st(6, 0),                  // 28 MEM[0x200] = R6
      cmp(8, 1),                 // 29 0x8000 < 1 -> CRN
      br(6, 1),                  // 30 BRN over the next
      lil(1, 8'h77),             // 31 skipped
      br(9, -1)                  // 32 halt: JMP to itself
    };
    foreach (prog[i]) begin u_mem.mem[i] = prog[i]; end
    do_reset();
    cyc = 0;
    while (!(retire && pc == 16'd32 && dut.ir == br(9, -1)) && cyc < 20000) begin
      @(posedge clock); cyc++;
    end
    repeat (40) @(posedge clock);
    chk("phase1 halted at 32", pc, 32);
    for (int i = 0; i < 10; i++) chk($sformatf("MEM[%h]", 16'h100 + i), u_mem.mem[16'h100 + i], 10 - i);
    chk("sum R4", dut.u_rf.regs[4], 55);
    chk("R5 last loaded", dut.u_rf.regs[5], 1);
    chk("R6 SLA", dut.u_rf.regs[6], 220);
    chk("R9 SRA", dut.u_rf.regs[9], 16'hF000);
    chk("R10 NAND", dut.u_rf.regs[10], 16'hFFC8);
    chk("R7 AND/OR", dut.u_rf.regs[7], 16'hF0DC);
    chk("R1 not overwritten (BRN taken)", dut.u_rf.regs[1], 1);
    chk("MEM[0x200]", u_mem.mem[16'h200], 220);
    chk("flags after CMP 0x8000,1", {dut.u_cond.crn, dut.u_cond.crz, dut.u_cond.crp}, 3'b100);

    // ===== phase 2: random streams in lock step with the model =====
    for (int run = 0; run < 40; run++) begin
      for (int i = 0; i < 65536; i++) u_mem.mem[i] = '0;
      for (int i = 0; i < 512; i++) begin
        word_t w;
        w = word_t'($urandom);
        if (w[15:12] == 4'd7 && $urandom_range(3, 0) != 0) w[3:0] = $urandom_range(1, 0) ? 4'b0110 : 4'b1001;
        if (w[15:12] == 4'd11) begin
          if ($urandom_range(7, 0) != 0) w[11:8] = 4'($urandom_range(9, 6));
          w[7:0] = 8'($signed(6'($urandom)));   // mostly short branches
        end
        if (w[15:12] >= 4'd12 && $urandom_range(1, 0) != 0) w[15:12] = 4'($urandom_range(11, 0));
        u_mem.mem[i] = w;
      end
      // registers get random values through a short LIL/LIH prologue
      for (int r = 0; r < 12; r++) begin
        u_mem.mem[2*r]     = lil(r, $urandom);
        u_mem.mem[2*r + 1] = lih(r, (r < 4) ? 8'h00 : 8'($urandom));
      end
      for (int i = 0; i < 65536; i++) m_mem[i] = u_mem.mem[i];
      for (int i = 0; i < 12; i++) m_r[i] = '0;
      m_pc = '0; m_n = 0; m_z = 0; m_p = 0;
      do_reset();
      for (int step = 0; step < 4000; step++) begin
        @(posedge clock iff retire);
        m_step();
        #1;
        compare_state(step);
      end
      // let a final store drain, then compare all of memory
      repeat (20) @(posedge clock);
      begin
        int bad;
        bad = 0;
        for (int i = 0; i < 65536; i++) if (u_mem.mem[i] !== m_mem[i]) bad++;
        checks++;
        if (bad != 0) begin failures++; $display("FAIL run %0d: %0d memory words differ", run, bad); end
      end
    end

    // ===== mechanisms =====
    for (int i = 0; i < 16; i++) chk($sformatf("opcode %b executed", 4'(i)), int'(n_op[i] > 0), 1);
    chk("LD executed",  int'(n_ld > 0), 1);
    chk("ST executed",  int'(n_st > 0), 1);
    chk("LD/ST no-op mode", int'(n_ldst_nop > 0), 1);
    for (int i = 0; i < 4; i++) begin
      chk($sformatf("branch mode %0d taken", i + 6), int'(n_br_taken[i] > 0), 1);
      if (i < 3) chk($sformatf("branch mode %0d not taken", i + 6), int'(n_br_not[i] > 0), 1);
    end
    chk("branch no-op mode", int'(n_br_nop > 0), 1);
    chk("U operand read", int'(n_uop > 0), 1);
    chk("memory wait cycles", int'(n_wait > 0), 1);
    $display("mechanisms: ops=%p ld=%0d st=%0d ldst_nop=%0d br_taken=%p br_not=%p br_nop=%0d uop=%0d wait_cycles=%0d",
             n_op, n_ld, n_st, n_ldst_nop, n_br_taken, n_br_not, n_br_nop, n_uop, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
