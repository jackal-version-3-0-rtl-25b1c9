// Self-checking testbench for jackal_regfile: reset clears R0-R11, random
// writes and reads against a shadow array, U0-U3 read as zero and ignore
// writes, a read in the cycle of a write returns the old value.
module tb_jackal_regfile;
  import jackal_pkg::*;

  logic clk = 0, rst_n = 1;
  reg_idx_t ra1, ra2, wa;
  word_t rd1, rd2, wd;
  logic we;
  word_t shadow [16];
  int checks = 0, failures = 0;

  jackal_regfile dut (.clk, .rst_n, .ra1, .rd1, .ra2, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  task automatic chk(reg_idx_t a, word_t got);
    checks++;
    if (got !== shadow[a]) begin
      failures++;
      $display("FAIL reg %0d got %h exp %h", a, got, shadow[a]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    #2 rst_n = 0;
    #10 rst_n = 1;
    for (int i = 0; i < 16; i++) begin ra1 = 4'(i); ra2 = 4'(15 - i); #1; chk(ra1, rd1); chk(ra2, rd2); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we = 1'($urandom); wa = 4'($urandom); wd = word_t'($urandom);
      ra1 = (n % 3 == 0) ? wa : 4'($urandom); ra2 = 4'($urandom);
      #1; chk(ra1, rd1); chk(ra2, rd2);  // old value before the edge
      @(posedge clk); #1;
      if (we && wa < 12) shadow[wa] = wd;
      chk(ra1, rd1); chk(ra2, rd2);
    end
    // reset clears everything
    @(negedge clk); we = 0; rst_n = 0; #1; rst_n = 1;
    for (int i = 0; i < 16; i++) shadow[i] = '0;
    for (int i = 0; i < 16; i++) begin ra1 = 4'(i); #1; chk(ra1, rd1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
