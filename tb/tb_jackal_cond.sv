// Self-checking testbench for jackal_cond: CMP of random and corner operand
// pairs (including pairs whose 16-bit difference overflows) sets exactly one
// of CRN/CRZ/CRP by the signed comparison; flags hold when we is low and
// clear on reset.
module tb_jackal_cond;
  import jackal_pkg::*;

  logic clk = 0, rst_n = 1, we;
  word_t a, b;
  logic crn, crz, crp;
  logic en, ez, ep;
  int checks = 0, failures = 0;

  jackal_cond dut (.clk, .rst_n, .we, .a, .b, .crn, .crz, .crp);

  always #5 clk = ~clk;

  task automatic chk();
    checks++;
    if ({crn, crz, crp} !== {en, ez, ep}) begin
      failures++;
      $display("FAIL a=%h b=%h got %b%b%b exp %b%b%b", a, b, crn, crz, crp, en, ez, ep);
    end
  endtask

  task automatic cmp(word_t x, word_t y, bit w);
    @(negedge clk); a = x; b = y; we = w;
    @(posedge clk); #1;
    if (w) begin
      en = $signed(x) < $signed(y);
      ez = x == y;
      ep = $signed(x) > $signed(y);
    end
    chk();
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; a = 0; b = 0; {en, ez, ep} = 3'b000;
    #2 rst_n = 0;
    #1; chk();
    #9 rst_n = 1;
    cmp(16'h8000, 16'h0001, 1);  // -32768 < 1 although 16-bit difference is positive
    cmp(16'h7FFF, 16'hFFFF, 1);  // 32767 > -1 although 16-bit difference is negative
    cmp(16'h0005, 16'h0005, 1);
    cmp(16'h1234, 16'h0000, 0);  // hold
    for (int n = 0; n < 3000; n++) begin
      word_t x;
      x = word_t'($urandom);
      cmp(x, (n % 7 == 0) ? x : word_t'($urandom), 1'($urandom_range(3, 0) != 0));
    end
    @(negedge clk); rst_n = 0; #1; {en, ez, ep} = 3'b000; chk();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
