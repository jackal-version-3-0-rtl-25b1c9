// Self-checking testbench for jackal_memif against the controller model.
// Random writes and reads to random addresses; read data is compared with a
// shadow memory. With a fixed model latency L the port must acknowledge
// exactly L + 2 cycles after start and be ready again L + 4 cycles after
// start (request seen one edge late, L edges to done, one edge to sample
// done, then one edge each for rd to drop and done to fall). A second phase
// runs with random latency and only checks data. The counts below are
// taken at falling edges, starting at the one that presents start, so they
// read L + 3 and L + 5.
module tb_jackal_memif;
  import jackal_pkg::*;

  localparam int unsigned LAT = 3;

  logic clk = 0, rst_n = 1;
  logic start, write, ready, ack;
  word_t addr, wdata, rdata;
  logic rd, wr, done;
  word_t hAddr, hDIn, hDOut;
  logic done_r, rd_r, wr_r;
  word_t hAddr_r, hDIn_r, hDOut_r;
  logic sel_rand = 0;
  logic done_f, done_v;
  word_t hDOut_f, hDOut_v;
  int checks = 0, failures = 0;
  word_t shadow [256];

  jackal_memif dut (.clk, .rst_n, .start, .write, .addr, .wdata, .ready, .ack, .rdata,
                    .rd, .wr, .hAddr, .hDIn, .done, .hDOut);

  // two models share the bus; sel_rand picks which one answers
  sdramcntl_model #(.LATENCY(LAT), .RAND_LAT(1'b0)) u_fix (
    .clkin(clk), .rst(!rst_n), .rd(rd && !sel_rand), .wr(wr && !sel_rand),
    .done(done_f), .hAddr, .hDIn, .hDOut(hDOut_f));
  sdramcntl_model #(.LATENCY(5), .RAND_LAT(1'b1)) u_rnd (
    .clkin(clk), .rst(!rst_n), .rd(rd && sel_rand), .wr(wr && sel_rand),
    .done(done_v), .hAddr, .hDIn, .hDOut(hDOut_v));
  assign done  = sel_rand ? done_v  : done_f;
  assign hDOut = sel_rand ? hDOut_v : hDOut_f;

  always #5 clk = ~clk;

  task automatic access(bit w, word_t ad, word_t wd, bit timed);
    int c_ack, c_rdy;
    @(negedge clk);
    while (!ready) @(negedge clk);
    start = 1; write = w; addr = ad; wdata = wd;
    @(negedge clk);
    start = 0; addr = 'x; wdata = 'x;
    c_ack = 1;
    while (!ack) begin @(negedge clk); c_ack++; end
    if (!w) begin
      checks++;
      if (rdata !== shadow[ad[7:0]]) begin
        failures++; $display("FAIL read %h got %h exp %h", ad, rdata, shadow[ad[7:0]]);
      end
    end else shadow[ad[7:0]] = wd;
    c_rdy = c_ack;
    while (!ready) begin @(negedge clk); c_rdy++; end
    if (timed) begin
      checks += 2;
      if (c_ack != LAT + 3) begin failures++; $display("FAIL ack after %0d cycles", c_ack); end
      if (c_rdy != LAT + 5) begin failures++; $display("FAIL ready after %0d cycles", c_rdy); end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; write = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    #2 rst_n = 0;
    #20 rst_n = 1;
    // both models start from zeroed memory; write through each before reading
    for (int n = 0; n < 600; n++) begin
      word_t ad;
      ad = {8'hA5, 8'($urandom)};
      access((n < 40) || $urandom_range(1, 0) == 1, ad, word_t'($urandom), 1'b1);
    end
    sel_rand = 1;
    for (int i = 0; i < 256; i++) access(1'b1, {8'hA5, 8'(i)}, shadow[i], 1'b0);
    for (int n = 0; n < 600; n++) begin
      word_t ad;
      ad = {8'hA5, 8'($urandom)};
      access($urandom_range(1, 0) == 1, ad, word_t'($urandom), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
