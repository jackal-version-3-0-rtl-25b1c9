// Self-checking testbench for jackal_ctrl. A small memory-port stand-in
// answers each start with ack after a random delay and stays not-ready for a
// random time after. The testbench steps random instruction classes (ALU,
// LD, ST) and checks the order and count of the strobes: one fetch start,
// one ir_load, then exec for non-memory instructions, or a second start (with
// mem_write for ST, address from data register) and load_wb for LD; retire
// exactly once per instruction; no start while not ready.
module tb_jackal_ctrl;
  logic clk = 0, rst_n = 1;
  logic is_load, is_store, mem_ready, mem_ack;
  logic mem_start, mem_write, addr_sel_data, ir_load, exec, load_wb, retire;
  int checks = 0, failures = 0;
  int busy_cnt, ack_at;

  jackal_ctrl dut (.clk, .rst_n, .is_load, .is_store, .mem_ready, .mem_ack,
                   .mem_start, .mem_write, .addr_sel_data, .ir_load, .exec, .load_wb, .retire);

  always #5 clk = ~clk;

  // memory-port stand-in
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin busy_cnt <= 0; ack_at <= 0; mem_ack <= 0; end
    else begin
      mem_ack <= 1'b0;
      if (mem_start) begin
        busy_cnt <= $urandom_range(6, 3);
        ack_at   <= 2;
      end else if (busy_cnt > 0) begin
        busy_cnt <= busy_cnt - 1;
        if (ack_at > 0) begin
          ack_at <= ack_at - 1;
          if (ack_at == 1) mem_ack <= 1'b1;
        end
      end
    end
  end
  assign mem_ready = (busy_cnt == 0);

  // record strobes
  typedef enum {E_FETCH, E_DATA_RD, E_DATA_WR, E_IR, E_EXEC, E_LWB, E_RET} ev_e;
  ev_e evs[$];
  always @(posedge clk) if (rst_n) begin
    if (mem_start && !mem_ready) begin failures++; $display("FAIL start while busy"); end
    if (mem_start && !addr_sel_data) evs.push_back(E_FETCH);
    if (mem_start && addr_sel_data) evs.push_back(mem_write ? E_DATA_WR : E_DATA_RD);
    if (ir_load) evs.push_back(E_IR);
    if (exec)    evs.push_back(E_EXEC);
    if (load_wb) evs.push_back(E_LWB);
    if (retire)  evs.push_back(E_RET);
  end

  task automatic expect_seq(ev_e exp[$]);
    checks++;
    if (evs != exp) begin
      failures++;
      $display("FAIL sequence: got %p exp %p", evs, exp);
    end
    evs.delete();
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    is_load = 0; is_store = 0;
    #2 rst_n = 0;
    #20 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int kind;
      kind = $urandom_range(2, 0);
      // class is presented after the fetch, as the decoder would
      @(posedge clk iff ir_load);
      @(negedge clk);
      is_load = (kind == 1); is_store = (kind == 2);
      @(posedge clk iff retire);
      #1;
      if (kind == 0) expect_seq('{E_FETCH, E_IR, E_EXEC, E_RET});
      else if (kind == 1) expect_seq('{E_FETCH, E_IR, E_DATA_RD, E_LWB, E_RET});
      else expect_seq('{E_FETCH, E_IR, E_DATA_WR, E_RET});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
