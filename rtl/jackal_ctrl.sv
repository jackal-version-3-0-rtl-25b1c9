// Jackal control sequencer.
//
// The instruction set fixes what each instruction does but not how the core
// is organised; this design executes one instruction at a time (no
// pipeline) with a small state machine:
//
//   FETCH  wait for the memory port, start a read at PC
//   FWAIT  wait for ack, load the instruction register
//   EXEC   decoded instruction is stable; a non-memory instruction
//          completes here (register, flag and PC updates, retire)
//   MEM    LD/ST: wait for the memory port, start the data access at
//          the address register (write for ST)
//   MWAIT  wait for ack; LD writes the loaded word; PC advances; retire
//
// Outputs are decoded from the state, so each strobe is high for exactly one
// cycle per instruction. A non-memory instruction takes 3 states plus the
// fetch latency; LD/ST add a second memory access.
module jackal_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic is_load,
  input  logic is_store,
  input  logic mem_ready,
  input  logic mem_ack,
  output logic mem_start,
  output logic mem_write,
  output logic addr_sel_data,
  output logic ir_load,
  output logic exec,
  output logic load_wb,
  output logic retire
);

  typedef enum logic [2:0] {S_FETCH, S_FWAIT, S_EXEC, S_MEM, S_MWAIT} state_e;
  state_e state, state_n;

  logic is_mem, mem_done;
  assign is_mem = is_load || is_store;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S_FETCH;
    else        state <= state_n;
  end

  always_comb begin
    state_n = state;
    unique case (state)
      S_FETCH: if (mem_ready) state_n = S_FWAIT;
      S_FWAIT: if (mem_ack)   state_n = S_EXEC;
      S_EXEC:  state_n = is_mem ? S_MEM : S_FETCH;
      S_MEM:   if (mem_ready) state_n = S_MWAIT;
      S_MWAIT: if (mem_ack)   state_n = S_FETCH;
      default: state_n = S_FETCH;
    endcase
  end

  assign mem_start     = (state == S_FETCH || state == S_MEM) && mem_ready;
  assign addr_sel_data = (state == S_MEM);
  assign mem_write     = (state == S_MEM) && is_store;
  assign ir_load       = (state == S_FWAIT) && mem_ack;
  assign exec          = (state == S_EXEC) && !is_mem;
  assign mem_done      = (state == S_MWAIT) && mem_ack;
  assign load_wb       = mem_done && is_load;
  assign retire        = exec || mem_done;

endmodule
