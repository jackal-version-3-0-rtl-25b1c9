// Jackal memory port: host-side master of the SDRAM controller.
//
// The controller's host side has rd, wr, done, a 16-bit word address hAddr,
// write data hDIn and read data hDOut. As in its timing diagrams, the master
// raises rd (or wr) with hAddr (and hDIn) and holds them until the
// controller answers with done; read data is valid on hDOut while done is
// high. This port then drops rd/wr and waits for done to fall before it
// accepts the next access, so one access can never be acknowledged by the
// done of the previous one (a four-phase handshake: the exact number of
// cycles done stays high is not relied on).
//
// Core side: pulse start (with write, addr, wdata) while ready is high. The
// port registers them, so they need not be held. ack pulses for one cycle
// one clock after done is sampled high; rdata holds the captured read data
// from then until the next read completes.
//
// Timing: an access occupies the port for (cycles until done) + 1 cycles,
// plus the cycles done takes to fall.
//
// The handshake rules are checked by assertions at the end. Their
// "disable iff (!rst_n)" makes Verilator's lint report rst_n as used both
// synchronously and asynchronously; the synthesized logic uses it only as
// the asynchronous reset.
module jackal_memif
  import jackal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  // core side
  input  logic  start,
  input  logic  write,
  input  word_t addr,
  input  word_t wdata,
  output logic  ready,
  output logic  ack,
  output word_t rdata,
  // controller host side
  output logic  rd,
  output logic  wr,
  output word_t hAddr,
  output word_t hDIn,
  input  logic  done,
  input  word_t hDOut
);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_RELEASE} state_e;
  state_e state;
  logic   write_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      write_q <= 1'b0;
      hAddr   <= '0;
      hDIn    <= '0;
      rdata   <= '0;
      ack     <= 1'b0;
    end else begin
      ack <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_BUSY;
          write_q <= write;
          hAddr   <= addr;
          hDIn    <= wdata;
        end
        S_BUSY: if (done) begin
          state <= S_RELEASE;
          ack   <= 1'b1;
          if (!write_q) rdata <= hDOut;
        end
        S_RELEASE: if (!done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready = (state == S_IDLE);
  assign rd    = (state == S_BUSY) && !write_q;
  assign wr    = (state == S_BUSY) &&  write_q;

  // Handshake rules
  a_one_request: assert property (@(posedge clk) disable iff (!rst_n) !(rd && wr));
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  (rd || wr) && !done |=> $stable(hAddr) && $stable(hDIn));
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n) start |-> ready);

endmodule
