// Behavioural model of the host side of the SDRAM controller, with a
// 64K x 16 word memory behind it. Not synthesizable logic of the core: it
// stands in for the controller and the board SDRAM in simulation.
//
// Protocol, as in the controller's timing diagrams: the host raises rd (or
// wr) with hAddr (and hDIn) and holds them. LATENCY clock edges after the
// request is first seen, the model performs the access and raises done;
// read data is driven on hDOut while done is high. done stays high until the
// host drops rd/wr, and falls at the next edge after that. With RAND_LAT
// set, each access instead waits a random 1..LATENCY edges. rst is active
// high and only clears the handshake, not the memory.
module sdramcntl_model #(
  parameter int unsigned LATENCY  = 2,
  parameter bit          RAND_LAT = 1'b0
) (
  input  logic        clkin,
  input  logic        rst,
  input  logic        rd,
  input  logic        wr,
  output logic        done,
  input  logic [15:0] hAddr,
  input  logic [15:0] hDIn,
  output logic [15:0] hDOut
);

  logic [15:0] mem [65536];
  int unsigned wait_cnt;
  bit          busy;
  int unsigned n_reads, n_writes;

  initial begin
    for (int i = 0; i < 65536; i++) mem[i] = '0;
  end

  always_ff @(posedge clkin or posedge rst) begin
    if (rst) begin
      done     <= 1'b0;
      hDOut    <= '0;
      busy     <= 1'b0;
      wait_cnt <= 0;
      n_reads  <= 0;
      n_writes <= 0;
    end else if (done) begin
      if (!rd && !wr) begin
        done <= 1'b0;
        busy <= 1'b0;
      end
    end else if (rd || wr) begin
      if (!busy) begin
        busy     <= 1'b1;
        wait_cnt <= RAND_LAT ? ($urandom_range(LATENCY, 1) - 1) : LATENCY - 1;
      end
      if (busy && wait_cnt != 0) wait_cnt <= wait_cnt - 1;
      if (busy && wait_cnt == 0) begin
        done <= 1'b1;
        if (rd) begin
          hDOut   <= mem[hAddr];
          n_reads <= n_reads + 1;
        end else begin
          mem[hAddr] <= hDIn;
          n_writes   <= n_writes + 1;
        end
      end
    end
  end

endmodule
