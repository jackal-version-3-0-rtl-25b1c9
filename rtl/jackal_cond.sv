// Jackal condition registers CRN, CRZ, CRP.
//
// When CMP executes (we = 1) the two source registers are compared as
// two's complement numbers and exactly one of the three flags is set:
// CRN when source one < source two, CRZ when equal, CRP when greater.
// The difference is taken with one extra bit, so the sign is that of the
// true difference and a 16-bit overflow cannot flip it (this design's
// reading of "(SOURCE ONE - SOURCE TWO) < 0"). The flags hold their value
// until the next CMP and clear on the active-low reset.
module jackal_cond
  import jackal_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  word_t a,
  input  word_t b,
  output logic  crn,
  output logic  crz,
  output logic  crp
);

  logic signed [DATA_W:0] diff;
  assign diff = {a[DATA_W-1], a} - {b[DATA_W-1], b};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crn <= 1'b0;
      crz <= 1'b0;
      crp <= 1'b0;
    end else if (we) begin
      crn <= diff < 0;
      crz <= diff == 0;
      crp <= diff > 0;
    end
  end

endmodule
