// fft_pair_reg: the pipeline register of a stage.
//
// It holds the two values a butterfly produces (upper and lower output, each
// with its flow-graph row and mode tag) and a valid bit. When en is high it
// loads d and d_valid; when en is low it holds, which is how a stage stalls
// while the next one cannot accept. Reset clears the valid bit and the data.
//
// The two registers of each stage, after the add & subtract and after the
// twiddle multiplier, are the published architecture's; the load enable and valid bit that
// implement the stall are this design's.
//
// Interface: clk, rst_n (active-low, synchronous), en, d_valid, d[2] in;
// q_valid, q[2] out. Timing: one clock of latency.
module fft_pair_reg
  import fft_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic    d_valid,
  input  sample_t d [2],
  output logic    q_valid,
  output sample_t q [2]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid <= 1'b0;
      q[0]    <= '0;
      q[1]    <= '0;
    end else if (en) begin
      q_valid <= d_valid;
      q[0]    <= d[0];
      q[1]    <= d[1];
    end
  end

endmodule
