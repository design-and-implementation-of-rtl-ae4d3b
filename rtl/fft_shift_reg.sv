// fft_shift_reg: operand shift register of one FFT stage.
//
// A stage with butterfly span H first receives the H upper operands of a
// butterfly group, which wait here, and then their H partners in the same
// order. The register is a plain shift chain of DEPTH = H words: a push
// shifts one word (push_two = 0) or two words (push_two = 1; d[0] is the
// older) in at the head, sr[0]; a pop reads the tail, sr[DEPTH-1], and shifts
// the chain one place towards it. Because a whole half-group is pushed before
// the first pop, the tail always holds the oldest waiting operand.
//
// The published architecture places a shift register at the head of each stage and feeds
// it the sequential data. Its use as the store for waiting upper operands, and
// its depth of H words, are this design's reading.
//
// count tells how many words wait. Pushing and popping in the same cycle,
// pushing into a full register and popping an empty one are protocol errors
// and are asserted against.
//
// Interface: clk, rst_n (synchronous, active low), push, push_two, d[2], pop
// in; tail, count out. Timing: tail is valid in the cycle of the pop; push
// and pop take effect at the clock edge.
module fft_shift_reg
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  logic    push_two,
  input  sample_t d [2],
  input  logic    pop,
  output sample_t tail,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned CW = $clog2(DEPTH + 1);

  sample_t sr [DEPTH];

  assign tail = sr[DEPTH-1];

  always_ff @(posedge clk) begin
    if (!rst_n)                count <= '0;
    else if (push && push_two) count <= count + CW'(2);
    else if (push)             count <= count + CW'(1);
    else if (pop)              count <= count - CW'(1);
  end

  if (DEPTH == 1) begin : g_one
    // A single word: only single pushes are meaningful; a pop just frees it.
    always_ff @(posedge clk) begin
      if (!rst_n)    sr[0] <= '0;
      else if (push) sr[0] <= d[0];
    end
    a_single_push_only: assert property (@(posedge clk) disable iff (!rst_n)
      !(push && push_two));
  end else begin : g_chain
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else if (push && push_two) begin
        for (int i = DEPTH - 1; i >= 2; i--) sr[i] <= sr[i-2];
        sr[1] <= d[0];
        sr[0] <= d[1];
      end else if (push || pop) begin
        for (int i = DEPTH - 1; i >= 1; i--) sr[i] <= sr[i-1];
        if (push) sr[0] <= d[0];
      end
    end
  end

  a_no_push_pop: assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> (int'(count) + (push_two ? 2 : 1) <= DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    pop |-> count != 0);

endmodule
