// fft_beat_fifo: small first-in first-out buffer between two FFT stages.
//
// A stage spends two clocks on a beat of lower operands but only one on a
// beat of upper operands, so at the end of every frame the later stages
// briefly receive work faster than they finish it. This buffer absorbs that
// burst so the input keeps taking one sample per clock; the published architecture's
// architecture has no such buffer, it is this design's addition.
//
// Storage is a DEPTH-entry circular array with read and write pointers and an
// occupancy count. Interface: valid/ready on both sides, each beat LANES
// tagged values. in_ready is high while the buffer is not full; out_valid
// while it is not empty. Timing: a beat written in one clock can be read in
// the next (no fall-through); a write and a read may happen in the same clock.
module fft_beat_fifo
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 4,
  parameter int unsigned LANES = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data [LANES],
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data [LANES]
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  sample_t          mem [DEPTH][LANES];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    count;
  logic             wr, rd;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign wr        = in_valid && in_ready;
  assign rd        = out_valid && out_ready;

  for (genvar l = 0; l < LANES; l++) begin : g_out
    assign out_data[l] = mem[rd_ptr][l];
  end

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++)
        for (int l = 0; l < LANES; l++) mem[i][l] <= '0;
    end else begin
      if (wr) begin
        for (int l = 0; l < LANES; l++) mem[wr_ptr][l] <= in_data[l];
        wr_ptr <= next_ptr(wr_ptr);
      end
      if (rd) rd_ptr <= next_ptr(rd_ptr);
      if (wr && !rd)      count <= count + 1'b1;
      else if (rd && !wr) count <= count - 1'b1;
    end
  end

  a_stable_when_held: assert property (@(posedge clk) disable iff (!rst_n)
    (out_valid && !out_ready) |=> out_valid);

endmodule
