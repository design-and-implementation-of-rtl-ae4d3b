// fft_sp_top: serial-pipelined FFT/IFFT processor, 16 points by default.
//
// Samples arrive one per clock (valid/ready) in bit-reversed order, as a
// radix-2 decimation-in-time flow graph expects: x(0), x(8), x(4), x(12),
// x(2), ... for 16 points. An input counter tags each accepted sample with its
// flow-graph row 0..POINTS-1 and wraps after POINTS, so consecutive frames can
// follow each other without a gap; the next frame enters while the previous
// one is still being transformed in the later stages. in_inv is sampled with
// the first sample of a frame and selects the inverse transform (conjugate
// twiddles, no 1/N scaling) for that whole frame.
//
// log2(POINTS) fft_stage instances with spans 1, 2, 4, ... form the pipeline
// (four stages, spans 1, 2, 4, 8, at the default of 16 points). The last
// stage delivers one pair of bins per beat, X[k] on lane 0 and X[k+POINTS/2]
// on lane 1; for 16 points k runs 0, 4, 2, 6, 1, 5, 3, 7. out_idx0/out_idx1
// give the bin numbers. Outputs are DW = 13-bit signed components, the full
// unscaled result of 8-bit inputs. POINTS may be 2, 4, 8 or 16: the twiddle
// table holds the 16th roots of unity, which contain those of the smaller
// sizes. The 16-point size and the four identical stages follow the
// published architecture; the smaller sizes serve its 8-point run.
//
// Throughput: one sample per clock sustained; in_ready stays high as long as
// out_ready does. Latency at 16 points: with the output never held, the last
// pair of a frame leaves 18 clocks after the frame's last sample is accepted,
// and two back-to-back frames (32 samples) take 50 clocks from the first
// sample in to the last bin out. Most of the tail is the last stage, which
// spends two clocks on each of the four pairs of lower operands that reach it
// at the end of a frame; the two-beat buffers in front of stages 2 to 4
// (fft_beat_fifo) absorb that burst so the input never has to wait.
module fft_sp_top
  import fft_pkg::*;
#(
  parameter int unsigned POINTS = N
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  input  logic                   in_inv,
  output logic                   out_valid,
  input  logic                   out_ready,
  output logic signed [DW-1:0]   out_re0,
  output logic signed [DW-1:0]   out_im0,
  output logic [LOG2N-1:0]       out_idx0,
  output logic signed [DW-1:0]   out_re1,
  output logic signed [DW-1:0]   out_im1,
  output logic [LOG2N-1:0]       out_idx1,
  output logic                   out_inv
);

  localparam int unsigned STAGES = $clog2(POINTS);

  // ---- input stage: row counter and frame mode ---------------------------
  pos_t    in_pos;
  logic    frame_inv;
  logic    cur_inv;
  sample_t s_in [1];

  assign cur_inv = (in_pos == '0) ? in_inv : frame_inv;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_pos    <= '0;
      frame_inv <= 1'b0;
    end else if (in_valid && in_ready) begin
      in_pos    <= (in_pos == pos_t'(POINTS - 1)) ? '0 : in_pos + 1'b1;
      frame_inv <= cur_inv;
    end
  end

  always_comb begin
    s_in[0].v.re = data_t'(in_re);
    s_in[0].v.im = data_t'(in_im);
    s_in[0].pos  = in_pos;
    s_in[0].inv  = cur_inv;
  end

  // ---- cascaded stages -----------------------------------------------------
  // Link s runs from stage s to stage s+1; link 0 is unused (stage 1 takes
  // s_in) and link STAGES is the processor output.
  logic    lv [STAGES+1];
  logic    lr [STAGES+1];
  sample_t ld [STAGES+1][2];

  assign lv[0]    = 1'b0;
  assign lr[0]    = 1'b0;
  assign ld[0][0] = '0;
  assign ld[0][1] = '0;

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    if (s == 1) begin : g_first
      fft_stage #(.STAGE(1)) u_stage (
        .clk, .rst_n,
        .in_valid, .in_ready, .in_data(s_in),
        .out_valid(lv[1]), .out_ready(lr[1]), .out_data(ld[1])
      );
    end else begin : g_next
      fft_stage #(.STAGE(s)) u_stage (
        .clk, .rst_n,
        .in_valid(lv[s-1]), .in_ready(lr[s-1]), .in_data(ld[s-1]),
        .out_valid(lv[s]), .out_ready(lr[s]), .out_data(ld[s])
      );
    end
  end

  assign out_valid       = lv[STAGES];
  assign lr[STAGES]      = out_ready;
  assign out_re0         = ld[STAGES][0].v.re;
  assign out_im0         = ld[STAGES][0].v.im;
  assign out_idx0        = ld[STAGES][0].pos;
  assign out_re1         = ld[STAGES][1].v.re;
  assign out_im1         = ld[STAGES][1].v.im;
  assign out_idx1        = ld[STAGES][1].pos;
  assign out_inv         = ld[STAGES][0].inv;

  if (!(POINTS == 2 || POINTS == 4 || POINTS == 8 || POINTS == 16)) begin : g_bad_size
    $error("fft_sp_top: POINTS must be 2, 4, 8 or 16");
  end

endmodule
