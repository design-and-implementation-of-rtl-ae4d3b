// fft_run: drives one fft_sp_top of POINTS points with FRAMES frames sent
// back to back at one sample per clock, output always ready, and checks
// every bin bit for bit against fft_ref_pkg::ref_fft_p and against an exact
// DFT within a fixed-point error bound. It reports its counts on its ports
// and raises done when all bins are out. Used by fft_workload_tb.
//
// Besides the values it measures: the clocks from the first sample in to the
// last bin out of the first two frames (the published two-frame
// measurement), whether the input ever stalled, and the largest DFT error
// seen, relative to sum |x|.
module fft_run
  import fft_pkg::*;
  import fft_ref_pkg::*;
#(
  parameter int POINTS = 16,
  parameter int FRAMES = 40
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   two_frame_cycles,
  output int   total_cycles,
  output int   in_stalls,
  output real  max_rel_err,
  output logic done
);

  localparam int BITS = $clog2(POINTS);
  localparam int HALF = POINTS / 2;

  logic                   in_valid, in_ready, in_inv, out_valid, out_ready, out_inv;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [DW-1:0]   out_re0, out_im0, out_re1, out_im1;
  logic [LOG2N-1:0]       out_idx0, out_idx1;

  fft_sp_top #(.POINTS(POINTS)) dut (.*);

  int fx_r [FRAMES][16];
  int fx_i [FRAMES][16];
  bit f_inv [FRAMES];
  int cycle = 0, first_in = -1, out_count = 0;

  // Bin order of the last stage: k = bit-reverse of the beat number over
  // BITS-1 bits, paired with k + POINTS/2.
  function automatic int beat_bin(input int j);
    return (BITS > 1) ? bitrev(j, BITS - 1) : 0;
  endfunction

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d points) @%0d: %s", POINTS, cycle, what);
    end
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (in_valid && !in_ready) in_stalls++;
      if (in_valid && in_ready && first_in < 0) first_in = cycle;
      if (out_valid && out_ready) begin
        int f, k, er[16], ei[16];
        real e0, e1, sabs;
        f = out_count / HALF;
        k = beat_bin(out_count % HALF);
        ref_fft_p(POINTS, fx_r[f], fx_i[f], f_inv[f], er, ei);
        check(int'(out_idx0) == k && int'(out_idx1) == k + HALF && out_inv == f_inv[f],
              $sformatf("frame %0d: bins %0d/%0d, expected %0d/%0d", f, out_idx0, out_idx1, k, k + HALF));
        check(int'(out_re0) == er[k] && int'(out_im0) == ei[k] &&
              int'(out_re1) == er[k+HALF] && int'(out_im1) == ei[k+HALF],
              $sformatf("frame %0d bins %0d/%0d differ from the model", f, k, k + HALF));
        sabs = 0.0;
        for (int n = 0; n < POINTS; n++)
          sabs += ((fx_r[f][n] < 0) ? -fx_r[f][n] : fx_r[f][n]) +
                  ((fx_i[f][n] < 0) ? -fx_i[f][n] : fx_i[f][n]);
        e0 = dft_err_p(POINTS, fx_r[f], fx_i[f], f_inv[f], k, int'(out_re0), int'(out_im0));
        e1 = dft_err_p(POINTS, fx_r[f], fx_i[f], f_inv[f], k + HALF, int'(out_re1), int'(out_im1));
        check(e0 <= 0.03 * sabs + 3.0 && e1 <= 0.03 * sabs + 3.0,
              $sformatf("frame %0d: DFT error %f/%f", f, e0, e1));
        if (sabs > 0.0) begin
          if (e0 / sabs > max_rel_err) max_rel_err = e0 / sabs;
          if (e1 / sabs > max_rel_err) max_rel_err = e1 / sabs;
        end
        out_count++;
        if (out_count == POINTS)
          two_frame_cycles = cycle - first_in + 1;
        if (out_count == FRAMES * HALF) begin
          total_cycles = cycle - first_in + 1;
          done = 1'b1;
        end
      end
    end
  end

  initial begin
    checks = 0; failures = 0; two_frame_cycles = 0; total_cycles = 0;
    in_stalls = 0; max_rel_err = 0.0; done = 1'b0;
    in_valid = 1'b0; in_re = '0; in_im = '0; in_inv = 1'b0; out_ready = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      f_inv[f] = (f >= 2) && ((f % 3) == 0);
      for (int n = 0; n < 16; n++) begin
        fx_r[f][n] = (n < POINTS) ? $urandom_range(255) - 128 : 0;
        fx_i[f][n] = (n < POINTS) ? $urandom_range(255) - 128 : 0;
      end
    end
    @(posedge clk iff rst_n);
    #1;
    for (int f = 0; f < FRAMES; f++) begin
      for (int i = 0; i < POINTS; i++) begin
        in_valid = 1'b1;
        in_re  = 8'(fx_r[f][bitrev(i, BITS)]);
        in_im  = 8'(fx_i[f][bitrev(i, BITS)]);
        in_inv = f_inv[f];
        do @(posedge clk); while (!in_ready);
        #1;
      end
    end
    in_valid = 1'b0;
  end

endmodule
