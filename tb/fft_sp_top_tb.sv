// fft_sp_top_tb: end-to-end test of the serial-pipelined FFT/IFFT processor.
//
// Frames of 16 complex 8-bit samples are sent in bit-reversed order. Every
// output pair is compared bit for bit with the integer flow-graph model of
// fft_ref_pkg and, within a fixed-point error bound, with an exact DFT.
// Phases:
//   1. one forward frame, dense input, output always ready: checks the
//      latency from the last sample in to the last pair out;
//   2. two frames back to back (32 samples): checks that the second frame
//      enters while the first is still in flight and that all 32 bins are out
//      within 81 clocks of the first sample;
//   3. one inverse frame;
//   4. full-scale inputs (all +127 / -128 patterns) for overflow;
//   5. many random frames with random input gaps, random output back-pressure
//      (moderate, then heavy) and random forward/inverse mode per frame.
// Mechanisms counted, each must occur: frame overlap, input stall
// (in_ready low), output back-pressure, an inner stage waiting for its
// second butterfly, a forward<->inverse mode switch.
module fft_sp_top_tb;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  localparam int MAX_FRAMES = 64;
  localparam int EXP_LATENCY = 18;   // last sample accepted -> last pair out
  localparam int REF_CYCLES_32 = 81;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                   in_valid, in_ready, in_inv;
  logic signed [IN_W-1:0] in_re, in_im;
  logic                   out_valid, out_ready, out_inv;
  logic signed [DW-1:0]   out_re0, out_im0, out_re1, out_im1;
  logic [LOG2N-1:0]       out_idx0, out_idx1;

  fft_sp_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- frame storage ------------------------------------------------------
  int fx_r [MAX_FRAMES][16];
  int fx_i [MAX_FRAMES][16];
  bit f_inv [MAX_FRAMES];
  int f_first_in [MAX_FRAMES], f_last_in [MAX_FRAMES], f_last_out [MAX_FRAMES];
  int n_frames_sent = 0;
  int in_count = 0, out_count = 0;   // samples in, pairs out

  // Mechanism counters.
  int n_overlap = 0, n_in_stall = 0, n_out_bp = 0, n_inner_wait = 0, n_mode_switch = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endfunction

  // ---- monitor --------------------------------------------------------------
  localparam int K_ORDER [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  always @(posedge clk) begin
    if (rst_n) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_bp++;
      if (dut.lv[2] && !dut.lr[2]) n_inner_wait++;
      if (in_valid && in_ready) begin
        int f;
        f = in_count / 16;
        if (in_count % 16 == 0) f_first_in[f] = cycle;
        if (in_count % 16 == 15) f_last_in[f] = cycle;
        // A sample of a new frame enters while an older frame has bins still
        // to come out.
        if (f > 0 && out_count < f * 8) n_overlap++;
        in_count++;
      end
      if (out_valid && out_ready) begin
        int f, j, k, er[16], ei[16];
        real e0, e1, tol, sabs;
        f = out_count / 8;
        j = out_count % 8;
        k = K_ORDER[j];
        ref_fft(fx_r[f], fx_i[f], f_inv[f], er, ei);
        check(out_idx0 == LOG2N'(k) && out_idx1 == LOG2N'(k + 8),
              $sformatf("frame %0d beat %0d: bins %0d/%0d, expected %0d/%0d",
                        f, j, out_idx0, out_idx1, k, k + 8));
        check(out_inv == f_inv[f], $sformatf("frame %0d: mode flag", f));
        check(int'(out_re0) == er[k] && int'(out_im0) == ei[k],
              $sformatf("frame %0d X[%0d] = (%0d,%0d), expected (%0d,%0d)",
                        f, k, out_re0, out_im0, er[k], ei[k]));
        check(int'(out_re1) == er[k+8] && int'(out_im1) == ei[k+8],
              $sformatf("frame %0d X[%0d] = (%0d,%0d), expected (%0d,%0d)",
                        f, k + 8, out_re1, out_im1, er[k+8], ei[k+8]));
        sabs = 0.0;
        for (int n = 0; n < 16; n++)
          sabs += ((fx_r[f][n] < 0) ? -fx_r[f][n] : fx_r[f][n]) +
                  ((fx_i[f][n] < 0) ? -fx_i[f][n] : fx_i[f][n]);
        tol = 0.03 * sabs + 3.0;
        e0 = dft_err(fx_r[f], fx_i[f], f_inv[f], k, int'(out_re0), int'(out_im0));
        e1 = dft_err(fx_r[f], fx_i[f], f_inv[f], k + 8, int'(out_re1), int'(out_im1));
        check(e0 <= tol && e1 <= tol,
              $sformatf("frame %0d bins %0d/%0d: DFT error %f/%f > %f", f, k, k + 8, e0, e1, tol));
        if (j == 7) f_last_out[f] = cycle;
        out_count++;
      end
    end
  end

  // ---- driver ---------------------------------------------------------------
  int gap_pct = 0;     // chance of an idle input cycle
  int bp_pct  = 0;     // chance of out_ready low

  always @(posedge clk) begin
    #1 out_ready = ($urandom_range(99) >= bp_pct);
  end

  // Send one frame; samples[n] in natural order, sent as x(bitrev(i)).
  task automatic send_frame(input int pattern, input bit inv);
    int f;
    f = n_frames_sent;
    for (int n = 0; n < 16; n++) begin
      case (pattern)
        0: begin fx_r[f][n] = int'($signed(8'($urandom))); fx_i[f][n] = int'($signed(8'($urandom))); end
        1: begin fx_r[f][n] = 127; fx_i[f][n] = 127; end
        2: begin fx_r[f][n] = -128; fx_i[f][n] = -128; end
        3: begin fx_r[f][n] = (n % 2 == 1) ? -128 : 127; fx_i[f][n] = (n % 2 == 1) ? 127 : -128; end
        default: begin fx_r[f][n] = (n == 3) ? 100 : 0; fx_i[f][n] = 0; end
      endcase
    end
    f_inv[f] = inv;
    if (f > 0 && f_inv[f-1] != inv) n_mode_switch++;
    n_frames_sent++;
    for (int i = 0; i < 16; i++) begin
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 1'b0;
        @(posedge clk); #1;
      end
      in_valid = 1'b1;
      in_re    = 8'(fx_r[f][bitrev4(i)]);
      in_im    = 8'(fx_i[f][bitrev4(i)]);
      in_inv   = (i == 0) ? inv : ~inv;   // only the first sample's flag counts
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 1'b0;
  endtask

  task automatic wait_drained(input int frames);
    while (out_count < frames * 8) @(posedge clk);
    #1;
  endtask

  // ---- watchdog ---------------------------------------------------------------
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_re = '0; in_im = '0; in_inv = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. single forward frame, latency
    send_frame(0, 1'b0);
    wait_drained(1);
    check(f_last_out[0] - f_last_in[0] == EXP_LATENCY,
          $sformatf("latency %0d, expected %0d", f_last_out[0] - f_last_in[0], EXP_LATENCY));

    // 2. two overlapping frames, 32 samples
    begin
      int base, ovl;
      base = n_frames_sent;
      ovl  = n_overlap;
      send_frame(0, 1'b0);
      send_frame(4, 1'b0);
      wait_drained(base + 2);
      check(n_in_stall == 0, $sformatf("dense input stalled %0d times", n_in_stall));
      check(n_overlap > ovl, "second frame did not overlap the first");
      check(f_last_out[base+1] - f_first_in[base] + 1 <= REF_CYCLES_32,
            $sformatf("32 samples took %0d cycles, more than %0d",
                      f_last_out[base+1] - f_first_in[base] + 1, REF_CYCLES_32));
      $display("32 samples (two frames): %0d cycles from first sample in to last bin out",
               f_last_out[base+1] - f_first_in[base] + 1);
    end

    // 3. inverse frame; 4. full-scale frames
    send_frame(0, 1'b1);
    send_frame(1, 1'b0);
    send_frame(2, 1'b1);
    send_frame(3, 1'b0);
    wait_drained(n_frames_sent);

    // 5. random traffic: moderate, then heavy output back-pressure
    gap_pct = 20;
    bp_pct  = 40;
    while (n_frames_sent < MAX_FRAMES / 2) send_frame(0, 1'($urandom));
    gap_pct = 5;
    bp_pct  = 75;
    while (n_frames_sent < MAX_FRAMES) send_frame(0, 1'($urandom));
    wait_drained(n_frames_sent);

    check(out_count == MAX_FRAMES * 8, "pair count");
    $display("overlap=%0d in_stall=%0d out_backpressure=%0d inner_wait=%0d mode_switch=%0d",
             n_overlap, n_in_stall, n_out_bp, n_inner_wait, n_mode_switch);
    check(n_overlap > 0, "frame overlap never happened");
    check(n_in_stall > 0, "input stall never happened");
    check(n_out_bp > 0, "output back-pressure never happened");
    check(n_inner_wait > 0, "inner stage never waited for its second butterfly");
    check(n_mode_switch > 0, "mode switch never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
