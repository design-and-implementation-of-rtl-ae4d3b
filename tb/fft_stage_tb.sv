// fft_stage_tb: tests fft_stage as stage 1 (span 1, single-value beats, no
// input buffer) and as stage 3 (span 4, pair beats, two-beat input buffer).
//
// Each DUT receives frames in the row order its predecessor produces, with
// random values and a random mode per frame. The testbench keeps the values
// of each frame; when it sends a lower-operand value it works out the
// butterfly (a + b, a - b) and the next stage's twiddle product with the
// integer model of fft_ref_pkg, and queues the expected pair. Outputs are
// compared in order, rows and mode flags included. A first phase with
// spaced-out beats and the output always ready checks the latency: 2 clocks
// from a stage-1 lower sample to its pair, 3 clocks from a stage-3 lower
// beat to its first pair (one more for the input buffer). Later phases add
// random gaps and random output back-pressure, and count stalls.
module fft_stage_tb;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endfunction

  // ---- DUTs ---------------------------------------------------------------
  logic    a_in_valid, a_in_ready, a_out_valid, a_out_ready;
  sample_t a_in [1];
  sample_t a_out [2];
  logic    c_in_valid, c_in_ready, c_out_valid, c_out_ready;
  sample_t c_in [2];
  sample_t c_out [2];

  fft_stage #(.STAGE(1)) dut1 (
    .clk, .rst_n, .in_valid(a_in_valid), .in_ready(a_in_ready), .in_data(a_in),
    .out_valid(a_out_valid), .out_ready(a_out_ready), .out_data(a_out));

  fft_stage #(.STAGE(3)) dut3 (
    .clk, .rst_n, .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out));

  // ---- expected results ----------------------------------------------------
  typedef struct { int r0, i0, p0, r1, i1, p1; bit inv; int due; } exp_t;
  exp_t exp1 [$];
  exp_t exp3 [$];

  // Butterfly of rows p (upper, value a) and p+h (lower, value b) in a stage
  // of span h, followed by the twiddle the stage of span 2h applies.
  function automatic exp_t bfly(input int ar, input int ai, input int br, input int bi,
                                input int p, input int h, input bit inv);
    exp_t e;
    int rows [2], vr [2], vi [2];
    rows[0] = p;       vr[0] = ar + br; vi[0] = ai + bi;
    rows[1] = p + h;   vr[1] = ar - br; vi[1] = ai - bi;
    for (int l = 0; l < 2; l++) begin
      if ((rows[l] & (2 * h)) != 0 && 2 * h < 16)
        cmul(vr[l], vi[l], (rows[l] % (2 * h)) * (16 / (4 * h)), inv, vr[l], vi[l]);
    end
    e.r0 = vr[0]; e.i0 = vi[0]; e.p0 = rows[0];
    e.r1 = vr[1]; e.i1 = vi[1]; e.p1 = rows[1];
    e.inv = inv;
    e.due = 0;
    return e;
  endfunction

  int lat1_checked = 0, lat3_checked = 0;
  int n_stall1 = 0, n_stall3 = 0, n_bp = 0;

  task automatic compare(input exp_t e, input sample_t o [2], input string who);
    check(int'(o[0].v.re) == e.r0 && int'(o[0].v.im) == e.i0 && int'(o[0].pos) == e.p0 &&
          int'(o[1].v.re) == e.r1 && int'(o[1].v.im) == e.i1 && int'(o[1].pos) == e.p1 &&
          o[0].inv == e.inv && o[1].inv == e.inv,
          $sformatf("%s: rows %0d/%0d = (%0d,%0d)/(%0d,%0d), expected rows %0d/%0d = (%0d,%0d)/(%0d,%0d)",
                    who, o[0].pos, o[1].pos, o[0].v.re, o[0].v.im, o[1].v.re, o[1].v.im,
                    e.p0, e.p1, e.r0, e.i0, e.r1, e.i1));
  endtask

  always @(posedge clk) begin
    if (rst_n) begin
      if (a_in_valid && !a_in_ready) n_stall1++;
      if (c_in_valid && !c_in_ready) n_stall3++;
      if ((a_out_valid && !a_out_ready) || (c_out_valid && !c_out_ready)) n_bp++;
      if (a_out_valid && a_out_ready) begin
        exp_t e;
        if (exp1.size() == 0) check(0, "stage 1: unexpected output");
        else begin
          e = exp1.pop_front();
          compare(e, a_out, "stage 1");
          if (e.due > 0) begin
            check(cycle == e.due, $sformatf("stage 1 latency: out at %0d, due %0d", cycle, e.due));
            lat1_checked++;
          end
        end
      end
      if (c_out_valid && c_out_ready) begin
        exp_t e;
        if (exp3.size() == 0) check(0, "stage 3: unexpected output");
        else begin
          e = exp3.pop_front();
          compare(e, c_out, "stage 3");
          if (e.due > 0) begin
            check(cycle == e.due, $sformatf("stage 3 latency: out at %0d, due %0d", cycle, e.due));
            lat3_checked++;
          end
        end
      end
    end
  end

  int gap_pct = 0, bp_pct = 0, spaced = 0;
  always @(posedge clk) begin
    #1;
    a_out_ready = ($urandom_range(99) >= bp_pct);
    c_out_ready = ($urandom_range(99) >= bp_pct);
  end

  function automatic sample_t mk(input int r, input int i, input int p, input bit inv);
    sample_t s;
    s.v.re = data_t'(r);
    s.v.im = data_t'(i);
    s.pos  = pos_t'(p);
    s.inv  = inv;
    return s;
  endfunction

  // Stage 1: rows 0..15 one per beat.
  task automatic frame1(input bit inv);
    int vr[16], vi[16];
    for (int p = 0; p < 16; p++) begin
      vr[p] = $urandom_range(255) - 128;
      vi[p] = $urandom_range(255) - 128;
    end
    for (int p = 0; p < 16; p++) begin
      while ($urandom_range(99) < gap_pct) begin a_in_valid = 1'b0; @(posedge clk); #1; end
      a_in_valid = 1'b1;
      a_in[0] = mk(vr[p], vi[p], p, inv);
      do @(posedge clk); while (!a_in_ready);
      if (p % 2 == 1) begin
        exp_t e;
        e = bfly(vr[p-1], vi[p-1], vr[p], vi[p], p - 1, 1, inv);
        if (spaced) e.due = cycle + 2;
        exp1.push_back(e);
      end
      #1;
      if (spaced) begin a_in_valid = 1'b0; repeat (4) @(posedge clk); #1; end
    end
    a_in_valid = 1'b0;
  endtask

  // Stage 3: pairs in the order stage 2 delivers them.
  localparam int ORDER3 [8][2] = '{'{0,2}, '{1,3}, '{4,6}, '{5,7}, '{8,10}, '{9,11}, '{12,14}, '{13,15}};

  task automatic frame3(input bit inv);
    int vr[16], vi[16];
    for (int p = 0; p < 16; p++) begin
      vr[p] = $urandom_range(2047) - 1024;
      vi[p] = $urandom_range(2047) - 1024;
    end
    for (int b = 0; b < 8; b++) begin
      int q0, q1;
      q0 = ORDER3[b][0];
      q1 = ORDER3[b][1];
      while ($urandom_range(99) < gap_pct) begin c_in_valid = 1'b0; @(posedge clk); #1; end
      c_in_valid = 1'b1;
      c_in[0] = mk(vr[q0], vi[q0], q0, inv);
      c_in[1] = mk(vr[q1], vi[q1], q1, inv);
      do @(posedge clk); while (!c_in_ready);
      if ((q0 & 4) != 0) begin
        exp_t e0, e1;
        e0 = bfly(vr[q0-4], vi[q0-4], vr[q0], vi[q0], q0 - 4, 4, inv);
        e1 = bfly(vr[q1-4], vi[q1-4], vr[q1], vi[q1], q1 - 4, 4, inv);
        if (spaced) begin e0.due = cycle + 3; e1.due = cycle + 4; end
        exp3.push_back(e0);
        exp3.push_back(e1);
      end
      #1;
      if (spaced) begin c_in_valid = 1'b0; repeat (6) @(posedge clk); #1; end
    end
    c_in_valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; a_in_valid = 1'b0; c_in_valid = 1'b0;
    a_in[0] = '0; c_in[0] = '0; c_in[1] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    spaced = 1;
    fork frame1(1'b0); frame3(1'b0); join
    repeat (10) @(posedge clk); #1;
    spaced = 0;
    fork
      repeat (4) frame1(1'($urandom));
      repeat (4) frame3(1'($urandom));
    join
    gap_pct = 20; bp_pct = 60;
    fork
      repeat (12) frame1(1'($urandom));
      repeat (12) frame3(1'($urandom));
    join
    repeat (40) @(posedge clk);
    check(exp1.size() == 0 && exp3.size() == 0,
          $sformatf("results missing: %0d / %0d", exp1.size(), exp3.size()));
    check(lat1_checked == 8 && lat3_checked == 8, "latency phase incomplete");
    check(n_stall3 > 0, "stage 3 never held its input");
    check(n_bp > 0, "no output back-pressure");
    $display("stalls stage1=%0d stage3=%0d backpressure=%0d", n_stall1, n_stall3, n_bp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
