// fft_workload_tb: the two transform sizes the processor is evaluated at.
//
//   * 16 points: frames stream in back to back at one sample per clock. The
//     first two frames (32 samples) must be finished within 81 clocks of the
//     first sample, the figure quoted for this architecture; the design
//     needs 50. The whole run must keep one sample per clock (no input
//     stall), so FRAMES frames finish in FRAMES*16 clocks plus the latency.
//   * 8 points: the same stream for an 8-point processor (three stages).
//
// Both runs check every bin bit for bit and against an exact DFT (fft_run).
// The largest DFT error seen, relative to sum |x|, is printed.
module fft_workload_tb;

  localparam int FRAMES = 40;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int  c16, f16, two16, tot16, st16;
  int  c8, f8, two8, tot8, st8;
  real e16, e8;
  logic d16, d8;

  fft_run #(.POINTS(16), .FRAMES(FRAMES)) run16 (
    .clk, .rst_n, .checks(c16), .failures(f16), .two_frame_cycles(two16),
    .total_cycles(tot16), .in_stalls(st16), .max_rel_err(e16), .done(d16));

  fft_run #(.POINTS(8), .FRAMES(FRAMES)) run8 (
    .clk, .rst_n, .checks(c8), .failures(f8), .two_frame_cycles(two8),
    .total_cycles(tot8), .in_stalls(st8), .max_rel_err(e8), .done(d8));

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c16 + c8, failures + f16 + f8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (d16 && d8);
    @(posedge clk);
    $display("16 points: 32 samples in %0d clocks; %0d frames in %0d clocks; max DFT error %f of sum|x|",
             two16, FRAMES, tot16, e16);
    $display(" 8 points: 16 samples in %0d clocks; %0d frames in %0d clocks; max DFT error %f of sum|x|",
             two8, FRAMES, tot8, e8);
    check(two16 > 0 && two16 <= 81, $sformatf("16-point: 32 samples took %0d clocks", two16));
    check(st16 == 0 && st8 == 0, $sformatf("input stalled: %0d / %0d", st16, st8));
    check(tot16 <= FRAMES * 16 + 20, $sformatf("16-point stream took %0d clocks", tot16));
    check(tot8 <= FRAMES * 8 + 20, $sformatf("8-point stream took %0d clocks", tot8));
    check(c16 == FRAMES * 8 * 3 && c8 == FRAMES * 4 * 3, "every bin checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c16 + c8, failures + f16 + f8);
    $finish;
  end

endmodule
