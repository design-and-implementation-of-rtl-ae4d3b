// fft_addsub_tb: checks the butterfly sum and difference on corner values
// and random operands against integer arithmetic in the testbench.
module fft_addsub_tb;
  import fft_pkg::*;

  cplx_t a, b, sum, diff;
  int checks = 0, failures = 0;

  fft_addsub dut (.a, .b, .sum, .diff);

  task automatic try(input int ar, input int ai, input int br, input int bi);
    a.re = data_t'(ar); a.im = data_t'(ai);
    b.re = data_t'(br); b.im = data_t'(bi);
    #1;
    checks++;
    if (int'(sum.re) != ar + br || int'(sum.im) != ai + bi ||
        int'(diff.re) != ar - br || int'(diff.im) != ai - bi) begin
      failures++;
      $display("FAIL: (%0d,%0d) +/- (%0d,%0d) gave (%0d,%0d) / (%0d,%0d)",
               ar, ai, br, bi, sum.re, sum.im, diff.re, diff.im);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    try(0, 0, 0, 0);
    try(1, -1, 2, 3);
    try(-2048, 2047, -2048, -2048);
    try(2047, -2048, 2047, 2047);
    repeat (500) try($urandom_range(4095) - 2048, $urandom_range(4095) - 2048,
                     $urandom_range(4095) - 2048, $urandom_range(4095) - 2048);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
