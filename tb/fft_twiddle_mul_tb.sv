// fft_twiddle_mul_tb: checks the twiddle factor multiplier for every k and
// both directions. Expected values come from fft_ref_pkg::cmul, whose
// twiddles are computed with $cos/$sin; each result is also checked to lie
// within 2.5 LSB of the exact complex product x * exp(-/+ j*2*pi*k/16).
module fft_twiddle_mul_tb;
  import fft_pkg::*;
  import fft_ref_pkg::*;

  cplx_t      x, y;
  logic [2:0] k;
  logic       inv;
  int checks = 0, failures = 0;

  fft_twiddle_mul dut (.x, .k, .inv, .y);

  task automatic try(input int xr, input int xi, input int kk, input bit iv);
    int er, ei;
    real ang, tr, ti, dr, di;
    x.re = data_t'(xr); x.im = data_t'(xi); k = 3'(kk); inv = iv;
    #1;
    cmul(xr, xi, kk, iv, er, ei);
    checks++;
    if (int'(y.re) != er || int'(y.im) != ei) begin
      failures++;
      if (failures < 20)
        $display("FAIL: (%0d,%0d)*W^%s%0d = (%0d,%0d), expected (%0d,%0d)",
                 xr, xi, iv ? "-" : "", kk, y.re, y.im, er, ei);
    end
    ang = (iv ? 2.0 : -2.0) * 3.14159265358979 * kk / 16.0;
    tr = xr * $cos(ang) - xi * $sin(ang);
    ti = xr * $sin(ang) + xi * $cos(ang);
    dr = y.re - tr; if (dr < 0) dr = -dr;
    di = y.im - ti; if (di < 0) di = -di;
    checks++;
    if (dr > 2.5 + 0.012 * (xr < 0 ? -xr : xr) + 0.012 * (xi < 0 ? -xi : xi) ||
        di > 2.5 + 0.012 * (xr < 0 ? -xr : xr) + 0.012 * (xi < 0 ? -xi : xi)) begin
      failures++;
      if (failures < 20) $display("FAIL: (%0d,%0d)*W^%0d off the exact product by %f/%f", xr, xi, kk, dr, di);
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
    for (int kk = 0; kk < 8; kk++) begin
      try(64, 0, kk, 1'b0);
      try(0, 64, kk, 1'b1);
      try(-2048, 2047, kk, 1'b0);
      try(2047, 2047, kk, 1'b1);
    end
    // W^0 must leave a value unchanged.
    repeat (50) begin
      int r, i;
      r = $urandom_range(4095) - 2048;
      i = $urandom_range(4095) - 2048;
      try(r, i, 0, 1'($urandom));
      checks++;
      if (int'(y.re) != r || int'(y.im) != i) failures++;
    end
    repeat (1000) try($urandom_range(2047) - 1024, $urandom_range(2047) - 1024,
                      $urandom_range(7), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
