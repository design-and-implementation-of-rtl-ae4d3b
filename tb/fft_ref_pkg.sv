// fft_ref_pkg: reference models used by the testbenches.
//
// ref_fft evaluates the 16-point radix-2 decimation-in-time flow graph on
// plain integers: bit-reversed input rows, butterflies of span 1, 2, 4, 8,
// and each twiddle product formed at the end of the stage before the one that
// uses it, rounded to nearest with six fraction bits, which is the word-level
// arithmetic the hardware promises. The twiddle values come from $cos/$sin
// here, independently of the table in the design. The _p variants take the
// transform size (2 to 16 points). dft_err returns the
// largest component error of a result against a double-precision DFT, so a
// testbench can also bound the fixed-point error.
package fft_ref_pkg;

  function automatic int bitrev4(input int i);
    return ((i & 1) << 3) | ((i & 2) << 1) | ((i & 4) >> 1) | ((i & 8) >> 3);
  endfunction

  function automatic int rnd(input real r);
    return (r >= 0.0) ? $rtoi(r + 0.5) : -$rtoi(-r + 0.5);
  endfunction

  function automatic int tw_c(input int k);
    return rnd(64.0 * $cos(2.0 * 3.14159265358979 * k / 16.0));
  endfunction

  function automatic int tw_s(input int k);
    return rnd(64.0 * $sin(2.0 * 3.14159265358979 * k / 16.0));
  endfunction

  // (re + j im) * (c -/+ j s), rounded: >>> on int is an arithmetic shift.
  function automatic void cmul(input int re, input int im, input int k, input bit inv,
                               output int ore, output int oim);
    int c, s, ar, ai;
    c = tw_c(k);
    s = tw_s(k);
    if (inv) begin ar = re * c - im * s; ai = im * c + re * s; end
    else     begin ar = re * c + im * s; ai = im * c - re * s; end
    ore = (ar + 32) >>> 6;
    oim = (ai + 32) >>> 6;
  endfunction

  function automatic int bitrev(input int i, input int bits);
    int r;
    r = 0;
    for (int b = 0; b < bits; b++) if (((i >> b) & 1) != 0) r |= 1 << (bits - 1 - b);
    return r;
  endfunction

  // P-point transform (P = 2, 4, 8, 16) of x[0..P-1] in natural order; y gets
  // the bins in natural order. The stage of span h uses W_16^((q mod h)*8/h),
  // which is the same root of unity for every P.
  function automatic void ref_fft_p(input int P, input int xr[16], input int xi[16], input bit inv,
                                    output int yr[16], output int yi[16]);
    int vr[16], vi[16], bits;
    bits = $clog2(P);
    for (int p = 0; p < 16; p++) begin
      vr[p] = (p < P) ? xr[bitrev(p, bits)] : 0;
      vi[p] = (p < P) ? xi[bitrev(p, bits)] : 0;
    end
    for (int s = 1; s <= bits; s++) begin
      int h;
      h = 1 << (s - 1);
      for (int p = 0; p < P; p++) begin
        if ((p & h) == 0) begin
          int ar, ai, br, bi;
          ar = vr[p]; ai = vi[p]; br = vr[p+h]; bi = vi[p+h];
          vr[p] = ar + br;   vi[p] = ai + bi;
          vr[p+h] = ar - br; vi[p+h] = ai - bi;
        end
      end
      if (s < bits) begin
        for (int q = 0; q < P; q++) begin
          if ((q & (2 * h)) != 0) begin
            int tr, ti;
            cmul(vr[q], vi[q], (q % (2 * h)) * (16 / (4 * h)), inv, tr, ti);
            vr[q] = tr;
            vi[q] = ti;
          end
        end
      end
    end
    for (int q = 0; q < 16; q++) begin
      yr[q] = vr[q];
      yi[q] = vi[q];
    end
  endfunction

  // 16-point case; x in natural order, y bins in natural order.
  function automatic void ref_fft(input int xr[16], input int xi[16], input bit inv,
                                  output int yr[16], output int yi[16]);
    ref_fft_p(16, xr, xi, inv, yr, yi);
  endfunction

  // Largest |component error| of bin k of a P-point result against the exact
  // DFT (inverse: sign of the exponent flipped, no 1/N).
  function automatic real dft_err_p(input int P, input int xr[16], input int xi[16], input bit inv,
                                    input int k, input int yr, input int yi);
    real sr, si, ang, er, ei;
    sr = 0.0;
    si = 0.0;
    for (int n = 0; n < P; n++) begin
      ang = (inv ? 2.0 : -2.0) * 3.14159265358979 * k * n / P;
      sr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
      si += xr[n] * $sin(ang) + xi[n] * $cos(ang);
    end
    er = (yr > sr) ? yr - sr : sr - yr;
    ei = (yi > si) ? yi - si : si - yi;
    return (er > ei) ? er : ei;
  endfunction

  function automatic real dft_err(input int xr[16], input int xi[16], input bit inv,
                                  input int k, input int yr, input int yi);
    return dft_err_p(16, xr, xi, inv, k, yr, yi);
  endfunction

endpackage
