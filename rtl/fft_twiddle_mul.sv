// fft_twiddle_mul: complex multiplication by the twiddle factor W_16^k.
//
// The twiddle ROM (cosine and sine of 2*pi*k/16 in 8-bit fixed point with six
// fraction bits, see fft_pkg) is indexed by k = 0..7. For the forward
// transform the value is multiplied by W^k = c - j*s:
//   re' = re*c + im*s,  im' = im*c - re*s
// and with inv set by the conjugate W^-k = c + j*s, which turns the same
// datapath into the inverse transform. Each product sum is rounded to nearest
// (add half an LSB, then an arithmetic shift right by TW_FRAC). W^0 is stored
// as exactly 1.0 (64), so k = 0 leaves a value unchanged.
//
// The factors W_N^k and the exponents of each stage follow the published architecture's
// flow graph. The word format, the rounding and the conjugate inverse mode
// are this design's choices.
//
// Interface: x, k, inv in; y out. Timing: combinational; the registers that
// surround it live in fft_stage.
module fft_twiddle_mul
  import fft_pkg::*;
(
  input  cplx_t      x,
  input  logic [2:0] k,
  input  logic       inv,
  output cplx_t      y
);

  localparam int unsigned PW = DW + TW_W + 1;
  typedef logic signed [PW-1:0] prod_t;

  tw_t   c, s;
  prod_t p_rc, p_is, p_ic, p_rs, acc_re, acc_im;

  always_comb begin
    c    = tw_cos(k);
    s    = tw_sin(k);
    p_rc = prod_t'(x.re) * prod_t'(c);
    p_is = prod_t'(x.im) * prod_t'(s);
    p_ic = prod_t'(x.im) * prod_t'(c);
    p_rs = prod_t'(x.re) * prod_t'(s);
    if (inv) begin
      acc_re = p_rc - p_is;
      acc_im = p_ic + p_rs;
    end else begin
      acc_re = p_rc + p_is;
      acc_im = p_ic - p_rs;
    end
    acc_re = acc_re + prod_t'(1 << (TW_FRAC - 1));
    acc_im = acc_im + prod_t'(1 << (TW_FRAC - 1));
    y.re   = data_t'(acc_re >>> TW_FRAC);
    y.im   = data_t'(acc_im >>> TW_FRAC);
  end

endmodule
