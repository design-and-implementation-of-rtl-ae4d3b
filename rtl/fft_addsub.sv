// fft_addsub: the add & subtract half of a radix-2 butterfly.
//
// Given the upper operand a and the already twiddle-weighted lower operand b,
// it forms a + b and a - b, component by component, in one combinational
// step. In the butterfly of the published architecture the lower input is multiplied by
// W_N^k before this point; in this design that product is formed at the end
// of the previous stage, so here only the sum and difference remain.
//
// Interface: a, b in; sum, diff out (all cplx_t, DW bits per component).
// Timing: purely combinational. The word width leaves headroom for the full
// 16-point growth, so no result wraps for 8-bit inputs.
module fft_addsub
  import fft_pkg::*;
(
  input  cplx_t a,
  input  cplx_t b,
  output cplx_t sum,
  output cplx_t diff
);

  always_comb begin
    sum.re  = a.re + b.re;
    sum.im  = a.im + b.im;
    diff.re = a.re - b.re;
    diff.im = a.im - b.im;
  end

endmodule
