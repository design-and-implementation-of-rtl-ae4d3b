// fft_pkg: shared types and constants of the 16-point serial-pipelined FFT.
//
// The transform is a radix-2 decimation-in-time FFT of N = 16 points taking
// 8-bit signed complex samples. All stages use one internal word width, DW,
// wide enough that no stage can overflow: every stage at most doubles the
// magnitude, the twiddle rotation can grow a single component by sqrt(2), so
// DW = IN_W + LOG2N + 1 bits hold every intermediate value.
//
// Twiddle factors W_16^k = cos(2*pi*k/16) - j*sin(2*pi*k/16), k = 0..7, are
// held as signed fixed point with TW_FRAC = 6 fraction bits, so the stored
// values are round(64*cos(2*pi*k/16)) and round(64*sin(2*pi*k/16)) in 8-bit
// words (the 8-bit width follows the published architecture's word size; the fraction
// split is this design's choice).
//
// Every value travelling through the pipeline carries a tag: its row index in
// the DIT flow graph (pos) and a flag selecting the inverse transform (inv).
package fft_pkg;

  localparam int unsigned N       = 16;
  localparam int unsigned LOG2N   = 4;
  localparam int unsigned IN_W    = 8;
  localparam int unsigned DW      = IN_W + LOG2N + 1;
  localparam int unsigned TW_W    = 8;
  localparam int unsigned TW_FRAC = 6;

  typedef logic signed [DW-1:0]    data_t;
  typedef logic signed [TW_W-1:0]  tw_t;
  typedef logic [LOG2N-1:0]        pos_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  // One value in flight together with its flow-graph row and transform mode.
  typedef struct packed {
    cplx_t v;
    pos_t  pos;
    logic  inv;
  } sample_t;

  // cos(2*pi*k/16) * 2^TW_FRAC, rounded, for k = 0..7.
  function automatic tw_t tw_cos(input logic [2:0] k);
    case (k)
      3'd0: return tw_t'(64);
      3'd1: return tw_t'(59);
      3'd2: return tw_t'(45);
      3'd3: return tw_t'(24);
      3'd4: return tw_t'(0);
      3'd5: return tw_t'(-24);
      3'd6: return tw_t'(-45);
      default: return tw_t'(-59);
    endcase
  endfunction

  // sin(2*pi*k/16) * 2^TW_FRAC, rounded, for k = 0..7.
  function automatic tw_t tw_sin(input logic [2:0] k);
    case (k)
      3'd0: return tw_t'(0);
      3'd1: return tw_t'(24);
      3'd2: return tw_t'(45);
      3'd3: return tw_t'(59);
      3'd4: return tw_t'(64);
      3'd5: return tw_t'(59);
      3'd6: return tw_t'(45);
      default: return tw_t'(24);
    endcase
  endfunction

endpackage
