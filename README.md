# Serial-pipelined 16-point FFT/IFFT processor

A through-wall radar sends ultra-wide-band pulses through a wall and listens
for the weak echo of whatever stands behind it. Small movements, such as
breathing or an arm swing, are far easier to see in the frequency domain than
in the raw echo. So the receiver feeds its samples to an FFT processor, and an
inverse FFT takes filtered spectra back to the time domain.

This RTL is that processor: a 16-point radix-2 decimation-in-time (DIT)
FFT/IFFT for 8-bit complex samples. It sits between two classic extremes:

* A **serial** FFT has one butterfly. It does every butterfly of every stage
  in turn, so it is small but slow, and most of the hardware sits idle.
* A **pipelined** FFT gives each stage its own hardware. It is fast but large.

Here each of the four stages has exactly **one** butterfly, which it uses
serially. The four stages all run at the same time. A new 16-sample frame
therefore enters while the previous frame is still in stages 3 and 4, and
back-to-back frames overlap in the pipeline. The processor takes one sample
per clock without a break. Two frames (32 samples) are done 50 clocks after
the first sample enters.

## The flow graph and its rows

The transform is the standard 16-point DIT flow graph. The samples enter in
bit-reversed order, `x(0), x(8), x(4), x(12), x(2), x(10), ...`, and the bins
come out in natural numbering. Number the 16 horizontal lines of the graph,
the *rows*, 0 to 15. Stage `s` (s = 1..4) has span `H = 2^(s-1)`. Its
butterflies combine row `p` (the *upper* operand) with row `p+H` (the *lower*
operand), for every `p` whose bit `H` is clear:

```
upper' = upper + W^k * lower
lower' = upper - W^k * lower        k = (p mod H) * 16 / (2H)
```

So stage 2 uses W^0 and W^4, stage 3 uses W^0, W^2, W^4, W^6, and stage 4
uses W^0 to W^7. Stage 1 only ever uses W^0.

## How one stage schedules itself

This is the core of the design. Every value in flight carries a small tag:
its row number (4 bits) and the frame's mode (forward or inverse). A stage
needs no schedule table or frame counter. It reads bit `H` of the row:

* **Bit clear (upper operand).** The value goes into the stage's *shift
  register*, a chain of `H` words, and waits there.
* **Bit set (lower operand).** Its partner, row `p-H`, is the oldest word in
  the shift register. The stage pops the partner and fires its single
  butterfly.

Stage 1 receives one sample per beat. Each later stage receives the pair that
one butterfly of the stage before produced (rows `p` and `p+H/2`). A pair of
lower operands needs two butterflies, one per clock, so that beat takes two
clocks. Here is what the stages see for one frame:

| stage | span | beats in (rows)                                        | butterflies fired, in order                               |
|-------|------|--------------------------------------------------------|-----------------------------------------------------------|
| 1     | 1    | 0, 1, 2, ... 15                                        | (0,1) (2,3) (4,5) ... (14,15)                             |
| 2     | 2    | (0,1) (2,3) (4,5) (6,7) ...                            | (0,2) (1,3) (4,6) (5,7) ...                               |
| 3     | 4    | (0,2) (1,3) (4,6) (5,7) (8,10) ...                     | (0,4) (2,6) (1,5) (3,7) (8,12) ...                        |
| 4     | 8    | (0,4) (2,6) (1,5) (3,7) (8,12) (10,14) (9,13) (11,15)  | (0,8) (4,12) (2,10) (6,14) (1,9) (5,13) (3,11) (7,15)     |

The upper operands of a half-group always arrive in the same order as their
partners. That is why a plain shift register, read at its far end, hands each
lower operand the right partner. Assertions in `fft_stage` check this: the
popped partner's row must be exactly `H` below the current row, and it must
come from the same frame mode.

Stage 4 emits its results in the order of the last column. That gives
`X[k]` and `X[k+8]` together, for `k = 0, 4, 2, 6, 1, 5, 3, 7`.

### Inside a stage

```
beat in ─► [input buffer] ─► shift register ─┐
                        │                    ▼
                        └── lower operand ─► add & subtract ─► register ─► twiddle multiplier ×2 ─► register ─► pair out
```

* **Shift register** (`fft_shift_reg`): holds `H` words (1, 2, 4, 8). Each
  push shifts in one or two words, and each pop takes the oldest word.
* **Add & subtract** (`fft_addsub`): forms the sum and difference. It is
  combinational.
* **Register** (`fft_pair_reg`): holds the pair.
* **Twiddle multiplier** (`fft_twiddle_mul`): the textbook DIT butterfly
  multiplies the lower operand by W^k before it adds. This design does that
  multiplication at the *end of the previous stage* instead. Each butterfly
  output is multiplied by the factor that the next stage needs for that row.
  A row that is an upper operand in the next stage gets W^0. The arithmetic
  is the same. Because both outputs of a butterfly may need a factor, each
  stage has two multipliers. Stage 1 needs nothing on its input, and stage 4
  only ever multiplies by W^0 = 1.
* **Register**: the stage output.

A butterfly result therefore leaves two clocks after its lower operand fires.

### Flow control and the input buffers

All links use valid/ready. Each of the two pipeline registers loads whenever
it is empty or the register after it is moving on, so bubbles close up. A
lower-operand beat waits only when the first register cannot load. Upper
operands go straight into the shift register and never wait.

At the end of every frame, stage 4 receives its four lower pairs in a burst.
It needs eight clocks of butterflies for them, and without help that backlog
would reach the input. So stages 2 to 4 each have a two-beat buffer
(`fft_beat_fifo`) at their input. Two beats is the smallest depth with which
a stream of one sample per clock never sees `in_ready` fall. A slow consumer
(`out_ready` low) still stalls the pipeline all the way back to the input,
and nothing is lost.

## Number formats

| quantity              | format                                                             |
|-----------------------|--------------------------------------------------------------------|
| input sample          | 8-bit signed real and imaginary parts                              |
| internal value, output | 13-bit signed (`DW = 8 + log2(16) + 1`); no stage can overflow    |
| twiddle factor        | 8-bit signed, 6 fraction bits: `round(64·cos(2πk/16))`, `round(64·sin(2πk/16))` |
| product               | full-precision complex product, rounded to nearest (add 32, arithmetic shift right by 6) |

W^0 is stored as exactly 64, so multiplying by it changes nothing. No scaling
is applied: the forward output is the full sum `X[k] = Σ x[n]·W^(nk)`. The
inverse output is `N·x[n]`; divide by 16 (shift right by 4) outside the
processor if you need the true inverse. Nearly all of the difference from an
exact DFT comes from the 8-bit twiddle factors. On random 8-bit frames, the
largest error seen in any output component was about 0.3 % of `Σ|x|`. The
testbenches allow up to 3 %.

## Interface (`fft_sp_top`)

There is one parameter, `POINTS`, the transform size. It defaults to 16 and
may also be 8, 4 or 2. The table below is for 16 points: at 8 points the
lanes carry `X[k]` and `X[k+4]`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `in_valid`, `in_ready` | in/out | 1 | sample handshake |
| `in_re`, `in_im` | in | 8 | sample, signed, bit-reversed order within the frame |
| `in_inv` | in | 1 | sampled with the first sample of each frame: 1 = inverse transform |
| `out_valid`, `out_ready` | out/in | 1 | result handshake |
| `out_re0`, `out_im0`, `out_idx0` | out | 13, 13, 4 | bin `X[k]`, with `k` in `out_idx0` |
| `out_re1`, `out_im1`, `out_idx1` | out | 13, 13, 4 | bin `X[k+8]` |
| `out_inv` | out | 1 | the mode the pair's frame was computed in |

An input counter numbers the accepted samples 0 to 15 and then wraps, so
frames need no start signal and no gap between them. After reset, the first
accepted sample starts a frame. Each frame produces 8 output beats.

Timing with `out_ready` held high:

* **Throughput:** one sample per clock, sustained, across frames.
* **Latency:** the frame's last output pair appears 18 clocks after its last
  sample is accepted.
* **Two back-to-back frames (32 samples):** 50 clocks from the first sample in
  to the last bin out.

## Where this design departs from its source description

The architecture follows a published description of a serial-pipelined FFT
for through-wall imaging. That description fixes the following: 16 points,
8-bit words, radix-2 DIT with bit-reversed input, four identical stages
(shift register → add & subtract → register → twiddle multiplier →
register), overlapping frames, and an FFT/IFFT processor at the receiver. It
also gives a partial cycle table of a schedule that finishes 32 samples in 81
clocks. This RTL differs or adds in these places:

* **Cycle schedule.** The source's table leaves idle input cycles, and only
  parts of it are given. This design does not copy it clock for clock. It
  keeps the source's firing order within each stage and its output pairing,
  and takes one sample per clock. It finishes 32 samples in 50 clocks rather
  than 81.
* **Twiddle placement.** The multiplication sits at the end of each stage, as
  the architecture drawing shows, not before the add as in the butterfly
  drawing. The arithmetic is the same.
* **Design choices of this RTL:** the row tags, the valid/ready handshakes,
  the two-beat input buffers, the two multipliers per stage, the complex
  input (the source gives only the 8-bit width), the 13-bit internal width,
  the twiddle format and rounding, the inverse mode through conjugate
  twiddles with no 1/N scaling, and the synchronous reset.
* **Smaller sizes.** The `POINTS` parameter of `fft_sp_top` also allows 2,
  4 or 8 points, and then builds log2(POINTS) stages. The source also
  describes an 8-point run. No other size is built: the twiddle table holds
  only the 16th roots of unity, which include the roots of the smaller
  sizes.
* **Not included:** the radar transmitter, the receiver front end and the
  display. They are analog or system parts, and the processor only touches
  them through its input and output streams.

## Files

| file | contents |
|------|----------|
| `rtl/fft_pkg.sv` | sizes, `cplx_t`/`sample_t` types, twiddle tables |
| `rtl/fft_sp_top.sv` | processor top: input row counter, frame mode, log2(POINTS) stages |
| `rtl/fft_stage.sv` | one stage: control, shift register, butterfly, multipliers, registers |
| `rtl/fft_shift_reg.sv` | operand shift register |
| `rtl/fft_addsub.sv` | butterfly sum and difference |
| `rtl/fft_twiddle_mul.sv` | multiplication by W^k or its conjugate |
| `rtl/fft_pair_reg.sv` | pipeline register for a pair with valid |
| `rtl/fft_beat_fifo.sv` | two-beat buffer in front of stages 2 to 4 |
| `tb/fft_ref_pkg.sv` | reference models: integer flow graph, exact DFT error |
| `tb/fft_run.sv` | stream driver and checker for one processor of a given size |
| `tb/fft_workload_tb.sv` | 16- and 8-point streaming runs |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks itself and ends with a line `TB_RESULT checks=N
failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/fft_pkg.sv tb/fft_ref_pkg.sv tb/fft_sp_top_tb.sv --top-module fft_sp_top_tb
./obj_dir/Vfft_sp_top_tb
```

Replace `fft_sp_top_tb` with `fft_stage_tb`, `fft_shift_reg_tb`,
`fft_addsub_tb`, `fft_twiddle_mul_tb`, `fft_pair_reg_tb`,
`fft_beat_fifo_tb` or `fft_workload_tb` to run the others. Each finishes in well under a second.

What the testbenches check:

* **`fft_sp_top_tb`** runs the full-size processor with default parameters.
  It checks every output pair bit for bit against the integer model of the
  flow graph in `fft_ref_pkg`. That model takes its twiddles from `$cos` and
  `$sin`, not from the RTL table. Each pair is also checked against an exact
  DFT within the fixed-point error bound. The test sends 64 frames:
  * a single frame, where it checks the 18-clock latency;
  * two back-to-back frames, where it checks the overlap, the 50 clocks
    (no more than 81), and that no stall occurs at full rate;
  * inverse frames and full-scale frames;
  * random traffic with input gaps, moderate and then heavy output
    back-pressure, and random modes.

  It also counts frame overlaps, input stalls, output back-pressure, inner
  stages waiting on their successor, and forward↔inverse mode switches. It
  fails if any of them never happens.
* **`fft_workload_tb`** streams 40 frames back to back into a 16-point and
  an 8-point processor. It checks every bin, that the input never stalls,
  and the two-frame times: 50 clocks for 32 samples at 16 points, and 27
  clocks for 16 samples at 8 points.
* **`fft_stage_tb`** drives stage 1 and stage 3 with the row order their
  predecessors produce. It checks each butterfly with its twiddle, and the
  2- and 3-clock latencies.
* **The smaller testbenches** cover the corners and random cases of the
  arithmetic, the order of the shift register, register enables, and buffer
  ordering and fill.

## Changing the design

* **Word width:** `IN_W` in `fft_pkg`. `DW` follows it.
* **Twiddle precision:** `TW_W`, `TW_FRAC` and the two tables in `fft_pkg`.
  The tables hold `round(2^TW_FRAC · cos(2πk/16))` and the same for `sin`,
  for k = 0..7.
* **Input buffer depth:** the `FIFO_DEPTH` parameter of `fft_stage`. At 1,
  a stream of one sample per clock stalls in every frame.
* **Transform size:** set `POINTS` on `fft_sp_top` to 2, 4, 8 or 16. Going
  above 16 means changing several things: `N` and `LOG2N` in `fft_pkg`, the
  twiddle tables, and the 3-bit exponent port of the multiplier. A stage's
  twiddle exponents depend only on its span,
  `k = (row mod 2H)·16/(4H)` in units of W_16. So the stage logic itself
  needs no change.  
