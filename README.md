# One FFT core, one knob: trading throughput for area with parallel and folded MDC pipelines

A pipelined FFT is usually built for exactly one rate: a radix-2² multi-path
delay commutator (R2²MDC) FFT takes two samples per clock and delivers one
N-point transform every N/2 clocks. Applications want other rates. Some need
several times that rate, while others can live with a fraction of it and want
the area back. This core makes the rate a parameter, the *throughput factor*
`t`:

* **t ≥ 1, vertical expansion.** `t` copies of the R2²MDC pipeline run side
  by side and take 2t samples per clock. While the butterfly distance is still
  large, each copy reorders its own data with delay commutators. Once the
  distance falls below `t`, the copies swap data through fixed wiring
  patterns, the *interconnection permutations* I_n, which need no registers.
  `t = N/2` is a fully parallel FFT with no delay registers at all.
* **t = 1/f < 1, horizontal compression.** Only log2(N)/f stages of a radix-2
  MDC FFT are built, and every frame goes through them `f` times. A frame
  buffer holds the frame between passes.

For a given `t`, exactly one architecture is built. The cost per `t` is:

| architecture | t | complex multipliers | butterflies | delay words | samples / clock |
|---|---|---|---|---|---|
| R2²MDC, expanded | 1, 2, 4, …, N/2 | t·(2⌈log4 N⌉ − 2) | t·log2 N | N − 2t | 2t |
| R2MDC, folded | 1/f, f divides log2 N | log2(N)/f (log2(N) − 1 for f = 1) | log2(N)/f | at most N in commutators, plus a 2N-word frame buffer | 2 while loading |

With the defaults (N = 256, t = 1), the core is a classic 8-stage R2²MDC
FFT. It has 6 multipliers and 254 delay words, takes 2 samples per clock,
produces one transform every 128 clocks, and has a latency of 138 clocks.

## The transform being computed

Every configuration computes the same arithmetic. It is a decimation-in-frequency
radix-2 FFT of N = 2^M points in M butterfly stages. Stage `l` combines
elements that are D = N/2^(l+1) apart, so D = N/2 in the first stage and
D = 1 in the last. Each butterfly produces

    a' = (a + b) / 2
    b' = (a - b) / 2 · W_N^e

The output is X(k)/N, and it comes out in **bit-reversed order**.

The radix-2² version keeps the same butterflies but regroups the twiddle
factors two stages at a time:

* In the odd stage of each pair, the only factor needed is −j. That butterfly
  (BFII) applies −j by swapping real and imaginary parts and negating one,
  with no multiplier.
* All other factors are merged into one multiplication after the BFII. The
  merged exponent for the element at base index `i` of stage `l` (odd) is
  `(k1 + 2·lane) · j2 · 2^(l−1)`. Here `j2 = i mod D`, `k1` is bit
  log2(2D) of `i`, and `lane` is 0 for the upper output and 1 for the lower
  output.

This is why R2²MDC needs multipliers after every second stage only. The last
BFII is followed by none, which gives 2⌈log4 N⌉ − 2 multiplier columns. For an
odd M, the pipeline ends with a lone BFI.

## Stream order

The two inputs of unit `u` of the first stage are the two halves of the
frame. With `U` units in the first stage (U = t when expanded, 1 when folded),
input clock `c` of a frame carries:

    in_data[2u]   = x[c·U + u]
    in_data[2u+1] = x[c·U + u + N/2]

A frame therefore lasts N/(2U) clocks. The output is written in the same lane
scheme: output clock `c`, lane `w` carries X(k)/N with
`k = bitrev_M(c·2U + w)`. `out_sof` marks the first output clock of a frame.

## Vertical expansion: how t pipelines share one FFT

This is the hard part. The question is which unit sees which pair of elements
at which clock. Everything else follows from that.

**Schedule.** Unit `u` of stage `l` handles, at clock `c` after the stage's
frame start, the butterfly whose upper element has index

* `base = (c / (D/t))·2D + (c mod (D/t))·t + u` while D ≥ t
  (a *temporal* stage: the pairs of one butterfly block are spread over
  D/t clocks);
* `base = c·2t + (u / D)·2D + (u mod D)` once D < t
  (a *spatial* stage: several whole butterfly blocks are handled in one clock,
  spread across the units).

Its partner is `base + D`. `fft_pkg::pair_base` gives this formula, and the
twiddle ROMs and the testbenches use it too.

**Between two temporal stages** (next distance D/2 ≥ t), every unit reorders
its own two paths with a delay commutator of d = (D/2)/t registers:

* The lower path is delayed by d.
* A switch crosses the two paths for d clocks out of every 2d.
* The upper path is then delayed by d.

The delay is 1/t of the single-pipeline delay. A unit never needs data from
another unit in these stages, so the copies run independently.

**Between two spatial stages** (next distance D/2 < t), all the elements of
a butterfly block are present in the same clock. The reorder is then plain
wiring. The 2t wires are cut into groups of n = 4·(D/2) = 2D wires. Inside
each group, wire `i` (output `i mod 2` of unit `i/2`) goes to position:

    i <  n/2 :  i + (i mod 2)·(n/2 − 1)
    i >= n/2 :  i + (i mod 2)·(n/2 − 1) − (n/2 − 1)

This is I_n. I_4 swaps wires 1 and 2. I_8 sends 1→4, 3→6, 4→1, 6→3 and
leaves the even wires below 4 and the odd ones above it in place. Wires that
were n/4 apart now meet in one butterfly.

**Example, N = 16, t = 4.** The stages and their transitions are:

| stage | type | distance D | schedule | transition to next stage |
|---|---|---|---|---|
| 0 | BFI | 8 | temporal, 2 clocks per block | commutator, d = 1 |
| 1 | BFII | 4 | temporal, 1 clock per block | multipliers, then I_8 |
| 2 | BFI | 2 | spatial | I_4 |
| 3 | BFII | 1 | spatial | output |

The only delay registers are the 4 commutators of 2 words each, which is
8 = N − 2t. Going from t to 2t halves every commutator and adds one more
I_n column at the end, so the register count N − 2t falls as the
multiplier and adder counts rise.

**Where −j is applied.** A BFII needs −j on its lower input when the element
pair lies in the second half of a block of the previous BFI, that is, when
bit log2(2D) of `base` is set. In a temporal stage, this bit is a bit of the
clock position within the frame. In a spatial stage, it is a fixed property
of the unit, `(u / D) mod 2`, so it becomes constant wiring.

**Control.** A `{valid, sof}` pair travels beside the data and is delayed by
the same registers as the data. Each stage derives its own frame position
from it with a counter (`frame_pos`). The commutator swap signals and the
twiddle ROM addresses come from these positions, so the pipeline needs no
central controller. A frame must be N/(2t) consecutive valid clocks. Frames
may follow back to back or with gaps between them.

## Horizontal compression: folding R2MDC stages

A radix-2 MDC stage is more regular than an R2²MDC stage: every stage is a
butterfly followed by one multiplier on the difference output. Any stage can
therefore stand in for any other, provided its twiddle ROM and commutator
delay follow. For t = 1/f, the core builds S = log2(N)/f such stages. On
pass p, physical stage s computes FFT stage l = p·S + s.

* **Twiddle ROM.** Each multiplier's ROM holds the factors of the f stages it
  serves, addressed by `pass·N/2 + position`. The radix-2 exponent is
  `(base mod D)·2^l`.
* **Variable commutator.** The commutator between physical stages s and
  s+1 is sized for its longest delay, N/2^(s+2), which occurs on pass 0. A
  tap selects the delay N/2^(l+2) of the stage pair currently computed.
* **Frame buffer.** The last stage writes each output pair to the in-place
  index it stands for. The next pass reads the pairs back in the order its
  first stage consumes them, so the buffer also performs the reordering that
  a commutator would do there. The buffer has two banks of N words: pass p
  writes bank p mod 2 and reads the other, so a pass never overwrites words
  that are still to be read.
* **Controller.** The controller has four states:
  * IDLE: waits for a new frame.
  * LOAD: takes a frame from the input in N/2 clocks.
  * WAIT: waits until the pass has drained into the buffer.
  * FEED: replays the buffer into stage 0 for the next pass.

  `in_ready` is high in IDLE and LOAD. Outputs are shown only on the last
  pass.
* **f = 1.** Folding by 1 gives a plain streaming R2MDC with log2(N) − 1
  multipliers, because the last stage's factors are all 1. Frames then
  stream back to back.

## Arithmetic

* Samples are complex with `DATA_W` = 16-bit signed parts.
* Twiddles are `TW_W` = 16 bits with `TW_FRAC` = 14 fraction bits, so
  +1.0 is exact. They are computed at elaboration time from `$cos`/`$sin`
  and rounded to nearest. No table files are needed.
* Every butterfly halves its results (arithmetic shift, computed one bit wider
  to avoid overflow). The output is therefore X(k)/N and cannot grow.
* The multiplier forms the four products at full width, rounds to nearest,
  and saturates.
* Each stage can add up to about half an LSB of error. Against an exact DFT
  the testbenches accept 3 LSB per component for N ≤ 256 and 6 LSB for
  N = 1024.
* **Accuracy.** With the defaults and random inputs of ±23000, the
  signal-to-quantization-noise ratio of the output is about 61 dB. Halving in
  every stage keeps the result in range but drops one bit of the result per
  stage, so wider words or less aggressive scaling are needed to get much
  beyond that.
* **Input range:** each component must stay below 2^15 in magnitude. A
  full-scale value of −2^15 on both components can saturate a multiplier.
  The testbenches use random values up to ±23000.

## Blocks

| file | role |
|---|---|
| `fft_pkg.sv` | types (`cplx_t`, `strm_ctrl_t`), widths, and the schedule, twiddle-exponent and twiddle functions |
| `fft_core.sv` | top level: parameters `N`, `T_NUM`, `T_DEN` (t = T_NUM/T_DEN); selects one of the two architectures |
| `r22mdc_vexp.sv` | R2²MDC with t parallel pipelines, commutators and I_n columns |
| `r2mdc_hcomp.sv` | folded R2MDC with frame buffer and pass controller |
| `bfi.sv`, `bfii.sv` | registered radix-2 butterfly; BFII adds the −j input option |
| `complex_mult.sv` | registered complex multiplier with rounding and saturation |
| `twiddle_rom.sv` | per-multiplier constant ROM with one registered read per clock |
| `delay_commutator.sv`, `var_commutator.sv` | fixed-delay commutator and tapped (variable) commutator |
| `perm_in.sv` | the I_n wiring |
| `delay_line.sv`, `frame_pos.sv` | shift register (optional reset); frame position counter |

### Interface and timing of `fft_core`

| port | direction | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `in_valid` | in | `in_data` carries a word |
| `in_ready` | out | a frame may be offered; always 1 for t ≥ 1 |
| `in_data[LANES]` | in | `cplx_t` lanes as in *Stream order*; LANES = 2t, or 2 when folded |
| `out_valid`, `out_sof` | out | output word valid; first word of a frame |
| `out_data[LANES]` | out | X(k)/N, bit-reversed |

* **Expanded cores.** The latency from a frame's first input clock to its
  first output clock is M + (number of multiplier columns) + (sum of the
  commutator delays). This is 138 for N = 256, t = 1. A new frame can start
  every N/(2t) clocks.
* **Folded cores.** Each pass adds its pipeline latency, and each pass after
  the first adds N/2 feed clocks. A new frame is accepted only after the
  last word of the previous frame has left the last stage.

## How far it follows the radix-2² MDC expansion and R2MDC folding schemes

These parts follow the schemes as published:

* the choice of architecture from t;
* the stage structure of R2²MDC (BFI, BFII, two multipliers after each
  non-final BFII);
* the commutator delays divided by t;
* the I_n formula and its placement;
* the multiplier and register counts of the table above, for expanded cores;
* the folding rule (f divides log2 N; S = log2(N)/f stages passed f times).

These are this design's own choices or departures:

* **Input and output order.** Unit u takes x[cU+u] and x[cU+u+N/2]. This
  choice keeps every commutator inside its own pipeline. The output is
  bit-reversed only. The published generator offers other orders; none is
  built here.
* **No first commutator in R2MDC.** The classic R2MDC starts with a
  commutator of N/2 words that splits a serial stream into two halves. Here
  the input already arrives as two half-frame streams, as for R2²MDC.
* **Frame buffer of 2N words.** The published cost of the folded core counts
  N registers. Two banks are used here so that the next pass can read while
  the current one writes.
* **Throughput of folded cores** is below the ideal 2t/N. A frame occupies
  the stages for f passes of N/2 clocks, plus the pipeline latency of every
  pass, and passes of different frames are not overlapped.
* **Pipeline registers** after every butterfly and multiplier are added on
  top of the published datapath register counts. They add latency, not
  delay words.
* **Widths and scaling are fixed** in `fft_pkg`: 16-bit data, 16-bit
  twiddles, and 1/2 per stage. The published generator lets bit widths be
  chosen per design. Here they are changed by editing the package, and the
  16-bit twiddles are what keep the error within the stated bounds.
* **Accuracy below the published figure.** The published results quote an
  SQNR of 80 to 90 dB for generated cores without stating the word width.
  The 16-bit, halve-every-stage arithmetic here reaches about 61 dB.
* **t is limited to** powers of two from 1 to N/2, or 1/f with f dividing
  log2 N. Mixed forms such as 2/3, or expanding and folding at once, are not
  supported. The core stops elaboration with an error if `T_NUM` > 1 is
  combined with `T_DEN` > 1.
* **Fully parallel case.** For t = N/2, the throughput counted as 2t/N is
  one transform per clock. This is what the RTL delivers.
* **Not included.** The Pease-style baselines the scheme is measured against,
  and the search software that picks t from a throughput target, are not
  part of this RTL.

## Verification

Every testbench is self-checking and ends with
`TB_RESULT checks=<n> failures=<n>`. The transform checks compare against a
direct DFT (divided by N) computed in the testbench, with random inputs.

| testbench | what it runs |
|---|---|
| `tb_bfi`, `tb_bfii`, `tb_complex_mult` | random operands against a behavioural model, including −j and saturation |
| `tb_twiddle_rom`, `tb_delay_commutator`, `tb_perm_in` | ROM contents, commutator ordering, the I_4/I_8 maps and I_16 |
| `tb_r22mdc_vexp` | N = 16 with t = 1, 2, 4, 8; N = 32 with t = 1, 4; N = 64 with t = 2. Checks data, latency and frame spacing |
| `tb_r2mdc_hcomp` | N = 16 with f = 1, 2, 4; N = 64 with f = 1, 2, 3, 6; N = 256 with f = 2. Checks data and pass-schedule latency under the ready handshake |
| `tb_fft_core` | top level for N = 64, t = 1/6 … 32, and N = 256, t = 1/2 and 4. Also counts each mechanism exercised: −j butterflies, commutator swaps, I_n columns, frame-buffer passes, input stalls |
| `tb_fft_core_full` | the top with default parameters (N = 256, t = 1), four frames; latency 138, one frame per 128 clocks, SQNR at least 55 dB |
| `tb_fft_workloads` | the evaluated configurations: N = 256 with t = 1/8, 1/4, 1/2, 1 … 32, and N = 1024 with t = 1/10, 1/5, 1/2, 1 … 16, two frames each |

To run one, with plain Verilator 5 from the top directory:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/fft_pkg.sv tb/tb_fft_pkg.sv tb/tb_fft_core.sv \
        --top-module tb_fft_core -Mdir obj_core
    ./obj_core/Vtb_fft_core

Replace `tb_fft_core` with any testbench name. The other modules are found
through `-I`, since each file holds one module of the same name.
`tb_fft_workloads` builds 17 cores and takes a few minutes to compile; the
others take seconds.

## Changing it

* **Size and rate.** Set `N` (a power of two; sizes 16 to 1024
  are tested) and either
  `T_NUM = t` with `T_DEN = 1`, or `T_NUM = 1` with `T_DEN = f`. The lane
  count follows automatically.
* **Widths.** Change `DATA_W`, `TW_W` and `TW_FRAC` in `fft_pkg.sv`. The
  butterflies and the multiplier size their intermediates from these
  constants. Retune the testbench tolerances to match.
* **Run-time assertions** (`--assert`) check the framing: a frame must be
  contiguous, and in a folded core `in_valid` must stay high through LOAD.
