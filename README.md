# Low-power isolated word recognizer (HMM, register-array architecture)

This is a single-chip recognizer for isolated spoken words. It uses continuous
hidden Markov models (HMMs), with one left-to-right model per vocabulary word.
It targets vocabularies of 100 to 1000 words at a low clock rate: 1000 words
in under 200 ms at 10 MHz.

The usual approach is frame-synchronous scoring. Every 11.6 ms speech frame is
scored against every word model, so the whole model set is fetched once per
frame. This design turns the loop inside out:

* **One word model is loaded into on-chip register arrays, once.** That is
  420 sixteen-bit values.
* **The whole utterance is then streamed past it.** That is the stored input
  vectors of all frames.
* **The arrays feed twelve processing elements in parallel**, one per HMM
  state. Each element consumes one vector element per clock.

As a result, model traffic from the external Flash drops by a factor equal to
the number of frames (86). Recognizing one word takes
`(3+2P)·N + P·T = 420 + 1376` clocks of streaming, plus a short drain.

The chip has two phases per utterance:

1. **Speech analysis.** Speech is sampled at 11.025 kHz and cut into
   128-sample frames. Each frame becomes a 16-element cepstrum vector, which
   is written to an external SRAM.
2. **Recognition.** For each word model in the external Flash, the model and
   then all stored vectors are streamed into the HMM recognition engine. The
   engine scores the word with the Viterbi algorithm and keeps the best word.

```
 A/D ──► sampling ──► analysis_ctrl ──► SRAM (input vectors)
                       │   ▲                 │
                       ▼   │                 ▼
                 fft_unit, log_stl     recog_bus_ctrl ◄── Flash (word models)
                 coef_rom                    │ 16-bit stream
                                             ▼
                                  hmm_engine ──► word_id, best_score
```

## The scoring arithmetic

All scores are **costs**: negative log probabilities, where smaller is
better. For word model `m`, state `j` (`N = 12` states) and frame `t`
(`T` frames, each a `P = 16` element vector `o_t`):

```
log b_j(o_t) = w_j + Σ_p s_jp · (o_tp + u_jp)²                  output cost of state j
δ_1(j)       = p_j + log b_j(o_1)                                first frame
δ_t(j)       = min( δ_{t-1}(j) + a_jj , δ_{t-1}(j-1) + a_(j-1)j ) + log b_j(o_t)
score(m)     = min_j δ_T(j)
```

The model is strictly left-to-right. A state is entered only from itself or
from its predecessor, so each frame's Viterbi update costs three operations
per state.

* **Initial cost.** `p_j` is not stored with the model. The path must start in
  state 0: `p_0 = 0`, and every other state starts as "impossible".
* **Decision.** The recognized word is the one with the **smallest** final
  cost. A tie keeps the earlier word.

### Number formats

Every quantity is fixed point with 8 fractional bits. Every stage saturates
instead of wrapping.

| quantity | width | where |
|---|---|---|
| input vector element `o_tp`, model values `u`, `s`, `w`, `a` | 16 | stream, register arrays |
| `o + u` | 13 | PE1 stage 1 |
| `(o + u)²`, product after `>>> 8` | 16 | PE1 stage 2 |
| `s · (o+u)²`, product after `>>> 8` | 16 | PE1 stage 3 |
| accumulated `log b_j` | 18 | PE1 stage 4, RA1 |
| path cost `δ` | 24 | PE2, RA2; `0x7FFFFF` marks an impossible path |
| word score reported | 16 | `score >>> 8`, saturated |
| word index | 10 | PE3; `word_id` adds a valid bit on top (11 bits) |

An impossible path stays impossible: adding a transition or output cost to it
gives the marker again. The marker is never saturated into a finite number.

## HMM recognition engine (`hmm_engine`)

The engine is a stream processor with one 16-bit input, using a valid/ready
handshake. It has a control unit, three register arrays, and three kinds of
processing element.

### Word-model stream format

Each word is a burst of `(3+2P)·N = 420` model words followed by `P·T` input
vector words, with no framing signal. The control unit counts the words. The
order within a model is:

| offset | content | array |
|---|---|---|
| `j·P + p` (0..191) | `u_jp`, state-major | MRA1 |
| `N·P + j·P + p` (192..383) | `s_jp` | MRA2 |
| `2·N·P + 3j + 0` | `w_j` | MRA3 column 0 |
| `2·N·P + 3j + 1` | `a_jj` (self transition) | MRA3 column 1 |
| `2·N·P + 3j + 2` | `a_(j-1)j` (entering transition; ignored for j = 0) | MRA3 column 2 |

The input vectors follow, frame by frame, with element `p` of frame `t` at
position `t·P + p`. The Flash holds the models back to back: model `m` starts
at word `m·420`.

### Register arrays (`mra`)

* **Write side.** One word per clock is written, addressed by a 4-bit row
  (state) and a 4-bit column.
* **Read side.** A read port returns a whole column at once: one value for
  each of the 12 states. That is what lets all twelve PE1s run from one
  broadcast input element.
* **Instances.** MRA1 (`u`) and MRA2 (`s`) are 12×16 with one read port each.
  MRA3 is 12×3 with three read ports, so `w`, `a_jj` and `a_(j-1)j` are all
  visible together.

### Output-cost array (`output_prob_unit`, `pe1`)

There are twelve identical PE1 pipelines, one per state, with four stages:
add, square, multiply by `s`, accumulate.

* **Element flow.** At each clock the control unit broadcasts one element
  `o_tp`. Each PE `j` reads `u_jp` and `s_jp` from the array column `p`.
* **Accumulator.** It is seeded with `w_j` on a frame's first element. After
  the last element (`p = P-1`), the twelve finished `log b_j(o_t)` values are
  copied into register array RA1. That happens 4 clocks after the element
  entered.
* **Throughput.** Together the array does 48 arithmetic operations per clock,
  or 480 MOPS at 10 MHz, and a new frame's results appear every P = 16 clocks.

### Viterbi update (`likelihood_unit`, `pe2`)

Two PE2s update the twelve path costs in RA2 within the 16 clocks before the
next RA1 arrives. A PE2 is purely combinational: two adders (`δ + a`), a
minimum, and a final adder (`+ log b`).

* **Update order.** States are visited from the last down to the first, two
  per clock, which takes 6 clocks per frame. The update can then be done in
  place: state `j` needs the *old* `δ(j-1)`, and going downwards guarantees
  that state `j-1` has not yet been rewritten. Going upwards would corrupt
  every path.
* **First frame.** RA1 carries a flag for the first frame. Then the PE2s
  apply the initial costs instead of the recursion.
* **Final minimum.** After the last frame the control unit asks for the
  minimum over the 12 states. It is found sequentially in 12 clocks.

### Decision (`pe3`)

PE3 is a comparator plus two registers: best score and best word index. A
word's score, reduced to 16 bits, replaces the kept one only if it is
strictly smaller. `pe3` is cleared at the start of each recognition pass.

### Control unit (`hmm_cu`) and timing

The control unit runs each word through three states:

1. **LOAD.** Takes the 420 model words into the arrays.
2. **COMPUTE.** Takes `P·T` input vector words and broadcasts them to the PE1s.
3. **DRAIN.** Waits for the PE1 pipeline and the last Viterbi update, requests
   the final minimum, and hands the score to PE3.

`in_ready` is high only in LOAD and COMPUTE. The source may insert gaps at any
time, and the engine simply waits.

With a gap-free stream a word takes `(3+2P)·N + P·T + 28` clocks. At the full
size (T = 86) that is **1824 clocks per word**: 182.4 ms for 1000 words at
10 MHz.

## Speech analysis

### Sampling (`sampling`)

A divider (`DIV = 907`) derives the 11.025 kHz conversion rate from a 10 MHz
clock.

* **Strobe.** `adc_clk` pulses for one clock per sample, and the 12-bit
  converter output is captured.
* **Conversion.** The code is treated as offset binary. It is converted to
  two's complement and placed in the top of a 16-bit word.
* **Other clocks.** `DIV` must be changed to keep the sample rate.

### Frame processing (`analysis_ctrl`)

Samples go into a 128-entry circular buffer. One frame is 128 samples, or
11.6 ms. Frames are back to back, without overlap. When a frame is complete,
the controller runs these steps:

1. **COPY.** The samples go into the FFT working memory, scaled up by `2^7`
   to 24 bits.
2. **WINDOW.** A Hamming window is applied, using the FFT unit's multiplier.
3. **FFT.** A forward 128-point FFT, halving at every stage.
4. **LOG.** For each bin the power `(Xr² + Xi²) >> 20` is formed, saturated
   to 24 bits, and its `log2` computed by `log_stl`. The result is written
   back as a real value.
   * The FFT memory holds data in bit-reversed order, and writing a bin's
     logarithm would overwrite a bin not yet read. Bins `k` and `bitrev(k)`
     are therefore processed as a pair.
5. **IFFT.** An inverse FFT of the log spectrum, halving at every stage.
6. **STORE.** Cepstral coefficients `c_1 … c_16` are shifted right by 8 and
   saturated to 16 bits. They are written to SRAM word `frame·16 + p`.
   `c_0`, the frame energy, is dropped.

A frame takes about 11,900 clocks (measured), against 116,096 clocks of frame time at
10 MHz. If a new frame completes while the previous one is still being
processed, `overrun` is set and stays set until the next `start`.

### FFT/IFFT circuit (`fft_unit`)

The FFT is a radix-2, decimation-in-time transform on 128 complex points of
24 bits. It has one 24×16 multiplier and one 24-bit adder/subtracter. That is
a small datapath sequenced over time, not a pipelined FFT.

* **Registers.** Reg1 holds the two butterfly inputs (`Xr, Xi, Yr, Yi`).
  Reg2 holds the two products being combined (`A, B`).
* **Coefficient selector.** It picks between the window and the twiddle
  factors in the coefficient ROM.
* **Scale flag.** When set, every butterfly output is halved. That prevents
  overflow over the 7 stages.
* **Butterfly timing.** A butterfly takes 10 clocks: read, four
  multiply/accumulate steps for `Y·W`, four add/subtract steps for
  `X ± Y·W`, and write.
* **Transform timing.** A transform is 7 × 64 butterflies, 4481 clocks.
* **Inverse.** The inverse transform uses conjugate twiddles and no extra
  `1/N`.
* **Memory order.** Points are stored bit-reversed on write, so results come
  out in natural order.

### Coefficient ROM (`coef_rom`)

The ROM holds 256 words in Q1.15:

| addresses | content |
|---|---|
| 0–127 | Hamming window `0.54 − 0.46·cos(2πn/127)` |
| 128–191 | `cos(2πk/128)` |
| 192–255 | `sin(2πk/128)` |

The table is computed at elaboration time with integer arithmetic only. A
quadrant split is followed by Taylor series in Q2.30. Every entry equals the
correctly rounded value of the formula.

### Logarithm (`log_stl`)

The logarithm is `log2` of a 24-bit value by sequential table lookup.

1. The input is normalised to a mantissa `m` in [1, 2), and the shift count
   gives the integer part.
2. For `k = 1 … 16`: if `m·(1 + 2^-k)` stays below 2, `m` is multiplied by it
   (a shift and an add). The table value `log2(1 + 2^-k)` is then subtracted
   from the fraction, which starts at 1.

The result is Q7.16, with an error of at most 2 LSB. It is ready 18 clocks
after `start`. `log2(0)` returns 0.

## Top level (`word_recognizer_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | begin an utterance (ignored while `busy`) |
| `num_words` | in | 11 | word models in Flash, 1 … 1024 |
| `num_frames` | in | 8 | frames per utterance `T` (86 = 1 s) |
| `adc_data` / `adc_clk` | in / out | 12 / 1 | A/D converter data and conversion strobe |
| `sram_we`, `sram_re`, `sram_addr`, `sram_wdata`, `sram_rdata` | | 1,1,11,16,16 | external SRAM; read data one clock after `sram_re` |
| `flash_re`, `flash_addr`, `flash_rdata` | | 1,19,16 | external Flash; read data one clock after `flash_re` |
| `word_id` | out | 11 | `{valid, index}` of the recognized word |
| `best_score` | out | 16 | its cost |
| `busy`, `done`, `overrun` | out | 1 | status; `done` pulses once per utterance |

**Operating sequence.**

1. Pulse `start`. Sampling begins immediately.
2. After `num_frames` frames are stored, recognition starts on its own.
3. `done` pulses once the last word is scored. `word_id[10]` then goes high.

The SRAM port belongs to the analysis controller while it is busy, and to the
recognition bus controller afterwards. The two phases never overlap, and an
assertion checks that.

Parameters of the top are `DIV` (907), `NFFT` (128), `FAW` (19, Flash
address width) and `SAW` (11, SRAM address width). The model sizes `N`, `P`
and the fixed-point widths are in `wr_pkg`.

## How the numbers compare with the published chip

| figure | published | this RTL |
|---|---|---|
| recognition time per word, 10 MHz | 0.18 ms | 0.182 ms (1824 clocks) |
| 1000 words, T = 86 | < 200 ms at 10 MHz | 182.4 ms at 10 MHz |
| output-cost throughput | 480 MOPS at 10 MHz | 12 PEs × 4 ops per clock = 480 MOPS |
| external traffic per word | 420 model + 1376 vector words | the same, exactly |
| 30 / 60 MHz operation | 0.059 / 0.029 ms per word | 0.061 / 0.030 ms per word by cycle count; timing closure not known |

The published chip was a 0.35 µm CMOS die. Power, area and the maximum clock
belong to that implementation and are not reproduced here.

## Where this design makes its own choices

The architecture follows the published design:

* the two phases;
* the word-at-a-time schedule;
* twelve four-stage PE1s and two PE2s;
* the register arrays;
* the widths 13/16/16/18/24/16/10 and 8 fractional bits;
* a 24-bit radix-2 DIT FFT with one multiplier and adder;
* a sequential-table-lookup logarithm;
* an 11.025 kHz, 128-sample frame.

The following were not specified and were chosen here:

* **Costs and decision.** Scores are costs, and the decision keeps the
  smallest. The published text speaks of a "higher likelihood" winning, which
  is the same decision expressed as a probability.
* **Initial state.** It is fixed, with `p_j` not part of the model.
* **Where `w_j` enters.** `w_j` is stored in MRA3 and seeds each PE1
  accumulator.
* **Data order.** The stream order and Flash layout above.
* **Handshake.** The valid/ready handshake, and the synchronous one-clock read
  latency of both external memories.
* **PE3 input.** PE3 receives the final Viterbi score, not a single frame's
  output cost.
* **Analysis working memory.** The 128-sample buffer and the FFT working
  memory are on chip. In the published system the SRAM also serves as FFT
  working memory; here it only holds the input vectors, because the FFT's
  24-bit complex points do not fit the 16-bit SRAM word without a packing
  scheme that was not specified.
* **Analysis arithmetic.** The Hamming window, the power-spectrum scaling,
  base-2 logarithm, and keeping `c_1 … c_16`.
* **Two controllers.** The analysis and recognition controllers are separate
  modules. The published design shows one control/bus-control block.
* **Conversion strobe.** The A/D converter is assumed to deliver offset-binary
  codes when strobed by `adc_clk`.
* **Reset.** Asynchronous and active low. Register arrays and memories are not
  reset, because they are always written before use.

Not part of the RTL: the external SRAM, Flash and A/D converter (the top
brings their ports out), and the physical implementation.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares against a model computed independently in the testbench, and prints
`TB_RESULT checks=… failures=…`.

* **End to end.** `tb_top_harness.sv` drives the full chip with:
  * a synthetic A/D waveform;
  * a behavioural SRAM and Flash (`sram_model.sv`, `flash_model.sv`);
  * word models generated from a hash function (`tb_util_pkg.sv`).
* **What it checks.**
  * Every stored cepstrum element, against a floating-point model of the same
    analysis chain. The error is within a few LSB.
  * The recognized word and its score, against a software Viterbi run over
    the stored vectors.
  * The recognition clock count.
  * That every mechanism occurred: windowing, FFT, IFFT, logarithm, pair
    handling, SRAM writes, Flash loads, words scored, decision updates and
    decision holds.
* **Configurations.**
  * `tb_word_recognizer_top` runs it with 8 words and 6 frames.
  * `tb_word_recognizer_full` runs the top with every parameter at its
    default: 1000 words, 86 frames, about 1.8 M recognition clocks. It takes
    about 12 s under Verilator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_word_recognizer_full rtl/wr_pkg.sv tb/tb_util_pkg.sv \
  tb/tb_word_recognizer_full.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench.
