# MRE Viterbi decoder for the IS-95 reverse link (rate 1/3, K = 9)

A Viterbi decoder normally needs a large survivor memory: a trace-back
decoder stores one decision bit per state per trellis stage (45 x 256 bits
for this code) and then walks back through it; a register-exchange decoder
stores the same amount as tentative decoded bits and shifts all of them every
stage. The *modified register exchange* (MRE) method observes that, when one
bit is decoded per pass over the window, only the **first** decision of each
surviving path is ever used. Each state therefore keeps a single bit, the
input bit of its survivor's first transition. After the trace-forward the
state with the smallest path metric names the survivor, its bit is the
decoded bit, and no trace-back is needed.

This repository holds synthesizable SystemVerilog for such a decoder, for the
IS-95 reverse-link convolutional code, together with the matching encoder.
It follows the MRE decoder of C. Lee, "A Viterbi Decoder with Efficient
Memory Management"; the points where the RTL makes its own choices are listed
in [Choices and departures](#choices-and-departures).

| Item | Value |
|---|---|
| Code | rate 1/3, constraint length K = 9, 256 states |
| Generators (octal) | C0 = 577, C1 = 663, C2 = 711 (parameter `G`) |
| Soft input | 3 bits per code bit, 9 bits per symbol |
| Trace-forward depth | L = 5K = 45 symbols |
| Path metrics | 10 bits, 256 x 10 = 2,560 bits |
| Decision memory | 256 x 1 bit |
| Input window | 45 symbols x 9 bits = 405 bits (+ 45 frame-end flags) |
| Throughput | one decoded bit per 45 clocks on a continuous stream |
| ACS | 256 add-compare-select elements in parallel, one stage per clock |

## How one bit is decoded

Decoding is a sequence of *decoding processes*, one per information bit.
Process t knows the encoder state at time t (the *initial state*; state 0 at
the start of a frame) and looks at symbols t ... t+44:

1. **Start.** The initial state gets path metric 0, every other state the
   all-ones "unreachable" value 1023.
2. **First stage.** All 256 ACS elements run. A state reached in this stage
   stores the input bit of the transition into it, which is its own bit 0.
3. **Stages 2 to 45.** Every state adds branch metrics to the metrics of
   its two predecessors, keeps the smaller sum, and copies the stored bit of
   the winning predecessor. The 256 stored bits move with the survivors, as
   in register exchange, but only this one bit per state is kept.
4. **Decision.** The state with the smallest metric ends the maximum-likelihood
   path. Its stored bit is the decoded bit u_t. The state after the first
   transition of that path, `{init[6:0], u_t}`, is the initial state of
   process t+1, which uses the window moved on by one symbol.

Because every process restarts its metrics, they never grow beyond
45 x 21 = 945, so 10 bits suffice and no metric normalisation exists. The
adds saturate at 1023, which keeps unreachable states unreachable during the
first eight stages.

The price of the method shows at the end of a frame. A full register
exchange reads the last 44 bits of a frame out of its final pass; the MRE
decoder has discarded them, so it keeps running one process per bit, with
windows that shrink as they reach the frame end. A frame of m symbols
needs m processes.

### State numbering

A state holds the last eight input bits, the most recent one in bit 0. The
successor of state `s` on input `u` is `{s[6:0], u}`; the predecessors of
state `n` are `{0, n[7:1]}` and `{1, n[7:1]}`, both on input `n[0]`. The
encoder's register vector for a transition is `v = {s, u}` (`v[0]` current
bit, `v[i]` the bit i steps ago); the most significant bit of an octal
generator taps `v[0]`, its least significant bit taps `v[8]`.

### Soft symbols and branch metrics

Each code bit arrives as a 3-bit value, 0 = confident '0' ... 7 = confident
'1'. A symbol is packed as `{r2, r1, r0}` for code bits C2, C1, C0. The
branch metric of a code word is the sum over its three bits of `r` (for a '0')
or `7 - r` (for a '1'), 0 ... 21. All eight code-word metrics are computed
once per stage and each ACS element picks its two by a constant index.

## Timing and control

The controller lives in `vit_decoder`. A stage counter `k` runs 0 ... 44 and
stage `k` reads the symbol `head + k` of the input buffer, where `head` is the
symbol whose bit is being decoded.

* **Stall.** If symbol `head + k` has not arrived yet, the stage waits; the
  metrics hold.
* **Window end.** The window ends after stage 44, or earlier at a symbol
  flagged `in_last` (frame end).
* **Decide cycle, overlapped.** The clock after the last stage is a decide
  cycle: the comparator tree picks the survivor from the stored metrics, the
  bit is registered to the output, the head symbol is popped, and in the
  same clock stage 0 of the next process already runs. It reads the start
  metrics that the PM memory shows while `init` is high, built from the
  newly found initial state. A continuous stream therefore gives exactly one
  bit every 45 clocks, and the decision-to-next-stage path (comparator tree,
  state shift, first ACS stage) is the longest combinational path.
* **Frame end.** When the popped head symbol was flagged last, the bit is
  output with `out_last` and the initial state returns to 0 for the next
  frame, whose symbols may already be waiting in the buffer.
* **Back-pressure.** The buffer holds 45 symbols; `in_ready` drops while it
  is full. In a stream the source is held off until each pop, so one symbol
  enters per decoded bit.

Output timing: the bit of symbol t is registered in the decide cycle that
follows the stage reading symbol t+44 (or the frame's last symbol, if that
comes first), and `out_valid` pulses one clock later. There is no output
back-pressure.

## Blocks

| Module | Role |
|---|---|
| `vit_pkg` | code constants (K, rate, widths, generators) |
| `conv_enc` | IS-95 rate 1/3, K = 9 encoder; `clear` starts a frame from state 0 |
| `vit_input_buffer` | 45-entry circular buffer of soft symbols with frame-end flags, read relative to the head |
| `vit_bm_calc` | eight soft branch metrics per symbol |
| `vit_acs` | one add-compare-select element with saturating add and one-bit exchange |
| `vit_acs_array` | 256 `vit_acs` elements wired to the trellis |
| `vit_pm_mem` | 256 x 10-bit path metric registers with the start-metric read mode |
| `vit_dec_mem` | 256 x 1-bit decision memory |
| `vit_decision_unit` | comparator tree for the smallest metric, decoded bit, next initial state |
| `vit_decoder` | the decoder: the blocks above plus the controller |
| `is95_viterbi_top` | encoder and decoder side by side, each with its own ports |

Data flow inside `vit_decoder`: input buffer -> branch metrics -> ACS array
<-> PM memory and decision memory -> decision unit -> decoded bit.

The encoder and decoder in the top are not connected: the channel between
them (modulation, noise, soft demodulation) is outside this design.

## Interfaces

`vit_decoder` (and the `dec_*` ports of the top):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` / `in_ready` | in / out | 1 | symbol handshake |
| `in_sym` | in | 9 | `{r2, r1, r0}` |
| `in_last` | in | 1 | last symbol of a frame |
| `out_valid` | out | 1 | decoded bit valid (one-clock pulse) |
| `out_bit` | out | 1 | decoded bit |
| `out_last` | out | 1 | this bit is the last of a frame |

`conv_enc` (`enc_*` ports of the top): `clear`, `in_valid`, `in_bit` in;
`out_valid`, `out_code = {C2, C1, C0}` out, one clock after the bit.

## Choices and departures

What follows the published design: the MRE principle (one first-stage bit
per state, decision by smallest metric, next initial state from the decoded
bit), the code (rate 1/3, K = 9, generators as printed there: 577, 663,
711), L = 45, 3-bit soft inputs, 10-bit metrics, fully parallel ACS, the
memory sizes (405 + 2,560 + 256 bits), and 45 clocks per decoded bit.

Choices made here, where the publication gives no detail:

* **Generators.** The publication prints 577 for the first polynomial; the
  IS-95 standard is usually quoted with 557. The default keeps 577; pass
  `G = {9'o711, 9'o663, 9'o557}` to `conv_enc` and `vit_decoder` for 557.
* **Branch metric.** Linear soft distance (see above) rather than a squared
  Euclidean distance; it needs no multiplier and fits the 10-bit metrics.
* **Ties.** An ACS tie keeps the predecessor with top bit 0; equal final
  metrics pick the lowest state number.
* **Frame handling.** Frame-end flags travel with the symbols, the last 44
  windows of a frame are shortened, and each frame starts in state 0. The
  publication counts 45 clocks for every process; here a shortened window
  takes as many clocks as it has symbols. Measured, from first symbol in to
  last bit out:

  | Frame (symbols) | Clocks | Bits per clock | With 45 clocks per process |
  |---|---|---|---|
  | 45 | 1,037 | 0.043 | 0.022 |
  | 100 | 3,512 | 0.028 | 0.022 |
  | 192 | 7,652 | 0.025 | 0.022 |
  | 1,000 | 44,012 | 0.023 | 0.022 |
* **Controller, handshakes, reset.** All of this design's own: valid/ready
  input, no output back-pressure, synchronous active-low reset, overlap of
  the decide cycle with the next first stage.
* **Throughput.** The publication's synthesis summary quotes 70 Mbit/s at
  70 MHz, which would be one bit per clock, while its own efficiency figure
  for the method is 1/45 bit per clock. This RTL decodes one bit per 45
  clocks (about 1.56 Mbit/s at 70 MHz). Clock rate and area depend on the
  cell library and are not claimed.

### Parameters

`vit_decoder` takes `NC` (code bits per information bit), `KC` (constraint
length), `G` (generators, `[NC-1:0][KC-1:0]`, entry j gives code bit Cj,
octal MSB taps the current bit), `LD` (trace-forward depth, default 5 x KC),
`QB` (soft bits), `PMB` (metric width) and `BMB` (branch metric width). The
defaults give the IS-95 decoder above. Keep `LD x NC x (2^QB - 1)` below
`2^PMB - 1` so a reachable metric never saturates. `conv_enc` takes `NC`,
`KC` and `G` likewise.

As an example the testbench `tb_mre_ber_k3` builds a K = 3, rate 1/2
decoder (`NC = 2, KC = 3, G = {3'o5, 3'o7}, LD = 15`) and compares its bit
errors on a Gaussian channel with 3-bit quantization with those of a
full-frame trace-back Viterbi decoder (20,000 bits per point):

| Eb/N0 | Channel errors (hard) | Trace-back | MRE |
|---|---|---|---|
| 2 dB | 4,299 of 40,000 | 477 | 534 |
| 3 dB | 3,395 of 40,000 | 127 | 120 |
| 4 dB | 2,402 of 40,000 | 25 | 31 |

The MRE decoder sees a window of only 5K symbols, so it is a little weaker
than a trace-back over the whole frame at the lowest signal-to-noise ratio;
at 3 and 4 dB the two are within the statistical scatter.

Not included: the block-decoding variant of the method (a k-pointer block
decoder that uses a 256-bit MRE memory to find the merging state), which is
described only in outline.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. `tb/vit_ref_pkg.sv` holds independent
integer models of the encoder, the branch metric and the whole MRE decoding
rule, used as the reference.

| Testbench | What it checks |
|---|---|
| `tb_conv_enc` | 1,000 random bits with clears against a shift-register model |
| `tb_vit_bm_calc` | all 512 symbols x 8 code words |
| `tb_vit_acs_array` | 200 random stages, all 256 states, with unreachable metrics and the first-stage rule |
| `tb_vit_pm_mem`, `tb_vit_dec_mem` | writes, holds, reset value, start-metric read mode |
| `tb_vit_decision_unit` | 1,000 metric vectors with many ties |
| `tb_vit_input_buffer` | random writes/pops/reads against a queue, fill to full |
| `tb_vit_decoder` | four frames (60, 12, 100, 50 bits; noise, gaps, with and without tail bits) against the reference decoder; noise-free frames must return the sent bits; 45-clock bit spacing |
| `tb_mre_packet_sizes` | frames of 45, 100, 192 and 1,000 symbols from an always-ready source; bits against the reference, clock count against the sum of window lengths |
| `tb_mre_ber_k3` | K = 3, rate 1/2 build of the decoder: bit errors against a trace-back decoder at 2, 3, 4 dB |
| `tb_is95_viterbi_top` | full size: three 192-bit IS-95 frames and a 20-bit frame through the encoder and the decoder, with noise, hard errors, input gaps; counts streaming, back-pressure, stalls, shortened windows, frame ends and unreachable start metrics, and fails if any never occurs |

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
      rtl/vit_pkg.sv tb/vit_ref_pkg.sv tb/tb_is95_viterbi_top.sv \
      --top-module tb_is95_viterbi_top -o sim
    ./obj_dir/sim

The full-size end-to-end test runs in a few seconds. The decoder synthesizes
to roughly 2,900 flip-flops (of which 2,560 path metric and 256 decision
bits) plus the 405-bit symbol buffer.
