# Frame-based Viterbi decoder for the K = 7, rate-1/2 (171, 133) code

This RTL decodes the constraint-length-7, rate-1/2 convolutional code with
generator polynomials 171 and 133 (octal), the code used on Voyager. It
works on short, self-contained frames. Every frame is 30 trellis stages
long: 24 data bits followed by 6 zero "tail" bits that return the encoder
to state 0. Because each frame starts and ends in a known state, the
decoder needs no sliding traceback window. It runs the add-compare-select
recursion over the frame, stores the survivor decisions, and then reads
the whole frame out with one combinational trace back from state 0.

Two observations reduce power and raise speed:

1. **Six stages need no survivor memory.** The encoder starts each frame in
   state 0. During the first six stages no path can have come through an
   "upper" branch (a predecessor whose oldest bit is 1), so every survivor
   bit of those stages is 0. They are not stored. The survivor memory
   holds 24 registers of 64 bits instead of 30, which is 20 % fewer, and
   the trace back substitutes zeros for the missing stages.
2. **The trace back gets six clock cycles.** The 30-cell trace-back chain
   is far slower than the add-compare-select loop. While the next frame's
   first six symbols are processed, the survivor memory is not written.
   The chain can therefore settle over those six cycles, not one. The
   clock is limited by the ACS loop rather than by the trace back, about
   six times faster than a single-cycle trace back would allow.

The decoder is wrapped in a self-test set-up: an LFSR data source, an
encoder, an error-injection stage and an error counter. That wrapper is
the top level, `viterbi_bist`.

## Conventions: states, branches and symbols

All modules share these conventions, defined in `rtl/vit_pkg.sv`:

* **State** `s[5:0]` holds the last six input bits, the newest in `s[0]`.
  Input `u` moves the encoder from `s` to `{s[4:0], u}`.
* **Predecessors** of state `ns` are `{1, ns[5:1]}` (the *upper* branch) and
  `{0, ns[5:1]}` (the *lower* branch). Both branches carry input bit `ns[0]`.
* **Encoder register** `r = {s, u}` has 7 bits: `r[0]` is the current input
  and `r[k]` the input k steps back. Polynomial bit `6-k` taps `r[k]`, so
  the most significant bit of 171 and 133 taps the current input.
* **Code symbol**: bit 1 comes from 171 and bit 0 from 133. The branch into
  `ns` from the upper predecessor therefore expects `encode_sym({1'b1, ns})`,
  and the branch from the lower one expects `encode_sym({1'b0, ns})`.
* **Survivor bit** `sp[ns] = 1` means the upper branch won. On a tie the
  lower branch is kept, which is an arbitrary but deterministic choice.

## Data path (`viterbi_decoder`)

```
rx_sym ─► bmu ─► pmu (64 ACS + 64 metric registers) ─► smu (24 × 64 bit) ─► tbu (30 cells) ─► dec_frame ─► out_serializer ─► sout
                   ▲                                      ▲                    ▲
                   └──────────── vit_ctrl: stage counter, write select, trace-back window ──┘
```

| module | role |
|---|---|
| `bmu` | Four units give the Hamming distance of the received 2-bit symbol from 00, 01, 10 and 11 (0…2). The decoder uses hard decisions. |
| `acs` | Adds two metrics and compares them. Xu = PMu + BMu and Xl = PMl + BMl. A multiplexer passes the smaller sum, and the compare result is the survivor bit. |
| `pmu` | 64 ACS units and 64 eight-bit metric registers. It advances one stage per accepted symbol. On the first stage of a frame the ACS units read start metrics instead of the registers: 0 for state 0 and 128 for all other states. |
| `smu` | 24 registers of 64 survivor bits each, for stages 7…30. A write select decoded from the stage counter enables exactly one register per clock. No other register is clocked. |
| `tbu`, `tbu_cell` | The chain starts at stage 30 in state 0. Cell *t* outputs `state[0]` as decoded bit *t* and passes `{sp[state], state[5:1]}` back to cell *t−1*. Cells 1…6 see zero survivor bits. |
| `vit_ctrl` | Holds the 5-bit stage counter. It generates the frame-start flag, the survivor write enable and select, and the trace-back window. |
| `out_serializer` | Sends each decoded frame out serially, stage 1 first. |

### Metric range

Metrics never overflow, so they are never normalised. A frame is only 30
stages long and the largest branch metric is 2, so any reachable metric is
at most 60. A state that is unreachable during the first six stages starts
at 128 and can grow by at most 12, to 140, which still fits in 8 bits.
After stage 6 every state is reachable, and every metric is then at most
2 per stage. If you lengthen the frame, check that `2·L` stays below
`PM_INF` and that `PM_INF + 2·M` fits in `PMW` bits.

## Timing of one frame

Frames are 30 accepted symbols each, back to back, counted from reset.
`in_valid` may drop at any time: the decoder only advances on valid
symbols. There is no frame-sync input. The sender and the decoder agree on
frame boundaries by starting together after reset.

Let E0 be the clock edge that accepts a frame's last symbol (stage 30).
Its survivor bits go into register 24 on that edge. Then:

| edge | event |
|---|---|
| E0 | stage 30 stored; trace-back window opens (`tb_en` = 1) |
| E0+1 … E0+5 | chain settles; the next frame's stages 1…5 may already be running in the PMU |
| E0+6 | `load`: decoded bits registered in `tbu`; window closes |
| cycle after E0+6 | `dec_valid` = 1, `dec_frame` valid |
| next 30 cycles | `sout` / `sout_valid` deliver bits 1…30 |

The next frame's stage 7, its first survivor write, cannot be accepted
before E0+7. The survivor memory therefore stays unchanged for the whole
window even when symbols arrive every cycle. The testbenches check that a
write never happens while `tb_en` is high.

**Timing constraint you must add.** The path from the `smu` registers
through the 30 `tbu_cell`s to the `tbu` result register is a 6-cycle path.
It must be declared as a multicycle path (setup 6) in the timing
constraints. Without that, synthesis will treat it as a single-cycle path,
and the speed-up described above is lost.

**Toggle filtering.** Outside the trace-back window, `tbu` forces the
survivor bits entering the chain to 0. The chain's inputs then do not
change while the survivor memory is written in the other 24 cycles of a
frame, so the chain does not switch.

**Clock gating.** `smu` writes each register through an enable. A
synthesis flow for an ASIC can map this to integrated clock-gating cells,
and an FPGA flow maps it to clock enables. The reference drawing shows a
plain AND of the clock with the select signal, which can glitch. It is
deliberately not copied.

## Outputs

* `dec_frame[t-1]` is the decoded bit of stage *t*. Bits 24…29 belong to
  the tail and are always 0, because the trace back starts in state 0.
  They are kept so that the output has one bit per stage.
* `pm_s00` is the final metric of state 0: the number of received code
  bits the decoded path disagrees with. It is updated on the edge after
  the one that accepts a frame's last symbol.

## Self-test top (`viterbi_bist`)

```
run ─► serial_input_gen ─► conv_encoder ─► noise_gen ─► viterbi_decoder ─► sout ─► error_counter ─► err_count
             │                                 ▲                                       ▲
             └──────────── generated bits ─────┼───────────────────────────────────────┘
                                            noise[1:0]
```

* `serial_input_gen` contains a 10-stage LFSR. The new Q9 is Q6 xor Q0,
  which is the feedback polynomial x^10 + x^6 + 1. The output is Q0. This
  polynomial is not primitive, so the data repeats every 62 bits. It
  emits 24 LFSR bits and then 6 zeros per frame, and the LFSR holds during
  the zeros.
* `conv_encoder` is a registered encoder: each symbol appears one cycle
  after its bit.
* `noise_gen` XORs the `noise` input onto the symbol and registers the
  result. To corrupt the symbol of the bit issued in cycle *c*, drive
  `noise` in cycle *c+1*.
* `error_counter` holds a 128-deep FIFO of generated bits. Each serial
  decoded bit pops one entry and is compared with it. The counter reports
  `err_count` (mismatches), `bit_count` (bits compared) and `ref_overflow`.
  The FIFO keeps the two streams aligned even when `run` pauses.
* One clock runs everything. The original set-up used three separate
  clock generators whose rates are unknown, so they are not modelled.

## Where this departs from or goes beyond the source design

* **Hard decisions.** The decoder takes 2 bits per symbol, one per code
  output, and uses Hamming-distance branch metrics. A soft-decision input
  would need wider symbols, a different `bmu`, and a wider `PMW`.
* **Chosen details.** The source does not specify the following, so this
  design chose them: bit and state ordering, the tie rule, metric width
  and start value, the `in_valid` gaps, the serial output, the FIFO-based
  error counter, the LFSR seed, and the single clock.
* **Register enables instead of a gated clock** in the survivor memory.
* **Frame length is a parameter.** The default is 30 stages with 6
  unstored stages. `NSTAGE`, `NSKIP` and `TBC` on `viterbi_decoder` can be
  changed. `TBC ≤ NSKIP` must hold so that the trace back finishes before
  the next survivor write. The 5-bit stage counter limits `NSTAGE` to 32
  unless the `IW` width is raised in `viterbi_decoder`.
* **No timing, area or power figures.** The 247 MHz clock estimate and
  the power savings claimed for this architecture come from a specific
  FPGA implementation. They are not reproduced here.

## Verification

Every module in `rtl/` has a self-checking testbench in `tb/`. Each ends
by printing `TB_RESULT checks=N failures=M`. `tb/vit_ref_pkg.sv` is an
independent software model. Its encoder uses a 7-bit window and the octal
polynomials directly. Its decoder does forward add-compare-select over all
states and traces back from state 0.

| testbench | what it checks |
|---|---|
| `bmu_tb`, `acs_tb` | all symbol pairs; random and tie cases |
| `pmu_tb` | every survivor bit and metric, stage by stage, against the model, with idle cycles |
| `smu_tb` | one-register-per-write, all others hold |
| `tbu_tb` | trace back of model-generated and random survivor data; load/valid timing; zero inputs when the window is closed |
| `vit_ctrl_tb` | stage flags, write select, 6-cycle window |
| `out_serializer_tb`, `serial_input_gen_tb`, `conv_encoder_tb`, `noise_gen_tb`, `error_counter_tb` | the self-test blocks against independent models |
| `viterbi_decoder_tb` | 60 frames: error-free, random errors, and nine-error patterns that maximum-likelihood decoding corrects. Checks each frame, `pm_s00`, the 6-edge trace-back latency and `sout`. |
| `viterbi_bist_tb` | the whole top at default size, 45 frames with pauses. It counts trace-back windows, skipped survivor stages, isolated cycles, windows overlapping the next frame, pauses, and corrected noisy and nine-error frames. Each of these must occur. |
| `viterbi_ber_tb` | 100 000 random frames through a binary symmetric channel at p = 1, 2, 4 and 6 %. Every frame is compared with the model and the residual BER is printed. |

In the 100 000-frame run, the decoded data bit-error rate was about 1e-5
at a channel error rate of 2 %, 2.6e-4 at 4 % and 2.1e-3 at 6 %. Every
frame matched the model.

To simulate one testbench with Verilator (from the folder that holds
`rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal --top-module viterbi_bist_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vit_pkg.sv tb/vit_ref_pkg.sv tb/viterbi_bist_tb.sv
./obj_dir/Vviterbi_bist_tb
```

Replace the top module and the last file name to run another testbench.
To lint a single RTL file:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/vit_pkg.sv rtl/viterbi_decoder.sv
```

The remaining lint warnings are expected:

* a few package constants are unused in any single module;
* the upper metric bits are unused at the decoder level;
* the first trace-back cell's "previous state" output is unused;
* `rst_n` is used both as an asynchronous reset and as the
  `disable iff` of the assertion in `vit_ctrl`.
