# Digital on-board EMI detector

A wired link can be corrupted by electromagnetic interference (EMI) without
any error-detecting code noticing. This design watches the link itself. The
same data is sent on two lines: line A carries the bits, line B their
inverse. With no interference the two received voltages always add up to the
same value, and their difference always has the same magnitude. Interference
that couples into the lines breaks one or both of these rules:

* a part common to both lines changes the **sum** A + B;
* a part that differs between the lines changes the **magnitude of the
  difference** |A − B|.

A dual-channel 6-bit ADC samples both received lines three times per data
bit. The FPGA logic in this repository computes the sum and the difference of
every sample pair, removes their quiet (DC) values, rectifies them and compares
each with a threshold. Any data bit during which either comparator fired gets a
**warning**. A frame of data that drew a warning is sent again. The logic
also checks every received bit, counts bits, bit errors and the four possible
outcomes (correct or wrong bit, with or without a warning), and keeps a
recording of recent samples for offline analysis.

The same detector can be built from op-amps. The analogue circuit (adder,
subtractor, DC blockers, diode rectifiers, comparators), the ADC, the
level-shifting amplifiers, the power supplies and the configuration PROM are
board parts. They are not in this repository. The RTL begins at the ADC's
output buses and the FPGA pins of the two lines.

## Block structure

```
             +-------------+  line_a_tx / line_b_tx        (lines, board)
  run  ----->| emi_line_tx |------------------------------> ... ----+
             |  PRBS-7,    |  phase, desc (bit on the lines)         |
             |  frames,    |-----------+-------------+               |
             |  resend     |           |             |               |
             +------^------+           v             v               v
                    | verdict   +-------------+ +--------------+  ADC (board)
                    +-----------| emi_warn_   | | emi_rx_check |<- line_a_rx/line_b_rx
                                | unit        | +------+-------+
 adc_data    +-----------------+|  per-bit    |        | rx_res
 adc_inv_ -->| emi_adc_capture ||  window,    |        v
 data        +--------+--------+|  verdict    |  +-------------------+
                      v         +-----^-------+  | emi_perf_counters |--> counters
             +-----------------+      | flags    |  pairs by tag     |
             |     emi_sp      |      |          +-------------------+
             | adder path      |  +---+-------------+
             | subtractor path |->| emi_warn_select |<-- ext_warn_sum/diff (analogue detector)
             +--------+--------+  +---+-------------+
                      | samples       | flags
                      v               v
             emi_recorder (samples + flags) --> rec_rd_data
```

| Module | What it does |
|---|---|
| `emi_pkg` | Shared types: the bit descriptor, per-bit results, the counter record, PRBS-7 step. |
| `emi_line_tx` | Sends frames of PRBS-7 data on line A, and the inverse on line B. After each frame it sends idle slots and waits for the frame's verdict. It resends the frame if the verdict asks for it. |
| `emi_adc_capture` | Registers the two ADC buses and converts offset binary to signed. |
| `emi_sp` | The two detector paths with their DC blockers, rectifiers and comparators. |
| `emi_warn_select` | Chooses the flags used for warnings: the internal ones, or those of an external analogue detector. |
| `emi_warn_unit` | ORs the comparator flags over each data bit's samples and over each frame. |
| `emi_rx_check` | Samples the received line pair in the middle of each bit and compares it with the bit sent. |
| `emi_perf_counters` | Classifies each data bit and counts the classes. |
| `emi_recorder` | A 1024-entry circular buffer of samples and comparator flags, which can be frozen and read out. |
| `emi_detector_top` | Connects all of the above. |

## The two detector paths (`emi_sp`)

Each path takes one sample pair per clock. It has five register stages, one
per operation, and the adder path is padded to the same length:

```
adder path:       s = A + B      -> s - dc_sum     -> |.|         -> (delay) -> > thr_sum  -> warn_sum
subtractor path:  d = (A-B)*GAIN -> |d|            -> |d| - dc_diff -> |.|    -> > thr_diff -> warn_diff
```

The order of the operations follows the detector's block diagram. The adder
path has a DC blocker and then a rectifier. The subtractor path has a
rectifier, then a DC blocker, then a second rectifier. The reason for the
second rectifier: |A − B| is constant (the data swing) whatever the bit,
so subtracting that constant leaves only the deviation, which can be either
sign.

The **DC blocker** is a subtraction of a level that is set from outside,
much like the external reference voltage of the analogue version. The
levels are inputs:

* `dc_sum`: the quiet value of A + B, i.e. twice the common-mode offset in
  ADC steps (0 if the lines are centred at mid-scale);
* `dc_diff`: the quiet value of |A − B|·GAIN, i.e. 2 × swing × GAIN.

The thresholds `thr_sum` and `thr_diff` are inputs too. A comparator fires
when the rectified value is strictly greater than its threshold.
`SUB_GAIN` (default 2) stands for the subtractor's amplification. The only
requirement is that it exceeds one.

Widths with the default 6-bit ADC: the sum and `dc_sum` are 7-bit signed.
`thr_sum` and `mag_sum` are 8 bits. `dc_diff`, `thr_diff` and `mag_diff`
are `ADC_BITS + clog2(SUB_GAIN+1)` = 8 bits. No stage can overflow.

## Internal or external comparators (`emi_warn_select`)

The same link, receive check, warning windows, retransmission and counters
can also measure an analogue detector. In that arrangement the FPGA only
sends and checks the data and classifies each bit by the analogue warnings.
With `warn_src_ext` high, the two comparator outputs of the analogue
detector (`ext_warn_sum`, `ext_warn_diff`) replace the internal flags.
They are not clocked, so each passes a two-flop synchroniser. Further
flops then pad it to the internal path's delay, which keeps each external
flag in the window of the bit that caused it. `EXT_LATENCY` is the
analogue detector's own delay in clock cycles, from a line change to its
comparator output (default 0). It may be at most `ADC_LATENCY + 4`. Change
`warn_src_ext` only while the link is idle. The `warn_sum`/`warn_diff`
outputs and the recorder show the flags in use.

## Timing: slots, windows and tags

This is the part that takes the most care.

* **Clock.** Everything runs on the ADC sample clock. A data bit occupies a
  *slot* of `SAMPLES_PER_BIT` = 3 clock cycles. The transmitter's `phase`
  counts 0, 1, 2 inside a slot. The line outputs and the descriptor `desc`
  change together at phase 0. At 100 Mbit/s the clock is 300 MHz; at the
  10 Mbit/s of the test set-up it is 30 MHz.
* **Frames.** A frame is `FRAME_BITS` = 8 data bits. At least `GAP_BITS`
  = 6 idle slots follow it (line A low, line B high, not checked). During
  the gap the frame's verdict comes back. If the verdict is "warning", the
  PRBS state saved at the start of the frame is restored and the same 8 bits
  go out again. Otherwise the next frame follows, if `run` is high. If the
  verdict is late (a large `ADC_LATENCY`), the transmitter stretches the gap
  instead of going on.
* **Warning window.** A sample reaches the comparators
  `WARN_DELAY = ADC_LATENCY + 1 + 5` cycles after its line value was driven.
  The `+1` is the capture register and the `+5` is the processing pipeline.
  `emi_warn_unit` delays the slot start and the descriptor by the same
  amount, so each window covers exactly the three samples of one bit. A
  per-bit result leaves the unit one cycle after its window closes. Set
  `ADC_LATENCY` to the number of clocks from a change on `line_a_tx` to the
  matching codes on `adc_data`. This includes the converter's pipeline
  delay. The default is 0.
* **Receive check.** `emi_rx_check` registers both received lines. At phase
  `RX_SAMPLE_PHASE` = 2 it compares the registered value, which was taken at
  phase 1 (the middle of the bit), with the bit that was sent. A bit is in
  error when line A or line B differs from what was driven on it.
* **Pairing by tag.** The error result of a bit arrives about one slot
  before its warning result. Each data bit carries a 3-bit tag. The counter
  block stores the error flag by tag and classifies the bit when its warning
  result arrives. Two assertions check that the error result always comes
  first and that a tag is never reused while still pending.

## Result classes and counters

Each data bit falls in exactly one class. Whether the interference alone was
strong enough to corrupt the data cannot be seen from inside the link. So the
"data" and "channel" variants of the true and false positives share one
counter:

| counter | received bit | warning | meaning |
|---|---|---|---|
| `tp` | correct | no | DTP + CTP: nothing noticed, nothing wrong |
| `fp` | correct | yes | DFP + CFP: warning although the bit arrived intact |
| `ctn` | wrong | yes | CTN: a bit error that the detector caught |
| `cfn` | wrong | no | CFN: a bit error that the detector missed |

`bits`, `bit_errors` and `retx` (frames resent) complete the record.
`bit_errors = ctn + cfn` and `bits = tp + fp + ctn + cfn`. All counters are
32 bits wide, wrap around, and are cleared by `cnt_clear`.

## Recorder

While `rec_en` is high, every processed sample is written as
`{warn_sum, warn_diff, sample_A, sample_B}` (14 bits, signed samples). The
sample and its flags are aligned. When the buffer is full it overwrites the
oldest entries, and `rec_wrapped` is set. Drop `rec_en` to freeze the buffer.
`rec_wr_ptr − 1` is then the newest entry. `rec_rd_data` gives the entry at
`rec_rd_addr` one clock later.

## Top-level interface (`emi_detector_top`)

| port | dir | width | |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sample clock; synchronous active-low reset |
| `run` | in | 1 | send frames |
| `line_a_tx`, `line_b_tx` | out | 1 | data and inverted data |
| `line_a_rx`, `line_b_rx` | in | 1 | received lines |
| `adc_sample` | out | 1 | sample enable to the ADC; held high, because the ADC samples every clock |
| `adc_data`, `adc_inv_data` | in | 6 | ADC codes of line A and line B (offset binary) |
| `dc_sum` | in | 7 signed | adder-path DC level |
| `dc_diff`, `thr_diff` | in | 8 | subtractor-path DC level and threshold |
| `thr_sum` | in | 8 | adder-path threshold |
| `warn_src_ext` | in | 1 | use the external comparators |
| `ext_warn_sum`, `ext_warn_diff` | in | 1 | external comparator outputs (asynchronous) |
| `warn_sum`, `warn_diff` | out | 1 | comparator flags in use, per sample |
| `mag_sum`, `mag_diff` | out | 8 | rectified path values, per sample |
| `warning`, `bit_error` | out | 1 | one pulse per warned / wrongly received data bit |
| `cnt_clear` | in | 1 | clear counters |
| `counters` | out | `counters_t` | see above |
| `rec_en`, `rec_rd_addr`, `rec_rd_data`, `rec_wr_ptr`, `rec_wrapped` | | | recorder |

Parameters and their defaults: `ADC_BITS` 6, `SAMPLES_PER_BIT` 3,
`FRAME_BITS` 8, `GAP_BITS` 6, `SUB_GAIN` 2, `ADC_LATENCY` 0,
`RX_SAMPLE_PHASE` 2 (must be 1 … `SAMPLES_PER_BIT`−1), `EXT_LATENCY` 0,
`REC_DEPTH` 1024. The
derived widths `SUM_W`, `SMAG_W`, `DMAG_W` and `REC_W` are parameters as well,
but should be left at their defaults.

After coarse synthesis the whole design has about 440 flip-flops and a
1024 × 14 memory. This fits comfortably in a small Spartan-6 (for example
the XC6SLX4, with 4,800 flip-flops and 12 block RAMs of 18 Kb).

## What is given and what is chosen

These parts are fixed by the detector concept:

* the inverted line pair;
* the 6-bit dual-channel ADC at three samples per bit;
* the adder and subtractor paths with their order of DC blocking and
  rectification, a subtractor gain above one, and threshold comparators
  with externally set thresholds;
* the warning, retransmission after a warning, and recording of the data;
* the four result classes;
* an FPGA that classifies the bits by the warnings of an analogue detector.

These are this implementation's own choices:

* PRBS-7 data, frames of 8 bits with stop-and-wait retransmission, and
  the idle level;
* the rule that a bit is warned when either comparator fires on any of its
  samples;
* a bit counts as wrong when either received line is wrong. A receiver
  that reads line A alone would miss errors on line B;
* the synchroniser and alignment delay for the external warnings;
* the DC blocker as subtraction of a programmable level;
* the gain value 2 and all widths and pipeline depths;
* the offset-binary ADC coding and `ADC_LATENCY` = 0;
* the recorder's contents and depth;
* the 32-bit counters and their clear.

Not checked: timing closure at 300 MHz on a real FPGA, and the real
converter's output format and pipeline delay. Set `ADC_LATENCY` for the
board. A wrong value shifts every warning window.

## Simulation

All testbenches are self-checking. Each ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/emi_pkg.sv rtl/emi_*.sv \
          tb/tb_emi_detector_top.sv --top-module tb_emi_detector_top -Mdir obj_top
obj_top/Vtb_emi_detector_top
```

Replace the testbench and top module name to run the others:

| testbench | what it covers |
|---|---|
| `tb_emi_detector_top` | The whole design at its default parameters, in closed loop with a channel model. The model has random common-mode and differential interference, receive glitches and 6-bit ADC rounding with clipping. An independent model of the framing, PRBS and retransmission, and of both detector paths, predicts every counter. The test also checks the recorder contents after a freeze. A third run takes its warnings from a model of an external analogue detector, with its own thresholds, and checks the counters against that. Every mechanism must occur: warnings from both paths, bit errors, all four classes, retransmission, ADC clipping, idle while stopped, counter clear, recorder wrap, external flags that differ from the internal ones. |
| `tb_emi_warn_select` | Selection, delay and reset of the external flag path. |
| `tb_emi_sir_sweep` | A 10 Mbit/s link with sine interference at 305 MHz and at 326 MHz, stepped from 30 dB to −6 dB SIR in 1 dB steps. All counters are checked per step. The test prints the share of warned bits and of bit errors per step. |
| `tb_emi_sp` | Both detector paths against integer arithmetic, every sample, with the settings changing. |
| `tb_emi_line_tx` | Slot timing, PRBS-7 data, framing, gap, identical resent frames, idle while stopped. |
| `tb_emi_warn_unit` | Window alignment for a given delay, per-bit OR, frame verdict. |
| `tb_emi_rx_check` | Sample point, error rule, one result per data bit. |
| `tb_emi_perf_counters` | Classification with results arriving out of step, and the clear. |
| `tb_emi_recorder` | Wrap, freeze and read-back. |
| `tb_emi_adc_capture` | Code conversion and the capture enable. |

In the sweep, with the thresholds used there (4 and 6 ADC steps, a swing of
±14 steps), the results per 1 dB step are:

| | 305 MHz | 326 MHz |
|---|---|---|
| first warnings | 16 dB | 17 dB (19 % of bits), 16 dB (38 %) |
| every bit warned while the interference is on | from 16 dB | from 15 dB |
| first bit errors | none down to −6 dB | −4 dB |
| bit errors without a warning (CFN) | none | none |

The printed share of warned bits stops at about 90 %. This is only because
the last frame of each step is resent after the interference has been
switched off. Because every frame is then resent, no new data gets
through: the link stalls rather than passing corrupted bits. Where the
warnings start depends directly on the thresholds you choose.

A known limit of the principle: interference whose frequency is a multiple
of the sampling rate has the same value at every sample. The detector then
sees only a constant offset, whose size depends on the phase at which the
wave is sampled. Near a zero crossing the offset vanishes, while the
receiver, which sees the wave between the samples too, may still fail.
Such frequencies were not part of the sweep.
