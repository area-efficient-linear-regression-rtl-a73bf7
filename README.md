# Dual-length linear regression for phase-slope estimation

This design fits a straight line `d ≈ a·i + b` to a sequence of samples
`d_0 … d_{N-1}` by least squares, at two samples per clock, using five
DSP48E-style multiply-accumulate slices and a few dozen registers of control.

Its main idea is to restrict the sequence length N to a few fixed values.
The closed-form least-squares solution is

    a = (N/D)·Σ i·d_i  − (S1/D)·Σ d_i
    b = (S2/D)·Σ d_i   − (S1/D)·Σ i·d_i

with `S1 = Σ i`, `S2 = Σ i²` and `D = N·S2 − S1²`, all over `i = 0 … N−1`.
Everything in brackets depends only on N. For a fixed N, these four factors
are constants, so the hardware keeps them in a small ROM. There are then no
index sums and no divider. The hardware reduces to:

* two running sums over the input, `Σ d_i` and `Σ i·d_i`;
* one multiply-subtract unit that forms a and b from those sums and four
  ROM constants.

Supporting another length only adds four ROM words.

The target application is a modulation classifier. The phase of a received
signal is unwrapped, and the slope and offset of the unwrapped phase are
estimated over packets. The top level therefore includes the phase unwrapper
and a decimate-by-two stage, and it supports two packet lengths:

* 256 decimated samples (512 phases), `MODEL_LONG`;
* 128 decimated samples (256 phases), `MODEL_SHORT`.

The shorter packet halves the signal lost when a short signal does not fill a
long packet. The two lengths share all arithmetic and differ only in ROM
words and in the sample count.

## Block structure

```
ph_i[0..3] ─► phase_unwrap ─► d0,d1 (2/clk) ─┬─► 2 regs ─► lr_acc  (1 slice)  Σ d_i   ─┐
 start_i, model_i ───────────► start, model ─┤                                        ├─► hold regs ─► lr_macc2 (1 slice) ─► a_o, b_o
                                             └────────────► lr_macc1 (3 slices) Σ i·d_i ─┘        ▲            ▲
                                   lr_control: pair counter, indexes 2k/2k+1, load, op FSM ─────────┴── lr_const_rom
```

| module | role |
|---|---|
| `amc_linreg_top` | The top level: the unwrapper followed by the regression core. |
| `phase_unwrap` | Unwraps the phase and keeps the even samples: four phases in per clock, two samples out. |
| `linreg_core` | The regression for one sequence at a time, at two samples per clock. |
| `lr_acc` | `Σ d_i`: one slice. The first sample goes on A:B, the second on C, and P is fed back. |
| `lr_macc1` | `Σ i·d_i`: two slices multiply each sample by its index, and a third adds both products into a running sum. |
| `lr_macc2` | a and b: a multiplexer picks a sum, one slice multiplies it by a ROM constant and subtracts the second product from the first. |
| `lr_const_rom` | Four 18-bit constants per model, computed at elaboration. |
| `lr_control` | The pair counter and index generator, the accumulator restart, the load of finished sums, and the coefficient state machine. |
| `dsp_slice` | A simplified DSP48E in plain logic (details below). |
| `linreg_pkg` | Widths, enums, the operand-select struct and the constant functions. |

### The DSP slice model

`dsp_slice` models the parts of a Xilinx DSP48E that this design uses:

* a 25×18 signed multiplier (the low 25 bits of the 30-bit A port times B);
* three operand multiplexers:
  * X selects 0, the product, P or the concatenation A:B;
  * Y selects 0, the product or C;
  * Z selects 0, P or C;
* a 48-bit adder computing `Z + X + Y` or `Z − (X + Y)`.

On an FPGA you can map each instance to a DSP48E primitive with the same
settings. As plain logic it also synthesizes for any target.

The slice has one input register stage (A, B, C and the operation) and a
P register, but no multiplier register. P therefore shows the result of an
operation two cycles after it was presented.

There is no separate reset or clear port. An accumulation restarts by
selecting `Z = 0` on its first operand. It holds when `X = Y = 0` and `Z = P`.

## Fixed-point format: the hard part

All values are integers. The phase is 8-bit signed, with `±128` meaning `±π`,
so one LSB is `π/128`.

### Sizing for a 512-phase packet

* Within a packet, the unwrapped phase moves by at most π per sample.
  Unwrapping restarts at the packet's first phase, so the unwrapped value
  stays within ±512π, which fits **17 bits** (`D_W`).
* After decimation, sample `i` can be at most `(2i+1)·π`. This bounds the two
  sums:
  * `Σ d_i` ≤ 65536π, which needs **24 bits** (`SD_W`);
  * `Σ i·d_i` ≤ 11 152 000π, which needs **32 bits** (`SID_W`).

### Discarding low bits of Σ i·d_i

The multiplier takes 25 bits on A and 18 bits on B:

* the ROM constants go to B, because they are computed offline and can be
  scaled so that all 18 bits are significant;
* the sums go to A.

`Σ i·d_i` is too wide for A, so its lowest `s` bits are discarded (an
arithmetic right shift) before the multiplier. By default `s = 7`.

Both products of one coefficient must have the same binary point before they
are subtracted. So the factor that multiplies `Σ i·d_i >> s` carries `s` more
fractional bits than its partner.

### Choosing the constant scalings

For each coefficient, the package function `lr_const` picks the largest
power-of-two scaling that keeps both of its words below 2^17. It then rounds
each word to the nearest integer:

| model, discarded bits | K0 (×Σid) | K1 (×Σd) | K2 (×Σd) | K3 (×Σid) | a frac bits | b frac bits |
|---|---|---|---|---|---|---|
| 256, s = 7 | 98306 (2^37) | 97921 (2^30) | 130307 (2^23) | 97921 (2^30) | 30 | 23 |
| 128, s = 7 (default) | 98310 (2^34) | 48771 (2^27) | 64774 (2^21) | 97542 (2^28) | 27 | 21 |
| 128, s = 6 | 98310 (2^34) | 97542 (2^28) | 129548 (2^22) | 97542 (2^28) | 28 | 22 |

(`K1` and `K3` are the same factor `S1/D`, but for the 128 model they are
stored at different scalings.)

### Output format

The raw result for a 128-sample sequence has fewer fractional bits than for a
256-sample one. `lr_macc2` shifts it left so that both models share one
output format:

* **`a_o` has 30 fractional bits;**
* **`b_o` has 23 fractional bits;**
* both are 48-bit signed, in units of the input (π/128 per sample for the
  phase).

This holds for the default lengths. For other lengths, the formats come from
the long model's scaling, `lr_frac_a`/`lr_frac_b` in the package.

The slope of decimated phase is within ±2π, so `a_o` uses about 9 integer
bits. The intercept is within about ±128π, so `b_o` uses about 15.

### Accuracy

Two effects set the accuracy:

* **Truncating `Σ i·d_i`** costs less than one unit at the multiplier input.
  That is at most `K0 / 2^30 ≈ 9.2·10⁻⁵` on a, and `K3 / 2^23 ≈ 0.012` on b,
  in input units. In terms of meaningful bits, a keeps about 13 fractional
  bits and b about 6.
* **Rounding the constants** adds up to `0.5·(|Σd| + |Σid>>s|)` units of the
  output LSB. This error depends on the data.

The testbenches check every result against a floating-point least-squares fit
within the sum of these two bounds.

In practice the constant rounding dominates. The two products of a
coefficient nearly cancel, so a relative error of about 5·10⁻⁶ in one
constant shows up in full against a much smaller difference. The error grows
with the absolute phase level of the packet.

`tb_linreg_accuracy` measured the largest error over 400 packets whose phase
reaches several hundred π. The 128-sample packets have smaller sums, so they
come out more accurate.

| model | largest error on a (input units) | fractional bits of a | largest error on b (input units) | fractional bits of b |
|---|---|---|---|---|
| 256 | 6.7·10⁻³ | about 7 | 0.51 | about 1 |
| 128 | 8.9·10⁻⁴ | about 10 | 0.051 | about 4 |

If more accuracy is needed, the remedy is wider constants, at the cost of a
second multiplier pass or a wider multiplier. Another remedy is to subtract
the packet's first sample from every sample before accumulating, which keeps
the sums small. Neither is implemented here.

### Both lengths in one datapath

There are two ways to share one datapath between the two lengths. The
`SHIFT_LONG`/`SHIFT_SHORT` parameters choose between them:

* **Same shift for both** (`SHIFT_SHORT = 7`, the default). A single shifted
  copy of `Σ i·d_i` feeds the multiplexer, which gives the smallest area. The
  128-sample result loses a little precision: its sums are smaller, but the
  same bits are discarded, and its constants are scaled down to stay aligned.
* **Per-model shift** (`SHIFT_SHORT = 6`). Fewer bits are discarded for the
  short model, which gives more precision. The cost is a three-input operand
  multiplexer on the slice's critical path.

## Timing and sequencing

The core takes one pair `(d_{2k}, d_{2k+1})` per clock:

* `start_i` comes with the first pair;
* `model_i` is sampled with `start_i`;
* pairs are taken every clock until N/2 pairs are in (128 or 64 clocks);
* there is no valid input, and pairs between sequences are ignored;
* a `start_i` during a sequence abandons that sequence and starts the new one.

For a last pair in cycle T:

| cycle | event |
|---|---|
| T+2 … T+4 | `Σ i·d_i` leaves `lr_macc1` at T+4. `Σ d_i` also completes at T+4, because the `lr_acc` inputs are delayed two cycles. |
| T+4 | `ld`: both sums are copied into holding registers. |
| T+5 … T+8 | The four coefficient ops, in order: `K0·Σid`, `−K1·Σd`, `K2·Σd`, `−K3·Σid`. |
| T+8 | a is on P and is captured. |
| T+10 | b is on P, five cycles after the first op. |
| T+11 | `valid_o`, with `a_o`, `b_o` and `model_o` (core). In `amc_linreg_top` this is T+12, where T is the clock of the packet's last four phases. |

The accumulators restart on the first pair of the next sequence, so a new
sequence can start the cycle after a last pair. While the accumulators take
that sequence in, the coefficient stage works on the previous one from the
holding registers.

The coefficient stage needs four clocks per sequence. So the shortest
sequence that can follow back to back is four clocks, or eight samples. An
assertion in `lr_control` flags a load that arrives before the previous ops
are issued.

Throughput is therefore two samples per clock, continuously.

### The phase front end

`phase_unwrap` takes four consecutive phases per clock. Each step is the
8-bit wrapping difference of two neighbouring phases, so it is always within
±π. Each step is added to the running unwrapped value, which restarts at the
packet's first phase. Samples 0 and 2 of each group of four are passed on,
one clock later. This is decimation by two, and it gives the core its two
samples per clock.

Packet framing comes from outside: `start_i` must mark the first group of
each packet.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N_LONG` | 256 | Length of the `MODEL_LONG` sequence (decimated samples). Must be even. |
| `N_SHORT` | 128 | Length of the `MODEL_SHORT` sequence. Must be even and at least 8. |
| `SHIFT_LONG` | 7 | Bits of `Σ i·d_i` discarded for the long model. |
| `SHIFT_SHORT` | 7 | Bits discarded for the short model. Use 6 for the per-model variant. |

The sum widths in `linreg_pkg` (24 and 32 bits) are sized for 256 samples of
17-bit data. Longer sequences need `SD_W`, `SID_W` and the shifts revisited.

The output alignment requires that the short model's scaling is not finer
than the long model's, which is checked at elaboration.

## Where this departs from a vendor mapping, and other choices

Pipeline and slice model:

* The slice register placement (input registers, no M register, P register)
  is a choice. With it, the second stage has a five-cycle latency from its
  first op to b.
* In the per-model-shift variant, only `Σ i·d_i` gets a second shifted
  copy, so the operand multiplexer has three inputs. A per-model shift of
  `Σ d_i` would give a four-input multiplexer. It would gain nothing, because
  `Σ d_i` always fits the 25-bit port exactly.
* The slice carries the product whole on X, with zero on Y. The real DSP48E
  uses two partial products. The two are the same arithmetically.
* Carry-in, pattern detect and the cascade ports of the DSP48E are not
  modelled.

Sequencing and interface:

* The two-cycle delay on the `Σ d_i` inputs is a choice. It lets a single
  load capture both sums.
* The result is aligned to one output format for both models, as described
  under *Output format*.
* The four-phases-per-clock input of the front end, the restart of
  unwrapping at each packet, and the abandon-on-restart behaviour are
  choices.

Reset:

* All registers clear on the synchronous, active-high `rst`.

## Simulating

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. All of them run with
plain Verilator 5:

```
verilator --binary --timing --assert rtl/linreg_pkg.sv rtl/dsp_slice.sv rtl/lr_acc.sv \
    rtl/lr_macc1.sv rtl/lr_macc2.sv rtl/lr_const_rom.sv rtl/lr_control.sv \
    rtl/linreg_core.sv rtl/phase_unwrap.sv rtl/amc_linreg_top.sv \
    tb/tb_amc_linreg_top.sv --top-module tb_amc_linreg_top -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_amc_linreg_top` with its name.

| testbench | what it checks |
|---|---|
| `tb_amc_linreg_top` | End to end at the default parameters. Packets of both lengths are built from random, steepest-rise, steepest-fall, pyramid and noisy-line phase trajectories. Packets run back to back, with idle gaps, and with restarts that cut a packet short. Each result must be bit-exact against an independent integer model, within the error bound of a floating-point least-squares fit, and arrive 12 cycles after the packet. The testbench counts each mechanism and fails if one never occurred. |
| `tb_linreg_core` | The default core, the per-model-shift core, and a 16/8-sample core. The last one is driven with back-to-back minimum-length (four-clock) sequences. |
| `tb_lr_macc2` | The coefficient stage with random sums and constants, for both shift variants, with its six-cycle timing. |
| `tb_lr_control` | The control against a cycle model: indexes, restarts, the load at T+4 and the ops at T+5…T+8. |
| `tb_lr_acc`, `tb_lr_macc1` | The accumulators, with random gaps and restarts, at latencies 2 and 4. |
| `tb_lr_const_rom` | The ROM words against the closed-form factors, for both shift variants. |
| `tb_dsp_slice` | Random operations against a cycle model. |
| `tb_phase_unwrap` | Random trajectories with wrap-arounds and packet restarts. |
| `tb_linreg_accuracy` | Error statistics of a and b over 400 packets of both lengths, against the floating-point fit; it prints the largest errors. |

To change the design, edit the parameters on `amc_linreg_top` or
`linreg_core`. The ROM contents and the output scaling follow automatically.
`tb_linreg_core` computes its reference scalings from the sequence lengths,
so it checks a changed configuration as it is. `tb_amc_linreg_top`,
`tb_lr_const_rom` and `tb_lr_macc2` hard-code the scalings of the default
lengths.
