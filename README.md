# Digital auto-correlator

This is the RTL for a small special-purpose machine that measures the
autocorrelation function R(τ) = E[x(t)·x(t+τ)] of a slowly varying voltage.
It needs no multiplier array and stores no sample history beyond 18 words.
For every pair of 6-bit samples (r, s) taken τ apart, it adds the integer
"weighting number" **r + s + 2rs** into a 13-bit accumulator. A decimal
counter counts the accumulator's overflows, so it ends up holding the sum
divided by 2^13. After C0 sample pairs, that count divided by C0 is the
correlation, normalised to full scale. With τ = 0 it is the mean square of
the input. The design reproduces a 1960s TTL instrument as synchronous
SystemVerilog. The arithmetic, the register widths and the control sequence
are the original's. The clocking is new.

## Why r + s + 2rs

Quantise the input into N = 64 levels and treat level k as the interval
midpoint (2k−1)/2N. The correlation is then a sum over joint level
probabilities. It can be rewritten in terms of "sample above level i and
delayed sample above level j" probabilities, which are simple counts. A pair
whose first sample lies in level r and second in level s exceeds the
thresholds (i, 0) for i = 1..r, (0, j) for j = 1..s, and (i, j) for all
i ≤ r, j ≤ s. Weighting the cross terms by 2, that pair contributes
r + s + 2rs to a total that must finally be divided by 2N²·C0. With
N = 64, 2N² = 8192 = 2^13. That is why the accumulator is 13 bits wide and
its carry-out is the answer. A constant term of order 1/C0 is dropped.

Reading the display: `R = display / C0` on a 0..1 scale, or
`display / C0 × 100` in V² for the 10 V full-scale input. For a DC input
in level r, the display reads exactly `floor(C0 · r(r+1) / 4096)`. For
example, level 40 with C0 = 10^5 reads 40039.

## Data path

```
            sampling pulse ──┬──────────────► A/D convert (external)
                             ▼
A/D data ──┬──► tau_shift_register (18 × 6 bit) ──► taps[0..17]
           │                                          │
           ├──────────────────────────► tau_select (m = 0..18) ──► register_r (12 bit)
           │                                                           │ R
           └──► register_s (6 bit + dummy LSB) ── s_lsb ─┐             ▼
                                                         └──► accumulator (13 bit, two-stage adder)
                                                                       │ carry out of MSB
                                                                       ▼
                                                            display_counter (6 BCD digits)
```

* **Delay memory** (`tau_shift_register`). It shifts at every sampling
  pulse, whether or not a measurement is running. It shifts on the same
  edge that starts a conversion, so it takes the A/D's *previous* result.
  When a conversion finishes, stage k therefore holds the sample taken k
  intervals earlier.
* **τ select** (`tau_select`). It models the original 20-position rotary
  switch as a multiplexer. Position m = 0 takes the A/D output directly; m
  = 1..18 takes stage m.
* **Register S** holds the new sample s, with one extra dummy bit below the
  LSB. It loads on the first step of a computation and then shifts right
  once per step. The dummy bit delays s by one shift, so that bit p of s is
  at the LSB exactly while register R holds (2r+1)·2^p.
* **Register R** loads the delayed sample r. On its first shift it takes a
  1 into the LSB, which makes 2r+1. Each later shift doubles it. The largest
  value is 127·32 = 4064, so it is 12 bits.
* **Accumulator.** The original adder is built from gates and uses two
  strobes per addition:
  * **ADD.T** complements every accumulator bit whose R bit is 1
    (A' = A xor R).
  * **Ca.T** complements every bit by its carry. The carry is
    C1 = 0, C(n+1) = A'(n)·C(n) + not A'(n)·R(n).

  This is an exact full addition, split so that the carry chain only reads
  values that are stable between the two strobes. The carry out of bit 13 is
  a one-clock pulse to the display counter.

Since r + s + 2rs = r + (2r+1)·s, a computation is one unconditional
addition of r, then six additions of (2r+1)·2^p, each gated by bit p of s.

## One computation, step by step

The control counter (F1, F2, F4, F8) steps through states T0..T14 while the
computation flip-flop F_T is set. It advances once per slave clock strobe
`cp`, and the control pulses decode from its state:

| pulse | states | meaning |
|---|---|---|
| A | T0, T1 | S and R load, not shift |
| B | T0, T1, T2 | add regardless of s (the "+ r" step) |
| C | T2, T3 | R shifts in a 1 (forms 2r+1) |
| ADD.T | odd states, if B or s_lsb | half-addition strobe |
| Ca.T | even states T2..T14, if B or s_lsb | carry strobe |
| T14 | T14 | end of computation, clears F_T |

Each `cp` strobe does up to three things at once. First, the accumulator
performs the stage named by the current state. Second, if F1 is about to
rise (even state, not T14), S and R load or shift. Third, the counter
advances. Reads see the values from before the strobe. So on the strobe
leaving T2, the carry stage of "+ r" still sees R = r, while R becomes 2r+1
for the next half-addition.

| strobe in state | S, R | accumulator |
|---|---|---|
| T0 | load s, r | — |
| T1 | — | ADD.T of r |
| T2 | shift: R = 2r+1, s_lsb = s0 | Ca.T of r |
| T3 | — | ADD.T of (2r+1) if s0 |
| T4 | shift: R = 2(2r+1), s_lsb = s1 | Ca.T if s0 |
| … | … | … |
| T13 | — | ADD.T of 32(2r+1) if s5 |
| T14 | — | Ca.T if s5; T14 clears F_T |

That is 15 strobes. The original counts 14 slave clock pulses and ends on
the trailing edge of the 14th; here the loading step and the closing step in
T14 each take a strobe of their own. With the default divider, F_T stays high for exactly
150 system clocks (15 µs at 10 MHz) per sample pair.

## Control and operator keys

* **F_DO** (`master_control_ff`) means "process ON". Key-start sets it.
  Key-clear, Key-stop, or the C0 pulse reset it. While the Key-run switch
  is on, the C0 pulse is ignored, so the measurement runs until Key-stop.
* **F_T** (`slave_control_ff`) is set by an A/D done pulse while F_DO = 1
  and cleared by T14. A done pulse that arrives while a computation is
  still running is ignored: that pair is not computed and not counted, and
  `sample_skipped` pulses. The delay memory keeps shifting, so the delays
  stay exact.
* **C0 counter.** Six BCD decades count the completed computations. It
  pulses at 10^4, 10^5 or 10^6 (`c0_range` = 0, 1, 2). At 10^6 the readout
  rolls over to 000000. The count is the measuring time in sampling
  intervals.
* **Display counter.** Six BCD decades count the accumulator carries. With
  `freq_mode` = 1 it shows instead the number of sampling pulses per gate
  of `GATE_CLKS` clocks. This is 1 s by default, so the reading is the
  sampling frequency in Hz. The correlation count is preserved.
* **Key-clear** zeroes the accumulator, S, R, both counters and both control
  flip-flops. It does not clear the delay memory.
* **Key filters** (`key_filter`). Each raw push-button is synchronised and
  must be stable for `DEB_CLKS` clocks (10 ms). Each press gives one pulse,
  however long the key is held.

To run a measurement:
1. Choose the sampling interval (`sample_period`, or external pulses with
   `ext_sample_sel`).
2. Set `tau_m` and `c0_range`.
3. Press Key-clear, then Key-start.
4. Wait for `process_on` to fall.
5. Read `corr_readout` and `c0_readout` one clock later. The last carry
   reaches the display one clock after F_T falls.

## Clocking and rates

Everything runs on one clock, `clk`, assumed to be 10 MHz. The original
used ripple counters and pulses as clocks; here those are one-clock strobes.
The parameters of `autocorrelator_top`:

| parameter | default | meaning |
|---|---|---|
| `CP_DIV` | 10 | system clocks per slave clock pulse (1 MHz) |
| `DEB_CLKS` | 100000 | key filter time (10 ms) |
| `GATE_CLKS` | 10000000 | frequency-mode gate (1 s) |

The fixed sizes are in `corr_pkg`:

| constant | value |
|---|---|
| sample width | 6 bits |
| register S | 7 bits |
| register R | 12 bits |
| accumulator | 13 bits |
| delay stages | 18 |
| counters | 6 decades each |

Constraints on the sampling interval T:

* **Minimum T.** T must be longer than the A/D conversion time plus one
  slave clock period plus two clocks. Registers S and R load on the first
  `cp` after the done pulse. If the next sampling pulse came before that
  load, the delay memory would already have shifted.
* **Skipping.** If T is shorter than conversion + 150 clocks, some samples
  are skipped. The result is still correct, but C0 takes longer to reach.
  With a 6 µs converter, about 47 kHz is the fastest rate without skips.
  The original instrument quotes 100 kHz as its maximum sampling rate but
  also takes 14 µs per computation. This design resolves that conflict by
  skipping.
* **Sampling pulse generator** (`sampling_pulse_gen`). It divides `clk` by
  `sample_period` (2..65535 clocks), or takes external pulses on
  `ext_sample` through a synchroniser. The same one-clock pulse is the A/D
  convert pulse (`adc_convert`).

## The A/D converter interface

The converter is outside the design. The top module drives `adc_convert`
and takes back `adc_data[5:0]` and a one-clock `adc_done`. `adc_data` must
keep the previous result until the next conversion finishes, as a
successive-approximation converter's output register does. `tb/adc_model.sv`
is a behavioural model with a 6 µs (60-clock) conversion. It quantises
0..10 V into 64 levels.

## Where this departs from the original instrument

* It uses one synchronous clock. The ripple control counter, F1 used as a
  shift clock, the one-shots, and the RC delay on the slave clock are all
  replaced by strobes. The decoding spikes and clock-overlap problems that
  the original had to design around therefore do not arise.
* A done pulse during a computation is skipped instead of upsetting F_T.
  In the original, set and reset reach one J-K flip-flop through the same
  gate, so such a pulse could have ended a computation early.
* There is a power-on reset for every register, including the delay memory.
* The key filters are counters instead of RC networks and latches.
* The C0 and display counters were bought instruments. Here they are
  six-decade BCD counters. The frequency-gate length and the 2-bit C0
  range select are this design's choices.
* Only delays 0..18 are provided (18 stages). The original's specification
  mentions up to 19·T in one place, but its switch wiring provides 0..18.
* These suggested extensions of the original are not built:
  * cross-correlation by alternating two inputs into one converter;
  * automatic stepping of τ with a counter instead of the switch.

## Files

`rtl/`, one module per file:

| file | block |
|---|---|
| `corr_pkg.sv` | widths and the `ctrl_t` strobe struct |
| `autocorrelator_top.sv` | the whole correlator |
| `tau_shift_register.sv` | delay memory |
| `tau_select.sv` | τ select switch |
| `register_s.sv` | register S |
| `register_r.sv` | register R |
| `accumulator.sv` | accumulator with the two-stage adder |
| `control_counter.sv` | control counter and its decoding |
| `master_control_ff.sv` | F_DO |
| `slave_control_ff.sv` | F_T |
| `slave_clock_gen.sv` | slave clock |
| `sampling_pulse_gen.sv` | sampling pulses |
| `c0_counter.sv` | C0 counter |
| `display_counter.sv` | display counter |
| `key_filter.sv` | key filter |
| `bcd_counter.sv` | decade-chain helper |

`tb/` holds:

* `tb_<module>.sv`: one self-checking testbench per block.
* `tb_autocorrelator_top.sv`: end to end at reduced timing.
* `tb_autocorrelator_full.sv`: all defaults.
* `tb_workload_signals.sv`: the signal sweep.
* `adc_model.sv`: the converter model.

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself
with a watchdog.

To simulate, for example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/corr_pkg.sv tb/tb_autocorrelator_top.sv --top-module tb_autocorrelator_top
./obj_dir/Vtb_autocorrelator_top
```

Each testbench and the test it runs:

* **Unit testbenches.** Each compares its block with an independent model:
  * the accumulator against integer addition;
  * the control counter against the state table above;
  * the counters against integer counts.
* **`tb_autocorrelator_top`.** Has its own reference model: it keeps the
  converter's outputs and sums r + s + 2rs for every pair that starts a
  computation, and the display must equal floor(sum/8192) exactly. It runs:
  * a DC input (also checked against the closed form);
  * a random input;
  * a sampling rate that forces skips;
  * Key-run then Key-stop;
  * external sampling pulses;
  * a mid-measurement Key-clear;
  * frequency mode.

  It also checks that every computation lasts 15 slave clock periods.
* **`tb_autocorrelator_full`.** Default parameters. It runs a complete
  C0 = 10^5 DC measurement (reads 40039 for level 40), then a C0 = 10^4
  sine measurement.
* **`tb_workload_signals`.** Sweeps m = 0..18 at C0 = 10^4 for these
  inputs:
  * 500 Hz, 1 kHz and 5 kHz sines;
  * a 1 kHz rectangular wave;
  * a 5 kHz sine plus noise;
  * a 5 kHz rectangular wave plus noise.

  Every point must match the reference model. The curves must also have
  the expected shape:
  * the maximum of every sweep is at m = 0;
  * for the 5 kHz sine (8 samples per period), R(4) is the smallest value
    and R(8) is within 3 % of R(0);
  * for the 1 kHz rectangular wave (40 samples per period), R(m) never rises
    over m = 0..18.

  The sampling rate is 40 kHz. The run takes about a minute.

Not verified: behaviour with a real converter and real switches, and timing
closure at any particular clock (the logic is small: about 370 flip-flops).
