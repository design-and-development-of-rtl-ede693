# Three-stage FIR decimator for 256 kHz audio

This is a decimation filter that takes audio sampled at 256 kHz and brings it down to 8 kHz, a
rate reduction of 32, while keeping the 0–3.4 kHz speech band. Before samples are dropped, a
low-pass filter has to remove everything that would fold back into that band.

Doing this in one step needs a single very sharp filter. It has to fall from 3.4 kHz to 4 kHz at a
256 kHz rate, which takes an order-900 FIR and about 900 multiplications for each input sample. This
design splits the job into three low-pass-and-down-sample stages (÷8, ÷2, ÷2). Each stage only has
to protect the band that the *next* rate would fold onto 0–3.4 kHz. Early stages run fast but can
therefore have wide transition bands and short filters. Late stages need sharp filters but run at
low rates. The orders used are 25, 69 and 136, which is 233 coefficients in total instead of 901.

```
 256 kHz        32 kHz          16 kHz           8 kHz
 ──► [LPF 26 taps] ─► ↓8 ─► [LPF 70 taps] ─► ↓2 ─► [LPF 137 taps] ─► ↓2 ──►
      stage 1                 stage 2                  stage 3
```

For comparison, these are the filter sizes of the other ways to split the ÷32 with the same
specification:

| stages | filter orders       | factors    | coefficients (Σ orders) |
|--------|---------------------|------------|--------------------------|
| 1      | 900                 | 32         | 900                      |
| 2      | 83, 155             | 16, 2      | 238                      |
| 3      | 25, 69, 136         | 8, 2, 2    | 230 (built)              |
| 4      | 10, 26, 75, 140     | 4, 2, 2, 2 | 251                      |

The three-stage split has the least storage, so it is the one implemented as the top. The stage
module is generic, so the other splits can be assembled from it. A testbench does exactly that
(see *The other splits*).

## One stage

Every stage (`decim_stage`) is the same chain of four blocks:

```
in ─► fir_mac ─► z1_reg ─► fix_convert ─► down_sample ─► out
      (MAC FIR)  (z^-1)    (round+sat)    (keep 1 in M)
```

* **`fir_mac`** computes `y[n] = Σ h[k]·x[n−k]` for *every* input sample. The filter uses a
  single multiplier-accumulator, not one multiplier per tap. The tapped delay line is a circular
  buffer of NTAPS samples. Each new sample overwrites the oldest one. The MAC then reads the buffer
  backwards from the newest sample while a tap counter reads the coefficient ROM (`coef_rom`)
  forwards, one product per clock. The result keeps full precision
  (16 + 16 + ⌈log2 NTAPS⌉ bits), so the accumulator cannot overflow.
* **`z1_reg`** is a one-word pipeline register between the filter and the cast.
* **`fix_convert`** turns the full-precision sum back into a 16-bit sample. It drops the 15
  coefficient fraction bits with round-half-up and saturates instead of wrapping. `sat` marks a
  clipped word.
* **`down_sample`** forwards the first word of every group of M and drops the other M−1.

This is the straightforward structure: filter every sample, then throw most results away. Stage 1
therefore spends 7 of every 8 MAC passes on outputs that get discarded. A polyphase stage, which
computes only the kept outputs, would need 1/M of the MAC work. That is not what this design does.
The MAC-per-sample cost is still small enough for any FPGA clock (see *Timing*).

## Timing and throughput

All links carry a 16-bit word with `valid`/`ready`. A word moves on a clock edge where both are
high. Words on the data path are signed two's complement (Q1.15).

| block        | latency                                   | throughput                         |
|--------------|-------------------------------------------|------------------------------------|
| fir_mac      | `out_valid` NTAPS+2 clocks after accepting | one sample per NTAPS+3 clocks       |
| z1_reg       | 1 clock                                   | one word per clock                 |
| fix_convert  | 0 (combinational)                          | one word per clock                 |
| down_sample  | 0 (combinational)                          | one word per clock                 |

The MAC is the bottleneck. Stage 1 needs 29 clocks per 256 kHz sample, stage 2 needs 73 per
32 kHz sample and stage 3 needs 140 per 16 kHz sample. At the top, 29 clocks per input sample is
the binding number: **any clock of 7.424 MHz or more keeps up with a 256 kHz input** and
`in_ready` never drops. If samples come faster, `in_ready` goes low. If the consumer of `out_data`
stalls, the stall propagates back through every stage to `in_ready`, and no data is lost.

After reset (`rst_n` low, synchronous) each filter spends NTAPS clocks writing zeros into its delay
line, and `in_ready` stays low during that time. The first outputs are then exactly what a filter
that starts from silence would give.

## Coefficients

The specification gives each filter's order, a 3.4 kHz pass-band edge, a stop-band edge
(28 kHz, 12 kHz and 8 kHz for the three stages), 0.033 dB pass-band ripple and 40 dB stop-band
attenuation. It gives no coefficient values. The sets in `rtl/coef_s1.hex`, `coef_s2.hex` and
`coef_s3.hex` are designed as follows (one 16-bit hex word per line, tap 0 first,
`word = round(h[k]·2^15)`, scaled for unit DC gain):

| stage | taps | designed at | pass / stop edges | method                                  | after rounding                      |
|-------|------|-------------|-------------------|------------------------------------------|-------------------------------------|
| 1     | 26   | 256 kHz     | 3.4 / 28 kHz      | equiripple (Parks-McClellan)             | 0.037 dB ripple, 44.8 dB stop band  |
| 2     | 70   | 32 kHz      | 3.4 / 12 kHz      | Kaiser-windowed sinc, cutoff 7.7 kHz, β = 7.857 | 0.003 dB ripple, 79.0 dB stop band |
| 3     | 137  | 16 kHz      | 3.4 / 4 kHz       | equiripple (Parks-McClellan)             | 0.004 dB ripple, 68.6 dB stop band  |

The equiripple weights are 1/δp and 1/δs, with δp = 10^(0.033/20) − 1 and δs = 10^(−40/20).

Where this departs from the specification:

* **Design rate of stages 2 and 3.** The specification's tables design all three filters on a
  256 kHz scale, but stages 2 and 3 run at 32 kHz and 16 kHz. A filter designed for 256 kHz and
  run at 16 kHz has all its frequencies scaled by 1/16. Its pass band would end near 0.2 kHz and
  the speech band would be lost. Here every set is designed for the rate its stage actually runs
  at. The filter orders, and therefore the hardware, are the specification's.
* **Stage-3 stop band.** The specified 8 kHz stop edge is the Nyquist frequency of a 16 kHz
  stage, so it leaves no stop band. 4 kHz is used instead. All the other stop edges of the
  specification follow one rule, *next output rate − 4 kHz* (28 = 32 − 4, 12 = 16 − 4, and
  60 = 64 − 4 in the four-stage split), and the single-stage design also stops at 4 kHz.
* **Stage-2 method.** At 32 kHz, 70 taps are far more than a 3.4–12 kHz transition needs, and
  the equiripple iteration does not converge. A windowed design uses the margin for 79 dB instead.
* **Stage-1 ripple.** 0.037 dB is slightly above the 0.033 dB target.
* **DC gain.** Rounding leaves DC gains of 32770/32768, 1 and 32775/32768. A full-scale constant
  input therefore clips by a few LSBs.

Any other set of the same length can be used by pointing `COEF1`, `COEF2` or `COEF3` (top) or
`COEF_FILE` (stage) at another file. Paths are relative to the directory the simulator or
synthesis tool runs in.

## The other splits

`tb_split_workloads` builds the one-, two- and four-stage splits from the same `decim_stage`
block. Their coefficient sets are in `tb/` and follow the same rules. All three splits run on one
input and are checked bit for bit against the reference model. Measured on that input, with
12 000 as the input amplitude:

| split      | coefficients stored | multiplications per output sample | 1 kHz out | 5 kHz out |
|------------|---------------------|-----------------------------------|-----------|-----------|
| 1 stage    | 901                 | 28 832                            | 11 894    | 65        |
| 2 stages   | 240                 | 3 000                             | 12 001    | 3.2       |
| 3 stages (top) | 233             | 1 386                             | 11 999    | 1.0       |
| 4 stages   | 255                 | 1 154                             | 11 991    | 1.2       |

"Multiplications per output sample" counts what this filter-then-discard structure does: stage
i filters every sample it receives. By that count the four-stage split is the cheapest in
arithmetic and the three-stage split the cheapest in storage. The single-stage filter costs about
20 to 25 times as much as either. It is also limited by Q1.15 rounding of its
small coefficients to about 38 dB of stop band. Its 901-tap MAC also needs 904 clocks per
256 kHz sample, which is a 231 MHz clock.

## Number formats

* Samples between all blocks and at the top ports are 16-bit two's complement (Q1.15).
* Coefficients are 16-bit Q1.15.
* MAC results are full precision: 37, 39 and 40 bits for the three stages.
* Each stage's `fix_convert` brings the result back to Q1.15 with round-half-up and saturation.
  `sat_event[i]` pulses once for each result of stage i+1 that was clipped, whether the
  down-sampler keeps or drops it.

None of these widths or modes is given by the specification; they are this implementation's
choices for an audio path.

## Files

| file | contents |
|------|----------|
| `rtl/decim_pkg.sv` | sample/coefficient widths, `sample_t`, accumulator-width function |
| `rtl/decim3_top.sv` | top: three stages in series (parameters `N1..N3`, `M1..M3`, `COEF1..3`) |
| `rtl/decim_stage.sv` | one stage: FIR → register → convert → down-sampler |
| `rtl/fir_mac.sv`, `rtl/coef_rom.sv` | MAC FIR and its coefficient ROM |
| `rtl/z1_reg.sv`, `rtl/fix_convert.sv`, `rtl/down_sample.sv` | the other stage blocks |
| `rtl/coef_s{1,2,3}.hex` | coefficient sets |
| `tb/decim_ref_pkg.sv` | bit-exact reference: convolution, round/saturate, keep 1 in M |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_split_workloads` |
| `tb/coef_*.hex` | coefficient sets of the one-, two- and four-stage splits |

## Verification

Every testbench compares against values computed independently of the RTL and prints a single
line `TB_RESULT checks=N failures=F` at the end.

* `tb_decim3_top` runs the full-size design with no parameter overrides. It sends 24 576 samples.
  The first 20 480 come at exactly 29 clocks per sample, the 256 kHz rate on a 7.424 MHz clock, and
  must not be back-pressured. The rest come back to back while the output consumer stalls at
  random. The input contains random words, a full-scale square wave, and 1, 5 and 20 kHz tones.
  The test checks:
  * every output word, bit for bit, against the three-stage reference model;
  * the word counts after each stage (1/8, 1/16, 1/32 of the input);
  * the clip count of each stage;
  * that the 1 kHz tone comes out within 1 %. Measured: 11 999.0 for 12 000 in;
  * that the 5 kHz and 20 kHz tones come out at least 40 dB down. Measured: 1.0 and 0.0;
  * that each mechanism happened at least once: input stall, output stall, and clipping in each
    of the three stages.
* `tb_decim_stage` tests stage 1 on its own: bit-exact output, the output count, the clip count,
  1 kHz pass-band gain within 1 % and a 60 kHz tone at least 35 dB down.
* `tb_fir_mac` checks results against a plain convolution. It also checks the NTAPS-clock clear
  after reset, the NTAPS+2 latency and the NTAPS+3 sample spacing.
* `tb_z1_reg`, `tb_fix_convert` and `tb_down_sample` check ordering and throughput, rounding and
  saturation corner cases plus 20 000 random values, and the keep-1-in-M pattern under random
  stalls.
* `fir_mac` and `z1_reg` carry assertions for the handshake rule: a word that is offered stays
  stable until it is taken.

Simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`, because the coefficient
paths are relative to it. For example, for the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/decim_pkg.sv tb/decim_ref_pkg.sv tb/tb_decim3_top.sv --top-module tb_decim3_top
./obj_dir/Vtb_decim3_top
```

The same command with another `tb_<name>` runs any of the other testbenches. The full-size test
takes about a second.

## Changing the design

* **Other splits.** The top is three `decim_stage` instances in series. A two- or four-stage
  decimator is built the same way from stages with the sizes in the table above, each with its own
  coefficient file.
* **Clock rate.** The rule is: clock ≥ (NTAPS+3) × (that stage's input rate), for every stage.
* **Widths.** The widths live in `decim_pkg`. The accumulator grows automatically with the tap
  count.
* **Target memory.** The delay line is written as an array with one write port and one
  combinational read port, and the ROM as an initialised array. Both map to distributed RAM/LUTs.
  For block RAM, register the read address and add one clock to the MAC pipeline.
