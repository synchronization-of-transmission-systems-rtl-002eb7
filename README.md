# ANS-DM link with clock-pulse synchronization

Adaptive non-uniform sampling delta modulation (ANS-DM) codes a signal one bit at a
time. Both the quantization step and the time between samples adapt to the signal.
On a steep slope the step grows and the samples come faster. On a flat stretch the
step goes back to its minimum and the samples spread out. The transmitted stream is
therefore made of bits of **variable duration**. A bit lasts one or more base clock
periods, and the receiver knows how many only by running the same adaptation as the
transmitter.

The trouble starts when coder and decoder each have their own crystal. Two 50 MHz
oscillators are never exactly equal. The decoder's base clock slowly slides against
the coder's until it samples a bit in the wrong base period, and from then on the
two adaptation states differ and the reconstruction is lost. This design keeps the
decoder's base clock locked to the coder's. It never touches the oscillator. It
only changes how many main clock pulses make up one base period:

* **pulse removal** when the decoder's crystal is faster: one main clock period is
  removed, so the whole decoder stands still for 20 ns;
* **divide by m** when the decoder's crystal is slower: the divider counts one
  period short once, so one base period lasts 35 instead of 36 main periods.

Each correction takes place in the first main period of a base period. That slot
belongs to neither the predictor update nor the D/A write, so a correction never
disturbs the output. With both corrections on, the link holds for either sign of
the frequency difference.

All RTL is synthesizable SystemVerilog-2017. The analog chain is outside the RTL:
amplifier, A/D and D/A converters, crystals and reconstruction filter. It enters
the design as ports.

## Clocks and the base period

| clock | period | source |
|---|---|---|
| main clock | 20 ns (50 MHz) | crystal, one per side |
| base clock | 720 ns = 36 main periods | `base_clock_divider` |

The divider counts **35 down to 0** and marks count 0 as the base clock event
(`tick`). Everything that paces the codec runs on that event:

* decimation of the A/D samples;
* the comparator;
* the predictor;
* the D/A word.

The two corrections both act at count 35:

```
normal     35 34 33 32 ... 1 0 | 35 34 ...     36 main periods
removed    35 35 34 33 ... 1 0 | 35 ...        37 (decoder stands still once)
divide-m   35 33 32 ... 1 0    | 35 ...        35 (count 34 skipped)
```

In this design the coder always divides by 36 (= m+1). The decoder divides by 36 or
by 35 (= m) and may add one period by pulse removal. A bit therefore lasts
36·tau main periods, where tau is its interval in base periods.

## ANS-DM coding (`adaptation_logic`, `predictor`, `quantizer`)

At each sampling instant the coder compares the 12-bit input x with the
predictor's staircase s:

* it decides `b = (x >= s)`;
* it moves s by ±k;
* it puts b on the line until the next instant, tau base periods later.

The step k and the interval tau for a bit follow from the last three bits and from
two flags. The flags `kf` and `tf` say whether k and tau are currently away from
their starting values:

| b(i-2) b(i-1) b(i) | kf tf | → kf tf | step | interval |
|---|---|---|---|---|
| 000 / 111 (run) | 0 0 | 0 1 | k0 | K1·tau |
| | 0 1 | 1 0 | P·k | tau0 |
| | 1 0 | 1 1 | P·k | K1·tau |
| | 1 1 | 1 1 | P·k | K1·tau |
| 010 / 101 (alternation) | any | 0 1 | k0 | K2·tau |
| anything else | any | 0 0 | k0 | tau0 |

The results are limited as follows:

* k ≤ KMAX;
* TAU_MIN ≤ tau ≤ TAU_MAX.

A shorter form of the interval rule also circulates: K1 after a 1 and K2 after a
0, from the current bit alone. This design follows the three-bit table above
instead, in which runs shorten the interval and alternations lengthen it.

The "anything else" rows return both values to their starting points. That is what
lets a decoder that starts late, or takes a channel error, fall back into step with
the coder.

The table itself comes from the ANS-DM algorithm. Its constants are free parameters
of the algorithm, and the values below are this design's choice. They are in
`ansdm_pkg`. Factors are Q4 fixed point, so for example `K1_Q4 = 8` means 0.5.

| constant | value | meaning |
|---|---|---|
| K0 | 4 LSB | starting (minimum) step |
| KMAX | 512 LSB | maximum step |
| P | 2.0 | step growth in a run |
| TAU0 | 4 base periods | starting interval |
| TAU_MIN / TAU_MAX | 1 / 16 | interval limits |
| K1 / K2 | 0.5 / 2.0 | interval shrink / growth |

The predictor saturates at 0 and 4095 and starts at mid scale (2048).

## Synchronization in the decoder

```
 rx ──► measuring_circuit ──phase_err──► decision_circuit ──remove──► clock_pulse_remover ──clk_en──► (all decoder logic)
          ▲ cnt                              │ skip                        └─ gclk ──► dac_clk
          └────────── base_clock_divider ◄───┘
```

**Where the decoder samples.** After reset the decoder's divider starts at count 17,
which places its base clock half a base period behind the coder's. Each received
bit is therefore sampled in the middle of a base period, as far as possible from
both of its edges. The first decoder tick after reset comes before the coder's
first sample, so `interval_timer` ignores it (`START_DELAY = 1`).

**Measuring.** The serial line passes a 2-flop synchronizer. A third flop detects
transitions. Every bit edge leaves the coder on a coder base clock event, so the
decoder's divider count at a detected transition shows the phase between the two
base clocks. In lock that count is `LOCK_CNT = 15`, a value set by the latency of
the coder output register and the synchronizer. The circuit reports
`phase_err = cnt − 15`, wrapped into [−18, 17].

**Deciding.** The decision circuit uses a dead band of ±1 main period, which absorbs
the one-period uncertainty of the synchronizer:

* `phase_err < −1`: the decoder is ahead, so it arms a removal;
* `phase_err > +1`: the decoder is behind, so it arms a divide-by-m.

An armed correction is issued at the next decoder base tick. It is dropped if the
mode no longer allows it. At most one correction is issued per base period.

**Modes (`sync_mode`).**

| mode | corrections | use |
|---|---|---|
| `SYNC_BOTH` | remove and divide | normal operation, either sign |
| `SYNC_REMOVE` | remove only | decoder crystal known to be faster |
| `SYNC_DIVIDE` | divide only | decoder crystal known to be slower |
| `SYNC_OFF` | none | free running (the link drifts apart) |

**Pulse removal** is done with a clock enable. For one period `clk_en` is low, and
every decoder register holds its value. That is the synchronous equivalent of a
missing clock edge, and it keeps a single clock tree. The D/A converter needs a
real clock, so `clock_pulse_remover` also drives `gclk` (`dac_clk` at the top). It
is gated by a latch that is transparent while the clock is low, so the removed
pulse appears as a low level stretched by one period. That latch is the only one in
the design, and it is intentional.

**Tracking range.** The decoder corrects at most one main period per received
transition, and at most one per base period. Transitions are farthest apart in an
alternating stream at the longest interval: 16 base periods, or 576 main periods.
The link therefore follows a frequency difference of up to about
1/576 ≈ 1700 ppm. Beyond that, the phase walks away faster than it is corrected.
The end-to-end test runs at ±100 ppm, the worst case for two ±50 ppm crystals,
and at ±500 ppm. In steady state the number of corrections equals the number of
main periods the clocks drift apart: at 100 ppm, one every 10,000 main periods.

## D/A interface (`dac_interface`)

The D/A interface works as follows:

* At every decoder base tick it loads the predictor value into `dac_data`. The
  word is the value from before that tick's update, so the output lags by one
  base period.
* The active-low `dac_cs_n` is low for four main periods, while the count is in
  28..31 (registered, so one period later).

That window keeps clear of count 35, the correction slot. The window position is
this design's choice. With a different converter, move it with `CS_FIRST` and
`CS_LAST`.

## Modules

| module | role |
|---|---|
| `ansdm_link_top` | coder and decoder joined by the serial line (two clock domains) |
| `ansdm_coder` | divider, decimation, interval timer, comparator, adaptation, predictor |
| `ansdm_decoder` | pulse remover, divider, measuring, decision, interval timer, adaptation, predictor, D/A interface |
| `adaptation_logic` | step / interval table, bit history, limits |
| `predictor` | saturating staircase accumulator |
| `quantizer` | comparator with registered output bit |
| `decimation` | one A/D word per base period, top 12 of 14 bits |
| `interval_timer` | counts base periods to the next sampling instant |
| `base_clock_divider` | ÷36 counter with hold and skip |
| `clock_pulse_remover` | one-period clock enable and glitch-free gated clock |
| `measuring_circuit` | synchronizer, transition detector, phase capture |
| `decision_circuit` | dead band, mode, one correction per base period |
| `dac_interface` | D/A word and chip select |
| `ansdm_pkg` | widths, constants, `sync_mode_e` |

### Top-level ports (`ansdm_link_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `enc_clk`, `enc_rst_n` | in | 1 | coder main clock, async active-low reset |
| `adc_data` | in | 14 | A/D word, one per `enc_clk` |
| `dec_clk`, `dec_rst_n` | in | 1 | decoder main clock (own crystal), reset |
| `sync_mode` | in | 2 | `sync_mode_e` |
| `serial_line` | out | 1 | transmitted bit stream |
| `enc_sample`, `enc_pred`, `enc_tick` | out | 1/12/1 | coder sampling instant, staircase, base tick |
| `dec_sample`, `dec_pred` | out | 1/12 | decoder sampling instant, rebuilt staircase |
| `dac_data`, `dac_cs_n`, `dac_clk` | out | 12/1/1 | D/A converter interface |
| `sync_remove`, `sync_skip` | out | 1 | a correction is being made |

Release both resets together. A correctly locked link gives the same sequence on
`enc_pred` (at `enc_sample`) and on `dec_pred` (at `dec_sample`), about half a base
period later.

## Choices made in this implementation

These points are not fixed by the method and were chosen here:

* all adaptation constants (table above);
* the decimation keeps one sample per base period and drops two LSBs, with no
  averaging filter;
* a tie in the comparator codes a 1;
* the predictor saturates at 0 and 4095;
* the decoder runs half a base period behind the coder, so the synchronizer's lock
  count is 15;
* the dead band of ±1 main period;
* the D/A chip-select window and its parallel data port;
* separate asynchronous resets, released together. There is no start-up search for
  bit alignment: the return-to-start rows of the adaptation table are what bring a
  late decoder back.

The coder divides by 36 in every mode. The D/A converter is driven in every mode,
so the base period is the same 720 ns whichever corrections are enabled.

## Simulation

Every module has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=N failures=M` line. `tb/ansdm_ref_pkg.sv` holds an independent
reference model of the algorithm and the A/D test waveform. The waveform cycles
through four segments:

* a nearly flat sine, which gives long intervals;
* a fast, large sine, which makes the step grow;
* a slow sine;
* a square wave, which drives the step to its limit.

To run the end-to-end test at the default parameters with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ansdm_pkg.sv tb/ansdm_ref_pkg.sv tb/tb_ansdm_link_top.sv \
  --top-module tb_ansdm_link_top -o sim
./obj_dir/sim
```

For any other block, replace `tb_ansdm_link_top` with that block's testbench name.

What the larger testbenches check:

* **`tb_ansdm_link_top`**: two independent clocks and seven phases covering
  +100, −100, +500 and −500 ppm in the correcting modes. Every rebuilt value must
  equal the coder's, and the number of corrections must match the drift within
  20 %. With `SYNC_OFF` the link must lose lock, which shows that the corrections
  are what keeps it together. It simulates 26 ms of link time in a few seconds.
* **`tb_ansdm_decoder`**: a reference transmitter on the decoder's clock. Its base
  periods are lengthened or shortened to force each kind of correction, and the
  decoded staircase is compared with the reference.
* **`tb_ansdm_coder`**: follows the coder cycle by cycle against the reference
  model. It checks the base period, the sampling instants, the bits and the
  staircase, and that both limits of k and tau are reached.

## Limits

* Only the digital part is RTL. The programmable-gain amplifier, the converters,
  the crystals with their internal/external clock switch, and the output low-pass
  filter are not modelled.
* Lock is assumed at start (resets released together). A decoder switched on in
  the middle of a transmission pulls its base clock in one main period per
  transition. Until it is in lock it decodes wrongly, and afterwards the staircase
  can stay offset, because the predictor has no leak.
* The datapath is 12 bits wide. A 16-bit version would need the package widths and
  constants changed. It would also tolerate a much smaller frequency difference,
  because the permitted drift shrinks with converter resolution.
