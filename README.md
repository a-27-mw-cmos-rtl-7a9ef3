# Fractional-N GFSK transmitter with digital compensation

A fractional-N synthesizer makes a good frequency modulator. You move the
divide value and the VCO follows, with no mixer and no D/A converter. The
catch is the PLL's low-pass response. To keep sigma-delta noise low, the loop
bandwidth here is about 84 kHz, thirty times below a 2.5 Mb/s data rate. Sent
straight into the divider, such data would come out of the VCO smeared beyond
recognition.

This design removes that limit digitally. The PLL's closed-loop frequency
response G(f) is known and set by a tuned loop gain. So the transmit filter
that shapes the data is also given the inverse response 1/G(f). The filter
boosts exactly the high frequencies that the loop will later attenuate. After
the loop, the VCO frequency is the wanted Gaussian-filtered (GFSK) waveform.
Because the filter is digital, the whole modulation path is digital up to the
divider:

```
 data ─► compensated   ─► 10-bit  ─► + carrier ─► 2nd-order MASH ─► 6-bit  ─► 64-modulus ─► to phase
 2.5 Mb/s transmit        samples    word         sigma-delta        divide    divider        detector
          filter (ROM)    20 MHz     (16 bits)    (pipelined)        control   (VCO clock)
```

The RTL covers everything digital in this chain:
- the compensated transmit filter;
- the serial control register (carrier word and charge-pump gain);
- the carry-pipelined adder and accumulator datapath;
- the MASH modulator;
- the 64-modulus divider.

The phase detector, charge pump, switched-capacitor loop filter and LC VCO
are analog and stay outside `fracn_top`. Its ports are where they connect.

## Reference numbers

| Quantity | Value |
|---|---|
| Reference (sigma-delta sample) rate | 20 MHz |
| Data rate | 2.5 Mb/s, 8 samples per bit |
| Gaussian filter | BT = 0.5, modulation index 0.5 (±625 kHz peak) |
| Carrier | about 1.8–1.9 GHz, divide value 90–95 |
| Closed-loop response G(f) | second order, fo = 84.3 kHz, Q = 0.75, with a zero at fz = 11.6 kHz and a pole at fcp = 14.2 kHz |
| Divider | 64 moduli: divide by 64 + D for D = 0..63, in VCO cycles |
| Modulator | second-order MASH, 16-bit input, 6-bit output, pipelined every 2 bits |

## Number format

The digital path carries one 16-bit unsigned word per reference cycle. The
word is the divide value above 64, as 6 integer bits and 10 fractional bits.
A carrier word `C` therefore gives an average division of `64 + C/1024`.
At 20 MHz, one fractional LSB is 19.5 kHz of VCO frequency.

The modulation sample `mod` is a signed 10-bit number. The path
sign-extends it and shifts it left by `MOD_SHIFT = 4`, then adds it to the
carrier. One modulation code is therefore 2^-6 of a divide step, or 312.5 kHz
of instantaneous frequency before the loop filters it.

This weight is a compromise:
- The compensated pulse peaks near 4.6 divide steps at 2.5 Mb/s. That is
  294 codes, so it fits in 10 bits.
- The steady deviation of a long run of equal bits is only about 1.6 codes,
  which rounds to 2.

Frequency accuracy in long runs is therefore coarse. The eye test below
measures what this costs. Widening `MOD_W`, or lowering `MOD_SHIFT` together
with a regenerated table, trades that off differently.

A negative modulation sample wraps the 16-bit sum modulo 2^16. That is
harmless, because the modulator works modulo 2^6 on the integer part and the
divider's value stays in range as long as the carrier does. For the main
case, D stays within about 21..37.

## Compensated transmit filter (`tx_filter_rom`)

The filter is a ROM. Its address is the last `SPAN = 4` data bits plus a
3-bit sample counter (`OSR = 8` samples per bit), so it has 128 entries.
Every eighth reference cycle it raises `bit_req` and takes a new bit from
`data_in`. It then outputs one registered sample per reference cycle.

Each entry is the sum of the four bits' pulse contributions:

```
 entry(bits, n) = round( 64 · Σ_{j=0..3} s_j · dev · wc(t_j) )          (units of 2^-6 divide step)
 t_j    = (j - 1.5)·Td + (n + 0.5)·Td/8 - Td/2        (j = 0 is the newest bit, n = 0..7)
 wc(t)  = (fz/fcp) · [ g(t) + g'(t)/(2π·fo·Q) + g''(t)/(2π·fo)^2 ]
 g(t)   = Q((t - Td/2)/σ) - Q((t + Td/2)/σ),   Q = Gaussian tail function
 σ      = sqrt(ln 2)/(2π·BT) · Td,   dev = h/(2·Td·fref) = 0.3125 divide steps
 s_j    = +1 for a one, -1 for a zero
```

Here `g(t)` is the usual GFSK frequency pulse: a one-bit rectangle convolved
with a Gaussian, scaled to 1 for a long run of ones. `dev` is the peak
deviation h/(2·Td) = 625 kHz expressed in divide steps (divided by fref). The two derivative terms undo the second-order pole pair
of G(f). The factor fz/fcp undoes the gain that the zero/pole pair adds
above 14 kHz. The residual low-frequency part of that pair is left
uncompensated, as intended: it lies below the data spectrum.

The table was computed offline from this formula with Simpson integration and
stored in `rtl/tx_filter_rom.hex`, one signed 10-bit value per line in
two's-complement hex. The largest entry is 294. The testbench
`tb_tx_filter_rom` recomputes every entry in SystemVerilog `real` arithmetic
and allows one code of rounding difference. That independent derivation is
the reference for regenerating the table with other constants.

## Pipe-shifted arithmetic

The modulator's power is set by its supply voltage. Cutting the carry chains
lets every adder meet 20 MHz with far slower gates, so the supply can be
lowered.
Words are split into groups of `GRP = 2` bits, and each group boundary gets
a register in the carry path. A 16-bit adder then has 8 two-bit adders,
each with its own registered carry-in.

For this to add correctly, group g of each operand must arrive g cycles after
group 0. This "pipe-shifted" time domain is the key idea:
- `pipe_shift` delays group g by g cycles. Group 0 passes straight through.
- In the skewed domain, word k's group g is present in cycle k + g. That is
  exactly when the carry out of group g−1 of the same word leaves its
  register.
- `align_shift` delays group g of the result by NG−1−g cycles, so that all
  groups of a word come out together again.

Any number of adders and accumulators can be chained inside the skewed
domain. The design needs only one pipe shift at the input and one align
shift at the output.

An accumulator (`pipelined_accumulator`) works the same way: each group adds
its own previous value. That only works because no feedback runs from high
bits to low bits. A first-order sigma-delta stage is such an accumulator
with the top bits dropped from the feedback. The FB_W = 10 fractional bits
feed back. The 6 integer bits (groups 5..7) are the stage output, computed
afresh from each word and never stored back.

The carrier is not pipe-shifted, because it is held constant while
modulating. This matches the prototype. If the carrier changes, the words in
flight take the new value group by group. That is a transient of one word,
which the testbenches model exactly.

### The MASH in the skewed domain (`mash2_pipelined`)

Two first-order stages are cascaded:
- Stage 1 accumulates the 16-bit input. Its 10 low bits `e1` are the state;
  its 6 high bits are `out1`.
- Stage 2 accumulates `e1`, padded with one zero group. Its carry is `out2`.

The output is

```
 OUT[k] = out1[k] + out2[k] - out2[k-1]      (mod 2^6)
```

so `out2` goes through the noise-shaping filter 1 − D. The fractional part's
quantisation noise is then shaped by (1 − z^-1)^2.

Four registers keep the two branches aligned in time:

| Register | Purpose |
|---|---|
| D | delays `out1` by the one cycle that stage 2 adds |
| A | the delay of the 1 − D filter |
| B | pipelines the sum between the two output adders |
| C | matches B in the `out2` path |

The 1 − D subtraction is an adder with an inverted operand and a carry-in of
one. Both output adders are pipelined adders on the 6 output bits. Those bits
sit at word positions 10..15, so they keep those groups' skew.

### Latency

From a modulation sample at the `digital_path` input to `div_ctl`, the
latency is 12 reference cycles:

| Cycles | Stage |
|---|---|
| 1 | the delay element after the carrier adder |
| 5 | skew of the lowest output group (bit 10 is group 5) |
| 3 | stage 2, register A/B and the output adder |
| 2 | align shift of the three output groups |
| 1 | output register, which holds `div_ctl` steady for the divider |

In general the latency is `IN_W/GRP + 4`. Add one cycle for the ROM register.
A data bit therefore reaches the divider 2·OSR + 1 + 12 cycles after it is
taken, counted to the centre of its pulse. The filter is non-causal by two
bits.

## The 64-modulus divider

The divider divides the VCO by 64 + D:
- **Prescaler (`prescaler_4567`).** A ÷4/5/6/7 first stage, set by D1 D0.
- **Cells (`div23_cell`).** Four ÷2/3 cells follow it, set by D2..D5.

A ÷2/3 cell normally divides by two. If its control bit is set, it swallows
one extra input cycle once per period of the whole divider. The
"once per period" signal (`mod`) starts at the last cell and runs back toward
the input. Each cell passes it on only in the input cycle where it emits its
own output pulse. As a result, the cell at position i swallows 2^i input
cycles of the divider. With n cells the division is 2^n + Σ p_i·2^i.
`tb_divider_8` builds the three-cell example (÷8..15) from the same cell and
checks all eight moduli.

### Prescaler: swallowing by phase selection

The prescaler avoids a state machine at the VCO rate:
- **Phases.** A first ÷2 toggles every VCO cycle. A second ÷2 is built as two
  flip-flops that update on alternate cycles. Together they make four copies
  of the quarter-rate square wave, each one VCO cycle later than the one
  before.
- **Output.** A 4-to-1 multiplexer picks one phase. Each rising edge of the
  picked phase is an output pulse.
- **Swallowing.** To swallow d = 0..3 cycles, the control steps the
  multiplexer to the next, later phase d times, one step per cycle, right
  after an output edge. During that time the old and new phases are both
  high. No edge appears, and the high time, and so the period, grows by d.

An assertion checks that every step happens while the selected phase is high.

In the silicon the chain is asynchronous: each stage is clocked by the
previous one, and the first ÷2 is an off-chip part. Here the whole divider is
synchronous in the VCO clock domain. Each stage passes a one-cycle enable
pulse to the next. The function, and the number of VCO cycles per period, is
the same. The internal pulse timing is not a gate-level copy.

## Clock domains and the divide-control handoff

Only two signals cross clock domains:
- `clk_ref` (20 MHz) clocks the filter, the serial register and the digital
  path.
- `clk_vco` clocks only the divider. The divider reads `div_ctl` at each
  `div_pulse`, and `div_pulse` goes to the phase detector.

There are no synchronisers. The loop locks with a 50% nominal phase-detector
duty cycle, so `div_pulse` falls near the middle of the reference period.
`div_ctl` changes just after a reference edge, far from that point. This is
a timing constraint on the surrounding loop, not something the RTL enforces.
A different phase detector would need a real synchroniser or a retimed
control word. The testbenches drive the reference edge a few VCO cycles after
each `div_pulse`, which models an ideally locked loop.

## Serial control register (`serial_register`)

The register holds a 16-bit carrier word and a 5-bit charge-pump gain.
- **Loading.** The 21 bits are shifted in MSB first while `ser_shift` is
  high, carrier first. A `ser_load` pulse then copies them to the outputs
  together.
- **Reset.** Carrier and gain reset to zero.
- **Gain output.** `cp_gain` drives the charge pump's 5-bit current D/A. That
  current is the one tuning knob that matches the loop's gain to the
  compensation.

Setting the carrier's LSB keeps the modulator's internal state busy. This is
a known way to avoid idle tones when the modulation is quiet.

## Top level (`fracn_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| clk_ref | in | 1 | 20 MHz reference, also the sample clock |
| clk_vco | in | 1 | VCO output, divider input |
| rst_n | in | 1 | synchronous active-low reset in each domain |
| data_in | in | 1 | data bit, taken when `bit_req` is high |
| bit_req | out | 1 | one cycle every 8 reference cycles |
| ser_data, ser_shift, ser_load | in | 1 each | serial control port |
| cp_gain | out | 5 | charge-pump gain code |
| div_pulse | out | 1 | divider output, one VCO cycle per period |
| mod | out | 10 | filter output sample (observation) |
| carrier | out | 16 | loaded carrier word (observation) |
| div_ctl | out | 6 | divide control D (observation) |

`rst_n` should be released synchronously to both clocks. The testbenches
release it on a VCO edge shortly after a reference edge.

## Verification

Each block has a self-checking testbench against an independent model.
Results at the default parameters:

| Testbench | What it checks | Checks |
|---|---|---|
| tb_pipe_shift, tb_align_shift | exact per-group delays | 2372, 298 |
| tb_pipelined_adder | skewed sums and carries against plain integer addition | 400 |
| tb_pipelined_accumulator | skewed running sums, feedback limited to the low bits | 401 |
| tb_mash2_pipelined | output word-for-word against a behavioural MASH (`tb_mash_ref_pkg`) | 2001 |
| tb_digital_path | exact 12-cycle latency, carrier change in flight, long-run mean | 3001 |
| tb_div23_cell, tb_prescaler_4567, tb_divider_64 | period lengths for random controls, every modulus | 1032, 4895, 405 |
| tb_divider_8 | three-cell ÷8..15 example | 507 |
| tb_serial_register | shift and load protocol | 1101 |
| tb_tx_filter_rom | every table entry against the formula, bit request rate | 2701 |
| tb_fracn_top | see below | 8503 |
| tb_gfsk_eye | see below | 977 |

**tb_fracn_top** runs the complete top at default parameters. It checks:
- every divider period against the `div_ctl` value;
- every divide word against the reference MASH model fed with the ROM
  samples;
- the mean division against the carrier (91.5389 measured, 91.5384 expected);
- the bit-request rate and the serial loads.

It also counts the mechanisms and fails if any never happened:
- each prescaler swallow count;
- a swallow in each cell;
- both signs of the 1 − D term;
- carrier changes and gain loads.

**tb_gfsk_eye** is the 2.5 Mb/s workload. It sends 1500 random bits through
the top with a 1.8 GHz-range carrier. The resulting divide values pass
through a numerical model of G(s):

```
 G(s) = (1 + s/ωz)/(1 + s/ωcp) · 1/(1 + s/(ωo·Q) + s²/ωo²)
```

At each bit centre, it compares the modelled VCO deviation with the ideal
GFSK deviation.
- **With compensation.** Worst error 116 kHz; eye opening 953 kHz, against
  1250 kHz ideal.
- **Without compensation.** The same ideal waveform sent directly through
  G(s) gives an eye of −1195 kHz, which is fully closed.

- **Loop-gain error.** The loop is rebuilt from its parts: a type-II loop
  filter with fz = 11.6 kHz and fp = 127 kHz, and an integrating VCO. At
  nominal gain this loop equals G(s), and its eye matches (955 kHz). With
  the open-loop gain 25% low the eye shrinks to 485 kHz; 25% high gives
  1188 kHz.

The test passes if the compensated error is within 30% of the 625 kHz peak
and the uncompensated eye is at most half the compensated one. With a ±25%
gain error, the eye must stay open by at least 30% of the ideal.

### Running a test

Run from the repository root, because the ROM file is read by the relative
path `rtl/tx_filter_rom.hex`:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/fracn_pkg.sv tb/tb_mash_ref_pkg.sv tb/tb_fracn_top.sv --top-module tb_fracn_top
./obj_dir/Vtb_fracn_top
```

Each testbench ends with a `TB_RESULT checks=N failures=M` line. Add
`--assert` to enable the prescaler's assertion. Every testbench finishes in
seconds.

## What is outside, and where this design departs

**Outside the RTL:**
- Phase detector (with 50% nominal duty cycle).
- Charge pump (±I, 5-bit current D/A).
- Switched-capacitor loop filter: H(f) = K·(1 + jf/fz)/(jf·(1 + jf/fp)),
  with fz = 11.6 kHz and fp = 127 kHz.
- LC VCO.
- The external ÷2 between the VCO and the chip. Its function is included in
  the prescaler.
- Data source hardware.

**Choices and departures:**
- **The transmit filter is a ROM.** In the original prototype the compensated
  stream was computed in software and fed to the chip. The ROM is the
  hardware form of the same filter.
- **Divider clocking.** The divider is synchronous with pulse enables, not an
  asynchronous ripple chain. The periods are identical; gate-level edge
  timing is not modelled.
- **Chosen, not given.** The following were chosen here:
  - modulation format and weight (`MOD_W = 10`, `MOD_SHIFT = 4`);
  - filter span (4 bits);
  - modulation index 0.5;
  - the serial protocol;
  - the reset behaviour;
  - the output register on `div_ctl`;
  - the control-word handoff timing.
- **Resolution.** One modulation code is coarse (312.5 kHz before filtering),
  so long runs of equal bits have a deviation error of up to about 25%. The
  eye test shows the effect.
- **Loop-gain mismatch.** The compensation assumes the loop gain is tuned to
  match. With a 25% low gain the eye closes to about 40% of ideal in the
  model. The gain is set through `cp_gain`; no automatic calibration exists
  here.
- **Other data rates.** The default table is for 8 samples per bit.
  - 2.85 Mb/s and the 1.152 Mb/s DECT rate are not integer ratios of 20 MHz,
    and need another reference or table.
  - Rates of 20 MHz / 2^k need only `OSR` changed and the table regenerated
    from the formula above.
