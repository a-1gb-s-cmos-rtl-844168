# Multiphase data retiming with synchronous digital phase aligners

This is a data retiming circuit for multi-link serial receivers at about
1 Gb/s per link. A link needs no PLL or oscillator of its own. One PLL per chip makes a bit clock
that is frequency-locked to the incoming data, and a delay line taps it into
seven phases spaced one seventh of a bit apart. Each link then only has to
decide, with plain logic, which of the seven phases samples its data nearest
the centre of the eye, and deliver the bits on the common system clock.

Older phase-aligner designs built a new bit clock by merging neighbouring
phases. That merged clock has a poor timing margin, and its phase to the
system clock is unknown, which makes the hand-over into the system clock
domain hard. This design does not do that. It samples the data on all seven
phases, moves every sample into the domain of the system clock CP[0], and
*selects* the right sample there. The output is therefore always
synchronous to CP[0]. The candidate samples span ±6/7 of a bit period around
the system clock, so the chosen sampling point can sit anywhere in that
span.

The RTL models the digital part of a four-channel chip. The analog clock
source (PLL and delay line) is included as behavioural models, so the
complete chip can be simulated from a reference clock onwards.

## Clocks, phases and index conventions

* T is the bit period and Δ = T/7.
* CP[n], n = −3 … +3, are seven 50 % duty bit clocks. CP[n] lags CP[n−1]
  by Δ. CP[0] is the system bit clock, and every output is in its domain.
* Vectors over phases have 7 bits: bit `i` holds phase `n = i − 3`
  (`retimer_pkg::phase_vec_t`). So `cp[3]` is CP[0].
* The extended window has 13 positions m = −6 … +6: bit `j` holds
  `m = j − 6` (`retimer_pkg::ext_vec_t`).
* Data must be frequency-locked to the clocks. Its phase is arbitrary, and
  it may wander slowly.

## Retiming channel (`retiming_channel`)

```
           +------------------+  P[n]   +----------------------+  P'[m]
  DIN --+->| phase_comparator |-------->| sync_phase_aligner   |-------+
        |  +------------------+         +----------------------+       v
        |                                                         +----------+
        |                     DIN x7    +----------------------+  | selector |--> DOUT
        +------------------------------>| sync_phase_aligner   |->|          |
                                        +----------------------+  +----------+
                                                  DIN'[m]
```

### Phase comparator: which phase is at the eye centre

The comparator has seven slices (`phase_comparator_slice`). On each rising data edge,
slice n latches the level of CP[n] into C[n]. With 50 % duty clocks, C
is a circular run of ones. Exactly one slice sees C[n−1] = 0 and C[n] = 1.
For that phase, CP[n−1] has already fallen while CP[n] is still high, so the
*next* rising edge of CP[n] comes T/2 … T/2 + Δ after the data edge. That
edge is the middle of the bit. The slices form a ring: slice −3 compares with C[+3].

The raw flag C[n]·¬C[n−1] is retimed by a flip-flop on CP[n]. A second
flip-flop delays it by one more bit, and P[n] is the OR of the two. When the
best phase moves to a neighbour, the old and new flags overlap for one bit
period. So a metastable first flip-flop never leaves a bit period with no
phase selected.

### Synchronous digital phase aligner: one time axis in the CP[0] domain

The same block is used twice: once for the phase flags P[n], and once with
DIN on all seven inputs, which gives seven samples of the data spaced Δ apart.

1. **First stage.** Input n is sampled by a flip-flop on CP[n].
2. **Alignment.** Phases n < 0 fire before CP[0]. Their samples go to a
   flip-flop on the *falling* edge of CP[0], and then to one on the rising
   edge. Phases n ≥ 0 go straight to the next rising edge of CP[0]. Either
   way, all seven samples taken around one CP[0] edge arrive together at the
   next CP[0] edge, with about half a bit of margin on every path.
3. **Extension to two bits.** The aligned vector A is kept undelayed, and
   delayed by T and by 2T. The 13 outputs are:

| position m | taken from |
|---|---|
| −6 … −4 | A delayed 2T, phases +1 … +3 |
| −3 … +3 | A delayed T, phases −3 … +3 |
| +4 … +6 | A undelayed, phases −3 … −1 |

In this table, X'[m] is the sample taken at tc + m·Δ, where tc is one CP[0]
edge. The 13 positions are one continuous time axis, Δ apart and 12Δ long.
A phase flag therefore shows up twice in P'[m], seven positions (one bit)
apart. For example, P[+2] appears at m = +2 and at m = −5. The data sample at
each of those positions is the same bit position in two consecutive bits.

### Selector: keeping one of the two copies

The selector does two things:

* **S register.** S[n] (n = −3 … +3) is loaded from P'[−3 … +3] at the first
  CP[0] edge after reset at which one of them is set. It is then held, and
  an assertion (`a_s_held`) checks this.
* **Output.** With s the initial phase, the valid positions are
  W[m] = OR of S[n] over n = −3 … m+3 for m ≤ 0, and over n = m−3 … +3 for
  m ≥ 1. This is true exactly for m in s−3 … s+3: seven positions, one bit
  wide, centred on the initial phase. From that,

```
DOUT = OR over m of ( DIN'[m] AND P'[m] AND W[m] )
```

A 7-wide window holds only one of the two copies, so the other copy is
discarded. The window is fixed, so the sampling point can follow the data up
to three phases either side of where it started. Because the start itself
can be anywhere in −3 … +3, the selected position can end up anywhere in
−6 … +6, i.e. up to ±6Δ = ±0.857T from CP[0]. A drift of more than three
phases from the start moves the selection into the other copy, which slips a
bit. Reset the channel to centre the window again.

### Timing of a channel

| event | CP[0] edge |
|---|---|
| samples taken around edge k (at k + nΔ) | k |
| aligned (undelayed vector A) | k+1 |
| central window positions (delay T) | k+2 |
| DOUT register loaded | k+3 |

The channel delivers one bit per CP[0] cycle. A sample taken at position m
(time tc + mΔ, tc being CP[0] edge k) reaches DOUT at edge k+3, i.e. after
3T − mΔ. After reset, a rising data edge must pass before
P[n] appears (1–2 bits), and S is loaded about two bits later.

## Chip (`retimer_chip`, top)

`retimer_chip` holds the PLL model, the delay-line model and
`retimer_array`. `retimer_array` is NCH = 4 channels that share the seven
phases, and it is the synthesizable part.

| port | dir | width | meaning |
|---|---|---|---|
| `refclk` | in | 1 | reference, 125 MHz nominal (bit rate / 8) |
| `rst_n` | in | 1 | asynchronous, active low; resets the channels only |
| `din` | in | NCH | serial inputs, frequency-locked to `refclk` × 8 |
| `dout` | out | NCH | retimed data, changes on rising CP[0] |
| `cp` | out | 7 | the seven phases, `cp[3]` = CP[0] clocks whatever takes `dout` |
| `locked` | out | 1 | PLL lock indicator |

Release `rst_n` after `locked` rises. The S register then records a phase
of the final clocks.

### Clock source models (not synthesizable)

* `pll_model` is the bit clock PLL: it multiplies the reference by 8. It has
  an ideal VCO limited to 580 MHz … 1.08 GHz, and a phase-frequency detector
  that pairs the k-th reference and feedback edges. Its loop filter is a
  discrete proportional-integral filter, updated once per reference cycle,
  with gain A = 2π·5 MHz / 125 MHz and integral gain A²/2 (damping ≈ 0.7).
  `locked` rises after 64 comparisons within 2 ps. The feedback divider is
  `pll_divider`, which is synthesizable: a counter toggling every DIV/2
  = 4 edges. As in a tri-state detector, a second edge of the same input
  replaces one still waiting for its partner. The model locks in about
  1–2 µs from its 830 MHz start. Very close to the 580 MHz limit it
  acquires slowly (tens of µs): the first overshoot drives the VCO into
  the limit, and it can then pull back only at the small frequency margin.
* `delay_line_model` gives tap i the bit clock delayed by i·T/7 (pure
  transport delay), with T measured from the input clock.

These models define the clocks the logic sees. They do not model analog
jitter, supply noise or mismatch.

## Files

| file | content |
|---|---|
| `rtl/retimer_pkg.sv` | constants (7 phases, 13 positions) and vector types |
| `rtl/phase_comparator_slice.sv`, `rtl/phase_comparator.sv` | phase comparator |
| `rtl/sync_phase_aligner.sv` | aligner and 0/T/2T extension |
| `rtl/selector.sv` | S register, window and output OR |
| `rtl/retiming_channel.sv` | one channel |
| `rtl/retimer_array.sv` | NCH channels (synthesizable top) |
| `rtl/pll_divider.sv` | ÷8 feedback divider |
| `rtl/pll_model.sv`, `rtl/delay_line_model.sv` | behavioural clock source |
| `rtl/retimer_chip.sv` | complete chip |
| `tb/mpclk_gen.sv` | ideal seven-phase clock generator for block tests |
| `tb/serial_link_model.sv` | PRBS source with wander and jitter, and output checker |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Verilator 5 with timing support is needed. For example, the complete chip:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_retimer_chip -y rtl -y tb +libext+.sv \
  rtl/retimer_pkg.sv tb/tb_retimer_chip.sv
./obj_dir/Vtb_retimer_chip
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog. Change the module name to run another one. All of them take a few
seconds or less.

Zero-delay simulation cannot resolve a data edge that falls exactly on a
clock edge. The test stimulus therefore puts data edges 0.5 ps off the clock
grid. When the data edge is close to a clock edge, the real circuit's
metastability and the comparator's overlap handle it, but this is not
modelled.

## How it is verified

* **Reference for the retimed data** (`serial_link_model`). This model works
  independently of the RTL. From the clocks, it finds the phase s that
  should be selected first. For the output loaded at CP[0] edge te, it
  expects the bit whose nominal centre lies in
  [te − 3T + (s−4)Δ, te − 3T + (s+3)Δ). That fixes both the value and the
  three-bit latency of every output bit. The data is a 2^31−1 PRBS
  (x³¹ + x²⁸ + 1) with a triangular wander of up to ±1.9Δ and uniform jitter
  of ±0.2Δ.
* `tb_retiming_channel` runs channels at 581 Mb/s, 1.02 Gb/s and
  1.066 Gb/s.
* `tb_retimer_array` runs four channels on ideal clocks.
* `tb_retimer_chip` runs the whole chip from a 124.875 MHz reference (999
  Mb/s) at default parameters, about 5,000 bits per channel.
  `tb_retimer_chip_rates` does the same for two chips at once, at 600 Mb/s
  (75.03 MHz reference) and 1.066 Gb/s (133.3 MHz reference).
* Both multi-channel tests require every mechanism to occur at least once:
  comparator overlap, an early phase (falling-edge path), the undelayed group
  (m > 3), the 2T group (m < −3), and discarding of the out-of-window copy.
  The chip test also requires PLL lock.
* The block tests compare each module with a model of its own: the slice
  and comparator (expected phase from edge times), the aligner (every
  position against the sample recorded at tc + mΔ), the selector (window as
  |m − n| ≤ 3 around a set S[n]), and the divider, PLL and delay line
  (edge counts, periods and tap positions).

## Design choices beyond the description

These points are not fixed by the circuit description. This implementation
chooses:

* **Reset.** Every flip-flop has an asynchronous active-low reset. S is
  re-acquired after each reset. The chip's reset does not touch the PLL.
* **Capture of S.** The description says only that S is the initial value
  of P'. Here it is loaded at the first CP[0] edge after reset at which a
  central position is set. If that happens during an overlap, S holds two
  neighbouring bits and the window grows by one position. If it happens
  across the ring boundary (phases +3 and −3 together), both copies can be
  valid for a while.
* **Overlap circuit.** The two flip-flops in series on CP[n], ORed, are one
  reading of "two D-type flip-flops and one OR gate".
* **Mapping of the 0/T/2T delays onto m.** This is chosen so that the 13
  positions form one time axis. This gives the two copies one bit apart and
  the ±6Δ tolerance.
* **Output register.** DOUT is registered on CP[0].
* **Lock range.** The VCO is limited to 580 MHz … 1.08 GHz. The stated
  reference range of 72.5 … 126 MHz would, times eight, end at 1.008 GHz
  instead.
* **Analog parts.** The PLL loop model, the lock indicator and the ideal
  delay line are behavioural stand-ins. Their real circuits (a fully
  differential PLL and a delay line) are analog.

## Limits

* The fabricated circuit was reported to show an unstable bit error rate
  above about 950 Mb/s, depending on the phase between data and clocks. This
  is an analog timing effect, and a zero-delay logic simulation cannot show
  it. The RTL behaves the same at every rate.
* Metastability is not simulated. The overlap logic that guards against it
  is present and tested functionally.
* Synthesis of the clocking (seven clock domains, a falling-edge stage, and
  flip-flops clocked by the data) needs constraints suited to a multiphase
  design. None are given here.
