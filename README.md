# A polar-coordinate equalizer for multiband OFDM UWB

A multiband OFDM receiver (IEEE 802.15.3a / ECMA-368 style: 128-point FFT,
100 QPSK data subcarriers, 12 pilots, three hopping bands) has to divide
every received subcarrier by its channel estimate. It also has to remove
the common phase drift caused by carrier frequency offset (CFO) and the
drift across subcarriers caused by sampling clock offset (SCO). Done in
Cartesian form, this takes complex multipliers and dividers on every
subcarrier.

This design converts every FFT output to polar form first, with a
pipelined CORDIC. In polar form these operations become simple:

* a complex division is one subtraction of phases and one real division of
  magnitudes;
* a phase rotation is one addition;
* channel estimation is an average of two phases and an average of two
  magnitudes.

The only arithmetic unit left is one pipelined divider per lane. A second,
short CORDIC turns the equalized result back into I/Q and into 3-bit soft
values for a Viterbi decoder.

The datapath handles four subcarriers per clock. At 132 MHz it carries the
528 Msample/s stream needed for 480 Mb/s: a 128-subcarrier symbol takes 32
clocks, which is 242 ns, and a symbol lasts 312.5 ns.

The design follows a published thesis on a CORDIC-based UWB equalizer. The
section "Own choices and departures" lists what was filled in or changed.

## Phases as plain two's complement numbers

Every phase in the design is *normalized* by pi/2 and stored as a 12-bit
signed number with 10 fraction bits (s1.10):

| angle   | value  |
|---------|--------|
| +90°    | +1024  |
| 180°    | -2048  |
| +45°    | +512   |
| -135°   | -1536  |

The full circle is exactly the range of the word. So an ordinary adder that
is allowed to overflow computes the correctly wrapped angle:
90° + 135° = 225° comes out as -135°. No angle adder is needed. The top two
bits of a phase are its quadrant. That makes the QPSK decision and the trust
area test (below) a matter of looking at bit fields.

Other number formats:

* **CORDIC magnitudes** are 13-bit unsigned, in input LSBs. They still carry
  the CORDIC gain of about 1.647. The gain cancels in |R|/|H|, so it is
  never removed.
* **Equalized magnitudes** have 8 fraction bits, so an ideal QPSK point
  has magnitude 256.
* **out_i / out_q** use the same scale: 1.0 = 256.

## Data flow and timing

```
 in_i/in_q x4 ─► cordic x4 ─► ram_control ─┬─► ce_pet_phase ─► (3 regs) ─┬─► ce_track x4 ─┐
                  11 clk       1 clk        │    2 clk                   │   (comb.)      │
                                            └─► ce_mag (divider) ────────┤                │
                                                 5 clk                   │                │
                                    update port ◄──────────────────────────┴────────────────┘
                                                                         └─► de_cordic x4 ─► out_*
                                                                               6 clk
```

**Beat order.** A symbol is 32 consecutive *beats* with `in_valid` high.
Lane j of beat b carries subcarrier k = -64 + 4b + j, so the beats run in
increasing frequency. `in_sop` marks beat 0. `in_kind` (CE preamble or
data) and `in_band` are sampled with it. Gaps are allowed between symbols,
never inside one; the top has an assertion for this.

**Latency.** Equalized data leave 23 clocks after they enter:

* CORDIC: 11 clocks (10 micro-rotations plus a quadrant stage);
* memory read: 1 clock;
* divider: 5 clocks;
* de-CORDIC: 6 clocks.

The phase path (2 clocks) is padded with 3 registers to meet the divider.

**Outputs.** Only data symbols produce `out_valid`. The preambles are
consumed internally.

**Training phases.** Before the first packet, the phases of the channel
estimation training symbol are written into a 128-entry table through
`trn_we` / `trn_addr` (= k + 64) / `trn_phase`. The training sequence itself
is not part of the RTL.

## The CFR memory and the preamble state machine (`ram_control`)

The channel frequency response (CFR) memory holds one polar entry
(13-bit magnitude, 12-bit phase) per subcarrier for each of three bands.
That is 384 entries, organized per band as 32 words of 4 entries. Each band
bank has a write multiplexer. It takes either the incoming symbol or the
*updated channel* that comes back from the end of the pipeline.

Every symbol gets one of three states, decided at its first beat:

| state      | when                                              | what happens |
|------------|---------------------------------------------------|--------------|
| PREAMBLE1  | CE symbol, its band has no first preamble yet     | the symbol is written into the band's bank |
| PREAMBLE2  | CE symbol, its band already holds a first preamble | the stored first preamble is read next to the second; the estimate comes back and overwrites the bank |
| OUTPUT     | data symbol                                       | the stored CFR is read next to the data; the tracked CFR comes back and overwrites it |

Because the decision is made per band, the state machine follows any
time-frequency code. Both 1 2 3 1 2 3 and 1 1 2 2 3 3 give each band its
PREAMBLE1 and PREAMBLE2. A CE symbol that arrives while data are being
equalized starts a new packet and clears the per-band flags. `ce_done`
reports which bands hold an estimate.

The read is synchronous, so everything leaves one clock after the input
beat. If a PREAMBLE1 write and a late update hit the same bank in the same
clock, the PREAMBLE1 write wins.

## Channel estimation

With R1 and R2 the two received preambles and X the known training symbol:

* **Phase** (`ce_pet_phase`): arg H = (arg R1 + arg R2)/2 - arg X. The
  average is computed as arg R1 + wrap(arg R2 - arg R1)/2. The plain sum
  shifted right by one gives a result off by 180° when the two phases
  straddle ±180°; this form does not.
* **Smoothing.** The phase estimate is then smoothed across frequency by a
  3-tap [1 2 1]/4 filter. The filter works on wrapped phase differences
  to the neighbours, so it too is safe across the seam. A neighbour that
  carries nothing (DC, k = ±62..±64) counts as equal to the centre.
* **Magnitude** (`ce_mag`): |H| = (|R1| + |R2|)/2. The magnitude block is
  two multiplexers and one divider. In PREAMBLE2 it divides |R1| + |R2| by
  the constant 2. In OUTPUT it divides |R| by the stored |H|. So one
  5-clock divider per lane serves both.

Note that this "polar average" is not the Cartesian average. When noise
makes the two preambles point in different directions, |H| comes out
somewhat larger than |(R1 + R2)/2|. This is inherent in the method.

## Phase error tracking (the hard part)

CFO rotates every subcarrier of symbol l by the same growing angle, about
l·θ. SCO adds a rotation that grows with both l and k, about l·k·f. The
tracker in `ce_pet_phase` predicts both and subtracts them together with the
channel phase:

```
arg y(l,k) = arg R(l,k) - arg H(k) - (PHI_l + k * PSI_l)
```

**Initial estimates** come from the two preambles. The drift between them
is accumulated over |k| ≤ 56, k ≠ 0, for all bands of the packet:

```
theta0 = mean(arg R2 - arg R1)
f0     = ( sum_{k>0} (arg R2 - arg R1) - sum_{k<0} (arg R2 - arg R1) ) / (57 * 56)
```

Both divisions by a count are multiplications by reciprocal constants.
The channel estimate sits midway between the two preambles, so the first
data symbol is 1.5 symbol periods later. At the end of every PREAMBLE2
symbol the tracker is therefore loaded with:

* θ = θ0 and PHI = 1.5·θ0;
* f = f0 and PSI = 1.5·f0.

**Per data symbol,** the 12 pilots (k = ±5, ±15, …, ±55) give residuals
r_k = arg y - arg P.

* **The pilot reference P.** It is (1+j)/√2 at |k| = 15, 45 and
  (-1-j)/√2 at the others. In the low-rate modes (`low_rate` = 1, below
  106.7 Mb/s) it is conjugated on negative k.
* **The polarity.** P is flipped by 180° when the pilot polarity bit is 1.
  The bits come from the 127-periodic sequence of the LFSR x^7 + x^4 + 1,
  seeded with all ones. The sequence restarts after each PREAMBLE2.

At the last beat of the symbol:

```
rmean  = sum(r) / 12
eslope = (sum_{k>0} r - sum_{k<0} r) / (6 * 60)
theta += rmean  / 8        PHI += rmean  + theta
f     += eslope / 8        PSI += eslope + f
```

and `pet_update` pulses. θ and f are the rate loops (a CFO and an SCO
estimate). The residual itself is also added to the phase once, so that an
error already seen is removed at once rather than integrated away. There is
no symbol buffer, so the residuals of symbol l correct symbol l+1 onwards.

Fixed-point formats:

* θ carries 8 extra fraction bits below the phase LSB (`cfo_rate`, 20 bits).
* f carries 12 extra fraction bits (`sco_rate`, 24 bits).
* The largest offsets the standard allows are ±40 ppm in total. That gives
  about 17.8° (203 LSB) of CFO drift per symbol and 0.2 LSB per symbol per
  subcarrier of SCO drift. Both are well inside these ranges.

**Limitation: one tracker for all bands.** The tracker is shared by all
bands and advances once per data symbol. In a hopping code, each band sees
the CFO scaled by its own carrier frequency. The preambles of one band are
also three symbols apart, not one. The estimates are then averages over the
bands. Fixed-band operation matches the model exactly.

With hopping codes, the CFO left at the FFT input must therefore be small.
That means coarse CFO correction in the time domain, from the preamble
acquisition, ahead of the FFT. In simulation with code 1 2 3 1 2 3:

* a residual of 0.03 rad per symbol (about 4 ppm) is tracked cleanly;
* 0.1 rad per symbol is not.

In a fixed band, the full 40 ppm (0.31 rad per symbol) is tracked.

## CE error tracking (`ce_track`)

Noise in the two preambles leaves an error in the channel estimate.

**The update.** On each data subcarrier of each equalized symbol, the
decided QPSK point d is the centre of the quadrant that y lies in. The phase
error e' = arg d - arg y is multiplied by a step 2μ = 1/8. The stored
channel phase is updated as

```
arg H <- arg H - 2*mu*e'
```

and written back through the update port. The magnitude is written back
unchanged.

**The trust area.** Adaptation happens only when y is in the trust area:

* its phase lies between π/8 and 3π/8 inside its quadrant;
* its magnitude lies between 0.5 and 1.33 (128 … 340).

Otherwise a multiplexer forces the step to 0. This keeps wrong decisions at
low SNR from corrupting the estimate. `ce_trusted` shows per lane when
adaptation is active.

**The sign.** The source prints the update with a plus sign. The gradient
it derives gives the minus sign, and only the minus sign moves y towards d.
This design uses the minus sign.

## Back to I/Q (`de_cordic`)

A rotation-mode CORDIC turns (|y|, arg y) back into I and Q:

1. A first stage multiplies the magnitude by 1/K ≈ 0.6074 with shifts
   (1/2 + 1/8 - 1/64 - 1/512). For angles beyond ±90° it also rotates
   exactly by ±90°.
2. Five micro-rotations follow.

The angle error of a few degrees that remains is below what a 3-bit soft
value resolves. `out_soft_i` / `out_soft_q` are out_i / 64, saturated to
-4 … 3, so an ideal QPSK point (±181) gives ±2 or ±3.

`out_mag` / `out_phase` give the same result in polar form. They are
delayed to stay aligned with out_i / out_q.

## Interface of the top, `uwb_equalizer`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| low_rate | in | 1 | 1 for 53.3/55/80 Mb/s (conjugate-symmetric pilots) |
| trn_we, trn_addr, trn_phase | in | 1, 7, 12 | training phase table write |
| in_valid, in_sop | in | 1 | beat valid, first beat of a symbol |
| in_kind, in_band | in | 1, 2 | CE or data symbol; band 0..2 |
| in_i, in_q | in | 12 × 4 | FFT outputs, four subcarriers |
| out_valid, out_sop, out_band, out_beat | out | 1, 1, 2, 5 | equalized beat, 23 clocks after input |
| out_mag, out_phase | out | 13 × 4, 12 × 4 | equalized subcarriers, polar (1.0 = 256; π/2 = 1024) |
| out_i, out_q | out | 12 × 4 | equalized subcarriers, 1.0 = 256 |
| out_soft_i, out_soft_q | out | 3 × 4 | soft values for the decoder |
| ce_done | out | 3 | band holds a channel estimate |
| cfo_rate, sco_rate | out | 20, 24 | tracked CFO and SCO rates |
| pet_update | out | 1 | end-of-symbol tracker update |
| ce_trusted | out | 4 | CE error tracking active, per lane |

Parameters: `CORDIC_STAGES` (10), `DECORDIC_STAGES` (5), `DIV_LAT` (5).
The shared sizes (4 lanes, 12-bit words, 3 bands, 128 subcarriers) are in
`rtl/eq_pkg.sv`.

Synthesized with yosys (generic cells), the top is about 2 900 cells,
7 300 flip-flop bits and a 9 600-bit memory.

## Own choices and departures

Values the source does not give, chosen here:

* the adaptation constants α = ε = 1/8 and 2μ = 1/8;
* the smoothing taps [1 2 1]/4 (only "3 taps" is specified);
* the pilot polarity LFSR;
* the 13-bit magnitude and 8-bit fraction formats;
* the beat order of the subcarriers;
* the one-clock synchronous memory read and the alignment registers;
* the gain correction and soft-value scaling of the de-CORDIC.

Additions:

* The CORDIC's eleventh stage is an exact ±90° pre-rotation. The source
  specifies 10 stages and a latency of 11; what the extra clock does is
  this design's choice. Two guard bits keep short vectors accurate, as the
  source suggests.
* Both the preamble average and the smoothing filter work on wrapped
  differences. A plain sum shifted right by one fails across ±180°.
* The phase removed from each symbol contains the last pilot residual
  (proportional term) as well as the integrated rates. The source gives
  only the rate updates.
* The CE tracking update uses the minus sign, as described above.
* The trust area, drawn for the first quadrant, is applied in all four.
* Guard subcarriers (57 ≤ |k| ≤ 61) are carried and smoothed but not used
  for tracking.

Not part of this RTL: the FFT, the synchronizer that tags symbols with kind
and band, the training and pilot sequences of the standard (loaded or
generated as described), and the Viterbi decoder.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against a
model written independently of the RTL and checks the latency in clocks:

| testbench | checks |
|-----------|--------|
| tb_cordic | magnitude and phase against `$atan2`/`$sqrt` over random, axis and tiny vectors; latency 11 |
| tb_de_cordic | I/Q against `$cos`/`$sin`, soft values; latency 6 |
| tb_mag_divider | exact integer quotients, overflow and zero divisor; latency 5 |
| tb_ce_mag | average and quotient per lane, mode alignment; latency 5 |
| tb_ce_track | decision, error, step and every trust-area border |
| tb_ram_control | state sequence for two hopping orders, memory contents, update priority, packet restart |
| tb_ce_pet_phase | bit-exact smoothed channel phase, initial CFO/SCO estimates, convergence of the equalized phase to within 1.4° under a CFO mismatch, pilot polarity sequence, low-rate pilots |
| tb_uwb_equalizer | the whole design at its default size, described below |

`tb_uwb_equalizer` builds the received FFT output with real arithmetic:

* random smooth channels per band;
* QPSK data, pilots and training symbols;
* noise;
* in a second, low-rate packet, 40 ppm CFO and SCO.

It checks every data and pilot subcarrier of every output symbol: phase,
magnitude, I/Q signs, soft values and the 23-clock latency. It also counts
each mechanism and fails if one never occurs: PREAMBLE1, PREAMBLE2, OUTPUT,
all three bands, packet restart, trusted and untrusted CE tracking,
write-back, tracker updates and both rate modes. A gain step on one band
drives its subcarriers out of the trust area on purpose.
On another band, the data carry a fixed phase error of about ±10° on every
data subcarrier, as a bad channel estimate would. The CE error tracking
must shrink that error over the packet. With 2μ = 1/8 it falls to 57 %
after four updates. With the plus-sign update it grows instead, and the
test fails.

To simulate with Verilator 5 (for example the end-to-end test):

```
verilator --binary --timing -Wno-fatal -y rtl rtl/eq_pkg.sv \
          tb/tb_uwb_equalizer.sv --top-module tb_uwb_equalizer
./obj_dir/Vtb_uwb_equalizer
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. All of
them run in a few seconds.

Remaining lint warnings are unused-signal notes. Examples are the valid
bits of lanes 1 to 3, which equal lane 0, and the dropped guard bits of the
CORDIC phase.
