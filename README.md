# Spread-spectrum CDR with incremental digital frequency compensation

Serial ATA II transmitters spread their 3 Gb/s clock to lower EMI. The
frequency is swept down by up to 5000 ppm along a 30–33 kHz triangle. A
conventional clock-and-data recovery loop tolerates well under 1000 ppm. A
narrow loop gives low jitter but cannot follow the sweep. A wide loop follows
it but passes jitter through.

This design adds a second, slow loop to an all-digital phase-interpolator
CDR. Every compensation period Ts (512 recovered-clock cycles), the second
loop counts how many net phase corrections the first loop still had to make.
It adds that count to a running total. During the next Ts it issues that many
extra phase steps, spread as evenly as possible. The total moves by a small
amount each period, so it follows the ramp of the spread-spectrum profile
step by step ("incremental" compensation). The phase loop only has to handle
the small error left over, so its bandwidth can stay narrow. A lock detector
narrows that bandwidth in three stages once the loop has pulled in.

The RTL follows the architecture, word widths and numbers of a published
0.18 µm design (a master's thesis). These include the 32-step interpolator,
Ts = 512, the confidence counter sizes 2/8/32, the 8-bit pulse counter and
accumulator, and the 7-bit binary-rate-multiplier compensator. The parts that
are analog there are behavioural models or ports here. Where the source is
silent or inconsistent, this RTL makes its own choices; they are listed in
"Choices made in this RTL".

## Clocks and phase resolution

- Data: 3 Gb/s, UI = 333.3 ps.
- Core clock: the recovered clock phase P0 at 1.5 GHz. This makes the
  receiver *half-rate*: each core cycle covers two bits.
- Phase source: an 8-phase 1.5 GHz PLL, phases 83.3 ps (45°) apart.
- Phase selector: interpolates between two neighbouring PLL phases in 4
  steps. This gives **32 steps of 20.83 ps per clock period** (1/16 UI).
  Every phase move in the design is one such step.
- Recovered clock: four phases P0..P3 at 0/90/180/270°. P0 and P2 sample
  the bit boundaries and P1 and P3 the bit centres.

One step per cycle of frequency correction is 1/32 of the period, i.e.
31 250 ppm. The design's limits are set by what the loops can deliver:

| quantity | value |
|---|---|
| phase needed per Ts at 5000 ppm | 5000e-6 × 512 × 32 = **81.9 steps** |
| change of that per Ts on the 33 kHz, 5000 ppm ramp | ≈ 113 ppm ≈ **1.8 steps** |
| largest compensation the FEC can issue per Ts | **127 steps** (≈ 7750 ppm) |
| largest net count the pulse counter can hold | ±127 |

## Block diagram

```
 ph_pll[7:0] ──┐
 clk6g ─ clk8_gen ─ clk_src_mux ─ ph[7:0] ─ phase_selector ─ clk4 = P0..P3 (P0 = rclk)
                                              ▲  ca cb d
 din ─ hrpd ─ pd[3:0] ─ pd_encoder ─ vs_conf_counter ──lead_p/lag_p──► phase_control
         │                                  ▲     │                        ▲
         └ rdata[1:0] ─ ser2to1 ─ dout_ser   │     └► pulse_counter ─ ss ─┐ │ lead_f/lag_f
                                     size    │                         │  │
                              lock_detector ◄┴─────────── ss ──────────┤  │
                                                      pulse_accumulator┘  │
                                                         sf ─► fec ───────┘
                                                                └ ts_tick ► pulse_counter
 ph[0] ─ prbs_gen ─ ser2to1 ─ prbs_tx        (test source)
```

## The phase loop

**Half-rate phase detector (`hrpd`).** Four flip-flops, one per recovered
phase, sample `din`. Their values are retimed to P0. Each cycle gives two
bang-bang decisions: one for the boundary before the P1 bit, judged by the P0
sample, and one for the boundary between the P1 and P3 bits, judged by the P2
sample. With a transition present:

- a boundary sample that already shows the new bit means the data edge came
  first. The decision is **Lead**, "data earlier than the clock";
- a boundary sample that still shows the old bit is **Lag**.

Outputs are `{Lead1, Lead2, Lag1, Lag2}` and the two centre samples.

**Encoder (`pd_encoder`).** Turns the four bits into a 3-bit two's-complement
value, #lead − #lag ∈ {−2..+2}.

**Variable-sized confidence counter (`vs_conf_counter`).** This is the loop
filter. A 6-bit carry-look-ahead adder (`cla_adder`) accumulates the encoded
value. Instead of comparing against a threshold, the counter watches a single
bit of the sum: SO1 for N = 2, SO3 for N = 8, SO5 for N = 32.

- A rise of that bit on a positive input is a lead decision. It happens when
  the sum reaches +N.
- A fall on a negative input is a lag decision. It happens when the sum
  reaches −(N+1).

For N = 32 the 6-bit sum wraps at these points: +32 shows as 100000 and −33
as 011111. Bit-watching still works, because only the bit's change is used.
The thresholds are therefore deliberately asymmetric (+N, −(N+1)). After a
decision the sum restarts at 0. A larger N needs more consistent evidence
before moving the clock, which means lower loop bandwidth and less jitter.
N = 32 is the target size. It was derived from the Serial ATA jitter
tolerance mask, which asks for about 0.4 MHz of bandwidth.

**Phase control (`phase_control`).** Holds the interpolator code:

- `ca[3:0]`: one-hot, selects an even PLL phase (0, 2, 4, 6);
- `cb[3:0]`: one-hot, selects an odd PLL phase (1, 3, 5, 7). The two
  selected phases are always neighbours;
- `d[3:0]`: thermometer code (0000, 0001, 0011, 0111, 1111), the number of
  the four interpolator cells driven by the `cb` phase.

A step towards the `cb` phase shifts a one into `d`, and a step away shifts
it out. The coarse selectors change only at the ends of the fine code. With
`d` = 1111 the clock sits on the `cb` phase. A further step in the same
direction makes `ca` jump two phases, past `cb`, and sets `d` to 0111. The
mirror case applies at 0000, where `cb` jumps. So every request moves the
clock by exactly one step, including at coarse changes and across the
phase-7 → phase-0 turn. Lead moves the clock earlier (position −1) and lag
later (+1). Requests from both loops arrive on the same cycle now and then.
They are summed, and one step is taken in the sign of the sum. After reset
the code selects phases 0 and 1 with `d` = 0000.

**Phase selector (`phase_selector`, behavioural).** Places P0's rising edge
at `t0 + n·T + u·T/32`. Here `u` is the selected position, unwrapped over
turns, so crossing a turn stretches one period instead of dropping a cycle.
P1..P3 follow at T/4 spacing. The model measures T on `ph[0]` and uses no
other input phase. The interpolation is ideal. The silicon interpolator this
models has about 1.2 % step error.

## The frequency compensation loop

The loop has three registers. All of them run on the recovered clock and are
framed by a single 9-bit timebase inside the FEC.

1. **Pulse counter (`pulse_counter`).** Counts +1 for each `lead_p` and −1
   for each `lag_p`. In the last cycle of Ts (`ts_tick`) it hands out the
   count as `ss` with a one-cycle `ss_valid` strobe, then restarts. `ss` is
   the residual frequency error, in steps per Ts, that the compensation did
   not cover. The count saturates at ±127.
2. **Pulse accumulator (`pulse_accumulator`).** On `ss_valid`, `sf += ss`,
   through an 8-bit CLA adder, clamped to ±127. `sf` is the compensation
   rate, in steps per Ts. Its sign bit SF7 gives the direction. This is an
   integrator. In steady state the residual count is zero, and `sf` equals
   the frequency offset × 512 × 32.
3. **Frequency error compensator (`fec`).**
   - **Timebase.** A divide-by-4 counter (Clk_r, 375 MHz) drives a 7-bit
     counter `q`. Together they are the 9-bit Ts timebase, so `q` takes each
     value 0..127 once per Ts.
   - **Pulse sources.** Signal `C_k` is active when the lowest set bit of `q`
     is bit k. That gives C0 64 times per Ts, C1 32 times, and so on down to
     C6 once. No two are active together.
   - **Output.** `C_k` is gated by bit 6−k of |sf|. The OR of the gated
     signals therefore fires exactly |sf| times per Ts, in a binary-rate-
     multiplier pattern. For example, sf = 20 = 0010100₂ enables C2 (16
     pulses) and C4 (4 pulses). The pulses go to `lead_f` if sf > 0 and to
     `lag_f` if sf < 0. Each is one core cycle wide, in the last cycle of a
     Clk_r period, so two pulses are never closer than 4 cycles.

**Timing inside a Ts.**

- Cycle 511: `ts_tick`.
- Cycle 0: `ss_valid`.
- Cycle 1: the new `sf` is visible. Only q = 0 has been used so far, and it
  never fires. So every Ts issues exactly the |sf| of that period.

The loop acts on what the previous Ts measured. On the 33 kHz ramp that lag
is worth about 1.8 steps. Within a Ts the phase loop absorbs that lag and any
rounding of the binary pattern.

**Start-up with a large offset.** At +5000 ppm the first Ts sees 82–87 net
phase-loop decisions, so `sf` jumps to about 82. Later periods add only small
corrections. The original behavioural simulations show the same behaviour:
about 80 in the first Ts, and 120 in the transistor-level run, corrected one
period later.

## Lock detector and bandwidth switching (`lock_detector`)

After reset N = 2. This wide bandwidth can pull in a large initial offset,
since up to one decision per cycle is possible. At the end of every Ts the
lock detector looks at |ss|:

- N = 2 → 8 when |ss| < 64. This is a 37.5 % / 62.5 % lead/lag split over
  256 decisions. It is what ±3σ of 0.3 UI Gaussian jitter around a half-step
  offset produces.
- N = 8 → 32 when |ss| < 16. This is the same ratio scaled by the 4× lower
  decision rate.
- N = 32 is kept until reset.

The size changes in the cycle after `ss_valid`.

## Test circuits

- **`clk8_gen`.** Divides an external 6 GHz clock into 8 phases at 1.5 GHz.
  A 2-flop Johnson counter on the rising edge gives 0° and 90°. A copy on the
  falling edge gives 45° and 135°. Complements give the remaining four
  phases.
- **`clk_src_mux`.** `clk_sel` = 0 takes the PLL phases and 1 takes the
  generator's.
- **`ser2to1`.** Re-serializes the recovered pair: the first bit while the
  clock is high, the second while it is low.
- **`prbs_gen`.** PRBS7 (x⁷ + x⁶ + 1), two bits per cycle, serialized to
  `prbs_tx`. It can be looped back to `din`.

## Top-level ports (`ssc_cdr_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `ph_pll` | in | 8 | 8-phase 1.5 GHz clock from the PLL (`ph_pll[i]` at i·45°) |
| `clk6g` | in | 1 | 6 GHz test clock |
| `clk_sel` | in | 1 | 0: PLL phases, 1: test clock generator |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `din` | in | 1 | 3 Gb/s serial data |
| `rclk` | out | 1 | recovered clock P0 |
| `rdata` | out | 2 | recovered bits, `[1]` earlier; registered on `rclk` |
| `dout_ser` | out | 1 | `rdata` re-serialized, one cycle later |
| `lead_p`, `lag_p` | out | 1 | phase-loop decisions |
| `lead_f`, `lag_f` | out | 1 | compensation steps |
| `sf` | out | 8 | compensation rate, signed steps per Ts |
| `cc_size` | out | 2 | `cdr_pkg::cc_size_t`: 0 = N2, 1 = N8, 2 = N32 |
| `phase_pos` | out | 5 | recovered clock position, 0..31 |
| `prbs_tx` | out | 1 | PRBS7 test stream |

Latencies, counted in core cycles:

- PD decision to `lead_p`/`lag_p`: 3 cycles. One cycle is sampling, one
  retiming and one the registered counter output.
- Request to the new code: 1 cycle. The phase selector applies a new code
  at the following P0 edge.

## Choices made in this RTL

These points are not given by the source design, or the source is
inconsistent about them:

- **Sign of the loop pulses.** "Lead" always means data earlier than the
  clock. With that definition a down-spread input produces `lag_f` pulses and
  a negative `sf`. The source describes its down-spread results as `Lead_f`
  pulses, which only fits the opposite naming.
- **Merging the two loops.** The source leaves open what happens when both
  loops request a step in the same cycle. Here the requests are summed and at
  most one step is taken per cycle.
- **Confidence counter.** The counter restarts at 0 after each decision.
- **Overflow behaviour.**
  - The pulse counter saturates at ±127.
  - The accumulator clamps at ±127, because the FEC has only 7 magnitude
    bits.
- **Lock detector.**
  - The N = 8 lock limit of 16 is inferred from the bits the source watches.
  - There is no fall-back to a smaller N after lock.
  - The source detects lock from changes of sum bits. This RTL uses the
    equivalent magnitude compare.
- **FEC numbering.** The source's text once gives C0 128 pulses. Here C_k
  gives 2^(6−k) pulses and is gated by SF(6−k), which matches the source's
  worked example.
- **Encoder.** The encoder follows its truth table (value = Lead1 + Lead2 −
  Lag1 − Lag2), not a printed sum-of-products form.
- **Phase detector samplers.** Their circuit and retiming are this design's
  (Alexander-type decisions).
- **Test-circuit details.**
  - PRBS order: PRBS7.
  - Circuits of the clock generator and the serializer.
  - Select polarity of the clock mux.
  - Where the PRBS source connects. It has its own output here.
- **Arithmetic style.** The CLA adders are flat look-ahead logic. The
  original uses pseudo-NMOS gates, which is a circuit choice outside RTL.

## Not modelled

- **8-phase PLL.** An external port; testbenches drive an ideal one.
- **Output buffers, pads and power domains.**
- **Interpolator non-linearity.** The phase selector model ignores `ph[1..7]`
  and assumes they are evenly spaced after `ph[0]`. It also does not re-align
  if the clock source is switched while running.
- **Metastability.** The HRPD samplers are ideal flip-flops.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| `tb_pd_encoder` | all 16 codes against the truth table |
| `tb_cla_adder` | exhaustive at 6 bits, random at 8 bits |
| `tb_vs_conf_counter` | exact +N / −(N+1) decisions at N = 2, 8, 32, against a reference model |
| `tb_phase_control` | every step moves the decoded position by exactly ±1; one-hot, neighbour and thermometer invariants; coarse changes only at 0000/1111; several full turns |
| `tb_phase_selector` | edge position = pos·T/32 to 0.01 ps; P1 at T/4 |
| `tb_hrpd` | lead with early data, lag with late data, recovered bits, 2-cycle latency |
| `tb_pulse_counter`, `tb_pulse_accumulator` | counts per Ts, saturation and clamp |
| `tb_fec` | exactly \|sf\| pulses per Ts on the right output, 512-cycle Ts, ≥4-cycle spacing, even spacing for sf = 64 |
| `tb_lock_detector` | 2 → 8 → 32 at the limits, both signs, reset |
| `tb_clk8_gen`, `tb_clk_src_mux`, `tb_ser2to1`, `tb_prbs_gen` | periods and 45° phase spacing; select; bit order; PRBS7 recurrence and period 127 |
| `tb_ssc_cdr_top` | full design at default sizes (see below) |
| `tb_ssc_zero_start` | the spread-spectrum sweep entered at 0 ppm, one full 33 kHz period |
| `tb_ssc_jitter` | the same sweep with Gaussian edge jitter, σ = 33.3 ps clipped at ±3σ (0.3 UI); both lock steps, tracking and data |

`tb_ssc_cdr_top` runs the complete design with a behavioural PLL and ±50 ps
of random edge jitter (0.3 UI peak to peak). It runs three cases:

1. Test clock generator selected, with the on-chip PRBS looped back.
2. A +5000 ppm source.
3. A 33 kHz, 5000 ppm down-spread starting at the −5000 ppm corner, for 1.25
   modulation periods.

It checks:

- error-free recovery, using the PRBS7 recurrence;
- the serializer output;
- the first-Ts count and the settled `sf` ≈ 82 at +5000 ppm;
- that `sf` follows −ppm·512·32/10⁶ within 12 steps.

Observed results:

- The tracking error stays within 2 steps.
- There are no bit errors in about 120 000 bits.
- Every loop mechanism occurs: lead_p and lag_p, lead_f and lag_f, both lock
  steps, coarse changes, full phase turns, and use of the generator clock.
  Each is counted, and the run fails if any never happens.

The whole run simulates 44 µs in well under a second.

### Running with Verilator

```
verilator --binary --timing --assert -Wno-fatal -Irtl rtl/cdr_pkg.sv \
          tb/tb_ssc_cdr_top.sv -y rtl --top-module tb_ssc_cdr_top -o sim
./obj_dir/sim
```

To run another testbench, replace the testbench name in both places.
`-Wno-fatal` keeps the few remaining style warnings from stopping the build:
the zero delays in the phase selector model and one package constant that
only some configurations use. All files declare
`timeunit 1ps; timeprecision 1fs`.

The design is synthesizable except for `phase_selector`, which is a timing
model with real-valued delays. The package `cdr_pkg` must be read first. It
holds `cc_size_t` and `TS_CYCLES`.

### Changing the design

- **Ts.** Set `fec`'s `TS_CYCLES` to 4·2^`MAG_W`. An assertion checks this.
  Widen `pulse_counter`/`pulse_accumulator` `W` to `MAG_W`+1 to match.
- **Lock limits.** They are the `lock_detector` parameters.
- **Confidence counter size.** N is selected by `cc_size_t`. The watched bits
  are in `vs_conf_counter`, and its `W` = 6 covers N up to 32.
