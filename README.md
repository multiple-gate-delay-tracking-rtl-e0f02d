# Multiple gate delay (MGD) code tracking channel

A satellite navigation receiver measures range by keeping a local copy
(the *replica*) of each satellite's spreading code aligned with the received
code. The loop that does this is driven by a *discriminator*: a function
of a few correlations of the input with early and late replicas whose zero
crossing is the alignment point. Reflected signals (multipath) arrive
slightly later than the direct one. They distort the correlation peak,
move the zero crossing and bias the range.

The classical answers are the narrow early-minus-late correlator and the
double-delta (high resolution) correlators. This design generalises both
into one structure. It uses `NG` pairs of early/late gates with spacings
Δ1 < Δ2 < … < ΔNG and forms

    D = Σ_{i=1..NG} a_i · ( R(late_i) − R(early_i) )

Here R is the noncoherently integrated envelope (or squared envelope) of the
correlation, and the a_i are weights chosen to reduce the multipath error.

- `a = [1, 0, 0]` is the narrow correlator.
- `a = [1, −0.5, 0]` is the high resolution correlator.
- Other weights, such as `[1, −0.7, −0.2]` or `[1, −0.9, 0.2]`, are optimised MGD discriminators.

All of these run on the same hardware: only run-time registers change.

The RTL is a complete, synthesizable single-satellite tracking channel:
- carrier wipe-off;
- code NCO;
- code generator;
- a delay register that produces the 2·NG+1 replica taps;
- 2 × (2·NG+1) integrate-and-dump correlators;
- the envelope nonlinearity and noncoherent integration;
- the MGD discriminator;
- a first-order delay lock loop that closes back onto the code NCO.

The default is NG = 3, which gives seven correlators per branch.

```
 IF samples ─┬─×sin─► I ─┐            ┌──────────── 7 taps ─────────────┐
             └─×cos─► Q ─┤            │ VVE VE E  P  L VL VVL           │
                         ▼            ▼                                 │
                 2×7 correlators ◄── delay register ◄── code generator ◄── code NCO ◄──┐
                 (integrate & dump                       (C/A, BOC)       (chips,ticks) │
                  over N_c epochs)                                                      │
                         ▼                                                              │
         |I+jQ| or |I+jQ|² ─► Σ over N_nc ─► D = Σ a_i (late_i − early_i) ─► loop ─────┘
```

## The delay register: where the gate spacings come from

Everything specific to an MGD tracker lives in how the seven replicas are
derived from one code generator. The generator produces one replica chip
stream, and `delay_register` feeds it through a chain of one-bit registers.
Each register shifts on a *tick*, and the tick period Z⁻¹ is the smallest
delay in the system. The taps are numbered from the earliest replica:

| tap | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|-----|---|---|---|---|---|---|---|
| NG = 3 name | VVE | VE | E | P | L | VL | VVL |

Gate pair *i* is early tap `NG−i` and late tap `NG+i`. Its early-late spacing
Δi is the delay between those two taps. The prompt (tap NG) is not used by
the discriminator, but it is correlated, because it is the natural output for
carrier tracking and data.

Two chain shapes are built, selected by the elaboration parameter `SPACING`.

**Uniform spacing** (`SPACING_UNIFORM`): every stage is one tick.
- Tap k is k ticks behind tap 0, so Δi = i·Δ1 with Δ1 = 2 ticks.
- The chain has 2·NG registers.
- Δ1 = 0.25 chip needs a tick of 0.125 chip, which is 8 ticks per chip (8.184 MHz for a 1.023 MHz chip rate).

**Decreasing spacing** (`SPACING_DECREASING`): the stage lengths double towards the prompt.
- For NG = 3 the stages are Z⁻¹, Z⁻², Z⁻⁴, then Z⁻⁴, Z⁻², Z⁻¹ mirrored on the late side.
- The taps therefore sit at ticks 0, 1, 3, 7, 11, 13, 14.
- Δ1 = 8 ticks, Δ2 = 12 ticks and Δ3 = 14 ticks: the outer gates crowd together while the inner pair stays widest apart.
- In general Δ1 = 2^NG ticks, and the chain has 2·(2^NG − 1) registers.
- For the same Δ1 = 0.25 chip the tick must be 0.03125 chip, which is 32 ticks per chip (32.736 MHz).

The register counts are the cost of each choice:

| NG | uniform flip-flops | decreasing flip-flops |
|----|----|----|
| 2 | 4 | 6 |
| 3 | 6 | 14 |
| 4 | 8 | 30 |
| 5 | 10 | 62 |

Uniform spacing grows linearly with NG. Decreasing spacing grows
exponentially, and it also needs a four times faster tick at NG = 3. In return
it gives slightly smaller multipath errors. The two shapes are different
hardware, which is why `SPACING` is a parameter and not a register. `NG` is a
parameter too: it sets the number of taps, correlators and weights.

Tap 0 is the generator output itself. Every other tap is a register, so
all taps change on the same clock edge, one tick apart.

## Ticks locked to the code: the code NCO

The tick rate has to be an exact multiple of the code rate. Otherwise the
tap spacings would drift as the loop changes the code frequency.
`code_nco` therefore runs two 32-bit phase accumulators on the same enable:

- The **chip accumulator** adds `code_incr` each sample. Its carry is the chip
  strobe, and its MSB marks the second half of a chip (used for BOC).
- The **tick accumulator** adds `code_incr × tick_mult`. Its carry is the tick strobe.

Both start at zero, so the tick accumulator always equals `tick_mult` times the
chip accumulator, modulo 2³². The ticks therefore fall exactly every
1/`tick_mult` chip, and the first tick of a chip coincides with the chip edge.
This holds even while the loop keeps changing `code_incr`. `tick_mult` is a
run-time input, so it sets Δ1 without rebuilding:

| Δ1 (chip) | uniform `tick_mult` | decreasing `tick_mult` (NG = 3) |
|-----|----|----|
| 0.05 | 40 | 160 |
| 0.1 | 20 | 80 |
| 0.2 | 10 | 40 |
| 0.25 | 8 | 32 |

At most one tick per sample is possible, so the sample rate must be at least
`tick_mult` × the chip rate. An assertion checks
`code_incr × tick_mult < 2³²`. Only whole numbers of ticks per chip exist.
Spacings such as 0.15, 0.3 or 0.35 chip would need 13⅓, 6⅔ or 5.7 ticks
per chip, so they cannot be set.

Both NCOs are 32 bits wide. With 24-bit accumulators, models of this channel
showed a constant offset in the error curves of the envelope discriminator.
Widening the accumulators to 32 bits removed it.

## Signal chain and timing

All blocks advance on `sample_valid`, with one input sample per enabled
cycle. Frequencies are fractions of the sample rate fs:
- carrier: `carr_incr/2³² · fs`;
- code: `code_incr/2³² · fs`;
- tick: `tick_mult ×` the code frequency.

**Carrier wipe-off** (`carrier_nco`, `carrier_wipeoff`). The carrier NCO gives
sine and cosine values in the range ±7 (4-bit signed) from a 16-point table indexed by the top 4 phase
bits. The 4-bit signed input is multiplied by the sine for the I branch and
by the cosine for the Q branch. The products are registered, and the replica
taps and epoch strobe are delayed by one clock to match.

**Code generator** (`code_gen`). It generates the GPS C/A Gold codes for
satellites 1 to 32 from two 10-stage LFSRs, with the per-satellite G2 tap pairs
in a small table. With `boc_en` set, the chip is inverted in its second half.
This gives the SinBOC(1,1) replica used by Galileo E1-type signals. With
`boc_en` clear it is plain BPSK, as for GPS. `epoch_stb` marks the last chip
of every 1023-chip epoch.

**Correlators** (`correlator_bank`, two per channel). Each lane adds ±x, so the
code multiplication is a conditional negation. At the end of every `n_coh`-th
epoch all 7 sums are dumped together and `dump_o` pulses. The sums are not
divided by N_c, because a common scale factor does not move the zero crossing.

**Envelope** (`envelope_unit`). The `pow` input selects the envelope or the
squared envelope, both computed per tap:
- `POW_SQUARED` gives I² + Q².
- `POW_ENVELOPE` gives ⌊√(I² + Q²)⌋, from an unrolled restoring square root.

Squared envelopes are cheaper. Envelopes gave the smaller multipath errors
when the weights were optimised, and the optimal weights differ between the
two, so both are kept.

**Noncoherent integration** (`noncoherent_integrator`). It sums `n_nc` coherent
blocks per tap. This is also not scaled.

**Discriminator** (`mgd_discriminator`). The weights are signed 8-bit integers in
tenths: `coef[i-1] = 10·a_i`. All published optimum weights are multiples of
0.1, so they are held exactly. The output is `10·D`. D > 0 means the prompt
replica is ahead of the received code.

**Loop** (`dll_loop_filter`). A first-order delay lock loop:
`code_incr = base_code_incr − sat(D >>> loop_shift)`. The replica slows while
it is ahead and speeds up while it lags, and the delay estimate is the
integral of that offset. `loop_shift` is the gain as a power of two. It has to
follow the signal level, the sample rate and `pow`:
- around 8 for envelopes at 34 samples per chip;
- around 30 for squared envelopes at 80 samples per chip.

With `loop_en` low the increment is `base_code_incr` (open loop).

Latency from the dump that completes a noncoherent block:
- envelope: 1 clock;
- noncoherent sum: +1 clock;
- discriminator (`disc_valid_o`): +1 clock;
- new code increment: +1 clock.

## Configuring the tracker

| Discriminator | `SPACING` | `tick_mult` (Δ1 = 0.25) | `coef` (a1, a2, a3 in tenths) |
|---|---|---|---|
| Narrow correlator | uniform | 8 | 10, 0, 0 |
| High resolution correlator | uniform | 8 | 10, −5, 0 |
| MGD, BOC(1,1), envelope | uniform | 8 | 10, −7, −2 |
| MGD, BOC(1,1), envelope | decreasing | 32 | 10, −9, 2 |
| MGD, BOC(1,1), squared envelope, Δ1 = 0.1 | uniform | 20 | 10, −7, 1 |
| MGD/HRC, BPSK, envelope | uniform | 8 | 10, −5, 0 |

`coef` is a packed array with `coef[0]` = a1. Weights optimised for BOC
signals are not good for BPSK signals. For example, [1, −0.7, −0.2] leaves a
BPSK loop with very little gain. Use the BPSK set for GPS C/A.

Set-up sequence:
1. Hold `rst_n` low and set the inputs.
2. Release `rst_n`, or pulse `restart` to load a new `prn` and start the code at chip 0.
3. Set `loop_en` to close the loop.

`chip_idx_o` and the correlator outputs are there for acquisition hand-over
and for carrier tracking. Carrier tracking is not part of this design:
`carr_incr` is an input.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- **`tb_gnss_pkg`** holds independent reference models: a C/A code generator
  from the published G2 delays, the tick grid, the replica and the sine table.
- **`tb_code_gen`** checks all 32 codes against their published first ten chips.
  It also checks code balance (512 ones) and the epoch length.
- **`tb_code_nco`** counts ticks per chip: exactly `tick_mult`, also while
  `code_incr` changes.
- **`tb_delay_register`** checks tap positions and register counts for NG = 2..5
  in both spacings.
- **`tb_tracking_channel`** compares all 14 correlator sums with a
  sample-by-sample model, for uniform/BPSK and decreasing/BOC. It also
  checks that the correlation peaks at the prompt.
- **`tb_mgd_discriminator`** covers hand-computed cases for the narrow, HRC and MGD weight sets.
- **`tb_mgd_tracker`** runs two complete trackers, uniform and decreasing,
  through open-loop and closed-loop cases. It counts every mechanism:
  - dumps;
  - envelope and squared-envelope blocks;
  - coherent and noncoherent integration;
  - discriminator signs;
  - loop updates;
  - lock.
- **`tb_mgd_tracker_full`** runs the top with every parameter at its default.
  It checks the open-loop discriminator sign, then lock from a 0.08-chip
  offset to within one sample.
- **`tb_mgd_multipath`** runs three trackers (narrow, HRC, MGD [1, −0.7, 0.1];
  Δ1 = 0.1, squared envelope) on a SinBOC(1,1) signal at 80 samples per chip.
  - Single path: all three are unbiased to within one sample.
  - Two static in-phase paths, the second 0.2 chip late and 3 dB weaker:
    - narrow correlator: about −11 m of range error, close to the theoretical error-envelope value of 11 m for this channel;
    - HRC: about −3 m;
    - MGD: under 1 m.

- **`tb_mgd_mee`** runs the four Δ1 = 0.25 chip discriminators with envelopes on a SinBOC(1,1) signal at 40 samples per chip:
  - narrow correlator;
  - HRC;
  - uniform MGD [1, −0.7, −0.2];
  - decreasing MGD [1, −0.9, 0.2].

  The channels are six two-path cases: a half-amplitude echo at 0.1, 0.2 and 0.3 chip, in phase and in anti-phase.
  - The narrow correlator matches the closed-form error for a piecewise-linear correlation peak to within 0.015 chip.
  - Mean absolute errors are about 16 m for the narrow correlator, 10 m for HRC and uniform MGD, and 5 m for decreasing MGD.

Every testbench checks against models written separately from the RTL.
Each block testbench was also shown to fail when a deliberate fault was placed in its block.

### Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mgd_tracker \
    -Irtl -Itb -y rtl -y tb +libext+.sv rtl/mgd_pkg.sv tb/tb_gnss_pkg.sv \
    tb/tb_mgd_tracker.sv
./obj_dir/Vtb_mgd_tracker
```

Replace the testbench name for any other test. The block tests take seconds.
`tb_mgd_tracker_full`, `tb_mgd_multipath` and `tb_mgd_mee` take up to about a minute.

## Departures from the reference design and limits

- **Discriminator and loop in hardware.** The reference prototype put the
  correlators in hardware and computed the envelope, discriminator and loop in
  processor software. Here the whole chain is RTL. The loop is a plain
  first-order loop, not a tuned DLL filter.
- **Codes.** Only GPS C/A Gold codes are generated, with an optional
  SinBOC(1,1) subcarrier. Galileo E1 memory codes are not included.
- **Spacings.** Only whole numbers of ticks per chip are supported (see
  above). Increasing spacing, which was studied in theory, is not built.
- **Scaling.** The 1/N_c and 1/N_nc averaging factors are dropped, because
  they do not move the zero crossing.
- **Other own choices:**
  - widths: 4-bit samples, 4-bit carrier values, 24-bit correlators and 8-bit weights;
  - the dump point at the epoch of the earliest replica;
  - the loop form;
  - a 16-entry carrier table.
- **Front end and carrier loop.** The RF front end, ADC and carrier tracking
  are outside the design. The tracker takes signed digital IF samples and a
  carrier increment.
- **Not simulated:**
  - fading multipath channels;
  - RMSE against carrier-to-noise ratio;
  - full multipath error-envelope sweeps.

  The hardware can run all of them, but each needs many long closed-loop runs.
- **Accumulator range.** Correlator sums wrap at 24 bits. At 16 samples per
  chip that holds N_c = 8 epochs of full-scale input. Higher sample rates with
  long coherent integration need a larger `ACC_W` in `mgd_pkg`.
