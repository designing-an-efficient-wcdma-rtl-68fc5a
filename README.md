# WCDMA fractional-N frequency synthesizer with a dithered HK-MASH modulator

This is a delta-sigma fractional-N phase-locked loop that makes a 1.965 GHz
carrier from a 20 MHz reference, for a WCDMA radio. The loop divides the VCO
output by an integer that changes every reference cycle. Its long-run mean is
the fractional ratio 98.25. Step size: f_ref / 2^20 ≈ 19 Hz.

The interesting part is the modulator that picks the integer each cycle. It is
a 4th-order MASH 1-1-1-1 built from *HK error-feedback stages*:

- Each 20-bit accumulator stage also feeds its own previous carry, multiplied
  by a small integer `a`, back into its input.
- `a` is chosen so that `2^20 - a` is prime.
- With a prime modulus, no constant input word can fall into a short repeating
  pattern. Short patterns are what cause fractional spurs.
- So the modulator produces long sequences by construction. It needs no
  random source for that.

A tiny 8-bit LFSR adds dither at the last stage to break up what is left. The
noise-cancellation network shapes that dither by (1 - z^-1)^3, so it does not
move the output frequency. Classical dithered MASH modulators need a long
LFSR instead. Avoiding it is where the hardware saving comes from.

The RTL covers the digital blocks (modulator, divider, phase-frequency
detector). The analog blocks (charge pump, loop filter, VCO) are behavioural
models with real-valued signals. Together they let you simulate the whole loop
locking, with plain Verilator.

## How the output frequency is set

With integer part `N` (`n_int`) and 20-bit fractional word `r` (`frac`), the
locked output is

    f_out = f_ref * (N + r / (2^20 - 3))

- The divider divides by `N + c[n]`.
- `c[n]` is the modulator output, a small signed integer in -7..+8.
- `c[n]` changes once per divider output period.
- The denominator is `2^20 - 3`, not `2^20`, because of the HK feedback (see
  below). For the 1.965 GHz channel (`N = 98`, `r = 2^18`) this makes the
  output 14 Hz high. That is less than one 19 Hz resolution step.

| channel | N | r | ratio | f_out (20 MHz ref) |
|---|---|---|---|---|
| main channel | 98 | 262144 | 98.25 | 1.965 GHz |
| second test channel | 97 | 917504 | 97.875 | 1.9575 GHz |

## The HK error-feedback stage (`hk_efm`)

One stage is an N0-bit accumulator (N0 = 20, M = 2^N0). Each sample it
computes

    u[n] = r[n] + d[n] + a*c[n-1] + e[n-1]
    c[n] = (u[n] >= M)          -- 1-bit quantizer = accumulator carry
    e[n] = u[n] - M*c[n]        -- residue, passed to the next stage

`d[n]` is the dither input; it is zero in every stage except the last.

Without the `a*c[n-1]` term this is the ordinary first-order accumulator.
Every carry removes M from the state; with the term, each carry gives `a` back
one sample later. Over a long run each carry therefore removes `M - a`, so the
stage behaves like an accumulator of modulus `M - a`:

- the mean of `c` is `r / (M - a)`;
- for a constant input the sequence repeats every `M - a` samples.

`M - a` is prime, so that period is the longest possible for every input; no
input word divides it into a short cycle.

Which `a`: the largest prime below 2^20 is 1 048 573, so `a = 3`. For other
widths, `a` is the smallest integer that makes `2^N0 - a` prime (N0 = 6 gives
a = 3, N0 = 8 gives a = 5).

Timing: `c[n]` and `e[n]` are combinational. The stage registers hold
`c[n-1]` and `e[n-1]`. So four stages chain within one sample, exactly as the
block diagram of the modulator draws them.

The residue register is N0 bits wide. If `u` ever reached 2M, the excess would
be lost, as in any N0-bit hardware accumulator. No simulated input (all words
below `M - a`, with and without dither) reached it.

## The 4th-order MASH and its cancellation network (`hk_mash4`, `noise_cancel`)

Stage 1 takes `r`. Stage k+1 takes stage k's residue. The four 1-bit outputs
are combined in nested form:

    S4 = C4
    S3 = C3 + (1 - z^-1) S4
    S2 = C2 + (1 - z^-1) S3
    c  = C1 + (1 - z^-1) S2  =  C1 + ΔC2 + Δ²C3 + Δ³C4

The quantization errors of stages 1 to 3 cancel. Only stage 4's error
remains, shaped by (1 - z^-1)^4, which gives 80 dB/decade of noise shaping.

- **Output range.** The terms contribute 0..1, -1..1, -2..2 and -4..4, so `c`
  lies in -7..+8. It is a 5-bit signed value.
- **Dither.** The 8-bit LFSR word enters stage 4's summing node. The network
  multiplies it by (1 - z^-1)^3. Its DC part is removed, so the mean of `c` is
  unchanged with dither on or off, and the testbenches check this.
- **Output register.** The network output is registered, giving one sample of
  latency from `r` to `y`.
- **Observation port.** `carry` shows C1..C4 of the last sample.

The source block diagram also draws one more `1 - z^-1` block after the sum.
This design leaves it out. A differentiated output would have mean zero, and
the divider needs the mean to be the fractional word, as the transfer
function C(z) = R(z) + (1 - z^-1)^4 E(z) says.

## The dither source (`dither_lfsr`)

- An 8-bit Fibonacci LFSR with polynomial x^8 + x^6 + x^5 + x^4 + 1. Its
  period is 255.
- Its whole state is used as an unsigned 8-bit word, added to the low bits of
  stage 4's input.
- It steps once per modulator sample.
- `dither_en` on `hk_mash4` replaces the word with zero. The LFSR keeps
  running.

The polynomial, the seed (0xA5) and the use of the full state as the word are
this design's choices. The source specifies only an 8-bit LFSR.

## The loop

    ref_clk ──► pfd_tristate ──up/dn──► charge_pump ──icp──► loop_filter ──vctrl──► vco ──► f_out
                    ▲                                                                  │
                    └──────── div_clk ◄── mm_divider (÷ N + c) ◄──────────────────────┘
                                             ▲          │ div_clk
                                             └─ c ── hk_mash4 ◄── frac, dither_en

**`pfd_tristate`**

- Two flip-flops: the reference edge sets UP and the feedback edge sets DN.
- When both are set, they are cleared at once (asynchronous clear, zero delay
  in this description).
- It detects frequency as well as phase, and gives narrow pulses when locked.
- If the two flip-flops power up both set, the clear has no edge. A clock
  edge during reset clears them (the reference runs during reset in the
  synthesizer).

**`mm_divider`**

- A down-counter on the VCO clock. At zero it reloads with `N + c - 1` and
  emits a one-VCO-cycle pulse on `div_clk`.
- Each output period is exactly `N + c` VCO cycles. `c` is the value present
  when that period started.
- `div_clk` also clocks the modulator. A new `c` is therefore ready about 98
  VCO cycles before it is needed.
- A floor of 2 on the ratio guards against nonsense settings.

**`charge_pump`, `loop_filter`, `vco`: behavioural models, not synthesizable**

- Charge pump: 1 mA. It has separate up and down currents, so mismatch can be
  studied.
- Loop filter: third-order passive. C1 = 390 pF in series with R1 = 2.05 kΩ,
  shunt C2 = 16 pF, and an extra R2 = 1 kΩ / C3 = 16 pF pole. It is solved
  with forward Euler in 10 ps steps.
- VCO: 1.94 GHz at 0 V and 50 MHz/V, so 1.965 GHz needs 0.5 V.
- Open loop with these values: unity gain near 0.9 MHz, about 54° phase
  margin.
- The source targets a 1 MHz loop bandwidth, 56° margin and lock within
  25 µs. It does not give component values, Icp or Kv: all of those are this
  design's choices. No noise of any kind is modelled.

**`fracn_synth_top`**

- Wires all of the above as in the block diagram of the synthesizer.
- The reference oscillator is outside the design: `ref_clk` is an input.
- Because the analog parts are real-valued models, this top is a simulation
  model.
- The synthesizable part is `pfd_tristate` + `mm_divider` + `hk_mash4`
  (with `hk_efm`, `dither_lfsr`, `noise_cancel`).

## Files

| file | contents | synthesizable |
|---|---|---|
| `rtl/fracn_pkg.sv` | shared constants (widths, a = 3, LFSR seed) | yes |
| `rtl/hk_efm.sv` | one HK error-feedback stage | yes |
| `rtl/dither_lfsr.sv` | 8-bit dither LFSR | yes |
| `rtl/noise_cancel.sv` | MASH cancellation network | yes |
| `rtl/hk_mash4.sv` | 4th-order dithered HK-MASH | yes |
| `rtl/mm_divider.sv` | multi-modulus divider ÷(N + c) | yes |
| `rtl/pfd_tristate.sv` | tri-state PFD | yes |
| `rtl/charge_pump.sv` | charge pump model | no (real) |
| `rtl/loop_filter.sv` | third-order passive filter model | no (real, delays) |
| `rtl/vco.sv` | VCO model | no (real, delays) |
| `rtl/fracn_synth_top.sv` | complete synthesizer | no (contains the models) |
| `tb/tb_<module>.sv` | self-checking testbench per module | – |

Every file carries `` `timescale 1ps / 1fs ``. The VCO period (about 509 ps)
needs sub-picosecond precision.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. Build
and run one with Verilator 5:

    verilator --binary --timing --top-module tb_fracn_synth_top \
        rtl/fracn_pkg.sv rtl/*.sv tb/tb_fracn_synth_top.sv -o sim
    ./obj_dir/sim

Replace the top module and testbench file for the others. Lint a module with
`verilator --lint-only -Wall rtl/*.sv --top-module <module>`. The only
warnings are unused package constants, and a ZERODLY note on the VCO's
computed delay.

| testbench | what it checks |
|---|---|
| `tb_hk_efm` | Every output against the stage equations, at 6 and 20 bits. For the 6-bit stage (modulus 61): exactly `r` ones per 61 samples, period 61, not constant. |
| `tb_dither_lfsr` | Against an independent bit-level model. Period exactly 255, every non-zero word once, never zero, hold when disabled. |
| `tb_noise_cancel` | Against the expanded binomial form. Both extremes -7 and +8 reached. |
| `tb_hk_mash4` | Cycle by cycle against a reference model of the whole modulator. Input 917504 for 2^19 samples. 262144 with and without dither, and random words. The running sum of `c` stays within ±16 of `n·r/(M-a)`; range -7..+8; dither changes the sequence but not the mean. |
| `tb_mm_divider` | 4000 output periods with random `c`. Each period equals the ratio taken at its start; one-cycle pulses; `ratio_q`. |
| `tb_pfd_tristate` | UP/DN pulse widths equal the phase offset for lead and lag. Never both high. Frequency detection in both directions. |
| `tb_charge_pump`, `tb_loop_filter`, `tb_vco` | Currents incl. mismatch. Charge conservation, the overshoot caused by the filter zero, and ramp slope. Frequency versus voltage, clamp and duty cycle. |
| `tb_fracn_synth_top` | Full loop at default parameters (see below). |
| `tb_mash_spectrum` | Input 917504, dither on, 2^19 samples. Hann-windowed DFT of the output at two groups of bins a decade apart: the noise rises 79.4 dB per decade, against 79.9 dB for ideal (1 - z^-1)^4 shaping; the low band sits more than 120 dB below the band at fs/4. |
| `tb_sequence_length` | 6-bit-stage HK-MASH (a = 3) against the same MASH with a = 0, the classical accumulator MASH, both undithered, for every input word 1..60. The classical one repeats within at most 256 samples; the HK one shows no period up to 4096 for any word. |

The full-loop test starts from the VCO's free-running 1.94 GHz.

- **Runs.** It first locks to 1.965 GHz (N = 98, r = 2^18, dither on). It then
  switches to N = 97, r = 917504 with dither off (1.9575 GHz).
- **Lock.** Lock is declared once every later 1 µs window holds the expected
  number of VCO edges within ±2. The simulation locks after 7 µs and 3 µs; the
  test requires under 25 µs.
- **Phase lock and ratio.** After lock, 40 reference periods contain exactly
  3930 and 3915 VCO edges. The mean divider ratio is 98.250000 and 97.875000.
- **Control voltage.** It settles near 0.51 V and 0.36 V.
- **Mechanisms seen.** UP and DN pulses; ratios below and above N (14
  distinct values); carries from all four stages; both dither settings; the
  channel switch.

It runs in about 2 s.

## Hardware cost

The source reports 103 flip-flops and 130 4-input LUTs for its modulator on a
Spartan-2E FPGA. A classical dithered MASH of the same width needed 115 and
148. After generic synthesis `hk_mash4` has 109 flip-flop bits:

| registers | bits |
|---|---|
| 4 stages × (20-bit residue + 1-bit carry) | 84 |
| LFSR | 8 |
| differentiator and output registers (after unused bits are removed) | 13 |
| observation register `carry` | 4 |
| **total** | 109 |

That is close to the published count. The observation register is what this
design adds. The multi-modulus divider adds 17 flip-flop bits and the PFD 2.

## Where this design departs from the source, or fills gaps

- **Output frequency.** The source states 1.965 GHz in its summary and
  performance table. Its loop-design section uses 1.956 GHz (with a mean ratio
  of 97.95). This design takes 1.965 GHz (98.25) as the main channel. The inputs
  are ports, so any channel in range works.
- **Loop bandwidth.** The source gives both a 1 MHz loop bandwidth and an
  open-loop crossover of 60 kHz with 56° margin. The filter here follows the
  1 MHz bandwidth.
- **Modulator output.** The trailing `1 - z^-1` after the cancellation sum is
  omitted (see above).
- **Dither.** The LFSR polynomial, seed and word use are this design's own.
  So are the `dither_en` control and the `carry` observation port.
- **Divider and PFD.** Only their function is given by the source. The
  counter and two-flip-flop implementations are standard choices.
- **Reset.** The source does not say. All digital state has an asynchronous,
  active-low reset.
- **Analog models.** Charge pump, filter and VCO values are chosen here (see
  above). They are ideal apart from the optional pump mismatch: no phase noise,
  no reference spur and no VCO nonlinearity.
- **Not included.** The reference oscillator, and all phase-noise results:
  the loop models carry no noise sources. Of the modulator's spectrum only the
  noise-shaping slope is checked (`tb_mash_spectrum`); the sequence-length
  comparison is made at 6-bit width, where periods can be measured
  (`tb_sequence_length`).
