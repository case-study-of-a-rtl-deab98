# Field oriented current control for a small PMSM/BLDC drive on an FPGA

This RTL closes the current loop of a three-phase permanent magnet motor at 8 kHz. It runs on a
200 MHz FPGA clock. Once per PWM period it takes a sample:

1. Read the two measured phase currents from a pair of 12-bit SPI ADCs.
2. Read the rotor angle from a quadrature encoder.
3. Turn the currents into the rotating d/q frame (Clarke, then Park).
4. Regulate i_d and i_q with two PI controllers, and add a model-based feed-forward voltage.
5. Turn the voltage back to the three phases (inverse Park, inverse Clarke).
6. Compute space-vector duty cycles and drive six gate signals from a centre-aligned PWM
   counter.

The arithmetic is one fixed-latency pipeline. A sample goes from the PWM valley to new duty
cycles in 28 clock cycles (140 ns). That is a tiny fraction of the 25 000-cycle period, so the
loop is limited by the ADC and the PWM period, not by the logic.

The structure follows a published rapid-prototyping case study. Its blocks were built in a
graphical fixed-point tool for a Virtex-5 board and an 8 kHz loop. Here every block is
hand-written, synthesizable SystemVerilog. The main departures are listed at the end.

```
          sync_top                          sync_bot (sample)                        next sync_bot
 SPI ADC ──────────► adc_scale ─┐                 │                                         │
 (2 × 12 bit)                   ├─ i_a,i_b ──► [input bank] ─► clarke ─► park ─► PI d/q ─┐  │
 encoder ─► quad_encoder ─► elec_angle ─ θe ──►    │                                  (+)─► inv_park ─► inv_clarke ─► svpwm ─► [duty reg] ─► pwm_counter ─► 6 gates
                                                   └─ i*_d,i*_q, θe ─► feedforward ───┘
```

## Numbers and units

- All datapath signals are 16-bit signed fixed point with 13 fraction bits (`fix_t`, range
  ±4). Angles are 12-bit unsigned (`angle_t`), 4096 counts per turn. `foc_pkg` holds these
  types, the `abc_t`/`ab_t`/`dq_t` structs, the block latencies, and the rounding and
  saturation helpers.
- Currents are in ampere: 1.0 = 1 A.
- Voltages are per unit of the DC-link voltage `V_BASE` (36 V by default). Per unit 1.0 = Vdc,
  so a phase voltage of ±0.577 is the edge of linear space-vector modulation.
- Every multiply rounds half up and saturates to the 16-bit range. Nothing wraps.

## Measurement: `spi_adc`, `adc_scale`, `quad_encoder`, `elec_angle`

**`spi_adc`** drives two ADC122S051-type converters. They share chip select and SCLK and have
separate data lines.
- A `conversion` pulse starts one 16-SCLK frame. `adc_ch` is sent in the control word, MSB
  first on the falling SCLK edge.
- The 12 data bits that follow four leading zeros are sampled on the rising edges.
- `conversion_ready` then pulses with both codes.
- With `SCLK_HALF = 32` the SCLK runs at 3.125 MHz, and a frame takes 1057 clock cycles.

**`adc_scale`** removes the mid-scale offset (`ZERO_CODE = 2048`) and multiplies by
`AMP_PER_LSB` (1/512 A). That gives ±4 A over the code range. Both numbers describe the
current-sense amplifier. Change them to match your board.

**`quad_encoder`** synchronises A and B with two flip-flops and decodes every edge (x4). It
keeps a 12-bit position, the last direction, and a count of illegal double transitions.

**`elec_angle`** computes θe = POLE_PAIRS · θmec + theta_offset, modulo 4096. The offset
aligns the encoder zero with the rotor flux. The reference design applied 4096/4 = 1024.

## Transforms: `clarke`, `park`, `inv_park`, `inv_clarke`, `sincos_lut`

Each transform is a pipeline of exactly 5 cycles:

- Clarke: iα = ia, iβ = (ia + 2·ib)/√3. The constant 1/√3 is 0.57733154296875.
- Park: Id = iα·cos θ + iβ·sin θ, Iq = −iα·sin θ + iβ·cos θ.
- Inverse Park: Vα = Vd·cos θ − Vq·sin θ, Vβ = Vd·sin θ + Vq·cos θ.
- Inverse Clarke: Va = Vα, Vb = −Vα/2 + (√3/2)·Vβ, Vc = −Vα/2 − (√3/2)·Vβ.

Park and inverse Park each hold a `sincos_lut`. This is a 4096-word sine ROM computed at
elaboration with `$sin`. The cosine is read a quarter turn ahead. Address and data are both
registered, so a lookup takes 2 cycles, and the current inputs are delayed to match.

## Regulation: `pi_current_controller` (`pi_axis`) and `feedforward`

**PI.** Each axis computes u(n) = Kp·e(n) + KiTs·Σe(k). Kp and Ki·Ts are run-time inputs in
Fix_16_13. The integrator is 48 bits wide with 26 fraction bits, so small Ki·Ts values still
integrate.
- Anti-wind-up: the integrator and the output are both clamped to ±`U_LIMIT` (1/√3 per unit).
  `sat` reports when the clamp is active.
- Timing: the regulator advances only on its `en` strobe, once per sample. Its result is ready
  2 cycles later.

**Feed forward.** The block evaluates the steady-state motor model from the reference
currents:

    V_d = R·i_d + L·Δi_d·fs − L·i_q·ω
    V_q = R·i_q + L·Δi_q·fs + L·i_d·ω + Ψ·ω

- ω comes from the angle step between two samples. The step is a signed 12-bit difference, so
  the angle wrap needs no special case. It is scaled by 2π·fs/4096.
- Motor constants by default: R = 1.6 Ω, L = 2.151 mH (half the 4.3 mH line-to-line value),
  Ψ = 0.0066070556640625 V·s.
- The sum is divided by `V_BASE` to get per-unit volts. Internal constants carry 30 fraction
  bits, because L/Vdc is far below the 16-bit resolution.
- The feed forward runs in parallel with Clarke, Park and PI, and its result is ready first.
  An assertion in the top checks that. The feed forward also passes the angle it used on to the
  inverse Park transform, so both sides of the loop use the same θe.

## Modulation: `svpwm` and `pwm_counter`

**`svpwm`** takes the three phase voltages and finds the 60° sector from the signs of their
pairwise differences.
- The zero-vector time T0 = 1 − (max − min) is split equally between V0 and V7. This is the
  centre-aligned pattern T0/2 · T1/2 · T2/2 · T7 · T2/2 · T1/2 · T0/2 inside each
  up/down carrier period.
- Duty cycles come out as fractions 0..1.
- A reference beyond the hexagon clamps T0 at 0 and raises `overmod`.
- Latency is 3 cycles.

**`pwm_counter`** is a triangle counter, 0 → `HALF_PERIOD` → 0. With 12 500 at 200 MHz that is
a 125 µs period (8 kHz).
- `sync_bot` pulses at the valley and `sync_top` at the peak.
- New duties enter shadow registers at the valley only, so a period never changes its pattern
  halfway.
- A phase's high-side gate is on while the carrier is above the threshold
  HALF_PERIOD·(1 − duty), so the pulse is centred on the carrier peak.
- The low side is the exact complement. An assertion checks that both are never on together.
- There is no dead time. Add one before driving a real bridge.

## Loop schedule: `foc_top`

| event | clock cycle in period | what happens |
|---|---|---|
| carrier peak (`sync_top`) | 12 500 | ADC frame starts (1057 cycles) |
| ADC ready | ≈ 13 560 | i_a, i_b latched in `adc_scale` |
| carrier valley (`sync_bot`) | 0 | input bank samples currents, θe, references, gains |
| +28 | 28 | duty register loaded, `loop_done` |
| next valley | 25 000 | `pwm_counter` applies the duties |

The sample bank is the only point where the loop touches the slow world. After it, a one-bit
strobe travels alongside the data through delay lines sized from the block latencies in
`foc_pkg`. Each stateful block (PI, feed forward, SVPWM, duty register) acts when its strobe
arrives.
- The theta delay (5 cycles) aligns the angle with the Clarke output.
- Assertions check three things: the two ADC channels stay in step, the ADC is never busy at
  the sampling instant, and the feed forward is ready before the PI output.

## Verification

Each block has a self-checking testbench `tb/tb_<block>.sv` that compares against values
computed independently in `real` arithmetic. The testbenches cover:
- sweeps of angles and currents for the transforms;
- steps and saturation for the PI;
- sector coverage and over-modulation for SVPWM;
- carrier timing, shadow loading and shoot-through for the PWM;
- frame timing and the returned codes, against a behavioural converter model
  (`tb/adc122s051_model.sv`), for the ADC;
- forward, backward and illegal sequences for the encoder.

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a cycle watchdog.

`tb_foc_top` runs the complete design at its default parameters: 200 MHz and the real 125 µs
period, for 96 periods (about 2.4 M checks, a few seconds).
- Two ADC models return currents that change every period.
- The encoder turns forwards, then backwards.
- References and gains change during the run.
- In every period a floating-point model of the whole control law predicts the gate high
  times. The measured times must match within 20 of 25 000 cycles.
- It also checks the 28-cycle latency and complementary gates.
- It counts each mechanism: ADC frames, both encoder directions, all six sectors, the PI clamp
  active and inactive, over-modulation, a non-zero feed-forward speed, and angle wrap-around. A mechanism that never happened is a failure.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/foc_pkg.sv tb/tb_foc_top.sv \
          --top-module tb_foc_top --Mdir obj_foc
./obj_foc/Vtb_foc_top
```

Put `foc_pkg.sv` first on the command line. Swap the testbench name to run any other block
test.

## Departures from the reference design and assumptions to check

- **Latency.** The reference design needed about 50 cycles. Here a sample takes 28 cycles.
  The transform latencies (5 each) and the 2-cycle sine/cosine tables are the same. The PI,
  feed-forward and SVPWM latencies are this design's own.
- **Register banks.** The reference design put a sample register bank, enabled at the valley,
  between each group of blocks. This design keeps one input bank and one duty register, with
  a travelling strobe between them. The same sample reaches the gates in the same period.
- **Flux constant.** Two values appear in the reference material: a Kt-style constant of
  0.0066070556640625 used by its block diagram, and a flux linkage of 0.018 in its script
  version. The default follows the block diagram. Set `PSI_VS` if your motor differs.
- **Assumed values.** These were not specified and are this design's choices:
  - the current-sensor scaling (`ZERO_CODE`, `AMP_PER_LSB`);
  - the pole-pair count (4);
  - encoder counts per mechanical turn (4096);
  - the PI clamp (`U_LIMIT`);
  - V_BASE = 36 V, the motor supply;
  - the SPI clock rate and the ADC frame format (from the converter's data sheet
    conventions);
  - reset behaviour: synchronous, active low, clearing all state.
- **Clarke alignment.** The Clarke transform delays i_a by the multiplier latency, so that
  both adder inputs come from the same sample.
- **Not included.** The design has no dead time, no speed loop, no use of the encoder index
  pulse, and no DC-link voltage measurement.
- **Current range.** The ±4 A range of the current format covers the motor's continuous
  current (~2.4 A), but not its 6.8 A peak. To widen it, change `AMP_PER_LSB` and the per-unit
  convention together.
