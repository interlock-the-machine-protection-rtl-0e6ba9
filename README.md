# Beam position interlock for a digital BPM

A beam position monitor (BPM) in a storage ring measures where the beam is. Its interlock output tells the machine protection system that something is wrong. The output fires when the beam leaves a window in X or Y. It also fires when the BPM's own measurement is no longer valid because one of its ADCs is saturated. This RTL is that interlock. It runs entirely in the BPM's FPGA, takes the 10 kHz position stream and the raw ADC samples, and drives an opto-coupled switch. The switch is **closed while everything is fine**. It opens on an interlock and whenever the unit is not running, so a dead BPM also reports a problem.

The main requirement is speed: a position outside the limits must be seen within **10 ms**. At 10 kHz that is about 100 position samples, so there is plenty of room for some filtering.

## Signal flow

```
pos_x, pos_y (10 kHz) ─► il_pos_detect ×2 ─► IL_POS_X, IL_POS_Y ─┐
att[], att_limit, GS_DEP ─► il_gain_enable ─► pos_enable ────────┤
adc[0..3] (ADC rate) ─► il_adc_ovf_mux ─► ADC1..4_OVFL           │
          (il_quad_detector ─ iir_filter inside)                 │
                      ─► il_ovf_filter ─► il_ovf ────────────────┤
                                     il_glue (with IL_ON) ◄──────┘
                                        ─► il_monostable ─► IL_OUT ─► il_switch_closed = !IL_OUT
```

The glue logic is:

```
IL_OUT_condition = IL_ON & ( ((IL_POS_X | IL_POS_Y) & pos_enable) | il_ovf )
pos_enable       = (ATT>A & GS_DEP) | !GS_DEP
```

The top is `libera_interlock` (`rtl/libera_interlock.sv`). Everything runs on one clock, the ADC sample clock of about 115 MHz. The 10 kHz position samples and the machine revolution arrive as one-clock strobes, `pos_valid` and `turn_tick`. Reset is synchronous and active low.

## Position path (`il_pos_detect`, `iir_filter`)

Each axis has a first-order IIR low-pass followed by a window comparator:

```
y[n]   = K·x[n] + (1−K)·y[n−1]
IL_POS = (Min > y) | (y > Max)          (strict: a value on the limit is inside)
```

The filter removes single-sample spikes. With K = 1/8, a one-sample excursion to five times the limit stays below it. Positions are signed 32-bit nanometres and are expected to be offset-free already.

There is no enable per axis. To ignore one axis, give it a window it can never leave, such as the full 32-bit range.

`K` is an unsigned fixed-point number with 15 fraction bits: `0x8000` means 1.0 (no filtering) and `0x1000` means 1/8. Values above 1.0 are limited to 1.0. The filter register carries 15 extra fraction bits, so a slow filter settles all the way instead of stalling a few LSBs short.

Latency: `pos_filt` changes one clock after `pos_valid`, and `il_pos` one clock after that. The monostable adds one more clock to `IL_OUT`. How many samples it takes for a step to cross the limit depends only on K and on the size of the step.

## Gain-dependent mode (`il_gain_enable`)

At low beam current the machine does not need protecting, and users prefer the interlock to stay quiet. The design does not estimate the current. It uses a monotonic proxy instead: the BPM front end uses less attenuation (more gain) at lower current. The attenuator settings (`N_ATT` = 2 settings of 6 bits) are summed, and the sum is compared with the limit `A`:

- With `GS_DEP` = 1, position violations count only while `sum > A`, i.e. at high current.
- With `GS_DEP` = 0, position violations always count.

ADC overflow is never gated by this mode.

## Saturation detection

When all four electrodes clip, the position formula `x = k·(A−B−C+D)/(A+B+C+D)` returns the centre, so a saturated BPM looks like a perfect beam. Saturation cannot be seen in the decimated per-turn amplitudes either, because the filtering removes the spectral signs of clipping. The design therefore looks at the raw ADC samples. This path is the least obvious part of the design.

### Quasi-quadrature detector (`il_quad_detector`)

For a sine of amplitude `a`, two samples a quarter period apart give `x[k]² + x[k−n]² = a²`. For other spacings the sum ripples around `a²`. With a ~30 MHz signal and a ~115 MHz clock, a quarter period is 0.96 samples, so `N_DELAY = 1`.

```
adc ─┬─────────► x²  ─┐
     └─ Z^-n ──► x²  ─┴─ + ─► iir_filter(K = amp_k) ─► amp_sq ─► (amp_sq > adc_limit²) ─► ovf
```

A first-order IIR with its own coefficient `amp_k` removes the remaining ripple. The result is compared with the square of the ADC limit, which the hardware computes from `adc_limit`. With `amp_k` = 1/4, a 2000-count tone settles to within ±10 % of 4·10⁶ in about ten samples.

Pipeline: squares → sum → filter → comparator, one register each. `ovf` follows a sample by four clocks.

### Sharing one detector between four channels (`il_adc_ovf_mux`)

The required reaction time is far longer than one machine revolution, so one detector serves all four ADCs. It watches channel `ch_sel` for a whole turn and moves to the next channel on every `turn_tick`. During a turn, any overflow sets a sticky bit. At the end of the turn, that bit is written into `adc_ovfl[ch_sel]` and cleared. Each flag therefore describes the last turn its channel was watched, and is refreshed every four turns.

When the detector moves to a new channel, its pipeline and filter still hold the previous one. To keep a loud channel from leaking into the flag of a quiet neighbour:

- the filter is reloaded with the first sample of the new channel;
- overflow is ignored for `BLANK` = 16 clocks.

A turn must therefore be longer than `BLANK` plus a few clocks, and an assertion flags a `turn_tick` that arrives earlier. Real turns are hundreds of clocks.

### Duration filter (`il_ovf_filter`)

The four flags are OR-ed. The result reaches the glue logic only after it has lasted `ovf_dur` consecutive clocks (0 acts as 1), so brief overflows are ignored. A flag lasts at least one turn. Because each channel is watched only one turn in four, set `ovf_dur` in relation to the turn length.

## Output: monostable and switch (`il_monostable`)

PLCs on the interlock line cannot catch pulses of about 1 ms. The output is therefore held for 10 ms after the condition clears. `HOLD_CYCLES` = 115 MHz × 10 ms = 1 150 000 clocks, and the counter is 21 bits wide.

- `IL_OUT` rises one clock after the condition appears.
- It falls exactly `HOLD_CYCLES + 1` clocks after the last clock with the condition.
- It is active during reset and for the hold time after reset.

`il_switch_closed = !IL_OUT` is the drive for the opto-coupler.

## Configuration

All settings come in one packed struct, `il_pkg::il_cfg_t`, and may change at any time. In the real system, software writes them at start-up.

| field | meaning |
|---|---|
| `il_on` | master on/off |
| `gs_dep` | gain-dependent mode |
| `x_min`, `x_max`, `y_min`, `y_max` | windows, signed nm |
| `pos_k` | position filter K (Q1.15) |
| `amp_k` | amplitude filter K (Q1.15) |
| `adc_limit` | ADC amplitude limit, counts (15 bits, positive) |
| `ovf_dur` | overflow duration, clocks |
| `att_limit` | gain limit A, compared with the attenuator sum |

The top also brings out status signals: `il_pos_x`, `il_pos_y`, `att_gt_lim`, `adc_ovfl`, `il_ovf`, the filtered positions, `ch_sel` and `amp_sq`.

## What is fixed by the design and what is chosen here

Fixed by the interlock's definition:

- the IIR-plus-window structure of the position path;
- the gate network of the glue logic;
- gain-dependent enabling from a summed attenuation compared with a limit;
- the quadrature detector: delay, squares, filter, and comparison with the squared limit;
- one detector shared by the four channels, switching at the revolution rate;
- a filter on the combined overflow;
- the 10 ms monostable;
- the switch that is closed when all is well.

Chosen here, where the definition is silent:

- all word lengths: 32-bit positions, 16-bit ADC samples, coefficients with 15 fraction bits, 2 × 6-bit attenuators;
- the fixed-point filter and its extra precision;
- the pipeline registers;
- strict comparisons;
- how the multiplexed detector keeps per-channel flags, and the filter reload and blanking on a channel switch;
- the overflow filter as a consecutive-clock duration filter (the definition only names a filter there);
- a single clock domain with strobes;
- the output being active during reset.

Known departures and limits:

- The amplitude filter is first order with a run-time coefficient. The original coefficients were designed offline per machine, to give about the same ripple everywhere; any first-order K can be loaded here, but higher-order responses cannot.
- The detector squares the sample and its delayed copy and adds the squares. A single product of the two would not estimate the squared amplitude.
- Saturation detection relies on the tone being present most of the turn. With a partially filled ring (below about 5 % fill), the filtered amplitude under-reads. A peak search that resets every N turns would fix this, but it is not implemented.
- The settings bus, the position calculation and the opto-coupler lie outside this RTL.

## Files

| file | content |
|---|---|
| `rtl/il_pkg.sv` | widths, types, configuration struct |
| `rtl/iir_filter.sv` | first-order IIR with run-time K |
| `rtl/il_pos_detect.sv` | one axis: filter and window comparator |
| `rtl/il_gain_enable.sv` | attenuator sum, ATT>A, gain-dependent enable |
| `rtl/il_quad_detector.sv` | quasi-quadrature amplitude detector and limit comparator |
| `rtl/il_adc_ovf_mux.sv` | detector shared over four channels, per-channel flags |
| `rtl/il_ovf_filter.sv` | OR of the flags and duration filter |
| `rtl/il_glue.sv` | glue logic |
| `rtl/il_monostable.sv` | retriggerable 10 ms monostable |
| `rtl/libera_interlock.sv` | top |

## Verification

Every module has a self-checking testbench in `tb/` that compares against values computed independently in the testbench and prints `TB_RESULT checks=N failures=M`:

- The filter and detector tests model the fixed-point arithmetic exactly.
- The monostable and duration-filter tests compare every clock with a reference.
- The glue test is exhaustive.
- The multiplexer test runs 400 turns of random loud and quiet channels, including loud-to-quiet switches.
- `tb_il_amp_ripple` runs two detectors, unfiltered (K = 1) and filtered (K = 1/4), on the same 2000-count tone at f/fs = 30/115 and at 0.30. It checks the mean amplitude square (4·10⁶ within 3 %), the ripple reduction and the settling time. At 30/115, the unfiltered output swings between 3.73·10⁶ and 4.27·10⁶, and the filtered output between 3.96·10⁶ and 4.04·10⁶. At 0.30 the swing is 2.89–5.21·10⁶ unfiltered and 3.81–4.16·10⁶ filtered.

There are two end-to-end testbenches, and both use the scenario in `tb/il_e2e_scenario.sv`:

- `tb_libera_interlock` runs at reduced timing: a 400-clock hold, a position sample every 16 clocks and 64-clock turns.
- `tb_libera_interlock_full` runs at the real timing: every default, a position sample every 11 500 clocks and 400-clock turns. This is about 6.7 M clocks and takes a few seconds.

The scenario exercises and counts each mechanism:

- the output is open at reset;
- X and Y trips, with the latency checked against 100 samples and 3 samples;
- a spike removed by the filter;
- suppression and enabling in gain-dependent mode;
- IL_ON off;
- ADC overflow on one channel reaching the output;
- a short overflow blocked by the duration filter;
- an exact monostable hold.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/il_pkg.sv tb/tb_libera_interlock_full.sv --top-module tb_libera_interlock_full
obj_dir/Vtb_libera_interlock_full
```

Replace the testbench name to run another test. The packages must come first on the command line.
