# Event-driven spike sorter for a level-crossing ADC

An implanted neural recorder that sends every sample of every electrode off
the chip spends most of its power and bandwidth on silence: what a downstream
user usually needs is only *which neuron fired, and when*. This design sorts
spikes on the channel itself, and it does so without ever sampling the signal
at a fixed rate. The signal is digitised by a **continuous-time, variable-step
level-crossing ADC**, which emits an event only when the input has moved by
1, 2, 4 or 8 LSB since the last event. The step size already says how steep
the signal is: fast edges produce large steps, slow ones small steps. Counting
how many steps of chosen sizes and directions a spike produces, and adding the
spike's peak value, gives a small feature vector. This vector is compared with
one trained template per neuron class, and the nearest class is sent out as an
address event.

All logic advances only when an ADC event arrives, except a fixed-length spike
window. A channel with no spikes therefore does almost nothing.

The RTL here is the digital half of one channel. The analog half (amplifier,
comparators, delay cells, the two DACs) is not logic. Its digital signals are
ports of the top module, and `tb/ct_adc_model.sv` models it behaviourally for
simulation.

## How a spike travels through the channel

```
 comparators            trigger_timing        feature_mux      feature_registers
 comp_up[3:0] ──►  largest crossed step ──► evt ──► 3 of 8 streams ──► cnt[0..2] (saturating)
 comp_dn[3:0]      level += / -= step             (configurable)      peak = max(level)
                   level ──► dac2_code                                   │
                     │                                                   ▼
                     ▼                                   sort_engine: for each class c
             spike_controller ◄── spike_window_timer       FD(c) = Σ |feature − template_c| >> coef_c
   level > threshold: clear features, open window          keep min  ──► class
   window end: start sorting                                             │
   result: hand to aer_tx; wait for level ≤ threshold                    ▼
                                                         aer_tx: {CHANNEL_ID, class}, req/ack
```

1. **Trigger (`trigger_timing`).** The comparators report as thermometer codes
   how far the input lies above or below the current level: at least 1, 2, 4
   or 8 LSB, each threshold half an LSB short of the step. The largest step
   crossed wins. The level register moves by that step, saturating at
   −128/+127, and drives the feedback DAC. A one-cycle event
   `{valid, dn, step}` is issued. Between events the analog side holds its
   comparators off for a configurable delay (`dac1_code`). While it waits, a
   fast signal moves further, so the next step is larger. This delay is the
   knob that sets how steep an edge must be to produce large steps.
2. **Detection (`spike_controller`).** While idle, the level simply follows the
   input. When it rises above the threshold, the three counters are cleared,
   the peak register is loaded with the level, and the spike window starts.
3. **Accumulation (`feature_mux`, `feature_registers`).** During the window,
   each counter counts one of the eight event kinds (+1, +2, +4, +8, −1, −2,
   −4, −8), chosen by configuration. The peak register follows any higher
   level. Counters stop at 255 instead of wrapping.
4. **Window end (`spike_window_timer`).** After `WINDOW_TICKS` cycles (2 ms at
   the intended 1 MHz) the window closes and sorting starts. A fixed window
   means a single spike cannot be counted twice, and noise after the spike
   cannot add events.
5. **Sorting (`sort_engine`, `feature_distance`).** One distance unit is used
   for all classes in turn, one class per cycle. The smallest distance wins,
   and a tie goes to the lower class number.
6. **Output (`aer_tx`).** The class goes out as an address event. If the
   previous event has not been acknowledged yet, the controller waits.
7. **Cool-down.** The detector re-arms only once the level is back at or below
   the threshold. Without this, a spike that is still above threshold when its
   window closes would be detected again at once.

## The feature distance

For class `c` with template values `T[0..3]` and coefficients `C[0..3]`:

```
FD(c) = |cnt0 − T0| >> C0 + |cnt1 − T1| >> C1 + |cnt2 − T2| >> C2 + |peak − T3| >> C3
```

The counts are unsigned. The peak and `T3` are signed 8-bit. Each term is at
most 255, so FD fits in 11 bits. A coefficient is a **shift**: each coefficient
step halves the weight of its feature. Training can therefore make a noisy
feature count for less, or a reliable one for more, without any multiplier. Each class has
its own coefficients, so a class whose feature spreads widely can get a looser
weight than a tight one. This reading is an interpretation: the source formula
divides each difference by a coefficient term, and the shift (division by a
power of two) is the cheapest form of it that needs no divider. Using the
absolute difference is this design's choice too.

There is no "unknown" class. Every detected spike is assigned to its nearest
template, however far away that template is.

## Training and configuration

Templates are not learned on chip. A conventional sorter runs offline on a
recording. It chooses the ADC delay, the three event streams that separate the
classes best, the threshold, and per class the mean features and weights.
These are then written through the configuration port, one 11-bit word per
clock (`cfg_we`, `cfg_addr`, `cfg_wdata`):

| address            | contents                                                   |
|--------------------|------------------------------------------------------------|
| 0                  | `[7:0]` detection threshold, signed LSB                    |
| 1                  | `[8:0]` `{sel2, sel1, sel0}`; each `{dn, step[1:0]}`, step size `1 << step` |
| 2                  | `[3:0]` ADC delay code, output on `dac1_code`              |
| 4 + 4·class + f    | `{coef[2:0], value[7:0]}`; f = 0..2 counter, f = 3 peak (signed) |

Everything resets to zero. Writes to other addresses are ignored. With
`N_CLASSES = 4`, `cfg_addr` is 5 bits wide.

## Top-level interface (`ct_spike_sorter`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | event-sampling clock, asynchronous active-low reset |
| `comp_up`, `comp_dn` | in | 4 | comparator thermometer codes (≥ 1, 2, 4, 8 LSB above / below the level) |
| `dac2_code` | out | 8 | reconstructed level, two's complement, to the feedback DAC |
| `dac1_code` | out | 4 | ADC delay code |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 5, 11 | configuration write port |
| `spike_active` | out | 1 | spike window open |
| `evt` | out | 4 | current step event `{valid, dn, step[1:0]}` (`step_evt_t`) |
| `aer_req`, `aer_ack`, `aer_addr` | out, in, out | 1, 1, 6 | four-phase address event `{CHANNEL_ID, class}` |

Parameters: `N_CLASSES` (4), `WINDOW_TICKS` (2000), `CH_W` (4) and
`CHANNEL_ID` (0). The package `ct_sort_pkg` fixes the 8-bit level, the four
step sizes, three counters, 8-bit counters and 3-bit coefficients.

Timing: an event seen on the comparators in one cycle shows up on `evt` and
`dac2_code` after the next clock edge. `aer_req` rises `N_CLASSES + 3` cycles
after the window ends, if the output is free. The address-event handshake is
four-phase. `req` rises with the address stable, the receiver raises `ack`,
`req` falls, and the receiver drops `ack`. Only then is the sender ready
again. `aer_tx` carries assertions for the address staying stable and for
`req` being held until `ack`. `aer_ack` is sampled on `clk`; an asynchronous
receiver needs a synchroniser in front of it.

## A clocked rendering of a clockless design

The circuit this follows uses no clock at all. Its logic is asynchronous and is
triggered by the comparator pulses themselves, and its spike window is an
analog delay line. This RTL is synchronous instead, so that it can go through
standard synthesis, timing and simulation flows. Every register sits on `clk`,
at most one ADC event is taken per cycle, and the spike window is a down
counter. At 1 MHz, `WINDOW_TICKS = 2000` gives 2 ms. The clock must run faster
than the ADC can fire, or events are lost. Clock gating on `evt.valid`, the
window and the sorting activity would bring back most of the idle-power
advantage. That is not included here.

## Where this design makes its own choices

These points were not fixed by the method, or were read from an unclear
description:

- The largest crossed step wins in the trigger. The level is signed and
  saturates.
- A spike ends when the fixed window ends, not when the level falls back below
  the threshold. The level test is used only to re-arm the detector
  (cool-down).
- The peak is the maximum level inside the window.
- Coefficients are shifts, differences are absolute, and coefficients are
  stored per class.
- Classes are scanned one per cycle, and ties go to the lower class.
- Counter width (8 bits), coefficient width (3 bits), the number of classes
  (4, the number of neuron types in the evaluation data), the configuration
  address map and the AER handshake and address format are all this design's
  own.
- One channel per instance. Several channels need one instance each, and an
  AER arbiter, which is not included.

## Verification

Each module has a self-checking testbench in `tb/` that compares against a
model written independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_trigger_timing` | event kind and level for 3000 random comparator codes, both saturation limits |
| `tb_feature_mux` | all 8 event kinds against all 512 selections |
| `tb_feature_registers` | counters, saturation, peak tracking, clear |
| `tb_spike_window_timer` | done exactly `WINDOW_TICKS` cycles after start; restart |
| `tb_config_memory` | random writes over the whole address space, read-back by class |
| `tb_feature_distance` | 20 000 random and extreme feature/template pairs |
| `tb_sort_engine` | winner, minimum, tie rule, `N_CLASSES + 1` cycle latency |
| `tb_spike_controller` | every strobe in every state, including output back-pressure and cool-down |
| `tb_aer_tx` | four-phase order, address, ignored loads while busy, random ack delays |
| `tb_ct_spike_sorter` | whole channel at default size (see below) |
| `tb_snr_sweep` | sorting accuracy at three noise levels |

`tb_ct_spike_sorter` runs the default configuration: a 2000-cycle window and 4
classes. Four synthetic spike shapes, each a positive half-sine followed by a
negative one, drive the ADC model. The testbench configures the channel and
trains it by reading back the features of each clean shape. It then requires a
correct class for every clean replay and at least 90 % on noisy spikes. It also
switches the event streams at run time and drives a fast oscillation, which
saturates a counter and keeps the level above threshold past the window end. An
over-range spike saturates the level register, and a slow receiver forces the
output to wait. Whenever the output is free, the testbench checks that
`aer_req` rises exactly `N_CLASSES + 3` cycles after the window ends. Each of these mechanisms, and every one of the eight step
kinds, is counted and must occur at least once.

`tb_snr_sweep` trains templates from the mean features of eight noisy spikes
per class, then sorts 40 spikes at three noise levels. The noise has a standard
deviation of about 1.1, 4.4 and 8.7 LSB, against peaks of 40 to 110 LSB.
Accuracy is 1 − (missed + false + misclassified) / spikes. One run gave 100 %,
90 % and 42.5 %. As in the original evaluation, accuracy falls steeply once
noise begins to fire the level crossings by itself. Only the high-SNR figure is
checked (at least 90 %). The synthetic shapes are not the recorded data sets
that the method was evaluated on, so these figures say nothing about accuracy
on real recordings.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ct_spike_sorter \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/ct_sort_pkg.sv tb/tb_ct_spike_sorter.sv
./obj_dir/Vtb_ct_spike_sorter
```

Swap in any other testbench name. The package must be named first; everything
else is found through `-y`. Each run takes well under a second. To lint a
module, use `verilator --lint-only -Wall -y rtl rtl/ct_sort_pkg.sv rtl/<module>.sv`.

## Not included

The amplifier and filter, the comparators and delay cells of the ADC, and both
DACs are analog circuits. The ADC's analog behaviour is available only as the
simulation model `tb/ct_adc_model.sv`. It applies thresholds at step − ½ LSB,
and after each conversion it holds the comparators off for `dac1_code` cycles.
