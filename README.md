# Activity-adaptive EEG recording channel and 8-channel SAR recorder

Long-term ambulatory EEG is spent mostly on nothing: for the great majority of
an hour of recording the brain signal sits near its baseline, and only short
stretches (seizures, spikes, artefacts) carry fast, large excursions. A
recorder that samples everything at the rate the rare events need wastes most
of its power and almost all of its radio bandwidth.

The main design here is the digital half of a recording channel that changes
its own sampling rate to match the signal. Each channel is a 1-bit delta
modulator: an analog comparator decides whether the input is above or below a
running prediction held on a capacitor, and a charge pump moves the prediction
one step up or down. The digital logic watches the reconstructed signal, keeps
a slowly moving estimate of its baseline (DC level), and compares the signal
against two bands around that baseline. Inside the inner band the modulator is
clocked at 1/128 of the reference rate (256 S/s at a 32.768 kHz reference);
beyond the inner band at 1/8 (4.1 kS/s); beyond the outer band at the full
reference rate (32.8 kS/s). Because the bit stream carries one bit per
decision and the mode tells the receiver how large each step was, the signal
is compressed without loss: quiet stretches cost 1/128 of the bits.

A second, independent design is the digital part of a conventional 8-channel
recorder: one 10-bit successive-approximation ADC controller per channel and an
8:1 serializer that puts all channels on one line for a radio module.

`eeg_implant_top` puts both side by side. They share only the reset.

## The adaptive loop

```
          dmod                 int_en/int_bit              flags
 analog ─────────► duty_cycle_adj ───────────► activity_monitor ───────► samp_clk_gen
 delta   ◄───────── pump_up/dn                 (amp, dc, th_cross)        │ mode, samp_en,
 mod.    ◄────────────────────────────────────────────────────────────────┘ dm_clk, dm_clk_q
```

All of `adaptive_channel` runs on the reference clock. `samp_clk_gen` gives a
one-cycle strobe `samp_en` on the last reference cycle of each modulator
period; the comparator decision `dmod` is taken at that edge. There is no
second clock domain in the logic; `dm_clk`/`dm_clk_q` are only sent out to the
analog modulator.

### Why the step must scale with the period

The hardest point of this design, and the one most worth understanding before
changing anything, is what a step of the charge pump is worth.

The charge pump pushes a fixed current, so the charge it moves per decision is
current × on-time. `duty_cycle_adj` keeps the pump on for the whole modulator
period (`DUTY_LOG2 = 0`; a larger value shortens it to 1/2^DUTY_LOG2 of the
period). So one decision in idle mode moves the prediction 128 times as far as
one in high mode. This is what lets an idle channel notice an event quickly.
With a fixed step per decision, an idle prediction could move only one step
per 128 reference cycles. Its distance from the DC level would reach a 150-step
threshold only after about 19 000 cycles, over half a second. With
proportional steps an idle channel covers the same distance in about 150
cycles, so a burst lifts it out of idle within a few tens of milliseconds.

The reconstruction therefore counts *pump cycles*, not decisions: the
amplitude counters count every reference cycle in which `pump_dn` (a one) or
`pump_up` (a zero) is active. The digital amplitude `amp` is then exactly the
prediction on the capacitor, in units of one reference cycle of pump current,
whatever the mode history.

Two consequences:

* In idle mode the prediction moves in steps of 128 units, so it dithers by
  ±128 around a constant input. **`vth_low` must be larger than the idle
  step**, or the dither alone trips the moderate flag. The testbenches use
  `vth_low` = 150 and `vth_high` = 230 to 250.
* Polarity: `dmod = 1` (input above prediction) drives `pump_dn`. The
  prediction node is taken as the inverting reference of the modulator: it
  falls when the input rises. The reconstructed amplitude counts `pump_dn` as
  +1, so it rises with the input.

### Sampling modes

| mode (`samp_mode_e`) | condition at end of period | modulator clock | decisions/s at 32.768 kHz | charge per decision |
|---|---|---|---|---|
| `MODE_IDLE` 2'b00 | no flag | ref / 128 | 256 | 128 units |
| `MODE_MOD`  2'b01 | `flag_mod` only | ref / 8 | 4096 | 8 units |
| `MODE_HIGH` 2'b11 | `flag_high` | ref / 1 | 32768 | 1 unit |

The mode changes only at `samp_en`, so a period once started always ends at
its own length. After reset the channel is idle. `dm_clk` is the selected tap
of a 7-bit counter (bit 2 for /8, bit 6 for /128, or the reference clock
itself). `dm_clk_q` lags it by a quarter period (XNOR of the two top bits of
the tap); in high mode, where no quarter-period copy can be made from the
reference clock, it is the inverted reference clock. The clocks are switched by
a plain multiplexer: a mode change can shorten one pulse of `dm_clk`.

### Amplitude reconstruction (`amp_recon`)

Two 11-bit up-counters count ones and zeros; their difference
`amp = n_ones − n_zeros` is an 11-bit two's-complement amplitude, range
−1024 … 1023 units. The counters wrap modulo 2^11, so the difference is right
as long as the true amplitude stays in range. `amp_dec` latches `amp` every 128
reference cycles (`dec_valid`), a 256 S/s sample stream whatever the mode.

### DC extraction (`dc_extract`)

Every 40 modulator decisions (40 pulses of `samp_en`, the `en`/`ds_en` input)
the amplitude is sampled as D and the DC level updated as

    DC ← (D + DC + 2·DC + 4·DC) / 8        (truncating)

a first-order low-pass with weights 1:7, built from three adders and two
shifts. Because the interval is counted in decisions, the filter is slow
while the channel is idle and fast while it is busy. When idle it samples
every 156 ms, with a time constant of about 1.25 s, so events stand out
against the baseline. At the full rate it samples every 1.2 ms, with a time
constant of about 10 ms. The baseline then catches up with a sustained
excursion, and the channel steps back down once the excursion stops growing.
If the interval were counted in reference cycles instead, the DC level would
follow every burst slower than about 15 Hz, and such bursts would never leave
idle mode. The adders are 14 bits so that eight full-scale words cannot overflow.
The starting value comes from the `dc_init` input and is loaded during reset.
`SIGNED = 0` turns the block into unsigned arithmetic, e.g. DC 896 and input
1026 give 912; then 912 and 1028 give 926.

### Threshold detection (`threshold_detect`)

For each offset (`vth_low`, `vth_high`, 10 bits unsigned) the block forms
DC + VTH and DC − VTH and subtracts to compare them with the amplitude. The four sign bits
`th_cross = {high_above, high_below, mod_above, mod_below}` are the 4-bit
deviation code; each pair is ORed into `flag_mod` / `flag_high`, so excursions
of both polarities count the same. Touching a threshold exactly is not a
crossing. The arithmetic is 13 bits, wide enough for unsigned data as well.

## The 8-channel SAR recorder

`sar_logic` is the controller of one 10-bit charge-redistribution SAR ADC. Per
conversion it spends one step tracking (`track` high, the sample-and-hold
follows the input), then ten steps deciding MSB first: the trial bit is set in
`dac_ctrl` (a 1 connects that binary-weighted capacitor to the reference) and
kept if the comparator says the held sample is larger, cleared otherwise. Each
decision also leaves as `ser_bit` with `ser_valid`, and the finished word
appears on `data` with a one-cycle `done`. With `run` high it converts back to
back: 11 steps per word.

`ch_serializer` is an 8:1 multiplexer stepped by a clock 8 times the per-channel
bit rate. `slot` counts 0…7 (channel 1 first) and `frame_end` marks slot 7.

`recorder8` steps all eight SAR controllers once per serializer frame
(`en = frame_end`) and serializes their current bits. So the serial line
carries, frame after frame, bit k of all eight channels; `bit_valid` says the
frame holds decision bits (not a track step) and `bit_msb` marks the frame with
the MSBs, which is the word timing a receiver needs. One conversion takes 88
`clk` cycles.

## Top level (`eeg_implant_top`)

| group | ports |
|---|---|
| common | `rst_n` (active low, synchronous) |
| adaptive array, NCH_A = 8 | in: `ref_clk`, `dmod[NCH_A]`, `dc_init[11]`, `vth_low[10]`, `vth_high[10]`; out per channel: `dm_clk`, `dm_clk_q`, `pump_up`, `pump_dn`, `mode`, `samp_en`, `tx_bit`, `tx_valid`, `amp_dec`, `dec_valid`, `dc` |
| SAR recorder, NCH_B = 8 | in: `clk_b`, `run_b`, `comp_b[NCH_B]`; out: `track_b`, `dac_ctrl_b`, `ser_out_b`, `slot_b`, `frame_end_b`, `bit_valid_b`, `bit_msb_b`, `data_b`, `done_b`, per channel where it applies |

The thresholds and `dc_init` are shared by all adaptive channels. The output to
the radio of an adaptive channel is `tx_bit`/`tx_valid` together with `mode`;
how these are framed for a particular radio is left to the radio interface.

## Where this design departs from, or adds to, its reference

* **Mode mapping.** The reference's clock-selector drawing selects the
  undivided clock with both flags low and /128 with both high. Its text says
  the opposite: undivided for high activity, /128 for idle. This design follows
  the text. A high flag alone (without the moderate flag) also selects the
  full rate.
* **Divider length.** The drawing shows an 8-bit counter; the text says 7
  flip-flops. 7 are used, enough for /128.
* **Adder widths.** The drawings give 12-bit adders in DC extraction and
  thresholding. DC extraction uses 14 bits, since the sum of eight 11-bit words
  needs them. Thresholding uses 13 bits.
* **Pump on-time and reconstruction by pump cycles** (see above). The
  reference's behavioural model steps the prediction by a charge proportional to
  the sampling period. Its hardware text says the counters count comparator
  ones and zeros. Counting pump cycles satisfies both.
* **Duty-cycle stage.** The reference only names it, as the block that sets the
  integration time. Here it is a counter with a `DUTY_LOG2` fraction.
* **DC interval counted in decisions.** The reference says the DC sample is
  taken "every 40 clock cycles" without naming the clock. Here it is the
  modulator clock, as in the reference's behavioural model.
* **Decision strobe, single clock domain, reset state idle, DECIM = 128.**
  These are this design's own choices.
* **Number of adaptive channels.** The reference draws "channel 1 … N". Here
  NCH_A = 8, as in the conventional recorder.
* **False-positive suppression.** The reference mentions strategies against
  noise-triggered mode changes but does not describe them. None is built.

## What is not here

Only digital logic is given. These parts have no RTL:

* the analog front-ends: differential-difference preamplifier, strong-arm
  comparator, charge pump with integrating capacitor, folded-cascode OTA with
  common-mode feedback, second-stage amplifier, track-and-hold, capacitive DAC;
* the board: BLE radio module and its microcontroller, FPGA glue logic,
  SPI link, regulators, oscillators, battery, electrode array.

The testbenches contain simple behavioural stand-ins for the two analog loops:

* `tb/delta_afe_model.sv` moves an integer prediction one unit per pump cycle
  and compares it with the stimulus.
* `tb/sar_afe_model.sv` holds a sample when tracking and compares it with the
  DAC code.

## Verification

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=… failures=…` and has a watchdog. Reference values are
computed inside the testbench.

* `tb_dc_extract` includes the 896 → 912 → 926 example above.
* `tb_samp_clk_gen` measures the strobe spacing in each mode (1, 8, 128).
* `tb_adaptive_channel` runs the channel closed-loop against the modulator
  model. It checks that `amp` always equals the model's prediction. It also
  checks that tracking error stays within one period's step, and that quiet, moderate and large
  events each drive the channel into the matching mode.
* `tb_eeg_implant_top` runs the top at its default parameters (8 + 8 channels)
  for 80 000 reference cycles. Every adaptive channel gets its own stimulus and
  must visit all three modes. The testbench measures the decision-rate
  reduction (about 21× on its stimulus) and checks every SAR word against the
  held sample.
* `tb_activity_share` is a workload test with a sparse EEG-like record. It
  runs 30 s of baseline with three 3 Hz / 9 Hz bursts that make up 7 % of the
  time. Each burst must reach the full rate within 1/8 s, and the channel must
  be back in idle 1/4 s after it. The test measures about 97 % idle time and a
  75× reduction in decisions against a fixed full-rate recorder. The ideal for
  7 % active time at full rate is 12.9×; the result is higher because bursts are
  partly recorded at the moderate rate.

Simulating with verilator 5, e.g. the top:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/eeg_pkg.sv tb/tb_eeg_implant_top.sv --top-module tb_eeg_implant_top
    ./obj_dir/Vtb_eeg_implant_top

`-y rtl -y tb` lets verilator find every other module by its file name. The
package is named explicitly because it is imported, not instantiated. For
another testbench, replace the file and the top-module name, e.g.
`tb/tb_activity_share.sv --top-module tb_activity_share`.

## Parameters worth changing

* `MOD_LOG2`, `IDLE_LOG2` (samp_clk_gen, duty_cycle_adj, adaptive_channel):
  the divide ratios of the moderate and idle modes. Keep `vth_low` above
  2^IDLE_LOG2 >> DUTY_LOG2, the idle step.
* `DUTY_LOG2`: a shorter pump pulse gives a smaller step per decision at every
  rate.
* `DS` (dc_extract): the down-sampling interval of the DC estimate, in
  decisions. A longer interval gives a slower baseline.
* `N` (sar_logic) and `NCH` (ch_serializer, recorder8): ADC resolution and
  channel count.
