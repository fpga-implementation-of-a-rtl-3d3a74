# Trigger-less gamma-ray acquisition with a digital constant fraction discriminator

Large gamma-ray arrays combine germanium detectors, which give the best energies,
with fast LaBr3(Ce) scintillators, which give picosecond timing. This RTL covers
the logic that digitised detector signals pass through before they become
list-mode data, so that no analogue shaping amplifier, discriminator or
time-to-amplitude converter is needed:

* **Spectroscopy part:** each germanium channel, sampled at 14 bit and 100 MS/s,
  is reduced on line to one event per pulse: a time stamp with one-sample
  resolution and an energy. No common trigger is used.
* **Fast-timing part:** each scintillator channel, sampled at 10 bit and 1 GS/s,
  stores windows around its own triggers in a multi-event memory with no dead
  time. A digital constant fraction discriminator (CFD) replaces each window by
  the digitiser's trigger time tag plus the pulse arrival time, interpolated to
  1/1024 of a sample (about 1 ps at 1 GS/s). Only those two numbers go on into
  the list-mode stream.

The architecture follows the acquisition described in *FPGA Implementation of a
Digital Constant Fraction for Fast Timing Studies in the Picosecond Range*
(P. Mutti et al., Institut Laue-Langevin). That description says what each
stage does but mostly not how it is built. Widths, handshakes, buffer policies,
the interpolation and the memory depth are choices made for this RTL. They are
pointed out below and in the opening comment of each file.

## Structure

```
exill_daq_top
├── clk_dpp domain: NUM_DPP_CH x dpp_channel          (80 = 10 boards x 8)
│     step_trigger ─┬─> zc_timing ──────────┐
│                   └─> energy_sampler <── trapezoid_filter
│     per board: OR of masked triggers and board_trig_in -> board_trig_out
│                (also fed back to the board's channels as ext_trig)
└── clk_ft domain:  NUM_CFD_CH x (acq_buffer -> cfd_core)   (16 scintillators)
                    listmode_merger -> lm_valid / lm_event / lm_ready
```

Shared types and widths are in `rtl/daq_pkg.sv`. Two helper modules are used
inside the blocks: `sync_fifo` (a small show-ahead FIFO) and `pipe_divider`
(a pipelined restoring divider).

The two parts share nothing and run on separate clocks. Every block handles
one sample per clock. A real 1 GS/s front end would have to handle several
samples per FPGA clock, which this RTL does not do (see *Departures*).

## Spectroscopy channel (`dpp_channel`)

The input is the raw preamplifier output. It is modelled as the sum of two
exponentials: a fast one set by the detector and a slow one set by the
preamplifier's RC decay constant tau. Four blocks work on the same sample
stream:

**Trigger (`step_trigger`).** A trigger fires when the signal rises by more
than `step_thr` within `GAP` = 4 samples, `x[n] - x[n-4] > step_thr`. It
looks at the step, not the absolute level, so the preamplifier baseline drops
out. After firing, the trigger waits `holdoff` samples. It re-arms once the
step has fallen back to the threshold.

**Timing (`zc_timing`).** This computes the second derivative
`d2[n] = x[n] - 2x[n-4] + x[n-8]`. For a two-exponential pulse, d2 is
negative just after the start. It turns positive at
`t* = 2·tf·ts/(ts-tf)·ln(ts/tf)`, which depends only on the two time
constants. After a trigger, the block reports the first sample where d2
changes from negative to zero or positive. The value reported is that
sample's time stamp minus 4, the centre of the difference, so the resolution
is one sample. If no crossing appears within `zc_window` samples, the event
carries the trigger time and `no_zc = 1`. Be aware that when tau is long
(tens of microseconds for a germanium preamplifier), the positive lobe of d2
is only a few counts high. The crossing is then limited by noise and
rounding. The tests use a decay of about 40 samples, where the claimed
one-sample uncertainty holds.

**Trapezoid (`trapezoid_filter`).** This is the usual recursive shaper:

```
d[n] = v[n] - v[n-k] - v[n-l] + v[n-k-l]
p[n] = p[n-1] + d[n]
r[n] = p[n] + M·d[n]            M = 1/(exp(1/tau) - 1)  (pole-zero cancellation)
s[n] = s[n-1] + r[n]
```

The rise time is `k`, and the flat top lasts `l - k` samples. Take an input
`A·(M/(M+1))^n`, a step whose decay matches M. Its trapezoid has a flat top
`A·(M+1)·k` high. With a finite rise time tf, the flat top is lower by
`A·k/(1-exp(-1/tf))`. A constant input B, present since reset, does not
vanish: the double accumulation turns it into a constant output `B·k·l`. That
is the filter's own DC level, the equivalent of a shaping amplifier's output
offset. Samples before the first one after reset count as zero, so the
accumulators are exact and never drift. The delay line is a circular memory of
`MAX_LEN` = 2048 samples, and `k + l` must stay below that. Change k, l and M
only during reset.

**Energy (`energy_sampler`).** The baseline is the mean of 16 trapezoid
samples ending 8 samples back. It is frozen at the trigger. The flat top is
sampled `peak_delay + 1` clocks after the trigger. The energy is
`(flat top - baseline) >> e_shift`, clipped to 0..65535. If a second trigger
arrives before sampling, the event is marked `pileup`. The first pulse's value
is still reported, and the second pulse gets no event of its own.

The channel emits `dpp_event_t {ts, energy, pileup, no_zc}` when the energy is
ready. If the crossing has not been found by then (when `zc_window` is longer
than `peak_delay`), the event also carries the trigger time and `no_zc = 1`. Per-channel settings come in `dpp_cfg_t`:

| field | meaning |
|---|---|
| `step_thr`, `holdoff` | trigger threshold on a 4-sample step; re-arm hold-off |
| `zc_window` | samples searched for the d2 zero crossing |
| `rise_k`, `gap_l`, `pz_m` | trapezoid k, l = k + flat top, M |
| `peak_delay`, `e_shift` | trigger-to-flat-top delay; energy scaling |
| `ext_trig_en` | the board trigger also starts a conversion on this channel |

A typical setting is `peak_delay ≈ k + (l-k)/2`.

**Board triggers.** Channels form boards of eight. Each board ORs the
triggers of the channels enabled in `trig_mask[b]` and its front-panel
trigger input `board_trig_in[b]` into a registered `board_trig_out[b]`, the
front-panel trigger output. The same signal goes back to the board's eight
channels. A channel with `ext_trig_en = 1` starts a conversion on it, as if it
had triggered itself. It ignores the board trigger for 8 clocks after its own
trigger, so its own trigger coming back does not start a second conversion. A
conversion started this way on a channel without a pulse gives energy near 0.
It also gives `no_zc = 1` and the trigger time, because there is no zero
crossing. By default (`ext_trig_en = 0`) every channel triggers only on its
own signal.

## Fast-timing path

### Multi-event buffer (`acq_buffer`)

Each channel owns `2^ACQ_ADDR_W` samples of memory (default 2^20). The memory
is split into `2^buf_code` equal buffers (buf_code 0..10, that is 1 to 1024
buffers), each `2^(ACQ_ADDR_W - buf_code)` samples long. The writer cycles
through four states:

1. **FILL:** the active buffer is written as a ring. It must first hold the
   `size - 1 - post_trig` samples that go before the trigger.
2. **ARMED:** a rising crossing of `threshold` (previous sample below, current
   at or above) is accepted as a trigger. Its time stamp becomes the record's
   time tag (`trig_accepted` pulses).
3. **POST:** `post_trig` more samples are written, and then the buffer is
   frozen. The next free buffer becomes active on the very next clock, so
   windows follow each other without dead time.
4. **WAIT:** entered when all buffers are full. Writing stops, and every
   trigger seen now increments `lost_count`.

Triggers that arrive during FILL or POST are ignored.

The reader streams frozen buffers out in order, oldest sample first:
`out_sample` with `out_sop` and `out_eop`, and `out_ttag` on every beat. It
uses a valid/ready handshake and moves one beat per clock while ready stays
high. A buffer is released as soon as its last sample has been read from
memory. In every record, the trigger sample sits at index
`size - 1 - post_trig`.

### Constant fraction discriminator (`cfd_core`)

A fixed threshold fires earlier on large pulses than on small ones (walk). A
CFD avoids this by timing the moment the leading edge reaches a fixed fraction
of the pulse's own height. Digitally, the block forms

```
y[n] = x[n-D] - f·x[n]        D = delay (1..31 samples), f = fraction/256
```

which is the delayed input plus the attenuated, inverted input. Its zero
crossing on the leading edge does not depend on the amplitude. For each
record, the block:

* takes the baseline as the mean of the first 16 samples and subtracts it;
* keeps all values scaled by 16·256, so nothing is rounded;
* arms once the baseline-free input exceeds `arm_thr`;
* then takes the first pair with `y[n-1] <= 0 < y[n]` and computes

```
fine = floor( -y[n-1] · 1024 / (y[n] - y[n-1]) )      coarse = n - 1
```

The division is a 10-stage pipelined divider that accepts a new division on
every clock, so the CFD never stalls its input. A record without an armed
crossing produces an entry with `found = 0`.

The arrival time of the pulse, in sample periods, is

```
t = ttag - (buffer_size - 1 - post_trig) + coarse + fine/1024 (+ a constant set by D and f)
```

The constant cancels in any time difference between channels.

### List-mode stream (`listmode_merger`, `cfd_event_t`)

Each channel's results go into a 4-entry FIFO. A round-robin selector puts one
result per clock on `lm_event`, using the `lm_valid`/`lm_ready` handshake. A
list-mode entry holds `{channel, ttag[47:0], coarse[19:0], fine[9:0], found}`.

A channel's buffer may start sending a new record only while its FIFO has room
for two more results (`space_ok`). So when `lm_ready` is held low, back-pressure
travels backwards in order: the FIFOs fill, then the records back up into the
sample memories, and finally triggers are lost and counted in `lost_count`.
Results themselves are not lost. The merger's `lm_drop_count` stays at zero in
normal use.

## Parameters

| parameter | default | origin |
|---|---|---|
| `NUM_DPP_CH` | 80 | ten 8-channel spectroscopy digitisers in the described set-up (68–72 channels used) |
| `NUM_CFD_CH` | 16 | sixteen LaBr3(Ce) detectors in the fast-timing set-up |
| `DPP_SAMPLE_W` / `CFD_SAMPLE_W` | 14 / 10 | the two digitisers' ADC resolutions |
| buffers per channel | 1 to 1024 | as described for the fast digitiser |
| `ACQ_ADDR_W` | 20 | own choice (memory depth not specified) |
| `TRAP_MAX_LEN` | 2048 | own choice (k + l up to 20 µs at 100 MS/s) |
| `GAP` (trigger and d2 spacing) | 4 | own choice |
| `FINE_W` | 10 | own choice, about 1 ps per step at 1 GS/s |
| `TS_W`, `ENERGY_W`, `COARSE_W` | 48, 16, 20 | own choice |
| CFD baseline, `MAX_DELAY` | 16 samples, 32 | own choice |

## Departures and limits

* **Sample rate.** Every block processes one sample per clock. At 100 MS/s
  this is realistic. At 1 GS/s the clock would have to be 1 GHz. A real fast
  channel would need the buffer and the CFD widened to several samples per
  clock. The logic per sample would stay the same.
* **CFD variant.** The published text only names the CFD and the delay,
  attenuate, invert and sum principle. The baseline estimate, the arming rule
  and linear interpolation are this design's choices. So is the orientation
  `x[n-D] - f·x[n]`, which puts the crossing on the leading edge.
* **Second-derivative timing** uses no extra smoothing. As noted above, it
  becomes noise-limited for long preamplifier decay constants.
* **Trigger propagation** stays within a board. There is no trigger
  distribution between boards, and the front-panel input has no
  synchroniser: it must already be synchronous to `clk_dpp`. The 8-clock
  block of the returning trigger is this design's choice.
* **Not included:** the ADCs and analogue front ends, clock PLLs, the VME and
  readout-controller logic of the digitisers, the proprietary optical link
  between digitisers and CFD card, the CFD card's DDR3 memory, on-chip network
  and DMA, the processor board that collects and histograms the data, and the
  control software. The ADC samples enter as ports, and each buffer's record
  stream is wired directly into its CFD.
* **Settings** (buffer geometry, trapezoid constants) may be changed only in
  reset or while the buffers are empty.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_step_trigger` | every cycle against a reference model; small pulses stay silent; hold-off |
| `tb_zc_timing` | crossing sample against d2 of the same samples; amplitude independence (±1 sample); time-out on a parabola |
| `tb_trapezoid_filter` | exact offset `B·k·l`; start cycle; flat top `A(M+1)k` within 0.2 %; return to offset |
| `tb_energy_sampler` | exact energies, latency, pile-up, saturation, clipping |
| `tb_dpp_channel` | energy against the closed form within 1 %; time against reference; walk; pile-up; own trigger returning through the board ignored; forced event on the board trigger; `ext_trig_en = 0` ignores it |
| `tb_acq_buffer` | every record sample against the input history; stalls; buffer overflow and `lost_count`; 1 and 4 buffers |
| `tb_cfd_core` | coarse exact and fine ±1 against a floating-point CFD; latency; walk < 0.05 sample between 3× amplitudes; no-crossing records; input gaps |
| `tb_listmode_merger` | ordering, channel numbers, round-robin order, `space_ok`, drop count |
| `tb_exill_daq_top` | whole design at reduced size; counts events, pile-up, board triggers, forced events from trigger propagation and the front-panel input, pair time difference (0.37 ± 0.05 sample, rms spread under 28 ps with 1 sample = 1 ns; it comes out at about 12.6 ps without noise), no-crossing entries, output stalls and lost triggers; each must occur |
| `tb_exill_daq_top_full` | one complete operation at the default (full) size |

The tolerance of 0.05 sample on the pair difference reflects 10-bit
quantisation of a 20-sample rise. The measured spread is about 0.03 sample.

To run a test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/daq_pkg.sv \
          tb/tb_cfd_core.sv --top-module tb_cfd_core -Mdir obj && ./obj/Vtb_cfd_core
```

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; the package is named
explicitly because it must be read first.

Use `--top-module tb_exill_daq_top_full` with `tb/tb_exill_daq_top_full.sv` for
the full-size run. It builds in well under a minute, runs in seconds and needs
about 40 MB, mostly for the sixteen 2^20-sample channel memories.
