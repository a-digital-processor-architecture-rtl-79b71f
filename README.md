# EEG/EMG fall-risk prediction processor

Before a voluntary step, the motor cortex produces movement-related
potentials (MRPs). These are the Bereitschaftspotential (BP, 2–5 Hz), the
mu rhythm (7–12 Hz) and the beta rhythm (13–30 Hz). They appear up to about
a second before the muscles contract. A contraction with no matching MRP
pattern, or a long co-contraction of opposing muscles, is a sign that the
movement is involuntary or unstable, i.e. that a fall may be coming.

This RTL watches both signals in real time:

* **EMG side (8 muscles, 16 bit, 500 S/s).** Each muscle gets a 1-bit
  *contraction trigger*. The trigger is high when the muscle's recent power
  (the mean of the last 128 squared samples) is above its own longer-term
  power (the mean of the last 512 samples, i.e. 1 s). The recent power must
  also be above a fixed rest threshold. Pairs of opposing muscles are ANDed
  into four *co-contraction* flags.
* **EEG side (7 motor-cortex channels, 24 bit, 500 S/s).** Each channel
  keeps its last 256 samples (512 ms). When the gastrocnemius of one leg
  starts contracting, the channels over the opposite hemisphere (and the
  central Cz) run a 256-point FFT over that buffer. The buffer holds the
  activity from just before the movement. The channels then add up the
  spectral power in the BP, mu and beta bands. Each band power is compared
  with a threshold trimmed for the subject.

The outputs are 21 MRP flags (3 bands × 7 channels) and 4 co-contraction
flags. A later stage decides from these whether to act, for example by
electrically stimulating the antagonist muscles; that stage is not part of
this design.

The whole chain is event-driven and cheap. Each EMG sample costs one RAM
read, one RAM write and two additions per window. The FFT runs only on a
trigger rising edge (about once a second during normal gait). An analysis
completes about 0.13 ms after the sample that caused it.

## Block structure

```
fall_risk_top
├── data_clk_gen            500 Hz data clock = system clock / 2^14
├── g_emg[0..7]: emg_branch
│   ├── emg_squarer         x^2 (rectify + square)
│   ├── emg_power_fsm       global window, 512 x 32-bit block_ram
│   ├── emg_power_fsm       local window, 128 x 32-bit block_ram
│   └── emg_trigger_cmp     local > global  AND  local > rest threshold
├── cocontraction           4 ANDs of agonist/antagonist triggers
├── eeg_trigger_router      right gastroc -> T3,C3,P3; left -> T4,C4,P4; Cz <- both
└── g_eeg[0..6]: eeg_branch
    ├── block_ram           256 x 24-bit EEG buffer
    ├── fft_controller      loop address counter, trigger edge, sink sequencing
    ├── fft_processor       256-point radix-2 butterfly FFT
    └── mrp_calculator      |X[k]|^2 band sums, thresholds, MRP ready

fall_risk_test_system       test and validation set-up around the processor
├── g_emg_rom[0..7], g_eeg_rom[0..7]: replay_ram
│                           recorded segments, one word per 500 Hz period
├── fall_risk_top           the processor above
├── result_store            u_flag_store: all 1-bit outputs, once per period
└── result_store            u_pow_store: band powers of one channel per analysis
```

`fall_risk_pkg` holds the shared widths, the channel numbering and
`fft_beat_t`, the struct that carries one complex value with valid and
start/end-of-packet marks into and out of the FFT.

Channel numbering (package constants):

| index | EMG (`emg_data[i]`)        | EEG (`eeg_data[i]`) |
|-------|----------------------------|---------------------|
| 0     | right gastrocnemius        | T3                  |
| 1     | right tibialis             | T4                  |
| 2     | right rectus femoris       | C3                  |
| 3     | right biceps femoris       | C4                  |
| 4     | left gastrocnemius         | Cz                  |
| 5     | left tibialis              | P3                  |
| 6     | left rectus femoris        | P4                  |
| 7     | left biceps femoris        | O2 (not processed)  |

## Clocks, data clock and reset

There is one clock domain, the system clock: 8.19209 MHz in the reference
prototype, produced by a PLL that is not part of this RTL. At that frequency
a 14-bit counter divides it to exactly 500 Hz. Samples are paced by a
*data clock*, which is a level, not a clock net:

* By default (`USE_INTERNAL_DATA_CLK = 1`) `data_clk_gen` makes it from the
  system clock and drives it out on `clk500`. Whatever supplies samples must
  present them on `emg_data`/`eeg_data` while `clk500` is high. The simplest
  way is to change them while it is low.
* With `USE_INTERNAL_DATA_CLK = 0` an external 500 Hz strobe on
  `clk500_in` is synchronised through two flops and used instead.

Every state machine acts once per data-clock high phase: it waits for the
level to be high, does its work, then waits for it to go low.

The FFT "clock" is a clock enable that is high on every second system
clock (4 MHz). The source design generated a separate 4 MHz clock and ran
its RAMs on the inverted system clock. Here everything runs on one rising
edge, which is easier to time and to simulate.

`rst_n` is an asynchronous active-low reset. After reset, each EMG power
FSM writes zeros through its RAM (512 clocks), and each FFT controller does
the same for its EEG buffer (256 clocks). Samples are ignored until this is
done. `enable = 0` freezes every state machine and the FFT clock enable
where they stand. Samples that arrive while frozen are lost, because the
data clock keeps running.

## The EMG trigger: moving windows without re-summing

`emg_power_fsm` keeps a running `Sum` of the last `DEPTH` squared samples.
It stores them in a block RAM used as a circular buffer, with a wrapping
address pointer that always points at the oldest word. For each new sample
it does the following, one step per clock:

```
IDLE      clk500 high: latch the new squared sample
POINT     present the pointer (oldest word) to the RAM
READ      RAM read
SUB       Sum -= oldest
ADD       Sum += newest
WRITE     overwrite the oldest word with the newest, advance the pointer
UPDATE    power = Sum >> log2(DEPTH)      ('update' pulses)
WAIT_LOW  wait for clk500 low
```

The power is valid **7 clocks** after the first clock that sees the data
clock high, as in the reference prototype. `Sum` is 64 bits wide. 512
squares of a 16-bit sample need 39 bits, so it cannot overflow. The
division is a shift (9 bits for 512, 7 bits for 128), so the "power" is
the window mean.

`emg_branch` runs a 512-sample and a 128-sample FSM side by side on the
same squared sample. Neither FSM starts until both have cleared their RAMs,
so the two windows always hold the same stream. `emg_trigger_cmp` combines
them combinationally:

```
trigger = (local > global) && (local > rest_thr)
```

The comparator inputs are registers, so the trigger changes only at
`UPDATE` and is glitch-free. Note a start-up effect: until 512 samples have
arrived, the global mean still includes the zeros written at reset. Any
activity above `rest_thr` in the first second therefore raises the trigger.

## The EEG analysis

### FFT controller sequence

Every data-clock period, `fft_controller` steps through:

```
IDLE      wait for clk500 high
WRITE     write eeg_data at the loop address
ADVANCE   advance the loop address (it now points at the oldest sample)
SETTLE    wait TRIG_WAIT = 8 clocks (the EMG trigger for this sample
          is ready 7 clocks after the data-clock edge)
CHECK     trigger high now and low at the previous CHECK?  -> SEND
          otherwise                                        -> WAIT_LOW
SEND      256 sink beats, oldest sample first, one per FFT-clock cycle
WAIT_FFT  wait for the FFT's last output beat (source eop)
WAIT_LOW  wait for clk500 low
```

The rising-edge test in CHECK replaces an explicit "wait for the trigger to
return to 0" state. A trigger that stays high therefore starts only one
analysis. Meanwhile the EEG buffer keeps filling every period, so a new
analysis can start as soon as the trigger has fallen and risen again.
Reading the RAM does not erase it, so back-to-back analyses of the same
window are possible. A FIFO could not do that, because reading it empties
it.

### FFT processor

`fft_processor` is an in-place radix-2 decimation-in-time FFT:

* **Load.** 256 sink beats, each written to the bit-reversed address of a
  working memory (256 × 2 × 32-bit).
* **Compute.** 8 stages. Each FFT-clock cycle performs `NB = 4` butterflies
  on disjoint address pairs. A stage is therefore 32 cycles and the whole
  transform takes 256 FFT-clock cycles.
* **Unload.** 256 source beats in natural bin order. `sop` marks bin 0 and
  `eop` marks bin 255.

The arithmetic is two's complement. Inputs are sign-extended from 24 to
32 bits and nothing is scaled, which leaves room for the 8 bits of growth
of a 256-point sum. The only case this cannot hold is every sample at
exactly −2^23. Twiddles are 18-bit values with 16 fraction bits, so +1 is
exact. Each product is rounded to nearest. The cos/sin table is computed at
elaboration from `$cos`/`$sin`:

```
W[m] = cos(2·pi·m/256) − j·sin(2·pi·m/256),   m = 0..127
```

Against a double-precision DFT, every bin is within 2·10⁻⁵ of the sum of
|x| for random 24-bit frames.

### MRP bands

One FFT bin is 500/256 = 1.953 Hz. The band edges divided by that bin width
and rounded give:

| band | Hz    | bins  |
|------|-------|-------|
| BP   | 2–5   | 1–3   |
| mu   | 7–12  | 4–6   |
| beta | 13–30 | 7–15  |

`mrp_calculator` adds `re² + im²` (64-bit unsigned, saturating) into the
three sums as the bins stream out. After bin 15 it pulses `mrp_ready` and
latches the powers and the three flags (`power > threshold`). Only the
first 16 bins are needed, so the flags are ready long before the FFT has
finished unloading. The flags then hold until the next analysis of that
channel.

### Timing of one analysis (defaults)

| step                                    | system clocks |
|-----------------------------------------|---------------|
| data-clock edge → trigger check          | ~11           |
| load 256 samples (2 clocks each)        | 512           |
| compute (256 FFT-clock cycles)          | 512           |
| unload bins 0..15 and latch the flags   | ~33           |
| **total, edge → MRP ready**             | **~1070 (0.13 ms)** |

This is far below the 2 ms between samples and the 1 ms processing
budget. The overall reaction-time limit is 300 ms. Of that, the wireless
link uses about 15 ms and the trigger's inherent lag about 40 ms.

## Top-level interface (`fall_risk_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n`, `enable` | in | 1 | system clock, async reset (low), run/freeze |
| `clk500_in` | in | 1 | external data clock (only with `USE_INTERNAL_DATA_CLK = 0`) |
| `clk500` | out | 1 | data clock in use; samples valid while high |
| `emg_data` | in | 8 × 16 signed | EMG samples |
| `eeg_data` | in | 8 × 24 signed | EEG samples (index 7 = O2, unused) |
| `emg_rest_thr` | in | 8 × 64 | per-muscle rest threshold on the local power |
| `bp_thr`, `mu_thr`, `beta_thr` | in | 7 × 64 each | per-channel band-power thresholds |
| `bp_flag`, `mu_flag`, `beta_flag` | out | 7 each | MRP flags |
| `cocontraction` | out | 4 | [0] R gastroc·tibialis, [1] R rectus·biceps fem., [2] L gastroc·tibialis, [3] L rectus·biceps fem. |
| `emg_trigger` | out | 8 | EMG triggers (observation) |
| `mrp_ready` | out | 7 | one-clock pulse per finished analysis |
| `bp_pow`, `mu_pow`, `beta_pow` | out | 7 × 64 each | band powers behind the flags, held until the channel's next analysis |

Parameters: `GLOBAL_DEPTH` = 512, `LOCAL_DEPTH` = 128, `FFT_N` = 256,
`FFT_NB` = 4, `DATA_CLK_DIV_LOG2` = 14, `USE_INTERNAL_DATA_CLK` = 1. Window
depths and `FFT_N` must be powers of two, and `FFT_N/2` must be divisible
by `FFT_NB`. If the FFT length changes, the band bins in `mrp_calculator`
must change with it.

## Test and validation system (`fall_risk_test_system`)

The reference prototype was validated by replaying recordings from RAM
inside the FPGA and storing the outputs for comparison with a software
model. `fall_risk_test_system` is that set-up around `fall_risk_top`.

* **Replay.** Sixteen `replay_ram`s hold one channel each:
  * `load_chan` 0–7 are the EMG channels, 16 bit;
  * `load_chan` 8–15 are the EEG channels, 24 bit, with O2 last.

  They are written through one load port while `enable` = 0. Each RAM has
  its own address counter. The counters step when the processor's 500 Hz
  data clock falls, so every word is steady for the whole high phase in
  which the processor takes it. Word 0 comes first. After word
  `replay_last`, the segment starts again and `replay_wrapped` is set.
  Replay pauses while `enable` = 0.
* **Flag store.** One 33-bit word per period is written when the data clock
  falls, after that sample's processing:
  `{beta_flag[6:0], mu_flag[6:0], bp_flag[6:0], cocontraction[3:0], emg_trigger[7:0]}`.
* **Power store.** One 192-bit record `{beta_pow, mu_pow, bp_pow}` is
  written for each analysis of the channel selected by `mon_chan`.
* **Read-back and restart.** Both stores are read through their
  `*_rd_addr`/`*_rd_data` ports, with one clock of latency; `*_count` gives
  the number of stored words. `restart` rewinds the replay and empties both
  stores.

Defaults: 65536 words per replay RAM and per store, as in the reference
(about 65k words). That holds 131 s per channel at 500 S/s; the reference
loaded segments of about 32 s. The RAMs are loaded through a port, not from
initialisation files, and conversion of the stored words for comparison
is left to the host. The test system is the outermost module and holds
`fall_risk_top`; the processor's flags, triggers and `mrp_ready` strobes
are also brought out of it live. `fall_risk_top` works on its own, without
the storage, for normal operation.

## What follows the reference design and what does not

Taken from the reference design:

* Channel counts and widths.
* 512/128-sample windows with running sums and 64-bit power arithmetic.
* The 7-clock EMG refresh.
* The AND-based trigger and co-contraction.
* Contralateral routing.
* The 256 × 24 EEG buffer.
* The FFT controller's sequence.
* 256-point FFT timing (512 clocks load, 256 FFT-clock cycles compute, 256
  output beats).
* Band powers from squared FFT outputs, compared against subject
  thresholds.
* The 14-bit data-clock divider.

Choices made here where the reference is silent or different:

* **FFT internals.** The reference uses a butterfly FFT core with
  streaming controls but gives no details. The radix-2, 4-butterflies-per-
  cycle organisation, 32-bit datapath and 18-bit twiddles are this
  design's.
* **Clocking.** A 4 MHz clock enable instead of a generated FFT clock, and
  rising-edge RAMs instead of RAMs on the inverted clock.
* **Trigger handling.** Re-arming uses rising-edge detection, EEG samples
  are stored while the controller waits for the trigger to fall, and there
  is an 8-clock settle before the trigger check.
* **Start-up.** The RAMs are cleared by writing zeros after reset.
* **Which muscles pair up.** The reference names gastrocnemius/tibialis;
  rectus/biceps femoris as the second pair per leg, and the channel
  numbering, are choices made here.
* **Band-to-bin mapping.** Chosen here; see the table above.
* **Combining the two trigger comparisons.** Taken as an AND.
* **Thresholds.** The reference preloads them in the FPGA; here they are
  input ports.
* **Outputs.** The 8 EMG triggers, the 7 `mrp_ready` strobes and the band
  powers are brought out in addition to the 25 flags.

Not included:

* **O2.** The occipital channel O2 is accepted but unused: it is meant for
  noise reduction, with no method given.
* **PLL.** Supply the system clock directly.
* **Wireless front ends.** The acquisition hardware is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_emg_squarer` | corners and random values against integer squares |
| `tb_block_ram` | random traffic vs. a shadow array, 1-clock latency, read-before-write |
| `tb_emg_trigger_cmp` | edge cases and random 64-bit triples |
| `tb_emg_power_fsm` | 1300 samples vs. a queue model, 7-clock latency, freeze |
| `tb_emg_branch` | 2000 bursty samples: both powers and the trigger every sample, latency |
| `tb_cocontraction`, `tb_eeg_trigger_router` | all 256 trigger patterns |
| `tb_data_clk_gen` | period 16384, 50 % duty, tick position |
| `tb_fft_processor` | random and two-tone frames vs. a double-precision DFT, packet marks, 256-cycle compute |
| `tb_mrp_calculator` | band sums, flags at/above/below threshold, saturation, ready timing |
| `tb_fft_controller` | frame = last 256 samples oldest first, 2-clock beat spacing, one analysis per rise, pause by `enable` |
| `tb_eeg_branch` | three analyses vs. a DFT model (1e-4 relative), flags, 1057 clocks start → ready |
| `tb_fall_risk_top` | end to end with 64/16 windows and a 4096-clock sample period (800 samples) |
| `tb_fall_risk_extclk` | as `tb_fall_risk_top`, but with `USE_INTERNAL_DATA_CLK = 0` and an external data clock on `clk500_in` |
| `tb_replay_ram` | word order, wrap after `last_addr`, `wrapped`, restart, hold, reload during replay, reset |
| `tb_result_store` | append order, `count`/`full` every clock, writes dropped when full, read-back, clear, reset |
| `tb_fall_risk_full` | the same checks with every parameter at its default (840 samples, ~14 M clocks, ~20 s) |
| `tb_fall_risk_test_system` | the whole set-up, end to end, with 1024-word stores, 64/16 windows and a 4096-clock period: loads a 768-sample segment into all 16 RAMs and replays 800 periods (one wrap, one 5-period freeze); the processor's inputs equal the loaded word every period; every stored flag word equals the EMG model and the expected MRP flags; analyses per channel and within 1 ms; each C3 power record is within 2 % of (128 · tone amplitude)²; restart rewinds and empties |
| `tb_fall_risk_test_system_full` | the same with every parameter at its default (65536-word stores, 840 periods, ~14 M clocks, ~20 s) |

The top-level benches (`tb_fall_risk_*`) model every EMG window. Every sample, they
predict all 8 triggers and the 4 co-contraction flags. They check:

* which EEG channels analyse, and how often (contralateral routing, Cz from
  both sides);
* the resulting flags, using on-bin tones whose expected flags are known;
* that every analysis ends within 1 ms of its triggering sample.

They also count each mechanism and fail if one never happens:

* trigger rise on each side;
* re-arm;
* each co-contraction output;
* left-hemisphere, right-hemisphere and Cz analyses;
* a flag set and a flag cleared;
* an `enable` freeze, during which the EMG powers must not move;
* for the test system also: a replay wrap, a restart and a stored power
  record.

No recorded EEG/EMG data is included. All stimuli are synthetic.

## Simulating

Verilator 5 with timing support is enough. From the directory holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/fall_risk_pkg.sv \
          tb/tb_fall_risk_top.sv --top-module tb_fall_risk_top -o sim
./obj_dir/sim
```

Replace `tb_fall_risk_top` with any other testbench name. The package file
must be listed first; `-y rtl` finds the modules by file name. Lint a module
with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/fall_risk_pkg.sv rtl/fall_risk_top.sv
```

The remaining lint warnings are deliberate:

* inputs left unused (O2, `clk500_in` when the internal data clock is
  selected);
* debug signals left open;
* package constants that a given module does not use.

### Size

Synthesised at the defaults, the top has about 6400 flip-flop bits and
about 450 kbit of memory. With its default 65536-word RAMs, the test system
adds about 34 Mbit of replay and result storage. The memory is 8 × 20 kbit of EMG windows and, per
EEG channel, 6 kbit of EEG buffer plus 16 kbit of FFT working memory. The
FFT working memory is read by four butterflies at once, so a block-RAM
implementation would need it banked.
