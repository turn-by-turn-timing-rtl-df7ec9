# Turn-by-turn timing for the damping-ring beam position monitors

The SuperKEKB positron damping ring stores a beam for only 40 to 200 ms. Its beam
position monitors therefore use turn-by-turn log-ratio detectors, which sample the
beam once per revolution. Each detector needs two timing signals:

* a **fiducial**: a clock at the revolution frequency (509 MHz RF / 230 buckets ≈
  2.21 MHz). It must be locked to the bucket that holds the beam and shifted for
  each detector by its position in the ring and its cable length.
* a **start trigger**: it begins an acquisition a fixed time after injection, and
  it must not fire again while the detectors are still reading out and processing
  the previous acquisition.

This repository holds synthesizable SystemVerilog for the logic of such a timing
system. The structure follows the published description of the SuperKEKB
damping-ring BPM timing system. That description gives what each part does but
not how its logic is built, so the internals, register maps, latencies and
handshakes here are this design's own choices. They are all listed below.

```
                        +---------------------+      start_out[3:0]
 dr_injection --------->| start trigger       |-----> (one per BPM station)
 bpm_ready[3:0] ------->| start_trigger_seq   |-----> trg_veto
 trigger settings ----->| + trigger_delay     |
                        +---------------------+
        |
        | (sync)        +---------------------+  fiducial_out
        +-------------->| master divider      |--------------+----> (monitor)
 rf_clk --------------->| ski16115            |              |
 ffclk_master --------->| freq_divider + D-FF |--> ep195_code|
 divider register bus ->+---------------------+              |
                                                             v
                        +---------------------+   station_fiducial[s][31:0]
 rf_clk --------------->| station delay  x4   |----> one per detector
 station register bus ->| ski17029            |
                        | delay32 + 32 D-FFs  |
                        +---------------------+
```

## Module map

| module | role |
|---|---|
| `dr_bpm_timing` | top: the start trigger, the master divider and four station delay units |
| `ski16115` | master divider unit: registers, `freq_divider`, output flip-flop |
| `freq_divider` | 32-bit RF divider whose phase is restarted a programmable delay after each injection |
| `ski17029` | station delay unit: 32 delay registers, `delay32`, 32 output flip-flops |
| `delay32` | fiducial synchroniser and edge detector driving 32 `fid_delay` channels |
| `fid_delay` | one channel: delays both fiducial edges by the same number of RF clocks |
| `start_trigger_seq` | start trigger sequencer: normal, storage and manual modes, ready handshake, veto |
| `trigger_delay` | single-shot, armed, delayed start pulse generator |
| `delay_channel` | delay-then-pulse counter, used by `trigger_delay` |
| `delay_counter` | one-shot 32-bit delay counter, used by `freq_divider` and `fid_delay` |
| `edge_sync` | two-flip-flop synchroniser with rising and falling edge pulses |
| `retime_dff` | bank of output flip-flops clocked by a clean RF-derived clock |
| `timing_pkg` | shared constants, the start trigger mode enum and the divider register enum |

## Master divider (`ski16115`, `freq_divider`)

A counter runs from 0 to `ratio-1` on every RF clock. `div_out` is high while the
count is below `floor(ratio/2)`, so the output is a square wave at RF/ratio. A
ratio below 2 is treated as 2. At the default ratio of 230 the output is high for
115 clocks and low for 115.

**Resynchronization.** When sync is enabled, each rising edge of `sync_in` (the
injection timing) passes a two-flip-flop synchroniser and starts a 32-bit delay
counter. When the counter expires, the divider count is forced to 0. Every
fiducial edge after that is therefore a fixed number of RF clocks after the
injection, which locks the phase to the injected bucket. The exact timing: if RF
edge E0 is the first to sample `sync_in` high, the count is 0 and `div_out` is set
at edge **E0 + 3 + delay**. The next rising edge comes at E0 + 3 + delay + ratio.
A sync edge that arrives while the delay is still running restarts the delay.

A restart does not always make a visible rising edge. If the output was already
high, it stays high, and the pulse is longer than usual for that one turn. If the
output was low, the restart makes a rising edge sooner than usual, and that period
is shorter. The 32-channel delays downstream handle both cases (see below).

**Output flip-flop.** `div_out` is retimed by `retime_dff`. Its clock `ffclk` is
the RF clock after an external fine analog delay chip, whose 10-bit code the unit
supplies as `fine_code`. The flip-flop removes the FPGA's own output jitter:
the edge position is set only by the RF clock and the fine delay. If the clock
delay is longer than the time `div_out` takes to settle after an RF edge,
`fiducial_out` follows `div_out` within the same RF cycle (the testbenches use
0.3 ns); otherwise it follows one cycle later. Choosing that delay is a
board-level matter.

**Registers** (3-bit word address, write on the `clk` edge with `we` high, read
data combinational):

| addr | name | reset | meaning |
|---|---|---|---|
| 0 | RATIO | 230 | division ratio |
| 1 | DELAY | 0 | RF clocks from the sync edge to the restart |
| 2 | CTRL | 1 | bit 0: external synchronization enable |
| 3 | FINE | 0 | fine delay code (10 bits) |
| 4 | NSYNC | 0 | read only: number of restarts since reset |

## Station delay unit (`ski17029`, `delay32`, `fid_delay`)

Each station unit receives the master fiducial and gives every detector its own
copy, delayed by a whole number of RF clocks. The step is 1.965 ns and the range
is 32 bits. The fiducial comes in on a cable, so it is synchronised and
edge-detected once. The resulting rise and fall pulses go to all 32 channels.

**Why each channel has two counters.** A channel must reproduce every fiducial for
any delay up to a whole revolution: 230 clocks at ratio 230. A single
delay-then-pulse counter cannot do this once delay plus pulse width exceeds the
period, because the next fiducial arrives while it is still busy. `fid_delay`
therefore delays the rising edge and the falling edge separately, each with its
own `delay_counter`, and rebuilds the waveform. The output keeps the fiducial's
own duty cycle. A counter can take a new edge in the last cycle of its current
count, so a delay of exactly one period also works.

**Edge pairing.** A channel takes a falling edge only if it took the rising edge
before it. Normally every edge is taken. Two events can make the spacing of edges
briefly shorter than the delay:

* a restart of the master divider that shortens one period;
* a change of the channel's delay register while the fiducial runs.

In either case the channel drops that pulse as a whole and is exact again from the
next pulse. Without pairing, a channel could keep a rising edge and lose its
falling edge, and it would stay wrong for an extra turn.

**Timing.** If E0 is the first RF edge that samples a fiducial edge at the unit's
input, that edge appears on `fid_out[i]` at **E0 + 4 + delay[i]**. The four clocks
are two synchroniser stages, the edge detector and the output flip-flop. In the
top, the master fiducial changes just after RF edge k and is first sampled by the
stations at edge k+1. A station output therefore follows the master fiducial by
5 + delay clocks.

**Registers:** addresses 0 to 31 hold the channel delays (reset 0). Other addresses
read 0 and ignore writes.

## Start trigger (`start_trigger_seq`, `trigger_delay`)

The generator (`trigger_delay`) is a single-shot delayed trigger. An `arm` pulse
arms it. While armed it accepts exactly one trigger, then disarms itself. The
trigger is either a rising edge of the injection timing (only when `ext_en` is
set) or a software pulse `sw_trig`. After the programmed delay it drives a pulse
of the programmed width on all station outputs. While that pulse is still in
progress, no new trigger is accepted. An external edge first sampled at trigger
clock edge E0 gives a start at edge E0 + 3 + delay. A software trigger sampled at
edge t gives a start at edge t + 1 + delay.

The sequencer arms the generator only when the detectors are ready. It then
vetoes further starts until the detectors have taken the start and finished with
it. The states below are this design's own; the source describes only the
behaviour:

```
 IDLE --enable--> WAIT_READY --ready--> ARMED --fired--> WAIT_BUSY --!ready--> WAIT_READY
   ^                                     (arm pulse)                 
   +------------- enable low (disarm pulse if ARMED) from any state
```

In ARMED the mode decides what fires the generator:

* **normal** (`MODE_NORMAL`): the injection timing. `ext_en` is high only in this
  mode and state.
* **storage** (`MODE_STORAGE`): an internal timer. A software trigger follows
  `period + 1` clocks after arming, which repeats the measurement with no
  injection.
* **manual** (`MODE_MANUAL`): the `manual_trig` command. A command given while
  not armed is ignored.

`trg_veto` is high in every state except ARMED. `ready` is the AND of the
stations' ready inputs and is synchronised inside the sequencer. The handshake
assumes the detectors drop ready when they take a start and raise it when their
data is processed. If they never drop ready, the sequencer waits.

## Clocks, resets and crossings

* `rf_clk` drives the divider and all station units. The station units
  re-synchronise the fiducial anyway, because physically they are separate boxes.
* `ffclk_master` clocks only the master output flip-flop.
* `trg_clk` drives the start trigger part. Its frequency is free; the testbenches
  use 100 MHz. All delays and periods of the trigger part count in its cycles.
* `dr_injection` and `bpm_ready` are asynchronous. They pass two-flip-flop
  synchronisers, which adds two clocks of latency.
* The register buses are assumed to be in the RF clock domain already.
* Resets are synchronous and active high: `rf_rst` and `trg_rst`. The output
  flip-flop banks have no reset, like the discrete parts they stand for. Their
  value is defined after the first clock edge.

## What lies outside the logic

These parts are not logic and are not modelled; they appear as top-level ports:

* the RF comparator, which becomes `rf_clk`;
* the fine analog delay chip, driven by `ep195_code` and returning
  `ffclk_master`;
* the LVDS/PECL/NIM level shifters;
* the event system that produces `dr_injection`;
* the processor, Linux and control software, which drive the register buses and
  the trigger settings (`trg_enable`, `trg_mode`, `trg_delay`, `trg_width`,
  `trg_period`, `trg_manual`);
* the detectors themselves, which consume the fiducials and starts and report
  `bpm_ready`.

## Departures and open points

* **Start trigger hardware.** In the described system the start trigger is a
  commercial delay generator with sub-nanosecond delay resolution, sequenced by
  control software. Here both are logic. The delay resolution is one `trg_clk`
  period, and the storage-mode "software timing" is a counter.
* **Use of the divider's 32-bit delay.** The description says only "32-bit clock
  delay". It is read here as the delay from the injection edge to the divider
  restart, in RF clocks. The reason is that the station unit is described as
  counting RF clocks from an external timing edge and as being derived from the
  divider's design.
* **Chosen details.** Duty cycle (50 %), clamping of ratios below 2, restart
  behaviour, synchroniser depths, and therefore every absolute latency are
  chosen, not given.
* **Register interfaces.** The description lists the controls reachable over the
  network: divide ratio, delay, sync enable and fine delay. The maps, the reset
  values (sync enabled, ratio 230), the bus protocol and the NSYNC counter are
  this design's choices.
* **Channel count.** Each station unit has 32 channels, although a station feeds
  21 detectors. The spare channels simply stay unused.
* **Out of reach.** Jitter, temperature drift and the fine delay's picosecond
  behaviour were what the system was measured for. They are analog properties,
  and RTL cannot reproduce them.

## Sizes against what the system needs

* **Divider.** Ratio 230 and delays 0 to 230 fit easily in the 32-bit registers.
* **Fine delay.** The fine delay was swept from 0 to 2 ns in 100 ps steps. The
  code is 10 bits wide, which is this design's assumption about the delay chip;
  the unit passes the code through without interpreting it.
* **Station delays.** The largest per-detector delay needed in a station is
  > 180 ns, about 92 RF clocks. Every fiducial is reproduced up to 230 clocks
  (452 ns); larger delays are accepted but drop fiducials.
* **Channels.** 4 × 32 = 128 channels cover the ring's 83 monitors.
* **Delay step.** One RF clock (1.965 ns) is finer than the 4 ns ADC timing
  tolerance of the detectors.
* **Storage-mode timer.** At 100 MHz the 32-bit timer reaches 42.9 s. That is
  far more than the measurement cycle of about 4 s, which is dominated by more
  than 3 s of detector readout and processing.

## Simulating

Every testbench is self-checking. It prints one line
`TB_RESULT checks=N failures=M` and then calls `$finish`. From the repository
root, with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/timing_pkg.sv tb/tb_dr_bpm_timing.sv --top-module tb_dr_bpm_timing -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The `1ns/1ps` timescale matters:
the testbenches write the RF half period as `#0.982`.

| testbench | what it establishes |
|---|---|
| `tb_dr_bpm_timing` | Whole system at its default size (4 × 32 channels, 32-bit counters, ratio 230). Checks the divider restart at E0+3+D+230 after each injection, all 128 channel timings, normal-mode start timing, no start while the detectors are busy, storage-mode and manual-mode starts, a free-running phase with sync disabled, and the status counters. It counts each of these mechanisms and fails if one never happens. Injections are microseconds apart rather than 20 ms, which changes nothing in the logic. |
| `tb_delay_sweep` | Whole system at its default size, the two delay sweeps: the divider delay stepped from 0 to 230 (fiducial phase after each injection), and the 128 channel delays spread over 0 to 230 in both orders (rise and fall time of every channel on two consecutive fiducials). |
| `tb_freq_divider` | Period and high time for ratios 230, 7, 1 and 16; restart timing for delays 0, 5, 97 and 700 and a ratio of 11; a second sync restarting a running delay; sync disabled. |
| `tb_ski16115` | Register reset values and read-back, fine code output, resync counter, output flip-flop. |
| `tb_fid_delay` | Output reproduces the input waveform, shifted by a fixed latency plus the delay, for delays 0, 1, 92, 229, 230 and random values at period 230, and for a 20-clock period with a delay of 17; recovery within one period after delay changes. |
| `tb_delay32`, `tb_ski17029` | All 32 channels, rising and falling edge timing, high time, register map. |
| `tb_delay_channel`, `tb_trigger_delay`, `tb_start_trigger_seq` | Delay and width timing, single-shot arming, external and software triggers, the three modes, the ready handshake and veto. |
| `tb_retime_dff` | Flip-flop bank captures on the clock edge only. |

To change the configuration, override the top's parameters: `NUM_STATIONS`,
`NUM_CH`, `CNT_W` and `DIV_RATIO_RESET`. Their defaults come from `timing_pkg`.
