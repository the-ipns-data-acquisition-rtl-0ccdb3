# IPNS-style neutron time-of-flight data acquisition crate

This is synthesizable SystemVerilog for the digital part of a pulsed-neutron
data acquisition system of the kind used at the Intense Pulsed Neutron Source
(IPNS). An accelerator pulse, T0, arrives 30 times a second. Between two T0
pulses every neutron detector produces events. Each event must be stamped
with its time of flight since T0 and turned into "increment this channel of
this histogram". Then the events of the whole frame must reach the computer
before the next frame is over.

The design follows the published description of the IPNS system for
single-element detectors. A VXI mainframe holds a readout control (ROC) module
and up to eleven TOF histogramming modules of sixteen detectors each. The
main ideas are:

* **Histogramming by lookup.** Each detector has its own 2^20-entry RAM that
  maps the raw 20-bit time count (100 ns steps) to a 16-bit histogram channel.
  Detectors at different flight paths can therefore be "time focused" onto
  the same channels. Several detectors can share one histogram through their
  block offset.
* **Frame double-buffering.** Each module writes into one half of a ping-pong
  FIFO of 2 × 2048 words. At T0 the halves swap, and the other half (the
  previous frame) is drained by the I/O controller (IOC).
* **A token chain for readout.** The IOC reads one bus address over and over.
  Whichever module holds the token answers with its next word. When a module
  has nothing left, it passes the token on. When the token is back at the ROC,
  the frame is complete.

The IOC (a commercial processor board running the histogramming in software),
the analog SIMM personality modules and the LLD DACs are not part of the RTL.
Their signals are ports of the top module `das_crate`.

## The event word

Every event leaves a TOF module as one 32-bit word:

| bits  | field            | origin                                                         |
|-------|------------------|----------------------------------------------------------------|
| 31:16 | block offset     | per-detector register: which histogram                         |
| 15:0  | histogram offset | the detector's time table at the latched time; or the ADC value in pulse-height mode |

The IOC does three increments per word:
1. channel `hist` of histogram `block`;
2. channel 0 of histogram `block`, which is that histogram's sum;
3. channel `block` of histogram 0, the sum histogram.

The testbenches' IOC model does exactly this. Keep histogram 0 free by giving
detectors non-zero block offsets.

## From trigger to word: `detector_channel`

Each SIMM carries two detectors. For each detector it provides an event
trigger, which is the output of a comparator against the LLD. It also provides
a serial 8-bit ADC value of the pulse peak. The FPGA behind a SIMM is
`channel_fpga`. It contains one `time_counter` and two `detector_channel`
pipelines. All logic runs on the single global 10 MHz clock, so one cycle is
one 100 ns time bin.

Timing of one event. E is the clock edge at which the trigger is first
sampled high, and T the edge at which the module's T0 pulse is sampled.

| clock edge | what happens                                                                        |
|------------|-------------------------------------------------------------------------------------|
| E, E+1     | two-flop synchroniser                                                               |
| E+2        | edge seen: the counter value (E+1 − T) is the time table's read address; receiver armed |
| E+3        | table output captured                                                               |
| …          | serial ADC word: start bit `1`, then 8 bits MSB first, one per cycle                 |
| ADC done +1 | compare with the upper level threshold: `adc > uld` → vetoed (`uld_veto`)          |
| ADC done +2 | otherwise the word is offered to the MRC (`out_valid`), held until `out_ready`     |

With the SIMM model used in the testbenches (start bit 4 cycles after its
trigger), a word is ready 16 cycles after the pulse. The SIMM's ADC locks out
for 1.5 µs (15 cycles). The pipeline is idle again in time for the next
trigger, provided the MRC takes the word at once. A trigger that arrives while
the pipeline is still busy is dropped and flagged `dead`.

The synchroniser adds a constant offset of one count to the latched time
(E − T + 1), which the time table absorbs.

Other behaviour:

* **Time window.** The counter starts at 0 on T0. It stops at all-ones
  (104.9 ms) instead of wrapping, and it is idle before the first T0. A
  trigger outside the window is dropped (`out_of_gate`).
* **ADC timeout.** If no start bit arrives within 31 cycles, the event is
  dropped (`adc_timeout`).
* **Pulse-height mode** (`ph_mode`). The histogram offset becomes the 8-bit
  ADC value, zero-extended. The ULD check still applies.
* **Alternate inputs** (`src`). The trigger can come from one of the three
  front-panel test signals instead of the SIMM. A configuration write can also
  make a software trigger. Such events carry no ADC value: it is taken as 0
  and always passes the ULD.

## Frames: `mrc` and `pingpong_buffer`

The module readout control (`mrc`) has a round-robin grant over the 16
detector pipelines. It moves at most one word per cycle into the fill side of
the ping-pong buffer.

* **T0.** The halves swap. Nothing is granted in the T0 cycle, so no word
  is split between frames: a pending word simply enters the new frame. Words
  the IOC had not read from the old read side are discarded (`unread_lost`).
* **Overflow.** A word that finds the fill side full (2048 words) is dropped
  (`overflow`). This FIFO depth is what limits the time-averaged rate to
  about 61k events/s per module.
* **System veto.** A veto pulse empties the fill side. Words taken for the
  rest of that frame are thrown away (`vetoed`), so the frame reads back
  empty. The read side, which holds the previous frame, is left alone.

## Readout: token chain, `roc_module` and `das_crate`

The token is a level signal that runs ROC → TOF 0 → … → TOF N−1 → ROC:

1. The ROC synchronises the front-panel T0 and issues a one-cycle `t0` on the
   local bus two to three cycles after the edge. It also raises `irq`, which
   stays high until `irq_ack`. The ROC pulls `token_start` low for two cycles
   and then raises it again.
2. A module holds the token while its `token_in` is high and it has not yet
   passed it on. Each IOC read strobe `rd` then pops one word. The word comes
   back on `rd_data` with `rd_ack` one cycle later. The IOC may strobe every
   cycle. Modules without the token drive zero, and the top ORs the buses
   together.
3. When its read side is empty, the module passes the token: `token_out`
   follows `token_in` until the next T0. An empty module passes the token
   within one cycle.
4. `rd_done` (the token back at the ROC) tells the IOC that the frame is
   complete. A read made while the token is moving between modules gets no
   `rd_ack`, so the IOC simply reads again.

The IOC must finish reading before the next T0. Otherwise the rest of the
frame is lost and flagged `unread_lost`.

## Configuration

The IOC writes one `cfg_req_t` per cycle (`das_pkg`). `slot` selects the module
(its position in the chain), `det` the detector and `sel` the target:

| `sel`           | effect                                                        |
|-----------------|---------------------------------------------------------------|
| `CFG_BLOCK_OFF` | block offset ← `data`                                         |
| `CFG_ULD`       | upper level threshold ← `data[7:0]` (8-bit, ~10 mV steps)     |
| `CFG_LLD`       | LLD DAC code ← `data[11:0]` (12-bit, ~0.6 mV steps), output on `lld_code` |
| `CFG_CTRL`      | `data[0]` enable, `data[1]` pulse-height mode, `data[3:2]` source (0 detector, 1–3 test input 0–2) |
| `CFG_SWTRIG`    | one software trigger on the detector                          |
| `CFG_LUT`       | time table entry `index` ← `data`                             |

At reset, every detector is disabled, with ULD 0xFF, LLD 0 and block offset
0. The time tables are RAM and are not cleared: load every entry that events
can reach.

`status[m]` gives one-cycle flags per module: accepted, uld_veto, dead,
out_of_gate, adc_timeout, overflow, vetoed, unread_lost. Flags of the same
kind from several detectors in one cycle are ORed together.

## Files

| file | contents |
|------|----------|
| `rtl/das_pkg.sv` | constants, event word, detector settings, configuration request, status flags |
| `rtl/das_crate.sv` | top: ROC, N_TOF modules, token chain, read bus |
| `rtl/roc_module.sv` | T0/veto/test synchronisation, interrupt, token start and return |
| `rtl/tof_module.sv` | 8 channel FPGAs, MRC, register bank |
| `rtl/tof_registers.sv` | configuration decode and per-detector settings |
| `rtl/channel_fpga.sv` | time counter plus two detector pipelines |
| `rtl/time_counter.sv` | 20-bit time-of-flight counter |
| `rtl/detector_channel.sv` | event pipeline of one detector |
| `rtl/time_lut.sv` | 2^20 × 16 time table RAM |
| `rtl/mrc.sv` | arbitration, veto, token, read port |
| `rtl/pingpong_buffer.sv`, `rtl/sync_fifo.sv` | the frame buffer |
| `rtl/sync_edge.sv` | synchroniser with edge detect |
| `tb/simm_model.sv` | behavioural SIMM: LLD compare, 1.5 µs lockout, serial ADC word |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_frame_rate` and `tb_das_crate_full` |

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N_TOF` (das_crate) | 11 | TOF modules in the crate |
| `TIME_W` | 20 | time counter width and time table address width |
| `FIFO_DEPTH` | 2048 | words per ping-pong half |
| `das_pkg::N_DET` | 16 | detectors per module (8 SIMMs × 2) |
| `ADC_TIMEOUT` (detector_channel) | 31 | cycles to wait for the ADC start bit |

At the default size, a crate has 176 time tables of 2 MB each.

## Simulating

Every testbench ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_das_crate \
    rtl/das_pkg.sv tb/tb_das_crate.sv -o sim && obj_dir/sim
```

Replace `tb_das_crate` with any other testbench in `tb/`. The simulator finds
the other modules through `-Irtl -Itb`.

* `tb_das_crate` runs a crate of 3 modules with a 10-bit time counter and
  256-word FIFOs for seven frames. It makes every mechanism above happen at
  least once: ULD veto, pulse-height mode, test input, software trigger, dead
  time, ADC timeout, out-of-window pulses, FIFO overflow, system veto, a
  frame left unread, the token returning, and the SIMM lockout. An IOC model
  histograms everything read. An independent prediction of the same
  histograms must match cell for cell.
* `tb_frame_rate` runs one TOF module at its default size through a real
  33.333 ms frame (333,333 cycles) with 2088 evenly spread pulses. The first
  2048 must be read back in order and the last 40 flagged as overflow. This is
  the module's time-averaged limit of 2K events per frame, about 61k events/s.
* `tb_das_crate_full` runs the same sequence on the crate at its default
  size (11 modules, 20-bit time, 2K FIFOs), with 500 µs frames. A 20-bit
  counter never leaves its window in such a frame, so the out-of-window case
  is tested only at the reduced size. It builds in about a minute and
  simulates in seconds.

## How far to trust it, and where it departs

All modules pass Verilator lint and the slang front end. Each testbench was
also run against a deliberately broken copy of its module, and each one
failed it.

Taken from the published system description:
* 16 detectors on 8 SIMMs per module, and up to 11 modules per crate;
* the 20-bit counter at 10 MHz started by T0;
* the per-detector 16-bit time lookup;
* the 8-bit serial ADC, the ULD veto above the threshold, and the
  pulse-height switch;
* the 32-bit word format with per-detector block offsets;
* the 2K ping-pong FIFO swapped at T0;
* the veto, the test inputs and software input, and the interrupt;
* the token chain and the IOC's three increments.

This design's own choices, where the description gives no detail:
* the single clock domain;
* the serial ADC frame format and timeout;
* the time window that stops at all-ones;
* test and software events carrying ADC value 0;
* round-robin arbitration at one word per cycle;
* dropping words at overflow;
* discarding unread words at T0;
* the veto clearing only the fill side;
* the level token, and the read/ack handshake in place of VXI bus cycles;
* the configuration encoding and reset values;
* the status flags.

Not included:
* the analog front end (time gate, LLD comparator, peak ADC);
* the DACs;
* the IOC and its software;
* the multi-crate token input/output;
* the Ethernet and serial pass-through of the ROC;
* the position-sensitive-detector version of the module.

Known limit: if all 16 detectors of a module fire at the 1.5 µs lockout rate
at the same time, they offer 10.7 M words/s against the MRC's 10 M/s. The
excess shows up as dead-time drops.
