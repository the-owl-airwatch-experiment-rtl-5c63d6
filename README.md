# OWL-AIRWATCH focal-plane read-out electronics (FIRE + OUST)

A space telescope that watches the night atmosphere for the faint fluorescence
track of an extensive air shower has a focal plane of about half a million
pixels. The detector can see single photoelectrons, so every pixel's signal is
digitized by a discriminator. Reading 500 000 channels is out of the question
within the power and telemetry budget of a satellite, so this design works in
three steps:

1. **Counting in each pixel.** A pixel counts its photoelectrons in every Gate
   Time Unit (GTU). It reports a hit only once the count reaches a
   programmable number *b*. This removes most of the Poisson background.
2. **Wired-OR projection.** Within a macrocell of n x n pixels, the hit flags
   are OR-ed by column into n X lines and by row into n Y lines, so 2n
   channels are recorded instead of n². A single track stays coherent in
   space and time in both projections, so it can still be reconstructed. The
   ambiguity that the OR adds only mixes in the incoherent background.
3. **Ring memories and a persistency trigger.** Every GTU, the X and Y words
   of every macrocell are written into ring memories, which always hold the
   most recent history. A trigger watches a one-bit-per-macrocell pattern
   and looks for over-threshold activity that lasts long enough. When it
   finds it, the trigger freezes the memories and reads them backward from
   the newest GTU.

The RTL has two halves. **FIRE** is the pixel front-ends and the macrocells
with their memories. **OUST** (On-board Unit System Trigger) is the GTU
control, the per-macrocell counters, the pattern register, the trigger, the
read-out controller and the bus.

## Block structure

```
oa_top
├── fire                       10 x 10 macrocells
│   └── macrocell  (x100)      n x n pixels, X/Y wired-OR, 3 memories, bus port
│       ├── pixel_frontend (x n²)
│       ├── ring_memory  X     n bits x 2048 GTUs
│       ├── ring_memory  Y     n bits x 2048 GTUs
│       └── timing_memory      {first arrival, count} x 2048 GTUs (uses ring_memory)
└── oust
    ├── gtu_control            GTU strobes, RESET / SET_COUNT, GTU counter
    ├── mc_counter   (x100)    timing pulses per GTU vs. threshold
    ├── pattern_register       current + previous pattern
    ├── trigger_unit           persistency trigger
    ├── readout_controller     stop acquisition, backward read, byte stream
    └── ring_bus               data & address bus to the macrocells
```

`oa_pkg` holds the default sizes, the memory-select enum and the bus request
struct.

## The pixel front-end (`pixel_frontend`)

The discriminator output `in_sig` is sampled on `clk`. Each rising edge is one
photoelectron. In the first clock of every GTU the control module pulls
`RESET` and `SET_COUNT` low together. This clears the flag and loads a
down-counter with *b*. A photoelectron in that same clock already counts
towards the new GTU, so there is no dead time. The photoelectron that brings
the counter to zero sets the flag. The flag drives `wired_or_x` and
`wired_or_y` and stays high until the next GTU. `to_timing` passes every
photoelectron from the *b*-th onwards. A pixel with S photoelectrons in a GTU
therefore gives S−b+1 timing pulses, and the signal-to-noise ratio becomes
(S−b+1)/√b. The flag is registered, so it rises one clock after the *b*-th
edge. `to_timing` is combinational. A setting of b = 0 behaves as b = 1.

## Macrocell, GTU timing and the memories

GTU boundary: `gtu_start` is high in clock 0 of every GTU. In that clock
the flags still hold the result of the GTU that just ended. The macrocell
ORs them into `x_word` (bit c = column c) and `y_word` (bit r = row r). If
acquisition is enabled (`acq_en`), it writes both words into their ring
memories. On the clock edge at the end of clock 0, the pixels clear and
reload.

Timing channel: this is the OR of every pixel's `to_timing`. It goes to the
macrocell's OUST counter. It also goes to `timing_memory`, which stores one
16-bit word per GTU: `{first arrival clock, pulse count}`. The first-arrival
field is 255 if there was no pulse, and the count saturates at 255. This is
the simplest record that gives both the photoelectron number and the relative
arrival time. The original measuring technique is not described, so this
block is a stand-in.

`ring_memory`: a power-of-two circular buffer. A write strobe stores a word
and advances the pointer. A read takes an offset *backward* from the newest
word (0 = newest) and has one clock of latency.

Bus port: `rd_en`, `rd_mem` (X, Y or T), `rd_back` (GTU offset) and `rd_byte`.
`rd_data` comes back one clock later. An X or Y word is ceil(n/8) bytes, a
timing word 2 bytes, low byte first. `ring_bus` decodes the macrocell
number into one read enable per macrocell and multiplexes the returned
bytes.

## OUST: counters, pattern and persistency trigger

Each `mc_counter` counts the clocks in which its macrocell's timing channel is
high during a GTU. In the `gtu_start` clock, `pattern_register` latches one
bit per macrocell: count ≥ `mc_thr`. It also moves the old pattern into
`prev`. One clock later `trigger_unit` compares `cur` with `prev`:

* a non-empty pattern that shares a set bit with the previous one extends
  the run;
* a non-empty pattern that shares none starts a new run of 1;
* an empty pattern ends the run (reported on `run_break` when a run is
  cut short).

When the run reaches `persist_len` GTUs, `trig` pulses. The trigger is at
clock 2 of the GTU that follows the last persistent GTU. `oust` records the
trigger's GTU number and its pattern. The overlap rule is this design's own
choice: the original only says that the previous pattern is compared with
the current one, and that a minimum persistency in GTUs must be met.

## Read-out (`readout_controller`)

A trigger latches `read_len` (limited to 1..2048) and drops `acq_en`. The GTU
after the trigger therefore does not overwrite the memories, and the newest
word is the last GTU of the triggering run. The controller then reads
every macrocell in turn: its X memory, then its Y memory, then its timing
memory. Each is read for `read_len` GTUs, newest first, one byte per clock.
The bytes leave on `out_valid`/`out_data`, one clock behind the bus
requests. `out_sof` marks the first byte and `out_eof` the last. An event is

    bytes = N_MC * read_len * (2 * ceil(n/8) + 2)

After the last byte, `done` pulses, the pattern history is cleared and
acquisition restarts. The receiver (telemetry storage buffer) is assumed to
accept one byte every clock. There is no back-pressure.

## Top-level interface (`oa_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | sampling clock, asynchronous active-low reset |
| `pix_in[m][r][c]` | in | N_MC x n x n | discriminator output of pixel (r, c) of macrocell m = row*10+col |
| `pix_ths` | in | 4 | pixel count *b* |
| `mc_thr` | in | 8 | macrocell counting threshold per GTU |
| `persist_len` | in | 8 | persistency length in GTUs (0 = 1) |
| `read_len` | in | 12 | GTUs read back per event |
| `out_valid/out_data/out_sof/out_eof` | out | 1/8/1/1 | event byte stream |
| `trig`, `trig_gtu`, `trig_pattern` | out | 1/32/N_MC | trigger pulse, its GTU number and pattern |
| `pattern`, `run_len`, `run_break` | out | N_MC/8/1 | current pattern and persistency state |
| `gtu_start`, `gtu_count`, `busy`, `done` | out | 1/32/1/1 | GTU strobe and counter, read-out in progress, read-out finished |

The thresholds are inputs. In the original system an on-board
microprocessor sets them, and it may also derive the pixel threshold from
background statistics.

## Sizes and where they come from

| parameter | RTL default | original | note |
|---|---|---|---|
| macrocells | 10 x 10 | 10 x 10 | |
| pixels per macrocell n x n | 24 x 24 | ≈ 71 x 71 (≈ 500 000 pixels in all) | scaled down, see below |
| ring memory depth | 2048 GTUs | 2k words | |
| bus width | 8 bits | 8 (2k x 8 memories) | |
| GTU length | 100 clocks | not given | own choice (1 µs at 100 MHz; the detector resolves ≈ 10 ns) |
| pixel counter width | 4 bits | not given | own choice |
| macrocell counter | 8 bits, saturating | not given | own choice |

At n = 71 the complete focal plane has 504 100 pixel instances. Verilator
needs about 80 kB of memory per pixel to elaborate it, roughly 40 GB for the
full plane. At n = 32 a single elaboration of the array already takes 6-8 GB.
So `oa_pkg::N_PIX` defaults to 24 (57 600 pixels). Every module
takes `N` as a parameter. To build the full size on a machine with enough
memory, set `N_PIX = 71` in `oa_pkg.sv`. Nothing else depends on the number.

## Departures and open points

* Only the simple trigger algorithm is built, and it is built as logic; the
  original runs it in processor firmware. The further trigger levels and
  the adaptive threshold (statistics from the pattern register) are not built.
* The trigger classes slow / normal / fast of the original event catalog
  are not built: no criterion is given, and all three lead to the same
  read-out.
* The timing memory's contents are this design's own (see above).
* Data compression and the telemetry storage buffer are outside the RTL. The
  event stream is their input.
* The pixel detector and the analog discriminator are outside the RTL.
  `pix_in` is the discriminator output and is assumed synchronous to `clk`.
* Timing pulses of two pixels of one macrocell in the same clock merge into
  one, as on a wired-OR line.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Example with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal rtl/oa_pkg.sv rtl/*.sv \
    tb/tb_oa_harness.sv tb/tb_oa_top.sv --top-module tb_oa_top -Mdir obj
./obj/Vtb_oa_top
```

`tb_oa_top` runs the whole system on 2 x 2 macrocells of 4 x 4 pixels, with
16-deep memories and 10-clock GTUs. The scenario runs as follows:

1. Background photoelectrons are injected for more GTUs than the ring
   holds. The threshold must reject them.
2. A 2-GTU track is too short and must not trigger.
3. A 4-GTU track moving along a macrocell diagonal must trigger. Its event
   is checked byte by byte. This also proves that the memories stopped
   during read-out.
4. A second track must trigger again after the restart.

The testbench counts each of these mechanisms and fails if one never
happened. The scenario lives in `tb_oa_harness`. It can also drive `oa_top`
at its default sizes (`FULL = 1`), but that run was never made: the largest
system that has been simulated is the 2 x 2 x (4 x 4) configuration above. At
the defaults (57 600 pixels) the Verilator build alone needs many gigabytes
of memory.
