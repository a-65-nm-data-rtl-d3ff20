# CIC: data concentrator for a silicon tracker module

A tracker module carries eight front-end (FE) readout chips, and each one talks
to the outside through this concentrator. Every 25 ns bunch crossing (BX),
each FE chip can report up to three *stubs*: pairs of hits in the two stacked
sensors of the module. A stub's *bend* tells how steeply the particle crossed
the module, and so how much its path was curved. The concentrator has two jobs
on two independent paths:

* **Trigger path.** It gathers the stubs of all 8 chips over a block of 8 BX,
  which is up to 192 stubs. It sorts them by |bend| and keeps at most 40,
  because small bends mean high-momentum tracks, the ones the trigger wants.
  It then sends the block as one packet on 6 (or 5) output lines. One packet
  goes out every 8 BX, so the output keeps pace with the collisions.
* **L1 path.** After an L1-accept, each FE chip sends the full hit map of the
  accepted event. The concentrator stores each chip's frame in a per-chip
  FIFO of 16 events. When all 8 frames of an event are present, it merges
  them, turns runs of hits into clusters (position and width), and sends one
  variable-length frame on the L1 output line.

The RTL is the digital core only. It includes the input phase alignment, the
trigger word alignment, the system manager (reset, timing and fast commands)
and both data paths. It is built for the strip-module (2S) configuration at
320 Mbps. Section "What is not here" lists what is missing.

## Clocking: one clock, many enables

Everything runs on the 320 MHz core clock. Each 320 Mbps line moves exactly
one bit per clock cycle, so one BX is 8 cycles. The 160, 40 and 20 MHz clocks
of a real chip appear here as one-cycle enables: `ce160`, `ce40` and `ce20`.
The phase of the 40 MHz enable is not free. It is taken from the fast command
line:

* Each fast command frame is 8 bits, one BX long: `1 1 0 FR L1A CAL BC0 1`.
  The fields are fast reset, L1-accept, calibration pulse, bunch-crossing
  zero, and a stop bit.
* `fast_command_decoder` shifts the line in and checks every bit position for
  the `110...1` pattern. Once four idle frames in a row match at one
  position, it locks. It unlocks after four bad frames in a row.
* Only idle frames count towards lock. A stream that is full of one command
  can look periodic at a false position, and idle frames rule that out.
* `clk_enable_gen` then forces its counter so that `ce40` lands on the frame
  boundary. All 8-bit words in the chip are aligned to that boundary.

`system_manager` bundles the decoder, the enable generator and `reset_sync`
(asynchronous assertion, two-flop release). Commands come out only in the
cycle a frame ends while locked (`cmd_valid`).

## Getting the bits right: phase and word alignment

The FE chips run on their own copies of the 320 MHz clock, so every input
line arrives with an unknown phase. The core receives each line as `OVS`
samples per clock cycle (4 by default, ordered in time) from a multi-phase
sampler in front of it.

**Phase alignment** (`phase_aligner`, one per line, grouped in `phy_port`):

* Over a 64-cycle window the aligner counts, for each sample boundary, how
  often the data changed there.
* The busiest boundary is where the data edges sit. The sample half a bit
  period away from it is the safest point, and it becomes `phase_sel` at the
  end of the window.
* A window with no transitions keeps the old choice.
* `locked` is set after the first decision. The port's `all_locked` ANDs all
  lines.

**Word alignment** (`word_alignment_controller`, trigger lines only): a
phase-aligned bit stream has no word boundaries. With `align_en` set, the FE
chips repeat the word `0xEA`. Its eight rotations are all different, so it
has exactly one position in any 8-bit window.

* For each line, the controller keeps the last 15 bits.
* On each `ce40` it looks for the word at offsets 0..7.
* An offset that is found four BX in a row is stored as that line's
  `offset`, and the line is `aligned`.
* Each trigger FE block then reads its byte for the BX at that offset from
  its own 15-bit history. All lines, even ones with different delays, are
  read as whole words in the same `ce40` cycle.

Word alignment needs no special handling on the L1 lines, because L1 frames
carry their own start marker (see below).

## Trigger path

### From lines to stubs (`trigger_fe`)

One chip's 5 lines give 40 bits per BX. Line *l* carries bits `39-8l` down to
`32-8l`, first bit = MSB. The word holds three stubs of 12 bits:
8-bit address and 4-bit bend, with two's-complement bend -8..7. Then come 3
unused bits and an error flag in bit 0. An address of 0 means "no stub". Each
stub leaves as an 18-bit `fe_stub_t`: valid, address, bend, and 5 spare bits
(`aux`, zero for this FE chip). `out_valid` follows `ce40` by one cycle.

### Selecting 40 of 192 (`stub_selection`)

This is the heart of the trigger path. Every BX brings one row of 24 slots
(8 chips × 3). A block is 8 rows. The register keeps `NMAX` = 40 stubs,
smallest |bend| first, and within equal |bend| in arrival order (BX, chip,
slot). When more than 40 arrive, exactly the largest-|bend| ones are lost.

Doing this as a comparison sort of 192 items in 8 BX would be large. Instead
it is a **counting sort**, which works because |bend| takes only 9 values
(0..8):

1. **Fill.** Each row goes into a 192-slot buffer. A histogram counts the
   stubs per |bend| value.
2. **Hand-off.** When row 7 arrives, buffer and histogram are copied to the
   processing side. The next block starts filling immediately, so there is
   no dead time.
3. **Prefix sums.** One cycle turns the histogram into the first register
   position for each |bend| value: all |bend|=0 stubs start at 0, |bend|=1
   after them, and so on.
4. **Placement.** Eight cycles, one row of 24 slots each. Each stub is
   written to the next free position of its |bend| value. Positions ≥ 40 are
   simply not written. That is the whole selection rule.
5. **Packet.** A 27-bit header is put in front:
   `{fe_err[7:0], ovf, block_id[11:0], nstubs[5:0]}`. It is followed by 40
   entries of 23 bits, `{chip, bx, addr, bend, aux}`, with unused entries
   zero. This is the 23 × 40 + 27 bus of the block diagram.

`pkt_valid` comes 10 cycles after the row of BX 7. `bc0` restarts the block
and the block counter.

### Output frame (`stub_output_formatter`)

A frame lasts 8 BX (64 cycles), which is 384 bits on 6 lines or 320 bits on
5 lines. That is less than a full register, so the formatter sends the header
plus as many stubs as fit, in register order:

| lines | stub bits | stubs per frame |
|---|---|---|
| 6 | 23 | 15 |
| 6 | 19 (no bend) | 18 |
| 5 | 23 | 12 |
| 5 | 19 (no bend) | 15 |

* If stubs are cut, `ovf` is set and `nstubs` gives the number sent.
* In cycle *c* of a frame, line *l* carries frame bit `383 − (c·L + l)`,
  where L is the line count. Unused bits and idle frames are zero.
* Frames start two cycles after a `ce40`, so they stay on BX boundaries.
  `frame_start` marks their first cycle.
* `six_lines` and `no_bend` are sampled when a frame starts, so changing them
  never splits a frame.

## L1 path

### Frame capture (`l1_fe`, one per chip)

The L1 line idles at 0. A frame is the start pattern `11` followed by 797
bits: `{err[1:0], l1id[8:0], hits[785:0]}`, MSB first. At least one 0 must
separate two frames.

* The block deserialises the frame and pushes it as one entry into a 16-deep
  first-word-fall-through FIFO (`sync_fifo`).
* A frame that arrives while the FIFO is full is dropped and counted
  (`dropped_cnt`), so the line stays in frame sync.
* Each chip is captured on its own, so the chips do not need to answer at the
  same time.

### Merging and sparsification (`l1_output_formatter`)

Strip chips send every channel, so most of each frame is zeros. The formatter
waits until **no FIFO is empty**, so that every chip has delivered the oldest
event. It then works in three steps:

1. **Load.** The 8 entries are loaded into hit registers and all FIFOs are
   popped.
2. **Cluster.** One cluster is found per cycle: the lowest set hit bit of the
   current chip, and the run of set bits after it, up to 8 wide. A longer run
   becomes several clusters. The run's bits are cleared. A chip with no hits
   left costs one cycle.
3. **Send.** A 36-bit header is shifted out on `l1_out`:
   `{2'b11, err of chips 7..0, l1id of chip 0, l1id mismatch, trunc, count[6:0]}`.
   Then come `count` clusters of 16 bits, `{chip[2:0], first channel[9:0], width−1[2:0]}`,
   and one idle 0.

At most 127 clusters are kept per event. Beyond that `trunc` is set. The
mismatch bit is set when the chips disagree on the L1 id, which would mean a
frame was lost. An event with *n* clusters starts n + 8 cycles after its
FIFOs are popped and takes 36 + 16n cycles on the line.

## Fast reset and BC0

A **fast reset** clears both data paths: trigger FE registers, stub buffers,
the formatter, the L1 FIFOs and the L1 formatter. It keeps the fast command
lock, the input phases and the word alignment, so data flows again right
away. The block counter restarts at 0.

**BC0** restarts only the trigger block: a partly filled block is dropped,
and the next BX becomes BX 0 of block 0.

## Where this design departs from the chip it models

Taken from the chip description:

* the block structure
* 8 chips × (5 trigger + 1 L1) lines at 320 Mbps
* 3 × 18-bit stubs per chip and BX
* 8-BX trigger blocks with up to 40 of 192 stubs kept, smallest bend first
* the 23 × 40 + 27 stub register
* 5/6 output lines and the no-bend option
* 16-event L1 FIFOs of 797-bit entries
* at most 127 clusters per 2S event
* 40 MHz timing recovered from a sync code on the fast command line

This design's own choices:

* every bit format: FE trigger words, FE L1 frames, the fast command frame,
  packet and cluster layouts
* the alignment word and all lock rules
* the phase-alignment algorithm, which is a simple edge counter
* the counting-sort implementation
* the cluster width limit of 8
* the fast reset scope

**Rate limit to know about.** An L1 frame here is the whole 797-bit entry sent
serially: 799 cycles, 2.5 µs per event per chip. At the nominal average L1
rate of 750 kHz (427 cycles between accepts), the FE-to-concentrator L1 links
therefore cannot keep up. They sustain about 400 kHz, and the 16-event FIFOs
span 40 µs instead of the intended ~12.6 µs. A real FE chip sends a much
shorter frame, and only the frame format would need to change. The output
side keeps up for events of up to about 24 clusters.

### What is not here

* **Pixel-strip (PS) modules:** the pixel FE chip's trigger format (blocks of
  2 clock cycles) and L1 format, and 254-cluster PS events.
* **640 Mbps:** the 640 Mbps output mode, and the 640 MHz clock with its
  divider and clock multiplexer.
* **Slow control:** the I²C slave and its register file. Their configuration
  bits are top-level ports.
* **Analog and physical parts:** the sLVS receivers and drivers, the
  multi-phase input sampler, pads and ESD protection.

## Top level (`cic_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `reset_in` | in | 320 MHz clock, asynchronous reset |
| `fast_control_in` | in | fast command line |
| `trig_samples[40]`, `l1_samples[8]` | in | `OVS` samples per cycle per line; chip c, line l = index 5c+l |
| `align_en`, `six_lines`, `no_bend` | in | configuration (normally from I²C registers) |
| `trig_out[5:0]`, `l1_out` | out | data outputs |
| `trig_frame_start` | out | first cycle of a trigger frame |
| `fc_locked`, `trig_phy_locked`, `l1_phy_locked`, `words_aligned` | out | link status |
| `cal_pulse`, `ce20` | out | calibration pulse, 20 MHz enable for slow control |
| `l1a_cnt`, `l1_events_cnt`, `l1_fifo_full`, `l1_dropped`, `l1_busy` | out | L1 status |

Bring-up order:

1. Release reset.
2. Send idle fast command frames until `fc_locked` is set.
3. Let the FE chips send the alignment word with `align_en` high until
   `trig_phy_locked`, `l1_phy_locked` and `words_aligned` are set.
4. Drop `align_en` and send a fast reset.
5. Send BC0.

Shared types and constants are in `rtl/cic_pkg.sv`.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. Build and
run with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/cic_pkg.sv $(ls rtl/*.sv | grep -v cic_pkg) tb/tb_cic_top.sv \
  --top-module tb_cic_top -Mdir obj_top -o sim
./obj_top/sim
```

Swap in another testbench name to run a block test. `tb_cic_top` runs the
whole core at its default parameters, for about 43,000 cycles, in under a
second. Models of the 8 FE chips and of the fast command source drive it
through:

* locking, phase alignment and word alignment
* dense blocks (more than 40 stubs, more than fit a frame) and sparse blocks,
  with each trigger packet checked bit for bit against a reference selection
* a switch to 5 lines without bend
* 12 L1 events, including one with more than 127 clusters, each checked
  cluster by cluster
* a fast reset
* a FIFO overflow, with one chip silent while the others send 18 frames

It counts each of these and fails if any did not happen. The block
testbenches also check the latencies quoted above. The simulator is
two-state, and all state that is read is reset.
