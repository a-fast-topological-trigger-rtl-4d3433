# Topological camera trigger for an imaging Cherenkov telescope

An air shower makes a flash of Cherenkov light a few nanoseconds long. In
the camera of an imaging atmospheric Cherenkov telescope that flash lights a
compact group of neighbouring photomultiplier pixels at almost the same time.
Night-sky light also fires single pixels at up to about 10 MHz each. This
trigger tells the two apart by shape: it fires when **three touching pixels
are on within a few nanoseconds**. It then sends a compact summary of the
image to the array-level trigger: the timestamp, the number of pixels, and the
first and second moments of the pixel positions.

This repository holds synthesizable SystemVerilog for the trigger crate of one
500-pixel camera:

```
  500 camera pixels (Level 1 discriminator outputs)
        |  backplane routing: 3 overlapping row bands
        v
  +-----------+ +-----------+ +-----------+
  | L1.5 #0   | | L1.5 #1   | | L1.5 #2   |   400 MHz: stretch, align, mask,
  | 200 pix   | | 200 pix   | | 180 pix   |   3-fold cell coincidence,
  +-----------+ +-----------+ +-----------+   window latch + 32-bit timestamp
        | 20-bit words, 50 MHz (ribbon cables)
        v
  +-------------------------------------------+
  | L2: input FIFOs -> timestamp merge ->     |  -> 16-bit record frames
  | X-Y lookup -> moments -> record framer    |     to Level 3 (fibre)
  |     <- Level 3 commands (sync, reset)     |  <- command words
  +-------------------------------------------+
```

The top module is `camera_trigger_top`. All other modules are its parts and
can also be used on their own.

## Camera geometry and regions

The camera is modelled as 25 rows × 20 columns of hexagonal pixels in
*offset rows*: odd rows sit half a pixel to the right. Pixel (r, c) touches:

* (r, c−1) and (r, c+1) in its own row;
* in the rows above and below, columns c−1 and c if r is even, or c and c+1
  if r is odd.

The camera pixel number is `r*20 + c`. Coordinates, as used for the moments,
are in grid units: `x = 2c + (r mod 2)` (half pixel pitches) and `y = r`
(row pitches; not scaled by √3/2).

The camera is cut into three bands of ten rows. The bands start at rows 0, 8
and 16 (`REG_ROW_STEP = 8`), so neighbouring bands share two rows. Every
pixel in a shared row is wired to two L1.5 boards. Two shared rows are enough
for no shower to be lost at a border. A connected three-pixel group spans at
most three rows, and its middle pixel touches the other two. So some band
always holds the middle pixel together with both of its partners. The last
band has only nine real rows; its tenth row is tied low.

On the real crate every discriminator signal is copied twice on the input
cards and the backplane sends each board its band. In `camera_trigger_top`
that routing is the index arithmetic that cuts the 500-pixel vector into
bands.

This layout stands in for a real pixel map. Everything that depends on it is
in `trig_pkg`: `hex_nbr()` and the constants. The pixel-to-coordinate table
in `pixel_xy_lut` depends on it too. To use another camera, change those.

## Level 1.5 board (`l15_processor`)

Everything runs on one 400 MHz clock (2.5 ns ticks). Each of the 200 pixels
goes through these stages:

1. **Input register.** When the diagnostic playback is active, it replaces the
   real inputs (see *Diagnostics*).
2. **Skew adjust** (`skew_delay`): a per-pixel delay of 0–7 whole ticks. It
   compensates for different trace lengths.
3. **Bad-channel mask.**
4. **One-shot** (`pixel_oneshot`). A rising edge starts a pulse of
   `width` ticks: 2–16 ticks is 5–40 ns. A new edge restarts the pulse. The
   width sets the coincidence resolving time.
5. **Cell coincidence** (`coincidence_7cell`). Every pixel is the centre of a
   7-pixel cell: itself and its six neighbours. A cell fires when its centre
   and at least two neighbours are on. The board trigger is the OR of the 200
   cells, registered. Requiring the centre is what makes this exactly "three
   *touching* pixels". Any connected triple has a middle pixel, and that
   pixel's cell fires. A plain "3 of 7" rule would also accept three outer
   pixels that do not touch each other.
6. **Acceptance window** (`event_latch`). A *rising edge* of the trigger opens
   a window of `window` ticks, the trigger tick included. The pixel pattern is
   ORed over the window, so pixels of a slightly later wavefront still belong
   to the event. The timestamp of the trigger tick is kept. The edge rule
   matters: a stretched cluster holds the coincidence high for `width` ticks.
   If the trigger were a level, one shower would start a second event as soon
   as a short window closed.
7. **Event FIFO** (16 events of 200 + 32 bits). An event that finds it full
   is dropped and counted (`overflow_count`, register 0x002).
8. **Hit encoder** (`hit_encoder`). It sends one 20-bit word per 50 MHz
   period (every 8th tick). An event is sent as timestamp bits 31:16, then
   timestamp bits 15:0, then the local address of every set pixel, lowest
   first.

The timestamp (`timestamp_counter`) counts 400 MHz ticks and is cleared by
the once-per-second sync marker. One second is 4·10⁸ ticks, which fits in
32 bits. From the rising edge that samples a pixel pulse to the timestamp
latched for it is two ticks: input register, then one-shot, then the
registered coincidence.

### Ribbon-cable word (`link_word_t`, 20 bits = 20 pairs)

| bits  | field   | meaning                                              |
|-------|---------|------------------------------------------------------|
| 19    | valid   | high for one tick per 50 MHz period when a word is sent |
| 18:17 | typ     | 1 = timestamp high, 2 = timestamp low, 3 = pixel address |
| 16    | last    | final word of the event; set on the low-timestamp word of an event without pixels |
| 15:0  | payload | timestamp half or local address (0–199)              |

An event with n pixels takes (n + 2) words: 20 ns × (n + 2) on the cable.

## Level 2 board (`l2_processor`)

### Building events from three boards: `l2_event_merger`

This is the least obvious part. Each L1.5 board triggers on its own, so one
shower near a border gives two fragments on two cables. The fragments have
timestamps a few ticks apart and arrive at different times, one word per
20 ns. Each board's fragments arrive in time order. The merger must put
together what belongs together and keep apart what does not.

* `l2_link_rx` turns each cable into hit entries `{ts, addr, last, empty}`,
  which go into a 256-deep input FIFO per board. An event without pixels
  becomes one entry flagged `empty`.
* When idle, the merger looks at the three FIFO heads and takes the **oldest
  timestamp** as the event's reference. Because each FIFO is already sorted,
  this is a merge sort on the heads. It then pulses `ev_start`.
* While the event is open, it drains the fragment of every board whose head
  timestamp is within `window` ticks of the reference, on either side. It
  drains one entry per tick, and at most one fragment per board. Once it
  starts a fragment it stays with that fragment until its `last` entry, and
  waits for entries that are still on the cable.
* A wait timer (`timeout`, default 64 ticks = 160 ns) runs only while no
  fragment is being drained. The event closes with `ev_end` when the timer
  expires or when every board has delivered. A fragment outside the window
  stays queued and becomes an event of its own later.

The defaults (window 8 ticks, timeout 64 ticks) are set in registers 0x000
and 0x001. The timeout has to cover how far apart two boards' fragments of
one shower can start arriving. On this crate that is a few 50 MHz periods.

### Coordinates, moments and shared pixels

`pixel_xy_lut` maps (board, local address) to (camera pixel, x, y) with one
tick of latency. `moment_accumulator` is a three-stage pipeline: a duplicate
check, then the products x², y², xy, then the sums. It accumulates

    N, Σx, Σy, Σx², Σy², Σxy     (16, 24, 24, 32, 32, 32 bits)

A pixel in a shared row reaches the L2 board from two L1.5 boards. A
500-bit per-event bitmap drops the second copy. The drops are counted in
register 0x008. From the sums, Level 3 gets the centroid
(x̄ = Σx/N, ȳ = Σy/N), its distance r and angle φ, and the image widths.
ev_start and ev_end go down the pipeline with the hits, so events can follow
each other tick after tick.

### Records and commands

Records go through a 16-deep FIFO to `l2_record_framer`. It sends 15 words of
16 bits with a valid/ready handshake:

| word | content |
|------|---------|
| 0 | header 0xA55A |
| 1, 2 | timestamp high, low |
| 3 | N |
| 4–13 | Σx, Σy, Σx², Σy², Σxy as 32-bit values, high word first |
| 14 | XOR of words 0–13 |

Commands from Level 3 (`l3_command_decoder`) are 16-bit words. Bits 15:12
are the opcode. Bit 0 makes the XOR of all 16 bits zero (even parity).

| opcode | command | effect |
|--------|---------|--------|
| 1 | SYNC | one-tick marker that clears all L1.5 timestamps one tick later |
| 2 | RESET | resets every board of the crate |
| 3 | CLEAR_ERR | clears the command error count |

A word with bad parity or an unknown opcode is ignored and counted
(register 0x006).

## Setup bus and diagnostics

The boards are set up through a simple synchronous register bus: `cfg_we`,
`cfg_addr`, `cfg_wdata` and `cfg_rdata`. Read data follows the address by one
tick. In the top, `cfg_addr[15:12]` selects the board: 0–2 are the L1.5
boards, 3 is the L2 board.

L1.5 registers:

| address | content |
|---------|---------|
| 0x000 | [4:0] one-shot width (reset 4 = 10 ns), [11:8] window (reset 3); writing bit 16 = 1 starts playback, bit 17 = 1 arms capture |
| 0x001 | playback length in words |
| 0x002 / 0x003 | read: dropped events / captured words |
| 0x004 | read: bit 31 hit encoder busy, low bits events waiting in the event FIFO |
| 0x010 + k | mask of pixels 32k … 32k+31 (1 = masked) |
| 0x100 + p | skew delay of pixel p (0–7 ticks) |
| 0x400 + 8w + l | playback word w (0–63), 32-bit lane l (0–6) |
| 0x800 + a | read captured link word a (0–255) |

L2 registers:

| address | content |
|---------|---------|
| 0x000 / 0x001 | merge window / wait timeout, in ticks |
| 0x002 | writing bit 0 = 1 starts playback, bit 1 = 1 arms capture |
| 0x003 | playback length |
| 0x004 – 0x009 | read: dropped records, dropped hit entries, command errors, records sent, duplicate pixels removed, captured words |
| 0x00A + i | read: entries waiting in the input FIFO of board i |
| 0x00F | read: bit 31 moment pipeline busy, low bits records waiting to be framed |
| 0x400 + 2w + l | playback word w: {board 2, board 1, board 0} link words, lane 0 = bits 31:0 |
| 0x800 + a | read captured record word a |

Each board has a **playback memory** (`diag_playback`). On the L1.5 board it
replays 200-bit pixel patterns at 400 MHz in place of the camera. On the L2
board it replays the three boards' link words at 50 MHz in place of the
cables. Each board also has a **capture memory** (`diag_capture`). On the L1.5
board it records the outgoing link words, on the L2 board the outgoing record
words.

## Rates and limits at the default sizes

* A pixel pulsing at 10 MHz (every 40 ticks) is well within the one-shot and
  coincidence logic, which take a new decision every 2.5 ns.
* Shortest coincidence resolving time: 2 ticks = 5 ns. A 3 ns setting would
  need a faster clock or sub-tick logic.
* Link: an n-pixel fragment takes (n + 2) × 20 ns. A minimal 3-pixel event
  therefore limits one board to 10 MHz of events. Larger events are slower;
  the event FIFO absorbs bursts of 16.
* L2: for a shower seen by only one board, the merger waits out `timeout`
  for the other boards. At the default of 64 ticks such events leave the L2
  board every 69 ticks (5.8 MHz); the 256-entry input FIFOs absorb the
  difference for a while. With the timeout set to 16 ticks the cable is the
  limit again, and 3-pixel showers at 10 MHz come out every 40 ticks with
  nothing dropped. The timeout must still cover how late one board's
  fragment can start when that board is busy sending an earlier event.
* Night-sky background: with all 500 pixels firing at random at 10 MHz, the
  three-pixel coincidence fires far more often than three 50 MHz cables can
  report. The event FIFOs then overflow and count what they drop; the
  records that do come out stay correct, and the crate recovers when the
  rate falls.
* Memory on the L2 board: 3 × 256 × 42 bits of input FIFOs, a 1024-entry
  lookup table, record FIFO and diagnostics. About 64 kbit in all, well
  inside the 288 kbit of block RAM of a mid-size FPGA of the kind used for it.

## Where this model departs from the original trigger

* **One clock.** The original crate runs the L1.5 coincidence at 400 MHz. Its
  clock manager derives that from a 50 MHz reference the L2 board
  distributes. The L2 FPGA has its own clock. Here one clock runs everything,
  and a 1-in-8 enable marks the 50 MHz cable rate.
* **One-shot width in whole ticks.** The original stretches pulses from 4 ns
  to 40 ns. Here the width is 2–16 ticks: 5–40 ns in 2.5 ns steps.
* **Skew adjustment in whole ticks.** The original aligns signals to a few
  hundred picoseconds, which needs the FPGA's input-delay cells. Here the
  steps are 2.5 ns.
* **Register bus instead of VME.** The VME slave logic, the I/O modules
  (ECL receivers and LVDS drivers), the PLL clock fan-out, the GPS clock
  option, the optical transceiver and the Level 3 computer are not included.
  The top brings out the signals they would connect to.
* **Own choices** where the original gives only the function: the camera
  grid and band overlap, the word formats, the command encoding and parity,
  FIFO and memory depths, the merge rules (window, timeout, one fragment per
  board), duplicate removal, and reset values.

## Simulating

Each module `X` has a self-checking testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=N failures=M` and stops by itself, and a watchdog ends it
if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -y rtl --top-module tb_camera_trigger_top \
          rtl/trig_pkg.sv tb/tb_camera_trigger_top.sv -o sim
obj_dir/sim
```

`tb_camera_trigger_top` runs the whole crate at full size in about ten
seconds. It makes each mechanism happen at least once and prints how often
each did:

* a 3-fold trigger;
* a merge across two boards, with duplicate removal;
* a rejected pair;
* a masked channel;
* a late pixel kept by the acceptance window;
* skew alignment;
* event FIFO overflow;
* playback and capture;
* sync, bad parity and reset.

It checks every record against moments computed in the testbench.

`tb_workload_rates` runs the full crate at the rates above and prints what it
measures: record spacing for 10 MHz single-board showers at the default and
at a 16-tick merge timeout, and the behaviour under 10 MHz random pixel noise
on all 500 pixels. The
block testbenches compare each module with an independent model. For
example, the coincidence test checks the trigger against a brute-force
search for connected pixel triples.

## Files

* `rtl/trig_pkg.sv`: sizes, geometry function, link/entry/record types,
  command codes.
* `rtl/camera_trigger_top.sv`: crate: routing, three L1.5 boards, L2 board,
  bus decode.
* L1.5 board: `l15_processor`, `skew_delay`, `pixel_oneshot`,
  `coincidence_7cell`, `event_latch`, `timestamp_counter`, `hit_encoder`.
* L2 board: `l2_processor`, `l2_link_rx`, `l2_event_merger`, `pixel_xy_lut`,
  `moment_accumulator`, `l2_record_framer`, `l3_command_decoder`.
* Shared: `sync_fifo`, `diag_playback`, `diag_capture`.
