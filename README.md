# Self-reconfigurable full-search motion estimation for H.264/AVC

H.264/AVC motion estimation compares every 4x4 block of a macroblock with
all candidate positions in a search window of the previous frame and keeps
the candidate with the smallest sum of absolute differences (SAD). Larger
partitions (8x4 ... 16x16) can be scored by adding 4x4 SADs, so the 4x4
search is the core of variable block size motion estimation (VBSME).

This RTL implements an FPGA architecture in which that search runs on one,
two or four identical 16x1 PE arrays, each living in its own partially
reconfigurable region (PRR) of the FPGA. More arrays finish a macroblock
sooner; fewer arrays leave room (and power) for other functions. An embedded
processor decides how many arrays a video format needs, and swaps the
regions' contents at run time by writing partial bitstreams through the
FPGA's internal configuration access port (ICAP). To keep that fast, the
processor decompresses the next bitstream into an on-chip BlockRAM while
motion estimation runs, and a small hardware configuration interface then
streams it from the BlockRAM into the ICAP at one 32-bit word per clock.

The RTL covers both halves:

* the motion-estimation datapath (frame buffers, controller, up to four PE
  arrays with their comparators, parallel-to-serial unit, SAD buffer);
* the reconfiguration path (bitstream BlockRAM and configuration interface).

The processor, its bus, the ICAP primitive and the compact-flash storage are
not part of the RTL; their signals are ports of the top module
`me_reconfig_top`.

Fixed numbers of the design: QCIF frames (176x144), 16x16 macroblocks,
search range [-8,+7] horizontally and vertically (256 candidates per 4x4
block), 12-bit SADs, 8-bit motion vectors, 16 PEs per array, four regions,
a 32-bit BlockRAM with 14-bit word addresses.

## Block diagram

```
            processor bus side (ports)                         ICAP (ports)
  cur/ref frame writes   SAD reads   BlockRAM port A  start/length   ce/we/din  busy/out
        |       |            ^             |               |            ^          |
  +-----v--+ +--v-----+ +----+-----+  +----v-----------+ +-v------------+----------v-+
  |cur     | |ref     | |sad_buffer|  | bitstream_bram |-| config_if                 |
  |frame_  | |frame_  | +----^-----+  | (2^14 x 32)    |B| we -> ce -> words -> wait |
  |buffer  | |buffer  |      |        +----------------+ +---------------------------+
  |4 rd    | |8 rd    |   par2ser  <- sad_min1..4, MVs
  +---^--+-+ +-^--+---+      ^
      |  |     |  |          |
      |  +-----|--+--> region slot 1..4: pe_array = 16 x sad_pe + sad_comparator
      |        |             (blank slots get no data)
  me_controller (addresses + data-flow control, shared by all arrays)
```

## The PE array and its data flow

This is the part that takes the most care to follow.

**What one array computes.** For one 4x4 current block and one horizontal
displacement h, the array computes the SADs of the 16 vertical displacements
v = -8..+7 at once, one PE per v. Each PE (`sad_pe`) is an absolute
difference, an adder and an accumulator register; it sees one pixel pair
per clock, so a row of 16 candidates takes 16 clocks (4 block columns x 4
block rows). Sixteen rows (h = -8..+7) cover the 256 candidates of the block
in 256 clocks.

**How the window reaches the PEs.** PE v needs window pixel (h+x, v+y) when
the current pixel c(x,y) is broadcast. For a fixed block column x, the PEs
together need 19 window pixels of window column h+x, rows -8..+10. These are
fetched as five *bands* of four rows (rows -8..-5, -4..-1, 0..3, 4..7, 8..10
plus a constant 0), one pixel of each band per clock, i.e. 40 bits per clock.
After four clocks the band latches hold the whole 19-pixel column; on the
fourth write the column is copied into a second set of *active* latches.
While the next column is loading (four clocks), PE i takes
`active[i + y]` through a 4:1 multiplexer, y being the row of the current
pixel being broadcast. So loading and computing overlap and a column costs
four clocks.

Rows inside a column are scanned in snake order: down in even block
columns (c(0,0), c(0,1), c(0,2), c(0,3)), up in odd ones (c(1,3) ... c(1,0)).
Because each PE selects its pixel by the row index, the order does not
change the result; it is kept to match the original scan.

**Schedule.** The controller works in *slots* of four clocks. In slot g it
loads window column g while the array computes with column g-1 and the
current-block column that goes with it:

```
slot        0        1        2        3        4        5    ...   63       64(=0 of next block)
load        sw(-8)   sw(-7)   sw(-6)   sw(-5)   sw(-7)   sw(-6)      sw(10)   next block...
compute     -        c(0,*)   c(1,*)   c(2,*)   c(3,*)   c(0,*)      c(2,*)   c(3,*)
                     \____ h = -8 row: 16 clocks ____/   \_ h = -7 ...
```

For each h the columns h, h+1, h+2, h+3 are loaded in turn, so a block needs
64 slots, and consecutive blocks follow without a gap. Window columns are
re-read for every h; only the vertical direction is reused inside the array.

**Timing of one array** (all counts in clocks, relative to the clock in
which the frame-buffer data arrives):

* the SADs of a row are in the PE registers one clock after the row's last
  pixel and go to the comparator;
* the comparator keeps the running minimum over the 16 rows; the block's
  minimum SAD and motion vector appear two clocks after the last pixel of
  the block (`res_valid`).

**Comparator rule.** Within a row the smallest SAD with the lowest v wins;
across rows a later row replaces the stored minimum only when strictly
smaller. The result is the first minimum in (h, v) scan order.

**Motion vector format.** `mv_t` packs a 4-bit two's-complement h above a
4-bit two's-complement v, both in [-8,+7].

## Several arrays on one macroblock

The number of active arrays P is 1, 2 or 4 (`prr_mode_e`: `PRR_1`, `PRR_2`,
`PRR_4`). The 4x4 blocks of the macroblock are split by block rows:

| P | array 1        | array 2        | array 3   | array 4   |
|---|----------------|----------------|-----------|-----------|
| 1 | all 16 blocks  | -              | -         | -         |
| 2 | block rows 0-1 | block rows 2-3 | -         | -         |
| 4 | block row 0    | block row 1    | block row 2 | block row 3 |

Each array walks its blocks from the top-left one downwards, then moves one
block column right. All arrays run in lock step on blocks of the same block
column, whose rows differ by 4/P block rows. Their search windows therefore
differ only vertically, by whole bands. The controller addresses eight bands
(rows -8 .. +23 relative to the first array's block), and array p uses
bands p*(4/P) .. p*(4/P)+4. Read enables limit the accesses to the bands in
use: 5, 7 or 8 (40, 56 or 64 bits per clock) for P = 1, 2, 4. All arrays share the window column, the control
signals and the scan; each array has its own current-frame read port.

Macroblock time, from the accepted command to `me_done`:

    (64 * 16/P + 1) * 4 + 4 + P clocks  =  4105 (P=1), 2058 (P=2), 1036 (P=4)

Reference pixels read per macroblock: 20,480, 14,336 and 8,192 (164, 115
and 66 Kbit) for P = 1, 2, 4. Current pixels: 4,096 in every mode, since
each block's 16 pixels are read once per displacement h.

A QCIF frame has 99 macroblocks, so at 91.7 MHz one frame needs about
4.4 ms, 2.2 ms or 1.1 ms (frame loading not counted). Simulated, a whole
frame including the read-out of the results takes 408,078, 205,425 and
104,247 clocks.

The parallel-to-serial unit (`par2ser`) captures the P results that arrive
together and writes them into the SAD buffer one per clock, at entry
`4*block_row + block_column`. `me_done` pulses with the 16th write.

**Frame edges.** Window coordinates outside the frame are clamped to the
nearest frame pixel (edge extension), so every macroblock of the frame,
corners included, can be searched over the full range.

## Regions, blank bitstreams and mode switches

A partial bitstream cannot change logic in an RTL simulation. The top
therefore always contains four `pe_array` instances, and the input
`prr_loaded[3:0]` tells which regions currently hold a functional PE-array
bitstream; the others hold a *blank* bitstream. A blank slot receives no
data or enables, so it does not switch, and its outputs are ignored.

A macroblock command (`me_start` with `mb_x`, `mb_y`, `me_mode`) is accepted
only if all arrays the mode needs are loaded; otherwise `me_reject` pulses
for one clock and nothing starts. The mode is taken per command, so the
processor can change it between macroblocks after loading more or fewer
arrays. The reconfiguration path is independent of the datapath. A
bitstream for an idle region can therefore be cached and streamed while
the other arrays estimate a macroblock, which hides the reconfiguration
time.

## Reconfiguration path

`bitstream_bram` is a dual-port RAM of 2^14 32-bit words. Port A belongs to
the processor, which writes the decompressed partial bitstream there while
the motion estimation runs. Port B is read by `config_if`.

`config_if`, started with `start` and a `length` in 32-bit words:

1. raises `we_icap`;
2. one clock later raises `ce_icap`;
3. presents one word per clock on `din_icap`, holding a word while
   `busy_icap` is high;
4. stops after the last word;
5. keeps `ce_icap` high for eight more clocks with a NOOP word
   (0x2000_0000) on `din_icap`;
6. drops `ce_icap`, then one clock later `we_icap`, and pulses `done`.

The next BlockRAM address is issued combinationally so that an unstalled
transfer runs at one word per clock: N words take N + 10 clocks after
`start` is sampled, plus one clock per busy clock. At 100 MHz this is about
400 MB/s for bitstreams of tens of kilobytes. The 367 MB/s reported for the
original hardware is within that bound.

The ICAP's `Out` word is registered into `cfg_icap_status` for the processor.
All control signals are active high here. Check the polarity of the real
configuration port of your device before connecting it (on several Xilinx
families its CE and WRITE inputs are active low).

**Capacity.** With 14-bit addresses the BlockRAM holds 65,536 bytes. The
published functional PE-array bitstreams are about 70-93 KB, and the blank
ones 36-68 KB, so only some of them fit. Set `BRAM_AW = 15` on the top to
hold every one of them. The 14-bit default is kept because it is the
published port width.

## Top-level interface (`me_reconfig_top`)

| group | ports | notes |
|---|---|---|
| clock/reset | `clk`, `rst_n` | active-low asynchronous reset everywhere |
| frames | `cur_we/waddr/wdata`, `ref_we/waddr/wdata` | one 8-bit pixel per write, address `y*176+x` |
| results | `sad_raddr` -> `sad_rdata` | one clock latency; `blk_result_t` = {sad[11:0], mv.h, mv.v} |
| ME command | `me_start`, `mb_x` (0-10), `mb_y` (0-8), `me_mode`, `prr_loaded` -> `me_busy`, `me_done`, `me_reject` | |
| BlockRAM A | `addrA`, `dataA_in`, `weA` -> `dataA_out` | one clock read latency |
| reconfiguration | `cfg_start`, `cfg_length` -> `cfg_busy`, `cfg_done`, `cfg_icap_status` | length in words |
| ICAP | `ce_icap`, `we_icap`, `din_icap` <- `busy_icap`, `out_icap` | to the configuration port |

Typical sequence: write both frames; write a bitstream into the BlockRAM;
pulse `cfg_start`; wait for `cfg_done`; update `prr_loaded`; for each
macroblock pulse `me_start` and wait for `me_done`; read the 16 results.
Changing the reference frame while a macroblock is running is not
supported.

## Where this RTL departs from the original design, and what is missing

* **Scan schedule.** The original tabulates a data flow in which window
  columns stream once and are reused across horizontal displacements. The
  schedule here re-reads four columns per displacement. Per block this is
  256 clocks of PE work, the same as the original's 16 clocks per row of
  candidates, but the reference data read per macroblock is higher than the
  original's figures for 2 and 4 arrays (115 and 66 Kbit per macroblock
  against 92 and 46). The original also passes window pixels from one array
  to the next. Here the controller reads up to eight bands at once (64 bits
  per clock) and each array takes its own five. The original quotes 40 bits
  per clock for every array count.
* **Frame buffers** hold whole frames, with 8 (reference) and 4 (current)
  read ports. Their organisation in the original is not known.
* **Edge clamping**, the comparator's tie rule, the motion-vector packing,
  the NOOP padding, the command handshakes and `me_reject` are this
  design's choices.
* **Not included:** the processor and its configuration-manager software,
  the LZSS decompression (processor software), the processor bus, UART,
  System ACE and compact flash, the ICAP primitive, and the bus macros
  (plain wires here). Neither is the merging of 4x4 SADs into the 41
  larger partitions: the architecture keeps only each 4x4 block's minimum,
  and merging needs per-candidate SADs of neighbouring blocks at the same
  displacement.
* **Not reproduced:** the resource figures (58 flip-flops, 37 LUTs for the
  configuration interface and BlockRAM logic) and the 91.7 MHz clock were
  not targets. The RTL has not been synthesised for an FPGA.

## Verification

Every module has a self-checking testbench in `tb/` that computes expected
values independently (for the datapath, by a full search in the
testbench):

| testbench | what it checks |
|---|---|
| `tb_sad_pe` | sums of 200 random candidates, hold while idle |
| `tb_sad_comparator` | minimum and MV over 300 blocks, many ties, valid timing |
| `tb_pe_array` | four back-to-back blocks vs. full search, 16-clock rows, 2-clock result latency, pad pixel ignored |
| `tb_frame_buffer` | full QCIF frame, 8 random read ports, latency, read enables |
| `tb_me_controller` | every address, read enable and control bit, clock by clock, for all modes, inside the frame and at its corners; busy time; pixels read per macroblock |
| `tb_par2ser` | entry mapping per mode, one write per result, `done` |
| `tb_sad_buffer` | random writes and reads |
| `tb_bitstream_bram` | every word through port B, a sample through port A |
| `tb_config_if` | word order, we/ce ordering, eight-clock wait, N+10+busy clocks, length 0 and start while busy ignored |
| `tb_qcif_frame` | workload: all 99 macroblocks of a QCIF frame with 1, 2 and 4 arrays (4752 block results vs. full search), and a 2^14-word bitstream at 399.7 MB/s (100 MHz) |
| `tb_me_reconfig_top` | whole platform at full size: three reconfigurations through an ICAP model with busy stalls (one while a macroblock runs), macroblocks with 1, 2 and 4 arrays at the centre, edges and corners of the frame, a rejected mode, 16 results per macroblock vs. full search, clocks per macroblock |

`tb/icap_model.sv` is a behavioural model of the configuration port (not
synthesizable): it records the words it takes, raises busy periodically and
counts ordering errors of ce and we.

Run a testbench with plain Verilator (the package first):

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  rtl/me_pkg.sv $(ls rtl/*.sv | grep -v me_pkg) tb/icap_model.sv \
  tb/tb_me_reconfig_top.sv --top-module tb_me_reconfig_top -o sim
./obj_dir/sim
```

Each prints `TB_RESULT checks=N failures=M`. The end-to-end test runs the
default (full QCIF) configuration in well under a second.

## Files

* `rtl/me_pkg.sv`: constants and types
* `rtl/sad_pe.sv`, `rtl/sad_comparator.sv`, `rtl/pe_array.sv`: PE array contents of one region
* `rtl/frame_buffer.sv`, `rtl/me_controller.sv`, `rtl/par2ser.sv`, `rtl/sad_buffer.sv`: static ME logic
* `rtl/bitstream_bram.sv`, `rtl/config_if.sv`: reconfiguration path
* `rtl/me_reconfig_top.sv`: the platform
* `tb/`: testbenches and the configuration-port model
