# sTGC Trigger Data Serializer (TDS) in SystemVerilog

The small-strip thin-gap chambers of a muon endcap trigger have two kinds of
read-out electrodes: large pads and fine strips. The pads are read first and
fast: their yes/no pattern tells off-detector pad-trigger logic where a
muon candidate crossed the chamber. The result is a *road*, a narrow band of
strips. Only the strips inside that road are then worth sending on, with their
charges, to the track finder (the *router*). The Trigger Data Serializer sits
between the front-end amplifier chips (VMMs) and these two consumers. It
exists in two configurations:

* **pad-TDS**: every 25 ns bunch crossing (BC) it sends the yes/no pattern of
  96 pads, with the BCID and a CRC, over a 4.8 Gb/s serial link;
* **strip-TDS**: it buffers the charges of 128 strips (plus 2 neighbour
  strips from each adjacent chip) for a few BCs. When a road arrives for one
  of its BCs, it picks the 15 strips of the road and sends them, with the
  road's identifiers, as one 150-bit frame on its 4.8 Gb/s link.

The strip-TDS is the harder of the two and gets most of this description.
The two chips are `rtl/strip_tds.sv` and `rtl/pad_tds.sv`. `rtl/tds_top.sv`
places them side by side, pad ports prefixed `p_`, strip ports `s_`. The
pad-trigger logic that would join them is off-chip, so its links are
brought out as ports.

## Clocks and the BC grid

Everything except the last serializer stage runs on one clock, `clk`, the
320 MHz VMM bit clock (3.125 ns). Eight cycles make one BC.

* `ce160` is high on every second cycle. It paces the 30-bit serializer
  words at 160 MHz, one word every 6.25 ns.
* `clk_ser` is 15 × `clk` (4.8 GHz), phase-locked to it. Only `gbt_ser`, a
  30:1 shift register, runs on it. Its word counter is reset with the
  rest, so the word boundary is fixed.

The real chip samples VMM data on both edges of a 160 MHz clock. This design
samples on one edge of a 320 MHz clock instead, which gives the same bit
rate.

`bcid_gen` divides `clk` into BCs. The BC boundary can be shifted in 6.25 ns
steps (`bc_phase`) to set the phase of the local 40 MHz BC clock. It holds
**two BCID counters**. The second takes the value of the first a
programmable time after each BC boundary. The delay is `win_sel` × 6.25 ns,
0 to 25 ns. While the two disagree, the current time is in the first part of
a BC, and that part also falls inside a widened matching window of the
previous BC. Hits arriving then carry the current BCID plus a **BCID flag**.
The exported BCID is counter 1 plus the 12-bit BCID offset. Both counters
reset to zero and wrap at 4096.

## Strip-TDS datapath

```
vmm_sd[127:0], neigh_lo/hi ──► vmm_deser ×132 ──► ring_buffer ×132 ──┐
      (test: serial_pattern ×15)      ▲ BCID/flag (bcid_gen)          │ {hit, q} per strip
pad_line0/1 ──► pad_trig_if ──► pad_lut ──► start strip ──► strip_sel (17 × 8:1)
                                        └─► road (BCID, phi, band)    │
                                                         strip_seq (first/last 15)
                                                                      │
                                 strip_frame_builder (CRC-4, FIFO, scrambler / PRBS-31)
                                                                      │ 30-bit word @160 MHz
                                                          gbt_ser 30:1 ──► ser_out 4.8 Gb/s
```

### Hit capture

Each of the 132 inputs is a VMM serial line. A hit is a start bit followed by
6 charge bits, MSB first. `vmm_deser` tags the hit with the 4 LSBs of the
BCID and the BCID flag at the moment of the start bit. Seven cycles later it
writes the 11-bit entry {charge, BCID LSBs, flag} into that strip's
`ring_buffer`.

The channel index runs as follows:

* 0 and 1 are the two neighbour strips from the chip below (`neigh_lo`);
* 2 to 129 are the chip's own strips;
* 130 and 131 are the neighbours from the chip above (`neigh_hi`).

The ring buffer keeps the last 4 hits. At each BC start it ages out hits
older than `MAX_AGE` (8) BCs, so the 4-bit tag cannot alias.

### Matching a road

The pad-trigger logic sends one road per BC at most, over two lines of
640 Mb/s each. That is 2 bits per `clk` per line, so a 16-bit word per line
per BC:

| line | bits 15:14 | 13:2 | 1:0 |
|---|---|---|---|
| 0 | `10` | trigger BCID | spare |

| line | bits 15:14 | 13:9 | 8:1 | 0 |
|---|---|---|---|---|
| 1 | `10` | phi-ID | band-ID | spare |

When there is no road, both lines carry `0x8000`. `pad_trig_if` finds the
word boundary by looking for that idle pair at both possible bit offsets,
and then stays locked. A word without the `10` header drops the lock, and it
re-aligns on the next idle pair.

`pad_lut` maps the 8-bit band-ID to the 7-bit first strip of a 17-strip
window. It has 8 entries of {band-ID, start}, stored in the configuration
registers. A band-ID that is not in the table produces no frame.

All 132 ring buffers are then asked, in parallel, for a hit with the road's
BCID k. With the extension enabled (`para[18]`), a hit tagged k+1 *with* the
BCID flag also matches: it came in the first part of BC k+1, inside the
widened window of k. If a strip has several matching hits, the newest one
wins.

### Window, selectors and sequencer

The 17-strip window is read through 17 8-to-1 selectors. Selector r sees
strips r, r+17, r+34, … (r + 17×7 beyond the channel count reads 0). For a
window starting at strip s, every selector picks the one strip of its
column that falls in [s, s+16]. This costs 17 multiplexers instead of 17
132-way ones.

`strip_seq` rotates the 17 selector outputs back into window order. It then
keeps either strips 0–14 or strips 2–16 of the window:

* it keeps the last 15 when more of window strips 15 and 16 are hit than
  of strips 0 and 1;
* otherwise it keeps the first 15.

Only 15 strips fit in the frame, and the 17-strip window lets a road that
covers a chip boundary be served by both chips.

### Frame, FIFO and link

`strip_frame_builder` builds the 120-bit payload:

| bits | field |
|---|---|
| 119:108 | BCID (from the road) |
| 107:100 | band-ID |
| 99:95 | phi-ID |
| 94 | spare, 0 |
| 93:4 | 15 charges × 6 bits, lowest window strip first |
| 3:0 | CRC-4, x⁴+x+1, over bits 119:4 |

A frame needs 5 packets of 30 bits, which is 31.25 ns. That is longer than a
BC, so frames wait in a 4-frame FIFO. A road that finds the FIFO full is
dropped and counted. Each packet is the unscrambled header `1010`, a flag
(`10` for data, `01` for NULL) and 24 scrambled bits.

* With no frame pending, NULL packets with 24 zero data bits go out. These
  keep the link and the descrambler in step.
* The 24-bit fields of every packet go through one continuous
  self-synchronising scrambler, 1 + x³⁹ + x⁵⁸ (the 10G Ethernet one). It is
  seeded with all ones at reset. A receiver descrambles with the same
  polynomial.
* `para[19]` replaces all words by PRBS-31 (x³¹ + x²⁸ + 1) for link tests.

**Latency**: measured in simulation, the first frame word is on `word` at
most 5 `clk` cycles (~16 ns) after the last bit of the road word has
arrived. Most of the spread is the wait for the next packet boundary.
`gbt_ser` loads the word within a further 6.25 ns, so the design is well
inside the ~50 ns the chip was designed for. A road every BC cannot be
sustained: a frame takes 31.25 ns, so at most 4 roads in 5 BCs get out, and
the FIFO only absorbs bursts.

### Test pattern

With `para[20]`, 15 generators (`serial_pattern`) replace the inputs of
channels 2–16, the chip's first 15 strips. On each BC start every
generator sends a VMM-style frame with the charge `para[26:21]`. A road
covering those strips then returns known charges.

## Pad-TDS

`pad_pulse_det` looks for a rising edge on each of the 96 pad inputs. A pad
is "yes" for a BC if a leading edge fell inside it. Disabled channels
(`para[125:30]`, all enabled at reset) never fire.

The pads form 6 groups of 16. Each group's BC boundary can be moved by 0, 1,
2 or 3 × 6.25 ns (`para[17+2g +: 2]`) to make up for cable lengths. The flags
of each group are collected over their own shifted BC. The flags of all
groups are then released together at the next chip BC start, through a
2-stage buffer.

`pad_frame_builder` forms the frame once per BC and sends it as four 30-bit
words, using the same serializer as the strip-TDS:

| bits | field |
|---|---|
| 119:116 | `1010`, not scrambled |
| 115:20 | flags, pad 95 first |
| 19:8 | BCID |
| 7:0 | CRC-8, x⁸+x⁵+x³+x²+x+1, over bits 115:8 |

The frame is scrambled like the strip frame, with state carried from frame
to frame. PRBS-31 is selected with `para[29]`.

## Configuration and monitoring

Both chips have the same I2C port (`i2c_slave`). It is sampled with `clk`
and handles 10-bit addressing with three-byte transfers:

1. `11110 A9 A8 R/W`
2. `A7..A0`
3. one data byte, written by the master or read from the chip.

A9..A7 must equal the 3-bit `chip_id` wired on the board, so 8 chips can
share a bus. A6..A0 is the register address. SDA is open drain: `sda_oe`
pulls it low.

`cfg_regs` holds the registers. Addresses 0x00–0x1D are 240 parameter bits,
bit `8a+i` in register `a`. Each bit is triple-redundant (`tmr_reg`: three
copies, majority vote, and the voted value is written back every cycle, so a
single upset is repaired). Addresses 0x1E–0x22 are 40 read-only diagnostic
bits. Setting `para[2:0] = 111` makes the diagnostic bits writable, to test
the read-back path.

Strip-TDS parameter bits:

| bits | meaning |
|---|---|
| 14:3 | BCID offset |
| 17:15 | `win_sel`: matching window 25 + 6.25 × `win_sel` ns, 0–4 |
| 18 | BCID+1 extension |
| 19 | PRBS-31 |
| 20 | test pattern |
| 26:21 | pattern charge |
| 28:27 | BC phase |
| 148:29 | road table; entry i at `[29+15i +: 15]` = {band-ID[7:0], start[6:0]} |

The start is the window's first index in the 132-channel numbering, 0–115.

Strip-TDS diagnostic bits:

| bits | meaning |
|---|---|
| 11:0 | last road BCID |
| 19:12 | last road band-ID |
| 24:20 | last road phi-ID |
| 25 | road link locked |
| 33:26 | roads dropped |
| 39:34 | frames sent |

Pad-TDS parameter bits:

| bits | meaning |
|---|---|
| 14:3 | BCID offset |
| 16:15 | BC phase |
| 28:17 | group phases |
| 29 | PRBS-31 |
| 125:30 | channel enables |

Pad-TDS diagnostic bits:

| bits | meaning |
|---|---|
| 11:0 | BCID of last frame |
| 18:12 | number of pads "yes" in it |
| 39:19 | frames sent |

## Where this design departs from the chip as specified

The chip's specification was not complete or consistent. These are the
readings taken:

* **Strip read-out.** An early description speaks of 32 4-to-1 priority
  sequencers. The detailed block diagram and the road description use the
  17-strip window with 8-to-1 selectors and a strip sequencer, and that is
  what is built.
* **Road link.** One passage gives four lines at 160 MHz DDR. The detailed
  description gives two lines at 640 Mb/s with the word format above, and
  the two-line format is built. A road with BCID 0, phi 0 and band 0 looks
  exactly like the idle pair and is not seen.
* **BCID flag.** The flag is set on hits early in BC k+1, which then also
  match trigger k. One sentence describes the flag the other way round (late
  in BC k); the matching rule and the dual-counter description both agree
  with the reading used here.
* **Counter delay.** The delay of the second counter is set by the window
  setting itself, not by a separate delay register.
* **CRC-8.** The polynomial is specified as `0x97` next to a written-out
  polynomial that does not match that number. The Koopman reading of
  `0x97`, x⁸+x⁵+x³+x²+x+1, is used: it is the 8-bit polynomial known for
  Hamming distance 4 at this data length, which is the property claimed.
* **Not built:**
  * the PLLs;
  * the SLVS/LVDS receivers;
  * the sub-clock programmable input delays (analog);
  * the pad-trigger logic and the router (other devices);
  * a "frame generator" that is only named;
  * per-channel enables in the strip-TDS: the 240 parameter bits cannot hold
    132 enables next to the 120-bit road table.
* **This design's own choices** (no source given):
  * the bit assignment of all registers;
  * the FIFO depth of 4 frames and the policy of dropping new roads when it
    is full;
  * the ageing of ring-buffer entries;
  * the "newest hit wins" rule;
  * the field order inside the strip payload and the pad order inside the
    pad frame;
  * MSB-first VMM charge bits;
  * the tie rule of the sequencer (first 15 unless the top end has more
    hits).

## Source files

`rtl/` has one module or package per file:

| file | contents |
|---|---|
| `tds_pkg.sv` | shared constants and structs |
| `tds_top.sv` | top |
| `strip_tds.sv`, `pad_tds.sv` | the two chips |
| `bcid_gen`, `vmm_deser`, `ring_buffer`, `serial_pattern` | hit capture |
| `pad_trig_if`, `pad_lut`, `strip_sel`, `strip_seq` | road matching |
| `strip_frame_builder`, `pad_frame_builder`, `crc_gen`, `scrambler`, `prbs31`, `gbt_ser` | framing and link |
| `pad_pulse_det` | pad edge detection |
| `i2c_slave`, `cfg_regs`, `tmr_reg` | configuration |

Every file opens with a description of its interface and timing.

## Simulation

Every block has a self-checking testbench `tb/tb_<block>.sv`. Each one
checks the block against a model written independently in the testbench,
and ends by printing `TB_RESULT checks=N failures=M`. Shared helpers:

* `tb/tb_ref_pkg.sv`: bit-serial CRC, scrambler, descrambler and PRBS
  models;
* `tb/i2c_bfm.svh`: I2C master tasks.

Three testbenches run a whole design at its default sizes:

* **`tb_strip_tds`** checks the strip-TDS. It configures the chip over I2C,
  then drives random VMM hits on all 132 inputs and road words on the two
  lines. It descrambles and checks every frame against its own model of
  tagging, matching, window and selection, and checks the serial output bit
  by bit against the words. It counts each mechanism and fails if one never
  occurs:
  * link lock;
  * first-15 and last-15 choices;
  * extension matches and excluded BCID+1 hits;
  * a band missing from the table;
  * FIFO overflow (read back from the diagnostic registers);
  * NULL packets;
  * test pattern;
  * PRBS-31;
  * road-to-frame latency, which must be 16 cycles or fewer.
* **`tb_pad_tds`** does the same for the pad-TDS: random pad pulses,
  shifted groups, disabled pads, frame BCID and CRC-8, and PRBS-31.
* **`tb_tds_top`** runs both through `tds_top`, on one shared I2C bus. It
  takes under a minute.

With plain Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_tds_top -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/tds_pkg.sv tb/tb_ref_pkg.sv tb/tb_tds_top.sv
./obj_dir/Vtb_tds_top
```

To run a block's testbench, replace the top module and the testbench file.
Sizes that can be changed are the parameters of the blocks, such as the
FIFO depth, the ring-buffer depth and ageing, and the word width. The
package constants fix the frame formats and the channel counts, which the
link formats depend on.
