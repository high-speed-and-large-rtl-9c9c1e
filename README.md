# Solid state recorder for radar video signals

This RTL records the video of an active/passive radar homing seeker. The
seeker gives three pairs of I/Q video signals. Each signal is sampled at
60 MSPS with 12 bits, which makes 360 MSPS in all. The samples go into six
independent flash arrays of 8 x 128 MByte each, 6 GByte in total. On the
ground the data is read back over USB 2.0, newest data first.

The hard part is the data rate. One channel makes 60 MWord/s while its
sampling window is open. A flash chip takes only 20 MByte/s (10 MWord/s)
into its page buffer, and then needs 200 to 700 us to program the page. The
design meets this in three ways:

* Every channel has its own A/D converter, FIFO and flash array. There is no
  analog multiplexing, and the load is split six ways.
* A FIFO takes the sample bursts and drains them at 10 MWord/s.
* Pages are written **circulatorily** across the eight chips of a channel.
  Writing a 2 kByte page buffer takes about 103 us. Once the buffer of chip k
  is full, its programming starts and writing moves on to chip k+1. When the
  writer comes back to chip k, seven page writes have passed (about 720 us),
  so chip k has finished even the slowest programming.

Everything runs on the single 60 MHz sample clock that comes with the video
signals.

## Block structure

```
ssr_top
 ├─ acq_timing        S2/DG/PWS time sequence, 48-bit time count   (acquisition control card)
 ├─ mode_ctrl         five function modes                          (acquisition control card)
 ├─ 3 cards x 2 channel_unit (I, Q)                                (acquisition and storage cards)
 │    ├─ frame_formatter   12 -> 16 bit words, time + sync mark per group
 │    ├─ sample_fifo       16K x 16 burst buffer
 │    ├─ flash_array_ctrl  circulatory write, erase, index, inverted read
 │    └─ nand_phy          3-clock flash bus cycles on a shared 8-bit bus
 └─ backplane_reader  reads the channels one by one into the USB FIFO (USB control card)
```

`ssr_pkg` holds the shared constants, the flash bus cycle type and the mode
enumeration. Channel 2c is the I channel of card c, and channel 2c+1 its Q
channel.

## Acquisition time sequence (`acq_timing`)

Recording runs while the power-on signal S2 is high. In every period of the
trigger DG, the window opens a delay after DG's falling (trailing) edge and
stays open until DG rises again. PWS, sampled at that falling edge, selects
the delay: `DELAY1_CYC` when PWS is low, `DELAY2_CYC` when it is high. The
delays are not fixed numerically; the defaults are 1 us and 2 us (60 and 120
clocks).

The three radar inputs pass two-flop synchronisers. With the synchronised DG:

* the window is first high DELAY clocks after the falling edge;
* it is last high in the clock of the rising edge;
* `group_end` pulses in the next clock.

So a DG low time of L clocks gives L - DELAY + 1 samples. A DG rising edge
inside the delay cancels that window. S2 falling inside a window closes the
window and still gives its `group_end`.

`time_cnt` is zero while S2 is low and counts clocks while S2 is high. One
LSB is 16.667 ns, so 48 bits cover 2^48 / 60 MHz = 4 691 249 s.

## Stored data format (`frame_formatter`)

The width of the DG pulse varies, so the number of samples per window varies
too. To make the stream parseable, every group of samples is followed by a
mark. The stored words are:

| word | content |
|---|---|
| sample | `0000` & 12-bit A/D code, one per window clock |
| mark 0..2 | time[15:0], time[31:16], time[47:32] (time latched at `group_end`) |
| mark 3 | `0000h` |
| mark 4 | `FFFFh` |

Words go to flash low byte first, so the mark appears in memory as six time
bytes, lowest first, followed by `00 00 FF FF`. A sample word can never be
`FFFFh`, because its top nibble is always 0.

## Flash array and its controller (`flash_array_ctrl`, `nand_phy`)

The chips are treated as standard large-page NAND parts:

* 2048-byte pages, 64 pages per block, 65536 pages per chip;
* commands 80h/10h (program), 00h/30h (read) and 60h/D0h (erase);
* two column and two row address cycles.

The eight chips of a channel share one 8-bit bus and have separate CE# and
R/B# lines. `nand_phy` runs one bus cycle per request in three clocks: the
strobe is low for two clocks and high for one. Back-to-back requests
therefore give exactly 20 MByte/s. A read byte is sampled 33 ns after RE#
falls.

**Layout.** Block 0 of every chip is reserved. Data page p (p = 0, 1, 2, ...)
lives on chip `p mod 8`, row `64 + p div 8`. That gives 8 x 65472 data pages
per channel.

**Recording.** The controller:

1. waits for the chip that page p belongs to to be ready;
2. sends 80h and the address;
3. streams 2048 bytes from the FIFO;
4. sends 10h;
5. moves straight on to page p+1.

It waits only if a chip is still programming when its turn comes round again;
`stall` shows such waits. When recording stops and the FIFO has drained, a
partly filled last page is programmed as it is. After that the **index page**
is written (chip 0, row 0):

| bytes | content |
|---|---|
| 0-3 | number of pages written |
| 4-5 | valid bytes in the last page |
| 6-7 | signature 5AA5h |

All fields are little-endian. A full array takes no more words (`full`). The
FIFO then overflows, and its sticky `overflow` flag is set.

**Reading.** The controller reads the index first. If the index is blank or
invalid, the channel counts as vacant and returns no words. Otherwise it
reads the pages from the last written one down to page 0, newest first. The
bytes within each page stay in their stored order. Only the valid bytes of
the last page are returned. Reading runs at about four clocks per byte, plus
the chip's page read time. With a 25 us page read that is about 12.6 MByte/s.

**Erasing.** The controller erases every block of every chip, cycling
through the chips, so all eight erase in parallel. A recording always starts
at data page 0, so the arrays must be erased between recordings.

## Modes (`mode_ctrl`)

Holding is the rest state: flash contents are kept and nothing is written.
From holding:

* S2 high starts **recording**. Recording ends once S2 is low and every
  channel is idle, which means its data and index are written.
* `cmd_erase` starts **erasing**. It ends when all channels are idle.
* `cmd_read` starts **reading**. It ends on the read sequencer's `done`.
* `cmd_check` starts **self-checking**. It ends on `check_done`.

What the self-check should test was not specified. The mode therefore exists
only as the `check_req`/`check_done` ports, for separate check logic to
connect to.

## Read path (`backplane_reader`)

The reader starts channel 0, passes its words to the USB controller FIFO
(`usb_data`, `usb_wr`, `usb_full`) and waits for that channel's done. It then
moves to channel 1, and so on up to channel 5. The stream carries no channel
header. `read_ch` tells which channel is being read, and the host can find
the groups from their `0000h FFFFh` sync words.

## What is this design's own choice

These parts follow the recorder's description:

* the window timing;
* the word and mark formats;
* low-byte-first storage;
* the 8-chip circulatory write;
* the index area;
* the inverted read order;
* channel-by-channel reading;
* the five modes;
* all the sizes and rates above.

These parts are chosen here:

* the delay values;
* the FIFO depth (16K words);
* the NAND command set and bus timing;
* the index page layout and the reserved block;
* page granularity of the inverted read (pages newest first, bytes in order);
* erase-before-record;
* how modes are entered and left;
* the USB FIFO interface and the channel order.

Not part of the RTL: the A/D converters (AD9432), the flash chips, the USB
2.0 chip, the isolation and power circuits, the PCB measures for channel skew
(< 0.55 ns), and the self-check function itself.

## Simulation

The testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. `tb/nand_flash_model.sv` is a behavioural
NAND chip model with a sparse page store and busy times in clocks, and
`tb/nand_array_model.sv` puts eight of them on one bus.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_ssr_top -y rtl -y tb +libext+.sv -Irtl rtl/ssr_pkg.sv tb/tb_ssr_top.sv
./obj_dir/Vtb_ssr_top
```

| testbench | what it shows |
|---|---|
| tb_acq_timing | delay per PWS, window edges, cancelled window, time count |
| tb_mode_ctrl | all mode transitions and start pulses |
| tb_frame_formatter | sample words and mark words against a reference list |
| tb_sample_fifo | order, level, full, sticky overflow, clear |
| tb_nand_phy | bus cycles, 2-clock strobes, 3 clocks per back-to-back cycle |
| tb_flash_array_ctrl | chip rotation, flash contents, 20 MByte/s strobes, no stall, index, inverted read, > 10 MByte/s read, full array, vacant read |
| tb_channel_unit | whole channel: record, drain, read back, FIFO overflow |
| tb_backplane_reader | channel order, USB full flag, word order |
| tb_ssr_top | whole recorder at reduced size (256 B pages, 16 pages per chip, 257-word FIFO) through every mode, including wait on busy chips, overflow and full arrays |
| tb_circ_write_rate | full 2 kByte pages fed continuously: with 700 us programming no wait and 6177 clocks (103 us) per page; with 900 us programming the writer waits |
| tb_ssr_full | whole recorder at full size: erase of all 1024 blocks, ten DG periods (about 24 pages per channel), read back and check, read rate |

The data checks in the two end-to-end benches do not depend on the design's
internals. Each A/D input is a ramp, so every group must come back as
consecutive values of the expected length. The sample must be equal on all
six channels in each clock. The time marks must step by the DG period.

## Caveats

* Flash timing (tWB, read strobe sampling) is set for 60 MHz and typical
  large-page NAND data sheets. Check it against the chip actually used.
* The A/D pipeline latency is not compensated. The window is aligned to DG
  as seen at the logic.
* The effective FIFO capacity is DEPTH + 1 words, counting its output
  register.
* verilator reports SYNCASYNCNET on `rst_n`. The cause is that assertions use
  it in `disable iff`. It is not a circuit issue.
