# AGIPD readout FPGA: veto handling and train-builder formatting

The AGIPD detector at the European XFEL records X-ray pulses that come in
trains: up to 2700 bunches per train, at 4.5 MHz. Each front-end ASIC has only
352 analog storage cells, so it cannot keep every bunch. The XFEL clock &
control (C&C) system sends a **veto** for each bunch it does not want. A
vetoed bunch's storage cell can then be overwritten by a later bunch. After
the train, the readout FPGA has to know which cell holds which bunch. It then
sends the kept images, in bunch order, to the XFEL train builder in its fixed
train format (XTDF) over 10 Gigabit Ethernet.

This repository holds synthesizable SystemVerilog for that train path in one
readout FPGA:

```
 VETO line ──► veto_decoder ──VETO(bunch)──┐
                                           ▼
 FAST line ──► fast_decoder ──START──► veto_handler ──(bunch table)──► train_builder ──► XTDF stream
                                        ├ bunch_lut  (2700 x 16 bit)     ├ desc_extractor    (to 10GE MAC)
 bunch_strobe ─────────────────────────►└ cell_fifo  (reusable cells)    └ image_addr_map ◄──► DDR2 image memory
```

`agipd_readout_top` connects these blocks. The DDR2 memory with its
controller and the 10GE MAC are outside the RTL and connect through ports.

## The bunch table and storage-cell reuse

This is the part of the design that takes the most care.

The **bunch table** (`bunch_lut`) has one 16-bit entry per bunch. Bit 15 is
the veto flag (1 = vetoed, 0 = kept). Bits 14:0 hold the storage cell the
bunch was written to. So `16'h8000` means "bunch vetoed, was in cell 0", and
`16'h0001` means "bunch kept, in cell 1".

`veto_handler` fills the table with a three-state machine, stepped by one
`bunch_strobe` per bunch:

1. **IDLE.** A START command on the FAST line (the train trigger) resets the
   bunch counter and empties the reusable-cell FIFO.
2. **Acquire the first 352 bunches.** The ASIC fills cells 0..351 in order,
   whatever the veto says. Bunch *n* gets the entry `{0, n}`.
3. **Acquire the rest (bunches 352..2699).** Each bunch takes the cell at the
   head of the **reusable-cell FIFO** (`cell_fifo`) and gets the entry
   `{0, cell}`. If the FIFO is empty, no cell is free: the bunch is written as
   `{1, 0x7fff}` and counted in `no_cell_cnt`.

A VETO for bunch *b* arrives some time after that bunch was taken. It is
handled as a read-modify-write on the table's second port:

- The entry of *b* is read.
- If the entry is still kept, its flag is set.
- Its cell ID is pushed into the FIFO, so a later bunch overwrites that cell.

A VETO is dropped (counted in `dropped_veto_cnt`) in three cases: it names a
bunch that has not been taken yet, it comes while the handler is idle, or it
repeats an earlier veto. After the last bunch, the handler waits
`DRAIN_CYCLES` clocks so the vetoes of the last bunches can still arrive.
Then it pulses `train_done`.

**Worked example.** Suppose only bunches 1–4, 0x10–0x13, 0x15, 0x28–0x2a,
0x2c, 0x2d, 0x2f, 0x9b, 0x7fe and 0x7ff are kept, and every other bunch is
vetoed:

- After the first 352 bunches, the FIFO holds the 336 vetoed cells:
  0, 5, 6, … 0xf, 0x14, 0x16, 0x17, …
- Each of bunches 352..0x7fd pops a cell and then returns it when its own veto
  arrives. That is 1694 pops, which rotate the FIFO by 1694 mod 336 = 14
  places.
- So bunch 0x7fe gets cell 0x17 and bunch 0x7ff gets cell 0x18. These are
  exactly the cell IDs of the reference descriptor list for this train.

The testbenches check this example bit for bit.

The table has two ports. Port A carries the acquisition writes. When the
handler is idle, port A is handed to the train builder. Port B carries the
veto read-modify-writes. They never touch the same address at the same time,
because a veto only names bunches that have already been written.

## Clock & control lines

Both lines carry one bit per FEM clock (about 99 MHz, 22 clocks per bunch).
They idle at 0; the first 1 begins a command, and fields are sent MSB first.

| line | command | start bits | payload |
|------|---------|-----------|---------|
| VETO | VETO | `110` | 12-bit bunch ID + `0000` |
| VETO | NO VETO | `101` | 12-bit bunch ID + `0000` |
| VETO | GOLDEN | `111` | 12-bit bunch ID + `0000` |
| VETO | reserved | `100` | none |
| FAST | START | `1100` | 64-bit train ID, 8-bit bunch pattern index, 8-bit checksum |
| FAST | STOP | `1010` | none |
| FAST | RESET | `1001` | none |
| FAST | reserved | `1111` | none |

A VETO frame is 19 bits long, so the line carries at most one veto per bunch
(22 clocks).

What each command does here:

- Only VETO changes the bunch table.
- NO VETO and GOLDEN are counted; the table has no field for "golden".
- START is the train trigger. Its train ID, bunch pattern index and checksum
  are brought out, but the checksum is not checked.
- STOP and RESET are decoded and brought out.
- A frame with non-zero trailing bits, or an unknown FAST code, is counted as
  an error.

## The XTDF train format

A train leaves as 64-bit words. The first byte on the wire is in bits
[63:56]. `out_sof` marks the first word and `out_last` the last one. The
sections, in order:

| section | size | content |
|---------|------|---------|
| header | 64 B | `58544446 beefface` ("XTDF"), major version 1 (4 B), minor version 0 (4 B), train ID (8 B), data ID (8 B), link ID (8 B), number of images (8 B), zeros |
| images | N × 131072 B | the images, in pulse-ID order |
| cell IDs | 2 B per image | padded with zeros to a multiple of 32 B |
| pulse IDs | 8 B per image | the 16-bit pulse ID in the first 2 B, then 6 zero bytes; padded to 32 B |
| status | 2 B per image | zero; padded to 32 B |
| length | 4 B per image | 0x00020000 (131072), most significant half first; padded to 32 B |
| detector specific | 2 B per bunch | the whole bunch table (2700 entries); padded to 32 B |
| trailer | 32 B | checksum (16 B, zero), status (8 B, zero), `58544446 deadabcd` |

For the 18-pulse example train, the cell-ID block starts with the words
`0001 0002 0003 0004 | 0010 0011 0012 0013 | …` and the length block reads
`0002 0000 0002 0000`. The end-to-end test checks these literally.

`train_builder` first runs `desc_extractor`. This scans the bunch table at
one entry per clock and keeps the (pulse ID, cell ID) of every good bunch.
Because the scan goes in bunch order, the descriptors come out in pulse-ID
order. Next the builder sends the header. Then, for each image, it requests
the image's buffer from memory and passes the data through at one word per
clock. The other sections are built 16 bits at a time and packed four to a
word.

## Image sorting modes

Images sit in DDR2 in one buffer per storage cell. In the A/D modes there are
two frames per cell (A and D), so 704 buffers. `image_addr_map` picks the
buffer, and its byte address is buffer × 131072:

| `sort_mode` | A frame | D frame | images per pulse |
|-------------|---------|---------|------------------|
| `SORT_SINGLE` | cell | – | 1 |
| `SORT_AD_INTERLEAV` | 2·cell | 2·cell+1 | 2 |
| `SORT_AD_SEPARATE` | cell | cell+352 | 2 |

In both A/D modes the train carries A, D, A, D … in pulse order. Every image
has its own descriptor, so each cell ID and pulse ID appears twice. The
header's image count is then twice the number of good pulses.

## Top-level interface (`agipd_readout_top`)

- **Clock and reset:** `clk` (FEM clock) and `rst_n` (asynchronous,
  active low). Everything runs on `clk`.
- **C&C inputs:** `veto_in`, `fast_in`, and `bunch_strobe` (one pulse per
  bunch).
- **C&C outputs:** the decoded START fields `cc_train_id`,
  `cc_bunch_pattern` and `cc_checksum`, plus `cc_stop` and `cc_reset`.
- **Configuration:** `sort_mode`, `data_id` and `link_id`. These are sampled
  when a train starts being built.
- **Memory read:**
  - The request is `mem_req_valid/ready` with `mem_req_buffer` and
    `mem_req_addr`.
  - The answer is exactly 16384 words on `mem_data_valid/ready/data`.
- **Train stream:** `out_valid/ready/data/sof/last`.
- **Status:**
  - `train_count` is the train ID in the header: an internal counter of
    accepted STARTs, where the first train is 1.
  - `acq_busy`, `builder_busy` and `train_sent` show progress.
  - `num_images` and `bunch_scaler` give sizes and position.
  - The counters `veto_cnt`, `reuse_cnt`, `no_cell_cnt` and
    `dropped_veto_cnt` cover the current train.
  - The counters `noveto_cnt`, `golden_cnt`, `veto_frame_err_cnt`,
    `fast_frame_err_cnt` and `overrun_cnt` count since reset.

A START is ignored (and counted in `overrun_cnt`) in two cases: a train is
still being acquired, or the previous train is still being sent.

Parameters, each with its default: `NUM_BUNCHES` = 2700, `NUM_CELLS` = 352,
`IMAGE_BYTES` = 131072 and `DRAIN_CYCLES` = 64.

## Timing and capacity

- **Descriptor scan:** `NUM_BUNCHES` + 2 clocks.
- **Images:** one 64-bit word per clock when memory and MAC keep up.
- **Other sections:** two clocks per 16-bit unit. For the 2700-entry bunch
  table this is about 5.4 k clocks.
- **Worst case at 99 MHz:**

  | case | images | image data | sending time |
  |------|--------|------------|--------------|
  | single-image mode | 352 | 46 MB | about 58 ms |
  | A/D modes | 704 | 92 MB | about 117 ms |

  The sending time is 6.3 Gbit/s of datapath against the 10GE link. At the
  XFEL train rate of 10 Hz (100 ms per train), a full A/D train therefore does
  not fit on this clock. A faster or wider stream clock would be needed, with
  a clock-domain crossing that is not part of this RTL.
- **Memory:** the design stores about 54 kbit:

  | store | size |
  |-------|------|
  | bunch table | 2700 × 16 bit |
  | cell FIFO | 352 × 9 bit |
  | descriptor RAM | 352 × 21 bit |

## Design choices beyond the reference description

The train format and the veto flow fix the structure above. The following
points are this design's own choices:

- **Serial framing:** the lines idle at 0, fields go MSB first, and frames
  are checked for errors.
- **Bunch timing:** `bunch_strobe` comes in as an input.
- **Drain wait:** the `DRAIN_CYCLES` wait after the last bunch.
- **Cell exhaustion:** a bunch that finds no free cell is written as
  `{veto, 0x7fff}`.
- **Dropped vetoes:** early or idle vetoes are dropped.
- **Zero fields:** the checksum and both status fields are sent as zero,
  because their content is not defined.
- **Train ID:** it comes from the internal counter, not from the START
  payload.
- **Field layout:** the pulse-ID field is laid out as above, and the image
  count covers both A and D frames.
- **One clock:** a single clock domain.
- **Where the table is built:** in the multi-module system the control FPGA
  holds the bunch table and sends it, with the train ID, to the readout
  boards. That link's format is not defined, so here each readout FPGA
  builds the table itself from the VETO line, using the same reuse rule.

Not in this RTL:

- DDR2 controller
- 10GE MAC/IP stack
- pixel descrambling
- ADC delay adjustment
- the serial link between the control FPGA and the readout FPGAs, whose
  frame is only known as preamble, command, address, length and data
- the control FPGA (bunch-table master, embedded processor, ASIC periphery
  state machine), the veto unit that merges veto sources, and the ADC
  readout of the ASIC data

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_veto_decoder`, `tb_fast_decoder`: random command streams, with field
  values and timing checked.
- `tb_bunch_lut`, `tb_cell_fifo`: random traffic against reference models.
- `tb_image_addr_map`: every cell in every mode.
- `tb_veto_handler`: three full trains against a model of the reuse rule.
  They cover the worked example, cell exhaustion, and random vetoes with
  random latency.
- `tb_desc_extractor`: scan result, scan time and the 352-descriptor cap.
- `tb_train_builder`: all modes, with and without memory gaps and output
  back-pressure. It compares word for word with the byte-level XTDF model in
  `tb/xtdf_ref_pkg.sv`.
- `tb_agipd_readout_top`: the end-to-end test at full default sizes. Four
  trains go through the serial lines: the worked example, both A/D modes and a
  cell-exhaustion train. It checks every output word. It also requires that
  each mechanism occurred at least once: veto, reuse, exhaustion, dropped
  veto, NO VETO, GOLDEN, START overrun, STOP, RESET, frame error, all three
  sort modes, back-pressure and memory gaps. It runs about 10 M clocks in a
  few seconds.

`tb/ddr2_image_model.sv` is a behavioural memory. Word *w* of buffer *b* is
`{b, 16'hc0de, w}`, so misplaced images are easy to spot.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/agipd_pkg.sv tb/xtdf_ref_pkg.sv tb/ddr2_image_model.sv \
    tb/tb_agipd_readout_top.sv --top-module tb_agipd_readout_top
./obj_dir/Vtb_agipd_readout_top
```

Other testbenches build the same way: name the package first and the
testbench last. To change sizes, override the top's parameters. The tables,
FIFO and descriptor RAM scale with `NUM_BUNCHES` and `NUM_CELLS`. The image
size only changes the word counts.
