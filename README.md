# Digital Video System: a multiprocessor for real-time video picture series

This is synthesizable SystemVerilog for a late-1970s design. The system digitizes X-ray video
picture series in real time, stores them and shows them on a colour monitor with programmable
grey-level and colour transformations. Its main idea is *distributed intelligence*. No central
data-interchange processor does all the work. Instead, several dedicated processors share one
fast bus and two frame buffers:

| bus index (priority) | processor | job |
|---|---|---|
| 0 (highest) | real-time digitizer (RTD) | samples the video at 10 or 5 MHz, keeps a programmed window and fields, writes them into a frame buffer |
| 1 | DVS communication processor | the host computer's word port onto the bus |
| 2 (lowest) | video display processor (VDP) | reads both frame buffers in step with the raster, transforms them through two look-up tables, drives red/green/blue |
| slaves | frame buffer #1, #2 | 32K x 16 bits each (one 256 x 256 picture of 8-bit pixels) |

A video symbol generator (VSG) sits beside the bus with its own host port. It puts coloured text
on the monitor. The original mixed its picture with the VDP's by analog means.

Process synchronisation is done entirely by the bus. The digitizer must never lose a sample, so it
takes the bus from the display processor within one bus cycle. The display processor then carries
on by itself, without any action from the host.

## The RTA bus

The original "real-time asynchronous bus" is self-timed. Here it is built as its **single-clock
equivalent**: each asynchronous edge becomes a registered level change on one clock, nominally
60 MHz. The lines are wired-OR: every unit drives zeros when it is inactive (`rta_backplane`).

- **Arbitration.** A block that needs the bus (BN) raises bus request BR. The bus controller
  answers with grant BG, one clock later, when the bus is not busy (BB). BG runs down a daisy
  chain through the masters. The first one that needs the bus takes it and drives bus use BU,
  which makes up BB. Blocks that do not need the bus pass BG on combinationally.
- **Pre-emption.** A second chain, P_N, starts at 0 at the top and carries "a block above me
  wants the bus" (`p_out = p_in | bn`). When P_N rises at the owner, the owner finishes the word
  in flight and drops BU. The controller then grants again, and the higher block wins in the
  chain. The interrupted master keeps its demand up and gets the bus back later. The release
  takes at most one bus cycle (checked: at most 5 clocks from the request to the release).
- **Word transfer.** The handshake has four phases: the master raises M with address, write flag
  and data; the addressed slave answers S, with read data; the master drops M; the slave drops S.
  That takes **4 clocks per word, 66.7 ns at 60 MHz, i.e. 15 Mwords/s**. The data vector is
  16 bits wide.
- **Block or word mode, chosen automatically.** When a word completes, the active transfer unit
  keeps the bus if the processor already has its next demand up; otherwise it releases the bus.
  A fast producer, such as the digitizer with a backlog in its FIFO or the display fetch with
  room in its FIFO, therefore moves blocks. The host, which offers one word at a time, moves
  single words.

A communication block (`rta_comm_block`) holds a bus request unit (`rta_bus_request`), an active
transfer unit (`rta_active_transfer`, the master) and a passive transfer unit
(`rta_passive_transfer`, the slave). The original's dialogue handler is the routing of outgoing
demands (D_o/A_o) and incoming accesses (D_i/A_i) between these units and the processor. Here
that routing is all it does.

Processor-side handshake (both directions): the demand `d` is held with its address, write flag
and data until a one-clock acknowledge `a`. For reads, `rdata` is valid with `a`.

### Address map (17-bit word addresses, this design's own)

| range | what |
|---|---|
| `0x00000-0x07FFF` | frame buffer #1, word address `y*128 + x/2`, even pixel in the low byte |
| `0x08000-0x0FFFF` | frame buffer #2, same layout |
| `0x10000` + reg | digitizer registers (`RTD_*` in `dvs_pkg`) |
| `0x14000` + reg | display processor registers (`VDP_*`) |
| `0x15000-0x150FF` | VDP look-up table #1 |
| `0x16000-0x16FFF` | VDP look-up table #2 |

## Real-time digitizer

The digitizer is two pipelines, one above the other.

- **Data flow.** The digitizing unit (`rtd_digitizer_unit`) counts from the line and field sync
  pulses. It strobes the converter every 6 clocks (10 MHz) or 12 clocks (5 MHz) and keeps the
  samples of the window x0..x1, y0..y1 (each 0..255). x counts samples at the chosen rate from
  `H_START` clocks after line sync; y counts lines from `V_START` lines after field sync. A 256 x 8
  FIFO (`sync_fifo`) absorbs bus latency. The bus interface unit (`rtd_bus_interface`) packs two
  bytes per word, first byte low, and writes consecutive addresses of the chosen buffer.
- **Control flow.** The action network (`rtd_action_network`) holds the host's instructions and
  sequences the acquisition. A start arms the digitizer for the next field sync. It then enables
  one field in every (skip+1) until the programmed number of fields is taken, drains the FIFO and
  reports `done`. Status also shows `busy` and a sticky FIFO overflow.

With a full 256-sample window, consecutive words land at `y*128 + x/2`. The display processor
shows such a picture directly. A smaller window is stored densely, one line after another.

Registers (offset from `RTD_BASE`):

| offset | name | contents |
|---|---|---|
| 0 | `RTD_CTRL` | bit 0 start (write 1), bit 1 10 MHz, bits 7:4 skip |
| 1-4 | `RTD_X0`, `RTD_X1`, `RTD_Y0`, `RTD_Y1` | window |
| 5 | `RTD_NFIELD` | number of fields |
| 6 | `RTD_DEST` | buffer select |
| 7 | `RTD_DADR` | start word |
| 8 | `RTD_STATUS` | bit 0 busy, bit 1 done, bit 2 overflow |

Configuration writes are ignored while an acquisition runs.

## Video display processor

- **Fetch.** The bus interface unit (`vdp_bus_interface`) restarts at every vertical retrace. For
  each word address of the window it reads the frame buffer #1 word and then the frame buffer #2
  word into a 128 x 16 FIFO, and asks for more while the FIFO has room.
- **Format control.** `vdp_format_control` takes one word pair per two pixels. For each raster
  pixel inside the window it delivers the pixel of both buffers. Pixels outside the window are
  black. A pixel due before its data has arrived is shown black and sets a sticky underrun flag.
- **Programmable processing unit** (`ppu`). The pixel of buffer #1 addresses LUT #1 (256 x 8).
  Selector 1 forms the 12-bit address of LUT #2 (4096 x 9):
  - `{page, LUT1}`: a monadic operation on buffer #1, e.g. a log or exp grey curve or
    pseudo-colour.
  - `{LUT1[7:2], buffer2[7:2]}`: both buffers, either concatenated (intensity in one, colour in
    the other) or dyadic (e.g. subtraction).

  Selector 2 turns the 9-bit word into grey or colour:
  - grey: the low 8 bits drive all three guns;
  - colour: R = [8:6], G = [5:3], B = [2:0], widened to 8 bits.

  The host may rewrite the tables at any time, so they can change every field for animation.
  Reloading all of LUT #2 from the host takes about 0.7 ms (10 clocks per word).
- **Cursor and light pen.** A cross-hair cursor is overlaid in white. The light-pen unit latches
  the raster position of the pixel on screen when the pen fires. The control unit raises
  `lp_irq`, and can move the cursor to the pen.
- **Timing.** `video_timing` runs 5 MHz pixels: 320 per 64 us line, 312 lines per field, and
  256 x 256 visible. RGB leaves four pixel slots after the raster counters, with its sync and
  blank delayed alike. The 5 MHz pixel rate is this design's choice. With it, display and
  acquisition together use 10 of the bus's 15 Mwords/s. At 10 MHz (`PIX_DIV = 6` in
  `video_timing`) the display alone would take 10 Mwords/s.

Registers (offset from `VDP_BASE`):

| offset | name | contents |
|---|---|---|
| 0 | `VDP_CTRL` | bit 0 display on, bit 1 select1, bit 2 select2, bit 3 cursor on, bit 4 cursor follows pen, bits 11:8 LUT #2 page |
| 1-4 | `VDP_X0`, `VDP_X1`, `VDP_Y0`, `VDP_Y1` | window |
| 5, 6 | `VDP_CX`, `VDP_CY` | cursor position |
| 7 | `VDP_LPX` | bit 15 hit, x; reading it clears the hit |
| 8 | `VDP_LPY` | light-pen y |
| 9 | `VDP_STATUS` | bit 0 underrun; reading it clears the flag |

## Video symbol generator

`vsg` holds a 2K x 16 page buffer (`vsg_page_buffer`) with its 2:1 multiplexer. The host side
(`vsg_io_interface`) gets the buffer only during the vertical retrace: 24 lines, 1.536 ms every
20 ms. A request made during the picture waits for it. The rest of the time the CRT controller
(`vsg_crt_controller`) reads the page in raster order. The page holds 64 x 32 cells of 8 x 8
pixels at 10 MHz, 512 x 256 visible.

Each page word is laid out as:

| bits | field |
|---|---|
| 7:0 | character code |
| 10:8 | symbol colour |
| 13:11 | background colour |
| 14 | intensity |
| 15 | blink |

The character generator is a 256 x 8-line RAM that the host loads at I/O addresses 0x800-0xFFF.
Bit 7 of each line is the leftmost pixel.

## What follows the original and what is this design's choice

Taken from the original description:
- the set of processors and their bus priorities;
- the bus signals (BR, BB, BG, P_N, BN, BU, M, S, D/A) and their roles: daisy-chained grant,
  pre-emption within one bus cycle, automatic block/word mode, 15 Mwords/s, 16-bit data;
- the frame buffer size;
- the digitizer's window limits, sampling rates, field selection, FIFO size and byte-to-word
  path;
- the VDP's FIFO size, the sizes and widths of both look-up tables and its two selectors;
- the VSG's 2K x 16 page and its retrace-only host updates.

Chosen here, because the description leaves it open:
- the single-clock form of the bus and the four-clock word;
- the address map and register layouts;
- sync offsets, converter latency and pixel rates;
- the 4-bit page register feeding selector 1;
- using the upper six bits on the two-buffer path, and the colour field order;
- the cursor shape;
- the VSG word format, cell size, blink rate and the loadable character generator.

Known departures and limits:
- Every "microprogrammed" unit (digitizing unit, bus interface units, VDP control unit, CRT
  controller) is a fixed state machine or register set. No microcode exists to reproduce.
- Buffer #2 alone can only be displayed at 6-bit resolution, through the two-buffer path with
  LUT #1 set to zero. This follows the processing unit's structure, in which only buffer #1
  feeds LUT #1. A monadic operation on buffer #2 at full resolution would need a swap
  multiplexer in front of LUT #1, which is not built.
- The original quotes both a 60 ns bus cycle and 15 Mwords/s. Here a word takes 4 clocks of
  60 MHz, i.e. 66.7 ns, which gives the 15 Mwords/s.
- The VDP always fetches both buffers, even for a monadic operation on buffer #1.
- Window x limits of the display are word aligned: x0 is rounded down and x1 up to an odd pixel.
- The digitizer's x range is 0..255 samples. At 10 MHz a window therefore covers at most about
  half of the active line, not the 512 pixels a full line would give.
- Not built:
  - the analog parts: the converter, the sync separator, the D/A converters and composite-video
    generation, and the analog mixing of the VSG and VDP pictures. The design takes digital sync
    pulses and converter data and gives digital RGB.
  - the graphical display processor, which is specified only in outline;
  - the FFT processor and the optional 128K x 16 buffer;
  - the host computer;
  - the later improvements the original suggests: programmable grey-level resolution and a
    32- or 64-bit data vector.

## Files and simulation

`rtl/` holds one module or package per file. `dvs_pkg.sv` holds the bus structs, the address map
and the register offsets. `dvs_top.sv` is the whole system. `tb/` holds one self-checking
testbench per unit group. Each prints `TB_RESULT checks=N failures=M`.

| testbench | covers |
|---|---|
| `tb_rta_bus` | bus, arbitration, pre-emption, block and word modes, frame buffers, host port |
| `tb_sync_fifo` | FIFO |
| `tb_rtd` | digitizer on a reduced raster, 10 and 5 MHz, skip, odd windows |
| `tb_ppu` | table cascade, all selector settings |
| `tb_video_timing` | raster lengths |
| `tb_vdp` | display processor, every pixel of whole fields, light pen |
| `tb_vsg` | symbol generator at full timing, both blink phases |
| `tb_dvs_top` | end to end at the default sizes and full CCIR-like timing |
| `tb_dvs_workloads` | default sizes: timed LUT #2 reloads, a 5 MHz field into buffer #2 shown through selector 1, table animation, a whole VSG page written in the retrace, a series of 8 consecutive fields read back |

`tb_dvs_top` digitizes a full 256 x 256 field while the display reads the buffers. It then checks
every displayed pixel of a field. It also counts block transfers, word transfers, pre-emption of
the display, the end of acquisition, a retrace-delayed VSG access and a light-pen message. It runs
in a few seconds.

`tb_dvs_workloads` also runs at the default sizes and takes about half a minute. It reports the
LUT #2 reload time (40960 clocks), the retraces a full page write needs (one) and the time an
8-field series takes (8.07 field periods).

`adc_model.sv` is a behavioural model of the video source and converter, used by the testbenches.

Build and run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/dvs_pkg.sv tb/tb_dvs_top.sv --top-module tb_dvs_top -o sim
    ./obj_dir/sim

Memories are plain arrays with registered reads; synthesis maps them to RAM. The design has no
latches and no combinational loops. The grant daisy chain is combinational through the masters,
as in the original.
