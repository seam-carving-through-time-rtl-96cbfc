# Seam carving through time: energy accelerator for FPGA fabric

Speeding a video up by 1.5x uniformly squeezes everything, including the
parts a viewer cares about. Seam carving through time instead removes
*sheets* of pixels along the time axis: at every spatial position, a
pixel is dropped at a time step where removing it changes little. Quiet parts
of the video are therefore shortened more than busy parts. Each removal
needs a fresh *energy map*. The energy of a pixel says how much the video
would change if that pixel were cut out. Recomputing the map after every
removed seam is the repetitive, data-parallel part of the algorithm. This
RTL moves that part into FPGA fabric.

The full system has three parts:

* a host PC that converts video to and from raw pixel arrays;
* an embedded ARM processor that finds and removes low-energy seams in
  software and controls a DMA engine;
* the programmable fabric, which holds frames in block RAM and computes
  their energy maps.

This repository contains the fabric part:

* `frame_buffer`: a four-bank frame memory;
* `energy_accel`: the energy computation accelerator;
* `seam_pl_top`: the top, which wires the two together.

The processor, the DMA engine, the DDR3 memory, the AXI interconnect and the
Ethernet link are external. They connect to `seam_pl_top` through plain
ports.

## Frame planes and how they sit in memory

The accelerator does not work on video frames in the usual sense. Seams are
cut along time, so the unit of work is a *frame plane*: every pixel at one
horizontal position, arranged as a 2-D array.

* A frame plane has `ROWS` = 320 rows, one for each position on the other
  spatial axis.
* Each row is the history of one pixel over time, up to 180 time steps for
  a 7.5 s clip at 24 fps.
* Rows are padded to `T_PAD` = 256 time steps, so each frame is aligned to
  a power-of-two boundary for the DMA engine.

Element sizes:

| item   | bits | per 1024-bit BRAM word |
|--------|------|------------------------|
| pixel  | 32: three 8-bit colour channels in bytes 0..2, byte 3 unused | 32 |
| energy | 16   | 64 |

Words are little-endian. Element `i` of a word sits at bits `[W*i +: W]`, so
pixel 0, the earliest time step, is in the lowest 32 bits. Slicing the word
the "big-endian" way reverses time within every word. Pay attention to this
when you connect other logic to these buffers.

Layout of one bank, with the default sizes and word addresses inside the
bank:

| words       | content | address of time step `t` in row `r` |
|-------------|---------|-------------------------------------|
| 0..2559     | pixels, 8 words per row    | word `r*8 + t/32`, pixel `t%32` |
| 2560..3839  | energies, 4 words per row  | word `2560 + r*4 + t/64`, energy `t%64` |

There are `BANKS` = 4 banks. That makes 4 x 3840 x 1024 bits, which is
15 Mib of block RAM.

## The energy function

For two pixels, `delta(a,b) = (Ra-Rb)^2 + (Ga-Gb)^2 + (Ba-Bb)^2`. The energy
of the pixel at time `t` in a row is

    E(t) = delta(p[t-1], p[t+1])

This is a *forward* energy. It does not measure how different the pixel is
from its neighbours. It measures how different its two temporal neighbours
are from each other, because those two become adjacent once the pixel is
removed. As a result, cheap cuts are the ones that leave no visible jump.

Two details are design choices made here:

* **Saturation.** The exact sum can reach 3 x 255^2 = 195075, which needs 18
  bits, but energies are stored in 16 bits. `pixel_diff` saturates the sum
  at 65535. All small energies keep their exact values and order. Large
  ones, which no seam would choose anyway, are clipped.
* **Row ends.** At `t = 0` and `t = T_PAD-1` one neighbour does not exist.
  The edge pixel takes its place, so `E(0) = delta(p[0], p[1])`. Padding
  past the real clip length is processed like any other data. The processor
  ignores those energies.

The squares are built in plain logic (absolute difference, then an 8x8
multiply). There are no dedicated multiplier blocks. A full energy word
uses 64 `pixel_diff` lanes (`energy_word`).

## The accelerator's schedule

Each energy word covers 64 time steps, which is two pixel words. It also
needs one pixel on each side: the last pixel of the word before the pair
and the first pixel of the word after it. So for every word it writes,
`energy_accel` reads two words. It keeps what it has read in a small shift
register:

* `pair_lo` and `pair_hi` hold the two words being worked on;
* `prev_pix` holds the last pixel of the word before them.

When the word after the pair arrives from memory, its first pixel completes
the window. `energy_word` then computes all 64 energies in that cycle and
they go into a register. The arriving word becomes the new `pair_lo`.

The accelerator drives one BRAM port, and reads and writes share it. A write
takes the port whenever a computed word is waiting. Otherwise the next read
of the row is issued. After the row's last write comes one turnaround cycle,
in which the row counter moves on. For 8 pixel words per row the port
carries:

    cycle: 0  1  2  3  4  5  6  7  8  9  10 11 12
    op:    R0 R1 R2 R3 W0 R4 R5 W1 R6 R7 W2 W3 turn

Read data arrives one cycle after the read. For example, W0 needs words 0
to 2 plus the first pixel of word 2, and word 2 arrives in cycle 3. The last
energy word of a row (W3) is computed when word 7 arrives, with the
row-end substitution.

The timing works out as follows:

* A frame plane costs `ROWS * (WPR + WPR/2 + 1) + 1` cycles, where
  `WPR = T_PAD/32`. The final `+1` is the cycle in which `done` pulses.
* At the defaults that is 320 x 13 + 1 = **4161 cycles**.
* At a 50 MHz fabric clock this is about 12000 frame planes per second.
  The system needs 2400.
* The count does not depend on the data. The testbenches check it exactly.

The slot order and the turnaround cycle are one schedule that gives this
cycle count. They are not a copy of a known netlist.

## Multibuffering and the two memory ports

`frame_buffer` is a true dual-port RAM:

* port A belongs to the accelerator;
* port B belongs to the DMA engine, which is brought out as the `dma_*`
  ports of the top.

Both ports have a one-cycle read latency and return the old data on a read
during a write. With four banks, the DMA can load the next frame plane and
drain the previous plane's energies while the accelerator computes the
current one. Loading takes 2560 cycles and draining 1280, which is 3840
cycles and less than the 4161 of a computation. Transfers can therefore hide
completely behind computation. In simulation, a stream of planes runs at
4162 cycles per plane.

Bank ownership is the controlling software's job. The hardware only checks
it: an assertion in `seam_pl_top` fires if the DMA port touches the bank the
accelerator is working on, and one in `frame_buffer` fires if both ports are
in the same bank in one cycle.

## Interface of `seam_pl_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `acc_start` | in | 1 | start pulse, taken while idle |
| `acc_bank` | in | 2 | bank to compute, latched at start |
| `acc_busy` | out | 1 | high from the cycle after start through the done cycle |
| `acc_done` | out | 1 | one-cycle pulse when the energy map is complete |
| `dma_en`, `dma_we` | in | 1 | DMA port enable and write enable |
| `dma_bank` | in | 2 | bank for the DMA access |
| `dma_addr` | in | 12 | word address inside the bank, see the layout table |
| `dma_wdata` | in | 1024 | word written |
| `dma_rdata` | out | 1024 | word read, valid the cycle after the read |

Sequence for one frame plane:

1. Write the 2560 pixel words into a free bank.
2. Pulse `acc_start` with that bank number.
3. Wait for `acc_done`.
4. Read the 1280 energy words that follow the pixels.

`acc_start`, `acc_bank`, `acc_busy` and `acc_done` are plain signals. The
interface does not say how the processor reaches them. In a Zynq-style
system they would sit behind a small memory-mapped register block or GPIO,
which is not part of this RTL.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`  | 320 | rows per frame plane |
| `T_PAD` | 256 | time steps per row, padded; a multiple of 64 |
| `BANKS` | 4   | frame buffers in the BRAM |

Word widths and element sizes are fixed in `seam_pkg`.

## What the sizes cover

| workload | fits at the defaults? |
|----------|-----------------------|
| 320 x 180 frame planes, clips up to 7.5 s at 24 fps | yes: 180 time steps of 256 |
| test clips of up to 6.4 s at 30 fps | yes: 192 time steps |
| 360p video (640x360) | no: its planes have 360 rows, but a bank holds 320 |

For 360p, set `ROWS = 360`. Four banks then need 16.9 Mib of BRAM, which
still fits the 19.2 Mib of the ZC706's Zynq-7045.

## How far to trust it, and where it is this design's own

These parts are taken from the system described:

* the energy formula;
* the element and word sizes;
* little-endian packing;
* two reads per write through a shift register;
* 256-step padding;
* four buffers with energies stored separately;
* the 4161-cycle frame time, which this schedule reproduces exactly.

These are choices made here, where the description gives no detail:

* saturation of energies at 65535;
* edge replication at row ends;
* the exact port schedule and turnaround cycle;
* the bank/offset addressing and the in-bank layout;
* one-cycle BRAM latency;
* the start/bank/busy/done control handshake;
* the asynchronous reset.

Outside the scope of this RTL: the seam search and removal (software on
the processor), the DMA engine and AXI interconnect (vendor IP), DDR3, the
Ethernet path, and an on-chip logic analyzer that the original build used
for debug.

## Files and simulation

| file | content |
|------|---------|
| `rtl/seam_pkg.sv` | sizes, `pixel_t`/`energy_t`/`word_t`, port access enum |
| `rtl/pixel_diff.sv` | one saturated squared colour distance |
| `rtl/energy_word.sv` | 64 lanes: one energy word from two pixel words |
| `rtl/energy_accel.sv` | sequencer, shift register, BRAM port schedule |
| `rtl/frame_buffer.sv` | four-bank dual-port frame RAM |
| `rtl/seam_pl_top.sv` | top level |
| `tb/tb_*.sv` | self-checking testbenches |

Every testbench compares against a reference computed independently in
SystemVerilog. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog.

* `tb_pixel_diff` and `tb_energy_word` cover corner cases and random data.
* `tb_energy_accel` runs a 4-row frame in three banks. It checks every
  energy, the exact busy time and that every access stays in its region.
* `tb_frame_buffer` runs random traffic on both ports.
* `tb_seam_pl_top` runs at full size with overlapped load, compute and
  drain across two banks. It checks the 4161-cycle time and counts overlap,
  bank switches, saturation and row ends.
* `tb_video_stream` streams ten full-size planes round-robin through all
  four banks. It checks every energy and the total time.
* `tb_video_360p` does the same with `ROWS = 360`, the size for 360p video.
  Each plane takes 360 x 13 + 1 = 4681 cycles.

To run one with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -y rtl -y tb +libext+.sv -Irtl rtl/seam_pkg.sv tb/tb_seam_pl_top.sv \
        --top-module tb_seam_pl_top -o sim
    ./obj_dir/sim

Replace the testbench name to run the others. The full-size runs take
seconds. The frame RAM is 15 Mib, so the simulator needs a few MB for it.
