# Im-Pro II — a 3x3 neighbourhood image processor

Im-Pro II enhances 8-bit grayscale images in the spatial domain. A 3x3 mask
is laid over each pixel of the image; the new pixel value is the weighted sum
of the pixel and its eight neighbours:

    g(i,j) = M1*f(i-1,j-1) + M2*f(i-1,j) + M3*f(i-1,j+1)
           + M4*f(i,j-1)   + M5*f(i,j)   + M6*f(i,j+1)
           + M7*f(i+1,j-1) + M8*f(i+1,j) + M9*f(i+1,j+1)

The mask then moves one pixel to the right, row after row, until the whole
image has been covered. Four operations are built in: low-pass filtering
(smoothing), high-pass filtering (sharpening), high-boost filtering and a
200 % zoom by pixel replication.

The hardware is deliberately small. It is not a line-buffered pipeline.
The image sits in an on-chip RAM. A control unit fetches the nine pixels of
one window one after the other, and a processing unit accumulates them, one
pixel per clock. The result is written to a second RAM, and then the next
window starts. All arithmetic uses adders, shifts and constant multiplies.

This follows the structure of the published Im-Pro II processor: the memory,
control and processing units and their sub-blocks, the masks, the serial
one-pixel-per-cycle datapath, the 12-bit low-pass sum with its divide by 8,
and clipping negative results to zero. The op-code encoding, the cycle-level
schedule, the host handshake and a few arithmetic details were not specified
there. They are this design's own choices and are listed under
[Own choices and departures](#own-choices-and-departures).

## The four operations

Window pixels arrive in increasing address order, which is row-major order
M1 … M9. The centre M5 is therefore the fifth pixel of every window.

| op-code | operation  | mask                                | output |
|---------|------------|-------------------------------------|--------|
| 0       | low-pass   | `1 1 1 / 1 2 1 / 1 1 1`             | sum / 8 (right shift), saturated to 255 |
| 1       | high-pass  | `-1 -1 -1 / -1 8 -1 / -1 -1 -1`     | 8·centre − Σneighbours, < 0 → 0, > 255 → 255 |
| 2       | high-boost | `-C … / -C 8C+1 -C / … -C`          | (8C+1)·centre − C·Σneighbours, clipped to 0…255 |
| 3       | zoom       | 2x2 replication                     | each source pixel fills a 2x2 block |

**Low-pass.** The centre weight of 2 is a one-bit left shift. The sum of nine
weighted pixels, at most 10 × 255 = 2550, fits a 12-bit accumulator. The sum
is divided by 8 with a right shift, which truncates toward zero. The weights
add up to 10, not 8, so the filter also brightens the image a little. Flat
areas brighter than about 204 would exceed 255, so the output saturates.

**High-pass and high-boost.** These units first sum the eight neighbours and
capture the centre pixel. After the ninth pixel they form the weighted centre
minus the (scaled) neighbour sum in two's complement. The sign bit marks a
negative result, which becomes 0 (black). The high-pass mask sums to 0, so
flat areas go black and only edges remain. The high-boost mask is the
all-pass mask plus C times the high-pass mask, so it sums to 1 and keeps the
background while it boosts edges. C is the parameter `HBF_C`. It defaults to
1, and values up to about 5 are the useful range.

**Zoom.** A (N/2)×(N/2) source image becomes an N×N image. Each source pixel
(i, j) is written to output pixels (2i, 2j), (2i, 2j+1), (2i+1, 2j) and
(2i+1, 2j+1). This is the same as interlacing the image with zeros and
convolving with a 2x2 all-ones mask. The zero-interlaced image is never
built. The unit simply issues four writes, one per cycle.

**Borders.** Filters produce no output for the outermost rows and columns,
where the mask does not fit. The output bank is cleared before every
operation, so these border pixels read back as 0 (black).

## Architecture

```
            host port (addr 16, data 8, rd/wr, bank)      opcode, start
                          |                                    |
   +----------------------v------------------+    +-----------v-------------------+
   | memory_bank  (128 KB)                   |    | control_unit                  |
   |   RAM 1 = bank 1: input image           |<-->|   address_generator           |
   |   RAM 2 = bank 2: processed image       |    |   read_3x3 (pixel reader)     |
   |   one port: address, rd/wr, MB select   |    |   reset_generator             |
   +-----------------------------------------+    |   memory_read_write (port mux)|
                                                  +------+-----------------^------+
                                       Prst, pen, pixel, | adin    result, | d_rdy,
                                       opcode            v         address |
                                                  +------------------------+------+
                                                  | nh_processor                  |
                                                  |  demux_1to4 -> lpf            |
                                                  |                hpf            |
                                                  |                hbf            |
                                                  |                zoom_filter    |
                                                  |             -> mux_4to1       |
                                                  +-------------------------------+
```

* **memory_bank**: two 64 K × 8 single-port RAMs (`spram`) behind one port.
  `mb_sel` picks the bank. Reads take one cycle, like an FPGA block RAM.
* **address_generator**: walks the window centre over rows 1…N−2 and
  columns 1…N−2. For zoom it walks source pixels 0 … (N/2)²−1. It advances
  on each window-start pulse.
* **read_3x3** (the pixel reader): captures the centre address and issues
  the nine neighbour addresses c−N−1 … c+N+1 on nine consecutive cycles. For
  zoom it issues one read and computes the destination block address.
* **reset_generator**: a free-running period counter. While processing, it
  pulses `prst` once per window period. The pulse clears the processing unit
  and also starts the next window.
* **memory_read_write**: owns the single memory port. A result write wins
  over a pixel read, which wins over a clearing write, which wins over the
  host. It delays the read request by one cycle to mark read data valid
  (`pen`). An assertion checks that a result write never meets a read.
* **nh_processor**: the demultiplexer sends the pixel stream to the selected
  unit. The multiplexer returns that unit's `dout`, `d_rdy` and write
  address. A filter's write address is the window centre; the zoom unit
  supplies its own four addresses.

## Window schedule

This part needs the most care when you change the design. Everything is
timed from the reset-generator pulse, which is cycle 0 of a window. There is
only one memory port, so the reads and writes of a window must not overlap
with those of the next.

Filter window, period 12:

| cycle | 0 | 1 … 9 | 2 … 10 | 11 |
|---|---|---|---|---|
| action | `prst`: filter cleared, centre captured, address generator steps | read M1 … M9 from bank 1 | pixel k enters the filter (`pen`) | `d_rdy`: result written to bank 2 at the centre |

Zoom window, period 7:

| cycle | 0 | 1 | 2 | 3 … 6 |
|---|---|---|---|---|
| action | `prst`, source address captured | read source pixel | pixel enters the zoom unit | four writes to the 2x2 block |

The filter units accept one pixel per cycle and finish nine cycles after the
first pixel. The zoom unit takes four cycles per source pixel. The extra
cycles in each period come from the registered memory read and the
registered result.

A complete operation takes N² cycles to clear bank 2, then (N−2)²·12 cycles
for a filter or (N/2)²·7 cycles for zoom. For N = 256 that is 839,728 cycles
per filtered image and 180,224 cycles per zoom. Loading and reading back an
image take N² cycles each through the 8-bit host port.

## Using the top level (`impro2_top`)

Parameters: `IMG_N` is the image side, default 256. It must be a power of
two between 4 and 256, because N² addresses must fit the 16-bit bank address.
`HBF_C` is the high-boost constant, default 1.

1. Keep `rst_n` low for a few cycles, then release it.
2. While `busy` is low, write the input image into bank 1: set
   `ext_bank = 0` and `ext_we = 1`, and present `ext_addr` and `ext_din`,
   one pixel per cycle. Pixel (i, j) of a filter input goes to address
   i·N + j. A zoom source pixel (i, j) goes to address i·(N/2) + j.
3. Pulse `start` for one cycle with `opcode` set. `busy` rises. The host
   port is ignored until `done` pulses, in the last cycle of the operation.
4. Read the result from bank 2: set `ext_bank = 1` and `ext_we = 0`.
   `ext_dout` gives the pixel at the address of the previous cycle.

Bank 1 is not changed by processing, so several operations can run on one
loaded image.

## Own choices and departures

* **Low-pass mask.** The hardware uses `1 1 1 / 1 2 1 / 1 1 1` with a
  divide by 8, as the published processing-unit description specifies. The
  plain 1/9 averaging mask is not built.
* **Saturation.** The published design clips only negative results.
  Results above 255 saturate to 255 here in all three filters.
* **Op-code encoding:** 0 low-pass, 1 high-pass, 2 high-boost, 3 zoom.
* **Boost constant.** C is a compile-time parameter, default 1. No value
  was given for it, only C ≤ 5.
* **Clearing the output bank.** Every operation begins by writing zeros
  into bank 2, so the borders are black even after an earlier zoom filled
  them. This costs N² cycles.
* **Handshake.** `start`, `busy` and `done`, and the rule that the host owns
  the memory port only while the processor is idle.
* **Timing.** Window periods of 12 and 7 cycles, one-cycle read latency,
  and the zoom write order top-left, top-right, bottom-left, bottom-right.
* **Zoom source layout.** The source image is stored row by row from
  address 0 with a stride of N/2.
* **No latches.** The published schematic shows latch primitives. Every
  storage element here is a clocked flip-flop with an asynchronous reset,
  plus a synchronous clear from the reset generator.
* **Device.** The published processor targeted a Spartan-3E XC3S100E, and
  its synthesis figures (81 flip-flops, about 89 MHz) cover the processing
  unit only. The 128 KB memory unit is far larger than that device's block
  RAM, so a real build needs either external memory or a larger FPGA.
  Here the processing unit synthesises to 116 flip-flops. About 30 of them
  hold the zoom unit's pixel and 16-bit block address, which this design
  keeps inside the zoom unit.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if it
hangs. The reference arithmetic, `tb/tb_ref_pkg.sv`, is written directly
from the mask definitions and is independent of the RTL datapaths.

* `tb_impro2_top` runs the whole processor at N = 16 with C = 2. It loads an
  image through the host port and runs low-pass, high-pass, high-boost and
  zoom, then high-pass again after the zoom. It compares every output pixel,
  checks the start-to-done cycle count, and requires each of these to happen
  at least once: low-pass saturation, negative clipping and saturation in
  both high-pass and high-boost, zoom replication, and clearing of an old
  result.
* `tb_impro2_full` does the same at the default size: 256×256, C = 1. It
  runs in a few seconds.
* The unit testbenches cover window timing with idle gaps between pixels,
  extreme windows, address sequences, port-grant order, bank independence
  and reset-pulse periods.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/impro_pkg.sv tb/tb_ref_pkg.sv -y rtl -y tb \
    tb/tb_impro2_top.sv --top-module tb_impro2_top -o sim
./obj_dir/sim
```

Replace `tb_impro2_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/impro_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/impro_pkg.sv` | pixel/address types, op-code enum, window periods |
| `rtl/impro2_top.sv` | top level |
| `rtl/memory_bank.sv`, `rtl/spram.sv` | two-bank memory unit |
| `rtl/control_unit.sv` | phase FSM and the four control sub-blocks |
| `rtl/address_generator.sv`, `rtl/read_3x3.sv`, `rtl/reset_generator.sv`, `rtl/memory_read_write.sv` | control sub-blocks |
| `rtl/nh_processor.sv`, `rtl/demux_1to4.sv`, `rtl/mux_4to1.sv` | processing unit and its steering |
| `rtl/lpf.sv`, `rtl/hpf.sv`, `rtl/hbf.sv`, `rtl/zoom_filter.sv` | the four operations |
| `tb/tb_*.sv` | testbenches; `tb/tb_ref_pkg.sv` is the reference model |
