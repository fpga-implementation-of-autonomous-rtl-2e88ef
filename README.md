# Reconfigurable Harris feature-extraction accelerator

A stereo-vision navigation system estimates a vehicle's motion from pairs of
camera images. The most expensive step of its main loop is feature extraction:
a Harris corner detector run on every 96x96 pixel block of both images (12
blocks per 320x240 image, 24 per stereo pair). This RTL is the hardware side
of an embedded platform that accelerates that step with **three
Reconfigurable Units** on an FPGA. Each unit has its own memories and one
region whose logic can be rewritten at run time (dynamic partial
reconfiguration) to hold one of three convolution accelerators. Software picks
how many units to use and how often to rewrite them. That choice trades speed
against how much of the fabric stays free, so the system's quality of service
can follow the vehicle's speed.

The design follows a published system built on a Virtex-5 with an embedded
PowerPC 440. The processor, the memory system, the bus fabric and the
configuration controller were vendor parts there. They are not part of this
RTL; their connection points are ports of the top module.

## The computation: eight convolutions per block

For one 96x96 block `I`, the Harris step needs three smoothed gradient
products:

| step | accelerator | input | filter | output |
|------|-------------|-------|--------|--------|
| 1 | ConvConst | I | Prewitt H `[1 1 1; 0 0 0; -1 -1 -1]` | Ix |
| 2 | ConvRepl1 | Ix*Ix (software) | 1x11 Gaussian | A |
| 3 | ConvRepl2 | A | 11x1 Gaussian | Sxx |
| 4 | ConvConst | I | Prewitt V `[1 0 -1; 1 0 -1; 1 0 -1]` | Iy |
| 5 | ConvRepl1 | Iy*Iy (software) | 1x11 Gaussian | B |
| 6 | ConvRepl2 | B | 11x1 Gaussian | Syy |
| 7 | ConvRepl1 | Ix*Iy (software) | 1x11 Gaussian | C |
| 8 | ConvRepl2 | C | 11x1 Gaussian | Sxy |

The squares and the product are done by the processor between runs. The
corner response is also computed in software from Sxx, Syy and Sxy.

**ConvConst** (`conv_const`) works on integers. Taps outside the block read
as 0. The sum is clamped to 32 bits.

**ConvRepl1 / ConvRepl2** (`conv_repl1`, `conv_repl2`) are the horizontal
and vertical passes of the Gaussian. Taps outside the block read the nearest
edge pixel. The original software used floating point here; the hardware uses
32-bit fixed point instead. Software chooses the Q format of the taps and an
output shift (the `SHIFT` register). The accelerator rounds the 64-bit sum to
nearest, shifts it right arithmetically and clamps it to 32 bits.

The testbenches use taps in Q16, shift 8 after ConvRepl1 and shift 16 after
ConvRepl2, so the smoothed products keep 8 fraction bits. With 8-bit pixels,
|Ix| <= 765 and Ix^2 in Q.8 stays below 2^28.

The border rules (zero for ConvConst, replicate for ConvRepl) are read from
the functions' names; the original description does not spell them out.
A consequence of the zero border: a block's edge looks like a step in
brightness to the gradient filters. The Gaussian spreads that step about 6
pixels inwards, so corner responses within about 7 pixels of a block edge
are not meaningful. Blocks that overlap by at least 14 pixels, as in the
tiling of `tb_stereo_frame`, cover that margin inside an image.
Taps are applied in stored order, without flipping the kernel. For the
symmetric Gaussian this changes nothing. For Prewitt it only flips the sign
of Ix and Iy, which cancels in every product.

## The convolution engine and its timing

All three accelerators share `conv_core`, a sequential engine that performs
one multiply-accumulate per clock (`acc = u[i]*h[j] + acc`):

* **Stage 0.** Loop counters walk the pixels in raster order, and the taps
  of each pixel. They drive the U and H read addresses. Border handling
  happens here: out-of-block taps are either masked (zero) or clamped to the
  edge (replicate).
* **Stage 1.** One clock later the block-RAM words arrive. A 32x32 signed
  product is added into a 64-bit accumulator, which restarts at each
  pixel's first tap.
* **Output.** The accelerator wrapper formats the finished sum (clamp, or
  round-shift-clamp) and writes it to Y one clock later.

Per block this takes exactly N*N*taps + 3 clocks, counted from the clock in
which `start` is high to the clock in which `done` is high:

* ConvConst: 82,947 clocks, 0.83 ms at 100 MHz.
* ConvRepl1 and ConvRepl2: 101,379 clocks, 1.01 ms at 100 MHz.

For comparison, the published hardware needed about 22% of roughly 1.9
million processor cycles for each ConvRepl function (2.5 ns per cycle, so
about 1.0 ms). That is consistent with one MAC per clock at 100 MHz. The
published ConvConst took slightly longer (25%); this engine's ConvConst is
shorter, because it does only 9 MACs per pixel.

## One Reconfigurable Unit

`reconfig_unit` is a bus slave. It wraps `ru_user_logic`, which holds:

* **U** (`tdp_ram`, 9216 x 32): the input matrix.
* **Y** (9216 x 32): the output matrix.
* **H** (89 x 32): filter taps. Only the first 9 or 11 words are used.
* **The reconfigurable region** (`reconfig_module`).
* Control registers and a run timer.

Each memory is true dual port: port A faces the bus, port B the accelerator.

Assertions in the RTL state the handshake rules:

* every bus beat is acknowledged exactly one clock later (`reconfig_unit`);
* at most one unit answers per clock (`nav_fe_top`);
* `cfg_start` and `cfg_done` never coincide, and `cfg_done` comes only
  during a rewrite (`reconfig_module`).

### Bus beats

A beat is `{valid, we, addr, wdata}`. It is acknowledged exactly one clock
later with `{ack, rdata}`. Beats may follow each other on every clock, so a
9216-word matrix moves as a burst in 9216 clocks. This interface is a
simplified stand-in for the processor local bus of the original system. There
a 9216-word transfer took 0.52 ms, about 5.6 bus clocks per word.

### Address map

Addresses are word addresses. In the top, bits [17:16] select the unit.
Inside a unit:

| bits [15:14] | region | notes |
|---|---|---|
| 0 | U | word index in [13:0] |
| 1 | Y | readable and writable |
| 2 | H | 89 words |
| 3 | registers | offset in [3:0] |

| offset | register | access |
|---|---|---|
| 0 | CTRL | W: bit0 = 1 starts the loaded accelerator |
| 1 | STATUS | R: bit0 busy, bit1 reconfiguring, bits[3:2] loaded accelerator (0 none, 1 ConvConst, 2 ConvRepl1, 3 ConvRepl2) |
| 2 | SHIFT | RW: output shift, 6 bits |
| 3 | CYCLES | R: clocks from start to done of the last run |
| 4 | SOFT_RST | W: 0x0000000A resets the user logic for 16 clocks |
| 8 | GIE | RW: global interrupt enable |
| 9 | ISR | R, write 1 to clear: bit0 done, bit1 reconfiguration finished, bit2 start refused |
| 10 | IER | RW: per-event enable |

`irq = GIE & |(ISR & IER)`.

Soft reset clears the accelerator and the user registers. It keeps:

* the memory contents;
* the interrupt registers;
* the accelerator currently loaded in the region.

## Modelling partial reconfiguration

In the FPGA, a region is rewritten by streaming a partial bitstream through
the configuration port. While that happens, the region's logic does not
exist. Afterwards, the new accelerator appears in its place. RTL cannot
rewrite itself, so `reconfig_module` models the region as follows:

* It instantiates all three accelerators and records which one the region
  "holds". Only that one is released from reset and connected to the
  memories; the others stay in reset and their outputs are ignored.
* `cfg_start` with `cfg_id` starts a rewrite. From then on, `loaded_id`
  reads none, every accelerator is held in reset, a running block is
  aborted, and a start raises the "start refused" event.
* `cfg_done` ends the rewrite. The new accelerator appears freshly reset, and
  the "reconfiguration finished" event fires.
* After a system reset the region is empty.

The three `cfg_*` pins per unit are brought out of the top. In the real
system the configuration controller drives them; its write time sets their
spacing, which was 5.37 ms per rewrite, about 4.5 times one convolution. The
testbench models that controller with one rewrite at a time, as with a single
configuration port.

For a synthesis run of `nav_fe_top`, note that it therefore contains all
three accelerators in each unit. A partial-reconfiguration flow would instead
compile one accelerator per region, with the `reconfig_module` ports as the
region boundary.

## Reconfiguration strategies

Strategies are software. `tb_nav_fe_top` runs all four on one test block:

* **Low (one unit).** Every one of the 8 runs needs a rewrite first.
* **Medium (ping-pong, two units).** One unit computes while the other is
  rewritten for the next step.
* **High (three units).** Each unit is configured once, with one accelerator
  kind, and the 8 runs go in sequence.
* **Super (three units, pipelined).** Independent runs of neighbouring steps
  overlap. The steps are {1}, {2, 4}, {3, 5}, {6, 7}, {8}: five steps
  instead of eight.

Measured totals, including bus transfers (at one word per clock) and
537,000-clock rewrites:

| strategy | clocks | rewrites |
|---|---|---|
| low | 5,217,916 | 8 |
| medium | 3,182,829 | 5 |
| high | 2,532,861 | 3 |
| super | 626,886 | 0 (reuses high's configuration) |

The bench also forms the Harris response `R = Sxx*Syy - Sxy^2 -
0.04*(Sxx+Syy)^2` from the outputs. It checks that R peaks at a corner of a
rectangle in the test image (row 48, column 16, next to the corner at 49, 15).

The ranking matches the original measurements. There, only the three-unit
strategies beat software, because each rewrite costs several convolutions.

### Whole stereo pairs

`tb_stereo_frame` feeds complete stereo pairs through the super strategy,
block by block. Each image is cut into overlapping 96x96 blocks, spread
evenly so that the last block ends at the image edge.

| image size | blocks per pair | clocks | time at 100 MHz |
|---|---|---|---|
| 320x240 (4 x 3 blocks per image) | 24 | 16.66 M | 166 ms |
| 640x480 (7 x 5 blocks per image) | 70 | 43.88 M | 438 ms, 2.63 times the small pair |

These figures cover the units and bus transfers only. They leave out the
processor's own work: cutting out blocks, the products, the corner response
and the rest of the navigation loop. The original system's whole feature
extraction took about 475 ms per 320x240 pair with its best strategy,
against 650 ms in software.

## What this RTL leaves out or changes

* **Outside the RTL.** The PowerPC 440 and its FPU, DDR2 and its memory
  controller, the bus, the DMA engine, the UART, the CompactFlash loader,
  the interrupt controller and the configuration controller are vendor or
  hard blocks. The top exposes the bus port, one `irq` per unit and the
  `cfg_*` pins.
* **Software.** The squaring and the product between ConvConst and ConvRepl1
  run in software.
* **Bus speed.** Bursts here run at one word per clock. This is faster than
  the original bus, so transfer-dominated timings are optimistic.
* **Own choices.** The fixed-point format, border rules, register map,
  interrupt events, soft-reset key and accelerator handshake were not
  specified and are this design's own.
* **Physical figures.** Resource figures (2-3% of the device per
  accelerator) and bitstream sizes (13 frames per region, about 74 KB in
  total) belong to the original FPGA implementation and are not modelled.

## Files

`rtl/`:

* `nav_pkg.sv`: sizes, address map, register offsets, types.
* `tdp_ram.sv`: dual-port block RAM.
* `conv_core.sv`: the MAC engine.
* `conv_const.sv`, `conv_repl1.sv`, `conv_repl2.sv`: the accelerators.
* `reconfig_module.sv`: the region.
* `ru_user_logic.sv`: memories, registers, timer.
* `reconfig_unit.sv`: bus slave, soft reset, interrupts.
* `nav_fe_top.sv`: three units and the unit decoder.

`tb/`:

* one self-checking testbench per module (`tb_<module>.sv`);
* `tb_stereo_frame.sv`, whole stereo pairs at two image sizes;
* `tb_ref_pkg.sv`, the reference convolution used by the unit-level
  benches.
Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the folder holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_nav_fe_top \
    rtl/nav_pkg.sv tb/tb_nav_fe_top.sv -o sim && ./obj_dir/sim
```

Replace the top module for the other benches. Add `tb/tb_ref_pkg.sv` for
`tb_reconfig_module`, `tb_ru_user_logic` and `tb_reconfig_unit`. Verilator
finds the other files through `-I`.

Simulation times:

* `tb_nav_fe_top` runs the whole design at its default sizes (96x96 blocks,
  three units, all four strategies, about 12 million clocks) in about
  15 seconds.
* `tb_stereo_frame` (94 blocks, about 60 million clocks) takes about a
  minute.
* The accelerator benches run full 96x96 blocks.
* The unit-level benches use 16x16 blocks.

Parameters:

* `N` (block side) can be changed on every module.
* `NUM_UNITS` on the top can be changed up to 3, the number that the
  two-bit unit select addresses.
* The filter sizes are parameters of the accelerators. The H memory holds
  89 words.
