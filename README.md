# UWGSP4 graphics subsystem and shared memory in SystemVerilog

The UWGSP4 graphics subsystem (University of Washington Graphics System Processor 4) splits 3-D rendering in two halves:

- **Geometry engine.** Floating-point processors in a parallel-pipelined arrangement turn polygons into *spans*. A span is a horizontal run of pixels, given by its start point, its length, its start values and their X derivatives.
- **Raster engine.** Four custom chips called bit-blit interpolators (BBIs) turn spans into pixels. They interpolate colour, alpha, depth and texture coordinates along each span, then do the Z-buffer test, alpha blending and plane masking against their frame and Z buffers.

This RTL covers the hardware between and below the processors:

- the FIFO chains that link the pipeline stages;
- the command distributor that feeds the BBIs;
- the BBI itself, at the level of its published block diagram;
- the shared memory and its interconnection network: eight port controllers, an 8 × 8 × 40-bit crossbar and eight memory controllers with 32 interleaved modules in all.

The top module `uwgsp4` holds the graphics datapath (`uwgsp4_graphics`) and the shared memory (`shared_memory`) side by side. The processors, the VRAMs, the bus interface units and the system controller are outside it. They connect through ports.

The published targets, at an assumed 40 MHz raster clock:

| Target | Published | Measured in simulation |
|---|---|---|
| Gouraud-shaded, Z-buffered polygons of 100 pixels, per second | 200,000 | 283,000 |
| 3-D shaded 100-pixel lines, per second | 250,000 | 376,000 |
| Image transfer into the frame buffer | 40 Mpixel/s | 30.8 Mpixel/s (see "Departures") |
| Shared-memory transfer rate | 1,280 Mbyte/s | 1,280 peak; 1,130 sustained with eight vectors (see "Shared memory") |

## Data flow

```
 head processor ──┬─► FIFO ► stage1 ► FIFO ► stage2 ► FIFO ► stage3 ► FIFO ► stage4 ► FIFO ─┐  pipeline I
                  └─► FIFO ► stage1 ► FIFO ► stage2 ► FIFO ► stage3 ► FIFO ► stage4 ► FIFO ─┤  pipeline II
 image transfer (shared memory) ────────────────────────────────────────────────────────────┤
                                                                                            ▼
                                                                   command_distributor (round robin)
                                                                     │      │      │      │
                                                                   BBI0   BBI1   BBI2   BBI3
                                                                     │      │      │      │
                                                                   VRAM bank per BBI: 2 frame buffers + Z buffer
```

- Each pipeline has five 512 × 32 FIFOs. The top module brings the write side of each FIFO and the read side of the first four out as ports, because a processor sits at each of those ends.
- The fifth FIFO of each pipeline, and the image-transfer word stream, are the three inputs of the command distributor.

## Instructions

An instruction is a header word followed by up to 31 data words. The BBI stores word *i* in register *i* of an input register file.

Header word:

| Bits | Field |
|---|---|
| 31:29 | opcode |
| 28:27 | new-value source: 0 input pixel, 1 interpolator (or texel), 2 alpha blend, 3 plane-masked |
| 26 | Z test enable |
| 25 | Z write enable |
| 24 | antialias: line coverage scales alpha |
| 23 | line is Y-major |
| 22 | line X steps negative |
| 21 | line Y steps negative |
| 20:16 | number of data words |
| 15 | broadcast to all four BBIs |
| 14:10 | reserved |
| 9:0 | start row Y |

Data registers:

| Reg | Span / texture span / line / fill | Block transfer |
|---|---|---|
| 1 | start column X [10:0] | start column X |
| 2 | length [11:0]; fill height [27:16] | pixel count (≤ 29) |
| 3–6 | R, G, B, A start, unsigned 8.12 | pixel words (registers 3..31) |
| 7–10 | dR, dG, dB, dA per pixel, signed 20.12 | |
| 11, 12 | Z start, dZ, 24.8 | |
| 13–15 | U, dU, d²U, signed 16.16 (texture span) | |
| 16–18 | V, dV, d²V | |
| 19 | line minor-axis slope, signed 16.16 | |
| 20 | constant input pixel {A,R,G,B} | |

The seven opcodes:

| Opcode | Name | What it does |
|---|---|---|
| 0 | SPAN | General span |
| 1 | TSPAN | Texture-mapped span. The texel at (U, V) of the texture store replaces the interpolated colour. |
| 2 | LINE | Line. Steps one pixel along the major axis per clock; the minor axis is accumulated. |
| 3 | FILL | Fills a rectangle with one colour, and optionally one Z. |
| 4 | BLT | Block or bit-plane image transfer. Copies (source 0), or plane-masks (source 3), the pixel words carried by the instruction. |
| 5 | MASK | Loads the plane mask from register 1. |
| 6 | RFSH | Loads the screen refresh counter. Register 1 bit 31 picks the displayed buffer and [9:0] the first row. Drawing then goes into the other buffer, so this instruction is also the buffer swap. |

## How a BBI draws

The BBI has two register files and two state machines:

- The **command input state machine** fills one register file from the distributor.
- The **command execution state machine** works from the other file.

The handoff uses a Ready flag and a Done flag per file. As a result, the next instruction arrives while the current one draws, and fetching costs no drawing time.

For every pixel, the execution state machine runs the following steps:

1. **Ownership.** A pixel of a row this BBI does not own is skipped in one clock. Row *y* belongs to BBI *y* mod 4.
2. **Reads.** A texture span first reads the texel. When the new value depends on the old pixel, the frame buffer and Z buffer are read. That is the case for a Z test, alpha blending or plane masking.
3. **Write.** The colour is written if the Z test passes (new Z < stored Z). Z is also written when Z writing is on. Then every channel steps.

A pixel therefore costs 1 clock for a plain write, 2 for a read-modify-write and 3 with a texture read. Each span or line adds a few clocks to set up and finish.

What limits the rate depends on the work:

- **Polygons.** A Z-buffered Gouraud span of 10 pixels is 13 words, so it occupies the shared distributor bus for 14 clocks. Its BBI draws it in about 25 clocks. With four BBIs in parallel, the bus is the limit: 400 spans take about 5,600 clocks, which gives 283,000 polygons/s.
- **Lines.** A line reaches all four BBIs, and each BBI walks every pixel of it, skipping the rows it does not own. The BBI is the limit, at about 105 clocks per 100-pixel line.

The datapath has eight channels, matching the published block diagram:

- **R, G, B and A channels.** Each holds an accumulator (value += derivative) that saturates to 0..255. It then selects one of four new values:
  - the input pixel byte;
  - the interpolated byte, or the texel byte in a texture span;
  - the blend `(new·a + old·(256−a)) / 256`, where `a = alpha + alpha[7]`, so that alpha 255 gives exactly the new value;
  - the masked value `(new & mask) | (old & ~mask)`.

  The A channel's output is the alpha of all four blends. With antialiasing on, it is first multiplied by the line's coverage.
- **Z channel.** A 24-bit depth with 8 fraction bits. It saturates at 0 and at 2²⁴−1.
- **U, V interpolator.** A second-order forward difference (U += dU, dU += d²U), which gives quadratic (perspective-like) texture coordinates. They are clamped to the 768 × 1024 texture store.
- **XY channel.** Walks a span or fill rectangle row by row. For a line it works as a DDA (digital differential analyser): the major axis steps by ±1 and the minor axis adds the 16.16 slope. The coverage of a line pixel is 255 minus the top byte of the minor-axis fraction.

## Splitting work over four BBIs

The four BBIs share one 32-bit instruction bus, and each has its own VRAM bank holding every fourth screen row. The distributor routes each instruction as follows:

- Spans, texture spans and block transfers go only to the BBI that owns their row.
- Lines, fills, mask loads and refresh loads go to all four BBIs. Each BBI writes only its own rows of a line or fill.
- The header's broadcast bit sends any instruction to all four.

The texture store (columns 1280..2047 of each frame buffer) is not interleaved. A block transfer into it is broadcast, and every BBI keeps a full copy, so a texture span can read any texel locally.

The distributor arbitrates between its three sources in round-robin order. It always moves a whole instruction at a time, which costs one clock for the header decision plus one clock per word. A broadcast word is held until all four BBIs have taken it.

## Memory and refresh

Each BBI bank holds two frame buffers of 2048 × 1024 × 32 bits (A, R, G, B bytes) and a Z buffer of 1280 × 1024 × 24 bits. Columns 0..1279 are the screen, and columns 1280..2047 are the texture store.

Addresses:

- frame buffer: `{buffer, row[9:0], column[10:0]}`;
- Z buffer: `{row, column}`.

The memory ports are abstract. Each clock carries a cycle type (idle, read, write, memory refresh, row transfer) plus address and data, and read data returns one clock later. Generating VRAM strobes from these is left to the memory side.

Memory refresh (`mref_req`) and display refresh (`dref_req`) are request pulses from the system controller. Each becomes a pending flag, is served before any drawing cycle (memory refresh first), and stalls drawing for that clock. A display refresh issues a row-transfer cycle at the next row of the displayed buffer, counting from the row loaded by RFSH.

## Shared memory

Eight port controllers reach eight memory controllers through a crossbar. Each memory controller drives four memory modules.

- **Address map.** Word-address bits 2:0 pick the memory controller and bits 4:3 the module, so 32 consecutive words fall in 32 different modules. The rest of the address is the word within the module.
- **Commands.** A port controller takes one command at a time: base, stride and count for a row, plus a row stride and row count. Scalars, row or column vectors and 2-D blocks with any strides each need one command. It then issues one word address per clock.
- **Crossbar.** A crossbar word is 40 bits: an 8-bit tag (port number and write flag) and 32 data bits. Each memory controller picks, round robin, among the ports whose target module is free. A read reply returns one clock later and the tag steers it back to its port, so replies arrive in issue order.
- **Modules.** A module stays busy for `MOD_CYCLE` clocks (4 assumed) after an access. A stride that keeps hitting one module therefore runs at one word per 4 clocks.
- **Rate.** The peak is one word per memory controller per clock: 8 × 4 bytes × 40 MHz = 1,280 Mbyte/s, the published figure. Eight unit-stride vectors started on different controllers sustain 7.06 words per clock (1,130 Mbyte/s). The shortfall comes from clocks in which two ports want the same controller.
- **Own choices.** The address map, the command format, the tag layout, the arbitration, the memory size (2^17 words, 512 Kbyte) and the module cycle are not published.
- **Outside.** The vector processing units, the 80 MHz high-speed buses and the bus interface units are not built. Each port's command and data streams are ports of the top.

## Departures and open points

- **Image transfer rate.** Each block-transfer instruction carries 29 pixels in 32 words, and the distributor bus moves one word per clock. The peak is therefore 29/33 pixel per clock: 35 Mpixel/s at 40 MHz, and 30.8 Mpixel/s measured. The published rate is 40 Mpixel/s, which would display a 1k × 1k image in 25 ms. Reaching it needs a wider distributor bus or a faster clock.
- **Clock.** The BBI clock is not published. 40 MHz, the processor clock, is assumed throughout.
- **Own choices.** The following are this design's own, because none is published:
  - the instruction encoding;
  - the fixed-point formats;
  - the row interleaving of the four BBIs;
  - the replicated texture store;
  - the blend and coverage formulas;
  - "smaller Z is nearer".
- **Z format.** The published Z word has an 8-bit base and a 16-bit offset. Here it is handled as one 24-bit number.
- **Multi-window control.** This is listed as a BBI function but not described. Clipping is left to the geometry engine, and the BBI provides plane masks and buffer selection only.
- **Outside the RTL:** the i80860 processors and their firmware, the system controller, the VRAMs, the RAMDACs, the bus interface units, the high-speed buses and the parallel vector processor of UWGSP4, and the whole UWGSP3 board (built from commercial parts).

## Files

| File | Module |
|---|---|
| `rtl/bbi_pkg.sv` | Opcodes, header struct, register numbers, sizes, fixed-point formats |
| `rtl/uwgsp4.sv` | Top: graphics datapath and shared memory side by side |
| `rtl/uwgsp4_graphics.sv` | Graphics datapath: two FIFO chains, raster engine |
| `rtl/sync_fifo.sv` | First-word-fall-through FIFO (512 × 32 by default) |
| `rtl/raster_engine.sv` | Command distributor and four BBIs |
| `rtl/command_distributor.sv` | Round-robin, whole-instruction routing to the BBIs |
| `rtl/bbi.sv` | One BBI |
| `rtl/bbi_input_regfile.sv`, `rtl/bbi_cmd_input_fsm.sv`, `rtl/bbi_cmd_exec_fsm.sv` | Instruction fetch and sequencing |
| `rtl/bbi_color_channel.sv`, `rtl/bbi_z_channel.sv`, `rtl/bbi_uv_interp.sv`, `rtl/bbi_xy_channel.sv` | The channels |
| `rtl/bbi_addr_gen.sv`, `rtl/bbi_mem_if.sv` | Addresses, buffer select, refresh, memory port |
| `rtl/smem_pkg.sv` | Shared-memory sizes and crossbar tag |
| `rtl/shared_memory.sv` | Port controllers, crossbar, memory controllers |
| `rtl/smem_port_ctrl.sv`, `rtl/smem_crossbar.sv`, `rtl/smem_mem_ctrl.sv` | One port controller; the crossbar; one memory controller with four modules |

Every module has a testbench `tb/tb_<module>.sv`, with two exceptions. `tb/tb_bbi.sv` covers the execution state machine. `tb/tb_shared_memory.sv` covers the three shared-memory parts.

Testbench helpers:

- `tb/bbi_ref_pkg.sv` builds instructions. It also holds a reference model that computes every pixel in closed form (start + i·derivative, and U = U0 + i·dU + i(i−1)/2·d²U), not with the hardware's running sums.
- `tb/vram_model.sv` is a sparse behavioural VRAM.

Test coverage:

- `tb_bbi`, `tb_raster_engine` and `tb_uwgsp4_graphics` compare whole frame and Z buffers with the reference model.
- `tb_shared_memory` writes and reads strided 1-D and 2-D blocks from all eight ports at once and checks every word against a model. It also measures the bandwidth, the module-cycle limit and the fairness of the arbitration.
- `tb_uwgsp4` is the full-size test of the top. It runs the graphics test below and shared-memory traffic at the same time, and counts crossbar contention, busy-module stalls and 2-D accesses.
- `tb_uwgsp4_graphics` runs at the default sizes. It measures the polygon, line and block-transfer rates and counts each mechanism: FIFO back-pressure, distributor contention, routed and broadcast instructions, all seven opcodes, loading overlapped with execution, Z rejection, refresh stalls and buffer swaps.

## Simulating

Verilator 5 with timing support:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/bbi_pkg.sv rtl/smem_pkg.sv tb/bbi_ref_pkg.sv tb/tb_uwgsp4.sv \
  --top-module tb_uwgsp4 --Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. Each prints `TB_RESULT checks=N failures=M` and stops. The full-size top-level test takes well under a second.

To change a size, use the parameters of `uwgsp4`: `FIFO_DEPTH`, `N_PIPE`, `N_STAGE`, `SM_ADDR_W` and `MOD_CYCLE`. The frame-buffer geometry and the fixed-point formats are constants in `bbi_pkg`.
