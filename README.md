# Floating-point Gaussian smoothing co-processor for Harris corner detection

Harris corner detection spends most of its time smoothing. The host
computes the image derivatives Ix and Iy and their products Ix², Iy² and
IxIy, and smooths each product image with a 3×3 Gaussian. The smoothed
products are the Harris matrix entries, and the corner score
det(A) − α·trace²(A) is computed from them, followed by non-maximal
suppression. This RTL moves the smoothing into an FPGA.

The host sends one single-precision pixel per exchange over a simple bus.
The block keeps the last nine pixels it received. For every new pixel it
multiplies all nine by the kernel in parallel, adds the products in a tree
of pipelined floating-point adders, and holds the sum until the host has
read it.

The architecture follows a 2014 master's thesis that built this block on a
DE2i-150 board (Cyclone IV FPGA, Atom host, PCIe link). The thesis used
vendor floating-point cores and a vendor PCIe system. Here the arithmetic
is written from scratch, and the PCIe side is reduced to the Avalon-MM
slave that the bridge drives.

```
 host (PCIe BAR master)
        │ Avalon-MM
 ┌──────▼───────┐ source, data_flag, sw   ┌───────────────┐ window[0..8]  ┌──────────────────────────────┐
 │ gs_pio_regs  ├────────────────────────►│ gs_input_fifo ├──────────────►│ gs_convolver                 │
 │ 0x00..0x60   │◄─── result, result_flag │ 9 x 32-bit    │ window_valid  │ 9 x fp32_mul, 8 x fp32_add,  │
 │              │◄─── ready/done/busy ────┤               ├──────────────►│ add1..add4 registers, result │
 └──────────────┘   result_retrieve ─────►└───────────────┘               │ register, arbiter + spliter  │
                                                                          └──────────────────────────────┘
```

## The host exchange

All traffic is programmed I/O: the host exchanges one 32-bit word per bus
transaction. Each register occupies a 16-byte slot; `avs_address` is a byte
address.

| offset | name            | dir | meaning |
|--------|-----------------|-----|---------|
| 0x00   | reset           | W/R | bit 0: clears the FIFO while 1 |
| 0x10   | result_retrieve | W/R | bit 0: host is reading the result |
| 0x20   | result_flag     | R   | bit 0: an unread result is waiting |
| 0x30   | data_flag       | W/R | bit 0: flip it to hand over the pixel in source_out |
| 0x40   | source_out      | W/R | pixel, IEEE-754 single |
| 0x50   | data_in         | R   | result, IEEE-754 single |
| 0x60   | status          | R   | bit 0 ready, bit 1 FIFO full, bit 2 busy |

One exchange per pixel:

1. Poll `status` until `ready` is 1.
2. Write the pixel to `source_out`, then write the inverted `data_flag`.
3. Once nine pixels have been sent, each further pixel produces a result.
   Poll `result_flag` until it is 1.
4. Write `result_retrieve` = 1, read `data_in`, then write
   `result_retrieve` = 0. The falling edge clears `result_flag`.

Two details matter:

- **A toggle marks a new pixel, not a level.** Two identical pixels in a row
  are still two pixels.
- **`result_flag` drops only after the retrieve handshake.** A fast host
  polling a slow FPGA cannot read the same result twice.

`ready` is low in three cases:

- the FIFO is being reset;
- a convolution is running or about to start;
- a result is still unread.

Reads have a fixed latency of one cycle (`avs_readdatavalid`), with no wait
states. A register write changes the status bits within two clock cycles. A
read issued sooner can still return the old state. A PCIe round trip is far
longer, so a real host never sees this. A bus model that issues
back-to-back transfers must leave the gap.

The offsets of reset, result_retrieve, data_flag, source_out and data_in
are the original design's. The slot of `result_flag` (0x20) and the
`status` word at 0x60 were chosen here: the original asks for a
"request/ready" exchange but gives no address for it.

## The nine-word window (`gs_input_fifo`)

The FIFO is a shift register with one input and nine outputs:

- Word 8 is the newest pixel and word 0 the oldest. Each new pixel drops the
  oldest.
- Word *k* is multiplied by kernel coefficient *k*.
- `done` goes high once nine words have arrived since the last reset.
- `window_valid` pulses each time a pixel arrives into a full FIFO. That
  pulse starts the convolver.

Each pixel crosses the bus once and is then reused in nine convolutions
while it moves through the register.

The window is simply the last nine pixels sent. The hardware does not
decide how they map onto a 3×3 neighbourhood: the order in which the host
sends pixels does. Streaming an image row by row gives one output per
pixel, and rows run into each other. The original design works the same
way: one pixel in, one result out.

The kernel (`gs_pkg::GAUSS_KERNEL`) is the standard normal density sampled
at 0, ±1, ±2, ±3 and ±4, laid out row by row:

```
0.0001 0.0044 0.0540
0.2420 0.3989 0.2420
0.0540 0.0044 0.0001
```

Its entries sum to 0.9999. These are the original
values. They are wired into the multipliers as constants.

## The convolver and its state machine (`gs_convolver`)

This is the part that needs the most care.

All nine multipliers start together. Their products go through four adder
levels, eight adders in all. Each level takes its operands from an
enable-loaded stage register:

```
 products p0..p8  ──► add1 reg (9) ──► (p0+p1) (p2+p3) (p4+p5) (p6+p7)   p8 ─┐
                      add2 reg (5) ◄──────────────────────────────────────────┘
                      add2 reg     ──► (a0+a1) (a2+a3)   a4=p8 ─┐
                      add3 reg (3) ◄────────────────────────────┘
                      add3 reg     ──► (b0+b1)  b2=p8 ─┐
                      add4 reg (2) ◄───────────────────┘
                      add4 reg     ──► (c0+c1) ──► result register
```

A stage register loads only on the rising edge of its enable, then holds its
words until the next rising edge. The adders behind it therefore see steady
operands for as long as they need. A word that skips a level (p8 here) is
simply copied from register to register, so no delay line is needed.

The enables come from a two-part state machine:

- **`gs_arbiter`** counts cycles from `start` and outputs a 3-bit state
  number.
- **`gs_spliter`** turns that number into one-hot enables.

The arbiter enters state ADD*n* in the cycle the operands of level *n* are
valid. The multiplier has `MUL_LAT` = 4 register stages and each adder has
`ADD_LAT` = 6. Each stage register adds one cycle. With start in cycle 0:

| cycle | state | what is loaded at the end of the cycle |
|-------|-------|-----------------------------------------|
| 0     | IDLE (start) | products begin; window sampled |
| 4     | ADD1  | add1 register ← 9 products |
| 11    | ADD2  | add2 register ← 4 sums + p8 |
| 18    | ADD3  | add3 register ← 2 sums + word |
| 25    | ADD4  | add4 register ← sum + word |
| 32    | RESULT | result register ← final sum, `result_flag` set |
| 33    | IDLE  | `result_flag` visible |

A result therefore appears 33 cycles after the window is complete, and 34
cycles after the `data_flag` write. Only one convolution runs at a time:
`busy` is high in cycles 1 to 32, and a start during that time is ignored.
Because of this, the stages hold their operands without valid bits, but
the block does not pipeline across pixels. The original design did the
same.

**Latency against the original.** The original design gives the latency of
its floating-point cores in "clock cycles" that include the cycle in which
the operands are applied: 5 for the multiplier and 7 for the adder (its
adder result shows 6 cycles after the inputs). Here those become 4 and 6
register stages. The original also states 28 cycles per output and 826.7 ms
for a 1330×1110 image at 50 MHz. That figure cannot be reached with a 5-cycle
multiplier and four levels of 7-cycle adders. This RTL keeps the per-core
latencies and takes 33 cycles per output, which is 974 ms of convolver time
for that image.

## Floating-point units (`fp32_mul`, `fp32_add`)

Both units work on IEEE-754 single precision and round to nearest, ties to
even. Each is one combinational step followed by `LATENCY` registers. A
synthesis tool with retiming spreads the logic across those registers.

- **Adder.** It orders the operands by magnitude and shifts the smaller
  significand into guard, round and sticky bits. It then adds or subtracts,
  normalises with a leading-zero count, and rounds.
- **Multiplier.** It forms the 24×24-bit significand product, normalises by
  at most one place, and rounds.

Special values were chosen here, since the original used vendor cores with
most options switched off:

- Subnormal inputs are read as zero, and subnormal results are flushed to
  signed zero.
- Overflow gives infinity.
- NaN inputs, ∞−∞ and 0·∞ return the quiet NaN `0x7fc00000`.

Pixel and derivative-product values never come near these cases.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `gs_top`, `gs_convolver`, `gs_arbiter` | `MUL_LAT` | 4 | multiplier register stages |
| `gs_top`, `gs_convolver`, `gs_arbiter` | `ADD_LAT` | 6 | adder register stages |
| `gs_convolver` | `KERNEL` | `GAUSS_KERNEL` | nine fp32 coefficients |
| `gs_input_fifo` | `DEPTH` | 9 | the convolver assumes 9 |
| `gs_stage_register` | `N` | 9 | 9, 5, 3, 2 for add1..add4 |

The arbiter takes its state timing from `MUL_LAT` and `ADD_LAT`, so
changing the latencies keeps the block correct.

## What is not here

- **PCIe hard IP, Qsys interconnect and scatter-gather DMA.** These are
  vendor-generated. The top exposes the Avalon-MM slave they would drive.
- **The host software.** This covers derivatives, products, the corner
  score and non-maximal suppression. The testbenches contain a bus model of
  the host's exchange loop.
- **Kernel storage.** The kernel has no logic of its own; it is a package
  constant.

## Files

- `rtl/gs_pkg.sv`: types (`fp32_t`, state enum, enable struct), kernel
  constants.
- `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`: pipelined single-precision
  arithmetic.
- `rtl/gs_input_fifo.sv`: nine-word window with toggle handshake.
- `rtl/gs_arbiter.sv`, `rtl/gs_spliter.sv`: the convolution state machine.
- `rtl/gs_stage_register.sv`: add1..add4 registers.
- `rtl/gs_result_register.sv`: result and `result_flag` handshake.
- `rtl/gs_convolver.sv`: multipliers, adder tree, registers, state machine.
- `rtl/gs_pio_regs.sv`: bus registers.
- `rtl/gs_top.sv`: top level.
- `tb/fp_ref_pkg.sv`: reference arithmetic. It works in double precision
  and rounds to single, so it is independent of the RTL.
- `tb/tb_*.sv`: one self-checking testbench per module.
  - `tb_gs_top` runs the host loop over 400 pixels, with FIFO resets and
    runs of equal pixels.
  - `tb_gs_image` streams a whole 1330×1110 image, 1,476,292 outputs, and
    checks each one bit for bit. It takes about a minute.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if it hangs. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/gs_pkg.sv tb/fp_ref_pkg.sv tb/tb_gs_top.sv --top-module tb_gs_top
./obj_dir/Vtb_gs_top
```

Replace `tb_gs_top` with any other testbench name. To build the top alone:
`verilator --lint-only -Wall -Irtl -y rtl rtl/gs_pkg.sv rtl/gs_top.sv`.

## Verification status

- **Floating-point units.** They are checked against the double-precision
  reference on 4000 operand pairs each. These include ties, cancellations,
  overflow, underflow, infinities and NaN. The result must match bit for
  bit and arrive at exactly `LATENCY`.
- **Convolver.** It is checked bit for bit against the same tree evaluated
  in the reference. The check also covers the exact 33-cycle latency and
  the handshake.
- **Top level.** The 400-pixel host-loop run and the whole-image run pass
  bit for bit. The whole-image run also confirms 33 convolver cycles per
  output.
- **Fault tests.** Each module's testbench has been shown to fail against a
  deliberately broken copy of that module.
- **Not covered.** Nothing has been run on an FPGA, and timing closure at
  50 MHz is not known. With retiming disabled, the single combinational step
  in each floating-point unit will be the critical path.
