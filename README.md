# Pipelined 8x8 AAN DCT core

This RTL computes the two-dimensional 8x8 discrete cosine transform of a
pixel stream, the transform at the heart of JPEG and MPEG intra coding. One
pixel goes in per clock and one coefficient comes out per clock, so an 8x8
block takes 64 cycles. Blocks can follow each other with no gap. A
coefficient leaves 132 cycles after the pixel with the same index went in.

The transform is separable: an 8-point 1-D DCT runs over the rows, the
result is transposed, and a second 1-D DCT runs over the columns. Each 1-D
DCT uses the Arai-Agui-Nakajima (AAN) factorisation. That factorisation
needs only five multiplications inside the butterfly, plus one scaling
multiplication per output. The 1-D stages are serial, so each stage needs
just two multipliers (four in the whole core), or one per stage when the
output scaling is left to a later quantiser ("scaled output" mode).

The architecture follows the article *Scaled Discrete Cosine Transform (DCT)
using AAN Algorithm on FPGA*. That article gives the block structure, the
AAN equations, the port list, the widths, the multiplier count and the
132-cycle latency. The inner timing, the buffer structure, the fixed-point
format and the frame buffers around the core are this implementation's own
choices. They are marked as such below and in each file's header.

## Data flow

```
data_in (8) ─► mean removal ─► dct8aan  ─► dct_buf  ─► dct8aan  ─► dct_buf  ─► data_out (12)
  row order    (D_SIGNED=0)    rows 8→10   transpose   cols 10→12  transpose     row order
start ───────────────────────► rdy ──────► rdy ──────► rdy ──────► rdy ────────► rdy
                               11 cycles   55 cycles   11 cycles   55 cycles   = 132
```

| file | role |
|------|------|
| `rtl/dct_pkg.sv` | coefficients M1..M4, scale factors s(k), latency constants |
| `rtl/dct8aan.sv` | serial 8-point AAN 1-D DCT stage (used twice) |
| `rtl/dct_buf.sv` | 8x8 transpose buffer (used twice) |
| `rtl/dct_aan.sv` | the 2-D core: the four units in a chain |
| `rtl/input_frame_buffer.sv`, `rtl/output_frame_buffer.sv` | frame stores around the core |
| `rtl/dct.sv` | system top: input frame → core → output frame |

Each unit passes a `rdy` pulse downstream. This pulse is its `start` input
delayed by the unit's latency, so it marks element 0 of a block. The next
unit uses it as its own `start`.

## The 1-D AAN stage (`dct8aan`)

### Arithmetic

For an input vector a(0..7) the stage forms, with adders only:

```
b0=a0+a7  b1=a1+a6  b2=a3-a4  b3=a1-a6  b4=a2+a5  b5=a3+a4  b6=a2-a5  b7=a0-a7
c0=b0+b5  c1=b1-b4  c2=b2+b6  c3=b1+b4  c4=b0-b5  c5=b3+b7  c6=b3+b6  c7=b7
d0=c0+c3  d1=c0-c3  d2=c2  d3=c1+c4  d4=c2-c5  d5=c4  d6=c5  d7=c6  d8=c7
```

Then it forms five products:

```
e2=m3*d2   e3=m1*d7   e4=m4*d6   e6=m1*d3   e7=m2*d4
m1=cos(pi/4)  m2=cos(3pi/8)  m3=cos(pi/8)-cos(3pi/8)  m4=cos(pi/8)+cos(3pi/8)
```

Adders then combine them into the raw outputs:

```
f2=d5+e6  f3=d5-e6  f4=e3+d8  f5=d8-e3  f6=e2+e7  f7=e4+e7
sa0=d0  sa1=f4+f7  sa2=f2  sa3=f5-f6  sa4=d1  sa5=f5+f6  sa6=f3  sa7=f4-f7
```

Finally one multiplication per output gives the orthonormal DCT:

```
y(k) = sa(k) * s(k),   s(0) = 0.5/sqrt(2),   s(k) = 0.25/cos(k*pi/16)
y(0) = 1/sqrt(8) * sum a(m),   y(k) = 1/2 * sum a(m) cos((2m+1)k*pi/16)
```

In scaled mode (`SCALED=1`) the stage leaves out the last multiplication.
It outputs `sa(k) / 2^SC_SHIFT` instead.

### Schedule

Samples arrive one per clock. A 7-deep shift register collects them. When
the eighth sample arrives, all eight are copied into a hold register, and
the whole adder network above runs combinationally from that register. The
phase counter `ph` counts 0..7 within a group of eight, and it keeps
counting while the next group streams in. A single multiplier computes the
five products on consecutive cycles after the load:

| ph | product | used first by |
|----|---------|---------------|
| 0 | e3 = m1·d7 | y(1) |
| 1 | e4 = m4·d6 | y(1) |
| 2 | e7 = m2·d4 | y(1) |
| 3 | e6 = m1·d3 | y(2) |
| 4 | e2 = m3·d2 | y(3) |

The outputs are registered: y(k) is loaded at phase 2+k and is on `dout`
one cycle later. y(1) needs three products, and this is what sets the stage
latency at 11 cycles (sample a(k) on `din` → y(k) on `dout`).

The products run in this order so that each y(k) finds the products it
needs already in registers. The next group refills the hold register at
phase 7 and starts overwriting the products at phase 0, but y(4)..y(7) only
leave at phases 6, 7, 0 and 1. So at phase 5, when all five products are
ready, the stage copies all eight sa values into a snapshot bank. y(0..3)
come from the live network and y(4..7) from the snapshot. This lets groups
run back to back with one hold register and one set of product registers.

### Fixed point

- Coefficients are 11-bit unsigned numbers with 10 fraction bits:
  M1=724, M2=392, M3=554, M4=1338 and s(0..7)=362, 261, 277, 308, 362,
  461, 669, 1312.
- The products keep `GUARD`=2 fraction bits. The adders after them work at
  that precision.
- The scaled result is rounded half-up and saturated to `OUT_W` bits.
- The row stage turns 8-bit pixels into 10-bit values. The column stage
  turns those into the 12-bit results.
- Against a floating-point 2-D DCT rounded to integers, the core stays
  within ±2 LSB, and its mean square error per block stays below 0.5 LSB²
  (both are checked on every block in the testbenches).

## The transpose buffer (`dct_buf`)

The buffer takes 64 words in row order and returns them in column order:
output o = 8·col + row carries input 8·row + col. Blocks arrive back to
back, so the buffer is a ping-pong memory of two 64-word banks. Block n is
written to bank n mod 2 while block n−1 is read from the other bank. The
read address comes from the write counter: the output of a block at offset
`w+1−LAT` from the current write index. A negative offset means the word
belongs to the previous block, in the other bank. No read counter is
needed.

The latency `LAT` must lie between 51 and 64:

- The word that has to wait longest is row 7, column 0. It is written 56
  cycles after the start of the block but read as output 7, which sets the
  lower limit.
- A bank must be fully read before the block after next overwrites it,
  which sets the upper limit.

55 was chosen so that 11 + 55 + 11 + 55 = 132. The original design used
shift-register LUT FIFOs, not a register array.

The second buffer is the same module, 12 bits wide. It turns the column
order of the second stage back into row order, so results leave in natural
order.

## Core interface (`dct_aan`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous reset, active high |
| `start` | in | 1 | the pixel on `data_in` is pixel 0 of a block |
| `en` | in | 1 | clock enable of the whole core |
| `data_in` | in | 8 | pixels, row-major within the block |
| `data_out` | out | 12 | coefficients Y(u,v), row-major (u = vertical frequency) |
| `rdy` | out | 1 | with Y(0,0) of every block that had `start` |

| parameter | default | meaning |
|-----------|---------|---------|
| `D_SIGNED` | 1 | 1: pixels are two's complement −128..127. 0: pixels are 0..255 and 128 is subtracted (MSB inverted). |
| `SCALED_OUT` | 0 | 1: scaled-output mode with two multipliers. The output is Y(u,v)/(8·s(u)·s(v)), and the factors are left to a quantiser. |

Timing rules:

- Coefficient k of a block is on `data_out` exactly 132 enabled cycles
  after pixel k was on `data_in`.
- `en` = 0 freezes every register. Pause the input with `en`, not with idle
  data.
- Only the first block needs `start`. Blocks that follow without a gap are
  processed without it.
- A later `start` must fall on a block boundary (a multiple of 64 enabled
  cycles after the previous one). Off the boundary it is only safe once the
  last real block has drained, 196 enabled cycles after its first pixel.
  A `start` elsewhere would cut into blocks still in the pipeline. An
  assertion in `dct_aan` flags an off-boundary `start` within 196 enabled
  cycles of the previous `start`. It cannot see blocks that ran on without
  `start`.
- Out of reset the core produces garbage until the first block has passed
  through. `rdy` is low during that time.

## Frame-level system (`dct`)

`input_frame_buffer` holds one frame of `N_BLOCKS` blocks, 16 by default (a
32x32 image). The frame is stored block by block (address = 64·block +
8·row + col) and loaded through a write port while reset is held. After
reset the buffer streams the frame without gaps and repeats it, with
`ready` on the first pixel of each block driving the core's `start`.

The core runs with `D_SIGNED = 0` and `en` tied high. Its `rdy` starts each
block in `output_frame_buffer`, which stores the coefficients in the same
layout and pulses `frame_done` when the last block is in. A registered read
port returns the coefficients.

The first frame is complete 1 + 132 + 64·N_BLOCKS cycles after reset is
released. The frame size, the load and read ports and `frame_done` are
additions of this implementation. The original only names the two frame
buffers and shows how they connect to the core.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The floating-point reference model is in
`tb/dct_ref_pkg.sv`.

| testbench | what it covers |
|-----------|----------------|
| `tb_dct8aan` | both stage configurations and scaled mode against the real DCT (±1), exact 11-cycle latency, stalls, periodic `start` |
| `tb_dct_buf` | transposition, exact 55-cycle latency, stalls, `rdy` |
| `tb_dct_aan` | 40 blocks through signed, unsigned and scaled-mode cores: predefined patterns and random blocks; per-coefficient error, per-block mean square error, exact 132-cycle latency and `rdy`; back-to-back blocks with and without `start`, `en` stalls, restarts after idle time |
| `tb_input_frame_buffer`, `tb_output_frame_buffer` | stream order, strobes, wrap-around, abandoned blocks |
| `tb_dct` | the full system at default size: load a 16-block frame, run, read back and compare, completion time, restart |

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv rtl/dct8aan.sv rtl/dct_buf.sv rtl/dct_aan.sv \
  rtl/input_frame_buffer.sv rtl/output_frame_buffer.sv rtl/dct.sv tb/tb_dct.sv \
  --top-module tb_dct
./obj_dir/Vtb_dct
```

For another testbench, swap the last file and the top module. Each run
takes well under a second.

## Where this implementation departs from or adds to the original

- **Output width.** One signal table lists a 16-bit output. Everything else
  (symbol, interconnection, feature list) gives 12 bits, and 12 bits are
  used.
- **Normalisation.** The article's pseudo-code scales by an extra factor of
  4 (`sa·s·4`). That disagrees with its own DCT equation and would not fit
  12 bits. The equation's orthonormal scaling is used.
- **Transform order.** The article's text transforms columns first, while
  its structure diagrams put the row stage first. The row stage comes first
  here; the result is identical.
- **Transpose buffers.** These are a register-array ping-pong, not
  shift-register FIFOs.
- **Scaled mode.** The shifts (÷4 after the row stage, ÷2 after the column
  stage) are this implementation's choice, made so that results fit the
  10-bit and 12-bit buses.
- **Restarts.** The start/restart rule, the reset style and the handling of
  an early `start` are not specified in the original.
- **Not covered.** Resource counts, the 100 MHz clock target and other
  FPGA-specific figures are properties of the original's vendor
  implementation. This RTL has not been evaluated against them.
