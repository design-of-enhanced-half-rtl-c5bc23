# Three-level 2-D Haar DWT on Enhanced Half Ripple Carry Adders

This is a hardware image-compression front end. It computes a three-level,
two-dimensional Haar discrete wavelet transform (DWT) of a grey-scale image.
Every addition and subtraction in it is done by an Enhanced Half Ripple Carry
Adder (EHRCA). The EHRCA is a ripple-carry adder in which only a chain of
multiplexers waits for the carry. Everything else in each bit works out its
result in parallel, from that bit's own operand bits.

The RTL follows a published design that proposes the EHRCA as a cheaper
alternative to a BEC-based square-root carry-select adder. That design then
uses it in the adders of a Haar 2-D DWT. The adder structure, the Haar
filters, the division by two and the three levels come from that design. The
memory organisation, pipelining, control and interface are this
implementation's own. They are listed in "Departures and assumptions" below.

## The adder: EHRCA

For one bit with operands `a`, `b` and incoming carry `c`:

* a half adder gives `h = a ^ b` and `g = a & b`;
* an OR of the two half-adder outputs gives `p = h | g = a | b`;
* `g` is the bit's carry-out when `c = 0`, and `p` is its carry-out when
  `c = 1`. A 2:1 multiplexer selected by `c` picks between them, so the
  carry-out is the majority of `a`, `b` and `c`;
* the sum bit is `h ^ c`.

The half adders and OR gates of all bits settle together. Only the
multiplexer chain, one mux per bit, ripples. This is the "half" that still
ripples. You can see it as a carry-select adder with one-bit blocks, in which
the two precomputed carries cost one AND and one OR instead of a second
ripple adder or an excess-1 converter.

* `rtl/half_adder.sv` is the one-bit half adder.
* `rtl/ehrca4.sv` is the 4-bit cell: four slices and the mux chain, with
  `cin` and `cout`.
* `rtl/ehrca.sv` chains `WIDTH/4` cells (`WIDTH` defaults to 16). It is used
  with `b` inverted and `cin = 1` for subtraction.

Reference point from the source (FPGA results, not reproduced here): the
16-bit EHRCA is reported at 25 slices, 42 LUTs, 16.7 ns and 247 mW. The
16-bit BEC carry-select adder is reported at 28 slices, 47 LUTs, 16.0 ns and
280 mW. That is about 11 % less area and power, for a slightly longer delay.

## The transform

A 2x2 block of samples `[a b; c d]` (top row `a b`) gives four coefficients:

```
LL = floor((a + b + c + d) / 2)   low  along rows, low  along columns
HL = floor((a - b + c - d) / 2)   high along rows, low  along columns
LH = floor((a + b - c - d) / 2)   low  along rows, high along columns
HH = floor((a - b - c + d) / 2)   high along rows, high along columns
```

The first letter names the filter along the rows, the second the filter along
the columns. LL is twice the block average, which is the Haar "sum of four
pixels divided by two".

The transform is separable and is computed in two stages of four EHRCAs
each:

* **Row-wise compression** (`rtl/row_wise_compression.sv`) forms the sum
  (low pass) and difference (high pass) of each row's two samples:
  `lo0 = a+b`, `lo1 = c+d`, `hi0 = a-b`, `hi1 = c-d`. Producing one pair of
  values for each pair of samples is the downsampling by two along rows.
* **Column-wise compression** (`rtl/column_wise_compression.sv`) combines
  those two results vertically: `LL = lo0+lo1`, `LH = lo0-lo1`,
  `HL = hi0+hi1`, `HH = hi0-hi1`. Each is then halved by an arithmetic shift
  right, which rounds toward minus infinity.

Level 1 transforms the image. Level 2 transforms the level-1 LL band, and
level 3 transforms the level-2 LL band. The result is the usual pyramid:
LL3, plus HL/LH/HH at three scales. In the single-image layout, level `L`
with `S = IMG >> L` puts LL at `(i, j)`, HL at `(i, j+S)`, LH at `(i+S, j)`
and HH at `(i+S, j+S)`.

All samples inside the datapath are 16-bit two's complement (`dwt_pkg::COEF_W`).
For 8-bit pixels the largest magnitude reached is 8 × 255 = 2040 (LL3). Even
the unhalved level-3 sums stay far inside 16 bits.

## Datapath and buffers

```
 pix_* ──► image buffer (4 banks, 8 bit) ──┐
                                           ├─ mux ─► row stage ─► reg ─► column stage ─► reg ─► coef stream
 LL write-back ─► LL buffer (4 banks, 16 bit) ┘                                              │
        ▲                                                                                 │
        └──────────────────────────────── coef.ll ◄──────────────────────────────────────┘
```

**One block per clock.** Both buffers are `quad_bank_ram` instances with four
banks. Sample `(r, c)` is in bank `{r[0], c[0]}` at address
`(r>>1)*(width/2) + (c>>1)`. The four samples of block `(i, j)` therefore
share the address `i*(width/2) + j`, one in each bank, and a single
synchronous read returns the whole block.

**In-place LL write-back.** The hardest part of the design to see is why the
LL buffer needs no second copy. Every level writes its LL coefficient
`(i, j)` into the LL buffer as sample `(i, j)` of an image `IMG/2` wide. That
position holds a value of the previous level's LL band. Only block
`(i/2, j/2)` of the current level reads it, and blocks are visited in raster
order, so that block has already been read. Level 1 reads the image buffer
and fills the LL buffer. Levels 2 and 3 read and overwrite the LL buffer.
Across a level boundary the controller waits three clocks, until the last LL
of the level has been written, before it reads the first block of the next
level.

**Pipeline** (`rtl/dwt_core.sv`, `rtl/dwt2d_top.sv`):

| clock | what happens                                             |
|-------|----------------------------------------------------------|
| t     | controller issues block address                          |
| t+1   | buffer data valid; row stage; result registered          |
| t+2   | column stage; coefficients registered                    |
| t+3   | `coef_valid`; LL written back at the end of this clock   |

**Controller** (`rtl/dwt_ctrl.sv`) has three states: idle, run (one block per
clock over a `(IMG>>L)`-square grid) and drain (three clocks). It repeats for
`LEVELS` levels and then pulses `done`.

## Interface and timing (`dwt2d_top`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; active-low synchronous reset |
| `pix_we`, `pix_row`, `pix_col`, `pix_data` | in | write one 8-bit pixel per clock, only while `busy` is low (an assertion checks this) |
| `start` | in | begin; ignored while busy |
| `busy`, `done` | out | running; one-clock pulse one clock after the last coefficient |
| `coef_valid`, `coef_level`, `coef_row`, `coef_col` | out | a block's coefficients are valid, with its level (1..3) and position in the subband |
| `coef` | out | `subbands_t` {ll, hl, lh, hh}, signed 16 bit |

Intermediate LL values (levels 1 and 2) are streamed as well. A receiver that
only wants the final pyramid keeps LL from level 3 only.

For the default 256 × 256 image a decomposition takes
16384 + 4096 + 1024 block clocks plus 3 × 3 drain clocks: 21513 clocks from
the clock `start` is sampled to `done`. Loading the image takes 65536 clocks.

Parameters of `dwt2d_top`: `IMG` (default 256, a power of two of at least
`max(8, 2^(LEVELS+1))`), `LEVELS` (default 3, at most 3 with the 2-bit
`coef_level`), and `PIX_W` (default 8). The buffers use
`IMG²/4 × PIX_W` bits for the image and `IMG²/16 × 16` bits for the LL band.

## Departures and assumptions

* **Image size and pixel width** are not fixed by the source. 256 × 256 and
  8 bits are assumptions.
* **Detail filters.** The source gives only the LL formula, (sum of four
  pixels) / 2. HL, LH and HH use the matching Haar differences with the same
  scaling.
* **Rounding.** The halving rounds toward minus infinity (arithmetic shift).
  The source does not specify rounding.
* **EHRCA details.** The published 4-bit circuit shows the half adders, OR
  gates, carry multiplexers, `cin` and `cout`. It does not label the sum gates
  or the mux input order. XOR sums and "carry 0 → AND, carry 1 → OR" are the
  only choices that make it an adder. Wider adders chain 4-bit cells.
* **Memory, pipeline, controller and streaming output** are this
  implementation's own. The source describes the transform, not how the image
  is held or how results leave the chip.
* **Not built:** the inverse transform (reconstruction), which the source
  mentions only as background; the BEC-based carry-select adder, which is only
  the baseline it compares against; and the MATLAB and FPGA flows used for its
  results.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_half_adder`, `tb_ehrca4`: exhaustive.
* `tb_ehrca`: the 16-bit adder on carry-chain corner cases, 20 000 random
  sums and 2 000 subtractions; an 8-bit instance on all 131 072 inputs.
* `tb_row_wise_compression`, `tb_column_wise_compression`: random blocks
  against integer arithmetic, including negative odd values for the rounding.
* `tb_dwt_core`: a random stream with gaps; checks values, order and the
  two-clock latency.
* `tb_quad_bank_ram`: fill and read-back of all banks; read-during-write
  returns the old value.
* `tb_dwt_ctrl`: the exact clock-by-clock block sequence for a 16 × 16 image,
  the drains, `done`, and a start ignored while busy.
* `tb_dwt2d_top`: the full design at its default parameters. It decomposes
  two 256 × 256 images (a noisy gradient and random pixels) and compares every
  coefficient of every level with a reference pyramid computed in the
  testbench. It checks the block count of each level, the 21513-clock
  run time, and that the final pyramid layout is covered exactly once. It
  also requires each mechanism to occur at least once: image-buffer reads,
  LL-buffer reads, negative details, rounding, level drains, an ignored
  start, and complete runs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/dwt_pkg.sv tb/tb_dwt2d_top.sv \
          --top-module tb_dwt2d_top -o sim
./obj_dir/sim
```

The same command works for any other testbench: substitute its file and
module name. `-Irtl` lets Verilator find each module in `rtl/<module>.sv`.
The full-size end-to-end run takes well under a second once built.
