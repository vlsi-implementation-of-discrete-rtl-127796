# 8x8 DCT with shared multipliers

This is a streaming 8x8 two-dimensional discrete cosine transform (DCT) for video
compression. It takes one 8-bit pixel per clock and returns one 12-bit coefficient per
clock. It is built as two 8-point 1-D DCTs joined by a transposition memory. The point of
interest is how each 1-D DCT multiplies. Its eight outputs are grouped into complex pairs
`Y(k) + jY(8-k)`, and each pair is a complex rotation of sums and differences of the inputs.
Each rotation takes three real multipliers. Every multiplier holds **two** constants: one for
the first half of a data period and one for the second half. So an 8-point DCT needs only
9 multipliers and 21 adders/subtractors, and it still delivers four outputs every 4 clock
cycles. The multipliers and adders can therefore be slow and small: a multiplier has 4 cycles
to settle and the butterfly adders have 8.

## The arithmetic of one 8-point DCT

The 1-D transform is

    Y(k) = c(k) * sum_{n=0..7} x(n) cos((2n+1) k pi / 16),   c(0) = 1/sqrt(2), c(k>0) = 1

First come the usual sums and differences:

    u(n) = x(n) + x(7-n),   v(n) = x(n) - x(7-n),   n = 0..3

Writing `cos(a) + j cos(b)` as a complex exponential turns each output pair into rotations by
`exp(j*theta)`:

| half of the data period | output pair        | rotation(s)                                                         |
|-------------------------|--------------------|---------------------------------------------------------------------|
| first 4T                | Y(0) + jY(4)       | exp(j pi/4) * [(u0+u3) - j(u1+u2)]                                   |
| first 4T                | Y(1) + jY(7)       | exp(j pi/16) * (v0 - j v3)  +  exp(j 5pi/16) * (v2 - j v1)           |
| second 4T               | Y(2) + jY(6)       | exp(j pi/8) * [(u0-u3) + j(u2-u1)]                                   |
| second 4T               | Y(3) + jY(5)       | exp(j 3pi/16) * (v0 + j v3)  +  exp(j 15pi/16) * (v2 + j v1)         |

Rows 1 and 3 have the same form, and so do rows 2 and 4. Only the angle changes, plus the sign
of an adder. So the same hardware serves both halves of the period:

* the **even part** (`even_part`) is one rotation unit with angles pi/4 and pi/8;
* the **odd part** (`odd_part`) is two rotation units, with angles (pi/16, 3pi/16) and
  (5pi/16, 15pi/16), whose results are added.

A control bit, `half`, is 0 in the first 4T and 1 in the second. It picks the constant inside
every multiplier. It also switches the controlled adders between `+` and `-`.

Each rotation `(a + jb) * exp(j*theta)` uses three multiplications, not four:

    s  = a + b
    re = K1*s - K2*b          K1 = cos(theta)
    im = K1*s - K3*a          K2 = cos(theta) + sin(theta),  K3 = cos(theta) - sin(theta)

The constants are stored as 14-bit two's complement numbers with 12 fraction bits,
`round(4096*K)`. They are listed in `rtl/dct_pkg.sv`:

| unit       | K1 (half 0 / 1) | K2 (half 0 / 1) | K3 (half 0 / 1) |
|------------|-----------------|-----------------|-----------------|
| even       | 2896 / 3784     | 5793 / 5352     | 0 / 2217        |
| odd, A     | 4017 / 3406     | 4816 / 5681     | 3218 / 1130     |
| odd, B     | 2276 / -4017    | 5681 / -3218    | -1130 / -4816   |

At pi/4 the constant K3 is 0. That multiplier idles in the first half-period.

Counting the operators: 9 multipliers. The adders/subtractors are 8 in the butterfly, 5 in the
even part (2 operand adders, the pre-adder, 2 post-adders) and 8 in the odd part (2
pre-adders, 4 post-adders, 2 final sums), 21 in all. Sign inversions are not counted.

## Timing of a data period

All registers run on the word clock `clk` (CK_1, period T). A 3-bit phase counter numbers
T0..T7 of the 8T data period. CK_4 and CK_8 are bits of this counter. Registers that belong to
the 4T and 8T stages are not clocked by CK_4 and CK_8. Instead they use clock enables: `en4`
in T3 and T7, and `en8` in T7. For block `j`, whose word 0 enters in cycle `8j`:

| cycles        | stage                                                                 |
|---------------|-----------------------------------------------------------------------|
| 8j .. 8j+7    | words shift into the input buffer; in T7 all 8 go to the holding register |
| 8j+8 .. 8j+15 | butterfly adders settle (8T); u, v registered in T7                    |
| +16 .. +19    | operands of half 0 settle; registered in T3                           |
| +20 .. +23    | half-0 products settle (4T); half-1 operands                          |
| +24 .. +27    | half-0 post-adds; half-1 products                                     |
| +28 .. +31    | Y0, Y4, Y1, Y7 sent, one per cycle; half-1 post-adds                  |
| +32 .. +35    | Y2, Y6, Y3, Y5 sent                                                   |

So a 1-D DCT has a latency of 28 cycles and accepts a new block every 8 cycles with no gaps.
The output goes out in **decimated order**, `Y0 Y4 Y1 Y7 Y2 Y6 Y3 Y5`. A 4:1 multiplexer
(`obuf_decimated`), steered by the two low phase bits, picks among the four output registers.

## The 2-D transform

```
 din --> [front-end dct1d] --decimated rows--> [transpose_mem] --columns--> [back-end dct1d] --> dout
           8b in, 12b out                       2 x 64 words                12b in, 12b out
                                                                            natural order
```

* **Front-end** (`dct1d`, `NATURAL=0`). It transforms each 8-pixel row. Its output is
  `Y/2` with 2 fraction bits in a 12-bit word.
* **Transposition memory** (`transpose_mem`). This is a 128-word RAM addressed by a 7-bit
  counter that advances every cycle.
  * Bit 6 selects one of two 64-word halves. The front-end writes block B into one half while
    the back-end reads block B-1 from the other.
  * Bits 5:3 are the row. Bits 2:0 are the slot in the decimated order, so the write column is
    `dec_order(cnt[2:0])`. The front-end's reordering costs nothing.
  * The read address swaps row and column, so each block is read column by column.
  * The read is synchronous and runs one count ahead. A read and a write in the same half
    never meet on one address.
* **Back-end** (`dct1d`, `NATURAL=1`). It transforms the columns. The front-end output
  starts in the middle of a data period (phase T4). So the back-end runs on the complement of
  CK_8: its phase is the front-end's phase plus 4.
* **Natural-order output buffer** (`obuf_natural`). Its input comes in decimated order.
  * A demultiplexer writes each word into the capture register of its coefficient index.
  * When the eighth word arrives, all eight are copied into a second register bank.
  * A multiplexer then sends them out in the order k = 0..7.
  * The second bank is needed because the next block starts overwriting the capture
    registers at once. Y(4), for example, is replaced 3 cycles before its turn to leave.

### Interface of `dct2d_top`

| port         | dir | width | meaning                                                      |
|--------------|-----|-------|--------------------------------------------------------------|
| `clk`        | in  | 1     | word clock; one pixel in and one coefficient out per cycle     |
| `rst_n`      | in  | 1     | asynchronous, active low                                      |
| `din`        | in  | 8     | pixel, two's complement (pixels level-shifted by -128)        |
| `dout`       | out | 12    | coefficient, two's complement                                 |
| `dout_valid` | out | 1     | `dout` holds a coefficient (from 129 cycles after reset on)   |
| `dout_sob`   | out | 1     | `dout` is F(0,0), the first coefficient of a block            |
| `ck4`, `ck8` | out | 1     | the derived CK_4 / CK_8 (phase bits 1 and 2)                  |

Pixels enter from the first cycle after reset. Each block is sent as 64 pixels row by row,
with no gaps between blocks. There is no start or valid input.

Each 1-D stage computes `Y/2`. The result is therefore the orthonormal 2-D DCT used by
JPEG/MPEG:

    F(v,u) = 1/4 c(u) c(v) sum_y sum_x p(y,x) cos((2x+1) u pi/16) cos((2y+1) v pi/16)

Here u is the horizontal and v the vertical frequency. For each block, the outputs come
u-major: `F(0,0), F(1,0), ..., F(7,0), F(0,1), ...`. Each group of 8 is in natural order.
F(0,0) of a block leaves 129 cycles after the block's first pixel enters. For 8-bit input,
|F| ≤ 1024, so the 12-bit output never saturates.

## Accuracy

All rounding is round-half-up on the last dropped bit. This happens only at the outputs of
the even and odd parts. The products and post-adds keep full precision. Across the test
blocks in `tb/tb_dct2d_top.sv`, the largest error against a double-precision DCT is 0.63 of
an output LSB. The test blocks include all -128, all +127, full-scale checkerboards, impulses
and random blocks.

## Choices made in this design

The following are choices of this design, not fixed by the original architecture:

* **Input format.** Input pixels are signed.
* **Word lengths and scaling.**
  * The intermediate word is 12 bits with 2 fraction bits.
  * The constants are 14 bits with 12 fraction bits.
  * Each stage scales its output by 1/2, with rounding and saturation.
  * Inside the multipliers and post-adders the word lengths are not trimmed. The widest
    adder is therefore about 28 bits. A hand-optimised version would truncate the products
    and keep the adders near 11 bits.
* **Clocking.** The design has one clock with enables, not the derived CK_4/CK_8 clocks. The
  complement clocks exist only as outputs of `clock_gen`. The back-end's offset of half a
  period is expressed as a phase offset.
* **Multiplier.** `booth_mult` is a behavioural sum of radix-4 Booth partial products, not a
  particular array or tree. Which constant a shared multiplier uses is chosen in front of
  the Booth recoder.
* **Transposition memory.** It is organised as two 64-word halves with one write and one
  synchronous read port, and the read address runs one count ahead.
* **Natural-order output buffer.** `obuf_natural` has a second register bank. The back-end
  still contains the decimated multiplexer, which then feeds the demultiplexer.
* **Framing.** There is no frame-sync pin: blocks are framed from reset. `dout_valid` and
  `dout_sob` are outputs added for convenience.
* **Not modelled.** The I/O pads and everything specific to the full-custom layout.

## Files

| file                      | contents                                                   |
|---------------------------|------------------------------------------------------------|
| `rtl/dct_pkg.sv`          | constant format, rotation constants, decimated-order table |
| `rtl/dct2d_top.sv`        | the 8x8 DCT                                                 |
| `rtl/clock_gen.sv`        | phase counter, CK_4/CK_8 and complements, enables           |
| `rtl/dct1d.sv`            | one 8-point DCT (front-end or back-end)                     |
| `rtl/sp_buffer.sv`        | serial-to-parallel input buffer                             |
| `rtl/butterfly.sv`        | u(n), v(n)                                                  |
| `rtl/even_part.sv`        | Y0/Y4 then Y2/Y6                                            |
| `rtl/odd_part.sv`         | Y1/Y7 then Y3/Y5                                            |
| `rtl/cmul_shared.sv`      | three-multiplier complex rotation with two angles           |
| `rtl/shared_mult.sv`      | multiplier with two selectable constants                    |
| `rtl/booth_mult.sv`       | radix-4 (modified Booth) signed multiplier                  |
| `rtl/rc_addsub.sv`        | ripple-carry adder/subtractor                               |
| `rtl/scale_round.sv`      | rounding and saturation to the output word                  |
| `rtl/obuf_decimated.sv`   | front-end output multiplexer                                |
| `rtl/obuf_natural.sv`     | back-end reorder buffer                                     |
| `rtl/transpose_mem.sv`    | 2 x 64-word transposition RAM and its 7-bit counter         |

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`. `tb/tb_dct2d_top.sv` runs the whole design at its default
parameters on 24 blocks. It also checks the latency, that the output never pauses, and that
both constant sets, both RAM halves and the reorder buffer were used.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl rtl/dct_pkg.sv tb/tb_dct2d_top.sv \
              --top-module tb_dct2d_top -o sim
    ./obj_dir/sim

Any other testbench builds the same way; swap in its file and top module name. The package
must come first on the command line, and `-Irtl` lets Verilator find the other modules.

## Changing it

* **Constants.** To change the constant precision, change `C_W`/`C_FRAC` in `dct_pkg` and
  recompute the table above as `round(2^C_FRAC * K)`.
* **Word lengths.** The intermediate word length and its fraction bits are the `MID_W` and
  `MID_FRAC` parameters of `dct2d_top`.
* **Latency.** The latency constant in `dct2d_top` (129) and the 28-cycle offset of the RAM
  counter follow from the pipeline in the timing table. Both must change if a stage is added.
