# Low-area 8x8 2-D DCT with one time-shared 1-D core

This core computes the two-dimensional discrete cosine transform of 8x8 pixel
blocks, the transform at the heart of JPEG, M-JPEG, MPEG and H.261 encoders.
It uses the separability of the 2-D DCT: first an 8-point 1-D DCT over every
row, then an 8-point 1-D DCT over every column of that result. What keeps it
small is that a **single** 1-D DCT unit does both passes, one coefficient per
clock. A shift-register transpose buffer between the passes avoids block RAM.
The whole datapath holds four 12x10 multipliers and about 1.1 kbit of
registers.

Every stage talks to its neighbours through the same FIFO-like handshake, so
the pipeline stops cleanly when the consumer stops reading.

## Data flow

```
 pixels (12 bit)                                              coefficients (12 bit)
 ──────────► ping_buffer ─96─► src_mux ─96─► pong_buffer ─96─► dct_1d ─12─┬─► output_buffer ──►
                                  ▲            (MuxSel)                    │
                                  └──────96──── transpose_buffer ◄───12────┘
```

| module             | what it holds / does |
|--------------------|----------------------|
| `ping_buffer`      | Collects 8 pixels serially into a 96-bit row. Hands the row over in one cycle. |
| `src_mux`          | Feeds the pong buffer from the ping buffer (row pass) or the transpose buffer (column pass). Routes data, `empty` and `readEn`. |
| `pong_buffer`      | Holds the current row or column while the 1-D core computes its 8 coefficients. Its 4-state FSM sequences 8 rows, then 8 columns, and drives `MuxSel`. |
| `dct_1d`           | Add/sub butterfly, 4 multipliers, 88-bit pipeline register, rounding, adder tree. Sends row-pass results to the transpose buffer and column-pass results to the output buffer. |
| `dct_weight_rom`   | 8 x 40-bit table: four 10-bit weights per coefficient index. |
| `dct_round`        | Rounds a 22-bit product to 12 bits. |
| `transpose_buffer` | 63 x 12-bit shift register. Fixed taps present one column of 1-D coefficients. |
| `output_buffer`    | Two-word FIFO that decouples the core from whatever reads it. |
| `dct2d_top`        | Wires the above together. |
| `dct_pkg`          | Widths, types and the DCT constants. |

### The handshake

Each stage has an input side (`writeData`, `writeEn`, `full`) and an output
side (`readData`, `readEn`, `empty`). A word moves on the rising edge when
`writeEn` is high and `full` is low, and likewise when `readEn` is high and
`empty` is low. `readData` is valid whenever `empty` is low.

Adjacent stages are joined as follows:

- producer `readData` → consumer `writeData`
- consumer `writeEn` = `!empty` of the producer
- producer `readEn` = `!full` of the consumer

The 1-D core has two output sides that share one data bus:
`empty_transpose`/`readEn_transpose` and `empty_outbuff`/`readEn_outbuff`.
At most one of them is offered a result at a time. An assertion in `dct_1d`
checks this.

## Schedule of one block (the part worth understanding)

The pong buffer is the bottleneck, and the whole schedule follows from its FSM:

1. **Row pass** (`MuxSel = 0`). For each of the 8 rows:
   - `ONED_EMPTY`: load the row from the ping buffer (1 cycle).
   - `ONED_FULL`: present it for 8 accepted reads. The core makes
     coefficient k = 0..7 from one read each.
   - That is 9 cycles per row, 72 for the pass. Meanwhile the ping buffer
     fills the next row, which also takes 8 + 1 cycles, so neither side waits.
2. **Column pass** (`MuxSel = 1`). The same sequence, with
   `TWOD_EMPTY`/`TWOD_FULL`, loading columns from the transpose buffer.
   This is another 72 cycles. Then back to the row pass.

The 1-D core counts the words it accepts: the coefficient index k is the count
mod 8, and the word belongs to the column pass when the count mod 128 is 64
or more. That pass bit travels with the 88-bit product register. It decides
whether the result goes to the transpose buffer or to the output buffer.

**Transposing with a shift register.** Row-pass coefficients arrive in row
order, c(8r+k). Each one enters at `reg62` and shifts everything else down by
one place. After 63 writes, `reg(i)` = c(i). The taps
`{reg56, reg48, …, reg8, reg0}` then hold column 0, with row 0's coefficient
in bits [11:0]. The 64th coefficient, c63, leaves the core in exactly the
cycle the pong buffer sits in `TWOD_EMPTY`. The write of c63 and the read of
column 0 happen together and cause a single shift. After that, each column
read shifts once more, so after s shifts the taps hold column s. Column 7
needs c63, which the first shift brought in. Only 63 registers are needed
because column 0 leaves as c63 arrives. The buffer offers column 0 only in
that cycle. An assertion states that the reader must take it.

**Measured timing** (no back-pressure, checked by `tb_dct2d_top`):

| event                                            | cycles after first pixel accepted |
|--------------------------------------------------|-----------------------------------|
| first coefficient readable at the output        | 83  |
| last coefficient of the block readable          | 153 |
| block period, back-to-back blocks                | 144 |

While the core runs the column pass, the ping buffer loads the first row of
the next block and then holds `full` high. The writer therefore stalls for
about 72 cycles per block. Sustained input rate: 64 pixels per 144 cycles.

The published description of this architecture quotes a latency of 210
cycles: 72 for ping, plus 144 for pong, minus 8, plus 1 for the core's
register, plus 1 for the output buffer. That sum treats the ping and pong
stages as if they ran one after the other. With the FSMs as specified they
overlap, and the real figures are the ones in the table. 210 remains an
upper bound, and the testbench also checks this.

## The 1-D DCT arithmetic

The 8-point DCT splits into an even half and an odd half:

```
z0 = d X0 + d X2 + d X4 + d X6          z1 = a X1 + c X3 + e X5 + g X7
z2 = b X0 + f X2 - f X4 - b X6          z3 = c X1 - g X3 - a X5 - e X7
z4 = d X0 - d X2 - d X4 + d X6          z5 = e X1 - a X3 + g X5 + c X7
z6 = f X0 - b X2 + b X4 - f X6          z7 = g X1 - e X3 + c X5 - a X7
```

The terms are defined as follows:

- X0, X2, X4, X6 = x0+x7, x1+x6, x2+x5, x3+x4
- X1, X3, X5, X7 = x0−x7, x1−x6, x2−x5, x3−x4
- a…g = C1…C7, with C_k = ½·cos(kπ/16)

This is the orthonormal DCT-II, so the DC term of a row is Σx/(2√2).

The datapath does the following, one coefficient per clock:

1. Four 12-bit add/sub units form X. Add/sub j pairs element j with element
   7−j. `OddSel` (= k[0]) picks subtraction.
2. `dct_weight_rom` row k supplies {w3,w2,w1,w0}, with w0 in bits [9:0]. The
   weights are 10-bit signed fractions, round(1024·C):
   a=502, b=473, c=426, d=362, e=284, f=196, g=100.
3. Four signed 12x10 multipliers give 22-bit products. These go into the
   88-bit register, which is the core's one pipeline stage.
4. Each product is rounded to 12 bits (`dct_round`):
   - keep bits [21:10] and add bit 9 (round half up);
   - a positive value already at +2047 is not incremented, so it saturates
     instead of wrapping.
5. A two-level 12-bit adder tree sums the four rounded terms.

Rounding is done per product, and the intermediate 1-D coefficients are
12-bit integers. The result therefore differs slightly from an exact DCT.

For pixels in −128…127, the worst error seen over the test blocks is 4 LSB:

- The worst case is the DC term of a flat block. For an all-127 block it
  gives 1020 instead of 1016, because the 1-D value 359.2 is carried as 360.
- The end-to-end testbench accepts errors up to 6.

All intermediate values fit in 12 bits for level-shifted 8-bit pixels:

| value                    | largest magnitude |
|--------------------------|-------------------|
| row-pass sums            | 256   |
| 1-D coefficients         | about 362 |
| column-pass sums         | about 724 |
| 2-D coefficients         | 1024  |

The add/sub units and adder tree wrap on overflow. The port accepts any
12-bit value, but inputs much wider than −128…127 can make intermediate sums
wrap, so the caller must keep pixel values in that range.

## Using the core

`dct2d_top` ports:

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1  | clock |
| `rst`       | in  | 1  | synchronous reset, active high |
| `writeData` | in  | 12 | pixel, signed (already level-shifted), row-major within a block |
| `writeEn`   | in  | 1  | pixel offered |
| `full`      | out | 1  | pixel not taken this cycle |
| `readData`  | out | 12 | 2-D coefficient |
| `readEn`    | in  | 1  | consumer takes `readData` |
| `empty`     | out | 1  | no coefficient available |

These are 30 signal pins, matching the published I/O count.

**Output order.** The column pass produces, for column c = 0…7, coefficients
k = 0…7 of that column. Output word 8c+k of a block is therefore Z[k][c],
with k the vertical and c the horizontal frequency: column-major order. A
JPEG encoder's zig-zag scan must account for this.

Blocks simply follow one another. Reset starts the core at the beginning of a
block; there is no other framing.

## Where this RTL makes its own choices

The architecture description fixes the structure, the FSM states, the widths
and the rounding rule. The following points are left open there or stated
inconsistently, and this RTL resolves them as follows:

- **Reset**: synchronous and active high. All state is cleared, and the pong
  FSM starts in `ONED_EMPTY`.
- **Input width**: 12-bit signed pixels. An 8-bit input is also mentioned as
  an option. Level shifting (subtracting 128) is left to the caller.
- **Weights**: the scale is implied by keeping product bits [21:10]. The
  values are rounded to nearest.
- **Stoppable pong FSM**: the 8 cycles per line are counted as 8 accepted
  reads, so the FSM holds while the core is stalled.
- **Coefficient index and pass**: these come from a counter inside `dct_1d`.
  The description does not say who supplies the table index.
- **Transpose buffer `empty`**: the description says `empty` is never
  deasserted, which would stop the column pass from ever loading. Here it is
  low while a column can be read. `full` is never asserted, as described.
- **Output buffer in ALMOST_FULL**: `empty` is low, because `reg0` holds a
  readable word. The description's flag table says otherwise, but its own
  transition on `readEn` in that state needs a readable word.
- **Read without write in the transpose buffer**: shifts in zero. After the
  8th column its counters restart.
- **Register inference**: the transpose register is written as a plain array.
  An FPGA flow may map it into LUT shift registers. The published flip-flop
  count (about 400) suggests that was the case there. Nothing in this RTL
  forces it.

## Throughput in applications

At 144 cycles per block, a frame needs (pixels / 64) × 144 cycles. Luma only:

| frame      | blocks | cycles     | at 80.5 MHz | at 206 MHz |
|------------|--------|------------|-------------|------------|
| 720x480    | 5400   | 777,600    | 103 fps     | –          |
| 1920x1080  | 32,400 | 4,665,600  | –           | 44 fps     |

`tb_dct2d_frame` streams both frames through the core. From first pixel to
last coefficient it measures 777,609 and 4,665,609 cycles, which is
blocks × 144 + 9. With the published 210-cycle figure, the same frames give
71 fps and 30 fps.
The clock rates are the ones reported for Spartan-3E and Virtex-7
implementations. This RTL has not been through an FPGA flow.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/dct_ref_pkg.sv` is an
independent model built from the DCT definition:

- weights from `$cos`;
- rounding as floor((r+512)/1024), clipped;
- a bit-exact fixed-point 2-D model;
- the exact real-valued 2-D DCT.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_dct_round`         | 25 corner cases and 20,000 random products |
| `tb_dct_weight_rom`    | all 32 weights against the cosine formula |
| `tb_ping_buffer`       | row layout, full after exactly 8 words, random traffic against a queue model |
| `tb_src_mux`           | routing of data, `empty` and `readEn` |
| `tb_pong_buffer`       | 8 rows then 8 columns, each line held for 8 reads, `MuxSel`, 144 cycles per block |
| `tb_dct_1d`            | 3x128 random words with random back-pressure: bit-exact coefficients, routing per pass, 1-cycle latency, the `full` rule |
| `tb_transpose_buffer`  | 3 blocks: column contents, column 0 taken with the 64th write |
| `tb_output_buffer`     | random traffic against a two-entry queue, flags, latency |
| `tb_dct2d_top`         | 15 blocks end to end at full size: random and corner blocks (flat ±, checkerboard, impulse) |
| `tb_dct2d_frame`       | a synthetic 720x480 frame and a 1920x1080 frame, every coefficient bit-exact, frame cycle counts |

The end-to-end test runs in two phases:

- a stall-free phase that checks the 83/153/144-cycle timing;
- a phase with random writer gaps and reader back-pressure.

It also counts each mechanism and fails if any never happens: input stalls,
mux switches in both directions, column 0 taken with the 64th coefficient,
core stalls from a full output buffer, and the output buffer's full state.

**Simulating with Verilator**, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d_top.sv \
    --top-module tb_dct2d_top -o sim
./obj_dir/sim
```

Use the same command with another `tb_*` file for the unit tests. The design
is plain synthesizable SystemVerilog with no vendor primitives.
