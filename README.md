# 8 x 8 two-dimensional DCT with Arai's fast 1-D transform

This design computes the two-dimensional discrete cosine transform of an
8 x 8 block of 8-bit pixels, the transform at the heart of JPEG-style image
compression. It uses the separability of the 2-D DCT: a 1-D DCT over each
row, a transposition, and a second 1-D DCT over each column. Each 1-D
transform is the eight-point fast algorithm of Arai, Agui and Nakajima. It
needs 29 additions and 5 constant multiplications, so a whole block costs
16 x 29 = 464 additions and 16 x 5 = 80 multiplications.

```
          +--------+  addr1/out_rom  +---------------------------------------------+
 load --> | mem_in |---------------->| dct_module                                  |
          | 64 x 8 |                 |  row dct1d -> transpose_buffer -> col dct1d |
          +--------+                 +---------------------------------------------+
                                        | we2/addr2/data_out1     | we3/addr3/data_out2
                                        v                         v
                                   +---------+               +----------+
                       output1 <-- | mem_out |   output2 <-- | mem_out2 |
                                   | 64 x 19 |               | 64 x 19  |
                                   +---------+               +----------+
```

## The scaled 1-D transform (`dct1d`)

The plain eight-point DCT, without normalisation, is

    Y(k) = sum_{n=0..7} a(n) cos((2n+1) k pi / 16),   k = 0..7

Arai's algorithm does not compute Y(k). It computes a scaled version that
needs far fewer multiplications:

    S(0) = Y(0),     S(k) = 2 cos(k pi/16) * Y(k)   for k = 1..7

In numbers, S(k)/Y(k) is 1, 1.962, 1.848, 1.663, 1.414, 1.111, 0.765 and
0.390 for k = 0..7. **The design leaves these factors in place.** It has no
output scaling stage. Every coefficient it produces, 1-D and 2-D, carries
them. A compression pipeline normally folds them into the quantisation
table: divide X(k,l) by q(k,l)·c(k)·c(l) instead of q(k,l), where c is the
ratio above. To get the orthonormal DCT, multiply X(k,l) by
e(k)e(l)/(4 c(k) c(l)), where e(0) = 1/sqrt(2) and e(k) = 1 otherwise.

The flow graph has five stages. Node names follow the usual drawing of the
algorithm.

| stage | equations |
|---|---|
| b | b0=a0+a7, b1=a1+a6, b2=a3-a4, b3=a1-a6, b4=a2+a5, b5=a3+a4, b6=a2-a5, b7=a0-a7 |
| c | c0=b0+b5, c1=b1-b4, c2=b2+b6, c3=b1+b4, c4=b0-b5, c5=b3+b7, c6=b3+b6, c7=b7 |
| d | d0=c0+c3, d1=c0-c3, d3=c1+c4, d4=c2-c5 (others pass through) |
| e | e2=m3·c2, e3=m1·c6, e4=m4·c5, e6=m1·d3, e7=m2·d4 |
| f | f2=c4+e6, f3=c4-e6, f4=c7+e3, f5=c7-e3, f6=e2+e7, f7=e4+e7 |
| out | S0=d0, S4=d1, S2=f2, S6=f3, S1=f4+f7, S7=f4-f7, S5=f5+f6, S3=f5-f6 |

The constants are m1 = cos(4π/16) = 0.7071, m2 = cos(6π/16) = 0.3827,
m3 = cos(2π/16) − cos(6π/16) = 0.5412 and m4 = cos(2π/16) + cos(6π/16) =
1.3066. The stage equations and constants are the algorithm's. The
arithmetic format was chosen for this design:

* Constants have 12 fractional bits (parameter `CF`). Each product is
  rounded half-up to an integer, so all stored values are integers.
* Internal nodes are the input width plus 4 bits. The largest gain of any
  node (sum of absolute weights) is 10.06, so this cannot overflow.
* There are registers after stage c, after stage e and at the output. The
  latency is 3 clocks, and a new vector can enter every clock.

The two instances differ only in width, as in the reference architecture:

| instance | input | internal | output |
|---|---|---|---|
| row unit | 9 bits, the pixel zero-extended | 13 bits | 13 bits |
| column unit | 13 bits | 17 bits | 19 bits |

Row results reach at most 256 × 10.06 ≈ 2575 in magnitude. 2-D coefficients
reach about 25 900, which leaves room inside the 19-bit words.

Accuracy: a 1-D result is within 2 + (sum of |inputs|)/8192 of the exact
scaled value. A 2-D coefficient is within about 7 of the exact scaled 2-D
DCT on pixel data, mostly because the row results are rounded to integers.
That is small next to values of up to 25 900.

## Row-column engine (`dct_module`)

The engine runs a fixed schedule for each block:

1. **Row pass, 20 clocks per row.**
   * Eight clocks read the row's pixels from `mem_in`, one per clock, at
     address r·8+c.
   * The read has one clock of latency. The eighth pixel goes straight from
     the memory into the row unit, together with the seven already
     collected.
   * Four clocks later the eight results arrive. They are written, all at
     once, into row r of the transpose buffer. They are also held in a
     register.
   * Eight clocks write them, one per clock, to `mem_out` at address r·8+l.
2. **`flag` rises** once all eight rows are done.
3. **Column pass, 12 clocks per column.**
   * One clock hands column l of the transpose buffer to the column unit.
   * Three clocks later its eight outputs arrive. They are X(0,l)..X(7,l).
   * Eight clocks write them to `mem_out2` at address k·8+l.
4. **`done` rises** and the engine returns to idle.

The whole block takes 1 + 8·20 + 8·12 = **257 clocks**, counted from the
clock edge that samples `enable` to the edge that sets `done`.
`flag` and `done` stay high until the next start. `enable` is a start
request and is taken only while `busy` is low. Assertions in the module
check these invariants:

* the two units never deliver results in the same clock;
* the two result memories are never written in the same clock;
* each unit delivers only while the controller is waiting for it.

The transpose buffer (`transpose_buffer`) is an 8 × 8 array of 13-bit
registers. It is written one row at a time and read one column at a time.

## Memories and the top level (`dct_top`)

* `mem_in`: the input block, 64 × 8 bits, row-major.
  * Load it through `load_we` / `load_addr` / `load_data`.
  * The engine reads it with one clock of latency.
  * Its output `out_rom` is 9 bits wide. Bit 8 is always 0, because the
    pixel is zero-extended into a signed number.
* `mem_out`: the 64 row-pass results, 19-bit signed, at address r·8+l.
  Read it through `out1_raddr` → `output1`.
* `mem_out2`: the 64 coefficients, 19-bit signed, at address k·8+l. Here k
  is the vertical frequency and l the horizontal one. Read it through
  `out2_raddr` → `output2`.

Both result memories are instances of `coef_ram`. Each has one write port
for the engine and one read port for the user. Reads are registered: data
appears one clock after the address. All three memories start cleared.

The engine's internal buses `addr1`, `out_rom`, `addr2` and `addr3` are
brought out as top-level ports for observation.

Shared sizes and constants are in `dct_pkg`:

| name | value | meaning |
|---|---|---|
| `PIX_W` | 8 | pixel width |
| `IN_W` | 9 | row-unit input width |
| `TB_W` | 13 | transpose-buffer word width |
| `OUT_W` | 19 | stored coefficient width |
| `CF` | 12 | fractional bits of the constants |

Typical use:

1. Write the 64 pixels.
2. Pulse `enable` for one clock.
3. Wait for `done`.
4. Read `output2` for addresses 0..63.

A flat block of value p gives X(0,0) = 64·p, and every other coefficient is
exactly 0.

## Where this design goes beyond the reference implementation

The reference implementation describes the split into two 1-D units and a
transpose buffer, and the row-then-column order. It also names the four
top-level parts (`mem_in`, `dct_module`, `mem_out`, `mem_out2`) and gives
the 8-bit input and 19-bit result widths. It does not describe:

* **Control:** the schedule above, the read/compute/write sequencing, and
  what `flag` means. Here `flag` marks the end of the row pass.
* **Arithmetic:** the fixed-point format, rounding, internal widths and
  pipeline registers.
* **Added ports:** the load port of `mem_in`, the separate read ports of
  the result memories, `rst_n`, `busy` and `done`. The reference input
  memory is a ROM with fixed contents.

The schedule does not overlap the two passes or consecutive blocks. The
engine finishes one block before it accepts the next. A faster controller
could stream rows into the row unit back to back, since `dct1d` takes one
vector per clock. That is left out here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The references are
computed in floating point inside the testbench with `$cos`, never from
the RTL's own arithmetic.

* `tb_dct1d`: 400 vectors, mostly back to back.
  * Covers the row configuration and the column configuration.
  * Inputs are random, extreme-valued patterns and alternating extremes.
  * Checks every output against S(k) and checks the 3-clock latency.
* `tb_transpose_buffer`: rows written in shuffled order, every column read
  back.
* `tb_mem_in`: load, read-back, zero extension and read-during-write.
* `tb_coef_ram`: load, read-back and read-during-write.
* `tb_dct_module`: twelve blocks, with behavioural memories on the
  engine's ports. The blocks are zero, constant, checkerboard, ramps and
  random. Checks:
  * each row result against the 1-D DCT of its pixel row;
  * each coefficient against the 1-D DCT of its column of row results,
    and against the full 2-D DCT with a tolerance of 20;
  * each address is written exactly once;
  * `flag` comes between the two passes;
  * the block takes 257 clocks;
  * a start request while busy is ignored.
* `tb_dct_top`: the whole design at its default sizes.
  * Eight blocks go through the load port and are read back through the
    read ports.
  * Each value is checked the same way as in `tb_dct_module`.
  * The flat block must give exactly 6400 and 63 zeros.
  * Each mechanism must occur at least once: block completion, row-pass
    flag, column writes after the flag, an ignored start while busy, a
    reload, and the observed input bus matching the pixel read.

Run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dct_top \
    -y rtl rtl/dct_pkg.sv tb/tb_dct_top.sv
./obj_dir/Vtb_dct_top
```

The other testbenches build the same way with their own top module name.

## Changing it

* **Arithmetic precision:** change `CF` in `dct_pkg`. Both units follow it.
  The testbench tolerances are set for `CF` = 12 and must be retuned: they
  allow for a constant error of up to 2^-13 per product.
* **Wider pixels:** change `PIX_W`. The row-unit and buffer widths follow.
  Check that `OUT_W` still holds about 101 × 2^(PIX_W) in magnitude, since
  the largest 2-D gain is 10.06².
* **Timing:** for a faster clock, `dct1d` is the place to add stages. Its
  three register points are marked in the code. The controller waits on
  the units' valid outputs, not on a fixed count, so extra latency only
  lengthens the block time.
