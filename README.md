# Two-stage Forward Core Transform for JPEG-XR, pipelined for FPGA

JPEG-XR (ITU-T T.832) replaces the DCT of JPEG with the Forward Core Transform
(FCT), an integer, exactly invertible transform built only from additions,
subtractions and shifts. It works on 16x16-pixel macroblocks in two stages:

1. Every 4x4 block of the macroblock goes through a 2x2 Hadamard step made of
   four `T2x2h` lifting transforms.
2. Coefficient 0 of each of the 16 transformed blocks is collected into a new
   4x4 block. This block goes through a second set of four 2x2 transforms:
   one `T2x2h` with rounding, two `Todd` rotations and one `Toddodd`
   rotation.

This RTL does both stages at full rate. Stage 1 takes one whole 4x4 block, 16
pixels, every clock. Each 2x2 transform is a 4-clock pipeline. The hard part
is `Todd` and `Toddodd`. Written as the standard writes them, they are long
chains of dependent lifting steps: six and seven clock steps when done one
dependency level per clock. Here they are regrouped so that they fit the same
4 clocks as `T2x2h`, and they still give the standard's results bit for bit.

## Data layout and coefficient names

A block is 4x4 values numbered 0..15 in raster order:

```
 0  1  2  3
 4  5  6  7
 8  9 10 11
12 13 14 15
```

A macroblock is 4x4 such blocks. This design takes the blocks of a macroblock
in raster order too (block 0 top-left, block 15 bottom-right). After stage 1,
position 0 of every block goes to stage 2, and positions 1..15 are that
block's high-pass (HP) coefficients: 240 per macroblock. Stage 2 gives one
DC coefficient (position 0) and 15 low-pass (LP) coefficients
(positions 1..15) per macroblock.

Each 2x2 transform works on four values `iCoeff[0..3]` (written a, b, c, d
below). Each stage maps block positions onto four such groups. A group's
positions are read as a, b, c, d in the raster order of the 2x2 group as it is
usually drawn:

| stage | transform          | positions (a, b, c, d) |
|-------|--------------------|------------------------|
| 1     | T2x2h, round 0     | 0, 3, 12, 15           |
| 1     | T2x2h, round 0     | 1, 2, 13, 14           |
| 1     | T2x2h, round 0     | 4, 7, 8, 11            |
| 1     | T2x2h, round 0     | 5, 6, 9, 10            |
| 2     | T2x2h, round 1     | 0, 1, 4, 5             |
| 2     | Todd               | 2, 3, 6, 7             |
| 2     | Todd               | 8, 12, 9, 13           |
| 2     | Toddodd            | 10, 11, 14, 15         |

Each result goes back to the position its input came from. The tables are
`S1_QUAD` and `S2_QUAD` in `rtl/fct_pkg.sv`.

## The three lifting transforms and their 4-clock schedules

`>>` is an arithmetic right shift (floor division) everywhere. All three
modules share one interface: `x[4]` in and `y[4]` out, with `in_valid` and
`out_valid`. The result comes out exactly 4 clocks after the input, and a new
quad can be accepted every clock.

### T2x2h (`rtl/t2x2h.sv`)

The standard sequence is

```
a += d;  b -= c;  t1 = (a - b + R) >> 1;  t2 = c;
c = t1 - d;  d = t1 - t2;  a -= d;  b += c;
```

This is 1/2 times a 4x4 Hadamard matrix, made exactly invertible. `R` (the
`ROUND` parameter) is 0 in stage 1 and 1 in stage 2. The four clocks compute:

1. `a+d`, `b-c`
2. `t1`
3. new `c` and `d`
4. new `a` and `b`

### Todd (`rtl/todd.sv`)

The standard sequence has twelve operations. Most of them depend on the one
before, which gives six dependency levels. The regrouping folds each
"update, then use the updated value" pair into one expression, using
identities such as `c + ((b - c + 1) >> 1) == (b + c + 1) >> 1`. The four
clocks compute:

| clock | operations |
|-------|------------|
| 1 | `b' = b - c`, `c' = (b + c + 1) >> 1`, `a' = a + d`, `d' = (a - d + 1) >> 1` |
| 2 | `b' -= (3a' + 4) >> 3`, `d' -= (3c' + 4) >> 3` |
| 3 | `a' += (3b' + 4) >> 3`, `c' += (3d' + 4) >> 3` |
| 4 | `y3 = d' + (b' >> 1)`, `y1 = ((b' + 1) >> 1) - d'`, `y2 = c' - ((a' + 1) >> 1)`, `y0 = c' + (a' >> 1)` |

Clock 4 needs care with rounding. In the standard, `b -= d` comes after
`d += b >> 1`, so the result is `b - (b >> 1) - d`. That equals
`((b + 1) >> 1) - d`, not `(b >> 1) - d`. In the same way, `a + c - ((a + 1) >> 1)`
equals `c + (a >> 1)`. A shorter form such as `(b >> 1) - d` differs from the
standard for odd `b`. One of the testbenches' broken copies uses exactly that
form, and the testbench catches it.

### Toddodd (`rtl/toddodd.sv`)

The standard sequence negates b and c, then does two butterflies and three
lifting steps (`+ (3b+4)>>3`, `- (3a+3)>>2`, `+ (3b+3)>>3`). It ends with the
inverse butterflies. Done one dependency level per clock, that takes seven
clocks. The four clocks here compute:

| clock | operations |
|-------|------------|
| 1 | `d' = d + a`, `c' = b - c`, `b' = (c' >> 1) - b`, `a' = a - (d' >> 1) + ((3b' + 4) >> 3)` |
| 2 | `b' -= (3a' + 3) >> 2` |
| 3 | `a' += (3b' + 3) >> 3` |
| 4 | `y1 = b' - (c' >> 1)`, `y0 = a' + (d' >> 1)`, `y2 = c' + y1`, `y3 = d' - y0` |

The standard stores the temporaries `t1 = d' >> 1` and `t2 = c' >> 1`. They
are not stored here, because `c'` and `d'` do not change between clock 1 and
clock 4, so clock 4 works them out again. Clock 1 is the longest
combinational path in the design: an adder, a shift, a multiply by 3 (one
adder) and two more adders.

A Toddodd regrouping that puts the first lifting step into a single
`(8a - 8d - 3b - 3c + 8) >> 4` expression is also known. It does not equal the
standard sequence. This design keeps its step structure (opening operations
plus the first lifting step in clock 1) but keeps the standard arithmetic.

## Gathering the DC/LP block (`rtl/dclp_gather.sv`)

Stage 1 produces one block per clock. `dclp_gather` writes coefficient 0 of
each block into register `store[k]`, where `k` is a 4-bit counter of blocks
since reset. The counter wraps after 16 blocks, so block k of the macroblock
lands at position k of the DC/LP block. One clock after the 16th block,
`out_valid` is high for one clock, and stage 2 samples the 16 registers.
There is no second buffer. The next macroblock's block 0 may be written into
`store[0]` at the same clock edge where stage 2 samples it, and stage 2 still
gets the old value. So macroblocks can follow each other with no idle clock.
Stage 2 could take a block every clock, but it gets one every 16 clocks, so it
is idle 15/16 of the time.

The counter is the only framing. A macroblock must always be exactly 16
`in_valid` blocks. Idle clocks between blocks are allowed. A lost block shifts
every macroblock after it until the next reset.

## Top level (`rtl/fct_top.sv`)

```
pix[16] --> fct_stage1 --coef[16]--+--------------------------------> s1_coef[16], s1_valid, s1_blk
            (4 x T2x2h)            |
                                   +--coef[0]--> dclp_gather --16--> fct_stage2 --> s2_coef[16], s2_valid
                                                                     (T2x2h, 2 x Todd, Toddodd)
```

| port       | dir | width          | meaning |
|------------|-----|----------------|---------|
| `clk`      | in  | 1              | clock, rising edge |
| `rst_n`    | in  | 1              | synchronous, active low. Clears the valid pipelines and the block counter. Data registers are not reset |
| `in_valid` | in  | 1              | `pix` holds a block |
| `pix`      | in  | 16 x W signed  | 4x4 pixel block, raster order |
| `s1_valid` | out | 1              | stage-1 result present, 4 clocks after `in_valid` |
| `s1_blk`   | out | 4              | block's index in its macroblock |
| `s1_coef`  | out | 16 x (W+2)     | stage-1 block. 1..15 are HP coefficients; 0 also goes to stage 2 |
| `s2_valid` | out | 1              | one-clock pulse, 9 clocks after the macroblock's 16th `in_valid` |
| `s2_coef`  | out | 16 x (W+4)     | DC (0) and LP (1..15) coefficients of the macroblock |

There is no back-pressure. Whatever consumes the outputs must take them when
they are valid. The stage-2 result is on the outputs for one clock only.

### Widths

`W` (default 16) is the pixel width, two's complement. Every 2x2 transform
widens its input by 2 bits. `T2x2h` reaches a magnitude of exactly 2^W: all four
inputs at -2^(W-1) give y0 = -2^W. In corner-case and random tests, `Todd` and
`Toddodd` outputs stayed below 2^W in magnitude. Stage-1 coefficients are therefore W+2 bits and
stage-2 coefficients W+4 bits. Internal registers are 1–2 bits wider again so
that `3x + 4` never overflows. The testbenches drive the extremes of the input
range on purpose.

Pixels are signed. 8-bit samples fit as they are. Unsigned 16-bit samples need
to be shifted to the signed range (subtract 32768) first, or the design needs
`W = 17`. `W = 32` elaborates and is tested. None of this covers the
floating-point sample formats of JPEG-XR, which must be mapped to integers
first.

## Files

| file | contents |
|------|----------|
| `rtl/fct_pkg.sv`     | widths, block and macroblock sizes, latency, stage group tables |
| `rtl/t2x2h.sv`       | T2x2h, 4-clock pipeline, `ROUND` parameter |
| `rtl/todd.sv`        | Todd, 4-clock pipeline |
| `rtl/toddodd.sv`     | Toddodd, 4-clock pipeline |
| `rtl/fct_stage1.sv`  | four T2x2h on one pixel block |
| `rtl/dclp_gather.sv` | DC/LP block assembly |
| `rtl/fct_stage2.sv`  | T2x2h + 2 x Todd + Toddodd on the DC/LP block |
| `rtl/fct_top.sv`     | the whole two-stage transform |
| `tb/fct_ref_pkg.sv`  | reference model: the standard's sequences, operation by operation, on 64-bit integers |
| `tb/tb_*.sv`         | one self-checking testbench per module, plus `tb_fct_widths` |
| `tb/fct_width_run.sv`| helper for `tb_fct_widths` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. The reference model is written independently of the RTL's
regrouping, so a pass shows that the 4-clock schedules equal the standard
sequences. Example, the end-to-end test at default parameters:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/fct_pkg.sv tb/fct_ref_pkg.sv tb/tb_fct_top.sv --top-module tb_fct_top
./obj_dir/Vtb_fct_top
```

Use the same command for the other testbenches, changing the name.

* `tb_t2x2h`, `tb_todd`, `tb_toddodd`: 4000 random quads each, with random
  idle clocks. Checks every output and the 4-clock latency. `tb_t2x2h` runs
  both rounding variants side by side.
* `tb_fct_stage1`, `tb_fct_stage2`: 2000 random blocks each. Checks every
  coefficient and the 4-clock latency.
* `tb_dclp_gather`: 60 macroblocks. Checks placement, the block index and
  that `out_valid` pulses exactly once per macroblock, at the right clock.
* `tb_fct_top`: 48 macroblocks at `W = 16`. Some have idle clocks between
  blocks, some are back to back, and some start on the clock right after the
  previous macroblock ends. Checks all stage-1 and stage-2 coefficients and
  both latencies (4 and 9 clocks). The test fails if any of those traffic
  patterns, or full-scale input values, never happened.
* `tb_fct_widths`: the whole transform at `W = 8` and `W = 32`.

`fct_stage1`, `fct_stage2` and `dclp_gather` contain concurrent assertions:
the parallel transforms stay in lock step, and the gather pulse lasts one
clock. They are active under `--assert`.

## What is and is not here, and how far to trust it

* Follows the source design: the split into a Hadamard stage on every block
  and a second stage on the gathered DC/LP block; which transform runs on
  which group; the rounding constants; 16-bit input; 16 pixels per clock in
  stage 1; 4 clocks of latency for each stage, with a new input every clock.
* This design's own choices: the valid-only handshake, the reset, the output
  widths, the raster order of blocks within a macroblock, the gathering
  register and its timing, the exact split of T2x2h over its four clocks, and
  the arithmetic inside each Toddodd clock.
* Checked: bit-exact against the standard's sequences for random and extreme
  inputs at 8, 16 and 32 bits. Not checked: timing closure. The reference
  implementation reached 374 MHz (stage 1) and 254 MHz (stage 2) on a
  Virtex-5 LX110, using 318 and 433 slices. This RTL has not been
  synthesised for an FPGA, and it registers pass-through values at every
  clock, so expect more flip-flops than that.
* Not included: the quantization, prediction and entropy-coding stages of the
  encoder that follow the FCT.
* Stage 1 here applies only the Hadamard step to each block, as the source
  design describes it. In the full T.832 core transform, every 4x4 block gets
  the Hadamard step followed by the T2x2h/Todd/Toddodd step. Then the 16 DC
  values get both steps again. T.832 also has an optional overlap filter
  before each stage. Check which of these your application needs before you
  use this as a T.832 encoder front end.
