# Approximate BC12 DCT accelerator

JPEG spends most of its arithmetic on the 8x8 discrete cosine transform, and
the eye forgives small errors in its result. This design exploits both facts.
It computes the DCT with a multiplier-less integer algorithm (BC12), so every
operation is an addition or a subtraction. Each of those additions can then
be made *inexact*: the low bits of the adder are built from cheap, sometimes
wrong adder cells instead of full adders. How many bits, and which cheap
cell, is chosen separately for every addition. Together with a filter that
discards high frequencies, these choices form a configuration. An automatic
design-space exploration (a genetic algorithm, NSGA-II) picks configurations
that trade image quality against area and power. The RTL here is the
hardware side of that flow: one parameterised accelerator that any such
configuration can be compiled into.

The approach follows the article "A Genetic-algorithm-based Approach to the
Design of DCT Hardware Accelerators" (Barbareschi, Barone, Bosio, Han,
Traiola). This RTL is an independent implementation. Where the article
leaves details open, the choices are this design's own; they are listed in
[Departures and open points](#departures-and-open-points).

## The transform without multiplications

The 2-D DCT of a tile X is F = C X C'. Multiplier-less algorithms split the
cosine matrix into C = D T. T holds only 0 and +-1 (some algorithms also
use +-1/2 and +-2, which are shifts). D is diagonal. Then

    F = (T X T') o (d d')          (o = element-wise product, d = diag(D))

and the element-wise scaling can be merged into the JPEG quantization table.
What is left for hardware is T X T': additions only. It is two passes of the
1-D transform f = T x, one over rows and one over columns.

For BC12 the 1-D transform is

    f0 = x0+x1+x2+x3+x4+x5+x6+x7      f1 = x0-x7
    f2 = x0-x1-x2+x3+x4-x5-x6+x7      f3 = x4-x3
    f4 = x0-x3-x4+x7                  f5 = x5-x2
    f6 = x2-x1+x5-x6                  f7 = x6-x1

Shared partial sums bring this down to 14 additions, in three pipeline
stages (`rtl/dct1d.sv`):

| stage | op | computes          | op | computes          |
|-------|----|-------------------|----|-------------------|
| 1     | 0  | a0 = x0 + x7      | 4  | f1 = x0 - x7      |
| 1     | 1  | a1 = x1 + x6      | 5  | f3 = x4 - x3      |
| 1     | 2  | a2 = x2 + x5      | 6  | f5 = x5 - x2      |
| 1     | 3  | a3 = x3 + x4      | 7  | f7 = x6 - x1      |
| 2     | 8  | b0 = a0 + a3      | 10 | f4 = a0 - a3      |
| 2     | 9  | b1 = a1 + a2      | 11 | f6 = a2 - a1      |
| 3     | 12 | f0 = b0 + b1      | 13 | f2 = b0 - b1      |

The op number is the index into the configuration vectors `NAB` and `CELL`.
A register bank follows every stage. Results that are already final after
stage 1 or 2 ride along in the later registers, so all eight outputs leave
together.

Note that the result is *not* a scaled true DCT coefficient. It is the
integer product T X T'. The quantizer that follows must use the complete
table Q-hat = (d d') / Q (element-wise). That quantizer is not part of this
RTL.

## Inexact adders

`rtl/approx_adder.sv` is a 14-bit ripple-carry chain of `approx_cell`s. The
lowest `NAB` positions use the cell kind `CELL`, and the rest are exact full
adders. Changing cells does not change the structure, so the logic depth
stays the same. The only effect is on how much logic synthesis can remove. A
subtraction uses the same chain: a + ~b with carry-in 1. Approximation
therefore applies to the eight subtractions too.

Eleven cell kinds exist (`dct_pkg::cell_e`): the exact full adder and ten
inexact cells from three families. The transistor counts below drive the
exploration's gain estimate (`dct_pkg::cell_transistors`). The function
column is the Boolean behaviour this RTL uses, with maj the majority
(exact carry) and x = a ^ b:

| cell  | transistors | carry out        | sum                          |
|-------|-------------|------------------|------------------------------|
| FA    | 58          | maj              | x ^ ci                       |
| AMA1  | 20          | b \| a&ci        | a&b&ci \| ~(b \| a&ci)&ci    |
| AMA2  | 14          | maj              | ~maj                         |
| AMA3  | 11          | b \| a&ci        | ~(b \| a&ci)                 |
| AMA4  | 14          | a                | ~a&(b\|ci) \| a&b&ci         |
| AXA1  | 8           | a                | ~x                           |
| AXA2  | 6           | x ? ci : a       | ~x                           |
| AXA3  | 8           | x ? ci : a       | ci & ~x                      |
| InXA1 | 6           | a                | x                            |
| InXA2 | 8           | a                | ci                           |
| InXA3 | 6           | a                | b ^ ci                       |

**Trust level:** the cell names and transistor counts come from the source.
The Boolean functions do not. The source cites them from earlier
approximate-adder publications without restating them. The functions here
are plausible reconstructions of those cells: AMA2 (sum = NOT carry) is
well established, and the others may differ from the published cells. All
of them live in one function, `dct_pkg::cell_eval`, and the testbench
reference tables are in `tb/dct_ref_pkg.sv` (`cell_tab`). To use other cell
definitions, edit both places.

The gain estimate the exploration uses for a configuration is

    reward = sum_i NAB_i * (58 - T_cell_i) / (2 * 14 * 14 * 58)

where T_cell_i is the transistor count of the cell kind used by operation i.
The reward is computed in software, not in hardware.

## Two dimensions, timing and numbers

`rtl/dct2d.sv` instantiates sixteen `dct1d`s. Eight transform the eight rows
of the tile in parallel. Their outputs are transposed by wiring alone, and
eight more transform the columns. All sixteen share one configuration,
because a configuration describes the 1-D transform. `rtl/dct_accel.sv`
(the top) adds the level shift in front and the filter behind.

* **Throughput:** one full 8x8 tile of one colour channel per clock cycle.
  A colour image takes three tiles per 8x8 block.
* **Latency:** three cycles per dimension, six in total. The filter and
  level shift are combinational. A tile sampled at rising edge *m* (with
  `in_valid` high) shows up with `out_valid` high after edge *m + 5*.
* **No back-pressure:** the pipeline never stalls. `in_valid` only marks
  which cycles carry data.
* **Reset:** `rst_n` is asynchronous and active low. It clears only the
  valid flags. Tiles in flight are dropped, and data registers are not
  reset.
* **Number range:** samples are 8-bit unsigned. The top subtracts 128 (by
  inverting the sample MSB), as a JPEG encoder does anyway. With samples in
  -128..127, a 1-D output lies within +-1024 and a 2-D output within
  -8192..8128. That fits the 14-bit two's-complement word used everywhere.
  Without the shift, the DC term of a white tile (16,320) would not fit.
  The exact design never overflows. Inexact cells add an error of up to
  about 2^NAB per addition, and errors can add up over the six additions on
  a path. A value that gets pushed past the range limits wraps, as any
  14-bit sum does.
* **Output order:** `coef[u][v]` holds vertical frequency *u* and horizontal
  frequency *v*; `coef[0][0]` is the DC term.

## High-frequency filter

`rtl/hf_filter.sv` zeroes coefficient (u, v) when u + v >= 15 - DISCARD.
Each step of `DISCARD` removes one more anti-diagonal, counted from the
(7,7) corner. 0 keeps all 64 coefficients, 1 drops only (7,7), 5 keeps 49,
and 14 keeps only DC. Because `DISCARD` is a parameter, synthesis prunes
the gated outputs and the adders that only feed them. The source says only
that the filter zeroes the highest frequencies and that their number is a
knob. Measuring that number in anti-diagonals is this design's choice.

## Configuring the accelerator

```systemverilog
import dct_pkg::*;
// op:  13  12  11  10   9   8   7   6   5   4   3   2   1   0
localparam nab_vec_t  MY_NAB  = {4'd5,4'd2,4'd1,4'd4,4'd3,4'd2,4'd6,4'd1,
                                 4'd5,4'd0,4'd3,4'd2,4'd4,4'd4};
localparam cell_vec_t MY_CELL = {14{4'(CELL_INXA2)}};

dct_accel #(.NAB(MY_NAB), .CELL(MY_CELL), .DISCARD(3)) u_dct (
  .clk, .rst_n, .in_valid, .pix, .out_valid, .coef);
```

`NAB[i]` ranges over 0..14. The defaults are the exact design: every `NAB`
is 0 and `DISCARD` is 0. The configuration used by the earlier manual study
the source compares against is `NAB = {14{4'd4}}` with all cells InXA2.

## Departures and open points

* **Cell functions:** these are reconstructions; see the trust note above.
* **Stage grouping:** the assignment of the 14 additions to three stages
  (8, 4, 2) is this design's own. It is derived from the equations, the
  operation count and the three-cycle latency.
* **Level shift:** added so that the 14-bit width the source gives really
  holds signed coefficients. The source states the 0..255 range and the
  14-bit width without addressing the sign of the AC terms.
* **Subtractions as approximate sums:** the source speaks only of sums.
  Here the same inexact chain also computes the differences.
* **Valid flag, reset, port layout, output orientation:** these are this
  design's own.
* **Not included:** the quantizer; the six other multiplier-less algorithms
  the article also evaluates (BAS08, BAS09, BAS11, CB11, PEA12, PEA14), whose
  transform matrices are not restated there; and the exploration software
  itself.

## Files

| file                   | contents                                              |
|------------------------|-------------------------------------------------------|
| `rtl/dct_pkg.sv`       | widths, tile types, cell enum, cell functions, transistor counts |
| `rtl/approx_cell.sv`   | one exact or inexact adder cell                       |
| `rtl/approx_adder.sv`  | 14-bit inexact ripple-carry adder / subtractor        |
| `rtl/dct1d.sv`         | 3-stage BC12 1-D transform, 14 configurable adders    |
| `rtl/dct2d.sv`         | rows, transpose wiring, columns                       |
| `rtl/hf_filter.sv`     | anti-diagonal coefficient mask                        |
| `rtl/dct_accel.sv`     | top: level shift, 2-D transform, filter               |
| `tb/dct_ref_pkg.sv`    | reference models: cell truth tables, bit-serial adder, matrix DCT |
| `tb/tb_*.sv`           | self-checking testbenches, one per block, plus the ones below |

## Verification

Each testbench compares the RTL against reference models written separately
in `tb/dct_ref_pkg.sv`:

* Cells are checked against literal truth tables.
* Inexact adders are checked against a bit-serial loop over those tables.
* Exact transforms are checked against a direct matrix product with T.
* Approximate transforms are checked against the same dataflow built from
  the reference adder.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench             | what it covers                                         |
|-----------------------|--------------------------------------------------------|
| `tb_approx_cell`      | all 11 cells, all 8 input combinations                 |
| `tb_approx_adder`     | 7 add/subtract configurations, 5000 random operand pairs and corner cases |
| `tb_dct1d`            | exact and mixed-approximate instances, random stream with gaps, 3-cycle latency |
| `tb_dct2d`            | exact vs. matrix product, approximate vs. model, full-scale tiles, 6-cycle latency |
| `tb_hf_filter`        | DISCARD = 0, 1, 5, 14: mask and kept-coefficient count |
| `tb_dct_accel`        | top, mixed configuration, DISCARD = 3, gaps, back-to-back tiles, reset with tiles in flight; counts each of these events and requires each at least once |
| `tb_dct_accel_inxa2`  | top in the earlier study's configuration (NAB 4, InXA2 on all 14 additions), a generated 256x256 channel; bit-exact against the model, and reports the deviation from the exact transform (mean about 18, largest about 200, on a +-8192 scale) |
| `tb_dct_accel_full`   | top at default parameters: one 512x512 channel, 4096 tiles back to back, 4096 + 6 cycles |

To run one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_accel.sv --top-module tb_dct_accel
./obj_dir/Vtb_dct_accel
```

All testbenches pass. Each one was also run against a copy of its block with
one deliberate bug, and each one caught the bug.

**Not verified:**

* Image quality (DSSIM/PSNR) of particular configurations.
* Area and power.
* Agreement of the cell functions with the original cells.
