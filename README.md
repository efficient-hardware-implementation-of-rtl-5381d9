# Fast-FIR convolution engine for CNN layers

Convolution layers take up most of the arithmetic in a convolutional neural
network. This design computes a 3x3 convolution layer with fewer
multiplications than the direct method. Each image row is treated as a
sample stream and each kernel row as a 3-tap FIR filter. The filter is built
with the *3-parallel fast FIR algorithm* (FFA): three outputs per clock from
six multipliers instead of nine. A grid of these filter units (FCUs, fast
convolution units) forms the *processing unit* (PU). The PU adds the 1D
results into 2D output rows and shares each image row between several FCUs.

The default configuration is small. Samples and weights are 3-bit unsigned
numbers. The kernel is 3x3. The PU has 3 x 2 FCUs, reads 4 image rows and
writes 2 output rows, 3 samples of each per clock.

## Module hierarchy

```
conv_pu            processing unit, top level (3 x N_COLS FCUs)
  fcu3             3-parallel fast FIR unit, 3 taps
    mult_array     unsigned array multiplier (6 per FCU, sized 3x3, 4x4, 5x5)
      rca          ripple-carry adder, one per partial-product row
cnn_pkg            widths and types shared by all of the above
```

## The 3-parallel fast FIR unit (`fcu3`)

A 3-tap filter computes `y(n) = h0 x(n) + h1 x(n-1) + h2 x(n-2)`. The unit
splits the stream into blocks of three samples. In clock `m` it receives
`x0 = x(3m)`, `x1 = x(3m+1)` and `x2 = x(3m+2)`, and it returns
`y0..y2 = y(3m)..y(3m+2)`. Computing the block directly needs all nine
products `hi*xj`. The FFA uses sums of taps and sums of samples to get the
same result from six products:

| product | operands | width |
|---|---|---|
| p0 | h0 · x0 | 3x3 |
| p1 | h1 · x1 | 3x3 |
| p2 | h2 · x2 | 3x3 |
| p3 | (h0+h1) · (x0+x1) | 4x4 |
| p4 | (h1+h2) · (x1+x2) | 4x4 |
| p5 | (h0+h1+h2) · (x0+x1+x2) | 5x5 |

```
y0 = p0 - D(p2) + D(p4 - p1)          = h0x0 + [h1x2 + h2x1]prev
y1 = (p3 - p1) - (p0 - D(p2))         = h0x1 + h1x0 + [h2x2]prev
y2 = p5 - (p3 - p1) - (p4 - p1)       = h0x2 + h1x1 + h2x0
```

`D(.)` is the value from the previous block. These are the only two
registers in the unit: one holds `p2` and one holds `p4 - p1`. Everything
else is combinational, so a block's outputs are valid in the same clock as
the block. The registers load only when `en` is high, so gaps in the stream
do no harm. A synchronous reset (`rst_n` low) clears them, which treats the
samples before the first block as zeros.

**Negative intermediates.** Terms such as `p0 - D(p2)` can be negative. All
internal arithmetic is unsigned modulo 2^(2·DW+4), the width of the widest
product. Every output is a true sum of non-negative products and fits in
2·DW+2 bits, so the low bits of the modular result are exact. With 3-bit
data the outputs are 8 bits wide (maximum 3·7·7 = 147).

**Steady state.** If the same block is held for several clocks, the delayed
terms equal the current ones. The unit then computes a circular 3-point
convolution. For example, x = [0 0 7] with h = [1 2 3] gives y = [14 21 7].
The testbench uses this to reproduce the single-unit measurements the design
was validated with.

## The array multiplier (`mult_array`, `rca`)

The multiplier is the classic array form. Row `j` holds the bit products
`a[i]·b[j]`. Product bit 0 is `a0·b0`. The rest of row 0, with a zero on top,
goes to the first ripple-carry adder together with row 1. Each later adder
adds the next row to the carry and upper sum bits of the adder before it.
The lowest sum bit of each adder is the next product bit, and the last
adder's carry and sum bits are the top product bits. At 3x3 this is two
3-bit adders, which is the reference build: there the adders were 4-bit
parallel-adder chips with their top inputs tied to zero. The module is
parameterised (`A_W`, `B_W`) because the FCU also needs 4x4 and 5x5 products
of the pre-added operands. `rca` is a plain chain of full adders with carry
in and carry out.

## The processing unit (`conv_pu`)

A CNN layer computes a correlation:

```
out[j][c] = sum over i,t of  w[i][t] · img[i+j][c+t]
```

Output row `j` is therefore the sum, over kernel rows `i`, of image row
`i+j` filtered with kernel row `i`. The PU is a grid of 3 rows by `N_COLS`
columns of FCUs. FCU(i,j) filters image row `i+j` with kernel row `i`:

```
           Y0          Y1                  column sums go up
           ^           ^
 w0,row0 > FCU(0,0) -> FCU(0,1)            kernel row i passed to the right
 w1,row1 > FCU(1,0) -> FCU(1,1)            image row i+1 passed diagonally
 w2,row2 > FCU(2,0) -> FCU(2,1)              up and right
                       ^ row3              extra rows enter from below
```

- **Kernel sharing:** kernel row `i` enters at the left of grid row `i` and
  is used by every FCU in that row.
- **Row reuse:** image row `r` is used by every FCU with `i + j = r`. Each
  image row enters the grid once: rows 0..2 from the left, rows 3.. from
  below. The diagonal passing is plain wiring.
- **Column sums:** the three FCU outputs of column `j` are added to give
  output row `j`.
- **Kernel reversal:** an FIR filter convolves and the layer correlates, so
  each kernel row is fed to its FCUs reversed (`h[a] = w[i][2-a]`).

Because of the reversal and the filter's memory, output column `c` appears
at stream position `c + 2`. Positions 0 and 1 of each row are left-edge terms
that treat the image as zero left of column 0. To get the last two output
columns, feed one all-zero block after the image. That block also gives the
zero-padded right-edge terms.

### Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset of all FCU history |
| `in_valid` | in | 1 | a block of every image row is presented |
| `w[3][3]` | in | 3 b each | kernel in CNN orientation, held steady during a frame |
| `img_row[4][3]` | in | 3 b each | `img_row[r][k] = img[r][3m+k]` for block `m` |
| `out_valid` | out | 1 | equals `in_valid` |
| `y[2][3]` | out | 10 b each | output rows 0..1, stream positions `3m..3m+2` |

The PU takes one block per clock, which is 12 input samples, and produces 6
outputs in the same clock. It has no pipeline latency. Reset the unit, or
feed one all-zero block, between frames or row groups so that history does
not leak across them. To convolve a taller image, feed each group of 4
consecutive rows in turn; every group gives 2 output rows.

## How far it follows the reference design, and where it departs

Taken from the reference design:
- the 3-parallel FFA equations and the FCU structure (six multipliers with
  the operand sums above, two one-block delays);
- the 3x3 array multiplier wiring;
- the 3-bit data and the 3x3 kernel;
- the grid of k x (k-1) FCUs, with kernel rows passed along grid rows,
  diagonal image-row reuse and column sums;
- kernel reversal.

Choices made here:
- the `in_valid`/`en` handshake, the synchronous reset and the
  combinational (unregistered) outputs;
- the output widths (8 bits per FCU, 10 bits per PU output). The reference
  prints 6-bit results, which cannot hold every possible sum;
- the multiplier generalised to the 4x4 and 5x5 sizes the FCU needs;
- unsigned arithmetic throughout.

Known differences from the reference's printed results:
- **Second FCU measurement.** For x = [1 3 3] and h = [3 2 2] the reference
  reports y = [15 12 17]. The FFA equations, and the direct sum
  `h0x1 + h1x0 + h2x2 = 9 + 2 + 6`, give y1 = 17. The design follows the
  equations, and the testbench expects [15 17 17].
- **PU measurement.** For the 4x3 image [1 2 3; 4 5 6; 7 1 2; 1 2 1] and the
  kernel [1 0 2; 4 1 1; 3 1 2], the reference lists [39 35 47; 57 31 53].
  These numbers could not be matched by any reading of the algorithm: direct,
  circular or zero-history FCU outputs, reversed or not. The valid
  correlation outputs are 60 and 54, and the testbench checks this example
  against a direct 2D correlation.
- **Not included:** pooling layers, fully connected layers, kernel storage
  and the memory system that feeds image rows. The reference leaves these
  for future work, and the PU brings its kernel and row inputs out as ports.
- **5x5 kernels.** The unit has 3 taps, so a 5x5 kernel, as in the LeNet-style
  network often used to illustrate CNNs, needs a 5-tap unit. That unit is not
  built.
- **Speed-up.** The reference claims about 40 % faster computation per PU but
  gives no baseline, so that figure is not checked. What the design itself
  guarantees is 6 rather than 9 multiplications per three outputs, at one
  block per clock.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog.

- `tb_rca`: every input of a 3-bit and of a 4-bit adder, carry in included.
- `tb_mult_array`: every 3x3 and 5x5 product, plus random 4x6 products.
- `tb_fcu3`: the two single-unit measurements in steady state, and random
  streams with idle cycles and resets, checked every clock against a direct
  FIR sum. Three outputs must be correct in the same clock as their block.
- `tb_conv_pu`: end to end at the default size, with no parameter overrides.
  Frames tested:
  - the 4x3 measurement example;
  - a frame of all-maximum values (no output may wrap);
  - 40 random frames of random width, with idle cycles.

  Every output is checked against a direct 2D correlation, and the testbench
  counts clocks to confirm one block per clock. It also counts how often each
  mechanism is exercised and fails if one never is. The mechanisms are:
  - carry of history across blocks;
  - idle cycles;
  - asymmetric kernels, so the reversal matters;
  - an image row shared between FCUs;
  - the maximum-value case.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert rtl/cnn_pkg.sv rtl/rca.sv rtl/mult_array.sv \
    rtl/fcu3.sv rtl/conv_pu.sv tb/tb_conv_pu.sv --top-module tb_conv_pu -o sim
./obj_dir/sim
```

For a smaller unit, swap the testbench file and its top module name.

## Changing the design

`cnn_pkg::DATA_W` sets the sample and weight width, and every other width
follows from it. `conv_pu`'s `N_COLS` sets how many output rows are computed
at once, and so how many image rows are read (`N_COLS + 2`). Only the
default, `N_COLS = 2`, is covered by the testbench; other values elaborate
and lint cleanly but have not been simulated. The FCU is
fixed at 3 taps and 3 samples per clock, because the FFA equations are
specific to that size. `cnn_pkg::K` is therefore 3 and should not be changed.
