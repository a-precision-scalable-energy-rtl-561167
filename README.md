# BSC vector systolic accelerator

Networks produced by neural architecture search often mix precisions from layer to layer:
some layers run at 8 bits, most at 4 bits, some at 2 bits. Hardware for such a network
has to run all three precisions well. There are two usual approaches, and both waste
energy at some precisions:

- Combining many small multipliers through shifters (bottom-up) spends energy on
  reconfiguration logic at high precision.
- Splitting one large multiplier into gated sub-multipliers (top-down) leaves most of the
  array idle at low precision.

This design uses a **bit-split-and-combination (BSC)** scheme with the signed 4-bit
multiplier as its basic unit:

- **4-bit mode:** each unit computes one 4b x 4b product.
- **2-bit mode:** each unit splits into two 2b x 2b products. The cross terms are gated
  off and the sign is extended into the gated bits.
- **8-bit mode:** four units combine, with shifts of 0, 4, 4 and 8, into one 8b x 8b
  product.

Many such units form a *vector* that computes a dot product, and 32 vectors form a
weight-stationary systolic array.

At the default size there are 32 PEs. Each PE has a vector of 32 elements, and each
element is 16 bits wide. Every clock the array performs:

| mode | products per element | dot-product length per PE | MACs per clock (array) |
|------|----------------------|---------------------------|------------------------|
| 8-bit | 1 (bits [7:0])        | 32                        | 1024                   |
| 4-bit | 4 (nibbles)           | 128                       | 4096                   |
| 2-bit | 8 (2-bit fields)      | 256                       | 8192                   |

## Operand packing

A vector is 32 x 16 bits = 512 bits, for both the feature and the weight operand. Element
`l` occupies bits `[16*l+15 : 16*l]` of the vector word:

- **8-bit mode:** one value per element, in bits `[7:0]`. Bits `[15:8]` are ignored.
- **4-bit mode:** four values per element. Value `k` is in bits `[4k+3:4k]`.
- **2-bit mode:** eight values per element. Value `m` is in bits `[2m+1:2m]`.

The values in the same position of the feature word and the weight word are multiplied,
and all the products of the vector are summed. Signedness is set per job, separately for
each operand (`sgn.a_signed` for features, `sgn.b_signed` for weights). Signed values are
two's complement. Unsigned values use the full range, so an unsigned 8-bit value is 0..255.

## The arithmetic inside a vector

This is the part that needs the most care.

### Partial-product generator (`pp_gen`)

A 4-bit x 4-bit multiply has four rows, one per bit `b_j` of the weight nibble. Row `j`
is built as follows:

- The feature nibble is sign-extended to 5 bits, `{s_a, a3, a2, a1, a0}`.
  `s_a = a_signed & a3`.
- Each of the five bits is ANDed with `b_j`. A NAND forms the inverted product, and a
  multiplexer picks either the NAND output or its inverse.
- The multiplexer is steered by `S_bj`, which is set when row `j` carries the sign bit
  of a signed weight. That row has negative weight, so it must be negated.
- Negation is inversion plus one. The plus one is not added in the row. It leaves the
  generator as a separate correction bit (`corr = S_bj`), and the adder tree adds it at
  the row's weight.

So for every row, `sext(pp) + corr = (S_bj ? -1 : +1) * b_j * a`.

### Same-shift accumulation (`bit_split_unit`)

An `L x bit-split unit` holds `L` such 4x4 multipliers. It does not add the four rows
inside each multiplier. Instead it adds row `j` of all `L` multipliers together, which
gives four column sums `R0..R3`. Only then are the sums shifted and added:

- 4-bit mode: `R0 + 2*R1 + 4*R2 + 8*R3`.
- 2-bit mode: `R0 + 2*R1 + R2 + 2*R3`.

This leaves one shift-and-add per unit rather than one per lane.

In 2-bit mode one nibble holds two 2-bit values:

- Rows 0 and 1 multiply `a[1:0]`, sign-extended.
- Rows 2 and 3 multiply `a[3:2]`, sign-extended, and are shifted by 0 and 1 instead of 2
  and 3. Both 2-bit products then land at the same weight and add without further shifting.
- In each row the high bit is the sign row when the weight is signed. So `S_b1` and
  `S_b3` are set, not only `S_b3`.

At `L = 32` the unit result fits in 14 bits.

### Combination (`bsc_vector`)

Four bit-split units (#0..#3) feed one adder.

- **4-bit and 2-bit modes:** unit `#k` takes nibble `k` of every element, and the four
  unit sums are added unshifted.
- **8-bit mode:** each 8-bit operand is split into a low nibble (unsigned) and a high
  nibble (carrying the operand's sign). The units compute:

  | unit | product | shift |
  |------|---------|-------|
  | #0 | `a_lo*b_lo` | 0 |
  | #1 | `a_hi*b_lo` | 4 |
  | #2 | `a_lo*b_hi` | 4 |
  | #3 | `a_hi*b_hi` | 8 |

The result is a 24-bit signed dot product. A vector is purely combinational.

## PE and systolic dataflow

A PE (`bsc_pe`) contains three parts:

- **Input buffer:** a feature register and a weight register, 512 bits each.
- **BSC vector:** computes the dot product of the two registers.
- **Output buffer:** a 32-bit register. It either loads the dot product, or adds the dot
  product to its previous value when the feature's `acc` tag bit is set.

A feature captured at one clock edge has its result in the output buffer one edge later.

The array (`systolic_array`) chains 32 PEs:

- **Features** enter PE #0 and move one PE per clock. Each feature carries a 20-bit tag:
  `valid`, `acc`, `psum`, `last` and the pixel index.
- **Weights** share one bus. `weight_skew` shifts a one-bit token along the PEs, so PE #k
  loads the bus exactly k clocks after `wgt_start`. Weight k of a cycle therefore reaches
  PE #k at the same edge as the cycle's first feature. It then stays there until the next
  weight cycle. A weight cycle lasts 32 clocks.

Consider a 32 x 32 matrix product `O = W x I`, with PE #k holding weight row `k`:

- Feature `j` (column `j` of `I`) is presented in clock `p`.
- PE #k delivers `O(k, j)` at clock `p + k + 2`.
- The results leave the array skewed: each PE emits one output channel for every pixel.

Tiles follow each other without a gap when a tile has at least 32 features. This works
because PE #k takes the next tile's weight at the same edge that the next tile's first
feature reaches it.

## The accelerator core (`bsc_accel_top`)

The core contains:

- **Global buffer:**
  - an input buffer of 1024 vectors;
  - a weight buffer of 512 vectors;
  - a partial-sum buffer of 32 banks x 64 words x 32 bits, one bank per PE.
- **Sequencer** (`array_seq`).
- **The array.**
- **Accumulation/ReLU stage** (`post_unit`).

The host side, meaning the microcontroller, DMA and external memory, is outside the core.
It is represented by plain write ports into the input and weight buffers and a read port
on the partial-sum buffer.

### A job

A job is `n_tiles` matrix operations that all add into the same partial sums. The 32 PEs
run along the output-kernel direction: weight vector `k` of a tile belongs to output
channel `k`, which is PE #k. The vector runs along the channel direction and covers 32,
128 or 256 channels in 8-, 4- or 2-bit mode. Tile `t` uses weight-buffer words
`t*32 .. t*32+31`.

The sequencer can fetch features in two ways.

**Matrix addressing** (`conv_en = 0`). Tile `t` takes feature `j`, which belongs to
output pixel `j`, from input-buffer word `t*n_pix + j`. The host lays out any mapping it
likes, for example an im2col expansion of a convolution.

**Convolution addressing** (`conv_en = 1`). The input buffer holds the feature map
itself. The vector of channel split `cs`, row `ih` and column `iw` is at word
`cs*IH*IW + ih*IW + iw`, and the sequencer forms the sliding windows itself:

- Tiles run over `(cs, kh, kw)`, with `kw` fastest. Tile `t = (cs*KH + kh)*KW + kw`.
- Inside a tile, output pixels run along the width first, then down the rows.
- Pixel `(oh, ow)` reads word `cs*IH*IW + (oh+kh)*IW + (ow+kw)`. Stride is 1 and there is
  no padding.
- The host sets `n_pix = OH*OW` and `n_tiles = CS*KH*KW`.
- Output pixel `(oh, ow)` lands in psum word `oh*OW + ow`.

The buffer sizes limit what one job can hold:

- a weight buffer of 512 vectors holds up to 16 tiles;
- a partial-sum buffer of 64 words holds up to 64 output pixels.

Larger layers are split into several jobs. To continue the same reduction in the next
job, set `psum_cont`. Convolution addressing needs all `KH*KW` kernel positions of a
channel split in one job, so it takes kernels up to 4x4. For larger kernels, use matrix
addressing.

Running a job:

1. Write the buffers.
2. Set `mode`, `sgn`, `relu_en`, `n_pix` (1..64), `n_tiles` (at least 1), `psum_cont`,
   and the convolution shape if used. Then pulse `start` for one clock. The
   configuration is latched at `start`.
3. Wait for `done`. A job takes `n_tiles * max(n_pix, 32) + 37` clocks from `start` to
   `done`.
4. Read output pixel `j` of all 32 channels at once: set `ps_addr = j` and read
   `ps_rdata` (combinational).

For every result, the accumulation stage does a read-add-write on the result's bank, all
in one clock:

- It adds the stored partial sum, except on a job's first tile, where it starts from zero
  (unless `psum_cont` is set).
- On the last tile, if `relu_en` is set, negative sums are written as zero.

## Files

| file | module | role |
|------|--------|------|
| `rtl/bsc_pkg.sv` | package | mode enum, signedness and tag structs, default sizes |
| `rtl/pp_gen.sv` | `pp_gen` | partial-product row with sign handling |
| `rtl/bit_split_unit.sv` | `bit_split_unit` | L x 4b multipliers, same-shift accumulation |
| `rtl/bsc_vector.sv` | `bsc_vector` | four bit-split units, shifters, adder |
| `rtl/bsc_pe.sv` | `bsc_pe` | input buffer, vector, accumulating output buffer |
| `rtl/weight_skew.sv` | `weight_skew` | per-PE weight load token chain |
| `rtl/systolic_array.sv` | `systolic_array` | 32 PEs with feature chain |
| `rtl/vec_buffer.sv` | `vec_buffer` | input / weight buffer (sync read) |
| `rtl/psum_buffer.sv` | `psum_buffer` | banked partial-sum buffer |
| `rtl/post_unit.sv` | `post_unit` | accumulation and ReLU |
| `rtl/array_seq.sv` | `array_seq` | tile sequencer |
| `rtl/bsc_accel_top.sv` | `bsc_accel_top` | the core |

Each module has a testbench `tb/tb_<module>.sv`. These testbenches check the hardware
against plain integer arithmetic from `tb/tb_bsc_ref_pkg.sv`, and every one ends by
printing `TB_RESULT checks=N failures=M`.

The top-level testbench, `tb/tb_bsc_accel_top.sv`, runs the core at its default size
through nine jobs. Together they cover:

- all three modes, with signed and unsigned operands;
- back-to-back and gapped tiles;
- accumulation over tiles and over jobs;
- ReLU;
- two convolutions using convolution addressing.

It checks every output and the job time, and counts each mechanism.

## Simulating

Run a testbench with verilator, reading the package first:

```
verilator --binary --timing --assert -j 4 --top-module tb_bsc_accel_top \
    rtl/bsc_pkg.sv tb/tb_bsc_ref_pkg.sv rtl/*.sv tb/tb_bsc_accel_top.sv -o sim
./obj_dir/sim
```

For other blocks, replace the top module and the testbench file.

With all 32 PEs, the C++ build takes several minutes. The simulation itself takes well
under a second for the unit tests, and a few seconds for the end-to-end test.

To change the size, use the parameters:

- `N_PE` and `L` on `bsc_accel_top` and `systolic_array`;
- the buffer depths `IB_DEPTH`, `WB_DEPTH` and `PS_DEPTH`.

The default of 32 is built into the sequencer's weight cycle through `N_PE`. The testbench
of the top assumes the defaults.

## Where this RTL makes its own choices

Taken from the design description:

- the BSC method and its shifts (0,4,4,8 and 0,1,2,3);
- the NAND/NOT/mux partial-product generator with a separate correction bit;
- same-shift accumulation across the vector;
- 16-bit vector elements;
- 32 PEs and vector length 32;
- the feature ripple, and the 0..31-clock weight delays with 32 clocks per weight cycle;
- the buffer-vector-accumulator PE;
- the mapping of a convolution onto 32 x 32 matrix operations;
- the presence of weight, input and partial-sum buffers and of an accumulation/ReLU stage.

Choices of this implementation:

- **Correction bit.** It equals the sign-row flag. A weaker gating, for example by the
  weight bit, would give wrong results when that bit is 0.
- **2-bit alignment.** Rows 2 and 3 are realigned (shifted by 0 and 1) in 2-bit mode.
- **8-bit nibble assignment.** Which nibble pair goes to which unit, and the use of
  element bits `[7:0]` in 8-bit mode.
- **Weight delay.** A shared weight bus with a token chain is used instead of full-width
  delay lines.
- **Result widths.** 24 bits for a vector, 32 bits for accumulation. There is no
  saturation: a sum that exceeds 32 bits wraps.
- **Reset.** All registers use an asynchronous active-low reset (`rst_n`).
- **Job model.** The tag sideband, the job/tile model with `psum_cont`, and the
  convolution address generator with its buffer layout.
- **Buffers.** Their sizes, ports and latencies.

Departures and gaps:

- **Pooling** is not implemented. Only accumulation and ReLU are in `post_unit`, because
  the pooling kind and window are not defined.
- **The PE's accumulate path is not used by the core.** The PE can accumulate in its
  output buffer (`acc` tag). The core's sequencer never sets `acc`, and adds partial sums
  in the partial-sum buffer instead. The path is exercised by the PE and array testbenches.
- **Precision is per job.** One job runs one precision, so different precisions cannot be
  mixed inside one job.
- **Tile size.** `n_pix` is limited to the partial-sum depth (64). A tile with fewer than
  32 pixels still takes a full 32-clock weight cycle.
- **Convolution addressing** supports stride 1 without padding only.
- **Host side.** The external memory, DMA, the microcontroller and the interface between
  them are not modelled. Their place is taken by the buffer ports of `bsc_accel_top`.
