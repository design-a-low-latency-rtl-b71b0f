# Signed/unsigned 32 x 32 multiplier with barrel-shift alignment and prefix adders

This is a 32 x 32 bit multiplier that treats each operand as signed (two's
complement) or unsigned, selected per operand by a flag. In all four
combinations it gives the exact 64-bit product. It is built as an array
multiplier from standard, readable blocks:

1. operand registers with a sign flag each,
2. sign preprocessing,
3. one partial product per multiplier bit,
4. barrel shifters that align the partial products,
5. a tree of parallel prefix adders (Kogge-Stone, made of black and grey cells),
6. a final prefix adder, and
7. a result register.

There is no sequential iteration: the whole multiply is one combinational path
between two register stages.

## Interface

| port   | dir | width | meaning |
|--------|-----|-------|---------|
| `clk`  | in  | 1  | clock, rising edge |
| `a`    | in  | 32 | multiplicand |
| `sa`   | in  | 1  | 1: `a` is two's complement signed; 0: `a` is unsigned |
| `b`    | in  | 32 | multiplier |
| `sb`   | in  | 1  | 1: `b` is signed; 0: `b` is unsigned |
| `c`    | out | 64 | product, registered |
| `cout` | out | 1  | carry out of the final adder, registered (see below) |

Timing: `a`, `b`, `sa` and `sb` are sampled at a rising edge. Their product
appears on `c` just after the next rising edge, so the latency is two edges.
A new operand pair can be applied every cycle. There is no reset, no enable and
no valid signal. Both register stages load on every edge. The outputs therefore
hold garbage until two edges after the first real operands have been applied.
A system that needs a valid flag should carry one alongside, delayed by the
same two registers.

Example: `a = 6`, `sa = 1`, `b = 2`, `sb = 0` gives `c = 12`. Here `sa = 1`
means "read `a` as signed", not "`a` is negative".

## How signed and unsigned operands share one array

`mul_preproc` extends each operand by one bit. The new bit is a copy of the MSB
when the operand's flag says signed, and 0 when it says unsigned. Every operand
is then a 33-bit two's complement number with the operand's true value. From
here on the data path is one signed multiplier, and the 64-bit result holds
each of the four products exactly:

- unsigned x unsigned is below 2^64;
- signed x signed lies in [-2^62, 2^62];
- mixed products lie in (-2^63, 2^63).

## Partial products and the negative row (the subtle part)

Call the extended multiplicand `ae` and the extended multiplier `be`. `ae`
is sign-extended to 64 bits, giving `A`. Row `j` (`pp_gen`) is `A` when
`be[j]` is 1 and 0 otherwise. Barrel shifter `j` then shifts row `j` left by
`j`. For `j = 0..31` these rows are added as they are.

In two's complement the top bit `be[32]` has weight -2^32, so its row must be
*subtracted*. Subtraction is done as "complement and add one":

- `pp_gen` sends `~A` for this row and raises `neg = be[32]`.
- Its barrel shifter shifts it by 32 and fills the 32 vacated low bits with
  `neg`. The row becomes `~(A << 32)` when `neg = 1`, and 0 otherwise.
- The missing `+1` enters as the carry-in of the final adder, which is also
  `neg`.

So

    c = sum_{j<32} (A << j)  +  ~(A << 32)  +  1      when be[32] = 1
    c = sum_{j<32} (A << j)                            when be[32] = 0

all modulo 2^64. That is `A * be` exactly.

## Adders

Every adder is `prefix_adder`, a 64-bit parallel prefix adder in three stages:

- **pre-processing** (`pg_preproc`): bit generate `g = x & y` and propagate
  `p = x ^ y`.
- **carry network**: Kogge-Stone, log2(64) = 6 levels. At level `k`, position
  `i` combines with position `i - 2^k`. A **black cell** (`black_cell`)
  computes `G = Gi | (Pi & Gj)` and `P = Pi & Pj`. A **grey cell**
  (`grey_cell`) computes only `G`, where the combined group already reaches
  bit 0 and its `G` is a finished carry. The carry-in enters through one extra
  grey cell at bit 0, as the generate of a virtual bit -1.
- **post-processing** (`sum_postproc`): `s[i] = p[i] ^ carry[i-1]`, with the
  carry-in in place of `carry[-1]`. The carry out is the group generate of all
  bits.

`pp_adder_tree` adds the 32 aligned positive rows with a balanced binary tree
of these adders: 16 + 8 + 4 + 2 + 1 = 31 adders in 5 levels. Each node of the
second level is the sum of four consecutive rows, so that level holds eight
4-row group sums. The tree works modulo 2^64 and drops carries out. Then
`u_final` in `novel_mul` adds the tree sum, the negative row and `neg`.

`cout` is the carry out of that final addition. It is **not** a product bit,
because `c` is already exact. It is brought out only because the final stage
produces it, and carries no arithmetic meaning for the product. It is 1, for
example, when the product is 0 and `b` is negative. In that case
`~(A<<32) + 1` wraps.

Cost and speed: the tree uses carry-propagate adders, not carry-save
compressors. It is easy to read and verify, but large: about 28k word-level
cells after coarse synthesis. Its depth is 6 prefix-adder delays.

## Files

| file | block |
|------|-------|
| `rtl/mul_pkg.sv` | widths: `OPW = 32`, `PW = 64`, `XW = 33`, `NPP = 33` |
| `rtl/novel_mul.sv` | top |
| `rtl/operand_reg.sv` | operand + sign flag register |
| `rtl/mul_preproc.sv` | sign preprocessing |
| `rtl/pp_gen.sv` | partial products |
| `rtl/barrel_shifter.sv` | logarithmic left shifter with fill bit |
| `rtl/pp_adder_tree.sv` | parallel adder structure (tree) |
| `rtl/prefix_adder.sv` | Kogge-Stone prefix adder with carry-in |
| `rtl/pg_preproc.sv`, `rtl/black_cell.sv`, `rtl/grey_cell.sv`, `rtl/sum_postproc.sv` | the adder's stages and cells |
| `rtl/result_reg.sv` | result register |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each module except the top takes its widths as parameters. Their defaults come
from `mul_pkg`. The top is fixed at 32 x 32. To change the width, edit `OPW`
in `mul_pkg`. Everything else follows, including the shift amounts and the
tree size.

## Where this design makes its own choices

The architecture follows a published description of a four-step signed
multiplier: pre-processing, partial products, barrel shifting, parallel
(prefix) addition, and post-processing. That description gives:

- the block order;
- the port list;
- the generate/propagate, black-cell, grey-cell and sum equations;
- one example product (6 x 2 = 12 with `sa = 1`, `sb = 0`).

The following points are not specified there and were decided here:

- **Meaning of `sa`/`sb`** as "operand is signed" flags. A sign-magnitude
  reading, where the flag means negative, would make the example product -12,
  not 12.
- **Prefix operator**: the standard `G = Gi | (Pi & Gj)` is used. The
  description's printed form has `Pj` in place of `Gj`, which would not add
  correctly.
- **Signed partial products**: the 33-bit extension and the complemented,
  one-filled last row with a +1 carry-in.
- **Prefix topology**: Kogge-Stone. The tree shape of the parallel adder
  structure is also chosen here.
- **Timing**: one input register stage and one output register stage. There is
  no reset and no handshake, because the port list has none.
- **Not built**: a load/shift register scheme (load multiplier,
  load multiplicand, data in, right shift). It belongs to an iterative
  multiplier. It has no ports in the interface and contradicts the purely
  combinational barrel shifter. The external processor that would supply
  multiplicand data is not part of this RTL either.

## Verification

Each testbench compares against values computed independently in the
testbench, prints `TB_RESULT checks=N failures=M`, and has a watchdog.

- `tb_black_cell`, `tb_grey_cell`: exhaustive truth tables.
- `tb_pg_preproc`, `tb_sum_postproc`: random words, checked bit by bit.
- `tb_prefix_adder`: 64-bit and 13-bit instances against `x + y + cin`.
  Includes full carry-chain cases.
- `tb_barrel_shifter`: every shift amount with both fill values. A 40-bit
  instance covers amounts beyond the width.
- `tb_pp_gen`: each row, and the weighted row sum against `ae * be`.
- `tb_pp_adder_tree`: 32-row and 5-row (padded) trees against a plain sum.
- `tb_operand_reg`, `tb_result_reg`: one-edge load, and hold between edges.
- `tb_novel_mul`: end to end at full size. It sends 3000 operand pairs
  back to back: the example pair, all 36 x 4 combinations of corner values
  (0, 1, -1/0xFFFFFFFF, 0x80000000, 0x7FFFFFFF, 6) in all four sign modes,
  then random pairs. It checks `c` against 64-bit integer multiplication and
  `cout` against a reference carry, with exactly two edges of latency. It
  counts and requires each sign mode, the negative row, and both `cout`
  values.

Run one with plain Verilator, for example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/mul_pkg.sv tb/tb_novel_mul.sv --top-module tb_novel_mul -o sim
    ./obj_dir/sim

The full-size top-level test builds in well under a minute and runs in a
fraction of a second.
