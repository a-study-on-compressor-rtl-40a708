# Compressor adders: 5-3, 10-4, 15-4 and 20-5 bit counters

Multipliers spend most of their delay, power and area summing partial
products. A column of partial-product bits is reduced by counting its ones:
the classic cell is the full adder, a 3:2 counter. A *compressor* here is a
larger counter: an N-r compressor takes N equally weighted bits and returns
the number of ones among them as an r-bit binary number. Building wide
counters from a few well-chosen stages, rather than from long chains of full
and half adders, shortens the critical path.

This RTL implements four such compressors:

| compressor | module     | inputs | result bits | largest result |
|------------|------------|--------|-------------|----------------|
| 5-3        | `comp5_3`  | 5      | 3           | 5  = `101`     |
| 10-4       | `comp10_4` | 10     | 4           | 10 = `1010`    |
| 15-4       | `comp15_4` | 15     | 4           | 15 = `1111`    |
| 20-5       | `comp20_5` | 20     | 5           | 20 = `10100`   |

Every compressor has the same interface: input `i[N-1:0]`, output `z[r-1:0]`,
with `z == $countones(i)`. All of them are purely combinational: no clock,
no reset, no state. The result is valid one combinational delay after the
input settles.

The larger compressors are built from the smaller ones, so the 5-3 cell is
the foundation of everything else.

## The 5-3 compressor: three multiplexers sharing one select

`comp5_3` splits its five inputs into a group of three and a group of two.

1. A full adder counts `i[0] + i[1] + i[2]` into a 2-bit value `k` (0..3).
2. `k` drives the select of three one-bit 4:1 multiplexers (`mux4`),
   named `n2`, `n3` and `n4`. Each one produces one bit of the result:
   `n2` bit 0, `n3` bit 1, `n4` bit 2.
3. The data inputs of the multiplexers are simple gates on the remaining
   two bits. Let `l = i[3]^i[4]`, `h = i[3]&i[4]` and `o = i[3]|i[4]`.
   The count is `k + i[3] + i[4]`. For each value of `k`, each result bit
   is one of these gate outputs, their inverses, or a constant:

| k | count range | z[2] (n4) | z[1] (n3) | z[0] (n2) |
|---|-------------|-----------|-----------|-----------|
| 0 | 0..2        | `0`       | `h`       | `l`       |
| 1 | 1..3        | `0`       | `o`       | `~l`      |
| 2 | 2..4        | `h`       | `~h`      | `l`       |
| 3 | 3..5        | `o`       | `~o`      | `~l`      |

The gates for the last two inputs work in parallel with the full adder.
Only one multiplexer level follows them, so the path from any input to any
output is short.

The multiplexer output stage, with three 4:1 muxes for the three result bits,
is the defining feature of this design. The full adder that makes the
select, and the exact gate functions in front of the data inputs, are this
implementation's own. They are the simplest logic that makes three shared-select
muxes produce the count.

## Building wider compressors

### 10-4: two 5-3 counts added

`comp10_4` counts `i[4:0]` with one 5-3 compressor (`a1`) and `i[9:5]` with
another (`a2`). The two 3-bit counts `p` and `q` are added by a three-cell
ripple chain:

- bit 0: half adder `a4` (only two operands, no carry yet);
- bit 1: full adder `a3`;
- bit 2: full adder `a5`;
- the carry out of `a5` is result bit 3.

### 15-4: a full-adder layer, two 5-3 counts, one 4-bit adder

`comp15_4` uses a different split. It does not count groups of inputs
directly. Instead it first applies one layer of carry-save reduction:

1. Five full adders `u0`..`u4` each take three inputs (`u0` takes `i[2:0]`,
   …, `u4` takes `i[14:12]`). Each gives a sum bit of weight 1 and a
   carry bit of weight 2.
2. The 5-3 compressor `u5` counts the five sum bits. The 5-3 compressor
   `u6` counts the five carry bits.
3. The 4-bit parallel adder `u7` (`adder4`, a ripple chain of four full
   adders) forms `z = count(sums) + 2 * count(carries)`. The carry count
   enters the adder shifted left by one place.

The total is at most 15, so `u7`'s carry out is always 0 and is left
unconnected.

### 20-5: a 15-4 count plus a 5-3 count

`comp20_5` counts `i[14:0]` with a 15-4 compressor (`u8`) and `i[19:15]` with
a 5-3 compressor (`u9`). It adds the 4-bit and 3-bit counts with a ripple chain:

- bit 0: half adder;
- bits 1 and 2: full adders;
- bit 3: half adder, since the 3-bit count has no bit 3;
- the last carry is result bit 4.

### Top level

`compressor_top` places the four compressors side by side. Each has its
own ports: `i5`/`z5`, `i10`/`z10`, `i15`/`z15` and `i20`/`z20`. They are
independent building blocks. Nothing combines them into a multiplier
here.

## What is fixed and what is chosen

These parts follow the design as described:

- the four compressor sizes and their result widths;
- the three 4:1 multiplexers of the 5-3 cell;
- the use of two 5-3 cells plus one half adder and two full adders in the
  10-4 cell;
- the five full adders, two 5-3 cells and one 4-bit adder of the 15-4
  cell;
- the 15-4 plus 5-3 plus full/half-adder chain of the 20-5 cell.

These are this implementation's choices:

- **Which input bits go to which sub-block.** For a counter, every split
  gives the same result.
- **Which column each half or full adder sits in.** Each half adder goes
  where a column has only two operands.
- **The logic in front of the 5-3 multiplexers**, shown in the table
  above.
- **The 4-bit parallel adder** is a plain ripple-carry adder.

The source design also contains two descriptions that this RTL does not
reproduce:

- It describes the 5-3 multiplexers as allowing "only one output high at a
  time". A count has no such property: a result of 3 sets two bits. That
  phrase has no counterpart here.
- It compares the compressors against "conventional" adder-based counters
  for delay. That baseline's structure is not specified, so it is not
  included.

Delay, power and area figures for the compressors come from particular
FPGA and standard-cell flows. This RTL does not reproduce them.

The gate-level structure below the named blocks is this implementation's
own. Timing results from synthesizing it will differ from the published
ones.

## Verification

Every module has a self-checking testbench in `tb/`. Each one applies
**every** input vector of its block and compares the outputs with a
reference computed in the testbench:

- the integer sum for the adders;
- `d[sel]` for the multiplexer;
- `$countones` for the compressors.

The compressor testbenches first apply the input patterns whose results
appear in the published simulation waveforms. Those patterns are:

| compressor | input       | expected `z` |
|------------|-------------|--------------|
| 10-4       | `1100000000` | `0010`      |
| 10-4       | `0110011000` | `0100`      |
| 10-4       | `1101100110` | `0110`      |
| 15-4       | 4, 7, 8 and 15 low-order ones | `0100`, `0111`, `1000`, `1111` |
| 20-5       | all twenty inputs high | `10100` |

Each testbench prints one summary line,
`TB_RESULT checks=<n> failures=<m>`, and has a watchdog that ends the run
with a failure if it does not finish.

`compressor_top_tb` sweeps a 20-bit counter through all 2^20 values. It
derives each compressor's input from the counter, so every compressor sees
all of its input vectors. It also counts, for each compressor, two events:

- how often the result reached full scale;
- how often the top result bit was set. This exercises the final carry of
  the 10-4 and 20-5 chains.

A compressor with a count of zero for either event fails the test. The top
has no parameters, so this test runs at full size. It takes well under a
minute.

## Simulating

Use Verilator 5. From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl tb/comp20_5_tb.sv --top-module comp20_5_tb
./obj_dir/Vcomp20_5_tb
```

Replace `comp20_5` with any other block name to run its testbench. The
available blocks are:

- `compressor_top`
- `comp15_4`
- `comp10_4`
- `comp5_3`
- `mux4`
- `adder4`
- `full_adder`
- `half_adder`

To lint a module, run `verilator --lint-only -Wall -y rtl rtl/<module>.sv`.

## Files

| file | contents |
|------|----------|
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | one-bit adder cells |
| `rtl/mux4.sv` | one-bit 4:1 multiplexer |
| `rtl/adder4.sv` | 4-bit ripple-carry adder (`u7` of the 15-4 cell) |
| `rtl/comp5_3.sv`, `rtl/comp10_4.sv`, `rtl/comp15_4.sv`, `rtl/comp20_5.sv` | the compressors |
| `rtl/compressor_top.sv` | the four compressors side by side |
| `tb/<module>_tb.sv` | exhaustive self-checking testbench for each module |
