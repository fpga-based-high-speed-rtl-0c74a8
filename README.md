# 8-bit multiply-accumulate unit built on Kogge-Stone adders

This is an 8 x 8-bit unsigned multiply-accumulate (MAC) unit. On every clock it
multiplies two bytes and adds the 16-bit product to a running total. Every
addition in the design uses the same adder, a Kogge-Stone parallel-prefix adder:

- the seven additions inside the multiplier's partial-product tree;
- the add into the accumulator.

A Kogge-Stone adder computes all carries in log2(n) levels of
generate/propagate logic instead of letting them ripple. A 16-bit adder is
therefore four gate levels deep in its carry network, whatever the operands.

```
            a[7:0]  b[7:0]
               |      |
          +----v------v----+
          |    mul8bit     |  8 partial-product rows, summed by a tree
          |  (a1)          |  of seven 16-bit Kogge-Stone adders
          +-------+--------+
                  | product[15:0]
          +-------v--------+
          |      ks        |<-------------+
          |  (a2) 16-bit   |              |
          +-------+--------+              |
                  | sum[15:0]             |
          +-------v--------+              |
 clk,rst->|     pipo1      |  accumulator |
          |  (a3) 16-bit   |--------------+---> z[15:0]
          +----------------+
```

The instance names a1, a2 and a3 match the RTL (`rtl/mac8bit.sv`).

## The Kogge-Stone adder (`ks`)

The adder works on (generate, propagate) pairs, one per bit. The type `gp_t`
is in `rtl/mac_pkg.sv`. The adder has three stages.

1. **Bit signals.** `p[i] = a[i] ^ b[i]`, `g[i] = a[i] & b[i]`.
2. **Prefix levels.** At level `l` (l = 0, 1, ...), bit `i` is combined with
   bit `i - 2^l`. Combining the upper group `(Gi, Pi)` with the lower group
   `(Gj, Pj)` gives

       G = Gi | (Pi & Gj)        P = Pi & Pj

   After level `l`, each bit's group covers bits `i` down to `i - 2^(l+1) + 1`.
   Once a group reaches bit 0, its G is the carry out of bit `i`.
   - Bits below `2^l` are already final, and pass through unchanged.
   - Bits `2^l ... 2^(l+1)-1` become final at this level. They only need G:
     this is the "grey" node, `gp_grey`.
   - Higher bits need both G and P: this is the "black" node, `gp_black`.

   A 16-bit adder has 4 levels holding 15 + 14 + 12 + 8 = 49 nodes. That is
   n*log2(n) - n + 1 nodes for n = 16.
3. **Sum.** `c[i] = G[i]` after the last level. `s[0] = p[0]` and
   `s[i] = p[i] ^ c[i-1]`. `cout = c[n-1]`.

There is no carry input: bit 0 is added with a carry of 0.

A 4-bit example is a good way to follow the structure by hand:
A = 1001 and B = 1100.
- Level 0 gives bit 1 its carry. Level 1 gives bits 2 and 3 their carries.
- The result is carries C3..C0 = 1000 and the sum 1_0101 (9 + 12 = 21).

The testbench checks this example.

`WIDTH` can be any value, not only a power of two. The number of levels is
ceil(log2(WIDTH)). The RTL builds the levels in a single `always_comb` loop,
with a copy of the previous level (`prev`). This keeps the structure readable
and does not look like a combinational loop to lint tools. Each level's logic
is still exactly the node pattern described above.

## The multiplier (`mul8bit`, `pp_gen`)

The multiplication runs in three phases.

1. **Partial products** (`pp_gen`). Row `i` is `x` ANDed with `y[i]`, shifted
   left by `i` and zero-padded to 16 bits: `pp[i][i+j] = x[j] & y[i]`. There
   are eight rows.
2. **Pairwise addition.** Rows 0+1, 2+3, 4+5 and 6+7 go through four 16-bit
   Kogge-Stone adders. The four sums then go through two more adders.
3. **Final addition.** One adder sums the last two rows into `z = x*y`.

That makes seven adders in three levels: a balanced binary tree. Every
intermediate sum is at most 255*255 < 2^16. So the adders' carry outputs are
always 0 and stay unconnected. `N` (the operand width) is a parameter. It must
be a power of two so that the tree halves evenly.

The multiplier is purely combinational. Used alone, it is an 8 x 8 multiplier
with ports `x`, `y` and `z`.

## Accumulation and timing (`mac8bit`, `pipo1`)

The MAC computes `z <= z + a*b` at each rising clock edge.
- The accumulator is `pipo1`: a 16-bit parallel-in parallel-out register,
  loaded every cycle.
- Its output is both the `z` port and the second operand of the adder.
- `rst` is active high and synchronous. It clears the accumulator at the next
  rising edge.

Timing:
- Operands applied before edge `k` show up in `z` right after edge `k`: one
  cycle of latency, with a new operand pair accepted every cycle.
- The critical path runs combinationally from `a`/`b` through the multiplier
  tree and the accumulate adder to the register. The inputs are not
  registered.
- To multiply once, reset the unit, apply the operands for one clock, and read
  `z` = a*b.
- Holding `a*b = 0` (either operand zero) keeps the total.

**Overflow.** The accumulator is 16 bits, the same width as the product.
Running totals wrap modulo 2^16. The adder's carry out is dropped, and nothing
signals an overflow. The interface has no carry or overflow pin. This is
deliberate, to keep the interface at 8 + 8 + 16 data pins plus clock and reset.
For an overflow-safe accumulator, widen `pipo1` and the accumulate adder to
2N+1 bits or more, and bring out the extra bits.

## What is specified and what was chosen

Taken from the design's description:
- the block structure multiplier -> Kogge-Stone adder -> PIPO accumulator, with
  feedback;
- the instance and module names `mul8bit`, `ks`, `pipo1` and `mac8bit`;
- the port names `a`, `b`, `clk`, `rst` and `z`, and the stand-alone
  multiplier's `x`, `y` and `z`;
- the 8-bit operands and 16-bit result;
- the Kogge-Stone equations and their three stages;
- the 16-bit adder width;
- a tree of pairwise Kogge-Stone additions of the partial products.

Chosen here:
- reset polarity and type (active high, synchronous);
- the 16-bit accumulator width. The MAC is also described with a (2n+1)-bit
  result, but its interface shows 16 bits. The 16-bit interface was followed.
- the exact pairing order of the tree;
- no carry input on the adder;
- the grey/black node placement. This is the standard Kogge-Stone layout, and
  it matches the quoted node count.
- unsigned operands;
- the pin names `din`/`dout` of `pipo1`.

Not included:
- The MAC is said to get its operands from a memory. No such memory is
  specified, so the operands are plain input ports.
- Other prefix adders (Sklansky, Brent-Kung, Ladner-Fischer, Han-Carlson) were
  alternatives in a comparison, not part of this design.

The published FPGA results give these resources and delays on a Xilinx device:
- multiplier: 82 LUTs, 32 I/O, 4.81 ns;
- MAC: 102 LUTs, 34 I/O, 1.325 ns.

Those numbers were not reproduced here. The I/O counts match this RTL's ports
(8+8+16 and 8+8+16+2). Note that in this RTL the MAC's path from its
inputs into the accumulator holds the whole multiplier plus one more adder. So
its combinational delay is not shorter than the stand-alone multiplier's.

## Files

| file | content |
|------|---------|
| `rtl/mac_pkg.sv` | widths, `gp_t`, and the black/grey prefix-node functions |
| `rtl/ks.sv` | Kogge-Stone adder, `WIDTH` (16) |
| `rtl/pp_gen.sv` | partial-product rows, `N` (8) |
| `rtl/mul8bit.sv` | partial products plus the adder tree, `N` (8) |
| `rtl/pipo1.sv` | accumulator register, `WIDTH` (16) |
| `rtl/mac8bit.sv` | top: the MAC, `N` (8) |
| `tb/tb_ks.sv` | 4-bit exhaustive plus the worked example; 16-bit corners and 5,000 random pairs |
| `tb/tb_pp_gen.sv` | every row against `(y[i] ? x : 0) << i`, and the row sum against x*y |
| `tb/tb_mul8bit.sv` | all 65,536 operand pairs |
| `tb/tb_pipo1.sv` | load, reset and hold between edges |
| `tb/tb_mac8bit.sv` | end to end at the default size, against a reference model (below) |

`tb_mac8bit` checks the MAC against a reference model cycle by cycle. It
covers:
- single multiplications after reset, with the one-cycle latency;
- a known sum (1*2 + 3*4 + 5*6 + 7*8 = 100);
- wrap-around of the accumulator;
- resets in the middle of an accumulation;
- 20,000 random cycles.

It counts each of these events and fails if one never happens.

Every testbench prints one line, `TB_RESULT checks=N failures=M`. It also has a
watchdog that ends a run that hangs.

## Simulating

Compile the package first. For example, for the MAC:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    rtl/mac_pkg.sv rtl/ks.sv rtl/pp_gen.sv rtl/mul8bit.sv rtl/pipo1.sv rtl/mac8bit.sv \
    tb/tb_mac8bit.sv --top-module tb_mac8bit
./obj_dir/Vtb_mac8bit
```

The other testbenches build the same way: replace the testbench file and
`--top-module`. Each one runs in well under a second.

Linting the MAC with `-Wall` gives three warnings, all expected:
- two deliberately unconnected `cout` pins;
- the unused `lo.p` input of the grey node.

## Changing the size

- `mac8bit #(.N(16))` gives a 16 x 16 MAC with a 32-bit accumulator. `N` must
  be a power of two (the multiplier checks this at elaboration).
- `ks #(.WIDTH(n))` is an n-bit adder, for any n.
- The package constants `OPERAND_W` and `PRODUCT_W` set the default sizes.
- The testbenches assume the 8-bit default, except `tb_ks`, which also builds a
  4-bit adder.
