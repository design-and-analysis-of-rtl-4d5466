# 16-bit carry select adder with Kogge-Stone groups, BEC and fast carry logic

A carry select adder hides the carry delay by computing every slice of the sum
twice, once for each possible carry-in, and picking the right copy when the real
carry arrives. The classic version pays for this with two ripple carry adders per
slice. This adder needs only one adder per slice:

* each 4-bit slice is added once, by a **Kogge-Stone** parallel-prefix adder that
  assumes a carry-in of 0;
* the carry-in-1 result is then the carry-in-0 result plus one, which a
  **Binary to Excess-1 converter (BEC)** forms with a chain of AND gates and
  XORs, much cheaper than a second adder;
* a bank of **2:1 multiplexers** per slice picks one of the two results;
* the multiplexer selects do not ripple from slice to slice: a second, small
  Kogge-Stone tree, the **fast carry logic**, computes all slice carries
  (C4, C8, C12, C16) at once.

The whole design is combinational: no clock, no reset, no registers.

```
 a[15:12] b[15:12]  a[11:8] b[11:8]   a[7:4] b[7:4]    a[3:0] b[3:0]
      |                 |                 |                |
 +----------+      +----------+      +----------+     +----------+
 | KSA cin=0|      | KSA cin=0|      | KSA cin=0|     | KSA cin=0|
 |   BEC    |      |   BEC    |      |   BEC    |     |   BEC    |
 +----------+      +----------+      +----------+     +----------+
  |c0,c1  |s0,s1    |c0,c1  |s0,s1    |c0,c1  |s0,s1   |c0,c1  |s0,s1
  |     [mux]<-C12  |     [mux]<-C8   |     [mux]<-C4  |     [mux]<-cin
  |       |         |       |         |       |        |       |
  |    s[15:12]     |    s[11:8]      |    s[7:4]      |    s[3:0]
  v                 v                 v                v
 +---------------------------------------------------------------+
 |          fast carry logic (Kogge-Stone over groups)      <- cin |
 +---------------------------------------------------------------+
        C16 = cout      C12               C8               C4
```

## The 4-bit group

`csla_ksa_bec` is one slice. Inside it:

**Kogge-Stone adder** (`kogge_stone_adder`, built on `kogge_stone_tree`). Three
stages:

1. pre-processing: `P_i = A_i ^ B_i`, `G_i = A_i & B_i`;
2. carry generation: `ceil(log2 n)` levels of prefix cells. At level `l`, bit `i`
   combines with bit `i - 2^l`:
   `G = G_i | (P_i & G_(i-2^l))`, `P = P_i & P_(i-2^l)`. A cell whose `P` output
   is never used is a "grey" cell (only `G`), the others are "black" cells. For
   4 bits there are 3 cells on level 1 and 2 on level 2, `n*log2(n) - n + 1 = 5`;
   after level 2 the generate of bit `i` is `C_i`, the carry out of bit `i`.
   For example `C_3 = G_3 + P_3.G_2 + P_3.P_2.(G_1 + P_1.G_0)`;
3. post-processing: `S_0 = P_0`, `S_i = P_i ^ C_(i-1)`. The group's carry out is
   `C_3`.

The cell operator is defined once, as `black_cell` in `csla_pkg`, and shared by
both trees.

**BEC** (`bec`). Five bits wide: the group's carry and its four sum bits,
`{c0, s0}`, go in, and `{c1, s1} = {c0, s0} + 1` comes out. Bit 0 is inverted;
bit `i` is XORed with the AND of all bits below it. Since `a + b <= 30` for
4-bit operands, `{c0, s0} + 1` never overflows five bits, so `c1` is the exact
carry of `a + b + 1`.

**Multiplexer** (`mux2`). A 5-bit 2:1 bank selects `{c0, s0}` or `{c1, s1}` with
the group carry-in, producing the sum bits and the group's selected carry.

The group also outputs `c0` and `c1` unselected, for the fast carry logic.

## Fast carry logic

Without it, group `k`'s multiplexer waits for group `k-1`'s multiplexer, and the
carry ripples through all the multiplexers. The fast carry logic
(`fast_carry_logic`) removes that chain. It is the part of the design that takes
most thought.

For any group, the carry out as a function of its carry-in `c` is

    carry_out = c0 | (c1 & c)

where `c0` and `c1` are the group's carries for carry-in 0 and 1. Since
`c0 = 1` implies `c1 = 1`, this is the generate/propagate rule with `g = c0`
and `p = c1`. Here `p` is "generate or propagate" rather than a pure propagate.
The prefix operator `(g_hi, p_hi) o (g_lo, p_lo) = (g_hi | p_hi & g_lo, p_hi & p_lo)`
is associative for any `g, p`, so a Kogge-Stone tree over these pairs gives
exactly the rippled carries.

The tree has five positions:

| position | g     | p     |
|----------|-------|-------|
| 0        | `cin` | 0     |
| k+1      | `c0[k]` | `c1[k]` |

The generate of prefix `k+1` is the carry out of group `k`: C4, C8, C12 and
C16 = `cout`. That takes three levels of cells. The group carries depend only on
the operands and `cin`, not on any multiplexer, so all four multiplexer banks
switch in parallel.

## Top level: `csla16_ksa_bec_fcl`

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `a`     | in  | 16 | augend |
| `b`     | in  | 16 | addend |
| `cin`   | in  | 1  | carry-in |
| `s`     | out | 16 | `a + b + cin`, low 16 bits |
| `cout`  | out | 1  | carry out, from the fast carry logic |
| `c_grp` | out | 4  | group carries from the fast carry logic: `c_grp[k]` = carry out of bits `4k+3..0` (C4, C8, C12, C16) |
| `c_sel` | out | 4  | the carry each group's multiplexer selected; always equal to `c_grp`, `c_sel[3]` is the multiplexed C16 |

Parameters: `WIDTH = 16` and `GROUP_WIDTH = 4`. `WIDTH` must be a multiple of
`GROUP_WIDTH`, checked at elaboration. The number of groups and both tree
depths follow from these two values. `csla_pkg` holds the defaults
(`ADDER_WIDTH`, `GROUP_WIDTH`), the `gp_t` generate/propagate struct and the
`black_cell` function.

Timing: combinational from every input to every output. The critical path goes
through one 4-bit Kogge-Stone adder, the BEC and the fast carry logic tree into
the last multiplexer bank.

## Files

| file | contents |
|------|----------|
| `rtl/csla_pkg.sv` | sizes, `gp_t`, `black_cell` |
| `rtl/kogge_stone_tree.sv` | generic Kogge-Stone prefix tree |
| `rtl/kogge_stone_adder.sv` | 4-bit Kogge-Stone adder, carry-in 0 |
| `rtl/bec.sv` | Binary to Excess-1 converter |
| `rtl/mux2.sv` | 2:1 multiplexer bank |
| `rtl/csla_ksa_bec.sv` | one carry select group |
| `rtl/fast_carry_logic.sv` | group carries by Kogge-Stone tree |
| `rtl/csla16_ksa_bec_fcl.sv` | the 16-bit adder (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench compares with integer arithmetic computed in the testbench,
ends with a `TB_RESULT checks=N failures=M` line, and has a watchdog.

* `tb_kogge_stone_adder`, `tb_csla_ksa_bec`: all operand pairs (and both
  carry-ins for the group). The group test also checks `c0` and `c1`.
* `tb_bec`: all inputs, at 5 and 4 bits.
* `tb_fast_carry_logic`: all 512 combinations of `cin`, `c0` and `c1`, against
  the rippled carries.
* `tb_mux2`: random data with both selects.
* `tb_csla16_ksa_bec_fcl`: the top at its default size. It runs directed
  corners, including `a = b = 0xFFFF` with `cin` = 1 (sum `0xFFFF`, all group
  carries 1) and with `cin` = 0 (sum `0xFFFE`, carry 1). Then it runs 20,000
  random vectors, half of them biased towards long carry chains. It checks
  `s`, `cout`, `c_grp` and `c_sel`. It also counts how often these events
  happened, and fails if one never did:
  * a group selected the BEC result;
  * the BEC produced the group carry (`c0 = 0`, `c1 = 1`);
  * a carry crossed a fully propagating group;
  * `cin` travelled through all four groups.

To simulate one testbench with Verilator (from the project root):

```
verilator --binary --timing --assert -Irtl -y rtl rtl/csla_pkg.sv \
    tb/tb_csla16_ksa_bec_fcl.sv --top-module tb_csla16_ksa_bec_fcl
./obj_dir/Vtb_csla16_ksa_bec_fcl
```

To lint the RTL: `verilator --lint-only -Wall -Irtl -y rtl rtl/csla_pkg.sv rtl/csla16_ksa_bec_fcl.sv`
(clean). Linting a single leaf module on its own reports the package's size
constants as unused. That warning is harmless.

## Design choices and limits

* **Which variant.** The published comparison has six 16-bit adders:
  * an RCA-based CSLA, without and with fast carry logic;
  * this KSA + BEC CSLA, without and with fast carry logic;
  * a KSA CSLA whose group is a Kogge-Stone adder for carry-in 1 with extra
    gates to recover the carry-in-0 result, without and with fast carry logic.

  Only the KSA + BEC adder with fast carry logic is provided. It had the lowest
  area-delay and power-delay products in that comparison. The other five are not
  included. Reported area, delay and power come from ASIC and FPGA synthesis
  and are not reproduced here.
* **Fast carry logic insides.** The source only says that the fast carry logic
  uses a Kogge-Stone tree on the groups' carry outputs. The tree over
  (`c0`, `c1`) pairs with `cin` as an extra leaf is this design's choice.
* **BEC width.** The group's BEC is drawn as "4-bit", but the converter it is
  based on has five bits. Five bits are used, so the group carry goes through
  the BEC too. This gives `c1` exactly.
* **Two carry outputs.** The block diagram shows both a multiplexed C16 and a
  `Cout` from the fast carry logic. Both are available (`c_sel[3]`, `cout`),
  and they are always equal.
* **Single carry-in.** Some published simulation traces show two carry-in
  signals whose roles are not described. This design has one `cin`.
* **Sizes.** `WIDTH` and `GROUP_WIDTH` can be changed. Only 16/4 has been
  simulated end to end; the group-level blocks were also tested at their own
  default widths. `GROUP_WIDTH` must be at least 2.
