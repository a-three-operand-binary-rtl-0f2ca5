# Error-detecting carry-select adder, three-operand prefix adder and reversible-cell adder

This repository holds combinational SystemVerilog for three independent binary
adders taken from one published description of fast, area-efficient adders:

1. **`ced_csa`: a concurrent-error-detectable carry-select adder.** A 32-bit
   two-operand adder whose carries are duplicated and whose sum parity is
   predicted. While it computes, a small checker (`ced_checker`) can tell that
   a single stuck-at fault has corrupted the result.
2. **`hc3a`: a three-operand adder.** It computes A + B + C in
   O(log2 n) delay: a carry-save row is followed by a Han-Carlson
   parallel-prefix carry tree, not by a ripple-carry adder.
3. **`csa_adder`: an 8-bit adder built from reversible gates.** Each bit is a
   full adder/full subtractor cell made of Feynman and Fredkin gates.

`adder_top` places the three side by side. Each keeps its own ports, and they
share no signals. Nothing here is clocked: every module is pure combinational
logic, with no register, clock or reset.

Most of this document covers the first adder. Its error-detection argument
depends on which carry copy drives which multiplexer, and the published
description leaves that point unclear.

## 1. The error-detecting carry-select adder

### Interface

```
ced_csa #(N = 32, NK = 4)
  in  x[N-1:0], y[N-1:0]   operands
  in  px, py               parity (XOR of all bits) of x and y
  out s[N-1:0]             sum x + y (mod 2^N)
  out cn, cnp              carry out and its duplicate
  out ps                   predicted parity of s
ced_checker #(N = 32)
  out err = (^s != ps) | (cn != cnp)
```

The operands are assumed to arrive parity-coded, as they would from a
parity-protected register file or bus. A wrong `px` or `py` is therefore
caught too: `ps` then no longer matches the parity of `s`.

### Why parity prediction works

For every bit, `s[i] = x[i] ^ y[i] ^ c[i]`, where `c[i]` is the carry into bit i.
XORing over all bits gives

```
parity(S) = parity(X) ^ parity(Y) ^ parity(all carries)
```

So the adder only has to give the parity of its own carries, formed
independently of the carries that produce the sum. Every carry is therefore
produced twice:

* `ha_dup` (HA′) is a half adder with two separate AND gates: `t1`, `t1p` and `t0 = x ^ y`.
* `inc_dup` (INC′) adds a carry to the half-adder result: `s = t0 ^ cin`,
  `cout = t1 ^ (t0 & cin)`, `coutp = t1p ^ (t0 & cin)`. A half adder never
  sets `t1` and `t0` together, so the XOR equals the usual OR. The XOR lets
  every stuck-at fault propagate to the output.
* `mux_x` (MUX′) is `o = (i1 & sel) ^ (i0 & ~sel)`. This uses the same trick.

The unprimed carry chain forms the sum. The primed copies feed only the
parity. A single fault in one gate can damage the sum or its prediction, but
not both in the same way. A fault in a carry that feeds both copies of the
next bit flips the sum bit once more than it flips the predicted parity. In
every case parity(S) and `ps` differ by exactly one.

### Block structure

The word is cut into `N/NK` blocks of `NK` bits (default: 8 blocks of 4).

* **Block 0 (`ced_block0`)** is a ripple adder with no carry input. Bit 0 is
  an HA′ alone, and bits 1..NK-1 are HA′ + INC′. Its carry parity is
  `pc = cp[1] ^ … ^ cp[NK-1]`, the duplicate carries into its bits.
* **Blocks k ≥ 1 (`ced_blockk`)** precompute everything for both possible
  carries in. One row of HA′ cells feeds two rows of INC′ cells. Row 0
  assumes carry in 0, row 1 assumes carry in 1. In row 0, bit 0 needs no gate.
  In row 1, bit 0 reduces to `t1 ^ t0`. Each row gives sum candidates, a carry
  out pair and a row parity `pR` (the XOR of its duplicate carries into bits
  1..NK-1). When the block carry arrives, a row of MUX′ cells chooses:

  ```
  s[0]  = t0[0] ^ cin
  s[j]  = cin ? s1[j]   : s0[j]         j >= 1
  cout  = cin ? c1[NK]  : c0[NK]
  coutp = cin ? c1p[NK] : c0p[NK]
  pc    = (cin ? p1 : p0) ^ cinp        parity of all carries of the block
  ```

* **`ced_csa`** chains the blocks through `cin/cinp` and forms
  `ps = px ^ py ^ pc_0 ^ … ^ pc_{NB-1}`.

### Which carry drives which multiplexer

This is the subtle part. The choice above was made because it is the only
one among those tried under which every single stuck-at fault on a block
carry is detected:

* If `cin` of block k is stuck, the sum uses the wrong row, and
  `s[0] = t0 ^ cin` flips. `pc` sees the same wrong row's parity but the
  correct carry-in term `cinp`. The result is exactly one parity mismatch.
* If `cinp` is stuck, the sum is correct and `pc` alone is off by one. The
  error is flagged even though the sum is right.
* Both carry outs are steered by `cin`. A wrong `cin` therefore reaches the
  next block on both wires, and that block stays self-consistent. If `coutp`
  were steered by `cinp`, the next block would add a second one-bit mismatch,
  and the two would cancel. Simulation showed about a third of the wrong
  results going unflagged in that variant.
* A fault on the last carry multiplexer shows as `cn != cnp`.

The published description confirms that the parity multiplexer's output is
XORed with a carry input. It does not clearly say which of `cin` and `cinp`
each multiplexer uses. The assignment here is this design's reading.

### What the tests show, and what they do not

Under forced stuck-at-0/1 faults on the carries between blocks, and on a sum
bit, every wrong result in 12,000 random additions was flagged. Faults on the
duplicate carries never corrupted the sum.

Faults inside the cells were **not** simulated one net at a time. A
simulator may merge nets with identical logic (such as `t1` and `t1p`). It may
also share one code copy among repeated instances. Either way, a `force` on
one net can hit several, which makes a multiple fault. The single-fault
property of the cells rests on the reasoning above and on the cells' exact
functional tests. It rests on no fault simulation. The checker itself is not
self-checking. The published scheme also claims C-testability with ten test
patterns. Those patterns are not given, and no such test set is provided here.

### Block widths

The published scheme allows a different width for every block, and requires
each block to be at least 2 bits wide. This RTL uses one width, `NK`, for all
blocks: `N` must be a multiple of `NK`, and `NK >= 2`. The published text does
not give the block widths of its 32-bit adder, so NK = 4 is a choice. To get
unequal blocks, instantiate `ced_block0`/`ced_blockk` by hand. The chaining in
`ced_csa` is only a few lines.

The delay is about NK cells through block 0, plus one MUX′ per higher block,
plus the parity XOR tree.

## 2. The three-operand adder `hc3a`

```
hc3a #(N = 32)   in a, b, c [N-1:0]   out sum[N+1:0] = a + b + c
```

There are four stages, each in its own module:

1. **`bit_addition`** is a row of `full_adder` cells with no carry between
   bits. Each cell is two `half_adder`s (XOR + AND) joined by an OR gate:
   `sp = a ^ b ^ c` and `cy = maj(a, b, c)`, so that `a + b + c = sp + 2·cy`.
2. **`pg_base`** forms generate/propagate for `sp + 2·cy` over N+1 positions:
   `g[i] = sp[i] & cy[i-1]` and `p[i] = sp[i] ^ cy[i-1]`, with zeros at the ends.
3. **`hc_prefix`** is a Han-Carlson prefix tree giving `G[i:0]` for every
   position. The first level combines every odd position with its even
   neighbour. The next levels work Kogge-Stone style on odd positions only,
   at distances 2, 4, 8 and so on. A final level gives each even position the
   finished carry of the odd position below. That makes ⌈log2 W⌉ + 1 levels
   and about half the cells of a Kogge-Stone tree. It works for any width W,
   not only powers of two.
4. **Sum logic**: `sum[0] = p[0]`, `sum[i] = p[i] ^ G[i-1:0]`, `sum[N+1] = G[N:0]`.

The published material gives only the stage names, the Han-Carlson choice and
the sizes it evaluates (32, 64 and 128 bits). The logic inside each stage is
the straightforward circuit for that stage's function. A hybrid
Han-Carlson/Kogge-Stone variant is mentioned, but its level split is not given.
It is not provided. The same holds for an FIR filter said to use the adder.

## 3. The reversible-cell adder `csa_adder`

```
csa_adder #(W = 8)   in a[W-1:0], b[W-1:0], cin   out add[W:0] = a + b + cin
```

* **`feynman`** is a three-line Feynman gate: `p = a`, `q = a ^ b`, `r = a ^ c`.
* **`fredkin`** is a controlled swap: `p = a`. When `a = 1`, `q`/`r` swap `b` and `c`.
* **`fafs`** connects GATE1..GATE3 (Feynman) and GATE4 (Fredkin) so that
  `sd = a ^ b ^ c` and `carry = maj(a, b, c)`, and `borrow` is the borrow of
  `a - b - c`. Unused gate inputs are tied to 0, and unused ("garbage") gate
  outputs stay open. Lint therefore reports unused signals in `fafs`; they
  are intended.
* **`csa_adder`** ripples W cells. The borrow outputs are not brought out.

The module name, the ports and the cell's gate names and kinds are the
published ones. The wiring inside `fafs` was taken from a schematic. The
ripple chaining of the cells is an assumption: the schematic shows one cell.

## Files

| module | role |
|---|---|
| `adder_top` | the three adders side by side (`CED_N = 32`, `CED_NK = 4`, `T3_N = 32`) |
| `ced_csa`, `ced_block0`, `ced_blockk`, `ced_checker` | error-detecting carry-select adder and checker |
| `ha_dup`, `inc_dup`, `mux_x` | HA′, INC′, MUX′ cells |
| `hc3a`, `bit_addition`, `pg_base`, `hc_prefix` | three-operand adder |
| `full_adder`, `half_adder` | full adder from two half adders and an OR gate, used by `bit_addition` |
| `csa_adder`, `fafs`, `feynman`, `fredkin` | reversible-cell adder |

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Small
widths are tested exhaustively, and larger widths with random and
long-carry operands against integer arithmetic. `tb_adder_top` runs the whole
design at its default sizes. It checks each adder and forces stuck-at faults
into the carry-select adder. It also counts that each mechanism occurred: a
precomputed row selected, a carry out, an input parity error caught, an
internal fault caught, the three-operand sum's top bit set, and a carry out of
the 8-bit adder. `tb_hc3a` also runs the 64- and 128-bit adders.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl --top-module tb_adder_top tb/tb_adder_top.sv
./obj_dir/Vtb_adder_top
```

Substitute any other testbench name. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops. A watchdog ends a hung run with
a failure. All runs finish within seconds.

To change sizes, override the parameters: `N`/`NK` on `ced_csa`, `N` on
`hc3a`, `W` on `csa_adder`, or the `CED_*`/`T3_N` parameters of `adder_top`.
