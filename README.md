# Hybrid 64-bit adders: split the carry chain, give each half its own scheme

A 64-bit adder spends almost all of its delay waiting for carries. The classic carry
schemes each trade one cost for another. A ripple chain is small but needs 64 gate delays.
A Kogge-Stone prefix tree needs only log2 n levels, but its area and wiring grow fast. Carry
select, carry lookahead and carry skip adders fall in between.

The adders here split the 64 bits into a lower and an upper section, sometimes with a
further 16 + 16 split of the lower half. Each section uses a different carry scheme, and a
single carry wire joins them: C32 between the halves, and C16 inside a split lower half. The
point of the mix is timing. An upper Kogge-Stone section evaluates its own operands while the
lower section works out C32. C32 then enters only the final sum stage, so the upper half adds
little to the critical path.

All adders compute `{cout, sum} = a + b + cin` on 64-bit operands. They are purely
combinational, with no clock, reset or handshake.

## The architectures

| # | Module | Bits 0-15 | Bits 16-31 | Bits 32-63 |
|---|--------|-----------|------------|------------|
| 1 | `hybrid_cla_ksa` | two-level carry lookahead (`cla32`) | (same) | Kogge-Stone (`ksa`, 32) |
| 2 | `hybrid_csla_ksa` | carry select (`csla`, 32, 4-bit blocks) | (same) | Kogge-Stone (32) |
| 3 | `hybrid_cslaksa_ksa` | carry select (16) | Kogge-Stone (16) | Kogge-Stone (32) |
| 4 | `hybrid_cslaksa_cska` | carry select (16) | Kogge-Stone (16) | carry skip (`cska`, 2 x 16) |
| 5 | `hybrid_rca_cska` | ripple carry (`rca`, 32) | (same) | carry skip (2 x 16) |
| 6 | `hybrid_rca_ksa` | ripple carry (32) | (same) | Kogge-Stone (32) |

Architectures 1-5 are the proposed family. Number 6 was measured beside them in the
original FPGA evaluation, so it is included too. `hybrid_adder_top` puts all six side by
side. Each has its own `aN`, `bN`, `cinN`, `sumN` and `coutN` ports, so any one can be
simulated or synthesized alone. The top also brings out `skip4` and `skip5`, the bypass
flags of the two upper skip blocks of architectures 4 and 5.

The original evaluation targeted a Xilinx Artix-7 FPGA and reported these figures. The RTL
here was not timed or power-analysed, so they are for orientation only:

| Adder | Delay (ns) | Power (W) |
|-------|-----------|-----------|
| RCA(32) + KSA(32) (#6) | 7.84 | 0.246 |
| CLA(32) + KSA(32) (#1) | 6.48 | 0.271 |
| CSLA(32) + KSA(32) (#2) | 6.15 | 0.288 |
| (CSLA16 + KSA16) + KSA32 (#3) | 5.87 | 0.301 |
| (CSLA16 + KSA16) + CSKA32 (#4) | 6.41 | 0.267 |
| standalone 64-bit RCA / CLA / CSKA / CSLA / KSA | 18.42 / 11.36 / 10.74 / 9.81 / 6.92 | 0.184 / 0.231 / 0.218 / 0.264 / 0.312 |

Architecture 3 was the fastest. Architecture 4 was judged the best balance of power, area and
speed. No figures were reported for architecture 5. The standalone 64-bit adders were
reference points only and are not part of this design.

## How the carry crosses each kind of section

The hybrids themselves are only wiring. The work is done in the sub-adders, and each one
treats the incoming carry differently. That difference is what decides the critical path.

**Kogge-Stone (`ksa`).** Stage 0 forms a pair for each bit: generate `Gi = ai & bi` and
propagate `Pi = ai ^ bi`. Then come log2(WIDTH) prefix stages: 5 for the 32-bit section, 4
for the 16-bit one. Stage `l` combines position `i` with position `i - 2^(l-1)` using the
prefix operator `(Gk, Pk) o (Gj, Pj) = (Gk | Pk&Gj, Pk&Pj)`. After the last stage,
position `i` holds the group pair `(G[i:0], P[i:0])` of all bits up to and including `i`.

The carry in is not part of the prefix tree. It joins only in the sum stage:
`C(i+1) = G[i:0] | P[i:0] & cin` and `Si = Pi ^ Ci`. So the whole tree settles from the
section's own operands, and a late C32 or C16 costs one AND-OR and one XOR. This is why a
Kogge-Stone upper section suits a hybrid. The operator is the function `gp_combine` in
`adder_pkg`.

**Two-level carry lookahead (`cla32` → `cla16` → `cla_lcu4`).** `cla_lcu4` expands the
recursion `C(i+1) = Gi + Pi*Ci` over 4 positions into flat sum-of-products terms. It also
gives a group generate/propagate for those 4 positions. `cla16` uses four units over the
bits and a fifth over the four groups. It has no carry out. It reports its group pair
`(g_grp, p_grp)` instead. `cla32` joins two of these blocks with one more lookahead level:
`C16 = G0 | P0&cin` and `cout = G1 | P1&G0 | P1&P0&cin`.

**Carry select (`csla` → `csla_block`).** Each 4-bit block holds two ripple adders. One
assumes a carry in of 0, the other a carry in of 1. The real carry then only drives a
multiplexer that picks the sum and carry out. Along the chain, the carry passes one
multiplexer per block.

**Carry skip (`cska` → `cska_block`).** Each 16-bit block ripples internally. It also forms
the block propagate `&(a ^ b)`. When that is 1, the carry in goes straight to the carry out
through a multiplexer. Both choices give the same logical value. The skip only shortens the
longest path, because a block whose bits all propagate never has to wait for its own ripple.
The `skip` output shows when the bypass is taken.

**Ripple (`rca` → `full_adder`).** A plain chain of full adders.

## Module hierarchy

```
hybrid_adder_top
├── hybrid_cla_ksa       cla32 (2 x cla16 (5 x cla_lcu4)), ksa #(32)
├── hybrid_csla_ksa      csla #(32,4) (8 x csla_block (2 x rca #(4))), ksa #(32)
├── hybrid_cslaksa_ksa   csla_ksa (csla #(16,4), ksa #(16)), ksa #(32)
├── hybrid_cslaksa_cska  csla_ksa, cska #(32,16) (2 x cska_block (rca #(16)))
├── hybrid_rca_cska      rca #(32) (32 x full_adder), cska #(32,16)
└── hybrid_rca_ksa       rca #(32), ksa #(32)
adder_pkg                gp_t, gp_combine, gp_carry
```

## Parameters and their limits

| Module | Parameters (default) | Constraint |
|--------|---------------------|------------|
| `hybrid_csla_ksa` | `WIDTH` 64, `LOW_WIDTH` 32, `CSLA_BLOCK` 4 | `WIDTH-LOW_WIDTH` a power of two; `LOW_WIDTH` a multiple of `CSLA_BLOCK` |
| `hybrid_cslaksa_ksa` | `WIDTH` 64, `LOW_WIDTH` 32, `CSLA_WIDTH` 16 | `WIDTH-LOW_WIDTH` and `LOW_WIDTH-CSLA_WIDTH` powers of two |
| `hybrid_cslaksa_cska` | `WIDTH` 64, `LOW_WIDTH` 32, `CSLA_WIDTH` 16, `SKIP_BLOCK` 16 | `WIDTH-LOW_WIDTH` a multiple of `SKIP_BLOCK` |
| `hybrid_rca_cska` | `WIDTH` 64, `LOW_WIDTH` 32, `SKIP_BLOCK` 16 | as above |
| `hybrid_rca_ksa` | `WIDTH` 64, `LOW_WIDTH` 32 | `WIDTH-LOW_WIDTH` a power of two |
| `ksa` | `WIDTH` 32 | power of two |
| `csla`, `cska` | `WIDTH`, `BLOCK` | `WIDTH` a multiple of `BLOCK` |
| `rca`, `csla_block`, `cska_block` | `WIDTH` | any |

`hybrid_cla_ksa`, `cla32`, `cla16` and `cla_lcu4` have fixed sizes (64, 32, 16 and 4 bits).
The adders check their constraints at elaboration with `$error`.

## What follows the original design and what was filled in

These parts follow the original design:

- The six partitions and the C16/C32 links between sections.
- The generate/propagate equations and the carry recursion.
- The idea of a Kogge-Stone prefix tree. Its published 32-bit instance has one G/P stage,
  five prefix stages and a sum stage that takes the carry in. `ksa` is organised the same
  way.
- The CLA_32 made of two 16-bit lookahead blocks, with their group generate/propagate
  combined outside them.
- The carry select adder built from 4-bit blocks, each with two adders and a multiplexer.
- The carry skip rule: cout = cin when the block propagate `P0·P1·…·Pn` is 1. The upper
  skip adder uses two 16-bit blocks.
- The ripple adder as a chain of full adders.

These are choices made here, where the original gives no detail:

- The prefix operator is the standard Kogge-Stone one. The carry in is folded into the sum
  stage, as described above.
- The inside of the 16-bit CLA block is a 4 x 4 two-level lookahead.
- The carry select blocks precompute with ripple adders. The binary-to-excess-1 variant is
  not used.
- The published 32-bit carry select adder is drawn as two 16-bit halves of four 4-bit blocks
  each. That middle level adds no logic, so `csla` is one flat chain of blocks.
- The upper section of architectures 4 and 5 is labelled "CSA" in some drawings. It is
  implemented as a carry **skip** adder, as the architecture descriptions name it, not as a
  carry-save adder.
- The original measured its standalone 64-bit reference adders with registered inputs and
  outputs. Its hybrid adders are shown without registers, and they are combinational here.
  To measure delay on an FPGA, register the ports of the adder under test.
- The `skip` outputs exist only to make the bypass visible to tests.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares against
`a + b + cin` worked out by the simulator's own arithmetic and ends with a line
`TB_RESULT checks=N failures=M`. The operands come from a mix of generators, so that long
carry chains, skips and selects are all exercised:

- uniform random
- `b = ~a`, where every bit propagates
- `b = ~a` with one bit flipped
- sparse operands
- all-ones operands

Small blocks (`full_adder`, `csla_block`) are also tested exhaustively. `tb_cla16` checks
the group generate/propagate outputs. The skip testbenches check `skip` against the rule
"every bit of the block propagates".

`tb_hybrid_adder_top` runs all six architectures at their default sizes, 20000 vectors
each. It finds the carry into every bit from `(a+b+cin) ^ a ^ b`. It counts how often each
mechanism actually happened and fails the run if any count is zero. The mechanisms are:

- C32 = 1 into each upper section
- a carry running through all 64 bits
- the CLA's second-level C16
- carry select blocks choosing their carry-in-1 result
- the CSLA-to-KSA carry C16
- skip blocks bypassing a carry of 1

Every testbench was also run against a copy of its module with one deliberate bug, and each
one reported failures.

What is not verified: timing, power and area. Functional equivalence is shown by simulation
only, not by formal proof.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/adder_pkg.sv tb/tb_hybrid_adder_top.sv \
          --top-module tb_hybrid_adder_top
./obj_dir/Vtb_hybrid_adder_top
```

Replace `tb_hybrid_adder_top` with any other `tb_<module>` to test one block. `adder_pkg.sv`
must come first on the command line, because `ksa` imports it. `-y rtl` finds every other
module by its file name.
