# Hybrid concatenation-and-incrementation carry-skip adder (32 bit)

A carry-skip adder (CSKA) cuts an N-bit addition into stages. Each stage has a
small adder block, plus a skip gate that passes the incoming carry straight to the
next stage when every bit of the block propagates. In a conventional CSKA each
block still waits for its carry input before it can start adding. The worst-case
path therefore ripples through the first block, along the skip gates, and then
through the last block.

This RTL implements the *concatenation and incrementation* (CI) version with three
refinements:

* **Concatenation.** Every block except the first adds its operand slice with a carry
  input of 0. All blocks work at the same time, independently of the carry chain.
  Each produces a *partial sum*, a block carry output (its generate) and a block
  propagate.
* **Skip logic on the carry chain only.** The true carry into stage k+1 is
  `c[k+1] = cout_blk[k] | (bp[k] & c[k])`. A zero-carry-in block can never
  generate and propagate at once, so this AND-OR gate does the job of the
  multiplexer in a conventional skip adder. Only these gates are on the stage-to-stage
  carry path.
* **Incrementation.** Once `c[k]` is known, an incrementation block adds it to the
  stage's partial sum. Bit j flips when `c[k]` is 1 and all lower partial-sum bits
  are 1.
* **Carry-lookahead blocks.** The adder blocks are carry-lookahead (CLA) blocks, not
  ripple-carry blocks, and every stage has the same size (fixed stage size).
* **Hybrid central stage.** The stage in the middle of the word is a Kogge-Stone
  parallel-prefix adder instead of a CLA block with skip and increment logic.

The structure targets ALU datapaths, where the adder's delay and energy per
operation matter. The original evaluation compared it on an FPGA (Artix-7)
against ripple-carry, carry-lookahead, conventional CSKA and plain CI-CSKA adders.
It reported the shortest path delay of the five (18.6 ns against 22.4 to 26.3 ns).
Its power was close to the others' (24.8 W, against 23.5 to 25.4 W). RTL simulation
cannot reproduce these figures. This code reproduces the function and the
structure.

## Structure at the default size

`N = 32`, `M = 4`. That gives 8 stages. `CENTER = 4`.

| stage | bits   | hardware                                                      | carry out          |
|-------|--------|---------------------------------------------------------------|--------------------|
| 0     | 3:0    | `cla_block` with carry input `ci`; its sum is final            | CLA carry output   |
| 1–3   | 7:4 … 15:12 | `cla_block` (cin = 0) + `skip_logic` + `ci_incrementer`  | skip logic         |
| 4     | 19:16  | `ks_ppa`, with the carry from stage 3 as its carry input       | prefix network     |
| 5–7   | 23:20 … 31:28 | `cla_block` (cin = 0) + `skip_logic` + `ci_incrementer` | skip logic (stage 7: `co`) |

Timing of one addition, as a chain of events:

1. All CLA blocks and the prefix pre-processing of stage 4 start together.
2. Stage 0 ripples `ci` through its lookahead logic to `c[1]`.
3. `c[1]` travels through the AND-OR skip gates of stages 1 to 3.
4. It then crosses the Kogge-Stone network of stage 4 (2 prefix levels for 4 bits).
5. It continues through the skip gates of stages 5 to 7, giving `co`.
6. Each incrementation block finishes with one AND and one XOR after its stage's
   carry input arrives. Its all-ones prefix of the partial sum is computed in advance.

The whole adder is combinational. It has no clock, reset or handshake, so `s` and
`co` are valid one propagation delay after `a`, `b` and `ci` change.

## The blocks

* `rtl/cla_block.sv` is the M-bit carry-lookahead block. Each carry is a flat
  sum-of-products over the bit generates and propagates and the carry input. It
  outputs the sum, the carry out and the block propagate `bp = &(a ^ b)`.
* `rtl/skip_logic.sv` computes `co = co_blk | (bp & ci)`.
* `rtl/ci_incrementer.sv` computes `s = ps + ci` (mod 2^M) as an XOR with the
  AND-prefix of the partial sum.
* `rtl/ks_ppa.sv` is the M-bit Kogge-Stone adder, with `ceil(log2 M)` prefix levels.
  The carry input is folded into bit 0's generate, so the network delivers every bit's
  true carry and the stage carry output.
* `rtl/ci_cska_hybrid.sv` is the top. It generates the stages from `N`, `M` and
  `CENTER`. It stops elaboration with an error if `N` is not a multiple of `M` or if
  `CENTER` is not a stage.
* `rtl/cska_pkg.sv` holds the default sizes, `ADDER_WIDTH = 32` and `STAGE_WIDTH = 4`.

Top-level ports: `a[N-1:0]`, `b[N-1:0]` and `ci` are inputs. `s[N-1:0]` and `co` are
outputs.

## What follows the original design and what is chosen here

These features follow the original design:

* the 32-bit width;
* CLA blocks with a zero carry input in every stage but the first;
* skip logic driven by the block carry, the stage carry and the product of the
  propagates;
* an incrementation block per stage;
* a fixed stage size;
* a Kogge-Stone prefix network at the central stage.

The original gives no circuit-level detail for several of these. The following
choices are made here and are easy to change:

* **Stage size of 4 bits.** The original only says that the stage size is fixed. 4 is
  the usual CLA group. Change `M` (or `STAGE_WIDTH`).
* **Which stage is central.** The default is stage `N/M/2` (stage 4 of 0..7). Change
  `CENTER`.
* **How the Kogge-Stone stage is connected.** It takes the incoming stage carry into
  its prefix network. It therefore needs no skip or incrementation logic, and its
  carry output feeds the next stage's skip gate.
* **Stage 0 has no skip logic.** It already receives the real carry input, so its
  CLA carry output is the true carry.
* **Internals of the CLA block and the incrementer.** Both are written as plain
  boolean equations. A transistor-level version would use alternating AOI/OAI gates
  for the skip chain. That is outside what RTL expresses.
* **Baselines not included.** The ripple-carry, CLA and conventional skip adders of
  the comparison are not included.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares against integer
arithmetic and ends with a line `TB_RESULT checks=N failures=F`:

| testbench | what it does |
|-----------|--------------|
| `tb_cla_block` | exhaustive, for M = 4 and M = 6 |
| `tb_skip_logic` | full truth table |
| `tb_ci_incrementer` | exhaustive, for M = 4 and M = 8 |
| `tb_ks_ppa` | exhaustive for M = 4 and M = 5, random and corner cases for M = 16 |
| `tb_ci_cska_hybrid` | the 32-bit top at its default parameters (see below) |
| `tb_ci_cska_hybrid_variants` | other sizes: 16/4, 24/3 with the Kogge-Stone stage first, 64/8 with it last, and a 12-bit sweep |

`tb_ci_cska_hybrid` runs 200,000 random and directed additions. The random operands
are biased toward long propagate runs. From the reference arithmetic, the bench also
counts how often each mechanism was exercised. It fails if any of them never occurs:

* a carry skipped across a stage;
* an incrementation;
* a block generate;
* a carry entering the Kogge-Stone stage;
* a carry running from `ci` through all eight stages to `co`;
* a carry out.

Each testbench was also run against a copy of its module with one deliberate bug, and
each reported failures.

To simulate with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/cska_pkg.sv tb/tb_ci_cska_hybrid.sv --top-module tb_ci_cska_hybrid
./obj_dir/Vtb_ci_cska_hybrid
```

Replace the testbench name to run another bench. To lint a module:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/cska_pkg.sv rtl/<module>.sv`.
