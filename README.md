# Hierarchical wide comparator for FPGAs

A magnitude comparator for very wide unsigned words (hundreds of bits) that tells
whether `a > b`, `a = b` or `a < b`. A plain `a > b` in an HDL leaves the structure to the
synthesis tool, which often builds a long carry chain whose delay grows quickly with width. This
design builds the comparator as a tree instead. At the leaves, 2-bit comparators each
look at two bits of both words. At each level above, a small combining circuit merges
the results of a group of lower comparators. Every level works on all its groups in
parallel, and no signal ripples from bit to bit. The delay grows with the depth of the
tree, not with the width.

The shape of the tree is a parameter: how many levels, and how many comparators each
level merges. Which shape is fastest depends on the FPGA family and on the synthesis
tool, so the idea is to try several and keep the best. The default build is 512 bits
wide.

The logic is purely combinational. There is no clock, no reset and no handshake.

## The two building blocks

### 2-bit comparator (`cmp2`)

It compares `A = (a1, a0)` with `B = (b1, b0)`, where bit 1 is the more significant. It has
two outputs, and each depends on only four input bits. On an FPGA whose logic cells are
4-input look-up tables, each output therefore fits in one LUT. This is why the leaves
are 2 bits wide and not wider. The outputs are written as sums of products:

    e = ~a1.~a0.~b1.~b0 + ~a1.a0.~b1.b0 + a1.~a0.b1.~b0 + a1.a0.b1.b0   (the four "equal" minterms)
    g = a1.~b1 + a0.~b1.~b0 + a1.a0.~b0                                (minimised)

### Combining circuit (`cmp_cl`)

It takes the `(g_n, e_n)` results of `N` comparators. Each of those comparators looks at
one slice of the words, and input `N-1` is the most significant slice. The circuit
forms the result for the whole words:

    G = g[N-1] + e[N-1].g[N-2] + e[N-1].e[N-2].g[N-3] + ... + e[N-1]...e[1].g[0]
    E = e[N-1] . e[N-2] . ... . e[0]

In words: A is greater when some slice says "greater" and every more significant slice
says "equal". Every product term is formed on its own, side by side with the others.
`G` is therefore a two-level AND-OR of the inputs, and there is no chain from slice to
slice. The cost is that `G` has `N` product terms of up to `N` inputs each, so the
circuit grows with the square of `N`. A wide fan-in gives a shallow tree of large
combining circuits. A narrow fan-in gives a deep tree of small ones. Choosing between
them is the trade-off the structure parameters expose.

## Describing a structure

A tree of `T` levels is written `C M_T x N_{T-1}-M_{T-1} x ... x N_1-M_1`:

* `M_t` is the width of one comparator on level `t`.
* `N_t` is how many level-`t` comparators one level-`t+1` comparator merges.
* `M_1 = 2` always, and `M_{t+1} = N_t * M_t`.

Two parameters give the structure, in both `hcmp` and `hcmp_top`:

| parameter | meaning |
|---|---|
| `LEVELS` | the depth `T`, from 1 to `hcmp_pkg::MAX_LEVELS` (12) |
| `FANIN`  | an array of type `hcmp_pkg::fanin_t`; `FANIN[t-1]` = `N_t` for `t = 1 .. LEVELS-1`, and the entries above that are ignored |

The port width is not a parameter of its own. It follows from the structure:
`WIDTH = 2 * FANIN[0] * ... * FANIN[LEVELS-2]`, computed by `hcmp_pkg::hcmp_width`.
Every fan-in must be at least 2. A fan-in does not have to be a power of two, so a
30-bit comparator `C30 x 5-6 x 3-2` is legal, for example.

Examples:

| structure | `LEVELS` | `FANIN` | width |
|---|---|---|---|
| `C2` (one 2-bit comparator) | 1 | `'{default: 1}` | 2 |
| `C16 x 2-8 x 4-2` | 3 | `'{0: 4, 1: 2, default: 1}` | 16 |
| `C512 x 4-128 x 4-32 x 4-8 x 4-2` (default) | 5 | `'{0: 4, 1: 4, 2: 4, 3: 4, default: 1}` | 512 |
| `C512 x 2-256 x ... x 2-2` (deepest) | 9 | `'{0: 2, 1: 2, ..., 7: 2, default: 1}` | 512 |

For a width of `2^k` bits there are `2^(k-2)` structures (k >= 2), one for each way of
writing `k-1` as an ordered sum of positive parts. Summed over the widths 2, 4, ... 256,
that gives 128 structures.

`hcmp` builds the tree level by level in a generate loop. Level 1 holds `WIDTH/2`
instances of `cmp2`, and comparator `i` sees bits `2i+1:2i`. Each level `t > 1` holds one
`cmp_cl` per comparator of that level. Comparator `i` on level `t` merges results
`i*N .. i*N+N-1` of level `t-1`, where `N = FANIN[t-2]`, and the higher-numbered results
are the more significant slices. The results of level `t` are visible in simulation as
`lvl[t].res_g` and `lvl[t].res_e`, which helps when debugging a mismatch.

## The top level (`hcmp_top`)

`hcmp_top` wraps one `hcmp` and adds the "less than" output. It is derived, not built as
a third tree: `l = ~g & ~e`, because exactly one of the three relations holds. Its ports are
`a`, `b` (`WIDTH` bits each, unsigned) and `g`, `e`, `l`. An assertion checks that `g` and `e`
are never both true.

Logic depth, from input to `g`/`e`: one `cmp2` plus `LEVELS-1` combining circuits. `l`
adds one gate. Nothing is registered. Register the inputs and outputs yourself if the
comparator must sit between flip-flops.

## Choices made in this implementation

* **Default structure.** Which tree is best must be found by trying structures on the
  target FPGA with its synthesis tool. No single best structure exists. The default,
  512 bits with fan-in 4 at every level, is a middle choice: 5 levels, and combining
  circuits of 4 inputs (4 product terms). Set `LEVELS` and `FANIN` for your target.
* **Bit and slice order.** Bit `WIDTH-1` is the most significant bit, and higher slices
  take priority in the combining circuit.
* **Unsigned words.** The design compares unsigned words only. For two's-complement
  numbers, invert the sign bit of both words before comparing.
* **Leaves are always 2 bits wide.** Leaves of 3 or 4 bits would also work on devices
  with wider LUTs. They are not provided.
* **Delay is not modelled.** The RTL fixes the logic structure. How fast it runs
  depends on placement and routing in the target device. A synthesis tool may also
  restructure the sums of products: on some FPGA families the plain `>`/`==`
  operators turned out as fast as the tree, or faster. The tree paid off mainly at 128
  bits and wider.

## Files

| file | contents |
|---|---|
| `rtl/hcmp_pkg.sv` | `MAX_LEVELS`, the `fanin_t` type and `hcmp_width()` |
| `rtl/cmp2.sv` | 2-bit leaf comparator |
| `rtl/cmp_cl.sv` | combining circuit, parameter `N` (default 4) |
| `rtl/hcmp.sv` | hierarchical comparator, built level by level; parameters `LEVELS`, `FANIN` |
| `rtl/hcmp_top.sv` | top: `hcmp` plus the `l` output |
| `tb/tb_cmp2.sv` | all 16 input pairs of `cmp2` |
| `tb/tb_cmp_cl.sv` | every combination of slice results for `N` = 2, 4, 7 |
| `tb/tb_hcmp.sv` | six structures, from 2 to 512 bits, including odd fan-ins |
| `tb/tb_hcmp_top.sv` | the default 512-bit top, end to end, no parameter overrides |
| `tb/tb_hcmp_structures.sv` | all 128 structures of 2 to 256 bits, and three 512-bit structures |
| `tb/hcmp_checker.sv`, `tb/tb_hcmp_pkg.sv` | stimulus and checker shared by the last two, and their counters |

## Verification

Every testbench compares the outputs with the plain relations `a > b`, `a == b` and
`a < b` on the whole words. Besides equal words and random words, the tree tests use
one vector per bit position and direction. Each such vector makes the words agree above
bit `i`, differ at bit `i` and leaves them random below it. Bit `i` then decides the
result, so every leaf comparator and every input of every combining circuit decides
at least once. The top-level test counts the greater, equal and less outcomes, and
how many of the 256 leaf comparators decided a result. It fails if any outcome never
occurred or any leaf never decided. Each testbench prints one line
`TB_RESULT checks=N failures=M` and has a watchdog.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb rtl/hcmp_pkg.sv tb/tb_hcmp_pkg.sv \
        tb/tb_hcmp_top.sv --top-module tb_hcmp_top -o sim && ./obj_dir/sim

To run another testbench, replace the testbench file and the top-module name.
`tb_hcmp_structures` instantiates 131 distinct comparators and takes a few minutes to
compile. The others build in seconds.

To lint the design: `verilator --lint-only -Wall -y rtl rtl/hcmp_pkg.sv rtl/hcmp_top.sv`.
