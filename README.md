# Fast 3X generation with the H/K carry pair

A radix-8 (Booth-3) multiplier needs the multiples 0, ±X, ±2X, ±3X and ±4X of
the multiplicand. All of them are shifts or complements of X except the "hard
multiple" 3X, which has to be added up as 2X + X before partial products can
be formed. That carry-propagate addition sits right in front of the
multiplier's partial-product stage. It is usually on the critical path.

This RTL computes 3X with circuits built for that one addition. In 2X + X the
full adder at bit i adds x_i and x_{i-1}, so neighbouring cells share an input
bit. The carry chain then collapses into two simpler signals, **H** and
**K**. They ripple, look ahead and prefix-combine like ordinary carries. The
difference is that the input bits themselves serve as the generate and
propagate terms, and only one H/K pair in every four bit positions has to be
looked ahead. Four generators are provided, all computing the same function:

| module         | scheme                                   | default width |
|----------------|------------------------------------------|---------------|
| `rcahk_ripple` | H/K ripple, one bit per step             | N = 12        |
| `rcahk_fast`   | H/K ripple, two bits per step ("RCAHK")  | N = 12        |
| `clahk`        | two-level carry look-ahead ("CLAHK")     | N = 68        |
| `ppahk`        | parallel prefix ("PPAHK")                | N = 18        |

Each generator takes an N-bit two's complement `x` and returns `s = 3x` as an
(N+2)-bit two's complement number. No sign extension is needed. Each is purely
combinational: no clock, no reset, no handshake. If a multiplier pipeline
needs registers, it adds them around the generator. `hk3x_top` instantiates
all four side by side, each with its own `x_*`/`s_*` ports. They are
alternatives, and a user would normally keep only one.

## The H and K signals

Let S = 3X, with bit i of the sum being `S_i = x_i ^ x_{i-1} ^ C_{i-1}`. Define,
for i = 1 .. N-1, starting from H_0 = x_0 and K_0 = 0:

```
i odd :  H_i = x_i & H_{i-1}     K_i = x_i | K_{i-1}
i even:  H_i = x_i | H_{i-1}     K_i = x_i & K_{i-1}
```

The two chains never interact. H carries the influence of x_0 up the word and
K that of x_1. One is always contained in the other: K_i implies H_i at even
positions, and H_i implies K_i at odd positions. That containment gives two
useful identities. The adder carry is `C_i = H_{i-1} & K_i` for odd i and
`H_i & K_{i-1}` for even i. The sum needs no carry at all:

```
S_i = x_i ^ ( H_{i-1} & ~K_{i-1})    i odd
S_i = x_i ^ (~H_{i-1} &  K_{i-1})    i even         (H_{-1} = K_{-1} = 0)
```

The top two result bits are `S_N = C_{N-1}`, the last carry, and
`S_{N+1} = x_{N-1}`.

## The ripple generators

`rcahk_ripple` is a direct transcription of the recurrences: two independent
N-gate chains and one XOR per sum bit.

`rcahk_fast` halves the chain length. A stage handles the bit pair (i, i+1),
with i even. It receives H_{i-1} and K_{i-1} and produces both sum bits:

```
S_i     = x_i     ^ (~H_{i-1} & K_{i-1})
S_{i+1} = x_{i+1} ^ (~x_i & H_{i-1} | x_i & ~K_{i-1})
```

It passes on the pair two positions up in one complex gate each:
`H_{i+1} = x_{i+1} & (x_i | H_{i-1})` (OR-AND) and
`K_{i+1} = x_{i+1} | (x_i & K_{i-1})` (AND-OR). N must be even.

## Looking ahead four bits at a time (`clahk`)

This is the part that differs most from an ordinary adder. Expanding the
recurrence over four bits gives a carry-like relation between H values four
positions apart. The same holds for K with AND and OR exchanged:

```
H_{4j+2} = gh_j | ph_j & H_{4j-2}          gh_j = x_{4j+2} | x_{4j+1} & x_{4j}
                                           ph_j = x_{4j+1} & x_{4j-1}
K_{4j+2} = gk_j & (pk_j | K_{4j-2})        gk_j = x_{4j+2} & (x_{4j+1} | x_{4j})
                                           pk_j = x_{4j+1} | x_{4j-1}
```

with H_2 = gh_0 and K_2 = gk_0. `hk_group_pg` forms these pairs, one per group
j = 0 .. N/4-1. Only N/4 positions need a look-ahead value, instead of N in a
conventional carry look-ahead adder, so the network is smaller and shallower.
Group 0 gets ph_0 = 0 and pk_0 = 1. Any span that includes group 0 then
evaluates directly to H or K, with no separate carry input.

The spans combine with two associative operators, defined in `hk3x_pkg`:

```
H:  (g, p) o (g', p') = (g | p g',       p & p')
K:  (g, p) . (g', p') = (g & (p | g'),   p | p')
```

A K span (G, P) applied to an incoming K gives `G & (P | K_in)`.

At the default N = 68 there are 17 groups (positions 2, 6, ..., 66). The
network has two levels of four-group units:

- **First level, `cla_h4` and `cla_k4`.** There are four blocks of each,
  covering groups 1-4, 5-8, 9-12 and 13-16. Block b receives the H (K) value
  below it. It outputs H (K) at its first three groups, plus the block's
  combined generate and propagate. The combined signals are inverted
  (`gh_n_o`, `ph_n_o`, `gk_n_o`, `pk_n_o`), because the second level is
  written on inverted inputs.
- **Second level, `cla_h_l2` and `cla_k_l2`.** These take the four inverted
  block pairs plus H_2 (K_2). They return H (K) at the top group of every
  block: positions 18, 34, 50 and 66. Those values are also the carry inputs
  of blocks 1-3. In inverted form, `~H_out = GHn & (PHn | ~H_in)` and
  `~K_out = GKn | PKn & ~K_in`.

Widths below 68 leave the top groups unused. They are padded with zero
generate/propagate, so the same structure serves N = 8, 16, 32 and 64. The
two-level structure holds 16 groups above group 0, which limits `clahk` to
even N from 4 to 70.

## Final addition (`hk_final_add`, `hk_add4`)

With H and K known at every position 4j+2, each four-bit slice of the sum is
local. `hk_add4` builds H_{4j+4} and K_{4j+4} itself, in one gate each, and
produces:

```
S_{b+1} = x_{b+1} ^ (H_b & ~K_b)                      b = 4j+2
S_{b+2} = x_{b+2} ^ (x_{b+1} & ~H_b | ~x_{b+1} & K_b)
S_{b+3}, S_{b+4}: the same two forms on H_{b+2}, K_{b+2}
```

`hk_final_add` adds three edge cases to the slices:

- The three low bits: `S_0 = x_0`, `S_1 = x_1 ^ x_0`,
  `S_2 = x_2 ^ (x_1 & ~x_0)`.
- The carry `S_N = H_{N-2} & x_{N-1} | K_{N-2}`.
- The sign `S_{N+1} = x_{N-1}`.

When N is a multiple of 4, H_{N-2} is a group value. When N = 4J+2 (for
example 18), it is the local pair of the top `hk_add4`. In that case the top
slice's surplus inputs are tied to zero and its surplus outputs are dropped.

## Parallel prefix (`ppahk`)

`ppahk` replaces the two-level look-ahead with two `hk_prefix_tree`s, one
using the H operator and one using K, over the same group pairs. It then
reuses `hk_final_add`. The trees are of the Kogge-Stone kind: ceil(log2 J)
levels, where level l combines each group with the group 2^l below it. At the
default N = 18 there are four groups and two levels.

## Timing and size

All generators are single-cycle combinational logic. For each scheme, these
are the depths of the H/K path (before the final XOR):

- `rcahk_ripple`: N-1 gates.
- `rcahk_fast`: N/2 complex gates.
- `clahk`: a fixed sequence of stages, independent of N up to 70: group
  pair, first-level block signals, second level, first-level outputs, final
  slice.
- `ppahk`: 1 + log2(N/4) operator levels.

The H and K networks are mirror images that run in parallel. Neither waits
for the other. After generic coarse synthesis the default instances come to
about 50 (`rcahk_ripple`), 70 (`rcahk_fast`), 640 (`clahk`, 68 bits) and 130
(`ppahk`, 18 bits) word-level cells. Real area and delay depend on the cell
library and the use of inverting gates.

## Where this RTL departs from the published design

- **Gate polarity.** The published circuits alternate inverting gates
  (OR-NAND, AND-NOR, complementary prefix nodes) to shorten the chains. The
  RTL states the Boolean functions, and synthesis chooses the gates.
  Inverted signals appear only at the `cla_*` interfaces, where the published
  equations use them. The prefix trees output H and K in true polarity, not
  inverted.
- **Second sum bit of a ripple stage.** The two-bit stage equation as
  published selects with x_{i-1}. The per-bit sum formula, and exhaustive
  simulation, require x_i, so x_i is used.
- **Prefix tree shape.** The published design says only "binary tree".
  Kogge-Stone was chosen.
- **Widths.** The look-ahead generator is published for 68 bits only; here it
  is parameterised by padding unused groups. Odd widths are accepted only by
  `rcahk_ripple`.
- **Not included.** The Booth-3 encoder and the multiplier that would consume
  3X are not included. Neither are the conventional ripple, look-ahead and
  Kogge-Stone adders that the H/K circuits were compared against.

## Files

- `rtl/hk3x_pkg.sv`: span type `hk_gp_t` and operators `hk_op_h`/`hk_op_k`.
- `rtl/rcahk_ripple.sv`, `rtl/rcahk_fast.sv`: ripple generators.
- `rtl/hk_group_pg.sv`: group generate/propagate pairs.
- `rtl/cla_h4.sv`, `rtl/cla_k4.sv`: first-level look-ahead units.
- `rtl/cla_h_l2.sv`, `rtl/cla_k_l2.sv`: second-level look-ahead units.
- `rtl/clahk.sv`: two-level look-ahead generator.
- `rtl/hk_prefix_tree.sv`, `rtl/ppahk.sv`: prefix tree and prefix generator.
- `rtl/hk_add4.sv`, `rtl/hk_final_add.sv`: final addition.
- `rtl/hk3x_top.sv`: the four generators side by side.
- `tb/hk3x_ref_pkg.sv`: the testbench reference. It computes 3X by integer
  arithmetic, gives the bit-serial H/K values and generates operands.
- `tb/tb_<module>.sv`: one self-checking testbench per module, plus
  `tb_table2_sizes.sv`.

## Verification

Every testbench compares against 3X computed by integer arithmetic on the
sign-extended operand, or against the bit-serial H/K values for internal
blocks. Each prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.
Coverage:

- **Exhaustive.** Widths up to 18 bits run over every operand. The
  look-ahead units and prefix operators run over every input combination.
- **Wider generators.** These get random operands plus operands built so that
  a carry started at x_0 or x_1 travels the whole word. Those are the longest
  H and K paths.
- **`tb_hk3x_top`.** Runs the top at its default widths. It counts, for each
  generator, negative operands, full-width H chains, full-width K chains, and
  results that use the two extra bits. It fails if any of these never occurs.
- **`tb_table2_sizes`.** Checks all four generators at 8, 16, 32 and 64 bits.

To run one testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/hk3x_pkg.sv tb/hk3x_ref_pkg.sv tb/tb_clahk.sv --top-module tb_clahk
./obj_dir/Vtb_clahk
```

Substitute any `tb/tb_*.sv`. Each run takes a few seconds at most.
