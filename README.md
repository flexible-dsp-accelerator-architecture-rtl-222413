# Parallel prefix adder with gray-cell carry network

A binary adder that does not wait for carries to ripple. Every bit first
says whether it *generates* a carry (`a & b`) or *propagates* one (`a ^ b`);
a logarithmic tree of prefix cells then combines those signals so that the
carry into every bit position is known after `ceil(log2 WIDTH)` cell levels
(five for the default 32 bits), and each sum bit is one XOR away from its
carry. The design saves logic over a plain Kogge-Stone tree by using a
reduced *gray* cell, which forms only the group generate, wherever a group
already reaches bit 0 and its propagate will never be needed again. The
cells are built in inverting logic, alternating between active-high and
active-low signals from level to level.

The adder is purely combinational: no clock, no registers, no handshake.

## Three stages

```
 a, b (WIDTH)   cin
      |          |
 ppa_pre_processing      p = a ^ b, g = a & b, g[0] |= p[0] & cin
      | g, p
 ppa_carry_generation    Kogge-Stone prefix tree  -> c[WIDTH:1]
      | c, p
 ppa_post_processing     sum[i] = p[i] ^ c[i] (c[0] = cin), cout = c[WIDTH]
      |
 sum (WIDTH), cout
```

`ppa_adder` is the top level and only wires the three stages together.

**Carry-in.** The carry-in is merged into the generate of bit 0 in the first
stage: `g[0]` becomes the carry *out* of bit 0. From then on every prefix
group that reaches bit 0 has a generate that is a finished carry, which is
what makes the gray cells possible. The carry-in is also taken straight to
the post-processing stage for `sum[0]`.

## The carry network

Level `k` (k = 0 … LEVELS-1) has distance `d = 2^k`. Node `i` at that level
merges its own group with the group of node `i-d`, so after level `k` node
`i` covers bits `max(0, i-2d+1) … i`. What node `i` needs depends on where
its groups lie:

| node position     | cell        | why                                                        |
|-------------------|-------------|------------------------------------------------------------|
| `i < d`           | inverter    | its group already reaches bit 0; carry is final            |
| `d <= i < 2d`     | gray cell   | the lower group reaches bit 0: only `G = Gh | Ph&Gl` needed |
| `i >= 2d`         | black cell  | more merging follows: `G = Gh | Ph&Gl` and `P = Ph&Pl`     |

For `WIDTH = 32` that is 98 black and 31 gray cells in 5 levels; the whole
last level is gray. Non-power-of-two widths work (the tree simply has no
nodes above `WIDTH-1`), as does `WIDTH = 1` (no levels at all).

**Alternating polarity.** A non-inverting AND-OR costs an extra inverter
in CMOS, so each cell is a single inverting gate:

| `ACTIVE_LOW_IN` | inputs       | generate | propagate | output       |
|-----------------|--------------|----------|-----------|--------------|
| 0               | true         | AOI21    | NAND2     | complemented |
| 1               | complemented | OAI21    | NOR2      | true         |

Level 0 receives true signals from the pre-processing stage, so even levels
use `ACTIVE_LOW_IN = 0` cells and odd levels `ACTIVE_LOW_IN = 1` cells.
Nodes that need no cell at a level go through an inverter to stay in step.
If the number of levels is odd (as for 32 bits) the final carries come out
complemented and are inverted once at the output of `ppa_carry_generation`,
so its `c` port is always active high. In RTL these polarities are visible
only as written structure; a synthesis tool is free to remap the gates.

The propagate of a node whose group reaches bit 0 is never read again; it
is tied to "does not propagate" in that level's polarity and disappears in
synthesis.

## Files

| file                              | contents                                                |
|-----------------------------------|---------------------------------------------------------|
| `rtl/ppa_pkg.sv`                  | `gp_t`, the packed (generate, propagate) pair            |
| `rtl/ppa_black_cell.sv`           | full prefix cell, parameter `ACTIVE_LOW_IN`              |
| `rtl/ppa_gray_cell.sv`            | generate-only prefix cell, parameter `ACTIVE_LOW_IN`     |
| `rtl/ppa_pre_processing.sv`       | propagate/generate, carry-in folding                     |
| `rtl/ppa_carry_generation.sv`     | the prefix tree                                          |
| `rtl/ppa_post_processing.sv`      | sum XORs and carry out                                   |
| `rtl/ppa_adder.sv`                | top level                                                |
| `tb/tb_*.sv`                      | one self-checking testbench per module, plus `tb_ppa_adder_widths` |

Top-level interface (`ppa_adder`, parameter `WIDTH`, default 32):

| port   | dir | width   | meaning                          |
|--------|-----|---------|----------------------------------|
| `a`    | in  | WIDTH   | first operand                    |
| `b`    | in  | WIDTH   | second operand                   |
| `cin`  | in  | 1       | carry in (often called c0)       |
| `sum`  | out | WIDTH   | low WIDTH bits of `a + b + cin`  |
| `cout` | out | 1       | carry out (c32 for 32 bits)      |

## Where this design makes its own choices

The three-stage split, the XOR/AND pre-processing, the black and gray cell
equations, the replacement of black cells by gray cells, the two dot-cell
kinds of opposite polarity, the Kogge-Stone family and the 32-bit width are
taken from the description this adder is based on. The following are not
fixed there and were chosen here:

- **Exact tree wiring.** The standard Kogge-Stone wiring (distance `2^k` at
  level `k`) is used. The original implementation has internal buses that
  are narrower than the word (26 bits for two of them), which suggests a
  somewhat different cell arrangement; it is not reproduced.
- **Where the gray cells sit.** At every node whose lower group reaches bit
  0 — the usual placement.
- **Gate forms of the two polarities** (AOI/OAI, NAND/NOR), and the single
  output inversion after an odd number of levels.
- **Carry-in handling.** Folded into bit 0 in the first stage and also
  wired to the last stage.
- **Width.** 32 bits by default. The block diagram of the original uses
  16-bit buses; `WIDTH = 16` builds that adder, and it is tested.
- **Carry out** is a port; the block diagram shows only the sum.

The original reports no timing, area or power numbers for its adder, so
none are claimed or checked here.

## Verification

Every module has a self-checking testbench that compares against values
worked out independently (integer addition, or a bit-serial carry recursion)
and prints `TB_RESULT checks=N failures=M`:

- `tb_ppa_black_cell`, `tb_ppa_gray_cell`: all input combinations, both
  polarities.
- `tb_ppa_pre_processing`, `tb_ppa_post_processing`: directed and random
  vectors at 32 bits.
- `tb_ppa_carry_generation`: random and long-propagate vectors at 32, 16 and
  5 bits against `c[i+1] = g[i] | p[i] & c[i]`.
- `tb_ppa_adder`: the top at its default 32 bits with no parameter override —
  the example `3 + 2 = 5`, corner cases, 200 all-propagate words with the
  carry entering at bit 0, and 5000 random additions. It counts how often
  the carry-in decided the result, a carry out occurred and a carry crossed
  the whole word, and fails if any of these never happened.
- `tb_ppa_adder_widths`: exhaustive at 8, 5 and 1 bits, random at 16 bits.

To run one with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/ppa_pkg.sv tb/tb_ppa_adder.sv --top-module tb_ppa_adder
./obj_dir/Vtb_ppa_adder
```

Each takes well under a second. The package file must be listed first; the
other modules are found through `-y`.

## Changing it

- `WIDTH` on `ppa_adder` sets the word length; any value from 1 up works.
- To pipeline the adder, registers can be placed between levels inside
  `ppa_carry_generation`'s `g_level` loop; keep in mind the polarity of the
  level at which you cut.
- To try a different prefix tree (Brent-Kung, Sklansky, Han-Carlson), only
  `ppa_carry_generation` changes; its port contract is "carry into bit i,
  active high, given `g[0]` already includes the carry-in".
