# Sparse radix-4 Ling adder, 64 bits

A 64-bit two-operand adder built for the critical path of an integer
execution unit. Three ideas together make it fast:

1. **Ling's carries.** The carry tree does not propagate the ordinary carry
   but Ling's pseudo carry `H`, which drops one transmit term from every
   carry equation. The first-level prefix nodes get simpler and faster.
2. **A radix-4 prefix tree.** Each prefix node merges four groups at once, so
   64 bits need only three levels (spans of 4, 16 and 64 bits) instead of six
   with radix-2 nodes. With the final multiplexer that makes four gate stages
   on the critical path.
3. **A sparse tree (sparseness 2).** The tree computes a carry only at every
   second bit. Each carry then drives two sum multiplexers. The bit in between
   gets its carry folded into a precomputed sum, worked out off the critical
   path while the tree evaluates.

The design this RTL follows was a domino-logic circuit sized for minimum delay
under an energy budget (about 6.8 FO4 inverter delays in a 0.13 µm, 1.2 V
process). The RTL captures its logic: the equations, the tree topology and
the precompute/select split. Circuit style and transistor sizing are outside
what RTL can express.

## Ling's pseudo carry

Per bit, with operands `a` and `b`:

    g(i) = a(i) & b(i)        generate
    t(i) = a(i) | b(i)        transmit
    d(i) = a(i) ^ b(i)        half sum

The ordinary carry out of bit `i` follows the recurrence
`G(i) = g(i) | t(i) & G(i-1)`. Ling's pseudo carry is defined by

    H(i) = g(i) | t(i-1) & H(i-1)          and then   G(i) = t(i) & H(i)

so `H(i)` is "the carry out of bit i, before ANDing in t(i)". Because `g(i)`
implies `t(i)`, the top transmit can be dropped from every term. This is what
makes the first tree level cheaper. For example, a two-bit group is just
`g(i) | g(i-1)` where the ordinary form needs `g(i) | t(i) & g(i-1)`.

The tree works on groups. A group spanning bits `i` down to `k` has

    H(i:k) = pseudo carry of the group, assuming nothing comes in from below
    I(i:k) = t(i-1) & t(i-2) & ... & t(k-1)      (the group's Ling transmit)

A single bit `i` is the group `{H = g(i), I = t(i-1)}`, with the transmit
shifted down by one bit. Bit 0 gets `I = 0` because the adder has no carry
input. Groups merge with the usual associative prefix operator. The radix-4
node (`ling_node4`) computes

    H = H3 | I3&H2 | I3&I2&H1 | I3&I2&I1&H0
    I = I3 & I2 & I1 & I0

where group 3 is the most significant. `ling_pkg::ling_grp_t` is this
`{h, i}` pair. `LING_GRP_EMPTY = {h:0, i:1}` is the neutral group, used
wherever a node would reach below bit 0.

## The sparse radix-4 tree

`ling_sparse_tree` is a radix-4 Kogge-Stone tree with every other column
removed. Column `k` sits at bit `p = 2k+1`:

| level | node inputs (at column bit p)            | span    |
|-------|------------------------------------------|---------|
| 1     | single bits p, p-1, p-2, p-3             | 4 bits  |
| 2     | level-1 groups at p, p-4, p-8, p-12      | 16 bits |
| 3     | level-2 groups at p, p-16, p-32, p-48    | 64 bits |

Every level-2 and level-3 input lies at an odd bit, so the removed columns
are never needed: the sparse tree is just the full tree's odd columns. The
tree outputs the 32 pseudo carries `H1, H3, ..., H63`. These are the carries
*into* the even bit positions 2, 4, ..., 64. They can be called "odd carries"
(numbered by the bit producing them) or "even-order carries" (numbered by
the bit receiving them); both name the same 32 signals. The tree has 3 × 32 = 96
radix-4 nodes, against 192 for the full radix-4 tree.

The `SPARSENESS` parameter also accepts 1 (the full radix-4 Kogge-Stone tree)
and 4 (a carry every fourth bit). These were the comparison points for the
default of 2, and they are tested too.

## Sum precompute and sum select

Bit `i` is steered by the nearest computed carry below it, at bit
`j = 2*floor(i/2) - 1`. With `G` the ordinary group generate and `T` the AND
of the transmits, the carry into bit `i` is

    c(i) = G(i-1 : j+1) | T(i-1 : j) & H(j)

`ling_sum_precompute` therefore forms two candidate sums, for `H(j) = 0` and
for `H(j) = 1`:

| bit `i` | `j`   | `S0(i)`                  | `S1(i)`                                                  |
|---------|-------|--------------------------|----------------------------------------------------------|
| even    | `i-1` | `a(i)^b(i)`              | `a(i)^b(i)^(a(i-1) \| b(i-1))`                           |
| odd     | `i-2` | `a(i)^b(i)^a(i-1)b(i-1)` | `a(i)^b(i)^[a(i-1)b(i-1) \| t(i-1)t(i-2)]`               |

The module computes the general form above, so it also covers sparseness 1
and 4. Bits 0 and 1 have no computed carry below them, so their sums are
final at this stage (`S0 = S1`).

`ling_sum_select` is one 2:1 multiplexer per bit: `sum(i) = H(j) ? S1(i) :
S0(i)`. Each carry drives `SPARSENESS` multiplexers. The carry out is
`cout = t(63) & H(63)`.

Only the tree and the final multiplexer sit on the critical path. The
precompute logic runs in parallel with the tree.

## Top level: `ling_adder64`

```
a, b ──► ling_pg ──g,t──► ling_sparse_tree ──H1..H63──► ling_sum_select ──► [reg] ──► sum, cout
                 └─g,t,d─► ling_sum_precompute ──S0,S1──┘
```

| port        | dir | width | meaning                                     |
|-------------|-----|-------|---------------------------------------------|
| `clk`       | in  | 1     | rising edge captures the result             |
| `rst_n`     | in  | 1     | asynchronous, active low; clears the outputs|
| `in_valid`  | in  | 1     | `a`, `b` carry an operand pair              |
| `a`, `b`    | in  | 64    | operands                                    |
| `out_valid` | out | 1     | `sum`, `cout` were loaded at the last edge  |
| `sum`       | out | 64    | `a + b` modulo 2^64                         |
| `cout`      | out | 1     | carry out of bit 63                         |

Timing: operands applied with `in_valid` before a rising edge appear on
`sum`/`cout` with `out_valid` right after that edge. The latency is one cycle
and one addition is accepted per cycle. When `in_valid` is low the result
register holds its value. In the domino circuit the sum-select gate takes the
hard clock edge. Here the select is combinational and the register after it
stands for that edge. Two concurrent assertions in the top state the
interface rules (valid follows `in_valid` one cycle later; no `in_valid`
means the result holds).

Parameters (in `ling_pkg` and on every module): `WIDTH` = 64, `SPARSENESS` = 2.
The tree derives its depth from `WIDTH` as ceil(log4 WIDTH).

## Files

| file                          | contents                                            |
|-------------------------------|-----------------------------------------------------|
| `rtl/ling_pkg.sv`             | constants, `ling_grp_t`, helper functions           |
| `rtl/ling_pg.sv`              | generate / transmit / half sum                      |
| `rtl/ling_node4.sv`           | radix-4 Ling prefix node                            |
| `rtl/ling_sparse_tree.sv`     | sparse radix-4 carry tree                           |
| `rtl/ling_sum_precompute.sv`  | candidate sums S0, S1                               |
| `rtl/ling_sum_select.sv`      | sum multiplexers and carry out                      |
| `rtl/ling_adder64.sv`         | top: the four stages plus the result register       |
| `tb/tb_<module>.sv`           | one self-checking testbench per module              |

## Where this RTL departs from, or fills in, the original design

- **Tree wiring.** The original is given as block diagrams plus the
  statements "radix 4", "sparseness 2" and "4 domino stages". The
  Kogge-Stone-with-odd-columns wiring above is the reading that matches all
  three. It is not a copy of a published gate-level netlist.
- **No carry input and an added carry out.** The equations start at bit 0
  with no incoming carry, so the adder has none. The carry out is an addition.
- **Clocking.** The register, the valid flags and the reset are choices made
  here. The original is a single-phase domino stage with no stated interface
  protocol.
- **Not represented:** domino circuit style, footless gates, keepers, gate
  sizes, and the delay/energy figures. These depend on the process and on
  transistor sizing.

## Verification

Every testbench checks its module against an independent reference and
prints `TB_RESULT checks=N failures=M`:

- `tb_ling_pg`: the bit signals against a one-bit addition truth table.
- `tb_ling_node4`: all 256 input combinations, against a group-by-group
  merge.
- `tb_ling_sparse_tree`: the trees with sparseness 2 (64 bits and 16 bits),
  1 and 4. Each `H` is compared with a bit-serial recurrence, and `t & H`
  with the carry bit of the integer sum.
- `tb_ling_sum_precompute`: `S0`/`S1` against slice additions with a carry
  input of 0 and of `t(j)`, for sparseness 1, 2 and 4.
- `tb_ling_sum_select`: the multiplexer steering, with every carry toggled
  alone.
- `tb_ling_adder64`: the whole adder at its default parameters. It runs about
  3000 cycles of directed worst-case carry chains and random operands,
  including long transmit runs, with `in_valid` toggling. It checks
  `{cout, sum}` against a 65-bit integer sum and checks the one-cycle latency
  and the hold behaviour. It also counts how often the S1 sums are selected,
  how often a carry crosses the 64-bit-span third level, how often the adder
  overflows and how often it holds; a count of zero is a failure.

To simulate with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/ling_pkg.sv tb/tb_ling_adder64.sv --top-module tb_ling_adder64
./obj_dir/Vtb_ling_adder64
```

Replace `tb_ling_adder64` with any other testbench name to run that one.
Lint with `verilator --lint-only -Wall -y rtl rtl/ling_pkg.sv
rtl/ling_adder64.sv`. The only remaining warning is that bits 0 and 1 of
`s1` go unused in the sum select, because those bits have no carry to select
on.
