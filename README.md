# Modified-Ling parallel prefix adder (8, 16 and 32 bit)

A binary adder spends most of its logic and most of its delay on carries. A
parallel prefix adder computes all carries at once, using a tree of small
"prefix" cells. This design is a low-area version of such an adder. It uses
two ideas:

1. **Ling pseudo carries.** With bit generate `g_b = a_b & b_b` and inclusive
   propagate `p_b = a_b | b_b`, the real carry is `c_b = g_b | p_b & c_{b-1}`.
   Because `g_b` implies `p_b`, this equals `c_b = p_b & H_b`, where the
   *pseudo carry* `H_b = g_b | c_{b-1}` is simpler to build than `c_b`.
2. **Regrouping by parity.** Pair neighbouring bits:

        G*_b     = g_b | g_{b-1}          (intermediate generate)
        P*_{b-1} = p_{b-1} & p_{b-2}      (intermediate propagate)

   Then the pseudo carry becomes a prefix expression over columns of **one
   parity only**:

        H_b = (G*_b, P*_{b-1}) o (G*_{b-2}, P*_{b-3}) o ... o (G*_0 or G*_1, ...)

   Here `(g, p) o (g', p') = (g | p & g', p & p')` is the usual prefix
   operator. The even columns and the odd columns therefore form two
   independent prefix trees, each half as wide as the adder.

A classic Ling adder stops at `H_b`, so it needs a multiplexer in every sum bit.
This design converts `H_b` to the real carry inside the last cell of each
column. That cell is either a "hexagon" cell that combines and ANDs with `p_b`
at once, or a separate AND cell. The sum is then a plain `s_b = d_b ^ c_{b-1}`
with `d_b = a_b ^ b_b`. Columns whose propagate output is never used get a
generate-only ("grey") cell.

The adder is purely combinational: no clock, no registers, no carry input. It
has a carry output.

## Cells

| module            | drawn as        | function |
|-------------------|-----------------|----------|
| `ling_gpd_cell`   | white square    | `g = a&b`, `p = a\|b`, `d = a^b` |
| `ling_istar_cell` | black square    | `G*_b = g_b\|g_{b-1}`, `P*_{b-1} = p_{b-1}&p_{b-2}` |
| `ling_black_cell` | black circle    | `G = G_hi \| P_hi&G_lo`, `P = P_hi&P_lo` |
| `ling_grey_cell`  | grey circle     | `G = G_hi \| P_hi&G_lo` only |
| `ling_hex_cell`   | black hexagon   | `c_b = (G_hi \| P_hi&H_lo) & p_b`, where `H_lo` is a finished pseudo carry |
| `ling_and_cell`   | circle "A"      | `c_b = H_b & p_b` |
| `ling_sum_cell`   | circle "S"      | `s_b = d_b ^ c_{b-1}` |

Column 0 needs no intermediate cell: `G*_0 = g_0` and `P*_{-1} = 0`. Column 1
uses `p_{-1} = 0`, so `P*_0 = 0`. Pass-through buffers in the cell drawings
are plain wires here.

## How the two trees are laid out

Column `b` is element `e = b/2` of its parity tree. With `N = WIDTH/2`
elements, each tree is a Sklansky (divide-and-conquer) network of
`L = log2(N)` levels:

* On level `l`, an element whose bit `l-1` is set is combined with element
  `((e >> (l-1)) << (l-1)) - 1` of the same parity. That is the last element
  of the lower half of its `2^l` block. In column terms, the partner is
  `2*partner + (b % 2)`.
* Element `e` holds its complete pseudo carry after level `$clog2(e+1)`. The
  cell on that level "finishes" the column. Every other cell is a black cell.
* Columns 0 and 1 are finished right after the intermediate stage:
  `H_0 = g_0` and `H_1 = g_1 | g_0`.

For the 8-bit adder, this gives the following (level 1 is the first prefix row):

| column | level 1              | level 2                  | real carry |
|--------|----------------------|--------------------------|------------|
| 7      | black, with col 5    | hexagon, with `H_3`      | from hexagon |
| 6      | black, with col 4    | hexagon, with `H_2`      | from hexagon |
| 5      | –                    | hexagon, with `H_3`      | from hexagon |
| 4      | –                    | hexagon, with `H_2`      | from hexagon |
| 3      | black, with col 1 → `H_3` | –                   | AND |
| 2      | black, with col 0 → `H_2` | –                   | AND |
| 1, 0   | –                    | –                        | AND |

So, for example, `c_7 = (G*_7 | P*_6 G*_5 | P*_6 P*_4 H_3) & p_7`, and
`H_3 = G*_3 | P*_2 G*_1`.

### Which cell finishes a column

The published drawings finish columns in two ways. Both are built, and the
`STYLE` parameter (`ling_pkg::cellstyle_e`) selects one:

* `CELLSTYLE_FIG_8_16` (the default below 32 bits): a column ends in a
  hexagon unless a later level reuses its pseudo carry. Such reused columns are
  `e = 2^k - 1`, finished before the last level. Those columns get a full black
  cell followed by an AND cell. At 16 bits this puts hexagons at columns 4, 5
  and 8–15, and AND cells at columns 0–3, 6 and 7.
* `CELLSTYLE_FIG_32` (the default at 32 bits and above): hexagons only on
  the last level (columns 16–31 at 32 bits). Every earlier finishing cell is a
  grey cell followed by an AND cell (columns 2–15).

A hexagon and a grey cell plus an AND cell both cost three gates, so the two
styles differ only in where the final AND sits. They produce the same sum.

Cell counts per adder (black / grey / hexagon / AND): 8-bit 4/0/4/4, 16-bit
14/0/10/6, 32-bit 34/14/16/16. `tb_ling_cell_placement` checks these counts.

## Interfaces and timing

`ling_ppa #(WIDTH, STYLE)`:
`a`, `b` (`WIDTH` bits) in; `sum` (`WIDTH` bits) and `cout` (`c_{WIDTH-1}`)
out. `WIDTH` must be a power of two of at least 4, and its default is 32.
Elaboration stops with an error otherwise. `STYLE` defaults to
`default_style(WIDTH)`.

`ling_ppa_top` holds the three adders of the design side by side, with no
shared logic: `a8/b8/sum8/cout8`, `a16/b16/sum16/cout16` and
`a32/b32/sum32/cout32`.

All outputs are combinational. The logic depth is one pre-processing level, one
intermediate level, `log2(WIDTH/2)` prefix levels (the last of which includes
the AND with `p_b`), and one XOR.

## Where this RTL departs from or adds to the original design

* Port names, the top that groups the three widths, and the absence of carry
  in and registers are choices of this RTL. The original design has no carry
  input: its carry equations start at `c_0 = H_0 & p_0`.
* Its text writes the intermediate generate as `g_b + g_{b+1}`. The cell
  drawing and the worked equations use `g_b + g_{b-1}`, and that form is built.
* The 8- and 16-bit placements match their drawings cell for cell. The 32-bit
  drawing was read as grey cells at columns 2–3, 4–7 and 8–15 on the three
  circle rows, hexagons at 16–31 and AND cells at 0–15. That drawing is small,
  so the black-cell positions in its upper half were taken from the rule above,
  not counted one by one.
* The generalisation to any power-of-two width (e.g. 4 or 64 bits) follows the
  same rules. The original design mentions 64 bits only as a possible extension.
* The original reports 83, 202 and 467 gates for 8, 16 and 32 bits. Its counting
  rule is not known. Generic synthesis of this RTL gives 70, 166 and 382 two-input
  AND/OR/XOR gates, without buffers. Area, power and delay in silicon are not
  modelled.

## Verification

| testbench | what it checks |
|-----------|----------------|
| `tb_ling_*_cell` | every cell, exhaustively, against truth tables |
| `tb_ling_ppa` | widths 4, 8, 16, 32 and 64 in both styles, against `a + b`. 4 and 8 bits are checked exhaustively. Wider adders get carry chains of every length and 20 000 random pairs, half of them biased towards long propagate runs |
| `tb_ling_ppa_top` | the three adders at their default parameters: 30 000+ vectors. It also counts carry-outs, full-width carry chains and killed carries, and checks that every column's carry was seen as both 0 and 1 |
| `tb_ling_cell_placement` | the placement rules: cell counts per width, and that every partner is a lower column of the same parity |

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/ling_pkg.sv \
        tb/tb_ling_ppa_top.sv --top-module tb_ling_ppa_top
    ./obj_dir/Vtb_ling_ppa_top

Replace `tb_ling_ppa_top` with any other testbench name. `ling_pkg.sv` must be
read first. `tb_ling_ppa` also needs `tb/ling_ppa_checker.sv`, which `-y tb`
finds.

## Changing it

* Another width: instantiate `ling_ppa #(.WIDTH(64))`.
* Another tree inside each parity: change `has_node`, `partner` and
  `done_level` in `ling_pkg`. The generate loops in `ling_ppa` only follow those
  functions. `tb_ling_cell_placement` then needs new expected counts.
* Pipelining: the adder has no registers. Register `a`/`b` or `sum`/`cout`
  around it, or cut between the `g_lvl` levels.
