# Wallace tree multiplier with parallel prefix adders

A Wallace tree multiplier does not add partial products one row after another. It
compresses them in parallel, three rows into two, with rows of full adders that pass
no carry sideways. The rows drop from N to 2 in a number of stages that grows only
logarithmically with N. One fast carry-propagating adder then adds the last two rows,
and that final adder decides much of the multiplier's speed. Parallel prefix adders
are built for that job: they form every carry in about log2(n) cell delays.

This RTL contains four combinational arithmetic units, all in synthesizable
SystemVerilog:

| unit | module | what it is |
|---|---|---|
| multiplier | `wallace_mult` | unsigned 8 x 8 Wallace tree multiplier, 16-bit product, selectable final adder |
| carry look-ahead adder | `cla_adder16` | 16 bits: four 4-bit look-ahead blocks and a look-ahead carry unit |
| Kogge-Stone adder | `ksa_adder` | parallel prefix adder, 16 bits by default, 4 levels, 34 black + 15 gray cells |
| Brent-Kung adder | `bka_adder16` | parallel prefix adder, 16 bits, 6 levels, 12 black + 15 gray cells |

`wallace_ppa_top` places the four units side by side, each with its own ports. They
are four separately evaluated circuits, not one datapath. Inside the multiplier, one of
the adders (Kogge-Stone by default) performs the final addition.

Nothing in the design is clocked. No module has a clock, a reset or a register. Every
output follows its inputs after the propagation delay, so there is no latency in cycles
to speak of.

## Module hierarchy

```
wallace_ppa_top
├── wallace_mult  (N=8, FINAL_ADDER)
│   ├── wallace_pp_gen      partial products: N rows of AND gates
│   ├── wallace_reduce      N rows -> 2 rows: full_adder, half_adder
│   └── one final adder:    rca_adder | cla_adder16 | ksa_adder | bka_adder16
├── cla_adder16
│   ├── cla4 x4
│   └── cla_lcu16
├── ksa_adder  (WIDTH=16)
│   ├── ppa_pg_gen
│   ├── black_cell / gray_cell  (generated)
│   └── ppa_sum_gen
└── bka_adder16
    ├── ppa_pg_gen
    ├── black_cell x12, gray_cell x15
    └── ppa_sum_gen
```

`arith_pkg` holds `adder_kind_e`, the final-adder selector: `ADD_RIPPLE`, `ADD_CLA`,
`ADD_KSA` or `ADD_BKA`.

## The multiplier

### Partial products

`wallace_pp_gen` forms row i as `a AND b[i]`, placed at bits i+N-1..i of a 2N-bit
row. The shift is wiring only, and every bit outside that window is zero. For N = 8
this takes 64 AND gates and gives 8 rows.

### Reduction: the part worth reading closely

`wallace_reduce` uses the classic Wallace schedule. In each stage the rows are taken
in groups of three. Each group becomes a sum row and a carry row, with the carry row
shifted one column left. One or two rows left over pass on unchanged. The row count
therefore follows r -> 2*floor(r/3) + r mod 3:

| stage | rows in -> out | full adders | half adders |
|---|---|---|---|
| 1 | 8 -> 6 | 12 | 4 |
| 2 | 6 -> 4 | 13 | 3 |
| 3 | 4 -> 3 | 6 | 4 |
| 4 | 3 -> 2 | 7 | 4 |

Each stage is one full-adder delay deep.

The partial products form a parallelogram, not a full rectangle, so many column
positions of a group are known to be zero. The module tracks this at elaboration time.
A constant function, `calc_masks`, runs the schedule on bit masks that say which bits
of each row may be 1. It starts from the parallelogram shape and applies the
following rules:

- a column of a group with three bits that may be non-zero gets a `full_adder`;
- a column with two such bits gets a `half_adder`;
- a column with one such bit gets a wire;
- an empty column gets a constant 0.

The generate loops then place exactly those cells. The table above was counted this
way.

Two consequences matter if you reuse the module:

- The input bits outside the parallelogram are ignored. `wallace_reduce` is only
  correct for rows shaped like `wallace_pp_gen`'s output.
- The top column (weight 2^(2N-1)) forms only its sum bit, as an XOR. A carry out of
  it would have weight 2^(2N), and an unsigned N x N product always fits in 2N bits.

Any N >= 2 works. The testbench checks N = 4, 5, 8 and 16, which give different
stage schedules.

### Final addition

The two remaining rows go to a 2N-bit adder, chosen by `FINAL_ADDER`:

- `ADD_RIPPLE`: a chain of full adders.
- `ADD_CLA`: the carry look-ahead adder, 16 bits only.
- `ADD_KSA`: the Kogge-Stone adder, any width. This is the default.
- `ADD_BKA`: the Brent-Kung adder, 16 bits only.

The CLA and Brent-Kung adders exist only at 16 bits. Choosing either with N other than
8 stops elaboration with an error. The final adder's carry out is always 0 and is left
unconnected (`carry_unused`).

## The parallel prefix adders

Both prefix adders have three stages.

1. **`ppa_pg_gen`** forms the bit propagate `p = a ^ b` and generate `g = a & b`. It
   also folds the carry in into bit 0: `g[0] = a0 b0 | (a0 ^ b0) cin`. After that,
   the group generate G[i:0] computed by the tree is directly the carry out of bit i,
   carry in included. The tree needs no extra column and no extra cell for the
   carry in.
2. **The prefix tree** combines groups with two cells:
   - `black_cell`: `G[i:j] = G[i:k] | P[i:k] & G[k-1:j]` and `P[i:j] = P[i:k] & P[k-1:j]`.
   - `gray_cell`: the same, but without P. It is used where the result reaches bit 0,
     because the propagate of such a group is never needed again.
3. **`ppa_sum_gen`** computes `sum[i] = p[i] ^ c[i-1]` with `c[i] = G[i:0]`, and
   `sum[0] = p[0] ^ cin`. The carry out is `c[15]`.

### Kogge-Stone (`ksa_adder`)

The tree has log2(WIDTH) levels. At level l the distance is d = 2^(l-1):

- every column i >= d combines with column i - d;
- columns i < 2d reach bit 0 and use gray cells;
- columns i < d pass through.

At 16 bits this gives the following cells:

| level | black cells at columns | gray cells at columns |
|---|---|---|
| 1 | 15..2 | 1 |
| 2 | 15..4 | 3, 2 |
| 3 | 15..8 | 7..4 |
| 4 | none | 15..8 |

That is 34 black and 15 gray cells, n*log2(n) - n + 1 = 49 in all. The module is
parameterized, and any WIDTH >= 2 works, including widths that are not a power of
two. The testbench checks 8, 12, 16 and 32 bits.

### Brent-Kung (`bka_adder16`)

The cells are written out one by one for 16 bits. Levels 1-3 build groups upward, and
levels 4-6 hand the carries back to the columns in between:

| level | black cells (span) | gray cells (span) |
|---|---|---|
| 1 | 15:14 13:12 11:10 9:8 7:6 5:4 3:2 | 1:0 |
| 2 | 15:12 11:8 7:4 | 3:0 |
| 3 | 15:8 11:4 | 7:0 |
| 4 | none | 15:0 11:0 |
| 5 | none | 13:0 9:0 5:0 |
| 6 | none | 14:0 12:0 10:0 8:0 6:0 4:0 2:0 |

That is 12 black and 15 gray cells, with a depth of 2*log2(16) - 2 = 6 cells. The
black cell 11:4 at level 3 is what lets carry 11 be ready at level 4, together with
carry 15. A textbook Brent-Kung tree would form it later, from 11:8 and 7:0.

## The carry look-ahead adder

`cla4` computes each carry inside a 4-bit block in two logic levels from P, G and
the block's carry in. For example:

`C2 = G1 + P1 G0 + P1 P0 C0`

Each block outputs its sum bits and a group propagate `P3P2P1P0` and group generate
`G3 + P3G2 + P3P2G1 + P3P2P1G0`. It does not output a carry. `cla_lcu16` applies the
same equations one level up, to the four group pairs. It returns c4, c8 and c12 to
blocks 1-3 and forms C16, plus PG and GG for the whole word. `cla_adder16` brings PG
and GG out as `grp_p` and `grp_g`, so that a further look-ahead level could use them.

## Ports and parameters

| module | parameters (default) | ports |
|---|---|---|
| `wallace_mult` | `N` (8), `FINAL_ADDER` (`ADD_KSA`) | `a[N-1:0]`, `b[N-1:0]` -> `pr[2N-1:0]` |
| `cla_adder16` | none | `a[15:0]`, `b[15:0]`, `cin` -> `sum[15:0]`, `cout`, `grp_p`, `grp_g` |
| `ksa_adder` | `WIDTH` (16) | `a`, `b`, `cin` -> `sum`, `cout` |
| `bka_adder16` | none | `a[15:0]`, `b[15:0]`, `cin` -> `sum[15:0]`, `cout` |
| `rca_adder` | `WIDTH` (16) | `a`, `b`, `cin` -> `sum`, `cout` |
| `wallace_ppa_top` | `MUL_FINAL_ADDER` (`ADD_KSA`) | the ports above, prefixed `mul_`, `cla_`, `ksa_`, `bka_` (the CLA's group outputs are `cla_pg`, `cla_gg`) |

All operands are unsigned.

## Interpretations and departures

These points are choices where the source design is silent or unclear. Check them
before relying on the RTL:

- **Operand width.** The multiplier is called a "16-bit" multiplier, but its block
  symbol has 8-bit operands and a 16-bit product, and its pin count is 32. It is built
  as 8 x 8 -> 16.
- **Final adder.** The source does not say which adder its multiplier used for the
  final addition. Its results describe the multiplier as built from half and full
  adders, while the design's name puts parallel prefix adders in it. Here the
  reduction uses half and full adders, and the final adder is selectable. The
  Kogge-Stone adder is the default because it is the fastest of the three adders in
  the source's results.
- **Reduction schedule.** No drawing of the multiplier's tree was available. The
  classic Wallace grouping is used.
- **Carry in of the prefix adders.** The source's prefix trees have exactly the cell
  counts given above and no column for a carry in, yet its adders have one. The carry
  in is folded into g[0].
- **Brent-Kung wiring.** The cell positions and counts follow the source. The wires
  between cells were read as the ones that give each cell a valid group span.
- **Brent-Kung pins.** The source's Brent-Kung adder reports 49 pins. This one has both
  a carry in and a carry out (50 pins), like the other two adders.
- **CLA pins.** The CLA also brings out PG and GG.
- **Not reproduced.** The FPGA area and delay figures the source reports (LUTs, slices,
  pins, ns) depend on its tool and device. No timing or area target is encoded here.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares results with
integer arithmetic computed in the testbench, ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog. The testbenches cover the
following:

- **`tb_wallace_mult`** runs all 65536 operand pairs through each of the four
  final-adder variants. It also runs a 12 x 12 multiplier with random operands.
- **`tb_wallace_reduce`** checks N = 8 exhaustively, and N = 4, 5 and 16 with random
  operands.
- **The adder testbenches** run directed vectors first: every full-length carry chain,
  all-ones operands and alternating patterns. Then they run 200000 random vectors. The
  Kogge-Stone testbench also checks 8 bits exhaustively, and 12 and 32 bits with
  random operands.
- **The cell, `cla4` and `cla_lcu16` testbenches** are exhaustive.
- **`tb_wallace_ppa_top`** runs the top with its default parameters. It applies all
  65536 multiplier operand pairs while it drives the three adders with random and
  carry-chain vectors. It counts carry-in use, carry-out, 16-bit carry chains, CLA
  whole-word propagate and products that use bit 15. It fails if any of these never
  happened.

The sample values published for the reference design are checked by value:
`01101110 x 00000001 = 0000000001101110`, `01100100 x 01100100 = 0010011100010000`
and `0x001F + 0x000C = 0x002B`.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
  rtl/arith_pkg.sv tb/tb_wallace_ppa_top.sv --top-module tb_wallace_ppa_top
./obj_dir/Vtb_wallace_ppa_top
```

To lint one module, for example the top:

```
verilator --lint-only -Wall -y rtl +libext+.sv rtl/arith_pkg.sv rtl/wallace_ppa_top.sv \
  --top-module wallace_ppa_top
```

Each testbench finishes in well under a second.

## Changing the design

- **Another multiplier width.** Set `N` on `wallace_mult` and keep `FINAL_ADDER` at
  `ADD_KSA` or `ADD_RIPPLE`. The reduction schedule and cell placement follow N
  automatically.
- **Another final adder.** Set `FINAL_ADDER`, or `MUL_FINAL_ADDER` on the top.
- **Pipelining.** Nothing is registered. To pipeline the multiplier, place registers
  between `wallace_reduce`'s stages (the `g_stage[s].rout` rows) and before the final
  adder.
