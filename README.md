# Pyramidal adder and Braun multiplier from XNOR/multiplexer cells

Two combinational 16-bit arithmetic units built from one-bit cells in which the
usual XOR/AND/OR gates are replaced by an XNOR followed by 2:1 multiplexers:

- a **pyramidal adder**, a two-operand adder made *only* of half adders, laid
  out as a triangle of 136 cells;
- a **Braun array multiplier**, the classic 16 x 16 unsigned carry-save array
  of 240 adder cells.

The aim of the cells is fewer gates and a shorter path per cell. A multiplexer
only selects one of its inputs, so a sum or carry passes one XNOR and at most
one multiplexer per cell. Both units are parameterised by `WIDTH` (default 16).
Neither has a clock or a reset.

## The cells

| Cell | Module | Function | Construction |
|---|---|---|---|
| half adder ("2.1 block") | `modified_half_adder` | `sum = a^b`, `carry = a&b` | `eq = a XNOR b`; `sum = ~eq`; `carry = eq ? a : 0` |
| full adder ("2.2 block") | `modified_full_adder` | `sum = a^b^cin`, `cout = maj(a,b,cin)` | `eq = a XNOR b`; `sum = eq ? cin : ~cin`; `cout = eq ? a : cin` |

The full-adder trick: when `a == b` the two agree and decide the carry (`a`),
and the sum is just `cin`; when they differ, the carry out equals `cin` and the
sum is its inverse. The half adder is the same cell with `cin = 0`.

The XNOR-plus-multiplexer idea is the source design's. The exact gate netlists
above are this implementation's own. The source also mentions a cell variant
that passes its outputs inverted, and an inverting stage for the output bus. Neither is built: both
cells here produce true-polarity outputs.

## The pyramidal adder (`pyramidal_adder`)

This is the least familiar part of the design. It is an adder with no full
adders at all.

```
 column:      15        ...        2          1         0
 cells:       16                   3          2         1
            HA(a15,b15)         HA(a2,b2)  HA(a1,b1)  HA(a0,b0) -> S0
            HA(.., c)           HA(.., c)  HA(.., c)      |
            ...                 HA(.., c)      |          carry
            (16 cells)             |          S1
               |                   S2
              S15       16 carries --OR--> CY
```

Column *i* is a vertical chain of *i*+1 half adders. The top cell adds `a[i]`
and `b[i]`. Each cell below it adds the running sum to one of the *i* carries
that column *i*-1 produced. The last running sum is `S[i]`. Each of the *i*+1
cells emits a carry, and all of them go to column *i*+1. That column
therefore needs one more cell, which gives the triangle: WIDTH(WIDTH+1)/2 =
136 cells and WIDTH(WIDTH-1)/2 = 120 carries between columns.

**Why half adders are enough.** In a two-operand addition, the total carry
into any column is 0 or 1. So column *i* sees at most `a[i] + b[i] + 1 = 3`.
The chain of half adders in that column splits this value into one sum bit
and a set of carries, of which **at most one is 1**. This is also why the 16
carries leaving column 15 can be merged into `CY` with a plain OR.

**Timing.** Every path steps either down a column or diagonally into the
next cell row of the next column, so no path crosses more than about WIDTH
cells. That is the same order as a ripple-carry
adder, but each cell is a half adder rather than a full adder.

Ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]` in; `sum[WIDTH:0] = {CY, S}` out.

Choices made here that the source leaves open:

- Carry *k* of column *i*-1 feeds cell *k*+1 of column *i*. Any order gives
  the same result.
- The carry-out merge is an OR. The source joins the top carries into one
  element before `CY` but does not name its gate type.

## The Braun multiplier (`braun_multiplier`)

The partial products `pp(i,j) = a[i] & b[j]`, of weight *i*+*j*, come from
WIDTH² AND gates. They are reduced by a carry-save array of WIDTH-1 rows of
WIDTH-1 cells. Cell *i* of row *j* has weight *i*+*j*:

- **row 1**: half adders on `pp(i+1,0)` and `pp(i,1)`;
- **rows 2 .. WIDTH-1**: full adders on three inputs, all of weight *i*+*j*:
  - the sum of cell *i*+1 in the row above (for the leftmost cell,
    `pp(WIDTH-1, j-1)`);
  - `pp(i,j)`;
  - the carry of cell *i* in the row above.
- The rightmost sum of row *j* is product bit *j*. Bit 0 is `pp(0,0)`.
- **final row**: WIDTH-1 cells, a half adder and then full adders in a ripple
  chain. It adds the last row's sums and carries to give bits WIDTH .. 2·WIDTH-2.
  Its final carry is the top product bit.

At 16 bits this is 240 cells: 15 + 14·15 + 15. It has 239 internal carries
and 210 internal sums. Written out by column, the product bits are XORs of
the products and carries of that column. For example,
`S2 = (a2&b0) ^ (a1&b1) ^ c0 ^ (a0&b2)`, where `c0` is the carry of the bit-1
cell. The critical path runs down the array and along the ripple row, about
2·WIDTH cells.

Ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]` in; `sum[2*WIDTH-1:0] = a*b` out.
Operands are unsigned. `WIDTH` must be at least 2.

The multiplier uses the modified half and full adders in its array and
ripple row. It does *not* use the pyramidal adder as its final adder. The
cell counts above (exactly one adder per internal carry) leave no room for
one.

## Top level (`low_power_arith_top`)

The two units stand side by side with separate ports:

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `add_a`, `add_b` | in | WIDTH | adder operands |
| `add_sum` | out | WIDTH+1 | `{CY, S} = add_a + add_b` |
| `mul_a`, `mul_b` | in | WIDTH | multiplier operands |
| `mul_sum` | out | 2·WIDTH | `mul_a * mul_b` |

All outputs are combinational functions of the inputs. There is no latency
in cycles.

## How far it can be trusted

- All files pass Verilator lint (`-Wall`) with no warnings. They also
  elaborate in Yosys with the slang front end. Synthesis of the top gives
  1383 word-level cells and no flip-flops.
- Each module has a self-checking testbench. Each testbench compares results
  with `+` or `*` computed in the testbench.
  - The cells are checked exhaustively.
  - The adder and the multiplier are each checked at 16 bits with corner
    cases and 20,000 random pairs.
  - Both are also checked exhaustively at 4 bits.
- Each testbench was run against a copy of its module with one deliberate
  bug, and it caught the bug.
- The top-level testbench (`tb_low_power_arith_top`) drives both units at
  their default 16 bits. It also confirms that these events occurred:
  - an adder carry-out;
  - a carry rippling from bit 0 through every column;
  - a product with its top bit set;
  - a zero product.
- Not reproduced: the gate counts reported for this style of design, which
  are 120 gates for a conventional 4 x 4 Braun multiplier against 76 with the
  pyramidal adder. Those figures depend on cell netlists that are not
  published. Delay and power are not modelled either.

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and finishes. For
example, the full top-level test:

```
verilator --binary --timing -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
    --top-module tb_low_power_arith_top tb/tb_low_power_arith_top.sv
./obj_dir/Vtb_low_power_arith_top
```

Replace the top module with `tb_pyramidal_adder`, `tb_braun_multiplier`,
`tb_modified_half_adder` or `tb_modified_full_adder` to run a single unit.
To try another size, override `WIDTH` on `pyramidal_adder`,
`braun_multiplier` or `low_power_arith_top`. The testbenches use a local
`W` for their operand width.
