# Three-operand binary adder with a Kogge-Stone carry tree

This is a combinational adder that computes `s = a + b + c + cin` for three
N-bit operands (N = 16 by default, giving an 18-bit result). Adders like this
one sit in modular-arithmetic datapaths, such as Montgomery multipliers,
elliptic-curve point arithmetic and linear-congruential pseudo-random bit
generators, where three-operand addition is on the critical path.

The common way to add three numbers is a carry-save adder: a row of full
adders reduces three words to two, and a ripple-carry adder adds those two.
The second stage's carry has to pass through all N positions, so the delay
grows linearly with N. Using two prefix adders in a row fixes the delay but
costs a lot of area. This design keeps the cheap carry-save row and replaces
the ripple adder with **one** parallel-prefix (Kogge-Stone) carry tree. The
carry path therefore grows as log2(N) instead of N.

## The four stages

```
 a,b,c (N)          S,cy (N each)         G,P (N+1 each)     G[i:0] (N+1)       s (N+2)
 ───────► bit-addition ─────► base logic ─────► PG logic ─────► sum logic ─────►
          (N full adders)     (N+1 saltire      (Kogge-Stone,
                               cells) ◄── cin    black/grey cells)
```

1. **Bit-addition logic** (`bit_addition_logic`, `full_adder`). Each bit
   position has its own full adder: `S_i = a_i ^ b_i ^ c_i` and
   `cy_i = maj(a_i, b_i, c_i)`. No signal passes between positions. After this
   stage `a + b + c = S + 2*cy`.

2. **Base logic** (`base_logic`, `saltire_cell`). This stage turns S and
   `2*cy + cin` into the per-bit generate and propagate signals of an ordinary
   two-operand addition. Each of the N+1 saltire cells pairs the sum bit of
   its own position with the carry of the position to its right:
   `G_i = S_i & cy_{i-1}` and `P_i = S_i ^ cy_{i-1}`. There are two special
   cases:
   - At position 0 the external carry input takes the place of `cy_{-1}`, so
     `G_0 = S_0 & cin`. Because cin enters here, it needs no extra adder.
   - Position N exists only because `cy_{N-1}` has weight 2^N. No sum bit
     reaches it, so its S input is 0. This gives `G_N = 0` and
     `P_N = cy_{N-1}`.

3. **PG logic** (`pg_logic`, `black_cell`, `grey_cell`). This is a
   Kogge-Stone prefix tree over the W = N+1 positions. It produces every group
   generate `G_{i:0}`, which is the carry out of position i. The prefix
   operator is `G_{i:j} = G_{i:k} | P_{i:k} & G_{k-1:j}` and
   `P_{i:j} = P_{i:k} & P_{k-1:j}`. At level l the span is d = 2^l:
   - Positions below d pass through unchanged (buffers, which are wires here).
   - Positions from d to 2d-1 use a **grey cell**. The lower group already
     reaches bit 0, so only the generate is needed: one AND and one OR.
   - Positions from 2d up use a **black cell**, which computes both generate
     and propagate: two ANDs and one OR.

   The tree has ceil(log2 W) levels. At N = 16 that is 5 levels, because the
   extra position N makes W = 17 and so needs one level more than a 16-bit
   tree. The tree uses 38 black cells, 16 grey cells and 31 buffers. The
   four-level 16-bit tree has the same placement and is tested on its own
   (`pg_logic #(.W(16))`).

4. **Sum logic** (`sum_logic`). The final bits are `s_0 = P_0`,
   `s_i = P_i ^ G_{i-1:0}` for 1 ≤ i ≤ N, and `s_{N+1} = G_{N:0}`. The
   largest possible result, 3·(2^N−1)+1, fits in N+2 bits.

The longest path is one full adder (XOR3), then one XOR in the saltire cell,
then ceil(log2(N+1)) AND-OR levels, then one XOR. At N = 16 that makes 5
prefix levels. After coarse synthesis the whole adder has 290 gate-level
cells and no flip-flops.

## Interface and timing

`three_operand_adder #(parameter int unsigned N = 16)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b`, `c` | in | N | operands, unsigned |
| `cin` | in | 1 | carry input, added at weight 1 |
| `s` | out | N+2 | `a + b + c + cin`; `s[N+1]` is the tree's carry-out |

The adder has no clock, reset or handshake. `s` is valid one combinational
delay after the inputs change. To pipeline it, register the inputs and
outputs outside the module. If you want the three-input adder without a
carry input, tie `cin` to 0.

`N` may be any value of 1 or more. The tree depth follows from
`$clog2(N+1)`. The shared default width and the `pg_t` generate/propagate
struct are in `toa_pkg`.

## Files

| file | contents |
|------|----------|
| `rtl/toa_pkg.sv` | default width `TOA_N = 16`, the `pg_t` struct |
| `rtl/full_adder.sv`, `rtl/bit_addition_logic.sv` | stage 1 |
| `rtl/saltire_cell.sv`, `rtl/base_logic.sv` | stage 2 |
| `rtl/black_cell.sv`, `rtl/grey_cell.sv`, `rtl/pg_logic.sv` | stage 3 |
| `rtl/sum_logic.sv` | stage 4 |
| `rtl/three_operand_adder.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_three_operand_adder_small.sv` | top level at N = 1 and N = 4 (exhaustive) and at N = 32 (random) |

## What is specified and what was chosen here

These parts follow the published architecture: the four stages; the
equations of the saltire, black and grey cells; the N+1 saltire cells; cin
entering the first saltire cell; the Kogge-Stone placement of black cells,
grey cells and buffers; the 16-bit operands with an 18-bit result; and the
cell port names (`gk`, `pk`, `gj`, `pj`, `g`, `p`).

These are choices made for this RTL:
- **Full-adder equations.** The cell is named but its gates are not given.
  It uses the standard XOR3 and majority functions.
- **The sum stage.** Only its name is given. It uses the usual prefix-adder
  post-processing shown above.
- **The top saltire cell.** Its S input is tied to 0.
- **cin as a port.** The published block symbol shows only `a`, `b` and `c`,
  but the carry input is described as part of the adder, so it is a port
  here.
- **The module name.** The top is called `three_operand_adder`.
- **The tree depth.** The level count is computed from the width, which gives
  5 levels at N = 16. It is not fixed at the 4 levels of the 16-bit tree
  drawing.
- **Buffers.** The tree's buffers are plain wires.

## Verification

Every module has a self-checking testbench that compares its outputs with
values computed independently in integer arithmetic. The cells are tested
exhaustively. The stages are tested with corner cases and random vectors.
`pg_logic` is compared against a ripple-carry model at W = 17, W = 16 and
W = 5 (the W = 5 case is exhaustive).

`tb_three_operand_adder` runs the top level at its default N = 16 with
directed corner cases and 100,000 random vectors. The random operands are
biased so that long carry chains are common. The testbench counts how often
four behaviours happen and fails if any of them never does:
- cin = 1
- a carry-out in `s[17]`
- a carry travelling across at least N positions
- the all-ones maximum

`tb_three_operand_adder_small` covers all 8,192 input combinations at N = 4.
Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
cycle-count watchdog.

Each testbench was also run against a deliberately broken copy of its
module, and every one of them reported failures.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl -Itb rtl/toa_pkg.sv tb/tb_three_operand_adder.sv \
          --top-module tb_three_operand_adder -Mdir obj && obj/Vtb_three_operand_adder
```

Testbenches for the other modules are built the same way; change the file
and top-module names.

## Lint notes

- Some output bits are plain wires or constants, by construction:
  - `base_logic`: `g[N]` is 0, and `p[N]` is `cy[N-1]`.
  - `pg_logic`: `g_out[0]` is `g_in[0]`.
  - `sum_logic`: `s[0]` is `p[0]`, and `s[N+1]` is `g_grp[N]`.
- `pg_logic` never reads `p_in[0]`, because position 0 is buffered at every
  level.
- Verilator notes that `TOA_N` goes unused in the single-bit cells, which
  import nothing from the package.
