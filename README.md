# Low-power Kogge-Stone adder with adaptive power gating

A Kogge-Stone adder is the fastest of the classic parallel-prefix adders. It
resolves every carry in log2(N) levels, but it pays for that with many prefix
cells and long wires. In deep-submicron processes those cells also leak while
the adder is idle. This design cuts that leakage with *adaptive power gating*:
the adder's bit rows are grouped into 4-bit clusters. A small controller
switches a cluster's supply off whenever all of that cluster's operand bits
are zero. An enable input puts the whole adder to sleep.

The RTL describes the logic side of this scheme:
- the adder, with a power domain for each bit row;
- the controller that decides which cluster is powered;
- the isolation cells that hold a sleeping cluster's outputs at a defined level.

The header switch transistors are outside the RTL. The controller drives them
through `pwr_on`.

The default configuration is 8 bits with two 4-bit clusters. This follows the
published design this RTL is based on, "Realization of Low Power N-Bit Kogge
Stone Adder" (V. Bhusari). The width is a parameter.

## Interface of the top, `ksa_lp`

| port     | dir | width       | meaning |
|----------|-----|-------------|---------|
| `a`, `b` | in  | N           | operands |
| `cin`    | in  | 1           | carry in |
| `en`     | in  | 1           | 1 = adaptive gating active; 0 = whole adder asleep |
| `sum`    | out | N           | sum |
| `cout`   | out | 1           | carry out |
| `pwr_on` | out | N/CLUSTER   | one bit per cluster, 1 = cluster supply on; drives that cluster's header switches |

Parameters: `N` (default 8), `CLUSTER` (default 4; N must be a multiple of it, and it must be even).

Everything is combinational: no clock, no reset, no state. With `en = 1` the
outputs are always `{cout, sum} = a + b + cin`. The gating is invisible
logically. With `en = 0`, `sum = {0…0, cin}` and `cout = 0`.

## The adder: three stages

`ksa_adder` follows the usual prefix-adder split.

1. **Bit terms** (`ksa_bp`, one per bit): `g_i = a_i & b_i`, `p_i = a_i ^ b_i`.
2. **Prefix network**: `ceil(log2 N)` levels. At level `l`, row `i` combines its
   current group term with that of row `i - 2^(l-1)`. Two kinds of cell are used:
   - black cell `ksa_gp`: `G = G_hi | P_hi & G_lo`, `P = P_hi & P_lo`;
   - gray cell `ksa_gg`: the `G` half only.
3. **Sum** (`ksa_xor`, one per bit): `s_i = p_i ^ C_(i-1)`, where `C_(-1) = cin`.

### How the carry in enters the network

The usual Kogge-Stone picture has no carry in. Here the carry in is treated as
an extra row −1 below bit 0. As a result, row `i` holds its *complete* carry
`C_i` after level `l` exactly when `i <= 2^l − 2`
(`ksa_pkg::ksa_done`). The cell placed at level `l`, row `i`, follows from that:

| condition | cell |
|-----------|------|
| row `i` already complete | wire |
| partner row is −1 (the carry in) | gray cell with `cin` |
| partner row already complete | gray cell |
| otherwise | black cell |

After the last level, rows 0…N−2 are complete. When N is a power of two, row
N−1 is not complete yet. One extra gray cell then merges `cin` into it to form
`cout`. For N = 8 the prefix cells are:

| level | span | cells (rows) |
|-------|------|--------------|
| 1 | 1 | gray 0; black 1–7 |
| 2 | 2 | gray 1, 2; black 3–7 |
| 3 | 4 | gray 3–6; black 7 |
| — | — | gray: carry out |

That is 21 cells. The familiar count `N·log2 N − N + 1` (17 for N = 8) is for
a network without carry in. The difference is the price of the carry in.
`ksa_pkg::ksa_cells(N)` computes the count for any N. N does not have to be a
power of two. For N = 5, for example, row 4 completes inside the network and
no carry-out cell is added.

## Power domains and isolation: the part to understand before changing anything

Every bit row `i` of the adder is a power domain, switched by `row_on[i]`. The
domain holds:
- the row's bit cell and all its prefix cells;
- the carry-out cell, for the top row.

The top maps cluster `k`'s `pwr_on[k]` onto rows `CLUSTER·k … CLUSTER·k+CLUSTER−1`.

Each signal leaving a row's domain passes a `pg_iso` cell, which forces it to 0
while the domain is off. This covers:
- every group term another row reads, at every level;
- the bit propagate and the carry sent to the sum XORs.

Signals used inside the row need no clamp.

Why this is safe: when a cluster's operand bits are all zero, every cell in it
would output 0 anyway. Its bit terms are 0. Every group term ending in the
cluster is 0, because its top part neither generates nor propagates. Its
carries are 0. So clamping to 0 gives exactly the values the powered cells
would give, and the sum stays correct.

The one signal that is *not* 0 is the lowest sum bit of a sleeping cluster. It
equals the carry coming into the cluster. For this reason the sum XORs are
kept in the always-on domain, outside the clusters. Two cases rely on this and
are checked by the testbenches:
- the carry in must reach `sum[0]` while cluster 0 sleeps;
- a carry from below must reach bit 4 while cluster 1 sleeps.

The clamp level of 0 and the exact domain contents are choices made here. The
published design shows isolation cells and per-cluster power switches but does
not fix either. Also not modelled:
- the header switches;
- how long a cluster takes to power up again.

`pwr_on` rises in the same delta as the operands change. A physical
implementation must give a cluster its wake-up time before its outputs are
sampled. For example, the operands could be registered one cycle ahead.

## The adaptive controller

`pg_controller` holds one `pg_cluster` per cluster. Each `pg_cluster` works as
follows:
- Two `pg_basic` detectors each report whether any of their two operand bit
  pairs is 1.
- The two results are merged and ANDed with `en`.
- The result is `pwr_on = en & |{a_cluster, b_cluster}`.

The tree shape follows the published controller: 2-bit "basic" blocks, merged
per 4-bit cluster, qualified by an enable. The condition itself, sleep when
all operand bits are zero, is the reading used here. It is the case the design
is evaluated on: idle inputs at zero.

## Files

| file | content |
|------|---------|
| `rtl/ksa_pkg.sv` | `gp_t` (generate/propagate pair), level/cell-count helpers |
| `rtl/ksa_bp.sv`, `ksa_gp.sv`, `ksa_gg.sv`, `ksa_xor.sv` | adder cells |
| `rtl/ksa_adder.sv` | N-bit adder with per-row isolation |
| `rtl/pg_basic.sv`, `pg_cluster.sv`, `pg_controller.sv` | adaptive controller |
| `rtl/pg_iso.sv` | isolation cells |
| `rtl/ksa_lp.sv` | top: controller + adder |
| `tb/<module>_tb.sv` | self-checking testbench per module |
| `tb/ksa_lp_run.sv` | shared end-to-end checker used by `ksa_lp_tb` (8 bits, defaults), `ksa_lp_w4_tb` (4-bit configuration) and `ksa_lp_n16_tb` (16 bits, four clusters) |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops. A
time-based watchdog counts a failure if a testbench hangs. To run one with
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ksa_pkg.sv tb/ksa_lp_tb.sv --top-module ksa_lp_tb
./obj_dir/Vksa_lp_tb
```

What the testbenches cover:
- `ksa_lp_tb` runs all 2^18 combinations of `a`, `b`, `cin` and `en` at the
  default size. It checks `pwr_on`, `sum` and `cout` against integer
  arithmetic. It also counts each mechanism and fails if one never happens:
  - each cluster sleeping alone;
  - both clusters asleep on all-zero operands;
  - sleep forced by `en`;
  - the carry in or a carry from below entering a sleeping cluster;
  - each cluster waking up.
- `ksa_lp_w4_tb` runs the same checks exhaustively on the 4-bit configuration.
  `ksa_lp_n16_tb` runs them on 400 000 random 16-bit vectors. Those vectors
  often clear whole clusters, so every cluster sleeps and wakes.
- `ksa_adder_tb` tests the adder at 8 bits (exhaustive), 5 bits and 16 bits,
  with rows powered, partly powered and all off.
- The cell and controller testbenches are exhaustive.

## Limits and departures

- Power, leakage and delay cannot be seen in RTL. The published
  comparisons are a circuit-level result and are not reproduced here:
  - static and dynamic power with and without gating, at 4 and 8 bits;
  - the all-zero static-power case.

  The RTL reproduces the logic those runs exercised. It can be run at 4 bits
  (`N = 4`, one cluster) and at 8 bits.
- The power switches are not in the RTL, and neither is a wake-up delay.
  Only their control (`pwr_on`) is provided.
- Choices made here that are not fixed by the published design:
  - the clamp level 0;
  - the assignment of all of a row's cells to that row's domain;
  - the always-on sum XORs;
  - the meaning of `en` as a global sleep;
  - support for N that is not a power of two.
- The 8-bit prefix network has 21 cells, not the 17 of the no-carry-in formula
  (see above).
