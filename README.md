# Hybrid approximate adder with a reverse carry propagate low part

In an ordinary ripple-carry adder the carry moves from the least significant
bit upward. If the chain is too slow (a timing violation, supply droop,
process variation), the late bits are the most significant ones, and the error
is large. A **reverse carry propagate adder (RCPA)** runs its carry the other
way, from the most significant bit of the chain down to bit 0. Whatever is
still settling at the end of the chain then has low weight. The price is
that the result is approximate.

This RTL builds an N-bit **hybrid adder**:

```
   a[N-1:K], b[N-1:K]                     a[K-1:0], b[K-1:0]
          |                                       |
 +-------------------+   joint carry F_K   +-------------------+
 |  Kogge-Stone      |<--------------------|  RCPA (K cells)    |
 |  exact, N-K bits  |                     |  approximate       |
 +-------------------+                     +-------------------+
   |            |                                  |        |
  cout      sum[N-1:K]                         sum[K-1:0]  c_lsb
```

The low K bits (half of the word by default) are added by an RCPA. The high
N-K bits are added exactly by a Kogge-Stone parallel-prefix adder. The
default is a 32-bit adder with a 16-bit RCPA and cell design 1. 16-bit adders
and the other two cell designs are parameter settings.

## Reverse carry cells (RCPFA)

A full adder satisfies `2*C_{i+1} + S_i = A_i + B_i + C_i`. Moving the carries
to opposite sides gives

```
S_i - C_i = A_i + B_i - 2*C_{i+1}
```

This identity defines a reverse cell. It receives `C_{i+1}` from its *more*
significant neighbour and hands `C_i` down to its *less* significant
neighbour. The right-hand side lies between -2 and +2. The pair (S_i, C_i) can
only express -1, 0 or +1, and it has two ways to write 0: (0,0) and (1,1).
Two inputs decide the output:

* The **forecast** `F_i` comes up from the cell below. It is a cheap guess,
  from that cell's operand bits alone, of whether the lower bits will supply
  a carry. When the target value is 0, F_i = 1 selects (1,1), which asks the
  lower bits for one unit; F_i = 0 selects (0,0).
* The **carry** `C_{i+1}` comes down from the cell above. The cell above
  forecast that this position would send it a carry, and `C_{i+1}` says
  whether it counted on one.

When the target is +2 (both operand bits 1, no carry demanded) or -2 (neither
operand bit set, a carry demanded), the cell cannot be exact and is off by
one unit at its own weight. These are the approximation errors.

### The general form and design 1 (`rcpfa_d1`)

The exact-where-possible cell has

```
S_i = ~C_{i+1}F_i + ~C_{i+1}A_i + ~C_{i+1}B_i + A_iB_iF_i
C_i =  C_{i+1}F_i +  C_{i+1}~A_i + C_{i+1}~B_i + ~A_i~B_iF_i
```

and is built as four complex gates:

```
X_i = AOI21(A_i, B_i, ~C_{i+1}) = ~(A_iB_i + ~C_{i+1})
Y_i = OAI21(A_i, B_i, ~C_{i+1}) = ~((A_i + B_i)~C_{i+1})
S_i  = ~(Y_i (X_i + ~F_i))      ~C_i = ~(X_i + F_i Y_i)
```

Design 1 forecasts `F_{i+1} = A_i`, which costs no gate.

### Designs 2 and 3 (`rcpfa_d2`, `rcpfa_d3`)

Each of these cells drops one of the two input complex gates:

| cell | keeps | sum | carry | forecast F_{i+1} |
|------|-------|-----|-------|------------------|
| design 2 | Y_i only (X_i taken as 0) | `~(Y_i ~F_i)` | `C_i = Y_i F_i` | `A_i & B_i` |
| design 3 | X_i only (Y_i taken as 1) | `~(X_i + ~F_i)` | `C_i = X_i + F_i` | `A_i \| B_i` |

Dropping a gate pushes each cell's error in one direction only. Over a whole
adder, design 2 never over-estimates the sum and design 3 never
under-estimates it. The testbench checks both properties.

The gate structure and the equations come from the published cell designs.
The three forecast functions are a reconstruction: they were chosen because
they reproduce the published error statistics (next section). The port
polarity is also this implementation's choice: all ports are active-high
`C` and `F`, and the inverted signals of the gate-level form stay inside the
cells.

## Chain ends and the joining point

In `rcpa`, the forecast runs up the chain from `F_0 = 0`. The carry runs down
from the top. The top cell's carry input is its own forecast output:
`C_K = F_K`. The RCPA thereby claims a carry out of weight 2^K, and the same
bit goes to the exact adder as its carry in (`joint_carry`). Because F_K
depends only on bit K-1 of the operands, the Kogge-Stone part never waits for
the reverse chain. The critical path is the longer of two paths: the RCPA's
carry chain from bit K-1 down to S_0, and the prefix tree of the upper part.

Summing the cell identities gives

```
sum[K-1:0] + 2^K * F_K = a[K-1:0] + b[K-1:0] + C_0 + (cell errors)
```

A carry `C_0` left over at the bottom is therefore one more source of error.
It is not added back. It is brought out as `c_lsb` for observation only.

The choices `F_0 = 0`, `C_K = F_K` and the `joint_carry`/`c_lsb` ports are
this implementation's reading of the chain ends.

## Accuracy

The reference numbers below are for an adder with an 8-bit approximate part
(an 8-bit RCPA, or the 16-bit hybrid, whose error is the same). They are taken
over all 65,536 operand pairs, with the error defined as exact minus
approximate. `tb_rcpa` recomputes them from the RTL and checks them against
the published figures:

| cell | error rate | mean error distance | max error distance | mean error | std dev |
|------|-----------:|-----:|----:|-------:|------:|
| design 1 | 75.95 % | 18.20 | 128 | -0.33 | 31.98 |
| design 2 | 65.99 % | 18.12 | 127 | 18.12 | 26.57 |
| design 3 | 85.91 % | 18.79 | 128 | -18.79 | 26.58 |

The published error rate for design 3 is 80.08 %. That does not agree with
the cell that matches its other four figures, so the testbench reports the
rate for design 3 but does not check it.

The upper part is exact, so errors in the hybrid adder stay below 2^K in
magnitude. `tb_hybrid_configs` prints random-operand statistics for all six
configurations (16 or 32 bits, designs 1–3). At 32 bits, more than 90 % of
results are inexact. The mean error distance is about 4,600, roughly 1e-6
of the full scale.

## Exact part (`kogge_stone_adder`)

This is a textbook Kogge-Stone adder with carry in. Each bit forms generate
and propagate terms. The carry in is an extra prefix position below bit 0.
There are `ceil(log2(W+1))` prefix stages, and each combines position `i`
with `i - 2^l`. The design it serves only specifies "Kogge-Stone". The prefix
formulation is this implementation's choice.

## Modules and parameters

| file | what it is | parameters (default) |
|------|------------|----------------------|
| `rtl/rcpa_pkg.sv` | `rcpfa_design_e` enum: `RCPFA_D1`, `RCPFA_D2`, `RCPFA_D3` | – |
| `rtl/rcpfa_d1.sv`, `rcpfa_d2.sv`, `rcpfa_d3.sv` | one reverse cell each | – |
| `rtl/rcpa.sv` | K-cell reverse carry chain | `W` (16), `DESIGN` (`RCPFA_D1`) |
| `rtl/kogge_stone_adder.sv` | exact prefix adder | `W` (16) |
| `rtl/rcpa_hybrid_adder.sv` | top: RCPA low part + Kogge-Stone high part | `N` (32), `K` (`N/2`), `DESIGN` (`RCPFA_D1`) |

Top-level ports: `a`, `b` (N bits in); `sum` (N bits); `cout` (carry out of
bit N-1); `joint_carry` (F_K); `c_lsb` (C_0).

Everything is combinational: there are no clocks, registers or reset, and
the result is valid one propagation delay after the operands change. If you
need a pipelined adder, register around it. With design 1, `joint_carry` is
simply `a[K-1]`, so synthesis reports that output as wired to an input.

Free choices beyond the published design:

* `K` is a parameter, and any split with `0 < K < N` works. The published
  adders split the word in half.
* The exact part is always a Kogge-Stone adder. An exact ripple-carry chain
  would behave the same arithmetically.

## Simulation

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. The reference models are in
`tb/rcpa_ref_pkg.sv`. They are written from the sum-of-products equations,
not from the gate structure, and they add the upper part with plain
arithmetic.

| testbench | what it checks |
|-----------|----------------|
| `tb_rcpfa_d1/2/3` | all 16 input combinations of each cell; value and error sign of S-C |
| `tb_rcpa` | 8-bit chains of all three designs, exhaustively, plus the statistics table above; 16-bit chain, random |
| `tb_kogge_stone_adder` | 16-bit corners and random values; 5-bit exhaustive; 32-bit random |
| `tb_rcpa_hybrid_adder` | default 32-bit adder, 200k vectors; counts joint carry, full ripple through the exact part, carry out, inexact and exact results, and leftover C_0, and requires each to occur |
| `tb_hybrid_configs` | 16- and 32-bit adders with each design, against the model; error sign of designs 2 and 3 |

To run one testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/rcpa_pkg.sv tb/rcpa_ref_pkg.sv tb/tb_rcpa_hybrid_adder.sv \
    --top tb_rcpa_hybrid_adder -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, changing the file and
`--top`. `-Irtl` lets Verilator find the design modules by file name. Each run
takes well under a second.

## Limits

* The cells' forecast functions were reconstructed from the published error
  statistics. The gate-level drawings fix which complex gates each cell uses,
  but the forecast gate and the output gates were identified from the
  arithmetic, not read off a drawing.
* The published area and delay figures come from FPGA synthesis. They say
  designs 2 and 3 are faster than design 1 at 32 bits. Simulation does not
  reproduce them, and this RTL makes no timing claim.
