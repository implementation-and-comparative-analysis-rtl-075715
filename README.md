# Carry select adder with one Kogge-Stone adder and a latch row

A carry select adder hides carry propagation by computing every sum twice,
once for carry in 0 and once for carry in 1, and picking one result when the
real carry in arrives. The usual form spends two adders on that. This design
uses a single 8-bit Kogge-Stone parallel prefix adder twice in one clock
period instead. The second adder is replaced by a row of D-latches:

```
            a[7:0] b[7:0]
                 |
          +------v------+
  en ---->| cin   ksa   |  (Kogge-Stone, 8 bit)
   |      +------+------+
   |             | {cout, sum}  (9 bits)
   |      +------+--------------+
   |      |                     |
   |  +---v-----------+         |
   +->| en dlatch_bank|         |
      +---+-----------+         |
          | held (a+b+1)        | live
      +---v-----------------v---+
sel ->| 1      mux_bank       0 |
      +-----------+-------------+
                  v
             {cout, sum}
```

The enable clock `en` drives both the adder's carry in and the latch enable.

* **`en = 1`.** The adder computes `a + b + 1` and the transparent latches
  follow it.
* **`en` falls.** The latches keep `a + b + 1`. The adder now computes
  `a + b`.
* **`en = 0`.** The multiplexer row gives the latched `a + b + 1` when
  `sel = 1` and the live `a + b` when `sel = 0`. `sel` is the carry into the
  whole adder.

The original design is a circuit in adiabatic logic, Positive Feedback
Adiabatic Logic (PFAL). PFAL gates are dual-rail and run from a ramped,
energy-recovering power clock. This RTL keeps the logic of that circuit: the
same cells, the same prefix tree and the same latch/multiplexer scheme. Each
gate is written as ordinary static logic with the same Boolean function. The
RTL does not describe power, energy recovery or the power clock generator.

## Timing of one addition

1. Set `a` and `b`, then hold them for one whole `en` period.
2. Drive `en` high for long enough that the adder's `cin = 1` result settles
   through the latches.
3. Drive `en` low. The adder settles to the `cin = 0` result, and `{cout, sum}`
   is valid until `en` rises again.

`sel` can change at any time during the low phase; the output follows it
after one multiplexer delay. During the high phase both multiplexer inputs
hold the `cin = 1` result, so the output shows `a + b + 1` whatever `sel` is.
Nothing is reset. The latched value means something only after the first
high phase of `en`.

## The Kogge-Stone adder (`ksa`)

The adder has three steps. Each bit and each tree node is its own cell
instance, so the netlist keeps the shape of the prefix tree.

* **Pre-processing (`pg_cell`).** For each bit, `pro = a ^ b` and
  `gen = a & b`.
* **Carry in.** One extra `carry_gen_cell` merges bit 0 with
  `(G = cin, P = 0)`. Bit 0's generate then becomes `a0 b0 + P0 cin`.
* **Prefix tree (`carry_gen_cell`, the "dot" operator).** A cell computes
  `gen = g_hi + p_hi g_lo` and `pro = p_hi p_lo`. Level `l` merges bit `i`
  with bit `i - 2^l` for every `i >= 2^l`; lower bits pass their pair on
  unchanged. For 8 bits that makes three levels, with spans 1, 2 and 4.
  After the last level, `G[i]` is the carry out of bit `i`. No cell output
  drives more than two cells in the next level.
* **Post-processing.** `sum[i] = P_i ^ C_(i-1)`, where `C_(-1) = cin`. Then
  `cout = C_7`.

The width `N` is a parameter. The tree is correct for any `N >= 1`, with
`ceil(log2 N)` levels. The tests cover 5, 8 and 16 bits.

## Where this RTL departs from the original circuit, or fills gaps

* **Logic style.** Dual-rail PFAL gates become single-rail static logic. The
  power clock becomes the digital enable `en` (see below).
* **Latch row width.** The original counts one latch per sum bit. Here the
  row has `N + 1` latches, because the carry out also has to be selected.
* **Where `cin` enters the tree.** The original does not show this. It is
  folded into bit 0 before the prefix tree.
* **Source and polarity of `sel`.** Not specified in the original. `sel` is a
  top-level port, and `sel = 1` picks the latched (`cin = 1`) result.
* **Not modelled.** The four-phase power clock generator (evaluate, hold,
  recovery, wait intervals) and the transistor-level PFAL gate are analog.
  The original's results are circuit measurements and do not apply to RTL: a
  1 V, 50 MHz sinusoidal power clock, and power and delay at 1 V and 0.7 V.

The latches in `dlatch_bank` are intended. Synthesis and lint report them as
latches.

## Files

| File | Contents |
|---|---|
| `rtl/ksa_pkg.sv` | Default width `KSA_WIDTH = 8`, the `(g, p)` pair type, the dot operator, the level count |
| `rtl/pg_cell.sv` | Propagate/generate cell |
| `rtl/carry_gen_cell.sv` | Prefix ("carry generate") cell |
| `rtl/ksa.sv` | N-bit Kogge-Stone adder with carry in |
| `rtl/dlatch_bank.sv` | W D-latches with a common enable |
| `rtl/mux_bank.sv` | W 2:1 multiplexers with a common select |
| `rtl/csa_ksa.sv` | Top: the carry select adder |
| `tb/tb_*.sv` | One self-checking testbench per module |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself,
with a watchdog in case it hangs. `tb_ksa` runs all 2^17 combinations of
`a`, `b` and `cin` at 8 bits, plus random operands at 5 and 16 bits.
`tb_csa_ksa` runs the top at its default width through all 2^16 operand
pairs. Each pair gets a full `en` period and is checked with both values of
`sel`. The testbench also counts four events and fails if any never happened:

* the latch capturing during `en = 1`;
* the held value being selected;
* the live value being selected;
* `sel` changing the carry out.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/ksa_pkg.sv tb/tb_csa_ksa.sv --top-module tb_csa_ksa
./obj_dir/Vtb_csa_ksa
```

To run another testbench, replace `tb_csa_ksa`. To change the width, set
`N` on `csa_ksa` or `ksa`, or change `KSA_WIDTH` in the package.
