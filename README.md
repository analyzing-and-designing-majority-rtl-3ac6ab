# Majority-logic approximate adders and multipliers

Some emerging nanotechnologies use the three-input majority gate as their native logic
element, not NAND/NOR. Quantum-dot cellular automata (QCA), nanomagnetic logic and
spin-wave devices are examples. The gate is

    M(a, b, c) = ab + bc + ac        M(a, b, 0) = a AND b        M(a, b, 1) = a OR b

An exact full adder takes three majority gates and two inverters. This design trades
accuracy for size. It builds adders from one-bit *approximate* cells that need only one
majority gate and one inverter each. It also builds multipliers from 2 x 2 majority-logic
units whose lost accuracy can be restored bit by bit through *complement bits*. These
circuits target error-tolerant work such as media processing. The RTL is plain
combinational SystemVerilog, so the circuits can be simulated, checked and reused on any
technology.

## The two one-bit approximate cells

| cell | carry out      | sum           | wrong rows (a b cin)        | MV | INV |
|------|----------------|---------------|-----------------------------|----|-----|
| AFA1 | `M(a,b,cin)`   | `~cout`       | 000 → 1, 111 → 2            | 1  | 1   |
| AFA2 | `cin` (a wire) | `M(a,b,~cin)` | 001 → 2, 110 → 1            | 1  | 1   |

Both cells miss by 1 on two of the eight rows, so each has a mean error distance (MED)
of 0.25. They fail in opposite ways:

* **AFA1** gets the carry exactly right and guesses the sum.
* **AFA2** guesses the carry by passing `cin` through. It then computes a sum that is right
  whenever that guess is right.

AFA2 has no gate on its carry path, so a run of AFA2 cells adds no carry delay. An
inverter can also be shared: if an AFA1 drives an AFA2, the AFA1's sum inverter already
makes the `~cin` that the AFA2 needs. A good synthesis tool finds this sharing in the
netlist.

AFA1 (`rtl/afa1.sv`) is an earlier published cell. AFA2 (`rtl/afa2.sv`) is the new one.
The exact cell `rtl/ml_fa.sv` computes `cout = M(a,b,cin)` and
`s = M(~cout, M(a,b,~cin), cin)`. It is used only inside the multiplier.

## Multi-bit adders: naming and structure

A multi-bit adder is a plain ripple of AFA1 and AFA2 cells. Its name lists the cell at
each bit, **bit 0 first**. For example, AFA12 has AFA1 at bit 0 and AFA2 at bit 1.
The adders are built hierarchically, each level from two halves of the level below:

| width | module   | variants (enum in `mlaa_pkg`)                         | halves used        | default        |
|-------|----------|-------------------------------------------------------|--------------------|----------------|
| 2     | `mlafa2` | `AFA11`, `AFA22`, `AFA12`, `AFA21`                    | AFA1 / AFA2 cells  | `AFA21`        |
| 4     | `mlafa4` | `AFA1212`, `AFA2121`, `AFA2112`, `AFA1221`            | AFA12 / AFA21      | `AFA2121`      |
| 8     | `mlafa8` | `AFA1212_1212`, `AFA2121_2121`, `AFA2121_1212`, `AFA1212_2121` | AFA1212 / AFA2121 | `AFA1212_2121` |

Each adder's result `{cout, s}` approximates `a + b + cin`. The 4- and 8-bit levels use
only the mixed halves, because those have the lower error.

Reading the names with bit 0 first gives the gate count, inverter count and depth of
every variant. It also gives the mean error distance over all inputs. Those values are:

| variant        | MV | INV | MV on longest path | MED (all inputs) | NMED  |
|----------------|----|-----|--------------------|------------------|-------|
| AFA11 / AFA22  | 2  | 2 / 1 | 2 / 1            | 0.75             | 0.107 |
| AFA12 / AFA21  | 2  | 1 / 2 | 2 / 1            | 0.625            | 0.089 |
| AFA1212        | 4  | 2   | 3                  | 2.836            | 0.091 |
| AFA2121        | 4  | 3   | 2                  | 2.875            | 0.093 |
| AFA2112        | 4  | 3   | 3                  | 2.875            | 0.093 |
| AFA1221        | 4  | 2   | 2                  | 2.836            | 0.091 |
| AFA1212_1212   | 8  | 4   | 5                  | 46.20            | 0.090 |
| AFA2121_2121   | 8  | 5   | 4                  | 47.02            | 0.092 |
| AFA2121_1212   | 8  | 5   | 5                  | 46.40            | 0.091 |
| AFA1212_2121   | 8  | 4   | 4                  | 46.82            | 0.092 |

NMED is MED divided by the largest exact result, `2^(n+1) - 1`.

In QCA each majority gate costs one clocking zone, a quarter clock. The "longest path"
column times 0.25 is therefore the adder's delay in QCA clock cycles. An exact 8-bit
ripple adder built from `ml_fa` needs 24 majority gates.

To simulate that delay, `maj3` has a `DELAY` parameter and the adders and cells pass it
down as `MV_DELAY`. The default is 0, which gives plain zero-delay logic, and synthesis
ignores the parameter.

**Where this departs from published figures.** The AFA1221 error has been published as
MED 5.45 / NMED 0.175. That value does not follow from the AFA1221 structure: an
AFA1, two AFA2s, then an AFA1. That structure is the mirror image of AFA1212 and has
exactly the same error. This design implements the structure, and its testbench checks
2.836. Every other value in the table has also been published. The RTL matches each of
them to the printed two decimals, which the testbenches check.

## Multipliers with complement bits

`mlam2x2` is a 2 x 2 unit. It forms its four partial products with `M(x, y, 0)`. The two
cross terms `a1·b0` and `a0·b1` both have weight 2, and the unit can handle them in two
ways:

* **Complement-bit form** (`USE_COMP = 1`, default): `out = {a1·b1, a0·b1, a0·b0}`, and
  `a1·b0` leaves the unit as the complement bit `comp`, of weight 2. `SWAP = 1` exchanges
  the two cross terms. `out + 2·comp` is the exact product.
* **Stand-alone form** (`USE_COMP = 0`): `out1 = M(a1·b0, a0·b1, 1)`, the OR of the cross
  terms. This form needs no complement bit. It is wrong only for 3 x 3, which gives 7.

`mlam` builds an N x N multiplier in four stages:

1. **Digit split.** Both operands are cut into N/2 two-bit digits.
2. **Partial-product and complement generation.** Digit pair (i, j) drives one `mlam2x2`.
   Its three product bits go to bit `2(i+j)`. Its complement bit goes to bit `2(i+j)+1`.
   For N = 4 the column heights, bit 0 to bit 6, are 1, 2, 3, 4, 3, 2, 1. Complement bits
   sit at bits 1, 3, 3 and 5.
3. **Reduction.** `ml_csa_reduce` reduces the (N/2)² product rows and (N/2)² complement
   rows to two rows. It is a linear carry-save array of exact `ml_fa` cells.
4. **Final addition.** `ml_rca`, a ripple-carry adder of `ml_fa`, adds those two rows into
   the 2N-bit product `p`.

`COMP_MASK` has one bit per digit pair: bit `i*(N/2)+j` for multiplicand digit i and
multiplier digit j. It chooses which complement bits are kept.

* With every bit kept (the default), the multiplier is **exact**.
* Each dropped bit removes `a[2i+1]·b[2j]·2^(2(i+j)+1)` from the product. The product is
  then approximate, never larger than `a*b`, and its reduction has fewer bits to add.

Choosing which bits to drop is the design decision that makes the multiplier approximate.
This design provides the mechanism, not a selection rule. No particular subset is
claimed to be optimal, and the default keeps every bit.

The reduction is exact on purpose. Approximate compressors could replace some of its
full adders, but none is defined here. The reduction array is the simplest correct one,
not a fast one: it is `(N/2)²·2 − 2` full-adder layers deep. Synthesis removes the cells
whose inputs are constant 0.

## Top level

`ml_approx_top` places the two largest units side by side: an 8-bit adder
(`ADDER_VARIANT`, default `AFA1212_2121`) and a `MUL_N` x `MUL_N` multiplier
(default 8, `COMP_MASK` default all ones). They share nothing.

| port                          | dir | width     | meaning                          |
|-------------------------------|-----|-----------|----------------------------------|
| `add_a`, `add_b`, `add_cin`   | in  | 8, 8, 1   | adder operands and carry in      |
| `add_s`, `add_cout`           | out | 8, 1      | approximate sum                  |
| `mul_a`, `mul_b`              | in  | MUL_N     | multiplier operands              |
| `mul_p`                       | out | 2·MUL_N   | product                          |

Everything is combinational, with no clock or reset. To use the units inside clocked
logic, register their inputs and outputs as timing requires.

## Files

| file                     | contents                                                     |
|--------------------------|--------------------------------------------------------------|
| `rtl/mlaa_pkg.sv`        | cell and variant enums, helpers that split a variant into halves |
| `rtl/maj3.sv`            | majority gate                                                |
| `rtl/afa1.sv`, `rtl/afa2.sv` | one-bit approximate cells                                |
| `rtl/ml_fa.sv`           | exact majority-logic full adder                              |
| `rtl/mlafa2.sv`, `rtl/mlafa4.sv`, `rtl/mlafa8.sv` | 2-, 4- and 8-bit approximate adders |
| `rtl/mlam2x2.sv`         | 2 x 2 multiplier unit                                        |
| `rtl/ml_csa_reduce.sv`   | carry-save reduction of rows                                 |
| `rtl/ml_rca.sv`          | exact ripple-carry adder                                     |
| `rtl/mlam.sv`            | N x N multiplier                                             |
| `rtl/ml_approx_top.sv`   | top level                                                    |
| `tb/tb_<module>.sv`      | one self-checking testbench per module                       |
| `tb/tb_afa_ref_pkg.sv`   | reference model of the adders, written from the cell truth tables |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. Each also has a watchdog that
fails the run if it hangs.

* **Cells and adders.** Every input pattern is applied: 8 for a cell, 32, 512 or 131 072
  for the 2-, 4- and 8-bit adders. All four variants run side by side. Each result is
  compared with a reference model built from the two cell truth tables. Each variant's
  total error distance must match its exact value, and its MED the published value.
  The testbenches also replay the published simulation vectors:
  * AFA11 and AFA22: 10 + 01 → 11
  * AFA21: 01 + 11 → 11
  * AFA12: 11 + 10 → 11
  * AFA1212: 1010 + 0110 → 1111
  * AFA1221: 1100 + 0111 → 1111
  * AFA2112: 1010 + 0100 → 1110
  * AFA1212_2121: 01111011 + 00100010 → 10011111

  All of these use `cin = 0` and give `cout = 0`.
* **Multiplier.** `mlam` is tested exhaustively at N = 4 and N = 8. With all complement
  bits the product must equal `a*b`. With a partial mask it must equal `a*b` minus the
  dropped bits.
* **Delays.** `tb_adder_latency` sets one delay step per majority gate. It applies 20 000
  random operand changes to all fourteen adders and the exact cell. For each one it
  checks that the longest settling time equals the published delay: 1 gate for each cell,
  2 for the exact adder, and the path column of the adder table for the multi-bit
  variants.
* **Top level.** `tb_ml_approx_top` runs the top with its default parameters through all
  131 072 adder patterns and 65 536 multiplier pairs. It also counts each behaviour
  (adder exact, too high, too low, carry out, complement bit in use) and fails if any
  never occurs. It takes a few seconds.

To simulate, for example, the top-level test:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/mlaa_pkg.sv tb/tb_afa_ref_pkg.sv tb/tb_ml_approx_top.sv --top-module tb_ml_approx_top
    ./obj_dir/Vtb_ml_approx_top

To test another module, replace the testbench file and top-module name. The package
files must come first.

## Not covered

* The QCA cell layouts and the four-phase QCA clocking. They are physical implementation
  and carry no logic beyond the gates above.
* Two parts of the multiplier's approximation: a rule for choosing which complement bits
  to drop, and approximate compressors for the reduction (see above).
* Gate and inverter counts are not measured by simulation. They follow from the
  structure as listed in the adder table.
