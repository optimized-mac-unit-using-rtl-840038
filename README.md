# MFA-MAC: a 16x16 multiply-accumulate unit built from 7:3 counters and a carry select adder

This is a multiply-accumulate (MAC) unit for small embedded datapaths. On
every clock it multiplies two unsigned 16-bit operands and adds the 32-bit
product to an accumulator: `z <= z + a*b`. Two ideas shape it:

* The multiplier is a **counter-based Wallace tree**. Its 16 partial-product
  rows are not reduced by a tree of ordinary 3:2 adders. Each column goes
  instead through a short chain of **7:3 counters**, which count seven bits
  at a time. The counters are built from a **modified full adder (MFA)**,
  which is two 4:1 multiplexers rather than XOR/AND/OR gates.
* The accumulator adds with a **binary carry select adder (HSBCSA)**. It
  works out everything that does not depend on the carry-in ahead of time.
  When the carry-in arrives, each carry is then two NAND levels away and
  each sum bit one XNOR away.

Two further forms of the unit stand beside the main one in the top module:

* a **bit-serial form** of the counter chain, which counts one product
  column per clock and needs far less logic per product;
* a **two-stage carry-save form**, which never propagates a carry while it
  accumulates. It feeds the running sum back into the counter tree as three
  rows and adds those rows up only once, after the last product of a run.

All RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. Every module
has a self-checking testbench.

## Datapath

```
 a[15:0] ─┐
          ├─► cb_mul ──prod[31:0]──► and_32bit ──► regis_acc_1 ──► z[31:0]
 b[15:0] ─┘   (counter Wallace tree)   (& en)      (HSBCSA + register) ──► ovf
```

| Instance | Module        | What it does |
|----------|---------------|--------------|
| `k1`     | `cb_mul`      | combinational 16x16 → 32 multiplier |
| `s1`     | `and_32bit`   | ANDs the product with `en`, giving zero when the unit is idle |
| `y22`    | `regis_acc_1` | 32-bit register; adds its input through the HSBCSA on each rising edge |
| `u_serial` | `cmwtm_serial` | bit-serial multiplier, on its own `ser_*` ports |
| `u_pipe`   | `mfa_mac_pipe` | two-stage carry-save MAC, on its own `pipe_*` ports |

The multiplier has no clock, so a product is ready in the same cycle as its
operands. The result `z` includes the operands that were present at the
last rising edge. With `a = 0x03e8` and `b = 0xffff` held and `en` high,
`z` steps through `0x03e7fc18`, `0x07cff830`, `0x0bb7f448`, `0x0f9ff060`,
one product per clock. The end-to-end testbench checks exactly this
sequence.

When `en` is low the AND row feeds zeros, so the adder adds nothing and `z`
holds. There is no separate register enable.

## The counter chain (cb_mul, cmwtm_serial)

This is the least conventional part of the design.

**Partial products.** Row *r* (for *r* = 0..15) is `a & {16{b[r]}}`,
shifted left by *r* and zero-padded to 32 bits. Together the rows form a
16x32 matrix. The rows are split into four groups of 7, 4, 4 and 1.

**One column, four counters.** Each product column *j* has its own chain of
four 7:3 counters. A 7:3 counter returns `sum` (weight 1), `c1` (weight 2)
and `c2` (weight 4):

| stage | its seven inputs in column *j* |
|-------|---------------------------------|
| 1 | rows 1–7 |
| 2 | rows 8–11, `sum₁[j]`, `c1₁[j-1]`, `c2₁[j-2]` |
| 3 | rows 12–15, `sum₂[j]`, `c1₂[j-1]`, `c2₂[j-2]` |
| 4 | row 16, three zeros, `sum₃[j]`, `c1₃[j-1]`, `c2₃[j-2]` |

A counter's `c1` has twice the weight of its column, so it belongs to column
*j+1*. Its `c2` belongs to column *j+2*. Each stage therefore passes on
exactly three bits of column *j*'s weight: its own sum in column *j*, the
`c1` from column *j-1* and the `c2` from column *j-2*. With four new rows,
that makes seven inputs. Counting is exact, so no information is lost.
Carries never ripple along a stage. The logic depth is four counters,
whatever the operand width.

Stage 4 leaves three rows: its sums, its `c1`s shifted by one and its `c2`s
shifted by two. A carry-save adder (`csa`) turns these into two rows. A
carry look-ahead adder (`cla`, 4-bit look-ahead groups) adds the two rows.
Bits above 31 are dropped: a 16x16 product never reaches them.

**The serial form (`cmwtm_serial`).** This module builds the same chain
once, not once per column, and moves through the columns over time:

1. On `start`, the 16 rows are loaded into parallel-in serial-out shift
   registers.
2. Each clock shifts the next column, least significant first, out of all
   16 rows and into the four counters.
3. The "one column up" and "two columns up" links become one and two
   flip-flops between the stages.
4. A serial fast adder adds the last stage's three bits to its own 2-bit
   carry. It emits one product bit per clock into a serial-in parallel-out
   register.
5. A comparator on the column counter ends the run after 32 columns.

`busy` is high for 32 clocks. `done` then pulses for one clock, and
`product` holds its value until the next start. A `start` that arrives
while the unit is busy is ignored.

## Two-stage carry-save accumulation (mfa_mac_pipe, cmwtm_tree)

The counter chain lives in `cmwtm_tree`, which both multipliers use. Stage
4 of the chain has three inputs that a plain multiplier ties to zero. The
two-stage unit uses them to carry the running sum.

* **Input stage.** `a`, `b`, `en` and `last` are registered.
* **Stage 1.** The tree adds the registered product to three rows held in
  REG1, REG2 and REG3:
  * REG1 holds the sums;
  * REG2 holds the first carries, already shifted by one;
  * REG3 holds the second carries, already shifted by two.

  The tree returns three new rows of the same kind, and they are written
  back. The running sum is REG1 + REG2 + REG3, modulo 2³². No carry
  travels along the word during a run, so the critical path is the counter
  chain alone.
* **Stage 2.** A run ends with the product marked by `last`. Only in the
  clock after that product do AND gates let REG1..REG3 through. A row of
  modified full adders reduces them to two rows, and the carry select
  adder forms `result`. In every other cycle the AND gates hold stage 2's
  inputs at zero, so it does not switch.
* **Back-to-back runs.** In the clock that stage 2 reads a finished run,
  stage 1 already takes the first product of the next run. The feedback
  rows are forced to zero for that product.

Timing: suppose the last product of a run meets rising edge *k* at the
input. The run's sum is then in REG1..REG3 after edge *k*+1. It appears
on `result`, with a one-clock `result_valid`, after edge *k*+2. With `en`
low the rows hold. The result is modulo 2³² and this form has no overflow
flag.

## Modified full adder and 7:3 counter (mfa, mux4, counter73)

`mfa` uses `{a, b}` as the select of two 4:1 multiplexers (`mux4`):

* the sum multiplexer picks from `c, ~c, ~c, c`, which gives `a^b^c`;
* the carry multiplexer picks from `0, c, c, 1`, which gives the majority
  of `a`, `b` and `c`.

`counter73` chains four of them:

* adder 1 adds I1–I3, and adder 2 adds I4–I6;
* adder 3 adds the two sums and I7, giving `sum`;
* adder 4 adds the three carries, giving `c1` (its sum) and `c2` (its
  carry).

The `csa` rows are built from the same `mfa`.

## Binary carry select adder (hsbcsa = hscg + fcg + fsg)

For operands P and Q and each bit position *i*, the half sum and carry
generator (`hscg`) produces three signals:

* `L_i = P_i·Q_i + (P_i+Q_i)·L_{i-1}`, with `L_0 = P_0·Q_0`. This is the
  carry out of bits 0..*i* when the carry-in is 0.
* `M_i = (P_i+Q_i)·M_{i-1}`, with `M_0 = P_0+Q_0`. This is true when bits
  0..*i* would pass a carry-in of 1 through.
* `N_i = P_i ⊕ Q_i`, the half sum.

`L` and `N` leave the generator complemented. None of the three depends on
the carry-in.

The final carry generator (`fcg`) forms the carry into bit *i*+1 as
`C_{i+1} = NAND(~L_i, NAND(M_i, cin)) = L_i + M_i·cin`. That is two gate
levels after the carry-in. `C_N` is the carry out.

The final sum generator (`fsg`) forms `S_i = XNOR(~N_i, C_i)`, with
`C_0 = cin`.

The L and M chains are written as plain recurrences. How they are laid out
is left to synthesis.

## Accumulator, reset and overflow (regis_acc_1)

* **Adding.** On each rising edge, `oup <= oup + inp` modulo 2³², computed
  by the HSBCSA with carry-in 0.
* **Reset.** `rst` is synchronous and active high. It clears the sum and
  the overflow flag.
* **Overflow.** The adder's carry out sets `ovf`. The flag stays set until
  reset and marks that `z` has wrapped at least once.

## Ports of the top (mfa_mac)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous reset of `z`, `ovf` and the serial multiplier |
| `en` | in | 1 | accumulate `a*b` on this edge |
| `a`, `b` | in | 16 | unsigned operands |
| `z` | out | 32 | accumulated sum |
| `ovf` | out | 1 | sticky: the sum has wrapped |
| `ser_start` | in | 1 | start a serial multiplication of `ser_a`·`ser_b` |
| `ser_a`, `ser_b` | in | 16 | serial multiplier operands |
| `ser_busy` | out | 1 | serial multiplier running |
| `ser_done` | out | 1 | one-clock pulse; `ser_product` is valid |
| `ser_product` | out | 32 | serial product |
| `pipe_en` | in | 1 | two-stage unit: accumulate `pipe_a`·`pipe_b` |
| `pipe_last` | in | 1 | two-stage unit: this is the run's final product |
| `pipe_a`, `pipe_b` | in | 16 | two-stage unit operands |
| `pipe_result` | out | 32 | two-stage unit: sum of the run |
| `pipe_valid` | out | 1 | one-clock pulse; `pipe_result` is valid |

The sizes are in `rtl/mac_pkg.sv`: `OP_W = 16` and `PROD_W = 32`. The
split of rows into counter stages (7 + 4 + 4 + 1) is written for 16 rows.
A different operand width needs a new split, not just a new parameter.

## Where this design departs from, or fills in, its description

The description this design follows leaves several points open. These are
the choices made here.

**Two descriptions of one unit.** The unit's RTL schematic and simulation
show a single-pass MAC: one product per clock through a multiplier, an AND
gate and an accumulator. That is `mfa_mac`'s main path, and it has no
input register.

The block diagram describes a two-stage pipeline instead, and
`mfa_mac_pipe` is that pipeline. Its details are this design's reading of
the diagram:

* **Registers.** The diagram's three accumulation registers are 7, 3 and
  1 bits wide. Here they are read as the three output rows of the last
  counter stage, and each is 32 bits wide, since narrower rows cannot hold
  the running sum.
* **Feedback.** The rows re-enter the tree in place of stage 4's three
  zero inputs. This is an inference: the diagram shows only an arrow back
  into the multiplier.
* **MFA box.** The diagram's MFA box before the second-stage adder is
  taken to be the row of modified full adders. The separate register loop
  drawn around it is not reproduced.
* **End of run.** The `last` input that marks the end of a run is this
  design's own.

**Only 7:3 counters in the tree.** The written description names 4:2 and
3:2 compressors for the second and third reduction stages. The structural
drawing shows 7:3 counters in all four stages, followed by a fast adder.
The drawing is followed. The fast adder is the carry-save adder plus
carry look-ahead adder that the text names for the last stage.

**Equations.** The 7:3 counter outputs and the L recurrence of the carry
select adder are implemented in the form that is arithmetically correct
and matches the block drawings: `sum = s_fa1 ⊕ s_fa2 ⊕ I7`, with `c1`/`c2`
the sum and carry of the three adder carries, and `L_i` as an
AND-OR recurrence.

**Unsigned only.** The description mentions a signed variant that handles
the sign bits. It is not built.

**Choices where nothing is specified:**

* synchronous active-high reset;
* the `ovf` output;
* the 4-bit look-ahead grouping in `cla`;
* the `start`/`busy`/`done` handshake and column order of the serial
  multiplier;
* the 32-bit width of the carry select adder.

**Outside the unit.** The memory that supplies the operands and stores
results is not part of the unit. `a`, `b` and `z` are plain ports.

**Not checked.** No area, power or timing figures were measured for this
RTL. The only claim here is functional: every block matches plain
arithmetic in simulation.

## Verification

Each module in `rtl/` has a testbench `tb/tb_<module>.sv`. Each one checks
the module against values computed independently in the testbench and ends
by printing `TB_RESULT checks=N failures=M`:

* **Exhaustive tests:** `mux4`, `mfa`, `counter73`, and an 8-bit `hsbcsa`.
* **Random and corner-case tests:** the 32-bit adders and `cb_mul`
  (50,000 random products, plus every pair of single-bit operands).
* **Cycle-level tests:** `regis_acc_1`, `cmwtm_serial` and `mfa_mac_pipe`.
  These also check latency and the sticky overflow flag. `mfa_mac_pipe` is
  tested with 300 runs of 1 to 40 products, with and without gaps between
  runs.
* **Tree test:** `cmwtm_tree` is checked with random extra rows.

`tb_mfa_mac` is the end-to-end test at the design's full size. It runs:

* the reference sequence above;
* 6,000 random cycles with `en` toggling;
* resets in mid-run;
* back-to-back serial multiplications;
* two-stage accumulation runs of random length.

It also counts how often each mechanism occurred (accumulate, hold, reset,
overflow, serial multiply, two-stage run) and fails if any never did.

`tb_sine_mac` accumulates products of sampled sine and cosine waves
(16-bit, offset to half scale). It runs once at full scale, where the sum
wraps and sets `ovf`, and once at small amplitude, where it does not. The
two-stage unit takes the same samples as one run per test and must return
the same sum.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mac_pkg.sv tb/tb_mfa_mac.sv \
          --top-module tb_mfa_mac -Mdir obj_mfa_mac -o sim
./obj_mfa_mac/sim
```

Use the same command for any other testbench. Change the file and top name,
and always read `rtl/mac_pkg.sv` first. Every testbench finishes in well
under a second.
