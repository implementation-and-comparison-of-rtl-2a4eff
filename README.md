# Area-efficient carry-select adders: BEC and clocked-latch variants

A ripple-carry adder is small but slow: the carry has to travel through every
bit. A carry-select adder (CSLA) cuts the operands into groups and computes
each upper group twice, once assuming a carry-in of 0 and once assuming 1.
When the real carry arrives from the group below, a multiplexer picks the
right pre-computed result, so the carry crosses each group through a single
mux instead of through every full adder.

The classic CSLA pays for this with two ripple-carry adders per group. This
RTL holds two ways of avoiding the second adder:

* **BEC CSLA** (`csla_modified`). Each group keeps one ripple-carry adder with
  carry-in 0. The carry-in-1 result is simply that result plus one, which a
  *binary to excess-1 converter* (BEC) produces with one inverter, one XOR and
  one AND per bit - far fewer gates than a second row of full adders. It comes
  in two group layouts: square-root (groups of growing size) and linear
  (equal groups).
* **Clocked-latch CSLA** (`csla_dlatch`). Each group keeps one ripple-carry
  adder and uses it twice in every clock cycle: its carry-in is the clock
  itself. During the high phase it produces the carry-in-1 result, which
  D-latches enabled by the clock capture; during the low phase it produces
  the carry-in-0 result live, and the mux picks one of the two.

`csla_top` puts the square-root BEC adder, the linear BEC adder and the
clocked-latch adder side by side on the same operands.

## Group layout

A 16-bit adder is one *section*. Group 0 is a plain ripple-carry adder on the
adder's carry-in; every higher group is a carry-select group driven by the
carry out of the group below.

| layout | group 0 | group 1 | group 2 | group 3 | group 4 |
|---|---|---|---|---|---|
| square-root (`GROUP_SQRT`, default) | [1:0] | [3:2] | [6:4] | [10:7] | [15:11] |
| linear (`GROUP_LINEAR`) | [3:0] | [7:4] | [11:8] | [15:12] | - |

In the square-root layout each group is one bit wider than the one below.
The carry-in-0 result of a wider group takes longer to ripple, but it also
has more time, because its select carry arrives later. The clocked-latch adder
always uses the square-root layout.

The group sizes and bit ranges come from `csla_pkg` (`group_width`,
`group_lsb`, `n_groups`, `groups_in`). Change them there to try another
layout.

**Other widths.** A wider adder is two adders of half the width in cascade:
the lower half's carry out is the upper half's carry-in. So 32 bits is two
16-bit sections, 64 bits is two 32-bit adders, and so on, which gives
`WIDTH = 16·2^k`. An 8-bit adder keeps the groups that fit below bit 8. In the
square-root layout those are 2, 2 and 3 bits, and one full adder adds bit 7.
In the linear layout they are two 4-bit groups. Any other `WIDTH` stops
elaboration with an error.

## The BEC group (`csla_bec_group`)

For an M-bit group:

```
 a,b ──► RCA (ci = 0) ──► r0 = {carry, sum}   (M+1 bits) ──────────► mux in 0
                              │
                              └──► BEC (M+1 bits): r1 = r0 + 1 ────► mux in 1
                                                                       │ sel = carry from group below
                                                                       ▼
                                                                 {c_out, s}
```

The BEC is one bit wider than the group because it also increments the
carry. `bec` computes `x[i] = b[i] ^ (b[0] & … & b[i-1])`, and it forms the
AND terms as a chain. For a 4-bit group the mux is 5 bits wide, taking two
5-bit inputs to one 5-bit output.

## The clocked-latch group (`csla_dlatch_group`): timing

This is the part that needs care. For an M-bit group:

```
 a,b ──► RCA (ci = clk) ──► live = {carry, sum} ─────────────────► mux in 0
                              │
                              └──► M+1 D-latches (en = clk) ─ held ► mux in 1
                                                                      │ sel = carry from group below
                                                                      ▼
                                                                {c_out, s}
```

One addition takes one clock cycle:

1. **Rising edge.** Apply `a`, `b` and `cin`. The RCAs now add with carry-in
   1. The latches are transparent and follow them.
2. **High phase.** The carry-in-1 results settle in the latches. The outputs
   mean nothing yet.
3. **Falling edge.** The latches close and hold the carry-in-1 results. At
   the same moment the RCAs switch to carry-in 0.
4. **Low phase.** Each mux picks either the live carry-in-0 result or the
   latched carry-in-1 result. The carry chain runs through the groups from
   bit 0 upwards. `sum` and `cout` are valid until the next rising edge.

The rules that follow:

* Operands must be stable from the rising edge to the end of the low phase.
* The result is valid only in the low phase. Sample it before the next rising
  edge, for example with a register clocked on the rising edge.
* The throughput is one addition per cycle. The result is ready half a clock
  period, plus the settling time, after the operands were applied.
* Both the latch enable and the RCA carry-in come from the same clock. At the
  falling edge the latches must close before the RCA outputs begin to change.
  This is a hold condition. It is met in zero-delay simulation, because the
  enable is the clock net itself while the RCA output only follows after
  logic. In silicon it needs the latch enable path to be faster than one
  full-adder carry-to-output path.
* The latches have no reset. They are written in every high phase before
  they are read.
* `csla_dlatch` has an assertion for the operand rule on `a` and `b`. At
  every rising edge it compares them with their values at the preceding
  falling edge. `cin` is not checked, because inside a cascade the upper
  half's carry-in settles only in the low phase. Give
  `clk` and the operands defined values from time 0, so that
  initialisation does not look like an edge with changed operands.

`d_latch` is a plain level-sensitive latch (`always_latch`), with outputs `q`
and `qn`. Lint and synthesis report the latches, and they are intended: they
are the storage of this adder.

## Modules

| module | role | default parameters |
|---|---|---|
| `csla_pkg` | `grouping_e` type; group layout functions | - |
| `full_adder` | 1-bit full adder | - |
| `rca` | W-bit ripple-carry adder | `W = 4` |
| `bec` | W-bit binary to excess-1 converter | `W = 5` |
| `mux2` | W-bit 2:1 multiplexer | `W = 5` |
| `d_latch` | D latch, transparent while `en` = 1 | - |
| `csla_bec_group` | RCA + BEC + mux group | `M = 4` |
| `csla_dlatch_group` | RCA (ci = clk) + latches + mux group | `M = 2` |
| `csla_modified` | BEC CSLA, either layout, cascadable | `WIDTH = 16`, `GROUPING = GROUP_SQRT` |
| `csla_dlatch` | clocked-latch CSLA, cascadable | `WIDTH = 16` |
| `csla_top` | the three 16-bit adders side by side | `WIDTH = 16` |

Every module except the package has a default for each parameter and can be
compiled as a top on its own. Everything is combinational except the latches
in the clocked-latch adder. No module has flip-flops or a reset.

## Simulation

Every testbench checks its results itself. It prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. A watchdog stops it
if it runs too long. With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/csla_pkg.sv tb/tb_csla_top.sv \
          --top-module tb_csla_top -Mdir obj_top
./obj_top/Vtb_csla_top
```

Verilator finds the other modules through `-Irtl`. Put the package on the
command line first.

| testbench | what it checks |
|---|---|
| `tb_full_adder` | all 8 input combinations |
| `tb_rca` | 4 bits exhaustive with both carry-ins; 7 bits random |
| `tb_bec` | 5 bits and 4 bits exhaustive: output = input + 1 mod 2^W |
| `tb_mux2` | both select values on complementary data |
| `tb_d_latch` | follows `d` while enabled; holds while disabled however `d` toggles |
| `tb_csla_bec_group` | 4 bits and 5 bits exhaustive |
| `tb_csla_dlatch_group` | 2 bits exhaustive and 5 bits random; result checked at the start and at the end of the low phase; one addition per cycle |
| `tb_csla_modified` | 16 bits, both layouts: corner cases and 20,000 random additions; each group must pick each of its two results at least once |
| `tb_csla_dlatch` | 16 bits: 5,000 additions, one per cycle, checked in the low phase; each group uses both its live and its latched result |
| `tb_csla_top` | end to end at default parameters: 20,000 additions through all three adders. It counts group selections, a carry running from group 0 to the top, carry out, and both carry-in values, and fails if any never happened |
| `tb_csla_widths` | 8, 16, 32, 64 and 128 bits for all three adders, including a carry that crosses every 16-bit section |

Expected values come from integer addition in the testbench, never from the
design's own logic. The clocked testbenches generate the clock themselves, with
a period of 10 time units, and sample the result 1 unit after the falling edge
and 1 unit before the next rising edge.

## Design choices and limits

* **Group sizes.** Several points fix the square-root layout: a 2-bit bottom
  group, a 2-bit second group on bits 3..2, five groups in 16 bits, and an
  8-bit adder made of the first three groups plus one full adder. These leave
  2, 2, 3, 4, 5 as the natural split. The 3/4/5 split of the top 14 bits is
  this design's choice.
* **Latch timing.** The phase roles are part of the method: the high phase
  computes carry-in 1 and the low phase carry-in 0. The operand window and
  the sampling point described above are this design's reading of them.
* **Wide clocked-latch adders.** Building widths above 16 for the
  clocked-latch adder by cascade, like the BEC adders, is an extension made
  here.
* **Register-transfer level.** The full adder, BEC, mux and latch are written
  as equations and an `always_latch` block, not as fixed gate netlists. Gate
  counts and area figures of a particular gate-level mapping are therefore not
  reproduced. Synthesis decides the gates.
* **Not included.** The classic dual-RCA carry-select adder, which serves
  only as the reference these variants improve on, is not part of this RTL.
  Nor are other add-one or carry-select circuits found elsewhere, such as
  mux-based incrementers, first-zero finders or block carry generators.
