# 1024-bit carry select adder with time-shared D-latch groups

A carry select adder (CSLA) cuts the carry path of a long addition by
splitting the operands into groups and computing every group twice, once
assuming a carry-in of 0 and once assuming 1. When the real carry arrives,
a multiplexer picks one of the two results, so the carry crosses one
multiplexer per group instead of every bit. The cost is area: each group
normally needs two ripple carry adders.

This adder keeps only **one** ripple carry adder per group and uses it
twice per clock period. The clock itself is the adder's carry-in:

| clock (`en`) | group ripple adder computes | D latches                     |
|--------------|-----------------------------|-------------------------------|
| high         | `a + b + 1`                 | transparent, take that result |
| low          | `a + b + 0`                 | hold the `a + b + 1` result   |

During the low phase both candidate results exist at the same time: one
in the latches, one live at the adder output. The group multiplexer then
chooses between them with the carry from the group below, as in an
ordinary CSLA. The second ripple adder of each group is replaced by N+1
latches, one per sum bit and one for the group carry.

## Structure

```
csla1024_dlatch            WIDTH = 1024, 64 slices chained by carry
 └─ csla16_dlatch          one 16-bit square-root CSLA slice
     ├─ rca #(N=2)         bits [1:0]   plain ripple adder, fed by the slice carry-in
     └─ dlatch_group       bits [3:2], [6:4], [10:7], [15:11]  (N = 2, 3, 4, 5)
         ├─ rca #(N)       carry-in = en
         │   └─ full_adder
         ├─ d_latch x N+1  enable = en
         └─ mux2 #(N+1)    sel = carry into the group: 1 -> latched, 0 -> live
csla_pkg                   slice width 16, group widths {2,2,3,4,5}, group_lsb()
```

**The 16-bit slice.** The group widths grow by one bit per group
(2, 2, 3, 4, 5), the usual square-root arrangement: a wider group has more
time to compute its two candidates while the carry works its way up
through the groups below. The lowest group only ever sees its real
carry-in, so it is a plain 2-bit ripple adder with no latches. The four
upper groups (14 bits) are D-latch groups.

**The 1024-bit adder.** 64 slices are chained: the carry out of slice k is
the carry-in of slice k+1, and enters its 2-bit ripple group. The
topmost group covers bits [1023:1019]. All 1152 latches
(64 slices × 18) share the single `en` signal.

## Timing contract

This is the part to get right when using the adder.

* `en` is the clock. One addition takes one `en` period, high phase first.
* `a`, `b` and `cin` must be stable from before `en` rises until the result
  has been read in the following low phase.
* The high phase must be long enough for the slowest group (5 bits) to
  ripple its `a + b + 1` result into the latches. The low phase carries
  the real work: the `a + b + 0` ripple and the carry select chain across
  all groups and slices. The high phase can therefore be much shorter than
  the low phase.
* `sum` and `cout` are valid at the end of the low phase. During the high
  phase the output of a group is only right if its carry-in happens to be
  1, so do not sample there.
* If the operands change while `en` is low, the latches still hold the
  old operands' `a + b + 1`, and every group whose carry-in is 1 gives a
  wrong result until the next high phase.

There is no reset and no register: the latches are rewritten in every
high phase before they are read. If the result is to be registered,
capture it with a flop clocked just before `en` rises, or on the falling
edge of a clock at twice the rate. Either way, the register is outside
this RTL.

## Where this RTL makes its own choices

* **Chaining 16-bit slices to get 1024 bits.** The 16-bit slice is
  specified in detail. For the 1024-bit adder only the first groups
  ([1:0], [3:2], [6:4], [10:7]) and a top group at bits 1023..1019 are
  known. Chaining 64 identical slices matches all of these. A single
  square-root chain of growing groups would not: its top group would be
  over 30 bits wide. Each slice's lowest group is a plain ripple adder fed
  by the slice below.
* **N+1 latches per group.** The group carry is latched along with the
  N sum bits, because the group's carry-out must also be selected.
* **The D latch** is a behavioural level-sensitive latch (`always_latch`),
  one latch cell, not the transistor or gate-loop circuit it stands for.
  The latches in the synthesised netlist are intended.
* **Full adder** is the textbook form; its insides are not prescribed.
* Delay and power depend on the implementation, so the RTL does not model
  them. The design is reported to have a much shorter delay and lower
  power than a carry select adder built from carry look-ahead groups, when
  both were mapped to a Spartan-3E FPGA. That figure is not reproduced
  here. The adder has 3075 port bits, so on an FPGA of that class it needs
  an operand interface in front of it. That interface is not part of this
  design.

## Files

| file                    | what it is |
|-------------------------|------------|
| `rtl/csla_pkg.sv`       | slice width, group widths, `group_lsb()` |
| `rtl/full_adder.sv`     | 1-bit full adder |
| `rtl/rca.sv`            | N-bit ripple carry adder |
| `rtl/d_latch.sv`        | gated D latch with `q`, `qn` |
| `rtl/mux2.sv`           | W-bit 2:1 multiplexer |
| `rtl/dlatch_group.sv`   | one time-shared carry select group |
| `rtl/csla16_dlatch.sv`  | 16-bit slice |
| `rtl/csla1024_dlatch.sv`| top: WIDTH-bit adder (default 1024), WIDTH a multiple of 16 |
| `tb/tb_*.sv`            | one self-checking testbench per module |

Top-level ports: `a[WIDTH-1:0]`, `b[WIDTH-1:0]`, `cin`, `en` in;
`sum[WIDTH-1:0]`, `cout` out.

## Verification

Every testbench compares the outputs with integer addition and ends by
printing `TB_RESULT checks=<n> failures=<n>`. Each has a watchdog.

* `tb_full_adder`, `tb_rca` (2- and 5-bit, exhaustive), `tb_mux2`: combinational checks.
* `tb_d_latch`: checks that `q` follows `d` while enabled and holds after
  `e` falls, while `d` keeps toggling.
* `tb_dlatch_group`: covers the 2-, 3-, 4- and 5-bit groups. In a single
  `en` period it reads the latched result, then the live one, then the
  latched one again, switching only `c_in`. This shows both candidate
  sums are available within the same period and that the latches hold.
* `tb_csla16_dlatch`: 20 000 additions, one per `en` period (2 time units
  high, 8 low). It includes patterns that carry across all 16 bits, and it
  counts the latched and live selections in each group.
* `tb_csla1024_dlatch`: 400 additions at the full 1024-bit width. It
  includes `a = ~b` with `cin = 1`, which carries across all 1024 bits, and
  all-ones plus one. It requires every group position to select both
  paths, a carry between slices, and a carry out.

Simulation has zero delay, so these tests check the logic and the
phase-by-phase behaviour, not the real delays.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/csla_pkg.sv tb/tb_csla1024_dlatch.sv --top-module tb_csla1024_dlatch \
    -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another. The full-width build takes
around 15 seconds, and the run itself is instant.

## Changing it

* **Adder width:** set the `WIDTH` parameter of `csla1024_dlatch`. It must
  be a multiple of 16. A wrong value stops elaboration with an error.
* **Slice grouping:** edit `GROUP_W` in `csla_pkg`. Group 0 is always the
  plain ripple adder. The testbenches hard-code the group start bits
  (2, 4, 7, 11) for their selection counts, so update them too.
