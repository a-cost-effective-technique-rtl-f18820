# Soft-error detection by temporal sampling: a 32-bit pipelined multiplier

A particle strike on a gate of static CMOS logic produces a short voltage
pulse, a few hundred picoseconds wide at 0.18 µm and narrower in newer
processes. If that pulse reaches a flipflop input inside its setup/hold window,
the flipflop stores a wrong value and the error moves on through the pipeline
unnoticed. The logic itself recovers once the pulse has died away.

This design uses that property. Every pipeline register is duplicated.
- The **master flipflops** sample the stage output on the master clock, as in
  any pipeline, and drive the next stage at once.
- The **slave flipflops** sample the same input again on a **slave clock**,
  which is the master clock delayed by a time D.

If D is longer than any transient pulse, a pulse that corrupted the first
sample has gone by the second one. The two copies then differ, and a
comparator flags the mismatch. Detection costs one extra flipflop per bit, a
comparator and a second clock. The logic is not duplicated, and no stage waits
for the check.

The RTL applies the scheme to an unsigned 32 × 32-bit, five-stage
Wallace-tree multiplier without Booth encoding. The top module is
`ts_wallace_mult`.

## The two timing rules

The scheme works only if two timing inequalities hold. RTL cannot state
them, so the design models them with explicit delays; see "How time is
modelled" below.

**Slave clock delay (lower bound on D).**

    D >= t_hold + W + t_setup + t_skew

Here W is the widest transient pulse. The last pulse that can still corrupt
the master sample starts t_hold after the master edge. It must have ended
t_setup before the slave edge, and the clock skew between the two clocks eats
into the margin. A wider pulse corrupts both samples the same way, and nothing
is flagged.

**Min-timing (upper bound on D).**

    t_cq + T_min >= D + t_hold

Data launched by a master edge reaches the next register at the earliest after
t_cq plus the shortest logic path delay T_min. It must not arrive before that
register's slave flipflops have taken the old value. Otherwise the slave copy
holds the next value, the master copy holds the current one, and every cycle
gives a false alarm. Paths that are too short get delay buffers.

The numbers used here are those of the evaluated 0.18 µm multiplier. All are
defined in `ts_mult_pkg`:

| quantity | value |
|---|---|
| t_setup | 0.16 – 0.17 ns |
| t_hold | 0.06 – 0.065 ns |
| t_cq | 0.18 – 0.348 ns |
| W (max pulse width) | 0.4 ns |
| t_skew | 50 ps |
| D | 0.64 ns |
| T_min | 0.53 ns |

The min-timing rule holds: 0.18 + 0.53 = 0.71 ns ≥ 0.64 + 0.065 = 0.705 ns.
The D rule with these figures asks for 0.67 – 0.685 ns, which is slightly more
than the 0.64 ns used. A silicon implementation should recheck D against its
own library and pulse-width data.

## When the error flag means something

The mismatch flag is combinational. Its meaning changes during each cycle:

```
master edge            slave edge (D later)              next master edge
    |---- flag invalid ----|---------- flag valid ---------------|
    master copy = new      both copies = new
    slave copy  = old      compare reports the new sample
```

Between a master edge and the next slave edge the two copies hold different
cycles' data, so the flag is meaningless there. Read `error` (or
`stage_error`) after the slave edge and before the next master edge. The
testbenches read it at the master clock's falling edge, 2.29 ns after the
rising edge (D = 0.64 ns). A flag raised there refers to what the registers
captured at the last master edge.

Because the master copies go forward unchecked, a corrupted value travels
downstream. Register k holds operation n − (k − 1) when register 1 holds
operation n. A flag on register k therefore means that the operation now in
register k will leave the pipeline 5 − k cycles later with a wrong product. The registers
after it take the corrupted value consistently and raise no further flag.

The design only detects. A result leaving the last register is confirmed
once `error` stays low in the valid window of the cycle in which that result
appears on `product`. A system that cares must also remember flags raised
while that operation was in earlier stages. What to do after an error
(replay, trap, count) is up to the system around the multiplier.

A strike on a master or slave flipflop, rather than on the logic, also makes
the copies differ until the next master edge. Such upsets are flagged too.

## Multiplier pipeline

```
 a,b ─► pp_gen ─► 2 CSA levels ─►[R1]─► 3 CSA levels ─►[R2]─► 3 CSA levels ─►[R3]
        32 rows    32→22→15       15     15→10→7→5      5     5→4→3→2         2
  ─► low 32-bit add ─►[R4]─► high 32-bit add + carry ─►[R5]─► product
```

Each `[Rk]` is a `ts_reg`, with a `min_delay_buf` in front of it. A valid bit
travels with the data in every register.

- **`pp_gen`** forms 32 partial products, row i = b[i] ? a << i : 0, each
  64 bits wide.
- **`csa_level`** is one level of the Wallace tree. It takes the rows three at
  a time through rows of full adders, producing a sum row x⊕y⊕z and a carry
  row maj(x,y,z) << 1. Leftover rows pass through. The row sum is preserved
  modulo 2^64, and the product always fits in 64 bits.
- **`wallace_stage`** chains as many levels as one pipeline stage should hold.
  A 32-row tree has eight levels, split 2 + 3 + 3.
- **`cpa_slice`** adds the two remaining rows. The low 32 bits are added in
  stage 4 with the carry registered; the high 32 bits are added in stage 5.
- **Register widths** are 961, 321, 129, 98 and 65 bits. That gives 1574
  master and 1574 slave flipflops.

Latency: operands applied after master edge n are captured at edge n + 1. The
product appears after edge n + 5, five clock cycles later. Throughput is one
multiplication per cycle.

### Ports of `ts_wallace_mult`

| port | dir | width | meaning |
|---|---|---|---|
| clk_master | in | 1 | master clock |
| clk_slave | in | 1 | master clock delayed by D, supplied from outside (distributed globally) |
| rst_n | in | 1 | asynchronous active-low reset of all master and slave flipflops |
| in_valid, a, b | in | 1, 32, 32 | operation |
| out_valid, product | out | 1, 64 | result, five cycles later |
| stage_error | out | 5 | mismatch flag of R1..R5 |
| error | out | 1 | OR of stage_error |

Parameters:

| parameter | default | meaning |
|---|---|---|
| WIDTH | 32 | operand width |
| S1_LEVELS | 2 | Wallace levels in stage 1 |
| S2_LEVELS | 3 | Wallace levels in stage 2 |
| T_CQ_PS | 180 | clock-to-Q delay, in ps, used by the min-timing model |
| T_MIN_PS | 530 | minimum logic path delay, in ps, used by the min-timing model |

Stage 3 takes whatever levels remain. An assertion checks that the tree ends
in two rows, and a warning at start-up reports T_CQ_PS and T_MIN_PS values that
break the min-timing rule for D = 640 ps.

## How time is modelled

In zero-delay RTL, a flipflop output changes at the clock edge and
combinational logic settles in zero time. Without help, new data would
therefore reach every register input at the master edge, long before the slave
edge: a min-timing violation in every cycle. `min_delay_buf` is a behavioural
model of the hold buffers. It delays each register input by t_cq + T_min
(710 ps by default). In simulation, new data therefore arrives 710 ps after
the master edge, after the slave edge at 640 ps, just as in the evaluated
circuit. Synthesis ignores the delay and sees a wire. In a real
implementation, the place-and-route tool must meet a minimum-delay
constraint of D + t_hold − t_cq on every path into a register.

The slave clock is a port. The testbenches produce it with `slave_clk_gen`
(`tb/`), a behavioural delay of D = 640 ps on the master clock. Generating
it locally with a buffer chain on the master clock is the alternative;
`slave_clk_gen` models either one.

All files use `timescale 1ps/1ps`.

## Design choices beyond the scheme

These are not fixed by the technique and were chosen here:

- operands are unsigned;
- the split of the tree and of the final adder over the five stages;
- the valid bit;
- asynchronous reset of both copies, so that no mismatch follows reset;
- `stage_error` brought out alongside the ORed `error`;
- rows kept at the full 64-bit width, leaving the trimming of constant-zero
  bits to synthesis;
- the adder architecture, left to synthesis.

Flipflop timing, D, T_min, the width, the five stages, the non-Booth Wallace
tree, the doubled registers with XNOR/OR comparison, and global clocks follow
the technique as evaluated.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it shows |
|---|---|
| tb_ts_compare | mismatch is raised for any differing bit, never for equal words |
| tb_ts_reg | normal sampling; a 400 ps transient flagged; a pulse lasting past the slave edge missed (both copies wrong); early data (min-timing violation) causing a false alarm; a flipflop upset flagged; reset |
| tb_ts_reg_pulse_sweep | pulse width swept from 150 to 1200 ps against D = 640 ps: a pulse is caught exactly when it has ended by the slave edge |
| tb_min_delay_buf | old value still present at D and at D + t_hold, new value after t_cq + T_min |
| tb_pp_gen, tb_csa_level, tb_wallace_stage, tb_cpa_slice | arithmetic against products and sums computed in the testbench |
| tb_ts_wallace_mult | full default design, about 3000 cycles of random operations with bubbles; faults injected at random into each of the five registers (see below); every product, its five-cycle latency and every flag checked; each mechanism counted and required to happen |
| tb_ts_wallace_mult_mintiming | T_min cut to 300 ps: false alarms every cycle while all products stay right |

`tb_ts_wallace_mult` injects three kinds of fault:
- a 400 ps transient on a register input;
- an upset of a master flipflop;
- an 800 ps pulse that outlasts D.

It checks three things:
- the first two are flagged on exactly the right register;
- the third goes unflagged;
- in all three cases the affected product is wrong.

Faults are injected with `force`/`release` on internal signals.

Running a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/ts_mult_pkg.sv tb/tb_ts_wallace_mult.sv --top-module tb_ts_wallace_mult
obj_dir/Vtb_ts_wallace_mult
```

Replace the testbench name to run another one. `--timing` is needed for the
delays in the clock and buffer models. `-Wno-fatal` lets the build through a
MULTIDRIVEN warning: the testbench's `force` on a flipflop variable counts as
a second writer. Lint: `verilator --lint-only -Wall --timing -y rtl
+libext+.sv rtl/ts_mult_pkg.sv rtl/ts_wallace_mult.sv`.

## Limits

- Detection assumes one strike per cycle. Two strikes in the same logic
  within one cycle can outlast D and corrupt both samples identically.
- Dynamic logic does not recover after a strike, so the scheme does not
  apply to it.
- The behavioural delays model the timing rules, not a real netlist. Whether
  D and the buffers meet the rules is a matter for static timing analysis.
- The area, power and timing overheads of the technique cannot be measured
  from this RTL.
