# PCI motion controller with sawtooth-free DDA arc interpolation

This is the FPGA logic of a two-axis (X-Y) motion control board, for machines
such as plotters and surface-mount placers. It has two parts:

* **A PCI target.** It is built into the FPGA, so the board needs no separate
  PCI bridge chip. The host enumerates the board, sets it up through I/O
  space and streams motion instructions into it through memory space.
* **A digital differential analyser (DDA).** It moves the tool along a
  circular arc in unit steps on the two stepper axes. The plain DDA arc
  algorithm has two weak points, and this design fixes both:
  * It drifts far off the arc when the radius is large compared with its
    accumulator. The fix is to weight the integrands by a factor
    λ = 2^-k.
  * Its path has "sawteeth": an X step and a Y step land on successive
    clock ticks when the tool should have moved diagonally. The fix is an
    *advanced overflow* that merges the two into one diagonal step.

Everything is synthesizable SystemVerilog. It runs on the 33 MHz PCI clock.

```
 PCI bus ─(level converters, off chip)─► pci_target ─┬─► func_regs ──(mode, arc)──► dda_arc ───┐
                                                     │                                        ├─► pulse_out ─► X/Y step, dir
                                                     └─► data_fifo ───► instr_reg ────────────┘
                                 CAN side ─► ext_* ──┘        mcu_status ◄── func_regs
```

## The arc interpolator (`dda_arc`)

### Recursion

The arc is centred on the origin. Each axis has two registers:

* an **integrand**: the X integrand is |y| and the Y integrand is |x| of the
  current point;
* an **integral accumulator**.

On every tick of the integral clock, each accumulator adds its integrand.
When a sum reaches the threshold T, that axis **overflows** and moves one
unit. Because the tangent of a circle is (−y, x), the X axis moves at a rate
proportional to |y| and the Y axis at a rate proportional to |x|.

* Both accumulators start **half loaded**, at T/2.
* An ordinary overflow keeps the remainder, `sum mod T`.
* Each axis stops once it reaches its end coordinate (its *arriving
  trigger*). The arc is done when both axes have arrived.

### Weighting

The threshold is T = 2^(n+k). Adding |y| against 2^(n+k) is the same as
adding λ·|y| against 2^n with λ = 2^-k. So the weighting factor costs no
multiplier, only k more accumulator bits. Both n (1..16) and k (0..7) are set
at run time. The reset values are n = 16 and k = 3, which is λ = 1/8.

### Sawtooth elimination

A sawtooth appears when one axis overflows on a tick and the other would
overflow on the very next tick. With `improved` set, the unit checks this
case on every tick:

```
ov_x  = sum_x ≥ T                       (ordinary overflow)
adv_x = sum_x + λ|y| ≥ T                (would overflow next tick)
step_x = ov_x  or (adv_x and ov_y)      (and the same with x and y swapped)
```

An axis stepped early keeps `sum − T`. That value is negative: the
accumulator "owes" the step it took in advance. For this reason the
accumulators carry a sign bit and a carry bit beyond the n+k magnitude bits.

With `improved` clear, the unit is the weighted DDA. With k = 0 as well, it
is the traditional DDA.

### Worked numbers

| arc | mode | unit steps | combined steps | path variance V |
|---|---|---|---|---|
| (8,0)→(0,8), n = 4 | traditional | 16 | 0 | – |
| R = 100 quarter, n = 5, k = 3 | weighted | 184 | 0 | 0.132 |
| R = 100 quarter, n = 5, k = 3 | sawtooth-free | 147 | 53 | 0.086 |
| R = 100 quarter, n = 4, k = 0 | traditional | 108 | – | > 10× the weighted value |

V is the mean squared distance of the visited points from the arc:
V = Σ(√(x²+y²) − R)² / (m − 1) over the m points.

For the first row, the 16 steps give exactly the published lattice path of
this example:

```
(8,0) (8,1) (8,2) (8,3) (7,3) (7,4) (7,5) (6,5) (6,6) (5,6) (5,7) (4,7) (3,7) (3,8) (2,8) (1,8) (0,8)
```

The published variances for the radius-100 arcs (15.63 traditional, 0.4223
weighted, 0.4051 sawtooth-free) come from an accumulator width that was not
published, so they are not reproduced. The ordering they show is reproduced.

### Quadrants, timing, interface

* **Quadrants.** The step directions come from the signs of the current
  coordinates and `ccw`. Arcs may therefore run clockwise and may cross
  quadrant boundaries. The algorithm itself is derived for the first
  quadrant only.
* **End point.** It must lie on the lattice path the recursion follows. If it
  does not, the unit runs until `halt`.
* **Start.** Pulse `start` for one clock with the start and end points and the
  mode inputs stable; they are captured on that clock.
* **Ticks.** There is one tick every `div`+1 clocks, and at most one step per
  axis per tick.
* **Outputs.** `step_x` and `step_y` are one-clock strobes, with `dir_x` and
  `dir_y` valid in the same clock. `combined` marks a diagonal step. `done`
  pulses one clock after the last step.

## The PCI target (`pci_target`)

### Accesses it claims

A 32-bit, 33 MHz target with a type-0 configuration header. The header holds:

* vendor and device ID (parameters, placeholder values);
* a command register with the I/O and memory enables;
* class code 0x118000;
* BAR0: 4 KiB of memory;
* BAR1: 32 bytes of I/O;
* the interrupt line (no interrupt pin).

Accesses are claimed as follows:

| access | claimed when | back end |
|---|---|---|
| configuration read/write | IDSEL high and AD[1:0] = 00 | header above |
| I/O read/write | address in BAR1 and I/O enabled | `func_regs` |
| memory write (including write-and-invalidate) | address in BAR0 and memory enabled | `data_fifo`, bursts allowed |
| memory read (read, multiple, line) | address in BAR0 and memory enabled | status word |

### State machine

| state | role |
|---|---|
| `idle` | watch for an address phase (FRAME# falling) and decode it |
| `read_wait` | AD turnaround clock of a read |
| `read_wait2` | read data fetched from the selected space |
| `con_wait`, `io_wait`, `mem_wait` | access claimed (DEVSEL# low), getting ready to answer |
| `con` | configuration data phase |
| `rw` | I/O or memory data phase(s) |
| `backoff` | DEVSEL#, TRDY# and STOP# driven high for one clock, then released |

A write goes `idle → *_wait → con|rw → backoff`. A read goes
`idle → read_wait → read_wait2 → *_wait → con|rw → backoff`.

### Timing

Clocks are counted from the address phase, which is clock 0.

* DEVSEL# is asserted in clock 1 (fast decode).
* TRDY# comes in clock 2 for a write and in clock 4 for a read.
* Memory write bursts move one word per clock, which is the 132 MB/s peak of
  the bus.
* Configuration and I/O accesses move one word. STOP# goes out with TRDY#, so
  a master that tries a burst is disconnected.
* If the FIFO is full, the target holds TRDY# high and asserts STOP#. This is
  a retry, or a disconnect if some words have already moved. STOP# stays
  asserted until FRAME# goes high.
* PAR follows read data by one clock.

### Not implemented

Parity error and SERR# reporting, interrupts, 64-bit and dual-address
cycles, and claiming a fast back-to-back transaction that starts during
`backoff`.

### Bus lines

Every PCI line comes as separate `_i`, `_o` and `_oe` signals, for the
external 5 V/3.3 V bus switches. DEVSEL#, TRDY# and STOP# share one enable,
`ctl_oe`. Assertions in the module check that:

* TRDY# and STOP# only come while DEVSEL# is asserted;
* AD is only driven for a claimed read;
* STOP# holds until the data phase ends.

## Programming model

### I/O space: function registers (`func_regs`)

Registers sit at BAR1 + 4·index. Writes honour the byte enables.

| idx | name | access | contents |
|---|---|---|---|
| 0 | CTRL | rw | [0] ccw, [1] sawtooth elimination, [2] pulse source (1 = DDA, 0 = instructions), [3] run FIFO instructions, [10:8] k, [20:16] n. Reset value 0x0010_0303 |
| 1 | CMD | wo | [0] start arc, [1] halt arc, [2] flush FIFO, [3] halt instruction, [4] clear positions. Each bit gives a one-clock strobe |
| 2 | START | rw | {ys, xs}, signed 16-bit each |
| 3 | END | rw | {ye, xe} |
| 4 | DIV | rw | integral clock period − 1 (reset value 15) |
| 5 | PULSE | rw | step pulse width in clocks (reset value 4) |
| 6 | STATUS | ro | [0] arc busy, [1] arc done (sticky, cleared by start), [2] instruction busy, [3] FIFO empty, [4] FIFO full, [5] pulse overrun, [31:16] FIFO word count |
| 7 | POS | ro | {y, x}: net steps sent to the motors since the last clear |

### Memory space

A memory write at any offset in BAR0 pushes its words into the 512-word FIFO.
A memory read returns STATUS.

### Motion instructions (`instr_reg`)

Each FIFO word is one motion instruction (`motion_pkg::instr_t`):

```
[31] axis (0 = X, 1 = Y)  [30] direction (1 = +)  [29:16] period − 1  [15:0] pulse count
```

When CTRL[3] is set, the instruction register takes the head word. It then
sends `count` step strobes on that axis, one every `period`+1 clocks, and
takes the next word one clock after the last strobe. A count of 0 is a no-op.

### Pulse output (`pulse_out`)

The pulse output register selects one of the two sources with CTRL[2]. For
each step request it:

* sets the direction line at once;
* raises the step line on the next clock, so the direction is stable before
  the edge;
* holds the step line high for PULSE clocks.

A request that arrives while a pulse is still high is counted in POS but sets
the overrun flag, because the driver cannot see it.

### Other ports

* `ext_wr`, `ext_data`, `ext_ack`: a second FIFO write port, for a CAN
  controller. A PCI write wins a clash.
* `mcu_status`: STATUS for an on-board microcontroller.

### Bringing up an arc

1. Set the BARs and the command register.
2. Write CTRL with source = DDA and the wanted n, k and mode.
3. Write START, END, DIV and PULSE.
4. Write CMD = 1.
5. Poll STATUS[1].

## How far this follows the original design

**Taken from it:**

* the partition into blocks;
* the 32-bit, 33 MHz PCI target and its three access types;
* the state names of the target's state machine and which states lead to
  which;
* the DDA recursion: half loading, integrand cross-coupling, weighting,
  advanced overflow, the two extra accumulator bits and the end condition;
* the example arc and the radius-100 experiments.

**Choices made here where the original is silent:**

* the conditions on the state transitions and the exact clock timing of the
  target;
* IDs and BAR sizes;
* the whole register map, the instruction word, the FIFO depth and the
  pulse format;
* coordinate and accumulator widths;
* the integral clock as a programmable divider;
* the CAN and MCU ports.

**Readings of unclear points:**

* The overflow test is taken as "sum ≥ 2^n", to agree with the "mod 2^n"
  update.
* λ applies to both the overflow test and the accumulator update.
* The advanced overflow is taken only when the other axis really overflows
  on the same tick.

**Departures:**

* λ can only be a power of two.
* Left-shift normalisation, mentioned but not described in the original, is
  not built.
* The traditional and weighted modes remain selectable, but reset selects the
  sawtooth-free mode with λ = 1/8.

**Outside this RTL:** the level converters, the microcontroller and its
firmware, the CAN controller, the motor drivers, and the power and board
design.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. All of them run with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/motion_pkg.sv tb/tb_motion_ctrl_top.sv --top-module tb_motion_ctrl_top
./obj_dir/Vtb_motion_ctrl_top
```

| testbench | what it shows |
|---|---|
| `tb_motion_ctrl_top` | the whole board at default parameters, driven over PCI: enumeration, the example arc matched to the published path, the R = 100 sawtooth-free arc matched to a model, instruction bursts, 64-word bursts at one word per clock, FIFO full/retry, flush, disconnect, the external port, overrun and halt. Each mechanism is counted |
| `tb_pci_target` | header, BAR sizing, byte enables, master abort, DEVSEL#/TRDY# latencies, bursts, retry and disconnect, parity, no AD contention, every state visited |
| `tb_dda_arc` | the example path, five arcs step by step against an integer model, the variance ordering, divider phase, halt |
| `tb_func_regs`, `tb_data_fifo`, `tb_instr_reg`, `tb_pulse_out` | the smaller blocks |

`tb/pci_master_bfm.sv` is the behavioural PCI master that the PCI tests use.
