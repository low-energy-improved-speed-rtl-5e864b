# Bit-parallel iterative CORDIC cell

A CORDIC (COordinate Rotation DIgital Computer) turns a vector rotation, or
the inverse tangent of a vector, into a sequence of shifts and additions.
No multiplier is needed. Each iteration i turns the vector (x, y) by
±atan(2^-i), which costs one shift and one addition per coordinate:

    x' = x - d * (y >> i)
    y' = y + d * (x >> i)
    z' = z - d * atan(2^-i)          d = +1 or -1

This design is the *bit-parallel iterative* form of that algorithm. All bits
of a word are processed at once. One set of registers, multiplexers and
full-adder based adder-subtracters is reused for every iteration, so an
operation takes one clock per iteration. The circuit is meant as a small,
low-power arithmetic cell for a robot controller, where rotating vectors and
computing headings (atan) are the common jobs.

Two operations are available:

| mode | chooses d from | result after ITER iterations |
|---|---|---|
| rotation (`MODE_ROTATE`) | sign of z (drive z to 0) | x = K(x₀cos z₀ − y₀sin z₀), y = K(y₀cos z₀ + x₀sin z₀), z ≈ 0 |
| vectoring (`MODE_VECTOR`) | sign of y (drive y to 0) | x = K·√(x₀² + y₀²), y ≈ 0, z = z₀ + atan(y₀/x₀) |

K = ∏ √(1 + 2^-2i) ≈ 1.6468 is the CORDIC gain. It is **not** removed; a
caller that needs unit gain multiplies by 1/K ≈ 0.6073 (or pre-scales the input).

## Datapath

```
            x_in  y_in  z_in
              |     |     |
   load ->  [mux] [mux] [mux]   <- fed-back x', y', z'
              |     |     |
            [reg] [reg] [reg]   (cordic_reg, enabled on load / iterate)
              |  \  /  |  |
              | >>i  >>i  |        cordic_shift (barrel, arithmetic)
              |   \/      |
              |  bit-cell chain    cordic_bit_cell x WIDTH (controlled by d)
              |   /  \    |
          [x adder] [y adder] [z adder] <- atan(2^-i) from cordic_atan_rom
                                   cordic_rca = ripple of cordic_full_adder
```

* **Registers and input multiplexers.** Each of x, y and z has a
  `cordic_reg` fed by a `cordic_mux2`. In the load cycle the multiplexer
  selects the external operand. During the iterations it selects the
  adder-subtracter result.
* **Shifters.** `cordic_shift` shifts x and y arithmetically right by the
  iteration index. This gives the 2^-i factor.
* **Bit-cell chain and adder-subtracter** (`cordic_xy_addsub`). This is the
  least obvious part. See the next section.
* **z lane.** z is updated by another `cordic_rca`. Its operand is the
  arctangent constant, complemented when z must decrease.
* **Arctangent table** (`cordic_atan_rom`). The table is computed during
  elaboration by `cordic_pkg::atan_angle`, from the series
  atan(t) = t − t³/3 + t⁵/5 − … with t = 2^-i. The series is evaluated in
  Q62 fixed point on 128-bit integers, and atan(1) = π/4 is used directly.
  The table therefore follows `WIDTH` and `ITER`. For the defaults, the
  entries are 8192, 4836, 2555, 1297, 651, 326, 163, 81, 41, 20, 10, 5, 3,
  1, 1, 0.
* **Controller** (`cordic_ctrl`). A two-state FSM (idle/run) with an
  iteration counter. It drives the multiplexer select (`load`), the register
  enables (`iterate`), the shift amount and the arctangent index
  (`iter_idx`), and the `done` pulse.

## The bit cell and how it subtracts

The basic cell is a three-input, three-output slice with this truth table:

| x0 y0 z0 | xn yn zn |
|---|---|
| 000 | 000 |
| 001 | 111 |
| 010 | 010 |
| 011 | 101 |
| 100 | 100 |
| 101 | 011 |
| 110 | 110 |
| 111 | 001 |

Its function is xn = x0 ⊕ z0, yn = y0 ⊕ z0 and zn = z0. Here it is used as
the operand-conditioning slice of the adder-subtracter:

* x0 and y0 are one bit of the shifted x and the shifted y.
* z0 is the direction control, `neg` = (d = −1).
* zn passes the control on to the next slice. WIDTH slices in a chain
  condition a whole word. The chain starts at bit 0.

When `neg` = 1, both shifted operands are inverted. Adding ~b + 1 is a
subtraction, so each adder's carry-in provides the "+1":

| lane | operand into `cordic_rca` | carry-in | neg = 0 (d=+1) | neg = 1 (d=−1) |
|---|---|---|---|---|
| y | cell xn = (x>>i) ⊕ neg | neg | y + (x>>i) | y − (x>>i) |
| x | ~(cell yn) = ~((y>>i) ⊕ neg) | ~neg | x − (y>>i) | x + (y>>i) |

The x lane must subtract exactly when the y lane adds. It therefore inverts
the conditioned operand once more, and uses the inverted carry-in. Note the
crossing: the cell's x input carries the shifted x, which is added into the
y lane, and vice versa.

The direction is taken as follows:

* Rotation mode: `neg = z[W-1]`. A negative remaining angle means turning
  clockwise.
* Vectoring mode: `neg = ~y[W-1]`. A non-negative y means turning clockwise,
  towards the x axis.

## Truth-table verification mode

The cell's truth table can be checked on the finished circuit, one word at a
time. While the unit is idle (`ready` = 1), `test_mode` = 1 switches
multiplexers in three places:

* the cell operands come from `x_in` and `y_in` instead of the shifters;
* each slice i takes its own control bit `z_in[i]` instead of the chained
  direction;
* the output multiplexers show the cell outputs instead of the registers.

The result is x_out[i] = x_in[i] ⊕ z_in[i], y_out[i] = y_in[i] ⊕ z_in[i] and
z_out[i] = z_in[i]. The path is purely combinational. `test_mode` is ignored
while an operation runs, so it cannot corrupt an operation in progress.

## Number formats and ranges

* x and y are `WIDTH`-bit two's complement integers.
* z is a binary angle: 2^WIDTH is one full turn. For WIDTH = 16, +45° is
  8192, +90° is 16384, and −180° is −32768.
* There is no quadrant pre-rotation. Rotation mode converges for
  |z₀| ≤ 90° (the hard limit is about 99.9°). Vectoring mode needs x₀ > 0.
* There is no overflow protection. With |(x₀, y₀)| ≤ 2^(WIDTH−2), every
  intermediate stays inside the word, because the growth is at most K.
  Results wrap modulo 2^WIDTH otherwise.
* Accuracy at the defaults (16 bits, 16 iterations), measured against exact
  math over about 400 random operations: within 10 LSB on x and y. The angle
  is within 6 LSB (about 0.03°) for vectors of magnitude ≥ 4000. Shorter
  vectors resolve the angle more coarsely.

## Interface and timing (`cordic_iter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears registers, FSM idle) |
| `start` | in | 1 | start an operation; taken only when `ready` = 1 |
| `mode` | in | `cordic_mode_e` | `MODE_ROTATE` (0) or `MODE_VECTOR` (1), sampled with `start` |
| `test_mode` | in | 1 | truth-table verification mode (idle only) |
| `x_in`, `y_in`, `z_in` | in | WIDTH | operands, sampled with `start` |
| `ready` | out | 1 | idle |
| `done` | out | 1 | one-cycle pulse, results valid |
| `x_out`, `y_out`, `z_out` | out | WIDTH | results; held until the next start |

The cycle of an operation:

* Cycle 0: `start` with `ready` = 1 loads the operands.
* Cycles 1 … ITER: the iterations i = 0 … ITER−1 run.
* Cycle ITER+1: `done` = 1 and `ready` = 1. A new `start` may be given in
  this same cycle.

The throughput is therefore one operation every ITER+1 = 17 clocks.

Parameters (`cordic_iter`): `WIDTH` = 16 and `ITER` = 16. The number of
iterations is set equal to the word width, one iteration per bit of
precision. Both can be changed. `ITER` should not exceed `WIDTH`, because
further iterations only shift the operands to zero. Keep `WIDTH` ≤ 64 for
the table function.

## Files

| file | content |
|---|---|
| `rtl/cordic_pkg.sv` | `cordic_mode_e`, arctangent constant function |
| `rtl/cordic_full_adder.sv` | full-adder cell |
| `rtl/cordic_rca.sv` | ripple-carry adder of full adders |
| `rtl/cordic_bit_cell.sv` | truth-table bit cell |
| `rtl/cordic_xy_addsub.sv` | bit-cell chain plus x/y adders |
| `rtl/cordic_mux2.sv`, `rtl/cordic_reg.sv` | word multiplexer, enabled register |
| `rtl/cordic_shift.sv`, `rtl/cordic_atan_rom.sv` | barrel shifter, arctangent table |
| `rtl/cordic_ctrl.sv` | iteration controller (with handshake assertions) |
| `rtl/cordic_iter.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on its own.
Each one has a watchdog. For example, the end-to-end test:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/cordic_pkg.sv tb/tb_cordic_iter.sv --top-module tb_cordic_iter -o sim
./obj_dir/sim
```

For the other benches, replace `tb_cordic_iter` with their name.

`tb_cordic_iter` runs the top level at its default size with about 400
random and directed operations. It checks:

* every result bit-exactly against an independent integer model of the
  algorithm, whose arctangent table comes from the real `$atan`;
* every result against the exact trigonometric result, within a tolerance;
* the latency of ITER+1 cycles;
* the truth-table mode, slice by slice.

It also counts that each mechanism occurred: both modes, both rotation
directions, back-to-back starts, starts ignored while busy, and verification
requests ignored while busy. The block testbenches check the full adder
exhaustively, the bit cell against its literal table, and the adder,
adder-subtracter, register and multiplexer against integer models. The
controller testbench checks its cycle-by-cycle sequence.

## What is specified and what is chosen here

These parts follow the reference design:

* the bit-parallel iterative organisation from registers, multiplexers and
  full adders;
* the three-bit cell and its truth table;
* multiplexers for input and output selection;
* the multiplexer-selected switch between the algorithm and a truth-table
  verification mode;
* the two functions, vector rotation and inverse tangent.

That design is a pass-transistor circuit. Here each cell is written as its
logic function, so none of its transistor-level properties carry over. That
includes the gate count, delay, power and leakage.

These are choices made here, because the reference leaves them open:

* the word width and iteration count (16 each);
* the binary-angle format;
* the shifter and the arctangent table;
* the ripple-carry adder topology;
* the controller, the start/ready/done handshake and the reset behaviour;
* how the verification mode is driven and observed (combinational,
  idle-only);
* the reading of the truth table as the operand-conditioning slice of the
  adder-subtracter.

Not provided:

* gain compensation;
* quadrant extension beyond ±90°;
* overflow saturation;
* the linear and hyperbolic CORDIC modes (multiplication, division).

## Synthesis notes

All modules are synthesizable. The only exception is the `assert property`
checks in `cordic_ctrl`, which a synthesis tool ignores. The arctangent table
is a constant function evaluated at elaboration time, so no memory
initialisation file is needed. At the defaults, the top level maps to 55
flip-flops, plus three 16-bit ripple adders, two barrel shifters, the 16-entry
constant table and the multiplexers. The unused carry-outs of the three
adders are left open on purpose.
