# Parallel single-precision solvers: a 2-D FDTD Yee-cell array and a Forward Euler integrator

Many scientific codes solve the same small set of equations over and over,
with only the constants changing from one instance to the next. On a
processor those instances run one after another. In an FPGA each instance
can have its own small circuit, and all of them can run in the same clock
cycle. This RTL applies that idea to two problems, both in IEEE-754 single
precision at a 100 MHz target clock:

* **FDTD electromagnetics.** A two-dimensional finite-difference
  time-domain simulation in which every grid point (Yee cell) has its own
  update circuit. Each circuit holds **one floating-point adder** and nothing
  else that costs area or latency. The default array has 65 cells, and each
  cell has a RAM that records its electric field for up to 512 time steps.
* **Ordinary differential equations.** A Forward Euler integrator for a
  linear first-order equation `dy/dt = a*y + b`. It reuses one multiplier
  and one adder for all four operations of a step.

The two engines stand side by side in `fpga_numerics_top` and share only
the clock and reset.

## The Yee cell: one adder, eight operations

The field is the 2-D TMz mode: `Ez` lies on the grid points, and `Hx` and
`Hy` are offset by half a cell. The fields are in normalised units, with
`c_h = dt/(mu*dx)` and `c_e = dt/(eps*dx)`. One time step (an *iteration*)
has two half steps:

```
H half step   Hx(i,j) <- Hx(i,j) - c_h * (Ez(i,j+1) - Ez(i,j))
              Hy(i,j) <- Hy(i,j) + c_h * (Ez(i+1,j) - Ez(i,j))
E half step   Ez(i,j) <- Ez(i,j) + c_e * ((Hy(i,j) - Hy(i-1,j)) - (Hx(i,j) - Hx(i,j-1)))
```

These need eight additions or subtractions per cell. They are not spread
over eight adders. `yee_cell` sends all eight, one after another, through a
single pipelined `fp_add`, steered by a 3-bit op counter:

| op | A        | B            | op  | result | half step |
|----|----------|--------------|-----|--------|-----------|
| 0  | Ez(i,j+1)| Ez           | −   | T0     | H |
| 1  | Hx       | c_h·T0       | −   | Hx     | H |
| 2  | Ez(i+1,j)| Ez           | −   | T1     | H |
| 3  | Hy       | c_h·T1       | +   | Hy     | H |
| 4  | Hy       | Hy(i−1,j)    | −   | T0     | E |
| 5  | Hx       | Hx(i,j−1)    | −   | T1     | E |
| 6  | T0       | T1           | −   | T0     | E |
| 7  | Ez       | c_e·T0       | +   | Ez     | E |

The multiplications by `c_h` and `c_e` add no cycles. Both coefficients are
**powers of two**, held in the cell as signed 8-bit exponents. Multiplying by
`2**k` is just an addition to the exponent field, which `fp_const_mul` does
combinationally on the adder's B input. This design requires power-of-two
coefficients. As a result, the time step and the materials of a simulation
must be picked so that `dt/(eps*dx)` and `dt/(mu*dx)` are powers of two. Each
cell has its own coefficients, so a region of the grid can model a different
material.

Every op depends on the one before it or reads a register that op may
change. For that reason the counter issues op *n+1* only in the cycle after
op *n* has written its result. An op therefore takes `ADD_LATENCY + 1`
cycles, and a half step takes `4 * (ADD_LATENCY + 1)` = 16 cycles at the
default adder latency of 3.

## The array and its control/counter

`fdtd_array` builds an `NX x NY` grid (13 x 5 = 65 cells by default). Each
cell is wired to its neighbours' field outputs: it reads Ez from the cells
at `i+1` and `j+1`, Hy from `i-1` and Hx from `j-1`. Fields beyond the grid
edge read as zero, so the edge behaves as a perfect electric conductor.
There is no built-in excitation source. A simulation starts from an initial
field that the host loads.

A cell may read its neighbours' fields only while those fields are not
changing. `fdtd_control` makes sure of this by running all cells in lock
step:

```
H_START  start_h pulse to all cells                        1 cycle
H_WAIT   until no cell is busy                             16 cycles + 1
E_START  start_e pulse to all cells                        1 cycle
E_WAIT   until no cell is busy; in the cycle they are all  16 cycles + 1
         idle, every cell's new Ez is written to its
         history RAM at address = iteration number
```

An H half step writes only H fields and reads Ez from its neighbours. An E
half step writes only Ez and reads H from its neighbours. So no cell ever
sees a neighbour value change in the middle of its own update.

**Timing.** One iteration takes exactly 36 cycles. A run of `n_iter`
iterations ends with `done` high `36*n_iter + 1` cycles after the cycle in
which `start` was high. A full run of 512 iterations takes 18,432 cycles,
which is 184.3 µs at 100 MHz. The testbenches check this cycle count.

**History RAMs.** Each cell owns a `field_history_ram`, 512 words of 32 bits
(one block RAM per cell on a Virtex-II class device). After iteration `k` it
holds the cell's Ez at address `k`, so a single run leaves a complete time
history for every cell. A run can be at most `MAX_ITER` iterations long,
because that is all the RAM can record.

### Host interface of the array

| signal | use |
|---|---|
| `load_en, load_cell, load_sel, load_data` | Write one register of cell `load_cell = j*NX + i` while the array is idle. `load_sel` (`fdtd_pkg::field_sel_t`) picks `FLD_EZ`, `FLD_HX`, `FLD_HY` or `FLD_COEF`. The coefficient word has `log2 c_h` in bits [7:0] and `log2 c_e` in bits [15:8], both signed. |
| `start, n_iter` | Run `n_iter` iterations (1..MAX_ITER). A start with `n_iter = 0`, or during a run, is ignored. |
| `busy, done, iter` | Status. `done` pulses for one cycle. |
| `rd_cell, rd_addr -> rd_data` | Ez of cell `rd_cell` after iteration `rd_addr`, one clock after the address is applied. |

Loads are written only into an idle array. Fields stay in the cells after a
run, so a following run continues from the last iteration.

## Number format

`fp_add`, `fp_mul` and `fp_const_mul` all use IEEE-754 binary32 with
round-to-nearest-even. Some simplifications, common in FPGA floating point,
are this design's own choices:

* Subnormal inputs count as zero, and subnormal results are flushed to a
  signed zero.
* Every NaN result is the quiet NaN `0x7FC00000`.
* `inf - inf` and `0 * inf` give NaN. Overflow gives a signed infinity.
* An exact cancellation `x - x` gives `+0`.

Each of `fp_add` and `fp_mul` is one combinational stage followed by
`LATENCY` register stages (default 3). You can retime these with a
synthesis tool, or rewrite them as true stage-by-stage pipelines, without
changing the interface. A new operation is accepted every cycle. Timing
closure at 100 MHz has not been checked on an FPGA. As written, all of the
logic sits before the first register, so a real 100 MHz build would need
that retiming.

## The Forward Euler engine

`euler_solver` integrates `dy/dt = a*y + b` from `y0` with step `h` for
`n_steps` steps. Each step computes `y <- y + h*(a*y + b)` as four dependent
operations:

```
t = a * y   (fp_mul)    t = t + b   (fp_add)    t = h * t   (fp_mul)    y = y + t   (fp_add)
```

With both latencies at 3, a step takes `2*(MUL_LATENCY+1) + 2*(ADD_LATENCY+1)`
= 16 cycles. Step `k` appears on `y_out` with a one-cycle `y_valid` pulse
`16*k + 1` cycles after `start`, together with `y_step = k`. `done` pulses
with the last step. Unlike the FDTD coefficients, `a`, `b` and `h` can be
any single-precision numbers, which is why this engine has a full
multiplier.

## Relation to the published design, and what is not here

This RTL follows the published design in these points:

* One floating-point adder per Yee cell.
* A constant multiplier that adds no clock cycles, and a control/counter
  that sequences the cells.
* 65 cells and 512 recorded iterations on one device.
* IEEE 32-bit numbers and a 100 MHz clock.
* Forward Euler for a linear first-order equation.

The cycle count (36 cycles per iteration, 184.3 µs for 512 iterations)
agrees with the reported run time of about 0.184 ms. The published design
says its control/counter adds no clock cycles to the datapath. Here the
controller spends 2 cycles per half step (the start pulse and the idle
check), 4 of the 36 cycles of an iteration. The adder is busy for the other
32.

The following are choices of this design, made where the published design
gives no detail:

* The TMz update equations and their order of operations.
* Power-of-two coefficients.
* The 13 x 5 shape of the grid.
* The conducting boundary.
* Recording Ez only.
* The adder and multiplier latencies, and the subnormal handling.
* The phase handshake.
* The form of the ODE.
* All host-side interfaces.

Not included:

* **The seven-equation cAMP reaction-network solver.** The published work
  builds it from the Euler engine, but its seven equations and their
  constants are not specified, so no datapath is given for it.
* **Any host link.** The load and read-back ports are plain parallel
  signals.

The default array of 65 cells and 512 iterations is far from a practical
FDTD problem, which needs thousands of cells and thousands of time steps.
`NX`, `NY` and `MAX_ITER` are parameters, but a device of the size the
defaults assume holds only 65 adders.

## Files

| file | contents |
|---|---|
| `rtl/fp32_pkg.sv` | binary32 struct type and helpers |
| `rtl/fdtd_pkg.sv` | load-select, op-destination and scale enums |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv` | pipelined adder/subtractor and multiplier |
| `rtl/fp_const_mul.sv` | zero-latency multiply by `2**k` |
| `rtl/yee_cell.sv` | one cell: op counter, operand muxes, one adder |
| `rtl/fdtd_control.sv` | iteration counter and half-step sequencer |
| `rtl/field_history_ram.sv` | 512 x 32 Ez record per cell |
| `rtl/fdtd_array.sv` | grid of cells, neighbour wiring, read-back mux |
| `rtl/euler_solver.sv` | Forward Euler engine |
| `rtl/fpga_numerics_top.sv` | both engines side by side |
| `tb/fp_ref_pkg.sv` | reference arithmetic for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself. Expected values come from `tb/fp_ref_pkg.sv`,
which computes each binary32 result through the simulator's double-precision
`real` type followed by one explicit round-to-nearest-even step, so they do
not depend on the RTL. The testbenches also check the cycle counts given
above, and each has a watchdog.

* `tb_fp_add` and `tb_fp_mul` run over 3,000 operations each: special values,
  rounding ties, cancellation, overflow and underflow, then random operands.
* `tb_yee_cell` runs 200 random H/E half-step pairs.
* `tb_fdtd_array` runs a 4 x 3 grid, with two runs and every recorded value
  compared.
* `tb_fpga_numerics_top` runs the full default design: 65 cells for 512
  iterations, with all 33,280 recorded Ez values compared against a reference
  FDTD. The Euler engine runs at the same time. This testbench also counts the
  H and E half steps, the records, the boundary cells, the cells with
  differing coefficients, the Euler steps and the cycles in which both engines
  are busy.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp32_pkg.sv rtl/fdtd_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpga_numerics_top.sv \
    --top-module tb_fpga_numerics_top -o sim && ./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. The full-size
run takes well under a minute.
