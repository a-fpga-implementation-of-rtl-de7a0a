# MPC on a chip: an interior point QP solver in single precision

A model predictive controller works by solving an optimisation problem at each
sample. It predicts the plant over a horizon, picks the sequence of future
input moves that minimises tracking error plus control effort while
respecting limits on inputs and outputs, applies the first move, and repeats
at the next sample. With a linear model and quadratic cost, that problem is a
dense convex quadratic program (QP):

    minimise   1/2 z'Qz + c'z
    subject to J z <= g

Here z holds the n future input moves, and the mc rows of J and g are the
constraints. This design puts the expensive part, the QP solver, into
programmable logic. The QP is built by a host computer from the current state
and sent over an RS232 serial line. The chip solves it in IEEE-754 single
precision with an infeasible primal-dual interior point method, then sends z
back. All vector and matrix work is done one floating point operation at a
time. That keeps the logic small: one adder/multiplier/divider datapath and a
handful of RAM-like arrays.

The default size covers problems of up to 6 unknowns and 80 constraints.
The reference use is a pitch/altitude controller for a small jet (Cessna
Citation 500 longitudinal model):

- 0.5 s sample
- prediction horizon 10
- control horizon 3, so 3 unknowns
- 60 constraints on elevator angle, elevator rate and pitch angle
- 20 more constraints when the altitude rate is also limited

At a 20 MHz clock, one solve takes about 7 to 15 ms.

## Block structure

    rxd -> uart_rx -> host_link -> ipm_qp_solver -> host_link -> uart_tx -> txd
                                     |      |
                                  fp_unit  mat_inv (own fp_unit)

| module | file | what it does |
|---|---|---|
| `mpc_on_chip` | rtl/mpc_on_chip.sv | top level: serial in, solver, serial out, status outputs |
| `uart_rx`, `uart_tx` | rtl/uart_rx.sv, rtl/uart_tx.sv | 8N1 serial line, `CLKS_PER_BIT` clocks per bit (174 = 115200 baud at 20 MHz) |
| `host_link` | rtl/host_link.sv | byte protocol: assembles words, loads the solver, starts it, sends z back |
| `ipm_qp_solver` | rtl/ipm_qp_solver.sv | the interior point method, a sequential state machine |
| `mat_inv` | rtl/mat_inv.sv | Gauss-Jordan inversion of the n x n Newton matrix |
| `fp_unit` | rtl/fp_unit.sv | single precision add, subtract, multiply, divide |
| `mpc_pkg` | rtl/mpc_pkg.sv | shared types (`fp32_t`, `fp_op_e`, `ld_sel_e`) and small float helpers |

Top-level ports:

- `clk`, `rst_n`: asynchronous reset, active low.
- `rxd`, `txd`: the serial lines.
- Status of the last solve:
  - `busy`
  - `converged`: the stopping rule was met.
  - `singular`: the inversion core saw a zero pivot.
  - `iterations`
  - `cycles`: clocks from start to done.
- `rx_frame_err`: pulses when a received frame has a low stop bit.

## The interior point iteration

The solver keeps three vectors:

- z, the unknowns;
- λ ≥ 0, one multiplier per constraint;
- t ≥ 0, one slack per constraint, with Jz + t = g at the solution.

At the optimum λ_i t_i = 0 for every constraint. An interior point method
keeps λ and t strictly positive and drives their products to zero together.
Their average product, the duality measure μ = t'λ / mc, shows how far the
iterate still is from the optimum.

Each iteration linearises the optimality conditions around the current point
and solves for a step. The full Newton system has size n + mc. Because mc is
much larger than n here (60 or 80 against 3), the constraint part is
eliminated and only an n x n system is left. The matrix is

    M = Q + J' diag(d) J,      d_i = λ_i / t_i

M is symmetric positive definite, and it changes every iteration because d
changes.

The solver's phases, in the order the state machine runs them (letters as in
the comments of rtl/ipm_qp_solver.sv):

| phase | computes | work (multiply-adds) |
|---|---|---|
| A | Jz | mc·n |
| B | r1 = −(Qz + J'λ + c), the dual residual | n² + mc·n |
| C | μ = t'λ/mc and the centring target σμ | mc |
| D | rp = g − Jz − t (primal residual), r2 = g − Jz − σμ/λ, d = λ/t, w = d∘r2; then the convergence test | 2 divisions and 1 multiply per row |
| E | M = Q + J' diag(d) J, written into the inversion core | mc·n² |
| F | rhs = r1 + J'w | mc·n |
| G | M⁻¹ by `mat_inv` | about n³ |
| H | Δz = M⁻¹ rhs | n² |
| I | Δλ = d∘(JΔz − r2), Δt = rp − JΔz, and the largest step keeping λ, t > 0 | mc·n, plus a division for each negative Δλ_i or Δt_i |
| J | α = min(1, 0.99 · largest step) | 1 |
| K | z += αΔz, λ += αΔλ, t += αΔt | n + 2mc |

The slack step uses Δt = −t + g − J(z + Δz). This is the same as rp − JΔz and
needs no extra matrix product. Phase E writes each element of M straight
into the inversion core's array, so M needs no storage of its own.

Start point and constants:

- Start point: z = 0, λ = t = 1 (any positive λ, t is allowed, and the method
  does not need a feasible start).
- Centring parameter: σ = 0.1 (`SIGMA`).
- Fraction to the boundary: 0.99 (`ETA`).
- Iteration limit: 50 (`MAX_ITER`).

### Stopping rule, and why the dual residual is not tested

The solver stops when both of these hold:

- μ < 1e-6 (`TOL_MU`);
- max |g − Jz − t| < 1e-5 (`TOL_RES`).

The dual residual r1 is deliberately left out of the test. In single
precision it stops falling once d = λ/t spans many decades. The matrix
J' diag(d) J is then dominated by a few huge entries, and the rounding error
of Qz + J'λ + c is larger than the tolerance. By that point z is already
accurate, so a test on r1 would only make the solver run to its iteration
limit. A small μ together with a small primal residual bounds the duality gap
t'λ = mc·μ, so the returned z is within about mc·μ of the optimal cost.

The other tolerances are this design's choices. With the QP data scaled to
±1, looser settings (1e-4) left z errors above 1e-3 on random test problems.

### Scaling

The host should scale the problem so that all elements lie within ±1. It
multiplies Q and c by one scalar and J and g by another, which does not move
the solution. Unscaled aircraft problems mix entries of very different sizes, and
single precision then gives poor answers. The testbench host does this
scaling. The chip itself does not scale.

## Floating point unit

`fp_unit` is a small IEEE-754 single precision unit:

- Add, subtract and multiply are combinational with a registered result, so
  they have a latency of 1 clock.
- Division is a restoring divider producing one quotient bit per clock, 28
  clocks in total. It takes 1 clock when an operand is zero.
- Rounding is to nearest even, using guard, round and sticky bits.
- Subnormals are flushed to zero. Overflow gives ±infinity. Division by zero
  gives infinity. NaN is never produced; the solver only divides by positive
  quantities.

The solver and the inversion core each have their own unit. The solver's
unit is idle while `mat_inv` runs, so sharing one would save area at the cost
of a multiplexer. Keeping them separate lets `mat_inv` be tested on its own.

## Matrix inversion core

`mat_inv` inverts in place by Gauss-Jordan elimination without pivoting,
which is safe because M is positive definite. For each pivot k:

1. Take the reciprocal of a[k][k].
2. Scale row k by it.
3. Eliminate column k from every other row with a multiply and a subtract.

The pivot's column is overwritten with the inverse's column as it goes, so no
second array is needed. A zero pivot sets `singular`.

Timing, from the clock that samples `start` to `done`, is exactly
1 + n(32 + 5n + 7n(n − 1)) clocks: 268 for n = 3, 1633 for n = 6.

## Host protocol

All numbers are IEEE singles sent as 4 bytes, least significant byte first.
The host sends:

    n (1 byte)  mc (1 byte)
    Q  (n x n, row by row)
    c  (n)
    J  (mc x n, row by row)
    g  (mc)

The solver starts automatically after the last byte of g. When it finishes,
the chip sends back z as n singles in the same byte order.

- A header with n = 0, n > `MAX_N`, mc = 0 or mc > `MAX_MC` is ignored.
- There is no checksum or flow control. The host must wait for the n·4 reply
  bytes before sending the next problem.

For the aircraft problem (3 unknowns, 80 constraints), the download is 1,330
bytes. That is about 115 ms at 115200 baud, so the serial line, not the
solver, limits the rate. The line rate is set by `CLKS_PER_BIT`.

## Performance

Measured over 12 s (24 samples) of each aircraft scenario at the default
parameters and a 20 MHz clock:

| scenario | unknowns / constraints | average iterations | average clocks per solve | time |
|---|---|---|---|---|
| 1: 40 m altitude step | 3 / 60 | 6.0 | 134,332 | 6.7 ms |
| 2: 400 m altitude step | 3 / 60 | 7.1 | 158,328 | 7.9 ms |
| 3: 400 m step, altitude rate ≤ 30 m/s | 3 / 80 | 7.4 | 218,291 | 10.9 ms |
| 4: as 3, plus a 5 m/s altitude-rate disturbance from 5 s to 10 s | 3 / 80 | 7.4 | 218,320 | 10.9 ms |

For comparison, the original Handel-C implementation of the same method
reported 6.6 to 8.6 iterations and 368,527 to 475,133 clocks per sample for
these scenarios, about 20 ms. The iteration counts are close. This design's
iterations are cheaper, and it does not claim the same area or clock rate.
One iteration at 3 x 80 takes about 29,000 clocks. Most of that goes to the
few divisions per constraint (28 clocks each) and to the multiply-adds of
phases A to I, each of which waits for the previous one.

Size: yosys coarse synthesis of the top level at default parameters, not
mapped to any device, gives about 3,000 cells and 1,000 flip-flops. The
problem arrays and the inversion array add 44,224 bits of memory. Area or
clock rate on a particular FPGA has not been measured.

## Departures from the original design

The method, the reduced Newton system, the single precision format, the
sequential datapath, the serial host link and the scaling of the QP data
follow the FPGA MPC design of Ling, Yue and Maciejowski, "A FPGA
Implementation of Model Predictive Control". It was written in Handel-C and
ran at 20 MHz. The rest is this design's own:

- **Floating point library.** The original used a vendor library. This design
  has its own unit with the same format. Its special-value handling and
  latencies are described above.
- **Unspecified settings.** The following were not specified and are this
  design's choices:
  - start point, σ, the step rule, the stopping tolerances and the iteration
    limit;
  - the serial settings (8N1, 115200 baud);
  - the header bytes and the order of c, J and g in the stream.
- **Inversion method.** The inversion method (Gauss-Jordan, no pivoting) is
  this design's choice. The original only calls for a matrix inversion core.
- **Problem size.** Sizes are run-time inputs up to `MAX_N` and `MAX_MC`.
  Defaults are 6 and 80, the largest problems the original evaluated: random
  6 x 32 test QPs and the 3 x 80 aircraft QP. The inversion core was
  reported to handle 128 x 128 on the original device. Here it is sized for
  the solver's n x n matrix (`N_MAX` = 6), though it can be raised.
- **Acceptance test.** The random acceptance test uses Q = H'H + 0.1I
  rather than H'H, so that Q is safely positive definite in single
  precision. The reference is a double precision dual solver.
- **What is not here.**
  - The prototyping board and its FPGA, and resource figures for it.
  - The host software: plant simulation, state estimator, QP set-up and
    scaling. The testbenches play the host.
  - RS232 line drivers: `rxd` and `txd` are logic-level.

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a
watchdog.

| testbench | what it checks |
|---|---|
| tb/tb_fp_unit.sv | about 6,000 operations: directed cases (zeros, exact cancellation, division by zero) and random operands in a range with no subnormal or overflowing results, against a reference rounded from double precision, with exact latencies |
| tb/tb_mat_inv.sv | 40 random positive definite matrices, n = 1..6 (A = H'H + I): A·A⁻¹ = I to 1e-4, the exact clock count, no singular flag |
| tb/tb_ipm_qp_solver.sv | random QPs of the original acceptance test (Q = H'H + 0.1I, sizes up to 6 x 32): z within 1e-3 of a double precision reference solution (Hildreth's dual method); convergence, iteration limit, cycle counter; at least one problem with active constraints |
| tb/tb_uart_rx.sv, tb/tb_uart_tx.sv | random bytes with random gaps or back to back, bit timing and frame length, framing error, a glitch on the idle line |
| tb/tb_host_link.sv | protocol order and addressing, automatic start, byte order of the reply, rejected headers |
| tb/tb_aircraft_scenarios.sv | the four aircraft scenarios of the performance table, 24 samples each, with the QP loaded straight into the solver: convergence, exact cycle counter, constraint violation ≤ 1e-5, cost within mc·1e-6 + 1e-5 of the double precision optimum (the duality gap the stopping rule allows), elevator and pitch limits, final altitude in scenario 1 |
| tb/tb_mpc_on_chip.sv | closed loop at default parameters through the serial line (see below) |

The top-level test simulates the aircraft at the bit level of the serial line.
It runs 8 samples of a 40 m altitude step with 60 constraints, and 8 samples
of a 400 m step with the 80-constraint altitude-rate limit, which becomes
active. For each solve it checks:

- no constraint is violated by more than 1e-5;
- the cost is within 1e-5 of the double precision optimum;
- the solver reports convergence.

It also checks the plant's elevator, pitch and rate limits, and counts that
each mechanism occurred: solves with 60 and 80 constraints, solves with active
constraints, and bytes in both directions.

z is not compared element by element in this test. The scaled aircraft cost
is very flat along some directions. Single precision z can differ there from
the double precision optimum by up to 0.23 rad while the cost differs by less
than 1e-5. The plant response is unaffected. With the 400 m step:

- pitch settles at 13.4°;
- altitude rate rides the 30 m/s limit;
- the elevator first moves to −9°.


## Simulating

With Verilator 5, from the directory that holds rtl/ and tb/, for example
for the top level:

    verilator --binary --timing -Irtl -Itb \
      rtl/mpc_pkg.sv tb/tb_fp_pkg.sv tb/tb_qp_ref_pkg.sv tb/tb_aircraft_pkg.sv \
      rtl/fp_unit.sv rtl/mat_inv.sv rtl/ipm_qp_solver.sv \
      rtl/uart_rx.sv rtl/uart_tx.sv rtl/host_link.sv rtl/mpc_on_chip.sv \
      tb/tb_mpc_on_chip.sv --top-module tb_mpc_on_chip -Mdir obj_top
    ./obj_top/Vtb_mpc_on_chip

This takes about 20 s. The four-scenario run (`tb/tb_aircraft_scenarios.sv`,
which needs only the packages, `fp_unit`, `mat_inv` and `ipm_qp_solver`)
takes about 16 s. For a block testbench, replace the last file and the
top module name (for example `tb/tb_mat_inv.sv` with `--top-module
tb_mat_inv`). Drop the packages that testbench does not use.

Test-only packages:

- `tb_fp_pkg`: conversions between `real` and single precision.
- `tb_qp_ref_pkg`: the reference QP solver and a small matrix inverse.
- `tb_aircraft_pkg`: the aircraft model and the host's QP set-up with
  scaling.

## Things to know before changing it

- The problem arrays and the inversion array are not reset. They are written
  before they are read, which lets synthesis map them to RAM.
- `cycles` counts from the clock that samples `start` to the one that
  raises `done`. The solver testbench checks it clock for clock.
- Raising `MAX_MC` or `MAX_N` only grows the arrays and index widths.
  `iterations` is 8 bits wide, so `MAX_ITER` must stay below 256.
- The stopping tolerances are parameters. A tighter `TOL_MU` costs an
  iteration or two. Tolerances near single precision rounding of the
  residuals will not be met, and the solver then runs to `MAX_ITER` with
  `converged` low.
