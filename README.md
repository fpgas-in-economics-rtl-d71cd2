# A pipelined value function iteration engine

This RTL solves the Bellman equation of the standard real business cycle
(RBC) model by value function iteration (VFI). It does not spread grid points
over many cores. It builds one deep pipeline, an "assembly line", that
finishes the maximisation for one grid point on every clock cycle:

    V(k,z) = max over k' of  (w(k,z) - k')^(1-eta) / (1-eta)
                             + beta * sum_z' V(k',z') Q(z',z)

    w(k,z) = z k^alpha + (1-delta) k      (wealth: output plus undepreciated capital)

At the default size, k has 65 536 grid points and z has 4. Finding the best
k' for one grid point takes a 15-step three-point binary search. Each step
is a pipeline stage of 60 cycles with its own memories and its own three
copies of the objective function datapath. The pipeline therefore holds
900 grid points in flight and returns one result per clock. One sweep over
all 262 144 grid points takes 262 144 + 901 cycles. At 250 MHz, 1 352
iterations (a typical run to convergence for this calibration) take
1352 × 263 045 / 250e6 ≈ 1.42 s.

The architecture is that of Peri's FPGA accelerator, "A Hardware Approach to
Value Function Iteration". The fixed-point arithmetic, the power function's
insides, the memory organisation and the host interface were designed for
this RTL. The section "Choices and departures" lists every such choice.

## The three-point binary search

This is the part that needs the most care. The objective is single-peaked
in k' (concave utility plus a concave continuation value). A search can
therefore shrink the candidate range by half at every step, as long as it
keeps the best point found so far inside the range.

A stage keeps two numbers for each grid point in flight:

* `h*(n)`: the left end of the current search range, counted in units of
  `Step(n) = NK / 2^(n+1)`. The range is `[h*(n), h*(n)+4]` in those units.
* `j*(n)`: a code from 0 to 4 for where the maximum of stage n lies inside
  that range, counted in half-steps.

Stage n computes

    h*(n)  = 2 h*(n-1) + j*(n-1)            (stage 1 gets h*(0) = j*(0) = 0)
    i(n,j) = Step(n) * (h*(n) + j),  j = 1, 2, 3

It evaluates the objective at grid indexes i(n,1..3) in parallel and then
encodes the winner:

| outcome of h1, h2, h3          | j* |
|--------------------------------|----|
| h1 is the only maximum         | 0  |
| h1 = h2 are the maximum        | 1  |
| h2 is the only maximum         | 2  |
| h1 = h2 = h3                   | 2  |
| h2 = h3 are the maximum        | 3  |
| h3 is the only maximum         | 4  |
| h1 = h3 > h2 (not single-peaked) | 2 |
| all three infeasible           | 0  |

The next range is centred on the winner and is half as wide. Take a
65 536-point grid whose peak lies near index 56 000:

| stage | Step  | h* | indexes evaluated      | winner | j* |
|-------|-------|----|------------------------|--------|----|
| 1     | 16384 | 0  | 16384, 32768, 49152    | 49152  | 4  |
| 2     | 8192  | 4  | 40960, 49152, 57344    | 57344  | 4  |
| 3     | 4096  | 12 | 53248, 57344, 61440    | ...    |    |

At each stage the middle candidate is the previous winner, so the best value
seen so far is never lost.

**Last stage.** Stage 15 has Step = 1. It evaluates four indexes,
`h*(15) + 0..3`, not three. The extra candidate `h*(15)` is the only way
grid index 0 can be chosen, because no earlier stage ever visits it. The
policy is `i* = h*(15) + j`, where j is the position of the first maximum
among the four. The value `V(k,z)` is that maximum.

**Feasibility.** A candidate with consumption `w - k' <= 0` is infeasible. It
gets the most negative fixed-point code, so it loses against any feasible
candidate. Because the grid is increasing, the feasible k' form a prefix of
the grid. If all three candidates of a stage are infeasible, they are equal,
but the stage does not read this as a plateau: it moves left (j* = 0). Small
k with a wide grid hits this case in the first stages.

## One stage, cycle by cycle (`search_stage`)

| cycles  | work                                                            |
|---------|-----------------------------------------------------------------|
| 0 – 5   | compute h*(n) and the indexes; read k'(i) and the row V(k'(i), z'_0..3) from the stage's own memories |
| 5 – 56  | three objective units in parallel (51 cycles)                   |
| 56 – 60 | compare, encode j*, register the outputs                        |

Stage n+1 receives h*(n), j*(n) and the winner's value from stage n. Beside
the stages, a 60-cycle stage delay carries the grid point's z, its wealth
w(k,z) and its address (k,z), so that every stage works on the same point.

## The objective datapath (`objective_unit`, `pow_unit`)

Two branches run side by side and meet in a final adder. The latencies are
the design's schedule. Each operator is computed in one cycle and then
padded with registers to its slot.

    utility:      w - k' (8)  ->  x^(1-eta) (33)  ->  * 1/(1-eta) (5)  ┐
    expectation:  4 x V*betaQ (5) -> add (5) -> add (5) -> wait (31)   ┴-> add (5)   = 51

The operator count matches the original design's budget for one objective
evaluation:

* 5 adders/subtractors: 1 subtract, 3 in the sum, 1 final add.
* 6 multipliers: 4 products, the 1/(1-eta) scaling, and p·log2 x inside the
  power.
* One logarithm and one exponential.

`pow_unit` computes `x^p = 2^(p log2 x)` in exactly 33 stages:

1. Normalise x = 2^e · m.
2. Find 15 fraction bits of log2 m by repeated squaring (m² ≥ 2 means a 1 bit).
3. Multiply by p.
4. Form the exponential of the 15 fraction bits as a product of the
   constants 2^(2^-i).
5. Shift by the integer part.

The constants are listed in `vfi_pkg::exp2_root`; entry i is
round(2^(2^-i) · 2^30). The relative error is about 2^-15. Results above the
number range saturate.

## Memories and the iteration loop

Every stage holds its own copy of two tables (`stage_ram`):

* the capital grid k'(i), NK words;
* the value function, one word of NZ values per k', in two banks (2·NK
  words).

Iteration i reads one bank. Each new V(k,z) leaving the pipeline is written
into the other bank of every stage (a broadcast write), and also into a
result table for the host. When all NK·NZ results of an iteration are back,
`vfi_controller` swaps the banks and starts the next sweep. The sweep order
is k fastest, then z. The drain between iterations costs 901 cycles, which
is 0.3 % of a sweep at the default size.

The default size needs 15 × (16 Mbit values + 2 Mbit grid) plus 8 Mbit
(wealth) and 16 Mbit (results), about 300 Mbit in all. This is within the
UltraRAM plus block RAM of a large UltraScale+ device. The RTL gives each
stage three (last stage four) read ports on one array, so a synthesis tool
will replicate the arrays, or you can map them onto dual-port macros.

## Using it (`vfi_top`)

| port | meaning |
|------|---------|
| `host_wr_en`, `host_wr_sel`, `host_wr_addr`, `host_wr_data` | load a table word. Select values are in `vfi_pkg::host_sel_e`: k grid (`addr = i`), V0 (`{z',k'}`, written into the bank the next run reads), wealth w (`{z,k}`), beta·Q(z',z) (`{z,z'}`), constants (`addr 0`: 1-eta, `addr 1`: 1/(1-eta)) |
| `start`, `n_iter` | run n_iter iterations; a new run continues from the current values |
| `busy`, `done`, `iter_cnt`, `cycle_cnt` | status; `done` stays high until the next start |
| `host_rd_addr` → `host_rd_v`, `host_rd_policy` | V(k,z) and policy index of the last finished iteration, one cycle after the address `{z,k}` |

The host computes the grid, the wealth table and beta·Q, and loads them
before a run. The capital grid must be increasing. Writes while `busy` are
not allowed (an assertion checks this).

### Number format

All values are signed Q15.16 (32 bits, range ±32768, resolution 1.5e-5).
Sums and products saturate. For the RBC calibration, values stay around
−20 … 0 and consumption around 1 … 40, well inside the range. Differences
between neighbouring grid points can fall below the resolution near the
peak. Then the search may return a neighbour of the exact argmax whose
objective is equal to within a few LSB. The testbenches accept this and
check the objective value at the returned index. `FX_W`/`FX_FRAC` in
`vfi_pkg` set the format. The power function assumes FX_W = 32.

## Files

| file | content |
|------|---------|
| `rtl/vfi_pkg.sv` | format, latencies, saturating arithmetic, host select codes |
| `rtl/vfi_top.sv` | top: tables, controller, pipeline, write-back, result table |
| `rtl/vfi_controller.sv` | sweep/iteration sequencer, bank swap, counters |
| `rtl/peak_finder.sv` | chain of log2(NK)−1 search stages with stage delays |
| `rtl/search_stage.sv` | one binary-search stage |
| `rtl/objective_unit.sv` | objective h(k,z,k'), 51 cycles |
| `rtl/pow_unit.sv` | x^p, 33 cycles |
| `rtl/stage_ram.sv` | multi-read-port RAM with lane write enables |
| `rtl/delay_line.sv` | shift register for latency padding |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_vfi_top_full` |
| `tb/tb_rbc_pkg.sv` | reference model: calibration, Rouwenhorst z grid, exhaustive maximisation |

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/vfi_pkg.sv tb/tb_util_pkg.sv tb/tb_rbc_pkg.sv tb/tb_vfi_top.sv \
        --top-module tb_vfi_top
    ./obj_dir/Vtb_vfi_top

Every testbench ends with `TB_RESULT checks=N failures=M`. The tests:

* `tb_pow_unit` and `tb_objective_unit` compare against real arithmetic and
  check the 33- and 51-cycle latencies.
* `tb_search_stage` checks a middle stage and a last stage, including exact
  ties and infeasible candidates.
* `tb_peak_finder` compares every point of a 64-point grid against an
  exhaustive search. It includes a case where index 0 is optimal.
* `tb_vfi_controller` checks the sweep order and exact run times.
* `tb_vfi_top` runs 5 iterations on a 64 × 4 grid. It compares every V and
  policy against the Bellman operator applied in real arithmetic to the
  previous read-back, checks the run time of n_iter·(NK·NZ + 1 + 300)
  cycles, and counts boundary optima, infeasible candidates, bank swaps and
  multi-iteration runs.
* `tb_vfi_top_full` runs one iteration at the full 65 536 × 4 size. It checks
  48 sampled grid points against an exhaustive search over all 65 536
  candidates, and checks the iteration time of 263 045 cycles.

The reference model's z grid and Q matrix come from a Rouwenhorst
discretisation of ln z' = 0.95 ln z + e, sd(e) = 0.005. The k grid is
spaced evenly on [0.5, 1.5] × the steady-state capital. The calibration is
beta 0.984, eta 2, alpha 0.35, delta 0.01.

## Choices and departures

* **Arithmetic.** The original design does not state its number format; its
  operator latencies suggest floating-point cores. This RTL uses Q15.16
  fixed point and keeps the original latencies (8/33/5/5, 60 per stage)
  by padding.
* **Clock rate.** The original runs at 250 MHz. This RTL computes each
  operator in a single cycle and follows it with its padding registers. A
  multiply or the 64-bit squaring in the power function is therefore one
  long combinational path. To reach that clock, let the synthesis tool
  retime the padding registers into the operators, or split the operators
  across them. Timing closure has not been checked.
* **Calibration.** beta, eta, alpha, delta, rho and sigma are data, not RTL
  parameters. They reach the hardware through the beta·Q table, the two
  eta constants and the wealth table.
* **Power function.** Only its latency and its use of one logarithm and one
  exponential are given. The digit-by-digit log2/exp2 method is this
  design's own.
* **Start of the search.** Stage 1 is fed h*(0) = j*(0) = 0. This reproduces
  the first-stage indexes NK/4, NK/2, 3NK/4 of the original examples.
  Feeding j*(0) = 1, as one diagram of the original suggests, would shift
  them by a quarter of the grid.
* **Infeasible candidates** and the **h1 = h3 > h2** case are handled as
  described above. The original names a feasible index set but gives no
  rule for it.
* **Last stage.** It uses four indexes, h*..h*+3, and the policy
  i* = h* + position.
* **Host side.** The original runs on a cloud FPGA behind the vendor's PCIe
  shell, with a host CPU. Neither is part of this RTL. The table write port,
  run control, result table and a host-loaded wealth table stand in for
  them.
* **Stopping.** Iterations run for a host-given count. There is no
  convergence test in hardware. The iteration time includes the 901-cycle
  pipeline drain, which the original's time estimate ignores.
