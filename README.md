# Lennard-Jones force and potential pipeline in IEEE 754 double precision

In a molecular dynamics (MD) simulation, most of the time goes into computing the forces between
pairs of molecules. For the Lennard-Jones interaction, every pair closer than a cutoff distance
`rc` needs a potential `u` and a scalar force factor `F`. Each is a handful of floating-point
operations on the squared distance `r^2`. This RTL computes both for one pair per clock cycle in
full double precision, with a deep pipeline that has no control logic at all. A host processor
does everything else. It finds the pairs inside the cutoff, multiplies `F` by the distance vector,
accumulates forces and energy, and integrates the equations of motion.

The design streams data through seven levels of floating-point units:

* 2 divisions
* 1 square root
* 8 multiplications
* 5 additions or subtractions

The adder, multiplier, divider and square rooter are pipelined 17, 12, 32 and 47 stages deep. A
result pair leaves the pipeline 119 cycles after its operand went in. A new operand can enter every
cycle. There are no hazards, so the pipeline never stalls. The top level, `lj_accel`, puts two
such pipelines side by side: 32 floating-point operations per cycle, or 3.9 GFLOPS at 122 MHz.

## What is computed

With `x = 1/r^2` and `x6 = x^3 = 1/r^6`, in normalised (Lennard-Jones) units:

    F = 48 * x * x6 * (x6 - 0.5) + dUc / r
    u = 4 * x6 * (x6 - 1) + (dUc*rc - Uc) - dUc * r

`Uc` is the potential at the cutoff and `dUc` is its derivative there. Both are constants of the
simulation. The host supplies `dUc` and the pre-combined constant `ushift = dUc*rc - Uc` on two
64-bit ports, and must hold them steady while operands are in flight. With these constants, the
shifted potential and the force factor both go to zero at `r = rc`, so no discontinuity remains
at the cutoff. `F` excludes the final multiplication by the vector `r_ij`; the host does that.

The input is `r^2` rather than `r`, because the host's cutoff test already compares `r^2` with
`rc^2`. Only the `dUc` terms need `r` itself, hence the square root.

## The dataflow graph and its schedule

The computation is a fixed graph. Each node is a pipelined unit, and each edge is a 64-bit bus:

| level | operations                                                     | ready at cycle |
|-------|----------------------------------------------------------------|----------------|
| 1     | `x = 1.0 / r2`; `r = sqrt(r2)`                                 | 32; 47         |
| 2     | `dUc*r`; `dUc/r`; `48*x`; `x*x`                                | 59; 79; 44; 44 |
| 3     | `x6 = (x*x) * x`                                               | 56             |
| 4     | `48x*x6`; `x6 - 0.5`; `4*x6`; `x6 - 1.0`                       | 68; 73; 68; 73 |
| 5     | `(48x*x6)*(x6-0.5)`; `(4*x6)*(x6-1)`                           | 85; 85         |
| 6     | `... + ushift`                                                 | 102            |
| 7     | `F = ... + dUc/r`; `u = ... - dUc*r`                           | 119; 119       |

This is the hardest part to follow. Units of different depth feed each other, so the operands of
one node arrive in different cycles. Each level starts when its latest operand arrives. Every
earlier operand waits in a shift register (`delay_line`) of exactly the right depth. Examples:

* `x` waits 12 cycles for `x*x`.
* `48x` waits 12 cycles for `x6`.
* Level-4 products wait 5 cycles for the level-4 differences, because the adder is 5 stages
  deeper than the multiplier.
* At level 7, `dUc/r` waits 23 cycles and `dUc*r` waits 43.
* The force product waits 17 cycles, so that `F` leaves in the same cycle as `u`.

`lj_pipeline` derives every delay and the total latency (`localparam T_*`, `LATENCY`) from its
four depth parameters `ADD_LAT`, `MUL_LAT`, `DIV_LAT` and `SQRT_LAT`. Their defaults come from
`fp64_pkg`. If you change a depth, the schedule is recomputed. Because the graph is
fixed and the delays match, no control is needed. The only bookkeeping signal is a valid bit,
which travels through its own 119-deep shift register, so that results can be told apart from
pipeline fill.

The square root starts at cycle 0, but its result is needed only at level 2, and `dUc/r` is
needed only at cycle 102. The square rooter can therefore grow to 70 stages before it lengthens
the pipeline. The pipeline testbench checks this limit: with a 70-stage square rooter the latency
stays 119, and with 71 it becomes 120. That is why a deep square rooter built for clock rate
rather than latency suits this design. The 87-stage bound published for the original design
compares `sqrt + divide` with the end of the pipeline, and so does not account for the last adder.

## The square rooter (`fp_sqrt`)

This is the one unit designed specifically for this pipeline. It computes the IEEE 754 square root
with round-to-nearest, 47 cycles after its input. Its parts, by stage:

1. **Adjust exponent.** The hidden bit is put back. For an even unbiased exponent `e`, the 54-bit
   radicand is `1.m0` and the result exponent is `e/2`. For an odd `e`, the radicand is `0.1m` and
   the result exponent is `(e+1)/2`. The exponent is halved in the next stage. It is a shift of
   `E + 1023` or `E + 1024` in biased form.
2. **Square root of the significand, stages 2 to 44.** The radicand becomes the 110-bit operand
   `{0, radicand, 55 zeros}`, which has a 55-bit root: 53 significant bits, one normalisation
   (guard) bit and one round bit. A non-restoring recurrence finds one root bit per step from the
   top. The partial remainder is shifted left by two and takes in the next two radicand bits. Then
   `4Q+1` is subtracted if the remainder was non-negative, or `4Q+3` is added if it was negative.
   The new root bit is 1 when the result is non-negative. Early steps work on short numbers
   (a 3-bit add at first) and late ones on long numbers (57 bits at the end). So the first 12
   stages do two steps each and the remaining 31 stages do one: 55 steps in 43 stages. The depth
   is a parameter (`STAGES`). A shallower unit packs more steps into each stage, trading clock
   rate for latency. A unit deeper than 59 stages adds plain registers.
3. **Normalise, stage 45.** If the root's top bit is 0, it is shifted left and the exponent is
   decremented. This is always the case for the `0.1m` radicand.
4. **Round, stage 46.** One is added at the round position, leaving 52 fraction bits and a carry.
   A square root never falls exactly half-way between two doubles, so this matches
   round-to-nearest-even exactly.
5. **Output, stage 47.** A carry out of the rounding increments the exponent. A special-case flag
   overrides the result: `+-0` gives `+-0`, `+inf` gives `+inf`, and NaN, `-inf` or any negative
   number gives NaN. The flag is worked out in stages 1 to 4, in parallel with the root, and then
   carried along.

## The other arithmetic units

The adder, multiplier and divider are standard units. For them, this design fixes the depth and
the numerical behaviour rather than the internal organisation:

| unit     | module   | stages | rounding               | internal organisation                                      |
|----------|----------|--------|------------------------|------------------------------------------------------------|
| add/sub  | `fp_add` | 17     | nearest even           | align, add, normalise, round; rest are output registers    |
| multiply | `fp_mul` | 12     | truncation (to zero)   | 53x53 product, normalise, truncate; rest output registers  |
| divide   | `fp_div` | 32     | nearest even           | unpack, 30 stages of radix-2 restoring division (2 bits each), round |

The adder and multiplier keep their logic in the first two stages, followed by plain registers.
They rely on a synthesis tool with register retiming to spread that logic across the stages. On an FPGA, the multiplier's product maps onto embedded multipliers. The divider is
genuinely spread over its stages. Every depth is a module parameter (`STAGES`), with defaults
taken from `fp64_pkg`.

All units work on normal numbers only. This is safe in MD with normalised units, where denormals
do not arise in practice.

* An exponent field of 0 is read as zero.
* Results below the normal range flush to zero.
* Results that overflow become infinity.

The adder returns +0 for an exact cancellation. NaN is not propagated by the adder and
multiplier. The divider returns infinity for `x/0` and NaN for `0/0`.

## Interface and timing

`lj_accel #(NUM_PIPES = 2)`:

| port        | dir | width        | meaning                                          |
|-------------|-----|--------------|--------------------------------------------------|
| `clk`       | in  | 1            | clock                                            |
| `rst_n`     | in  | 1            | active-low synchronous reset (valid bits only)   |
| `duc`       | in  | 64           | `dUc`                                            |
| `ushift`    | in  | 64           | `dUc*rc - Uc`                                    |
| `in_valid`  | in  | [NUM_PIPES]  | operand valid, one per pipeline                  |
| `r2`        | in  | 64 [NUM_PIPES] | `r^2`                                          |
| `out_valid` | out | [NUM_PIPES]  | result valid                                     |
| `force_f`   | out | 64 [NUM_PIPES] | `F`                                            |
| `pot_u`     | out | 64 [NUM_PIPES] | `u`                                            |

The timing rules:

* An operand sampled at rising edge `n` produces its results after edge `n + 119`, with
  `out_valid` high. Any pattern of valid and idle cycles is allowed.
* The two pipelines are fully independent. How pairs are shared between them is up to the host.
* There is no back-pressure. Whoever consumes the results must take one pair per pipeline per
  cycle.
* Data registers are not reset. Outputs are meaningful only when `out_valid` is high.

`lj_pipeline` has the same ports for a single pipeline. Each unit has `clk`, operands `a`, `b`
(plus `sub` for the adder) and result `y`.

## How far to trust it

* **Units.** Each unit is checked bit for bit over thousands of random and corner-case operands,
  at its default depth, against an independent reference: the simulator's own double-precision
  `+ - / sqrt`, and an exact 106-bit product for the truncating multiplier. The result must appear
  exactly `STAGES` cycles after its operand.
* **Pipeline.** Checked against a real-number model of the two formulas, within 1e-12 of the size
  of the summed terms. The multipliers truncate, so results can be a few units in the last place
  below the correctly rounded value. At `r = rc` both outputs must vanish.
* **Throughput.** One position update of a 10000-molecule system has about 5800 pair
  interactions. On one pipeline they take 5919 cycles, 1.02 cycles per pair; on two pipelines,
  3019 cycles.
* **Not checked.** Clock rate and FPGA area are properties of an implementation. Simulation does
  not check them.

## Choices this design makes

These are not given by the algorithm and can be changed:

* **Sign of the `dUc*r` term.** It is subtracted, so that `u(rc) = 0`. Written as
  `u = 4x6(x6-1) + (dUc rc - Uc) + dUc r`, it would not vanish at the cutoff.
* **Adder and divider rounding.** Both round to nearest even. The multiplier truncates, as in the
  original units.
* **Square-rooter stage split.** The pairing of root steps into 43 stages, the 4-stage flag logic
  and the quiet-NaN encoding `0x7FF8000000000000` are this design's own.
* **Valid bit.** The valid bit, the reset and the constant ports are additions for usability. The
  arithmetic path needs none of them.
* **Delays.** All delays are flip-flop shift registers. Block RAM delay lines would save logic on
  an FPGA, but are not built here.

## Files and simulation

| file | contents |
|------|----------|
| `rtl/fp64_pkg.sv` | unit depths, FP constants, shared round-and-pack function |
| `rtl/delay_line.sv` | parameterised shift-register delay |
| `rtl/fp_add.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`, `rtl/fp_sqrt.sv` | floating-point units |
| `rtl/lj_pipeline.sv` | one force/potential pipeline |
| `rtl/lj_accel.sv` | top level, `NUM_PIPES` pipelines |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_lj_workload` |
| `tb/lj_ref_pkg.sv` | real-number reference model and the constants `rc = 2.5`, `Uc`, `dUc` |

Every testbench prints `TB_RESULT checks=N failures=M`. For example, to run the end-to-end test
of the two-pipeline top:

    verilator --binary --timing --assert -Irtl -Itb --top-module tb_lj_accel \
        rtl/fp64_pkg.sv tb/lj_ref_pkg.sv tb/tb_lj_accel.sv -o sim
    ./obj_dir/sim

The other testbenches build the same way, with `--top-module` changed. The unit-level tests need
only `rtl/fp64_pkg.sv` and their own file. Verilator finds the remaining modules through `-Irtl`.
All of them run in seconds.
