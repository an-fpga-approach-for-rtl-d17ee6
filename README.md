# EXP-BET scheduling metrics in fixed-point hardware

An LTE downlink scheduler hands each resource block to the user with the largest
*metric*. EXP-BET combines two metrics:

* the **exponential rule (EXP)**. It lifts the priority of a real-time flow steeply as
  its head-of-line (HoL) delay nears its deadline, and scales that priority by how well
  the user's channel uses the resource block.
* **Blind Equal Throughput (BET)**. It gives priority to the users whose average
  throughput so far is low, whatever their channel.

This RTL computes both metrics for one user from that user's parameters. The
datapath is built from the same small set of arithmetic blocks that a
block-diagram model of the two formulas uses: multiply, add/subtract, divide,
reciprocal, square root and exponential. It is wired block for block like that
model. Values enter and leave as IEEE-754 doubles. Inside, everything is
signed fixed point.

## The two metrics

With τ the user's maximum allowable delay, D its HoL delay, N_RT the number of
active real-time flows, ΣD the sum of their HoL delays and G the spectral
efficiency of the user on the resource block:

    m_exp = G · exp( a · D / (1 + sqrt(ΣD / N_RT)) ),     a = 5 / (0.99 · τ)

With β the averaging weight, r(t) the user's achievable rate and R(t-1) its past
average throughput:

    R(t)  = β · R(t-1) + (1 − β) · r(t)
    m_bet = 1 / R(t)

The constants 5 and 0.99 come from the reference model. They are parameters of
`exp_rule_metric` (`C2`, `C3`). The model gives no derivation for them, so treat
`a` as a tuning weight.

Reference example, which the testbenches reproduce:

| metric | inputs | result |
|---|---|---|
| EXP | τ = 0.01, D = 0.003, ΣD = 0.03, N_RT = 10, G = 3 | 12.618 (expected 12.62) |
| BET | β = 0.1, r(t) = 10, R(t-1) = 5 | 0.105263 (expected 0.1053) |

## Datapath structure

Each box below is one arithmetic module. The names are those of the reference model.

BET (`bet_metric`), 87 clocks from start to done:

    1 ──┐
        SUB(1−β) ──► Mult(r·SUB) ──┐
    β ──┘                          ADD = R(t) ──► Reciprocal ──► m_bet
    β, R(t-1) ──► Mult1(β·R) ──────┘

EXP (`exp_rule_metric`), 227 clocks from start to done:

    0.99, τ ──► Mult3 ──► Divide2(5 / Mult3) ──► Mult(·D) ─────────────┐
    1, N_RT ──► Divide1 ──► Mult2(·ΣD) = avg HoL ──► SquareRoot ──►     Divide ──► Exponential ──► Mult1(·G) ──► m_exp
                                                      AddSub(+1) ──────┘

The two EXP branches run concurrently. The lower branch is the longer one: a divider,
a square root, then the merge divider and the exponential. The figures in the
headings are this design's latencies at the default number format.

`exp_bet_top` runs a Gateway In (`gateway_in`) on each of the eight double
inputs. It starts both metrics on one `start` pulse and raises `done` when both
are valid. The metrics come out as doubles through Gateway Out (`gateway_out`)
and also in fixed point. Several intermediates are brought out in fixed point:
the average HoL delay, the exponent argument and the new average throughput
R(t). A scheduler needs R(t) as the next R(t-1).

## Number format and the gateways

Everything inside is `fx_pkg::fx_t`, signed two's complement with `FX_W = 48`
bits, `FX_F = 32` of them fraction bits (Q15.32). This gives a range of ±32768 and
a resolution of 2.3·10⁻¹⁰. The range must hold the intermediate `a = 5/(0.99·τ)`,
which is 505 for τ = 0.01, and any throughput value you feed in. The resolution
must hold delays of a few milliseconds.

Change the format in `fx_pkg` only. Keep `FX_W ≤ 53`, or Gateway Out is no longer
exact, and `FX_F ≥ 2`.

* **Gateway In**. It shifts the double's 53-bit significand by `exponent − 1075 + FX_F`
  places. A right shift rounds to nearest, ties away from zero. Out-of-range values
  and ±∞ saturate and raise `sat`. NaN gives 0 and also raises `sat`. Subnormals give 0.
  The top latches the eight `sat` flags at start as `in_sat`.
* **Gateway Out**. It normalises at the leading one. The conversion is exact.

Multiplies and adds round to nearest (half up) and saturate to the format's range.

## Arithmetic units

| module | method | latency (clocks after `in_valid`) |
|---|---|---|
| `fx_mult` | full 96-bit product, round, saturate | 1 |
| `fx_addsub` | 49-bit sum, saturate; `op` picks a+b or a−b | 1 |
| `fx_div` | restoring shift-subtract, one quotient bit per clock | FX_W+FX_F+3 = 83 (1 for a zero divisor) |
| `fx_recip` | `fx_div` with dividend 1.0 | 83 |
| `fx_sqrt` | binary digit-by-digit root, one bit per clock | (FX_W+FX_F+1)/2+2 = 42 |
| `fx_exp` | range reduction plus Taylor series | N_TERMS+3 = 15 |

The three sequential units need the most explanation:

* **Divider**. It divides magnitudes. The dividend is extended by `FX_F + 1` zero
  bits, so the loop produces one bit below the result LSB, and that bit rounds the
  quotient. The sign is applied afterwards, then the result saturates. A zero
  divisor returns the saturated value at once and sets `div_by_zero`.
* **Square root**. The operand is scaled by 2^FX_F, so the integer root carries
  FX_F fraction bits. The final remainder decides the rounding: round up when it
  exceeds the partial root. A negative operand returns 0 and sets `neg_in`.
* **Exponential**. It computes `k = floor(x·(1/ln2))` and `r = x − k·ln2`, so
  0 ≤ r < ln2. `exp(r)` is evaluated in Horner form, one term per clock:
  `p ← 1 + (r·p)·(1/n)` for n = N_TERMS down to 1. The constants 1/n are formed
  at elaboration as ⌊2^FX_F / n⌋. The result is `p·2^k`: a left shift, or a
  rounding right shift. At 12 terms the series error on the reduced range is about
  10⁻¹², far below one LSB. If k is so large that the result leaves the range,
  `y` saturates and `ovf` is set. A very negative x gives 0.

## Control: valid pulses and joins

No unit has a stall input. Each one takes a one-clock `in_valid` pulse and
returns a one-clock `out_valid` pulse. It then holds its result until its next
operation. A unit whose two operands come from different branches is started by
`fx_join2`. That helper remembers which of the two valid pulses it has seen and
fires in the cycle the second one arrives. Joins sit at the BET `ADD`, at the
EXP `Divide`, and in the top, where `done` waits for both metrics.

Each metric module latches its inputs on `start`. It accepts one computation at a
time: `busy` is high from start until the cycle of `done`. A new `start` may come
in the cycle right after `done`. Assertions check that no sequential unit is
started while busy.

## Top-level interface (`exp_bet_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | sample all inputs and start (ignored while `busy`) |
| `max_delay`, `hol_delay`, `sum_hol`, `rt_flows`, `spec_eff` | in | 64 | EXP parameters τ, D, ΣD, N_RT, G as doubles |
| `beta`, `user_rate`, `past_tput` | in | 64 | BET parameters β, r(t), R(t-1) as doubles |
| `busy`, `done` | out | 1 | running; one-clock pulse when both metrics are valid (228 clocks after `start`) |
| `m_exp`, `m_bet` | out | 64 | metrics as doubles |
| `m_exp_fx`, `m_bet_fx`, `avg_hol_fx`, `exp_arg_fx`, `r_avg_fx` | out | 48 | metrics and intermediates in Q15.32 |
| `in_sat` | out | 8 | gateway saturation per input, bit 0 = `max_delay` … bit 7 = `past_tput` |
| `div_by_zero`, `exp_ovf` | out | 1 | a divider saw a zero divisor; the exponential saturated |

All outputs hold until the next `start`.

## Simulating

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each one
prints `TB_RESULT checks=N failures=M`. The reference values are computed with
simulator `real` arithmetic on the same quantised inputs, never by the design's
own logic. The tolerances are one LSB for multiply, divide and square root, and a
relative 10⁻⁶ for the composed metrics. The testbenches also check the latencies
listed above.

`tb_exp_bet_top` runs the complete design at its default parameters:

* the reference example, with both printed results checked;
* random user parameter sets;
* back-to-back operations;
* a saturating input, a zero flow count (division by zero) and an overflowing
  exponential.

It counts each of these mechanisms and fails if one never occurred. Example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_exp_bet_top \
      -y rtl -y tb +libext+.sv rtl/fx_pkg.sv tb/tb_pkg.sv tb/tb_exp_bet_top.sv -o sim
    ./obj_dir/sim

Any other testbench builds the same way. Replace the top-module name and the last
file name.

## Where this design makes its own choices

The reference model fixes the block structure, the formulas, the constants and
the fact that the gateways round and saturate. Everything below is this RTL's
own choice:

* the Q15.32 number format;
* the algorithms of the divider, square root and exponential, and all latencies;
* the valid/join handshake, the single-computation-at-a-time control, and the
  reset style;
* round-to-nearest and saturation inside the arithmetic units, not only at the
  gateways;
* the behaviour on a zero divisor, a negative square-root operand, NaN and
  subnormal inputs;
* a single `beta` input, where the reference model draws two sources of the same
  value.

The sequential units are not pipelined. One user's metrics take 228 clocks. A
scheduler that ranks many users per millisecond needs several instances, or
pipelined dividers and square roots.
