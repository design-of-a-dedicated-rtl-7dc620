# Dedicated IFT microcontroller

A PI controller that tunes its own two parameters while it runs, using
**iterative feedback tuning (IFT)**. IFT needs no model of the plant. It finds
the gradient of a quadratic cost from two closed-loop experiments on the real
loop, then takes a gradient step on the controller parameters. Here the whole
procedure is a small finite-state machine with a fixed-point data path, meant
for an FPGA. A digital model of the DC motor that the controller drives sits on
the same chip, and six PWM outputs let a scope show the loop.

The controller is the incremental PI law with a zero-order hold:

    u(t) = u(t-1) + rho0*e(t) + (rho1*T - rho0)*e(t-1),   T = 0.1

It runs on the plant

    y(t) = 0.904837*y(t-1) + 0.09516*u(t)

(the step-invariant model of 1.01/(2s+1)). The tuner minimises
J = 1/(2N) * sum e(t)^2 over windows of N = 1000 samples by changing
rho = (rho0, rho1).

## One tuning cycle

All the logic runs on one clock. A sample strobe (`smp_tick`, 5 kHz at the
default 50 MHz clock) advances the loop by one sample. A cycle has four phases:

1. **Experiment #1 (normal operation).** Controller #1 closes the loop on
   the reference r: `e1 = r - y`, `u = PI1(e1)`. Each e1 sample is written to
   a 1000 x 12-bit memory, and the peak |e1| of the run is kept.
2. **Error check.** After N samples, the peak error is compared with the
   tolerated error `e_tol`.
   - If the loop is good enough, experiment #1 simply repeats, and the
     controller keeps regulating.
   - Otherwise the FSM switches to experiment #2. The switching strobe
     processes no sample, and the plant keeps its last drive.
3. **Experiment #2 (gradient experiment).** Controller #2 starts from rest
   and closes the loop with the *stored e1 as its reference*:
   `e2 = e1 - y`, `u = PI2(e2)`. Each e2 passes through the gradient filter,
   and the products e2 * de2/drho are summed.
4. **Update.** After N samples the FSM returns to experiment #1. One clock
   later the update

       rho_k <- rho_k - gamma * (1/N) * sum(e2 * de2/drho_k)

   is offered to the **parameter latch** with a one-clock strobe. The latch
   takes it only if the operator has pressed the tuning button since the last
   update taken. Each press lets exactly one update through. The same strobe
   restarts the reference on a step up, so every tuned experiment #1 starts
   with the same stimulus.

A tuning cycle therefore takes 2N + 2 strobes. At the defaults that is
2002 x 10000 clocks, about 0.4 s.

The two controllers share the parameters in use. Controller #1 keeps its
state from one run to the next, so regulation continues smoothly. Controller
#2 and the filters are cleared at the start of every gradient experiment.

## The gradient filter

Differentiating the PI law (written without the hold) gives the filter that
turns the experiment-#2 error into its sensitivity to each parameter:

    (1/C) dC/drho0 = (z-1) / ((rho0+rho1) z - rho0)
    (1/C) dC/drho1 =   z   / ((rho0+rho1) z - rho0)

With k = 1/(rho0+rho1) and a = rho0*k these become two first-order
recursions, run on every experiment-#2 sample:

    g0(t) = a*g0(t-1) + k*(e2(t) - e2(t-1))
    g1(t) = a*g1(t-1) + k*e2(t)
    dJ0  += e2(t)*g0(t)
    dJ1  += e2(t)*g1(t)

k needs a division. It is computed by a bit-serial restoring divider
(`fx_recip`, 41 clocks) whenever the parameters in use change, long before the
next gradient sample needs it. a is a single multiply. An assertion in
`ift_main_process` checks that k is ready whenever a gradient sample is taken.
This is why strobes must be at least 48 clocks apart.

The update multiplies the 44-bit sums by the constant round(2^20/N), which
gives the 1/N mean, then by gamma. There is no run-time divide by N.

## Control unit

The FSM has one state bit. Q = 0 is experiment #1 and Q = 1 is experiment #2.
It advances only on sample strobes. Its two inputs are:

- x = (experiment-#1 counter = N) AND (peak |e1| > e_tol)
- c = (experiment-#2 counter != N)

It has four outputs:

| output | equation | meaning |
|---|---|---|
| ya | not Q | in experiment #1 (Moore) |
| yb | Q | in experiment #2 (Moore) |
| y1 | not Q and not x | drive the experiment-#1 buffers (Mealy) |
| y2 | Q and c | drive the experiment-#2 buffers (Mealy) |

The next state is `Q+ = (not Q) and x  or  Q and c`.

Two loop counters count samples 1..N. When the experiment-#1 counter counts
past N it wraps to 1, so repeated runs leave no gap.

The design routes its nets with eight "buffers", enabled by y1 or y2. In an
FPGA these are multiplexers, in `exp_switch`:

| buffer | enabled by | connects |
|---|---|---|
| B1 | y1 | r to the reference net |
| B2 | y1 | e (as a 12-bit word) to the memory write port |
| B3 | y2 | memory read port to the reference net |
| B4 | y2 | e to the gradient filter |
| B5 | y1 | e to PI controller #1 |
| B6 | y2 | e to PI controller #2 |
| B7 | y1 of the last sample | u1 to the plant drive |
| B8 | y2 of the last sample | u2 to the plant drive |

B7 and B8 use the enables held from the last processed sample. This is
because the PI outputs are registered and must stay on the plant between
strobes.

## Number formats

| type | format | used for |
|---|---|---|
| `word_t` | 12-bit Q2.10, range -2 ... +1.999 | ADC sample, reference, stored e1, monitor/PWM words |
| `fx_t` | 32-bit Q11.20, range about +-2048 | parameters, errors, control, plant state, filter states, gamma |
| `acc_t` | 44-bit Q23.20 | gradient sums over N products |

Every add and multiply saturates to its result width. Products are shifted
right arithmetically, which rounds toward minus infinity. The 12-bit words
match 12-bit converters. The wide internal format lets parameters up to a few
hundred and step sizes near 100 be represented without rescaling between
operations. The helpers are in `ift_pkg`.

## Clocks and rates

`clk_div` makes one-clock enables from the 50 MHz clock. No derived clocks
are used as clocks. The defaults are:

- **Sample strobe:** SMP_DIV = 10000, i.e. 5 kHz. It drives the reference,
  the IFT process and, one clock later, the plant model.
- **ADC strobe:** ADC_DIV = 1000, i.e. 50 kHz. The ADC interface samples the
  plant state into a 12-bit word on this strobe.

The discrete-time equations keep T = 0.1 inside the PI law, so the loop
behaves exactly as a 0.1 s-sampled loop, only faster in wall-clock time.

Each of the six `pwm_dac` channels compares a free-running 12-bit counter
with its word, giving a 50 MHz / 4096 = 12.2 kHz PWM. The signed word is
shown in offset binary: duty = (word + 2048)/4096, so 0 V gives 50 %. Each
channel needs an external RC low-pass filter to produce a voltage.

## Top level: `ift_fpga_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | 50 MHz clock, synchronous active-high reset |
| `tune_btn` | in | tuning push button (asynchronous; synchronised inside) |
| `rho0_init`, `rho1_init` | in | Q11.20 parameters loaded at reset |
| `gamma` | in | Q11.20 step size |
| `e_tol` | in | Q11.20 tolerated peak error of experiment #1 |
| `pwm[5:0]` | out | PWM of r, y, e, u, rho0, rho1 |
| `mon[6]` | out | the six 12-bit words behind the PWM channels, same order |
| `dj_mon[2]` | out | dJ/drho0, dJ/drho1 sums (saturated to Q11.20) |
| `status` | out | `ift_status_t`: exp2, x_event, repeat1, upd_event, latched, armed |

The parameters are `N` (1000), `SMP_DIV` (10000), `ADC_DIV` (1000),
`REF_AMP` (reference amplitude as a Q2.10 word, 1024 = 1.0 V) and
`SINGLE_STEP` (0: square wave; 1: one step to `REF_AMP` at reset, held).

The status bits are:

- `exp2` is a level.
- `x_event` is a one-clock strobe when an error check starts experiment #2.
- `repeat1` is a strobe when experiment #1 repeats.
- `upd_event` is a strobe when an update is proposed.
- `latched` is a strobe when the latch takes an update.
- `armed` is a level: the button was pressed and the latch waits for the
  next update.

## Files

| file | block |
|---|---|
| `rtl/ift_pkg.sv` | number formats, saturating arithmetic, status struct |
| `rtl/ift_fpga_top.sv` | the whole chip: dividers, reference, IFT process, latch, plant, ADC, 6 DACs |
| `rtl/ift_main_process.sv` | FSM + data path of the two experiments, divider, gradient, update |
| `rtl/ift_fsm.sv` | the two-state control unit |
| `rtl/exp_counter.sv` | loop counter for one experiment |
| `rtl/exp_memory.sv` | N x 12-bit store for e1 (registered read) |
| `rtl/exp_switch.sv` | the eight experiment buffers |
| `rtl/pi_controller.sv` | incremental PI law |
| `rtl/ift_gradient.sv` | gradient filters and dJ sums |
| `rtl/fx_recip.sv` | bit-serial reciprocal for k |
| `rtl/param_update.sv` | rho - gamma*dJ/N |
| `rtl/param_latch.sv` | parameters in use, one update per button press |
| `rtl/clk_div.sv` | strobe generator |
| `rtl/ref_gen.sv` | square-wave reference, restartable |
| `rtl/adc_sampler.sv` | samples the plant into a 12-bit word |
| `rtl/dc_motor_model.sv` | first-order DC-motor model |
| `rtl/pwm_dac.sv` | 12-bit PWM DAC |

Each file opens with a comment on what it does, its timing, and which parts
follow the original design and which are choices made here.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5,
from the repository root:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_ift_fpga_top \
        -y rtl -y tb +libext+.sv rtl/ift_pkg.sv tb/tb_ref_pkg.sv tb/tb_ift_fpga_top.sv \
        --Mdir build/tb_ift_fpga_top -o sim
    build/tb_ift_fpga_top/sim

Replace the name for any other testbench. `tb/tb_ref_pkg.sv` holds the
testbenches' own fixed-point reference functions. They are written with
64-bit integers, independently of `ift_pkg`.

| testbench | what it shows |
|---|---|
| `tb_<block>` (one per block) | bit-exact or cycle-exact behaviour of each block against independent models, including saturation and reset |
| `tb_ift_main_process` | the whole IFT process at N = 8, against a bit-exact model of the algorithm, over repeats, switches and updates |
| `tb_ift_fpga_top` | end to end at N = 128, fast strobes: settling, PWM duty, repeats, switches, updates rejected without a press, exactly one update per press; counts every mechanism |
| `tb_ift_fpga_full` | the top at its defaults (N = 1000, 5 kHz, 50 MHz): three tuning cycles, each 2N+2 strobes, updates checked against the formula; about 60 million clocks, roughly a minute of simulation |
| `tb_ift_workloads` | four starting controllers at N = 1000 with faster strobes, 8 tuning cycles each, cost J printed per cycle |
| `tb_ift_ref_workloads` | fast-damped start with a single 1.0 V step, and with a 1.2 V square wave; 6 tuning cycles each, output level and updates checked |

Results of `tb_ift_workloads`. J is measured on each experiment-#1 run,
from the second cycle on:

| start (rho0, rho1, gamma) | after 8 cycles | J |
|---|---|---|
| slow-damped (0.1, 0.2, 2.2) | (0.0996, 0.078) | 0.00255, flat |
| fast-damped (1.0, 1.0, 3.2) | (0.9994, 0.983) | 0.00152, flat |
| oscillatory (1.0, 16.0, 90.2) | (0.32, 5.12) | 0.0066 -> 0.0036 |
| badly tuned (0.05, 0.05, 0.03) | (0.04997, 0.0247) | 0.0027, flat |

With small step sizes the parameters drift slowly, and both drop. With
gamma = 90.2 the oscillatory controller is pulled quickly towards a damped
one, and the cost falls almost by half.

The badly tuned start is very slow, with closed-loop poles near 1. It shows
the limits of this gradient. Its errors are large, so the first update is
large. It also moves rho1 far more than rho0. At gamma = 0.03 the first
update halves rho1, and nothing changes much after that. From gamma = 0.1 up,
the first update drives rho1 below zero and the loop diverges. A start like
this needs a small gamma, and the cycles need watching.

The single-step reference gives exactly the same tuning trajectory as the
square wave. Every tuning cycle already begins on a step up, and the low half
of the wave falls in experiment #2, which does not use r. The two references
differ only while the loop is regulating without tuning.

## Departures and interpretations

Where the original description is ambiguous or inconsistent, this RTL does
the following:

- **Next-state equation.** The printed FSM equation reads
  Q+ = (not Q)(not x) + Qc. The state diagram it comes from leaves
  experiment #1 when x = 1. The diagram is followed: Q+ = (not Q)x + Qc.
- **Gradient filter for rho1.** The printed recursion feeds back the rho0
  gradient. The filter's transfer function z/((rho0+rho1)z - rho0) needs its
  own past value, and this is what is built.
- **The 1/N in the update.** The cost gradient is defined with 1/N, but the
  update equations omit it. 1/N is applied, so gamma is independent of N.
- **Plant coefficient.** One equation gives 0.048057 as the input gain in
  experiment #2. The plant is the same in both experiments, so 0.09516 is
  used throughout. Its DC gain is 0.09516/(1-0.904837) = 1.000, not the 1.01
  of the continuous model.
- **PWM frequency.** 50 MHz/4096 is 12.2 kHz. The original text states
  1.2 MHz for the same expression.
- **Error check.** "Error above the tolerated error" is taken as the peak
  |e1| of the run.
- **Sample rate.** No divider value is given. 5 kHz is chosen; the
  discrete-time behaviour does not depend on it.
- **Initial parameters.** In the original, the initial parameters come up
  random at power-on. Here they are inputs loaded at reset.
- **Reference.** The reference is a 0/1.0 V square wave with N samples per
  level. It is restarted on a step up at each tuning cycle, which the
  original describes as synchronised but does not detail. A 2 V reference is
  mentioned once. It does not fit a 12-bit Q2.10 word (maximum 1.999 V).
  The amplitude is the top's `REF_AMP` parameter, not a run-time input.
- **Fixed point.** The original rescales 12-bit words after each operation.
  This design uses one wide saturating internal format instead. Results
  therefore differ in the low bits from a strictly 12-bit data path.
- **Stored signals.** Only e1 is stored. u1 and y1 are not needed by the
  error-only cost.
- **Buffer assignment.** The assignment of the eight buffers to nets is this
  design's; the original only numbers them.

How far to trust the tuning: the hardware computes exactly the algorithm
above (checked bit for bit at N = 8, and against the update formula at
N = 1000). The algorithm filters e2 itself rather than the experiment-#2
output, and experiment #1 does not start from rest. The gradient is therefore
an approximation. Nothing in the hardware limits a step: a gamma that is
too large can carry the parameters out of the stable region. No convergence
is guaranteed or checked beyond the runs above.

Not included:

- the RC filters behind the PWM pins;
- the physical ADC;
- the acquisition and display system;
- the second-order test plants, which exist only as simulations in the
  original work.
