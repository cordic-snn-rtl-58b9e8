# CORDIC spiking network with on-chip STDP learning

This is a small spiking neural network that learns while it runs, built
without a single hardware multiplier. It has 20 input neurons, each driven by
its own random spike source, and one output neuron. The 20 synapses between
them adapt by spike-timing-dependent plasticity (STDP). When an input spike
comes shortly before an output spike, that synapse is strengthened. When it
comes after, the synapse is weakened. Run it long enough and the weights pull
apart towards the two bounds, 0 and 192: this is the competitive Hebbian
learning the network is meant to show.

Both costly pieces of arithmetic are iterative shift-and-add units in the
style of CORDIC (coordinate rotation digital computer):

* the `v^2` term of the Izhikevich neuron model (`cordic_square`);
* the exponential `e^(-|dt|/tau)` of the STDP rule (`exp_cordic`).

Every multiplication by a constant (0.04, 5, a, b, 1/tau, A+, A-) is also a
fixed sum of shifted copies of the operand. Spike timing is stored as
41-bit shift registers, one per neuron, rather than as time stamps.

## Module map

```
cordic_snn_top                      network top (20 -> 1)
├── snn_sequencer                   Euler-step and sampling-period timing
├── lfsr_spike_gen      x20         random input events, 7 Hz mean
├── izh_neuron          x21         CORDIC Izhikevich neuron
│   └── cordic_square               v*v by linear CORDIC
├── spike_history       x21         41-bit spike-timing shift register
├── stdp_synapse        x20         STDP weight update
│   └── exp_cordic                  e^-x by shift-and-add
├── v_streamer                      v of the output neuron -> 4 bytes
└── uart_tx                         8N1 serial transmitter, 9600 bit/s
snn_pkg                             Q16.14 type, fix(), coeff(), cmul()
```

## Number format

All neuron state and the weights share one type, `snn_pkg::fix_t`: signed
two's complement with 16 integer bits and 14 fraction bits (30 bits). The
range is ±32768, which holds `v^2` for |v| < 181 mV.

Constant multiplication is `cmul(x, coeff(c))`. The constant is rounded to
20 fraction bits. Each set bit then adds one shifted copy of `x`, and the
sum is truncated once at the end. A synthesis tool turns this into a short
adder chain. The 20-bit coefficient resolution matters. With 14 bits, 0.04
is off by 0.05 %. That alone made the tonic-spiking inter-spike interval
2 % longer than the real-valued model, because near threshold the neuron is
very sensitive to small errors in `dv/dt`.

## The neuron (`izh_neuron`, `cordic_square`)

The model is the Izhikevich neuron:

```
dv/dt = 0.04 v^2 + 5 v + 140 - u + I
du/dt = a (b v - u)
if v > 30 mV:  v <- c,  u <- u + d
```

It is integrated with explicit Euler at dt = 2^-DT_SHIFT ms (default
1/8 ms), so dt is a right shift. A pulse on `start` runs one step in two
phases:

1. **Square (K+N clocks).** `cordic_square` is a linear-mode CORDIC
   multiplier with both operands equal to v. A residual register `x` starts
   at v. In iteration i, for i = -K .. N-1, it steps `x` towards zero by
   ±2^-i. At the same time it adds ∓v·2^-i to the accumulator `z`, with the
   sign set by the sign of `x`. In the end `z = v·(v - x_final)`, with
   |x_final| ≤ 2^-(N-1).
   * K = 6 sets the operand range: the iterations cover |v| < 128.
   * N sets the precision. N = 6, 8, 10 and 12 give the variants IzhCOR6,
     IzhCOR8, IzhCOR10 and IzhCOR12.
2. **Euler and reset (1 clock).** Shift-and-add arithmetic forms the new
   v and u. It compares the new v with 30 mV, and multiplexers load c and
   u+d on a spike.

A step therefore takes K+N+1 clocks: 13 for IzhCOR6, 15 for IzhCOR8.
`spike` and `done` pulse together, and `i_in` is sampled at `start`. The
new u uses the old v.

Against a real-valued Euler model with the same dt, all four variants give
the same spike count for tonic spiking (a, b, c, d = 0.02, 0.2, -65, 6;
I = 14) and for intrinsic bursting (0.02, 0.2, -55, 4; I = 10). They also
give the same inter-spike interval. The v trace of the first 40 ms stays
within 0.2–0.6 % NRMSD: RMS deviation divided by the reference's v range.
`tb_neuron_patterns` prints this table.

## Network timing (`snn_sequencer`)

All 21 neurons have the same latency and advance in lock step. The
sequencer starts a new step one clock after the previous one finishes. Every
2^DT_SHIFT steps it raises `sample_tick` for one clock, which makes a
sampling period of 1 ms of model time. Several things happen on that tick:

* every `spike_history` shifts in whether its neuron fired during the
  period;
* every `lfsr_spike_gen` draws a new random event;
* one clock later (`go`), every `stdp_synapse` looks at the freshly shifted
  histories.

With the default IzhCOR8 neurons, a 1 ms period is 8 × 16 = 128 clocks. At
50 MHz the network runs about 390 times faster than real time.

Input layer: an LFSR event applies `I_STIM = 40` to its input neuron for one
sampling period. That normally fires the neuron once, so each input neuron
emits a random spike train of about 7 Hz. About 1 % of events produce no
spike of their own: for example, two events in consecutive periods give a
single spike. The output neuron receives
`I_o = Σ w(i)·f(i)`, where f(i) is 1 if input neuron i fired in the previous
Euler step.

## Learning (`spike_history`, `stdp_synapse`, `exp_cordic`)

This is the least obvious part of the design.

Each neuron's `spike_history` is a 41-bit register: bit j is 1 if the neuron
fired j sampling periods ago. A synapse acts only when the **middle** bit of
its pre-synaptic register, `pre_hist[20]`, is set. A pre-synaptic spike then
lies exactly 20 periods in the past, so the post-synaptic register shows a
symmetric window around it:

| post-synaptic bits | meaning | dt = t_post − t_pre | action |
|---|---|---|---|
| 19 … 0 | post fired after pre | +1 … +20 periods | potentiation, w += A+·e^(−dt/τ) |
| 20 … 40 | post fired at the same time or before | 0 … −20 periods | depression, w −= A−·e^(dt/τ) |

Two priority encoders find the nearest post spike on each side. For each one
that exists, the unit takes four steps:

1. Scale |dt| by 1/τ with a constant shift-and-add (τ = 20 periods).
2. Run `exp_cordic`.
3. Scale the result by A+ = 2 or A− = 4, which is a shift.
4. Add the change to the weight and clip it to [W_MIN, W_MAX].

Potentiation is applied before depression. One update takes at most
2·(N_EXP+2) = 20 clocks, well inside a sampling period. An assertion checks
that a new tick never arrives while an update is still running.

Because learning starts only when the pre spike reaches the middle bit, each
weight change is applied 20 ms after the pre-synaptic spike. Future post
spikes have been seen by then. Each pre spike is handled exactly once.

`exp_cordic` computes e^-x for 0 ≤ x < 2:

1. The result starts at 1, or at e^-1 if the integer bit of x is set.
2. For i = 1 … N_EXP (8), one iteration per clock: if the remaining fraction
   is ≥ 2^-i, subtract 2^-i and multiply the result by the constant
   e^(−2^-i). Each of those eight constant products is its own shift-and-add
   network, and the iteration counter selects one.

The relative error is below 2^-8. The measured maximum over the whole range
is 0.39 %.

## Monitoring output (`v_streamer`, `uart_tx`)

The output neuron's membrane potential is sent to a host as 32-bit words
over an 8N1 UART at 9600 bit/s. The serial line has no parity. When the
streamer is idle it captures v at the end of an Euler step and sign-extends
it to 32 bits. It then passes the four bytes to the transmitter, least
significant byte first. The word is Q16.14: divide by 16384 for millivolts.

A word takes about 4 ms of wall time, while the network produces a step
every few hundred nanoseconds. The host therefore sees a heavily
down-sampled trace. Captures that arrive during a transfer are dropped.

## Parameters of `cordic_snn_top`

| parameter | default | meaning |
|---|---|---|
| N_IN | 20 | input neurons / synapses |
| DEPTH, CENTER | 41, 20 | spike-history length and trigger bit |
| K, N_COR | 6, 8 | CORDIC square iterations (IzhCOR8) |
| DT_SHIFT | 3 | dt = 1/8 ms, 8 steps per 1 ms sampling period |
| N_EXP | 8 | exponential iterations |
| TAU | 20.0 | STDP window in sampling periods (20 ms) |
| A_PLUS, A_MINUS | 2.0, 4.0 | STDP gains |
| W_INIT, W_MIN, W_MAX | 96, 0, 192 | weights |
| RATE_HZ, SAMPLE_US | 7.0, 1000 | input event rate, sampling period |
| I_STIM | 40.0 | stimulus current of an input event |
| CLK_HZ, BAUD | 50 000 000, 9600 | UART bit timing |

All neurons use the tonic-spiking set a, b, c, d = 0.02, 0.2, −65, 6. These
are parameters of `izh_neuron` and are not brought out at the top.

## Design choices and departures

The following are this design's choices, where the source description gives
no value or leaves the point open:

* **Time step and sampling period.** dt = 1/8 ms, and the sampling period is
  1 ms. This makes the 20-bit STDP window on each side equal to τ = 20 ms.
* **Iteration counts.**
  * The square takes K+N iterations (12 for N = 6). Counting only the N
    fractional iterations would not cover |v| up to 100 mV.
  * The exponential uses 8 iterations. A 6-iteration variant is
    `N_EXP = 6`.
* **Weight bound.** The upper bound is 192. A bound of 200 was also
  considered.
* **Stimulus.** Each input event is a 1 ms current of I_STIM. A pre-synaptic
  spike reaches the output neuron as a current of w for one Euler step.
* **LFSR and pairing.** The LFSR is a 32-bit Galois register
  (x^32+x^22+x^2+x+1), advanced 16 steps per draw. Pairing uses the nearest
  post spike on each side.
* **Division by τ.** τ = 20 is not a power of two, so dividing by it is a
  shift-and-add multiplication by 1/20 rather than a single shift.
* **Reset.** It is synchronous and active low. All handshakes
  (start/busy/done, valid/ready) belong to this design.
* **STDP hardware.** Each synapse has its own exponential unit. An STDP rule
  using 2^x in place of e^x is a cheaper, less accurate alternative. It is
  not included.
* **Not implemented.**
  * A UART receiver, since nothing defines what it would receive.
  * The USB-serial bridge and host software.

## Simulating

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/snn_pkg.sv tb/tb_cordic_snn_top.sv --top-module tb_cordic_snn_top
./obj_dir/Vtb_cordic_snn_top
```

| testbench | what it shows |
|---|---|
| tb_cordic_square | squares within the CORDIC error bound, latency K+N, for N = 6 and 12 |
| tb_izh_neuron | spike times, reset values and latency against a real-valued model |
| tb_neuron_patterns | spike count, ERRT and NRMSD of IzhCOR6/8/10/12 for tonic spiking and bursting |
| tb_exp_cordic | e^-x over the whole input range, latency N_EXP |
| tb_spike_history | history bits against a queue model |
| tb_stdp_synapse | weight changes against the exponential rule, clipping at both bounds |
| tb_lfsr_spike_gen | 7 Hz event rate, stimulus timing, seed independence |
| tb_snn_sequencer | step scheduling and the 1-in-8 sampling tick |
| tb_uart_tx, tb_v_streamer | serial frames and byte order, decoded by a receiver model |
| tb_cordic_snn_top | 6 s of network time with narrowed weight bounds; every weight update checked against the STDP rule, UART words decoded |
| tb_snn_full_size | default parameters, 120 s of network time (about 1.5 min of simulation): same checks, plus the weights must split towards the bounds |

In the 120 s default run there are about 16 600 input spikes, 940 output
spikes, 3 600 potentiations and 2 700 depressions. At the end, 18 of the 20
weights lie within 10 % of a bound. Most are near 0, because depression is
twice as strong as potentiation. One is at the top.

The numbers above come from simulation only. Nothing here has been measured
on an FPGA: not timing, not resource use, not power.
