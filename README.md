# Pipelined particle sampler for electroslag remelting state estimation

An electroslag remelting (ESR) furnace cannot be measured directly: the slag
temperature, the boundary layer thickness and the electrode immersion depth are
hidden, and the sensor signals that can be read are noisy. A particle filter
estimates the hidden state by keeping a few hundred candidate states
(particles), pushing each one through a model of the furnace with random noise
added, and comparing the simulated sensor readings with the real ones. The
comparison and the resampling are cheap. The expensive part is the simulation
of every particle once per sampling period.

This RTL does that simulation. Each particle goes through the physical model F
(five coupled rate equations, integrated over one sampling period) and then
through the measurement model H (five simulated sensor readings). The whole
chain is one pipeline, so after the pipeline has filled, one particle leaves
every clock cycle. A host loads the particles and their noise. It starts a
step, collects the new states x_k+1 and observations y, and does the weighting
and resampling itself.

```
                        esr_pf_sampler  (NC copies, default 1)
   host ── init / wr ──►┌──────────────────── esr_fh_sim ────────────────────────┐
                        │ particle_store ──► esr_fmodel (F) ──► esr_hmodel (H) ──┼──► x_k+1, y,
   start, u, ts ───────►│  x, process noise,   inv_farm ─┐                       │    index, err
                        │  meas. noise         queue ────┴► esr_dynamics ►       │
                        │                                   esr_integrator       │
                        └────────────────────────────────────────────────────────┘
```

## Number format

Every quantity is a signed fixed-point number with 20 integer bits and 28
fractional bits (Q20.28, 48 bits, type `fx_t` in `fx_pkg`). That width matches
a 48-bit DSP multiplier. A product is formed at 96 bits and shifted right by 28
bits, which truncates towards minus infinity. The model parameters are real
numbers in `fx_pkg`. Every product or quotient of parameters that the equations
need is folded into one constant at elaboration, so the datapath never divides
by a constant.

The 20-bit integer part limits the ranges. The largest intermediate value is
the electrical power P = R·I², which must stay below 2^19 ≈ 524 kW. The
testbenches draw states around the operating point (Δ 10–20, Ts 2150–2250 K,
d −0.2–2 m, I 4.5–5.5 kA) where this holds. Two constants are too small for
Q20.28 and carry extra fractional bits:

* 1/(ρs·Vs·cs) ≈ 1.2·10⁻⁵ is stored scaled by 2^16.
* The inverse factorials of the exponential are stored with 60 fractional bits.

## The one division: reciprocal of Δ and the inversion farm

The rate equations divide by the boundary layer thickness Δ. That is the only
division in the models, and it sets the shape of the whole design.

`fx_inverter` computes q = 1/Δ by restoring long division of 2^56 by |Δ|. It
produces one quotient bit per cycle, so a reciprocal takes 2F = 56 cycles. The
first step is taken in the cycle the operand is loaded, so `done` rises exactly
56 cycles after `start`. The result is held until `ack`. If the quotient does
not fit in Q20.28, `ovf` is raised. That happens for Δ = 0, for Δ = ±1 unit, and
for |Δ| below about 2^-19.

One such unit would accept a new particle only every 56 cycles. `inv_farm`
therefore holds NINV units, default 60:

* Requests go to the units in round-robin order.
* A unit's busy flag marks it taken until its result has been read.
* Every unit takes the same number of cycles, so results finish in request
  order. They are read out in the same round-robin order, with no tags and no
  reordering.
* A unit can be restarted in the same cycle its result is read, so it is
  occupied for exactly 56 cycles. Any NINV ≥ 56 therefore accepts a request
  every cycle. In exchange, `in_ready` depends combinationally on the output
  handshake.
* With fewer units, `in_ready` drops while the next unit in turn is still
  busy. The end-to-end testbench uses 8 units on purpose to exercise this stall.

## Physical model F (`esr_fmodel`)

F is built from three parts:

* **Inversion.** Δ of each incoming particle goes into the farm. The rest of
  the particle waits in a first-word-fall-through queue (`sync_fifo`, depth
  NINV + 2) together with its process noise and caller data: the state,
  command noise, particle index and measurement noise.
* **Dynamics** (`esr_dynamics`). When the farm delivers 1/Δ, it is joined with
  the head of the queue. Both enter an 11-stage pipeline that computes the five
  rates dΔ/dt, dTs/dt, dd/dt, dXram/dt and dMe/dt:

  ```
  I = Ic + n_I          Vram = Vramc + n_V
  Rd = R1 − m0·d (d < 0)   R1 − m1·d (d ≥ 0)
  R = Rd·exp(−a_elect·(Ts − Ts*))      Volt = R·I      P = Volt·I
  Qm = He·Ae·(Ts − Tm)   Qs = Hs·2π·ri·hs0·(Ts − Tss)   pm = Qm/Ae
  Sdot = −αr·Csd0/Δ + Csp·pm/hm
  dΔ/dt  = αr·Cdd/Δ − Cdp·pm/hm
  dTs/dt = (P − Qm − Qs)/(ρs·Vs·cs)
  dd/dt  = Vram/a − Sdot        dXram/dt = Vram        dMe/dt = −ρm·Ae·Sdot
  ```

  The process noise is added to the command inside the model, in stage 1.
  Each stage register holds one record (a packed struct) of every
  intermediate value. A stage copies the record of the stage before and fills
  in what it computes. Values that are ready early, such as the Δ, d and Me
  rates, ride along in the record until the slow path has caught up:
  exp → R → Volt → P → dTs/dt.
* **Integration** (`esr_integrator`). x_k+1 = x_k + rate·ts, in one register
  stage. A delay line of 11 stages carries x_k past the dynamics pipeline to
  meet its rates.

After the farm, the pipeline advances as one unit. The enable is
`en = !out_valid || out_ready`. A stalled output freezes the dynamics, the delay
line and the integrator. It then holds the farm's output, and eventually the
farm's input.

Latency: a particle accepted at cycle t leaves at t + 56 + 11 + 1 = t + 68.

A particle whose 1/Δ overflowed still goes through, with `out_err` set. Its
x_k+1 is not meaningful, and the host is expected to discard it.

## The exponential (`exp_taylor`)

The resistance needs e^x for x between about −2.67 and 2.18. The design sums
the Taylor series up to x^16/16!. Order 15 is enough for this range. The series
remainder is below 10⁻⁷.

The powers are formed in a tree that doubles the highest power at each stage:

| stage | powers formed | terms added to the sum |
|---|---|---|
| 1 | x, x² | 1 + x |
| 2 | x³, x⁴ | x²/2! |
| 3 | x⁵ to x⁸ | x³/3! and x⁴/4! |
| 4 | x⁹ to x¹⁶ | x⁵/5! to x⁸/8! |
| 5 | — | x⁹/9! to x¹⁶/16! |

The unit therefore takes one argument per cycle and has a latency of 5. The
inverse factorials are constants computed at elaboration.

The powers are held as 64-bit values with 28 fractional bits, because x¹⁴ to
x¹⁶ leave the Q20.28 range at the negative end. The inverse factorials carry 60
fractional bits, because 1/12! and smaller round to zero in Q20.28. With these
formats the result is within about 10⁻⁶ relative of e^x.

The exponential is used twice, once in F and once in H.

## Measurement model H (`esr_hmodel`)

H takes x_k+1 from F and computes five simulated observations, each with its
own measurement noise added:

```
y.d    = d + n_d
y.xram = Xram + n_x
y.ir   = Ic + n_i
y.lc   = Me − ρs·Ae·d (d > 0)   or   Me (d ≤ 0),  + n_lc
y.volt = Rd·exp(−a_elect·(Ts − Ts*))·Ic + n_v
```

Here Rd is R1 − m1·d for d > 0 and R1 − m0·d otherwise. H uses the
commanded current without noise.

H is an 11-stage record pipeline, stallable in the same way as F. It carries
x_k+1 and the caller's data next to the observations. `in_ready` equals the
pipeline enable.

## One simulator (`esr_fh_sim`) and its step protocol

`particle_store` holds, for each of NP = 150 particles:

* the state x;
* the process noise for the two commands;
* the measurement noise for the five observations.

`init` writes one state into every particle and clears all noise. `wr` writes
one particle's state and noise. Loads are ignored while `busy` is high.

A step runs as follows:

1. A `start` pulse, given while `busy` is low, latches the command u (current
   Ic and ram speed Vramc) and the sampling period ts. It then raises `busy`.
   The inputs may change after that without affecting the step.
2. An issue counter offers particles 0 … NP−1 to F, one per cycle whenever F
   accepts. F's caller data holds the particle index and the measurement noise.
   H's caller data holds the index and F's overflow flag.
3. Results leave through `out_valid`/`out_ready` in index order. Each result
   has `out_x` (x_k+1), `out_y`, `out_idx` and `out_err`. `busy` falls when the
   last result has been taken.

Timing without output stalls:

* The first result appears 80 cycles after the `start` edge: one cycle to
  issue, 68 cycles in F and 11 in H.
* The last result comes NP − 1 cycles later.
* A step of P particles therefore takes P + 80 cycles, or 230 cycles at the
  default size.

## Copies (`esr_pf_sampler`, the top)

The top holds NC simulators (default 1), started together by one `start`. Each
copy has its own particles. `wr_copy` selects which copy a `wr` goes to, and
`init` broadcasts to all copies. One output handshake returns all NC results
for one particle index at once: `out_x[c]`, `out_y[c]` and `out_err[c]`. The
top's ports are plain signals, packed structs and packed arrays of structs.

## What the host provides

The sampler does not generate noise, weigh particles or resample. The host
must:

* draw process and measurement noise from whatever distributions suit the
  plant, and load them with the particles;
* compare each `out_y` with the real measurement and resample;
* load the resampled states before the next `start`.

The new states are not written back into the store. The host always decides
what the next step starts from.

## Departures from the reference design, and limits

* **Inverter count.** The farm holds 60 inverters, 2F + 4, as in the reference
  implementation. The textual description gives 2F = 56, which is also enough
  here for one request per cycle (tested).
* **Farm assignment.** The farm assigns strictly round-robin rather than to
  any free unit. Results are read from the units' own registers rather than
  from a separate result queue.
* **Sign of the melting term.** The term in dΔ/dt is subtracted, following the
  rate equation. One hardware description of the reference adds it.
* **Overlap with the inversion.** The rate pipeline starts after the
  reciprocal arrives. The reference overlaps its first stages with the
  inversion. Throughput is the same; latency is a few cycles longer.
* **Stage cuts.** The cut into pipeline stages (11 for the rates, 11 for H, 5
  for the exponential) and all latencies are this design's own.
* **Exponential formats.** The exponential uses wider formats for the powers
  and inverse factorials, as described above.
* **Bias terms.** The current, ram-speed and voltage biases and the relative
  melting coefficient μr are zero, so they fold away. The d breakpoint of the
  resistance law is 0.
* **Ranges.** States far from the operating point can overflow Q20.28
  silently. Only the reciprocal is range-checked.
* **Copies.** One copy per chip is the configuration reported as built. A
  second copy is a parameter setting (NC = 2) and is exercised in simulation.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops by itself. They compare the
hardware against a double-precision model of the same equations
(`tb/esr_ref_pkg.sv`). The tolerance is 10⁻⁶ relative plus 10⁻⁴ absolute. The
inverter and the integrator are checked bit-exact against integer models. With
Verilator 5 (packages first; `-y rtl` finds the modules by file name):

```
verilator --binary --timing --assert -y rtl -Irtl \
    rtl/fx_pkg.sv tb/esr_ref_pkg.sv tb/tb_esr_pf_full.sv \
    --top-module tb_esr_pf_full -Mdir obj
./obj/Vtb_esr_pf_full
```

Replace `tb_esr_pf_full` with any testbench name from the table below.

| testbench | what it runs |
|---|---|
| `tb_fx_inverter` | reciprocal against integer division, latency 56, hold until ack, overflow cases |
| `tb_inv_farm` | 60- and 56-unit farms at one request per cycle, latency 56; 8-unit farm stalling under random backpressure |
| `tb_exp_taylor` | e^x over the working range with a random enable, latency 5 |
| `tb_esr_dynamics` | five rates against the reference under random stalls, latency 11 |
| `tb_esr_integrator` | Euler step, bit-exact |
| `tb_esr_hmodel` | observations under random backpressure, both d branches, latency 11 |
| `tb_particle_store`, `tb_sync_fifo` | storage and queue against shadow models |
| `tb_esr_fmodel` | x_k+1 under backpressure, overflow flag, latency 68 |
| `tb_esr_fh_sim` | a 24-particle simulator through several steps, first result at 80 cycles, step of P + 80 cycles |
| `tb_esr_pf_sampler` | two copies of 20 particles with an 8-unit farm |
| `tb_esr_pf_full` | the top at its default size (1 copy, 150 particles, 60 inverters) |
| `tb_esr_pf_200` | one copy sized for 200 particles: step of 280 cycles |

In the last three testbenches the testbench plays the host. Over several steps
it loads by broadcast and by single writes, and it resamples between steps. It
checks every state and observation. It counts each mechanism (init broadcast,
single writes, loads offered during a step and ignored, several steps, first-result latency, reciprocal overflow, both
resistance branches, output backpressure, farm stall) and counts a failure for
any that never occurred. At full size it also requires that the farm never
holds back the input while the output is free.
