# Pulse-comparison symbol synchronizers: bit-rate and quarter-rate

A symbol synchronizer recovers a clock from a stream of NRZ data. The clock
should rise in the middle of each bit, so that it can sample ("retime") the
data where the eye is widest. The synchronizers here are first-order phase-locked
loops. Their phase comparator compares two pulses that start at a data
transition:

* a **variable pulse** Pv, which ends at the next sampling edge of the
  recovered clock. Its width measures how late the clock is.
* a **fixed pulse** Pf, whose width is half a bit when the loop is locked.

Their difference Pe = Pv − Pf passes through a gain Ka and a low-pass filter
and steers a VCO. At lock the clock edge sits half a bit after each
transition.

There are two families, each in two versions:

| index | name  | transitions used | comparator clocking | fixed pulse made by |
|-------|-------|------------------|---------------------|---------------------|
| 0     | b-m   | both             | bit-rate clock CK   | data ⊕ data delayed T/2 (preset delay, "manual") |
| 1     | b-a   | both             | bit-rate clock CK   | second flip-flop on the falling CK edge ("automatic") |
| 2     | p-m/4 | rising only      | four quarter-rate clocks | rising data edge, T/2 preset delay |
| 3     | p-a/4 | rising only      | four quarter-rate clocks | second bank of four flip-flops, pulse one bit wide at half weight |

In the quarter-rate family no flip-flop is ever clocked faster than a quarter
of the bit rate. Four flip-flops share the work, each taking every fourth bit.

All four loops have the same gain, filter and VCO. Only the comparator
differs. `sync_top` runs the four side by side on the same input, each with a
jitter meter. This lets the four be compared, as in the jitter-against-SNR
study the design comes from.

## Discrete-time model

Everything runs on one **sample clock** `clk` with `SAMPLES_PER_BIT` ticks
per data bit (default 1000). The data rate is normalised to 1 baud, so one
bit is 1 s and one sample is 1 ms. That is the sampling step used in the
original loop analysis.

Every signal that the original circuit treats as an analog waveform or a
clock is here a level sampled on `clk`. This covers the data DD, the
recovered clock CK, the quarter clocks CF/CQ/COF/COQ and the pulses Pv, Pf
and Pe. A flip-flop "clocked by CK" is a `clk` register that loads when it
sees a rising edge of CK. Pulse widths are therefore exact to one sample
(0.001 UI).

The error is carried as a small signed integer in **half units**
(`err_t`, Pe = err/2). This is needed because the p-a/4 comparator subtracts
a half-amplitude fixed pulse. The error values are:

* b-m, b-a, p-m/4: −2, 0 or +2;
* p-a/4: −1, 0, +1 or +2.

## The phase comparators

In the descriptions below, "late" means the recovered clock's sampling edge
comes more than T/2 after a data transition.

**b-m (`pc_bm`).**
* DR is DD sampled on the rising edge of CK.
* Pv = DD ⊕ DR. It runs from each transition to the next CK rise.
* Pf = DD ⊕ DD(t − T/2). It is exactly T/2 long after each transition.
* At lock the two pulses coincide, so **Pe is identically zero**. Off lock,
  Pe is a pulse whose width equals the timing error. It is positive when the
  clock is late and negative when it is early.
* The T/2 delay (`delay_line`, 500 samples) stands for a delay that has to
  be adjusted by hand in a real circuit.

**b-a (`pc_ba`).** This is Hogge's self-correcting detector.
* A second flip-flop takes DR on the falling edge of CK, giving Q1.
* Pf = DR ⊕ Q1. It runs from the CK rise to the CK fall, half a clock period
  after every transition, with no adjustment.
* **Pe never vanishes.** Each transition gives a +1 pulse followed by a −1
  pulse. At lock the two have the same area, so the average is zero.

**p-m/4 (`pc_pm4`).**
* Zi is the output of the quarter-rate retimer (see below).
* Pvp = DD ∧ ¬Zi. It is high from a *rising* data edge to the next bit edge.
* Pfp = DD ∧ ¬DD(t − T/2). It is high for T/2 after a rising data edge.
* Falling edges produce nothing. At lock Pe vanishes, as in b-m.

**p-a/4 (`pc_pa4`).**
* A second quarter-rate retimer, on the same four clocks, retimes Zi itself.
  Its flip-flops sample Zi just before the first bank updates, so its output
  Zi2 is Zi delayed by exactly one bit.
* Pfp = Zi ∧ ¬Zi2. It is high for **one whole bit** after a rising edge of
  the retimed data.
* Pfp is halved before the subtraction: Pe = Pvp − Pfp/2. In the original
  circuit this is a resistive divider.
* At lock, Pvp (T/2 wide at height 1) and the halved Pfp (T wide at height ½)
  have equal areas.

The gain of each comparator per transition is the same. A timing error of
e UI gives an error area of e·T for each transition it uses. So with random
data the average gain of the rising-only comparators is half that of the
both-transition ones: they see one usable transition per four bits instead
of one per two.

## Quarter-rate retimer (`quarter_retimer`)

The quarter clocks are square waves with a period of four bits:

* CQ is CF delayed by 90° (one bit);
* COF = ¬CF;
* COQ = ¬CQ.

Their rising edges come one bit apart, in the order CF, CQ, COF, COQ. They
load flip-flops D1..D4 in turn. An AND-OR multiplexer then passes each
flip-flop's output during the bit that follows its sampling edge:

    Z1 = Q1·CF·COQ   Z2 = Q2·CF·CQ   Z3 = Q3·CQ·COF   Z4 = Q4·COF·COQ   Zi = Z1+Z2+Z3+Z4

Zi is therefore the data sampled at every bit edge. It is the same stream a
single bit-rate flip-flop would give.

The multiplexer uses the clock levels registered together with the
flip-flops. Because of this, Zi changes one sample after the edge, without a
glitch, and during the edge sample it still shows the old bit. The p-a/4
comparator relies on that old value: its second bank picks it up, which
gives Zi2 = Zi delayed by one bit.

## Loop: Ka, F(s), VCO

| element | realisation | value |
|---------|-------------|-------|
| Ka (`ka_amp`) | constant multiply, result in signed Q8.24 | Ka = 0.08 (gives Bl = Ka·Kf·Ko/4 = 0.02 Hz with Kf = 1/2π, Ko = 2π) |
| F(s) (`loop_filter`) | first-order low-pass y += α(x − y), α = 2π·0.5/1000 in Q0.16 | 0.5 Hz, 25× the loop bandwidth, unit DC gain |
| VCO (`vco`) | 34-bit phase accumulator: 32 bits of phase within a bit, 2 bits counting bits modulo 4 | centre 1 Hz; gain 1 Hz per unit of control (Ko = 2π rad/s) |

The VCO produces both clocks from the same accumulator:

* CK is high in the first half of each bit period, so its rising edge is the
  sampling instant.
* The quarter clocks are decoded from the two bits that count bits modulo 4.
  Each of their rising edges coincides with a CK rise.

A positive Pe raises the frequency, which pulls a late clock earlier.

The two register stages (filter and accumulator) add two samples of loop
delay, which is negligible.

With random data the phase error decays with a time constant of:

* about 1/(Ka · ½) = 25 bits for b-m and b-a;
* about 50 bits for p-m/4 and p-a/4, because they see half the transitions.

`tb_symbol_sync` checks both time constants.

## Jitter meter (`jitter_meter`)

The meter has three parts:

1. An RS flip-flop, set by the rising edge of the recovered clock CKR and
   reset by the rising edge of the emitter clock CKE.
2. An integrator that counts the samples during which the flip-flop is high.
3. A sample-and-hold that takes the count at every CKE rise and then clears
   the integrator.

The held value minus half a bit is the phase of CKR against the middle of
the emitter bit. It is output in 1/`SAMPLES_PER_BIT` UI, one value per bit,
with a `valid` strobe. RMS and peak-to-peak jitter are statistics over these
values, computed by whoever reads them (the testbenches do it).

If both edges fall in the same sample, the reset wins.

## Top level (`sync_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | sample clock, `SAMPLES_PER_BIT` ticks per bit |
| `rst_n` | in | 1 | synchronous active-low reset |
| `dd` | in | 1 | received data, already sliced to a logic level |
| `cke` | in | 1 | emitter clock, rising at the start of each transmitted bit |
| `ckr[i]` | out | 4 | recovered clock of variant i (0 b-m, 1 b-a, 2 p-m/4, 3 p-a/4) |
| `dr[i]` | out | 4 | retimed data of variant i |
| `pe[i]` | out | 4 × 3 | comparator error of variant i, half units |
| `jitter[i]` | out | 4 × 16 | last meter value of variant i, signed, 1/`SAMPLES_PER_BIT` UI |
| `jitter_valid[i]` | out | 4 | new meter value strobe |

Parameters: `SAMPLES_PER_BIT` = 1000, `KA` = 0.08, `FC_HZ` = 0.5. To use a
single synchronizer, instantiate `symbol_sync` with
`VARIANT` ∈ {`B_M`, `B_A`, `P_M4`, `P_A4`} from `sync_pkg`.

The four delay lines of 500 stages dominate the size: about 1400 flip-flops
in the top. The logic itself is tiny.

## Behaviour measured in simulation

**Clean data.**
* All four variants lock from a 0.2 UI initial error and retime the data
  without errors.
* All four follow a 0.25 UI jump of the emitter phase.
* The manual versions settle exactly mid-bit, with zero residual error pulse.
* The automatic versions settle about 0.013–0.016 UI late. Their error
  pulses never vanish, and the VCO frequency (and so CK's half period)
  moves a little during each pulse pair.
* The automatic versions also show about 0.01 UI RMS of pattern-dependent
  jitter at any SNR. The reason is the same: their error pulses never vanish.

**Jitter against SNR** (`tb_jitter_snr`).
* Test channel:
  * NRZ of amplitude 0.5 plus Gaussian noise;
  * the noise is band-limited to 5 Hz, and SNR = 25/σ²;
  * the sum is sliced at zero.
* Each point is 1000 bits after 150 bits of settling.
* Typical results in UI RMS:

| SNR | b-m | b-a | p-m/4 | p-a/4 |
|-----|-----|-----|-------|-------|
| 1   | 0.080 | 0.232 | 0.098 | 0.200 |
| 2   | 0.057 | 0.074 | 0.090 | 0.058 |
| 4   | 0.037 | 0.037 | 0.038 | 0.043 |
| 8   | 0.008 | 0.010 | 0.011 | 0.010 |
| 16  | 0.001 | 0.010 | 0.007 | 0.008 |
| 40  | 0.000 | 0.010 | 0.000 | 0.008 |

The published study reaches the same qualitative conclusions:

* jitter falls with SNR;
* at low SNR the manual versions are clearly better than the automatic ones,
  and b-m is best;
* at SNR ≈ 1 the published values are roughly b-a 0.25, p-a/4 0.15–0.2,
  p-m/4 0.1 and b-m 0.05 UI.

Two features differ from the published curves:

* The published curves fall smoothly towards zero, and p-a/4 has a
  pronounced bump near SNR 16 (loss of synchronism). Neither appears here.
* The likely cause is the receive prefilter. The original set-up has one in
  front of the synchronizer, but its type and bandwidth are not published,
  and this channel has none. Without it, a noisy transition hardly moves the
  slicer crossing, so the jitter at high SNR is set only by the loop's own
  ripple.

## Where this RTL departs from, or adds to, the published design

* **Discrete time.** This is a sample-clock model of a mixed-signal loop.
  The VCO is a numerically controlled oscillator and F(s) is a first-order
  IIR. Flip-flops on CK and on the quarter clocks are edge-enabled `clk`
  registers. The comparator pulses are exact to one sample.
* **Positive-transition pulses.** For the quarter-rate versions, the text
  describes the fixed pulse as made "with an exclusive-or". The waveforms,
  however, show Pvp and Pfp only at rising data edges. An exclusive-or fixed
  pulse would also fire at falling edges, against a rising-only variable
  pulse, and would bias the loop. Both fixed pulses are therefore built from
  rising edges (new level ∧ ¬old level).
* **Second bank of p-a/4.** It is fed with Zi and treated as having zero
  delay on its data path. This gives the one-bit-wide fixed pulse at half
  weight that the waveforms show.
* **Multiplexer gates.** Which two clock levels open each multiplexer gate
  is this design's choice. Any choice that opens Zk for exactly the bit after
  its sampling edge is equivalent.
* **Quarter-rate VCO.** It is the same accumulator as the bit-rate one,
  counting bits modulo 4. This keeps the loop gain per UI identical for all
  four variants.
* **Loop gain.** Ka = 0.08 is used for all four variants, as derived for
  sequential synchronizers. As a result, the rising-only variants have half
  the effective loop bandwidth of the both-transition ones with random data.
* **Meter edges.** The meter's RS flip-flop is edge-triggered, and reset
  wins a tie.
* **Reset** is synchronous and active low. It is not part of the original
  description.
* **Not built:**
  * the noise source, noise filter and receive prefilter of the test set-up.
    They are analog; the first two exist only as a testbench model, and the
    prefilter is not specified.
  * the second-order loop, which is mentioned but not given.
  * the histogram-processing software.

## Files

`rtl/`:
* `sync_pkg.sv`: variant enum, quarter-clock struct, error type.
* `delay_line.sv`, `quarter_retimer.sv`: comparator building blocks.
* `pc_bm.sv`, `pc_ba.sv`, `pc_pm4.sv`, `pc_pa4.sv`: the four comparators.
* `ka_amp.sv`, `loop_filter.sv`, `vco.sv`: loop elements.
* `symbol_sync.sv`: one closed loop, comparator chosen by `VARIANT`.
* `jitter_meter.sv`: the meter.
* `sync_top.sv`: the four synchronizers and their meters.

`tb/`:
* `tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb_sync_top.sv`: runs the whole design at default parameters. It covers
  lock, a phase jump and re-lock, positive and negative error pulses, the
  half-weight fixed pulse, meter samples and retimed data.
* `tb_jitter_snr.sv`: the jitter-against-SNR sweep.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --timescale 1ns/1ps --top-module tb_sync_top \
        -y rtl -y tb +libext+.sv rtl/sync_pkg.sv tb/tb_sync_top.sv -o sim
    ./obj_dir/sim

Replace `tb_sync_top` with any other testbench name. Every testbench
finishes in a few seconds; the SNR sweep takes about ten. The design is
plain synthesizable SystemVerilog. Its one generic parameter of substance is
`SAMPLES_PER_BIT`, which sets the timing resolution. `KA` and `FC_HZ` are
`real` parameters and are converted to fixed-point constants at elaboration.
