# Direct torque control of an induction machine: fixed-point estimator and controller in SystemVerilog

Direct torque control (DTC) drives an induction machine without a current
controller or a modulator. Every sampling period it estimates the stator flux
vector and the electromagnetic torque from the measured phase currents and the
voltage the inverter applied, compares both with their references in
hysteresis comparators, and picks the next inverter voltage vector from a small
table. The torque ripple of such a drive is set mostly by how long the
controller waits between samples: a slow processor lets the torque overshoot
its band before it reacts. This design runs the whole estimate-compare-select
loop in logic at a 5 us sampling period (200 kHz), with a two-stage estimator
pipeline of 10 us latency, entirely in two's complement fixed point.

It is an implementation of the estimator published in "An Improved FPGA
Implementation of Direct Torque Control for Induction Machines" (originally
written in VHDL), together with the classic DTC comparators and switching table
around it. Word formats, constants and the stage split follow that article;
where it leaves something open, the choice made here is stated below and in
the comment at the top of each source file.

## Signal flow

```
             +-------------------------- dtc_estimator ---------------------------+
 ia, ib ---->| iab_calc --> i_alpha,i_beta --+--> [reg] ------------------+       |
             |                               |                            v       |
 vdc, sw --->| vab_calc --> V_alpha,V_beta --+--> flux_integrator x2 --> torque_calc --> [reg] te
 rs -------->|                                    (phi register)   |              |
 pole ------>|                                                     +-> flux_magnitude -> sqrt -> [reg] flux_s
             |                                                     +-> sector_judge ----------> [reg] sector
             +----------------- stage 1 -------------------|------------- stage 2 ----------------+
 te_ref ----> torque_hysteresis (+1/0/-1) --+
 flux_ref --> flux_hysteresis   (1/0)  -----+--> switching_table --> sw = {sa, sb, sc} --> inverter
                        sector -------------+              |
                                                           +--> back into vab_calc
```

`dtc_top` wires all of this together. The inverter, the machine, the current
ADC and any display DAC are outside: the top takes converted currents and gives
out the switching states.

## Number formats

`[I.F]` means I integer bits including the sign and F fraction bits. All types
live in `rtl/dtc_pkg.sv`.

| quantity | type | format | 1 LSB |
|---|---|---|---|
| phase currents Ia, Ib | `cur_ph_t` | [5.12], 17 bits | 0.244 mA |
| i_alpha, i_beta | `cur_ab_t` | [6.12], 18 bits | |
| dc-link voltage | `vdc_t` | 12-bit unsigned integer volts | 1 V |
| V_alpha, V_beta | `volt_t` | [10.12], 22 bits | |
| stator resistance | `rs_t` | [5.5] unsigned, 10 bits | 31.25 mOhm |
| flux components | `flux_t` | [4.27], 31 bits | 7.5 nWb |
| squared magnitude | `radicand_t` | [8.54] unsigned, 62 bits | |
| flux magnitude | `flux_mag_t` | [4.13] unsigned, 17 bits | 0.122 mWb |
| torque | `torque_t` | [6.20], 26 bits | 0.95 uNm |

Constants (all as published):

| constant | code | value |
|---|---|---|
| sqrt(3)/3 | 19'h24F35 | 151349 / 2^18 |
| 1/3 | 18'h15555 | 87381 / 2^18 |
| Ts | 28'h000029F | 671 / 2^27 = 4.99934 us |
| 1 - wc*Ts (wc = 5 rad/s) | 23'h3FFF97 | 4194199 / 2^22 = 0.999974966 |
| sqrt(3), -sqrt(3) | 16'h6ED9, 16'h9127 | +/-28377 / 2^14 |

Every narrowing is a plain truncation (low bits dropped, so values round toward
minus infinity; high bits dropped, so out-of-range values wrap). Nothing
saturates. The ranges hold for the intended machine (a 400 V, 2.4 kVA,
two-pole-pair motor with about 0.9 Wb rated flux), but note that V_alpha wraps
for a dc link above 767 V and that the currents must stay within +/-16 A.

## The estimator pipeline (`dtc_estimator`)

There is one system clock `clk` and a one-cycle strobe `sample_en` per sampling
period; every register of the datapath loads only on a strobe. Two register
ranks separate the inputs from the outputs:

* **Stage 1** (combinational, then the first rank). The Clarke transform of the
  currents, the stator voltage from the switching states, and the flux
  integration all happen in the same period. The first rank is the pair of
  flux registers themselves plus a copy of i_alpha and i_beta, so that the
  torque in stage 2 multiplies flux and current of the same sample.
* **Stage 2** (combinational, then the output rank). Squared magnitude, square
  root, torque and sector, all from the first-rank values.

Inputs applied during period n therefore appear on `te`, `flux_s` and `sector`
after the strobe that ends period n+1: 10 us at 200 kHz. The flux components
are brought out after stage 1.

The square root and the multipliers are combinational, so the system clock
must be slow enough for a 31-step add/subtract chain, or the clock period
constrained as a multicycle path (the datapath only needs one result per
strobe). No timing closure was attempted.

### Flux integration with a leak (`flux_integrator`)

Per axis, with backward Euler integration (the current sample's input is used,
so no previous input needs storing):

```
phi(n) = ( phi(n-1) + (V(n) - Rs*I(n)) * Ts ) * (1 - wc*Ts)
```

The factor (1 - wc*Ts) turns the pure integrator into a first-order low-pass
with a 5 rad/s corner, so that a dc offset in the measured currents cannot make
the flux drift without bound. Intermediate words: Rs*I is cut to [11.12], the
increment (V - Rs*I)*Ts to [1.27], and the leaky sum back to [4.27].

One drawing of the original architecture puts the leak factor on the
increment only, before the adder. That form does not leak the stored flux and
so would not remove drift; this design follows the written equation above,
which multiplies the whole sum.

### Square root (`sqrt_nonrestoring`)

A nonrestoring square root never restores the remainder after a wrong guess:
it carries a negative remainder into the next step and corrects there.
For a radicand of RW bits (default 62):

```
r = -1 (RW/2+2 bits, signed), q = 0 (RW/2+1 bits)
for each of the RW/2 bit pairs of D, from the top:
    r = 4r + pair - (4q+1)   if r >= 0
    r = 4r + pair + (4q+3)   if r <  0
    q = 2q + (r >= 0)
root = q[RW/2-1:0]   = floor(sqrt(D))
```

Starting from r = -1 is the published variant; it gives the same first step as
r = 0. All steps are unrolled into one combinational block. The [8.54]
radicand gives a [4.27] root, of which the top 17 bits are kept as [4.13].

### Sector without angles (`sector_judge`)

Instead of an arctangent or CORDIC, three single-bit tests place the flux
vector in one of six 60-degree sectors:

| phi_a > 0 | phi_a > sqrt(3)*phi_b | phi_a > -sqrt(3)*phi_b | sector | angle |
|---|---|---|---|---|
| 1 | 1 | 0 | 1 | 270..330 deg |
| 1 | 1 | 1 | 2 | -30..30 deg |
| 1 | 0 | 1 | 3 | 30..90 deg |
| 0 | 0 | 1 | 4 | 90..150 deg |
| 0 | 0 | 0 | 5 | 150..210 deg |
| 0 | 1 | 0 | 6 | 210..270 deg |

The two other combinations cannot occur and decode to 000. Note the numbering:
sector 2, not sector 1, is centred on the alpha axis. The switching table is
built for this numbering. The published Karnaugh map is used here, not the
multiplexer constants of the published gate-level netlist.

### Torque (`torque_calc`)

`Te = 3/4 * P * (i_beta*phi_alpha - i_alpha*phi_beta)`. The pole-pair count
is an input (`pole`, 3 bits). 3P is formed as 2P + P. The division by 4 costs
nothing: the 55-bit product is read with two more fraction bits ([14.41]), and
bits 46..21 give the [6.20] result.

## The control loop around the estimator

These parts are named in the article, but their contents are not given. They
follow the usual hysteresis DTC scheme:

* `flux_hysteresis`: two levels. Error E = flux_ref - flux_s. Raise the flux
  when E > hb/2, lower it when E < -hb/2, hold otherwise. Resets to "raise".
* `torque_hysteresis`: three levels. Raise above +hb/2, lower below -hb/2,
  and go back to hold (zero vector) once the error has crossed zero. Resets
  to hold. Encoding in `tstat_e`: `T_ZERO=00`, `T_INC=01`, `T_DEC=11`.
* `switching_table`: with vectors V1..V6 = 100, 110, 010, 011, 001, 101
  (Sa Sb Sc) counter-clockwise from the alpha axis, and k the vector at the
  centre of the current sector (sector s -> k = ((s+4) mod 6) + 1), it selects
  V(k+1) to raise both flux and torque, V(k+2) to lower flux and raise torque,
  V(k-1) to raise flux and lower torque, and V(k-2) to lower both. On a torque
  hold it selects the zero vector (000 or 111) that is one leg away from V(k).

The band widths and references are input ports. The published test used a
torque band of about 0.7 Nm and a flux band of 0.00446 Wb (0.5 % of rated
flux, 37 LSB of [4.13]).

In `dtc_top` the comparators register on the sampling strobe and the table is
combinational. A new switching state is thus chosen from estimates that are
two periods old, one period after the comparators see them. The loop latency
is this design's choice; the article does not specify it.

## Why 5 us matters: ripple against sampling period

With a hysteresis comparator, the torque can only be caught once per sample.
Between two samples it keeps moving at a slope set by the speed and the
applied vector. So the overshoot beyond the band grows with the sampling
period. `tb/tb_dtc_ripple.sv` runs three copies of `dtc_top` side by side.
Each copy drives its own machine model. The runs use the same references and
bands (0.8 Wb / 0.00446 Wb, 4 Nm / 0.7 Nm) and differ only in sampling period.
The table gives the model's true torque after settling, 15 to 40 ms:

| sampling period | TS | LPF_K | RMS torque error | peak torque error | RMS flux error |
|---|---|---|---|---|---|
| 5 us (200 kHz) | 671 | 4194199 | 0.165 Nm | 0.39 Nm | 0.008 Wb |
| 25 us (40 kHz) | 3355 | 4193780 | 0.251 Nm | 0.58 Nm | 0.012 Wb |
| 50 us (20 kHz) | 6711 | 4193255 | 0.429 Nm | 1.19 Nm | 0.020 Wb |

At 5 us the torque stays within 0.04 Nm of the +/-0.35 Nm band. At 50 us it
leaves the band by more than twice the band's half-width. The machine model
(`tb/im_plant_model.sv`) is a test model with its own constants and a locked
rotor speed, so these numbers show the trend, not a specific drive's
figures.

## Departures from, and gaps in, the published design

* The stage registers are clock-enabled flip-flops on one clock, not a
  separate 5 us clock.
* Flux leak on the whole sum (equation), not on the increment (one drawing).
* The Clarke adder forms Ia + 2*Ib as in the transform equation. The
  current-transform drawing puts the doubling on Ia, which would give
  2*Ia + Ib.
* Currents are 17 bits [5.12]. One passage of the article mentions 21-bit
  current inputs; the detailed description and drawings use 17 bits.
* The torque uses 3/4 * P as in the torque equation. One drawing labels this
  multiplier just "*P".
* Comparator thresholds, comparator reset values, the switching table
  contents, zero-vector choice and the sector-register placement are this
  design's own choices.
* Not included: the ADC and DAC interfaces, the inverter, the machine, and the
  hardware-in-the-loop machine model (a table built from offline simulation
  data that is not available).
* No resource or timing figures are claimed; the published implementation
  used 2093 logic elements on an Altera APEX device.

## Files

`rtl/`: `dtc_pkg` (types, constants), `iab_calc`, `vab_calc`,
`flux_integrator`, `flux_magnitude`, `sqrt_nonrestoring`, `sector_judge`,
`torque_calc`, `dtc_estimator`, `flux_hysteresis`, `torque_hysteresis`,
`switching_table`, `dtc_top`.

`tb/`: one self-checking testbench `tb_<module>` per module. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

* Unit benches compare against independent references. The datapath benches
  use bit-exact integer models plus real-valued accuracy bounds. `sqrt`
  checks q^2 <= D < (q+1)^2. The sector and table benches check against
  angles. The comparator benches use scripted edge cases plus random errors.
* `tb_dtc_estimator` drives a 50 Hz six-step voltage and sinusoidal currents
  for 25 ms. It checks every output against a floating-point estimator, two
  strobes late, which also confirms the 10 us latency.
* `tb_dtc_top` closes the loop through a floating-point induction machine
  model, with a locked rotor at 300 rad/s electrical. Its constants are test
  values, not taken from the article. It runs 40 ms with a flux reference of
  0.8 Wb and a torque step from +4 to -4 Nm. It checks the estimator
  outputs every period, the flux staying in band and the torque tracking.
  It also checks that every comparator state, every sector, both zero vectors,
  the reverse vectors and the integrator leak were exercised. It runs the top
  at its default (published) sizes.
* `tb_dtc_ripple` runs the sampling-period comparison described above. It
  checks that torque and flux errors fall as the period shrinks, and that at
  5 us the torque stays within the band plus 0.25 Nm.
* `im_plant_model` is the machine model that `tb_dtc_ripple` uses. It is
  behavioural: real arithmetic, not synthesizable.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dtc_top \
    rtl/dtc_pkg.sv rtl/*.sv tb/tb_dtc_top.sv
./obj_dir/Vtb_dtc_top
```

Replace `tb_dtc_top` by any other `tb_<module>` to run a unit bench. Lint
with `verilator --lint-only -Wall rtl/dtc_pkg.sv rtl/*.sv --top-module
dtc_top`. The remaining warnings are unused bits of the wide intermediate
products: truncation points of the published word formats.

To change the sampling period, set the parameters `TS` (Ts * 2^27) and
`LPF_K` ((1 - wc*Ts) * 2^22) of `dtc_top`, and space the `sample_en` strobes to
match. The defaults are the 5 us codes of the table above.
