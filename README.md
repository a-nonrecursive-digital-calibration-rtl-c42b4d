# Joint TX/RX I/Q-imbalance calibration by LO switching

A quadrature transceiver never has perfectly matched I and Q branches. The
transmitter puts a gain error alpha and a phase error theta between its I and Q
branches. The receiver adds its own errors beta and xi. Both errors create an
image of the wanted signal. This RTL is the digital half of a calibration
scheme that measures all four errors in one pass, without iterating. It then
cancels them with a pre-compensator in front of the DACs and a post-compensator
behind the ADCs.

The scheme follows the brief "A Nonrecursive Digital Calibration Technique for
Joint Elimination of Transmitter and Receiver I/Q Imbalances With Minimized
Add-On Hardware" (called *the paper* below). In the paper the digital part ran
on an FPGA next to a 65-nm transceiver chip. This code is an independent RTL
implementation of that digital part. The analog chip is not included.

## The idea: six equations from DC levels and one LO switch

In calibration, the TX mixer output is looped back into the RX mixers. The
digital side sends a DC level `c`, first on I_tx and then on Q_tx. After the
RX low-pass filters, each ADC output is a constant. The constant depends on
the overall loop gain G = AB/2, the loop phase phi and the imbalances.

That gives too few independent equations. The trick is a set of MOS switches
that swap the phases of the TX LO, which shifts it by 90 degrees. The two
training steps are then repeated. Each LO setting gives three usable
equations, so six in total:

| LO       | training      | I_rx                                  | Q_rx                                   |
|----------|---------------|---------------------------------------|----------------------------------------|
| direct   | I_tx = c      | path 1: cG cos(phi)                   | path 2: cG beta sin(phi + xi)          |
| direct   | Q_tx = c      | path 3: cG alpha sin(theta - phi)     | (ignored)                              |
| switched | I_tx = c      | path 4: -cG sin(phi)                  | path 5: cG beta cos(phi + xi)          |
| switched | Q_tx = c      | path 6: cG alpha cos(theta - phi)     | (ignored)                              |

Each pair of paths is the x and y of a vector, so every parameter is a vector
magnitude or an angle:

* (path 1, -path 4): magnitude cG, angle phi
* (path 6, path 3): magnitude cG alpha, angle theta - phi
* (path 5, path 2): magnitude cG beta, angle phi + xi

A CORDIC in vectoring mode returns the magnitude and the angle together, with
shifts and adds only. One CORDIC, used three times, solves the whole system.

The compensators are the inverses of the imbalance matrices:

    TX:  I_pre  = I_tx - tan(theta) * Q_tx        Q_pre  = sec(theta)/alpha * Q_tx
    RX:  I_post = I_rx                            Q_post = -tan(xi) * I_rx + sec(xi)/beta * Q_rx

## Block structure

```
iq_cal_top
├── cal_controller     data picking: DC pre-read, 4 training phases, LO switch, averaging
├── param_estimator    G, phi, alpha, theta, beta, xi
│   ├── cordic_vectoring   25-cycle vectoring CORDIC (shared by 3 passes)
│   └── radix4_divider     alpha = |v3|/|v1|, beta = |v5|/|v1|
├── comp_coef_unit     -tan(theta), sec(theta)/alpha, -tan(xi), sec(xi)/beta
│   ├── sec_tan_unit  x2   one-cycle secant/tangent
│   └── radix4_divider x2  9-cycle division
├── pre_compensator    TX: 2 multipliers + 1 adder, 1 cycle
└── post_compensator   RX: 2 multipliers + 1 adder, 1 cycle
```

`iq_cal_pkg` holds the shared types and number formats.

## The calibration sequence (`cal_controller`)

The phases follow the paper's calibration time diagram:

| phase | DAC I | DAC Q | `lo_sw` | stored                        |
|-------|-------|-------|---------|-------------------------------|
| DCOFF | 0     | 0     | 0       | DC offsets `dc_i`, `dc_q`     |
| P12   | c     | 0     | 0       | path 1 (I), path 2 (Q)        |
| P3    | 0     | c     | 0       | path 3 (I)                    |
| P45   | c     | 0     | 1       | path 4 (I), path 5 (Q)        |
| P6    | 0     | c     | 1       | path 6 (I)                    |
| EST   |       |       |         | runs `param_estimator`        |
| COEF  |       |       |         | runs `comp_coef_unit`         |

`loopback_en` (the TX-RX switch) is high from DCOFF to P6. Each phase drops
`SETTLE` ADC samples and then sums 2^`AVG_LOG2` samples. It stores the average
with 4 fractional bits, minus the DC offset from DCOFF.

While `cal_busy` is high, the DACs get the training levels directly and the
pre-compensator is bypassed. A recalibration therefore sees the raw TX
imbalance, so it can run while older gains are active. The paper does not say
how this is handled.

## Solving the parameters (`param_estimator`)

There are three CORDIC passes, back to back:

1. x = path 1, y = -path 4 gives |v1| = cG and phi.
2. x = path 6, y = path 3 gives |v3| and theta = angle + phi.
3. x = path 5, y = path 2 gives |v5| and xi = angle - phi.

Then alpha = |v3|/|v1| and beta = |v5|/|v1|. The training level c and the
CORDIC gain cancel in these ratios. G itself is |v1| divided by c, which is a
shift because c = 2^`C_LOG2`. theta and xi are wrapped into [-pi, pi].

Two points need care:

* **Sign of path 4.** Path 4 carries -cG sin(phi). The paper's printed
  formula phi = atan(I4/I1) would return -phi. That contradicts the way phi is
  added back in theta and subtracted in xi. This design negates path 4, so
  the formulas for theta and xi stay as printed.
* **Quadrants.** phi can be any angle (the measured chip had about 45
  degrees). The CORDIC first rotates the vector into the right half-plane by
  ±90 degrees, so atan2 works in all four quadrants.

The CORDIC takes 25 cycles per pass: one load and 24 micro-rotations. It
removes its gain 1/K = 0.60725 with a constant multiply in the output
register.

## Number formats

| type       | format                    | used for                          |
|------------|---------------------------|-----------------------------------|
| `sample_t` | 12-bit signed code        | DAC, ADC, TX/RX data              |
| `path_t`   | Q12.4 signed (16 bit)     | averaged path values, DC offsets  |
| `angle_t`  | Q3.13 radians (16 bit)    | phi, theta, xi                    |
| `coef_t`   | Q2.14 signed (16 bit)     | G, alpha, beta, compensator gains |

The training level is c = 512 codes, a quarter of the 12-bit full scale. The
paper gives about 0.2 V, but not the converter full scale. `sec_tan_unit`
evaluates fifth-order series. It is accurate to one Q2.14 LSB for angles up
to 0.25 rad (14 degrees), well above the few degrees of real imbalances.

## Timing

| step                                   | cycles |
|----------------------------------------|--------|
| data picking                           | 5 × (`SETTLE` + 2^`AVG_LOG2`) ADC samples (400 by default) |
| estimator: 3 CORDIC passes             | 75     |
| estimator: last division + register    | 10     |
| gain unit: secant + division + register| 11     |

The cycle counts of the individual operators match the paper: CORDIC 25,
division 9, secant 1, and compensators 1. The paper quotes 75 + 1 cycles
(760 ns at 100 MHz) for the whole computation. Its own operator table,
however, lists 9-cycle dividers, which cannot fit in that single extra cycle.
Here the computation takes 96 cycles (960 ns at 100 MHz). Data flows from
tx to dac in 2 cycles and from adc to rx in 1 cycle.

## Top-level interface (`iq_cal_top`)

* `clk`, `rst_n`: one clock for everything; asynchronous active-low reset.
* `tx_valid/tx_i/tx_q` → `dac_valid/dac_i/dac_q`: TX path, pre-compensated.
* `adc_valid/adc_i/adc_q` → `rx_valid/rx_i/rx_q`: RX path, post-compensated.
  The converters may run slower than the clock; `adc_valid` marks samples.
* `cal_start` starts a calibration. `cal_busy` and `cal_state` show progress,
  and `cal_done` pulses at the end.
* `lo_sw` drives the LO switches. `loopback_en` drives the TX-RX switch.
* `params` holds G, phi, alpha, theta, beta and xi. `coefs` holds the four
  gains, which are the identity after reset. `dc_i` and `dc_q` hold the
  learnt offsets.

Parameters: `C_LOG2` (training level 2^C_LOG2, default 9), `SETTLE` (16) and
`AVG_LOG2` (6).

## What is not here

The analog part of the system is outside this RTL. That covers the DACs and
ADCs, the TX and RX low-pass filters, the passive mixers, the driver
amplifier, the TX-RX switch and source follower, the LO generator and the LO
switches. The LO generator is a balun, a three-stage RC-CR polyphase filter
and 25%-duty-cycle logic whose circuit is not published. The testbench
`tb/trx_loopback_model.sv` stands in for the whole analog loop. It is a
baseband behavioural model: each output is the filtered mixer products given
by the imbalance model, plus DC offsets, 12-bit rounding and ±1 LSB noise.
It can also give the LO a quadrature error and drop ADC samples to run the
converters slower than the clock.

The paper mentions a wideband extension, with several parameter sets and FIR
compensators. It is not implemented.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench                | checks |
|--------------------------|--------|
| `tb_cordic_vectoring`    | magnitude/angle against sqrt/atan2 for 309 vectors in all quadrants; 25-cycle latency |
| `tb_radix4_divider`      | exact quotients, saturation, divide by zero; 9-cycle latency |
| `tb_sec_tan_unit`        | sec/tan over ±0.25 rad within 2 LSB; 1-cycle pipeline |
| `tb_pre_compensator`     | bit-exact rounding/saturation; undoing a known TX imbalance within 1.5 LSB |
| `tb_post_compensator`    | bit-exact rounding/saturation; undoing a known RX imbalance within 2 LSB |
| `tb_param_estimator`     | 65 parameter sets, including the measured one and angle wrap-around; 85-cycle latency |
| `tb_comp_coef_unit`      | four gains against real arithmetic within 3 LSB; identity after reset; 11-cycle latency |
| `tb_cal_controller`      | phase order, switch and training settings per cycle, samples per phase, offsets and paths, handshake, sparse `adc_valid` |
| `tb_iq_cal_top`          | end to end at default parameters, with the loop-back model at the paper's measured imbalances |
| `tb_estimation_accuracy` | 100 000 random estimations: worst gain error 9.4e-4, worst phase error 0.04° |
| `tb_lo_irr_sweep`        | six calibrated loops side by side: LO quadrature error, and 80 MHz ADC against a 100 MHz clock |

The paper reports a worst gain error of 8e-4 and ±0.1° of phase over 10^5
runs. The end-to-end test sends a complex tone around the loop, with imbalances
G = 0.3055, phi = 44.7°, alpha = 1.0281, theta = -3.28°, beta = 1.0823 and
xi = 1.93°. Before calibration the loop has an image rejection of about
39 dB. The TX and RX images partly cancel in this loop, so this is higher
than either side alone. After calibration it reaches 57 to 78 dB, depending on
the noise seed. The test also checks the estimates against the model, the
DC offsets, the calibration time, and that a second calibration with active
compensation gives the same estimate. It counts each mechanism: DC pre-read,
I and Q training, LO switching, loop-back, estimation, gain update.

### How good must the LO be?

The method trusts the LO switches to shift the LO by exactly 90 degrees. An
LO with a quadrature error eta breaks this. With the LO direct, the error is
simply part of the TX's own theta. With the LO switched, it moves both TX
carriers, and that biases paths 4, 5 and 6. `tb_lo_irr_sweep` sets the LO
phase error to give an LO image rejection of 15, 20, 25 and 30 dB. The
calibrated loop then reaches about 17.5, 27.7, 37 and 43 to 49 dB: better
than the LO, and rising with it. Above about 40 dB of LO image rejection, the
residual is below the ADC rounding and noise. An LO of 60 dB, as on the
measured chip, therefore does not limit the calibration.

The same testbench runs the converters at 80 MHz against the 100 MHz logic
clock, as in the prototype: every fifth clock has no ADC sample. The sample
phases stretch from 400 to 500 clocks, and the result is as good as at full
rate.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/iq_cal_pkg.sv tb/tb_iq_cal_top.sv --top-module tb_iq_cal_top -Mdir obj
./obj/Vtb_iq_cal_top
```

Any other testbench builds the same way: replace the top file and module name.
The package must come first on the command line. The testbenches use
`$urandom`, so `+verilator+seed+N` gives a different noise sequence.

## Known departures and limits

* The computation takes 96 cycles, not 76 (see Timing).
* phi is computed with path 4 negated (see Solving the parameters).
* The paper counts two dividers, both in the compensator, and gives the
  estimator only its CORDIC. It does not say how alpha and beta are divided
  out. Here the estimator has a third divider of its own for them.
* The settle and averaging lengths, the training code, the number formats,
  the sec/tan series, the divider algorithm and the bypass of the
  pre-compensator during calibration are this design's choices.
* DC offsets are removed from the calibration measurements only, not from
  normal RX data.
* `sec_tan_unit` loses accuracy above about 0.5 rad of imbalance. Gains
  saturate just below 2.0.
