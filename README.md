# On-chip impedance sensing for tamper detection

Most board-level attacks need some physical change first. Examples are a shunt resistor on a
supply rail, removed decoupling capacitors, a probe on a jumper, a polished package, or an EM
probe held over the die. Each such change alters the impedance of the power distribution
network (PDN) that feeds the chip. The effect is strongest in a particular frequency band:
capacitors of each size dominate their own band, and the package and die dominate the highest
one.

This design turns a chip's own logic into a small network analyser for its PDN. At a sequence
of stimulus frequencies it draws a modulated current from the supply. It then measures how far
the supply sags, using a ring oscillator whose frequency follows the voltage, and computes
|Z(f)|. An enrollment scan in a trusted setting stores the result on chip as a golden
signature. Later scans are compared with it, point by point, using the Wasserstein distance.
Where the distance exceeds a threshold, the chip raises an alarm and zeroizes a key.

All of it is SystemVerilog in `rtl/`. The one exception is the ring oscillator itself: it is a
delay-based simulation model, because a ring oscillator is a placed combinational loop, not
portable RTL.

## How one impedance sample is measured

A sample at stimulus frequency f needs two ring-oscillator counts:

1. **Stressor idle.** The RO counter is gated for `GATE_CYCLES` system clocks. The result,
   `cnt_off`, is proportional to the undisturbed supply voltage V_SUPPLY.
2. **Stressor active at f.** The current source switches a number of buffer-chain rows that
   follows the stimulus wave. After `STRESS_LEAD` clocks the counter is gated again, which
   gives `cnt_on`, proportional to the sagging voltage V_ON.

Since f_RO = k·V, the relative drop of the count is the relative drop of the voltage. The
current step ΔI = I_OFF − I_ON of the current source is a constant of the implementation,
taken from a power estimate. So the impedance magnitude is

    |Z| = |cnt_off − cnt_on| / cnt_off · V_SUPPLY / ΔI
    z_mohm = |cnt_off − cnt_on| · K / cnt_off,   K = V_SUPPLY[mV] · 1000 / ΔI[mA]

`z_estimator` computes this with one multiply and a restoring divider, with 1 mΩ per LSB.
The reference `cnt_off` is measured again before every `cnt_on`. Slow drift of the
oscillator, mostly temperature, therefore cancels.

Example with the defaults: 1 V supply, ΔI = 1 A, a 250 MHz RO and a 65,536-clock gate at
100 MHz. Then `cnt_off` ≈ 163,840, and one count corresponds to about 0.006 mΩ.

### The stimulus: sine table or pulse wave

`sine_pulse_modulator` sets, every clock, how many of the `ROWS` current-source rows are on.
The enabled rows form a thermometer code.

- **Sine mode** (points below 25 MHz). A 32-bit phase accumulator advances by the point's
  tuning word, `ftw = f·2^32/F_CLK`. Its top 8 bits address a 256-entry table,
  `level(k) = round(ROWS/2·(1 + sin(2πk/256)))`, which is computed at elaboration.
  The average current is half of all rows.
- **Pulse mode** (25 MHz and above). A table cannot make a clean sine this fast, so every
  row follows a square wave from the FPGA's clock manager (`mmcm_pulse`). The clock manager
  is a vendor block and not part of the RTL: the top asks for the frequency on
  `mmcm_freq_hz`/`mmcm_req`.

A pulse wave has harmonics, so the absolute |Z| at those points is biased. Detection only
needs every scan of a point to be made the same way, and the phase accumulator restarts from
zero for each activation so that it is.

`freq_plan` holds the 152 points, spaced logarithmically from 100 Hz to 588 MHz
(f_i = 100·(5.88·10^6)^(i/151)). The lowest 121 points use the sine table; the top 31 use the
pulse wave.

## From samples to a decision

At each point the measurement is repeated `NUM_REP` = 105 times. The noise is mostly thermal,
and some tampering changes the shape of the distribution, not only its mean. So the
comparison works on whole distributions:

- `sample_sorter` inserts each new sample into a sorted shift register, one clock per
  insert. After 105 inserts it holds the empirical distribution of the point.
- **Enrollment**: the 105 sorted values are written to `golden_store`. This is a
  2 × 152 × 105-word memory (31,920 × 16 bits), holding one signature for each PDN.
- **Verification**: the stored and the fresh sorted values are streamed pairwise into
  `wd_detector`. For two samples of equal size, the 1-Wasserstein distance is the mean
  absolute difference of their sorted values:
  `WD = (1/N)·Σ|g_(k) − t_(k)|`. The block keeps N·WD and compares it with N·3 mΩ, so no
  division is needed. A point with WD > 3 mΩ raises `tamper`.
- `vna_controller` records the N·WD of every point. The host can read this profile, which
  shows in which frequency band the board changed. The controller also reports the worst
  point and its sum (`worst_fidx`, `worst_wd_sum`).
- On the first point over the threshold in a scan, `tamper_response` clears the 128-bit key
  register. It stays cleared, and refuses new keys, until reset.

The threshold of 3 mΩ is a single global value. The measurements that motivated it separated
every tested tamper event from genuine re-measurements of the same board, whose distance
stayed below about 1.7. It should be recalibrated for another board.

## The two PDNs

The core supply (V_CCINT, 1 V) is stressed by the CLB current source (`power_waster`,
64 rows × 8 buffers) and sensed by a logic RO. The I/O supply (V_CCO, 3.3 V) is stressed by
`IO_ROWS` toggling I/O pins (`io_waste_pins`) and sensed by an RO through an I/O buffer. Each
channel has its own modulator, counter and estimator, with the right V_SUPPLY. One channel is
scanned at a time, chosen by the host. Each channel has its own signature.

## Module map

| module | role |
|---|---|
| `impedance_verif_top` | wires everything; top of the design |
| `iv_pkg` | plan constants, widths, `fpoint_t`, `status_t`, command codes |
| `freq_plan` | 152 log-spaced points: frequency, tuning word, pulse flag |
| `sine_pulse_modulator` | phase accumulator + sine table, or pulse gating → row enables |
| `power_waster` | rows of toggle-driven buffer chains (current source) |
| `ring_oscillator` | **behavioural model**: square wave, period ∝ 1/V |
| `ro_counter` | gated binary counter in the RO domain, read after a settle time |
| `z_estimator` | \|Z\| from the count pair, sequential divider |
| `sample_sorter` | insertion-sort register of the 105 repetitions |
| `golden_store` | single-port RAM for the enrolled signatures |
| `wd_detector` | streaming Σ\|g−t\| and threshold compare |
| `vna_controller` | scan sequencer, WD profile, worst point |
| `tamper_response` | key register with zeroization |
| `uart_rx`, `uart_tx`, `host_cmd` | host serial link and command interpreter |

## Host interface

The link is 8N1 UART at `F_CLK/CLKS_PER_BIT`, which is 115,200 baud by default. Each
command is one ASCII byte:

| byte | action |
|---|---|
| `E` | start an enrollment scan of the selected PDN |
| `V` | start a verification scan (ignored if the PDN has no signature) |
| `C` / `I` | select the core / I/O PDN (ignored while a scan runs) |
| `S` | reply with one status byte: bit0 busy, 1 done, 2 tamper, 3 enrolled (selected PDN), 4 I/O PDN selected, 5 key zeroized |
| `W` | reply with the WD profile of the last verification: 152 × 3 bytes, most significant first, each = 105 × WD in mΩ |

## Timing and cost

- One measurement takes 2 × (`GATE_CYCLES` + `SETTLE_CYCLES` + 1) + `STRESS_LEAD` clocks, plus
  the estimator's 37 and a few state clocks. That is about 131,150 clocks.
- One point is 105 measurements, plus 108 clocks to store or compare the results.
- A full scan is about 2.09·10^9 clocks, **≈ 21 s at 100 MHz**. Scan time trades against
  precision through `GATE_CYCLES` and `NUM_REP`, and against resolution through the number of
  points.
- The largest storage items are the golden RAM (510 kbit) and the sorter (105 × 16 flip-flops
  with 105 comparators).

## Where this design makes its own choices

The structure is fixed by the method: stimulus modulator, buffer current source, RO sensor with
a counter, the |Z| formula, repetitions, an on-chip golden signature, the Wasserstein threshold
and key zeroization. These details are this design's own and should be judged as such:

- the 100 MHz clock, the 25 MHz sine/pulse boundary, the 64-row current source, the 1 A
  current step and the 65,536-clock gate;
- taking the Wasserstein distance with p = 1 and the threshold in milliohm;
- raising the alarm when any single point exceeds the threshold;
- the order of the loops: all 105 repetitions of a point before moving to the next;
- the UART format and the command set.

The method itself was demonstrated with offline statistics on a host. Here the comparison runs
on chip. The gate is the same length at every point: it is not lengthened to cover whole
periods at the lowest frequencies, so at 100 Hz it sees only part of a period. This is
consistent from scan to scan, which is all detection needs. It does not match a true |Z|
there.

The analyser part of the method has been reported at about 960 flip-flops and 1,460 LUTs,
with a full scan in the order of seconds. This design is larger: the golden RAM, the 105-entry
sorter and the WD logic are added on chip. Its default scan takes about 21 s because of the
long gate; a shorter gate or fewer points bring it down at the cost of precision.

Not built:

- golden signatures per temperature;
- several distributed sensors per PDN;
- normality and two-sample tests on the distributions (Shapiro-Wilk, Kolmogorov-Smirnov).
  They are analysis tools for characterising tamper effects, not part of the on-chip decision.
  The sorted samples such a test would need are available in `sample_sorter`;
- the clock manager and the board itself.

## Simulating

Every testbench in `tb/` checks itself and prints `TB_RESULT checks=N failures=M`. Run one
with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      --top-module tb_impedance_verif_top -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/iv_pkg.sv tb/tb_impedance_verif_top.sv
    obj_dir/Vtb_impedance_verif_top

`tb_impedance_verif_top` is the system test. It runs at 6 points, 5 repetitions, a 1024-clock
gate and a 16-clock UART bit. The testbench acts as the board and the host:

- a PDN model turns the enabled rows into a supply sag of Z(f)·I;
- a square-wave source stands in for the clock manager;
- a UART host sends commands and decodes the replies.

It walks through these steps:

1. a verification that is refused before enrollment;
2. enrollment, with |Z| checked against the model within 2 mΩ;
3. a clean verification;
4. a 10 mΩ "shunt resistor" that must trigger the alarm, zeroize the key and show up in
   every point of the WD profile;
5. enrollment and verification of the I/O PDN.

It runs in seconds.

`tb_tamper_workloads` runs the tamper experiments over the full 152-point plan, with 3
repetitions per point and the same short gate. It takes about 1.5 minutes. Each tamper class is
modelled as an impedance change in the band where it acts:

| class | change of the model, mΩ | expected worst band |
|---|---|---|
| shunt resistor | +10 everywhere, +52 from 400 MHz | ≥ 400 MHz |
| 470 nF capacitors removed | +4 at 1–3 kHz, +2 elsewhere below 9.4 MHz | 1–3 kHz |
| 47 nF capacitors removed | +6 at 30–50 MHz, +3 elsewhere in 3.69–60.36 MHz | 30–50 MHz |
| EM probe over the die | +14 at 250–320 MHz | 250–320 MHz |
| package polished | +18 at 400–470 MHz | 400–470 MHz |
| oscilloscope probe on the shunt jumper | −4 everywhere | any |
| cable on an I/O pin (I/O PDN) | +22 at 150–190 MHz, +5 below 10 MHz | 150–190 MHz |

The sizes are those observed on a real board, rounded to whole milliohms. The band edges
around each peak are this testbench's own. The test checks that genuine re-scans of both PDNs
pass at every point, that every class raises the alarm, and that the worst point lies in the
expected band. The board model is free of noise, so it shows the detection logic at work, not
the noise margin of a real board.

The workload run is the largest scan simulated: all 152 points, but 3 instead of 105
repetitions and a 1,024-clock gate instead of 65,536.

`tb_default_point` runs the top with every parameter at its default (115,200 baud, 65,536-clock
gate, 105 repetitions). It starts an enrollment over the UART, reads the status byte while the
scan runs, and stops after the first frequency point, about 1.5 minutes of simulation. It checks
the 105 stored samples against the mean supply sag the model applied during each "on" gate,
within 1 mΩ. It also checks that the point takes 13.77 million clocks, as the timing formula
above predicts. A full-size scan of 152
points × 105 repetitions at the default gate is about 2·10^9 clocks of a design with two
ring-oscillator models running at hundreds of MHz, which is far beyond practical simulation
time.

The block testbenches (`tb_<module>`, and `tb_uart` for both UART halves) check each module
against independently computed values. This includes latencies where they are defined: the
RO counter takes GATE + SETTLE + 1 clocks, and the estimator PW + 3 clocks.

To change the design, adjust the parameters of `impedance_verif_top` (plan size, rows, gate,
UART rate, supply and current step) or the constants in `iv_pkg`. `freq_plan` and the sine
table recompute themselves.
