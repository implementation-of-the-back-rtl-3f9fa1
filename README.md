# GPS receiver back-end: satellite search and carrier phase matching

Every GPS satellite spreads its signal with its own 1023-chip pseudo-random
code, the C/A (coarse/acquisition) code. A receiver finds out which
satellite it is hearing by correlating a block of received samples with the
code of each candidate satellite. The true sender gives a correlation far
above the others. The receiver then aligns a local carrier with the received
one, so that the phase offset can later be turned into a time of arrival.

This RTL covers those two steps for 1-bit samples (the output of a
delta-sigma converter in the front end):

* **Satellite detector.** It correlates 1023 samples, in parallel, with the
  C/A codes of 24 satellites. For each satellite it reports how many chips
  agree. Correlation here is bit-serial: an XNOR of sample and code chip
  drives the enable of a 10-bit counter.
* **Carrier phase search.** It mixes the detected satellite's code with the
  sign of a local sine and a local cosine. It correlates both against the
  stored samples, giving quadrature (Q) and in-phase (I) counts. A CORDIC
  takes the arctangent of the two. The phase offset goes up one step at a
  time until the Q correlation vanishes, which shows as an angle of ±90°.

Both units sit in `gps_backend_top`. A host processor connects them: it
writes samples to the detector, picks the largest count, and starts the
phase search for that satellite.

## Generating the C/A codes

`ca_code_gen` holds the two 10-stage LFSRs of the GPS C/A code:

* G1 has feedback polynomial 1 + x^3 + x^10.
* G2 has feedback polynomial 1 + x^2 + x^3 + x^6 + x^8 + x^9 + x^10.

Both start from all ones and advance one chip per enabled cycle. The code of
satellite *s* is G1 XOR (G2 delayed by d(s) chips). No delay line is needed.
Because G2 is a maximal-length sequence, the XOR of two chosen G2 stages
equals G2 shifted by a fixed amount. `sv_delay_gen` picks that stage pair
(`gps_pkg::sv_taps`):

| SV | taps | SV | taps | SV | taps | SV | taps |
|----|------|----|------|----|------|----|------|
| 1 | 2,6 | 7 | 1,8 | 13 | 6,7 | 19 | 3,6 |
| 2 | 3,7 | 8 | 2,9 | 14 | 7,8 | 20 | 4,7 |
| 3 | 4,8 | 9 | 3,10 | 15 | 8,9 | 21 | 5,8 |
| 4 | 5,9 | 10 | 2,3 | 16 | 9,10 | 22 | 6,9 |
| 5 | 1,9 | 11 | 3,4 | 17 | 1,4 | 23 | 1,3 |
| 6 | 2,10 | 12 | 5,6 | 18 | 2,5 | 24 | 4,6 |

These pairs give delays from 5 chips (SV1) to 512 chips (SV24). The
testbenches build the reference codes the other way, with an explicit delay
on G2. Agreement of the two methods over all 24 codes and all 1023 chips
checks the table.

Each detector channel (`sat_channel`) is therefore small: one generator, one
stage-pair XOR, one XNOR with the data bit, and one `match_counter`. All 24
channels see the same data bit and the same enable, so they stay in
lock-step.

## Satellite detector (`sat_detector`)

```
FSL0 words --> shift_reg32 --(1 bit/cycle)--> 24 x sat_channel --> count_mux --> FSL1
                   ^                               ^  ^                ^
                   +-------------- det_controller -+--+----------------+
```

**Ports.** Both sides use the Fast Simplex Link (FSL) FIFO handshake:

* Input, slave side: `fsl0_data`, `fsl0_exists`, `fsl0_read`. A word is
  consumed on a cycle with `fsl0_read` high.
* Output, master side: `fsl1_data`, `fsl1_write`, `fsl1_full`. A word is
  written on a cycle with `fsl1_write` high. The detector never writes while
  `fsl1_full` is high.

**One run.**

1. **Clear.** One cycle that restarts every code generator at chip 0 and
   clears every counter.
2. **Read and shift.** The controller reads a word only when the shift
   register is empty. It then shifts the word out MSB first, one bit per
   cycle. On each of those cycles every channel counts one chip and advances
   its code. This repeats until 1023 bits have been used. The 32 words carry
   1024 bits, so the last bit of word 32 is ignored.
3. **Output.** `sel` steps through satellites 1 to 24. One word is written
   to FSL1 for each cycle in which FSL1 is not full. The word holds the
   match count in bits 9:0 and zeros above.

**Timing.** Without stalls a run takes 1 + 32 + 1023 + 24 = 1080 cycles.
Any cycle with FSL0 empty or FSL1 full adds one.

**Reading the result.** A count of 1023 means every chip agreed. About 512
is what unrelated codes give. The host takes the satellite with the largest
count.

**Built-in checks.** Simulation assertions cover the following:

* `det_controller` checks three FSL rules: no read of an empty FIFO, no
  write to a full one, and no read while the register is shifting.
* `sat_channel` checks that a clear puts the code generator back on chip 0.
* `sat_detector` checks that the first and last channels did not produce
  identical codes during a run.
* `phase_matcher` checks that every trial starts on chip 0 of the code and
  that the CORDIC is ready when a new pair of counts is handed to it.

## Carrier phase search (`phase_matcher`)

This is the hardest part to follow, so here it is step by step.

**Starting a search.** Pulse `start` with `sv_id` (the satellite) and
`carrier_step`. The search first tries phase offset φ = 0.

**One trial.**

1. For samples n = 0 … 1022 the carrier angle is THETA = φ + n·carrier_step,
   taken mod 256. THETA is an 8-bit angle: 256 steps per turn.
2. `sincos_lut` gives sin and cos of THETA. Only their sign bits are used,
   where 1 means "not negative".
3. Two reference bits are formed: `code XNOR sin-sign` (Q) and
   `code XNOR cos-sign` (I). With the mapping 1 = +1 and 0 = −1, XNOR is
   multiplication.
4. Each reference is XNORed with the sample and counted. This gives
   `q_count` and `i_count`, both between 0 and 1023.
5. The counts become signed correlations, 2·count − 1023. They are scaled by
   16 into the CORDIC's "1QN" format, so 1023 sits just below 1.0.
6. Q goes to X and I goes to Y. The CORDIC returns angle = atan2(I, Q) in
   radians.
7. **Decision.** The trial matches when |angle| is within `PHASE_TOL` of
   π/2. `PHASE_TOL` is 201/8192 rad, one THETA step. In that case
   `found = 1` and `phase = φ`. A match at +90° means upright data; a match
   at −90° means the data bit inverted the signal.
8. Otherwise φ goes up by one and the next trial runs. After φ = 255 the
   search stops with `found = 0`.

**Reading the samples.** The samples live outside the block. The block puts
the bit index on `smp_addr` and expects that bit on `smp_bit` one cycle
later.

**Watching a search.** After every trial, `trial_valid` pulses with:

* `trial_phase`
* `q_count` and `i_count`
* `angle`

**Timing.** One trial takes about 1023 + 4 + 17 + 2 cycles, so a full turn
(256 trials) takes about 268 k cycles.

**Why one bit is enough.** With a carrier step that is coprime to 256 (or
small), the sample phases cover the circle densely. The Q correlation is
then a triangle in the phase error, with zeros at 0 and at 180°. One THETA
step of error moves Q by about 1/64 of full scale.

**The carrier step.** `carrier_step` is a run-time input. A carrier at
exactly the sample rate would be a step of 0. That gives a constant carrier
sign and no phase to find, so the step must be set to the actual
intermediate frequency: step = 256 · f_IF / f_sample, mod 256.

## CORDIC arctangent (`cordic_atan`)

This is a pipelined CORDIC in vectoring mode.

**Pipeline stages.**

1. **Input register.**
2. **Coarse rotation.** A vector with X < 0 is negated, and the phase starts
   at +π (if Y ≥ 0) or −π (if Y < 0).
3. **14 shift-add-sub stages.** Each turns the vector toward Y = 0 by
   ±atan(2^-i) and adds that angle to the phase.
4. **Output rounding register.**

**Number formats.**

* Inputs: 16-bit signed, with 14 fraction bits, so ±1.0 = ±16384.
* Output `p_out`: 16-bit signed radians, with 13 fraction bits, so π ≈ 25736.

**Timing.** It accepts one input per cycle (`nd`). The result appears with
`rdy` 17 cycles later. Measured error is below 0.002 rad.

**Control signals.**

* `ce` freezes the pipeline.
* `sclr` drops results still in flight, synchronously.
* `aclr` does the same asynchronously.
* `rfd` is high except during `sclr`.

**Stage angles.** The angles atan(2^-i) are computed at elaboration from
the power series of arctan, in Q30 integers (`gps_pkg::q30_atan_pow2`).

## Sine/cosine table (`sincos_lut`)

THETA (8 bits) means the angle θ = THETA · 2π / 256. The outputs are
round((2^15 − 1) · sin θ) and the same for cos, as 16-bit two's complement,
one cycle after `theta`. The cosine reads the sine table at THETA + 64.

The 256 entries are computed at elaboration. `gps_pkg::sin_table` reduces
the angle to the first quadrant and evaluates Taylor series to x^13 / x^14
in Q30 integer arithmetic. All entries are within one LSB of the exact value.

## Module map

| module | role |
|---|---|
| `gps_pkg` | constants, tap table, fixed-point functions for the tables |
| `gps_backend_top` | detector and phase search side by side |
| `sat_detector` | detector core with FSL ports |
| `det_controller` | detector state machine (clear / wait / shift / output) |
| `shift_reg32` | 32-bit parallel-load, MSB-first shift register |
| `sat_channel` | one satellite: code generator, delay generator, XNOR, counter |
| `ca_code_gen` | G1/G2 LFSRs |
| `sv_delay_gen` | G2 stage-pair selector |
| `match_counter` | saturating 10-bit match counter |
| `count_mux` | 24:1 × 10-bit unregistered output multiplexer |
| `phase_matcher` | carrier phase search loop |
| `sincos_lut` | sine/cosine table |
| `cordic_atan` | vectoring CORDIC |

Clocking and reset: one clock, an active-low asynchronous `rst_n`. The sine
table and the CORDIC datapath have no reset; their valid flags do.

## Simulating

Each testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. The reference models (C/A codes by the
delay method, carrier signs from real sin/cos) are in `tb/gps_ref_pkg.sv`.
For example, with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_gps_backend_top \
  -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/gps_pkg.sv tb/gps_ref_pkg.sv tb/tb_gps_backend_top.sv -o sim
./obj_dir/sim
```

Replace the top module and the testbench file to run another testbench.

**`tb_gps_backend_top`** runs the full design at its default sizes:

1. A noisy capture of satellite 17 goes through FSL0 with random gaps.
2. The 24 counts are read back under random FSL1 back-pressure. Every count
   is checked, and 17 must win.
3. The phase search runs on a second capture, on a carrier with a known
   phase. The phase found must lie within two steps of it.

It also counts how often each of these happened: FSL0 stalls, FSL1 stalls,
the dropped 1024th bit, rejected phase trials, and trials that needed the
CORDIC coarse rotation. It fails if any of them never happened.

**`tb_phase_matcher`** recomputes the I/Q counts and the angle of every
trial from real trigonometry. It checks that the search stops at the first
trial that satisfies the tolerance.

The other testbenches cover one module each:

* every chip of both LFSRs over two periods;
* every satellite's delay against every G2 state;
* counter saturation;
* shift order;
* every select value of the multiplexer;
* one detector channel fed its own code, a noisy copy, random bits and
  another satellite's code;
* the detector core with each of the 24 satellites in turn as sender, under
  random FSL stalls;
* the controller's handshakes and cycle count;
* all 256 table entries;
* 400 random CORDIC vectors, with their exact latency.

## Departures, assumptions and limits

**Satellite 3 taps.** The tap pair 4,8 is the one the GPS C/A code
defines. With it, the delays fall in the range 5 … 512 chips.

**Choices this design makes on its own:**

* MSB-first bit order;
* dropping the 1024th bit of each run;
* the counters saturating instead of wrapping;
* the FSL1 word layout;
* the 16-bit widths of the table and the CORDIC;
* 14 CORDIC stages;
* the sign-bit carrier mixing;
* the tolerance of one THETA step;
* the programmable carrier step;
* stopping the phase search after one full turn.

**Phase update.** The phase is simply stepped by one per trial and fed to
the table as an offset. No transform of the CORDIC angle into a phase
correction is applied.

**Sample window.** The phase search uses one 1023-sample code period, read
again on every trial. Longer captures are not accumulated.

**Not included:**

* the host processor and its software, including picking the largest
  count;
* the FSL FIFOs themselves;
* the external SRAM and its memory controller (the sample memory is just a
  read port);
* UART, bus and clock-management blocks;
* the analog front end;
* the conversion of the phase offset into time of arrival and pseudo-range,
  whose equations are not specified.

**Carrier tracking.** The search assumes the carrier frequency is known (it
is `carrier_step`). It does no frequency search and no Doppler handling.

**Code offset.** The detector correlates at code phase zero only: it does
not search code offsets. Samples must start at chip 0 of the sender's code.
