# FPGA side of a 36-slot reconfigurable multiphase drive

The motor this logic drives has 36 stator slots. Each slot has its own coil and
its own inverter leg. Because every slot is driven independently, the same machine
can run as a 3-, 6-, 9- or 18-phase machine with 2 to 12 poles. The control picks
the configuration while the machine runs. The FPGA has two jobs:

* **Measure.** Read the 36 slot currents from three 14-bit, 12-lane serial ADC
  boards, using only the 200 MHz system clock.
* **Actuate.** Generate 36 PWM leg signals for the current configuration. The
  slots of one phase share a sinusoidal reference, but each gets its own
  phase-shifted triangular carrier ("interleaving inside the phase"). When the
  configuration changes, every carrier and every reference is moved gradually,
  over many switching periods, to its new position.

Everything is SystemVerilog-2017. It is written for a single 200 MHz clock with
synchronous active-low reset, and every parameter default is the real system's
number.

## Block structure

```
wicsc_drive_top
├── adc_acquisition                      measurement
│   ├── adc_clock_generator              10 MHz ADC clock, acquisition start pulse
│   │   └── clk_divider ×2               counter + comparator + 2-state FSM
│   └── sampling_section ×3              one per ADC board
│       ├── sync_chain                   DCO/FCO synchronisers, edge flags, bit counter
│       ├── sampling_fsm                 IDLE → WAIT_FCO → WAIT_DCO ⇄ SHIFT → CHECK
│       └── data_chain ×12               5-stage delay + 14-bit shift register
├── sample_register_file                 30-sample capture buffer towards the processor
└── pwm_section                          actuation
    ├── carrier_generation
    │   ├── carrier_parameter_generator  carrier vector of every slot per configuration
    │   └── generic_slot ×36
    │       ├── configuration_handler    loads parameters, detects configuration changes
    │       ├── transition_handler       moves the carrier step by step
    │       │   └── transition_type      classifies the transition
    │       └── carrier_generator        triangle from a 29-bit vector
    ├── reference_generator              36 sinusoids, cross-fade on transitions
    │   └── sine_lut ×2                  quarter-wave sine table
    └── pwm_comparator                   36 registered compares
```

`wicsc_pkg` holds the shared constants, the carrier vector struct, the
configuration and transition-type enums, and the configuration tables.

## Reading the serial ADCs without using their clocks

Each ADC board converts on every rising edge of the 10 MHz clock that the FPGA
sends it. It then shifts each 14-bit sample out on its own LVDS lane, MSB first.
Two strobes go with the data:

* DCO runs at 7× the sample clock, with data valid on both edges, so one bit lasts 1/140 MHz.
* FCO marks the start of each word.

Using DCO as a clock would be fragile: a glitch on it would clock garbage into
the design. Instead, DCO, FCO and all 36 data lanes are sampled as ordinary data
by the 200 MHz clock. Each DCO half period is about 1.43 FPGA clocks long.
Because DCO must be seen at every level, the ADC clock can be at most
200 MHz / 14 ≈ 14.2 MHz. The 10 MHz default stays below that.

Per board (`sampling_section`):

1. `sync_chain` puts two flip-flops on DCO and two on FCO. An XOR of the last two
   DCO samples flags a DCO change, and an AND-NOT of the FCO samples flags an FCO
   rise. Both flags are registered.
2. `sampling_fsm`:
   * waits for the acquisition start pulse;
   * then waits for an FCO rise, which is also the first bit;
   * then steps once for every DCO change, counting bits with the 4-bit counter;
   * after 14 bits, closes the word and returns to idle.
   Its shift enable is registered.
3. Each `data_chain` delays its lane by five always-enabled flip-flops and then
   shifts it into a 14-bit register. The five stages match the control path:
   two synchroniser stages, the registered edge flag, the FSM state and the
   registered enable. A local register of the enable then lines the enable up
   with the delayed bit. The data bit that is shifted is therefore the one
   sampled in the same clock as the DCO change that caused the shift.
4. `valid` pulses one clock after the FSM's word-done flag. At that point all 12
   words of the board are in `samples`, about 7 clocks after the clock that saw
   the last DCO change. A word stays in `samples` until the next one replaces it.

`adc_clock_generator` produces the 10 MHz ADC clock and, from a second
divider, the acquisition start pulse. Its default rate is 5 MHz, one word every
40 clocks. This rate can be set anywhere from the ADC rate down to a few hertz,
so data need not be taken at the full conversion rate. Each divider is a
counter with a comparator against a constant and a two-state FSM. The high and
low widths are set separately.

`sample_register_file` is for looking at raw samples:

* A `save` pulse makes it store the next 30 samples of the slot chosen by `sel`.
  It stores one sample per valid pulse of that slot's board.
* It then presents the samples on a valid/ready port, one per accepted transfer,
  and returns to idle.
* At the top level, the capture rate is the acquisition rate. To record a slow
  waveform over one or more of its periods, lower the acquisition rate.

## The carrier as three straight sections

The carrier is a triangle from 0 to CMAX = 12600 that moves by one count per
clock. A switching period is therefore 25200 clocks, or 7.94 kHz. The value
was chosen because 200 MHz / 8 kHz = 25000 does not divide by 18, the largest
number of phase-shifted carriers any configuration needs. 25200 is the next
value that does.

A phase-shifted triangle, looked at over one period that starts at a fixed
instant, always has three straight sections:

| section | length      | slope |
|---------|-------------|-------|
| 1       | `d1`        | `trend` (1 = rising) |
| 2       | CMAX        | opposite of `trend` |
| 3       | CMAX − `d1` | `trend` |

Together with the starting value `offset`, this gives a 29-bit vector
`{d1[13:0], offset[13:0], trend}` (`carrier_param_t`). `carrier_generator`
replays the vector every period, using a time counter and two compares. For a
carrier that leads the reference triangle by `t0` clocks:

* if `t0` < CMAX: `trend` = 1, `offset` = `t0`, `d1` = CMAX − `t0`;
* otherwise: `trend` = 0, `offset` = `d1` = 2·CMAX − `t0`.

`wicsc_pkg::param_from_phase` performs this conversion. `param_from_offset`
performs the same conversion from (trend, offset). The offset and trend alone
determine the waveform.

Carrier generator handshake:

* `load` offers a vector.
* `t_read` answers one clock later.
* While the carrier runs, a loaded vector waits in a shadow register and takes
  effect at the next period boundary. The carrier therefore never jumps in the
  middle of a period.
* `done` marks the last clock of every period.
* The first load after reset starts the carrier at once.

## Interleaving inside the phases

The nine configurations, coded 0 to 8, are those with a whole number `qs` of
slots per pole per phase:

| code | config | qs | distinct carriers | carrier spacing         | belt angle step |
|------|--------|----|-------------------|-------------------------|-----------------|
| 0    | m3p2   | 6  | 18                | 1400 clocks (20°)       | 60°             |
| 1    | m3p4   | 3  | 9                 | 2800 clocks (40°)       | 60°             |
| 2    | m3p6   | 2  | 6                 | 4200 clocks (60°)       | 60°             |
| 3    | m3p12  | 1  | 3                 | 8400 clocks (120°)      | 60°             |
| 4    | m6p2   | 3  | 18                | 1400 clocks             | 30°             |
| 5    | m6p6   | 1  | 6                 | 4200 clocks             | 30°             |
| 6    | m9p2   | 2  | 18                | 1400 clocks             | 20°             |
| 7    | m9p4   | 1  | 9                 | 2800 clocks             | 20°             |
| 8    | m18p2  | 1  | 18                | 1400 clocks             | 10°             |

**Carriers** (`carrier_parameter_generator`). With `p` poles there are `36/p`
slots per pole. Each slot of a pole gets its own carrier. Slot `k` leads slot 0
by `t0 = (k mod 36/p) · 25200/(36/p)` clocks, and the pattern repeats from pole
to pole. In m3p2, for example:

* the six slots of a phase belt are 20° of the switching period apart;
* the 18 carriers of one pole cover the whole period.

The table is combinational: one vector per slot for each pole count.

**References** (`reference_generator`). Slots are grouped into belts of `qs`
consecutive slots. Belt `b` uses the sinusoid `CMAX/2 + amp·sin(ωt − b·180°/m)`.
For three phases this gives the belt sequence A, −C, B, −A, C, −B (120° phase
spacing). For 6, 9 and 18 phases it gives three-phase sets shifted by 30°, 20° and
10°.

The generator works as follows:

* One 32-bit phase accumulator advances by `FREQ_WORD` per clock. 1074 gives
  50.0 Hz at 200 MHz.
* The sine comes from a 1024-entry quarter-wave table. Its contents are computed
  at elaboration by a constant function, so no data file is needed.
* The slots are served in turn, one per clock, so each reference is refreshed
  every 36 clocks.
* Each value appears three clocks after the accumulator value it uses.

**Comparator.** `pwm_comparator` sets `pwm[k]` high while `refs[k]` is greater
than `carriers[k]`. The output is registered.

## Changing configuration smoothly

When `cfg_req` changes to a valid code, all 36 `configuration_handler`s see the
change in the same clock. Each one freezes the old and new vectors of its slot
and pulses `start_t` to its `transition_handler`. `cfg_cur` switches to the new
code at once. `pwm_busy` stays high until every slot and the reference
cross-fade have finished. Codes 9 to 15 are ignored. A request made during a
transition is taken after the transition ends.

**Transition types** (`transition_type`):

| type    | condition | action |
|---------|-----------|--------|
| NONE    | same vector | nothing to do |
| STD_INC | same trend, larger offset | raise the offset step by step |
| STD_DEC | same trend, smaller offset | lower the offset step by step |
| UD, DU  | trend changes (up→down, down→up) | two standard legs, described below |

For UD and DU, the first leg keeps the old trend and moves the offset to a
reversal point. The reversal point is 0 or CMAX, whichever makes the path
shorter. At those two values a rising and a falling carrier describe the same
waveform, so the vector loaded at the reversal point already carries the new
trend. The second leg then moves the offset to its final value.

**Stepping.** The handler waits for the carrier's `done`, so a transition always
starts at a period boundary. Then, once per period, it:

1. moves the offset by at most `STEP` = 100 counts;
2. computes `d1` from the trend and the offset;
3. loads the vector, which the carrier generator applies at its next period boundary.

When the loaded vector equals the target, the handler pulses `t_done`.

The largest possible move is 12600 counts, which takes 126 periods (about
16 ms). The full-size simulation of m3p2 → m3p4 finishes in 127 periods.
Between any two consecutive periods, a carrier's phase changes by at most 100
clocks.

**Reference cross-fade.** On the same start, the reference generator computes
both the old and the new configuration's sinusoid for every slot. It outputs
`(1−w)·old + w·new`, where `w` rises by `RAMP_STEP/1024` at every switching
period. With the default of 8, the fade takes 128 periods, about as long as the
longest carrier move. When `w` reaches 1, the new configuration is adopted and
the old sinusoid is dropped. Because the output is a weighted sum, the
reference stays continuous even when a slot moves to a different phase.

## Top-level interface (`wicsc_drive_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | 200 MHz clock, synchronous active-low reset |
| `adc_clk` | out | 1 | 10 MHz sampling clock to the three ADC boards |
| `adc_dco`, `adc_fco` | in | 3 | DCO and FCO of each board (after the LVDS receivers) |
| `adc_din` | in | 3×12 | data lanes |
| `samples` | out | 36×14 | latest sample of every slot (two's complement, as sent) |
| `samples_valid` | out | 3 | one-clock pulse per board when its 12 samples are new |
| `rf_save`, `rf_sel` | in | 1, 6 | start a 30-sample capture of slot `rf_sel` |
| `rf_busy` | out | 1 | capture or readout in progress |
| `rf_data`, `rf_valid`, `rf_ready` | out/out/in | 14, 1, 1 | readout port (valid/ready) |
| `cfg_req` | in | 4 | requested configuration, 0..8 |
| `amp` | in | 14 | reference amplitude in carrier counts (at most 6300) |
| `pwm` | out | 36 | PWM leg signals, slot 0 in bit 0 |
| `cfg_cur` | out | 4 | configuration in force |
| `pwm_busy` | out | 1 | carrier transition or reference cross-fade running |
| `period_done` | out | 1 | last clock of every switching period |

The current and speed control loops run on the processor and are not part of
this RTL. Neither are the LVDS input buffers and the optical links to the
inverters. Their signals are the ports above.

Top-level parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `N_BOARDS`, `N_CH` | 3, 12 | ADC boards and lanes per board |
| `ADC_HALF` | 10 | clocks per half period of the ADC clock (10 MHz) |
| `ACQ_HALF` | 20 | clocks per half period of the acquisition clock (5 MHz) |
| `RF_DEPTH` | 30 | register-file depth |
| `CMAX` | 12600 | carrier peak; period = 2·CMAX clocks |
| `STEP` | 100 | carrier offset step per period during transitions |
| `FREQ_WORD` | 1074 | reference frequency word (50 Hz) |
| `RAMP_STEP` | 8 | cross-fade weight step per period, out of 1024 |

For a smaller `CMAX`, keep `2·CMAX` divisible by 36 so that all carrier
spacings stay exact.

## What follows the original design and what does not

These parts follow the original design:

* the ADC timing and the 10 MHz clock;
* the counter/comparator/FSM dividers;
* the two-by-two synchronisers, the 4-bit bit counter, the five-stage data delay
  and the five FSM steps;
* the 30-sample register file that is filled and then emptied one sample at a
  time;
* the 25200-point carrier and its three-section, 29-bit description;
* the LOAD / T_READ / DONE / START_T handshakes;
* the four ways of handling a transition, with UD and DU split into two
  standard legs;
* the linear cross-fade of references;
* the nine configurations, 20° carrier spacing in m3p2, and 120° between phases.

This design made its own choices for the following:

* **Slot-to-carrier and slot-to-phase rules.** They are the general formulas
  given above. They reproduce the stated spacings: 20° in m3p2, a repeat after
  six carriers in m3p6, 120° between phases, and 30° between the two sets of m6p2.
* **m6p6.** This design gives the two three-phase sets 30° of electrical phase,
  using the same belt rule as every other configuration. The formula
  360°/(N·m·p) would instead give 10°.
* **Transition step and fade rate.** STEP = 100 counts per period and a
  128-period cross-fade.
* **Reversal point.** The shorter of 0 or CMAX.
* **Register-file interface.** The valid/ready readout port and the slot selector.
* **ADC timing assumptions.** Data are assumed edge-aligned with DCO. The
  testbench model also moves the data up to 1.6 ns early and still reads
  correctly.
* **No dead time in the comparator.** Dead time, if needed, belongs in the gate
  drivers or in an extra stage after `pwm_comparator`.
* **Configuration-handler states.** The states are INIT / WAIT_TREAD / RUN /
  TRANS. Requests made during a transition wait for it to end.

## Simulating

Each block has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/ad9249_model.sv` is a
behavioural model of an ADC board's serial output, including data skew. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/wicsc_pkg.sv tb/tb_wicsc_drive_top.sv --top-module tb_wicsc_drive_top
./obj_dir/Vtb_wicsc_drive_top
```

Replace the name to run any other testbench. Notable ones:

* **`tb_wicsc_drive_top`**: the whole design end to end, with a small carrier
  (CMAX = 90) and fast transitions. It:
  * checks every acquired sample of all 36 slots against the ADC model;
  * captures and reads back 30 samples through the register file;
  * checks every PWM output against the comparator relation;
  * walks m3p2 → m3p4 → m3p12 → m18p2 → m6p6 → m3p2, with an invalid code in
    between;
  * counts the ADC words, register-file transfers, configuration changes,
    reference fades, ignored codes and each transition type, and fails if any
    of them never occurred.
  It runs in about 10 s.
* **`tb_wicsc_drive_full`**: the top with every parameter at its default. It:
  * runs the ADCs at 10 MHz with acquisition every 40 clocks, and checks both
    the data and the rate;
  * reads out a register-file capture;
  * checks that the m3p2 carriers are 1400 clocks apart;
  * changes to m3p4, runs the transition to the end (about 3.2 M clocks), and
    checks the 2800-clock spacing.
  It runs in well under a minute.
* **`tb_carrier_generation`**: all nine configurations and the transitions between them,
  checking every carrier waveform, at CMAX = 90.
* **`tb_reference_generator`**: compares every reference value with a
  floating-point sine, to within 2 counts, including a cross-fade.
* **`tb_wicsc_configs_full`**: the top at default sizes, taken through all
  nine configurations. The route includes m3p2 → m3p4, m3p2 → m3p12 and
  m3p2 → m6p2. In each configuration it:
  * checks the carrier spacing;
  * compares every slot's reference with the ideal
    `CMAX/2 + amp·sin(ωt − b·180°/m)`, within the table's angle resolution
    (the worst error seen is 5 counts);
  * during each transition, checks that no carrier's phase moves by more than
    `STEP` clocks from one period to the next.
  Every transition takes 127 periods, because the reference fade sets the
  pace. The run takes about 2 minutes.
* **`tb_adc_acquisition_8khz`**: acquisition at 8 kHz while the ADCs convert
  at 10 MHz. It checks that words arrive 25000 clocks apart and are 1250
  conversions apart, with data skew on two of the boards.
