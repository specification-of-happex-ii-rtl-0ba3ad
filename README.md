# HAPPEX ADC timing board

The HAPPEX integrating ADCs measure a detector signal by integrating it over
a precisely timed window: the integrator is reset, a baseline sample is
taken, the signal integrates for a set time, a peak sample is taken, and the
two are converted and read out. This board produces all of those timing
strobes from one external **Master Trigger**, so that every ADC in the crate
integrates over the same window. The window position (Ramp Delay), its
length (Integration Time) and the number of back-to-back integrations per
trigger (oversampling, 1 to 20) are set over VMEbus.

The board also has three smaller jobs, all reached through the same VME
registers: a two-bit input register (Data0, Data1), two 12-bit 0–10 V DACs
each followed by a 0–100 kHz voltage-to-frequency converter (feedback
signals for the electron source), and a 16-bit ±5 V DAC for ADC calibration.

This repository holds synthesizable SystemVerilog for all the board's logic,
behavioural models of its three DACs and two V/F converters, and
self-checking testbenches.

## The integration cycle

Everything is timed in **steps of 2.5 µs**: the 20 MHz board clock divided
by 50. Ramp Delay `R` and Integration Time `I` are given in steps.

| Interval | Length |
|---|---|
| accepted trigger → Reset falls | `R` steps |
| Reset falls → Baseline rises | 15 µs (6 steps) |
| Baseline, Peak, Convst, VME Trig widths | 2.5 µs (1 step) each |
| Baseline falls → Peak rises (Integrate Gate high) | `I` steps |
| Peak falls → Reset rises | 2.5 µs |
| Peak falls → Convst falls | 22.5 µs |
| Convst rises → VME Trig rises | 7.5 µs |

Reset and Convst idle high; Convst is an active-low pulse on the cable.
Baseline, Peak, VME Trig and Integrate Gate idle low. Integrate Gate is a
diagnostic copy of the integration window, from the Baseline trailing edge to
the Peak leading edge.

**Oversampling.** With `N` > 1 the cycle runs `N` periods after one Ramp
Delay. Each later period begins by dropping Reset at the trailing edge of the
previous VME Trig, and keeps the same internal timing, so a period lasts
`22 + I` steps and 52.5 µs separate a Peak leading edge from the next
Baseline leading edge. Reset still rises 2.5 µs after each Peak. Every
period ends with its own Convst and VME Trig, so the data acquisition reads
the ADCs once per period. A setting of 0 runs one period and a setting above
20 runs twenty. Register `$E` bits 15..8 read the number of the period in
progress (1..N), or 0 when idle.

**Trigger acceptance.** Jumper 1 (`jp_rise`) makes a rising edge of Master
Trigger start a cycle, jumper 2 (`jp_fall`) a falling edge, both jumpers
either edge. Edges are ignored while a cycle runs. The sequencer becomes idle
at the leading edge of the last VME Trig, so a trigger may arrive while that
pulse is still high; the pulse runs on its own 50-clock counter and keeps its
full width.

**Precision.** The step divider is not free-running: it restarts in the
clock in which a trigger is accepted. Every edge of the cycle therefore lies
an exact multiple of 2.5 µs after that clock, with 50 ns jitter against the
asynchronous trigger. The trigger passes a two-flop synchroniser and an edge
register, so Reset falls `R × 2.5 µs + 200 ns` after the input edge. After
reset, no edge is looked for until the synchroniser holds the input level, so
a Master Trigger that idles high does not start a cycle at power-up.

**Corner settings.** Ramp Delay 0 drops Reset in the clock that accepts the
trigger. Integration Time 0 puts Peak directly after Baseline, and Integrate
Gate stays low. Settings are copied when the trigger is accepted, so a VME
write during a cycle takes effect on the next cycle.

## Registers

The board answers A16 cycles (address modifiers `$29` and `$2D`) to 16 bytes
at `base × 16`, where `base` is a 12-bit switch (`base_sw`). Address bits
A15..A4 must match the switch and A3..A1 select the register. In a 32-bit
view the register appears at `0xFFFFXXXY`, with `XXX` the switch setting and
`Y` the offset.

| Offset | Access | Contents | Reset |
|---|---|---|---|
| `$0` | R | bit 0 Data0, bit 1 Data1 (current input levels) | – |
| `$2` | – | unused, reads 0 | – |
| `$4` | W | 12-bit DAC #1, bits 11..0 | 0 |
| `$6` | W | 12-bit DAC #2, bits 11..0 | 0 |
| `$8` | W | 16-bit DAC | 0 |
| `$A` | R/W | Ramp Delay, 16-bit count of 2.5 µs steps | 0 |
| `$C` | R/W | Integration Time, 16-bit count of 2.5 µs steps | 0 |
| `$E` | R/W | bits 7..0 Oversample setting; bits 15..8 current oversample (read only) | 1 |

The DAC registers are write-only and read as 0. DS1* writes D15..D8 and DS0*
writes D7..D0, so byte writes work. AS*, DS0* and DS1* are synchronised to the
20 MHz clock. DTACK* (`vme_dtack`, active high here) is asserted 3 clocks
after the data strobes fall. It is released, together with the read-data
enable `vme_d_oe`, 3 clocks after the strobes rise. Interrupt-acknowledge
cycles are ignored. The open-collector and tri-state bus drivers are outside
the logic: the data bus appears as `vme_d_in`, `vme_d_out` and `vme_d_oe`.

## DACs and V/F converters

These are analog parts. They are given as behavioural models, so that the
whole board can be simulated. Voltages are signed 32-bit integers in
microvolts.

* `dac12_model`: `V = 10 V × code / 4096`, straight binary, 0 to 9.99756 V.
* `dac16_model`: offset binary, `V = −5 V + 10 V × code / 65536`. Code
  `8000h` gives 0 V.
* `vf_converter_model`: 10 kHz per volt (100 kHz at 10 V), as a square
  wave. It is built as a phase accumulator clocked by the board clock, so its
  edges have 50 ns jitter. Negative inputs give no output.

The DAC codings and the V/F waveform are this design's
choices. Replace the models with the real parts' models if those parts are
known.

## Structure

```
happex_adc_timing_board      board: logic + analog models, line-level ports
├── timing_fpga              all digital logic
│   ├── tick_gen             20 MHz → 2.5 µs step enable, restartable
│   ├── trigger_select       synchroniser, jumper edge selection
│   ├── timing_sequencer     integration-cycle state machine
│   ├── input_register       Data0/Data1 synchroniser
│   └── vme_slave            A16/D16 slave, register file
├── dac12_model ×2, dac16_model
└── vf_converter_model ×2
happex_pkg                   step counts, register offsets, types
```

`timing_sequencer` has one state per interval (Ramp, pre-Baseline,
Baseline, Integrate, Peak, Reset-hold, pre-Convst, Convst, pre-VME-Trig,
VME-Trig-between-periods) and a 16-bit count of steps left in the state. The
outputs are registered and decoded from the next state, so they switch
together at a clock edge without glitches. The fixed interval lengths are
constants in `happex_pkg`.

The board's line receivers (fibre and optically isolated TTL), PECL/ECL
drivers, optical transmitters and connectors are not in the RTL; their logic
levels are the top's ports. The ADC ribbon cable carries, as differential
pairs from the top (pins 0–9): unused, Reset, Convst, Peak, Baseline. The
Data0/Data1 inputs are copied to the VME-trigger cable (`data_ecl`), which on
the board is only a level translation. A power-on reset `rst_n` (active low)
is added.

## Choices this design makes

The timing in the table above, the register map, the oversampling rule and
the jumper behaviour are the board's specification. The following are this
design's own choices:

* The VME bus cycle and DTACK timing, address-modifier filtering, and reads of
  write-only registers returning 0.
* The divider restart at the trigger, the synchroniser depth (200 ns
  trigger latency), and the power-up guard on the trigger edge detector.
* Copying the settings at the trigger, limiting Oversample to 1..20, and
  current oversample 0 when idle.
* Ramp Delay and Integration Time 16 bits wide (up to 163.8 ms).
* The VME Trig width of 2.5 µs comes from the timing diagram. It agrees
  with the 52.5 µs Peak-to-Baseline spacing.
* Between oversampling periods Reset rises after Peak and falls again at VME
  Trig. After the last period it stays high until the next trigger.
* The input register follows the input levels; it does not latch edges.

## Simulation

Each module has a testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/happex_pkg.sv tb/tb_happex_adc_timing_board.sv \
    --top-module tb_happex_adc_timing_board -o sim
./obj_dir/sim
```

* `tb_happex_adc_timing_board` runs the whole board at its default
  parameters. It programs the board over VME and checks every edge in
  nanoseconds against the interval table. This covers 3, 2, 1 and 20
  periods, and Oversample settings 0 and 25. It also checks triggering on
  each jumper setting, a trigger ignored mid-cycle, and Current Oversample
  readback. The rest of the board is checked too: byte writes, a foreign
  base address, the input register, the three DAC voltages and both V/F
  frequencies. The run takes well under a second.
* `tb_timing_sequencer` runs with a 5-clock step. It compares every output
  edge against a timeline computed from the intervals. Cases include zero
  Ramp Delay and Integration Time, the Oversample limits, and a re-trigger
  during the last VME Trig.
* `tb_vme_slave` uses the bus-functional master `tb/vme_master_bfm.sv`.
  The other testbenches check the divider, the trigger edge selection, the
  input register and the analog models.

`vme_slave` has immediate assertions for the handshake: DTACK* is asserted
only while a cycle is acknowledged, and the data drivers are on only with
DTACK*. `--assert` enables them.

## Changing it

`timing_fpga`, `tick_gen` and `timing_sequencer` take `DIV`, the clocks per
2.5 µs step (50 at 20 MHz). Change it together with the board clock. The
fixed intervals and the oversampling limit are in `happex_pkg`.
