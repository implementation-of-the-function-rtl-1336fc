# Stepwise current protection as parallel logic

This is the logic of a three-stage overcurrent relay for a three-phase power line. It is written to run
inside an FPGA or CPLD, not as a program on a microprocessor. The idea behind it is simple. A relay protection
algorithm is a handful of comparators, OR gates and timers, so it can be built directly as gates and
flip-flops. Then every relay, every stage and every timer is evaluated at the same time, on every
clock cycle. Nothing is scanned in sequence, so no software loop can stall or crash.

The scheme follows the classic three-stage current protection taken from the article
*Implementation of the Function of Stepwise Current Relay Protection Based on a Parallel Operation
Programmable Logic Controller* (S. D. Hrytsenko). That article gives the block structure and the trip function. Word widths, clock rate,
settings, delay times, the input handshake and the behaviour of the output and signalling elements
are this design's own choices. They are listed in [Choices made here](#choices-made-here).

## The protection scheme

Each of the three phase currents goes to three overcurrent relays, one per stage. There are nine
relays in all: KA1.1 to KA3.3, with stage first and phase second. Within a stage, an OR element combines the
three phases:

```
            phase A  phase B  phase C
stage 1:    KA1.1    KA1.2    KA1.3  --> DW1 ------------------+--> KH1 (signal)
stage 2:    KA2.1    KA2.2    KA2.3  --> DW2 --> DT1 ----------+--> KH2 (signal)
stage 3:    KA3.1    KA3.2    KA3.3  --> DW3 --> DT2 ----------+--> KH3 (signal)
                                                               |
                                     DW1, DT1 out, DT2 out --> DW4 --> KL --> trip (disconnection)
```

The trip function is

```
T = DW1  OR  (DW2 delayed by DT1)  OR  (DW3 delayed by DT2)
```

The three stages do different jobs:

| stage | name | pickup | delay | purpose |
|---|---|---|---|---|
| 1 | instantaneous current cutoff | highest (`I_SET1`) | none | clears heavy faults on the near part of the line at once |
| 2 | current cutoff with time delay | middle (`I_SET2`) | DT1 | covers the rest of the line; waits so that the next protection downstream can act first |
| 3 | maximum current protection | lowest (`I_SET3`) | DT2 (longest) | backup, for this line and for the next line if its protection fails |

Selectivity comes from these settings. A fault far away produces a smaller current, so only stages
2 and 3 pick up. Their timers then give the protection closest to the fault time to clear it first.
If that protection clears the fault, the current falls back before the timer runs out, and this relay
does nothing.

## Timing of the delayed stages

This is the part to understand before changing anything.

`time_delay` is a delay on pickup. It counts clock cycles while its input (the stage's OR output) is
high. The count restarts from zero as soon as the input drops. The output is
`in AND (count == DELAY_CYCLES)`. This has three consequences:

- The stage operates only after its current has stayed above the setting for the whole delay,
  without a break. A single sample below the setting restarts the timing. This is intended: a fault that
  another protection has cleared must not be "remembered". It also means that a current hovering
  right at the setting may keep restarting the timer.
- The output falls in the same cycle as the input. The trip stays on because KL seals in, not
  because the timer holds.
- At the default 1 MHz clock, the counters are 19 bits (500 ms) and 21 bits (1500 ms). The delays
  can be set to the exact cycle, and their resolution is one clock period.

Latency, counted in clock edges from the edge at which a new sample is captured (`adc_valid` high):

| event | `trip` rises after |
|---|---|
| current at or above `I_SET1` on any phase | 1 edge |
| current in `[I_SET2, I_SET1)` held | `DT1_CYCLES + 1` edges |
| current in `[I_SET3, I_SET2)` held | `DT2_CYCLES + 1` edges |

A current above `I_SET1` also picks up stages 2 and 3. Their timers keep running, but stage 1 has
already tripped. In the tests the breaker opens long before DT1 runs out, so only KH1 is set.

## Measuring elements and settings

`current_relay` compares an unsigned current code with its setting. Its output is 1 when
`i_meas >= setting`. There is no hysteresis. The ADC is expected to deliver the current *magnitude*
(RMS or peak) of each phase, not instantaneous samples. If the converter you use gives raw samples,
you need a magnitude estimator in front of the relays, and this design does not include one.

The defaults are codes of a 10-bit ADC (`relay_pkg::ADC_W`):

| parameter | default | at 100 A full scale |
|---|---|---|
| `I_SET1` | 800 | about 78 A |
| `I_SET2` | 400 | about 39 A |
| `I_SET3` | 150 | about 15 A |
| `DT1_MS` | 500 | 500 ms |
| `DT2_MS` | 1500 | 1.5 s |
| `CLK_HZ` | 1 000 000 | |

Settings are parameters. Changing a setting means rebuilding and reloading the FPGA. The source article
presents that in-place reprogramming as an advantage of the approach. If the settings must change
at run time, turn the `SETTINGS` constant in `stepwise_protection` into ports. The relays already
take the setting as an input.

## Trip output and signals

- **KL (`output_relay`)** registers the trip command. With `LATCH = 1` (the default) it seals in: once
  set, it stays on until `reset_cmd` arrives while the trip command is off. This keeps the breaker trip
  coil energised after the breaker has interrupted the fault current, which removes the trip
  command. While a trip command is present, a reset is ignored.
- **KH1 to KH3 (`signal_flag`)** latch which stage operated. KH1 is driven from DW1, KH2 from the
  output of DT1, and KH3 from the output of DT2. So KH2 and KH3 light only when their delay has
  run out, not on pickup. `reset_cmd` clears them, and a new set wins over a simultaneous clear.

## The controller around the logic

`plic_controller` is the top level. It holds what goes into the FPGA:

1. `discrete_inputs` captures the three current words (`adc_data`) and three voltage words
   (`adc_volt`) at the same time on the one-cycle strobe `adc_valid`. It holds them until the next strobe,
   so the relays always see one consistent sample. The held values reset to zero.
2. `stepwise_protection` is the scheme above.
3. The status outputs `i_meas`, `u_meas`, `stage_pickup` (DW1 to DW3), `stage_operate` (DW1, DT1 out,
   DT2 out) and `sample_updated` are for LED boards and a numeric display.

The voltages are captured and brought out for display, but the protection does not use them. The
scheme is a pure current protection.

The rest of the controller is outside this RTL:

- the ADC in front of the discrete inputs;
- galvanic isolation on the inputs and outputs;
- the LED boards and the numeric display;
- the configuration memory, JTAG, clock oscillator and power supply;
- the breaker ("executive element") that `trip` drives.

The ADC handshake assumed here is parallel words plus a data-valid strobe, synchronous to `clk`. If
your ADC runs on its own clock, you need to add a synchroniser on the strobe.

Ports of `plic_controller`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `adc_valid` | in | 1 | one-cycle strobe: new words on `adc_data`/`adc_volt` |
| `adc_data` | in | 3 x 10 | phase current magnitudes, phase A in `[0]` |
| `adc_volt` | in | 3 x 10 | phase voltage magnitudes |
| `reset_cmd` | in | 1 | operator reset of KL and KH1 to KH3 |
| `trip` | out | 1 | disconnection command (KL) |
| `signal` | out | 3 | KH1 to KH3, stage 1 in bit 0 |
| `i_meas`, `u_meas` | out | 3 x 10 | captured words |
| `stage_pickup`, `stage_operate` | out | 3 | stage states |
| `sample_updated` | out | 1 | pulse after each capture |

At the defaults the design has 105 flip-flops: 60 input-register bits, 1 strobe bit, 19 and 21 timer
bits, and 4 output bits. It also has nine 10-bit constant comparators and two incrementers. The source
article names a 128-macrocell CPLD (EPM7128S) as the target. The register count fits that device.
Whether the comparators and incrementers fit as well, only a vendor fitter can say. The design's 135
port bits also exceed that package's 68 user I/O pins. Without the status ports and the voltage
inputs, 38 port bits remain, and a build for that part would leave those out.

## Choices made here

The source article fixes the structure above and the trip function. Everything below is this design's own
choice:

- The word width (10 bits), clock (1 MHz), pickup codes and delay times.
- The ADC delivers current magnitudes, with a synchronous valid strobe.
- The relays pick up at `>=`, with no hysteresis.
- The timer restarts whenever pickup is interrupted.
- KL seals in until an operator reset, and KH1 to KH3 are latched flags.
- Phase `p` of every stage is watched by relay `KAs.p`. The mapping does not affect the result.
- Voltages are captured but not evaluated.
- All state is on an asynchronous active-low reset.

## Files

| file | content |
|---|---|
| `rtl/relay_pkg.sv` | widths, types, default settings, `ms_to_cycles` |
| `rtl/current_relay.sv` | KA: magnitude comparator |
| `rtl/or_element.sv` | DW: N-input OR |
| `rtl/time_delay.sv` | DT: delay on pickup |
| `rtl/output_relay.sv` | KL: trip output with seal-in |
| `rtl/signal_flag.sv` | KH: latched stage signal |
| `rtl/discrete_inputs.sv` | input register for the ADC words |
| `rtl/stepwise_protection.sv` | the three-stage scheme |
| `rtl/plic_controller.sv` | top level |
| `tb/adc_model.sv` | behavioural ADC (real amperes/volts to codes, one conversion per ms), testbench only |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and ends. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/relay_pkg.sv tb/tb_plic_controller.sv \
          --top-module tb_plic_controller
./obj_dir/Vtb_plic_controller
```

To run another testbench, replace `tb_plic_controller` in both places. Verilator finds the other files
through `-I`, by module name.

What the tests cover:

- **`tb_plic_controller`** runs the whole controller at its default parameters, with the
  behavioural ADC (100 A / 150 V full scale) and a breaker model that opens 60 ms after a trip. It
  checks the following:
  - normal load and a voltage sag (no pickup);
  - a fault in each stage's band on each phase in turn, so that each of the nine relays trips the
    line once: 90 A trips in 1 edge with KH1, 50 A after exactly 500 001 edges with KH2, and 20 A
    after exactly 1 500 001 edges with KH3;
  - the seal-in after the breaker opens, and the operator reset;
  - stage-2 and stage-3 faults cleared after 300 ms and 1000 ms, which must not trip.

  It counts every mechanism (sample captures, trips per stage, timer restarts, seal-in, reset,
  breaker operation) and fails if any of them never happened. It simulates about 8 s of controller
  time, which takes a few seconds.
- **`tb_stepwise_protection`** compares every output on every cycle with a cycle-level reference
  model. It uses 20- and 50-cycle delays, and 1500 random current segments across all four current
  bands and all phases. Directed cases check each stage's latency, a fault that ends one cycle too
  early, and the seal-in.
- **Unit testbenches** cover each element with directed edge cases (exactly at the setting, a pulse one cycle
  short of the delay, set and clear together) plus random stimulus checked against a model.

Each testbench has been confirmed to fail on a deliberately broken copy of its module. Examples
are `>` instead of `>=`, a delay one cycle short, the delays of the two stages swapped, and KH driven
from pickup instead of the delayed output.

## Limits

- There is no magnitude estimation. The relays trust the ADC to deliver magnitudes.
- There is no directional element or voltage-controlled stage. The voltages are only displayed.
- The settings are fixed at build time.
- The ADC and breaker models in `tb/` are idealised: no conversion noise, no breaker bounce.
