# CET digital speedometer

This design measures how fast a shaft turns. A magnetic (GMR) sensor faces a
toothed target on the shaft and gives 16 pulses per revolution. An analog
front end turns the pulses into clean logic levels: a differential amplifier
followed by a Schmitt trigger. The logic here counts those pulses in
one-second windows and reports the speed in revolutions per minute:

    RPM = pulses_per_second * 60 / 16

This is the *constant elapsed time* (CET) method: the time is fixed and the
pulses are counted. Its opposite is period measurement, which times the gap
between two pulses and then needs a divider to turn that time into a speed.
CET needs only counters, one adder and a multiply by a constant. Dividing by
16 is a 4-bit shift. The design replaces the counting and arithmetic that a
small 8-bit microcontroller did in an earlier board-level speedometer, so
that the function fits into a small FPGA.

The sensor, amplifier, Schmitt trigger and LCD are analog or off-the-shelf
parts. They stay outside this RTL. The logic starts at the Schmitt-trigger
output (`data_in`) and ends at a 32-bit RPM word (`data_out`) for a display.

## Block structure

```
            +-------------+  rise   +----------------+ count1
 data_in -->| edge_detect |--+----->| pulse_counter  |--------+
            +-------------+  |      |  (window A)    |        |   +-----------+
                             |      +----------------+        +-->|           |
                             |      +----------------+ count2     | rpm_scale |--> data_out[31:0]
                             +----->| pulse_counter  |----------->|  (a+b)*60 |
                                    |  (window B)    |            |   >> 4    |
                                    +----------------+            +-----------+
            +-------------+   win: enable one counter, hold the other at zero
     clk -->| gate_timer  |----------------------------------------------------> win
            +-------------+--tick--> register -----------------------------------> window_done
```

| file | role |
|---|---|
| `rtl/rpm_pkg.sv` | shared constants (32-bit width, 60 s/min, 16 pulses/rev, 1 MHz clock, 1 s window) and the `window_e` type |
| `rtl/edge_detect.sv` | 2-flop synchroniser and rising-edge strobe for the asynchronous pulse input |
| `rtl/gate_timer.sv` | divides the clock into 1,000,000-cycle windows; toggles `win` and raises `tick` on each window's last cycle |
| `rtl/pulse_counter.sv` | one window counter: counts strobes while enabled, held at zero while cleared |
| `rtl/rpm_scale.sv` | adds the two counts and converts to RPM: `((a+b)*60) >> 4`, truncated |
| `rtl/rpm.sv` | top level: wires the above together |

## How the two counters alternate

This is the part of the design that is easiest to misread.

There are two counters, `count1` and `count2`, and the windows alternate
between them. The window flag `win` chooses which one is active:

* **window A** (`win = 0`): `count1` counts pulses. `count2` is held at zero.
* **window B** (`win = 1`): `count2` counts pulses. `count1` is held at zero.

The output is always `(count1 + count2) * 60 / 16`. Only one counter is
non-zero at a time, so the sum is the count of the window in progress.
`data_out` is therefore a *running* value. It climbs as pulses arrive during
a window. It equals the measured speed only when the window is complete.

The switch happens cycle by cycle like this:

| cycle | `win` | ending counter | new counter | `data_out` |
|---|---|---|---|---|
| last of window A (`tick` = 1) | A | still counting | 0 | partial |
| first of window B (`window_done` = 1) | B | final count, not yet cleared | 0 | **speed of window A** |
| second of window B | B | cleared to 0 | counting | running value of window B |

So `window_done` marks the single cycle in which `data_out` holds the
finished speed. A display or a register that samples `data_out` when
`window_done` is high gets one stable reading per second. After that cycle,
`data_out` starts again from the new window's count.

An example with 16 pulses per revolution: 4 pulses in one second is a
quarter revolution per second. `data_out` climbs 3, 7, 11 and then reaches
15 RPM when the window closes. The values 3, 7 and 11 are `floor(n*3.75)`.

## Timing and accuracy

* **Window length.** Each window is exactly `CLK_HZ_P * GATE_SECONDS_P`
  clock cycles: 1,000,000 at the default 1 MHz clock. After reset the first
  window is window A.
* **Latency.** The input goes through two synchroniser flops, the edge
  detector and the counter. A rising edge therefore shows in `data_out`
  3 clock cycles after it arrives. As a result, a pulse in the last two
  cycles of a window is counted in the next window. No pulse is lost or
  counted twice.
* **Resolution.** One pulse per second is 3.75 RPM. The result is truncated,
  not rounded. At default settings a reading is between 0 and 3.75 RPM
  below the mean speed over the window, plus the usual ±1-pulse uncertainty
  of any gated count.
* **Range.** The input must stay high and low for at least one clock cycle
  each to be seen. That allows up to 500,000 pulses/s at 1 MHz, which is
  1,875,000 RPM. The 32-bit counters and output never limit it.
* **Update rate.** One new reading per window, once a second by default.
  The reading is always the average over the last full second.

## Parameters

On `rpm`:

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ_P` | 1,000,000 | system clock frequency in Hz |
| `GATE_SECONDS_P` | 1 | window length in seconds; must divide 60, so that the factor 60/`GATE_SECONDS_P` stays an integer |
| `PPR` | 16 | sensor pulses per revolution; must be a power of two, so that the scaling needs no divider |
| `W` | 32 | counter and output width |

A faster clock only needs `CLK_HZ_P` changed. The window divider grows to
`$clog2(CLK_HZ_P * GATE_SECONDS_P)` bits. With `GATE_SECONDS_P = 2` the
factor becomes 30, so the result is still in RPM.

Reset is synchronous and active high. It clears every register. If
`data_in` is already high when reset ends, that counts as one rising edge.

## Where this design differs from the original description

The original speedometer logic, from which the window scheme, the 60/16
scaling, the 32-bit width and the `clk/reset/data_in/data_out` interface are
taken, was built differently in a few places:

* **One clock.** The original clocks its count registers from the sensor
  pulses themselves, with latches, and uses a separate clock with a
  one-second period as the window. Here everything runs on one system clock.
  The window is made by `gate_timer`, and the pulses are sampled through a
  synchroniser. This costs the 3-cycle latency described above. It avoids
  latches and a second clock domain.
* **Window polarity.** Descriptions of the original disagree on whether the
  window flag is high or low while the first counter runs. This design
  follows the simulated behaviour of the original: `count1` fills while the
  flag is 0, and it fills first after reset.
* **Extra outputs.** `win` and `window_done` are additions. The original
  exposes only `data_out`. With only `data_out`, nothing tells a reader
  which cycle holds a finished reading.
* **Clock frequency.** The original is described with a 1 MHz counting
  clock in most places and with a 20 ns (50 MHz) clock in one. 1 MHz is the
  default here. Set `CLK_HZ_P = 50_000_000` for the other.
* **Not included.** The period-measurement alternative (time between two
  pulses, then `RPM = 60e6 / count`) was considered for the original and
  rejected because it needs a divider. It is not part of this RTL. Neither is
  a display driver: the LCD interface of the original board is not
  specified beyond the 32-bit result.

## Resource estimate

89 flip-flops: 2×32 counters, a 20-bit window divider, the window flag, 3
input flops and `window_done`. Also one 32-bit adder, one 32×6-bit constant
multiplier (a few adders after synthesis) and no latches. The original
target, a Spartan-3 XC3S400, has 7,168 flip-flops.

## Simulation

Every testbench checks its own results. Each ends with a line
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs.
Compile the package first. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/rpm_pkg.sv rtl/edge_detect.sv \
  rtl/gate_timer.sv rtl/pulse_counter.sv rtl/rpm_scale.sv rtl/rpm.sv \
  tb/tb_rpm.sv --top-module tb_rpm -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_edge_detect` | strobes match a reference built from the sampled input; steady inputs and reset give no strobes |
| `tb_gate_timer` | `tick` on the last cycle of every 7-cycle window, `win` alternates, reset restarts in window A |
| `tb_pulse_counter` | random clear/enable/increment against a reference count; clear wins; wrap-around |
| `tb_rpm_scale` | every count up to 4096 and random large counts against `floor(n*60/16)`; 1..4 pulses give 3, 7, 11, 15 |
| `tb_rpm` | the whole design with 100-cycle windows. It predicts `data_out` on every cycle from the documented 3-cycle latency alone and checks `window_done` every 100 cycles. It covers empty windows, pulses at the fastest accepted rate, pulses on window boundaries, both counters' windows, reset mid-window and the 4-pulse → 15 RPM case, and reports how often each happened. |
| `tb_rpm_full` | default parameters (1 MHz, one-second windows) for two seconds: 4 pulses give 15 RPM at cycle 1,000,000, and 1,600 pulses give 6000 RPM at cycle 2,000,000. It runs in about a second. |

The tests do not cover the analog front end. They drive clean logic pulses
and never model slow edges or noise at the Schmitt-trigger output.
