# Ring-oscillator temperature sensor for FPGAs

Logic gets slower as a chip heats up. This design uses that to measure die
temperature on an FPGA without an analog sensor. A ring of 51 inverters
oscillates at a rate set by its own gate delays. The sensor counts how many
100 MHz clock cycles 2^14 ring periods take. A warmer die gives a slower ring
and a larger count. The count is about 69,500 at 20 °C and 69,870 at 70 °C.

The design sends each count over an RS-232 line once every two seconds. Next
to it goes the temperature that the FPGA's own System Monitor ADC reads at the
same moment, so that a host can build or check the calibration. A
count-to-temperature table (CTC) also turns the count into tenths of a degree
Celsius in the logic itself.

The design targets a Xilinx Virtex-5 class device: a 100 MHz board clock, LUT
inverters and the System Monitor hard macro. Apart from the ring and the
System Monitor, everything is plain synchronous RTL.

## How one measurement works

```
 en ──┐
      AND2 ──► 51 inverters ──┬──► AND2 ──► osc ──► FF ──► FF ──► edge detect ──► counting
 ┌──► │                       │    (en)                                          state machine
 └────┴───────────────────────┘
```

* **Ring oscillator** (`ring_oscillator`, `delay_line`). An AND2 closes the
  51-inverter chain into a loop with the enable. A second AND2 gates the output
  with the enable, so the output stays low while the ring is disabled. The ring
  has an odd number of inversions, so its period is `2 × 51 × t_inv`. At the
  mean inverter delay seen on the target (about 0.417 ns) that is about
  42.5 ns, or 23.5 MHz.
* **Synchronizer** (`fixed_ring_oscillator`). Two flip-flops on the 100 MHz
  clock bring the ring's output into the clock domain. The ring must run below
  50 MHz, half the clock rate, for every period to be seen.
* **Counting state machine** (`counting_state_machine`). It has two counters.
  One counts clock cycles. The other counts rising edges of the synchronized
  ring output. When the edge counter reaches `CYCLES` (2^14), the next cycle is
  the *terminal cycle*. In it, the clock count is copied to `sample`, and both
  counters restart at zero. The terminal cycle itself is not counted. So:

  ```
  sample = (window length in clock cycles) − 1
         ≈ CYCLES × T_ring / T_clk − 1        e.g. 16384 × 42.52 ns / 10 ns − 1 ≈ 69670
  ```

  A window lasts about 0.7 ms. The count resolves the ring period to
  `T_clk / CYCLES`, about 0.6 ps. Counting many periods is what allows a short
  51-stage ring instead of the thousands of inverters a single-pass delay line
  would need. The count needs 17 bits, and a 16-bit counter overflows at these
  settings, so the counter is 32 bits wide.

## Get and send phases

`clock_convert` derives two rates from the 100 MHz clock:

* a 1 Hz state rate, from a half period of 50,000,000 cycles;
* the 19200-baud bit rate, from a half period of 2604 cycles (5208 cycles per
  bit, 19201 Hz).

Both come out as one-cycle enable strobes in the 100 MHz domain. There are no
derived clocks.

`send_get_state_machine` flips `send` on every 1 Hz strobe:

| phase | `send` | what happens |
|---|---|---|
| get  | 0 | every finished window updates `sample` (about 1400 windows per phase) |
| send | 1 | `sample` is frozen; the serial sender transmits it once |

The first send phase starts 0.5 s after reset. After that each phase lasts
1 s, so one result leaves every 2 s.

## The serial frame

`rs232` builds a 48-bit frame (`ro_sensor_pkg::frame_t`):

| bits | field |
|---|---|
| 31:0  | `count`: the frozen window count |
| 41:32 | `sysmon_temp`: System Monitor conversion result, DO[15:6] |
| 47:42 | zero |

`rs232_state_machine` sends the frame as six 8N1 bytes at 19200 baud. Byte 0
(count[7:0]) goes first, and each byte goes least significant bit first. The
bytes follow each other with no idle time, so a frame takes 60 bit times
(3.1 ms). The transmitter starts on the first bit tick that finds both `send`
and `button` high. `button` is tied high at the top. After one frame the
transmitter waits until `send` falls, so exactly one frame goes out per send
phase. The frame is copied into a shift register when the transfer starts,
which means a System Monitor update during the transfer cannot tear it.

A host converts the System Monitor field as `T = code × 0.49 − 273` (°C). That
reading is accurate to about ±4 °C.

## System Monitor connection

The System Monitor is a hard macro and is not part of the RTL. The top brings
its signals out as ports. The sensor expects the macro in continuous
channel-sequencer mode with a 100 MHz DRP clock. It reads the DRP port
constantly:

* `sysmon_den` = `sysmon_eos`: a read at every end of sequence;
* `sysmon_daddr` = `{2'b00, sysmon_channel}`.

Data input, write enable and the macro's reset should be tied low where the
macro is instantiated. `tb/sysmon_model.sv` is a small behavioural stand-in
for the macro, used by the testbenches.

## From count to degrees: `ctc_lut`

The calibration is a quadratic fitted to measurements of a real 51-inverter,
2^14-period sensor in a temperature chamber. It uses the *calibrated count*
`c = count − 69420`:

```
T(°C) = −0.000234·c² + 0.2476·c + 6.3231        valid for c = 55 … 449 (≈19.2 … 70.3 °C)
```

`ctc_lut` computes this at elaboration into a 512-entry ROM indexed by `c`. It
uses integer arithmetic, `T10 = floor((−234c² + 247600c + 6323100 + 50000) / 100000)`,
which is the temperature in tenths, rounded. The output is 10 bits, 192 … 703.
Counts outside 69475 … 69869 are clamped to the nearest end of the table, and
`temp_in_range` drops.

**How far to trust it.** The quadratic belongs to one board, one placement of
the ring and one temperature range. The fit had about 0.13 °C per count on
average: 0.22 °C/count at 20 °C and 0.04 °C/count at 70 °C. About 95 % of
readings fell within ±2.75 °C of the fit. Below about 20 °C the measured counts
were too noisy to use. A different device, a different placement of the
inverters, or a different `N_INV`/`CYCLES` needs a new calibration. The three
calibration parameters and the formula in `build_rom` are then what change.

## The ring in simulation

On silicon the ring is a chain of LUTs configured as inverters. They must be
kept through synthesis (a keep attribute on the chain nets) and should be
placed together, for example in one corner of the die. Such a loop has no
portable synthesizable form, and a zero-delay simulator cannot run it. So
`delay_line` and `ring_oscillator` are **behavioural models**:

* The 51 stages are one lumped transport delay of `N_INV` stage delays,
  inverted because `N_INV` is odd. This gives one simulation event per half
  period, which is fast enough to simulate a whole second.
* The stage delay is `stage_delay_fs`, an integer variable in femtoseconds
  inside `delay_line`. Its default comes from the parameter `STAGE_DELAY_NS`
  = 0.4169 ns. Testbenches write it hierarchically to model heating, for
  example `dut.u_core.u_counter.u_osc.u_ring.u_line.stage_delay_fs = 417_500`.
  A larger delay gives a larger count.
* The default 0.4169 ns puts the count (about 69670) in the middle of the
  calibrated range. The FPGA data-sheet inverter delay is 0.238 ns. The delays
  measured on the target were much larger, because the count also absorbs
  routing delay.
* The simulator rounds each half period to 1 ps. Over 2^14 periods this shifts
  the count by up to about 1.6. The testbenches compute expected counts from
  the rounded half period.
* A ring with an even number of inverters does not oscillate: the AND2 in the
  loop does not invert. `N_INV` must be odd. With an even count the window
  never ends, and `sample` keeps its last value.

Synthesis tools drop the delays, and a synthesized version of these models
would be a combinational loop. For a real build, replace `delay_line` with a
vendor-specific chain of kept LUT inverters that has the same ports.

## Module hierarchy

```
ro_temp_sensor                     top: clk, reset, bitout, System Monitor ports, sample, temp_tenths
├── design_with_rs232              ring counter + serial sender
│   ├── ro_counter
│   │   ├── fixed_ring_oscillator  ring + 2-FF synchronizer
│   │   │   └── ring_oscillator    (behavioural) AND2 loop + output AND2
│   │   │       └── delay_line     (behavioural) 51 inverters
│   │   └── counting_state_machine
│   └── rs232                      frame assembly, System Monitor DRP wiring, baud divider
│       ├── clock_convert          (baud output used)
│       └── rs232_state_machine
├── clock_convert                  (1 Hz output used)
├── send_get_state_machine
└── ctc_lut
ro_sensor_pkg                      shared constants and frame_t
```

All logic runs on `clk`. Every register except the two synchronizer flip-flops
has an asynchronous active-high `reset`.

Generic synthesis of the whole top (before mapping to a device) gives 183
flip-flop bits. The largest are the 32-bit cycle count, the 32-bit `sample`, the
48-bit frame latch, the 26-bit 1 Hz divider and the 15-bit edge count. The
reference build on a Virtex-5 LX50T used 129 registers and 296 LUTs, about 1 %
of the device. Most of the difference is the frame latch, which the reference
does not have.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `N_INV` | 51 | inverters in the ring (must be odd; an even value is an elaboration error) |
| `STAGE_DELAY_NS` | 0.4169 | simulation only: mean inverter delay |
| `CYCLES` | 16384 | ring periods per window |
| `STATE_HALF` | 50,000,000 | half period of the 1 Hz state rate, in clock cycles |
| `BAUD_HALF` | 2604 | half of one bit time, in clock cycles |

The counter width (32) and the CTC constants are parameters of the lower
modules. Changing `N_INV` or `CYCLES` shifts the count, so the CTC table no
longer applies.

A longer ring is the obvious way to more resolution. With 511 inverters the
ring delay at the data-sheet 0.238 ns per stage is about 121.6 ns, and the
window count is about 398,500. That is about ten times the count change per
picosecond of stage delay, against the same ±1 clock of quantisation. The
32-bit counter holds it, but such a ring needs a calibration of its own.

## Where this RTL departs from the reference design

* **Clock enables instead of derived clocks.** The reference design clocks
  the send/get flip-flop and the serial state machine from divided clocks.
  Here they run on the 100 MHz clock with enable strobes. The rates are
  unchanged, and the 1 Hz and baud domains no longer cross into the main
  clock domain unsynchronized.
* The serial transmitter **latches its frame** at the start of the transfer
  and **drives the line from a flip-flop**. The reference decodes the line
  from the state and reads the frame live.
* Both clock dividers are reset by `reset`. The reference ties the divider
  reset low, so its 1 Hz and baud rates run freely from power-up.
* `send_get_state_machine` has an asynchronous reset to the get phase. The
  reference has only a power-up value.
* The ring enable is driven by `~reset`. The reference does not show how its
  enable is driven.
* `ctc_lut` is built. The reference work only proposes it, as a table to be
  turned into a LUT with a 10-bit output. Its rounding and out-of-range
  behaviour are this design's choices. It feeds the `temp_tenths` output, not
  the serial frame.
* `window_done`, `sample`, `temp_tenths` and `temp_in_range` are extra
  outputs for observation.
* The synchronizer is a single two-flop stage, followed by the counter's
  edge-detect register.
* The ring, the delay line and the System Monitor are models (see above), not
  hardware.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ro_sensor_pkg.sv \
          tb/tb_ro_temp_sensor.sv --top tb_ro_temp_sensor
./obj_dir/Vtb_ro_temp_sensor
```

`-Wno-fatal` is needed because the delay-line model uses a delay that is only
known at run time.
`--assert` turns on the protocol assertions in `counting_state_machine` (result
held while sending) and `rs232_state_machine` (line idles high and changes only
on a bit tick).

| testbench | what it runs | run time |
|---|---|---|
| `tb_delay_line`, `tb_ring_oscillator`, `tb_fixed_ring_oscillator` | delay, period `2·N·t`, enable gating, two-flop latency | < 1 s |
| `tb_counting_state_machine` | synthetic ring of P cycles: window = CYCLES·P, sample = CYCLES·P − 1, hold while sending, full-size 2^14 | < 1 s |
| `tb_clock_convert`, `tb_send_get_state_machine` | tick spacing (5208-cycle bit period), toggling | < 1 s |
| `tb_rs232_state_machine`, `tb_rs232` | frames decoded by a UART receiver model, byte order, System Monitor field and DRP wiring | < 1 s |
| `tb_ctc_lut` | every calibrated count against the quadratic in floating point, published table points, clamping | < 1 s |
| `tb_ro_counter` | default ring and window, count follows stage delay within ±1 | < 1 s |
| `tb_design_with_rs232` | short window, full frame path | < 1 s |
| `tb_ro_temp_sensor` | whole sensor, 3 ms phases, five "temperatures" incl. one outside the CTC range; counts every mechanism | ~5 s |
| `tb_ro_temp_sensor_full` | whole sensor at all defaults: 0.5 s of measuring, then one real 19200-baud frame | ~40 s |
| `tb_table1_configs` | ten ring-length/window combinations from early exploration, the 16-bit overflow, and a 511-inverter ring at 0.238 ns per stage | ~6 s |

The testbenches check function and timing against independent arithmetic.
They do not prove the ring's behaviour on silicon. Jitter, self-heating,
supply noise and the placement of the inverters are outside any simulation
here.
