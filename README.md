# Engine tachometer in programmable logic

This is a rev counter for a four-stroke petrol engine. It is small enough for a
CPLD and needs no multiplier or divider. It takes the pulses from the ignition
coil and drives a 56-segment LED display: a bar graph plus a four-digit
readout. The speed comes out of a counter directly in revolutions per minute,
because the count windows are chosen so that the arithmetic falls out of the
timing.

## Why the count equals the speed in rpm

A four-stroke engine fires once every two revolutions, so

    rpm = 30 x f_pulse

The design does not measure `f_pulse` and multiply. It does this instead:

* A **250 ms gate** opens on an ignition pulse. During the gate the engine
  gives `0.25 x f_pulse = rpm / 120` pulses.
* Every pulse opens a **4 ms window**. While a window is open inside the gate, a
  counter counts the edges of a **30.3 kHz** clock (1 MHz / 33). That is
  `4000 / 33 = 121.2` counts per pulse.
* The total is `rpm/120 x 121.2 = 1.01 x rpm`.

So the 14-bit count is the engine speed in rpm, about 1 % high. The original
design quotes about 4033 counts at 4000 rpm. This RTL gives 3999 to 4121,
depending on where the pulses fall relative to the gate. The pulse
count per gate is a whole number, so the reading moves in steps of about 121
rpm. The display table only resolves 200 rpm ranges, so the steps do not show.

The last window in a gate is cut off when the gate closes. Above 7500 rpm the
pulses are less than 4 ms apart. Each pulse then restarts the window, so the
counter runs for the whole gate and reads `250000 / 33 = 7575`. That is the
largest count possible, and it is far below the 14-bit limit of 16383.

| Speed (rpm) | Pulses per gate | Simulated count |
|-------------|-----------------|-----------------|
| 500         | 4-5             | 606-607         |
| 1000        | 8-9             | 1092            |
| 4000        | 33-34           | 4078            |
| 5200        | 43-44           | 5273            |
| 6500        | 54-55           | 6569-6570       |
| 9000        | windows overlap | 7575            |

## Block structure

```
 sensor_in ─► sensor_sync ─┬─► counter_250ms ── a1 ─┐
                           └─► counter_4ms ──── a2 ─┤
                                                    ▼
 clk (1 MHz) ─► counter_30khz ── tick ─┐       management ── reg_ena ─┐
                                       ▼        │count_ena            │
                                  counter_14bit ◄┘count_rst           ▼
                                       └────────────────────► register_14bit ─► led_table ─► led[55:0]
                                                                   └─► reg_out[13:0]
```

| Module | File | Role |
|--------|------|------|
| `tachometer` | `rtl/tachometer.sv` | Top level. Wires the blocks as shown above. |
| `tacho_pkg` | `rtl/tacho_pkg.sv` | Timing constants, widths, the state type, and the LED-code function. |
| `sensor_sync` | `rtl/sensor_sync.sv` | Two-flop synchroniser for the coil signal. |
| `counter_30khz` | `rtl/counter_30khz.sv` | Divides the clock by 33. Gives a square wave and a one-cycle `tick`. |
| `counter_250ms` | `rtl/counter_250ms.sv` | The gate. Opens on a rising edge, stays open exactly 250000 cycles, and ignores the sensor while open. |
| `counter_4ms` | `rtl/counter_4ms.sv` | The window. Every rising edge (re)starts 4000 cycles of high output. |
| `management` | `rtl/management.sv` | Moore state machine. Controls counting, the register write and the counter reset. |
| `counter_14bit` | `rtl/counter_14bit.sv` | Counts `tick` while enabled. Has a synchronous reset. |
| `register_14bit` | `rtl/register_14bit.sv` | Holds the last finished measurement. |
| `led_table` | `rtl/led_table.sv` | Turns the measurement into the 56-bit segment code. |

Top-level ports:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 1 MHz main clock |
| `rst_n` | in | 1 | Asynchronous reset, active low |
| `sensor_in` | in | 1 | Ignition-coil pulses. May be asynchronous to `clk`. |
| `led` | out | 56 | Segment drive code |
| `reg_out` | out | 14 | Last measurement, in rpm |

Top-level parameters are in clock cycles: `DIV_30K = 33`, `SHORT_CYCLES = 4000`
and `LONG_CYCLES = 250000`. The defaults give the real 4 ms and 250 ms windows
at 1 MHz. If you use a different clock, change all three together to keep
count = rpm.

## The measurement cycle (management)

The controller is a Moore machine: its outputs depend only on its state. It
uses `a1` = gate open and `a2` = window open.

| State | count_ena | reg_ena | count_rst | Next state |
|-------|-----------|---------|-----------|------------|
| NACHALO ("start") | 0 | 0 | 1 | Once `a1` is 1: COUNT if `a2`, else PAUSE |
| COUNT | 1 | 0 | 0 | ZAPIS_A if `!a1`; PAUSE if `!a2` |
| PAUSE | 0 | 0 | 0 | ZAPIS_A if `!a1`; COUNT if `a2` |
| ZAPIS_A ("write") | 0 | 1 | 0 | ZAPIS_B |
| ZAPIS_B ("write") | 0 | 1 | 0 | NACHALO |

* The counter counts only in COUNT, which means both the gate and a window are
  open.
* When the gate closes, the register is written for two cycles while the
  counter stands still.
* The counter is then held in reset until the next gate opens.

The display therefore always shows the last complete gate. After each gate the
display updates once, a few cycles after the gate closes. With a steady
engine, a gate ends every 250 ms plus the wait for the next pulse.

Latency: the sensor goes through the two-flop synchroniser and the registered
edge detector. The gate and the window therefore open 3 cycles (3 µs) after the
pulse edge. The controller follows one cycle later. Every window is delayed by
the same amount, so the delay does not change the count.

## The display code (led_table)

The register value is compared with 28 fixed thresholds: 700, 900, ..., 6100.
The number of thresholds reached, `k` (0 to 28), selects one of 29 rows:
"below 700", "700-900", ..., "5900-6100" and "6100 and above". No divider is
involved. Row `k` contains:

| Bits | Content |
|------|---------|
| `27:0` | Bar graph. The `k` lowest LEDs are lit. |
| `55:49` | Thousands digit of `600 + 200*k` (blank below 1000) |
| `48:42` | Hundreds digit |
| `41:35` | Tens digit (always 0) |
| `34:28` | Units digit (always 0) |

Each digit is a 7-segment pattern. Segments `a..g` sit on the high to low bits
and are active high. The readout shows the centre of the range: 5100-5300
shows `5200`. The two end rows show ` 600` (below 700) and `6200` (6100 and
above). The rows are constants that `tacho_pkg::range_code` computes
when the design is elaborated, so no data file is needed. To fit a different
display, change `range_code`; the row selection stays as it is.

## Where this RTL departs from the original design

The block structure, the 1 MHz clock, the 4 ms and 250 ms windows, the
14-bit counter and register, the 56-bit output, the range limits and the state
names and sequence of the controller all follow the original design. The
following are choices made here.

* **One clock.** The original feeds the 30 kHz signal to the counter as its
  clock. Here the 30 kHz divider makes a one-cycle `tick`, and the counter
  uses it as a clock enable on the 1 MHz clock.
* **Divide by 33.** The original says only "30 kHz". Dividing by 33 gives the
  121 counts per window that the original's timing diagram shows, and the 7575
  that its whole-design simulation shows. Both are reproduced here.
* **PAUSE state.** A Moore machine needs its own state for "gate open, window
  closed" to stop the counter between pulses. The original names only
  the other four states.
* **Window restart.** A pulse that arrives while a 4 ms window is open
  restarts the 4 ms.
* **Synchroniser** on `sensor_in`, and a reset that is asynchronous and
  active low.
* **Table contents.** The original does not list its 56-bit codes. The bar +
  four-digit layout above is this design's own. The 200 rpm step between the
  printed range limits (700-900 and 5900-6100) is inferred.
* The counter wraps at 16383. This cannot happen at the default timing.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each has a watchdog.

| Bench | What it checks |
|-------|----------------|
| `tb_counter_30khz` | Output and tick in every cycle against the cycle number; 100 ticks per 3300 cycles; 121-122 ticks per 4000 cycles |
| `tb_counter_250ms` | Cycle-by-cycle reference model; every gate exactly 250000 cycles; pulses inside a gate ignored; no reopening without a new edge |
| `tb_counter_4ms` | Reference model; windows of exactly 4000 cycles; restart by a pulse inside a window |
| `tb_management` | One hand-written measurement sequence, then 5000 random steps against an independent next-state function |
| `tb_counter_14bit` | Counting, hold, reset priority, wrap, random steps |
| `tb_register_14bit` | Random writes with a random enable |
| `tb_led_table` | All 16384 inputs against arithmetic, plus hand-written rows |
| `tb_tachometer` | End to end at the full default timing (see below) |

`tb_tachometer` plays pulse trains at six speeds from 500 to 9000 rpm, about
3.6 million clock cycles in all. It works out each gate's expected count only
from the recorded pulse times. It also checks:

* the gate length;
* that the register changes only when written;
* that the bar graph shows the right range.

The bench counts how often each mechanism happens and fails if one never
does. The mechanisms are:

* a window cut off by the end of the gate;
* a pause between windows;
* a window restarted by a pulse;
* a register write;
* a counter reset;
* the lowest, a middle and the highest table row.

It runs in a few seconds.

To simulate with Verilator, for example the whole design:

```
verilator --binary --timing --assert --top-module tb_tachometer \
    -y rtl -y tb -Irtl rtl/tacho_pkg.sv tb/tb_tachometer.sv
./obj_dir/Vtb_tachometer
```

For a single block, put its bench in place of `tb_tachometer`. The package
must come first on the command line, because `-y` finds the other modules by
file name.
