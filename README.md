# CAN bus load monitor

A device on a CAN bus usually cannot tell how busy the bus is, or which node
makes it busy. This design listens passively to a 1 Mbit/s CAN bus and counts,
over fixed sample periods of one second, how many bits each sending node put on
the wire, and how many bits the bus carried in total. A node ("module") is
identified by the identifier of its frames. Modules 0..31 each have their own
counter. At the end of every period the counts are frozen and reported twice:

* as raw bit counts over a one-way UART (115200 baud) for a PC, and
* as percentages of the bus capacity on a 2x16 character LCD: the overall load
  on line 1, and on line 2 the load of one module chosen with five switches.

The RTL targets a 50 MHz FPGA board with an HD44780-type character LCD (the
pin names are those of the Altera DE2 board). It does not transmit on the CAN
bus and does not acknowledge frames, so it can be attached to a running bus
without changing it.

## Structure

```
 CANbusWire ─► can_rx ─► load_calc ─┬─► uart_protocol ─► uart_word_sender ─► uart_tx ─► TxDWire
                  ▲          ▲       │
                  │   sample_rate_gen│   (overall, selected module)
                  │    (1 Hz tick)   └─► int_to_float ×2 ─► fdiv_dataa[0..1]
                  │                                             │  external FP divider
                  │                       fdiv_result[0..1] ◄───┘  (÷ 10485.76)
                  │                          │
                  │                  float_to_string ×2 ─► display_format ─┐
                  │                                      selftest ─────────┤ SW[17]
                  │                                                        ▼
                  │                                                    lcd_ctrl ─► LCD pins
```

| File | Role |
|---|---|
| `rtl/can_mon_pkg.sv` | shared sizes, types, the report word format and the divisor constant |
| `rtl/can_rx.sv` | bit timing, destuffing and frame assembly |
| `rtl/sample_rate_gen.sv` | one-clock tick per sample period |
| `rtl/load_calc.sv` | per-module and overall counters, freeze on each tick |
| `rtl/uart_protocol.sv`, `rtl/uart_word_sender.sv`, `rtl/uart_tx.sv` | serial report |
| `rtl/int_to_float.sv`, `rtl/float_to_string.sv`, `rtl/display_format.sv` | percentage text |
| `rtl/selftest.sv` | wiring-check screens and character test for the LCD |
| `rtl/lcd_ctrl.sv` | endless refresh of the LCD from a 38-entry command/character table |
| `rtl/can_bus_monitor.sv` | top level |

The floating point divider is not in the RTL. On an FPGA it is the vendor's
single-precision divider core; the top sends its operands out and takes the
quotients back in (see [The external divider](#the-external-divider)).

## Receiving CAN frames (`can_rx`)

This is the part that needs the most care, because the monitor has no clock
from the bus and has to find bit boundaries itself.

**Bit timing.** At 50 MHz one 1 Mbit/s bit lasts 50 clocks; the receiver uses
a nominal bit time of `CLKS_PER_BIT` = 48 clocks. The bus wire passes through a
two-flip-flop synchroniser. A counter runs from 1 to 48 and takes a sample when
it reaches `SAMPLE_POINT` = 31. Every edge on the wire, rising or falling,
restarts the counter at 1, so the next sample falls 31 clocks after the edge,
well inside the bit. Without an edge the counter wraps and samples again 48
clocks later. Bit stuffing guarantees an edge at least every six bits, so the
drift between the 48-clock local bit time and the 50-clock real bit time never
accumulates far: after eleven recessive bits at the end of a frame, the last
sample is still inside its bit. The testbench checks bit periods of 47, 48 and
50 clocks.

**Destuffing.** A CAN transmitter inserts one opposite bit after five equal
bits, from the start-of-frame bit to the last CRC bit. The receiver counts the
length of the current run of equal sampled bits. When a run reaches five inside
the stuffed area, the next sampled bit is dropped. The run then restarts with
that dropped bit, as the standard requires. After the CRC no bits are
dropped, since the delimiters, ACK and end-of-frame are not stuffed.

**Where the frame ends.** Every bit that is not dropped is written into a
128-bit register from the top down, starting with the start-of-frame bit. The
frame's shape follows from a few early bits:

| | stuffed area | whole frame |
|---|---|---|
| standard (IDE = 0 at position 13) | 34 + 8·D bits | 44 + 8·D bits |
| extended (IDE = 1) | 54 + 8·D bits | 64 + 8·D bits |

D is the number of data bytes: the DLC capped at 8, or 0 for a remote frame.
The DLC sits at positions 15..18 of a standard frame and 35..38 of an extended
one. A 128-bit register therefore holds the longest frame exactly: extended, 8
data bytes.

**States.** `IDLE` waits for a dominant bit (start of frame). `MSG` collects
bits until the frame length above is reached. `EOM` hands the frame and its
length to the counters with a one-clock `msg_valid`. `IFS` waits for the three
recessive intermission bits, then returns to `IDLE`. The reported length counts
every frame bit up to the last end-of-frame bit, but no stuff bits.

The receiver checks neither the CRC nor the frame form, and it does not detect
error frames. A bus that carries error frames will therefore be measured
wrongly.

## Counting (`load_calc`, `sample_rate_gen`)

The module number is the frame's identifier. That is the 11-bit identifier of a
standard frame, or the full 29-bit identifier of an extended frame. Extended
identifier 5 and standard identifier 5 are thus the same module. A frame adds
its length to the overall counter. If its identifier is below 32, it also adds
to that module's counter. The counters are 21 bits wide: the most a 1 Mbit/s
bus can carry in one second (2^20 bits) fits with room to spare. They saturate
instead of wrapping.

`sample_rate_gen` gives a one-clock tick every `CLK_HZ / SAMPLE_HZ` clocks. Each
clock falls into one of four cases:

| frame done | tick | action |
|---|---|---|
| no | no | nothing |
| no | yes | copy all counters to the freeze registers, clear the counters |
| yes | no | add the frame length |
| yes | yes | add the frame, freeze the sums that include it, clear |

So a frame ending exactly on the tick is counted in the period that just
ended, and no frame is lost or counted twice. `data_ready` pulses one clock
after each freeze. The freeze registers then stay constant for a whole period.

## Serial report (`uart_protocol`, `uart_word_sender`, `uart_tx`)

After each `data_ready` the monitor sends 34 32-bit words. Each word goes most
significant byte first. Each byte is 8N2: one start bit, 8 data bits LSB first,
two stop bits.

| word | content |
|---|---|
| 0 | `0x00100001` (2^20 + 1, a count the bus can never reach, so it marks the start) |
| 1..32 | `{id[7:0], 3'b000, load[20:0]}` for modules 0..31 |
| 33 | `{8'd32, 3'b000, overall[20:0]}` |

A byte takes 11 bit times, so a report lasts 34 × 4 × 11 / 115200 ≈ 13 ms, far
less than the one-second period. `uart_tx` derives its bit time from a counter
of round(CLK_HZ / BAUD) = 434 clocks. A PC program converts the counts to
percentages itself.

## Display path

**Percentages.** The LCD shows `load / 2^20 × 100`. The count is converted to an
IEEE 754 single (`int_to_float`, exact for 21 bits; zero gives +0.0). It is then
divided by `0x4623D70A`, which is 10485.76 = 2^20 / 100, so the quotient is the
load in percent. Two conversions and two divider channels run side by side:
one for the overall load, one for the module selected with `SW[4:0]`.

**Text.** `float_to_string` keeps the top 10 mantissa bits, scales by 100 and
shifts by the exponent. This gives the value in hundredths, always truncated.
It then prints the 7-character field `" hhh,hh"` with a decimal comma and
leading zeros of the integer part blanked. Cutting the mantissa to 10 bits
makes the shown value up to about 0.1 % (relative) lower than the exact value.
A load reported by the PC as 5.72 % can read 5,71 on the LCD. Values of 1000 %
or more show 999,99.

`display_format` builds the two 16-character lines:

```
Overall:   2,68%
Mod  5:    0,24%
```

**Self-test.** With `SW[17]` on, the LCD shows the `selftest` screens instead.
A step counter advances on every sample tick. Steps 0..15 show four screens
for four ticks each: a title, then where to connect the CAN wire, ground and
the UART cable. Steps 16..25 fill every character position with one digit, 0
to 9, one digit per tick. The digit-9 screen then stays.

**LCD refresh (`lcd_ctrl`).** The controller steps through a 38-entry table
without end:

* function set `0x38`
* display on `0x0C`
* clear `0x01`
* entry mode `0x06`
* line-1 address `0x80`, then 16 characters of line 1
* line-2 address `0xC0`, then 16 characters of line 2

After the last character it goes back to the line-1 address, so the four
initialisation commands run only once. Characters are taken from the current
line inputs as they are written, so the display follows new values within one
pass. Each entry drives RS and DATA and raises EN for `LCD_EN_CYCLES` clocks.
It then waits `LCD_CMD_DELAY` clocks (2 ms by default, enough for the
clear command). One pass over the 34 refreshed entries takes about 68 ms.
`LCD_RW` is held low; the data pins are output only.

## The external divider

| port | dir | meaning |
|---|---|---|
| `fdiv_dataa[0]`, `fdiv_dataa[1]` | out | overall and selected-module load as IEEE 754 singles |
| `fdiv_datab` | out | constant `0x4623D70A` |
| `fdiv_result[0]`, `fdiv_result[1]` | in | quotients (load in percent) |

Any single-precision divider with any pipeline depth can be attached. The
operands change only at a freeze (or when the switches change), and the display
path reads the results combinationally and continuously. `tb/fp_div_model.sv`
is a behavioural model with six cycles of latency and round-to-nearest.

## Top-level ports and parameters

Inputs: `CLOCK_50`, `rst_n` (active low, asynchronous), `SW[17:0]`,
`CANbusWire` (CAN RX, dominant = 0), `fdiv_result`. Outputs: `TxDWire`, `LCD_DATA[7:0]`, `LCD_RS`,
`LCD_EN`, `LCD_RW`, `LCD_ON`, `LCD_BLON`, `HEX0..HEX7` (all segments off),
`fdiv_dataa`, `fdiv_datab`.

| parameter | default | meaning |
|---|---|---|
| `CLK_HZ` | 50 000 000 | system clock |
| `SAMPLE_HZ` | 1 | sample periods per second |
| `CLKS_PER_BIT` | 48 | CAN bit time in clocks |
| `SAMPLE_POINT` | 31 | clocks from an edge to the sample |
| `BAUD` | 115 200 | UART rate |
| `LCD_EN_CYCLES` | 16 | LCD enable pulse width |
| `LCD_CMD_DELAY` | 100 000 | clocks between LCD table entries |

The module count (32) and counter width (21) are in `can_mon_pkg`. Changing
`SAMPLE_HZ` changes the period but not the divisor. The percentages then
refer to one second's capacity, 2^20 bits, and would need a matching divisor.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed number of
cycles if it hangs.

* `tb_can_rx` sends random standard, extended, remote and DLC>8 frames. Each
  frame gets a real CRC-15 and bit stuffing, from the generator in
  `tb/can_tb_pkg.sv`. The test also includes a fixed frame with identifier 2 and
  data bytes 1..8. It runs at bit periods of 47, 48 and 50 clocks and checks
  every stored bit and length.
* `tb_load_calc` compares all counters and freeze registers against a model.
  This includes frames on the tick, identifiers ≥ 32 and saturation.
* `tb_int_to_float` and `tb_float_to_string` compare against `real` arithmetic.
* `tb_can_mon_pkg` checks the shared constants and the report word packing.
* `tb_uart_*` decode the line and check bit times.
* `tb_lcd_ctrl` and `tb_selftest` check the table order, enable pulse width,
  entry spacing and the screens.
* `tb_can_bus_monitor` runs the whole design at shortened timing: a 200 000
  clock sample period, 5 Mbaud UART and a fast LCD. It covers seven periods:
  the four evaluation message groups, corner-case frames, a frame ending on the
  tick and the self-test. It checks every report word and the LCD text. It also
  counts each mechanism (standard, extended, stuffed, remote, DLC>8, ID ≥ 32,
  coincident frame, empty period, LCD update, report) and fails if one never
  occurred.
* `tb_can_bus_monitor_full` runs the top with all default parameters for one
  real second (50 million clocks). It sends 20 bursts of eleven extended
  8-byte frames, IDs 0..10, 50 ms apart. It expects 2560 bits per module, 28160
  overall, `Overall:   2,68%` and `Mod  5:    0,24%`. It takes about a minute
  in Verilator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/can_mon_pkg.sv tb/can_tb_pkg.sv tb/tb_can_bus_monitor.sv \
    --top-module tb_can_bus_monitor -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Leave out `tb/can_tb_pkg.sv` for testbenches that do not send CAN frames. Any
simulator with SystemVerilog packages and `--timing`-style delays will do.

## Departures and choices

* **Identifier bit order.** The identifier is read most significant bit first,
  as on a real CAN bus. A frame with ID 2 and data 1..8 then gives the familiar
  `00 21 00 20 40 60 …` bit pattern.
* **Counter width and report word.** The counters are 21 bits, so the report
  word is `{8-bit id, 3 zero bits, 21-bit count}`. The 8-bit id field width
  follows from that.
* **Start word byte order.** The start word goes most significant byte first
  (`00 10 00 01`), like every other word.
* **Zero load.** Zero converts to 0.0. A naive normalising loop would give
  1.0 and show a load on an idle bus.
* **Added reset.** `rst_n` is added.
* **LCD data pins.** The LCD data pins are outputs only.
* **Self-test clocking.** The self-test runs on the system clock, using the
  tick as an enable.
* **LCD table and timing.** The LCD command table beyond the line-1 address,
  the enable width and the entry spacing are this design's choices.
* **Frames not handled.** Remote frames are counted without a data field.
  Error frames, overload frames and CRC errors are not recognised.
* **Module range and selection.** Only identifiers 0..31 have their own
  counter. Raising `NUM_MODULES` in `can_mon_pkg` adds counters (one 21-bit
  register pair each), but the display selector stays 5 switches wide.
* **Seven-segment digits.** The digits are unused and switched off.

## Known tool warnings

Verilator's lint reports several unused signals, all deliberate:

* `SW[16:5]` are unused switches.
* The self-test `finished` flag is unused at the top.
* The low mantissa bits are dropped by the 10-bit text conversion.
* Some shifter bits in `int_to_float` are unused.

Lint also reports that `rst_n` is used both synchronously and asynchronously.
The synchronous use is only the `disable iff` of an assertion in
`uart_word_sender`.
