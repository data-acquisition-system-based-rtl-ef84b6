# FPGA data acquisition and over-level monitor (ADC0809 + 16x2 LCD)

A small FPGA design that turns an analog voltage into a number a person can
read and a light that warns. It drives an ADC0809 converter (8-bit result,
8-channel input multiplexer, 0-5 V range) through its full conversion
handshake, shows every result on a 16x2 character LCD as two hexadecimal
digits, and lights an LED while the result is above `3F` hex, which is about
1.24 V. A supply voltage that rises past 1.24 V therefore reads, say, `42` on
the display with the LED on; at 1.24 V it reads `3F` with the LED off.

The original system was built for a Xilinx XC4010 board, measuring a bench
power supply. This RTL is written in SystemVerilog (IEEE 1800-2017), is
vendor-neutral and synthesizable, and comes with self-checking testbenches
and behavioural models of the converter and the display.

## Signal flow

```
            +---------------+  ch   +-----------+  A,B,C ALE START OE
 scan_en -->| chan_addr_gen |------>| adc_ctrl  |---------------------> ADC0809
 fixed_ch ->|  (counter)    |<--+   | sequencer |<--------------------- EOC, D7..D0
            +---------------+   |   +-----------+
                        advance |      | sample, sample_valid
                                +------+
                                       |---------------> threshold_cmp --> led
                                       |                   (sample > 3F)
                                       v
                                 +-----------+  RS RW E D7..D0
                                 | lcd_ctrl  |-----------------> 16x2 LCD
                                 |  digit_mux -> hex2ascii  |
                                 +-----------+
```

Every block runs on one clock, `clk`. The ADC0809's own CLOCK pin is assumed
to be fed from the same oscillator, so that the converter's timing, which is
counted in its clock periods, can be counted by the FPGA in `clk` cycles.
The default LCD timings assume that clock runs at 500 kHz (2 us per cycle),
the ADC0809's typical clock.

| Module | Role |
|---|---|
| `daq_top` | Top level: wires the blocks below, brings out converter, LCD and LED pins |
| `adc_ctrl` | Runs one ADC0809 conversion after another: address, ALE, START, wait, OE, latch |
| `chan_addr_gen` | Channel address: fixed channel, or a binary counter that scans 0..7 |
| `threshold_cmp` | LED on while the latest result is greater than `3F` |
| `lcd_ctrl` | LCD power-up initialisation and the three writes of each display update |
| `digit_mux` | Picks the high or low nibble of the shown value and converts it to ASCII |
| `hex2ascii` | 4-bit digit to ASCII: `0`-`9` = 30h-39h, `A`-`F` = 41h-46h |
| `daq_pkg` | Threshold, conversion wait, LCD command codes, `digit_sel_t`, `lcd_pins_t` |

## Talking to the ADC0809

This is the part with real timing constraints, and `adc_ctrl` is where they live.
The converter has a latch for the 3-bit channel address, and a
successive-approximation core that works in 8-clock steps, one per result
bit. A conversion is run like this:

| Phase | Pins | Clocks (default) |
|---|---|---|
| IDLE | takes the next channel from `ch` | 1 |
| SETUP | channel address on A,B,C | `SETUP_CLKS` = 1 |
| ALE | ALE high: the address is latched into the converter | `ALE_CLKS` = 1 |
| START | START high: the converter clears on the rising edge and starts on the falling edge | `START_CLKS` = 1 |
| CONV | wait `CONV_CLKS` = 72 clocks after START falls, then until EOC is high | 72 (+ EOC wait) |
| READ | OE high, result driven on D7..D0, sampled on the last OE clock | `OE_CLKS` = 2 |
| DONE | one spare clock | 1 |

Where the 72 comes from: the converter begins a conversion only at the start
of its next 8-clock cycle, so up to 8 clocks pass after START falls. Then 8
bits take 8 clocks each, 64 clocks. So 8 + 64 = 72 clocks is the worst case.
The sequencer waits those 72 clocks. It then also checks EOC (end of
conversion), which the converter drives low soon after START and high again
when the result is ready. A converter that is slower than its clock count
(for example, one clocked more slowly than `clk`) is therefore still read
correctly, only later. EOC is never used on its own. Right after START it may
still be high from the previous conversion, and it takes the converter up to
8 clocks to pull it low.

With EOC already high at the end of the wait:

* `dout_valid` is registered 74 clocks after the clock edge that dropped START
  (72 + 2 OE clocks);
* one conversion takes 79 clocks, about 6.3 k samples/s at 500 kHz.

The spare DONE clock exists because `chan_addr_gen` steps on `dout_valid`.
Without it, IDLE would read the channel counter on the same edge that
updates it, and would convert the old channel a second time.

Two assertions in `adc_ctrl` state the pin rules: ALE and START are never
high together, and OE is never high while ALE or START is.

## Channel selection

The ADC0809 has eight inputs. `chan_addr_gen` supplies the address:

* `scan_en = 0`: the channel on `fixed_ch` is converted, over and over. This
  is the normal use: one monitored voltage on one input.
* `scan_en = 1`: a 3-bit binary counter steps 0, 1, ..., 7, 0, ... once per
  finished conversion, so the eight inputs are sampled in turn.

The LED and the display always reflect the latest result, whatever its
channel. Neither the channel number nor a per-channel history is kept.

## The over-level LED

`threshold_cmp` registers `sample > THRESHOLD` on every `sample_valid`. The
LED changes one clock after each result and holds until the next one.
`THRESHOLD` defaults to `8'h3F`. The test is strictly greater, so a result of
exactly `3F` leaves the LED off. With a 5 V reference one step is
5 V / 256 = 19.5 mV, so `3F` (63) covers 1.23-1.25 V, and `40` is the first
code that lights the LED.

## Driving the LCD

The display is assumed to be an HD44780-compatible 16x2 module on its
8-bit bus. The pins are RS (0 = command register, 1 = data register), R/W
(0 = write), E (enable) and D7..D0. `lcd_ctrl` only writes. R/W stays 0 and
the busy flag is never read, so after every write the controller waits a
fixed time.

**One bus write** (`SETUP -> EHIGH -> HOLD -> EXEC`), following the LCD's
write cycle:

1. RS and D are driven, E low: 1 clock to load them, then `T_AS` clocks of address set-up;
2. E high for `T_PW` clocks; data stays valid the whole time, so the data set-up time before E falls is met;
3. E low, RS and D unchanged, for `T_AH` clocks (hold);
4. wait `T_EXEC` clocks for the LCD to execute, or `T_CLEAR` after the clear command.

At 500 kHz one clock (2 us) is far more than the set-up, pulse-width and
hold minimums of these displays. The defaults are therefore one clock each,
40 us for a command and 1.64 ms for clear.

**Sequence.** After reset, wait `T_POWERUP` clocks (15 ms). Then send `38h`
(8-bit bus, 2 lines), `0Ch` (display on, no cursor), `01h` (clear) and `06h`
(cursor moves right); `ready` then goes high. From then on, each update is:

| Write | RS | D |
|---|---|---|
| cursor to line 1, column 0 | 0 | `80h` |
| high digit | 1 | ASCII of bits 7..4 |
| low digit | 1 | ASCII of bits 3..0 |

The characters come through `digit_mux`, whose select the controller sets
from the step it is on. The mux is fed from a display register that is
loaded once, at the start of the update, so the two digits always belong to
the same result.

**Rates and dropped results.** At the defaults an update takes
2 + 3 x 24 = 74 clocks, and a new result arrives every 79 clocks. Results
that arrive while an update is in progress (and all those during the 15 ms
power-up) overwrite one pending slot. When the controller becomes free, it
shows the newest result and the ones in between are never displayed. The LED
is not affected by this: it sees every result.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `daq_top`, `chan_addr_gen` | `N_CH` | 8 | channels scanned |
| `daq_top`, `adc_ctrl` | `CONV_CLKS` | 72 | clocks waited after START falls |
| `daq_top`, `threshold_cmp` | `THRESHOLD` | `8'h3F` | LED is on above this value |
| `adc_ctrl` | `SETUP_CLKS`, `ALE_CLKS`, `START_CLKS`, `OE_CLKS` | 1, 1, 1, 2 | pulse and set-up lengths |
| `daq_top`, `lcd_ctrl` | `T_POWERUP` | 7500 | LCD power-up wait (15 ms @ 500 kHz) |
| `daq_top`, `lcd_ctrl` | `T_EXEC` | 20 | command execution wait (40 us) |
| `daq_top`, `lcd_ctrl` | `T_CLEAR` | 820 | clear-display wait (1.64 ms) |
| `lcd_ctrl` | `T_AS`, `T_PW`, `T_AH` | 1, 1, 1 | write-cycle set-up, E width, hold |

For a faster clock, scale the LCD waits and, if the ADC gets its own slower
clock, raise `CONV_CLKS`. Because of the EOC check, a `CONV_CLKS` that is too
small costs time, not correctness.

## Top-level ports (`daq_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `scan_en`, `fixed_ch` | in | 1, 3 | channel mode and fixed channel |
| `adc_addr`, `adc_ale`, `adc_start`, `adc_oe` | out | 3,1,1,1 | ADC0809 ADD A-C, ALE, START, OUTPUT ENABLE |
| `adc_eoc`, `adc_data` | in | 1, 8 | ADC0809 EOC and data bus |
| `lcd_rs`, `lcd_rw`, `lcd_e`, `lcd_d` | out | 1,1,1,8 | LCD bus (`lcd_rw` is constant 0) |
| `led` | out | 1 | 1 = LED on |
| `sample`, `sample_valid` | out | 8, 1 | each conversion result with a strobe |
| `lcd_ready`, `lcd_shown`, `lcd_update_done` | out | 1, 8, 1 | LCD initialised; value on the display; update finished |
| `adc_busy`, `lcd_busy` | out | 1, 1 | sequencer / LCD controller active |

The ADC data bus is an input only. On a board it is the converter's
tri-state bus, which the converter drives only while OE is high.

## Simulation

Each block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=N failures=M`. The two models used by the testbenches are:

* `adc0809_model`: latches the address on ALE, drops EOC within 8 clocks
  of START, and starts at the next 8-clock boundary after START falls. It
  converts in 64 clocks, plus an optional `extra_clks` delay to imitate a
  slow converter. Its code is `min(255, mV*256/5000)`.
* `lcd_model`: executes the write instructions into a 16x2 DDRAM. It counts
  timing breaches: set-up, E width, hold, RS/D changing while E is high, a
  write during power-up, a write while the previous instruction is still
  executing, and R/W high.

| Testbench | What it shows |
|---|---|
| `hex2ascii_tb` | all 16 digits against the string `"0123456789ABCDEF"` |
| `digit_mux_tb` | both nibbles of 204 bytes |
| `threshold_cmp_tb` | all 256 values in random order, hold between strobes, reset, the 3F/40 boundary |
| `chan_addr_gen_tb` | scan order and wrap, idle clocks, fixed mode ignoring `advance` |
| `adc_ctrl_tb` | results for random voltages and channels, ALE-before-START, OE only with EOC and after 72 clocks, 74-clock latency, longer waits with a slow converter, stop on `run = 0` |
| `lcd_ctrl_tb` | init commands, write sequence and display content, update latency `2 + 3 x (4 + T_EXEC)`, newest-sample-wins, no timing breaches |
| `daq_top_tb` | whole system at default parameters: voltage steps 1.00/1.30/1.24/1.25/5.00/0 V, a slow converter, an 8-channel scan. It counts conversions, EOC waits, LED on/off, scan wraps, LCD clear and updates, and results replaced while the LCD is busy, and fails if any of them never happens |
| `daq_sweep_tb` | the monitoring use case at default parameters: one input swept 0-5 V in 10 mV steps; every step's display and LED, all 256 codes shown, LED switching on once, at 1.25 V |

Running one with Verilator (5.x), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -Itb -y rtl -y tb rtl/daq_pkg.sv tb/daq_top_tb.sv \
  --top-module daq_top_tb -o sim
./obj_dir/sim
```

Replace `daq_top_tb` with any other testbench name. `daq_top_tb` needs about
12,000 clock cycles and finishes in well under a second. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/daq_pkg.sv rtl/<module>.sv`.

## How far to trust it, and what is this design's own

The following come from the system description, and the RTL implements them
as given:

* the ADC0809 pin sequence: address on A,B,C, an ALE pulse, a START pulse,
  EOC marking the end, OE to read;
* the 72-clock conversion wait;
* the split of the result into high and low nibbles, fed through a
  multiplexer and a hex-to-ASCII conversion to the LCD;
* the LCD pin set and the order of its write cycle;
* the LED lit above `3F` hex;
* a binary counter as a scanning channel address generator.

These are this design's own choices, made where the description gives no
detail:

* the clock frequency (500 kHz) and the shared ADC clock;
* all pulse widths and LCD timing values;
* the HD44780 command set and init order;
* the display position (line 1, columns 1-2) and upper-case hex letters;
* fixed waits instead of reading the LCD busy flag;
* newest-result-wins on the display;
* free-running conversion, and the fixed-channel mode;
* strict `>` for the LED, and a synchronous active-high reset.

The description also outlines a general data acquisition chain: amplifier,
signal conditioner, sample-and-hold, and a programmable per-channel register
that tunes the conditioner. None of this exists in this system, where the
voltage goes straight to the ADC0809, so none of it is built. The converter
chip, the LCD module, the LED, the FPGA board and its configuration PROM are
external parts. They appear here only as top-level pins, and the first two
also as simulation models.

Everything is verified in simulation against these models, not on hardware.
The timing checks in `lcd_model` use the limits set by its parameters, not a
particular display's datasheet. Before running on a real board, compare
`T_*` with the datasheet of the display used.
