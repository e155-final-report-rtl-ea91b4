# LED fan: FPGA driver for a persistence-of-vision display

A persistence-of-vision fan draws a picture in the air with a single row of
LEDs on a spinning blade. If the LEDs show column 0 of an image, then column 1
a moment later when the blade has turned a little, and so on, the eye fuses the
columns into a still picture. The picture stands still only if column 0 always
appears at the same angle. The timing must also be steady enough that the
columns land evenly around the circle.

This RTL is the FPGA half of such a fan. The blade carries 10 SK6812 RGB LEDs
on one data wire. A microcontroller (not part of this RTL) runs the motor and
watches a Hall-effect sensor that fires once per revolution. It drives two
pins into the FPGA:

* **load**: a 100 us pulse every ~800-865 us, tuned by hand to the rotation
  speed (about 670 RPM). Each load tells the FPGA to send the next column.
* **reset**: a 100 us pulse when the Hall sensor sees the magnet, meaning the
  blade is at the top. It makes the next load start again from column 0, which
  keeps the picture from drifting.

The FPGA holds a 100-column by 10-row image. On each load it sends the 10
pixels of the current column down the wire in the SK6812 format, and then
waits. The loop is open: the FPGA does not know the speed. A motor that runs
faster than expected sends more loads than there are columns. The image then
wraps to column 0 and repeats its first columns until the next reset. A motor
that runs slower leaves the last columns undrawn.

## The SK6812 line code

The strip uses one wire and no clock. Each bit is a high pulse followed by a
low gap, about 1.2 us in all. The length of the high pulse carries the value:

| bit | high    | low     |
|-----|---------|---------|
| 0   | 0.3 us  | 0.9 us  |
| 1   | 0.6 us  | 0.6 us  |

Each timing has a tolerance of ±0.15 us. A low time of at least 80 us is the
reset (latch) code. Each LED keeps the first 24 bits it receives after a latch
and passes the remaining bits down the chain. On the latch, every LED shows
what it kept. A pixel is sent as green, red, blue, 8 bits each, most
significant bit first.

Both codes are whole multiples of 0.3 us, so the design splits every bit into
**four 0.3 us slots**. A 0 is sent as the slot pattern `1000` and a 1 as
`1100`. The transmitter only has to choose one of two 4-bit patterns and step
through its slots. This idea is the core of the design.

## Timing from a phase accumulator

The clock is assumed to be 40 MHz, so a slot is 12 clocks. `slot_timer` makes
the slot strobe with a 32-bit phase accumulator rather than a divide-by-12
counter. Each clock it adds `INC = 32'h1555_5555` (2^32/12), and the carry out
is the strobe. To change the clock frequency, change only `INC`:
`INC = 2^32 * 0.3 us * f_clk`. A non-integer ratio is then spread evenly.

At 40 MHz, `12*INC` is 4 short of 2^32. The first slot after a clear therefore
lasts 13 clocks, and afterwards one slot in about 89 million lasts 13 clocks
instead of 12. That is 25 ns, well inside the ±150 ns tolerance.

Timing at the defaults:

| item                          | clocks | time    |
|-------------------------------|--------|---------|
| slot                          | 12     | 0.3 us  |
| bit (4 slots)                 | 48     | 1.2 us  |
| pixel (24 bits)               | 1152   | 28.8 us |
| column (10 pixels)            | 11520  | 288 us  |
| column + latch gap (minimum)  | 14720  | 368 us  |

So load must not come more often than about every 370 us. The microcontroller
sends one every 800-865 us.

## Blocks

```
 reset ─► input_sync ─► rst ──────────────┬──────────────┬────────────┐
 load  ─► input_sync ─► load_pulse ─►┌────┴─────────────┐│            │
                                     │ column_controller ├┘ addr       │
                      ┌──────────────┤  wait/fetch/send/ ├──────┐      │
                      │ word_ready,  │  drain FSM        │      ▼      │
                      │ busy         └──────┬────────────┘  pixel_rom x3 (R,G,B)
                      │                     │ word_valid        │ 8+8+8
                      │             ┌───────▼─────────┐  grb_t  │
  slot_timer ─ slot_tick ──────────►│    sk6812_tx    │◄────────┘
  (phase accumulator)               │ shift reg + slot│──► wave_out
                                    └─────────────────┘
```

* **`led_fan_top`**: wires the blocks together. Ports: `clk`, `reset`, `load`
  and `wave_out`. Parameters: `NUM_LEDS` (10), `NUM_COLS` (100) and the three
  image file names.
* **`input_sync`**: synchronises `load` and `reset` with two flip-flops and
  turns load's rising edge into a one-clock pulse. A 100 us load pulse
  therefore sends exactly one column. The synchronised reset acts as a
  synchronous reset for everything else.
* **`pixel_rom`** (three instances): one 1000 x 8-bit colour plane with a
  synchronous read (one clock of latency). Pixels are stored column by column,
  so address `col*10 + row` holds a pixel and addresses 0-9 are the first
  column. Row `i` goes to LED `i`, the first LED on the data wire.
* **`column_controller`**: the sequencer. It waits for a load, then hands 10
  pixels to the transmitter one at a time. The pixel address advances after
  each pixel is accepted. The one-clock `FETCH` state between pixels gives the
  ROMs their read cycle. Once the last pixel has left the transmitter it goes
  back to waiting, and the idle low line becomes the strip's latch code. The
  address carries over to the next load and wraps from pixel 999 to 0. Reset
  sets it to 0. Loads that arrive during a column are ignored.
* **`sk6812_tx`**: the serialiser. It has a 24-bit shift register, a 5-bit bit
  counter and a 2-bit slot counter. The current bit selects `1000` or `1100`,
  and the slot counter picks the slot, most significant first. The output is
  registered.

### The handshake between controller and transmitter

Pixels go from the controller to the transmitter on a valid/ready handshake.
The transmitter raises `word_ready` only on a slot strobe, and only when it is
idle or in the last slot of its last bit. A pixel that is waiting is therefore
taken exactly when the previous one ends, so pixels follow each other with no
gap. The controller raises `word_valid` only when the ROM output belongs to the
current address.

This handshake is what keeps each LED's colour tied to its own address. The
obvious way to build this driver uses a free-running bit counter that reloads
the shift register every 24 bits while a separate counter steps the ROM
address. If those two get out of step by one clock around the load edge, every
column is shifted by one LED. Here the address changes only when a pixel is
actually accepted, and the ROM data for the new address is ready two clocks later,
long before the transmitter asks for the next pixel.

## Image contents

The colour planes are loaded at configuration time from `rtl/img_red.hex`,
`rtl/img_grn.hex` and `rtl/img_blu.hex`. Each file holds 1000 lines of one hex
byte, in the column-major order above. The default image is the text
"FLIP-FLOP":

* 5x7 glyphs, each followed by one blank column, centred across the 100
  columns, on rows 1-7.
* One colour per letter, in order: red, orange, yellow, green, white, cyan,
  blue, violet, magenta.
* On row 9 (the last LED) a dim test stripe: `(R, G, B) = (c mod 32, 7c mod 64, (99-c) mod 32)` for column `c`.

To show another picture, write three files of this form, or pass other file
names through the top's `*_FILE` parameters.

## What is assumed and where this departs from the original design

* **Clock 40 MHz.** The original increments a 32-bit accumulator by
  2^32/12 per clock for a 0.3 us strobe, which fixes the clock at 40 MHz.
* **One accumulator, not two.** The original runs a second accumulator for
  the 1.2 us bit strobe. Here the bit is four slot strobes, so bit and slot
  cannot drift apart.
* **Reset waits for load.** The original lets the line start sending as soon
  as reset ends. Here reset only rewinds the address, and the next load sends
  column 0. The microcontroller always sends a load after a reset, so the
  displayed image is the same.
* **Wrap at 999.** The original's address compare lets the address reach
  1000, one past the end of a 1000-entry memory. Here it wraps at 999.
* **LED alignment.** The original build was known to repeat the first LED's
  value across a column and lose the last LED. The cause was the address
  stepping out of step with the shift register around the load edge. This
  design removes that failure with the handshake above. The end-to-end test
  checks every LED of every column.
* **No enforced latch time.** The design does not hold the line low for 80 us
  after a column. It relies on the load spacing, as the original does.
* **Power-up.** Nothing is defined before the first reset pulse. The
  microcontroller sends one at start-up.

Not in this RTL: the microcontroller firmware (load/reset pulses, RPM
measurement), its PWM and timer peripherals, the motor driver, the Hall sensor
and its amplifier, and the LED chips themselves. `tb/sk6812_strip_model.sv` is
a behavioural model of the LED chain, used only for testing.

## Verification

Each block has a self-checking testbench. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_slot_timer`        | every strobe against `floor(n*INC/2^32)` computed in 64 bits; 12-clock spacing; 13 clocks to the first strobe; restart on clear |
| `tb_pixel_rom`         | every address of all three planes, in order and shuffled, against the files read by the testbench; one clock of latency; output holds |
| `tb_sk6812_tx`         | 960 bits of random pixels decoded from high times (12 clocks = 0, 24 = 1); 48-clock bit period; back-to-back pixels exactly 1152 clocks apart; idle line low; reset silences the line |
| `tb_column_controller` | 102 columns plus resets, with a transmitter model: 10 consecutive addresses per load, wrap 999→0 exactly once, address stable before each pixel is taken, stray loads ignored, reset back to pixel 0, also in mid-column |
| `tb_led_fan_top`       | whole design at its default size; see below |

`tb_led_fan_top` plays the microcontroller's pin sequence: a 100 us reset,
2 ms of idle, then load pulses of 100 us every 865 us, and reset pulses for
two "revolutions". The `sk6812_strip_model` on `wave_out` decodes the line
against the datasheet tolerances and latches on 80 us of low. The test runs
121 columns and checks:

* each column is latched exactly once, with 240 bits;
* every LED shows the expected pixel;
* no timing violations occur;
* the first and last bit of each column are 239 x 48 clocks apart (the 1.2 us
  bit rate).

It also counts the full-image wrap, the revolution resets and a stray load
during a column, and fails if any of them never happened. It simulates about
100 ms of fan time in a few seconds.

`tb_led_fan_rpm` runs the fan at its operating point. A load comes every
800 us. A model of the rotor angle holds the Hall input low for 850 us once per
revolution. That is longer than one 800 us poll of the firmware loop and
shorter than a poll plus its reset, so each mark is seen exactly once. The
test plays three speeds:

| speed   | loads per revolution | effect |
|---------|----------------------|--------|
| 670 RPM | 112 | the image wraps and repeats its first 12 columns |
| 600 RPM | 125 | the image wraps and repeats more columns |
| 760 RPM | 98  | the last columns are never shown |

After every load it checks that the latched column is the load count since the
last reset, modulo 100. It also checks that the number of loads in each
revolution matches the rotation period. This is the open-loop behaviour
described at the top, shown cycle by cycle. It simulates about 300 ms of fan
time in under 10 seconds.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/` (the image files are opened by the relative path `rtl/img_*.hex`):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_led_fan_top \
    -y rtl -y tb rtl/ledfan_pkg.sv tb/tb_led_fan_top.sv
./obj_dir/Vtb_led_fan_top
```

Replace `tb_led_fan_top` with any other testbench name. The RTL also passes
`verilator --lint-only -Wall`. The remaining warnings are unused package
constants and deliberately unconnected status outputs.

## Changing the design

* **Another strip length or image width:** set `NUM_LEDS` and `NUM_COLS` on
  `led_fan_top` and supply image files of `NUM_LEDS*NUM_COLS` lines. The
  address width follows automatically.
* **Another clock:** change `SLOT_INC` in `ledfan_pkg`.
* **Another LED type with a different bit code:** change `CODE0`/`CODE1` in
  `ledfan_pkg`. The codes are four slots long; a code of another length also
  needs a wider slot counter in `sk6812_tx`.
