# LAMPF accelerator control system: digital hardware in SystemVerilog

A linear accelerator built as 55 modules (four injectors, a buncher, four
low-frequency and 45 high-frequency modules, and a sector unit) is run from one
small computer. Every module has one control point. The computer does not wire
to thousands of signals. It talks to one **Computer Interface Unit (CIU)**,
which reaches each module over four serial lines. At the module a
**Remote Information and Control Equipment (RICE)** carries out what the
frames ask for:

- it digitises an analog signal;
- it reads ten binary status bits;
- it drives relays until they report the requested state;
- it steps a pulse motor;
- it switches an oscilloscope signal onto a video cable.

The key idea is **parallelism at the modules**. One request can go to one
module, to a group (injectors, low-frequency or high-frequency section) or to
all 55 at once. Every selected module converts at the same instant, at a time
set relative to the accelerator pulse. All their words then come back
simultaneously into a 55-word buffer, which the computer empties with a block
transfer. A scan of ten status bits from every module takes about 180 µs.

Beside this chain the design holds the other digital parts around the
computer:

- the console's request buffers;
- a watchdog timer for the executive program;
- a hard-wired fast shutdown chain that inhibits the injector without the computer;
- the controller of the refreshed vector/character display scope with its light pen.

This repository contains the RTL for all of these, testbenches for each, and
one end-to-end test of the whole system at full size.

## Clocking and time scales

Everything runs from one clock. The default is 4 MHz, chosen so that the
computer's 1.75 µs memory cycle is exactly 7 clocks. Every other time is a
parameter in clocks:

| quantity | default | real time |
|---|---|---|
| computer cycle, serial bit time (`CYC_DIV`) | 7 clocks | 1.75 µs |
| watchdog tick (`WDT_DIV`) | 200 clocks | 20 kHz |
| A/D sample / per decision (`ADC_SAMPLE_CLKS`, `ADC_BIT_CLKS`) | 80 / 40 | 20 µs / 10 µs, 130 µs per conversion |
| display item (`ITEM_CLKS`) | 112 | 28 µs |
| display refresh (`FRAME_CLKS`) | 66 667 | 60 frames/s |
| pulse-motor period / width (`PULSE_PERIOD`, `PULSE_WIDTH`) | 4000 / 400 | 1 kHz, 100 µs |
| video relay break-before-make (`BBM_CLKS`) | 4000 | 1 ms |
| console Up/Down repeat (`REPEAT_CLKS`) | 400 000 | 10 per second |

If you change the clock, rescale these parameters. The serial lines are
resynchronised at the RICE, so the RICE could run from a clock of its own.

## The request: two words from the computer

The computer writes two 16-bit words to the CIU. Writing word 1 starts the
request. While `req_busy` is high, further writes are ignored. `req_done`
pulses when the request ends.

```
word 0:  [15:13] op   [12:7] module field   [6:1] channel   [0] sync
word 1:  CMD, VDO: [11:10] flags  [9:0] argument
         DTK:      delay in computer cycles after the master pulse (used when sync = 1)
```

| op | name | what happens |
|---|---|---|
| 0 | NOP | nothing (`req_done` at once) |
| 1 | CMD | instruction frame; busy flags of the selected modules are set |
| 2 | DTK | instruction frame (address the channel), then a convert frame: at once, or when the Cycle Clock reaches word 1 after the next master pulse |
| 3 | VDO | instruction frame; flags[0] picks the cable (0 upper, 1 lower), channel = signal number |
| 4 | COLLECT | collect frame; every selected module shifts its data word back |

Module field values:

- 0–54: one module. The numbering is injectors 0–3, buncher 4, LF 5–8, HF 9–53 and the sector unit 54.
- 55: all injectors.
- 56: the low-frequency section.
- 57: the high-frequency section.
- 63: all modules.

## The serial link (CIU → RICE)

There are four lines per module:

- `sd`: data, CIU to RICE;
- `sc`: timing, CIU to RICE;
- `rd`: return data, RICE to CIU;
- `cbusy`: command busy, RICE to CIU.

One bit takes one computer cycle (7 clocks). The timing line is high for the
first 3 clocks of each bit, and the data is stable for the whole bit. The RICE
takes the data bit on the rising edge of `sc`.

```
frame type (2 bits)  01 instruction   10 convert   11 collect
instruction: 01 | fn[1:0] chan[5:0] flags[1:0] arg[9:0] | odd parity   (23 bits, 40 µs)
convert:     10                                                          (2 bits)
collect:     11, then 13 return bits on rd, MSB first                    (15 bits)
return word: valid | parity error | sign | value[9:0]
```

In a collect, the CIU keeps pulsing `sc` for 13 more bits. The RICE puts each
return bit on `rd` at the rising edge of `sc`. The CIU samples `rd` at the end
of the bit period, so the round trip has most of a bit time to settle.

A frame with a bad parity bit is dropped. The RICE then sets a parity-error
flag, which also travels in the next returned word. If `sc` stays idle for 64
clocks, the RICE receiver goes back to waiting for a frame header.

## The CIU (`ciu`)

The CIU has four parts.

- **`word_assembler`** decodes the two words and builds the frame. It gates
  the frame onto `sd`/`sc` of every selected module at once. For a
  synchronised DTK it waits for the master pulse, then for the Cycle Clock to
  reach the delay, and then sends the convert frame. The convert instant is
  therefore the same at every selected module, within one clock.
- **`ciu_data_buffer`** gives each module its own 13-bit shift register, and
  all of them shift on the same strobe. After the last bit, the words of the
  selected modules are written into the 55-word memory at their module's
  address. Words of unselected modules keep their old contents.
  - `btc_start` unloads the memory, word 0 first, one word per computer cycle.
    `btc_valid` marks each word and `btc_done` follows the last.
  - A `btc_start` that arrives during a fill is held until the fill ends.
  - Buffer word: `{valid, parity error, 000, sign, value[9:0]}`.
- **`command_busy_register`** sets a flag per module when a CMD is issued to
  it. The flag clears once that module's `cbusy` line has been seen high and
  then low again. Each clear sets a `cmd_done` bit and raises `cmd_irq`, which
  stays up until `cmd_irq_ack`. A completion in the same clock as the
  acknowledge is not lost.
- **`cycle_clock`** is a 16-bit count of computer cycles since the last master
  pulse. It saturates rather than wraps. One 120 Hz pulse period is about
  4760 counts.

## The module station (`module_station` = `rice` + `rice_io` + `vcu`)

### RICE

The RICE is a synchronous machine driven only by frames. Its parts:

- a receiver and function detector;
- an address register with a channel decoder;
- an instruction register;
- a binary comparator;
- a pulse generator and counter;
- a data register;
- a VDO output to the video unit.

The channel map (in `lampf_pkg`) is:

| channels | kind | index |
|---|---|---|
| 1–32 | analog inputs | 0–31 |
| 33–43 | binary input channels (10 bits each) | 0–10 |
| 44–46 | binary output channels (10 bits, latched) | 0–2 |
| 47–61 | pulse-motor outputs | 0–14 |

- **DTK** stores the channel address. The following **convert** frame samples it:
  - analog channels start the A/D converter;
  - binary channels copy ten bits into the data register at once;
  - for a binary output channel, the device feedback is read back.
- **CMD to a binary output** loads the channel's ten latches and raises its
  `bout_active` line. The comparator waits 4 clocks, then watches the device
  feedback. When the feedback equals the requested bits, the command is
  released.
- **CMD to a pulse output** loads the argument into the pulse counter.
  Pulses go out on the clockwise line (flags[0] = 1) or the counter-clockwise
  line (flags[0] = 0) until the count runs out.
- **VDO** passes the cable and signal number to the VCU.

`cbusy` is high while a binary or pulse command runs. A new CMD replaces the
running one; this is how a priority command overrides a busy unit.

### RICE I/O (`rice_io`) and A/D converter (`sar_adc`)

The RICE I/O chassis provides:

- 32 analog inputs;
- 11 binary input channels;
- 3 binary output channels with their latches;
- 15 pulse outputs (clockwise and counter-clockwise lines).

Binary inputs and device feedback pass through two-flop synchronisers.

The A/D converter is a successive-approximation controller. It holds the
sample/hold in sample mode for 20 µs. It then decides the sign from the
comparator with the DAC at zero, and then the ten magnitude bits, MSB first,
10 µs each. The result is 10 bits plus sign, 130 µs in all. The multiplexer,
sample/hold, DAC and comparator are analog and are outside the RTL: the ports
`amux_sel`, `sampling`, `dac_sign`, `dac_mag` and `cmp` reach them.

### Video Control Unit (`vcu`)

Each module has two cables back to the console's dual-beam oscilloscope:
cable 0 feeds the upper trace and cable 1 the lower. A VDO request opens every
relay of the addressed cable. After 1 ms the relay of signal `n` (1–16)
closes. Signal 0 leaves the cable open.

## Around the computer

- **`console_interface`**: a rising button loads two 16-bit buffers and raises
  an interrupt.
  - Buffer 0 is `{button number, module BCD}` and buffer 1 is
    `{channel BCD, value BCD}`.
  - The thumbwheels come from the set that belongs to the button's panel
    group: button / 8.
  - Buttons 8 and 9 (Up and Down) repeat every 100 ms while held. With the
    computer adding 0.1 % per request, a tap gives 0.1 % and holding gives
    1 % per second.
  - A press while the buffers are still unread is dropped and sets `overrun`.
- **`watchdog_timer`**: a 16-bit down-counter at 20 kHz, reloaded by the
  executive, normally with 20 000 (one second). When it reaches zero it
  interrupts.
- **`fast_shutdown`**: `inj_inhibit` is a combinational OR of the module fault
  lines, so the injector is stopped without waiting for a clock.
  - The inhibit is latched, and each faulting module is recorded.
  - A priority interrupt goes to the computer.
  - Only a reset request while no fault is present re-enables the injector.
- **`display_controller`** keeps its own 512 × 24-bit display list and
  redraws it 60 times a second. The computer only rewrites the words that
  change. The scan goes from word 0 to an END word.

  Display word layout:

  ```
  [23:21] 0 END   1 POS: [19:10] x, [9:0] y
                  2 CHAR: [20] bright [19] big [18] pen-visible [5:0] code (ASCII-0x20)
                  3 VEC:  [20] bright [18] pen-visible [17:9] dx [8:0] dy (signed)
  ```

  - Characters and vectors take 28 µs each, including the fetch.
  - For a character, the 5×7 dots (`char_rom`) are stepped column by column,
    with `unblank` where the glyph has a dot. Big characters double the dot
    pitch.
  - The vector generator is analog and outside the RTL. It gets `vec_start`,
    the start point and the displacement.
  - When the light pen fires during an unblanked, pen-visible item, that
    item's address is latched in `pen_addr` and `pen_irq` is raised.

## Top level (`lampf_control`)

The top instantiates the CIU, 55 module stations, the watchdog with its 20 kHz
divider, the console interface, the fast shutdown chain and the display
controller. Everything outside the digital hardware is a port:

- the computer's I/O bus and interrupts;
- the module equipment through the MIU: analog front end, binary inputs,
  output latches and feedback, motor lines, relay coils;
- the fault lines;
- the light pen;
- the scope's deflection and unblank signals.

With the defaults, synthesis gives about 27 k cells and 32 k flip-flop bits.

## What is not here

These are outside the design, and their signals are ports:

- the computer and its core memory;
- its block transfer channel;
- the disk, teletypes, printer and paper tape;
- the timing options and power-fail logic;
- the analog half of the A/D converter;
- the MIU's signal conditioning and drivers;
- the analog vector generator;
- the CRT and oscilloscope;
- the master pulser;
- the fast RF amplitude/phase loops.

The console's output side is not built either: the Module Status indicator
lamps and the operator-error light. They are plain registers written by the
computer. Blinking text on the display is left to the computer, which can
rewrite the item.

## Choices this design makes

The original system description gives the architecture: the units, what they
do, their capacities and timing. It does not give the encodings or the
circuits. The following are this design's own:

- the 4 MHz clock;
- the request-word and frame layouts, odd parity, and the frame type codes;
- the group codes and the channel map;
- the rule that a bad-parity frame is dropped;
- the return-word and buffer-word layouts;
- one bit per computer cycle on the link;
- the synchronised-DTK mechanism: master pulse, then a Cycle Clock compare;
- the comparator settle delay, the pulse rate and width;
- the idle resync of the receiver;
- 16 video signals per module and break-before-make;
- the console word layout, the button grouping, hardware auto-repeat and overrun;
- the display-word layout, the POS and END words, and the glyph shapes;
- latching of the fast shutdown and its reset rule;
- saturation of the Cycle Clock.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. Build one with plain Verilator (the testbenches pass integers to
narrower task arguments, so width warnings are expected and not fatal):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/lampf_pkg.sv tb/tb_rice.sv \
          --top-module tb_rice -o sim && obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_cycle_clock` | reset by master pulse, counting per cycle, saturation |
| `tb_watchdog_timer` | 20 000 load, interrupt at zero, reload in time |
| `tb_fast_shutdown` | combinational inhibit, latch, record, refused/accepted reset |
| `tb_command_busy_register` | set on issue, clear on busy fall, interrupt and acknowledge races |
| `tb_word_assembler` | frames for every request, parity, groups, sync delay, collect strobes |
| `tb_ciu_data_buffer` | parallel shift-in, selective writes, unload at one word per cycle |
| `tb_ciu` | the whole CIU against 55 behavioural remotes; 55-module binary scan under 250 µs |
| `tb_sar_adc` | conversions against an ideal front end, 130 µs timing |
| `tb_rice_io` | synchronisers, latches, active lines, pulse routing, A/D path |
| `tb_rice` | every function, parity errors, hold and release, pulse counts, return word |
| `tb_vcu` | break-before-make, one-hot relays, both cables |
| `tb_console_interface` | buffer words, overrun, tap versus held Up button |
| `tb_display_controller` | item timing (28 µs), glyph dots, vectors, END, light pen |
| `tb_lampf_control` | the full system at default parameters: see below |

`tb_lampf_control` runs the whole design at its default size and speed. It
instantiates 55 behavioural analog front ends (`tb/adc_frontend_model.sv`),
device models that follow the binary outputs, and a light pen. It counts
16 mechanisms and fails if any never happened:

- an analog take from all modules, with values checked;
- a high-frequency-group take that leaves other words alone;
- a delayed take sampled 175 µs after the master pulse (it sees a value
  that changed after the pulse);
- a 55-module binary scan under 250 µs;
- binary command hold, release, completion interrupt and readback;
- clockwise and counter-clockwise pulse counts;
- video relay switching;
- a watchdog timeout and a fast shutdown;
- a console press and a held Up button;
- display refresh over several frames, and a light-pen hit on a vector.

It simulates about 1.4 million clocks (350 ms of system time) in well under a
minute.
