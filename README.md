# Correction-coil function generator

Each dipole correction coil of a superconducting synchrotron needs its own
current program. The program has two parts. One part follows the main
dipole current `i`. The other follows the time `t` within the machine cycle.
This module produces that program as a 12-bit DAC word, updated every
millisecond:

    v_c(i, t) = i * ( g(i) + f(t) )

`g` and `f` are piecewise-linear curves that the host computer loads into the
module. Because the result is multiplied by the measured current, the output
scales with the main field on its own. The curves can stay simple, and a
time-dependent correction (for injection or extraction) grows with beam
energy to first order.

The RTL describes a whole card: the crate (Camac) slave interface, a
128-word buffer memory shared by host and engine, the arbitration between
them, the parameter RAM, the real-time engine, the DAC output port,
power-supply control and status, reset and front-panel LEDs. The original
card runs a program on an 8-bit microprocessor to do the arithmetic. Here a
state machine (`fg_engine`) does the same work. The analog parts (DAC, ADC,
multiplexer) and the decoder of the serial machine-clock signal are not part
of the RTL; their digital signals are ports of `fg_top`.

## The curves

Both curves are tables of up to 32 end points, which makes 31 linear segments.

* **g(i)** is given as 32 breakpoints `i_k` (12-bit) and 32 values `g_k`
  (15-bit). The breakpoints must rise. The table ends at the first breakpoint
  that is not above the one before it. Below the first breakpoint and above
  the last, g holds the end value. There are two g sets: one for injection,
  acceleration and flattop, one for extraction. The DOUBLE VALUE event
  switches between them.
* **f(t)** is given as 32 values `f_k` (15-bit) and 31 segment lengths
  `dt_k` in milliseconds (16-bit, so up to 65.5 s per segment and about
  34 minutes per cycle). The curve starts at `t = 0`, so no first time is
  needed. The table ends at the first `dt_k = 0` or after 31 segments. Bit 15
  of an `f_k` word is a *stop bit*: when f reaches that end point, it stops
  there.

Within a segment the engine interpolates:
`y = y_k + (y_{k+1} - y_k) * x / dx`. The division truncates toward `y_k`.

## Output scaling: why 15-bit values for a 12-bit DAC

`g + f` is a 15-bit sum. It is clamped at 32767 if the addition overflows.
Multiplied by the 12-bit `i`, it gives a 27-bit product. Normally the top 12
bits, `product[26:15]`, go to the DAC.

At injection, `i` is only about 1/8 of full scale, a 9-bit number. The top
three product bits are then always zero, so the DAC could use only 1/8 of its
range. Header bit 3 (`skip3`) selects `product[23:12]` instead. This gives
full DAC range at injection. The cost is that at higher currents the tables
must keep the top three product bits zero. If they do not, the DAC word wraps.
The engine does not clamp it. Instead it sets the overflow flag (status bit
13) for that millisecond.

## Host interface

A dataway command is one clock with station `N` and strobe `S1` high. `Q`,
`X` and the read lines `R` are valid from the next clock. All commands use
subaddress 0.

| F  | action |
|----|--------|
| 20 | load the buffer address pointer from W[6:0] |
| 16 | write W to the buffer word at the pointer; the pointer advances |
| 0  | read the buffer word at the pointer; the pointer advances |
| 1  | read the status word |
| 17 | power supply: W[0] = on, W[1] = reset pulse (PSR_CYCLES clocks) |
| 26 / 24 | enable / disable the ramp (while disabled the DAC word is 0) |

So a block transfer needs one F(20) and then a run of F(16) or F(0). The
host never talks to the engine directly. It fills the buffer, and events from
the machine clock tell the engine when to use it.

Status word: bits 9:0 are the ten power-supply status lines, passed through
a two-flop synchroniser. Bit 10 is ramp enable, 11 supply on, 12 f running,
13 DAC overflow, 14 buffer held by the engine, and 15 the heartbeat.

### Buffer layout (16-bit words)

| words   | contents |
|---------|----------|
| 0       | header: bit0 g set to load, bit1 load g, bit2 load f, bit3 skip3 |
| 1-32    | g breakpoints `i_0..i_31` |
| 33-64   | g values `g_0..g_31` |
| 65-95   | f segment lengths `dt_0..dt_30` (ms) |
| 96-127  | f values `f_0..f_31`, bit 15 = stop bit |

A full g set plus a full f table fills the 128 words exactly. The second g
set is loaded by a second NEW whose header selects set 1 and leaves f alone.
READ writes g, f, v_c, i and the two ADC readings (channel 0: the module's
analog output, channel 1: the supply's current signal) into words 0-5. Those
words overwrite the start of any table that is still staged there.

### Buffer arbitration

The engine side of the buffer is byte-wide (256 bytes; byte 2k is the low
half of word k). Ownership goes to whoever asks first:

* A Camac access holds the buffer only for the clock of its strobe.
* The engine holds it through a control flip-flop. It sets the flip-flop,
  reads it back on the next clock and, if the set failed, tries again. It
  clears the flip-flop when it is done.
* A Camac buffer access while the flip-flop is set is ignored and answered
  with no-Q (`Q = 0`, `X = 1`). The pointer does not advance, so the host
  retries the same word.
* A set attempt in the same clock as a Camac access fails.

Assertions in `buffer_arbiter` and `buffer_memory` check that the two sides
never use the buffer in the same clock.

## Events and operating modes

`tick_1khz` is the real-time interrupt. On every tick the engine:

1. advances f by one millisecond, if f is running;
2. samples `i` and looks it up among the active g breakpoints;
3. interpolates f and g;
4. computes v_c and writes it to the DAC port, low byte first, then the high
   nibble. The DAC word changes only on the second write.

Six further events arrive on `tevent`, one strobe each. They pass through a
maskable, prioritised latch (`interrupt_ctrl`, Z-80 mode-2 style vectors
`0x40 + 2*n`). The engine serves them one at a time, between ticks:

| n | event | effect |
|---|-------|--------|
| 0 | STOP | freeze f at its present value; g and v_c keep being computed |
| 1 | CONTINUE | resume f where it stopped (only after STOP) |
| 2 | NEW | copy the parameters named in the header from buffer to RAM; a new f table is set to `f_0` and waits |
| 3 | START | run f from `t = 0` |
| 4 | READ | convert both ADC channels and write results to buffer words 0-5 |
| 5 | DOUBLE VALUE | switch to the other g set |

*Pulsed operation* (ramped cycles): the host may load the buffer at any time.
NEW is sent after extraction, and START before the next injection. A stop
bit can hold f at a chosen value without any event. *Storage operation*
(stored beam): STOP holds all generators. READ lets the host fetch the
present g and f and compute tables without a step. Then come NEW and START.

## Engine timing

The engine runs on the module clock (6 MHz in the original). Memory reads
take one clock, and the engine uses the data in the next state. Clock counts:

* **Tick:** about 15 clocks for the f bookkeeping, 3 per g breakpoint passed
  in the search (at most 31), up to two interpolations of 33 clocks each,
  and 3 for the output. That is under 200 clocks out of the 6000 in a
  millisecond.
* **NEW:** about 390 clocks (three per buffer word).
* **READ:** two ADC conversions plus 12 byte writes.

A tick that arrives during an event is held and served next. Two ticks that
arrive before the first is served count as one. `lin_interp`
gives its result 32 clocks after its start edge.

## Files

| module | role |
|--------|------|
| `fg_top` | the card; instantiates everything below |
| `fg_pkg` | sizes, buffer and RAM layout, event numbers, Camac codes |
| `camac_interface` | dataway decode, Q/X, R mux, ramp-enable flip-flop |
| `camac_address` | auto-incrementing 7-bit buffer pointer |
| `buffer_arbiter` | first-come first-served ownership |
| `buffer_memory` | 128 x 16 / 256 x 8 dual-view memory |
| `param_ram` | 1 kbyte (512 x 16) parameter RAM |
| `interrupt_ctrl` | event latch, mask, priority, vector |
| `i_register` | synchronises `i` and samples it on the tick |
| `fg_engine` | tick computation and event handling |
| `lin_interp` | bit-serial interpolation (restoring divider) |
| `vc_arith` | sum, clamp, product, DAC bit selection, overflow |
| `pio_dac_port` | two-write DAC output latch with ramp gating |
| `status_register` | synchronised status lines and module flags |
| `ps_control` | supply on/off and reset pulse |
| `reset_gen` | power-on and Camac Z*S2 reset |
| `front_panel_leds` | N light, ramp LED, heartbeat |

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`,
except `fg_engine`, which is exercised through `tb/tb_fg_top.sv`.
`tb/adc_model.sv` is a behavioural ADC-plus-multiplexer used by the
top-level test.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends. From the
repository root:

    verilator --binary --timing --assert -Irtl rtl/fg_pkg.sv rtl/*.sv \
        tb/adc_model.sv tb/tb_fg_top.sv --top-module tb_fg_top -o tb_fg_top
    ./obj_dir/tb_fg_top

For a single block, replace the testbench file and top module, for example
`tb/tb_lin_interp.sv --top-module tb_lin_interp`. `tb_fg_top` runs the card at its default parameters. Ticks come every 6000
clocks (1 ms at 6 MHz), and the test covers about 250 ms of operation, long
enough for the heartbeat LED to blink. It counts each mechanism it
exercises: stop bit, end of table, STOP/CONTINUE, NEW, START, READ, DOUBLE
VALUE, no-Q, failed lock attempt, interpolation and clamping of g, DAC
overflow, ramp disable, supply reset and ADC readings. A mechanism that never
happened fails the test.

`tb_fg_workload` loads the largest tables the card takes. Both g sets have
32 breakpoints. The f table has 31 segments, one of them 65535 ms long. The
test runs f to its end, about 65,900 ticks, and checks f, g and the DAC word
against a reference on every tick. Its ticks are 400 clocks apart, which the
engine meets with room to spare. The run takes about 15 s.

## Where this design makes its own choices

The original card is described at the level of function. These points are
choices of this design, and a user integrating it should check them:

* **Engine instead of processor.** The state machine follows the described
  behaviour, not the original program. The original program also kept
  scratch data in RAM, which is not modelled.
* **Number format.** All values are unsigned. The `g + f` sum is clamped at
  15 bits.
* **Buffer layout and header word.** Both are described in the tables above.
  READ results and ADC readings overwrite words 0-5.
* **End-of-table rules.** g ends at the first breakpoint that does not rise.
  f ends at the first zero segment length. g holds its end values outside the
  breakpoints.
* **Interrupt details.** CONTINUE acts only after STOP. The ADC is read as
  part of READ. Events are prioritised by number, and masked events are
  dropped.
* **Camac codes.** Only F(0), F(16) and F(20) are fixed by the interface's
  purpose. The status, supply-control and ramp codes (F1, F17, F24, F26) are
  this design's. The bus timing is a one-clock strobe.
* **Timing constants.** The supply-reset pulse is 1 ms, the module reset is
  64 clocks, the N light lasts 0.1 s, and the heartbeat toggles every 250 ms.
* **Ramp enable.** It forces the DAC word to 0 when the ramp is disabled.
* **Power-up.** The parameter RAM holds no tables until the first NEW. The
  engine computes from whatever the RAM holds, so keep the ramp disabled until
  tables have been loaded.
