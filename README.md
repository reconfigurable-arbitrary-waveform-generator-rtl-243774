# Reconfigurable arbitrary waveform generator (FPGA side)

A function generator whose waveform is chosen at run time by a PC. The PC
sends one-byte code words over an RS-232 serial line; an on-chip UART
receives them, a small decoder turns them into settings, and the FPGA drives
a 12-bit DAC with a sawtooth, a triangle or a staircase, plus a square wave
whose frequency is a selectable division of the system clock. The baud rate
of the link itself can be changed by a code word.

This RTL follows a published design built around a 12-bit DAC (AD7541), an
FPGA and a PC front end. The waveform generators, the UART's frame format,
receiver states and baud generator follow that design closely; the
command encoding, the clock frequency and several interface details are
choices made here and are marked as such below and in each file's header.

```
            rx_in ──► uart_rx ──rx_done/rx_data──► cmd_decoder ──wave_sel──┐
                        ▲                               │  │               ▼
   tx_load/tx_din ──► uart_tx ──► tx_out           baud_limit sq_div    ┌─────┐
                        ▲                               │  │   saw ────►│     │
                     baud_gen ◄─────────────────────────┘  │   tri ────►│ mux ├─► dac_out (12)
                                                           │   stair ──►│     │
                                           square_gen ◄────┘            └─────┘
                                               └─► sq_wave
```

## Files

| file | contents |
|---|---|
| `rtl/awg_pkg.sv` | shared types (`wave_sel_e`, `rx_state_e`), code words, baud/division tables |
| `rtl/awg_top.sv` | top level: UART, decoder, generators, output register |
| `rtl/uart.sv` | baud generator + transmitter + receiver with one shared baud tick |
| `rtl/baud_gen.sv` | divide-by-`cnt_limit` tick generator (16-bit) |
| `rtl/uart_tx.sv` | transmit buffer, 11-bit shift register, parity |
| `rtl/uart_rx.sv` | receive state machine, shift register, buffer, parity check |
| `rtl/parity_gen.sv` | XOR-of-all-bits (even) parity |
| `rtl/cmd_decoder.sv` | code words to settings |
| `rtl/sawtooth_gen.sv`, `rtl/triangle_gen.sv`, `rtl/staircase_gen.sv` | the three waveforms |
| `rtl/square_gen.sv` | clock divided by 2..15 |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The serial link

### Frame

Start bit (0), eight data bits least significant first, an optional even
parity bit, stop bit (1). `parity_en` switches parity on for both directions
at once; there is no odd, mark or space parity. With parity off the
transmitter actually sends two stop bits' worth of 1s before it reports idle,
which any receiver set to one stop bit accepts.

### Baud generator

`baud_gen` is a down counter: at zero it emits a one-clock `ck_en` pulse and
reloads `cnt_limit - 1`, so one tick comes every `cnt_limit` clocks. Ratios
from 2 to 65535 are possible; 0 and 1 behave as 2. The tick is an enable,
not a clock: the whole design runs on `clk`. After reset the ratio is 2, so
the link runs at half the clock frequency until told otherwise.

### Transmitter

A pulse on `load` while `busy` is low copies `din` into the transmit buffer
and raises `busy`. On the next baud tick the 11-bit shift register is loaded
with `{parity-or-1, din, 0, 1}` and immediately shifted right once, so the
start bit is on `tro` from that tick on. Each later tick shifts in a 1 from
the top. A bit counter drops `busy` at the eleventh shift, when the line is
already back at 1. A second `load` during `busy` is ignored.

### Receiver: one sample per bit

This is the part to understand before connecting the design to a real PC.
The receiver does **not** oversample. After a two-flop synchronizer, the line
is sampled once per baud tick, and a state machine with one state per bit
steps through

```
IDLE --(line = 0)--> B0 -> B1 -> ... -> B7 --parity_en--> PARITY -> STOP -> IDLE
                                          \--!parity_en---------------^
```

In STOP the byte moves to the receive buffer (`dout`), `full` is set (it
stays set), `parity_error` is updated and `rx_done` pulses for one clock.
The stop bit's value is not checked.

Because each bit is sampled exactly once, the far end's bit period must equal
the baud tick period. In simulation, and when the transmitter is looped back,
that holds exactly. Against a PC whose UART clock is independent, a small
rate error makes the sample point drift through the frame, and with
an unlucky phase the sample lands on a bit edge. If the design is used with
real hardware, replace the receiver's sampling with a 16x oversampling
receiver that uses mid-bit voting. That change stays inside `uart_rx`.

## Code words

Every byte received without a parity error is decoded; unknown bytes are
ignored. A setting changes on the clock after the byte's `rx_done`, and
`dac_out` follows one clock later.

| byte | effect |
|---|---|
| `8'h80` | sawtooth (default after reset) |
| `8'h90` | triangle |
| `8'hA0` | staircase |
| `8'h20`..`8'h28` | baud rate 110, 300, 600, 1200, 2400, 9600, 14400, 19200, 28800 |
| `8'h40`, `8'h41`, `8'h42` | square wave = clock / 2, / 7, / 15 (default / 2) |

Only `8'h90` (binary 1001_0000, triangle) comes from the original design.
The other codes were chosen here to fit around it. A baud-rate code takes
effect at the baud generator's next reload. The PC switches its own rate
once that code word has gone out. Nothing is sent back to acknowledge it.

The baud divisor is `CLK_HZ / rate`, rounded down and limited to 2..65535,
computed at elaboration. `CLK_HZ` (parameter of `awg_top` and `cmd_decoder`)
defaults to 1.8432 MHz. The original does not state its clock. This value
keeps even 110 baud within the 16-bit divider and divides exactly into all
other rates (28800 baud = 64 clocks per bit, 9600 = 192). At a faster
clock the low rates saturate at 65535.

## Waveforms

All three generators run continuously from `clk`, one step per clock, and
`dac_out` registers the selected one. A switch therefore lands in the middle
of the new waveform's period, not at its start.

* **Sawtooth**: 12-bit counter 0..4095, wraps; period 4096 clocks.
* **Triangle**: up/down counter with a direction flag. The flag turns when
  the counter, before counting, equals 2046 (going up) or 2 (going down).
  Output 1, 2, ..., 2047, 2046, ..., 1; period 4092 clocks. The wave spans
  only the lower half of the DAC range: these turning values are the
  original ones. Raise `UP_TURN` to 4094 for full scale.
* **Staircase**: a clock counter of 1000 (stair width) and a level that rises
  by 78 (stair height) each time it expires. When another step would pass
  4095 the level returns to 0: levels 0, 78, ..., 4056 (53 stairs), period
  53,000 clocks. `STEP_CLKS` and `STEP_HEIGHT` are parameters.
* **Square wave** (`sq_wave`): counter modulo the division, high for the first
  half (rounded down); period = division clocks.

The output frequency of the DAC waveforms is therefore fixed by `clk`.
For a 1 kHz sawtooth, `clk` would be 4.096 MHz.

## Reset and timing

`rst` is active high. The triangle generator samples it synchronously and
every other register asynchronously, as in the original flowcharts. Hold
`rst` across at least one rising clock edge. After reset: `tro` = 1, sawtooth
selected, link at clock/2, square wave at clock/2, `full` = 0.

## Departures from the original and open points

* Command encoding apart from `8'h90`, the clock frequency, and the reset
  square-wave division are choices made here.
* The original baud-generator flowchart prints two different reload values.
  This design uses the reading that gives a division of exactly `cnt_limit`.
* The staircase's "reset at maximum" is read as "reset when the next stair
  would overflow", since 78 never lands on 4095.
* The triangle's turn test is read on the value before counting, giving a
  range of 1..2047. Testing the value after counting would give 2..2046.
* The original receiver diagram marks IDLE's self-loop with "rx_in = 0". This
  design leaves IDLE on a 0 (the start bit) and stays there while the line
  is 1.
* The original shows two baud signals in its system simulation. Here one
  tick serves both directions.
* What the FPGA transmits to the PC is not specified. The transmitter is
  brought out on `tx_load`/`tx_din`/`tx_busy`/`tx_out` for the surrounding
  system to use.
* The PC application, RS-232 line driver, DAC, oscilloscope, JTAG port and
  power supply are outside this RTL.

## Simulating

Every testbench is self-checking. Each ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -o sim --Mdir obj_top \
    -y rtl rtl/awg_pkg.sv tb/tb_awg_top.sv --top-module tb_awg_top
./obj_top/sim
```

The package is named first; `-y rtl` finds the modules by file name.
Replace `tb_awg_top` with `tb_<module>` to run a unit test.

`tb_awg_top` runs the top at its default parameters and acts as the PC. It
checks `dac_out` on every clock against closed-form waveforms, and covers:

* the default sawtooth;
* `8'h90` and the triangle's turning points;
* a full staircase period, including the return to 0;
* a frame with a bad parity bit, which must be ignored;
* the square wave at /2, /7 and /15;
* a change to 28800 baud and then to 9600, with commands at each new rate;
* a byte sent through the transmitter and decoded from `tx_out`.

It counts each of these events and fails if one never happened. It runs
about 140,000 clocks, which takes a few seconds.

`tb_awg_baud_rates` also runs the top at its defaults. It steps the link through all
nine baud rates, from 28800 down to 110. At each rate it sends a waveform
command, with parity on at every other rate. It then reads a byte back from
`tx_out` and checks that the bit period is exact.

The unit tests cover:

* the baud tick period for several ratios;
* exact transmitted frames and `busy` timing;
* received bytes with good and bad parity;
* a transmitter-to-receiver loopback at four ratios;
* two full periods of each waveform against formulas;
* every code word.
