# PC-104 serial output port

A small I/O-mapped transmitter for an 8086 single-board computer on the
PC-104 bus. The CPU writes one 8-bit character to I/O port 220H. The port
sends it on a single output pin as an asynchronous serial frame at 9600 bps:
one start bit, eight data bits with the least significant first, and one stop
bit. The CPU learns when it may write the next character by reading bit 7 of
I/O port 221H. The port runs from a 25.175 MHz system clock.

This RTL follows the structure of a university lab exercise ("Lab 5 - Serial
Output Port"). It reproduces that exercise's block structure, addresses,
polarities and timing. Where the exercise leaves something open, the choice
made here is stated below and in each file's header.

## How a character travels

```
 D7-D0 --> [data buffer] --> [transmit data register] --> [serial mux] --> serial_out
             ^ load_n            ^ start                    ^ bitselect (4)
 A9-A0, IOW* -> decoder 220H     |                          |
                   |             |                          |
                   +--> [full flag] --full--> [controller] -+
                             ^ start             ^ nextbit
                             |                   |
                          [controller]      [bit clock generator] <-- start
 A9-A0, IOR* -> decoder 221H --> oe; D7 = full, D6-D0 = 0
```

1. **Write.** While IOW* is low with 220H on A9-A0, the decoder holds the
   active-low strobe `load_n` low. When the write ends, `load_n` rises and the
   data buffer takes D7-D0. The buffer is the only register that is not clocked
   by the system clock: its clock is `load_n` itself. The data bus is stable at
   that edge.
2. **Full.** The full/empty logic keeps last cycle's `load_n` and sees the
   rising edge. It sets `full` on the first system clock after the write ends.
3. **Start.** `start = full AND (controller idle)`. It lasts one clock and
   does three things at that clock edge:
   - it copies the buffer into the transmit data register;
   - it clears `full`;
   - it clears the bit-clock counter, so the start bit lasts exactly one bit
     period.
4. **Shift out.** The controller steps through start bit, bit 0 … bit 7 and
   stop bit, one step for each `nextbit` pulse. Its state code selects the
   line level.
5. **Back to idle.** After the stop bit the controller returns to idle. If
   the CPU has already written the next character, `full` is set, so `start`
   fires in that idle clock. Characters then follow one another with a single
   idle clock between them.

The buffer and the transmit register together hold two characters. So `full`
clears almost at once after a write to an idle port. It stays set only while
one character is on the line and a second one is waiting. A polling loop
therefore keeps the line busy without gaps.

## Line levels and bit order

The output pin does **not** carry ordinary TTL UART polarity. It is meant to
drive an RS-232 line driver. Each level is the RS-232 *line* sense:

| controller state | code (`bitselect`) | `serial_out` |
|---|---|---|
| idle | 0 | 0 (mark) |
| start bit | 1 | 1 (space) |
| bit 0 … bit 7 | 2 … 9 | NOT data[0] … NOT data[7] |
| stop bit | 10 | 0 (mark) |
| unused | 11 … 15 | 0 |

So a logic-0 data bit is sent as 1 and a logic-1 bit as 0. The start bit is
1 and the line rests at 0. Bit 0 goes first. To get a standard idle-high TTL
signal, invert `serial_out`.

## Bit timing

The bit clock generator counts 0 … D-1 with D = `CLK_HZ / BIT_RATE` (integer
division). `nextbit` is high during count D-1. With the defaults,
D = 25 175 000 / 9 600 = 2622, so the count goes to 2621. The real rate is
9601.1 bps, 0.012 % fast.

`start` restarts the count. The counter also wraps at D-1 on its own. The
counter is free-running while idle, which is harmless: the first `start`
re-aligns it. Timing of one character, counted in system clocks from the
clock edge where the buffer-full flag is set:

| event | clock |
|---|---|
| `start` high (full and idle) | same cycle as `full` = 1 |
| start bit on the line | +1, for D clocks |
| data bit n | +1 + (n+1)·D, for D clocks |
| stop bit | +1 + 9·D, for D clocks |
| back in idle, next `start` possible | +1 + 10·D |

A character takes 10·D clocks on the line, about 1.04 ms at the defaults.
Back-to-back characters start 10·D + 1 clocks apart.

## Status port

A read of 221H (IOR* low, 221H on A9-A0) drives `{full, 7'b0}` onto D7-D0.
At all other times the driver is off. The bidirectional data bus appears at
the top level as three signals: `d_in`, `d_out` and `d_oe`. The pad makes it
bidirectional with `D = d_oe ? d_out : 'z` and feeds `d_in` from the same
pins.

Software loop, as the port expects to be driven:

```
ptr = first character
while (*ptr != 0):
    while (in(0x221) & 0x80): wait      ; buffer still full
    out(0x220, *ptr)
    ptr++
```

## Files

| file | block |
|---|---|
| `rtl/serial_port_pkg.sv` | addresses, byte and address types, controller state enum, line levels |
| `rtl/data_buffer.sv` | 220H write decoder and the 8-bit buffer clocked by `load_n` |
| `rtl/status_port.sv` | 221H read decoder, status byte and driver enable |
| `rtl/full_flag.sv` | rising-edge detector on `load_n`, the full flip-flop |
| `rtl/tx_data_register.sv` | 8-bit transmit register, loaded on `start` |
| `rtl/tx_controller.sv` | 11-state controller, `start`, 4-bit `bitselect` |
| `rtl/serial_mux.sv` | 10-to-1 line-level multiplexer |
| `rtl/bit_clock_gen.sv` | divide-by-`CLK_HZ/BIT_RATE` counter, `nextbit` |
| `rtl/ctrl_register.sv` | 221H write decoder and control register (`OPTIONS = 1`) |
| `rtl/tx_controller_opt.sv` | controller with word length, parity and second stop bit (`OPTIONS = 1`) |
| `rtl/serial_mux_opt.sv` | multiplexer with parity input (`OPTIONS = 1`) |
| `rtl/bit_clock_gen_opt.sv` | bit clock with selectable rate (`OPTIONS = 1`) |
| `rtl/serial_output_port.sv` | top level |

Top-level parameters:

- `CLK_HZ`: default 25 175 000.
- `BIT_RATE`: default 9600. Only used when `OPTIONS = 0`.
- `OPTIONS`: default 0.

`CLK_HZ / BIT_RATE` must be at least 2.

## Choices beyond the exercise

The exercise leaves these points open. This design settles them as follows:

- **Reset.** The exercise relies on the controller's idle state being all
  zeros, so that a cleared register is already idle. A synchronous,
  active-high `rst` input is added anyway. It clears the controller, the full
  flag and the bit counter. The data buffer and the transmit register have no
  reset, because neither is used before it is written. With `OPTIONS = 1`
  the control register, which is clocked by its bus strobe, takes `rst`
  asynchronously.
- **State codes.** Idle is 0, as the exercise requires. The other states get
  consecutive codes 1 … 10, and the state register is used directly as the
  multiplexer select.
- **Set/clear collision.** If the end of a write is detected in the same
  cycle as `start`, the full flag is cleared. The buffer already holds the
  new character at that point, so the transfer carries it.
- **No synchronizer.** `load_n` comes from the bus and is asynchronous to
  `clk`. It is compared with its previous value directly, as the exercise
  describes. A design for a noisy environment might add a two-flop
  synchronizer. That would delay `full` by one clock and would also need the
  buffer-to-register transfer checked again.
- **Bus decoding.** Only A9-A0 and IOW*/IOR* are decoded. AEN (DMA cycles)
  is not used.
- **Three-state driver.** This is left to the I/O pad.
- **Optional format control.** The register layout, rate codes, parity sense
  and reset format of the `OPTIONS = 1` build are all this design's own.
  The exercise only lists the features. See the next section.

## Optional format control (`OPTIONS = 1`)

The exercise also lists some optional extras, selected by a control register
at 221H: other bit rates, 5 to 8 data bits, a parity bit and a second stop
bit. Setting the top-level parameter `OPTIONS` to 1 builds them. The default,
`OPTIONS = 0`, is the fixed-format port described above.

With `OPTIONS = 1`:

- A **write** to 221H goes to the control register. A **read** of 221H still
  returns the status byte.
- The controller, bit clock and multiplexer are replaced by
  `tx_controller_opt`, `bit_clock_gen_opt` and `serial_mux_opt`.
- The data buffer, full flag, transmit register and status port are shared
  with the basic build.

Control register (`port_cfg_t`). The reset value 35H is the basic format:
9600 bps, 8 data bits, no parity, one stop bit.

| bits | field | meaning |
|---|---|---|
| 7 | `stop2` | 1 = two stop bits |
| 6 | `par_en` | 1 = even parity bit after the data |
| 5:4 | `wlen` | data bits − 5 (0…3 → 5…8) |
| 3:0 | `rate` | 0…8 = 300, 600, 1200, 2400, 4800, 9600, 19200, 38400, 57600 bps; 9…15 = 9600 |

**Frame.** The frame is a start bit, then `5+wlen` data bits, then the parity
bit if enabled, then one or two stop bits. The parity bit uses state code 11
and the second stop bit code 12. All other codes mean the same as in the
basic build. The parity bit is chosen so that the data bits plus the parity
bit hold an even number of ones. It is sent inverted, like a data bit.

**Rate.** For each rate code the bit clock divides by `CLK_HZ / rate`. These
divisors are constants fixed at elaboration and stored as a 16-entry table, so
there is no run-time divider. At 25.175 MHz they range from 83 916 clocks per
bit (300 bps) to 437 (57600 bps, 0.015 % fast). The counter is 17 bits wide.
`CLK_HZ` must be at least twice the highest rate.

**When a new format takes effect.** At `start`, the controller copies the
configuration along with the character. Writing 221H therefore never changes
a character that is already on the line. It applies to the next character
that starts. A program that first waits for "not full", then writes 221H,
then writes 220H, gets the new format on exactly that character.

## Caveats

- The buffer is clocked by a decoded strobe, as specified. This is
  glitch-prone on real hardware if the address changes while IOW* is low. On
  the ISA/PC-104 bus the address is stable during the strobe.
- The CPU must hold IOW* low for at least one system clock. Otherwise the
  edge detector can miss the write. At 25 MHz every ISA I/O cycle meets this
  easily.
- The design needs `CLK_HZ / BIT_RATE >= 2`. This is checked at elaboration.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops through a watchdog if it hangs.

| testbench | what it shows |
|---|---|
| `tb_data_buffer` | decode of 220H only; the buffer keeps its old value during the strobe and loads at its end |
| `tb_status_port` | all 1024 addresses × IOR* × full |
| `tb_full_flag` | set exactly one clock after the strobe ends, clear on `start`, collision rule, reset |
| `tb_tx_data_register` | load on `start`, hold otherwise, against a model |
| `tb_tx_controller` | random `full`/`nextbit` against a state model; all 11 states visited |
| `tb_serial_mux` | every select code with walking-one, walking-zero and random data |
| `tb_bit_clock_gen` | default divider (2622) and divide-by-2: pulse period and restart by `start` |
| `tb_serial_output_port` | full-size run at the default parameters |
| `tb_serial_port_19200` | 19200 Hz clock (two clocks per bit) |
| `tb_ctrl_register` | reset value, field positions, load at the end of a 221H write only |
| `tb_tx_controller_opt` | random formats, `full` and `nextbit` against a frame model; all 13 states and 16 formats |
| `tb_serial_mux_opt` | every code × word length × data, parity bit |
| `tb_bit_clock_gen_opt` | period of every rate code at 25.175 MHz |
| `tb_serial_port_options` | `OPTIONS = 1` at a 230 400 Hz clock |

What the three system tests cover:

- **`tb_serial_output_port`** runs the polling program above on a 32-character
  string at the default 25.175 MHz / 9600 bps (about 840 000 clocks).
  - A reference receiver, `tb_uart_rx`, decodes the line. It checks that
    every bit period is exactly 2622 clocks long.
  - The test counts how often each mechanism occurs and fails any that never
    does: CPU sees full, CPU sees empty, transfer, back-to-back frame, bit
    clock restarted by `start`, each controller state, ignored access.
- **`tb_serial_port_19200`** runs this bus sequence: status read (not full),
  write, status read (not full), second write, status read (full). It then
  checks the first character clock by clock. The start bit comes two clocks
  after the write, then the inverted data LSB first, then the stop bit and a
  single idle clock before the second character.
- **`tb_serial_port_options`** sends 62 characters in random formats. Together
  they cover every word length, parity and stop-bit combination and every
  rate code. A receiver (`tb_uart_rx_cfg`) follows the expected format of each
  frame and checks timing, levels and parity.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --timescale 1ns/1ps rtl/serial_port_pkg.sv tb/tb_serial_output_port.sv \
    --top-module tb_serial_output_port -o sim
obj_dir/sim
```

Every file passes `verilator --lint-only -Wall` and elaborates with the yosys
slang front end. The only warnings are two kinds:

- package constants that a given module does not use;
- with `OPTIONS = 1`, `rst` being used both synchronously and asynchronously
  (see Reset above).
