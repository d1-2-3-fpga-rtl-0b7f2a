# PROFIBUS DP error generator: FPGA logic

This board sits on a PROFIBUS DP segment and listens to the traffic. When it
sees an event you chose, it corrupts the telegram on the wire. The event can
be a telegram start, a given station address, a SAP, a frame-control or
length value, a data byte, an invalid telegram, a parity error, or simply any character.
To corrupt the telegram, the board clamps line A and/or line B to 5 V or to
ground for a short time. Engineers use such a tool for training,
to reproduce faults seen in plants, and to check that diagnostic tools
notice them.

The RTL here is the FPGA part of that board. It does four things:

- decodes the serial bus;
- tracks where each character falls in its telegram;
- evaluates the trigger condition;
- drives the gate signals of the clamping transistors.

A small microcontroller with an LCD and a joystick acts as the user
interface. It loads the settings into the FPGA over SPI. The analog parts
are outside this RTL: the RS485 receiver, the opto couplers, the MOSFET
stage, the relays and the microcontroller.

```
 rxd ─► uart_rx ──receive_flag, byte──► bus_monitor ──bus_active──┐
             ▲                 │                                    ▼
        baud_tick_gen          └──────────────────────► trigger_condition
        (16 × bit rate)                                  (rank counter, SD rule,
             ▲                                            SA/DA state machines,
             │                                            telegram_decoder)
 SPI ─► spi_slave ─► reg_bank ─► divisor, trigger mask, compare  │ trigger
                                 values, error type, enable         ▼
                                                             pulse_stretcher
                                                      10 µs ──► trigger_out
                                                             └► error_driver ─► a_hi a_lo b_hi b_lo
```

Everything runs on one 192 MHz clock with an active-low asynchronous reset.

## Characters: the UART and its 16× tick

Each PROFIBUS character is 11 bits: a start bit, 8 data bits (LSB first),
an even parity bit and a stop bit.

`baud_tick_gen` divides the system clock into a sampling tick at 16 times
the bit rate. At 192 MHz, 12 Mbit/s needs exactly one clock per tick.
Every supported rate is therefore 12 MHz divided by an integer, the
*divisor*:

| bit rate    | divisor |
|-------------|---------|
| 12 Mbit/s   | 1       |
| 6 Mbit/s    | 2       |
| 4 Mbit/s    | 3       |
| 3 Mbit/s    | 4       |
| 1.5 Mbit/s  | 8       |
| 500 kbit/s  | 24      |
| 187.5 kbit/s| 64      |
| 93.75 kbit/s| 128     |
| 45.45 kbit/s| 264     |
| 19.2 kbit/s | 625     |
| 9.6 kbit/s  | 1250    |

`uart_rx` synchronises `rxd` and waits for a low level. It confirms the
start bit at mid-bit (8 ticks later), then samples every 16 ticks. After
the middle of the stop bit it updates the byte, the parity bit and two
error flags:

- `parity_err`: data plus parity has an odd number of ones;
- `framing_err`: the stop bit was low.

In the same clock it pulses `receive_flag` for one clock. Characters with
errors are delivered too. After a low stop bit the receiver waits for the
line to go high before it looks for the next start bit.

## Telegram boundaries: `bus_active`

Start delimiters are ordinary byte values that can also occur inside a
telegram. The logic therefore has to know whether a character opens a
telegram. It uses the idle gap between telegrams.

`bus_monitor` keeps a timeout counter:

- every `receive_flag` loads the counter with 264;
- every tick counts it down;
- `bus_active` is high while the counter is non-zero.

264 ticks = 1.5 characters × 11 bits × 16 ticks. Characters inside a
telegram follow each other with no gap, so the counter never runs out
there. The minimum gap between PROFIBUS telegrams (33 bit times) is much
longer than 16.5 bit times, so it always does.

`bus_active` is a register that rises one clock **after** the counter is
loaded. In the clock where the first character of a telegram is flagged,
`bus_active` is still 0. That single-clock lag is the whole start-of-telegram
detector. Keep it if you change this block.

## Where a byte sits: `character_rank`

`trigger_condition` counts the position of each character in its telegram:

- while the bus is idle, the counter is held at 0;
- a character flagged while the bus is active increments it.

The first character arrives while the bus is still idle, so it keeps rank 0.
The next character gets rank 1, and so on. The counter is 8 bits wide and
saturates at 255, which covers the longest telegram (255 characters).

Rank is valid one clock after `receive_flag`. The logic calls that clock
`char_valid`, and all rank-based decisions are taken in it.

## Trigger conditions

| mask bit | condition | rule |
|---|---|---|
| 0 | start delimiter | flagged while `bus_active` = 0 and the byte is SD1 `10`, SD2 `68`, SD3 `A2`, SD4 `DC` or SC `E5` |
| 1 | source address | byte at rank 2 (after SD1/SD3/SD4) or rank 5 (after SD2) equals the SA register |
| 2 | destination address | byte at rank 1 or rank 4, same rule, against the DA register |
| 3 | parity error | any character with wrong parity |
| 4 | any character | every received character |
| 5 | invalid telegram | see `telegram_decoder` below |
| 6 | SAP | EXT bit (bit 7) of both DA and SA set, SD2/SD3 only |
| 7 | no SAP | EXT bit of both DA and SA clear (any telegram with addresses) |
| 8 | DSAP | SAP telegram whose first data byte equals the DSAP register |
| 9 | SSAP | SAP telegram whose second data byte equals the SSAP register |
| 10 | FC | frame-control byte equals the FC register in the bits of the FC mask register |
| 11 | LE | SD2 length byte equals the LE register |
| 12 | PDU byte | SD2/SD3 telegram whose data byte at the position in the PDU-position register (1 = first) equals the PDU-value register |

The enabled conditions are ORed. For example, mask `0x03` fires on every
telegram start **and** on the chosen source address.

The start-delimiter rule does not check that the previous character was an
end delimiter (ED `16`). A token telegram (SD4) has no ED, so that check
would miss the telegram that follows a token.

### The address state machine (`addr_match_fsm`)

The address field moves with the telegram type. After SD1, SD3 or SD4 the
layout is `SD DA SA …`. After SD2 it is `SD2 LE LEr SD2 DA SA …`. A
four-state machine follows one telegram, so no message buffer is needed:

```
WAIT_SD ──rank 0 & SD1/SD3/SD4──► WAIT_SHORT ──rank POS_SHORT & byte==addr──► FOUND ─► WAIT_SD
   │                                   └──rank POS_SHORT & byte!=addr──► WAIT_SD
   └──rank 0 & SD2──► WAIT_SD2 ──rank POS_SD2 & byte==addr──► FOUND
                          └──rank POS_SD2 & byte!=addr──► WAIT_SD
```

The machine moves only on `char_valid`. A character of rank 0 always
restarts it, so a telegram that is cut short cannot leave it waiting. The
SA instance uses positions 2/5 and the DA instance 1/4.

### Field triggers and validity (`telegram_decoder`)

The start delimiter fixes where every field sits:

| type | layout | characters |
|---|---|---|
| SD1 | `10 DA SA FC FCS 16` | 6 |
| SD3 | `A2 DA SA FC` + 8 data bytes + `FCS 16` | 14 |
| SD2 | `68 LE LEr 68 DA SA FC` + data + `FCS 16` | LE + 6 |
| SD4 | `DC DA SA` (token) | 3 |
| SC | `E5` | 1 |

Here LE counts DA, SA, FC and the data bytes. FCS is the sum of the same
bytes modulo 256.

The decoder uses the rank to pick out LE, FC, the EXT bits of DA and SA,
the first two data bytes (DSAP and SSAP when both EXT bits are set), and
the data byte at the chosen position. Position 0, or a position past the
last data byte, never matches. It keeps a running FCS.

It reports a telegram as invalid, with one pulse per telegram, when any of
these holds:

- the first byte is not a delimiter;
- LE is outside 4..249;
- LEr ≠ LE;
- the fourth byte of an SD2 telegram is not `68`;
- the FCS is wrong;
- the ED is missing;
- a character arrives after the end;
- the bus goes idle before the end.

In the last case the pulse comes one clock after `bus_active` falls.

## Output pulse and bus clamping

`pulse_stretcher` turns the one-clock trigger into a 10 µs pulse (1920
clocks). This is `trigger_out`, the board's trigger output. A new trigger
during a pulse restarts the full length. At 1.5 Mbit/s a character lasts
1408 clocks, so triggers on adjacent characters merge into one longer pulse.

If the control register enables errors, `error_driver` switches the gate
outputs during the same pulse, one clock later. It never switches both
transistors of one line at once, and an assertion checks this. Error-type
register: bits 1:0 set line A, bits 3:2 set line B.

| code | line state |
|------|------------|
| 0 | untouched |
| 1 | clamped to ground |
| 2 | clamped to 5 V |
| 3 | untouched (reserved) |

Latency from the middle of the stop bit:

- `receive_flag`: +1 clock;
- start-delimiter trigger (`trigger_out`): 3 clocks after `receive_flag`;
- address and field triggers: one clock later than the start-delimiter
  trigger;
- gate outputs: one clock after `trigger_out`.

The original circuit raised its trigger output in the clock right after
`receive_flag`. The two extra registers here cost 10 ns.

## Settings over SPI

The microcontroller is the SPI master. Each write is one frame:

1. SS goes low.
2. 16 bits go out MSB first: address A7..A0, then data D7..D0.
3. SS goes high.

MOSI is sampled on the rising SCK edge (mode 0). `spi_slave` synchronises
SCK, SS and MOSI into the system clock and detects their edges there, so
SCK must stay well below 48 MHz. Frames that are not exactly 16 bits long
are dropped. There is no read-back.

In `reg_bank`, each register compares the frame address with its own and
loads the data byte on a match:

| addr | register | reset |
|---|---|---|
| 0x00 | divisor, low byte | 8 (1.5 Mbit/s) |
| 0x01 | divisor, high byte | 0 |
| 0x02 | trigger mask | 0x01 (start delimiter) |
| 0x03 | source address | 0x3C |
| 0x04 | destination address | 0x00 |
| 0x05 | error type | 0x00 |
| 0x06 | control: bit 0 = apply error | 0 |
| 0x07 | trigger mask, high byte | 0x00 |
| 0x08 | FC value | 0x00 |
| 0x09 | FC compare mask | 0xFF |
| 0x0A | LE value | 0x00 |
| 0x0B | DSAP value | 0x00 |
| 0x0C | SSAP value | 0x00 |
| 0x0D | PDU byte position, 1 = first | 0x01 |
| 0x0E | PDU byte value | 0x00 |

## Top-level ports (`pb_errgen_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | 192 MHz clock, asynchronous active-low reset |
| `rxd` | in | data from the RS485 receiver, idle high |
| `spi_sck`, `spi_ss_n`, `spi_mosi` | in | SPI from the microcontroller |
| `trigger_out` | out | 10 µs pulse per trigger (to an opto coupler) |
| `bus_active` | out | telegram in progress (useful as a scope probe) |
| `a_hi`, `a_lo`, `b_hi`, `b_lo` | out | gate drive for the clamping transistors, active high |

## What is this design's own

The original design fixes these points, and the RTL follows them:

- the character format;
- 16× oversampling;
- the 264-tick timeout and the lag of `bus_active`;
- the rank counter;
- the start-delimiter rule and the source-address state machine;
- the 10 µs pulse;
- the 16-bit SPI frame (address then data);
- the compare-and-load register bank;
- the four gate outputs with free choice per line.

The following are choices made here:

- the UART's insides, its glitch filter, its error flags and its
  wait-for-idle after a framing error;
- evaluating the state machine on `char_valid`, and restarting it on rank 0;
- the conditions other than start delimiter and source address. The
  original design lists them as useful triggers and says what each looks
  at, but gives no logic for them. Here they get the simplest logic that
  does that, plus the mask that ORs them. The FC compare under a mask, and
  the telegram layouts and FCS rule, are standard PROFIBUS;
- the register map, the reset values and the error-enable bit;
- handling SPI in the system clock domain, the SPI mode and the
  frame-length check;
- the encoding of the error type and the error duration, which is the
  trigger pulse;
- the two pipeline registers in the trigger path.

The original list of useful triggers has a "PDU number" entry that does not
say what it compares. Here it is read as "the data byte at a chosen
position has a chosen value" (mask bit 12). Treat that as an interpretation.
A UART stop-bit error is flagged by `uart_rx` but is not a trigger of its
own.

Two limits apply to the hardware, not to this logic:

- at 12 Mbit/s the original board's clamping stage loaded the bus too much;
- 192 MHz is a demanding clock for a low-cost FPGA.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`, and
`tb/tb_pb_traffic.sv` runs the whole design on longer traffic. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/pb_pkg.sv tb/tb_pb_errgen_top.sv \
          --top-module tb_pb_errgen_top -o sim && ./obj_dir/sim
```

Replace the testbench name to run another one. `tb_pb_errgen_top` runs the
whole design at its default parameters. It loads settings over SPI and sends
serial telegrams at 1.5 Mbit/s, 187.5 kbit/s and 12 Mbit/s. It checks
against a reference model of the trigger rules:

- trigger pulse counts and widths;
- start-delimiter latency;
- the moment `bus_active` falls;
- the gate patterns.

It includes LE, FC, SAP/DSAP/SSAP, no-SAP, PDU-byte and invalid-telegram
scenarios.
It also checks that every trigger kind, a bit-rate change, idle detection
and clamping each happened at least once. It takes about 10 s.

`tb_pb_traffic` runs the whole design on mixed bus traffic, at 1.5, 4 and
12 Mbit/s. At each rate it sends 40 random well-formed telegrams of every
type, with the trigger set to "start delimiter or source address 0x3F" and
the error applied. It checks three things:

- the number of trigger pulses matches the reference model;
- `bus_active` rises once per telegram;
- the invalid-telegram condition never fires on this traffic.

It ends with the longest telegram PROFIBUS allows: an SD2 telegram of 255
characters at 12 Mbit/s. It takes about 4 s.

The block testbenches cover:

- the tick period for several divisors;
- random characters with parity and stop-bit errors;
- the timeout length;
- random telegrams through the address machines and the trigger logic;
- 3000 generated telegrams of every type, half of them spoiled in one of
  seven ways, through the telegram decoder;
- the exact 1920-clock pulse;
- all 16 error codes;
- SPI frames of right and wrong length;
- 2000 random writes to the 15 registers.
