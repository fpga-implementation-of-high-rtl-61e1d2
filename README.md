# UART with automatic address identification

On a multi-drop serial line one master talks to many slaves. With an ordinary
UART every slave has to receive and inspect every byte, including all the data
meant for other slaves, just to find out whether a message is addressed to it.
This UART adds a ninth bit to every character that says whether the character
is an **address** (1) or **data** (0). The receiving side compares only address
characters with its own address and throws away, in hardware, every data
character that follows an address that is not its own. The host of a slave sees
only the data sent to it.

The design also has a selectable bit rate, a transmit buffer that lets frames
follow each other without gaps, parity, frame and overrun error detection, and
dual-clock FIFOs towards the host. The UART side runs at 25 MHz; the host side
may run at any frequency.

## The frame

Each character is 12 bits on the line, least significant bit first:

| bit | 0     | 1..8    | 9                         | 10     | 11   |
|-----|-------|---------|---------------------------|--------|------|
|     | start | d0..d7  | identifier (1 = address)  | parity | stop |
|     | 0     | byte    | 0 / 1                     | XOR of bits 1..9 | 1 |

The parity bit is the XOR of the nine payload bits (byte and identifier), so it
is 1 when they hold an odd number of ones. The receiver recomputes it and flags
a mismatch. The line idles high.

## How a slave decides what to keep (`addr_filter`)

The filter sits between the receiver and the receive FIFO and holds a single
state bit, `selected`, which is cleared at reset.

* An address character is always taken from the receiver and never passed on.
  If its byte equals `my_addr` and it has no parity or frame error, `selected`
  is set (`addr_hit` pulses); otherwise it is cleared (`addr_miss` pulses).
* A data character is passed on, with its error flags, only while `selected`
  is 1. Otherwise it is taken and discarded (`data_drop` pulses).

So a slave keeps everything between an address character with its own address
and the next address character, and nothing else. A corrupted address
deselects the slave rather than risk accepting another slave's data.

The hand-off is a ready/valid pair. Characters that will be discarded are
consumed at once. A data character for a selected slave stays in the receiver
until the receive FIFO has room. This is what makes overrun visible: if the host
stops reading, the FIFO fills, the next character waits in the receiver, and the
character after that overwrites it and sets `oerr`.

## Transmit path (`async_fifo` → `uart_tx`)

The host writes `{tx_is_addr, tx_data}` into the transmit FIFO. Whenever the
transmitter's buffer is empty (`treg_e`), the top moves the oldest character from
the FIFO into that buffer. On the next baud tick at which the shift register is
idle, or is finishing a stop bit, the buffer is copied into the 12-bit shift
register with start, parity and stop bits added, and the buffer is free again.
The shift register moves one bit every 16 ticks. Because the next character
already waits in the buffer, frames leave back to back, exactly 12 bit times
apart.

## Receive path (`uart_rx`)

`rxd` goes through a two-flop synchronizer. The receiver looks at the line once
per tick (16 times per bit). After a low sample it counts to the middle of the
start bit and checks that the line is still low. If it is high again, the low
sample was a glitch and is ignored. From there it samples the middle of each
following bit. When it samples the stop bit it delivers the nine payload bits and
sets:

* `perr` if the recomputed parity differs from the received parity bit;
* `ferr` if the stop bit is 0 (the receiver then waits for the line to go high
  before it looks for a new start bit);
* `oerr` if the previous character had not yet been taken. The new character
  replaces it, and `oerr` stays set until the next read.

`drdy` rises in the middle of the stop bit, 11.5 bit times after the start edge,
plus at most 2 clocks of synchronizer delay and one tick period.

## Bit rate selection (`baud_gen`)

The generator makes an enable pulse, `tick`, at 16 times the bit rate; no
derived clocks are used. A prescaler (ratio `BASE_DIV`) drives a chain of
divide-by-two stages, and `baud_sel` picks one tap of that chain:

    bit rate = f_clk / (16 * BASE_DIV * 2^baud_sel)

With the 25 MHz clock and the default `BASE_DIV = 1`, `STAGES = 8`, this gives
1.5625 Mbit/s (`baud_sel = 0`), 781 k, 391 k, … down to 12.2 kbit/s
(`baud_sel = 7`). Both ends of a link must use the same setting. To get a
standard rate, pick a clock and `BASE_DIV` that divide to it. For example,
`BASE_DIV = 1` with a 14.7456 MHz clock gives 921600 baud down to 7200 baud.

## Clock domains (`async_fifo`)

There are two clocks: `clk` for the UART and `host_clk` for the host. The
transmit FIFO is written on `host_clk` and read on `clk`. The receive FIFO is
written on `clk` and read on `host_clk`. Each FIFO keeps its pointers in
Gray code and passes them through two-flop synchronizers. As a result `full`
and `empty` may stay asserted for two clocks of the other side after they
stop being true. They are never deasserted early. Reads are first-word
fall-through: while `rx_empty` is 0, the outputs show the oldest character and
`rx_rd` removes it. Both resets are asynchronous and active low. Assert
`rst_n` and `host_rst_n` together.

## Top level (`hs_uart`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | UART clock (25 MHz nominal) and reset |
| `host_clk`, `host_rst_n` | in | host clock and reset |
| `baud_sel[2:0]`, `my_addr[7:0]` | in | rate select; this unit's address |
| `txd` / `rxd` | out / in | serial line |
| `tx_wr`, `tx_is_addr`, `tx_data[7:0]`, `tx_full` | | host write into the transmit FIFO (write only when `tx_full` is 0) |
| `rx_rd`, `rx_data[7:0]`, `rx_perr`, `rx_ferr`, `rx_empty` | | host read from the receive FIFO |
| `treg_e`, `tx_idle` | out | transmit buffer empty; shift register idle |
| `oerr`, `selected` | out | receive overrun; slave currently selected |
| `addr_hit`, `addr_miss`, `data_drop` | out | one-`clk` event pulses |

Parameters: `FIFO_DEPTH` (16, a power of two of at least 4), `BASE_DIV` (1)
and `BAUD_STAGES` (8).

Every unit both sends and receives. A master is a unit whose host writes
address characters. A unit receiving on the line filters by `my_addr`
whatever its role.

## Files

| file | content |
|------|---------|
| `rtl/uart_pkg.sv` | character types (`uart_char_t`, `rx_word_t`), frame constants, parity function |
| `rtl/baud_gen.sv` | rate generator |
| `rtl/uart_tx.sv` | buffered transmitter |
| `rtl/uart_rx.sv` | receiver with error checks |
| `rtl/addr_filter.sv` | address identification |
| `rtl/async_fifo.sv` | dual-clock FIFO |
| `rtl/hs_uart.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Verification

Each testbench computes its expected values on its own and ends with a
`TB_RESULT checks=N failures=M` line. Each also has a watchdog.

* `baud_gen_tb`: tick period for every `sel`, with and without prescaler.
* `uart_tx_tb`: 24 frames decoded bit by bit against frames built in the
  bench, `treg_e` behaviour, and the exact 12-bit-time spacing of
  back-to-back frames.
* `uart_rx_tb`: random characters, parity error, frame error and recovery,
  overrun, glitch rejection, and the `drdy` latency window.
* `addr_filter_tb`: 400 random characters against a reference model of the
  selection, with random back-pressure.
* `async_fifo_tb`: order, exact full point, and drain with a fast and then a
  slow read clock.
* `hs_uart_tb`: two units on one line at the default parameters. It covers
  addressing to this slave and to another one, transmit FIFO stalls,
  back-to-back frames, receive overrun (characters 1..16 and 19 of 19 must
  arrive), injected parity and frame errors, a corrupted address, a rate
  switch, and traffic in the reverse direction. It counts each of these
  mechanisms and fails if one never happened. It simulates 0.78 ms in well
  under a second.

Run one with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module hs_uart_tb rtl/uart_pkg.sv tb/hs_uart_tb.sv
    ./obj_dir/Vhs_uart_tb

Lint: `verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/uart_pkg.sv rtl/hs_uart.sv`.
The only warnings concern reset signals that are used both as asynchronous
flop resets and in the `disable iff` of assertions. They are harmless.

## Where this design makes its own choices

What the RTL takes from its source: the 12-bit frame, the address/data
identifier bit and its encoding, the parity bit over nine bits, the buffer plus
shift register in the transmitter, the parity, frame and overrun flags, the
rate generator as divider stages with a multiplexer, FIFOs in both directions,
and the 25 MHz clock. The following are choices of this implementation:

* **Parity polarity.** The parity bit is 1 when the nine bits hold an odd
  number of ones. With that bit included the frame has even parity.
  Descriptions of the scheme are loose on this point. Invert `char_parity` in
  `uart_pkg` for the other convention.
* **`perr` polarity.** `perr` is 1 on a parity error, like `ferr` and `oerr`.
  The original naming (PErr) could also be read as active when parity is good.
* **Overrun.** An overrun keeps the newest character and loses the older
  unread one.
* **Address handling.** Address characters are not delivered to the host. An
  address character with an error deselects the slave. `my_addr` is a port,
  not a constant.
* **Timing and sizes.** The 16x oversampling, sampling at mid-bit, glitch
  rejection, the rate table, the FIFO depth of 16, and the host handshakes are
  all choices of this implementation.
* **Size.** A reference FPGA implementation of the scheme used 112 registers
  and 29 I/Os. This one has about 150 flip-flops plus 2 × 16 FIFO words and
  46 port bits. The difference is mostly the FIFOs with their synchronizers,
  and the status outputs brought to ports.

Not included: the host processor and the clock oscillator. Their signals are
the top-level ports.
