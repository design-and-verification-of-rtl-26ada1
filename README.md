# Quad-channel 16550-style UART on an AMBA APB bus

Four independent UART channels share one APB slave port. Each channel is a
16550-style UART with 128-byte transmit and receive FIFOs, a programmable
16-bit baud divisor, 5 to 8 data bits, parity (even, odd, stick), 1, 1.5 or
2 stop bits, and framing, parity, break and overrun detection. It also has a
prioritised interrupt identification register. A 2-bit channel select on
the bus picks the UART for each transfer. Each channel has its own divisor,
so the four peripherals can run at different baud rates. The four interrupt
lines are ORed onto a single `intr_out`.

The design also brings verification inside the chip. A single host port
cannot easily drive two UARTs with clocks at different phases. Instead,
each channel can loop its transmitter back to its own receiver through a
delay line. The delay is set per channel in clock cycles, and a test
chooses it at random. The receiver then sees frames at an arbitrary phase
relative to its own 16x sampling grid. This is how truly asynchronous
reception is exercised, using one bus master.

```
            +---------------+     +--------+   we/rd   +--------+ tx_out[i]
 APB  ----->| apb_interface |---->|apb_demux|---------->|uart_core|-----+----->
 (psel,     |  IDLE/SETUP/  | we  | 1 -> 4  |<----------|  x 4    |     |
 penable,..)|  ACCESS       | rd  |         |  rdata    |         |<-+  |
            +---------------+     +--------+           +--------+  |  |
                                                           ^ rx      |  v
                                        rx_in[i] ----------+--[mux]--+ skew_loopback
                                                     loopback[i]      (skew_sel[i])
```

## Files

| file | contents |
|---|---|
| `rtl/uart_pkg.sv` | register addresses, LCR struct, IIR codes, APB state enum, parity helpers |
| `rtl/quad_uart_top.sv` | top: APB interface, demux, 4 channels, 4 loopback paths, interrupt OR |
| `rtl/apb_interface.sv` | APB slave state tracking, write/read strobes, PREADY |
| `rtl/apb_demux.sv` | 1-to-4 strobe demultiplexer and read-data multiplexer |
| `rtl/uart_core.sv` | one channel: registers, FIFOs, TX, RX, baud generator, time-out, interrupts |
| `rtl/uart_tx.sv` | transmitter state machine |
| `rtl/uart_rx.sv` | receiver main and shift state machines, break counter |
| `rtl/baud_gen.sv` | divisor counter and /16 baud counter |
| `rtl/sync_fifo.sv` | single-clock FIFO with top/bottom pointers and fill counter |
| `rtl/uart_intr_ctrl.sv` | interrupt priority encoder |
| `rtl/skew_loopback.sv` | selectable-delay loopback line |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_quad_uart_full.sv` at full size |
| `tb/apb_bfm.sv` | APB master bus-functional model (interface with write/read tasks) |

## Bus interface

Top-level ports: `pclk`, `presetn` (active low, asynchronous), `psel` (the
transfer request, PSEL), `pselect[1:0]` (channel number), `penable`,
`pwrite`, `pread`, `paddr[2:0]`, `pwdata[7:0]`, `prdata[7:0]`, `pready`,
`intr_out`, `tx_out[3:0]`, `rx_in[3:0]`, `loopback[3:0]` and
`skew_sel[3:0][7:0]`.

The slave follows the three APB phases. IDLE has `psel` low. SETUP has
`psel` high and `penable` low, for exactly one cycle. ACCESS has both high.
The slave never stalls: `pready` is high in every ACCESS cycle, so a
transfer takes two clocks. A new transfer may go straight from ACCESS to
SETUP.

An ACCESS cycle is accepted only if the cycle before it was SETUP. In that
cycle the interface raises a one-clock write strobe (`pwrite` high) or read
strobe (`pwrite` low and `pread` high). The demux steers the strobe to
channel `pselect`. The register update, or the read side effect (FIFO pop,
flag clear), takes place on the clock edge that ends ACCESS. `prdata` is
combinational from the selected channel's registers and is valid during
ACCESS.

Two assertions in `apb_interface` flag bus protocol violations: an ACCESS
without a SETUP before it, and a SETUP that lasts more than one cycle.

## Register map of one channel

| `paddr` | read | write |
|---|---|---|
| 0 | RBR: pops the RX FIFO (DLL if LCR[7]) | THR: pushes the TX FIFO (DLL if LCR[7]) |
| 1 | IER[3:0] (DLM if LCR[7]) | IER (DLM if LCR[7]) |
| 2 | IIR = `{2'b11, 2'b00, id[3:0]}` | FCR: [1] clear RX FIFO, [2] clear TX FIFO, [7:6] RX trigger 1/4/8/14 |
| 3 | LCR | LCR |
| 5 | LSR | - |
| 4, 6, 7 | 0 | ignored |

The LCR fields are:

- `[1:0]`: data bits minus 5.
- `[2]`: extra stop bits. The frame then has 1.5 stop bits for 5-bit
  characters and 2 stop bits otherwise.
- `[3]`: parity enable.
- `[4]`: even parity.
- `[5]`: stick parity. The parity bit is then 0 with even selected and 1
  with odd selected.
- `[6]`: break. The line is held low.
- `[7]`: divisor latch access.

LSR bits:

- `[0]`: data ready.
- `[1]`: overrun.
- `[2]`: parity error.
- `[3]`: framing error.
- `[4]`: break.
- `[5]`: THR empty, meaning the TX FIFO is empty.
- `[6]`: transmitter empty, meaning the FIFO is empty and the shifter is
  idle.
- `[7]`: at least one character with a parity or framing error is still in
  the RX FIFO.

Bits 1 to 4 are sticky and are cleared by reading the LSR.

Reset values:

- LCR = `03h` (8N1).
- Divisor = 0, which keeps the baud generator stopped until software writes
  a divisor.
- IER = 0, FIFOs empty.

## Baud rate

`baud_gen` counts Pclk down from divisor−1. Each time the count reaches
zero it gives a one-clock **Baudx16** tick and reloads. A 4-bit counter
divides these ticks by 16 to form the baud clock (`baud_clk`, a square wave)
and a baud tick. Writing DLL or DLM restarts the count one clock later.

Both the transmitter and the receiver run on the Baudx16 tick. The whole
channel is synchronous to `pclk`, and the ticks are clock enables, not
clocks. The divisor is `f_pclk / (16 × baud)`. For example, 100 MHz at
115200 baud needs divisor 54 (36h), which gives 864 clocks per bit and
8640 clocks per 8N1 frame.

## Transmitter

`uart_tx` is a six-state machine: Idle, Load, Shift, Parity, Stop_One and
Stop_Multiple.

1. In Idle, on a Baudx16 tick, if the TX FIFO has data and break is off,
   the FSM pops a byte. The byte is masked to the word length and its
   parity is computed.
2. Load drives the start bit.
3. Shift sends the data bits LSB first.
4. Parity is entered only when parity is enabled.
5. Stop_One sends one stop bit.
6. Stop_Multiple is used only when LCR[2] is set. It lasts 8 ticks for a
   5-bit word (1.5 stop bits) and 16 otherwise.

Every bit is exactly 16 ticks, because a frame only starts on a tick. If
another byte is waiting at the last tick of the stop bit, the FSM passes
through Idle in the same clock. Back-to-back frames are therefore exactly
16 × (frame bits) ticks apart, with no gap.

## Receiver

This is the most involved part of the channel. `uart_rx` first passes the
line through a two-flop synchroniser. Two cooperating state machines and
two counters then do the work.

**Main FSM**, always running:

| from | to | when |
|---|---|---|
| Idle | Hunt | falling edge on the line |
| Hunt | Idle | line high again at the middle of the start bit (8th tick): a glitch |
| Hunt | Wait | line still low at the middle of the start bit: valid start |
| Wait | Save | the shift FSM is done and the middle of the stop bit is reached; the stop bit is sampled |
| Save | Idle | character handed over |
| Save | Wait | self recovery after a framing error |

In Save, the receiver hands the character and its parity and framing flags
to the RX FIFO in a one-clock push.

**Self recovery.** When the stop sample was low, the data was not all
zero, and the line is still low, the receiver takes that low sample as the
middle of the next start bit. It then carries on without hunting for an
edge, so a frame that follows without a valid stop bit is not lost. An
all-zero character with a framing error is treated as the start of a
break: the receiver goes to Idle and waits for the line to rise.

**Sample counter and shift FSM.** The sample counter runs only in Hunt and
Wait. It marks the middle of each bit: 8 ticks after the edge, then every
16 ticks. At each mark the shift FSM shifts in one of the 5 to 8 data bits,
then the parity bit if enabled. It then signals done.

**Break counter.** It is independent of the FSMs. While the line is high it
is reloaded with 16 × (start + data + parity + 1 stop) − 1 ticks; for 8N1
that is 9Fh. While the line is low it counts down, and at zero it pulses
`brk` once. Because the stop bit is sampled at tick 16 × (data + parity +
1) + 8, the framing error of a break always reaches the LSR before the
break bit: 8 ticks earlier with no parity.

**Overrun.** A character that arrives while the RX FIFO is full is
dropped, and LSR[1] is set.

## Interrupts

`uart_intr_ctrl` ranks four sources, each gated by IER:

| priority | source | IIR[3:0] | set when | cleared by |
|---|---|---|---|---|
| 1 | line status (IER[2]) | 0110 | OE, PE, FE or BI set | reading LSR |
| 2 | data available (IER[0]) | 0100 | RX FIFO count ≥ trigger level | reading until below trigger |
| 3 | character time-out (IER[0]) | 1100 | time-out counter expires | reading RBR |
| 4 | THR empty (IER[1]) | 0010 | TX FIFO becomes empty, or IER[1] set while empty | writing THR, or reading IIR while it is the source |

With nothing pending, IIR reads 0001 and the channel interrupt is low.

**Time-out counter.** The time-out counter is reloaded on every RX FIFO push
or pop and while the FIFO is empty. It holds 4 character times, where one
character time is 16 × (1 + data bits + stop bits) ticks; parity is not
counted. It counts Baudx16 ticks down while the FIFO holds data. When it
reaches zero, the time-out interrupt is raised.

## Skewed loopback

`skew_loopback` is a 255-stage shift register on `pclk`, reset to the idle
(high) line level. `skew_sel` picks the tap, so the receiver sees the
transmitter delayed by 0 to 255 clocks. In the top, `loopback[i]` switches
channel *i*'s receiver from `rx_in[i]` to this path.

The system testbench draws the skews at random. It also picks the channel
under test from a seeded random number: the two low bits of `$urandom(seed)`
for seeds 12, 15, 31 and 7.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `quad_uart_top` | `NUM_UART` | 4 | the demux and `pselect` width follow it |
| `quad_uart_top`, `uart_core` | `FIFO_DEPTH` | 128 | entries in each TX and RX FIFO |
| `quad_uart_top`, `skew_loopback` | `SKEW_W` | 8 | loopback delay 0 .. 2^SKEW_W−1 clocks |
| `sync_fifo` | `DEPTH`, `WIDTH` | 128, 8 | the RX FIFO is 10 bits wide (data, PE, FE) |
| `baud_gen` | `DIV_W` | 16 | divisor width |

At the defaults the top synthesises to about 1770 flip-flops plus 9216 bits
of FIFO memory: 4 channels × (128 × 8 + 128 × 10).

## Where this design departs from, or fills in, the original

These points follow the 16550 or are this implementation's own choices,
where the original only names the feature:

- The register map, the IER, FCR and LSR bit positions, the IIR codes and
  priority, and the trigger levels 1/4/8/14.
- The reset values: LCR = 8N1 and divisor 0.
- No modem control or status registers and no scratch register. The FIFOs
  are always on, and FCR[0] is ignored.
- The baud "clocks" are clock enables in the `pclk` domain. The original
  speaks of separate system, receive-reference and baud clock domains.
- PREADY high ends ACCESS, as in AMBA APB, and the slave has no wait states.
  The original text also contains the opposite reading, with PREADY high
  holding the bus in ACCESS; this design does not follow it.
- `pread` is a qualifier for reads. `psel` is a separate 1-bit request next
  to the 2-bit `pselect`.
- PE and FE are sticky LSR flags, set when the bad character enters the
  FIFO. A 16550 instead shows the flags of the character at the head of
  the FIFO. Break is reported through LSR[4] from the break counter; no
  second zero character is queued.
- FIFO size: 128 entries, as the original text states. One of its
  waveforms shows a 16-entry FIFO; that size is used in the FIFO unit
  test.
- The loopback delay line and its ports are this implementation's way of
  building the random-skew loopback into the design.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a
line `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_apb_interface` | strobes, PREADY and state register per cycle; back-to-back and idle gaps |
| `tb_apb_demux` | all select and strobe combinations, read-data selection |
| `tb_baud_gen` | tick periods for divisors 1, 2, 7, 54; baud clock duty cycle; divisor 0 stops; restart latency |
| `tb_sync_fifo` | 16-deep: fill, overrun, drain order, underrun, simultaneous push/pop, clear, 3000 random operations against a queue model |
| `tb_uart_tx` | all 64 LCR settings: every bit at mid-bit, parity, frame length in ticks, back-to-back spacing, break |
| `tb_uart_rx` | all 64 LCR settings at random phase; parity errors; framing error with self recovery; glitch rejection; break ordering and timing (160 ticks for 8N1) |
| `tb_uart_intr_ctrl` | all 256 combinations of enables and sources |
| `tb_skew_loopback` | output equals input delayed by 0, 255 and random taps |
| `tb_uart_core` | reset values, divisor latch, every interrupt kind with its set/clear rules, round-trip data and frame time, time-out after exactly 4 character times, parity error, break, overrun, FCR clear |
| `tb_quad_uart_top` | whole design, 4 channels at divisors 2..5 with random skews, seeded channel choice, frame length on the line, and at least one each of: back-to-back transfers, THR empty, data available, time-out, parity error, framing error, break, overrun; the combined interrupt line |
| `tb_quad_uart_full` | default parameters, divisor 54: 128 characters fill one channel's FIFOs, the 129th overruns, and three more channels run at the same time; 8640-clock frame period |

To run one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/uart_pkg.sv tb/tb_quad_uart_top.sv --top-module tb_quad_uart_top
./obj_dir/Vtb_quad_uart_top
```

Replace the testbench name to run any other. Every testbench runs in a few
seconds; the full-size one simulates about 1.2 million clocks.

Not verified: timing at a real clock frequency, gate-level behaviour, and
receivers whose clock frequency differs from the transmitter's. The
loopback tests vary only the phase, not the rate.
