# SpaceWire link interface with an AMBA AHB slave

This is a SpaceWire node for a processor system on chip. SpaceWire is the
serial point-to-point link the European Space Agency standardised for
on-board networks. A processor on an AMBA AHB bus writes bytes into a small
memory-mapped window. The node packs them into SpaceWire characters and sends
them over two wires, Data and Strobe. The far end decodes them, checks them
and puts them into a receive window for its own processor. Between these two
ends sit the parts that make SpaceWire reliable:

- a link start-up handshake;
- credit-based flow control, so a sender never overruns the receiver;
- error detection and automatic link re-connection.

The RTL follows the report "RTL Design of SpaceWire Protocol and AMBA
Interface with LEON Processor". The SpaceWire codec, its exchange-level state
machine and the AHB slave interface are built here. The LEON3 processor, the
AHB controller, the APB bridge, the memory controller and the other
system-on-chip peripherals are not included. They are standard library cores
that the report reuses rather than designs. A system would attach
`spw_ahb_top` to such a bus as one more AHB slave.

Everything is synthesizable SystemVerilog on one clock, 50 MHz by default.

## Structure

```
                 spw_ahb_top
  AHB  ┌──────────────────────────────┐
 ─────►│ spw_ahb_slave                │
 ◄─────│  Idle/Read/Write FSM         │
       │  Tx AHB FIFO ─┐  ┌─ Rx AHB FIFO
       │  status/control/time regs    │
       └───────────────┼──┼───────────┘
                       ▼  │
       ┌───────────────────────────────┐
       │ spw_codec                     │
       │  spw_fifo (transmit, 128)     │
       │  spw_tx ◄── spw_tx_clock      │──► Dout, Sout
       │  spw_time_buf                 │
       │  spw_fsm ◄─► spw_timer        │
       │  spw_rx ◄── spw_rx_clkrec     │◄── Din, Sin
       │  spw_rx_fifo (receive, 128,   │
       │               credit counter) │
       └───────────────────────────────┘
```

Files in `rtl/`:

| file | contents |
|---|---|
| `spw_pkg.sv` | link state enum, control codes, N-Char type, ns-to-cycles helper |
| `ahb_pkg.sv` | AHB slave input/output structs, HTRANS/HRESP codes |
| `spw_ahb_top.sv` | top: AHB slave plus codec; AHB structs and DS pins are ports |
| `spw_ahb_slave.sv` | AHB slave FSM, Tx/Rx AHB FIFOs, registers, interrupt |
| `spw_codec.sv` | one SpaceWire link end (everything below) |
| `spw_tx.sv` | character builder, parity, DS encoder, transmit credit |
| `spw_tx_clock.sv` | bit-rate tick divider |
| `spw_rx_clkrec.sv` | D/S synchronisers, bit strobes, disconnect timeout |
| `spw_rx.sv` | character decoder, NULL search, parity/escape/empty-packet checks |
| `spw_fsm.sv` | exchange-level state machine |
| `spw_timer.sv` | 6.4 us / 12.8 us timer |
| `spw_fifo.sv` | first-word fall-through FIFO (transmit FIFO and both AHB FIFOs) |
| `spw_rx_fifo.sv` | receive FIFO with FCT credit bookkeeping |
| `spw_time_buf.sv` | one time code held each way |

Each file opens with a comment on what it does, its interface and timing,
and which parts are SpaceWire or report behaviour and which are local choices.

## Characters on the wire

SpaceWire sends one bit per bit period on D. S toggles whenever D does *not*
change, so D xor S toggles exactly once per bit. The receiver gets its bit
clock from that xor and needs no clock wire. In `spw_tx` this is one line:
the next S is the new bit xor the inverse of (old D xor old S).

Every character starts with a parity bit, then a flag bit, then a payload,
least significant bit first:

| character | flag | payload | length |
|---|---|---|---|
| data | 0 | 8 data bits | 10 bits |
| FCT | 1 | 0 0 | 4 bits |
| EOP | 1 | 0 1 | 4 bits |
| EEP | 1 | 1 0 | 4 bits |
| ESC | 1 | 1 1 | 4 bits |
| NULL | ESC then FCT | | 8 bits |
| time code | ESC then a data character | | 14 bits |

The payload bits are listed in the order they are sent. Parity is odd. It
covers the previous character's payload, the current parity bit and the
current flag. So the parity bit always sits at the boundary between two
characters.

The receiver cannot know where characters start until it has seen one. Out of
reset `spw_rx` slides a 7-bit window over the incoming bits and waits for
`1110100`: the flag and code of an ESC, the parity of the FCT that follows,
and that FCT's flag and code. That pattern is the first NULL, and from it
on the decoder counts bits as parity, flag and payload. Characters, parity
errors and escape errors before the first NULL are ignored. This is also why
the link needs NULLs during start-up.

On the host side an N-Char is 9 bits. Bit 8 is the control flag: `9'h0xx` is
a data byte, `9'h100` is EOP and `9'h101` is EEP.

## Link start-up and error recovery

`spw_fsm` implements the six SpaceWire link states. The times are at the
default 50 MHz clock.

- **ErrorReset.** The transmitter is off and the receiver is held. After
  6.4 us (320 cycles) the link goes to ErrorWait.
- **ErrorWait.** The receiver is on and looks for a NULL. After 12.8 us
  (640 cycles) the link goes to Ready. A disconnect, or any character other
  than a NULL, goes back to ErrorReset. Parity and escape errors count only
  after the first NULL.
- **Ready.** The link waits for `[Link Enabled]`, which is
  `(link_start | (autostart & gotNULL)) & !link_disable`.
- **Started.** The transmitter sends NULLs. If a NULL was received and at
  least one NULL was sent, the link goes to Connecting. After 12.8 us without
  one it goes to ErrorReset.
- **Connecting.** The transmitter sends FCTs and NULLs. A received FCT moves
  the link to Run. A timeout or error goes to ErrorReset.
- **Run.** N-Chars flow both ways. The link goes back to ErrorReset on:
  - a disconnect, parity, escape, credit or empty-packet error;
  - `link_disable`.

Errors during start-up are expected and are not reported. An error in Run
pulses `link_error`, and the AHB slave keeps it as a sticky status bit and an
interrupt.

When a link leaves Run, its transmitter stops in a controlled way. S drops
first, then D a clock later, so the far end never sees D and S change
together. The far end then sees no transitions and times out after 850 ns
(43 cycles) with a disconnect error. It resets as well, and both ends run the
6.4 + 12.8 us sequence again before they reconnect. In the test a node that
drops its output this way can also cause a parity error at the far end,
because the last one or two transitions make up a broken character. That is
a receiver error and triggers the same recovery.

## Flow control

A sender may only send an N-Char for which the receiver has promised room.
The receiver makes a promise by sending an FCT, which is worth 8 N-Chars.

- **Receive side (`spw_rx_fifo`).** The FIFO counts its outstanding credit.
  It offers an FCT when both of these hold:
  - its free places minus the places already promised are at least 8;
  - the outstanding credit is at most 56 − 8.

  The transmitter sends the FCT and reports it back, and the credit rises by
  8. Every N-Char written into the FIFO uses one credit. An N-Char that
  arrives with no credit left is a credit error, and it is not stored.
- **Transmit side (`spw_tx`).** Each FCT received adds 8 to the credit, up
  to 56. An FCT that would take it past 56 is a credit error. Each N-Char
  sent uses one credit, and at zero N-Char transmission stops while NULLs
  keep the link alive.

The receive-side credit is cleared while the link may not send FCTs, that is
before Connecting. The transmit-side credit is cleared while the transmitter
is disabled. The FIFO contents are kept.

Because credit is granted 8 at a time, a full 128-entry receive FIFO may
stop at 120 to 128 entries. The exact number depends on how the FCTs lined
up. The testbenches accept that range.

Character priority in the transmitter, from highest to lowest:

1. the second half of a NULL or time code already started;
2. a time code;
3. an FCT;
4. an N-Char;
5. a NULL.

A host word with bit 8 set and bits 7:1 not zero is not a valid character.
SpaceWire says the transmitter must ignore it, stop sending N-Chars and
report the error. `spw_tx` takes it from the FIFO without sending it, pulses
`invalid_err` (status bit 21) and sends no more N-Chars. NULLs, FCTs and time
codes continue, so the link stays up. The halt ends when the transmitter is
disabled, which happens when software restarts the link (link disable, then
link start).

## Receive clock recovery

The receiver is clocked by the system clock, not by a recovered clock.
`spw_rx_clkrec` passes D and S through two-flop synchronisers. It emits a
bit strobe whenever D xor S changes, and takes D at that moment as the bit.
This needs the system clock to be at least 3x the incoming bit rate, which
gives about 16 Mbit/s at 50 MHz. In exchange there is no second clock
domain. The report's two-clock-domain helper block is therefore not needed
and not built.

The disconnect timer starts with the first transition after the receiver is
enabled. It fires after 850 ns without a transition.

## Transmit rate

`spw_tx_clock` divides the clock by `tx_div` (at least 2). It gives a one-cycle
bit tick, not a clock. The reset value 5 gives 10 Mbit/s at 50 MHz.

SpaceWire starts every link at 10 Mbit/s, and software may then raise the
rate. The control register's bits 15:8 set the divider at run time, and the
receiver follows any rate within its 3x limit.

## AHB interface

The slave answers every transfer with zero wait states and OKAY, so HRESP
and HSPLIT are constants. Its state machine has three states:

- Idle;
- Write, when HSEL, HREADY and HTRANS = NONSEQ/SEQ are seen with HWRITE = 1;
- Read, the same with HWRITE = 0.

From Write or Read a new valid address phase goes straight to the next
transfer, which is ordinary AHB pipelining.

| offset | access | meaning |
|---|---|---|
| 0x00–0x3C | write | bits 8:0: N-Char into the Tx AHB FIFO; dropped, with overflow set, if it is full |
| 0x00–0x3C | read | bit 31 valid, bits 8:0 N-Char from the Rx AHB FIFO; 0 if empty |
| 0x40 | read | 2:0 link state, 3 Tx FIFO full, 4 Rx FIFO empty, 5 overflow, 6 link error, 7 time code received, 15:8 last time code, 20:16 receiver errors seen, also during start-up {empty packet, credit, escape, parity, disconnect}, 21 invalid host character |
| 0x40 | write | clears the sticky bits 5, 6, 7 and 21:16 |
| 0x44 | r/w | 0 link start, 1 autostart, 2 link disable, 15:8 transmit divider |
| 0x48 | write | bits 7:0 sent as a time code |

The whole 16-word data window maps to the same FIFO. So a program that writes
consecutive words from the base address, as the report's processor test does,
sends them in order.

`irq` is high while received data is waiting or a link error is flagged.

The AHB FIFOs are 16 words deep. The codec's transmit and receive FIFOs are
128 deep.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `spw_ahb_top` | `CLK_KHZ` | 50000 | clock, used for the 6.4/12.8 us and 850 ns times |
| | `TX_DIV` | 5 | reset value of the transmit divider |
| | `FIFO_DEPTH` | 128 | codec transmit and receive FIFO depth |
| | `AHB_FIFO_DEPTH` | 16 | Tx/Rx AHB FIFO depth |
| `spw_codec`, `spw_tx`, `spw_rx_fifo` | `MAX_CREDIT` | 56 | 7 FCTs of 8 |

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
`tb/spw_tb_pkg.sv` holds a reference encoder and decoder written
independently of the RTL, and the transmitter and receiver tests compare
against it.

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog
ends it if it hangs. For example:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ahb_pkg.sv rtl/spw_pkg.sv tb/spw_tb_pkg.sv tb/tb_spw_ahb_top.sv \
  --top-module tb_spw_ahb_top -o sim
obj_dir/sim
```

Some notes on the testbenches:

- They reset everything that is read, so they also pass with random
  initial values (`+verilator+rand+reset+2`).
- `tb_spw_codec` connects two codecs to each other, plus a third codec
  looped back to itself.
- `tb_spw_ahb_top` runs two complete nodes at the default parameters, each
  driven by an AHB master model, through:
  1. start-up, with one side by link start and the other by autostart;
  2. the processor test pattern written to consecutive data-port words;
  3. a duplex transfer;
  4. time codes both ways;
  5. a flow-control stall with Tx FIFO overflow;
  6. a rate change;
  7. a corrupted bit;
  8. a cut cable, then a link disable and re-enable;
  9. an invalid host character, which halts N-Chars until the link is
     restarted;
  10. on a third node wired back to itself, the processor test, with each
      word read back from the address it was written to.

  It counts each of these and fails if one never happened. It also measures
  the start-up time from Started to Run: 2.18 us at one end and 2.88 us at
  the other, at 10 Mbit/s. Two NULLs and an FCT alone take 2 us. The rest is
  one NULL already in flight plus the synchroniser and decoder latency. The
  test simulates about 0.6 ms.

## Departures from the report and known limits

- **Host FIFOs are not reset by a link error.** SpaceWire resets the
  transmit and receive host interfaces in ErrorReset. Here only the credit
  counters are cleared, so data the processor queued before the link came up
  is not lost. On the receive side, a packet cut short when the link leaves
  Run is closed with an EEP written into the receive FIFO, because the EEP
  marks a packet ended by a link error. If that FIFO is full, the EEP is
  dropped. The transmit side does not discard the rest of a partly sent
  packet. After reconnection the far end receives the rest of it as a new
  packet.
- **Time codes.** A time code is sent as ESC plus a data character, and any
  received time code is passed on without a sequence check. The report also
  says an ESC is used only to form a NULL. The time-code format here follows
  the SpaceWire standard.
- **Time codes before Run.** A time code received before Run counts as an
  unexpected character.
- **Reading the data port.** A read returns the next received character. It
  does not return the value just written. The report's processor test prints
  the written value back. Here that holds only when the node's link is
  looped back to itself, and the end-to-end test checks that case.
- **Link rate.** The report quotes 2 to 200 Mbit/s. At a 50 MHz clock this
  design covers about 0.2–16 Mbit/s receive, and up to 25 Mbit/s transmit.
  Higher rates need a faster clock, or a recovered-clock receiver with a
  clock-domain crossing.
- **Only the FSM-driven AHB interface.** The report names two ways to attach
  the link to AHB: a direct one, with the link signals wired to the bus, and
  an indirect one, where a state machine moves data through the AHB FIFOs.
  Only the indirect one is described, and only it is built.
- **Not built:**
  - the plug&play configuration record;
  - the processor and the rest of the system on chip;
  - the LVDS drivers and receivers;
  - cables and connectors.

  The DS pins here are single-ended logic signals.
