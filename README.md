# Self-secured devices for TrustZone systems

On an Arm TrustZone system, a secure world (an RTOS, say) and a non-secure world
(a general-purpose OS) often need the same peripheral: one timer, one UART. The
usual answers are slow or weak. A hypervisor can trap and forward every
non-secure access ("para-TrustZone"). Alternatively, the device can be handed back
and forth between the worlds ("repartitioning"), which costs thousands of cycles
each time.

A *self-secured device* moves that job into the peripheral itself. Each access
on the AXI bus carries the TrustZone non-secure bit, `AxPROT[1]`. The device
keeps the state each world needs in two banks:
- it checks that bit on every access;
- it refuses the non-secure world anything in the secure bank;
- it signals secure events on FIQ and non-secure events on IRQ.

In a TrustZone system the interrupt controller sends FIQs to the secure world and
IRQs to the non-secure world. Both worlds therefore use the device directly,
at native speed, with no software in the access path. Only the secure world can
change the settings that affect both.

This repository holds two such devices, side by side under one top
(`ss_devices_top`):

| device | based on | what is duplicated |
|---|---|---|
| `ss_private_timer` | Cortex-A9 private timer | load value, counter, enable, auto-reload, interrupt flag |
| `ss_uart` | Cadence UART as found in Zynq-7000 | Tx and Rx FIFOs, FIFO trigger levels, interrupt status, serial pins. The transmitter, receiver, baud generator and configuration are shared. |

The processor, the AXI interconnect and the reset generator of a real system
are not part of the RTL. Each device has its own AXI4-lite slave port, and
addresses are byte offsets within the device. The four interrupt lines
(`tmr_fiq`, `tmr_irq`, `uart_fiq`, `uart_irq`) are meant for the interrupt
controller's fabric inputs. The design uses one clock and one synchronous,
active-low reset. The reference system ran at 50 MHz.

## Who may touch what: the access check

Both devices share one AXI4-lite front end, `axil_slave`. It turns each bus
transaction into a one-cycle strobe on a simple register bus. The write or read
strobe carries the latched address, the data and the non-secure bit. The
register file behind it answers two questions combinationally: whether the
access is allowed, and what the read data is.

A refused access has no effect and is answered with `SLVERR`, and a refused read
returns zero. The reference design only says that such accesses are
blocked. Signalling the refusal with `SLVERR` is a choice of this
implementation, so that a misbehaving driver sees a bus error rather than
silently wrong data.

Latency at the device port, the same for both worlds and for every register:
- **Write:** `AWVALID` and `WVALID` are accepted together. `BVALID` follows two
  cycles after the handshake, so a write takes 3 cycles with a ready master.
- **Read:** the register strobe comes one cycle after the `AR` handshake, and the
  data is sampled one cycle later. That extra cycle lets a FIFO with a
  registered output deliver its byte. `RVALID` follows, so a read takes 4
  cycles.

Only one transaction per channel is outstanding.

## The self-secured private timer

The timer has two 32-bit down-counters. Each has its own load register, enable,
auto-reload and interrupt flag. Both counters are clocked by one 8-bit prescaler,
which ticks every `prescaler + 1` cycles. A write to a load register also loads
its counter.

While a counter is enabled, it moves one step per tick:
- above zero, it counts down;
- at zero, it reloads if auto-reload is set, and otherwise stays at zero.

The event fires on the tick that takes the counter from 1 to 0. An auto-reload
timer therefore fires every `(load + 1) * (prescaler + 1)` cycles.

| offset | register | secure world | non-secure world |
|---|---|---|---|
| 0x00 | secure load | read/write | refused |
| 0x04 | secure counter | read/write | refused |
| 0x08 | control | all bits | bits 3 and 4 only |
| 0x0C | interrupt status (write 1 to clear) | both flags | bit 1 only |
| 0x10 | non-secure load | read/write | read/write |
| 0x14 | non-secure counter | read/write | read/write |

Control bits:

| bit(s) | meaning |
|---|---|
| 0 | secure enable |
| 1 | secure auto-reload |
| 2 | secure interrupt enable |
| 3 | non-secure enable |
| 4 | non-secure auto-reload |
| 5 | non-secure interrupt enable |
| 15..8 | prescaler |

The non-secure world may start, stop and re-arm its own counter. It may not:
- change the prescaler, which the secure counter shares;
- enable its own interrupt. Whether non-secure events raise an interrupt at all
  is a secure decision.

A non-secure write to the control register changes bits 3 and 4 and ignores the
rest, and a non-secure read shows only bits 3 and 4. The secure flag (status
bit 0) drives `fiq` and can only be cleared by the secure world. The
non-secure flag (bit 1) drives `irq`.

The first three control bits and the prescaler field keep the positions of the
original timer. Bits 3 to 5 are this design's placement of the added controls.
The reference design also sketches a "minimal" variant, in which only the
interrupt path is banked. That variant is not built here.

## The self-secured UART

### Shared engines, two terminals

Duplicating the whole UART would nearly double its size. Instead, the device
keeps one transmitter, one receiver and one baud rate generator. It gives each
world its own pair of 64-byte FIFOs and its own pair of serial pins:
`txd_s`/`rxd_s` for the secure terminal and `txd_ns`/`rxd_ns` for the
non-secure terminal. The hard part is deciding who gets the shared engines.

**Transmitter.** Whenever the transmitter is idle and allowed to start, it fetches
the next character from the secure Tx FIFO if that FIFO holds anything.
Otherwise it fetches from the non-secure Tx FIFO. "Allowed to start" means
enabled, CTS granted, and no break requested. A character already on the line
is always finished; priority decides only the next fetch.

The character is shifted out on the pin of the world it came from. The other
pin stays at the idle level, 1. So a non-secure string written while secure
traffic is queued waits until the secure FIFO is empty. A non-secure character
can never appear on the secure pin, and a secure one never on the non-secure pin.

**Receiver.** The receiver watches both RxD lines. A falling edge on a line is
only a candidate start bit. The line must still be low at the middle of the
bit, with the last three samples low. The receiver then locks onto that line
and re-aligns its bit clock (`rx_resync`) so that data bits are sampled in
their middle. Each data, parity and stop bit is the 2-of-3 majority of the
samples around that point. The finished character goes into the Rx FIFO of the
line it arrived on.

If a secure start bit arrives while a non-secure character is being received,
the secure character wins. The receiver switches to the secure line and the
partial non-secure character is lost. The reverse never happens. A secure
sender therefore cannot be disturbed from the non-secure side. The
non-secure world, in turn, must accept that its characters can be lost while
the secure terminal talks.

**Shared configuration.** Baud rate, data format, channel mode, flow control,
enables and the interrupt mask are secure-only. Both worlds use the same line
settings.

### Register map

Secure bank (secure world only; the non-secure world gets `SLVERR`):

| offset | register | offset | register |
|---|---|---|---|
| 0x00 | control | 0x24 | modem control |
| 0x04 | mode | 0x2C | channel status (RO) |
| 0x08 | interrupt enable (IER) | 0x30 | secure Tx FIFO |
| 0x0C | interrupt disable (IDR) | 0x34 | baud rate divider |
| 0x10 | interrupt mask (IMR, RO) | 0x38 | flow control delay |
| 0x14 | secure interrupt status | 0x3C | secure Tx trigger level |
| 0x18 | baud rate generator | 0x40 | secure Rx FIFO |
| 0x1C | receiver timeout | | |
| 0x20 | secure Rx trigger level | | |

Open to both worlds:

| offset | register |
|---|---|
| 0x28 | modem status |
| 0x44 | non-secure Rx trigger level |
| 0x48 | non-secure Tx trigger level |
| 0x4C | non-secure Rx FIFO |
| 0x50 | non-secure Tx FIFO |
| 0x54 | non-secure interrupt status |
| 0x58 | non-secure channel status (RO) |

The first seventeen registers keep the offsets and bit layout of the original
UART, so an unmodified secure driver works. The non-secure driver only needs
its register offsets moved to the block at 0x44. Writing a Tx FIFO register
pushes the low byte into that FIFO. Reading an Rx FIFO register pops one byte,
and an empty FIFO reads 0.

**Control register (0x00):**

| bit(s) | meaning |
|---|---|
| 0 | receiver soft reset: empties both Rx FIFOs |
| 1 | transmitter soft reset: empties both Tx FIFOs |
| 2 / 3 | Rx enable / disable |
| 4 / 5 | Tx enable / disable |
| 6 | restart the receiver timeout |
| 7 / 8 | start / stop break |

Bits 0, 1 and 6 clear themselves. The reset value is 0x128: everything disabled,
break stopped.

**Mode register (0x04):**

| bit(s) | meaning |
|---|---|
| 0 | clock select: baud generator input is `clk` or `clk/8` |
| 2..1 | character length: 0x = 8 bits, 10 = 7 bits, 11 = 6 bits |
| 5..3 | parity: 1xx = none, 000 / 001 = computed, 010 = forced 0, 011 = forced 1 |
| 7..6 | stop bits: 00 = one, otherwise two |
| 9..8 | channel mode |

For parity 000, the parity bit is 1 when the data holds an even number of ones.
For 001, it is 1 when the number of ones is odd. This follows the transmitter
of the reference design. Set your terminal program accordingly: 000 behaves as
what most terminals call odd parity.

A stop-bit setting of 1.5 is sent as two stop bits.

**Channel modes (mode bits 9..8):** both terminals switch together.

| value | mode | receiver listens to | TxD pin carries |
|---|---|---|---|
| 00 | normal | RxD pin | transmitter |
| 01 | automatic echo | RxD pin | RxD (echo) |
| 10 | local loopback | its own transmitter | idle (1) |
| 11 | remote loopback | idle (1) | RxD (echo) |

**Baud rate:**

    sample rate = clk_sel_clock / cd            (cd = register 0x18, 0 stops it)
    bit rate    = sample rate / (bdiv + 1)      (bdiv = register 0x34, >= 3)

The reset values are cd = 651 and bdiv = 15, which give 4800 baud at 50 MHz.
The testbenches use cd = 2 and bdiv = 7, which is 16 clock cycles per bit.

### Interrupts: the same event, routed by whose it is

IER, IDR, IMR and both status registers share one bit layout:

| bit | event | bit | event |
|---|---|---|---|
| 0 | Rx FIFO at or above trigger | 7 | parity error |
| 1 | Rx FIFO empty | 8 | receiver timeout |
| 2 | Rx FIFO full | 9 | modem status change |
| 3 | Tx FIFO empty | 10 | Tx FIFO at or above trigger |
| 4 | Tx FIFO full | 11 | Tx FIFO nearly full (one slot left) |
| 5 | Rx overflow | 12 | Tx FIFO overflow |
| 6 | framing error | | |

Writing 1s to IER sets mask bits, and writing 1s to IDR clears them. IMR shows
the mask. A status bit is set on the rising edge of an event whose mask bit is
set, and writing 1 to the status bit clears it.

Each event is produced twice, once per world:
- FIFO events come from that world's FIFOs.
- Receiver errors are tagged with the line the character came in on:
  - parity: the parity bit does not match;
  - framing: a stop bit is sampled low, reported once per character;
  - overflow: the Rx FIFO stayed full and the next start bit arrived, so the
    waiting character is dropped;
  - timeout: no new start bit for the programmed number of bit periods after
    the last character. It belongs to the world of that last character.
- Modem status changes are counted as secure.

Secure events set the secure status register (0x14), whose OR drives `fiq`.
Non-secure events set the non-secure one (0x54), whose OR drives `irq`. A parity
error on the non-secure line therefore interrupts only the non-secure OS, and
the non-secure OS cannot clear or even see secure events. The mask is a single
secure-only register. Whether a non-secure event may interrupt at all is the
secure world's decision, just as for the timer.

### Modem lines and flow control

CTS, DSR, RI and DCD pass through two-flop synchronisers. The modem status
register shows their levels and a change bit for each. RI's change bit is set
on its trailing edge. Writing 1 clears a change bit.

Modem control drives DTR and RTS directly, unless automatic flow control
(bit 5) is on. In that mode:
- RTS and DTR drop while the fuller Rx FIFO is at or above the flow-delay level;
- the transmitter waits for CTS before starting a character.

One set of modem pins serves both terminals.

## Where this design interprets the reference

These points are where the reference leaves a choice open, or where it is
inconsistent and one reading had to be picked:

- **Timer interrupt status bits.** One code example in the reference puts the
  overflow flag at bit 0 and contradicts its own register figure. This design
  follows the figure: bit 0 secure, bit 1 non-secure.
- **Timer prescaler field.** The prescaler field is bits 15..8, as in the
  original timer.
- **UART parity polarity.** Parity codes 000/001 follow the reference
  transmitter (see the mode register above).
- **UART reset values.** The reset values of control, baud rate, divider and
  trigger levels are the original UART's.
- **UART errors, FIFO and timeout.** Characters with parity or framing errors
  are still stored. Both FIFOs are flushed by the soft resets. The timeout
  counts whole bit periods.
- **Modem status change.** It goes to the secure side only, because the modem
  pins are shared.
- **Refused accesses** answer `SLVERR` (see above).
- **One clock domain.** The baud generator produces clock enables instead of
  a divided clock.
- **Not built:** the minimal timer variant, and anything on the processor side.

## Verification

Each module has a self-checking testbench in `tb/` named `tb_<module>`. Each
ends by printing `TB_RESULT checks=<n> failures=<n>` and stops itself after a
fixed number of cycles if it hangs. Helpers:
- `axil_bfm`: an AXI4-lite master whose tasks take the non-secure bit as an
  argument;
- `uart_term`: a serial terminal that sends frames and decodes what it
  receives.

`tb_ss_devices_top` runs the whole design at its default parameters. It
plays both worlds on both buses, drives both terminals, and counts every
mechanism it sees. A mechanism that never happened counts as a failure:
- refused non-secure accesses;
- timer FIQ and IRQ and the timer period;
- both timer banks run by the secure world;
- strings on the right terminals;
- secure transmit priority;
- secure receive pre-emption;
- parity errors routed to FIQ or IRQ by line;
- Rx and Tx FIFO overflow;
- receiver timeout;
- local loopback;
- modem change;
- a character at the reset baud rate.

Simulate any testbench with plain Verilator 5, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
        rtl/ss_pkg.sv tb/tb_ss_devices_top.sv --top-module tb_ss_devices_top
    ./obj_dir/Vtb_ss_devices_top

Replace the testbench name to run another one. The full-system test runs in a
few seconds.

## Files

- `rtl/ss_pkg.sv`: register offsets, bit positions and the shared types.
- `rtl/axil_slave.sv`: the AXI4-lite front end.
- Timer: `rtl/timer_prescaler.sv`, `rtl/timer_counter.sv` (one counter bank),
  `rtl/ss_private_timer.sv`.
- UART:
  - `rtl/uart_baud_gen.sv`
  - `rtl/uart_fifo.sv`
  - `rtl/uart_tx.sv`
  - `rtl/uart_rx.sv`
  - `rtl/uart_mode_switch.sv`
  - `rtl/uart_modem.sv`
  - `rtl/uart_ctrl_status.sv` (registers, access check, interrupts)
  - `rtl/ss_uart.sv`
- `rtl/ss_devices_top.sv`: both devices with their own bus ports.

Each file opens with a description of its function, interface and timing.
