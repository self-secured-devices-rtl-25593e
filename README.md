# Self-secured timer and UART for TrustZone systems

On an Arm TrustZone system-on-chip, a peripheral normally belongs to one
world at a time: either the secure world (for example a real-time OS under a
hypervisor) or the normal world (a general-purpose OS). If both need the same
timer or serial port, the usual options are slow (forwarding every access
through the secure monitor), unsafe (handing the device back and forth and
resetting it each time), or costly (two copies of the device).

A *self-secured device* builds the two worlds into the peripheral itself. One
physical device has two logical interfaces on one bus port. Every bus access
carries the TrustZone non-secure bit (`AWPROT[1]` / `ARPROT[1]` on AXI), and
the device uses that bit to decide which registers the access may reach:

* **secure-only registers** hold everything that could disturb the other
  world's use of the device (clock prescaler, baud rate, frame format,
  interrupt configuration, enables). The normal world cannot read or write
  them.
* **banked registers** are the working state a world needs for itself
  (counter and reload value, FIFOs, status). There is one copy per world.
  The normal world sees only its own copy. The secure world can reach both
  copies.
* **interrupts are split**: events of the secure bank raise **FIQ**, events
  of the non-secure bank raise **IRQ**. A GICv2 then delivers each one to
  its own world.

This repository holds SystemVerilog for two such devices: a low-complexity
timer and a medium-complexity UART. They stand side by side in
`ss_devices_top`.

## Bus access and the two windows

Both devices share one front end, `axil_ns_slave`. It is an AXI4-Lite slave
that handles one transaction at a time and turns it into a single-cycle
register access tagged `reg_ns`. The device decodes the address and the tag
in that same cycle:

| access                      | secure window | non-secure window |
|-----------------------------|---------------|-------------------|
| secure master (`AxPROT[1]=0`) | allowed       | allowed           |
| normal world (`AxPROT[1]=1`)  | **SLVERR**    | allowed           |

A refused access changes nothing, and a refused read returns 0. The
processor sees SLVERR as an external abort, so a hypervisor in the monitor
can trap the attempt. Unmapped addresses also get SLVERR.

Timing: a write (AW and W in either order) finishes in 3 clocks when the
master is always ready. A read also takes 3 clocks. A write that arrives
together with a read goes first.

The AXI4-Lite channels are packed structs (`axil_req_t`, `axil_rsp_t` in
`ss_pkg`). A whole slave port is therefore two signals.

## Timer (`ss_timer`)

The timer is modelled on the Cortex-A9 private timer. It has a 32-bit
down-counter with auto-reload or single-shot mode, a Load register, an 8-bit
prescaler and an event flag. Each world gets a complete counter bank
(`ss_timer_counter`: Load plus Counter). The Control and Interrupt Status
registers are not copied. Instead they are widened with bits for the second
world:

```
Control   [0] Enable (S)  [1] Auto Reload (S)  [2] FIQ Enable (S)
          [3] Enable (NS) [4] Auto Reload (NS) [5] IRQ Enable (S)
          [15:8] Prescaler (S)
Int Stat  [0] FIQ flag (S)   [1] IRQ flag (NS)      write 1 to clear
```

| offset | secure window     | offset | non-secure window                   |
|--------|-------------------|--------|-------------------------------------|
| 0x00   | Load (S)          | 0x20   | Load (NS)                           |
| 0x04   | Counter (S)       | 0x24   | Counter (NS)                        |
| 0x08   | Control (all bits)| 0x28   | Control, only bits 3..4 visible and writable |
| 0x0C   | Int Status (both) | 0x2C   | Int Status, only bit 1              |

The normal world can start, stop and re-mode its own counter. It cannot
change the prescaler, any interrupt enable, or the secure counter. It also
cannot clear the secure flag.

Counting works as follows:

* Both counters share one prescaler. It gives a tick every `PRESCALER+1`
  clocks while either counter is enabled.
* Writing Load also loads Counter.
* The tick that takes the counter from 1 to 0 sets the flag.
* In auto-reload mode, the next tick reloads the counter. The period is
  therefore `(Load+1)*(PRESCALER+1)` clocks.
* In single-shot mode, the counter stays at 0.
* `fiq` is the secure flag AND FIQ Enable, and `irq` is the non-secure flag
  AND IRQ Enable. Both are registered, so they rise 2 clocks after the event.

## UART (`ss_uart`)

The UART is the harder of the two devices, because it cannot simply be
split in half. It has one transmitter, one receiver, one baud generator and
one set of modem lines, but two worlds of data. The registers are divided
like this:

| secure only (window 0x000)                           | banked (secure at 0x000+off, non-secure at 0x100+off) |
|------------------------------------------------------|--------------------------------------------------------|
| 0x00 Control, 0x04 Mode                              | 0x14 Interrupt Status                                  |
| 0x08/0x0C/0x10 Interrupt Enable/Disable/Mask         | 0x20 Rx trigger level, 0x44 Tx trigger level           |
| 0x18 Baud Rate Generator, 0x34 Baud Rate Divider     | 0x28 Modem Status, 0x2C Channel Status                 |
| 0x1C Receiver Timeout                                | 0x30 FIFO (write: Tx FIFO, read: Rx FIFO)              |
| 0x24 Modem Control, 0x38 Flow Control Delay          |                                                        |

Each world has its own 64-byte Tx FIFO and 64-byte Rx FIFO (`ss_fifo`, four
instances). Bit fields are listed in the header of `rtl/ss_uart.sv` and as
constants in `rtl/ss_pkg.sv`.

### Sharing the transmitter: secure first

`uart_tx` picks a byte at each frame boundary. It takes from the secure Tx
FIFO whenever that FIFO holds data. It takes from the non-secure FIFO only
when the secure one is empty. A frame already on the line is always
finished. A secure byte written during a non-secure frame therefore leaves
right after that frame. Frames follow each other with no idle time. Both
worlds share the one TxD pin.

### Sharing the receiver: secure preempts

Each world has its own RxD input (`rxd_s`, `rxd_ns`). They feed a single
receive engine (`uart_rx`):

* If the receiver is idle, a falling edge on the secure line starts a
  secure frame. A falling edge on the non-secure line starts a non-secure
  frame.
* If a **secure** start bit comes while a **non-secure** frame is being
  received, the non-secure frame is dropped. The receiver restarts at once
  on the secure start bit. Nothing from the dropped frame reaches either
  FIFO.
* A non-secure start bit during a secure frame is ignored, and that
  character is lost.

A received byte goes into the Rx FIFO of the world whose line it came in
on. Its errors (parity, framing, overrun, break) are flagged in that
world's Interrupt Status.

Both lines pass a two-flop synchroniser. The receiver looks at them on the
oversampling strobe. It confirms a start bit half a bit later, then samples
each bit in its middle.

### Baud rate, format and modes

* Baud rate is `f_clk / (CD * (BDIV+1))` (`uart_baud_gen`). CD is the Baud
  Rate Generator and BDIV the Baud Rate Divider. BDIV is raised to at least
  3.
* Mode register:
  * `[2:1]` data length: 11 = 6 bits, 10 = 7 bits, otherwise 8 bits.
  * `[5:3]` parity: 000 even, 001 odd, 010 space, 011 mark, 1xx none.
  * `[7:6]` stop bits: 00 = 1, otherwise 2.
  * `[9:8]` channel mode (`uart_mode_switch`): normal, automatic echo,
    local loopback, remote loopback. The test modes act on the secure line
    only. In those modes the non-secure input is held idle.
* Control register: write-strobe bits for Rx/Tx reset (this flushes both
  worlds' FIFOs), Rx/Tx enable and disable, restart timeout, and start and
  stop break.
* Modem (`uart_modem_ctrl`):
  * Without automatic flow control, DTR and RTS follow Modem Control.
  * With automatic flow control (`MODEMCR[5]`), RTS drops when the fuller
    Rx FIFO reaches Flow Control Delay. It returns once the level is 4
    below that value or the FIFO is empty. No new frame starts while CTS is
    low.
  * The modem pins are active high at this boundary.

### Interrupts

Each world's Interrupt Status bits are sticky and cleared by writing 1.
Level conditions (trigger reached, empty, full, nearly full) set their bit
on the rising edge of the condition. Events set their bits when they
happen: overrun, framing, parity, break, Rx timeout, modem change, Tx
overflow.

A single secure-only mask applies to both banks:

* `fiq = |(ISR_secure & IMR)`
* `irq = |(ISR_nonsecure & IMR)`

Both are registered.

The Rx timeout uses one counter per world, loaded from the secure-only
Receiver Timeout value. It counts bit times while that world's Rx FIFO
holds data and no new byte arrives. After `4*RTO` bit times it flags
TIMEOUT.

## What follows the published design, and what does not

These parts follow the published design:

* The partition of registers into secure-only and banked, for both devices.
* The timer's Control and Interrupt Status bit layout.
* The 32-bit counters and 8-bit prescaler.
* The 64-byte FIFOs.
* FIQ for secure events and IRQ for non-secure ones.
* Secure-first transmission and secure-preempting reception.
* Filtering on AxPROT[1].

These parts are this implementation's own choices, because the published
design does not give them:

* All register offsets.
* The UART bit fields. They follow the common layout for a UART with this
  register set.
* SLVERR as the refusal answer.
* One AXI4-Lite port with two address windows. The alternative would be two
  separate ports.
* One shared UART interrupt mask.
* Sticky write-1-to-clear status.
* The flow-control hysteresis.
* The receiver's oversampling scheme.
* The behaviour of the channel modes with two Rx lines.
* Active-high modem pins.

Other departures and limits:

* A separate RxD input per world is an interpretation of "monitoring both
  secure and non-secure Rx signals". The original design is reported with
  two more I/Os than its native UART, which fits one extra line, but the
  exact pin list is not known.
* The modem lines and break generation belong to the secure world alone.
  The normal world only sees Modem Status.
* When a non-secure frame is dropped for a secure one, the normal world is
  not told.
* No DMA, and no 1.5-stop-bit timing (it is
  sent as 2).
* The processor, GIC and AXI interconnect are not included. Each device's
  AXI port and interrupt lines are top-level ports.
* Resource figures of the published FPGA devices do not apply to this RTL.

## Files

| file | content |
|------|---------|
| `rtl/ss_pkg.sv` | AXI4-Lite structs, register offsets and bit positions, UART frame format decode |
| `rtl/axil_ns_slave.sv` | AXI4-Lite slave front end with NS tagging |
| `rtl/ss_timer_counter.sv`, `rtl/ss_timer.sv` | timer counter bank; self-secured timer |
| `rtl/ss_fifo.sv` | byte FIFO (64 deep by default) |
| `rtl/uart_baud_gen.sv`, `rtl/uart_tx.sv`, `rtl/uart_rx.sv` | baud generator, secure-first transmitter, two-line receiver |
| `rtl/uart_mode_switch.sv`, `rtl/uart_modem_ctrl.sv` | channel modes; modem and flow control |
| `rtl/ss_uart.sv` | self-secured UART |
| `rtl/ss_devices_top.sv` | both devices side by side |
| `tb/axil_master.sv` | AXI4-Lite master model with tasks `write` and `read`, per-access world bit |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters:

* `ss_devices_top` / `ss_uart`: `FIFO_DEPTH` (default 64).
* `ss_fifo`: `DEPTH`, `W`.
* `ss_timer_counter`: `W` (default 32).

All defaults are the published sizes.

## Simulating

Every testbench checks its block against values it computes itself. It
prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a test
that hangs. `tb_ss_devices_top` runs both devices at their default sizes.
In it, two bus masters act as the secure and normal-world software at the
same time. The test counts every mechanism (timer FIQ/IRQ periods, refused
accesses, secure-first transmit, receive preemption, Rx timeout, Tx
overflow, local, echo and remote loopback, CTS stall, RTS flow control,
break, parity and framing errors, Rx overrun, modem status change) and
fails if any of them never happened. `tb_ss_world_access` drives the top with both worlds at once. It
checks two things. First, every register access costs the same 3 bus clocks
from either world, with nothing extra when the world changes. Second, 600
random normal-world accesses over both devices are refused wherever they hit
secure registers. They leave the secure configuration and the secure
timer's period untouched. Eight bytes the secure world queued just before
still leave first, complete and in order.

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb rtl/ss_pkg.sv tb/tb_ss_devices_top.sv \
    --top-module tb_ss_devices_top -Mdir obj_top
./obj_top/Vtb_ss_devices_top
```

To run another test, replace `tb_ss_devices_top` with any `tb_<module>` or with `tb_ss_world_access`.
Every test finishes in well under a second. The simulator is two-state, so
all state is reset explicitly. The testbenches use `$urandom` only.

The RTL passes `verilator --lint-only -Wall` and elaborates with a slang
front end. Lint warnings that remain are unused package constants, and
fields of the frame-format struct that a given module does not need.
