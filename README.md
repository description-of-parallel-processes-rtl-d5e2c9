# Communicating processes in hardware: an 8250-style UART and its building blocks

A system described in SDL (the CCITT Specification and Description Language)
is a set of processes that talk by messages. Each process is an extended
finite state machine with an unbounded input queue, and time is abstract.
Hardware has none of that. This design turns the SDL model into synchronous
logic by following a few rules:

* Every process is a state machine on one common clock.
* A message is a pair of wires, `mess` from the sender and `ack` from the
  receiver. The sender raises `mess` (with data, if any) and holds it. The
  receiver answers with `ack` in the same cycle, combinationally, when it is
  in a state that consumes the message. The transfer takes place at the clock
  edge where both are high. The receiver's transition and the sender's next
  state take effect at that edge.
* Things SDL leaves implicit become extra processes:
  * input queues;
  * several senders of one signal;
  * timers;
  * dynamic creation of processes.

  Each one becomes a small hardware block of its own.

The main design built with these rules is a UART with the programming model
of the 8250, split into communicating blocks. Beside it, the top level holds
the general blocks for communication, timing and creation, so each can be
used and tested on its own. The top also holds a second, independent system
built from the same parts: the classic dining philosophers, whose fork table
is a small semaphore server.

```
sdl_hw_top
├── uart                       CPU bus, serial line, modem lines
│   ├── bus_interface          register decode, read data
│   ├── output_process         one-place queue between CPU write and transmitter
│   ├── transceiver
│   │   ├── transceiver_control   LCR and LSR registers, status messages
│   │   ├── transmit_buffer       holding register (THR)
│   │   ├── transmit_shifter      shift register (TSR), serial framing
│   │   ├── receiver              serial sampling, error detection
│   │   └── baudrate_generator    16x baud clock from a divisor
│   ├── interrupt_control      mask, priorities, IIR
│   └── modem_control          MCR, MSR
├── priority_input             several senders served in priority order
├── fcfs_input                 several senders served first come, first served
├── timer_pool                 timers given out by process creation
│   ├── create_control
│   └── timer_counter (x NTIMER)
└── dining_philosophers        a second SDL system built the same way
    ├── philosopher (x N)         think / claim / wait / eat, two timers
    ├── fork_claimer (x N)        gets the two forks one at a time
    ├── fcfs_input                the table's input queue
    └── fork_table                fork flags, grants, releases
```

The package `uart_pkg` holds the register layouts: `lcr_t` and `lsr_t` as
packed structs. It also holds the address map, the IIR codes and the
16-ticks-per-bit constant.

## The message handshake

Every block follows one handshake, so it is described once here:

```
clk      _/‾\_/‾\_/‾\_/‾\_
mess     __/‾‾‾‾‾‾‾‾‾\____     held by the sender (register output)
ack      ________/‾‾\_____     combinational in the receiver's state
                    ^ transfer edge: both high
```

A sender must not drop `mess` before it sees `ack`. The FCFS input process
and the output process check this with assertions. When nobody waits, the
message takes one clock. The receiver's state decides when a message is
consumed, exactly as an SDL input symbol in a state does.

## Extra output process (`output_process`)

In SDL an output never blocks, because the destination has a queue. In
hardware, the sender would have to wait until the receiver is in a consuming
state. The output process decouples the two. The owning process `put`s the
message and goes on. The output process offers it (`out_mess`) until the
destination acknowledges.

* With `DEPTH = 1` (the default, and the usual case) it is a single flag,
  a semaphore flip-flop, plus a data register.
* A deeper queue uses an up/down counter (`level`) and a small circular buffer.
* `full` is the overflow condition (OFLOW). The owner must test it before a
  put; an assertion reports a put while full.

The UART places one such process between the CPU's write to the data
register and the transmit holding register. The CPU can therefore write a
byte while the holding register is still occupied.

## Several senders of one signal (`priority_input`, `fcfs_input`)

When several processes send the same signal to one receiver, SDL serves them
in the order they entered its queue. Two hardware forms are given:

* `priority_input` serves them by fixed priority, where sender 0 is highest.
  It has two states. In *wait*, it acknowledges the highest pending sender
  and latches that sender's data and number. In *forward*, it offers the
  message to the destination until the destination acknowledges.
  A low-priority sender can starve while a higher one keeps sending.
* `fcfs_input` serves them in order of arrival. It keeps a queue of sender
  numbers. Each sender is appended when its `mess` rises, and senders that
  arrive in the same cycle go in number order. It offers the head sender's
  message directly. The destination's `ack` is routed back to that sender
  ("ack TO SENDER").

Both give the sender number (`out_id`) with the data, like SDL's implicit
SENDER value.

## Timers as counter processes (`timer_counter`, `create_control`, `timer_pool`)

An SDL timer is rewritten as a counter process. It has three messages:

* `PRESET(T)` loads the count.
* `RESET` clears it.
* `CLOCK` (a tick) counts down.

When a tick takes the count from 1 to 0, the process sends its expiry
message, `expired`, a one-cycle pulse. If several messages arrive in one
cycle, RESET wins over PRESET, and PRESET wins over CLOCK. A count of 0 never
expires.

A timer is needed only while a process waits, so counters can be shared by
creating them on demand. `create_control` implements SDL process creation:

* It keeps `processcount` of NMAX instances.
* A parent that asks while every instance is busy keeps asking until one is
  freed.
* Otherwise the lowest free instance gets `startprocess` with the parent's
  number, and the parent gets `successful_creation(pc)` in the same cycle.
* An instance that ends sends `processstop` and becomes free.

`timer_pool` combines the two. A parent creates a counter with its time T.
It gets the counter number back, and later receives the expiry (with that
number) on its own `expired` line. It may also RESET that counter.

* A RESET from a parent that does not own the counter is ignored.
* Expiry or RESET ends the counter process.
* If two counters of the same parent expire in the same cycle, both end,
  and the lower number is reported.

## The UART

### Bus interface and registers

The register map is the 8250's. Bit 7 of the line control register (DLAB)
switches addresses 0 and 1 to the divisor latch.

| addr | read | write |
|------|------|-------|
| 0 | RBR (DLAB=0) / DLL | THR (through the output process) / DLL |
| 1 | IER / DLM | IER / DLM |
| 2 | IIR | – |
| 3 | LCR | LCR |
| 4 | MCR | MCR |
| 5 | LSR | LSR |
| 6 | MSR | – |

* `dostr` and `distr` are one-cycle strobes, with `cs` high and the address
  on `abus`.
* While `ads` is low, the address and chip select pass through. While it is
  high, they are held.
* Read data appears on `dat_out` the cycle after `distr`, marked by
  `dat_valid`. `ddis` is its inverse.
* `csout` shows that the chip is selected.

LCR, bit 0 first: WLS0, WLS1 (word length 5 to 8), STB (extra stop bit),
PEN (parity enable), EPS (even parity), SPAR, SETBRK, DLAB.

LSR, bit 0 first: DRDY, OERR, PERR, FERR, BI, THRE, TSRE, and bit 7, which
reads 0.

### Transceiver control

This block owns LCR and LSR. Both registers are shared values: one process
holds each register, and the other processes read it over wires instead of
being sent copies. The other blocks send it status messages, each a message
strobe plus the new bit value: THRE from the holding register, TSRE from the
shifter, DRDY and the error bits from the receiver.

* Reading LSR clears OERR, PERR, FERR and BI.
* A status message in the same cycle wins over both the clear and a CPU
  write.
* A line status interrupt event is raised whenever the receiver reports an
  error.

### Transmitter: holding register and shift register

* When THRE is high, `transmit_buffer` accepts a byte from the output
  process and clears THRE.
* In the next cycle in which TSRE is high (shifter idle), it passes the byte
  to the shifter with `tsr_wr`. It then sets THRE again and raises the
  transmit interrupt event.

`transmit_shifter` frames the character. It counts rising edges of `baudout`
(16 per bit). The order on the line is:

1. a start bit;
2. the data bits, bit 0 first;
3. the parity bit, if PEN is set;
4. a stop bit;
5. an extra stop bit if STB is set. At word length 5 this extra bit lasts
   only 8 ticks, which gives 1.5 stop bits.

Parity starts at EPS and every data bit is XORed into it. The line carries
the complement, so EPS=1 gives even parity and EPS=0 odd parity.

* With SPAR (stick parity), the data bits are not folded in, so the parity
  bit is always the complement of EPS.
* SETBRK holds `ser_out` low (break) for as long as it is set.

Counted from the tick that starts the start bit, a character ends after
16·(2 + n + p) + e ticks. Here n is the number of data bits, p the number of
parity bits, and e is 0, 16 or 8 for the extra stop bit.

### Receiver

* The line is synchronised by two flip-flops.
* A falling edge starts a character. The start bit is confirmed after 8 ticks
  of `rclk` (mid-bit); a glitch shorter than that is ignored.
* Every later bit is sampled 16 ticks after the previous sample.
* When the character completes:
  * DRDY is set and the receive interrupt event is raised.
  * PERR is set if the parity is wrong.
  * FERR is set if the stop bit is low.
  * BI is set if data, parity and stop bit are all zero.
  * OERR is set if DRDY was still set, in which case the new byte replaces
    the old one.
* Reading RBR clears DRDY.

### Baud rate generator

It divides the system clock by the 16-bit divisor (DLL, DLM). `baudout` is a
one-clock pulse every `divisor` clocks: the 16x clock. A divisor of 0 (after
reset) or 1 stops it. For equal transmit and receive rates, connect `rclk` to
`baudout`.

### Interrupt control and modem control

There are four interrupt sources: received data, THR empty, line status and
modem status. Each sets a pending flag. IER masks them, and `intrpt` is the
OR of the pending, enabled flags. IIR reports the highest one:

| priority | source | IIR | cleared by |
|---|---|---|---|
| 1 | line status | 0x06 | LSR read |
| 2 | received data | 0x04 | RBR read |
| 3 | THR empty | 0x02 | THR write, or an IIR read that reports it |
| 4 | modem status | 0x00 | MSR read |

With nothing pending, IIR reads 0x01.

Modem control: MCR bits 0 to 3 drive `ndtr`, `nrts`, `nout0` and `nout1`,
each inverted. MSR holds the four modem inputs, inverted, in bits 4 to 7, and
their change flags in bits 0 to 3. The ring change flag is set on the
trailing edge of RI. A new change raises the modem interrupt event. Reading
MSR clears the change flags.

## The dining philosophers

Ten philosophers sit at a round table with one fork between each pair of
neighbours. Place i uses forks i and (i+1) mod 10. Each philosopher runs
through the same cycle:

1. It thinks for a random time, using timer HUNGRY.
2. It claims its forks.
3. It waits until both forks are its own.
4. It eats for a random time, using timer FULL.
5. It gives both forks back.

The system has to avoid two failures:

* **Deadlock:** every philosopher holds one fork and waits for the other.
* **Starvation:** a philosopher's neighbours keep taking turns with their
  shared fork, so that philosopher never gets it.

Four processes take part:

* `philosopher` is the state machine THINK → CLAIM → WAIT → EAT. Its two
  timers are `timer_counter`s on the shared `tick`.
  * A random duration is 1 + (LFSR & `DUR_MASK`) ticks.
  * The 8-bit LFSR (x⁸+x⁶+x⁵+x⁴+1) runs every clock and is seeded
    differently for each place.
* `fork_claimer` is the per-place claiming process. It asks the table for
  one fork at a time with a `test_and_set(fork)` message.
  * If the fork is taken, it asks again. The request then goes to the back
    of the table's queue.
  * After both grants, it tells its philosopher `forks_free`.
  * **Why there is no deadlock:** every place asks for its higher-numbered
    fork first. Forks are therefore always acquired in one global order, and
    a circle of philosophers each holding one fork cannot form.
  * **Why there is no starvation:** requests are served in order of
    arrival, and a retry goes to the tail of the queue.
* `fcfs_input` is the table's input queue.
* `fork_table` holds one flag per fork.
  * It consumes one request per clock.
  * If the fork is free, it clears the flag and answers *granted* in the
    next cycle. Otherwise it answers *taken*.
  * A philosopher's `release_forks` sets the flags of both of its forks.

The processes that only create other processes in the SDL description are
replaced by static instances and wires:

* BIRTH, which creates the philosophers at start, is replaced by the reset.
* INPUT, which turns messages into claiming and releasing processes, is
  replaced by direct wires.

Outputs `eating`, `waiting` and `fork_free` show the state of every place
and fork.

## Timing summary

| path | latency |
|---|---|
| message transfer, receiver waiting | same edge as `mess` seen |
| CPU write to THR → holding register (empty) | 1–2 clocks through the output process |
| holding register → shift register | 1 clock when TSRE is high |
| start of character → TSRE high | 16·(2+n+p)+e baud ticks |
| CPU read → `dat_out` | 1 clock |
| timer expiry | 1 clock after the tick that reaches 0 |

## Where this design departs from or adds to the description it follows

The processes, their states and messages, the LCR/LSR field names, the
16-tick bit time, the 1.5 stop bits at word length 5, and the hardware forms
of output queues, input arbitration, timers and creation all follow the
original SDL description. The following are this design's own choices.

* **Register map, IIR codes, interrupt priorities, MCR/MSR layout, the
  divisor latch and bit order (LSB first):** the 8250's. The original only
  names the registers.
* **Receiver and baud rate generator:** the original names these blocks
  without detailing them. They are written here the 8250 way.
* **Not built:**
  * the 8250 scratch register and loop-back mode.
* **Stick parity (SPAR) and break (SETBRK):** the original only names these
  LCR bits. They have their 8250 meaning here.
* **Clocking:** single-edge flip-flops on one clock, with an asynchronous
  active-low reset (`rst_n`, the master reset). A two-phase master/slave
  clock scheme is not used.
* **Output process overflow:** a byte written while both the output process
  and the holding register are full is lost. It is counted in `tx_dropped`
  rather than stalling the CPU.
* **Arbitration order:**
  * Priority input: sender 0 is highest.
  * FCFS input: simultaneous arrivals are queued lowest number first.
  * Creation: the lowest parent number wins, and the lowest free instance
    is used.
* **Sizes:** widths of message data (8), timer counters (16), and the number
  of parents (2) and counters (4) are parameters. The original gives no
  values for them.
* **Dining philosophers:**
  * Static instances replace process creation.
  * A table that answers *taken* and a claimer that asks again replace a
    table that puts the request back into its own queue. The request lands
    at the tail of the queue either way.
  * The random durations come from an LFSR, and their range (1 to 16 ticks)
    is this design's choice.

## Parameters of the top

| parameter | default | meaning |
|---|---|---|
| NSRC | 2 | senders at each input process |
| DW | 8 | message data width |
| NPARENT | 2 | parent processes sharing the timers |
| NTIMER | 4 | counters in the pool |
| TW | 16 | counter width |
| NPHIL | 10 | places at the philosophers' table |

## Simulating

Every testbench in `tb/` checks itself. Each prints
`TB_RESULT checks=N failures=M` and stops, and each has a watchdog. With
verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_uart \
    -y rtl -y tb +libext+.sv rtl/uart_pkg.sv tb/tb_uart.sv -o sim
./obj_dir/sim
```

Replace `tb_uart` with any testbench:

* `tb_sdl_hw_top` runs the whole top at its default parameters:
  * the UART through its bus, with looped-back bytes, a dropped write,
    injected parity, framing, break and overrun errors, and all four
    interrupt kinds;
  * random senders on both input processes;
  * two parents creating, resetting and waiting for timers, checked against
    a reference model.

  * the ten dining philosophers, checked so that no two neighbours eat at
    once and everyone eats.

  It counts each of these mechanisms and fails if one never happened.
* There is one testbench per block, named `tb_<block>`.
  `tb_dining_philosophers` runs 20 000 cycles of the 10-place table. It
  checks mutual exclusion, fork bookkeeping, the timer durations, the
  longest wait and the number of meals per place.

Testbenches use `$urandom`, so `+verilator+seed+N` changes the stimulus.
Simulation is two-state. Every register has an asynchronous reset
(`rst_n`, active low).
