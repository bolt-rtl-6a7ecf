# Bolt: a stateful message interconnect between two processors

Bolt sits between two processors, A and C, and lets them exchange messages
without ever depending on each other. Each processor writes messages into Bolt
and reads messages out of it whenever it likes, at its own SPI clock rate and
from whatever power state it is in. Bolt stores messages that have not been
delivered in two FIFO queues (A→C and C→A) in non-volatile memory. A processor
that is asleep is therefore never woken by the other. A message that has been
written survives a power failure of Bolt itself.

Only one thing is shared: when both processors use the same queue at the same
moment, one writing and one reading, they compete for Bolt's message
controller. The design keeps that controller simple, so the worst-case time of
every handshake phase has a small, known bound.

This RTL builds Bolt as synthesizable hardware. The reference prototype ran the
message controller as interrupt-driven software on an MSP430FR5969
microcontroller. This RTL keeps that prototype's structure (GPIO ports, SPI
modules, DMA channels, a shared memory bus and a single interrupt-serving core)
and its cycle-level timing. With the default parameters, a single write or read
takes exactly as many clock cycles per handshake phase as the prototype's
worst-case bounds: 220 cycles from REQ to ACK, 153 cycles to commit a write and
124 cycles to commit a read.

## The processor's view: control and data channels

Each processor p (index 0 = A, 1 = C) has two channels:

| signal    | dir | meaning |
|-----------|-----|---------|
| `rw[p]`   | in  | 1 = read a message, 0 = write a message |
| `req[p]`  | in  | request; for a write, its falling edge ends the message |
| `ack[p]`  | out | Bolt grants the data channel |
| `ind[p]`  | out | at least one message is waiting for p |
| `sck[p]`, `mosi[p]`, `miso[p]` | in/in/out | 3-wire SPI. The processor is the master (mode 0, MSB first). There is no chip select: REQ/ACK frame the transfer. |

**Write.** The processor sets `rw=0` and raises `req`, then waits for `ack`.
It shifts the message bytes in on MOSI and drops `req`. Bolt commits the
message, raises the reader's `ind` and then drops `ack`. The message length is
the number of bytes shifted in. A write with no bytes is discarded. Bytes beyond
`MSG_BYTES` are dropped.

**Read.** The processor sets `rw=1` and raises `req`, then waits for `ack`. It
shifts out one length byte L and then L payload bytes on MISO. When the last bit
has gone out, Bolt removes the message, updates `ind` and drops `ack`. The
processor then drops `req`.

**Refusal.** If a write finds its queue full, or a read finds its queue empty,
Bolt never raises `ack`. Its state machine goes back to idle. A processor
avoids this by looking at `ind` and counting its own writes. It must
not drop `req` before `ack` has risen. A request granted after `req` was dropped
leaves the port in MESSAGE TRANSFER with `ack` high until `req` next falls. Software layers
such as priority queues or receive buffers on the processors are not part of
this hardware.

**Consistency.** A read abandoned half way (`req` dropped before the last byte)
leaves the message in the queue. A write cut off by a power loss never reaches
the queue.

## Inside Bolt

```
 processor A                                                   processor C
 rw/req/ack/ind -- gpio_port (PORT3)       gpio_port (PORT4) -- rw/req/ack/ind
 sck/mosi/miso  -- spi_slave (SPI A)       spi_slave (SPI C) -- sck/mosi/miso
                        |                         |
                   dma_channel (DMA0)        dma_channel (DMA1)
                         \______ dma_controller _____/   -- halt --> message_controller
                                      |
                                    fram  (64 KB: queue A->C, queue C->A)
          message_queue x2 (slot bookkeeping)  <--->  message_controller
```

| module | role |
|--------|------|
| `bolt_top` | wiring, ports as 2-element arrays |
| `bolt_pkg` | state, power-mode and handler enums; DMA configuration record |
| `message_controller` | one Bolt state machine per port, run by a single interrupt-handler engine |
| `gpio_port` | synchronises R/W and REQ; keeps the REQ interrupt flag (rising or falling edge); holds the ACK and IND registers |
| `spi_slave` | oversampled SPI slave; a byte strobe for receive and a one-byte buffer for transmit |
| `dma_channel` | moves a message between its SPI slave and its FRAM slot; counts bytes; signals when a read is complete |
| `dma_controller` | shares the FRAM bus, DMA0 first; a byte takes 2 cycles during which `halt` is high |
| `fram` | 64 KB synchronous byte memory, with no reset |
| `message_queue` | head, tail, count and per-slot length of one queue; `full`/`empty` |
| `bolt_sync` | two-flop synchronizer |

Memory layout: queue q (messages written by processor q) occupies
`QUEUE_DEPTH` slots of `MSG_BYTES` bytes from FRAM address
`q * QUEUE_DEPTH * MSG_BYTES`. A write fills the tail slot directly, and the
commit then only advances the tail. A read streams the head slot, and the commit
then only advances the head. This is why nothing half-done ever becomes
visible.

## The message controller: state machines on one serialised engine

This is the part that decides the timing, and the part that needs the most care
when changing the design.

Each port runs this state machine:

```
IDLE --REQ rose--> REQUEST --grant: ACK rises--> MESSAGE TRANSFER
REQUEST --write & queue full | read & queue empty--> IDLE   (no ACK)
MESSAGE TRANSFER --REQ fell, bytes received--> COMMIT WRITE --> IDLE
MESSAGE TRANSFER --REQ fell, no bytes----------> IDLE
MESSAGE TRANSFER --REQ fell during a read------> IDLE        (message kept)
MESSAGE TRANSFER --DMA done (read)-------------> COMMIT READ --> IDLE
```

The transitions are made by interrupt handlers. Only one handler runs at a
time, because one engine serves both ports; the prototype used a software
semaphore for the same purpose. There are three kinds of handler:

| handler | trigger | time before the ACK edge | time after |
|---------|---------|-----------------|-------------|
| request | REQ rising edge while IDLE | `T1` = 172 | `T2` = 48 |
| write commit / abort | REQ falling edge in MESSAGE TRANSFER | `T3` = 149 | `T4` = 58 |
| read commit | DMA done | `T5` = 117 | `T6` = 59 |

* **Priority.** Pending interrupts are served in the order DMA0 done, DMA1 done,
  PORT3 (A), PORT4 (C). A handler that became pending while another was running
  starts in the very next cycle.
* **Sleep and wake-up.** With no handler running, the engine sleeps. It is in
  LPM4 (deep sleep) if no transfer is open and in LPM0 if one is; the
  `power_mode` output reports LPM4, LPM0 or ACTIVE. Waking costs `T_LPM4` = 48,
  `T_LPM0` = 4 or `T_DMA` = 7 cycles. These delays are counted from the pin
  event: the REQ edge, or the last SPI bit of a read. The fixed input path
  (4 cycles for REQ through the synchronizers and flag, 6 cycles for the last
  SPI bit) is part of that delay, so a wake-up shorter than the path costs the
  path.
* **DMA halts the core.** Every DMA byte transfer stops the engine for two
  cycles, and handler counters do not advance while `halt` is high. This is how
  traffic on one port stretches a handler serving the other port. It is the
  only interference between the two processors, and the source of the
  concurrent worst cases below.
* **Order inside a commit.** The queue is updated 3 cycles before the ACK edge,
  and both IND lines are rewritten 2 cycles before it. ACK changes last, so a
  processor that sees ACK fall already sees the new IND.
* **Power-on.** After `rst_n`, an initialisation step writes both IND lines from
  the queue state. Messages still queued from before the reset are announced
  at once.

Measured with the default parameters (`tb_bolt_top`), in Bolt clock cycles:

| quantity | single operation | bound for the prototype | concurrent traffic, max seen |
|----------|------------------|---------------|-------------------|
| write REQ→ACK (T_w1) | 220 | 220 | A: 383, C: 446 (bounds 418 / 466) |
| write REQ fall→ACK fall (T_w2) | 153 | 153 | ≤ 362 (bound 397) |
| read REQ→ACK (T_r1) | 220 | 220 | as T_w1 |
| read last bit→ACK fall (T_r2) | 124 | 124 | ≤ 362 (bound 397) |

The prototype's wake-up delays varied within small ranges (LPM4 41–48, LPM0
2–4, DMA 5–7 cycles). This RTL is deterministic and always uses the upper end.

## Sizes

| parameter | default | meaning |
|-----------|---------|---------|
| `MSG_BYTES` | 128 | slot size, maximum message length (≤ 255) |
| `QUEUE_DEPTH` | 148 | messages per queue |
| `FRAM_BYTES` | 65536 | memory size; must hold `2 * QUEUE_DEPTH * MSG_BYTES` |
| `T_LPM4, T_LPM0, T_DMA, T1..T6` | 48, 4, 7, 172, 48, 149, 58, 117, 59 | handler timing in cycles |

The prototype was characterised at five message lengths. Each is a parameter
setting of this RTL, and all five fit the 64 KB memory. `tb_bolt_workloads`
fills and drains a queue at every setting:

| `MSG_BYTES` | 16 | 32 | 48 | 64 | 128 |
|-------------|----|----|----|----|-----|
| `QUEUE_DEPTH` | 1075 | 568 | 380 | 290 | 148 |
| write throughput, 8 MHz Bolt clock, 4 MHz SPI (Mbit/s) | 1.61 | 2.29 | 2.67 | 2.92 | 3.37 |
| prototype measurement (Mbit/s) | 1.5 | 2.1 | 2.5 | 2.8 | 3.3 |

In simulation, each write costs 380 cycles of handshake overhead. The
throughput row adds to that the SPI time of the message at 4 MHz. The prototype
figures are a little lower because they include the processor's own time
between messages.

## Where this RTL departs from the reference prototype

* **Hardware instead of firmware.** The processor core, and the software
  running on it, are replaced by the handler engine in `message_controller`.
  The engine keeps the software's handler durations as parameters.
* **SPI clock limit.** The SPI slaves sample SCK in the Bolt clock domain, so
  SCK must stay below clk/8. The prototype's SPI peripherals ran at up to 4 MHz
  beside an 8 MHz core, because they are clocked by SCK itself. To run 4 MHz SPI
  here, clock Bolt at 32 MHz or more and scale the `T*` parameters if the same
  time in microseconds is wanted.
* **Length byte on reads.** A read starts with one length byte. The prototype's
  way of telling the reader the length is not known.
* **Fixed-size slots.** Queues use fixed slots and a length register per slot,
  so short messages do not pack more densely. The capacities match the
  prototype's at each characterised length only because each length gets its
  own `MSG_BYTES`/`QUEUE_DEPTH` setting.
* **Queue bookkeeping in registers.** Head, tail, count and lengths are
  registers, not FRAM words. They are treated as non-volatile: `rst_n` does not
  touch them, and only `nv_clear` empties the queues. An ASIC or FPGA version
  must place them in retained storage.
* **Byte-wide memory port** with a 16-bit address. The prototype bus was 16
  bits wide with a 20-bit address.
* **Not modelled:** power dissipation, the ranges of the wake-up delays, and
  the processor-side software (message priorities, virtual queues, receive
  buffers, and the read/write/test/flush calls).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/bolt_pkg.sv tb/tb_bolt_top.sv --top-module tb_bolt_top -Mdir obj_top
./obj_top/Vtb_bolt_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_bolt_top` | The whole design at default parameters. It runs through power-on, a refused read, a single write and a single read (timing exact, and a read 29 cycles cheaper than a write), an empty write, an abandoned read, a power loss in mid-write, concurrent traffic from both processors with scoreboard checks and timing bounds, and filling a queue to 148 full-size messages until a write is refused, then draining it. It counts every mechanism: LPM4, LPM0 and DMA wake-ups, back-to-back handlers, DMA halts inside a handler, both DMA channels requesting at once, and both ports busy at once. |
| `tb_bolt_workloads` | Capacity and throughput at the five message lengths. |
| `tb_message_controller` | Handler timing, priorities, refusal, the commit order, and halt stretching a handler. |
| `tb_gpio_port`, `tb_spi_slave`, `tb_dma_channel`, `tb_dma_controller`, `tb_message_queue`, `tb_fram` | The individual blocks against reference models. |

`tb/tb_proc_model.sv` is a behavioural model of an attached processor. It
provides the write and read tasks and measures handshake times.

## Changing it

* To change the handler timing, change the `T*` parameters of `bolt_top`. The
  engine needs `T1`, `T3` and `T5` of at least 3 cycles, because the queue
  update, the IND update and the ACK edge each take one cycle.
* To change message size and capacity, set `MSG_BYTES` and `QUEUE_DEPTH`.
  Elaboration fails if the two queues do not fit `FRAM_BYTES`.
* The port priority lives in one `always_comb` block of `message_controller`.
  The DMA priority lives in `dma_controller`.
