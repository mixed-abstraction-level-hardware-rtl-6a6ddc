# SDL processes in hardware: a run-time system on a bus

SDL (Specification and Description Language) models a system as communicating
extended finite state machines. Each process owns an input queue, and
processes talk only by sending each other *signals*: a signal type plus
parameters. Mapping such a model onto hardware naively is expensive. In
particular, the per-process infrastructure (message queues, message handling)
can cost far more logic than the behaviour itself. The way out followed here
is to separate two things:

* the **behaviour** of each process, a state machine written per
  application, and
* a small **run-time library** of reusable, hand-written RTL components that
  give every process the SDL services: a signal queue, a send component,
  timers, access to external memory, and the interconnect between processes.

This repository contains that run-time library, the connection-setup example
process built on it, a two-process CAN example (bit serialization plus
CRC generation) and a ping-pong echo process, all connected in one system
top (`sdl_system`). The behaviour
modules are written as cycle-fixed register-transfer controllers. This is the
variant that suits small, control-dominated processes, as opposed to
generating them with high-level synthesis.

## How a signal travels

Everything hinges on one representation: **an SDL signal is a sequence of
8-bit words**, a header word followed by its parameter words. Structured
parameters are flattened into words, so the queue, the send component and the
bus only ever move words, whatever the signal carries.

```
header word   [7:6] signal type   (local to the receiving process)
              [5:3] sender Pid
              [2:0] receiver Pid
```

Because the sender's Pid is in the header, a receiver can answer the sender
(SDL `sender`), and any node can address any other (`to`). The layout is in
`rtl/sdl_pkg.sv` (`header_t`, `make_header`).

A signal passes through four stages:

1. **Behaviour → send component** (`sdl_send_if`). The behaviour hands over
   one word at a time with a four-phase handshake:

   ```
   behaviour: wait busy=0 ; drive word/dest/last ; changed=1
   send_if:   latch word ; busy=1 ; request the bus
   behaviour: see busy=1 ; changed=0
   send_if:   bus took the word and changed=0 ; busy=0
   ```

   `last` travels with the final word of the signal. The send component holds
   one word, so the behaviour can prepare the next word while the current
   one waits for the bus.

2. **Bus** (`sdl_bus`). A round-robin arbiter grants one node at a time and
   holds the grant from the header to the `last` word. Signals therefore
   never interleave at a receiver. Between signals, only a node whose
   destination is ready can win. Otherwise a word aimed at a full queue would
   stall the whole bus, including the process that would empty that queue,
   and the system would deadlock. A word moves in a cycle when the
   granted node requests and the destination is ready. Valid, word and ack
   are combinational through the bus.

3. **Signal queue** (`sdl_signal_queue`). Incoming words are assembled in
   the slot behind the last complete signal. A signal becomes visible to the
   behaviour only once its last word has arrived. `wr_ready` is low when all
   `QUEUE_LEN` slots hold complete signals. A signal longer than `MAXW` words
   is truncated and sets the sticky `overflow` flag.

4. **Queue → behaviour.** The behaviour sees the signal under a read cursor,
   word by word:

   | command      | effect                                                        |
   |--------------|---------------------------------------------------------------|
   | `rd_next`    | next word of the signal (stays on the last word)              |
   | `rd_remove`  | consume the signal; younger signals move up one slot          |
   | `rd_save`    | keep the signal, move the cursor to the next one (SDL *save*) |
   | `rd_restart` | cursor back to the oldest signal (after a state change)       |

   The queue is an ordered slot array rather than a ring buffer. A signal in
   the middle can be removed with everything behind it shifting down. Saved
   signals therefore keep their order, as SDL requires. The cost is one
   word-wide multiplexer per slot word.

A 3-word signal from process A to process B typically costs about four cycles
per word in the handshake. B then needs one cycle per parameter word plus one
for the whole transition decision before it starts answering.

## The connection-setup process (`sdl_example_fsm`)

A small connection protocol with SDL states `IDLE`, `SETUP` and `CONECT`
(the spelling avoids a keyword). It has the variables `Id`, `disId` and
`message = (cmd, id)`, and the constants `REQUEST = 1`, `ACK = 1`,
`DISCONECT = 3`.

| | state / input          | decision                           | outputs                                   | next   |
|-|------------------------|------------------------------------|-------------------------------------------|--------|
|T1| IDLE, `conReq(Id)`    | –                                  | `mediumReq(REQUEST, Id)`                  | SETUP  |
|T2| CONECT, `disReq(disId)`| `disId = Id`                      | `mediumReq(DISCONECT, Id)` twice          | IDLE   |
|  |                       | otherwise                          | –                                         | CONECT |
|T3| CONECT, `mediumInd(m)`| `m.id = Id` and `m.cmd = DISCONECT`| `disInd(m.id)`                            | IDLE   |
|  |                       | otherwise                          | –                                         | CONECT |
|T4| IDLE, `mediumInd(m)`  | `m.cmd = REQUEST`                  | `Id := m.id`; `mediumReq(ACK, Id)`, `conInd(Id)` | CONECT |
|  |                       | otherwise                          | –                                         | IDLE   |
|T5| SETUP, `mediumInd(m)` | `m.id = Id` and `m.cmd = ACK`      | `conRes(Id)`                              | CONECT |
|  |                       | otherwise                          | `disInd(Id)`                              | IDLE   |

Any other signal is removed without effect (SDL implicit consumption). The
controller works in micro-steps. `M_WAIT` inspects the header of the oldest
signal. `M_P1`/`M_P2` read the parameters, one per cycle, and then remove the
signal. `M_EXEC` evaluates the whole transition in one cycle and records up
to two output signals. `M_DRIVE`/`M_RELEASE` run the send handshake for
every output word. The `fired` output pulses with the transition taken (1–5,
or 7 for a removed signal).

Input codes: `conReq` 01, `disReq` 10, `mediumInd` 11, timer 00. Output codes
at the environment: `conInd` 01, `conRes` 10, `disInd` 11. A process's
`mediumReq` is sent straight to its peer as a `mediumInd` (type 11); the
medium between two stations is not modelled.

**Departure to be aware of (T4).** In the source flow chart the answering
process builds its ACK from its *own* `Id` (`message!id := Id`). Taken
literally, the responder would answer with a stale identifier. The requester's
T5 check would then always fail, and the responder's T3 could never match a
later DISCONECT. Here T4 first adopts the identifier of the request
(`Id := m.id`). With that single change, two instances complete setup and
release correctly.

## Run-time library components

**Timer (`sdl_timer`).** A bus node (Pid 3 in the top). It offers the SDL
services `set`, `reset` and `now`. A process sends it `set` as a header of
type 01 plus one duration word, or `reset` as a lone header of type 10. There
is one timer per owner Pid, counted down in units of `TICK_DIV` clock cycles.
On expiry the owner receives a one-word signal of type 00. Setting a running
timer restarts it. Both set and reset withdraw an expiry that is still waiting
for the bus. `now` is a free-running 16-bit unit counter.

**External memory (`sdl_mem_adapter` + `sdl_ext_ram`).** Large arrays belong
in a RAM rather than in datapath registers. The adapter turns datapath-word
accesses into memory-word accesses when the two widths differ. The larger
width must be a multiple of the smaller.

* Memory word wider (`MW` = `R * DW`, default 16 against 8): datapath address
  `a` maps to memory word `a / R`, lane `a % R`. A parameterized shifter moves
  the lane. A read takes 3 cycles from request to `done` (address register,
  synchronous RAM read, shift). A write is a read-modify-write and takes 4.
* Memory word narrower (`DW` = `K * MW`): datapath address `a` occupies memory
  words `a*K` to `a*K+K-1`, least significant part first. A read fetches the
  K parts one after another and shifts each into place (`2K+1` cycles). A
  write stores the shifted-down parts (`K+1` cycles).
* Equal widths: plain pass-through with the same 3/4-cycle timing.

## CAN example (`can_serial_process`, `can_crc_process`)

Two ordinary process modules (queue + behaviour + send component) on the same
bus:

* **serialization** (Pid 4) accepts `canMsg(w0..wN-1)` (type 01,
  `N = ceil(MSG_BITS/8)`, first bit in the MSB of `w0`). It then sends one
  `bit(b)` signal per message bit to CRC-generation, followed by a header-only
  `msgEnd` (type 10). Its queue (2 slots) fills when messages arrive faster
  than it can serialize them; the sender then waits, and the bus serves
  others meanwhile.
* **CRC-generation** (Pid 5) updates the CAN CRC-15 once per bit:
  `nxt = b ^ crc[14]; crc = crc << 1; if (nxt) crc ^= 0x4599`, starting from
  0. On `msgEnd` it sends `crc(crc[14:8], crc[7:0])` to the environment
  (type 01 from Pid 5) and clears the register.

The default message length is 19 bits, the shortest CAN frame considered.
83-bit messages need `CAN_BITS = 83`, which widens the serialization queue
slots to 12 words; a message then takes about 510 cycles from one `msgEnd` to
the next (six bus cycles per bit signal). Frame fields, bit stuffing and the CAN line itself are
not modelled; only the two-process split, the one-bit signals and the
iterative CRC are.

For scale: the original FPGA implementation of this example needed 227
flip-flops for serialization and 53 for CRC-generation at 19 bits. Here,
serialization holds 57 register bits plus a 70-bit queue array, and
CRC-generation 53 register bits plus a 36-bit queue array (generic Yosys
synthesis, before any FPGA mapping).

## Ping-pong process (`ping_pong_process`)

A process with next to no behaviour. It shows what the message handling of an
SDL process costs by itself, as a function of message size and queue length.
It answers every `ball(m)` signal by sending the same `ball(m)` back to the
sender named in the header. The signal has type 01 and
`NW = ceil(MSG_BITS/8)` parameter words; `NW = 0` for a 0-bit message. Other
signal types are removed unconsumed. While an answer is being sent, further
balls wait in the queue. Once the queue is full the bus holds the sender, so
with the transmit side stalled the process takes exactly `QUEUE_LEN + 1`
balls: one being answered and `QUEUE_LEN` queued.

`MSG_BITS` (default 31) and `QUEUE_LEN` (default 25) are the largest values of
the size sweep this example is meant for. The sweep varies the message size
from 0 to 31 bits at queue lengths 0, 1 and 2, and the queue length from 0 to
25 at 8-bit messages. Every smaller point is the same module with smaller
parameters. With `QUEUE_LEN = 0` there is no queue at all: the behaviour
reads the words of a ball straight off the bus. Its `rx_ready` then depends
only on its state, so the bus holds the sender while an answer is going out.
A foreign signal is skipped word by word.

## The system top (`sdl_system`)

| Pid | node                    | module                |
|-----|-------------------------|-----------------------|
| 0   | environment (ports)     | –                     |
| 1   | process A, peer B       | `sdl_process`         |
| 2   | process B, peer A       | `sdl_process`         |
| 3   | timer                   | `sdl_timer`           |
| 4   | CAN serialization       | `can_serial_process`  |
| 5   | CAN CRC-generation      | `can_crc_process`     |
| 6   | ping-pong               | `ping_pong_process`   |

The environment node stands where a hardware/software interface would sit.
`env_tx_*` behaves like a send component seen from the bus (`req` held until
`ack`, `last` ends the signal). `env_rx_*` delivers the words addressed to
Pid 0 (valid/ready, with `env_rx_valid` depending combinationally on
`env_rx_ready`). The external-memory path is a separate port
(`mem_req/we/addr/wdata` → `mem_ready/done/rdata`). The remaining outputs
expose state for observation: SDL states and Ids of A and B, the transition
pulses, queue-full and overflow flags, `now`, the CRC register, the
ping-pong `pp_returned` pulse and `bus_locked`.

Parameters: `QUEUE_LEN` (4, queue length of A and B), `MAXW` (3 words: header,
cmd, id), `CAN_BITS` (19), `TICK_DIV` (1), `MEM_MW` (16), `MEM_AW` (8), `PP_BITS` (31)
and `PP_QUEUE_LEN` (25). The
word width (8) and Pid width (3) are package constants in `sdl_pkg`.

## What follows the source and what is chosen here

Taken from the framework this design follows:

* the process-module structure (behaviour, signal queue, send interface);
* the bus as the interconnect;
* signals as a header word (type, sender, receiver) plus words;
* the changed/busy hand-over of words;
* set/reset/now timers;
* a shifter-based memory word adaptation;
* the example process (states, transitions, constants, the doubled
  DISCONECT);
* the serialization/CRC split of the CAN example with its 19-bit message;
* the ping-pong example's lack of arithmetic and its two swept sizes.

Chosen here, because the source leaves it open:

* all bit positions and signal codes other than the process's input codes;
* the per-word `last` flag (the source uses a separate *continue* line);
* the round-robin arbitration that skips requesters whose destination is not
  ready;
* the slot-array queue, and its handling of overflow and back-pressure;
* the timer command format and one timer per Pid;
* the memory word width and read-modify-write;
* the CAN signal formats, the `msgEnd` signal and the CAN-standard
  polynomial;
* the ping-pong behaviour (echo to the sender) and its signal format;
* queue lengths (the source treats them as a per-design parameter);
* the T4 identifier adoption described above.

Not built:

* a crossbar or point-to-point interconnect;
* SDL services, continuous signals and enabling conditions, which the example
  process does not use;
* high-level-synthesised datapaths;
* the hardware/software interface and the prototyping board.

Known limitation: SDL queues are unbounded, these are not. If two processes
each wait to send to the other while both queues are full, they deadlock. The
queue lengths must cover the traffic a design expects.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench                | what it checks |
|--------------------------|----------------|
| `tb_sdl_signal_queue`    | fill/full, word reads, save, removal from the middle, restart, overflow, write during removal |
| `tb_sdl_send_if`         | every word/dest/last under random bus delays; busy held until the bus takes the word |
| `tb_sdl_bus`             | three senders with pauses between words and receivers with random ready: each signal arrives once, complete and not interleaved; the bus is shared |
| `tb_sdl_timer`           | `now` rate, expiry latency, reset, restart, two expiries in Pid order under bus stall |
| `tb_sdl_mem_adapter`     | four width pairs (8/16, 8/32, 16/8, 8/8): random writes and reads against a model, lane and part placement in the RAM, latencies |
| `tb_sdl_example_fsm`     | every transition through both decision outcomes, unconsumed signals, a burst of queued signals |
| `tb_sdl_process`         | a full process on its bus ports with a 2-slot queue: back-pressure, over-long signal |
| `tb_can_serial_process`  | bit order and `msgEnd` for three messages plus a foreign signal |
| `tb_can_crc_process`     | CRC of random 19–83-bit messages against polynomial division |
| `tb_ping_pong_process`   | seven size points (0/0, 31/0, 0/1, 17/1, 31/2, 8/25, 31/25 bits/slots): exactly `QUEUE_LEN + 1` balls taken while stalled, every ball echoed in order to its sender, other signals ignored |
| `tb_sdl_system`          | the whole system at default parameters: setup/release, failing T5, unconsumed and over-long signals, timer, three CAN messages back to back, four ping-pong balls, memory; counts that every mechanism occurred |
| `tb_sdl_system_can83`    | the top built with `CAN_BITS = 83`: six maximum-length messages back to back, each CRC against polynomial division, cycles per message |

To run one with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl +libext+.sv \
    rtl/sdl_pkg.sv tb/tb_sdl_system.sv --top-module tb_sdl_system -Mdir obj
./obj/Vtb_sdl_system
```

The whole-system test finishes in well under a second of simulation time.
Simulation uses two-state logic; all state that is read is reset.
