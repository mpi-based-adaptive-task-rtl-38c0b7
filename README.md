# HS-Scale: a scalable array of network processing units

HS-Scale is a homogeneous multiprocessor: identical tiles, called NPUs (Network
Processing Units), are laid out in a grid. Each tile is connected only to its
four neighbours. Each tile has a small router plus a processor with its own
memory, and runs a small preemptive kernel. Tasks talk by message passing
(MPI-style send and receive). The kernel can move a running task to another
tile when the task's input queue fills up. It does this without an MMU, using
position-independent code.

This RTL covers the hardware of that system:

- the router;
- the asynchronous links between tiles;
- the network interface;
- the peripherals a tile's processor sees (timer, interrupt controller, UART);
- the 4x4 array that joins the tiles.

Task migration, MPI, scheduling and queue monitoring are kernel software. They
are not in the RTL. The end-to-end testbench reproduces the network traffic
they create.

Each tile runs from its own clock and nothing is shared between tiles. Adding
tiles therefore adds bandwidth, and no global clock tree or long wires are
needed. Two mechanisms make this possible:

- **Wormhole routing.** A router forwards a packet as soon as its header
  arrives, without storing the whole packet.
- **Toggle handshake.** Each link crosses between two unrelated clock domains
  using a two-wire toggle handshake.

## Files

| file | what it is |
|---|---|
| `rtl/hs_pkg.sv` | shared types: flit, router port numbers, bus request struct, address map, interrupt numbers |
| `rtl/hs_scale.sv` | top: `COLS x ROWS` tiles with per-tile clock, reset, bus, interrupt and UART pins |
| `rtl/npu.sv` | one tile: router, 4 link senders, 4 link receivers, network interface, timer, interrupt controller, UART, bus decoder |
| `rtl/router.sv` | 5-port wormhole router with XY routing and round-robin arbitration |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/flit_fifo.sv` | FIFO used as router input buffer and as network interface buffers |
| `rtl/toggle_tx.sv`, `rtl/toggle_rx.sv` | the two ends of an asynchronous inter-tile link |
| `rtl/net_if.sv` | network interface (receive FIFO with interrupt, transmit FIFO) |
| `rtl/timer.sv`, `rtl/irq_ctrl.sv`, `rtl/uart.sv` | tile peripherals |
| `tb/tb_<module>.sv` | a self-checking testbench for each module; `tb_hs_scale` runs the full array |

## Packets

A flit is 16 bits wide. A packet is built as follows:

```
flit 0   header   {x[7:0], y[7:0]}   destination tile
flit 1   size     number of payload flits that follow (0..65535)
flit 2.. payload
```

The header carries the destination, and all other flits follow its route.
The size flit tells each router where the packet ends. This is the Hermes
packet layout; the width of 16 bits is a choice made here.

Software builds the whole packet, header included. The hardware adds nothing
to it.

## Router (`router.sv`)

The router has five ports, numbered as in `hs_pkg::port_e`:

| number | port |
|---|---|
| 0 | East (+x) |
| 1 | West (−x) |
| 2 | North (+y) |
| 3 | South (−y) |
| 4 | Local (this tile's network interface) |

Every port has a valid/ready input and a valid/ready output.

**Input buffers.** Each input port has its own `flit_fifo`, `BUF_DEPTH` flits
deep (default 8). Its ready signal is the port's `in_ready`.

**Route computation.** Each input tracks where it is in a packet: header,
size, or payload with a count of remaining flits. When the flit at the head of
an idle input is a header, the input computes its output port with XY routing:

1. Go East or West until the header's x equals the router's `MY_X`.
2. Then go North or South until y equals `MY_Y`.
3. Then go to Local.

XY routing on a mesh has no cyclic channel dependencies, so the network
cannot deadlock.

**Arbitration.** An input requests only if the output it wants is free. One
`rr_arbiter` grants one requester per cycle. Its search starts just after the
last input it granted, so priority rotates among the inputs. The winner then
owns its output.

**Wormhole switching.** The output stays connected to its input while the
header, the size flit and `size` payload flits pass, one flit per cycle when
the downstream side is ready. The output is released when the last flit
leaves. A header that wants a busy output waits in its buffer. Its packet's
later flits wait behind it and fill the buffer, and the stall then spreads
upstream one link at a time.

**Latency.** Take a header written into an empty input buffer at edge *t*:

- it is granted during the cycle after *t*;
- the connection is made at edge *t+1*;
- the header is presented on the output during the next cycle and leaves at
  edge *t+2* if the output is ready.

After that, the packet moves at one flit per cycle.

Two cases are not handled:

- The router never sends a packet back out through the port it came in on.
  XY routing never asks for that.
- A header addressed outside the array would be sent towards a tied-off edge
  link and lost. Software must use addresses inside the array.

## Links between tiles (`toggle_tx.sv`, `toggle_rx.sv`)

Neighbouring tiles may run from completely unrelated clocks. A link is
`WIDTH` data wires plus two toggle wires, `req` forward and `ack` back. It
works as follows:

1. **Sender.** When no flit is outstanding (`ack == req`), the sender puts the
   flit on `link_data` and inverts `link_req` on the same clock edge. Both come
   straight from flip-flops.
2. **Receiver.** The receiver passes `link_req` through a two-flop
   synchroniser. When the synchronised value differs from its own `ack`, a flit
   is waiting. The flit is offered on the receiver's local valid/ready side,
   straight from the link wires.
3. **Acknowledge.** On the edge where the router's input buffer takes the flit,
   the receiver inverts `link_ack`.
4. **Release.** The sender synchronises `link_ack`. When it equals `link_req`
   again, the sender may send the next flit.

Why the data is safe without its own synchroniser: the data wires settle long
before the receiver's two-flop synchroniser reports the toggle, and they do
not change again until the acknowledge comes back.

**Back-pressure.** If the router's input buffer on the far side is full, the
acknowledge is simply held back.

**Throughput.** One flit per round trip, about six to eight cycles of the
slower clock with two-stage synchronisers. This is much slower than the one
flit per cycle inside a router, which is why every router input has a buffer.

**Reset.** All tiles are assumed to leave reset with both toggle wires low.
If one tile is reset while its neighbour is running, the toggles on that link
can end up mismatched and the link is no longer safe to use.

## Network interface (`net_if.sv`)

The network interface sits on the router's Local port.

- **Receive.** Flits for this tile go into a receive FIFO (`NI_DEPTH`,
  default 16). While that FIFO holds anything, the NI interrupt is raised. The
  kernel then moves the flits into the software queue of the task they belong
  to.
- **Transmit.** Software builds packets itself, so the transmit side is a FIFO
  that the processor fills one flit at a time.
- **Back-pressure.** When the receive FIFO is full, the router's Local output
  stalls, and back-pressure spreads through the network. The kernel's
  request/acknowledge protocol is meant to avoid this: a sender waits until the
  receiver has room before sending.

Registers, at word addresses `0x00`–`0x0F` of the tile bus:

| addr | name | access |
|---|---|---|
| 0 | RX_DATA | read returns the head flit and pops it |
| 1 | STATUS | [7:0] flits held in RX, [15:8] free TX slots, [16] RX not empty, [17] TX full |
| 2 | TX_DATA | write pushes a flit (dropped if TX is full) |
| 3 | CTRL | [0] interrupt enable, 1 after reset |

## Processor side of a tile (`npu.sv`, `timer.sv`, `irq_ctrl.sv`, `uart.sv`)

The processor itself is not part of this RTL. It is a 3-stage MIPS-I class
core with no cache and no MMU, and its memory is not part of this RTL either.
Each tile exposes the processor's peripheral bus and interrupt line as ports.

**The bus** (`hs_pkg::bus_req_t`):

- signals: `sel`, `we`, `re`, 8-bit word address, 32-bit write data;
- sampled on the rising edge;
- read data is combinational in the same cycle;
- read side effects (FIFO pops, clearing a flag) happen on that edge;
- `addr[7:4]` selects the peripheral: 0 network interface, 1 timer,
  2 interrupt controller, 3 UART.

**Timer.** Counts cycles and sets its interrupt flag every PERIOD cycles. The
kernel uses this flag for round-robin time slicing. Default period: 70 000
cycles (10 ms at 7 MHz).

| addr | name | access |
|---|---|---|
| 0 | PERIOD | read/write; writing it restarts the count |
| 1 | COUNT | read |
| 2 | CTRL | [0] enable |
| 3 | STATUS | [0] flag; write 1 to clear |

**Interrupt controller.** Combines the tile's three sources: 0 UART, 1 timer,
2 NI. Sources are level-sensitive and are cleared at the source. `irq` is
registered, so it follows a source one cycle later. The global enable lets
the kernel block interrupts while it saves and restores a context.

| addr | name | access |
|---|---|---|
| 0 | PENDING | read: sources AND mask |
| 1 | MASK | read/write |
| 2 | RAW | read: raw source levels |
| 3 | ENABLE | [0] global enable |
| 4 | PRIORITY | read: lowest-numbered pending source, or bit 31 set if none is pending |

**UART.** 8 data bits, no parity, 1 stop bit. Default 115 200 baud from the
7 MHz clock (divisor 60). A received byte raises the interrupt until it is
read. A second byte that arrives before the read overwrites the first and sets
the overrun flag.

| addr | name | access |
|---|---|---|
| 0 | DATA | write sends a byte (ignored while busy); read returns the received byte and clears the flags |
| 1 | STATUS | [0] byte received, [1] transmitter busy, [2] overrun |

## The array (`hs_scale.sv`)

- Tile `(x, y)` has index `n = y*COLS + x` in every per-tile port array.
- East is +x and North is +y. These are the coordinates used in headers.
- A tile's East link goes to the West link of tile `(x+1, y)`; its North link
  goes to the South link of tile `(x, y+1)`.
- Links at the array edge are tied off: nothing arrives on them, and an output
  there is acknowledged immediately.
- Default size: 4x4, as on the prototype.
- The array has no shared signals: each tile has its own clock and reset input.

## How far this follows the original design

These parts follow the original description:

- a homogeneous array with neighbour-only links;
- per tile, a router plus a processing layer;
- XY routing;
- wormhole switching;
- one input buffer per router port;
- round-robin priority among inputs;
- a hardware FIFO in the network interface that interrupts the processor;
- a two-toggle asynchronous link protocol, so each tile has its own clock;
- one timer, one interrupt controller with three sources (UART, timer, NI),
  and one UART per tile;
- a 4x4 array;
- a 7 MHz clock.

These are choices made here, because the original gives no detail:

- 16-bit flits, and the size-flit packet format;
- buffer depths (8 in the router, 16 in the network interface);
- a single arbiter that grants one input per cycle;
- valid/ready handshakes inside a tile;
- two-flop synchronisers;
- the transmit FIFO of the network interface;
- the bus, the address map and every register layout;
- the UART frame format and baud rate;
- the default timer period.

Where the original disagrees with itself:

- Its introduction to the network mentions "adaptive routing", but its router
  description says XY routing. XY routing is what is built.

Not built:

- the processor and its memory;
- all the software: MPI send/receive, scheduling, position-independent task
  loading, the migration protocol, and the policy of migrating when a task's
  input queue passes 80 %;
- task replication, which the original only mentions as future work.

The original gives no cycle-level latencies or rates for the hardware, so
none could be compared.

For size, the original reports FPGA results on a Spartan-3 S1000 device:
171 CLBs for the router and 624 CLBs for a whole tile, processor included.
This RTL has not been mapped to that device, so it cannot be compared with
those figures. Its default router holds eight 16-bit flits in each of its
five input buffers.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each one has a watchdog. Example with Verilator 5, run from the
directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_hs_scale -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/hs_pkg.sv tb/tb_hs_scale.sv -o sim
./obj_dir/sim
```

Replace `tb_hs_scale` with any other `tb_*` to test one module.

What each testbench checks:

- **`tb_flit_fifo`, `tb_rr_arbiter`, `tb_timer`, `tb_irq_ctrl`**: each output
  is compared every cycle against a reference model under random stimulus.
- **`tb_toggle_tx`, `tb_toggle_rx`**: run the link with the sender and the
  receiver on unrelated clocks. They check the protocol rules and that every
  flit arrives once and in order.
- **`tb_router`**:
  - the 2-cycle header latency;
  - XY output choice;
  - that packets arrive whole and in order under random back-pressure;
  - that arbitration and wormhole blocking both occurred.
- **`tb_net_if`, `tb_uart`**: the register maps, the FIFO limits, interrupt
  behaviour and UART bit timing.
- **`tb_npu`**: one tile with modelled neighbours. It covers local loopback,
  all four link directions in and out, pass-through, and the timer and UART
  interrupts through the interrupt controller.
- **`tb_hs_scale`**: the full 4x4 array at default parameters, each tile on
  its own clock (10 to 21 ns), with a processor model per tile. The processor
  model reassembles packets in software on NI interrupts, as the kernel would.
  - Phase 1: random all-to-all traffic, with a hot-spot tile that stops
    reading for a while.
  - Phase 2: the MJPEG case: a three-stage pipeline starts on tile (1,1), then
    its first stage moves to (2,0) and its second stage to (2,1) and then to
    (1,2). Each move sends a 512-flit task image and then notifies every other
    tile. The image size is an assumption.
  - It counts each mechanism and fails if one never happened: link transfers,
    arbitration, wormhole blocking, a full NI receive FIFO, a stalled link, a
    full transmit FIFO, NI / timer / UART interrupts, and completed migrations.
  - It simulates about 230 µs and runs in a few seconds.
