# OpenScale-style adaptive mesh multiprocessor

This is the RTL of a homogeneous multiprocessor. Identical processing nodes
sit on a 2D mesh network-on-chip. Each node has its own CPU, caches and RAM,
and no memory is global. The system adapts while it runs in two ways:

* **Per-node clock.** Each node gets its own clock rate, so software (a PID
  loop in the kernel) can slow down a node that has slack and speed up one
  that is late.
* **Shared-memory clusters on demand.** Nodes can be grouped at run time
  into a shared-memory cluster (a "vSMP cluster"). Each member maps part of
  one host node's RAM into its own address space, and its cache misses in
  that range travel over the network as whole cache lines. The same
  hardware lets a task run on one node while its code stays in another
  node's memory ("remote execution").

Message passing between nodes is the default programming model. Shared
memory is the add-on. Coherence is kept by software, not hardware:
flush-line and invalidate-line operations that act only when the line's tag
matches the given address.

The CPU core itself is not part of this RTL. It is a 32-bit pipelined core
of the MicroBlaze instruction set. Each node exposes the instruction and
data ports such a core would drive, and the testbenches drive them with a
bus-functional model.

## The system at a glance

```
        x=0          x=1          x=2
      +------+     +------+     +------+
y=0   | R 00 |<--->| R 10 |<--->| R 20 |      R  = 5-port router
      +--+---+     +--+---+     +--+---+      node = caches, RAM, RMA,
         |  node      |  node      |  node           messages, timer,
      +--+---+     +--+---+     +--+---+             irq ctrl, DFS, NI
y=1   | R 01 |<--->| R 11 |<--->| R 21 |
      +------+     +------+     +------+
       ...           ...          ...
```

`openscale_top` is an `NX` x `NY` mesh (3 x 3 by default):

* One `noc_mesh` of `hermes_router`s.
* One `pe_node` per router.
* x grows to the East and y to the South, and node (0,0) is the top-left
  corner.
* Node n has coordinates (n mod NX, n div NX).
* The top's ports are per-node arrays: each node's CPU ports, its interrupt
  line, its gated clock, its current clock setting and its event pulses.

A single input clock, `clk`, is the 500 MHz network clock. Every node makes
its own clock from it.

## The network

### Routers

`hermes_router` has five ports: East, West, North, South and Local. Each
input has a 4-flit FIFO (`flit_fifo`). Links are 32 bits wide with a
valid/ready handshake.

Packets are switched wormhole-style. When a packet's header reaches the
head of an input FIFO, the router picks an output by XY routing:

1. Along x until the column matches.
2. Then along y.
3. Then to Local.

Each output has a round-robin arbiter that grants it to one waiting input.
The input then keeps the output until the packet's last flit has passed, so
packets never interleave on a link.

At zero load a header takes 2 cycles per router: one to be written into the
input FIFO, one to be granted and driven out. The rest of the packet
follows at one flit per cycle. A packet from node A to node B crosses
hops+1 routers, so its header arrives 2·(hops+1) cycles after injection.

### Packet format

| flit | contents |
|------|----------|
| 0 | header: target x in bits [7:4], target y in bits [3:0] |
| 1 | size: number of payload flits that follow |
| 2 | command word (first payload flit) |
| 3.. | rest of the payload |

The command word (`pkt_cmd_t`) is laid out as follows:

| bits | field |
|------|-------|
| [31:28] | kind: 1 message, 2 read request, 3 write request, 4 read answer, 5 write answer |
| [23:16] | sending node {x, y} |
| [7:0] | number of data words |

The payload of each kind:

* Read request: the command word, then the byte address of the line.
* Write request: the command word, the address, then the 8 words of the line.
* Read answer: the command word, then the 8 words.
* Write answer: the command word alone.
* Message: the command word, then the message words.

### Network interface

The `network_interface` connects three users to the router's Local port:

| user | unit | sends | receives |
|------|------|-------|----------|
| 0 | RMA-Reply | answers | requests |
| 1 | RMA-Send | requests | answers |
| 2 | message module | messages | messages |

Outgoing side:

* When several users have a packet ready, one is chosen round-robin.
* The NI writes the header and size flits, then streams the user's payload.

Incoming side:

* The NI drops the header and size flits.
* The command word decides which user gets the payload.

Both directions cross between the node clock and the network clock through
one `async_fifo` each. These are Gray-coded, 8 deep, with two-flop
synchronisers.

## Inside a node

```
 CPU I-port --> I-cache --+                      +--> RMA-Send --+
                          +--> memory mapper ----+                +--> NI <--> router
 CPU D-port --> D-cache --+        |             |   RMA-Reply --+     ^
      |                            v             |       |             |
      |                   RAM port A  [ 128 kB dual-port RAM ]  port B |
      |                                                                |
      +--(bit 31 set)--> register bus: timer, irq ctrl, DFS,           |
                                       message module -----------------+,
                                       mapper windows
```

### Caches

The instruction and data caches are both `l1_cache`:

* direct-mapped;
* write-back, write-allocate;
* 8 words (32 bytes) per line;
* 16 kB each by default.

A hit is acknowledged in the same cycle as the request. The CPU must hold
`req`, `addr` and `op` until `ack`; an assertion checks this.

The data port takes four operations:

* `OP_READ` and `OP_WRITE` (with byte strobes);
* `OP_FLUSH`: if the addressed line is present and dirty, write it back and
  keep it, now clean;
* `OP_INVAL`: if the addressed line is present, drop it. A dirty line is
  dropped without being written back.

Both act only when the tag matches the given address. Otherwise they do
nothing and answer at once.

### Memory mapper

The `dsm_mapper` sits behind both caches and moves whole lines. It has two
programmable windows, each made of enable, owner node, base and limit:

* **Window 0** is for shared-memory bonding. It resets to 0x0000–0x1FFF,
  which is the shared-data area of the node memory map, but disabled. To
  join a cluster, a node points window 0 at the cluster's host and enables
  it.
* **Window 1** is for remote execution. Point it at the range holding a
  task's code in the node where the code lives.

A line in an enabled window goes to RMA-Send with that window's owner node.
Any other line goes to local RAM port A, one word per cycle:

* a line read is done 11 cycles after the request;
* a line write is done 10 cycles after the request.

Addresses are not translated: the host's shared area appears at the same
addresses in every member of its cluster. When both caches wait, they are
served alternately.

### RAM and the node memory map

`local_ram` is a 128 kB true dual-port RAM with byte enables and a one-cycle
read latency. Port A belongs to the node itself and port B to RMA-Reply, so
serving other nodes never blocks the local CPU's RAM accesses.

The memory map the software is expected to use:

| range | use |
|-------|-----|
| 0x00000–0x01FFF | shared data, visible to the cluster |
| 0x02000–0x0FFFF | private data |
| 0x10000–0x1FFFF | kernel |

### Registers

A data-port address with bit 31 set goes to the register bus instead of the
cache. The slave is picked by address bits [10:8]. The register bus is a
single-master subset of Wishbone classic with an acknowledge in the second
cycle. Offsets are in bytes.

| base | unit | registers |
|------|------|-----------|
| 0x8000_0000 | timer | 0x00 CTRL (bit 0 run, bit 1 irq enable); 0x04 PERIOD (cycles, reset 1000); 0x08 COUNT; 0x0C STATUS (bit 0 expired, write 1 to clear) |
| 0x8000_0100 | interrupt controller | 0x00 PENDING (rising edges captured, write 1 to clear); 0x04 MASK; 0x08 ACTIVE = PENDING & MASK. Sources: 0 timer, 1 message received |
| 0x8000_0200 | DFS | 0x00 FREQ (K, 1..16; 0 reads as 1, above 16 as 16); 0x04 CHANGES (settings taken into use) |
| 0x8000_0300 | message module | 0x00 TXDATA (push a word); 0x04 TXSEND (write target {x[7:4], y[3:0]}: sends the pushed words as one message); 0x08 RXDATA (pop); 0x0C STATUS (bit 16 sending, [15:8] words to send, [7:0] words received) |
| 0x8000_0400 | memory mapper | 0x00/0x0C window 0/1 CTRL (bit 0 enable, [15:8] owner node {x, y}); 0x04/0x10 BASE; 0x08/0x14 LIMIT (inclusive) |

## Remote memory access, step by step

This is the part of the design that takes the most care to understand.

### A line fill

Take a data read miss at a worker node on a line in the host's shared area:

1. The data cache asks the mapper for the line.
2. The address is in window 0, so the mapper hands the request to
   **RMA-Send**. RMA-Send builds a read request of 2 payload flits to the
   host and waits.
3. The NI queues the request and moves it into the network clock domain.
   The mesh carries it to the host.
4. At the host, the NI passes the request to **RMA-Reply**, which reads the
   8 words through RAM port B. The first answer flit is ready 10 cycles
   after the address flit arrives.
5. RMA-Reply returns a 9-flit answer packet.
6. Back at the worker, RMA-Send collects the 8 words, the mapper hands the
   line to the cache, and the cache acknowledges the CPU.

### Write-backs

Write-backs of dirty lines in a window, whether on a miss or a flush, travel
as write requests carrying the whole line. The owner answers with a write
acknowledgement, and the flush completes only after that answer. When a
flush returns, the data is in the owner's RAM.

### Coherence in software

There is no coherence hardware. A thread library keeps shared data
consistent with flush and invalidate:

* flush the data cache at thread creation and mutex unlock;
* invalidate at mutex lock and on the executing side;
* do both at barriers.

Remote execution uses window 1 the same way for code. Instructions are
cached, so a task's loop is fetched from the remote node only once.

### Measured latency

In the full 3x3 system test:

* An instruction-line miss at node (1,1) served by the host at (0,0) takes
  **55 node cycles** from the request to the acknowledge on an idle network.
* With eight workers fetching from the host at once, the same miss took 159
  cycles.
* With the node's router looped back to itself (no mesh hops), a line fill
  takes 45 cycles.

The original system reports 182 cycles at zero load, counted from the
cache-line request until the thread runs again. The figure here stops at the
cache's acknowledge and has no CPU pipeline in it, and the hardware path is
shorter. The system test checks that the idle figure stays below 182. Other differences from the
original figures:

* RMA-Reply is busy about 20 cycles per line read, where the original
  reports 64.
* One requester with one miss outstanding moves a 32-byte line every 55
  cycles, about 290 MB/s at 500 MHz, where the original reports 90 MB/s end
  to end.
* With eight threads missing at once, one host serves a line about every 23
  cycles, about 690 MB/s. The original reports a plateau near 200 MB/s and
  a ceiling of 250 MB/s.

The numbers here come from this RTL alone. Treat them as lower bounds
rather than a reproduction of the original measurements.

## Messages

To send a message, software:

1. pushes up to 16 words into TXDATA;
2. writes the target node into TXSEND.

The module then sends one packet: a command word followed by the words.
STATUS bit 16 stays set until the packet is out.

Received messages go into a 16-word FIFO. The receiving CPU first reads the
command word, which gives the sender and the length, and then the payload.
The module raises interrupt source 1 while the FIFO is not empty. When the
FIFO is full, the network interface stalls and the message waits in the
network. Nothing is dropped.

## Clocks: frequency scaling and domain crossings

`dfs` gives its node K out of every 16 pulses of the 500 MHz reference
clock, where K is 1..16, so the node runs at K/16 · 500 MHz.

How it works:

* An accumulator spreads the kept pulses evenly.
* A flop on the falling edge holds the enable, so every kept pulse is a full
  high phase. The gate is glitch-free without a latch.
* A new K written by the node is synchronised into the reference domain by
  two flops. It takes effect at the next pulse boundary, and CHANGES counts
  it.

The step is 31.25 MHz. The 425 MHz of the original experiments therefore
falls between 406.25 MHz (13/16) and 437.5 MHz (14/16).

The node clock drives:

* everything in the node: caches, mapper, RAM, RMA, message module and
  peripherals;
* the node side of the NI;
* the CPU, which must also use it. It is available as `clk_cpu`.

The routers and the network side of the NI run on the reference clock. The
two `async_fifo`s are the only data crossings. The only other crossing is
the DFS setting itself, which passes through its two-flop synchroniser.

The deciding loop is software. A per-task PID controller compares measured
throughput with a setpoint and writes FREQ. The timer provides its periodic
interrupt.

## How this design departs from the original description

* **Remote data is cached.** In remote execution the original leaves data
  uncached. Here, data lines from a window are cached like any other, and
  software flushes and invalidates them as in the shared-memory mode.
  Instructions are cached in both.
* **Writes are acknowledged.** Every remote write gets an acknowledgement,
  so a flush is complete when it returns. The original does not say how
  write completion is known.
* **One RMA for both uses.** The same RMA serves remote execution and
  shared-memory bonding. The original describes the multithreading RMA as a
  modified version of the remote-execution one.
* **Shared crossing FIFOs.** The NI's pair of asynchronous FIFOs is shared
  by RMA-Send, RMA-Reply and the message module.
* **Register bus.** The node bus is a reduced Wishbone for registers only.
  The caches reach memory over a separate line interface.
* **Designed here, not given in the original.** The packet and command-word
  formats, the register maps, the FIFO depths other than the 4-flit router
  buffers, the K/16 clock scheme, the per-router latency and the RMA timing.
* **Not built:**
  * the CPU core;
  * the optional UART;
  * the PID controller, which is kernel software;
  * the host application processor that loads work into the array.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| openscale_top, noc_mesh | NX, NY | 3, 3 | mesh size; coordinates are 4 bits, so up to 16 x 16 |
| openscale_top, noc_mesh, hermes_router | BUF_DEPTH | 4 | router input FIFO depth in flits |
| openscale_top, pe_node | ICACHE_BYTES, DCACHE_BYTES | 16384 | cache sizes (power of two, at least one line); 4096 and 8192 were also evaluated originally |
| openscale_top, pe_node, local_ram (BYTES), dsm_mapper, rma_reply | RAM_BYTES | 131072 | node RAM; 64 kB and 256 kB are the other sizes of interest |
| openscale_top, pe_node, dfs (STEPS) | DFS_STEPS | 16 | clock-scaling resolution |
| network_interface | AFIFO_DEPTH | 8 | clock-crossing FIFO depth |
| msg_module | TX_DEPTH, RX_DEPTH | 16, 16 | message FIFOs (and the longest message) |
| irq_ctrl | NSRC | 4 | interrupt sources (two used) |

Shared types and widths are in `openscale_pkg`: 32-bit flits, 4-bit
coordinates, 8-word lines, the command word, the line request/response
structs, the register-bus structs and the cache operations.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>` and stops. Each has a watchdog that
counts a failure if it hangs. Build any of them with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal \
    rtl/openscale_pkg.sv $(ls rtl/*.sv | grep -v openscale_pkg) \
    tb/cpu_bfm.sv tb/tb_openscale_top.sv --top-module tb_openscale_top -o sim
./obj_dir/sim
```

Replace the last file and `--top-module` for another testbench. Only the
system test needs `tb/cpu_bfm.sv`, but it does no harm elsewhere.

What the testbenches cover:

* `tb_flit_fifo`, `tb_async_fifo`, `tb_local_ram`: reference-model checks
  under random traffic. The FIFOs are also checked for full/empty behaviour
  at the exact depth.
* `tb_hermes_router`: all five inputs send random packets under random
  back-pressure. Each output must carry whole packets that the XY rule
  sends there. Also checks the 2-cycle zero-load latency.
* `tb_noc_mesh`: every source/target pair on the 3x3 mesh at zero load,
  checking delivery and a latency of 2·(hops+1). Then random all-to-all
  traffic with ejection stalls.
* `tb_network_interface`: three users at once, with unrelated node and
  network clocks and loopback. Checks packet framing and steering by command
  kind.
* `tb_rma_send`, `tb_rma_reply`: request and answer formats, data, and the
  10-cycle read turnaround.
* `tb_l1_cache`: a small cache against a reference model. Covers fills,
  write-backs, byte writes, tag-matched flush and invalidate, and
  same-cycle hits.
* `tb_dsm_mapper`: window decode, local 11/10-cycle line timing, and both
  caches waiting at once.
* `tb_msg_module`, `tb_timer`, `tb_irq_ctrl`, `tb_dfs`: register behaviour,
  interrupt timing, message framing, and exact pulse counts per setting.
* `tb_pe_node`: one node whose router port is looped back to itself. Runs
  every path of the node, local and remote, with a CPU model.
* `tb_openscale_top`: the 3x3 system at its default sizes (16 kB caches,
  128 kB RAM). Details below.

In `tb_openscale_top`, all nine nodes form one cluster with the host at
(0,0):

* The host writes a shared array and sends each worker a message.
* The workers bond to the host and read the array through remote line
  fills. Each writes its result into the host's memory, flushes it and
  reports by message.
* The host checks every result twice: once from the message and once from
  its RAM.
* Node (1,1) also runs code from the host through window 1.
* Two nodes run at reduced clocks, and one takes timer interrupts.

The test counts every mechanism and fails if one never happened:

* remote fills;
* remote write-backs;
* requests served by the host;
* remote instruction fetches;
* messages;
* network back-pressure;
* reduced-clock cycles;
* timer interrupts.

It runs in well under a minute.

`tb_workload_threads` replays the instruction traffic of four benchmark
threads on the same default system:

| benchmark | code size |
|-----------|-----------|
| MJPEG | 52 kB |
| SmithWaterman | 3.8 kB |
| LU | 2.4 kB |
| FFT | 5 kB |

For each benchmark, eight nodes run the thread's code from the host
through window 1, making two passes over it. The test checks:

* every word fetched;
* that the second pass hits on every line when the code fits the 16 kB
  instruction cache;
* that the second pass misses on every line when it does not (MJPEG).

It reports the host's serving bandwidth for each benchmark. The CPUs are
models, so the computation itself is not run. It runs in about half a
minute.

## Notes for changing the design

* **Mesh size.** Coordinates are 4 bits in the header and in the command
  word. For a mesh larger than 16 x 16, widen `COORD_W` and the header
  layout together.
* **Line size.** A line is `LINE_WORDS` = 8 words. RMA-Send, RMA-Reply and
  the mapper all move exactly one line per request.
* **Memory map.** The data-port decode (`d_addr[31]`, then bits [10:8]) is
  in `pe_node`. RAM addresses wrap at `RAM_BYTES`.
* **Cache port protocol.** The cache expects its requester to hold the
  request until acknowledged. A CPU core that cannot must add a request
  register.
