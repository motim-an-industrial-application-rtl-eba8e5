# MOTIM: a Fast Ethernet switch built around a network on chip

MOTIM switches Ethernet frames between 24 Fast Ethernet ports. It does not use a crossbar or a
shared memory. Instead, each port cuts its frames into fixed 128-byte **cells**. A cell crosses a
4x4 mesh **network on chip (NoC)** over a short-lived **circuit**, and the destination port puts
the frame back together before it sends it out. The mesh is the reason the design scales: more
ports mean more routers, not a wider central switch. Every per-port block is the same design
instantiated 24 times.

This repository holds synthesizable SystemVerilog for:
- the NoC (routers and mesh);
- the per-port network interface, including its MAC address table;
- the per-port packet/cell converter;
- a top level that wires 24 ports to the mesh.

The Ethernet MACs are not included. Each port brings out a byte-stream interface where a MAC
(or a traffic generator) connects.

```
 MAC --bytes--> PC (cut into cells) --> NI (address lookup, circuit set-up) --> NoC
 MAC <-bytes--- PC (reassembly per session) <-- NI (address learning) <------- NoC
```

## Ports, routers and local port numbers

There are 16 routers. Router `r` sits at `x = r % 4`, `y = r / 4`, and "north" means `y+1`. Each
router has two **local ports**, numbered `LP = 2*r + port`, so LP runs from 0 to 31.

The 12 routers off the main diagonal carry the 24 Ethernet ports. The 8 local ports of the
diagonal routers (0, 5, 10, 15) are reserved for system blocks: a control processor, bulk memory
and supervision. In `motim_top`, these 8 ports are brought out unchanged as `sp_*` ports. The
parameter `DATA_MASK` chooses which local ports get a PC/NI chain. Its default is
`data_port_mask(4,4)`, the 24 off-diagonal ports.

## The NoC: circuits set up by small packets (`motim_router`, `motim_noc`)

Each mesh link is split into `NLANES = 2` independent byte-wide **lanes** in each direction. This
is space-division multiplexing: two circuits can cross the same link at once. Each lane carries
forward a flit `{valid, eop, data[7:0]}`. It carries backward a response `{ack, nack}`.

A circuit is set up, used and removed as follows.

1. **Request.** The source sends a 2-byte connection packet:
   - byte 0 = `{first_cell, target LP}`;
   - byte 1 = source LP.
2. **Routing.** Every input lane has its own small state machine. When both header bytes have
   arrived, the input asks the router's single **round-robin arbiter** for a route. The arbiter
   grants one input per cycle. Routing is XY: first along x, then along y.
3. **Lane reservation.** At an intermediate router, the granted input takes the first free lane
   of the output direction and passes the header on. If every lane of that direction is taken,
   the router answers **nack at once**. Requests never wait inside the mesh, so the mesh cannot
   deadlock.
4. **Destination.** The request is checked against the target port's sessions (see below).
   - Answer **ack** if:
     - the local output is free, and
     - a session entry fits.
   - Answer **nack** otherwise.
5. **Return path.** Ack or nack travels back along the reserved lanes, one register per hop. A
   nack frees each lane as it passes.
6. **Data.** After ack, the source sends the 128 cell bytes back-to-back, one per cycle, with no
   flow control. A data byte moves one router per cycle.
7. **Tear-down.** The byte marked `eop` frees each lane as it passes. A new circuit is needed for
   every cell.

The channel numbering inside `motim_router`:
- 0 and 1 are the local ports;
- then east lanes, west lanes, north lanes and south lanes, `NLANES` of each.

`local_credit` is high while a local input lane is idle, that is, while it may send a new request.

### Sessions: several sources into one port

A frame arrives as several cells, and each cell uses its own circuit. Cells from different
sources therefore interleave at a destination. Each destination port keeps `NSESS = 4`
**session** entries in its router.

- **First cell.** A request for the first cell of a frame takes a free entry and records the
  source LP.
- **Later cells.** A request for a later cell must find the entry its source holds open.
- **Tagging.** Each delivered cell is tagged with its session number (`local_session`). The PC
  writes it into the matching reassembly buffer.
- **Release.** The entry stays taken until the PC raises the matching bit of `sess_release`. The
  PC does this after it has sent the frame to the MAC or thrown it away.

As a result, up to four sources can send to one port at the same time without blocking each
other. A fifth source receives nacks until a session becomes free.

## Cells and the packet/cell converter (`motim_pc`)

A cell is 128 bytes:

| byte    | contents                                                                        |
|---------|---------------------------------------------------------------------------------|
| 0       | `{first_cell, type = 7'h01}`                                                    |
| 1       | source local port                                                               |
| 2       | priority (from `pkt_priority`)                                                  |
| 3..125  | 123 payload bytes; the last cell is zero padded                                 |
| 126     | `{ptype[1:0], error, 5'b0}`; ptype 00 middle, 01 first, 10 last, 11 single      |
| 127     | cell sequence number; in the last cell, the number of valid payload bytes       |

A 1500-byte frame becomes 13 cells.

### Fragmentation (MAC to NI)

The MAC delivers one byte every 4 cycles: 100 Mb/s against a 50 MHz core clock. The NI accepts
one byte per cycle. The PC therefore needs no frame buffer. It inserts the header bytes in front
of every 123 payload bytes. A 32-entry elastic FIFO absorbs two things:
- these inserted bytes;
- the padding of a last cell while the next frame is already arriving.

### Reassembly (NI to MAC)

The PC has four 2048-byte buffers, one per session. Payload bytes are appended to the buffer of
the cell's session. When a last cell completes a frame, that session joins an output queue. The
queue is kept in completion order, so frames from one source stay in order. The frame is sent to
the MAC (`mac_tx_*`, one byte per cycle in which `mac_tx_ready` is high), and then the session
is released. A cell whose error bit is set throws away everything stored for its session.

## The network interface (`motim_ni`, `motim_addr_mem`)

### Sending

The NI stores cells from the PC in a buffer of `NCELLS = 16` cells: one frame of up to
16 x 123 bytes. Then:

1. For the first cell of a frame, it looks up the destination MAC address (frame bytes 0-5) in
   its address memory.
2. On a **hit**, every cell of the frame goes to the port that was found.
3. On a **miss**, and for Ethernet broadcast addresses, the frame is **broadcast**. Every cell is
   sent in turn to each data port except the sender (`BCAST_MASK`), each over its own unicast
   circuit.
4. For each cell and target, the NI sends a request. After ack, it streams the cell.
5. After a nack, it waits `RETRY = 200` cycles. The next request starts 202 cycles after the
   nack.

### Overflow

The PC writes cells at the MAC's pace, whether or not the NoC is letting them out. When all 16
slots are full and a new cell begins, the NI refuses that cell.

- **Tell the PC.** The NI raises `pc_error` for 2 cycles, and the PC drops the rest of the frame.
- **Tell the receiver.** If part of the frame is already stored, the NI sets the error bit in the
  newest stored cell, which is from that frame. The receiving PC then throws away the part it
  has already collected.

This is the mechanism that drops frames when a port is overloaded.

### Receiving and learning

Cells from the NoC go to the PC one cycle later. The first cell of each frame teaches the
address memory a pair: the frame's source MAC address (bytes 9-14 of the cell) and the port it
came from.

### Address memory

The address memory holds `P = 256` entries, organised as 64 sets of 4 ways. An XOR fold of the
48-bit address picks the set, so a lookup compares 4 entries in parallel and answers in one
cycle. Each entry holds:
- the address;
- the router and port;
- an 8-bit saturating access counter.

Each lookup hit increments the counter. When a new address is learned and its set is full, the
entry with the smallest **non-zero** counter is replaced. Entries with counter 0 were added
recently and are protected. If every entry in the set is protected, the new address is not
stored.

## Latency and load: what the testbenches show

All latencies are in 50 MHz cycles. Latency is measured from the first byte of a frame entering a MAC
interface to its first byte leaving the destination MAC interface.

| Workload | Configuration | Result |
|---|---|---|
| Functional validation: 12 simultaneous flows, 2250 frames of 70–1500 bytes, minimum gap | all 32 ports as data ports, because several flows use diagonal-router ports | Every frame delivered intact. 0 drops. 261 nacks resolved by retry. Minimum latency per flow within 15% of the published estimate (the check allows 15%). Example: 500-byte frames over 6 routers, 2290 cycles against 2368 estimated. |
| Four sources to one port, 50 x 1500 bytes each, 400 µs gap | default build | 200/200 delivered |
| Same, 300 µs gap (4 x 28.6 Mb/s, more than the target port can send) | default build | 22 frames dropped at the sources' NIs (25 published). Every frame either delivered or counted as dropped. |
| 3x3 mesh, five flows of 200 x 500 bytes | `MESH_X = MESH_Y = 3`, all ports as data ports | 1000/1000 delivered. Average latency 2262–2270 against 2304–2336 estimated. |

## Where this RTL departs from the published design

- **Broadcast.** In this RTL, the sending NI broadcasts by sending each cell as a series of
  unicasts, one per port. The routers hold no broadcast logic.
- **Session release.** The published design does not say when a session entry in the router
  becomes free. Here the PC releases it with an explicit `sess_release` bit after the frame has
  been sent or discarded.
- **Router timing.** Header forwarding, ack/nack return and data timing are this design's own:
  - one register per hop for ack/nack;
  - 2 cycles from header to grant;
  - 1 cycle per router for data.

  The published latency estimates assume 6 cycles per router for data. Measured latencies still
  come out close to those estimates, within a few percent.
- **Blocked requests.** A request that finds no free lane is refused at once rather than queued.
- **Buffer sizes.** These sizes are not given and were chosen:
  - NI buffer: 16 cells, about one block RAM;
  - PC buffers: 2048 bytes per session;
  - PC elastic FIFO: 32 bytes;
  - address-memory counter: 8 bits;
  - associativity: 4 ways.
- **Storage type.** The address memory and all buffers are written as register arrays with
  parallel compare. An FPGA build would map the buffers to block RAM.
- **Cell fields.** The payload-type codes, the error-bit position, zero padding and the `type`
  value of byte 0 are this design's encodings.
- **Special ports.** The diagonal-router ports are reserved for system blocks, as published.
  Some published test flows use them, so those tests run with `DATA_MASK` set to all ones.
- **Not included:**
  - the Ethernet MACs;
  - the control processor, bulk memory and supervision blocks;
  - the Gigabit and 10-Gigabit ports.

  The priority byte is carried in every cell but nothing acts on it.

## Files

| file | contents |
|---|---|
| `rtl/motim_pkg.sv` | cell constants, flit and response types, `data_port_mask()` |
| `rtl/motim_router.sv` | one router: input lane state machines, arbiter, lanes, sessions |
| `rtl/motim_noc.sv` | the mesh of routers |
| `rtl/motim_addr_mem.sv` | 4-way hashed MAC address table |
| `rtl/motim_ni.sv` | network interface: cell buffer, lookup, broadcast, retry, learning |
| `rtl/motim_pc.sv` | packet/cell converter: fragmentation and session reassembly |
| `rtl/motim_top.sv` | the switch: NoC plus PC/NI chains on the data ports |
| `tb/tb_motim_*.sv` | self-checking testbenches, one per block, plus the workloads above |
| `tb/tb_eth_port.sv` | MAC model: sends numbered, time-stamped frames and checks received ones |

`tb_motim_top` runs the default configuration end to end. Each phase checks delivery and
accounting:
1. address flooding;
2. learning;
3. a timed unicast;
4. sustainable and overloading four- and five-source traffic.

It also counts every mechanism listed above at least once: nack, retry, broadcast, table hit,
overflow, drop and discard.

## Simulating

Verilator 5 is enough. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_motim_top -y tb +libext+.sv \
    rtl/motim_pkg.sv rtl/motim_router.sv rtl/motim_noc.sv rtl/motim_addr_mem.sv \
    rtl/motim_ni.sv rtl/motim_pc.sv rtl/motim_top.sv tb/tb_motim_top.sv -Mdir obj -o sim
./obj/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

Run times on a current machine:

| testbench | run time |
|---|---|
| full-size `tb_motim_top` | about 25 s, build included |
| `tb_motim_table1` | under a minute |
| `tb_motim_session_load` | under a minute |

To change the design, start from these parameters of `motim_top`:
- `MESH_X`, `MESH_Y`;
- `NLANES`;
- `NSESS`;
- `P`;
- `NCELLS`;
- `BUF_BYTES`;
- `DATA_MASK`.

Only `NSESS = 4` has been exercised by the port-level testbenches.
