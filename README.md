# OCP network adapters for a clockless (MANGO-style) network-on-chip

A system-on-chip built as GALS (globally asynchronous, locally synchronous)
has IP cores in their own clock regions, joined by a clockless, message-passing
network-on-chip. The cores, however, speak a memory-mapped socket protocol:
here OCP 2.0 (Open Core Protocol), with reads, writes, bursts, threads and
interrupts. The network adapters in this repository close that gap. An
**initiator adapter** sits next to a master core (a processor) and turns its
OCP transactions into packets; a **target adapter** sits next to a slave core
(a memory), rebuilds the transactions from the packets and sends the responses
back. Each adapter also carries data safely between the core's clock and the
network's timing.

The architecture follows the published MANGO network adapter: a clocked half
for OCP handshaking and packet (de)encapsulation, a network-side half for flit
serialization and packet reassembly, and a 2-phase channel with two-flop
synchronizers between them that moves a whole packet at a time. Everything
below the level of block names and their jobs (packet layout, handshake
details, buffer sizes, configuration encoding) is this implementation's own
choice. The biggest departure: the network-side half, clockless in the
original, is written here as synchronous logic on a separate clock `net_clk`
(see *The network side is clocked here*).

## Structure

```
                     initiator adapter                                  target adapter
 master  ┌──────────────────────────────────────────┐      ┌──────────────────────────────────────────────┐  slave
 core    │ OCP clock                 | network side │      │ network side | OCP clock                      │  core
 ──OCP──►│ ocp_init_req_hs ► na_req_encap ► na_sync_c2a ► na_transmit ══► na_receive ► na_sync_a2c ► na_req_decap ► ocp_tgt_req_hs ──OCP──►
         │                   (na_route_lut)                                                    │ push          │
         │                                                                          na_resp_path_fifo          │
         │                                                                                     ▼ pop           │
 ◄──OCP──│ ocp_init_resp_hs ◄ na_resp_decap ◄ na_sync_a2c ◄ na_receive ◄══ na_transmit ◄ na_sync_c2a ◄ na_resp_encap ◄ ocp_tgt_resp_hs ◄──OCP──
         │  (SInterrupt pin)                                                               (na_interrupt ◄ SInterrupt)
```

| Module | Role |
|---|---|
| `mango_na_system` | top: one initiator and one target adapter; all network ports brought out |
| `mango_initiator_na`, `mango_target_na` | the two adapters |
| `ocp_init_req_hs` | OCP slave socket, request and write-data phases |
| `na_req_encap` + `na_route_lut` | OCP request → packet chunk; BE route lookup by `MAddr[31:24]` |
| `na_sync_c2a`, `na_sync_a2c` | clock-boundary channels (2-phase + two-flop synchronizer ↔ 4-phase) |
| `na_transmit` | chunk → flits on one output port (4-phase per flit) |
| `na_receive` | per-port flit buffers, packet reassembly, forwarding rule |
| `na_req_decap` | chunk → OCP request items; response-path FIFO push; configuration |
| `na_resp_path_fifo` | where each outstanding read's response must go |
| `ocp_tgt_req_hs`, `ocp_tgt_resp_hs` | OCP master socket toward the slave |
| `na_interrupt` | slave `SInterrupt` → interrupt packets (virtual wire) |
| `na_resp_encap` | responses and interrupts → packet chunks |
| `na_resp_decap`, `ocp_init_resp_hs` | chunk → OCP response phase; `SInterrupt` pin |
| `mango_na_pkg` | widths, OCP/packet/chunk types |

Each adapter has `NPORTS = 1 + NUM_GS` network ports in each direction
(default 4). Port 0 is the best-effort (BE) port: packets there are routed by
a header flit holding a routing path. Ports 1..3 are guaranteed-service (GS)
connections, virtual circuits to one other adapter that need no header. The
master chooses the output port per request with `MConnID`; any number of
threads may share a port.

## Packets and chunks

Flits are 32 bits plus an end-of-packet (`eop`) bit. Packet layout:

| Flit | Request | Read response | Interrupt |
|---|---|---|---|
| header (BE port only) | forward routing path | return path | configured path |
| control | type, thread, burst length, return path | type, thread, burst length, SResp | type, interrupt bit, level |
| address | `MAddr` | – | – |
| data | one per write word | one per read word | – |

Control flit bits: `type[31:30]` (write 0, read 1, configuration 2, response
3), `thread[29:28]`, `burst length[27:24]`, `SResp[23:22]`, `interrupt[21]`,
`level[20]`, `return path[15:0]`.

The unit that crosses between the two halves of an adapter is a **chunk**: up
to four flits, the port they belong to, and whether the chunk ends the packet.
A request's first chunk holds header, control, address and first data word,
so a single read or write crosses the clock boundary in **one** handshake, not
one per flit. Further words of a burst cross one per handshake.

Writes are posted: no response packet. A read response returns the request's
`MThreadID` as `SThreadID`, so the adapters keep no table of outstanding
transactions and any number of reads may be in flight. On a GS connection,
where the network keeps order, several may be in flight on the same thread.

## Crossing between the OCP clock and the network side

`na_sync_c2a` (clocked → network) and `na_sync_a2c` (network → clocked) are
the only places where the two timing domains meet.

* On the clocked side the channel uses a **2-phase** (toggle) handshake. The
  sender loads the chunk into a register and toggles `req_tgl`. The receiver
  answers by toggling `ack_tgl`. The side that runs on the OCP clock samples
  the other side's toggle through a **two-flop synchronizer**
  (`na_sync_2ff`). This gives the first flop a full OCP cycle to settle.
* On the network side a **handshake converter** turns each toggle into one
  **4-phase** cycle (`req`↑ `ack`↑ `req`↓ `ack`↓). 4-phase is what the
  network's links use.
* Bundled data: the chunk register does not change while the channel is
  busy, so the receiver may read it as soon as it sees the request.

With `τ = 60 ps`, `T_W = 120 ps`, a 400 MHz OCP clock, data at a quarter of
that rate and one clock period to settle, the published MTBF estimate
`e^(T/τ) / (T_W·f_C·f_D)` comes to about 2.6·10¹¹ s.

Timing, OCP side:

* A request accepted at OCP edge *k* sits in the handshaking register. Route
  lookup and encapsulation are combinational.
* The chunk is loaded into the synchronizer at edge *k+1*. This
  one-cycle packetization is checked in the end-to-end test.
* In the other direction a chunk becomes `out_valid` two OCP edges after
  its toggle.

## Reassembly and forwarding (`na_receive`)

Every input port has its own buffer of `DEPTH` flits, 8 by default. A packet
is handed to the clocked half only when it is complete, that is, when its eop
flit is buffered. There is one exception: a long packet is forwarded once its
first `FIRST_FLITS` flits are in. In the target this is 3 flits: control,
address and the first data word. In the initiator it is 2 flits: control and
the first data word. A burst longer than the buffer can therefore stream
through. After a port has started forwarding a packet, it keeps the output
until that packet's end. Between packets the ports are served round robin.
The BE header never reaches a receiver, because the network uses it up on the
way (see the network model below).

## Configuration and interrupts

Configuration uses write transactions, with two `MConnID` codes that are
this design's own choice:

* `MConnID = 4`: local route-table write. Entry `MAddr[9:2]` ←
  `MData = {return path[31:16], forward path[15:0]}`. No packet is sent. The
  table has 256 entries, one per value of `MAddr[31:24]`, and is not reset.
* `MConnID = 5`: target configuration. A configuration packet goes out on
  the BE port, routed by the table entry for `MAddr[31:24]`. The target
  stores `MData = {port[17:16], path[15:0]}` as its interrupt destination.

Interrupts work as virtual wires. Each change of the slave's `SInterrupt`
level makes the target send an interrupt packet carrying the new level. The
initiator's `SInterrupt` pin takes that level. The original only states that
an interrupt packet makes the initiator assert its pin. Sending the falling
edge as well, so that the pin follows the slave's level, is this design's
choice. No interrupt packet is sent
before the destination is configured; a change that happens earlier is sent
once it is. An interrupt packet is never inserted inside a burst response.

## OCP subset

* Commands: `WR` and `RD`, with `MBurstLength` 1..15. A burst length of 0
  counts as 1.
* Single-request bursts with the data handshake (`MDataValid`,
  `SDataAccept`, `MDataLast`). The initiator accepts a write request together
  with its first data word.
* `MThreadID` (2 bits); `MConnID` (3 bits).
* Response phase: `SResp`, `SData`, `SThreadID`, `SRespLast`, `MRespAccept`.
* `SInterrupt`.

Struct types `ocp_m2s_t` and `ocp_s2m_t` in `mango_na_pkg` hold the master
and slave signals. Assertions in the handshaking modules check that a request
or response stays stable until it is accepted, and that `MDataLast` is right.

## The network side is clocked here

In the original adapter, Transmit, Receive and the handshake converters are
clockless circuits. Here they are synchronous logic on `net_clk`, which is
unrelated to the OCP clock `clk`. The 4-phase protocol is kept on every
network-side interface. Every 4-phase input that comes from outside the
module (link requests and acknowledges) passes through a two-flop
synchronizer, so links between adapters on different `net_clk`s are safe.

Consequences:

* The design is fully synthesizable, but every flit costs several `net_clk`
  cycles of handshaking.
* The latency overhead is not comparable with the original's 3–8 OCP
  cycles. With `net_clk` 2.5 times the OCP clock, the end-to-end test measures:
  * about 35 (GS) to 43 (BE) OCP cycles from request accept to the first read
    word;
  * about 26 to 30 cycles until a posted write reaches the slave.
* The choice of 1-cycle encapsulation and whole-packet synchronization is
  preserved.
* Area and port transmit speed are not characterized.

Reset is one active-low asynchronous `rst_n` for both domains. A product
would synchronize its release into each domain.

## Parameters

| Parameter | Where | Default | Meaning |
|---|---|---|---|
| `NUM_GS` | adapters, top | 3 | GS connections; ports = 1 + `NUM_GS` (at most 3, `PORT_W` = 2) |
| `RX_DEPTH` | adapters | 8 | flit buffer per input port |
| `RPF_DEPTH` | target | 4 | response path FIFO entries |
| `DATA_W`, `ADDR_W`, `FLIT_W` | package | 32 | OCP data/address, flit width |
| `LUT_IDX_W` | package | 8 | route table index bits (`MAddr` MSBs) |
| `THREAD_W`, `BURST_W`, `CONN_W` | package | 2, 4, 3 | OCP field widths |

## What is not here

* The network itself (routers and links), and the master and slave cores.
  The top brings out both adapters' ports: `ini_tx_*`/`tgt_rx_*` for
  requests and `tgt_tx_*`/`ini_rx_*` for responses. Each port has a request
  bit, an acknowledge bit and an array of `flit_t`.
* `tb/mango_noc_model.sv` joins them head to head, port *p* to port *p*, with
  random delays. On port 0 it drops the first flit of every packet: the
  routing header, which a real network uses up on the way.
* Write responses (`writeresp_enable`), `ReadEx`/`WriteNonPost` and other
  OCP commands. The target ignores the slave's `SThreadID` and returns the
  `MThreadID` it stored.
* The target drives `MConnID` = 0 toward the slave.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/mango_na_pkg.sv tb/tb_mango_na_system.sv --top-module tb_mango_na_system
./obj_dir/Vtb_mango_na_system
```

Replace `tb_mango_na_system` with any other testbench in `tb/`. For a lint
run: `verilator --lint-only -Wall -Irtl rtl/mango_na_pkg.sv rtl/<module>.sv`.

`tb_mango_na_system` runs the whole design with default parameters. It covers:

* route-table programming;
* BE and GS single and burst reads and writes on every connection, checked
  against a reference memory;
* BE headers in both directions;
* a 12-word burst through the 8-flit buffers, forwarded early;
* four reads outstanding at once;
* random back-pressure on every OCP phase;
* target configuration over the network;
* interrupts rising and falling, to a GS and a BE destination.

It counts each of these mechanisms and fails if one never happened.

`tb_mango_na_be_only` builds the smallest member of the family: a BE port
only, `NUM_GS = 0`. It runs single, burst and outstanding reads,
configuration and an interrupt, all over BE. It then measures the latencies
twice, with `net_clk` 2.5 times and then 5 times the OCP clock:

| `net_clk` / OCP clock | read | write | interrupt |
|---|---|---|---|
| 2.5 | 42 | 32 | 13 |
| 5.0 | 28 | 18 | 9 |

All values are OCP cycles. The test checks that the overhead in OCP cycles
does not grow when the core is slower. The network side's cost is fixed in
time, not in OCP cycles.

Each block also has its own randomized, self-checking testbench,
`tb/tb_<module>.sv`.

Lint warnings that remain are unused bits of shared structs, for example
the fields a given decapsulator does not read. The target's `MConnID` output
is a constant 0.
