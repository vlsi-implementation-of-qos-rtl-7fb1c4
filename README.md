# Adaptive QoS network-on-chip with runtime monitoring

This is a packet-switched network-on-chip for a grid of processing elements (PEs). It tries to
keep connections with bandwidth requirements out of congested links in three ways:

* **Bandwidth-weighted XY routing (wXY).** Every header asks for a bandwidth `R`. Each router
  weighs the productive directions toward the destination by the bandwidth that is still free
  on each one. The packet takes the heavier direction, so it can move along X or Y first,
  whichever is less loaded.
* **A shared pool of virtual channel buffers (VCBs).** The buffers do not belong to input
  ports. A packet gets a buffer from the router's pool when its header arrives and returns it
  when its tail leaves. Buffering follows the traffic rather than the port count.
* **A monitoring loop.** Each tile counts how long each transaction has been held up in its
  router. A transaction that crosses a threshold is reported to its source tile, over the
  network itself, as a high-priority monitoring packet. The source first asks its network
  interface to resend the transaction. After a few resends it asks a system agent to re-map
  the task instead.

The top level, `adnoc_mesh`, is a 4 x 4 mesh of tiles. Each tile holds a router and both halves
of the monitor. The PEs, the network interfaces' packet buffers and the re-mapping agent are
outside the RTL; their connections are ports of the top.

## Flits and packets

A flit is 10 bits: a 2-bit type and an 8-bit payload (`noc_pkg::flit_t`).

| type | name    | payload bits |
|------|---------|--------------|
| `00` | HEAD    | `[7]` monitoring packet, `[6:4]` transaction ID, `[3:2]` destination X, `[1:0]` destination Y |
| `11` | HEAD2   | `[7:4]` required bandwidth R, `[3:2]` source X, `[1:0]` source Y |
| `01` | BODY    | data |
| `10` | TAIL    | data (for monitoring packets: `[2:0]` the transaction ID being reported) |

A packet is HEAD, HEAD2, any number of BODY flits, and then TAIL. Coordinates are 2 bits, which
is what limits the mesh to 4 x 4. X grows to the east and Y grows to the south. `make_head` and
`make_head2` in `noc_pkg` build the two header flits.

### Link protocol

Every link (router to router, PE to router) is `valid`/`flit` forward and `nack` backward. A flit
moves in a cycle where `valid` is high and `nack` is low. Otherwise the sender keeps the same
flit on the link. Nothing is ever dropped.

## Router (`adnoc_router`)

The router has five ports: N, E, S, W and the local PE (index 0 to 4, `noc_pkg::port_e`). A flit
passes through these stages:

1. **Input decoder** (`input_decoder`, one per port). It collects HEAD and HEAD2 and raises
   `alloc_req` with the decoded header. It holds both header flits until a VCB is granted, then
   writes them into that VCB, followed by the rest of the packet. A stray BODY or TAIL flit where
   a HEAD is expected is discarded.
2. **Route computation** (`wxy_route` with `wxy_weight`). See the next section.
3. **Virtual channel arbiter** (`vc_arbiter`). It assigns VCBs and keeps, for each VCB, the
   output port, the monitoring flag and the reserved bandwidth. It also keeps, for each input,
   a pointer to its current VCB, which steers that input's body flits. When a VCB is full, the
   input is refused with `nack`.
4. **VCB pool** (`vcb_fifo` x `NUM_VCB`). These are plain FIFOs.
5. **Space-division crossbar** (`sdm_crossbar`). Each output serves one VCB from HEAD to TAIL
   (wormhole: packets are not interleaved on a link). It picks a VCB holding a monitoring
   packet first, otherwise it rotates among the rest. When a tail leaves, the VCB is freed and
   its bandwidth reservation is released.

**Latency.** A header taken at clock edge *t* (HEAD) and edge *t+1* (HEAD2) is granted a VCB in
the following cycle. HEAD appears on the output link four edges after it was taken, when nothing
else is in the way. Body flits then stream at one per cycle.

### Weighted XY route

For each output the router keeps `A = TOTAL_BW - (sum of R of the packets currently assigned to
it)`. For a productive direction with remaining hop distance `d` in that dimension, the weight
is

```
W = (A >= R) ? A*d + TOTAL_BW : A
```

That is, a direction that can take the connection gets a bonus of `TOTAL_BW` and is scaled by
how far there is still to go; a direction that cannot take it only counts its leftover bandwidth.
The better of E/W is compared with the better of N/S, and ties go to X. A packet whose
destination is this router goes to the PE port. `path` is the one-hot direction (N, E, S, W),
or 0 for the PE. Weights are 32 bits wide. Only productive directions take part, so routes are
always minimal.

The bandwidth accounting is local to each router. `A` is what this router has promised on its
own output links, not a measurement of the downstream router.

### On-demand VCB assignment and the admission rule

The arbiter grants at most one header per cycle. Monitoring headers go first, then the inputs
in round robin order, and the lowest-numbered free VCB is used. A header is granted only if
enough VCBs are free:

| header goes to | free VCBs needed |
|----------------|------------------|
| local PE | 1 |
| another router, monitoring packet | 2 |
| another router, regular packet | 3 (capped at `NUM_VCB`) |

This rule is this design's own addition. With a shared pool, two routers that both filled their
pools with packets heading for each other would wait forever. The rule keeps a VCB free for
ejection and one more for monitoring traffic. With the default `NUM_VCB = 3`, each router
therefore carries at most one regular packet bound for another router at a time.

**Deadlock caveat.** The rule keeps monitoring packets and ejection moving, but it does not make
the network deadlock-free. Adaptive minimal routing over a shared pool can still form cyclic
waits when regular traffic flows in opposite directions around a cycle of routers (uniform
random all-to-all traffic does lock up). Traffic that flows consistently in one quadrant
direction (e.g. east and south), with monitoring packets flowing back, runs indefinitely. Adding
escape channels or a turn restriction would be the next step for general traffic.

## Monitoring

The monitor is split between the router side (`event_monitor`) and the network-interface side
(`ni_monitor`). `mon_ni_port` sits on the PE link and lets the monitor send and receive its own
packets over the normal network.

### Event counting (`event_monitor`)

An *event* is a cycle in which the transaction on an input port is held up: a flit is refused
because its VCB is full, or its header is still waiting for a VCB. Each of the five ports has a
counter. It is cleared when a new transaction starts on that port (HEAD2 taken), and it counts
up on each event cycle. When it reaches `THRESH`, the transaction's ID and source address are
reported once. Monitoring packets are never counted. The default threshold is 32 cycles in the
tile and mesh (8 in the stand-alone module).

### Decision (`ni_monitor`)

Reports arrive on two paths: from the local router (`loc_evt_*`) and from monitoring packets
received by this tile (`rem_evt_*`). Each has a 4-deep FIFO, and the two are served
alternately. For each report:

* **Source is another tile** (local report only): a monitoring packet request (destination,
  transaction ID) is queued for `mon_ni_port`.
* **Source is this tile**: the per-transaction send counter is read. The table read takes one
  cycle, during which no other report is accepted. Then:
  * if the counter is below `RESEND_TH`, `resend_valid` pulses and the counter is incremented;
  * otherwise, `remap_valid` pulses and the counter is cleared.

`clr_valid`/`clr_tid` lets the network interface clear a counter when a transaction completes.
A report takes four cycles from leaving its FIFO to the decision.

### Monitoring packets (`mon_ni_port`)

A monitoring packet is three flits: HEAD with bit 7 set, HEAD2 with `R = MON_REQ_BW` and this
tile as source, and TAIL carrying the reported transaction ID. The port injects it into the
router's PE input only between PE packets, and ahead of the next PE packet. On the way out,
monitoring packets are removed from the stream to the PE and their ID goes to `rem_evt_*`. If
the monitor's FIFO is full, the packet is held back with `nack` rather than dropped.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `COLS`, `ROWS` | 4, 4 | mesh | mesh size (at most 4 x 4 with 2-bit coordinates) |
| `NUM_VCB` | 3 | mesh, tile, router, arbiter, crossbar | VCBs per router |
| `VCB_DEPTH` | 4 | mesh, tile, router | flits per VCB |
| `TOTAL_BW` | 64 | mesh, tile, router, route | bandwidth units per link, `T` in the weight |
| `EVT_THRESH` | 32 | mesh, tile | event cycles before a transaction is reported |
| `RESEND_TH` | 3 | mesh, tile, ni_monitor | resends before a re-mapping is requested |
| `MON_REQ_BW` | 1 | mon_ni_port | bandwidth asked for by monitoring packets |

The three VCBs per router follow the reference design. The other values are this design's
choices; the source gives no number for them.

## Where this departs from the reference design

* The reference crossbar is labelled TDM/SDM. Only space-division switching is built, because
  no time-division scheme is specified.
* The header is split into two 8-bit flits (destination and ID in the first; bandwidth and
  source in the second), to keep an 8-bit datapath while carrying the source that the monitor
  needs.
* What counts as an event (a held-up cycle), the thresholds, the buffer depth and the bandwidth
  units are this design's interpretation.
* In the reference design, body flits are steered by a lookup on flit type. Here they follow
  the VCB pointer that was recorded when their header was assigned.
* The VCB admission rule and the monitoring request FIFO are additions against deadlock; see
  the caveat above.
* The network interface (packetisation, packet buffer, retransmission), the PEs and the
  re-mapping agent are not part of the RTL. `resend_*`, `remap_*` and `clr_*` on each tile are
  the hooks for them.
* The reference design's reported power, area and frequency figures come without the
  configuration behind them and are not reproduced here.

## Files

| file | content |
|------|---------|
| `rtl/noc_pkg.sv` | shared types, widths and header helpers |
| `rtl/adnoc_mesh.sv` | top: `COLS x ROWS` tiles, edge links tied off |
| `rtl/adnoc_tile.sv` | router + monitors + PE-port adapter |
| `rtl/adnoc_router.sv` | five-port router |
| `rtl/input_decoder.sv`, `rtl/vc_arbiter.sv`, `rtl/vcb_fifo.sv`, `rtl/sdm_crossbar.sv` | router stages |
| `rtl/wxy_route.sv`, `rtl/wxy_weight.sv` | route computation and weight |
| `rtl/event_monitor.sv`, `rtl/ni_monitor.sv`, `rtl/mon_ni_port.sv` | monitoring |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Each file starts with a comment on its interface, timing and design choices.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a watchdog ends a hung
run with a failure. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv rtl/*.sv tb/tb_adnoc_mesh.sv \
          --top-module tb_adnoc_mesh -o sim && ./obj_dir/sim
```

Replace `tb_adnoc_mesh` with any other testbench name to test one block. `tb_adnoc_mesh` runs the
full 4 x 4 mesh at its default parameters. It sends east/south traffic with a hot spot, and
checks that every packet arrives whole, with its flits in order, at the right PE. It also counts that each
mechanism occurs:

* adaptive route choices;
* VCB-full refusals;
* VCB waits;
* reported events;
* monitoring packets sent and received;
* resend and re-map decisions.

Any mechanism that never happens counts as a failure. It takes well under a minute to build and
run.
