# Eight-port circuit-switched interconnect for a mesh network on chip

This is synthesizable SystemVerilog for a circuit-switched network on chip
(NoC) built from eight-port switches. Each switch serves a cluster of four
processing elements (PEs) and also links to its four mesh neighbours (up, down,
left, right). Because four PEs share one switch, the network needs fewer
switches. PEs on the same switch reach each other through a single switch.

The switch sets up a dedicated path (a *circuit*) from a source PE to a
destination PE before any data moves. The path then stays reserved until the
source lets go. While it is held, the path carries one data word per clock, with
no buffering and no contention. Each output port decides which of the competing
requests gets the path with a small round-robin arbiter built from a counter and
a multiplexer. The arbiter is split into two *sectors*: one for requests from
the local PE ports and one for requests from the neighbour-switch ports.

The default configuration is the one the architecture is shown in: a 3 x 3 mesh
(9 switches, 36 PEs) with 8-bit data channels.

## Network and addressing

```
   (0,0) --- (1,0) --- (2,0)        each switch (x,y):
     |         |         |            ports 0..3  PE 0..3 of the cluster
   (0,1) --- (1,1) --- (2,1)          port 4      up    (row y-1)
     |         |         |            port 5      down  (row y+1)
   (0,2) --- (1,2) --- (2,2)          port 6      left  (column x-1)
                                      port 7      right (column x+1)
```

- A request carries a destination address `dest_t = {x, y, pe}`. Each field is
  2 bits wide, so the address format allows a mesh of up to 4 x 4.
- PE number `n = (y*COLS + x)*4 + pe` on the ports of `noc_mesh`.
- Routing is dimension ordered. The request first moves left or right to the
  destination column, then up or down to the row, then to the addressed PE port.
  A route of this kind never visits a switch twice, and it cannot deadlock in a
  mesh.
- A request is denied by the switch itself if it would leave the mesh (for
  example x = 3 in a 3-column mesh) or if a PE addresses itself.

## A circuit's life

Every port has a forward request (`valid` plus destination), a forward data
channel, and backward `gnt` and `dny` bits. The protocol has three phases:
establish, hold, release.

1. **Establish.** The source raises `req.valid` with the destination and holds
   it. At every switch on the route, the IBC passes the request to one OBC. The
   OBC's arbiter picks the request and loads it into the OBC's request register,
   which locks that output to it. The registered request then goes on to the
   next switch, or to the destination PE.
2. The destination PE answers with `gnt` (accept) or `dny` (refuse). The answer
   travels back along the locked path, one register per switch.
3. **Hold.** After `gnt`, the source drives data. The data goes through every
   switch combinationally, so a word appears at the destination in the same
   clock cycle. The path is the source's alone until step 4.
4. **Release.** The source drops `req.valid`, after a grant or a deny. Each
   switch frees its output on the next clock edge, so the release ripples
   forward one switch per clock.

### Setup latency

For a route through `h` switches with no competing traffic:

| part | clocks per switch |
|---|---|
| counter scan until the arbiter points at the request | 0 .. (sector size - 1) = 0..3 |
| load the request register (lock) | 1 |
| grant register on the way back | 1 |

So the time from request to grant is between `2h` and `5h` clocks: 2 to 5
clocks between two PEs of one switch, 10 to 25 clocks corner to corner in the
3 x 3 mesh (`h = 5`). The testbenches check this range for single transfers.
After the grant, throughput is one word per clock. Data latency is one
combinational path through `h` switches.

## Inside the switch

`eight_port_switch` holds eight input block controllers (`ibc`) and eight output
block controllers (`obc`). Every IBC is wired to every other port's OBC.

**IBC** (one per input port). It decodes the destination of the incoming
request and raises the request line of exactly one OBC. It also offers its
destination and data to all OBCs. It returns the chosen OBC's grant or deny
upstream through a register. It raises `dny` itself for requests that cannot be
routed.

**OBC** (one per output port). It sees the request lines of the seven other
ports, split into two sectors:

| OBC of | local sector | switch sector |
|---|---|---|
| a PE port | the 3 other PE ports | the 4 switch ports |
| a switch port | the 4 PE ports | the 3 other switch ports |

Each sector has its own arbiter (`rr_arbiter`), its own request register and its
own data multiplexer. The multiplexer is selected by the request register. The
port has one physical output channel, so at most one sector may hold it at a
time. `data_o` is the output of the sector that holds the channel. Both sector
multiplexer outputs are also available on the switch's `sec_data_o` port. A
sector that does not hold the channel drives zero there.

### The counter/mux arbiter

`rr_arbiter` is the whole arbitration mechanism, and it is easy to misread:

- A counter drives the select lines of a multiplexer over the sector's request
  lines. The multiplexer output (`hit`) is also the counter's active-low
  enable.
- While the request it points at is low, the counter steps to the next requester
  every clock, wrapping at N-1.
- When it points at an active request, the counter stops, and stays stopped as
  long as that request is held. A locked requester therefore keeps the arbiter
  for its whole transaction.
- When the requester drops its request, the counter moves on. Each requester
  gets its turn in counter order. No requester waits for more than N-1 others
  in its sector.

The arbiter does not jump to the next active request; it scans one position per
clock. That scan is where the 0..3 clocks in the latency table come from.

### Two sectors, one channel

The OBC locks the channel on the clock edge after a sector's `hit` is seen while
the channel is free. If both sectors hit in the same cycle, a one-bit priority
flag decides, and the flag then passes to the other sector. The losing sector's
counter stays on its requester, which therefore keeps waiting. Under full load
the channel alternates between local and remote traffic. For example, with all
seven requesters of PE port 1's OBC active from reset, the service order is
0, 4, 2, 5, 3, 6, 7.

## Choices made in this implementation

The architecture names the components: eight ports with an IBC and an OBC each,
request/grant/deny and data signals, two arbitration sectors of 3 and 4
requests, the counter/mux arbiter, and request registers that lock the data
channel. It does not fix the following, which are this design's own:

- the destination address format, the port numbering and the dimension-ordered
  routing;
- the handshake: requests held for the whole transaction, release by dropping
  the request, grant and deny registered once per switch;
- the cases where a deny is raised (the destination refuses, a route leaves the
  mesh, a PE addresses itself);
- how the two sectors share the single output channel (alternating priority);
- the asynchronous active-low reset, the counter direction and its wrap at N-1.

The architecture's published results were measured on an FPGA implementation:
area in slices, a clock of about 188 MHz and 1.19 ns for an 8-bit transfer.
They are not reproduced or checked here.

### Combinational loops at the mesh level

The data path has no registers, so the mesh netlist contains structural
combinational loops. A switch's data output feeds a neighbour's data input, and
the neighbour's outputs feed back. Lint and synthesis tools report these loops
(verilator `UNOPTFLAT`, yosys "logic loop"). They are never active. A locked
path follows a dimension-ordered route that never returns to a switch, and a
port never connects to itself, so the multiplexers selected at any moment form
chains, not cycles. The request and grant paths are registered at every hop and
have no loops. For static timing analysis, break these false loops with
constraints, or add a register stage on the data outputs if one extra clock per
hop is acceptable.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | port counts, widths, `dest_t`, `req_t`, port numbers, sector-mapping functions |
| `rtl/rr_arbiter.sv` | counter/mux round-robin arbiter |
| `rtl/obc.sv` | output block controller (two sectors, request registers, data muxes) |
| `rtl/ibc.sv` | input block controller (route decode, deny, grant/deny return) |
| `rtl/eight_port_switch.sv` | one switch: 8 IBCs and 8 OBCs |
| `rtl/noc_mesh.sv` | top level: COLS x ROWS mesh, PE ports brought out |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Example with verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/noc_pkg.sv rtl/rr_arbiter.sv rtl/obc.sv rtl/ibc.sv \
  rtl/eight_port_switch.sv rtl/noc_mesh.sv tb/tb_noc_mesh.sv \
  --top-module tb_noc_mesh -o sim
./obj_dir/sim
```

For the other testbenches, replace the last file and `--top-module`; files a
testbench does not use can stay on the list. Verilator reports the mesh's
false loop as an `UNOPTFLAT` warning (see above). Without `-Wno-fatal` that
warning would stop the build.

What the testbenches check:

- `tb_rr_arbiter`: counter/mux behaviour against a reference counter for
  sectors of 4 and 3, the wait bound, and rotation order.
- `tb_obc`: locking, destination forwarding, same-cycle data, grant and deny
  routed to the owner only, release one clock after the request drops, and the
  service order of both sectors under full load.
- `tb_ibc`: route decode for all 64 addresses at a centre and a corner switch,
  the denies, and the one-clock grant/deny return.
- `tb_eight_port_switch`: eight circuits at once (input p to output p+1, data 0
  to 7 and then random words), setup latency of at most 5 clocks, sector
  outputs, seven requesters contending for one PE port, a sink refusal, and a
  PE addressing itself.
- `tb_noc_mesh`: runs at the default 3 x 3 size. It covers single transfers
  between random PE pairs with the `2h..5h` latency check, corner-to-corner
  circuits, local and remote sources competing for one PE, all 36 PEs at once
  (36 simultaneous local circuits, then random traffic), and the three kinds of
  deny. It counts how often each of these happened and fails if one never did.
  Every granted word is checked at the destination in the same cycle.

## Limits

- The PEs are outside this design. The mesh ports are the PE interface, and
  the testbenches act as the PEs.
- A source that is waiting for a grant holds the part of the path it has
  already locked, as circuit switching does. A refused or unroutable request
  must still be dropped by the source to free that part.
- There is no timeout. A sink that neither grants nor denies keeps its path
  reserved.
