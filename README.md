# A 4x4 mesh network on chip with self-routing 49-bit packets

This is synthesizable SystemVerilog for a small network on chip (NoC): sixteen
nodes in a 4x4 two-dimensional mesh, where four processor-like masters write
bytes into, and read them back from, four memory-like slaves. Every node has
the same five-port router. There are no routing tables and no address decoders
in the routers. Instead, each packet carries its remaining route in its top six
bits: a direction and a hop count for Y, then the same for X. Each router looks
only at those bits, moves the packet one step, and decrements the count it
used. When both counts reach zero, the packet is delivered to the node's local
port.

The design reproduces the architecture of the published paper "Design and
implementation 4x4 Network on Chip (NoC) using FPGA". That paper gives the
architecture, the packet bit map and the signal names, but little of the
microarchitecture. Where it is silent, this RTL makes its own choices, and they
are marked as such below and in the opening comment of each file.

## The mesh

```
 row 0   Master0  - Master1  - Master2  - Master3
            |          |          |          |
 row 1   Slave4   - Router5  - Router6  - Slave7
            |          |          |          |
 row 2   Router8  - Router9  - Router10 - Router11
            |          |          |          |
 row 3   Slave12  - Router13 - Router14 - Slave15
```

Node IDs are `4*row + column`, with row 0 at the top. Every `-` and `|` is a
pair of 49-bit packet links, one each way, plus one busy line each way. The
plain routers have nothing on their local port. Links at the edge of the mesh
carry nothing and are never busy.

By default (`noc_top` parameters), master 0 works with slave 4, master 1 with
slave 12, master 2 with slave 15 and master 3 with slave 7. The bytes written
are AA, BB, DD and CC, at local addresses 0, 1, 2 and 3.

## Packet format (`noc_pkg.sv`, type `pkt_t`)

| bits  | field | meaning |
|-------|-------|---------|
| 48    | `ydir` | 0 = south (down), 1 = north (up) |
| 47:46 | `ycnt` | Y hops still to go |
| 45    | `xdir` | 0 = east (right), 1 = west (left) |
| 44:43 | `xcnt` | X hops still to go |
| 42    | `rd`   | read request |
| 41    | `wr`   | write |
| 40    | `rr`   | read return |
| 39:36 | `obj`  | objective: the destination node ID |
| 35:0  | `body` | depends on the type, see below |

| type | body |
|------|------|
| write        | `[35:8]` local contact (address inside the slave), `[7:0]` write data |
| read request | `[35:8]` local contact, `[7:4]` source contact (the requester's ID), `[3:0]` zero |
| read return  | `[35:28]` read data, `[27:0]` zero |

Exactly one type bit is set in a real packet. A link with all type bits at
zero is idle; idle links carry all zeros. The source adaptor computes the
direction bits and hop counts from its own ID and the destination ID
(`make_route`). Two bits per count are enough for a 4x4 mesh, where a packet
makes at most 3 hops in each dimension.

The paper gives the bit positions, but not which value of a direction bit
means which way. The encoding above is read from one of its router waveforms.

## Routing: Y first, then X (`route_unit.sv`)

The routing is deterministic dimension-order routing, Y before X:

1. If `ycnt` is not zero, send north or south and decrement `ycnt`.
2. Otherwise, if `xcnt` is not zero, send west or east and decrement `xcnt`.
3. Otherwise the packet has arrived: send it to the local port.

The paper calls its method "X and Y". Its router waveform shows a packet
travelling south while its X count is still non-zero, so this RTL spends Y
first. Either order is deadlock-free on a mesh. Requests from the top-row
masters go down their column and then along the row. Read returns go up the
slave's column and then along the top row.

## Inside the router (`router.sv`)

```
 pkt_in[p] -> input FIFO[p] -> route_unit[p] --req--> rr_arbiter[o] --grant--> crossbar -> output FIFO[o] -> pkt_out[o]
                  |                                        ^ en = output FIFO not full                |
             busy_out[p] = input FIFO full                                         sent only while busy_in[o] is low
```

- **Ports.** Port 0 is the local port (`local_pkt_in/out`, `local_busy_in/out`).
  Ports 1 to 4 are north, east, south and west, given as arrays
  `pkt_in[4:1]`, `pkt_out[4:1]`, `busy_in[4:1]` and `busy_out[4:1]`.
- **Two sets of buffers.** Every port has an input FIFO and an output FIFO
  (`packet_fifo`, default depth 4). The paper's main claim is that this second
  set of buffers absorbs congestion.
- **Arbitration.** Each output has a round-robin arbiter (`rr_arbiter`). It
  chooses one of the inputs whose head packet wants that output, and grants
  only while that output's FIFO has room. The winner's priority drops to the
  lowest for the next round. A losing packet stays at the head of its input
  FIFO and tries again the next cycle. Each input asks for only one output, so
  one input is never granted twice.
- **Crossbar.** The crossbar (`crossbar`) copies each granted head, with its
  hop count already decremented, into the output FIFO it won.
- **Flow control.** Flow control is credit-free and uses the busy lines.
  `busy_out` of a port is high while that port's input FIFO is full. An output
  FIFO presents its head on `pkt_out` only in a cycle where the neighbour's
  busy (`busy_in`) is low, and drops it in that same cycle. `busy_out` depends
  only on registers, so there is no combinational path from one router to the
  next.
- **Timing.** A packet written into an input FIFO at one clock edge is in the
  output FIFO at the next edge, and in the next router's input FIFO at the
  edge after that. A hop costs two cycles when nothing blocks it.

## Nodes

**Master node** (`master_node.sv`) contains `ip_master`, then `na_master`, then the router.

- `ip_master` stands in for a processor core. A counter runs through a
  32-cycle loop. At count 0 the core writes `WR_DATA` to
  `{TARGET_ID, LOCAL_ADDR}`. At count 5 it reads the same address back. The
  returned byte is latched onto `test_leds`. A request that meets the
  adaptor's `not_ready` waits and is issued when `not_ready` falls.
- `na_master` is the master network adaptor. It turns one strobe into one
  packet and holds it in a one-entry register; `not_ready` is high while the
  register is full. The packet goes to the router's local port when the router
  is not busy. An incoming read-return packet produces a one-cycle
  `read_return` with `read_data` = body `[35:28]`. The adaptor never makes the
  router wait.

**Slave node** (`slave_node.sv`) contains the router, then `na_slave`, then `ip_slave`.

- `na_slave` is the slave network adaptor, a small state machine (IDLE, WRITE,
  READ, WAIT, SEND) that serves one packet at a time and keeps the router's
  local port busy meanwhile.
  - A write becomes one `write_enable` cycle.
  - A read request becomes one `read_request` cycle. The adaptor then waits
    for the slave's `read_return` and builds a read-return packet, addressed
    and routed to the request's source contact.
  - Strobes wait while the slave's `not_ready` is high. The slave sees
    `address = {4'h0, local contact}`.
- `ip_slave` is an 8-byte register array, cleared at reset. `led_output` shows
  the last byte written. A read answers after `READ_LATENCY` cycles (default
  1), and `not_ready` is high while a longer read is pending.

The plain routers (nodes 5, 6, 8 to 11, 13 and 14) are bare `router` instances.

### Round-trip time

A read with no competing traffic reaches the core `4*hops + 9` cycles after
the core issued it. For example, master 0 to slave 4 (1 hop) takes 13 cycles,
and master 1 to slave 12 (4 hops) takes 25 cycles. The full-size testbench
checks this number.

## Where this RTL departs from, or adds to, the paper

These are this design's choices, made where the paper is silent:

- Buffer depths (4 and 4), FIFO organisation (first-word fall-through), and
  the meaning of the busy lines.
- The idle-link convention (all zeros, a packet valid for exactly one cycle).
- The asynchronous active-low reset `nreset`.
- The request handshake between core and master adaptor (`not_ready`), the
  one-entry adaptor buffers, and the slave adaptor's state machine.
- The IP cores are traffic stand-ins. The master writes a constant byte: the
  paper says data is "processed" before it is written, but not how. The slave
  has a configurable read latency.
- The direction-bit encoding and the Y-before-X order are read from the
  paper's waveforms, because its text does not settle them (see Routing).
- Master 2 working with slave 15, and the bytes BB and DD, are choices. The
  other pairings and data come from the paper's simulation figures.
- Bus bit order: the paper draws the buses as `[0:31]` and `[0:7]`. Here they
  are `[31:0]` and `[7:0]`, with the target ID in `address[31:28]`.
- Not modelled: the FPGA board itself (clocking, pins, and the LEDs beyond
  the `test_leds` / `led_output` ports).

## Files

| file | contents |
|------|----------|
| `rtl/noc_pkg.sv` | packet struct, port enum, `pkt_valid`, `make_route` |
| `rtl/packet_fifo.sv` | input/output buffer |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/route_unit.sv` | Y-then-X routing decision |
| `rtl/crossbar.sv` | 5x5 switch |
| `rtl/router.sv` | five-port router |
| `rtl/na_master.sv`, `rtl/na_slave.sv` | network adaptors |
| `rtl/ip_master.sv`, `rtl/ip_slave.sv` | core and memory stand-ins |
| `rtl/master_node.sv`, `rtl/slave_node.sv` | nodes |
| `rtl/noc_top.sv` | the 4x4 mesh (top) |
| `tb/*_tb.sv` | one self-checking testbench per module |

Assertions in the RTL check the handshake rules: no push into a full FIFO,
one-hot grants, and no packet delivered to a busy slave adaptor.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
package must come first on the command line:

```
verilator --binary --timing --assert -Irtl rtl/noc_pkg.sv \
    rtl/packet_fifo.sv rtl/rr_arbiter.sv rtl/route_unit.sv rtl/crossbar.sv \
    rtl/router.sv rtl/na_master.sv rtl/na_slave.sv rtl/ip_master.sv \
    rtl/ip_slave.sv rtl/master_node.sv rtl/slave_node.sv rtl/noc_top.sv \
    tb/noc_top_full_tb.sv --top-module noc_top_full_tb -Mdir obj
./obj/Vnoc_top_full_tb
```

- `noc_top_full_tb` runs the mesh at its default parameters. All four masters
  complete write / read-back loops. The testbench checks every LED value and
  each master's first round-trip time.
- `noc_top_tb` runs a stress configuration: all four masters use slave 15, the
  memory takes 8 cycles per read, and the buffers are 2 deep. It checks every
  returned byte. It also counts arbitration conflicts, full input buffers
  (busy), slave not-ready stalls and adaptor holds, and fails if any of them
  never happens.
- `router_tb` checks the two-cycle hop, using the packet
  `06cc000000110` (a read request from node 1 to node 12). That packet must
  leave southward as `02cc000000110`. It also checks the case where two
  packets want the same output in the same cycle. It then checks 3000 cycles of random traffic
  with random back-pressure against a scoreboard.
- The block testbenches (`packet_fifo_tb`, `rr_arbiter_tb`, `route_unit_tb`,
  `crossbar_tb`, `na_master_tb`, `na_slave_tb`, `ip_master_tb`, `ip_slave_tb`,
  `master_node_tb`, `slave_node_tb`) compare against values computed
  independently in the testbench.

## Changing it

- **Buffer depths.** Use `IN_DEPTH` and `OUT_DEPTH` on `noc_top`, `router` or
  the nodes.
- **Traffic.** Use `M_TARGET`, `M_ADDR` and `M_DATA` on `noc_top`; they are
  packed arrays indexed by master number. `PERIOD` and `READ_AT` on
  `ip_master` set the loop.
- **Slave speed.** Use `READ_LATENCY`.
- **Mesh size.** The mesh size is fixed at 4x4 by the packet format: 4-bit
  IDs and 2-bit hop counts. A larger mesh needs wider fields in `pkt_t`, and
  so a wider packet.
