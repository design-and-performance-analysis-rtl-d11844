# 8x8 mesh network on chip with bandwidth-managed label-switched routers

This design moves short packets between 64 processing elements laid out on an
8x8 grid. Every grid point has a five-port router: one port for its own
processing element (Local) and one for each neighbour (East, West, North,
South). A packet is one 22-bit word. The router reads the destination in the
header and forwards the packet one step closer with deterministic XY routing.
Three features go beyond a plain mesh:

* **Bandwidth reservation per port.** Each router output has a small
  *NoC manager*. It charges every packet against a budget that is refilled on a
  fixed schedule, and it closes the port while the budget is low. No single
  stream can take a link's full bandwidth.
* **Transition-reducing message coding.** Messages are coded before they enter
  the network and decoded on delivery. The coding cuts the number of bit
  toggles on the links for common alternating patterns, which lowers switching
  power.
* **Packet checks.** A router discards a packet whose destination is not in
  the mesh and reports it. It also reports a congested port, an output that is
  out of bandwidth, and each packet it has sent.

Everything is synthesizable SystemVerilog in `rtl/`. Each block has a
self-checking testbench in `tb/`.

## Packet format

| bits    | field   | meaning                                        |
|---------|---------|------------------------------------------------|
| [21:19] | `dst.x` | destination column, 0..7 (East is +x)          |
| [18:16] | `dst.y` | destination row, 0..7 (North is +y)            |
| [15:0]  | `msg`   | message, coded while it is inside the network  |

The 22-bit size, the 6 address bits and the 16 message bits follow the source
design. How the 6 bits split into column and row, and the bit order, are this
design's choices. The packet carries no source address. The type is
`noc_pkg::packet_t`, and the port numbers are `noc_pkg::port_e`: Local 0,
East 1, West 2, North 3, South 4.

## Block structure

```
noc_mesh (top, ROWS x COLS nodes)
 └─ per node
     ├─ network_interface   PE <-> Local port; builds packets, codes/decodes message
     │   └─ msg_codec x2
     └─ ls_router
         ├─ packet_fifo x5   one input queue per port
         ├─ xy_route   x5   label (output port) and validity of each head packet
         ├─ noc_manager x5   bandwidth budget of each output port
         ├─ rr_arbiter       one round-robin choice per output port
         └─ crossbar         one 5:1 multiplexer per output port
```

All links use a valid/ready handshake. A word moves on a clock edge where
`valid` and `ready` are both high. All logic uses one clock, `clk`, and
`rst_n` is an active-low synchronous reset.

## How a packet crosses a router

1. **Input queue.** An input link is ready whenever its `packet_fifo` (4
   entries) has room. The queue shows its head packet without a read delay
   ("first-word fall-through").
2. **Label.** `xy_route` compares the head's destination with the router's
   own coordinates. If the column differs, the label is East or West.
   Otherwise, if the row differs, it is North or South. Otherwise it is
   Local. This label (the output port) is what the label-switched router
   switches on. A destination outside a `ROWS x COLS` mesh makes the head
   invalid. The head is then popped and dropped, and `drop_invalid` pulses for
   that input. In the 8x8 default every 3-bit coordinate is valid, so this
   can only happen in smaller meshes.
3. **Arbitration.** An output is *free* in a cycle when two things hold:
   * its output register is empty or being emptied in that cycle;
   * its NoC manager reports bandwidth available.

   For each free output, `rr_arbiter` grants one of the inputs whose head is
   labelled for that output. It searches in round-robin order, starting one
   past the input it granted last. An input asks for only one output, so up to
   five transfers take place in one cycle.
4. **Crossbar and output register.** The arbiter's per-output select and
   enable drive the `crossbar`. Each granted packet is loaded into its output
   register, and its queue pops. The register holds the packet with
   `out_valid` high until the downstream `ready` is seen.

**Latency:** two clock cycles per router when nothing blocks. A packet
accepted at edge *t* is granted during the next cycle and is on `out_valid`
after edge *t+2*. Across the mesh, a packet that crosses *h* links reaches its
processing element 2·(*h*+1) cycles after it is accepted, so corner to corner
of the 8x8 mesh takes 30 cycles. Both testbenches check this figure.

**Throughput:** one packet per output port per cycle, limited by the NoC
manager (next section).

Deterministic XY routing on a mesh is deadlock-free. Every packet is a single
word, so no link is held across several cycles for one packet. Wormhole
switching therefore reduces to forwarding one word at a time.

## The NoC manager: bandwidth accounting by edge detection

This is the least conventional part of the design. Each output register
keeps a one-bit packet counter, which toggles every time a packet is loaded.
The manager does not see grants directly. It registers that bit and treats
any difference between the registered and the live value (an edge, in either
direction) as one packet sent.

The manager keeps a budget `bw`:

* reset: `bw = BW_MAX` (10);
* each detected packet costs `PKT_COST` (2);
* at the end of every slot of `SLOT_CYCLES` (8) cycles, `SLOT_INC` (5) is
  added, with `bw` saturating at `BW_MAX` and never dropping below 0;
* the port is available while `bw` is greater than `THRESH` (2).

An edge shows up one cycle after the grant that caused it. The check
therefore subtracts the cost of a packet that has been seen but not yet
charged before it compares with the threshold. Without this, two grants in
consecutive cycles could both pass on the same budget.

Under constant demand, a port settles at `SLOT_INC / PKT_COST` = 2.5 packets
per 8-cycle slot, about 31 % of the link. It can send a burst of up to 4
packets after an idle period.

The source design gives these parts:

* the edge detection on the counter's LSB;
* the factors 5 (between slots) and 2 (between packets in a slot);
* the rule that a port is available only above 2.

This design chose:

* reading the two factors as a refill per slot and a charge per packet;
* the slot length (8 cycles);
* the ceiling (10);
* a full budget at reset.

To make a port faster or slower, change `SLOT_CYCLES`, `SLOT_INC` or
`PKT_COST`. `ls_router` passes `SLOT_CYCLES` down to its managers.

## Message coding

`msg_codec` XORs every even-numbered bit with `b1` and every odd-numbered bit
with `b1 ^ b2`. The defaults are `b1 = 0` and `b2 = 1`, so the odd bits are
inverted (the same as `msg ^ 16'hAAAA`). Applying the coder twice gives the
original back, so one module does both encoding and decoding.

Example: the 10-bit word `1110010101` (bit 0 on the right) codes to
`0100111111`. The number of transitions between neighbouring bits drops from
6 to 3. A message of `5555` becomes `FFFF` on the links.

`network_interface` codes only the 16-bit message. The header stays readable
for the routers. The interface is purely combinational and adds no latency.

## Top-level ports (`noc_mesh`)

Node *n* = *y*·`COLS` + *x*. All arrays have one entry per node.

| port | dir | per node | meaning |
|------|-----|----------|---------|
| `pe_tx_valid`, `pe_tx_dst`, `pe_tx_msg`, `pe_tx_ready` | in/in/in/out | 1, `addr_t`, 16, 1 | send a message to `pe_tx_dst` |
| `pe_rx_valid`, `pe_rx_dst`, `pe_rx_msg`, `pe_rx_ready` | out/out/out/in | 1, `addr_t`, 16, 1 | message delivered to this node |
| `port_full`    | out | 5 | input queue of that router port is full (congestion) |
| `port_avail`   | out | 5 | that output port has bandwidth available |
| `port_bw`      | out | 5 × 4 | remaining bandwidth budget of that output port (0..10) |
| `port_sent`    | out | 5 | a packet left that output port in this cycle (valid and ready) |
| `drop_invalid` | out | 5 | a packet with an impossible destination was dropped (always 0 in an 8x8 mesh) |

Router ports on the edge of the mesh are tied off. Their inputs never carry a
packet, and their outputs are always ready; XY routing never uses them.

## Parameters

| module | parameter | default | origin |
|--------|-----------|---------|--------|
| `noc_mesh`, `ls_router`, `xy_route` | `ROWS`, `COLS` | 8, 8 | source design (8x8; a 3x3 build is also described) |
| `ls_router`, `packet_fifo` | `FIFO_DEPTH` / `DEPTH` | 4 | this design |
| `packet_fifo`, `crossbar` | `W` | 22 | source design (packet size) |
| `noc_manager` | `SLOT_INC`, `PKT_COST`, `THRESH` | 5, 2, 2 | source design |
| `ls_router`, `noc_manager` | `SLOT_CYCLES` | 8 | this design |
| `noc_pkg` / `noc_manager` | `BW_MAX` | 10 | this design |
| `msg_codec` | `W`, `B1`, `B2` | 16, 0, 1 | source design |

Coordinates are 3 bits wide (`noc_pkg::COORD_W`), so `ROWS` and `COLS` can be
at most 8.

## Where this design departs from, or fills gaps in, its source

* **Crossbar and arbiter ports.** The source crossbar has one 3-bit select
  line and a 5-bit enable bus. Here each output multiplexer has its own
  select, so disjoint connections proceed in the same cycle. The source
  arbiter is described as having 5 inputs and 6 outputs. This arbiter has
  per-output selects, enables and per-input grants.
* **Crossbar width.** The source simulates the crossbar stand-alone with
  16-bit data. Inside the router it carries the whole 22-bit packet. The
  testbench checks a 16-bit instance too.
* **Choices of this design.** The source does not specify these:
  * the arbitration policy (round-robin);
  * the queue depth;
  * the link handshake;
  * the direction conventions;
  * the reset behaviour;
  * the NoC manager's slot length and ceiling.
* **Invalid packets.** A packet with an invalid destination is dropped at the
  router's input rather than returned.
* **Not included.** The on-FPGA logic-analyser core used to watch the design
  on a board is vendor IP and is not part of this RTL.

## Verification

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<m>`, and a watchdog ends it if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_msg_codec` | the 10-bit worked example (coded word, 6 to 3 transitions); 16-bit coding equals `^16'hAAAA`; round trip |
| `tb_packet_fifo` | random push/pop against a queue model; full/empty flags; full after 4 pushes |
| `tb_xy_route` | all 8x8 positions × all destinations against the XY rule; validity in a 3x3 mesh |
| `tb_crossbar` | random selects/enables against a MUX model; the 16-bit straight-through case |
| `tb_rr_arbiter` | grants, selects, enables against an independent round-robin model |
| `tb_noc_manager` | budget and availability every cycle against a model; steady rate of 50 packets in 20 slots |
| `tb_network_interface` | header passed through, message coded on send and decoded on receive |
| `tb_ls_router` | 1500 packets on all five ports of a router at (3,3) of a 6x6 mesh; output port, order, data, invalid drops; two-cycle latency; queues filling; throttling |
| `tb_noc_mesh` | 3x3 mesh end to end, 1080 packets including invalid ones |
| `tb_noc_mesh_full` | the default 8x8 mesh end to end, 2560 packets |

The two mesh testbenches also check the corner-to-corner latency. They count
these mechanisms and fail if any never occurs:

* input-queue back-pressure;
* NoC-manager throttling;
* arbitration conflicts;
* receiver back-pressure;
* X-to-Y turns;
* message coding;
* invalid-packet drops (3x3 only).

Assertions cover the queue (no push when full, no pop when empty), the
arbiter (no grant without a request) and the output handshake (a packet that
is offered stays unchanged until it is taken).

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/noc_pkg.sv tb/tb_noc_mesh_full.sv \
          --top-module tb_noc_mesh_full -Mdir obj_full
./obj_full/Vtb_noc_mesh_full
```

Any other testbench builds the same way: replace the file and top-module
name. Verilator finds the modules in `rtl/` by file name. The full 8x8
testbench takes under a minute to build and under a second to run.
