# Mesh network-on-chip versus a shared AHB bus

This design sets two ways of connecting processor cores side by side and
drives them with the same traffic:

* a **2D mesh network-on-chip (NoC)**. Every core sits on a five-port router
  (North, East, South, West, Local). Single-flit packets find their way by
  dimension-ordered XY routing.
* a **single-layer AHB-style shared bus (SoC)**. Every core has a master port
  and a slave port, and a round-robin arbiter lets one write through per cycle.

Both systems start on the same event, and core *n* of each system uses the
same random seed, so both carry exactly the same packets. The outputs of the
top module give the throughput, the number of hops and payload checksums for
each side. The question the design answers is when the network's parallel
links pay off. With one sender, the bus wins: one cycle per packet against
two or more. With many cores sending at once, the single bus becomes the
bottleneck and the mesh wins.

The default configuration is a 2x2 mesh with four cores, each sending 1000
packets. The same RTL builds 3x3 and 4x4 meshes (9 and 16 cores) through the
`ROWS`/`COLS` parameters. A bus with 16 masters is about the limit of a
single-layer AHB.

## Packets and coordinates

A packet is one 32-bit flit (`noc_pkg::flit_t`):

| bits  | field   | meaning                                 |
|-------|---------|-----------------------------------------|
| 31:16 | `coord` | destination router coordinates          |
| 15:0  | `payload` | data (random 16-bit value per packet) |

Only the low nibble of `coord` is used:

* x is `coord[3:2]` (packet bits 19:18).
* y is `coord[1:0]` (packet bits 17:16).

Two bits per axis limit a mesh to 4x4.

Routers are numbered column by column. Router *n* sits at x = n / ROWS and
y = n % ROWS. In a 2x2 mesh:

```
   y=1   R1 (01) ---- R3 (11)
          |            |
   y=0   R0 (00) ---- R2 (10)
         x=0          x=1
```

North means larger y and east means larger x. Core *n* is attached to router
*n*. On the bus side, core *n* owns the address window
`n*0x28 .. n*0x28+0x27`, and a packet to core *d* is a single write to
address `d*0x28` whose data is the payload.

## The router (`noc_router`)

Each of the five inputs has a small FIFO (`flit_fifo`, two flits by
default). The flit at the head of each FIFO is sent to `xy_route`, which
picks an output as follows:

* East if the destination x is larger than this router's x.
* West if the destination x is smaller.
* Once x matches, South if the destination y is smaller and North if it is
  larger.
* Local when both coordinates match.

Each output has its own round-robin arbiter (`rr_arbiter`) over the five
inputs. When the winner's output is ready, its flit is popped and driven on
the output with `out_valid`. The arbiter's priority moves past the winner
only when a transfer really happens, so a blocked winner keeps its turn.

Channels use a valid/ready handshake. A flit moves on a clock edge where
both are high. The timing details:

* `in_ready` is simply "this FIFO is not full". It does not depend
  combinationally on anything downstream, so a chain of routers has no long
  ready paths and no combinational loops.
* A flit written into a FIFO at one edge can leave the router at the next.
* Crossing a router therefore costs exactly one cycle, and a packet that
  crosses *k* routers is delivered *k* + 1 cycles after the core offers it.
  Neighbouring cores see 2 cycles, which is 20 ns at 100 MHz.
* Throughput is one flit per cycle per port.

Each router also has a sixth, write-only port, `coord_we`/`coord_wdata`,
that loads its 16-bit coordinate register. The router knows nothing about
its own position until that register is written.

`hop_cnt[p]` counts the packets that left through output *p*. Summing it
over all routers gives the total number of router traversals.

## Start-up (`init_cor`)

Routes depend on the coordinate registers, so nothing may be sent before
they are loaded. The start-up controller runs three steps after `start`:

1. It raises `irq` to every core.
2. It writes the coordinates of router 0, 1, 2 … over one shared bus, one
   router per cycle.
3. It drops `irq`.

Each core waits for the falling edge of `irq` before it sends anything. The
whole setup takes ROWS·COLS + 2 cycles. The controller is not attached to the
network. The bus system has no coordinates to load, so the top starts its
cores from the same `irq` falling edge. Both sides therefore begin in the
same cycle.

## Traffic generation (`cpu_node`)

`cpu_node` stands in for the processor that runs the traffic program. It
has an xorshift32 generator seeded from `SEED` and the core index. For each
of its `NPKT` packets it does the following:

* It draws a destination according to the spatial pattern `DIST` (see
  below). A core never sends to itself.
* It draws a 16-bit payload.
* It waits a random gap of 0–9 idle cycles. In constant-bit-rate mode
  (`CBR=1`) there is no gap, so packets go back to back.
* It offers the packet with `tx_valid` until the network or bus takes it.

On the receive side it counts packets and adds up their payloads. It also
counts as an error any packet whose destination is not this core. Comparing
the sent and received checksums of a whole system shows that no packet was
lost, duplicated or corrupted.

### Destination patterns

`DIST` selects one of three patterns. All three are drawn on chip, so both
systems see identical traffic without any stimulus files.

| `DIST` | destination |
|--------|-------------|
| `DIST_UNIFORM` (default) | Every other core with equal probability. |
| `DIST_NORMAL` | A bus address from a bell curve. Its mean and its standard deviation are both half the address span (N windows of 0x28 bytes). The address is clipped to the span, and the core that owns it is the destination. |
| `DIST_POISSON` | A core index from a Poisson distribution with mean (N-1)/2, cut at N-1. Low-numbered cores get more traffic. |

With the two shaped patterns, a core that draws itself sends to the next core
up instead.

The generators work as follows:

* **Normal.** The bell curve is the sum of the four bytes of a second
  xorshift generator. This sum has mean 510 and standard deviation 147.8.
  It is scaled by a constant worked out at elaboration. The result is a
  close approximation of a normal curve, not an exact one.
* **Poisson.** The draw compares 16 random bits with the cumulative Poisson
  distribution. A constant function computes that distribution at
  elaboration in fixed point, starting from exp(-1/2) raised to N-1 and then
  p(k) = p(k-1)·mean/k.

On 2x2 the patterns create the following loads:

* **Normal:** the corner cores 0 and 3 are loaded most.
* **Poisson:** cores 1 and 2 become hot spots.

## The bus (`ahb_bus`, `ahb_master_port`, `ahb_slave_port`)

The bus is a pipelined, single-layer AHB-style interconnect that carries
single writes only.

* **Address phase.** The round-robin arbiter looks at `hbusreq` and grants
  one master in the same cycle. That master's address, `HTRANS=NONSEQ` and
  `HWRITE` go to every slave. The address decoder turns the address into
  `s_hsel` (address / 0x28).
* **Data phase.** One cycle later, the bus drives the write data of the
  master that owned the address phase (`hmaster` is registered for this). It
  also forwards the `hreadyout` of the slave selected then.
* **Master port.** It raises `hbusreq` while it holds a request. On a grant
  it drives the address, and it registers the data for the data phase.
* **Slave port.** It never inserts wait states. It reports a received packet
  (`rx_valid`) at the end of each completed data phase.

An uncontended packet therefore arrives one cycle after it is offered, which
is 10 ns at 100 MHz. The bus carries at most one packet per cycle in
total, whatever the number of cores. This is the limit the mesh is compared
against.

The bus can also arbitrate by fixed priority. Set `PRIO_ARB=1` and give
each master a 4-bit priority in `PRIO`. The larger value wins, and a tie
goes to the lower index. Masters with low priority then wait longer. The
systems use the default round-robin mode, in which all cores are equal.

AHB's separate request/grant handshake, bursts, split and retry responses,
and reads are not modelled. None of them is needed for single-word
core-to-core writes, and the same-cycle grant gives the bus its best-case
latency.

## Top level (`noc_soc_top`) and the systems under it

| Module        | Contents                                                                                              |
|---------------|-------------------------------------------------------------------------------------------------------|
| `noc_system`  | `init_cor`, `noc_mesh` (routers with their neighbour links; border ports tied off and asserted unused) and one `cpu_node` per router |
| `soc_system`  | One `cpu_node`, `ahb_master_port` and `ahb_slave_port` per core, plus `ahb_bus`                        |
| `noc_soc_top` | Both systems. `start` and `active[]` (which cores send) are shared. Each side has its own per-core counters, checksums, `*_cycles` (cycles from start of traffic until the last packet arrives) and `*_done`. |

Parameters of the top:

| parameter | default | meaning |
|-----------|---------|---------|
| `ROWS`, `COLS` | 2, 2 | mesh size (2..4 each); the bus gets ROWS·COLS cores |
| `NPKT` | 1000 | packets sent by each active core (max 65535) |
| `CBR`  | 0 | 1 = back-to-back packets, 0 = random gaps of 0–9 cycles |
| `SEED` | 32'h12345678 | generator seed; core *n* of both systems uses the same value |
| `DIST` | `DIST_UNIFORM` | destination pattern: `DIST_UNIFORM`, `DIST_NORMAL`, `DIST_POISSON` |

## Simulating

Every testbench in `tb/` checks its own results and ends with a line
`TB_RESULT checks=N failures=M`. Each one also has a watchdog that stops a
hung simulation. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -y rtl rtl/noc_pkg.sv tb/tb_noc_soc_top.sv \
          --top-module tb_noc_soc_top -o sim && ./obj_dir/sim
```

Replace `tb_noc_soc_top` with any other testbench.

| testbench | what it checks |
|-----------|----------------|
| `tb_xy_route` | All 256 pairs of destination and position against the XY rule |
| `tb_flit_fifo` | Random traffic against a queue model; full/empty flags |
| `tb_rr_arbiter` | Fairness and turn order against a reference model |
| `tb_noc_router` | Every input/output pair; contention; back-pressure; coordinate loading |
| `tb_noc_mesh` | 3x3 mesh; every pair delivered; latency equal to routers crossed + 1 |
| `tb_init_cor` | 4x4 setup order, `irq` length and written values |
| `tb_cpu_node` | Destination set, gap range 0–9, CBR mode and counters. It also checks the Normal and Poisson destination shares over 4000 draws against the formulas. |
| `tb_ahb_bus`, `tb_ahb_master_port`, `tb_ahb_slave_port` | Pipelining, arbitration in both modes, decoding and ready handling against reference models |
| `tb_noc_system`, `tb_soc_system` | Whole systems; checksums; latency histogram |
| `tb_noc_soc_top` | End to end, in three runs: CBR with 4 cores, CBR with 1 core, random gaps. It checks the latency histograms of the CBR runs. It counts every mechanism: coordinate writes, output conflicts in routers, back-pressure, bus contention, 2- and 3-router paths and reception at every core. |
| `tb_noc_soc_full` | The top with all defaults: 4 cores × 1000 packets on each side |
| `tb_mesh_sizes` | The top at 3x3 and 4x4. It checks the hop range and the NoC-versus-bus throughput. |
| `tb_dist_traffic` | The top with Normal (2x2, 3x3) and Poisson (2x2) destinations. It checks delivery, an equal per-core load on both sides, and which cores become hot spots. |

To change the network, edit the parameters of `noc_soc_top` or of the
system modules. `FIFO_DEPTH` on `noc_system`/`noc_mesh`/`noc_router` sets the
input buffer depth.

## Results from the testbenches

All cycles are clock cycles; 1 cycle = 10 ns at 100 MHz.

| configuration | NoC cycles | bus cycles |
|---------------|-----------:|-----------:|
| 2x2, 4 cores, CBR, 200 pkt/core | 279 | 801 |
| 2x2, 1 core, CBR, 200 pkt | 203 | 201 |
| 2x2, 4 cores, random gaps | 1177 | 1251 |
| 3x3, 9 cores, random gaps, 200 pkt/core | 1179 | 1824 |
| 4x4, 16 cores, random gaps, 200 pkt/core | 1181 | 3201 |
| 2x2, Normal, random gaps, 500 pkt/core | 2763 | 2973 |
| 2x2, Poisson, random gaps, 500 pkt/core | 2771 | 2970 |
| 3x3, Normal, random gaps, 500 pkt/core | 2844 | 4577 |

A few things stand out:

* With random gaps, the run time of the mesh hardly changes from 4 to 16
  cores. The run time of the bus grows with the number of cores.
* With constant bit rate on 2x2 and four cores sending, latencies are as
  follows:
  * Mesh: at least 20 ns, and 30 ns is the most common value.
  * Bus: 40 ns for nearly every packet. The bus transfers are blocking, so
    each core waits its round-robin turn. With a single sender, every packet
    takes 10 ns.
* With random gaps the load is lighter, and latencies are as follows:
  * Mesh: still at least 2 cycles (20 ns). Most packets arrive in 2 or 3
    cycles.
  * Bus: most packets arrive in 1 cycle (10 ns). The tail comes from
    waiting for the arbiter.
* Counting the destination core as one more hop, the hop counts per packet
  are:
  * 3–4 in 2x2;
  * 3–6 in 3x3 (average 4.0);
  * 3–8 in 4x4 (average 4.67).

## Choices made in this design

These points are design decisions. The original description of the system
leaves them open or describes them at transaction level only:

* **Packet and buffers.** Packets are single 32-bit flits, so wormhole
  switching and virtual channels never come up. Router buffers are two-flit
  input FIFOs, with no output buffers.
* **Handshake, reset and start-up.** Links use valid/ready; the bus uses an
  AHB-like address/data pipeline. Reset is asynchronous and active low.
  The setup controller is a small state machine rather than a processor.
* **Arbitration.** Round-robin is used both per router output and on the
  bus.
* **Processor model.** The processor is reduced to the traffic it creates.
  Its instruction set, as well as timing and power annotations, are not
  hardware and are not built.
* **Idle gaps.** The gap between packets is 0–9 cycles (ten values).
* **Destinations.** Destinations are generated in hardware instead of being
  read from prepared lists.
* **Normal pattern.** It is centred on the address space and approximated
  by a sum of four uniform bytes.
* **Poisson pattern.** Its mean of (N-1)/2 is a choice of this design.
* **Self-addressed draws.** These go to the next core up.
* **Latency.** One cycle per router and one cycle per bus transfer give
  minimum latencies of 20 ns for the mesh and 10 ns for the bus.
* **Bus protocol.** The bus grants in the same cycle as the request and
  carries single writes only.

## Files

* `rtl/noc_pkg.sv`: shared types (`flit_t`, `port_e`, `htrans_e`),
  constants, and the coordinate and address helper functions.
* One module per file in `rtl/`, named after the module.
* Testbenches in `tb/`, named `tb_<module>.sv`, plus `tb_noc_soc_full.sv`
  and `tb_mesh_sizes.sv`.
