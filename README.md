# Link-sharing wormhole router for a 2-D NoC

A wormhole router normally gives every virtual channel (VC) of every input
link its own buffer. Most of those buffers sit idle most of the time. This
router adds one **shared memory that all four network input links use**.

- A busy link can borrow most of the shared memory.
- Each VC still keeps a small **private buffer** of two flits. A VC can
  therefore always make progress, even when the shared memory is full, so
  the shared memory cannot cause a deadlock.

A memory that four links write at once would normally need four write ports
on every cell. Here it is built as a **multi-bank multi-port memory**: eight
single-port-pair banks placed between two small crossbars. It is managed
**by block**. One block equals one bank, and a block belongs to one VC of
one link at a time. Two links therefore never touch the same bank in the
same cycle, and no bank needs more than one write and one read port.

This RTL implements the method described in *The Communication Performance
of Link-Sharing Method of Buffer in NoC Router*. The router structure, the
two flit routes, their stage names, the by-block sharing and the main sizes
come from that work. The flow control, the exact block request and release
rules, the arbiters, the deadlock scheme on the torus and all encodings are
choices made for this implementation. They are listed under
[Departures and choices](#departures-and-choices).

## Router at a glance

```
             +-------------------- noc_router ---------------------+
 link N  --> | input_unit N -+                                     |
 link E  --> | input_unit E -+--> mbmp_memory (8 banks, 2 x-bars)  |
 link S  --> | input_unit S -+    block_allocator (free blocks)    |
 link W  --> | input_unit W -+                                     |
 PE      --> | input_unit L (private buffers only)                 |
             |      | heads of 5 x 2 private buffers               |
             |  vc_sw_allocator (VA + SA) --> crossbar + out regs  | --> 5 output links
             +-----------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/noc_pkg.sv` | sizes, port numbers, flit types |
| `rtl/noc_router.sv` | top: wires everything together |
| `rtl/input_unit.sv` | input register, RC, In-Judge, private buffers, VC block lists, shared-memory write and drain, ready to upstream |
| `rtl/private_buffer.sv` | 2-flit FIFO per VC |
| `rtl/route_compute.sv` | X-then-Y routing, mesh or torus, allowed output VCs |
| `rtl/block_allocator.sv` | pool of free blocks |
| `rtl/mbmp_memory.sv`, `rtl/mem_bank.sv` | banks between input and output crossbars |
| `rtl/vc_sw_allocator.sv`, `rtl/rr_arbiter.sv` | VC and switch allocation |
| `rtl/crossbar.sv` | 5x5 switch with output registers |

Ports are numbered 0 = N (+y), 1 = E (+x), 2 = S (−y), 3 = W (−x), 4 = local
PE. An input port is named after the neighbour the flit came from.

## The two routes through an input port

Each arriving flit is steered by **In-Judge (IJ)**.

- **Route 1** (input → private buffer → switch). Used when the flit's VC has
  nothing waiting in the shared memory and its private buffer is not full.
- **Route 2** (input → shared memory → private buffer → switch). Used in all
  other cases.

A flit that finds older flits of its own VC in the shared memory must follow
them. This rule keeps the flits of a VC in order.

Cycle by cycle, counted from the input register:

| cycle | route 1 | route 2 |
|---|---|---|
| 1 | RC + IJ, write private buffer | RC + IJ + SiA: pick bank = the VC's newest block, address = its write pointer |
| 2 | VA + SA | SiT: cross the input crossbar, write the bank |
| 3 | ST: output register drives the link | SoA + SoT: pick a VC of this link with room, read its oldest flit, write it into the private buffer, release the block if it is now empty |
| 4 | | VA + SA |
| 5 | | ST |

Route 2 is exactly two cycles longer, as the method intends. Its extra cycles
stay hidden when the router is busy. A flit only takes route 2 when its
private buffer is already full, which means the VC is waiting for the switch
anyway. The two private-buffer flits cover the two extra stages.

Routing (RC) runs in cycle 1, in parallel with IJ, because the output port
does not depend on the route taken. The result (output port and allowed
output VCs) is stored beside the head flit in both buffers. Each buffer entry
is therefore 71 bits:

- 66-bit flit: 2-bit type + 64-bit payload
- 3-bit output port
- 2-bit VC mask

The drain is one flit per link per cycle. Each link has one read port into
the shared memory. Its two VCs take turns (round robin) when both have flits
waiting and room in their private buffers.

## By-block control ("VC block info")

The 64-flit shared memory is split into `B = 8` blocks of `F = 8` flits.
Each VC of a sharing link keeps this state:

- an ordered list of the blocks it owns (a small FIFO of block numbers)
- a write pointer into its newest block
- a read pointer into its oldest block
- `pending`: flits sent to route 2 and not yet moved to the private buffer
- `stored`: flits actually written to a bank

Blocks are handled as follows:

- **Request.** A VC asks `block_allocator` for a block when three things hold:
  - a packet is in progress on it (head seen, tail not yet);
  - its newest block is full, or it owns none;
  - the space it can still offer would not cover the flits already on the
    way.

  Each link makes at most one request per cycle. The allocator hands out the
  lowest free block, and the link served first rotates every cycle.
- **Release.** A block goes back to the pool in either of two cases:
  - its last flit has been read (this happens during SoA);
  - the VC is idle (no pending flits, none in flight, no packet in progress
    or the block already used) and this is its only block.
- A VC can hold any number of blocks, up to all eight. This lets one
  congested link absorb a long packet while the other links hold nothing.

Because one block equals one bank, `mbmp_memory` never sees two links naming
the same bank. Assertions check this rule instead of an arbiter enforcing it.

## Flow control to the upstream router

The shared memory makes the free space of a VC change over time, so fixed
credits do not fit. Instead each input port presents a per-VC `in_ready`.
It is computed from the port's registered state and from the flit now on
the link:

```
space(v)    = (pending(v) == 0 ? free private slots : 0)
            + (owns a block and not releasing it ? F - write pointer : 0)
inflight(v) = [flit for v in the input register] + [flit for v on the link]
in_ready(v) = space(v) > inflight(v)
```

The upstream switch allocator grants a flit on VC `v` only while
`in_ready(v)` is high. That flit reaches the input register two edges later,
and the formula guarantees it will find room. The local PE must follow the
same rule.

Private buffers alone (two flits) cannot cover this round trip at full rate.
A stream on an uncongested link therefore also takes a block, so that it can
run at one flit per cycle. The PE port has no shared memory. Its injection
rate is therefore capped below one flit per cycle.

## Routing and deadlock

Routing is dimension order, X then Y.

- **Mesh.** Both VCs are free for any packet.
- **Torus** (the default). Each dimension takes the shorter way round; on a
  tie the packet goes the positive way. The two VCs form a dateline pair:
  - a packet uses VC 0 until it crosses the wrap-around link of the
    dimension it is travelling in;
  - it uses VC 1 on that link and after it;
  - it goes back to VC 0 when it turns into Y.

`route_compute` returns this as a VC mask. The allocator gives a head the
lowest free, ready VC in the mask. Private buffers make sure the shared
memory adds no new dependency.

## VC and switch allocation

`vc_sw_allocator` performs both allocations in one cycle, using separable
round robin.

1. **Bids.** Each VC with a flit bids for its output port:
   - a body or tail flit bids with the output VC its packet holds, if the
     next router is ready on that VC;
   - a head flit bids if some allowed output VC is free and ready.
2. **Input arbitration.** One round-robin arbiter per input port picks one
   bidding VC.
3. **Output arbitration.** One round-robin arbiter per output port picks one
   input port.

A winning head acquires its output VC. A winning tail frees it. The crossbar
registers the winner's flit and output VC, so the flit is on the link in the
next cycle.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `TORUS` (`noc_router`) | 1 | 1 = torus, 0 = mesh |
| `K` | 4 | routers per dimension (coordinates are 3 bits, so up to 8) |
| `B` | 8 | blocks = banks in the shared memory |
| `F` | 8 | flits per block (B × F = 64-flit shared memory) |
| `PDEPTH` | 2 | private buffer flits per VC |
| `NUM_VCS` (`noc_pkg`) | 2 | VCs per link |
| `FLIT_W` (`noc_pkg`) | 64 | payload bits per flit |
| `SHARED_LINKS` (`noc_pkg`) | 4 | input links that share the memory |

`B` and `F` must be powers of two. The sources of these values:

- Two VCs, eight blocks, 64-bit flits, four sharing links and the two-flit
  private buffer all come from the published method.
- The 64-flit memory size is its larger evaluated buffer size.
- A 32-flit memory is `F = 4`.
- The 2- and 4-block variants are `B = 2, F = 32` and `B = 4, F = 16`.

A head flit carries its destination in `data[2:0]` (x) and `data[5:3]` (y).
The flit type is `01` head, `00` body, `10` tail, `11` head+tail.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it shows |
|---|---|
| `tb_private_buffer` | FIFO order, flags and count against a queue model |
| `tb_route_compute` | all positions × destinations × input ports × VCs, torus and mesh, against a reference |
| `tb_block_allocator` | grants only free blocks, never one twice, lowest first, as many as possible |
| `tb_mbmp_memory` | four writes and four reads per cycle against an array model |
| `tb_input_unit` | per-VC order and payload through both routes; route 1 takes 2 edges from the link to the private buffer and route 2 exactly 2 more; blocks all come back; back-pressure happens |
| `tb_vc_sw_allocator` | one flit per input and output, only to ready VCs, heads take free allowed VCs, bodies follow, all packets complete |
| `tb_crossbar` | registered switch output |
| `tb_noc_router` | the default router with 10 random packet streams and congested sinks. It checks routes, dateline VCs, order, payload and exactly-once delivery. An idle router forwards in 3 cycles. A packet whose head is blocked at the switch sends flits 1 and 2 to the private buffer and flits 3 onward to the shared memory, and leaves once the output frees. Route 1, route 2, block allocation and release, multi-block VCs, use of all 8 banks, back-pressure and both dateline VCs are each seen. |
| `tb_network_workloads` | three 4x4 networks with uniform random traffic: torus with 16-flit packets and 8 × 8 blocks; torus with 64-flit packets and 4 × 16 blocks; mesh with 32-flit packets and a 32-flit memory |
| `tb_network_8x8` | 8x8 torus with 64-flit packets, 8x8 mesh with 32-flit packets, and a 4x4 torus with 2 × 32 blocks |

The network benches use `tb/net_harness.sv`, a K×K grid of routers with one
traffic model per PE. Each run is short, a few hundred packets. They show
that the configurations work without deadlock or loss. They are not a
performance study.

To run one bench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
          rtl/noc_pkg.sv tb/tb_noc_router.sv --top-module tb_noc_router -o sim
./obj_dir/sim
```

The network benches take a few minutes to compile, because every router
parameter set becomes its own C++ model. The unit and router benches build
in seconds.

## Departures and choices

- **Pipeline mapping.** The route-2 steps are IJ, SiA, SiT, SoA and SoT.
  They are folded into three cycles:
  - IJ with SiA;
  - SiT alone;
  - SoA with SoT, which uses a combinational bank read.

  This gives the intended five-stage route 2, two stages longer than route 1.
  The exact placement inside the original stage diagram is this design's own.
- **Flow control** (per-VC ready, above) is this design's own. So are the
  block request and release rules, including returning a partly used block
  when its VC goes idle.
- **The local port does not share.** Four links share, as in the cost
  model's 2-D case (L = 4). The PE port has private buffers only.
- **Torus deadlock avoidance** uses dateline VCs, which is this design's own
  choice. On the mesh both VCs are left free, as intended.
- **Memory size** is read as 64 flits (B × F = 64) of shared memory. The
  private buffers (2 flits × 2 VCs × 5 ports) come on top of it.
- **Not built.** The processing elements are not part of this RTL, and
  neither is the transistor-count cost model. The testbenches model PEs as
  packet sources and sinks.
- **Not reproduced.** The performance curves of the original study (200 000
  cycles, ten runs per point) are not reproduced. The network benches are
  functional tests of the same configurations.
