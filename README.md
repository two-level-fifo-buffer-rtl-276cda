# Two-level FIFO router buffer

A mesh network-on-chip router normally keeps a queue, or several virtual-channel queues, at every input. The queues are sized for the worst case. Most of that storage sits empty, yet a single busy direction can still overflow its own queue while its neighbours have room.

This design moves the storage to the output side and shares it. It has two levels:

- **Level 1.** Every output owns a small **level-1 FIFO** of a few flits. This is the queue the output link is served from.
- **Level 2.** All outputs share one **centralized level-2 FIFO** of K slots. Any empty slot can hold a flit for any output. A flit waits in level 2 only when its output's level-1 FIFO cannot take it straight away.

Flits bound for one output form a linked list inside level 2. Each slot stores the flit and a pointer to the next slot of the same output. A busy output can therefore occupy almost the whole shared buffer while the other outputs keep flowing. Writing a flit into its output's list is also what switches it, so there is no separate crossbar.

The RTL is a 5-port router (E, S, W, N, local P) for a 2-D mesh with XY routing and 64-bit flits. At its default size it has 128 level-2 slots and five 6-flit level-1 FIFOs, 158 flits of storage in all.

## Flits and packets

Packets are wormhole-switched: a head flit, body flits, then a tail flit. A single-flit packet is both head and tail. A flit is 64 bits wide (`tlf_pkg::flit_t`).

| bits | meaning |
|---|---|
| 63 | tail |
| 62 | head (both set: single-flit packet) |
| 5:3 | destination y (head flit) |
| 2:0 | destination x (head flit) |
| others | payload, not interpreted |

The bit encoding and the 3-bit coordinates (enough for an 8 × 8 mesh) are choices of this implementation.

Port numbering is E=0, S=1, W=2, N=3, P=4. x grows towards E and y towards N. XY routing sends a flit along x first, then along y, and out at P at its destination.

## Data-link level-2 FIFO

Each of the K slots of `tlf_level2_fifo` has three parts:

- a **data field**: one flit;
- a **linker field**: the address of the slot holding the next flit for the same output;
- two status bits, `busy` and `full`. `busy` means the slot is reserved or in use; `full` means data has been written into it.

Each output has a **read pointer**. Every cycle, each output whose list holds a flit, and whose level-1 FIFO has room, reads the slot under its pointer. It pushes that flit into its level-1 FIFO, moves the pointer to the slot's linker field, and frees the slot. All five outputs can read in the same cycle, and all five inputs can write in the same cycle. Writes and reads use ordinary register arrays.

The **write generator** (`tlf_write_generator`) finds up to five empty slots each cycle:

1. Isolate the lowest set bit of the empty-slot bitmap.
2. Clear that bit and repeat, once per input.
3. Turn each one-hot word into an address with a small OR-tree encoder (`tlf_wordline_encoder`).

## Linking: reserved slots, linker table and patches

Most of the design's difficulty is here, in `tlf_data_link_scheduler`. A flit's linker field must name the next flit's slot at the moment the flit is written, but that slot must be known before the next flit arrives. The scheduler solves this with reservations.

**Reserved slot per input.** Every input always holds one empty slot reserved for it; at reset these are slots 0–4. An arriving flit that goes to level 2 is written into its input's reserved slot, and a fresh empty slot is reserved for that input in the same cycle. If the flit is a head or body flit, its linker field is set to that fresh slot, because the next flit of the same packet comes through the same input and will land there. A packet's flits therefore chain themselves together as they arrive.

**Tail flits.** A tail must link to the first flit of the *next packet of the same output*. That packet comes from whichever input wins the output next, and it may arrive before or after the tail. There are three cases:

- **Linker table.** The next packet's head arrives while the current packet is still arriving (its tail is not yet in). The head is stored anyway, and its slot address is put in the **linker table** entry of the current packet's input. When that input's tail arrives, it takes its linker field from the table.
- **Patch.** The tail is already stored when the next head arrives. The tail's linker field is rewritten one cycle later to point at the new head.
- **Empty list.** The output's list holds no flit. The output's read pointer is loaded directly with the new head's slot.

For each output the scheduler keeps four values:

- the number of flits of that output in level 2;
- which input sent the last packet queued;
- whether that packet is still arriving;
- if it is complete, where its tail sits.

Packets from different inputs therefore leave an output whole and one after another, even when their flits were interleaved on arrival.

**Bypass.** A flit skips level 2 and goes straight into its output's level-1 FIFO when all of these hold:

- the output has nothing waiting in level 2;
- the flit is next in the output's packet order;
- the level-1 FIFO has room, counting the pushes already under way;
- no other flit bypasses to the same output in that cycle.

Otherwise the flit goes to level 2, so a congested or full output spills into the shared buffer instead of blocking its input.

## Arbitration

Head flits that arrive in the same cycle and want the same output are queued in an order set by `tlf_arbiter`. The arbiter combines two rules:

- **Traffic awareness.** Each router reports, per neighbour, which of that neighbour's outputs are congested (`next_congested`). The routing stage works out where each head goes in the next router. Heads whose next hop is congested are put last.
- **TDMA rotation.** Among equals, priority rotates from input to input, driven by a counter that advances every cycle, so no input is starved.

The order only matters when heads truly collide. Once a packet is queued, its flits follow in order.

## Pipeline and latency

| stage | work | blocks |
|---|---|---|
| RC | decode the head, XY route here and at the next router | `tlf_header_decoder` (one per input) |
| Arb + W_Gen | order heads, pick empty slots, decide bypass or level 2, compute links | `tlf_arbiter`, `tlf_write_generator`, `tlf_data_link_scheduler` |
| Data_W + Link_W | write the data and linker fields (or push the bypassed flit into level 1) | `tlf_level2_fifo`, `tlf_level1_fifo` |
| Data_R + Link_R | read the next flit and link of each output into its level-1 FIFO | `tlf_level2_fifo` |

A flit accepted at an input in cycle *t* is offered at its output in:

- cycle *t*+4 when it passes through level 2;
- cycle *t*+3 when it bypasses level 2 (it skips Data_R).

The testbenches measure both numbers. Every input and every output moves one flit per cycle.

## Interfaces

`tlf_router` (the top) has the following ports:

- `in_valid`, `in_ready`, `in_flit`: per input, a valid/ready handshake. A flit moves when both are high at a rising edge.
- `out_valid`, `out_ack`, `out_flit`: per output. The level-1 FIFO offers its oldest flit, and the flit leaves when the receiver acknowledges.
- `next_congested[o][p]`: traffic report from the neighbour at output *o*. It is high when that neighbour's output *p* is congested. It goes combinationally into the arbiter, so it should come from a register, as it does in the mesh testbench.
- `my_x`, `my_y`: this router's coordinates.
- `l2_occupancy`: level-2 slots in use, including the reserved ones.

Reset (`rst_n`) is asynchronous and active low.

Parameters:

| parameter | default | meaning |
|---|---|---|
| `K` | 128 | level-2 slots per group |
| `L1_DEPTH` | 6 | level-1 FIFO depth per output |
| `HEAD_RSV` | 5 | slots a new packet's head may not take (see below) |
| `OUT_RSV` | 1 | keep one slot for each output with nothing in level 2 |
| `N_GROUPS` | 1 | number of level-2 groups (1 = full association) |
| `PORT_GROUP` | all 0 | group serving each output, 2 bits per output |

## Hybrid association

Letting every output write and read one shared array costs multiplexers and ports; that cost grows with the number of outputs. Level 2 can instead be split into groups, each shared by a subset of the outputs. Each group is a complete level-2 FIFO with its own write generator, scheduler and reserved slots, and a flit is handled by the group of its output.

The "2-3 hybrid" configuration uses two groups of 64 slots:

- one group for E and W;
- one group for S, N and P.

It is set as `N_GROUPS=2, K=64, PORT_GROUP=10'b01_01_00_01_00` (P, N, W, S, E from the top bits), and `tb_tlf_router_hybrid` runs it. It holds the same 158 flits as the default. The default, one group for everything, is called full association.

## Deadlock avoidance (a departure)

The original description does not say what happens when the shared buffer is full. Simulated literally, an 8 × 8 mesh of 40-flit routers locked up at 0.35 flits/node/cycle. Two neighbours had filled their shared buffers with flits bound for each other: east-bound flits in one, west-bound flits in the other. Flits queued behind a packet that is still arriving can also use up every slot, so the rest of that packet never gets in.

Two small admission rules in the scheduler address this. Both are this design's own.

- **Head admission reserve (`HEAD_RSV`).** A head flit may not take one of the last `HEAD_RSV` empty slots. Those slots stay for body and tail flits, so packets already started can finish.
- **Output slot reserve (`OUT_RSV`).** A flit for an output that already has flits in level 2 may not take the slots needed to give every *other* output with nothing in level 2 one slot. An idle direction therefore always accepts a flit. Since XY routes never turn back, a full queue drains once the queues downstream of it drain.

With these rules level 2 fills only up to K minus a few slots. Setting `HEAD_RSV=0, OUT_RSV=0` gives the plain shared buffer.

How large the head reserve must be depends on the buffer size and packet length; it has not been derived.

- In the 8 × 8 mesh with 30-slot routers and packets of up to 8 flits, a reserve of 5 still deadlocked at 0.35 flits/node/cycle.
- A reserve of 12 ran cleanly at 0.35 and 0.45 and drained completely afterwards.
- The default of 5 for the 128-slot router has been tested in a single router, not in a mesh.

Treat these rules as a practical safeguard, not a proof of deadlock freedom.

## Other choices not fixed by the original description

- **Flit encoding and handshakes.** The flit bit layout, the valid/ready input handshake and the 3-bit coordinates.
- **Reserved slots.** One reserved slot for *every* input at all times.
- **Bypass rule.** The exact conditions in the bypass section above.
- **Patch and bookkeeping.** The tail-patch mechanism and the per-output bookkeeping.
- **Arbiter counter.** The TDMA counter advances every cycle; the combined congested-last, then rotating order is this design's own.
- **Level-1 FIFO.** It is a register file with a read multiplexer. Its count is used both to allow reads from level 2 and to decide bypasses.

## Not included

- Adaptive (DyXY) routing. Only XY is built.
- 8-port routers. `N_PORTS` is fixed at 5 in `tlf_pkg`.
- The buffer architectures the design was compared with.
- Area, power and timing figures for a particular process. A generic synthesis of the default router gives about 10 000 cells and 12 700 flip-flop bits.

## Files

`rtl/`:

- `tlf_pkg.sv`: flit type, port enum, XY routing function.
- `tlf_header_decoder.sv`: RC stage.
- `tlf_arbiter.sv`: congestion-aware TDMA order.
- `tlf_wordline_encoder.sv`, `tlf_write_generator.sv`: empty-slot finder.
- `tlf_data_link_scheduler.sv`: bypass / level-2 decision and linking.
- `tlf_level2_fifo.sv`: shared data-link buffer.
- `tlf_level1_fifo.sv`: per-output FIFO.
- `tlf_router.sv`: top.

`tb/` has a self-checking testbench per block. Each prints `TB_RESULT checks=… failures=…`.

- **`tb_tlf_router`** runs the default router. It has directed tests for the latencies, TDMA rotation, congestion reorder and linker-table case, plus long random phases with outputs held off to fill the buffer. It checks routing, packet contiguity, per-source order and loss, and requires every mechanism (bypass, level-2 write, linker table, patch, stall, full level 1, full level 2) to occur.
- **`tb_tlf_router_hybrid`** runs the same checks on the 2-3 hybrid configuration.
- **`tb_tlf_mesh`** builds an 8 × 8 mesh of 40-flit routers (K=30, 2-flit level 1, `HEAD_RSV=12`). Each node injects packets of 2, 4 or 8 flits. Uniform traffic runs at 0.15, 0.25, 0.35 and 0.45 flits/node/cycle, and a hotspot pattern sends 30 % of packets to six nodes. For each run it prints accepted throughput and mean latency. It checks delivery, order and that the network drains. One run gave:

  | traffic | offered (flits/node/cycle) | accepted | mean latency (cycles) |
  |---|---|---|---|
  | uniform | 0.15 | 0.148 | 30 |
  | uniform | 0.25 | 0.251 | 36 |
  | uniform | 0.35 | 0.266 (saturated) | 465 |
  | uniform | 0.45 | 0.260 (saturated) | 843 |
  | hotspot | 0.15 | 0.152 | 33 |

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/tlf_pkg.sv \
    tb/tb_tlf_router.sv --top-module tb_tlf_router -o sim
./obj_dir/sim
```

Substitute any testbench name. Add `+verilator+seed+N` to the run to change the random seed.

- The unit and router testbenches run in seconds.
- The mesh testbench takes a few minutes to compile and well under a minute to run.
- Override `K`, `L1_DEPTH` and the other parameters in the testbench's instantiation to try other sizes.
