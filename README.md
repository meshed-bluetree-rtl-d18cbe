# Meshed Bluetree: a time-predictable interconnect from many clients to many memories

A Bluetree is a binary tree of 2-to-1 multiplexers that joins N clients
(processor cores, accelerators) to one memory. Each multiplexer arbitrates with
a small counter. This lets the worst-case time of any memory access be worked
out in closed form. A single tree, however, funnels every client into the one
memory, and that memory becomes the bottleneck.

The Meshed Bluetree keeps the predictable tree but gives the system several
memories. Each client owns a small binary tree of *routers* that steers every
request to one of N_D memories. Each memory has its own Bluetree collecting
the requests of all clients for it. Requests for different memories no longer
contend, and the worst-case latency can still be computed. This repository
holds synthesizable SystemVerilog for:

* the whole interconnect, at any power-of-two size,
* a memory model with a fixed access time,
* a random-traffic client,
* a system top that runs the synthetic workload used to evaluate the
  interconnect,
* a self-checking testbench for every module.

```
 client 0 .. client N_mu-1
    |            |
 router tree  router tree      (one per client, N_D-1 routers each;
   / | \        / | \            the "router network")
  .  .  .      .  .  .         every client reaches every Bluetree
  |         \/         |
 Bluetree 0  ...  Bluetree N_D-1   (N_mu-1 multiplexers each)
    |                  |
 memory 0   ...   memory N_D-1
```

For the main configuration (8 clients, 4 memories) this gives 24 routers,
28 multiplexers and 84 point-to-point links. In general:

* multiplexers: (N_mu-1)·N_D
* routers: (N_D-1)·N_mu
* links (each a request/response pair, counting every link between two
  components, clients and memories included): one per multiplexer towards
  its memory, (N_mu-1)·N_D, plus one per router towards its client,
  (N_D-1)·N_mu, plus N_mu·N_D between router trees and Bluetrees. Together
  that is (N_mu-1)·N_D + (2·N_D-1)·N_mu.

## Packets and how they find their way

Every link carries one 81-bit packet (`mbt_pkg::packet_t`), MSB first:

| field  | bits | meaning |
|--------|------|---------|
| CMD    | 1    | 0 read / read response, 1 write / write acknowledge |
| ADDR   | 32   | byte address inside the target memory |
| DATA   | 32   | write data, or read data in a response |
| CPU_ID | 8    | path back to the client, built up on the way |
| MEM_ID | 8    | index of the target memory, written by the client |

Requests and responses use the same format and travel on separate links, so a
response never waits behind a request.

**MEM_ID (forward routing).** The client writes the memory index. A router at
depth l of the client's router tree looks at bit N_R-1-l of MEM_ID, where N_R
is the depth of that tree. The root router therefore decides the upper half
or lower half of the memories, and the last stage decides between neighbours.
MEM_ID is never modified, so the memory sees its own index.

**CPU_ID (return routing).** A client sends CPU_ID = 0. Every multiplexer
that passes a request shifts CPU_ID left by one and puts the input the
request came from (0 or 1) into bit 0. At the memory, CPU_ID therefore holds
the whole path through the Bluetree, with the leaf choice in the highest of
the used bits. On the way back, each multiplexer reads bit 0, sends the
response to that input, and shifts CPU_ID right. The client gets CPU_ID = 0
back.

Routers do not touch CPU_ID. On the response path, a router simply merges
its two inputs: a response can only reach a router's input if the request
went out through it. Eight bits allow a Bluetree of depth up to 8 (256
clients).

Client i enters its leaf multiplexer on input i mod 2, and the tree is wired
in the natural order. The CPU_ID seen at a memory is therefore the client
index with its N_beta bits reversed (client 1 of 8 arrives as `3'b100`).

## The Bluetree multiplexer and its blocking factor

`mbt_mux` has two client-side inputs ("direction 0" and "direction 1") and one
memory-side output.

* **Request path.** The arbiter `mbt_mux_arbiter` picks one of the two
  requests. The multiplexer writes the chosen direction into CPU_ID and
  places the packet in a one-entry buffer towards the memory.
* **Response path.** Non-blocking: a demultiplexer steers each response by
  CPU_ID bit 0 into a one-entry buffer on that client side.

The arbiter is where time predictability comes from. Direction 0 is the local
high-priority side, with one exception: a counter tracks how many direction-0
packets were served since direction 1 was last served. Once it reaches the
blocking factor ALPHA, a waiting direction-1 packet wins. A lone request is
always served at once. With ALPHA = 1 (the default) the two sides alternate
under load, which is plain round robin.

The counter counts only packets that actually move (`advance`), so a grant
held while the output buffer is full does not use up direction 1's turn.

## The Bluetree router

`mbt_router` is the multiplexer turned around:

* **Request path.** Non-blocking. One MEM_ID bit (parameter `SEL_BIT`)
  chooses the Bluetree side, and each side has its own one-entry buffer.
* **Response path.** Responses from the two Bluetree sides are merged into
  one buffer towards the client.

The merge uses static priority by default (direction 0 always first). This is
what the timing analysis below assumes. `RS_ARB = RS_ARB_RR` switches it to
round robin, built from the same arbiter with ALPHA = 1. Static priority is
safe here because a client has at most a few requests in flight, so the
low-priority side cannot starve for long.

## Buffers and cycle timing

Every multiplexer and router output has a one-entry pipeline register
(`mbt_pipe_reg`) with a valid/ready handshake. A packet moves when valid and
ready are both high on a rising clock edge. `in_ready = !full || out_ready`,
so a chain of stages moves one packet per cycle, and every stage adds exactly
one cycle. Only valid flags and counters are reset (asynchronous, active-low
`rst_n`). Data registers are not reset.

The handshake rules are checked by assertions in the multiplexer and router
(an offered packet must stay offered, unchanged, until taken). Every input is
always accepted eventually. No response ever waits for a request, so the
network cannot deadlock as long as clients take their responses.

## Timing: what the latency bounds are

With N_beta = log2(N_mu) multiplexer stages, N_R = log2(N_D) router stages
and a memory that answers t_D cycles after accepting a request:

* **Best case**, no contention: t_BC = 2·(N_R + N_beta) + t_D. For 8×4 with
  t_D = 20 this is 30 cycles, and every simulated 8×4 run has reads at exactly
  30.
* **Worst case** with ALPHA = 1 and static response priority: count the
  requests that can be served before ours at each Bluetree stage, starting
  with N = N_R at the router network and going from the leaf to the root
  stage with N ← N + (N + 1) + 1. Each such request costs one memory access
  (t_D). The worst case is then

  t_WC = (N + 1)·t_D + N_beta + N_R + N_D.

  For 8×4, N = 2 → 6 → 14 → 30 and t_WC = 31·20 + 3 + 2 + 4 = 629 cycles.
  For 8×2 it is 466 cycles.

The testbenches compute both bounds from these formulas and check every
measured latency against them. One observation that the bound does not cover
on its own: **a plain 8-client Bluetree (N_D = 1, N_R = 0) with two
outstanding requests per client**. The starting count N = N_R = 0 does not
include the client's own earlier request. The simulated 8×1 system reached
318 cycles, above the formula's 304. The published hardware measurement of
the same workload also peaks at about 320 cycles. For that case the testbench checks the
plain bound instead: 16 requests share the memory, so at most 16·t_D plus the
path, 326 cycles. With one or more router stages the starting count covers
it, and no run exceeded the bound.

## The memory model

`mbt_memory` stands in for an on-chip RAM with an added fixed access time:
1024 words of 32 bits (4 KiB) by default, word index ADDR[11:2]. It accepts
one request, is busy for exactly `LATENCY` cycles (default 20), and then
offers the response:

* a read returns the stored word,
* a write stores the word and echoes it as the acknowledge.

CMD, ADDR, CPU_ID and MEM_ID are copied into the response. The next request
is accepted in the same cycle the response leaves. A request that arrives
while the memory is busy waits in the root multiplexer's buffer, and that
wait is the t_D per blocking request of the analysis above.

A DRAM controller is not part of this design. In the mixed-memory experiment
a DRAM is modelled by this same module with `LATENCY = 30`, and the fast
on-chip RAM by `LATENCY = 1`.

## Synthetic traffic and the system top

`mbt_traffic_gen` is the client of the evaluation. After `start` it issues
`NUM_REQUESTS` (100) reads to random word addresses. It waits a random
interval of 1..`INTERVAL_MAX` (64) cycles between one request being taken and
the next being offered. It stops while `MAX_OUTSTANDING` (2) requests are in
flight.

* **Target memory.** Chosen uniformly over the N_D memories, or, with
  `MEM0_PERCENT` ≥ 0, memory 0 gets that share of the reads.
* **Latency.** Measured from the first cycle a request is offered to the
  cycle its response returns.
* **Matching.** A response is matched to the oldest outstanding request for
  the same memory, because one memory answers in order.
* **Outputs.** Counts, sum, minimum and maximum of the latencies, and an
  error count for anything unexpected.
* **Random source.** A 32-bit xorshift generator.

`mbt_system` is the top. It connects N_mu generators, the interconnect and
N_D memories, each memory with its own latency (`MEM_LATENCY`, an array of
16-bit values, element j for memory j). All statistics come out as per-client
arrays. The defaults are 8 clients, 4 memories, t_D = 20, ALPHA = 1, static
response priority, and 100 reads per client with at most 2 outstanding.
Synthesis of the default top gives about 3.8k cells, 12.6k flip-flop bits and
four 32 Kibit RAMs.

## Results of the synthetic workload

All clients 100 reads each, 2 outstanding, intervals 1..64, t_D = 20.
"Completion" is the time from start until the last response, which is bound
by the busiest memory (reads × t_D).

| system | average latency | lowest | highest | bound | completion |
|--------|-----------------|--------|---------|-------|------------|
| 8×1    | 287 | 26 | 318 | 326 (see above) | 16011 |
| 8×2    | 160 | 28 | 375 | 466 | 8648 |
| 8×4    | 74  | 30 | 318 | 629 | 4908 |

Doubling the memories roughly halves the completion time. It does not quite
halve it, because random traffic does not split evenly across the memories.

Mixed memories, 8×2 with memory 0 fast (t_D = 1) and memory 1 slow
(t_D = 30):

| share to fast memory | average | highest | completion |
|----------------------|---------|---------|------------|
| 10% | 413 | 478 | 21313 |
| 30% | 305 | 535 | 16542 |
| 50% | 204 | 545 | 11706 |

The average falls as more reads go to the fast memory, but the highest
latency does not. A client that gets a fast answer issues its next read at
once, often to the slow memory, so contention there does not drop.

## Where this RTL makes its own choices

The architecture follows the published Meshed Bluetree design:

* the two trees and how they are coupled,
* the packet fields and widths,
* the shift-based CPU_ID routing,
* the blocking-factor arbiter,
* static priority in the routers,
* the 20-cycle memory and the workload parameters.

The following details are this implementation's own choices:

* valid/ready handshakes on every link, and asynchronous active-low reset;
* one-entry buffers per direction (consistent with the published register
  counts of roughly three packet-wide registers per multiplexer and router);
* the exact counter rule of the arbiter, and counting only packets that
  move;
* which router input has static priority (direction 0), and that routers
  read MEM_ID bits from the top down without shifting it;
* the appended CPU_ID bit sits in bit 0, and bits shifted out at the top are
  lost (harmless up to depth 8);
* the memory's busy/accept timing, its 4 KiB size and its response contents;
* in the generator: the random-number generator, how the interval is
  counted, when latency starts, and how responses are matched;
* a DRAM is stood in for by a slower copy of the same memory model.

Not included: the processors that ran the benchmark programs, the DRAM and
its controller, and any converter from the packet format to a standard bus
such as AXI. The client port of `meshed_bluetree` is where such a converter
would attach.

## Files

| file | contents |
|------|----------|
| `rtl/mbt_pkg.sv` | packet type, command and arbitration enums |
| `rtl/mbt_pipe_reg.sv` | one-entry valid/ready pipeline register |
| `rtl/mbt_mux_arbiter.sv` | 2-to-1 arbiter with blocking factor ALPHA |
| `rtl/mbt_mux.sv` | Bluetree multiplexer |
| `rtl/mbt_router.sv` | Bluetree router |
| `rtl/mbt_bluetree.sv` | one Bluetree, N_CLIENTS-1 multiplexers |
| `rtl/mbt_router_tree.sv` | one client's router tree, N_MEM-1 routers |
| `rtl/meshed_bluetree.sv` | the complete interconnect |
| `rtl/mbt_memory.sv` | memory with fixed access time |
| `rtl/mbt_traffic_gen.sv` | random-read client with latency statistics |
| `rtl/mbt_system.sv` | top: generators + interconnect + memories |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_mbt_system_full.sv` | the top at its default parameters, one full run |
| `tb/tb_mbt_system_mixed.sv` | mixed fast/slow memory experiment |
| `tb/tb_meshed_bluetree_sizes.sv`, `tb/mbt_scale_unit.sv` | every client to every memory at 4×1, 8×4, 16×2 and 32×8 |

Trees use heap numbering inside generate loops: node 1 is the root, node n
has children 2n and 2n+1, and the leaves sit at N..2N-1. Link arrays are
indexed the same way.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. Each
has a watchdog that counts a failure if the run hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mbt_pkg.sv tb/tb_mbt_system.sv --top-module tb_mbt_system
./obj_dir/Vtb_mbt_system +verilator+rand+reset+2
```

Replace `tb_mbt_system` with any other testbench name. `+verilator+rand+reset+2`
starts every register at a random value, so reset is really exercised.
Verilator prints a few warnings that are expected:

* unused response fields in the generator;
* reset used both asynchronously and in the assertions' `disable iff`.

The whole default system simulates 800 reads in well under a second. The
size-scaling testbench takes about two minutes to compile for its 32×8
instance. Larger sizes compile more slowly still: 128×16 (2032
multiplexers, 1920 routers) took more than ten minutes and has not been
simulated.

To change the configuration, set the parameters of `mbt_system` (or
`meshed_bluetree`):

* `N_CLIENTS` and `N_MEM`: any powers of two, up to 256 clients;
* `ALPHA`;
* `RS_ARB`;
* `MEM_LATENCY`;
* the generator's workload parameters.

The testbenches show the parameter syntax, for example 8×2 with one fast and
one slow memory:
`mbt_system #(.N_MEM(2), .MEM_LATENCY({16'd30, 16'd1}), .MEM0_PERCENT(50))`.
