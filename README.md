# Handshake join with an adaptive merging network

This is a hardware stream join. Two unbounded tuple streams, R and S, arrive at the operator. For every pair of tuples whose keys are equal, it emits a result tuple, provided that the two tuples were, at some moment, both inside each other's sliding window. A window holds the last `NUM_CORES*WIN` tuples of its stream.

The join is *handshake join*. The two windows are laid side by side as two long shift registers that run in opposite directions:

- R tuples move from core 0 towards core `NUM_CORES-1`.
- S tuples move the other way.

Each pair of tuples therefore passes each other exactly once, inside one of the `NUM_CORES` join cores. That core compares them. No core needs a global view and no central coordinator exists.

The hard part is collecting the results. A core's output rate depends on the data, and one core can produce a burst while the others are silent. A plain binary tree of buffered mergers gives each core only the buffers on its own path to the root. This design replaces that tree with an **adaptive merging network**:

- A ring of bufferless routers, one per core, steers each result towards the least-occupied of nearby FIFO buffers. A burst from one core can therefore fill the whole buffer layer.
- A bufferless binary tree of mergers drains the buffers into one output stream.
- An **admission control** flip-flop freezes the whole join whenever any buffer is nearly full. No result is ever lost, however slow the output channel is.

Default configuration:

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CORES` | 16 | join cores, also ring nodes and FIFO buffers |
| `WIN` | 8 | window slots per core and per stream, so 128 tuples per window |
| `FIFO_DEPTH` | 8 | entries per result buffer |
| `FULL_MARGIN` | 3 | a buffer raises its full flag when 3 or fewer entries are free |

Input tuples have a 32-bit key and a 32-bit payload. A result has three 32-bit fields: the key, the R payload and the S payload.

## Module map

```
hsj_top
 ├─ join_core ×NUM_CORES                 (windows + nested-loop compare)
 ├─ adaptive_merging_network
 │   ├─ ring_node   ×NUM_CORES           (bufferless router, ring)
 │   ├─ result_fifo ×NUM_CORES           (buffer layer)
 │   └─ merger      ×(NUM_CORES-1)       (bufferless binary tree)
 └─ admission_control                    (one flip-flop → suspend)
hsj_pkg                                  (tuple_t, result_t, flit_t, slot_t)
```

## The windows and the lockstep rule

Each core holds a segment of `WIN` slots of R and `WIN` slots of S. Each slot has a valid flag.

When a tuple is accepted at the R input, every core shifts its R segment by one slot in the same cycle:

- The oldest R slot of core k moves into core k+1.
- The oldest R slot of the last core drops out of the window and expires.

S works the same way in the opposite direction. The segments of all cores thus act as one shift register per stream, `NUM_CORES*WIN` tuples long.

To make this work without any handshaking between cores, all cores run the same fixed-length sequence and start it together:

- `hsj_top` broadcasts "an R tuple and/or an S tuple was accepted this cycle" (`r_new`, `s_new`) to every core.
- Every core scans all `WIN` slots, valid or not. Invalid slots are skipped through their flag, not by a shorter loop.

Every core therefore finishes a round in exactly the same cycle, and an assertion in `hsj_top` checks that the cores are idle together.

A consequence: tuples move only when new tuples arrive. Two tuples that have not yet met keep waiting until later arrivals push them past each other. To see the complete join of a finite input, feed `NUM_CORES*WIN` non-matching tuples per stream afterwards. The testbenches do this.

## The join core sequence

The join core (`join_core.sv`) has eight states:

| State | Action |
|---|---|
| STATE0 | Clears both segments after reset. |
| STATE1 | Ready; waits for the broadcast arrival. |
| STATE2 | Reads the two input ports. Core 0 reads the accepted R tuple and its neighbour's oldest S; the last core reads the accepted S tuple and its neighbour's oldest R. |
| STATE3 | Writes the ports into the input buffer registers with their valid flags. |
| STATE4 | Goes to STATE5 if an R tuple arrived, else to STATE6. |
| STATE5 | First cycle: shifts the R segment, taking the new R tuple in as the newest slot. Then compares that tuple with S slot `i` in cycle `i`, for `WIN` cycles. The last comparison is "complete_R". |
| STATE6 / STATE7 | The same for a new S tuple against the R segment, then back to STATE1. |

An equal key gives a result in the next cycle. The result goes straight into the ring node; the core has no result buffer.

A round takes `5 + 2*WIN` cycles when both streams delivered a tuple, and `5 + WIN` when only one did. At the defaults that is 21 and 13 cycles.

While `suspend` is high, every register in the core holds and no result is produced. The suspension lengthens the round by exactly the number of suspended cycles.

## The adaptive merging network

### Ring nodes (`ring_node.sv`)

Node k has three inputs:

- `S_in` from core k.
- `E_in` from node k+1.
- `W_in` from node k-1. Node 0 and node N-1 are linked by a wrap-around link.

It has three outputs, each a single register:

- `N_out` to buffer k.
- `E_out` to node k+1.
- `W_out` to node k-1.

The node has no other storage. Every incoming tuple must leave on some output in the cycle it arrives. This is bufferless "deflection" routing in the style of BLESS: a tuple always goes somewhere, even if that is away from a buffer.

Each cycle the node does three things:

1. **Ranks the incoming tuples, oldest first.** Every tuple in the ring carries an 8-bit saturating hop counter, which is incremented on each ring hop. Ties go to `E_in`, then `W_in`, then `S_in`. A tuple already in the ring therefore beats a fresh one.
2. **Orders its outputs by the occupancy counters** of buffer k (for `N_out`), buffer k+1 (for `E_out`) and buffer k-1 (for `W_out`), emptiest first. Ties go to `N`, then `E`, then `W`. `N_out` is skipped when buffer k has no free entry.
3. **Assigns the tuples in rank order**, each to the best output not yet taken.

At most three tuples arrive and three outputs exist, so every tuple gets an output once `N_out` is allowed. The admission control guarantees this (see below). If it ever failed, `drop_o` would pulse and an assertion would fire. `hsj_top` brings this out as `lost_result`.

### FIFO buffers (`result_fifo.sv`)

Each buffer is a circular queue of `FIFO_DEPTH` results with:

- an occupancy counter, which feeds nodes k-1, k and k+1;
- an empty flag;
- a full flag, which is raised when `count >= FIFO_DEPTH - FULL_MARGIN`.

The head entry is visible combinationally (first-word fall-through), so the leaf merger can take one result per cycle.

### Merger tree (`merger.sv`)

The tree has `NUM_CORES-1` mergers, numbered as a heap:

- Merger 1 is the root and drives the output.
- Merger m reads mergers 2m and 2m+1.
- The leaf mergers read two buffers each.

Each merger has two input registers and one output register, each with a valid flag. When both inputs hold a tuple they are served alternately.

Because the tree has no buffers, back-pressure is needed. Mergers use a valid/ready handshake, and an input register accepts a tuple when it is empty or is being emptied in the same cycle. A single stream therefore passes at one tuple per cycle. `NUM_CORES` must be a power of two, at least 2.

## Admission control and why nothing is lost

`admission_control.sv` registers "all full flags are clear" (the AND of the inverted flags) in one flip-flop. `suspend` is its inverse. While suspend is high:

- `r_ready` and `s_ready` are low, so new tuples are refused and stay with the source.
- Every join core freezes.

After a buffer's flag rises, at most a few results can still reach it:

- Each core stops producing results within 2 cycles: the flag is registered, then the core freezes.
- Up to 3 tuples per cycle can converge on a node.

`FULL_MARGIN = 3` covers this. The network tests drive single-core bursts with a stalled output, and the end-to-end test uses an output that accepts one result in four. No buffer overflows and no result is dropped in either.

## Interfaces and timing (`hsj_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `r_valid`, `r_tuple`, `r_ready` | in/in/out | 1/64/1 | R input; transfer when valid && ready |
| `s_valid`, `s_tuple`, `s_ready` | in/in/out | 1/64/1 | S input; may transfer in the same cycle as R |
| `out_valid`, `out_result`, `out_ready` | out/out/in | 1/96/1 | result stream; hold `out_ready` low for a slow channel |
| `suspended` | out | 1 | admission control is holding the join |
| `lost_result` | out | 1 | diagnostic; never high when correctly sized |

`tuple_t` is `{key[31:0], payload[31:0]}`. `result_t` is `{key, r_payload, s_payload}`.

`r_ready` and `s_ready` are high only while the cores are in STATE1 and not suspended. They depend on no input. When both streams offer a tuple, both are taken in one round. At best, an R/S pair is accepted every 21 cycles at the defaults.

## Measured behaviour

### End-to-end test at the default parameters

`tb_hsj_top` runs at the default parameters in three phases:

1. 128 + 128 tuples at a 100% match rate, followed by a flush. This gives exactly 16384 results in 19342 cycles.
2. A 10% match rate. This checks the 21-cycle and 13-cycle round gaps.
3. A 100% match rate with the output ready one cycle in four.

Every result is checked against a reference model of the windows, and no result may be missing or extra. The test also counts how often each mechanism occurred and fails if any never did:

- refused input;
- suspension;
- full flag;
- deflection to a neighbour;
- use of the wrap-around link;
- contention at a node;
- tuple expiry.

### Match-rate sweeps

Each sweep uses random placement of the matching tuples. Cycle counts include the flush tuples.

| Cores, tuples/stream | Match | Results | Cycles | Accepted input (tuples/cycle) |
|---|---|---|---|---|
| 16, 128 | 10% | 224 | 5355 | 0.096 |
| 16, 128 | 40% | 2805 | 6049 | |
| 16, 128 | 70% | 8556 | 11434 | |
| 16, 128 | 100% | 16384 | 19141 | 0.026 |
| 64, 512 random | 10% | 2340 | 21483 | 0.095 |
| 64, 512 random | 50% | 64516 | 75587 | 0.027 |
| 64, 512 random | 100% | 262144 | 272955 | 0.0075 |
| 64, 512 burst | 10% | 2601 | | 0.083 |
| 64, 512 burst | 50% | 65536 | | 0.015 |
| 64, 512 burst | 100% | 262144 | | 0.0075 |

- **Small-scale sweep.** The result counts come within about 10% of the published counts for the same experiment (for example 13338 against about 13300 at 90%, and exactly 16384 at 100%). The total cycle count grows with the number of results. Below 40% the total is set by the rounds alone: 256 rounds of 21 cycles, flush included. At high match rates the output (one result per cycle) is the bottleneck, and the admission control throttles the input to it.
- **Large-scale sweep.** This is the 64-core, 512-tuple configuration, set by parameter override. Matching tuples placed in bursts lower the input rate at medium match rates, as expected.

The input rate here is the number of accepted tuples divided by the cycles until the last result. It is not a "maximum rate without dropping tuples", so compare only the trends with other throughput figures.

### Size

A generic synthesis of the default 16-core configuration gives about:

- 30.7k flip-flop bits;
- 12k memory bits for the buffers;
- 14k cells.

The 32-core configuration gives about 61.5k flip-flop bits, 24.6k memory bits and 28.6k cells. Both sizes grow linearly with the core count. The register counts are close to the roughly 32k and 65k slice registers reported for the published 16-core and 32-core FPGA implementations. Most of the registers are the window slots, which hold 2·WIN tuples of 65 bits each per core.

## Where this design makes its own choices

The structure follows the published handshake-join-on-FPGA design with an adaptive merging network:

- the core states;
- the shift-register windows with valid flags;
- the ring, buffer and tree layers;
- oldest-first ranking by hop count;
- port choice by buffer counters;
- the flip-flop admission control;
- the default sizes.

The following are this implementation's own:

- **Input handshake.** Inputs use valid/ready, and a refused tuple is simply not taken. Both streams can enter in the same round.
- **Lockstep.** Achieved by broadcasting the arrival to all cores and by fixed-length scans.
- **Round length.** `5 + 2*WIN` or `5 + WIN` cycles. Published cycle totals for 16 cores are of the same order: about 4k cycles at 10% and about 18k at 100%, against 5.4k and 19.1k here. They are not cycle-identical.
- **Tie-breaking in the ring nodes.** This includes the hop-counter width and saturation.
- **Skipping `N_out`** into a buffer with no free entry.
- **The merger's valid/ready back-pressure** and its one-cycle pass-through.
- **`FULL_MARGIN = 3`**, the meaning of "almost full".
- **Asynchronous active-low reset** throughout.
- **Not included.** The evaluation input and output buffers and the FPGA board are left out. The testbenches play the role of the input and output buffers. The earlier design that this one improves on is also not included: a tree of mergers with a FIFO in every core and every merger.

## Simulating

Any SystemVerilog simulator works. With Verilator 5:

```sh
# end-to-end test at the default size
verilator --binary --timing --assert -Irtl rtl/hsj_pkg.sv rtl/*.sv \
    -y tb tb/tb_hsj_top.sv --top-module tb_hsj_top
./obj_dir/Vtb_hsj_top

# block tests: tb_join_core, tb_ring_node, tb_result_fifo, tb_merger,
# tb_admission_control, tb_adaptive_merging_network
# match-rate sweeps: tb_hsj_workload_16, tb_hsj_workload_64 (uses hsj_sweep_bench)
```

Every testbench:

- prints `TB_RESULT checks=<n> failures=<m>` at the end;
- counts a failure if its watchdog expires.

`tb_hsj_workload_64` builds two 64-core operators and takes a few minutes.

To change the size, override the parameters of `hsj_top`. The sweep bench `hsj_sweep_bench` takes the core count as a parameter. It has been run with 2, 16 and 64 cores, and the network test runs with 4. `NUM_CORES` must be a power of two, and `FIFO_DEPTH` must exceed `FULL_MARGIN`.
