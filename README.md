# Hipernetch: a crossbar-free P x P packet switch

An input-queued switch with a crossbar needs a scheduler that matches
inputs to outputs every cycle. Good matching takes several iterations, and an
FPGA clock gives little time for them. An output-queued switch needs no
scheduler, but its queues must accept up to P writes per cycle, which means
running them P times faster than the ports.

This switch removes the crossbar. Every cycle up to P packets (one per input)
go through a fully pipelined, non-blocking network that sorts and rotates
them. Each output port owns a **FIFO group** of P queues, so there are P x P
queues in total, the same count as virtual output queues. The network places
every packet into one of the P queues of its destination port. It does this
so that, for each port, consecutive packets go to consecutive queues
(mod P). The group therefore fills as if one round-robin arbiter had written
it serially, but up to P packets per port can arrive in a single cycle. Each
port then drains its group at one packet per cycle. There is no speedup and
no iteration, and everything runs on one clock. A packet can only be lost at
a full queue.

The network that does the placement is the **combined parallel round-robin
arbiter**. It acts like P *parallel round-robin arbiters*, one per output
port. Because each port's result depends only on the packets sent to it, one
sorting network can be shared by all P of them.

The defaults give the 16-port, 512-bit, S = 2 configuration. That
configuration is an aggregate 1.7 Tbps (105.5 Gbps per port at about
206 MHz) with an 8-cycle (about 39 ns) port-to-port latency.

## How one batch is placed

Each packet is `{valid, dest, data}`. A worked example with P = 4 follows. In
this cycle, input 0 sends to port 2, input 1 is idle, input 2 sends to port 0
and input 3 sends to port 2. Port 2's queue offset is currently 3.

1. **Sort** the batch on the key `{valid, dest}`. Idle slots come first, then
   the packets grouped by destination: `[idle, ->0, ->2, ->2]`.
2. **Count** with popcount adder trees. There is 1 idle slot, and the counts
   for ports 0 to 3 are 1, 0, 2 and 0.
3. **Prefix sum** over `{idle, cnt0, cnt1, cnt2}` gives `{1, 2, 2, 4}`. This
   is where each port's group starts in the sorted batch. Port 2's packets
   start at position 2.
4. **Offset counters** hold, for each port, the queue that its next packet
   goes to. Port 2 is at 3. The counter then advances by the count, mod P:
   (3 + 2) mod 4 = 1.
5. **Subtract**: port 2's rotation is (offset - start) mod P = (3 - 2) mod 4 = 1.
6. **Rotate** the whole sorted batch right by 1. The copy of the batch
   belonging to each port gets its own rotator. Positions 2 and 3 move to
   queues 3 and 0.
7. **Filter**: port 2's rotator output keeps only valid packets for port 2.
   Queues 3 and 0 of port 2's group are written. The next packet for port 2
   goes to queue 1.

One rotation does two jobs. It brings the port's group down to position 0,
and it moves it up to the port's current queue offset.

## The pipeline and its latency

With L = log2 P, two pipelines run side by side and end at the same stage:

| pipeline | stages |
|---|---|
| sorting network (Batcher odd-even merge sort) | L(L+1)/2 |
| offsets: adder trees (L), offset counters together with the prefix sum (L), subtractors (1) | 2L+1 |

The P rotators then add L stages. The filters are combinational.

- **P <= 8:** the sorting network is the shorter pipeline. The sorted batch
  waits in a synchronising shift register.
- **P > 8:** the offsets pipeline starts late. It reads `{valid, dest}` from a
  middle stage of the sorter. Sorting only permutes the batch, so the counts
  are already correct there, and no synchronising registers are needed.

The offset counters are the only feedback loop in the pipeline. Their stage
is the **compulsory register**. Its stage index is L for P <= 8 and
`max(L(L+1)/2, 2L+1) - 1 - L` in general (5 for P = 16).

**Register removal (parameter S).** Each stage does little logic, so several
stages can share one clock cycle. A stage keeps its output register only if
its distance from the compulsory stage is a multiple of S. All other stage
boundaries become wires. This rule gives these latencies:

| P | 2 | 4 | 8 | 16 | 32 |
|---|---|---|---|---|---|
| stages (S = 1) | 4 | 7 | 10 | 14 | 20 |
| compulsory stage | 1 | 2 | 3 | 5 | 9 |
| latency, S = 2 | 2 | 4 | 5 | 7 | 10 |
| latency, S = 4 | 1 | 2 | 2 | 4 | 5 |

`hn_pkg` implements the rule and the stage geometry as functions:
`stage_reg`, `idx_comp` and `latency_opt`. Every pipelined block takes the
global index of its first stage (`FIRST` or `STAGE`) and asks `stage_reg`
whether to place a register there. `hn_stage_reg` is that one stage
boundary: a register, or a wire.

The port-to-port latency is the pipeline latency plus one cycle in the queue.
A packet presented in cycle t appears on its output in cycle t + 8 at the
earliest for the defaults.

## Queues, output arbiters and loss

`hn_fifo_group` holds the P queues of one port, `DEPTH` packets each, in
registers. The default depth is 1, so each port has 16 packet slots. All P
queues can be written in the same cycle. A write to a full queue is dropped
and counted on `drop_cnt_o`. A queue that is popped in the same cycle accepts
the write. The arbiter pipeline itself never blocks.

There are two output-arbiter policies (`SIMPLE_ARB`):

- **Index-only (default).** Writes to a group go round-robin over its queues,
  so the arbiter only needs to check the queue at its own index. If that
  queue has a packet, the arbiter sends it and moves to the next queue.
  Otherwise it waits. No priority encoder is needed.
- **Regular round-robin (`SIMPLE_ARB = 0`).** The arbiter serves the first
  non-empty queue at or after its index.

The index-only arbiter assumes no packets are lost. After a drop, the write
offset keeps advancing but the arbiter's index does not match it any more.
The arbiter can then wait on an empty queue while packets sit in the others,
until the row wraps around and fills that queue. After such an event, packets
that entered in different cycles can also leave out of order. The end-to-end
test provokes this case on purpose. The regular round-robin mode avoids it at
the cost of a P-input priority search.

If a port's group has at least P free slots, no packet arriving in that cycle
is lost. This holds in either mode, because the free slots are always
cyclically consecutive.

## Interface of `hipernetch`

| port | width | meaning |
|---|---|---|
| `clk`, `rst` | 1 | clock; synchronous active-high reset (clears pipeline, queues, offsets, arbiters) |
| `in_valid_i` | P | input i presents a packet this cycle |
| `in_dest_i` | P x log2 P | destination port of each input's packet |
| `in_data_i` | P x W | payload |
| `out_valid_o` | P | output port k sends a packet this cycle |
| `out_data_o` | P x W | payload on each output |
| `drop_cnt_o` | P x (log2 P + 1) | packets dropped at port k's queues this cycle |

There is no handshake in either direction. Inputs are sampled every cycle.
The destination travels beside the payload. W counts only the payload.

| parameter | default | meaning |
|---|---|---|
| `P` | 16 | ports, a power of two |
| `W` | 512 | payload bits per packet |
| `S` | 2 | latency-reduction factor (1 = fully pipelined) |
| `DEPTH` | 1 | packets per queue |
| `SIMPLE_ARB` | 1 | 1 = index-only output arbiters, 0 = regular round-robin |

## Files

All modules are in `rtl/`. Each file starts with a comment on its function
and timing.

| file | role |
|---|---|
| `hn_pkg.sv` | stage geometry and register-removal functions |
| `hn_stage_reg.sv` | one stage boundary: register or wire |
| `hn_cas.sv` | compare-and-swap unit |
| `hn_sort_net.sv` | pipelined odd-even merge sorting network with a mid-stage tap |
| `hn_adder_tree.sv` | pipelined adder tree (popcounts) |
| `hn_prefix_sum.sv` | pipelined Kogge-Stone prefix sum |
| `hn_offset_counters.sv` | per-port queue offsets, the compulsory register |
| `hn_subtractors.sv` | rotation amounts |
| `hn_barrel_shifter.sv` | pipelined rotator |
| `hn_filter.sv` | per-port output filter |
| `hn_delay.sv` | synchronising shift register with register removal |
| `hn_cprr_arbiter.sv` | the combined parallel round-robin arbiter |
| `hn_fifo_group.sv` | one port's P queues with tail drop |
| `hn_output_arbiter.sv` | one port's output arbiter |
| `hipernetch.sv` | the switch |

## Simulation

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

- `tb_hipernetch` runs the switch at its default size. It checks the
  8-cycle latency, an all-to-one burst of 16 packets in one cycle with no
  loss, full line rate on all ports, random traffic, and an overload that
  drops packets and desynchronises the arbiters. At the end it checks that
  sent = received + dropped + still queued on every port.
- `tb_hn_cprr_arbiter` checks the queue each packet is written to against a
  reference offset model. It covers P = 2, 4, 8, 16 (S = 2 and 4) and 32
  (S = 4), and checks the latencies in the table above.
- `tb_hn_traffic` runs Bernoulli, bursty and non-uniform traffic through
  16-port switches with deep queues, in both arbiter modes. For Bernoulli
  traffic at load 0.8, the mean queueing delay comes out at about 1.8
  cycles. The M/D/1 model gives r/(2(1-r)) = 2 cycles.
- `tb_hn_queue_size` runs 16-port switches with queue depths 1, 2, 4 and 8
  under Bernoulli traffic at load 0.99 and measures the loss. In one run the
  loss was 4.2%, 1.3%, 0.3% and 0%. Shallow queues are enough because every
  port spreads its packets evenly over its P queues.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Irtl rtl/hn_pkg.sv tb/tb_hipernetch.sv \
          --top-module tb_hipernetch -o sim
./obj_dir/sim
```

`tb_hn_cprr_arbiter` also needs `-Itb`, for its helper
`hn_cprr_arbiter_check`. Building the full-size switch takes about a minute
and a half, and the simulation takes well under a second.

## Choices this RTL makes, and limits

- **Packet format.** A packet is a valid bit, a log2 P destination and a
  W-bit payload carried side by side. The original switch uses its own
  custom format. Packets are a single flit, and there is no header parsing
  or address lookup.
- **Stage structure.** Comparator placement follows the standard iterative
  form of Batcher's network. The prefix sum is Kogge-Stone. Rotator level j
  shifts by 2^j. The queue offsets wait L-1 stages for the prefix sum. These
  details are this design's own, chosen to give the stage counts and
  latencies above.
- **Reset and ties.** Reset is synchronous and clears everything, including
  the wide data registers. Equal keys keep their input order within a
  compare-and-swap, but the network as a whole is not stable. Packets that
  share a cycle and a destination may therefore leave in any order.
- **Output arbiters.** The index-only arbiter is the default. The regular
  round-robin arbiter is the alternative. Other ways of recovering from
  desynchronisation are not implemented: skipping by the number of drops,
  discarding a whole row, or backpressure ahead of the pipeline.
- **Queues** are registers. Deeper queues in block RAM, the transceivers and
  the Ethernet MAC/PCS, and the AXI debug wrapper used for checking on a
  board are outside this RTL.
- **Warnings.** Verilator warns that `clk` and `rst` go unused where a
  stage's register is removed. It also warns about the width of the wide
  reset fill (`'0` over more than 8192 bits). Both warnings are expected.
