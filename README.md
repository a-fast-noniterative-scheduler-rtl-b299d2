# SRA: a single-pass scheduler for an input-queued switch

This is the RTL for an N x N input-queued cell switch with a memoryless
(unbuffered) crossbar. It is scheduled by **single round-robin arbitration
(SRA)**. Iterative matchers such as iSLIP or PIM run several
request/grant/accept rounds in every time slot. SRA instead gives each output
one arbiter that holds a FIFO of the inputs with cells for that output. Every
slot, each arbiter grants the input at the head of its FIFO, and that is the
whole schedule. Every output that has a waiting cell anywhere in the switch
sends one, so each slot yields a maximum matching in a single pass.

The catch is that several outputs may grant the same input in the same slot.
An SRA input can send more than one cell per slot: one per output that granted
it. Its queue memory must therefore serve several reads at once, and the
crossbar needs more than one row per input. This design gives each input
**K = 3 crossbar rows and three read ports**. Grants beyond three are refused
for that slot and retried in the next one.

Default configuration: 16 x 16 ports, K = 3, 64-bit cells, 64 cells per
virtual output queue. One clock cycle is one cell time slot.

## Blocks

```
            in_*[i]                        (one per input i)
               |
      +--------v---------+   set / last   +--------------------+
      | sra_input_port i |--------------->| sra_output_arbiter |  (one per output j)
      |  N VOQs, K reads |<---------------|  FIFO of inputs    |
      |  sra_read_limiter|  grant (head)  +--------------------+
      +--------+---------+                        |
               | K row links                       | crosspoint select
      +--------v-----------------------------------v----+
      |            sra_crossbar  (K*N rows x N columns)   |
      +------------------------+--------------------------+
                               | column j
                         output register  --> out_*[j]
```

| file | role |
|---|---|
| `rtl/sra_pkg.sv` | default sizes (N_PORTS, K_ROWS, CELL_W, VOQ_DEPTH) |
| `rtl/sra_output_arbiter.sv` | per-output FIFO arbiter: the SRA scheduler proper |
| `rtl/sra_input_port.sv` | N virtual output queues (VOQs) in one memory with K read ports; sends status messages |
| `rtl/sra_read_limiter.sv` | per input: chooses which grants (at most K) are served in a slot |
| `rtl/sra_crossbar.sv` | memoryless K*N x N crossbar |
| `rtl/sra_switch.sv` | top level: wires N ports, N arbiters and the crossbar |

## The arbiter and its status messages

This is the part that needs the most care. The arbiters never poll the
queues. They learn the queue state only from two one-bit messages that each
input sends per VOQ:

* **set**: VOQ (i, j) goes from empty to holding a cell in this slot. Arbiter j
  appends input i to the tail of its FIFO.
* **last**: goes with a served grant. The cell being sent is the last one in
  VOQ (i, j), and no new cell for j arrives in the same slot. Arbiter j drops
  input i instead of putting it back.

Every slot, arbiter j grants the head of its FIFO. If the input serves the
grant (`acc`), the head is removed. It goes back to the tail unless `last` was
set. Serving the head and then sending it to the back makes the arbiter
round-robin over the inputs that have traffic, so every active VOQ gets an
equal share of its output.

The scheme rests on one invariant: **input i is in arbiter j's FIFO exactly
when VOQ (i, j) is nonempty**. Two things follow from it:

* No input can be in a FIFO twice, so an N-entry FIFO never overflows.
* A grant always finds a cell to send.

Two corner cases keep the invariant true:

* A last cell that is served in the same slot as a new cell arrives for the
  same VOQ does not empty it. No `last` is sent, and the input is re-queued.
* A `set` can only come from an empty VOQ. An input that is in the FIFO
  therefore never announces itself again.

`sra_switch` checks the invariant with concurrent assertions: `a_member` for
FIFO membership and `a_count` for the FIFO length. The arbiter asserts that a
`set` never names an input that is already queued.

Several inputs may become active for the same output in the same slot. The
arbiter then appends them in this order:

1. the re-queued head;
2. the new inputs, by ascending input number.

## Several cells per input: read ports, rows and input blocking

Under SRA one input can be granted by up to N outputs in one slot. In this
design each input has K row links into the crossbar (row `i*K + r` is link r
of input i). Its VOQ memory, a single array of N x DEPTH cells, has K
combinational read ports and one write port.

`sra_read_limiter` picks which grants are served:

* It scans the grants in output order, starting at a rotating pointer, and
  serves the first K. Each served grant gets a lane (row link) 0..K-1.
* Any further grants are refused. This is *input blocking*: the refused
  arbiter sees no acceptance, keeps the same head and grants it again in the
  next slot.
* After a refusal the pointer moves to the first refused output. That output
  is served first in the next slot, so no grant waits more than ceil(N/K)
  slots.

The grant that an input receives from arbiter j is therefore a request. It is
not a guaranteed send. With K = N no grant is ever refused, and the design is
SRA with no restriction at all.

How common input blocking is: over the whole end-to-end test below (K = 3),
an input refuses a grant in about 0.4 % of input slots. Sends of two or three
cells are common, about 10 % of input slots.

## Timing of one slot

All scheduling happens within one clock cycle:

```
slot t   : cell arrives on in_*; written to its VOQ at the end of t;
           'set' reaches the arbiter, which appends the input at the end of t
slot t+1 : arbiter grant (registered head) -> read limiter -> VOQ read
           -> crossbar -> output register at the end of t+1
slot t+2 : cell is on out_*[j]
```

The minimum latency is two slots. Grants come from registers only. The
combinational path is grant, then limiter, then memory read port, then
crossbar column multiplexer, then output register. There is no egress memory
and no backpressure. Each crossbar column goes through one register and
leaves as an output link.

## Top-level ports (`sra_switch`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | slot clock; asynchronous active-low reset (all queues empty) |
| `in_vld_i[N]` | in | 1 each | a cell arrives at input i this slot (at most one) |
| `in_dest_i[N]` | in | log2 N | its destination output |
| `in_cell_i[N]` | in | CELL_W | the cell, already segmented to fixed size |
| `out_vld_o[N]` | out | 1 each | a cell leaves output j |
| `out_cell_o[N]` | out | CELL_W | the cell |
| `out_src_o[N]` | out | log2 N | the input it came from |
| `in_drop_o[N]` | out | 1 each | the arrival at input i was lost because its VOQ was full |
| `in_mult_o[N]` | out | log2 N + 1 | cells input i sends this slot (cell multiplicity) |
| `in_blocked_o[N]` | out | 1 each | input i refused a grant this slot |

Parameters: `N` (16), `K` (3), `CELL_W` (64), `DEPTH` (64; must be a power of
two). Widths derived from them (`IW`, `LW`, `RW`) should be left at their
defaults.

## What comes from the published scheme and what is this design's own

These follow the published scheme:

* one FIFO arbiter per output;
* grant the head, then re-queue it at the tail or drop it;
* status messages only on empty-to-nonempty and on becoming empty;
* N VOQs per input and no egress memory or backpressure;
* a crossbar with k rows per input, with k = 3 as the suggested value;
* N = 16 as the main size.

These are this design's own choices:

* **Refusing grants beyond K.** The published scheme has the arbiter remove
  its head when it grants. Here the head leaves only once the input accepts,
  because an input can serve at most K grants. With `K = N` this matches the
  published behaviour exactly.
* **Which K grants to serve:** a rotating pointer that jumps to the first
  refused output.
* **Order of same-slot arrivals in the FIFO:** re-queued head first, then
  ascending input number.
* **Order in the FIFO is by when an input joined or rejoined it, not by cell
  age.** A served input goes to the back, even if its next cell is older than
  the cells of the inputs ahead of it. This is the round-robin reading of the
  scheme. A strict oldest-cell-first arbiter would need timestamps.
* **Cell width (64 bits) and VOQ depth (64 cells).** The published scheme has
  no bounds on the queues. Here an arrival for a full VOQ is dropped and
  flagged on `in_drop_o`.
* **One clock per slot, no speedup,** and the two-slot pipeline above.
* **Reset:** asynchronous, active low.

Not built:

* per-flow VOQs (more than N queues per input);
* quality of service and multicast, which the scheme leaves open;
* the line-card functions outside the fabric, such as lookup, segmentation
  and reassembly.

## Verification

Each block has a self-checking testbench in `tb/` that compares the block with
an independent model written in the testbench:

* `tb_sra_output_arbiter`: a queue model of the arbiter; random status
  messages, acceptances and refusals. It also checks the one-slot grant
  latency and the round-robin order.
* `tb_sra_read_limiter`: a model of the pointer and of the choice of K grants.
  It checks that a refused grant is served in the next slot.
* `tb_sra_input_port`: a queue model per VOQ. It checks set, last and drop,
  which cells appear on which row, and the limit of K. A small VOQ depth
  forces overflow.
* `tb_sra_crossbar`: random crosspoint settings against the rows.
* `tb_sra_switch`: the whole switch at its default size.
  * Cells carry their source, destination, arrival slot and a sequence number
    for each flow. Every delivered cell is checked for the right output,
    source and order within its flow. After a drain, every accepted cell must
    have arrived.
  * In every slot where no input refused a grant, the set of outputs that
    send must equal the set of outputs with a cell queued anywhere (maximum
    matching).
  * Traffic runs in phases: uniform Bernoulli traffic at 50 % and 95 % load,
    bursty on/off traffic with 128-cell mean bursts at 50 % load, a hot-spot
    overload, and the drain.
  * The test fails if multi-cell sends, input blocking, VOQ overflow,
    re-queueing or VOQ emptying never happened.
* `tb_sra_switch_sizes`: uniform traffic at 90 % load on 4-, 8- and 32-port
  instances (K = 3), with the same per-flow and matching checks. It prints
  the mean delay and how often each cell multiplicity occurs. The harness it
  uses, `tb/sra_size_harness.sv`, drives and checks one instance of any size.
* `tb_sra_multiplicity`: two 16-port instances with K = 16, so no grant is
  ever refused and the switch is unrestricted SRA. One runs uniform traffic
  at 95 % load, the other bursty traffic at 80 % load with 256-cell VOQs. It
  measures how many cells an input really sends per slot, which is the
  number that sizes K.

Measured with `tb_sra_switch` (16 x 16, K = 3, VOQ depth 64):

| traffic | mean cell delay |
|---|---|
| uniform, 50 % load | 2.9 slots |
| uniform, 95 % load | 13.5 slots |
| bursty, 128-cell bursts, 50 % load | 41 slots |

Delays are counted from the slot of arrival and include the two-slot
pipeline. In the bursty and hot-spot phases together, 12,478 arrivals found
their VOQ full and were dropped. A 64-cell VOQ is smaller than a mean burst.

Switch size, uniform 90 % load, K = 3 (`tb_sra_switch_sizes`):

| N | mean delay | sends with k = 1 / 2 / 3 cells |
|---|---|---|
| 4 | 6.1 slots | 68 % / 28 % / 4 % |
| 8 | 7.3 slots | 65 % / 28 % / 7 % |
| 32 | 8.2 slots | 63 % / 28 % / 9 % |

Beyond N = 8 the delay changes little with N. The multiplicity histogram
also hardly changes with N.

Cell multiplicity with unrestricted reads, N = 16 (`tb_sra_multiplicity`):

| traffic | k = 1 | k = 2 | k = 3 | k = 4 | k = 5 | k >= 6 |
|---|---|---|---|---|---|---|
| uniform, 95 % | 61.5 % | 29.0 % | 7.8 % | 1.4 % | 0.1 % | 0 |
| bursty, 80 % | 75.5 % | 21.8 % | 2.4 % | 0.1 % | 0 | 0 |

So K = 3 covers about 98 % of sends under uniform load. Sends of more than
five cells were not seen. The 64-port configuration was not simulated,
because Verilator's C++ build of a 64-port instance takes far longer than the
simulation itself.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/sra_pkg.sv tb/tb_sra_switch.sv --top-module tb_sra_switch -Mdir obj
./obj/Vtb_sra_switch
```

Each testbench ends with `TB_RESULT checks=<n> failures=<n>`. The full
end-to-end run takes well under a minute, most of it compile time.

## Size

Yosys coarse synthesis of the default `sra_switch` gives:

* about 26,500 word-level cells;
* about 7,100 flip-flop bits, mostly the 16 arbiter FIFOs and the VOQ
  pointers;
* 1 Mbit of queue memory (16 inputs x 16 VOQs x 64 cells x 64 bits), held in
  16 memories with one write port and three read ports each.

The crossbar has K*N*N = 768 crosspoints.
