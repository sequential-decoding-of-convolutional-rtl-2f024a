# CMQA sequential decoder

This is synthesizable SystemVerilog for an erasure-free sequential decoder for a
rate-1/2, memory-15 convolutional code. It uses the *compressed multiple queue
algorithm* (CMQA), which is built around two-input systolic priority queues.
The design follows "Sequential decoding of convolutional codes by a compressed
multiple queue algorithm". It is built in the four-processor configuration that
the publication evaluates: four queues of 250 nodes each, 1000 nodes in all.

## What the decoder does

A sequential (stack) decoder searches the code tree one node at a time. It keeps
the visited nodes ordered by path metric and always extends the best one. This
design keeps that ordering in hardware:

* **Systolic priority queue** (`spq_queue`, `spq_slice`). This is a chain of
  processors grouped in slices of three. Each clock can take two new nodes
  (the two children of the node just extended) and hand out the best stored
  node. A clock runs in two steps:
  * *Phase 1*: the two new nodes enter at the head, everything moves down two
    places, and each slice moves its best node to its own top.
  * *Phase 2*: the overall best node is taken out, everything moves up one
    place, and each slice sorts again.

  The node handed out is therefore always the best one in the queue, and the
  time to get it does not depend on the queue length. When the queue is too
  full, the worst nodes fall out of the end.
* **Division and merge.** In normal operation the decoder works in one merged
  queue.
  * *Division*: once the queue has been full and at least `T_D` decoding cycles
    have passed, the queue is divided. The phase-2 sorting is switched off in
    one slice near the head (`PRI_I`), so that nodes can move from the small
    *primary* queue (the four best nodes at that moment) down into the large
    *secondary* queue, but never back up. The decoder then carries on with the
    best candidates only and aims at reaching the end of the tree quickly.
  * *Merge*: when a path reaches the end of the frame (a terminal node), it is
    offered to the **tentative-decision register** (`decision_reg`). The
    primary queue is then cleared and the inhibit is released, so that the
    older nodes in the secondary queue compete again.
  * *End of the search*: decoding stops when a terminal node comes out of the
    merged queue. It also stops when the computation limit `C_LIMIT` is
    reached; in that case the register's decision is output. A frame is
    therefore never erased unless no terminal node was found at all.
* **Four processors** (`mp_exchange`). Each processor extends the best node of
  its own queue. In every clock the node below the top of queue *p* is compared
  with the top of queue *p+1* (mod 4), and the two are swapped if the first is
  better. This stops one queue from keeping two top candidates while its
  neighbour works on a poor one.
* **Branch extension** (`branch_extender`):
  * It encodes both branches with generators G1 = 1+X+X⁴+X⁶+X⁷+X⁸+X¹⁰+X¹¹+X¹³+X¹⁵
    and G2 = 1+X³+X⁶+X⁷+X⁸+X¹⁰+X¹²+X¹⁴+X¹⁵.
  * It compares the code bits with the received hard decisions, which are held
    for the whole frame in `input_buffer`.
  * It updates the metric: +1 for each agreeing bit and −10 for each
    disagreeing bit. This is a scaled Fano metric for a binary symmetric
    channel with a crossover probability of about 2 %.
* **Path memory** (`path_memory`). Every extended node is recorded with its
  branch bit and a pointer to its parent. Queue entries carry only that pointer.
  At the end of the search the decision is traced back through the pointers and
  one decoded bit comes out per clock.
* **Controller** (`cmqa_controller`). It sequences all of the above: frame
  start, root load, run, division and merge, the end of the search, and the
  traceback.

## Top level: `cmqa_decoder`

| Parameter | Default | Meaning |
|---|---|---|
| `NPROC` | 4 | processors, one queue each (1 gives the single-processor decoder) |
| `QUEUE_ELEMENTS` | 250 | nodes per queue (at least `3*PRI_I+6`) |
| `PRI_I` | 1 | slice whose phase-2 sorting is inhibited; the primary queue keeps 4 nodes |
| `FRAME_LEN` | 500 | information bits per frame (maximum 1023) |
| `C_LIMIT` | 4096 | computation limit, in decoding cycles |
| `T_D` | 2000 | earliest queue division, in decoding cycles |
| `METRIC_AGREE` / `METRIC_DISAGREE` | 1 / −10 | branch-metric weights per code bit |

Interface (one clock `clk`; `rst_n` is an asynchronous reset, active low):

1. **Load a frame.** Write the received pairs with `rx_we`, `rx_addr` (step
   0 .. `FRAME_LEN`−1) and `rx_data`. `rx_data[0]` is the bit of G1 and
   `rx_data[1]` the bit of G2.
2. **Start decoding.** Pulse `start`. `busy` stays high while the decoder
   searches and traces back.
3. **Read the decoded bits.** They come out last bit first, one per clock:
   `out_valid`, `out_bit`, and `out_idx` (the bit's position in the frame).
4. **Check the result.** `done` then stays high until the next `start`.
   `erasure` is set if no terminal node was ever reached. `decision_metric`
   and `computations` report the decision's metric and the number of decoding
   cycles used. `mode` shows whether the queues are merged or divided.
5. **Events.** Single-clock pulses `ev_overflow`, `ev_exchange`, `ev_divide`,
   `ev_merge`, `ev_limit`, `ev_terminal`, `ev_stored` and `ev_rejected` show
   each mechanism as it happens.

Timing:

* Each processor extends one node per clock. The search of a frame
  ends after at most `C_LIMIT` decoding cycles plus a few control clocks, and is followed by one clock per decoded bit for the
  traceback.
* A noiseless 500-bit frame takes 500 decoding cycles.

## Files

* `rtl/`: one module or package per file.
  * `cmqa_pkg` holds the node type, code constants and comparison function.
  * `cmqa_decoder` is the top.
* `tb/`: one self-checking testbench per block, and four for the whole
  decoder:
  * `tb_cmqa_decoder`: four processors at reduced size. It requires every
    mechanism to occur at least once.
  * `tb_cmqa_decoder_single`: one processor at reduced size.
  * `tb_cmqa_decoder_full`: every parameter at its default, with noiseless,
    lightly corrupted and noisy 500-bit frames.
  * `tb_cmqa_decoder_single_full`: the same frames through the
    single-processor decoder at full size (`NPROC=1`,
    `QUEUE_ELEMENTS=1000`, `T_D=2400`).

  Every testbench prints `TB_RESULT checks=… failures=…`.

## Simulating

Any testbench builds with Verilator 5. List the package first:

```
verilator --binary -j 4 --top-module tb_cmqa_decoder_full -Irtl \
    rtl/cmqa_pkg.sv rtl/*.sv tb/tb_cmqa_decoder_full.sv -Mdir obj
./obj/Vtb_cmqa_decoder_full
```

* The full-size runs build in about 20 s and run in under a second.
* Other sizes need only top-level parameter overrides, as in the
  reduced-size testbenches.
* Whenever the code, the metric weights or the frame length change, the
  testbenches' reference encoder (exponent lists) and metric must change
  with them.

## Where the design follows the publication and where it chooses

Taken from the publication:

* The two-input queue and its operations.
* The primary/secondary division by inhibiting the second sorting step on a
  slice boundary.
* Clearing the primary queue when merging.
* The tentative-decision register.
* The flow of the algorithm.
* The four-processor organisation.
* The code generators, frame length, computation limit, memory size and
  division time.

This design's own choices, because the publication leaves them open:

* **Exchange pattern.** The exact pattern of the comparisons between the
  queues is this design's own: one compare-and-swap per neighbouring pair of
  queues in each clock.
* **Shared queue control.** All queues divide and merge together. When
  several processors reach terminal nodes in the same clock, only the best
  one is offered to the register.
* **Cycle counting.** `T_D` and `C_LIMIT` count decoding cycles. Division
  requires a full queue after `T_D` cycles. "Full" means that one of the last
  two processors is occupied, because one more combined clock could then lose
  a node.
* **Metric.** The metric weights are an assumption; the publication does not
  give them.
* **Node word and path storage.** The node word widths and the path memory
  with parent pointers are this design's own.
* **Frame handling.** Frames have no tail bits, and the whole frame is loaded
  before decoding starts.
* **Clocking.** The two clock phases are one combinational path between
  registers. The queue also accepts insert-only and extract-only clocks.

Not built:

* The generalised N-input queue.
* The single-input linear queue and the multiple stack algorithm. Both are
  only comparison baselines.
* The codes with other rates or memories used in the comparison tables (the
  generators are fixed constants in `cmqa_pkg`).
