// spq_queue: two-input systolic priority queue with the control signals that
// split it into a primary and a secondary queue (compressed multiple queue).
//
// Storage is the chain of processors P2 .. P(ELEMENTS+1), held here as
// q[0] .. q[ELEMENTS-1] (q[j] is P(j+2)); P0 and P1 are the I/O ports and
// hold nothing between clocks.  The processors are grouped in slices of
// three, slice k being q[3k] .. q[3k+2] (P(3k+2) .. P(3k+4)); its first
// processor is the slice's local top.  One clock performs, as requested:
//   ins : N0 -> P0, N1 -> P1, every node two positions down, then triplet
//         sorting in every slice (best of each triplet to its local top);
//   ext : the best node (in P2) leaves through P0, every node one position
//         up, then triplet sorting again.
// With both requested the two phases happen in the same clock and the node
// delivered on out is the best of the queue after the insertion, so a node
// inserted in a clock may be delivered in that clock.  With ext alone the
// node in P2 is delivered.  out is combinational and valid during the clock
// in which ext is high.  Nodes pushed past the last processor are lost
// (overflow pulses for each clock that loses a valid node).
//
// Division: while inhibit is high the second triplet sorting is blocked in
// slice PRI_I (P(3*PRI_I+2) .. P(3*PRI_I+4)), the only slice that straddles
// the boundary after the shift up.  Nodes of the primary queue (P2 ..
// P(3*PRI_I+3) between clocks) can then sink into the secondary queue, but
// no node of the secondary can rise into the primary; both keep sorting
// their own nodes in the same clock.  PRI_I = 1 gives the partition of
// four nodes P2..P5 at division.  clear_primary empties the primary
// processors (P2 .. P(3*PRI_I+3)); flush empties the whole queue.  Both
// take the clock and override ins/ext.  Because a clock that inserts and
// extracts leaves the last processor empty after the shift up, full is high
// when either of the last two processors holds a node: the next such clock
// will lose a node.  empty is high when no processor holds one.
// lead_out gives the next contents of P2 and P3 (the queue's best node and
// the node under it); with lead_load high, lead_in replaces them instead.
// A multiprocessor decoder uses this port to compare and exchange nodes
// between the tops of its queues in the same clock; a single queue ties
// lead_load low.
// The queue organisation follows the two-input systolic priority queue and
// the inhibit scheme of the CMQA; the placement of the inhibit in the
// extract-only case and the flush/clear controls are this design's own.
module spq_queue
  import cmqa_pkg::*;
#(
  parameter int unsigned ELEMENTS = 1000,  // storage processors P2..P(ELEMENTS+1)
  parameter int unsigned PRI_I    = 1      // primary is P_k, k <= 3*PRI_I+2, at division
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  flush,
  input  logic  clear_primary,
  input  logic  inhibit,
  input  logic  ins,
  input  node_t n0,
  input  node_t n1,
  input  logic  ext,
  output node_t out,
  output logic  full,
  output logic  empty,
  output logic  overflow,
  // lead processors P2, P3 for comparisons between queues
  output node_t lead_out [2],
  input  logic  lead_load,
  input  node_t lead_in  [2]
);

  localparam int unsigned NSL = (ELEMENTS + 2) / 3;  // slices, last may be partial
  localparam int unsigned LEN = 3 * NSL;             // padded length

  initial begin
    assert (ELEMENTS >= 3 * PRI_I + 6)
      else $error("spq_queue: ELEMENTS too small for the primary queue");
  end

  node_t q   [ELEMENTS];
  node_t nxt [ELEMENTS];

  node_t d  [LEN];   // after shift down by two
  node_t s1 [LEN];   // after first triplet sorting
  node_t u  [LEN];   // after extraction and shift up by one
  node_t s2 [LEN];   // after second triplet sorting
  node_t base [LEN]; // state the extraction works on

  // shift down two positions, new nodes into the first slice
  always_comb begin
    for (int j = 0; j < LEN; j++) begin
      if (j == 0)                 d[j] = n0;
      else if (j == 1)            d[j] = n1;
      else if (j < ELEMENTS)      d[j] = q[j-2];
      else                        d[j] = EMPTY_NODE;
    end
  end

  for (genvar k = 0; k < NSL; k++) begin : g_ts1
    spq_slice u_ts1 (
      .a(d[3*k]), .b(d[3*k+1]), .c(d[3*k+2]), .inhibit(1'b0),
      .x(s1[3*k]), .y(s1[3*k+1]), .z(s1[3*k+2])
    );
  end

  // extraction source: the sorted state after insertion, or the stored state
  always_comb begin
    for (int j = 0; j < LEN; j++) begin
      if (ins)               base[j] = s1[j];
      else if (j < ELEMENTS) base[j] = q[j];
      else                   base[j] = EMPTY_NODE;
    end
    out = base[0];
    for (int j = 0; j < LEN; j++)
      u[j] = (j + 1 < ELEMENTS) ? base[j+1] : EMPTY_NODE;
  end

  for (genvar k = 0; k < NSL; k++) begin : g_ts2
    spq_slice u_ts2 (
      .a(u[3*k]), .b(u[3*k+1]), .c(u[3*k+2]),
      .inhibit(inhibit && (k == PRI_I)),
      .x(s2[3*k]), .y(s2[3*k+1]), .z(s2[3*k+2])
    );
  end

  // next state of every processor
  always_comb begin
    for (int j = 0; j < ELEMENTS; j++) begin
      if (flush)                                    nxt[j] = EMPTY_NODE;
      else if (clear_primary && j <= 3 * PRI_I + 1) nxt[j] = EMPTY_NODE;
      else if (clear_primary)                       nxt[j] = q[j];
      else if (ext)                                 nxt[j] = s2[j];
      else if (ins)                                 nxt[j] = s1[j];
      else                                          nxt[j] = q[j];
    end
    lead_out[0] = nxt[0];
    lead_out[1] = nxt[1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < ELEMENTS; j++) q[j] <= EMPTY_NODE;
    end else begin
      for (int j = 0; j < ELEMENTS; j++) q[j] <= nxt[j];
      if (lead_load) begin
        q[0] <= lead_in[0];
        q[1] <= lead_in[1];
      end
    end
  end

  always_comb begin
    full  = q[ELEMENTS-1].valid || q[ELEMENTS-2].valid;
    empty = 1'b1;
    for (int j = 0; j < ELEMENTS; j++)
      if (q[j].valid) empty = 1'b0;
    overflow = ins && !flush && !clear_primary &&
               (q[ELEMENTS-1].valid || q[ELEMENTS-2].valid);
  end

endmodule
