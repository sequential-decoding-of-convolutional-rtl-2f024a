// mp_exchange: further comparisons between the tops of the queues of a
// multiprocessor CMQA decoder.
//
// Each processor extracts only the best node of its own queue, so good nodes
// that happen to share a queue stay buried under its best node.  Between
// every pair of neighbouring queues (p, p+1 mod NPROC) this network compares
// the node under the top of queue p (its P3) with the top of queue p+1 (its
// P2) and exchanges them when the first is better.  A good node thereby
// moves to the top of the next queue, where another processor extends it,
// and idle queues are filled from busy ones.  Every lead processor is in
// exactly one pair, so all NPROC comparisons run in parallel in the same
// clock as the queue operations.  The pairing is this design's simplest
// reading of the connections between queue tops; with NPROC = 1 nothing is
// exchanged.  Purely combinational.
module mp_exchange
  import cmqa_pkg::*;
#(
  parameter int unsigned NPROC = 4
) (
  input  node_t lead_out [2*NPROC],   // next P2 (2p) and P3 (2p+1) of queue p
  output logic  lead_load,
  output node_t lead_in  [2*NPROC],
  output logic [NPROC-1:0] swapped     // pair (p, p+1) exchanged its nodes
);

  always_comb begin
    for (int j = 0; j < 2 * NPROC; j++) lead_in[j] = lead_out[j];
    swapped = '0;
    if (NPROC > 1) begin
      for (int p = 0; p < NPROC; p++) begin
        if (better(lead_out[2*p+1], lead_out[2*((p + 1) % NPROC)])) begin
          swapped[p]                   = 1'b1;
          lead_in[2*p+1]               = lead_out[2*((p + 1) % NPROC)];
          lead_in[2*((p + 1) % NPROC)] = lead_out[2*p+1];
        end
      end
    end
    lead_load = (NPROC > 1);
  end

endmodule
