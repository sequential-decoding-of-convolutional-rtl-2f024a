// spq_slice: one slice (triplet) of three processors of the two-input
// systolic priority queue, doing the triplet-sorting step.
//
// The best of the three nodes moves to the local top position (x); the
// other two keep their relative order in y and z, which the queue allows
// since their positions are immaterial.  Finding the best of three takes two
// comparisons.  With inhibit high the slice passes its nodes through
// unchanged: this is how the queue blocks node exchange across the boundary
// between the primary and the secondary queue.  Purely combinational; the
// queue instantiates one slice per triplet for each of its two sorting steps.
module spq_slice
  import cmqa_pkg::*;
(
  input  node_t a,        // local top processor  P(3i-1)
  input  node_t b,        // P(3i)
  input  node_t c,        // P(3i+1)
  input  logic  inhibit,  // 1: no exchange in this slice
  output node_t x,
  output node_t y,
  output node_t z
);

  logic b_over_a;
  logic c_over_m;

  always_comb begin
    b_over_a = better(b, a);
    c_over_m = better(c, b_over_a ? b : a);
    if (inhibit || (!b_over_a && !c_over_m)) begin
      x = a; y = b; z = c;
    end else if (c_over_m) begin
      x = c; y = a; z = b;
    end else begin
      x = b; y = a; z = c;
    end
  end

endmodule
