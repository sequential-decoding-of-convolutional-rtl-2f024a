// branch_extender: extends one node of the code tree into its two successors.
//
// For a parent node at depth d it forms the two children for information
// bit u = 0 and u = 1.  Each child's encoder window is {parent state, u};
// the two code bits are the parities of that window masked with G1 and G2.
// They are compared with the received pair r[1:0] (r[0] goes with G1) of
// trellis step d, and each code bit adds METRIC_AGREE when it matches the
// received hard decision and METRIC_DISAGREE when it does not: a scaled
// Fano metric for a binary symmetric channel.  The defaults 1 / -10 are
// this design's choice (about a crossover probability of 2.3 %, rate 1/2).
// A child records the path-memory address of its parent (parent_id), its
// depth d+1, and its state shifted by u.  Purely combinational.
module branch_extender
  import cmqa_pkg::*;
#(
  parameter int METRIC_AGREE    = 1,
  parameter int METRIC_DISAGREE = -10
) (
  input  node_t           parent,
  input  logic [PW-1:0]   parent_id,  // path-memory address given to the parent
  input  logic [1:0]      r,          // received hard decisions of step parent.depth
  output node_t           child0,
  output node_t           child1,
  output logic [1:0]      code0,      // code bits of the branch u = 0
  output logic [1:0]      code1       // code bits of the branch u = 1
);

  localparam logic signed [MW-1:0] MA = MW'(METRIC_AGREE);
  localparam logic signed [MW-1:0] MD = MW'(METRIC_DISAGREE);

  function automatic logic [1:0] encode(input logic [MEM-1:0] st, input logic u);
    logic [MEM:0] w;
    w = {st, u};
    return {^(w & G2), ^(w & G1)};
  endfunction

  function automatic logic signed [MW-1:0] bm(input logic [1:0] c, input logic [1:0] rx);
    return ((c[0] == rx[0]) ? MA : MD) + ((c[1] == rx[1]) ? MA : MD);
  endfunction

  always_comb begin
    code0 = encode(parent.state, 1'b0);
    code1 = encode(parent.state, 1'b1);

    child0        = parent;
    child0.metric = parent.metric + bm(code0, r);
    child0.depth  = parent.depth + 1'b1;
    child0.state  = {parent.state[MEM-2:0], 1'b0};
    child0.parent = parent_id;

    child1        = parent;
    child1.metric = parent.metric + bm(code1, r);
    child1.depth  = parent.depth + 1'b1;
    child1.state  = {parent.state[MEM-2:0], 1'b1};
    child1.parent = parent_id;
  end

endmodule
