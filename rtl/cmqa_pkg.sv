// cmqa_pkg: types and constants shared by the CMQA sequential decoder.
//
// A search node of the code tree is carried through the systolic priority
// queue as one packed word (node_t): a valid flag (an empty processor holds
// valid = 0), the accumulated path metric, the depth in the tree, the last
// MEM information bits along the path (the encoder state; bit 0 is the bit
// of the branch that led to this node) and a pointer to the path-memory
// entry of its parent.  The code is the rate-1/2, memory-15 code used in the
// decoder's evaluation, G1 = 1+X+X^4+X^6+X^7+X^8+X^10+X^11+X^13+X^15 and
// G2 = 1+X^3+X^6+X^7+X^8+X^10+X^12+X^14+X^15; bit j of a generator word is
// the coefficient of X^j.  The field widths are this design's choice, sized
// for 500-bit frames, four processors and a limit of 4096 decoding cycles.
package cmqa_pkg;

  localparam int unsigned MEM     = 15;   // code memory (encoder state bits)
  localparam int unsigned MW      = 16;   // metric width (signed)
  localparam int unsigned DW      = 10;   // depth width, frames up to 1023 bits
  localparam int unsigned PW      = 14;   // path-memory pointer width (4 x 4096 entries)

  localparam logic [MEM:0] G1 = 16'hADD3; // taps 0,1,4,6,7,8,10,11,13,15
  localparam logic [MEM:0] G2 = 16'hD5C9; // taps 0,3,6,7,8,10,12,14,15

  typedef struct packed {
    logic                 valid;
    logic signed [MW-1:0] metric;
    logic [DW-1:0]        depth;
    logic [MEM-1:0]       state;
    logic [PW-1:0]        parent;
  } node_t;

  localparam node_t EMPTY_NODE = '0;

  // a beats b: a is a node and b is empty or has a strictly smaller metric.
  function automatic logic better(input node_t a, input node_t b);
    return a.valid && (!b.valid || (a.metric > b.metric));
  endfunction

  // Operating mode of the queue in the CMQA.
  typedef enum logic {
    MODE_MERGED  = 1'b0,   // one (original) queue
    MODE_DIVIDED = 1'b1    // primary + secondary queue, inhibit active
  } qmode_e;

endpackage
