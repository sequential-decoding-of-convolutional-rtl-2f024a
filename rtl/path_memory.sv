// path_memory: records the tree the decoder has explored and traces the
// decoded path back from the final decision.
//
// Every node the decoder extends is given an address of its own (with
// WPORTS processors, decoding cycle c and processor p use c*WPORTS+p);
// each processor has a record port.  The entry stores the address of the node's own
// parent and the information bit of the branch that reached the node, so
// the queue needs to carry only a pointer, not a whole path.  After the
// search, start launches a traceback from a terminal node (its parent
// pointer, its last bit and its depth): bit index depth-1 comes out in the
// clock after start, then one earlier bit per clock down to index 0, with
// bit_valid high for each; done pulses with the last one.  The path
// memory and the pointer scheme are this design's choice; the decoder only
// needs some means of delivering the bits of its decision.
module path_memory
  import cmqa_pkg::*;
#(
  parameter int unsigned WPORTS  = 4,            // one record port per processor
  parameter int unsigned ENTRIES = 4096 * WPORTS  // one per computation of a frame
) (
  input  logic          clk,
  input  logic          rst_n,
  // record ports, distinct addresses in a clock
  input  logic          we      [WPORTS],
  input  logic [PW-1:0] waddr   [WPORTS],
  input  logic [PW-1:0] wparent [WPORTS],
  input  logic          wbit    [WPORTS],
  // traceback
  input  logic          start,
  input  logic [PW-1:0] start_parent,
  input  logic          start_bit,
  input  logic [DW-1:0] start_depth,
  output logic          busy,
  output logic          bit_valid,
  output logic          bit_out,
  output logic [DW-1:0] bit_idx,
  output logic          done
);

  typedef struct packed {
    logic [PW-1:0] parent;
    logic          b;
  } entry_t;

  entry_t        mem [ENTRIES];
  logic [PW-1:0] id;
  entry_t        rd;

  always_ff @(posedge clk) begin
    for (int w = 0; w < WPORTS; w++)
      if (we[w] && (32'(waddr[w]) < ENTRIES))
        mem[waddr[w]] <= '{parent: wparent[w], b: wbit[w]};
  end

  assign rd = (32'(id) < ENTRIES) ? mem[id] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      bit_valid <= 1'b0;
      bit_out   <= 1'b0;
      bit_idx   <= '0;
      done      <= 1'b0;
      id        <= '0;
    end else begin
      bit_valid <= 1'b0;
      done      <= 1'b0;
      if (start && !busy) begin
        bit_valid <= 1'b1;
        bit_out   <= start_bit;
        bit_idx   <= start_depth - 1'b1;
        id        <= start_parent;
        busy      <= (start_depth > 1);
        done      <= (start_depth <= 1);
      end else if (busy) begin
        bit_valid <= 1'b1;
        bit_out   <= rd.b;
        bit_idx   <= bit_idx - 1'b1;
        id        <= rd.parent;
        if (bit_idx == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
