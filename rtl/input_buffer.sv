// input_buffer: holds the received sequence of one frame while the
// sequential decoder moves back and forth in the code tree.
//
// One entry per trellis step, each the two hard-decision bits received for
// that step.  Written through a simple synchronous write port (wr_en,
// wr_addr, wr_data) while the decoder is idle; read asynchronously at the
// depth of the node being extended, through one read port per processor,
// so the branch metrics are ready in the clock the node is extended.  Having a whole frame in the buffer before
// decoding starts, rather than a streaming buffer that can overflow, is this
// design's choice: the CMQA avoids erasure by bounding the computations per
// frame, so a frame buffer is all it needs.
module input_buffer
  import cmqa_pkg::*;
#(
  parameter int unsigned FRAME_LEN = 500,
  parameter int unsigned RPORTS    = 4     // one read port per processor
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [DW-1:0] wr_addr,
  input  logic [1:0]    wr_data,
  input  logic [DW-1:0] rd_addr [RPORTS],
  output logic [1:0]    rd_data [RPORTS]
);

  logic [1:0] mem [FRAME_LEN];

  always_ff @(posedge clk) begin
    if (wr_en && (32'(wr_addr) < FRAME_LEN))
      mem[wr_addr] <= wr_data;
  end

  always_comb begin
    for (int r = 0; r < RPORTS; r++)
      rd_data[r] = (32'(rd_addr[r]) < FRAME_LEN) ? mem[rd_addr[r]] : 2'b00;
  end

endmodule
