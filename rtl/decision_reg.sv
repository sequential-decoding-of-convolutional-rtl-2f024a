// decision_reg: the tentative-decision register of the erasure-free decoder.
//
// Each terminal node that the decoder reaches is offered on cand with load
// high.  The register takes it if it is empty or if the candidate's metric
// is strictly larger than the stored one, and always holds the best decision
// found so far in the frame.  stored / rejected pulse in the clock after an
// offer to say which happened.  clear empties it at the start of a frame.
module decision_reg
  import cmqa_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  load,
  input  node_t cand,
  output node_t best,
  output logic  stored,
  output logic  rejected
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best     <= EMPTY_NODE;
      stored   <= 1'b0;
      rejected <= 1'b0;
    end else begin
      stored   <= 1'b0;
      rejected <= 1'b0;
      if (clear) begin
        best <= EMPTY_NODE;
      end else if (load && cand.valid) begin
        if (better(cand, best)) begin
          best   <= cand;
          stored <= 1'b1;
        end else begin
          rejected <= 1'b1;
        end
      end
    end
  end

endmodule
