// cmqa_controller: sequencing of the compressed multiple queue algorithm
// for NPROC processors, each with its own queue (NPROC = 1 is the
// single-processor decoder).
//
// For every processor p the controller holds the node being extended,
// cur[p], and it counts decoding cycles (one computation per processor per
// cycle).  It walks the CMQA flowchart:
//   INIT   empty the queues and the decision register, counter to zero.
//   LOAD   insert the root node into queue 0 and, in the same clock,
//          extract it as the first node to extend.
//   RUN    In a normal cycle each processor with a non-terminal node inserts
//          its two children (from its branch extender) into its queue,
//          extracts the new best node into cur[p] and records cur[p] in the
//          path memory at address cycle*NPROC+p; a processor with no node
//          only extracts.  If the queues are merged, one of them is full and
//          at least T_D cycles have been counted, the queues are divided
//          (inhibit on from the next clock).
//          If any processor holds a terminal node (depth FRAME_LEN), the
//          cycle instead offers the best of those terminal nodes to the
//          decision register and drops them; other processors keep their
//          nodes.  If the queues are divided, their primary queues are
//          cleared and merged; otherwise the search is over.
//          The search also ends after C_LIMIT cycles, or when all queues
//          and processors are empty.
//   FINISH start the traceback of the decision register, or flag an
//          erasure (no terminal node was reached).
//   TRACE  wait for the traceback, then DONE (done high until next start).
// Event outputs pulse for one clock and are there for monitoring.
// The flowchart, the division rule (full queue after the division time T_D)
// and the termination rules follow the CMQA.  The state encoding, loading the
// root through the queue, dividing and merging all queues together and the
// handling of terminal nodes of several processors are this design's own.
module cmqa_controller
  import cmqa_pkg::*;
#(
  parameter int unsigned NPROC     = 4,
  parameter int unsigned FRAME_LEN = 500,
  parameter int unsigned C_LIMIT   = 4096,
  parameter int unsigned T_D       = 2000
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  // systolic priority queues
  output logic          q_flush,
  output logic          q_clear_primary,
  output logic          q_inhibit,
  output logic          q_ins [NPROC],
  output node_t         q_n0  [NPROC],
  output node_t         q_n1  [NPROC],
  output logic          q_ext [NPROC],
  input  node_t         q_out [NPROC],
  input  logic          q_full [NPROC],
  input  logic          q_empty [NPROC],
  // branch extenders
  output node_t         cur    [NPROC],
  output logic [PW-1:0] cur_id [NPROC],
  input  node_t         child0 [NPROC],
  input  node_t         child1 [NPROC],
  // decision register
  output logic          dr_clear,
  output logic          dr_load,
  output node_t         dr_cand,
  input  node_t         dr_best,
  // path memory
  output logic          pm_we      [NPROC],
  output logic [PW-1:0] pm_waddr   [NPROC],
  output logic [PW-1:0] pm_wparent [NPROC],
  output logic          pm_wbit    [NPROC],
  output logic          tb_start,
  input  logic          tb_done,
  // status
  output logic          busy,
  output logic          done,
  output logic          erasure,
  output qmode_e        mode,
  output logic [15:0]   computations,   // decoding cycles used
  output logic          ev_divide,
  output logic          ev_merge,
  output logic          ev_limit,
  output logic          ev_terminal
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_LOAD, S_RUN, S_FINISH, S_TRACE, S_DONE
  } state_e;

  state_e      state;
  logic [15:0] cnt;

  logic [NPROC-1:0] term;       // cur[p] is a terminal node
  logic [NPROC-1:0] extend;     // cur[p] is a node to extend
  logic             any_term, any_extend, any_full, all_empty;

  always_comb begin
    any_full  = 1'b0;
    all_empty = 1'b1;
    dr_cand   = EMPTY_NODE;
    for (int p = 0; p < NPROC; p++) begin
      term[p]   = cur[p].valid && (32'(cur[p].depth) >= FRAME_LEN);
      extend[p] = cur[p].valid && !term[p];
      if (q_full[p]) any_full = 1'b1;
      if (!q_empty[p] || cur[p].valid) all_empty = 1'b0;
      if (term[p] && better(cur[p], dr_cand)) dr_cand = cur[p];
    end
    any_term   = |term;
    any_extend = |extend;
  end

  always_comb begin
    q_flush         = (state == S_INIT);
    q_clear_primary = (state == S_RUN) && any_term && (mode == MODE_DIVIDED);
    q_inhibit       = (mode == MODE_DIVIDED);
    dr_clear        = (state == S_INIT);
    dr_load         = (state == S_RUN) && any_term;
    tb_start        = (state == S_FINISH) && dr_best.valid;
    for (int p = 0; p < NPROC; p++) begin
      q_ins[p]      = 1'b0;
      q_ext[p]      = 1'b0;
      q_n0[p]       = child0[p];
      q_n1[p]       = child1[p];
      cur_id[p]     = PW'(32'(cnt) * NPROC + p);
      pm_we[p]      = (state == S_RUN) && !any_term && extend[p];
      pm_waddr[p]   = cur_id[p];
      pm_wparent[p] = cur[p].parent;
      pm_wbit[p]    = cur[p].state[0];
      if (state == S_LOAD && p == 0) begin
        q_ins[p]       = 1'b1;
        q_ext[p]       = 1'b1;
        q_n0[p]        = EMPTY_NODE;
        q_n0[p].valid  = 1'b1;        // root: metric 0, depth 0, state 0
        q_n1[p]        = EMPTY_NODE;
      end else if (state == S_RUN && !any_term) begin
        q_ins[p] = extend[p];
        q_ext[p] = extend[p] || (!cur[p].valid && !q_empty[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      cnt         <= '0;
      for (int p = 0; p < NPROC; p++) cur[p] <= EMPTY_NODE;
      mode        <= MODE_MERGED;
      erasure     <= 1'b0;
      ev_divide   <= 1'b0;
      ev_merge    <= 1'b0;
      ev_limit    <= 1'b0;
      ev_terminal <= 1'b0;
    end else begin
      ev_divide   <= 1'b0;
      ev_merge    <= 1'b0;
      ev_limit    <= 1'b0;
      ev_terminal <= 1'b0;
      case (state)
        S_IDLE, S_DONE: begin
          if (start) state <= S_INIT;
        end
        S_INIT: begin
          cnt     <= '0;
          for (int p = 0; p < NPROC; p++) cur[p] <= EMPTY_NODE;
          mode    <= MODE_MERGED;
          erasure <= 1'b0;
          state   <= S_LOAD;
        end
        S_LOAD: begin
          cur[0] <= q_out[0];
          state  <= S_RUN;
        end
        S_RUN: begin
          if (any_term) begin
            ev_terminal <= 1'b1;
            for (int p = 0; p < NPROC; p++)
              if (term[p]) cur[p] <= EMPTY_NODE;
            if (mode == MODE_DIVIDED) begin
              mode     <= MODE_MERGED;
              ev_merge <= 1'b1;
            end else begin
              state <= S_FINISH;
            end
          end else if (all_empty) begin
            state <= S_FINISH;
          end else begin
            for (int p = 0; p < NPROC; p++)
              if (q_ext[p]) cur[p] <= q_out[p];
            if (any_extend) begin
              cnt <= cnt + 1'b1;
              if (mode == MODE_MERGED && any_full && (32'(cnt) >= T_D)) begin
                mode      <= MODE_DIVIDED;
                ev_divide <= 1'b1;
              end
              if (32'(cnt) + 1 >= C_LIMIT) begin
                ev_limit <= 1'b1;
                state    <= S_FINISH;
              end
            end
          end
        end
        S_FINISH: begin
          if (dr_best.valid) begin
            state <= S_TRACE;
          end else begin
            erasure <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_TRACE: begin
          if (tb_done) state <= S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy         = (state != S_IDLE) && (state != S_DONE);
  assign done         = (state == S_DONE);
  assign computations = cnt;

endmodule
