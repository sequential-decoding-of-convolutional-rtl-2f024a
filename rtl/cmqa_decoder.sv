// cmqa_decoder: erasure-free sequential decoder for a rate-1/2 convolutional
// code using the compressed multiple queue algorithm (CMQA), with NPROC
// processors each working from its own systolic priority queue.
//
// A stack (ZJ) sequential decoder keeps every explored path in a store
// ordered by metric and always extends the best one.  Here the store is a
// two-input systolic priority queue (spq_queue): in one clock it takes the
// two children of the node being extended and delivers the best node it
// then holds, so each processor extends one node per clock whatever the
// queue size.  With four processors the memory is split into four queues,
// and a compare-exchange network between the queue tops (mp_exchange) moves
// good nodes buried in one queue to the top of another.  When a queue is
// full and T_D decoding cycles have passed, every queue is divided by
// inhibit signals into a small primary queue (its four best nodes) and a
// large secondary queue that absorbs what overflows from the primary; the
// search is confined to the subtree of the primary queues until a terminal
// node is reached.  That node becomes a tentative decision (decision_reg),
// the primary queues are cleared and the queues merge again.  The search ends
// at a terminal node reached in merged queues or after C_LIMIT cycles; the
// best tentative decision is then traced back through the path memory and
// streamed out, last bit first.  NPROC = 1 with QUEUE_ELEMENTS = 1000 is
// the single-processor decoder.
//
// Interface: load the received frame through rx_we/rx_addr/rx_data (two
// hard-decision bits per information bit, rx_data[0] for generator G1)
// while idle, pulse start, then collect out_bit at index out_idx whenever
// out_valid is high; done rises at the end and stays high until the next
// start.  erasure is high with done if no terminal node was reached.
// Timing: NPROC computations per clock plus a few clocks of set-up, and
// FRAME_LEN clocks of traceback.
module cmqa_decoder
  import cmqa_pkg::*;
#(
  parameter int unsigned NPROC           = 4,
  parameter int unsigned QUEUE_ELEMENTS  = 250,   // per queue; 1000 in all
  parameter int unsigned PRI_I           = 1,
  parameter int unsigned FRAME_LEN       = 500,
  parameter int unsigned C_LIMIT         = 4096,
  parameter int unsigned T_D             = 2000,
  parameter int          METRIC_AGREE    = 1,
  parameter int          METRIC_DISAGREE = -10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rx_we,
  input  logic [DW-1:0] rx_addr,
  input  logic [1:0]    rx_data,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          erasure,
  output logic          out_valid,
  output logic          out_bit,
  output logic [DW-1:0] out_idx,
  output logic signed [MW-1:0] decision_metric,
  output logic [15:0]   computations,
  output qmode_e        mode,
  // monitoring pulses
  output logic          ev_overflow,
  output logic          ev_exchange,
  output logic          ev_divide,
  output logic          ev_merge,
  output logic          ev_limit,
  output logic          ev_terminal,
  output logic          ev_stored,
  output logic          ev_rejected
);

  logic          q_flush, q_clear_primary, q_inhibit;
  logic          q_ins [NPROC], q_ext [NPROC], q_full [NPROC], q_empty [NPROC];
  logic          q_ovf [NPROC];
  node_t         q_n0 [NPROC], q_n1 [NPROC], q_out [NPROC];
  node_t         cur [NPROC], child0 [NPROC], child1 [NPROC];
  node_t         lead_out [2*NPROC], lead_in [2*NPROC];
  logic          lead_load;
  logic [NPROC-1:0] swapped;
  logic [PW-1:0] cur_id [NPROC];
  logic [DW-1:0] rx_rd_addr [NPROC];
  logic [1:0]    rx_pair [NPROC];
  node_t         dr_best, dr_cand;
  logic          dr_clear, dr_load;
  logic          pm_we [NPROC], pm_wbit [NPROC];
  logic [PW-1:0] pm_waddr [NPROC], pm_wparent [NPROC];
  logic          tb_start, tb_done, tb_busy;

  for (genvar p = 0; p < NPROC; p++) begin : g_proc
    logic [1:0] code0, code1;

    spq_queue #(.ELEMENTS(QUEUE_ELEMENTS), .PRI_I(PRI_I)) u_queue (
      .clk, .rst_n,
      .flush(q_flush), .clear_primary(q_clear_primary), .inhibit(q_inhibit),
      .ins(q_ins[p]), .n0(q_n0[p]), .n1(q_n1[p]), .ext(q_ext[p]), .out(q_out[p]),
      .full(q_full[p]), .empty(q_empty[p]), .overflow(q_ovf[p]),
      .lead_out(lead_out[2*p +: 2]), .lead_load(lead_load), .lead_in(lead_in[2*p +: 2])
    );

    branch_extender #(.METRIC_AGREE(METRIC_AGREE), .METRIC_DISAGREE(METRIC_DISAGREE)) u_ext (
      .parent(cur[p]), .parent_id(cur_id[p]), .r(rx_pair[p]),
      .child0(child0[p]), .child1(child1[p]), .code0, .code1
    );

    assign rx_rd_addr[p] = cur[p].depth;
  end

  mp_exchange #(.NPROC(NPROC)) u_xchg (
    .lead_out, .lead_load, .lead_in, .swapped
  );

  input_buffer #(.FRAME_LEN(FRAME_LEN), .RPORTS(NPROC)) u_inbuf (
    .clk, .wr_en(rx_we && !busy), .wr_addr(rx_addr), .wr_data(rx_data),
    .rd_addr(rx_rd_addr), .rd_data(rx_pair)
  );

  decision_reg u_dreg (
    .clk, .rst_n, .clear(dr_clear), .load(dr_load), .cand(dr_cand),
    .best(dr_best), .stored(ev_stored), .rejected(ev_rejected)
  );

  path_memory #(.WPORTS(NPROC), .ENTRIES(C_LIMIT * NPROC)) u_pmem (
    .clk, .rst_n,
    .we(pm_we), .waddr(pm_waddr), .wparent(pm_wparent), .wbit(pm_wbit),
    .start(tb_start), .start_parent(dr_best.parent), .start_bit(dr_best.state[0]),
    .start_depth(dr_best.depth),
    .busy(tb_busy), .bit_valid(out_valid), .bit_out(out_bit), .bit_idx(out_idx),
    .done(tb_done)
  );

  cmqa_controller #(.NPROC(NPROC), .FRAME_LEN(FRAME_LEN), .C_LIMIT(C_LIMIT), .T_D(T_D)) u_ctrl (
    .clk, .rst_n, .start,
    .q_flush, .q_clear_primary, .q_inhibit, .q_ins, .q_n0, .q_n1, .q_ext,
    .q_out, .q_full, .q_empty,
    .cur, .cur_id, .child0, .child1,
    .dr_clear, .dr_load, .dr_cand, .dr_best,
    .pm_we, .pm_waddr, .pm_wparent, .pm_wbit, .tb_start, .tb_done,
    .busy, .done, .erasure, .mode, .computations,
    .ev_divide, .ev_merge, .ev_limit, .ev_terminal
  );

  always_comb begin
    ev_overflow = 1'b0;
    for (int p = 0; p < NPROC; p++) if (q_ovf[p]) ev_overflow = 1'b1;
  end

  assign ev_exchange     = busy && (|swapped);
  assign decision_metric = dr_best.metric;

endmodule
