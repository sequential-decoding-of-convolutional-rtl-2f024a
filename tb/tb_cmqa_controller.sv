// tb_cmqa_controller: drives the controller's queue, decision-register and
// path-memory inputs from a script and checks each step of the CMQA
// flowchart: initialisation, loading the root, extension with path-memory
// writes, division when the queue is full after T_D computations, clearing
// the primary queue and merging on a terminal node, end of search on a
// terminal node in the merged queue, traceback hand-off, the computation
// limit (after exactly C_LIMIT computations) and the erasure flag.
module tb_cmqa_controller;
  import cmqa_pkg::*;
  localparam int unsigned FL = 8, CL = 20, TD = 5;

  logic          clk = 0, rst_n = 0, start = 0;
  logic          q_flush, q_clear_primary, q_inhibit;
  logic          q_ins [1], q_ext [1], pm_we [1], pm_wbit [1];
  node_t         q_n0 [1], q_n1 [1], cur [1], child0 [1], child1 [1], q_out_a [1], dr_cand;
  node_t         q_out = EMPTY_NODE, dr_best = EMPTY_NODE;
  logic          q_full = 0, q_empty = 0;
  logic          q_full_a [1], q_empty_a [1];
  logic [PW-1:0] cur_id [1], pm_waddr [1], pm_wparent [1];
  logic          dr_clear, dr_load, tb_start, tb_done = 0;
  logic          busy, done, erasure, ev_divide, ev_merge, ev_limit, ev_terminal;
  qmode_e        mode;
  logic [15:0]   computations;
  int checks = 0, failures = 0, cycles = 0;

  assign q_out_a[0]   = q_out;
  assign q_full_a[0]  = q_full;
  assign q_empty_a[0] = q_empty;

  cmqa_controller #(.NPROC(1), .FRAME_LEN(FL), .C_LIMIT(CL), .T_D(TD)) dut (
    .clk, .rst_n, .start,
    .q_flush, .q_clear_primary, .q_inhibit, .q_ins, .q_n0, .q_n1, .q_ext,
    .q_out(q_out_a), .q_full(q_full_a), .q_empty(q_empty_a),
    .cur, .cur_id, .child0, .child1,
    .dr_clear, .dr_load, .dr_cand, .dr_best,
    .pm_we, .pm_waddr, .pm_wparent, .pm_wbit, .tb_start, .tb_done,
    .busy, .done, .erasure, .mode, .computations,
    .ev_divide, .ev_merge, .ev_limit, .ev_terminal
  );
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic node_t nd(int depth, int m);
    node_t n = EMPTY_NODE;
    n.valid = 1; n.depth = DW'(depth); n.metric = MW'(m); n.parent = PW'(depth + 7);
    n.state = MEM'(depth);
    return n;
  endfunction

  assign child0[0] = nd(int'(cur[0].depth) + 1, 1);
  assign child1[0] = nd(int'(cur[0].depth) + 1, 2);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s (cycle %0d)", msg, cycles);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic begin_frame();
    @(negedge clk); start = 1; tick(); start = 0;
    chk(q_flush && dr_clear, "INIT flushes queue and clears decision");
    tick();
    chk(q_ins[0] && q_ext[0] && q_n0[0].valid && q_n0[0].depth == 0 && q_n0[0].metric == 0 && !q_n1[0].valid,
        "LOAD inserts the root and extracts");
  endtask

  initial begin
    int w;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // frame 1
    q_out = nd(1, 0);
    begin_frame();
    tick();                                    // RUN, cur = depth 1
    for (int k = 0; k < 6; k++) begin
      chk(cur[0].valid && q_ins[0] && q_ext[0] && pm_we[0] && int'(pm_waddr[0]) == k && int'(cur_id[0]) == k,
          $sformatf("extension %0d", k));
      chk(q_n0[0] == child0[0] && q_n1[0] == child1[0], "children go to the queue");
      chk(pm_wparent[0] == cur[0].parent && pm_wbit[0] == cur[0].state[0], "path memory entry");
      q_full = (k >= 4);
      q_out  = nd(2 + (k % 5), 0);
      tick();
      if (k == 5) chk(ev_divide && mode == MODE_DIVIDED && q_inhibit, "divided at full, cnt >= T_D");
      else        chk(mode == MODE_MERGED, "not divided early");
    end
    q_full = 0;
    q_out = nd(FL, 9);                         // next extracted is terminal
    tick();
    chk(cur[0].depth == FL && dr_load && q_clear_primary && !q_ins[0] && !q_ext[0],
        "terminal in divided queue: offer decision, clear primary");
    q_out = EMPTY_NODE;
    tick();
    chk(ev_merge && ev_terminal && mode == MODE_MERGED && !q_inhibit, "queues merged");
    chk(!cur[0].valid && q_ext[0] && !q_ins[0], "extract only while best node rises");
    q_out = nd(3, 0);
    tick();
    chk(cur[0].valid && q_ins[0] && q_ext[0], "extension resumes after merge");
    q_out = nd(FL, 4);
    tick();
    chk(dr_load && !q_clear_primary, "terminal in merged queue");
    dr_best = nd(FL, 9);
    tick();
    chk(tb_start, "traceback started");
    tick();
    w = 0;
    while (!done && w < 20) begin
      tb_done = (w == 3);
      tick(); w++;
    end
    tb_done = 0;
    chk(done && !erasure && !busy, "frame done");

    // frame 2: computation limit, no decision -> erasure
    dr_best = EMPTY_NODE;
    q_out = nd(1, 0);
    begin_frame();
    tick();
    w = 0;
    while (!done && w < 100) begin
      if (pm_we[0]) w++;
      q_out = nd(1 + (w % 4), 0);
      tick();
    end
    chk(w == CL, $sformatf("%0d computations before the limit, expected %0d", w, CL));
    chk(done && erasure, "erasure when no terminal node reached");

    // frame 3: empty queue ends the search
    q_out = EMPTY_NODE;
    begin_frame();
    q_empty = 1;
    repeat (4) tick();
    chk(done && erasure, "empty queue ends the search");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
