// tb_spq_queue: self-checking test of the two-input systolic priority queue.
//  1. The worked example of five clocks (insert 3,-1 / 2,5 / 3,4 / 6,3 /
//     7,4, extracting in each clock) must deliver 3, 5, 4, 6, 7.
//  2. Random mixes of insert+extract, insert-only and extract-only with
//     the queue never overflowing: every delivered node must be one that is
//     in a reference multiset kept here and carry its largest metric.
//  3. Filling past capacity must raise full and pulse overflow.
//  4. Division: a queue of high-metric nodes is divided and fed only
//     low-metric nodes.  At most the five nodes of the primary queue may
//     come out before only new nodes are delivered; after clearing the
//     primary and merging, the old high nodes must come out again.
//  5. The lead port: lead_out shows the next P2/P3, and a node loaded
//     through lead_in into P2 is the next one delivered.
module tb_spq_queue;
  import cmqa_pkg::*;

  localparam int unsigned E = 30;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  flush = 0, clear_primary = 0, inhibit = 0, ins = 0, ext = 0;
  node_t n0 = EMPTY_NODE, n1 = EMPTY_NODE, out;
  logic  full, empty, overflow;
  node_t lead_out [2];
  node_t lead_in  [2];
  logic  lead_load = 0;
  int    checks = 0, failures = 0;
  int    cycles = 0;
  int    tagc = 1;

  // reference multiset
  int ref_m [$];
  int ref_t [$];

  spq_queue #(.ELEMENTS(E), .PRI_I(1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic node_t mk(int m);
    node_t n = EMPTY_NODE;
    n.valid  = 1'b1;
    n.metric = MW'(m);
    n.parent = PW'(tagc);
    tagc++;
    return n;
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s (t=%0t)", msg, $time);
    end
  endtask

  // one clock; returns the delivered node
  task automatic op(bit i, node_t a, node_t b, bit e, output node_t o);
    @(negedge clk);
    ins = i; ext = e; n0 = a; n1 = b;
    #1;
    o = out;
    @(posedge clk);
    #1;
    ins = 0; ext = 0; n0 = EMPTY_NODE; n1 = EMPTY_NODE;
  endtask

  task automatic ref_add(node_t n);
    if (n.valid) begin
      ref_m.push_back(int'(n.metric));
      ref_t.push_back(int'(n.parent));
    end
  endtask

  task automatic ref_check_remove(node_t o);
    int mx, idx;
    if (ref_m.size() == 0) begin
      chk(!o.valid, "empty queue delivered a node");
      return;
    end
    mx = ref_m[0];
    foreach (ref_m[k]) if (ref_m[k] > mx) mx = ref_m[k];
    chk(o.valid, "non-empty queue delivered nothing");
    chk(int'(o.metric) == mx, $sformatf("delivered %0d, best is %0d", o.metric, mx));
    idx = -1;
    foreach (ref_t[k]) if (ref_t[k] == int'(o.parent)) idx = k;
    chk(idx >= 0, "delivered a node that was never inserted");
    if (idx >= 0) begin
      ref_m.delete(idx);
      ref_t.delete(idx);
    end
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1; @(posedge clk); #1 flush = 0;
    ref_m.delete(); ref_t.delete();
  endtask

  initial begin
    node_t o, a, b;
    int exp_ex [5] = '{3, 5, 4, 6, 7};
    int ins_ex [10] = '{3, -1, 2, 5, 3, 4, 6, 3, 7, 4};
    int old_out, new_seen, cnt;
    repeat (2) @(posedge clk);
    rst_n = 1;

    // 1. worked example
    for (int k = 0; k < 5; k++) begin
      op(1, mk(ins_ex[2*k]), mk(ins_ex[2*k+1]), 1, o);
      chk(o.valid && int'(o.metric) == exp_ex[k],
          $sformatf("example clock %0d delivered %0d, expected %0d", k+1, o.metric, exp_ex[k]));
    end
    do_flush();
    chk(empty, "flush leaves queue empty");

    // 2. random operations, no overflow
    for (int r = 0; r < 3000; r++) begin
      int kind;
      kind = $urandom_range(0, 9);
      if (ref_m.size() >= E - 4) kind = 9;          // keep below capacity
      a = mk($urandom_range(0, 200) - 100);
      b = ($urandom_range(0, 7) == 0) ? EMPTY_NODE : mk($urandom_range(0, 200) - 100);
      if (kind <= 6) begin                       // insert + extract
        op(1, a, b, 1, o);
        ref_add(a); ref_add(b);
        ref_check_remove(o);
      end else if (kind == 7) begin              // insert only
        op(1, a, b, 0, o);
        ref_add(a); ref_add(b);
      end else begin                             // extract only
        op(0, EMPTY_NODE, EMPTY_NODE, 1, o);
        ref_check_remove(o);
      end
    end
    do_flush();

    // 3. overflow
    cnt = 0;
    for (int r = 0; r < E; r++) begin
      op(1, mk(r), mk(r), 0, o);
      if (overflow) cnt++;
    end
    chk(full, "full after inserting 2*E nodes");
    @(negedge clk); ins = 1; n0 = mk(1); n1 = mk(1); #1;
    chk(overflow, "overflow flagged when inserting into a full queue");
    @(posedge clk); #1 ins = 0;
    do_flush();

    // 4. division with inhibit
    for (int r = 0; r < (E - 4) / 2; r++) op(1, mk(1000 + r), mk(1000 + 2*r), 0, o);
    inhibit = 1;
    old_out = 0; new_seen = 0;
    for (int r = 0; r < 12; r++) begin
      op(1, mk(-500 + r), mk(-600 + r), 1, o);
      if (o.valid && o.metric >= 1000) old_out++;
      chk(!(o.valid && o.metric >= 1000 && new_seen > 0),
          "old node delivered after the primary ran dry");
      if (o.valid && o.metric < 1000) new_seen++;
    end
    chk(old_out >= 1 && old_out <= 5,
        $sformatf("divided queue delivered %0d old nodes (1..5 allowed)", old_out));
    chk(new_seen > 0, "divided queue delivered new nodes");
    @(negedge clk); clear_primary = 1; @(posedge clk); #1 clear_primary = 0;
    inhibit = 0;
    cnt = 0;
    do begin
      op(0, EMPTY_NODE, EMPTY_NODE, 1, o);
      cnt++;
    end while (!o.valid && cnt < 40);
    chk(o.valid && o.metric >= 1000, "merged queue delivers old node again");

    // 5. lead port
    do_flush();
    op(1, mk(5), mk(9), 0, o);
    @(negedge clk); #1;
    chk(lead_out[0].valid && lead_out[0].metric == 9 && lead_out[1].metric == 5,
        "lead_out shows P2/P3");
    lead_in[0] = mk(77); lead_in[1] = mk(-4); lead_load = 1;
    @(posedge clk); #1 lead_load = 0;
    op(0, EMPTY_NODE, EMPTY_NODE, 1, o);
    chk(o.valid && o.metric == 77, "node loaded into P2 is delivered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 20000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
