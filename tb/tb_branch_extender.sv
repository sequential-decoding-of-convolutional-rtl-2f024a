// tb_branch_extender: random parent nodes and received pairs.  The expected
// code bits are computed here from the exponent lists of the two generator
// polynomials, the expected metrics from the agree/disagree weights.
module tb_branch_extender;
  import cmqa_pkg::*;

  node_t         parent, child0, child1;
  logic [PW-1:0] parent_id;
  logic [1:0]    r, code0, code1;
  int checks = 0, failures = 0;

  branch_extender dut (.*);

  int g1e [10] = '{0, 1, 4, 6, 7, 8, 10, 11, 13, 15};
  int g2e [9]  = '{0, 3, 6, 7, 8, 10, 12, 14, 15};

  // u(t-j) for j = 0 .. 15: j = 0 is the new bit, j >= 1 is state[j-1]
  function automatic logic hist(logic [MEM-1:0] st, logic u, int j);
    return (j == 0) ? u : st[j-1];
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      parent        = EMPTY_NODE;
      parent.valid  = 1'b1;
      parent.metric = MW'($urandom_range(0, 2000) - 1000);
      parent.depth  = DW'($urandom_range(0, 499));
      parent.state  = MEM'($urandom);
      parent.parent = PW'($urandom);
      parent_id     = PW'($urandom);
      r             = 2'($urandom);
      #1;
      for (int u = 0; u < 2; u++) begin
        logic c1, c2;
        int   m;
        node_t ch;
        c1 = 0; c2 = 0;
        foreach (g1e[k]) c1 ^= hist(parent.state, u[0], g1e[k]);
        foreach (g2e[k]) c2 ^= hist(parent.state, u[0], g2e[k]);
        m = int'(parent.metric) + ((c1 == r[0]) ? 1 : -10) + ((c2 == r[1]) ? 1 : -10);
        ch = (u == 0) ? child0 : child1;
        chk(((u == 0) ? code0 : code1) == {c2, c1}, $sformatf("code bits u=%0d", u));
        chk(int'(ch.metric) == m, $sformatf("metric u=%0d got %0d exp %0d", u, ch.metric, m));
        chk(ch.depth == parent.depth + 1, "depth");
        chk(ch.state == {parent.state[MEM-2:0], u[0]}, "state");
        chk(ch.parent == parent_id && ch.valid, "parent pointer / valid");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
