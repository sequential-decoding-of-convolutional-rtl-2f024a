// tb_spq_slice: exhaustive check of the triplet-sorting slice.
// Every combination of three nodes with metrics -2..2 or empty is applied,
// with and without inhibit.  The expected result is built here from a
// direct rule: the local top receives the node with the largest metric
// (the earliest of equals, empty counting below any node), the other two
// follow in their original order; inhibit passes all three unchanged.
module tb_spq_slice;
  import cmqa_pkg::*;

  node_t a, b, c, x, y, z;
  logic  inhibit;
  int    checks = 0, failures = 0;

  spq_slice dut (.a, .b, .c, .inhibit, .x, .y, .z);

  function automatic node_t mk(int v, int tag);
    node_t n = EMPTY_NODE;
    if (v > -3) begin
      n.valid  = 1'b1;
      n.metric = MW'(v);
    end
    n.parent = PW'(tag);
    return n;
  endfunction

  function automatic int key(node_t n);
    return n.valid ? 32'(int'(n.metric)) + 100 : 0;
  endfunction

  initial begin
    node_t in3 [3];
    node_t ex [3];
    int    bi;
    for (int inh = 0; inh < 2; inh++)
      for (int va = -3; va <= 2; va++)
        for (int vb = -3; vb <= 2; vb++)
          for (int vc = -3; vc <= 2; vc++) begin
            in3[0] = mk(va, 1); in3[1] = mk(vb, 2); in3[2] = mk(vc, 3);
            a = in3[0]; b = in3[1]; c = in3[2]; inhibit = inh[0];
            #1;
            if (inh != 0) begin
              ex = in3;
            end else begin
              bi = 0;
              for (int i = 1; i < 3; i++) if (key(in3[i]) > key(in3[bi])) bi = i;
              ex[0] = in3[bi];
              case (bi)
                0: begin ex[1] = in3[1]; ex[2] = in3[2]; end
                1: begin ex[1] = in3[0]; ex[2] = in3[2]; end
                default: begin ex[1] = in3[0]; ex[2] = in3[1]; end
              endcase
            end
            checks++;
            if (x !== ex[0] || y !== ex[1] || z !== ex[2]) begin
              failures++;
              if (failures < 10)
                $display("mismatch inh=%0d in=%0d,%0d,%0d", inh, va, vb, vc);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
