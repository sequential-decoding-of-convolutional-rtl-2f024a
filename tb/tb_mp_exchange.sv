// tb_mp_exchange: random lead nodes (P2 at 2p, P3 at 2p+1) for four queues.  Expected results come
// from the rule applied here pair by pair: the node under the top of queue p
// and the top of queue p+1 (mod 4) trade places when the first has the
// strictly larger metric (any node beats an empty position).
module tb_mp_exchange;
  import cmqa_pkg::*;
  localparam int unsigned N = 4;

  node_t lead_out [2*N];
  node_t lead_in  [2*N];
  logic  lead_load;
  logic [N-1:0] swapped;
  int checks = 0, failures = 0;

  mp_exchange #(.NPROC(N)) dut (.*);

  function automatic int key(node_t n);
    return n.valid ? int'(n.metric) + 1000 : 0;
  endfunction

  initial begin
    node_t ex [2*N];
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < N; p++)
        for (int k = 0; k < 2; k++) begin
          node_t n;
          n        = EMPTY_NODE;
          n.valid  = ($urandom_range(0, 4) != 0);
          n.metric = MW'($urandom_range(0, 20) - 10);
          n.parent = PW'(p * 2 + k);
          lead_out[2*p+k] = n;
          ex[2*p+k]       = n;
        end
      for (int p = 0; p < N; p++) begin
        int nx;
        nx = (p + 1) % N;
        if (key(lead_out[2*p+1]) > key(lead_out[2*nx])) begin
          ex[2*p+1] = lead_out[2*nx];
          ex[2*nx]  = lead_out[2*p+1];
        end
      end
      #1;
      checks++;
      if (!lead_load) failures++;
      for (int p = 0; p < N; p++)
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (lead_in[2*p+k] !== ex[2*p+k]) begin
            failures++;
            if (failures < 4) $display("FAIL t=%0d queue %0d slot %0d", t, p, k);
          end
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
