// tb_decision_reg: offers random terminal nodes and checks the register
// against a running maximum kept here, including the stored / rejected
// pulses and clearing.
module tb_decision_reg;
  import cmqa_pkg::*;

  logic  clk = 0, rst_n = 0, clear = 0, load = 0;
  node_t cand = EMPTY_NODE, best;
  logic  stored, rejected;
  int checks = 0, failures = 0, cycles = 0;
  int ref_best;
  bit ref_valid;

  decision_reg dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 20; f++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      ref_valid = 0;
      chk(!best.valid, "cleared register is empty");
      for (int k = 0; k < 30; k++) begin
        bit exp_store;
        cand = EMPTY_NODE;
        cand.valid  = 1'b1;
        cand.metric = MW'($urandom_range(0, 60) - 30);
        cand.parent = PW'(k);
        exp_store = !ref_valid || int'(cand.metric) > ref_best;
        load = 1;
        @(negedge clk);
        load = 0;
        if (exp_store) begin
          ref_best = int'(cand.metric);
          ref_valid = 1;
        end
        chk(stored == exp_store && rejected == !exp_store, "stored/rejected pulse");
        chk(best.valid && int'(best.metric) == ref_best, "best metric");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
