// tb_path_memory: records, through two record ports, random trees in which one path of depth D is
// interleaved with unrelated entries, traces that path back and checks
// every bit, its index, the order (last bit first) and that done comes
// exactly D clocks after start.
module tb_path_memory;
  import cmqa_pkg::*;
  localparam int unsigned WP = 2, ENT = 4096;

  logic          clk = 0, rst_n = 0;
  logic          start = 0, start_bit = 0;
  logic          we [WP], wbit [WP];
  logic [PW-1:0] waddr [WP], wparent [WP];
  logic [PW-1:0] start_parent = '0;
  logic [DW-1:0] start_depth = '0;
  logic          busy, bit_valid, bit_out, done;
  logic [DW-1:0] bit_idx;
  int checks = 0, failures = 0, cycles = 0;

  path_memory #(.WPORTS(WP), .ENTRIES(ENT)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  // port 0 writes the entry; port 1 writes a decoy entry far away in the
  // same clock, which must not disturb it
  task automatic wr(int a, int p, bit b);
    @(negedge clk);
    we[0] = 1; waddr[0] = PW'(a); wparent[0] = PW'(p); wbit[0] = b;
    we[1] = 1; waddr[1] = PW'(a + 2048); wparent[1] = PW'($urandom); wbit[1] = 1'($urandom);
    @(negedge clk); we[0] = 0; we[1] = 0;
  endtask

  initial begin
    we[0] = 0; we[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 4; trial++) begin
      int D;
      bit path [];
      int addr, prev, nxt, got, t0;
      D = (trial == 0) ? 500 : $urandom_range(1, 120);
      path = new[D];
      foreach (path[i]) path[i] = 1'($urandom);
      // the root is entry 0; node at depth d (d = 1..D-1) gets an address
      addr = 0; prev = 0;
      wr(0, 0, 0);
      nxt = 1;
      for (int d = 1; d < D; d++) begin
        // some unrelated entries in between
        repeat ($urandom_range(0, 3)) begin
          wr(nxt, $urandom_range(0, nxt - 1), 1'($urandom));
          nxt++;
        end
        wr(nxt, prev, path[d-1]);
        prev = nxt;
        nxt++;
      end
      // terminal node: parent prev, bit path[D-1], depth D
      @(negedge clk);
      start = 1; start_parent = PW'(prev); start_bit = path[D-1]; start_depth = DW'(D);
      t0 = cycles;
      @(negedge clk); start = 0;
      got = 0;
      while (1) begin
        if (bit_valid) begin
          chk(int'(bit_idx) == D - 1 - got, $sformatf("index %0d expected %0d", bit_idx, D-1-got));
          chk(bit_out == path[D-1-got], $sformatf("bit %0d", D-1-got));
          got++;
        end
        if (done || cycles - t0 > D + 10) break;
        @(negedge clk);
      end
      chk(got == D, $sformatf("got %0d bits, expected %0d", got, D));
      chk(cycles - t0 == D, $sformatf("traceback took %0d clocks, expected %0d", cycles - t0, D));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 100000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
