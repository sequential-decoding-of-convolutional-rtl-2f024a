// tb_cmqa_decoder_full: the CMQA decoder with every parameter at its
// default (four processors with queues of 250 processors, 500-bit frames,
// limit of 4096 decoding cycles, division time T_D = 2000), taken through complete frames.
// Frames of random information bits are encoded here with the two
// generator polynomials written as exponent lists, sent through a binary
// symmetric channel and decoded.  Checks per frame:
//   * without erasure, the metric the decoder reports equals the metric
//     recomputed here for the bits it delivered, against the received frame,
//     and all FRAME_LEN bits arrive, each index once;
//   * noiseless frames decode exactly in FRAME_LEN computations, and take
//     no more than 2*FRAME_LEN+8 clocks from start to done;
//   * frames with two isolated channel errors decode exactly.
// Noisy frames follow; the events they cause are reported, and they must
// include an exchange between queue tops and a queue overflow.
module tb_cmqa_decoder_full;
  import cmqa_pkg::*;
  localparam int unsigned FL = 500;

  logic          clk = 0, rst_n = 0;
  logic          rx_we = 0, start = 0;
  logic [DW-1:0] rx_addr = '0;
  logic [1:0]    rx_data = '0;
  logic          busy, done, erasure, out_valid, out_bit;
  logic [DW-1:0] out_idx;
  logic signed [MW-1:0] decision_metric;
  logic [15:0]   computations;
  qmode_e        mode;
  logic          ev_overflow, ev_exchange, ev_divide, ev_merge, ev_limit, ev_terminal, ev_stored, ev_rejected;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_exchange = 0, n_overflow = 0, n_divide = 0, n_merge = 0, n_limit = 0, n_stored = 0, n_rejected = 0;
  int n_merged_end = 0, n_erasure = 0, n_biterr = 0;

  cmqa_decoder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (ev_overflow) n_overflow++;
    if (ev_exchange) n_exchange++;
    if (ev_divide)   n_divide++;
    if (ev_merge)    n_merge++;
    if (ev_limit)    n_limit++;
    if (ev_stored)   n_stored++;
    if (ev_rejected) n_rejected++;
    if (ev_terminal && mode == MODE_MERGED) n_merged_end++;
  end

  int g1e [10] = '{0, 1, 4, 6, 7, 8, 10, 11, 13, 15};
  int g2e [9]  = '{0, 3, 6, 7, 8, 10, 12, 14, 15};

  bit info [FL];
  bit rx   [FL][2];
  bit dec  [FL];

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", msg);
    end
  endtask

  function automatic bit enc(int t, int g);
    bit c = 0;
    if (g == 0) begin foreach (g1e[k]) if (t - g1e[k] >= 0) c ^= info[t - g1e[k]]; end
    else        begin foreach (g2e[k]) if (t - g2e[k] >= 0) c ^= info[t - g2e[k]]; end
    return c;
  endfunction

  function automatic int path_metric();
    int m = 0;
    bit save [FL];
    save = info;
    info = dec;
    for (int t = 0; t < FL; t++)
      for (int g = 0; g < 2; g++)
        m += (enc(t, g) == rx[t][g]) ? 1 : -10;
    info = save;
    return m;
  endfunction

  // kind 0: noiseless, 1: two isolated errors, 2: flips with probability pm/1000
  task automatic run_frame(int kind, int pm);
    int seen, t0, e1, e2, errs;
    bit got [FL];
    foreach (info[t]) info[t] = 1'($urandom);
    foreach (info[t]) begin
      rx[t][0] = enc(t, 0);
      rx[t][1] = enc(t, 1);
      if (kind == 2) begin
        if ($urandom_range(0, 999) < pm) rx[t][0] ^= 1;
        if ($urandom_range(0, 999) < pm) rx[t][1] ^= 1;
      end
    end
    if (kind == 1) begin
      e1 = $urandom_range(0, FL / 2 - 20);
      e2 = $urandom_range(FL / 2, FL - 20);
      rx[e1][$urandom_range(0, 1)] ^= 1;
      rx[e2][$urandom_range(0, 1)] ^= 1;
    end
    for (int t = 0; t < FL; t++) begin
      @(negedge clk); rx_we = 1; rx_addr = DW'(t); rx_data = {rx[t][1], rx[t][0]};
    end
    @(negedge clk); rx_we = 0; start = 1;
    t0 = int'(cycles);
    @(negedge clk); start = 0;
    seen = 0;
    foreach (got[t]) got[t] = 0;
    while (!done) begin
      @(posedge clk); #1;
      if (out_valid) begin
        dec[out_idx] = out_bit;
        chk(!got[out_idx], "bit index delivered twice");
        got[out_idx] = 1;
        seen++;
      end
    end
    if (erasure) begin
      n_erasure++;
    end else begin
      chk(seen == FL, $sformatf("%0d bits delivered", seen));
      chk(path_metric() == int'(decision_metric),
          $sformatf("reported metric %0d, recomputed %0d", decision_metric, path_metric()));
      errs = 0;
      foreach (info[t]) if (info[t] != dec[t]) errs++;
      n_biterr += errs;
      if (kind < 2) chk(errs == 0, $sformatf("frame kind %0d decoded with %0d errors", kind, errs));
      if (kind == 0) begin
        chk(int'(computations) == FL, $sformatf("noiseless frame took %0d computations", computations));
        chk(int'(cycles) - t0 <= 2 * FL + 8, $sformatf("noiseless frame took %0d clocks", int'(cycles) - t0));
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(0, 0);
    run_frame(1, 0);
    for (int f = 0; f < 4; f++) run_frame(2, 50 + 10 * f);
    $display("events: exchange=%0d overflow=%0d divide=%0d merge=%0d limit=%0d stored=%0d rejected=%0d merged_end=%0d erasures=%0d biterrors=%0d",
             n_exchange, n_overflow, n_divide, n_merge, n_limit, n_stored, n_rejected, n_merged_end, n_erasure, n_biterr);
    chk(n_exchange > 0, "no exchange between queues");
    chk(n_overflow > 0, "queue overflow never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles > 60000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
