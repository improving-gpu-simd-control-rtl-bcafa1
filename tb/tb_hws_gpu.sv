// tb_hws_gpu: end-to-end test of the full-size top level (28 SMs, 32-entry
// pools, default parameters). Every SM runs a divergent kernel of 32 warps
// (1024 threads), each SM with its own branch outcomes, three times with a
// reset in between: PDOM&HWS, en-DWF&HWS, and en-DWF&HWS with the cross-SM
// warp-size synchronization. One tb_sm_env per SM checks thread paths, lanes
// and issue lengths; this bench checks that the synchronized length is the
// maximum of the SMs' standby lengths and sets every SM's issue length,
// that each mechanism occurred, and that
// synchronization never makes a run shorter.
module tb_hws_gpu;
  import hws_pkg::*;

  localparam int NS = 28;
  localparam int IW = $clog2(32);

  logic clk = 0, rst_n = 0, start = 0;
  logic dwf_en = 0, sync_en = 0;
  logic [NS-1:0] in_valid, in_ready, iss_valid, done;
  pc_t [NS-1:0] in_pc;
  warp_threads_t [NS-1:0] in_thr;
  issue_slice_t [NS-1:0] iss;
  sm_events_t [NS-1:0] ev;
  logic [NS-1:0][IW:0] pool_count;
  qcount_t sync_quarters;
  int env_checks[NS], env_failures[NS], n_ev[NS][10], n_len[NS][5], n_cycles[NS], n_issue[NS];
  int checks = 0, failures = 0;
  int tot_ev[10], tot_len[5], run_cycles[3];

  hws_gpu dut (.*);

  for (genvar s = 0; s < NS; s++) begin : g_env
    tb_sm_env #(.SEED(s + 1), .NUM_WARPS(32), .LAT(24)) env (
      .clk, .start, .dwf_en, .sync_en,
      .in_valid(in_valid[s]), .in_ready(in_ready[s]), .in_pc(in_pc[s]), .in_thr(in_thr[s]),
      .iss_valid(iss_valid[s]), .iss(iss[s]), .ev(ev[s]), .pool_count(int'(pool_count[s])),
      .done(done[s]), .checks(env_checks[s]), .failures(env_failures[s]),
      .n_ev(n_ev[s]), .n_len(n_len[s]), .n_cycles(n_cycles[s]), .n_issue_cycles(n_issue[s])
    );
  end

  always #5 clk = ~clk;

  function automatic int all_checks();
    int c;
    c = checks;
    for (int s = 0; s < NS; s++) c += env_checks[s];
    return c;
  endfunction

  function automatic int all_failures();
    int f;
    f = failures;
    for (int s = 0; s < NS; s++) f += env_failures[s];
    return f;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", all_checks(), all_failures());
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // the synchronized length is the largest standby length over the SMs
  always @(posedge clk) if (rst_n) begin
    int m;
    m = 0;
    for (int s = 0; s < NS; s++) begin
      int q;
      q = int'(dut.standby[s]);
      if (q > m) m = q;
    end
    checks++;
    if (int'(sync_quarters) != m) begin
      failures++;
      $display("FAIL: synchronized length %0d, expected %0d", sync_quarters, m);
    end
  end

  // every SM starts a warp with its own length, raised to the synchronized
  // length when synchronization is on (values of the cycle before the first
  // quarter, the cycle in which the warp was taken)
  qcount_t prev_standby[NS];
  qcount_t prev_sync;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) begin
      if (iss_valid[s] && iss[s].first) begin
        int e;
        e = int'(prev_standby[s]);
        if (sync_en && int'(prev_sync) > e) e = int'(prev_sync);
        checks++;
        if (int'(iss[s].len) != e) begin
          failures++;
          $display("FAIL: SM %0d issue length %0d, expected %0d", s, iss[s].len, e);
        end
      end
      prev_standby[s] = dut.standby[s];
    end
    prev_sync = sync_quarters;
  end

  task automatic run(input int idx, input bit dwf, input bit sync);
    int cyc;
    dwf_en = dwf; sync_en = sync;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done == '0);
    wait (&done);
    @(posedge clk);
    cyc = 0;
    for (int s = 0; s < NS; s++) begin
      for (int i = 0; i < 10; i++) tot_ev[i] += n_ev[s][i];
      for (int i = 0; i < 5; i++) tot_len[i] += n_len[s][i];
      if (n_cycles[s] > cyc) cyc = n_cycles[s];
    end
    run_cycles[idx] = cyc;
    $display("run %0d (dwf=%0d sync=%0d): longest SM %0d cycles", idx, dwf, sync, cyc);
  endtask

  initial begin
    string names[10] = '{"accept", "drop", "squeeze", "merge", "relocate", "merge_fail",
                         "insert", "pool_full_stall", "pc_switch", "sync_stretch"};
    for (int i = 0; i < 10; i++) tot_ev[i] = 0;
    for (int i = 0; i < 5; i++) tot_len[i] = 0;
    run(0, 0, 0);
    run(1, 1, 0);
    run(2, 1, 1);
    check(run_cycles[2] >= run_cycles[1], "synchronization does not shorten the run");
    for (int i = 0; i < 10; i++) begin
      check(tot_ev[i] > 0, {"mechanism seen: ", names[i]});
      $display("  %s: %0d", names[i], tot_ev[i]);
    end
    for (int q = 1; q <= 4; q++) begin
      check(tot_len[q] > 0, $sformatf("warps issued in %0d cycles", q));
      $display("  warps issued in %0d cycles: %0d", q, tot_len[q]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", all_checks(), all_failures());
    $finish;
  end
endmodule
