// tb_hws_sm: end-to-end test of one SM front end with a small pool.
// Runs the same divergent kernel three times, with a reset in between:
// PDOM&HWS (no warp formation), en-DWF&HWS, and en-DWF&HWS with the
// cross-SM size synchronization driven by random lengths from "other SMs".
// tb_sm_env checks the thread paths, lanes and issue lengths; this bench
// checks that every mechanism occurred and that warp formation reduced the
// number of issue cycles.
module tb_hws_sm;
  import hws_pkg::*;

  localparam int D = 8;

  logic clk = 0, rst_n = 0, start = 0;
  logic dwf_en = 0, sync_en = 0;
  qcount_t sync_quarters = '0, standby_quarters;
  logic in_valid, in_ready, iss_valid, done;
  pc_t in_pc;
  warp_threads_t in_thr;
  issue_slice_t iss;
  sm_events_t ev;
  logic [$clog2(D):0] pool_count;
  int env_checks, env_failures, n_ev[10], n_len[5], n_cycles, n_issue;
  int checks = 0, failures = 0;
  int tot_ev[10], tot_len[5], issue_pdom, issue_dwf;

  hws_sm #(.POOL_DEPTH(D)) dut (.*);

  tb_sm_env #(.SEED(3), .NUM_WARPS(12), .LAT(24)) env (
    .clk, .start, .dwf_en, .sync_en, .in_valid, .in_ready, .in_pc, .in_thr,
    .iss_valid, .iss, .ev, .pool_count(int'(pool_count)), .done,
    .checks(env_checks), .failures(env_failures), .n_ev, .n_len, .n_cycles,
    .n_issue_cycles(n_issue)
  );

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end

  always @(posedge clk) sync_quarters <= qcount_t'($urandom_range(0, 4));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input bit dwf, input bit sync, output int issue_cycles);
    dwf_en = dwf; sync_en = sync;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (!done);
    wait (done);
    @(posedge clk);
    issue_cycles = n_issue;
    for (int i = 0; i < 10; i++) tot_ev[i] += n_ev[i];
    for (int i = 0; i < 5; i++) tot_len[i] += n_len[i];
    $display("dwf=%0d sync=%0d: %0d cycles, %0d issue cycles, lengths 1-4: %0d %0d %0d %0d, events %p",
             dwf, sync, n_cycles, n_issue, n_len[1], n_len[2], n_len[3], n_len[4], n_ev);
  endtask

  initial begin
    int dummy;
    string names[10] = '{"accept", "drop", "squeeze", "merge", "relocate", "merge_fail",
                         "insert", "pool_full_stall", "pc_switch", "sync_stretch"};
    for (int i = 0; i < 10; i++) tot_ev[i] = 0;
    for (int i = 0; i < 5; i++) tot_len[i] = 0;
    run(0, 0, issue_pdom);
    check(n_ev[3] == 0, "no warp formation in PDOM&HWS mode");
    run(1, 0, issue_dwf);
    check(issue_dwf < issue_pdom, "warp formation saves issue cycles");
    run(1, 1, dummy);
    for (int i = 0; i < 10; i++) begin
      check(tot_ev[i] > 0, {"mechanism seen: ", names[i]});
      $display("  %s: %0d", names[i], tot_ev[i]);
    end
    for (int q = 1; q <= 4; q++) check(tot_len[q] > 0, $sformatf("warps issued in %0d cycles", q));
    $display("TB_RESULT checks=%0d failures=%0d", checks + env_checks, failures + env_failures);
    $finish;
  end
endmodule
