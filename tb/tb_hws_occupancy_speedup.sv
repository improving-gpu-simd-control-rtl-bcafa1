// tb_hws_occupancy_speedup: issue-cycle saving for a given warp-occupancy mix.
// For a mix of warps whose threads need 1, 2, 3 or 4 quarter-warps after
// squeezing, the expected HWS speedup over fixed 4-cycle issue is
//   1 / ((1 - f1 - f2 - f3) + f1/4 + f2/2 + f3/(4/3)).
// Two mixes of 1000 warps are run, each with its threads scattered at random
// over the quarters of their lanes (so the squeezer has work to do): 6.2 %
// one-quarter, 2.6 % two-quarter, 0.6 % three-quarter warps (expected speedup
// 1.065), and 5.8 %, 6.8 %, 6.7 % (expected 1.104). The bench streams them
// through one SM front end (PDOM&HWS, default size) and checks that each warp
// issues in its lane-locked minimum of cycles, the total against the formula
// and that the issue stream has no gaps.
module tb_hws_occupancy_speedup;
  import hws_pkg::*;

  logic clk = 0, rst_n = 0;
  logic dwf_en = 0, sync_en = 0;
  qcount_t sync_quarters = '0, standby_quarters;
  logic in_valid = 0, in_ready, iss_valid;
  pc_t in_pc = '0;
  warp_threads_t in_thr = '0;
  issue_slice_t iss;
  sm_events_t ev;
  logic [5:0] pool_count;
  int checks = 0, failures = 0;

  hws_sm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int cyc = 0, first_cyc = -1, last_cyc = 0, issued = 0, warps_out = 0, slices = 0;
  int lane_cnt[8] = '{default: 0};
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && iss_valid) begin
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      issued++;
      slices++;
      for (int l = 0; l < 8; l++) lane_cnt[l] += int'(iss.lane_act[l]);
      if (iss.last) begin
        int m;
        m = 0;
        for (int l = 0; l < 8; l++) if (lane_cnt[l] > m) m = lane_cnt[l];
        checks++;
        if (slices != m || int'(iss.len) != m) begin
          failures++;
          $display("FAIL: warp %0d issued in %0d cycles (len %0d), lane-locked minimum %0d",
                   warps_out, slices, iss.len, m);
        end
        slices = 0;
        for (int l = 0; l < 8; l++) lane_cnt[l] = 0;
        warps_out++;
      end
    end
  end

  // a warp whose lanes hold at most q threads, one lane exactly q, scattered
  function automatic warp_threads_t make_warp(input int q, input int base);
    warp_threads_t r;
    int full_lane;
    r = '0;
    full_lane = $urandom_range(0, 7);
    for (int l = 0; l < 8; l++) begin
      int c, placed;
      c = (l == full_lane) ? q : $urandom_range(0, q);
      placed = 0;
      while (placed < c) begin
        int k;
        k = $urandom_range(0, 3);
        if (!r.act[k*8+l]) begin
          r.act[k*8+l] = 1'b1;
          r.tid[k*8+l] = tid_t'(base + k*8 + l);
          placed++;
        end
      end
    end
    return r;
  endfunction

  task automatic run_mix(input int n1, input int n2, input int n3, input int n4, input real expect_speedup);
    int qs[$], total;
    real f1, f2, f3, formula, measured;
    rst_n <= 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    first_cyc = -1; issued = 0; warps_out = 0; slices = 0;
    for (int i = 0; i < n1; i++) qs.push_back(1);
    for (int i = 0; i < n2; i++) qs.push_back(2);
    for (int i = 0; i < n3; i++) qs.push_back(3);
    for (int i = 0; i < n4; i++) qs.push_back(4);
    qs.shuffle();
    total = 0;
    foreach (qs[i]) total += qs[i];
    @(posedge clk);
    foreach (qs[i]) begin
      in_valid <= 1;
      in_pc    <= pc_t'(i % 4);
      in_thr   <= make_warp(qs[i], (i % 32) * 32);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    while (warps_out < qs.size()) @(posedge clk);
    f1 = real'(n1) / qs.size(); f2 = real'(n2) / qs.size(); f3 = real'(n3) / qs.size();
    formula  = 1.0 / ((1.0 - f1 - f2 - f3) + f1 / 4.0 + f2 / 2.0 + f3 / (4.0 / 3.0));
    measured = 4.0 * qs.size() / issued;
    $display("mix %0d/%0d/%0d/%0d: %0d issue cycles, speedup %f (formula %f)", n1, n2, n3, n4, issued, measured, formula);
    check(issued == total, "issue cycles equal the sum of squeezed warp sizes");
    check(last_cyc - first_cyc + 1 == issued, "no gap in the issue stream");
    check(measured > formula - 1e-6 && measured < formula + 1e-6, "speedup matches the occupancy formula");
    check(measured > expect_speedup - 0.005 && measured < expect_speedup + 0.005, "speedup matches the expected value");
  endtask

  initial begin
    run_mix(62, 26, 6, 906, 1.065);
    run_mix(58, 68, 67, 807, 1.104);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
