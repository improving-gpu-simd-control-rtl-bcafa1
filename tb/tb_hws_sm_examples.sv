// tb_hws_sm_examples: directed end-to-end cases on one SM front end at its
// default size, with exact expected issue cycles.
//  1. if/else over one 32-thread warp: A (all threads, 4 cycles), then the
//     "then" side (threads 0-3, 12-15) squeezed into one quarter (1 cycle) and
//     the "else" side (threads 4-11, 16-31) into three (3 cycles), issued
//     back to back: 8 issue cycles where fixed-size warps need 12.
//  2. en-DWF&HWS: a 14-thread warp is squeezed, relocated around the lane
//     conflicts of a 6-thread pool warp with the same PC, combined with it and
//     issued in 3 cycles (quarters 0, 2 and 3), while full warps keep the
//     issue stage busy.
module tb_hws_sm_examples;
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
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // log of issued cycles
  typedef struct { int cyc; issue_slice_t s; } log_t;
  log_t lg[$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && iss_valid) lg.push_back('{cyc: cyc, s: iss});
  end

  function automatic warp_threads_t mk(input int w[32]);
    warp_threads_t r;
    for (int s = 0; s < 32; s++) begin
      r.act[s] = w[s] >= 0;
      r.tid[s] = (w[s] >= 0) ? tid_t'(w[s]) : '0;
    end
    return r;
  endfunction

  task automatic send(input pc_t pc, input warp_threads_t t);
    in_valid <= 1; in_pc <= pc; in_thr <= t;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 0;
  endtask

  function automatic bit lane_is(input issue_slice_t s, input int exp[8]);
    for (int l = 0; l < 8; l++) begin
      if (s.lane_act[l] != (exp[l] >= 0)) return 0;
      if (exp[l] >= 0 && s.lane_tid[l] != tid_t'(exp[l])) return 0;
    end
    return 1;
  endfunction

  initial begin
    int w[32], e[8];
    // ---- case 1: if/else ----
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 32; s++) w[s] = s;
    send(32'h0, mk(w));
    idle();
    repeat (8) @(posedge clk);
    check(lg.size() == 4, "A issued in 4 cycles");
    lg.delete();
    w = '{default: -1};
    for (int t = 0; t < 4; t++) w[t] = t;
    for (int t = 12; t < 16; t++) w[t] = t;
    send(32'h10, mk(w));          // then side
    w = '{default: -1};
    for (int t = 4; t < 12; t++) w[t] = t;
    for (int t = 16; t < 32; t++) w[t] = t;
    send(32'h20, mk(w));          // else side
    idle();
    repeat (10) @(posedge clk);
    check(lg.size() == 4, "then and else sides issued in 1 + 3 cycles");
    if (lg.size() == 4) begin
      check(lg[0].s.pc == 32'h10 && lg[0].s.first && lg[0].s.last && lg[0].s.len == 3'd1, "then side: one cycle");
      e = '{0, 1, 2, 3, 12, 13, 14, 15};
      check(lane_is(lg[0].s, e), "then side: threads 0-3 and 12-15 in one quarter");
      check(lg[1].s.pc == 32'h20 && lg[1].s.len == 3'd3 && lg[1].cyc == lg[0].cyc + 1, "else side follows without a gap");
      e = '{8, 9, 10, 11, 4, 5, 6, 7};
      check(lane_is(lg[1].s, e) && lg[1].s.quarter == 2'd0, "else side: threads 8-11 moved into quarter 0");
      check(lg[2].s.quarter == 2'd2 && lg[3].s.quarter == 2'd3 && lg[3].s.last, "else side: quarters 2 and 3");
      check(lg[3].cyc - lg[1].cyc == 2, "else side: three consecutive cycles");
    end
    // ---- case 2: en-DWF&HWS ----
    rst_n <= 0;
    dwf_en <= 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    lg.delete();
    @(posedge clk);
    for (int n = 0; n < 3; n++) begin
      for (int s = 0; s < 32; s++) w[s] = 100 + 32 * n + s;
      send(32'h100, mk(w));
    end
    w = '{default: -1};
    for (int l = 3; l < 8; l++) w[16 + l] = 16 + l;
    w[27] = 27;
    send(32'h200, mk(w));          // female: 19-23 and 27
    w = '{default: -1};
    w[0] = 32; w[7] = 39; w[8] = 40; w[9] = 41; w[14] = 46;
    w[18] = 50; w[20] = 52; w[21] = 53; w[22] = 54; w[23] = 55;
    w[25] = 57; w[26] = 58; w[27] = 59; w[28] = 60;
    send(32'h200, mk(w));          // male
    idle();
    repeat (25) @(posedge clk);
    check(lg.size() == 15, "three full warps and the combined warp: 12 + 3 cycles");
    if (lg.size() == 15) begin
      check(lg[12].s.pc == 32'h200 && lg[12].s.len == 3'd3 && lg[12].s.quarter == 2'd0, "combined warp: 3 cycles from quarter 0");
      e = '{-1, -1, -1, 59, 52, 53, 54, 55};
      check(lane_is(lg[12].s, e), "combined quarter 0");
      e = '{32, 41, 50, 19, 20, 21, 22, 23};
      check(lg[13].s.quarter == 2'd2 && lane_is(lg[13].s, e), "combined quarter 2");
      e = '{40, 57, 58, 27, 60, -1, 46, 39};
      check(lg[14].s.quarter == 2'd3 && lane_is(lg[14].s, e), "combined quarter 3");
      for (int i = 1; i < 15; i++) check(lg[i].cyc == lg[i-1].cyc + 1, "no idle issue cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
