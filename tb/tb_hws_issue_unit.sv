// tb_hws_issue_unit: self-checking test of variable-length warp issue.
// Random warps with random quarter masks are offered, sometimes with gaps.
// A model queues, for every accepted warp, the expected issue cycles (its
// non-empty quarters in ascending order, then stretch bubbles when the
// synchronized length is larger) and checks every output cycle, the moment of
// take (only when idle or in the last cycle of a warp) and the total number
// of cycles against the sum of the issue lengths.
module tb_hws_issue_unit;
  import hws_pkg::*;

  logic clk = 0, rst_n = 0;
  logic next_valid = 0;
  pool_entry_t next_entry = '0;
  logic sync_en = 0;
  qcount_t sync_quarters = '0;
  logic take, stretched, out_valid, busy;
  issue_slice_t out;
  int checks = 0, failures = 0;

  hws_issue_unit dut (.*);

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

  typedef struct {
    bit         v;
    int         q;
    logic [7:0] act;
    tid_t       tid[8];
    bit         first, last;
    int         len;
    pc_t        pc;
  } exp_t;
  exp_t exq[$];

  int busy_cycles = 0, sum_len = 0, stretch_n = 0, len_hist[5];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // offer a warp
      next_valid = $urandom_range(0, 9) != 0;
      next_entry.pc = pc_t'($urandom);
      next_entry.thr.act = '0;
      next_entry.qmask = 4'($urandom_range(1, 15));
      for (int s = 0; s < 32; s++) begin
        next_entry.thr.tid[s] = tid_t'($urandom);
        if (next_entry.qmask[s/8]) next_entry.thr.act[s] = $urandom_range(0, 2) != 0;
      end
      for (int q = 0; q < 4; q++)
        if (next_entry.qmask[q] && next_entry.thr.act[q*8 +: 8] == '0) next_entry.thr.act[q*8] = 1'b1;
      sync_en = n >= 3000;
      sync_quarters = qcount_t'($urandom_range(0, 4));
      #1;
      // check this cycle
      check(take == (next_valid && exq.size() <= 1), $sformatf("cycle %0d take timing", n));
      if (exq.size() > 0) begin
        exp_t e;
        e = exq.pop_front();
        busy_cycles++;
        check(busy && out_valid == e.v, $sformatf("cycle %0d valid", n));
        if (e.v) begin
          bit ok;
          ok = int'(out.quarter) == e.q && out.lane_act == e.act && out.first == e.first &&
               out.last == e.last && int'(out.len) == e.len && out.pc == e.pc;
          for (int l = 0; l < 8; l++) if (e.act[l] && out.lane_tid[l] != e.tid[l]) ok = 0;
          check(ok, $sformatf("cycle %0d issued quarter", n));
        end
      end else begin
        check(!busy && !out_valid, $sformatf("cycle %0d idle", n));
      end
      if (take) begin
        int own, len, k;
        own = 0;
        for (int q = 0; q < 4; q++) if (next_entry.qmask[q]) own++;
        len = own;
        if (sync_en && int'(sync_quarters) > len) len = int'(sync_quarters);
        check(stretched == (len != own), "stretch flag");
        if (len != own) stretch_n++;
        sum_len += len;
        len_hist[own]++;
        k = 0;
        for (int q = 0; q < 4; q++) if (next_entry.qmask[q]) begin
          exp_t e;
          e.v = 1; e.q = q; e.act = next_entry.thr.act[q*8 +: 8];
          for (int l = 0; l < 8; l++) e.tid[l] = next_entry.thr.tid[q*8+l];
          e.first = (k == 0); e.last = (k == own - 1); e.len = len; e.pc = next_entry.pc;
          exq.push_back(e);
          k++;
        end
        for (int b = own; b < len; b++) begin
          exp_t e;
          e.v = 0;
          exq.push_back(e);
        end
      end
      @(posedge clk);
    end
    // drain
    next_valid = 0;
    while (exq.size() > 0) begin
      @(negedge clk);
      void'(exq.pop_front());
      busy_cycles++;
    end
    check(busy_cycles == sum_len, "busy cycles equal the sum of issue lengths");
    for (int q = 1; q <= 4; q++) check(len_hist[q] > 0, $sformatf("warps of %0d quarters issued", q));
    check(stretch_n > 0, "stretched issues seen");
    $display("issue lengths 1..4: %0d %0d %0d %0d, stretched %0d", len_hist[1], len_hist[2], len_hist[3], len_hist[4], stretch_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
