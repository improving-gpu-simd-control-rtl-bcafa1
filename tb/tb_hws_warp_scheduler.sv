// tb_hws_warp_scheduler: self-checking test of majority + round-robin
// selection. A model keeps its own current PC and round-robin pointer and,
// for random pool contents, predicts the selected entry and the PC-switch
// flag. The pool contents are held for a few cycles at a time so that runs of
// issues at one PC, and the switch to the majority PC, both occur.
module tb_hws_warp_scheduler;
  import hws_pkg::*;

  localparam int D  = 16;
  localparam int IW = $clog2(D);

  logic clk = 0, rst_n = 0;
  logic [D-1:0] valid = '0;
  pc_t [D-1:0] pc = '0;
  logic take = 0;
  logic sel_valid, pc_switch;
  logic [IW-1:0] sel_idx;
  int checks = 0, failures = 0;
  int stays = 0, switches = 0, minority_stays = 0;

  hws_warp_scheduler #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  pc_t m_cur;
  bit  m_ok = 0;
  int  m_rr = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n % 4 == 0)
        for (int i = 0; i < D; i++) begin
          valid[i] = $urandom_range(0, 2) != 0;
          pc[i]    = pc_t'($urandom_range(0, 3)) * 8;
        end
      else if (take && sel_valid)
        valid[sel_idx] = 1'b0;   // an issued warp leaves the pool
      take = $urandom_range(0, 3) != 0;
      #1;
      begin
        int cnt[pc_t];
        int best, bestc, exp_idx, mcount;
        bit any_cur, any;
        pc_t gpc;
        cnt.delete();
        any_cur = 0; any = 0;
        for (int i = 0; i < D; i++) if (valid[i]) begin
          any = 1;
          if (m_ok && pc[i] == m_cur) any_cur = 1;
          if (cnt.exists(pc[i])) cnt[pc[i]]++; else cnt[pc[i]] = 1;
        end
        best = -1; bestc = 0;
        for (int i = 0; i < D; i++) if (valid[i] && cnt[pc[i]] > bestc) begin
          bestc = cnt[pc[i]]; best = i;
        end
        gpc = any_cur ? m_cur : (best >= 0 ? pc[best] : '0);
        exp_idx = -1;
        for (int k = 0; k < D; k++) begin
          int i;
          i = (m_rr + k) % D;
          if (exp_idx < 0 && valid[i] && pc[i] == gpc) exp_idx = i;
        end
        check(sel_valid == any, "selection valid");
        if (any) check(int'(sel_idx) == exp_idx, $sformatf("cycle %0d selected entry", n));
        check(pc_switch == (take && any && !any_cur), "pc switch flag");
        if (take && any) begin
          mcount = cnt[gpc];
          if (any_cur) stays++; else switches++;
          if (any_cur && mcount < bestc) minority_stays++;
          m_cur = pc[exp_idx]; m_ok = 1; m_rr = (exp_idx + 1) % D;
        end
      end
      @(posedge clk);
    end
    check(stays > 0 && switches > 0 && minority_stays > 0, "stay, switch and stay-on-minority all seen");
    $display("stays=%0d switches=%0d minority_stays=%0d", stays, switches, minority_stays);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
