// tb_sm_env: behavioural model of everything around one SM front end, for
// the SM and top-level testbenches, with its own checks.
//
// It launches NUM_WARPS full warps (thread t of warp w has ID w*32+t and sits
// in slot t) at PC 0 and models the rest of the SM: each issued quarter-warp
// goes down a LAT-cycle pipeline; when the last quarter of a warp leaves it,
// the threads are split by their next PC and sent back to the front end, one
// warp per PC, each thread still in the slot it was issued from. Threads that
// reach the end of the program leave; a warp whose threads all left is sent
// back once with no active thread.
//
// Program (next PC per thread): 0 -> 0x10 or 0x20 (branch), 0x10/0x20 ->
// 0x30 (merge point), 0x30 -> 0x40 or exit, 0x40 -> exit. The branch outcome
// per warp follows one of four patterns: half the threads at random, threads
// 0-3 and 12-15 of the warp, one thread in ten, or no divergence.
//
// Checks: every thread runs every instruction of its own path exactly once;
// every issued thread is in lane (ID mod 8); no empty quarter is issued; a
// warp's issue length is at least the lane-locked minimum (max threads in a
// lane) and, without warp formation, exactly that minimum; and, while the
// cross-SM stretch is off, the issue stage is never idle in a cycle after one
// in which the pool held a warp.
module tb_sm_env
  import hws_pkg::*;
#(
  parameter int SEED      = 1,
  parameter int NUM_WARPS = 8,
  parameter int LAT       = 24
) (
  input  logic          clk,
  input  logic          start,
  input  logic          dwf_en,
  input  logic          sync_en,
  output logic          in_valid,
  input  logic          in_ready,
  output pc_t           in_pc,
  output warp_threads_t in_thr,
  input  logic          iss_valid,
  input  issue_slice_t  iss,
  input  sm_events_t    ev,
  input  int            pool_count,
  output logic          done,
  output int            checks,
  output int            failures,
  output int            n_ev [10],
  output int            n_len [5],
  output int            n_cycles,
  output int            n_issue_cycles
);

  localparam int NT = NUM_WARPS * 32;
  localparam pc_t EXIT = 32'hFF;

  typedef struct { pc_t pc; warp_threads_t thr; } ret_t;
  typedef struct { int t; issue_slice_t s; } pipe_t;

  ret_t  retq[$];
  pipe_t pipe[$];
  bit [4:0] exp_path [NT];
  bit [4:0] done_path[NT];
  int    cyc;
  bit    running;
  int    outstanding;     // threads not yet exited
  int    prev_pool;
  bit    prev_stretch_busy;
  warp_threads_t asm_w;
  pc_t   asm_pc;
  int    w_slices, w_lane[8];
  bit    in_warp;
  bit    stretch_busy;

  function automatic int pc_index(pc_t p);
    case (p)
      32'h00: return 0;
      32'h10: return 1;
      32'h20: return 2;
      32'h30: return 3;
      32'h40: return 4;
      default: return -1;
    endcase
  endfunction

  function automatic bit br1(int tid);
    int w, t;
    w = tid / 32; t = tid % 32;
    case ((w + SEED) % 4)
      0: return ((tid * 2654435761 + SEED * 97) >> 7) % 2 == 1;
      1: return (t < 4) || (t >= 12 && t < 16);
      2: return ((tid * 40503 + SEED) >> 3) % 10 == 0;
      default: return 1'b1;
    endcase
  endfunction

  function automatic bit br2(int tid);
    return ((tid * 69069 + SEED * 13) >> 5) % 3 == 0;
  endfunction

  function automatic pc_t next_pc(pc_t p, int tid);
    case (p)
      32'h00: return br1(tid) ? 32'h10 : 32'h20;
      32'h10, 32'h20: return 32'h30;
      32'h30: return br2(tid) ? 32'h40 : EXIT;
      default: return EXIT;
    endcase
  endfunction

  task automatic fail(input string what);
    failures++;
    if (failures < 20) $display("FAIL (seed %0d): %s", SEED, what);
  endtask

  // the input port is driven with nonblocking updates at the clock edge, so
  // the front end samples the value of the previous cycle
  task automatic drive_port();
    in_valid <= running && retq.size() > 0;
    in_pc    <= (retq.size() > 0) ? retq[0].pc  : '0;
    in_thr   <= (retq.size() > 0) ? retq[0].thr : '0;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; running = 0; cyc = 0;
    in_valid = 0; in_pc = '0; in_thr = '0;
    n_cycles = 0; n_issue_cycles = 0;
    for (int i = 0; i < 10; i++) n_ev[i] = 0;
    for (int i = 0; i < 5; i++) n_len[i] = 0;
  end

  always @(posedge clk) begin
    if (start) begin
      retq.delete(); pipe.delete();
      running = 1; done = 0; cyc = 0; in_warp = 0; prev_pool = 0; prev_stretch_busy = 0;
      n_cycles = 0; n_issue_cycles = 0;
      for (int i = 0; i < 10; i++) n_ev[i] = 0;
      for (int i = 0; i < 5; i++) n_len[i] = 0;
      stretch_busy = 0;
      outstanding = NT;
      for (int t = 0; t < NT; t++) begin
        pc_t p;
        exp_path[t] = '0; done_path[t] = '0;
        p = 32'h00;
        while (p != EXIT) begin
          exp_path[t][pc_index(p)] = 1'b1;
          p = next_pc(p, t);
        end
      end
      for (int w = 0; w < NUM_WARPS; w++) begin
        ret_t r;
        r.pc = 32'h00;
        r.thr.act = '1;
        for (int s = 0; s < 32; s++) r.thr.tid[s] = tid_t'(w * 32 + s);
        retq.push_back(r);
      end
    end else if (running) begin
      cyc++;
      n_cycles++;
      // handshake of the warp on the input port
      if (in_valid && in_ready) void'(retq.pop_front());
      // events
      if (ev.accept)     n_ev[0]++;
      if (ev.drop)       n_ev[1]++;
      if (ev.squeezed)   n_ev[2]++;
      if (ev.merged)     n_ev[3]++;
      if (ev.relocated)  n_ev[4]++;
      if (ev.merge_fail) n_ev[5]++;
      if (ev.inserted)   n_ev[6]++;
      if (ev.stall)      n_ev[7]++;
      if (ev.pc_switch)  n_ev[8]++;
      if (ev.stretched)  n_ev[9]++;
      // the issue stage must not idle after a cycle with a warp in the pool
      if (!sync_en && !iss_valid) begin
        checks++;
        if (prev_pool != 0) fail($sformatf("issue idle at cycle %0d with a warp waiting", cyc));
      end
      prev_pool = pool_count;
      // issued quarter
      if (iss_valid) begin
        n_issue_cycles++;
        checks++;
        if (iss.lane_act == '0) fail("empty quarter issued");
        if (iss.first) begin
          w_slices = 0;
          for (int l = 0; l < 8; l++) w_lane[l] = 0;
        end
        w_slices++;
        for (int l = 0; l < 8; l++) if (iss.lane_act[l]) begin
          int t, pi;
          t = int'(iss.lane_tid[l]);
          pi = pc_index(iss.pc);
          w_lane[l]++;
          checks++;
          if (t >= NT || t % 8 != l) fail($sformatf("thread %0d issued in lane %0d", t, l));
          else if (pi < 0 || !exp_path[t][pi] || done_path[t][pi])
            fail($sformatf("thread %0d issued at pc %h off its path or twice", t, iss.pc));
          else done_path[t][pi] = 1'b1;
        end
        if (iss.last) begin
          int mx;
          mx = 0;
          for (int l = 0; l < 8; l++) if (w_lane[l] > mx) mx = w_lane[l];
          checks++;
          if (w_slices < mx || (!dwf_en && w_slices != mx) || w_slices > 4)
            fail($sformatf("warp issued in %0d cycles, lane minimum %0d", w_slices, mx));
          checks++;
          if (!sync_en && int'(iss.len) != w_slices) fail("issue length field");
          if (sync_en && int'(iss.len) < w_slices) fail("stretched issue length");
          n_len[w_slices]++;
        end
        pipe.push_back('{t: cyc + LAT, s: iss});
      end
      // pipeline exit and warp reassembly
      while (pipe.size() > 0 && pipe[0].t <= cyc) begin
        issue_slice_t s;
        s = pipe.pop_front().s;
        if (s.first) begin asm_w = '0; asm_pc = s.pc; end
        for (int l = 0; l < 8; l++) if (s.lane_act[l]) begin
          asm_w.act[int'(s.quarter)*8 + l] = 1'b1;
          asm_w.tid[int'(s.quarter)*8 + l] = s.lane_tid[l];
        end
        if (s.last) begin
          pc_t  npcs[$];
          bit   any;
          any = 0;
          npcs.delete();
          for (int k = 0; k < 32; k++) if (asm_w.act[k]) begin
            pc_t np;
            np = next_pc(asm_pc, int'(asm_w.tid[k]));
            if (np == EXIT) outstanding--;
            else begin
              any = 1;
              if (!(np inside {npcs})) npcs.push_back(np);
            end
          end
          foreach (npcs[i]) begin
            ret_t r;
            r.pc = npcs[i];
            r.thr = asm_w;
            for (int k = 0; k < 32; k++)
              if (asm_w.act[k] && next_pc(asm_pc, int'(asm_w.tid[k])) != npcs[i]) begin
                r.thr.act[k] = 1'b0;
                r.thr.tid[k] = '0;
              end
            retq.push_back(r);
          end
          if (!any) begin
            ret_t r;
            r.pc = EXIT; r.thr = '0;
            retq.push_back(r);
          end
        end
      end
      if (outstanding == 0 && retq.size() == 0 && pipe.size() == 0 && pool_count == 0 && !iss_valid) begin
        running = 0;
        done = 1;
        for (int t = 0; t < NT; t++) begin
          checks++;
          if (done_path[t] != exp_path[t]) fail($sformatf("thread %0d ran %b, expected %b", t, done_path[t], exp_path[t]));
        end
      end
    end
    drive_port();
  end

endmodule
