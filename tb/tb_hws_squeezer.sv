// tb_hws_squeezer: self-checking test of the lane-preserving squeezer.
// Directed cases are the worked examples of the squeeze algorithm (a 23-thread
// warp squeezed into two quarters, and the two sides of an if/else over a
// 32-thread warp). Random warps are compared with a behavioural model that
// walks the ranked quarters slot by slot, and with two properties that need
// no model: every lane keeps its thread set, and the result uses exactly
// max-over-lanes(threads in lane) quarters, packed into the fullest quarters.
module tb_hws_squeezer;
  import hws_pkg::*;

  warp_threads_t in_thr, out_thr;
  logic [5:0]    moves;
  int checks = 0, failures = 0;

  hws_squeezer dut (.in_thr, .out_thr, .moves);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural model: -1 marks an empty slot
  function automatic void model(input int src[32], output int dst[32], output int nmov);
    int cnt[4], ord[4], tmp;
    dst  = src;
    nmov = 0;
    for (int q = 0; q < 4; q++) begin
      cnt[q] = 0;
      ord[q] = q;
      for (int l = 0; l < 8; l++) if (src[q*8+l] >= 0) cnt[q]++;
    end
    // stable insertion sort, most threads first
    for (int a = 1; a < 4; a++)
      for (int b = a; b > 0; b--)
        if (cnt[ord[b]] > cnt[ord[b-1]]) begin
          tmp = ord[b]; ord[b] = ord[b-1]; ord[b-1] = tmp;
        end
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 3; k > i; k--)
          if (dst[ord[i]*8+j] < 0 && dst[ord[k]*8+j] >= 0) begin
            dst[ord[i]*8+j] = dst[ord[k]*8+j];
            dst[ord[k]*8+j] = -1;
            nmov++;
          end
  endfunction

  task automatic apply(input int w[32]);
    for (int s = 0; s < 32; s++) begin
      in_thr.act[s] = (w[s] >= 0);
      in_thr.tid[s] = (w[s] >= 0) ? tid_t'(w[s]) : tid_t'($urandom);
    end
    #1;
  endtask

  function automatic bit same_as(input int exp[32]);
    for (int s = 0; s < 32; s++) begin
      if (out_thr.act[s] != (exp[s] >= 0)) return 0;
      if (exp[s] >= 0 && out_thr.tid[s] != tid_t'(exp[s])) return 0;
    end
    return 1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int w[32], e[32], nm, lanecnt, maxl, used;
    // example: 23-thread warp -> quarters 2 and 3
    w = '{default: -1};
    w[0] = 32; w[7] = 39;
    w[8] = 40; w[9] = 41; w[14] = 46;
    w[18] = 50; w[20] = 52; w[21] = 53; w[22] = 54; w[23] = 55;
    w[25] = 57; w[26] = 58; w[27] = 59; w[28] = 60;
    e = '{default: -1};
    e[16] = 32; e[17] = 41; e[18] = 50; e[19] = 59; e[20] = 52; e[21] = 53; e[22] = 54; e[23] = 55;
    e[24] = 40; e[25] = 57; e[26] = 58; e[28] = 60; e[30] = 46; e[31] = 39;
    apply(w);
    check(same_as(e), "squeeze example, 14 threads into quarters 2 and 3");
    check(moves == 6'd6, "squeeze example move count");
    // if/else example: else side = threads 4..11 and 16..31
    w = '{default: -1};
    for (int t = 4; t < 12; t++) w[t] = t;
    for (int t = 16; t < 32; t++) w[t] = t;
    e = '{default: -1};
    for (int l = 0; l < 8; l++) e[l] = (l < 4) ? 8 + l : l;
    for (int t = 16; t < 32; t++) e[t] = t;
    apply(w);
    check(same_as(e), "else side squeezed to 24 threads");
    // then side = threads 0..3 and 12..15
    w = '{default: -1};
    for (int t = 0; t < 4; t++) w[t] = t;
    for (int t = 12; t < 16; t++) w[t] = t;
    e = '{default: -1};
    for (int l = 0; l < 8; l++) e[l] = (l < 4) ? l : 8 + l;
    apply(w);
    check(same_as(e), "then side squeezed to 8 threads");
    check(moves == 6'd4, "then side move count");
    // random warps
    for (int n = 0; n < 3000; n++) begin
      int dens;
      dens = $urandom_range(1, 15);
      for (int s = 0; s < 32; s++) w[s] = ($urandom_range(0, 15) < dens) ? $urandom_range(0, 1023) : -1;
      model(w, e, nm);
      apply(w);
      check(same_as(e), $sformatf("random warp %0d vs model", n));
      check(moves == 6'(nm), $sformatf("random warp %0d move count", n));
      // properties
      maxl = 0;
      for (int l = 0; l < 8; l++) begin
        int a, b, outcnt;
        a = 0; b = 0; outcnt = 0;
        lanecnt = 0;
        for (int q = 0; q < 4; q++) begin
          if (w[q*8+l] >= 0) begin lanecnt++; a += w[q*8+l]; end
          if (out_thr.act[q*8+l]) begin outcnt++; b += int'(out_thr.tid[q*8+l]); end
        end
        if (lanecnt > maxl) maxl = lanecnt;
        check(a == b && lanecnt == outcnt, "lane keeps its threads");
      end
      used = 0;
      for (int q = 0; q < 4; q++) if (|out_thr.act[q*8 +: 8]) used++;
      check(used == maxl, $sformatf("random warp %0d uses minimum quarters", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
