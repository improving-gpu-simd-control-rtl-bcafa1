// tb_hws_endwf_merge: self-checking test of enhanced dynamic warp formation.
// Directed cases are the two worked examples: an unsqueezed incoming warp and
// the same warp after squeezing, both combined with a 6-thread pool warp.
// Random pairs are compared with a behavioural model and with properties:
// pool threads never move, incoming threads stay in their lane, and success
// means the combined warp holds both thread sets without overlap.
module tb_hws_endwf_merge;
  import hws_pkg::*;

  warp_threads_t male_in, female, male_out, merged_thr;
  logic          ok;
  logic [5:0]    relocs;
  int checks = 0, failures = 0;

  hws_endwf_merge dut (.male_in, .female, .male_out, .merged_thr, .ok, .relocs);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok_i, input string what);
    checks++;
    if (!ok_i) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic warp_threads_t pack(input int w[32]);
    warp_threads_t r;
    for (int s = 0; s < 32; s++) begin
      r.act[s] = (w[s] >= 0);
      r.tid[s] = (w[s] >= 0) ? tid_t'(w[s]) : '0;
    end
    return r;
  endfunction

  function automatic bit same(input warp_threads_t a, input int exp[32]);
    for (int s = 0; s < 32; s++) begin
      if (a.act[s] != (exp[s] >= 0)) return 0;
      if (exp[s] >= 0 && a.tid[s] != tid_t'(exp[s])) return 0;
    end
    return 1;
  endfunction

  // behavioural model of the relocation, -1 marks an empty slot
  function automatic void model(input int m[32], input int f[32], output int mo[32],
                                output bit okm, output int nrel);
    mo   = m;
    nrel = 0;
    for (int l = 0; l < 8; l++)
      for (int q = 0; q < 4; q++)
        if (f[q*8+l] >= 0 && mo[q*8+l] >= 0) begin
          int k;
          k = 0;
          while (k < 4 && (k == q || f[k*8+l] >= 0 || mo[k*8+l] >= 0)) k++;
          if (k < 4) begin
            mo[k*8+l] = mo[q*8+l];
            mo[q*8+l] = -1;
            nrel++;
          end
        end
    okm = 1;
    for (int s = 0; s < 32; s++) if (f[s] >= 0 && mo[s] >= 0) okm = 0;
  endfunction

  initial begin
    int m[32], f[32], e[32], mo[32], nrel;
    bit okm;
    // pool warp: threads 19..23 in quarter 2 lanes 3..7, thread 27 in quarter 3 lane 3
    f = '{default: -1};
    for (int l = 3; l < 8; l++) f[16+l] = 16 + l;
    f[27] = 27;
    // incoming warp, not squeezed
    m = '{default: -1};
    m[0] = 32; m[7] = 39; m[8] = 40; m[9] = 41; m[14] = 46;
    m[18] = 50; m[20] = 52; m[21] = 53; m[22] = 54; m[23] = 55;
    m[25] = 57; m[26] = 58; m[27] = 59; m[28] = 60;
    male_in = pack(m); female = pack(f);
    #1;
    e = '{default: -1};
    e[0] = 32; e[3] = 59; e[4] = 52; e[5] = 53; e[6] = 54; e[7] = 39;
    e[8] = 40; e[9] = 41; e[14] = 46; e[15] = 55;
    e[18] = 50; e[19] = 19; e[20] = 20; e[21] = 21; e[22] = 22; e[23] = 23;
    e[25] = 57; e[26] = 58; e[27] = 27; e[28] = 60;
    check(ok && same(merged_thr, e), "example without squeeze");
    check(relocs == 6'd5, "example without squeeze: 5 relocations");
    // incoming warp after squeezing
    m = '{default: -1};
    m[16] = 32; m[17] = 41; m[18] = 50; m[19] = 59; m[20] = 52; m[21] = 53; m[22] = 54; m[23] = 55;
    m[24] = 40; m[25] = 57; m[26] = 58; m[28] = 60; m[30] = 46; m[31] = 39;
    male_in = pack(m);
    #1;
    e = '{default: -1};
    e[3] = 59; e[4] = 52; e[5] = 53; e[6] = 54; e[7] = 55;
    e[16] = 32; e[17] = 41; e[18] = 50; e[19] = 19; e[20] = 20; e[21] = 21; e[22] = 22; e[23] = 23;
    e[24] = 40; e[25] = 57; e[26] = 58; e[27] = 27; e[28] = 60; e[30] = 46; e[31] = 39;
    check(ok && same(merged_thr, e), "example with squeeze");
    check(relocs == 6'd5, "example with squeeze: 5 relocations");
    // a lane with five threads cannot combine
    m = '{default: -1}; f = '{default: -1};
    m[0] = 1; m[8] = 2; m[16] = 3; f[24] = 4; f[0] = 5;
    male_in = pack(m); female = pack(f);
    #1;
    check(!ok, "overfull lane is refused");
    // random pairs
    for (int n = 0; n < 3000; n++) begin
      int dm, df;
      dm = $urandom_range(1, 12);
      df = $urandom_range(1, 12);
      for (int s = 0; s < 32; s++) begin
        m[s] = ($urandom_range(0, 15) < dm) ? $urandom_range(0, 511) : -1;
        f[s] = ($urandom_range(0, 15) < df) ? $urandom_range(512, 1023) : -1;
      end
      male_in = pack(m); female = pack(f);
      #1;
      model(m, f, mo, okm, nrel);
      check(ok == okm, $sformatf("pair %0d success flag", n));
      check(same(male_out, mo), $sformatf("pair %0d relocated warp", n));
      check(int'(relocs) == nrel, $sformatf("pair %0d relocation count", n));
      if (ok) begin
        for (int s = 0; s < 32; s++)
          if (f[s] >= 0) e[s] = f[s]; else e[s] = mo[s];
        check(same(merged_thr, e), $sformatf("pair %0d combined warp", n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
