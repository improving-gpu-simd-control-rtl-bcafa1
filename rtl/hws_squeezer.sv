// hws_squeezer: lane-preserving warp compaction (the HWS squeeze step).
//
// The four quarter-warps are ranked by their number of active threads, most
// first; equal counts keep their physical order. The ranked quarters are then
// filled in turn: quarter of rank 0 first, then ranks 1 and 2. A hole in the
// receiving quarter at lane j is filled from the lowest-ranked quarter that
// still holds a thread at lane j (rank 3 first, then 2, ...). A thread only
// ever moves within its lane, so no register-bank conflict can appear, and the
// fullest quarters stay where they are, which keeps the number of moves low.
// Ranking is logical: only the threads move, the quarters keep their place.
//
// Because all moves stay in one lane, the result occupies exactly
// max over lanes of (active threads in that lane) quarters, which is the
// smallest warp that lane-locked threads can form.
//
// Interface: purely combinational. in_thr -> out_thr, plus moves, the number
// of threads that changed quarter. Ranking, fill order and donor order follow
// the HWS squeeze algorithm; the tie rule for equal counts is this design's.
module hws_squeezer
  import hws_pkg::*;
(
  input  warp_threads_t in_thr,
  output warp_threads_t out_thr,
  output logic [5:0]    moves
);

  logic [3:0] cnt  [NUM_QUARTERS];
  logic [1:0] rnk  [NUM_QUARTERS];   // rank of physical quarter q
  logic [1:0] ord  [NUM_QUARTERS];   // physical quarter holding rank r

  // active threads per quarter
  always_comb begin
    for (int q = 0; q < NUM_QUARTERS; q++) begin
      cnt[q] = '0;
      for (int l = 0; l < SIMD_WIDTH; l++)
        cnt[q] = cnt[q] + 4'(in_thr.act[q*SIMD_WIDTH+l]);
    end
  end

  // descending rank, ties broken by lower physical index
  always_comb begin
    for (int q = 0; q < NUM_QUARTERS; q++) begin
      rnk[q] = '0;
      for (int p = 0; p < NUM_QUARTERS; p++)
        if (p != q && ((cnt[p] > cnt[q]) || (cnt[p] == cnt[q] && p < q)))
          rnk[q] = rnk[q] + 2'd1;
    end
    for (int r = 0; r < NUM_QUARTERS; r++) begin
      ord[r] = '0;
      for (int q = 0; q < NUM_QUARTERS; q++)
        if (rnk[q] == 2'(r)) ord[r] = 2'(q);
    end
  end

  // fill holes of ranks 0..2 from the emptiest ranks, lane by lane
  always_comb begin
    logic found;
    int   dst;
    int   src;
    found   = 1'b0;
    dst     = 0;
    src     = 0;
    out_thr = in_thr;
    moves   = '0;
    for (int i = 0; i < NUM_QUARTERS - 1; i++) begin
      for (int j = 0; j < SIMD_WIDTH; j++) begin
        dst   = int'(ord[i]) * SIMD_WIDTH + j;
        found = out_thr.act[dst];
        for (int k = NUM_QUARTERS - 1; k > i; k--) begin
          src = int'(ord[k]) * SIMD_WIDTH + j;
          if (!found && out_thr.act[src]) begin
            out_thr.act[dst] = 1'b1;
            out_thr.tid[dst] = out_thr.tid[src];
            out_thr.act[src] = 1'b0;
            out_thr.tid[src] = '0;
            moves            = moves + 6'd1;
            found            = 1'b1;
          end
        end
      end
    end
  end

endmodule
