// hws_sm: hybrid-warp-size warp control of one streaming multiprocessor.
//
// Warps arrive on the in_* port when they come back from the pipeline with a
// new PC, for example one side of a divergent branch with only some of its
// threads active. Each arriving warp is
//   1. squeezed (hws_squeezer) so that its threads use as few quarter-warps
//      as lane locking allows;
//   2. with dwf_en set (en-DWF&HWS), offered to the lowest pool entry with the
//      same PC for enhanced warp formation (hws_endwf_merge); if the lane
//      conflicts can be cleared the two are combined into that entry,
//      otherwise, or with dwf_en clear (PDOM&HWS), it takes a free entry;
//   3. scaled (hws_warp_size_analyzer): its quarter mask is stored with it.
// The scheduler (hws_warp_scheduler) picks the standby warp, and the issue
// unit (hws_issue_unit) sends its non-empty quarters to the SIMD lanes, one
// per cycle, starting the next warp immediately after the last quarter.
//
// Timing: an arriving warp is written into the pool at the next clock edge
// and can be issued from the cycle after. in_ready is low while the pool has
// no free entry (a conservative rule: a warp that would have merged waits
// too). A warp leaving the pool for issue in a cycle cannot be a merge
// partner in that cycle. A warp with no active thread is accepted and dropped.
// standby_quarters is the issue length of the standby warp, for the cross-SM
// size synchronization; sync_en/sync_quarters apply its result.
// The processing order squeeze -> en-DWF -> combine -> downscale follows the
// en-DWF&HWS scheme; the single merge candidate, the back-pressure rule and
// the pool depth are this design's choices.
module hws_sm
  import hws_pkg::*;
#(
  parameter int unsigned POOL_DEPTH = 32,
  localparam int unsigned IW        = $clog2(POOL_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          dwf_en,
  input  logic          sync_en,
  input  qcount_t       sync_quarters,
  output qcount_t       standby_quarters,
  input  logic          in_valid,
  output logic          in_ready,
  input  pc_t           in_pc,
  input  warp_threads_t in_thr,
  output logic          iss_valid,
  output issue_slice_t  iss,
  output sm_events_t    ev,
  output logic [IW:0]   pool_count
);

  // squeeze
  warp_threads_t sq_thr;
  logic [5:0]    sq_moves;
  hws_squeezer u_squeezer (.in_thr(in_thr), .out_thr(sq_thr), .moves(sq_moves));

  // pool
  logic                         wr_en;
  logic [IW-1:0]                wr_idx;
  pool_entry_t                  wr_data;
  logic [POOL_DEPTH-1:0]        valid;
  pool_entry_t [POOL_DEPTH-1:0] entries;
  logic [POOL_DEPTH-1:0]        pc_match;
  logic [IW-1:0]                free_idx;
  logic                         full;
  logic                         take;
  logic                         sel_valid;
  logic [IW-1:0]                sel_idx;

  hws_warp_pool #(.DEPTH(POOL_DEPTH)) u_pool (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_data,
    .clr_en(take), .clr_idx(sel_idx),
    .match_pc(in_pc),
    .valid, .entries, .pc_match, .free_idx, .full, .count(pool_count)
  );

  // scheduler
  pc_t [POOL_DEPTH-1:0] pcs;
  logic                 pc_switch;
  always_comb
    for (int i = 0; i < int'(POOL_DEPTH); i++) pcs[i] = entries[i].pc;

  hws_warp_scheduler #(.DEPTH(POOL_DEPTH)) u_sched (
    .clk, .rst_n, .valid, .pc(pcs), .take,
    .sel_valid, .sel_idx, .pc_switch
  );

  // issue
  logic stretched;
  hws_issue_unit u_issue (
    .clk, .rst_n,
    .next_valid(sel_valid), .next_entry(entries[sel_idx]),
    .sync_en, .sync_quarters,
    .take, .stretched,
    .out_valid(iss_valid), .out(iss), .busy()
  );

  assign standby_quarters = sel_valid ? count4(entries[sel_idx].qmask) : qcount_t'(0);

  // merge partner: lowest same-PC entry that is not leaving for issue now
  logic [POOL_DEPTH-1:0] cand;
  logic                  hit;
  logic [IW-1:0]         hit_idx;
  always_comb begin
    cand = pc_match;
    if (take) cand[sel_idx] = 1'b0;
    hit     = dwf_en && (|cand);
    hit_idx = '0;
    for (int i = int'(POOL_DEPTH) - 1; i >= 0; i--)
      if (cand[i]) hit_idx = IW'(i);
  end

  warp_threads_t merged_thr;
  logic          merge_ok;
  logic [5:0]    relocs;
  hws_endwf_merge u_endwf (
    .male_in(sq_thr), .female(entries[hit_idx].thr),
    .male_out(), .merged_thr, .ok(merge_ok), .relocs
  );

  // warp scaling of the squeezed and of the combined warp
  qmask_t     qm_sq;
  qmask_t     qm_mg;
  hws_warp_size_analyzer u_scale_sq (.act(sq_thr.act),     .qmask(qm_sq), .quarters(), .warp_size());
  hws_warp_size_analyzer u_scale_mg (.act(merged_thr.act), .qmask(qm_mg), .quarters(), .warp_size());

  logic accept;
  logic empty;
  logic do_merge;
  always_comb begin
    in_ready = !full;
    accept   = in_valid && in_ready;
    empty    = sq_thr.act == '0;
    do_merge = hit && merge_ok;
    wr_en    = accept && !empty;
    if (do_merge) begin
      wr_idx  = hit_idx;
      wr_data = '{pc: in_pc, thr: merged_thr, qmask: qm_mg};
    end else begin
      wr_idx  = free_idx;
      wr_data = '{pc: in_pc, thr: sq_thr, qmask: qm_sq};
    end

    ev            = '0;
    ev.accept     = accept;
    ev.drop       = accept && empty;
    ev.squeezed   = wr_en && sq_moves != '0;
    ev.merged     = wr_en && do_merge;
    ev.relocated  = wr_en && do_merge && relocs != '0;
    ev.merge_fail = wr_en && hit && !merge_ok;
    ev.inserted   = wr_en && !do_merge;
    ev.stall      = in_valid && !in_ready;
    ev.pc_switch  = pc_switch;
    ev.stretched  = stretched;
  end

endmodule
