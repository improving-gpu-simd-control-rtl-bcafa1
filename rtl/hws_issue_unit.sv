// hws_issue_unit: variable-length warp issue to the 8-wide SIMD pipeline.
//
// A warp of 32 slots needs up to four cycles on 8 lanes. This unit issues one
// non-empty quarter-warp per cycle, lowest quarter first, and skips empty
// quarters, so a warp takes as many cycles as its quarter mask has ones
// (1 to 4). On the last cycle of a warp it already takes the next standby
// warp, whose first quarter is issued in the following cycle: there is no
// idle issue cycle between warps while the pool has work.
//
// When sync_en is set, the issue length of a warp is raised to sync_quarters
// (the largest standby warp size over all SMs); the extra cycles are issue
// bubbles (out_valid low) at the end of the warp.
//
// Interface: next_valid/next_entry present the standby warp; take is high in
// the cycle the unit accepts it. out_valid/out is the issued quarter of the
// current cycle; out.first and out.last mark the first and the last quarter
// of a warp (stretch bubbles, if any, follow the quarter marked last), and
// out.len is the warp's issue length. busy is high while a warp occupies the
// issue stage.
// One quarter per cycle and the flexible start follow the HWS issue scheme;
// the lowest-first quarter order and the bubble placement are this design's.
module hws_issue_unit
  import hws_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         next_valid,
  input  pool_entry_t  next_entry,
  input  logic         sync_en,
  input  qcount_t      sync_quarters,
  output logic         take,
  output logic         stretched,
  output logic         out_valid,
  output issue_slice_t out,
  output logic         busy
);

  pool_entry_t cur;
  qmask_t      rem;        // quarters still to issue
  qcount_t     left;       // issue cycles left, including this one
  qcount_t     len;        // issue length of the current warp
  logic        first_q;    // next issued quarter is the warp's first

  qcount_t     own_len;
  qcount_t     new_len;
  logic        last_cycle;
  logic [1:0]  qsel;
  qmask_t      qbit;

  always_comb begin
    own_len = count4(next_entry.qmask);
    if (own_len == '0) own_len = qcount_t'(1);
    new_len = own_len;
    if (sync_en && sync_quarters > own_len) new_len = sync_quarters;
    if (new_len > qcount_t'(NUM_QUARTERS)) new_len = qcount_t'(NUM_QUARTERS);

    last_cycle = busy && left == qcount_t'(1);
    take       = next_valid && (!busy || last_cycle);
    stretched  = take && new_len != own_len;

    qsel = '0;
    for (int q = NUM_QUARTERS - 1; q >= 0; q--)
      if (rem[q]) qsel = 2'(q);
    qbit = qmask_t'(1) << qsel;

    out_valid    = busy && rem != '0;
    out.pc       = cur.pc;
    out.quarter  = qsel;
    out.lane_act = cur.thr.act[int'(qsel)*SIMD_WIDTH +: SIMD_WIDTH];
    for (int l = 0; l < SIMD_WIDTH; l++)
      out.lane_tid[l] = cur.thr.tid[int'(qsel)*SIMD_WIDTH + l];
    out.first    = first_q;
    out.last     = (rem & ~qbit) == '0;
    out.len      = len;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      cur     <= '0;
      rem     <= '0;
      left    <= '0;
      len     <= '0;
      first_q <= 1'b0;
    end else if (take) begin
      busy    <= 1'b1;
      cur     <= next_entry;
      rem     <= next_entry.qmask;
      left    <= new_len;
      len     <= new_len;
      first_q <= 1'b1;
    end else if (busy) begin
      rem     <= rem & ~qbit;
      left    <= left - qcount_t'(1);
      busy    <= left != qcount_t'(1);
      first_q <= 1'b0;
    end
  end

  a_no_empty_quarter: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> out.lane_act != '0);

endmodule
