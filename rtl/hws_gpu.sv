// hws_gpu: top level, NUM_SM hybrid-warp-size SM front ends side by side with
// the cross-SM warp-size synchronization.
//
// Each SM has its own warp input (warps returning from its pipeline) and its
// own issue output (one quarter-warp per cycle to its 8 SIMD lanes). The
// standby issue lengths of all SMs go to hws_warp_size_sync, whose maximum is
// fed back to every SM; with sync_en set, all SMs issue their next warp with
// at least that length. dwf_en selects en-DWF&HWS (set) or PDOM&HWS (clear)
// in every SM. The pipelines, register files, memories and interconnect of the
// GPU lie outside this block and connect through these ports.
// 28 SMs follows the target configuration; ports are arrays indexed by SM.
module hws_gpu
  import hws_pkg::*;
#(
  parameter int unsigned NUM_SM     = 28,
  parameter int unsigned POOL_DEPTH = 32,
  localparam int unsigned IW        = $clog2(POOL_DEPTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          dwf_en,
  input  logic                          sync_en,
  input  logic          [NUM_SM-1:0]    in_valid,
  output logic          [NUM_SM-1:0]    in_ready,
  input  pc_t           [NUM_SM-1:0]    in_pc,
  input  warp_threads_t [NUM_SM-1:0]    in_thr,
  output logic          [NUM_SM-1:0]    iss_valid,
  output issue_slice_t  [NUM_SM-1:0]    iss,
  output sm_events_t    [NUM_SM-1:0]    ev,
  output logic [NUM_SM-1:0][IW:0]       pool_count,
  output qcount_t                       sync_quarters
);

  qcount_t [NUM_SM-1:0] standby;

  hws_warp_size_sync #(.NUM_SM(NUM_SM)) u_sync (
    .sm_quarters(standby), .max_quarters(sync_quarters)
  );

  for (genvar s = 0; s < int'(NUM_SM); s++) begin : g_sm
    hws_sm #(.POOL_DEPTH(POOL_DEPTH)) u_sm (
      .clk, .rst_n, .dwf_en, .sync_en,
      .sync_quarters,
      .standby_quarters(standby[s]),
      .in_valid(in_valid[s]), .in_ready(in_ready[s]),
      .in_pc(in_pc[s]), .in_thr(in_thr[s]),
      .iss_valid(iss_valid[s]), .iss(iss[s]),
      .ev(ev[s]), .pool_count(pool_count[s])
    );
  end

endmodule
