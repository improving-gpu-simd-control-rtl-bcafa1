// hws_pkg: shared constants and types of the hybrid-warp-size (HWS) warp
// control logic.
//
// A warp has 32 thread slots arranged as 4 quarter-warps of 8 lanes; slot
// s = quarter*8 + lane. The 8 lanes are the 8 SIMD pipelines, so a thread must
// never leave its lane (its register-file bank is fixed by the lane), but it
// may move between the quarters of its lane. Each slot carries an active bit
// and the ID of the thread that sits in it, because after squeezing or warp
// formation the slot no longer implies the thread.
//
// Warp size 32, SIMD width 8 and 28 SMs follow the system configuration this
// design targets. The 10-bit thread ID (1024 threads per SM) and the 32-bit PC
// are this design's own choices.
package hws_pkg;

  localparam int unsigned SIMD_WIDTH   = 8;
  localparam int unsigned WARP_SIZE    = 32;
  localparam int unsigned NUM_QUARTERS = WARP_SIZE / SIMD_WIDTH;
  localparam int unsigned TID_W        = 10;
  localparam int unsigned PC_W         = 32;

  typedef logic [TID_W-1:0]        tid_t;
  typedef logic [PC_W-1:0]         pc_t;
  typedef logic [NUM_QUARTERS-1:0] qmask_t;
  // number of issue cycles / non-empty quarters, 0..4
  typedef logic [2:0]              qcount_t;

  // Thread placement of one warp.
  typedef struct packed {
    logic [WARP_SIZE-1:0] act;
    tid_t [WARP_SIZE-1:0] tid;
  } warp_threads_t;

  // One warp-pool entry: the PC, the threads and the quarter-warp mask.
  typedef struct packed {
    pc_t           pc;
    warp_threads_t thr;
    qmask_t        qmask;
  } pool_entry_t;

  // One issue cycle: one quarter-warp on the 8 SIMD lanes.
  typedef struct packed {
    pc_t                                  pc;
    logic [$clog2(NUM_QUARTERS)-1:0]      quarter;
    logic [SIMD_WIDTH-1:0]                lane_act;
    tid_t [SIMD_WIDTH-1:0]                lane_tid;
    logic                                 first;   // first cycle of the warp
    logic                                 last;    // last cycle of the warp
    qcount_t                              len;     // issue cycles of the warp
  } issue_slice_t;

  // Single-cycle event flags of an SM front end, for counters and tests.
  typedef struct packed {
    logic accept;        // an incoming warp was accepted
    logic drop;          // it had no active thread and was discarded
    logic squeezed;      // the squeezer moved at least one thread
    logic merged;        // en-DWF combined it with a pool warp
    logic relocated;     // en-DWF moved at least one thread to clear a lane conflict
    logic merge_fail;    // a same-PC pool warp existed but a lane conflict remained
    logic inserted;      // it took a new pool entry
    logic stall;         // a warp was offered while the pool had no free entry
    logic pc_switch;     // the scheduler moved to another PC
    logic stretched;     // an issue was lengthened by the cross-SM size sync
  } sm_events_t;

  function automatic qcount_t count4(input qmask_t m);
    qcount_t c;
    c = '0;
    for (int i = 0; i < NUM_QUARTERS; i++) c = c + qcount_t'(m[i]);
    return c;
  endfunction

endpackage
