// hws_warp_size_analyzer: warp scaling.
//
// Builds the quarter-warp mask of a warp (bit q is 1 when quarter q has at
// least one active thread), the scaled warp size (8 threads per non-empty
// quarter, so 0, 8, 16, 24 or 32) and the number of issue cycles the warp
// needs on the 8-wide SIMD pipeline (one per non-empty quarter, 1 to 4).
// Combinational. Mask, size and cycle count follow the HWS warp-scaling step.
module hws_warp_size_analyzer
  import hws_pkg::*;
(
  input  logic [WARP_SIZE-1:0] act,
  output qmask_t               qmask,
  output qcount_t              quarters,
  output logic [5:0]           warp_size
);

  always_comb begin
    for (int q = 0; q < NUM_QUARTERS; q++)
      qmask[q] = |act[q*SIMD_WIDTH +: SIMD_WIDTH];
    quarters  = count4(qmask);
    warp_size = 6'(quarters) * 6'(SIMD_WIDTH);
  end

endmodule
