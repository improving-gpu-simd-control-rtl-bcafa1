// hws_warp_size_sync: cross-SM warp-size synchronization.
//
// Every SM offers the issue length (non-empty quarters, 0..4) of its standby
// warp, the one its scheduler will issue next; this block returns the largest
// of them. An SM that has synchronization enabled stretches its next issue to
// that length, so all SMs use the largest warp size among the standby warps.
// This reproduces the synchronized warp-size rule of the HWS evaluation; it
// costs throughput and is a run-time option of the SMs.
// Combinational: a maximum over NUM_SM 3-bit values.
module hws_warp_size_sync
  import hws_pkg::*;
#(
  parameter int unsigned NUM_SM = 28
) (
  input  qcount_t [NUM_SM-1:0] sm_quarters,
  output qcount_t              max_quarters
);

  always_comb begin
    max_quarters = '0;
    for (int i = 0; i < int'(NUM_SM); i++)
      if (sm_quarters[i] > max_quarters) max_quarters = sm_quarters[i];
  end

endmodule
