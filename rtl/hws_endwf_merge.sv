// hws_endwf_merge: enhanced dynamic warp formation (en-DWF).
//
// Combines an incoming ("male") warp with a warp from the pool ("female") that
// has the same PC. Plain warp formation needs the two warps to be free of lane
// conflicts slot by slot. Here a lane may hold up to four threads, one per
// quarter, so a conflict is first cleared by relocation: lane by lane (lane 0
// first) and within a lane quarter by quarter (quarter 0 first), a male thread
// whose slot is also used by the female warp moves to the first quarter of the
// same lane that is empty in both warps. The warps combine only if no
// conflict is left; the female threads never move.
//
// Interface: combinational. ok is 1 when the combination succeeds; then
// merged_thr holds the combined warp (female thread where the female slot is
// active, male thread otherwise). male_out is the relocated male warp, which
// the caller uses when the combination fails. relocs counts relocated threads.
module hws_endwf_merge
  import hws_pkg::*;
(
  input  warp_threads_t male_in,
  input  warp_threads_t female,
  output warp_threads_t male_out,
  output warp_threads_t merged_thr,
  output logic          ok,
  output logic [5:0]    relocs
);

  always_comb begin
    logic done;
    int   t;
    int   s;
    done     = 1'b0;
    t        = 0;
    s        = 0;
    male_out = male_in;
    relocs   = '0;
    for (int l = 0; l < SIMD_WIDTH; l++) begin
      for (int q = 0; q < NUM_QUARTERS; q++) begin
        t = q * SIMD_WIDTH + l;
        if (female.act[t] && male_out.act[t]) begin
          done = 1'b0;
          for (int k = 0; k < NUM_QUARTERS; k++) begin
            s = k * SIMD_WIDTH + l;
            if (!done && k != q && !female.act[s] && !male_out.act[s]) begin
              male_out.act[s] = 1'b1;
              male_out.tid[s] = male_out.tid[t];
              male_out.act[t] = 1'b0;
              male_out.tid[t] = '0;
              relocs          = relocs + 6'd1;
              done            = 1'b1;
            end
          end
        end
      end
    end
    ok = ~|(male_out.act & female.act);
    merged_thr.act = male_out.act | female.act;
    for (int i = 0; i < WARP_SIZE; i++)
      merged_thr.tid[i] = female.act[i] ? female.tid[i] : male_out.tid[i];
  end

endmodule
