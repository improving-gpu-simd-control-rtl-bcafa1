// hws_warp_scheduler: majority + round-robin warp selection.
//
// Across PCs the scheduler uses the majority policy: it keeps issuing warps
// whose PC is the current PC as long as the pool holds one, and when none is
// left it switches to the PC held by the most pool entries (ties go to the PC
// of the lowest-numbered such entry). Among warps with the chosen PC it picks
// round robin, starting after the entry it issued last.
//
// Interface: sel_valid/sel_idx name the standby warp combinationally from the
// pool's valid bits and PCs. take (from the issue unit) consumes it; the
// scheduler then records its PC as the current PC and moves its round-robin
// pointer past it at the clock edge. pc_switch flags a take whose PC differs
// from the previous current PC.
// The two-level policy follows the scheduler configuration of the design;
// counting entries rather than threads per PC is this design's choice.
module hws_warp_scheduler
  import hws_pkg::*;
#(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned IW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEPTH-1:0] valid,
  input  pc_t  [DEPTH-1:0] pc,
  input  logic             take,
  output logic             sel_valid,
  output logic [IW-1:0]    sel_idx,
  output logic             pc_switch
);

  pc_t           cur_pc;
  logic          cur_ok;
  logic [IW-1:0] rr_ptr;

  logic [IW:0]      votes [DEPTH];
  logic [DEPTH-1:0] on_cur;
  logic [DEPTH-1:0] group;
  logic [IW-1:0]    maj_idx;
  logic [IW:0]      maj_votes;

  always_comb begin
    // votes for the PC of each entry
    for (int i = 0; i < int'(DEPTH); i++) begin
      votes[i] = '0;
      for (int j = 0; j < int'(DEPTH); j++)
        if (valid[i] && valid[j] && pc[i] == pc[j]) votes[i] = votes[i] + 1'b1;
      on_cur[i] = valid[i] && cur_ok && pc[i] == cur_pc;
    end
    maj_idx   = '0;
    maj_votes = '0;
    for (int i = 0; i < int'(DEPTH); i++)
      if (votes[i] > maj_votes) begin
        maj_votes = votes[i];
        maj_idx   = IW'(i);
      end
    // candidate group: the current PC if present, else the majority PC
    for (int i = 0; i < int'(DEPTH); i++)
      group[i] = (|on_cur) ? on_cur[i] : (valid[i] && pc[i] == pc[maj_idx]);
    // round robin inside the group, starting at rr_ptr
    sel_valid = |group;
    sel_idx   = '0;
    for (int n = int'(DEPTH) - 1; n >= 0; n--)
      if (group[(int'(rr_ptr) + n) % int'(DEPTH)])
        sel_idx = IW'((int'(rr_ptr) + n) % int'(DEPTH));
  end

  assign pc_switch = take && sel_valid && !(|on_cur);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur_pc <= '0;
      cur_ok <= 1'b0;
      rr_ptr <= '0;
    end else if (take && sel_valid) begin
      cur_pc <= pc[sel_idx];
      cur_ok <= 1'b1;
      rr_ptr <= IW'((int'(sel_idx) + 1) % int'(DEPTH));
    end
  end

endmodule
